// tb_sync_fifo - random pushes and pops against a queue model; checks data
// order, full/empty/count each cycle, a write when full that succeeds
// only together with a read, that full appears after exactly DEPTH
// writes, and that writes when full and reads when empty change nothing.
module tb_sync_fifo;
  localparam int W = 8, D = 16;
  logic clk = 0, rst_n = 0, en = 1, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(D):0] count;
  logic [W-1:0] q[$];
  logic [W-1:0] exp_rd;
  logic exp_rd_v;
  int checks = 0, failures = 0, nfull = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    exp_rd_v = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(empty && !full && count == 0, "after reset");
    // fill completely: full after exactly D writes
    for (int i = 0; i < D + 2; i++) begin
      wr_en = 1; wr_data = 8'hA5 ^ 8'(i);
      @(negedge clk);
      if (i < D) q.push_back(8'hA5 ^ 8'(i));
      chk(full == (i >= D - 1), "full after D writes");
      chk(int'(count) == ((i < D) ? i + 1 : D), "count while filling");
    end
    wr_en = 0;
    // random traffic
    for (int cyc = 0; cyc < 3000; cyc++) begin
      wr_en = 1'($urandom_range(0, 1));
      rd_en = 1'($urandom_range(0, 1));
      if (cyc > 2000) rd_en = 1'($urandom_range(0, 3) != 0);
      wr_data = 8'($urandom);
      // model
      exp_rd_v = 0;
      if (rd_en && q.size() > 0) begin exp_rd = q.pop_front(); exp_rd_v = 1; end
      if (wr_en && q.size() < D) q.push_back(wr_data);
      if (full) nfull++;
      @(negedge clk);
      if (exp_rd_v) chk(rd_data == exp_rd, "read data order");
      chk(int'(count) == q.size(), "count");
      chk(empty == (q.size() == 0), "empty flag");
      chk(full == (q.size() == D), "full flag");
    end
    chk(nfull > 0, "full seen during random traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
