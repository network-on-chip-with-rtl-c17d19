// tb_dpll - checks that the DPLL locks its divided output to the reference.
// A reference square wave of REF_HALF cycles per half period drives ref_in.
// For sel = 1 and sel = 2 the test waits for locked, then measures the fout
// period over several reference periods and compares it with
// 2*REF_HALF/sel, within one clock cycle on average.
module tb_dpll;
  localparam int REF_HALF = 32;
  logic clk = 0, rst_n = 0, en = 1, ref_in = 0;
  logic [7:0] sel;
  logic fout, fb_out, locked;
  logic [15:0] fword;
  int checks = 0, failures = 0;

  dpll dut (.*);

  always #5 clk = ~clk;
  initial forever begin repeat (REF_HALF) @(posedge clk); ref_in <= ~ref_in; end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int n);
    longint t0, t1; int edges, lock_wait;
    lock_wait = 0;
    while (!locked && lock_wait < 60000) begin @(posedge clk); lock_wait++; end
    checks++;
    if (!locked) begin failures++; $display("FAIL: no lock for sel=%0d", n); end
    // let it settle a little longer, then measure fout period
    repeat (20*2*REF_HALF) @(posedge clk);
    @(posedge fout); t0 = $time;
    edges = 0;
    repeat (16*n) begin @(posedge fout); edges++; end
    t1 = $time;
    checks++;
    // expected time for 16*n fout periods = 16 reference periods
    if ((t1 - t0) < 16*2*REF_HALF*10 - 16*10 || (t1 - t0) > 16*2*REF_HALF*10 + 16*10) begin
      failures++;
      $display("FAIL: sel=%0d fout time %0d expected %0d", n, t1 - t0, 16*2*REF_HALF*10);
    end else $display("sel=%0d locked after %0d cycles, fword=%0d", n, lock_wait, fword);
    checks++;
    if (!locked) begin failures++; $display("FAIL: lost lock sel=%0d", n); end
  endtask

  initial begin
    sel = 8'd1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    measure(1);
    sel = 8'd2;
    repeat (4*REF_HALF) @(posedge clk);
    measure(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
