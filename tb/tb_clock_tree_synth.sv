// tb_clock_tree_synth - for every rate 0..5 checks that the trigger pulse
// comes exactly once every 2^rate global cycles (and first 2^rate cycles after
// the rate is set), that the selected divided clock has period 2^rate,
// that closing the gate stops both tick and clk_out, that node_tick follows
// node_on and that tick_count counts the pulses.
module tb_clock_tree_synth;
  logic clk = 0, rst_n = 0, gate_en = 0;
  logic [2:0] rate = 0;
  logic [4:0] node_on = 5'b10101, node_tick;
  logic [7:0] clk_div;
  logic clk_out, tick;
  logic [15:0] tick_count;
  int checks = 0, failures = 0, seen_ticks = 0;

  clock_tree_synth dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (tick) seen_ticks++;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, n, cyc, rises, period, t0;
    logic prev_out;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r <= 5; r++) begin
      @(negedge clk);
      rate = 3'(r); gate_en = 1;
      last = 0; n = 0; cyc = 0; rises = 0; t0 = -1; prev_out = 0; period = 0;
      for (int k = 0; k < 40 * (1 << r); k++) begin
        @(negedge clk);
        cyc++;
        if (tick) begin
          n++;
          chk(cyc - last == (1 << r), $sformatf("tick spacing rate %0d: %0d", r, cyc - last));
          last = cyc;
          chk(node_tick == node_on, "node_tick = node_on on a tick");
        end else chk(node_tick == 0, "node_tick idle");
        if (r > 0) begin
          if (clk_out && !prev_out) begin
            if (t0 >= 0) begin period = cyc - t0; chk(period == (1 << r), "clk_out period"); end
            t0 = cyc;
            rises++;
          end
          prev_out = clk_out;
        end
      end
      chk(n == 40, $sformatf("tick count at rate %0d = %0d", r, n));
      if (r > 0) chk(rises >= 39, "clk_out toggles");
    end
    // close the gate: no ticks, clk_out stays low
    @(negedge clk);
    gate_en = 0;
    n = tick_count;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      chk(!tick && !clk_out, "gate closed");
    end
    chk(int'(tick_count) == seen_ticks && seen_ticks >= 40 * 6, "tick_count total");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
