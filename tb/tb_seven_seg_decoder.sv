// tb_seven_seg_decoder - checks every digit pattern ({g..a}, active high)
// against an independent table built from which segments each digit lights,
// the OFF/ON state following en with one cycle delay, that inputs are ignored
// while OFF, and the one-cycle output latency.
module tb_seven_seg_decoder;
  logic clk = 0, rst_n = 0, en = 0, din_valid = 0;
  logic [3:0] din = '0, digit;
  logic [6:0] seg;
  logic state_on;
  int checks = 0, failures = 0;

  seven_seg_decoder dut (.*);
  always #5 clk = ~clk;

  // segments lit per digit, as strings of segment letters
  function automatic logic [6:0] ref_pat(input int v);
    string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    ref_pat = '0;
    for (int k = 0; k < lit[v].len(); k++) ref_pat[lit[v][k] - "a"] = 1'b1;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!state_on, "OFF after reset");
    // while OFF a digit is ignored
    din = 4'd7; din_valid = 1;
    @(negedge clk);
    din_valid = 0;
    chk(seg == ref_pat(0) && digit == 0, "ignored while OFF");
    en = 1;
    @(negedge clk);
    chk(state_on, "ON one cycle after en");
    for (int v = 0; v < 16; v++) begin
      din = 4'(v); din_valid = 1;
      @(negedge clk);
      chk(seg == ref_pat(v) && digit == 4'(v), $sformatf("pattern %0d", v));
    end
    // the two codes printed in the waveform
    din = 4'd1; @(negedge clk); chk(seg == 7'b0000110, "1 -> 0000110");
    din = 4'd2; @(negedge clk); chk(seg == 7'b1011011, "2 -> 1011011");
    din_valid = 0; din = 4'd9;
    @(negedge clk);
    chk(seg == 7'b1011011, "holds without din_valid");
    en = 0;
    @(negedge clk);
    chk(!state_on, "OFF again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
