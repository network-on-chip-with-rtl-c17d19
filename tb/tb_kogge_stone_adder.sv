// tb_kogge_stone_adder - exhaustive check of the 4-bit Kogge-Stone adder
// against integer addition (all a, b and carry-in values), including the
// operand pair 1101 + 1100 = 1 1001 used as the example, plus a random
// check of a 16-bit instance.
module tb_kogge_stone_adder;
  logic [3:0] a, b, s;
  logic       ci, co;
  logic [15:0] a16, b16, s16;
  logic        co16;
  int checks = 0, failures = 0;

  kogge_stone_adder #(.WIDTH(4))  dut   (.a(a), .b(b), .c_in(ci), .sum_out(s), .c_out(co));
  kogge_stone_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .c_in(ci), .sum_out(s16), .c_out(co16));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int c = 0; c < 2; c++) begin
          a = 4'(i); b = 4'(j); ci = 1'(c);
          #1;
          checks++;
          if ({co, s} != 5'(i + j + c)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d -> %0d%b", i, j, c, co, s);
          end
        end
    a = 4'b1101; b = 4'b1100; ci = 0; #1;
    checks++;
    if (s != 4'b1001 || co != 1'b1) failures++;
    for (int k = 0; k < 2000; k++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); ci = 1'($urandom);
      #1;
      checks++;
      if ({co16, s16} != 17'(a16) + 17'(b16) + 17'(ci)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
