// tb_config_lut - checks every configuration record: data index equals the
// configuration number, configuration 0100 has the priorities 9,7,6,5,0
// (FIFO, decoder, ADC, DPLL, adder), configuration 0000 connects nothing,
// rates give power-of-two division within the 3-bit field, and that the
// table as a whole switches every node on in some configuration and off in
// another.
module tb_config_lut;
  import noc_pkg::*;
  logic [3:0] cfg;
  cfg_entry_t entry;
  int checks = 0, failures = 0;
  logic [4:0] ever_on, ever_off;

  config_lut dut (.*);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ever_on = 0; ever_off = 0;
    for (int c = 0; c < 16; c++) begin
      cfg = 4'(c);
      #1;
      chk(entry.data_index == 4'(c), "data index");
      chk(entry.ctrl.dpll_n != 0, "dpll divider non-zero");
      for (int i = 0; i < 5; i++) begin
        if (entry.ctrl.prio[i] != 0) ever_on[i] = 1; else ever_off[i] = 1;
      end
      if (c == 0) chk(entry.ctrl.prio == '0, "config 0 connects nothing");
      if (c == 4) begin
        chk(entry.ctrl.prio[0] == 9 && entry.ctrl.prio[1] == 7 && entry.ctrl.prio[2] == 6
            && entry.ctrl.prio[3] == 5 && entry.ctrl.prio[4] == 0, "config 0100 priorities");
      end
    end
    chk(ever_on == 5'h1f && ever_off == 5'h1f, "every node both on and off somewhere");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
