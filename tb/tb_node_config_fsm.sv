// tb_node_config_fsm - drives the state machine with the real look-up table
// and, for a series of configuration changes, checks: the clock gate closes on
// the change, nodes are connected one per cycle in descending priority order
// (ties to the lower node number), exactly the nodes with priority >= 1 end
// up connected, the gate reopens after the last one, the reconfiguration takes
// 2 + (number of connected nodes) cycles, and the record's rate, size and
// DPLL divider are applied.
module tb_node_config_fsm;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] cfg_in = 0, lut_cfg, cfg_active;
  cfg_entry_t lut_entry, e;
  logic [4:0] node_on;
  logic gate_en, conn_strobe, reconfig;
  logic [2:0] rate;
  logic [7:0] data_size, dpll_n;
  node_id_t conn_id;
  prio_vec_t prio;
  int checks = 0, failures = 0;

  config_lut lut (.cfg(lut_cfg), .entry(lut_entry));
  node_config_fsm dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int c);
    int order[$], cycles, nexp, got[$];
    logic [4:0] exp_on;
    // expected order: stable sort by descending priority
    e = '0;
    cfg_in = 4'(c);
    #1;
    e = lut_entry;
    exp_on = 0;
    for (int p = 15; p >= 1; p--)
      for (int i = 0; i < 5; i++)
        if (int'(e.ctrl.prio[i]) == p) begin order.push_back(i + 1); exp_on[i] = 1; end
    nexp = order.size();
    cycles = 0;
    @(negedge clk);
    cycles++;
    chk(!gate_en, "gate closed on change");
    while (!gate_en && cycles < 50) begin
      if (conn_strobe) got.push_back(int'(conn_id));
      @(negedge clk);
      cycles++;
    end
    chk(got.size() == nexp, $sformatf("cfg %0d: %0d nodes connected, expected %0d", c, got.size(), nexp));
    for (int k = 0; k < nexp && k < got.size(); k++) chk(got[k] == order[k], "connection order");
    chk(node_on == exp_on, $sformatf("cfg %0d node_on %b expected %b", c, node_on, exp_on));
    chk(cycles == 3 + nexp, $sformatf("reconfig cycles %0d expected %0d", cycles, 3 + nexp));
    chk(rate == e.data_rate && data_size == e.data_size && dpll_n == e.ctrl.dpll_n
        && cfg_active == 4'(c), "record applied");
    repeat (5) @(negedge clk);
    chk(gate_en && node_on == exp_on, "steady");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    chk(gate_en && node_on == 0, "config 0 after reset");
    apply(1); apply(2); apply(4); apply(7); apply(13); apply(15); apply(0); apply(11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
