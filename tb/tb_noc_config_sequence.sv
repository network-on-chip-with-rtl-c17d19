// tb_noc_config_sequence - the configuration sequence 0001 -> 0010 -> 0100
// on the complete NoC at default parameters. For each step it checks that the
// nodes come up in descending priority order, that exactly the nodes with a
// non-zero priority end up ON, that the trigger pulse spacing is 2^rate
// global cycles (the data rate of the configuration), that the tunable clock
// clk_out has that period, and that the configuration's data_size codes all
// leave the ring. For 0100 the connection order must be FIFO, decoder, ADC,
// DPLL with the adder left OFF (priorities 9, 7, 6, 5, 0).
module tb_noc_config_sequence;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, fifo_hold = 0, pll_ref = 0;
  logic [3:0] cfg = 0, cfg_active;
  logic clk_out, tick, conn_strobe, exit_valid, dpll_fout, dpll_fb, dpll_locked, fifo_full, run_done;
  logic [2:0] rate;
  logic [7:0] clk_div, adc_asig, adc_samp, adc_quant, exit_data;
  logic [15:0] tick_count, dpll_fword, cnt_sent, cnt_exit, cnt_drop, cnt_bypass, cnt_recirc;
  node_status_e [4:0] node_status;
  prio_vec_t prio;
  node_id_t conn_id, exit_src;
  logic [6:0] seg;
  logic [3:0] adc_pcm_out, seg_digit;
  logic [4:0] fifo_count;

  noc_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int conn_order[$];
  always #5 clk = ~clk;
  initial forever begin repeat (32) @(posedge clk); pll_ref <= ~pll_ref; end
  always @(posedge clk) begin
    cyc++;
    if (conn_strobe) conn_order.push_back(int'(conn_id));
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int c);
    int n, exit0, t_last, gaps, rises, t_rise;
    logic prev;
    exit0 = cnt_exit;
    conn_order.delete();
    cfg = 4'(c);
    n = 0;
    while ((cfg_active != cfg || !dut.gate_en) && n < 1000) begin @(posedge clk); n++; end
    // priority order of the connections
    for (int k = 1; k < conn_order.size(); k++)
      chk(prio[conn_order[k-1]-1] >= prio[conn_order[k]-1], $sformatf("cfg %0d order", c));
    for (int i = 0; i < 5; i++)
      chk((node_status[i] == NODE_ON) == (prio[i] != 0), $sformatf("cfg %0d node %0d status", c, i + 1));
    // data rate: tick spacing and clk_out period
    t_last = -1; gaps = 0; rises = 0; t_rise = -1; prev = clk_out;
    for (int k = 0; k < 16 * (1 << rate); k++) begin
      @(negedge clk);
      if (tick) begin
        if (t_last >= 0) begin chk(cyc - t_last == (1 << rate), "tick spacing"); gaps++; end
        t_last = cyc;
      end
      if (rate > 0 && clk_out && !prev) begin
        if (t_rise >= 0) chk(cyc - t_rise == (1 << rate), "clk_out period");
        t_rise = cyc; rises++;
      end
      prev = clk_out;
    end
    chk(gaps >= 10, "ticks seen");
    n = 0;
    while (!run_done && n < 50000) begin @(posedge clk); n++; end
    chk(run_done && int'(cnt_exit) - exit0 == int'(dut.data_size), $sformatf("cfg %0d all codes delivered", c));
    $display("cfg %b: rate /%0d, status %p, order %p, %0d codes", 4'(c), 1 << rate, node_status, conn_order,
             int'(cnt_exit) - exit0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    step(1);
    step(2);
    step(4);
    chk(conn_order.size() == 4 && conn_order[0] == 1 && conn_order[1] == 2 && conn_order[2] == 3
        && conn_order[3] == 4, "0100 connects FIFO, decoder, ADC, DPLL in that order");
    chk(node_status[4] == NODE_OFF, "0100 leaves the adder off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
