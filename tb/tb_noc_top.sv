// tb_noc_top - end-to-end test of the ring NoC at its default parameters.
//
// A reference model predicts every flit that leaves the ring: each PCM code
// the ADC injects becomes code + previous code when the adder node is
// connected (the previous code restarts at 0 on a new configuration) and
// passes unchanged through the FIFO and the decoder. The exits are compared
// with it in order. Scenarios:
//  1. a series of configurations run to completion: node status against the
//     priorities, exit count = data size, exit values in order, decoder
//     pattern of the last value, trigger-pulse spacing = 2^rate;
//  2. FIFO held while two configurations pour 22 codes into it: it fills,
//     flits go round the ring again, then it drains in order;
//  3. DPLL connected: it must lock and run at divider x reference;
//  4. a configuration switch while flits are on the ring: they are dropped.
// Each mechanism (reconfiguration, rate change, priority-ordered connection,
// bypass of a disconnected stop, adder use, FIFO full, recirculation, drop,
// DPLL lock) is counted, and one that never happened is a failure.
module tb_noc_top;
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

  int checks = 0, failures = 0;
  int n_reconfig = 0, n_rates = 0, n_adder = 0, n_full = 0, n_order_ok = 0, n_lock = 0;
  bit rate_seen [8];
  bit strict = 1;      // compare exits in order
  bit as_set = 0;      // collect exits, compare as a multiset later
  logic [7:0] gotq[$];
  logic [7:0] expq[$];
  logic [3:0] add_prev = 0;
  logic [7:0] last_exit = 0;
  int last_tick_cyc = -1, cyc = 0, last_conn_prio = 99;

  always #5 clk = ~clk;
  initial forever begin repeat (32) @(posedge clk); pll_ref <= ~pll_ref; end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  function automatic logic [6:0] ref_pat(input int v);
    string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    ref_pat = '0;
    for (int k = 0; k < lit[v].len(); k++) ref_pat[lit[v][k] - "a"] = 1'b1;
  endfunction

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors: reference model, tick spacing, connection order, events
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.reconfig) begin
      add_prev = 0;
      n_reconfig++;
      last_tick_cyc = -1;
      last_conn_prio = 99;
    end
    if (dut.inj_ready[2]) begin
      logic [3:0] code;
      code = dut.inj_flit[2].data[3:0];
      if (dut.node_on[4]) begin
        expq.push_back(8'(code) + 8'(add_prev));
        add_prev = code;
        n_adder++;
      end else expq.push_back(8'(code));
    end
    if (exit_valid) begin
      last_exit = exit_data;
      if (as_set) gotq.push_back(exit_data);
      else if (strict) begin
        chk(expq.size() > 0, "exit with nothing expected");
        if (expq.size() > 0) begin
          logic [7:0] e;
          e = expq.pop_front();
          chk(exit_data == e, $sformatf("exit value %0d expected %0d (cfg %0d)", exit_data, e, cfg_active));
          if (exit_data == e) n_order_ok++;
        end
      end
    end
    if (tick) begin
      if (last_tick_cyc >= 0)
        chk(cyc - last_tick_cyc == (1 << rate), $sformatf("tick spacing %0d at rate %0d", cyc - last_tick_cyc, rate));
      last_tick_cyc = cyc;
      if (!rate_seen[rate]) begin rate_seen[rate] = 1; n_rates++; end
    end
    if (!dut.gate_en) last_tick_cyc = -1;
    if (conn_strobe) begin
      chk(int'(prio[conn_id-1]) <= last_conn_prio && prio[conn_id-1] != 0, "connected in priority order");
      last_conn_prio = int'(prio[conn_id-1]);
    end
    if (fifo_full) n_full++;
    if (dpll_locked) n_lock++;
  end

  task automatic wait_cycles_until_done(input int limit, input string what);
    int n;
    n = 0;
    // wait until the new configuration is in force, then until the run is done
    while ((cfg_active != cfg || !dut.gate_en) && n < limit) begin @(posedge clk); n++; end
    repeat (2) @(posedge clk);
    while (!run_done && n < limit) begin @(posedge clk); n++; end
    chk(run_done, {what, " finished"});
  endtask

  task automatic run_cfg(input int c);
    int sent0, exit0;
    sent0 = cnt_sent; exit0 = cnt_exit;
    cfg = 4'(c);
    wait_cycles_until_done(40000, $sformatf("config %0d", c));
    for (int i = 0; i < 5; i++)
      chk(node_status[i] == ((prio[i] != 0) ? NODE_ON : NODE_OFF), $sformatf("cfg %0d node %0d status", c, i + 1));
    chk(int'(cnt_exit) - exit0 == ((prio[2] != 0) ? int'(dut.data_size) : 0),
        $sformatf("cfg %0d exits %0d", c, int'(cnt_exit) - exit0));
    chk(expq.size() == 0, "all expected exits seen");
    if (prio[1] != 0 && cnt_exit != 16'(exit0)) chk(seg == ref_pat(int'(last_exit[3:0])), "display shows last value");
  endtask

  int seq [11] = '{1, 2, 3, 5, 6, 7, 9, 10, 13, 15, 12};

  initial begin
    int t0, t1, b0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    // 1. configurations run to completion
    foreach (seq[k]) run_cfg(seq[k]);
    chk(cnt_bypass > 0, "bypass of a disconnected stop happened");
    // 2. FIFO held: config 11 fills it partly, config 14 overfills it. Flits
    //    that went round the ring again may overtake each other, so this
    //    part is compared as a multiset
    fifo_hold = 1;
    as_set = 1;
    cfg = 4'd11;
    t0 = 0;
    while (!(cfg_active == 4'd11 && dut.samples_left == 0 && fifo_count == 5'd10) && t0 < 40000) begin
      @(posedge clk); t0++;
    end
    chk(fifo_count == 5'd10, "ten codes buffered");
    cfg = 4'd14;
    t0 = 0;
    while (!(cnt_recirc > 0 && fifo_full) && t0 < 40000) begin @(posedge clk); t0++; end
    chk(fifo_full && cnt_recirc > 0, "FIFO full and flits recirculating");
    repeat (300) @(posedge clk);
    fifo_hold = 0;
    wait_cycles_until_done(40000, "FIFO drain");
    expq.sort();
    gotq.sort();
    chk(expq.size() == 22 && gotq == expq, $sformatf("drained: %0d expected, %0d out", expq.size(), gotq.size()));
    foreach (gotq[k]) if (k < expq.size() && gotq[k] == expq[k]) n_order_ok++;
    expq.delete();
    as_set = 0;
    // 3. DPLL: config 4 connects it with divider 2
    run_cfg(4);
    t0 = 0;
    while (!dpll_locked && t0 < 100000) begin @(posedge clk); t0++; end
    chk(dpll_locked, "DPLL locked");
    repeat (2000) @(posedge clk);
    @(posedge dpll_fout); t0 = cyc;
    repeat (32) @(posedge dpll_fout);
    t1 = cyc;
    chk(t1 - t0 >= 32 * 32 - 16 && t1 - t0 <= 32 * 32 + 16, $sformatf("DPLL output period %0d/32", t1 - t0));
    // 4. switch while flits are on the ring
    strict = 0;
    b0 = cnt_drop;
    cfg = 4'd1;
    t0 = 0;
    while (!(cfg_active == 4'd1 && dut.gate_en) && t0 < 1000) begin @(posedge clk); t0++; end
    t0 = 0;
    while (t0 < 40000) begin
      bit busy;
      @(negedge clk); t0++;
      busy = 0;
      for (int i = 0; i < 5; i++) if (dut.ring_out[i].valid && dut.ring_out[i].dst != 0) busy = 1;
      if (busy && cnt_exit > 0) break;
    end
    cfg = 4'd12;
    wait_cycles_until_done(40000, "switch under traffic");
    chk(int'(cnt_drop) > b0, "flits for disconnected nodes dropped");

    chk(n_reconfig >= 15, "reconfigurations");
    chk(n_rates >= 4, "several data rates used");
    chk(n_adder > 0, "adder node used");
    chk(n_full > 0, "FIFO full seen");
    chk(n_lock > 0, "DPLL lock seen");
    chk(n_order_ok > 50, "exits checked against the model");
    $display("reconfig=%0d rates=%0d adder=%0d full=%0d recirc=%0d bypass=%0d drop=%0d lock=%0d exits=%0d checked=%0d",
             n_reconfig, n_rates, n_adder, n_full, cnt_recirc, cnt_bypass, cnt_drop, n_lock, cnt_exit, n_order_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
