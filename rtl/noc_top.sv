// noc_top - network on chip with a tunable data rate.
//
// Five application nodes on a unidirectional ring: 1 FIFO buffer, 2 seven-
// segment decoder, 3 ADC, 4 DPLL, 5 Kogge-Stone adder. A 4-bit configuration
// number selects one record of the configuration look-up table; the node
// configuration state machine then connects the nodes whose priority is high,
// highest first, and programs the clock tree with the record's data rate.
// All node and ring logic runs on the global clock, enabled by the clock
// tree's trigger pulse once every 2^rate cycles, so the configuration tunes
// the data rate; the tunable clock itself is brought out as clk_out.
//
// Data path (this design's choice of what the nodes exchange): the ADC
// samples its triangle signal and sends data_size 4-bit PCM codes, one flit
// each. Every flit goes to the next connected data node in ring order after
// its sender (adder, FIFO, decoder; the DPLL handles no data), and from the
// last one to the ring exit at the ADC's stop, which drives exit_valid /
// exit_data. The adder replaces the code by the sum of it and the previous
// code (5-bit result); the FIFO buffers flits and sends them on (fifo_hold
// stops its output so it can fill); the decoder shows the low nibble on the
// display and passes the flit on. Flits for a node that has just been
// disconnected are dropped. The DPLL, when connected, locks pll_ref times
// the record's divider onto dpll_fout.
//
// Validation counters: cnt_sent (ADC flits injected), cnt_exit (flits leaving
// the ring), cnt_drop, cnt_bypass (hops through disconnected stops),
// cnt_recirc (flits that went round again because their node was busy).
// run_done is high when the ADC has sent data_size codes and the ring, the
// FIFO and every node's output register are empty.
module noc_top
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH     = 16,
  parameter int unsigned ADC_SAMPLE_DIV = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [CFG_W-1:0]      cfg,
  input  logic                  fifo_hold,
  input  logic                  pll_ref,
  output logic                  clk_out,
  output logic                  tick,
  output logic [RATE_W-1:0]     rate,
  output logic [CFG_W-1:0]      cfg_active,
  output logic [7:0]            clk_div,
  output logic [15:0]           tick_count,
  output node_status_e [NUM_NODES-1:0] node_status,
  output prio_vec_t             prio,
  output logic                  conn_strobe,
  output node_id_t              conn_id,
  output logic [6:0]            seg,
  output logic                  exit_valid,
  output logic [DATA_W-1:0]     exit_data,
  output node_id_t              exit_src,
  output logic [7:0]            adc_asig,
  output logic [7:0]            adc_samp,
  output logic [7:0]            adc_quant,
  output logic [3:0]            adc_pcm_out,
  output logic [$clog2(FIFO_DEPTH):0] fifo_count,
  output logic [3:0]            seg_digit,
  output logic [15:0]           dpll_fword,
  output logic                  dpll_fout,
  output logic                  dpll_fb,
  output logic                  dpll_locked,
  output logic                  fifo_full,
  output logic                  run_done,
  output logic [15:0]           cnt_sent,
  output logic [15:0]           cnt_exit,
  output logic [15:0]           cnt_drop,
  output logic [15:0]           cnt_bypass,
  output logic [15:0]           cnt_recirc
);
  // ---------------- configuration and clocking ----------------
  logic [CFG_W-1:0]     lut_cfg;
  cfg_entry_t           lut_entry;
  logic [NUM_NODES-1:0] node_on, node_tick;
  logic                 gate_en, reconfig;
  logic [SIZE_W-1:0]    data_size;
  logic [7:0]           dpll_n;

  config_lut u_lut (.cfg(lut_cfg), .entry(lut_entry));

  node_config_fsm u_fsm (
    .clk, .rst_n, .cfg_in(cfg), .lut_cfg, .lut_entry, .node_on, .gate_en, .rate,
    .data_size, .dpll_n, .cfg_active, .conn_strobe, .conn_id, .reconfig, .prio
  );

  clock_tree_synth u_cts (
    .clk, .rst_n, .rate, .gate_en, .node_on, .clk_div, .clk_out, .tick,
    .node_tick, .tick_count
  );

  always_comb
    for (int i = 0; i < NUM_NODES; i++) node_status[i] = node_on[i] ? NODE_ON : NODE_OFF;

  // next data destination after node `me`: first connected data node in ring
  // order, stopping at the ADC (the source), else the ring exit
  function automatic node_id_t next_dst(input node_id_t me, input logic [NUM_NODES-1:0] on);
    node_id_t id;
    next_dst = EXIT_ID;
    for (int s = 1; s < NUM_NODES; s++) begin
      id = node_id_t'(((int'(me) - 1 + s) % NUM_NODES) + 1);
      if (id == ADC_ID) break;
      if (id != DPLL_ID && on[id-1]) begin
        next_dst = id;
        break;
      end
    end
  endfunction

  // ---------------- ring ----------------
  flit_t [NUM_NODES-1:0] ring_out, inj_flit, ej_flit, exit_flit;
  logic  [NUM_NODES-1:0] inj_valid, inj_ready, ej_valid, ej_ready, exit_v;
  logic  [NUM_NODES-1:0] ev_bypass, ev_drop, ev_recirc;

  for (genvar i = 0; i < NUM_NODES; i++) begin : g_ring
    ring_router #(.MY_ID(node_id_t'(i + 1)), .IS_EXIT(node_id_t'(i + 1) == ADC_ID)) u_rt (
      .clk, .rst_n, .en(tick), .node_on,
      .in_flit(ring_out[(i + NUM_NODES - 1) % NUM_NODES]), .out_flit(ring_out[i]),
      .inj_valid(inj_valid[i]), .inj_flit(inj_flit[i]), .inj_ready(inj_ready[i]),
      .ej_valid(ej_valid[i]), .ej_flit(ej_flit[i]), .ej_ready(ej_ready[i]),
      .exit_valid(exit_v[i]), .exit_flit(exit_flit[i]),
      .ev_bypass(ev_bypass[i]), .ev_drop(ev_drop[i]), .ev_recirc(ev_recirc[i])
    );
  end

  localparam int F = int'(FIFO_ID) - 1, S = int'(SEG_ID) - 1, A = int'(ADC_ID) - 1,
                 D = int'(DPLL_ID) - 1, K = int'(ADDER_ID) - 1;

  assign exit_valid = exit_v[A];
  assign exit_data  = exit_flit[A].data;
  assign exit_src   = exit_flit[A].src;

  // ---------------- node 3: ADC ----------------
  logic              adc_valid;
  logic [SIZE_W-1:0] samples_left;
  flit_t             adc_pend;

  adc_pcm #(.SAMPLE_DIV(ADC_SAMPLE_DIV)) u_adc (
    .clk, .rst_n, .en(node_tick[A]), .asig(adc_asig), .samp_out(adc_samp),
    .quant_out(adc_quant), .pcm_out(adc_pcm_out), .pcm_valid(adc_valid)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      adc_pend     <= '0;
      samples_left <= '0;
    end else if (reconfig) begin
      adc_pend     <= '0;
      samples_left <= data_size;
    end else begin
      if (inj_ready[A]) adc_pend.valid <= 1'b0;
      // a new code is taken only when the previous one has left
      if (adc_valid && samples_left != '0 && (!adc_pend.valid || inj_ready[A])) begin
        adc_pend     <= '{valid: 1'b1, dst: next_dst(ADC_ID, node_on), src: ADC_ID,
                          data: DATA_W'(adc_pcm_out)};
        samples_left <= samples_left - 1'b1;
      end
    end
  end
  assign inj_valid[A] = adc_pend.valid;
  assign inj_flit[A]  = adc_pend;
  assign ej_ready[A]  = 1'b1;

  // ---------------- node 5: Kogge-Stone adder ----------------
  logic [3:0] add_prev, add_sum;
  logic       add_cout;
  flit_t      add_pend;

  kogge_stone_adder #(.WIDTH(4)) u_add (
    .a(ej_flit[K].data[3:0]), .b(add_prev), .c_in(1'b0), .sum_out(add_sum), .c_out(add_cout)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || reconfig) begin
      add_prev <= '0;
      add_pend <= '0;
    end else begin
      if (inj_ready[K]) add_pend.valid <= 1'b0;
      if (ej_valid[K]) begin
        add_prev <= ej_flit[K].data[3:0];
        add_pend <= '{valid: 1'b1, dst: next_dst(ADDER_ID, node_on), src: ADDER_ID,
                      data: DATA_W'({add_cout, add_sum})};
      end
    end
  end
  // a flit ejected here frees this stop's slot, so the pending result leaves
  // in the same tick: the adder can always accept
  assign ej_ready[K]  = 1'b1;
  assign inj_valid[K] = add_pend.valid;
  assign inj_flit[K]  = add_pend;

  // ---------------- node 1: FIFO ----------------
  logic [DATA_W-1:0] fifo_rd_data;
  logic              fifo_empty, fifo_rd, fifo_rd_q;
  flit_t             fifo_pend;

  logic fifo_swap;
  assign fifo_rd = node_tick[F] && !fifo_empty && !fifo_hold && !fifo_rd_q
                   && (!fifo_pend.valid || inj_ready[F]);
  // a full FIFO still accepts a flit when its head can leave in the same
  // tick: the ejection frees the slot for the pending word and the head moves
  // into the pending register (read and write in one cycle)
  assign fifo_swap = fifo_full && fifo_pend.valid && !fifo_rd_q && !fifo_hold && node_tick[F];

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .en(1'b1), .wr_en(ej_valid[F]), .wr_data(ej_flit[F].data),
    .rd_en(fifo_rd), .rd_data(fifo_rd_data), .full(fifo_full), .empty(fifo_empty),
    .count(fifo_count)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fifo_rd_q <= 1'b0;
      fifo_pend <= '0;
    end else begin
      fifo_rd_q <= fifo_rd;
      if (inj_ready[F]) fifo_pend.valid <= 1'b0;
      if (fifo_rd_q)
        fifo_pend <= '{valid: 1'b1, dst: next_dst(FIFO_ID, node_on), src: FIFO_ID,
                       data: fifo_rd_data};
    end
  end
  assign ej_ready[F]  = !fifo_full || fifo_swap;
  assign inj_valid[F] = fifo_pend.valid;
  assign inj_flit[F]  = fifo_pend;

  // ---------------- node 2: seven-segment decoder ----------------
  logic       seg_on;
  flit_t      seg_pend;

  seven_seg_decoder u_seg (
    .clk, .rst_n, .en(node_on[S]), .din_valid(ej_valid[S]), .din(ej_flit[S].data[3:0]),
    .seg, .digit(seg_digit), .state_on(seg_on)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || reconfig) seg_pend <= '0;
    else begin
      if (inj_ready[S]) seg_pend.valid <= 1'b0;
      if (ej_valid[S])
        seg_pend <= '{valid: 1'b1, dst: next_dst(SEG_ID, node_on), src: SEG_ID,
                      data: ej_flit[S].data};
    end
  end
  // the decoder shows a digit only once its state machine is ON; like the
  // adder it frees its own slot when it ejects, so it never blocks
  assign ej_ready[S]  = seg_on;
  assign inj_valid[S] = seg_pend.valid;
  assign inj_flit[S]  = seg_pend;

  // ---------------- node 4: DPLL ----------------

  dpll u_dpll (
    .clk, .rst_n, .en(node_on[D]), .ref_in(pll_ref), .sel(dpll_n), .fout(dpll_fout),
    .fb_out(dpll_fb), .locked(dpll_locked), .fword(dpll_fword)
  );
  assign inj_valid[D] = 1'b0;
  assign inj_flit[D]  = '0;
  assign ej_ready[D]  = 1'b1;

  // ---------------- validation counters ----------------
  logic ring_busy;
  always_comb begin
    ring_busy = 1'b0;
    for (int i = 0; i < NUM_NODES; i++) ring_busy |= ring_out[i].valid;
  end
  assign run_done = (samples_left == '0) && !ring_busy && !adc_pend.valid && !add_pend.valid
                    && !fifo_pend.valid && !seg_pend.valid && fifo_empty && !fifo_rd_q
                    && gate_en;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_sent <= '0; cnt_exit <= '0; cnt_drop <= '0; cnt_bypass <= '0; cnt_recirc <= '0;
    end else begin
      cnt_sent   <= cnt_sent   + 16'(inj_ready[A]);
      cnt_exit   <= cnt_exit   + 16'(exit_valid);
      cnt_drop   <= cnt_drop   + 16'($countones(ev_drop));
      cnt_bypass <= cnt_bypass + 16'($countones(ev_bypass));
      cnt_recirc <= cnt_recirc + 16'($countones(ev_recirc));
    end
  end
endmodule
