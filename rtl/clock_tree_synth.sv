// clock_tree_synth - tunable clock generator and clock distribution.
//
// Built from the chain of the clock-tree figure: a synchronous counter that
// increments on the global clock, a clock divider (counter bit k is the global
// clock divided by 2^(k+1)), an AND-gate decoder that selects the divided clock
// for the configured rate, a level-sensitive latch that holds or releases that
// clock, a trigger pulse, a counter of trigger pulses and a counter reset.
//  * rate r selects division by 2^r (r = 0: undivided). The "2, 4, 8, ..."
//    ratios are the document's; the 3-bit rate field is this design's.
//  * The gate latch is transparent while the selected clock is low, so
//    clk_out (selected clock AND latched gate) never gets a shortened pulse.
//  * tick is a one-global-cycle trigger pulse at the end of every divided
//    period while the gate is open; the node logic uses it as a clock enable,
//    which keeps the whole design on the global clock. tick_count counts them.
//  * Whenever the rate changes or the gate closes, the divider counter is
//    reset so the new clock starts with a whole period.
//  * Distribution: node_tick[i] = tick for every connected node (node_on[i]),
//    so disconnected nodes get no enable at all.
// Timing: with the gate open, tick is high for one cycle every 2^rate cycles,
// the first one 2^rate cycles after the gate opens or the rate changes.
//
// Ports: clk, rst_n, rate, gate_en, node_on; clk_div (all divided clocks),
// clk_out, tick, node_tick, tick_count.
module clock_tree_synth #(
  parameter int unsigned CNT_W   = 8,
  parameter int unsigned RATE_W  = 3,
  parameter int unsigned N_NODES = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [RATE_W-1:0]   rate,
  input  logic                gate_en,
  input  logic [N_NODES-1:0]  node_on,
  output logic [CNT_W-1:0]    clk_div,
  output logic                clk_out,
  output logic                tick,
  output logic [N_NODES-1:0]  node_tick,
  output logic [15:0]         tick_count
);
  logic [CNT_W-1:0]  cnt;
  logic [RATE_W-1:0] rate_q;
  logic [CNT_W:0]    onehot;
  logic              sel_clk, gate_lat, restart;
  logic [CNT_W-1:0]  period_mask;

  // counter with reset on rate change or closed gate
  assign restart = (rate != rate_q) || !gate_en;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= '0;
      rate_q <= '0;
    end else begin
      rate_q <= rate;
      cnt    <= restart ? '0 : cnt + 1'b1;
    end
  end

  // clock divider: bit k = clk / 2^(k+1)
  assign clk_div = cnt;

  // AND-gate decoder: one-hot rate selects one divided clock
  always_comb begin
    onehot  = '0;
    onehot[$clog2(CNT_W+1)'(rate_q)] = 1'b1;
    sel_clk = onehot[0] & clk;
    for (int k = 1; k <= CNT_W; k++) sel_clk |= onehot[k] & cnt[k-1];
  end

  // hold/release latch (transparent while the selected clock is low)
  always_latch begin
    if (!sel_clk) gate_lat = gate_en;
  end
  assign clk_out = sel_clk & gate_lat;

  // trigger pulse at the end of each divided period
  assign period_mask = CNT_W'((1 << rate_q) - 1);
  assign tick        = gate_en && !restart && ((cnt & period_mask) == period_mask);
  assign node_tick   = tick ? node_on : '0;

  always_ff @(posedge clk) begin
    if (!rst_n)    tick_count <= '0;
    else if (tick) tick_count <= tick_count + 16'd1;
  end
endmodule
