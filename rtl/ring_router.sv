// ring_router - one stop of the unidirectional ring that links the five nodes.
//
// Each stop owns one output register (one flit slot) towards the next stop.
// On every ring tick (en) the incoming flit is, in this order of precedence:
//  * handed to the exit port, at the stop built with IS_EXIT = 1, if its
//    destination is 0 (the ring's output);
//  * ejected to the local node if addressed to this node, the node is connected
//    and it is ready (ej_ready);
//  * dropped if its destination node is not connected (it could never be
//    delivered);
//  * otherwise forwarded into the output slot. Passing through a stop whose
//    node is disconnected is a bypass; a flit for a connected node that was not
//    ready goes round again (recirculation), which is the ring's back-pressure.
// A flit already on the ring has priority: the local node injects (inj_ready)
// only when the slot would otherwise be empty, and only while connected. A
// flit moves one stop per tick; with no contention the latency from injection
// at stop i to ejection at stop j is the ring distance in ticks. The ring
// itself and its fixed node order are the document's (five nodes in a ring);
// the flit format, slotted forwarding and drop rule are this design's.
//
// Ports: clk, rst_n, en, node_on (all connected nodes), in_flit, out_flit,
// inj_valid/inj_flit/inj_ready, ej_valid/ej_flit/ej_ready,
// exit_valid/exit_flit, and one-tick event strobes ev_bypass, ev_drop,
// ev_recirc.
module ring_router
  import noc_pkg::*;
#(
  parameter node_id_t MY_ID   = 3'd1,
  parameter bit       IS_EXIT = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [NUM_NODES-1:0] node_on,
  input  flit_t                in_flit,
  output flit_t                out_flit,
  input  logic                 inj_valid,
  input  flit_t                inj_flit,
  output logic                 inj_ready,
  output logic                 ej_valid,
  output flit_t                ej_flit,
  input  logic                 ej_ready,
  output logic                 exit_valid,
  output flit_t                exit_flit,
  output logic                 ev_bypass,
  output logic                 ev_drop,
  output logic                 ev_recirc
);
  logic  self_on, dst_on, fwd;
  flit_t next;

  assign self_on = node_on[MY_ID-1];
  assign dst_on  = (in_flit.dst != EXIT_ID) && (int'(in_flit.dst) <= NUM_NODES)
                   && node_on[in_flit.dst - 1'b1];

  always_comb begin
    exit_valid = 1'b0;
    ej_valid   = 1'b0;
    ev_drop    = 1'b0;
    ev_bypass  = 1'b0;
    ev_recirc  = 1'b0;
    fwd        = 1'b0;
    if (en && in_flit.valid) begin
      if (in_flit.dst == EXIT_ID) begin
        if (IS_EXIT) exit_valid = 1'b1;
        else         fwd        = 1'b1;
      end else if (in_flit.dst == MY_ID && self_on && ej_ready) begin
        ej_valid = 1'b1;
      end else if (!dst_on) begin
        ev_drop = 1'b1;
      end else begin
        fwd       = 1'b1;
        ev_recirc = (in_flit.dst == MY_ID);
      end
      ev_bypass = fwd && !self_on;
    end
    inj_ready = en && !fwd && self_on && inj_valid;
    if (fwd)            next = in_flit;
    else if (inj_ready) next = inj_flit;
    else                next = '0;
  end

  assign ej_flit   = in_flit;
  assign exit_flit = in_flit;

  always_ff @(posedge clk) begin
    if (!rst_n)  out_flit <= '0;
    else if (en) out_flit <= next;
  end
endmodule
