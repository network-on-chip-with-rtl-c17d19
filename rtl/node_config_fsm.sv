// node_config_fsm - node configuration and integration state machine.
//
// Applies the document's priority algorithm whenever the configuration number
// changes: (1) read the node priorities from the look-up-table record,
// (2) check which priority is highest and "high", (3) connect that node,
// (4) report its number, (5) show it as ON, and repeat until no high-priority
// node is left. A priority counts as high when it is at least PRIO_MIN; ties go
// to the lower node number. While it reconfigures, the state machine closes the
// clock gate of the clock tree (gate_en = 0) so no node sees a partial clock
// period, and it reopens it once every node is placed.
//
// States: RUN (steady), LOAD (register the new record, disconnect all
// nodes, gate closed), CONNECT (one node connected per cycle). A change to
// cfg_in is taken in RUN only; a change seen during LOAD/CONNECT is taken
// right after. Timing: from a new cfg_in, LOAD lasts one cycle, then one
// cycle per node with a high priority plus one final cycle before RUN.
//
// Ports: clk, rst_n, cfg_in; lut_cfg (configuration number to look up),
// lut_entry (record returned by config_lut); node_on (connected nodes),
// gate_en, rate, data_size, dpll_n, cfg_active, conn_strobe/conn_id (a node
// was just connected), reconfig (one-cycle strobe when a new configuration is
// taken), prio (priorities in force).
module node_config_fsm
  import noc_pkg::*;
#(
  parameter int unsigned PRIO_MIN = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [CFG_W-1:0]       cfg_in,
  output logic [CFG_W-1:0]       lut_cfg,
  input  cfg_entry_t             lut_entry,
  output logic [NUM_NODES-1:0]   node_on,
  output logic                   gate_en,
  output logic [RATE_W-1:0]      rate,
  output logic [SIZE_W-1:0]      data_size,
  output logic [7:0]             dpll_n,
  output logic [CFG_W-1:0]       cfg_active,
  output logic                   conn_strobe,
  output node_id_t               conn_id,
  output logic                   reconfig,
  output prio_vec_t              prio
);
  typedef enum logic [1:0] {S_RUN, S_LOAD, S_CONNECT} state_e;
  state_e state;

  logic                 found;
  int unsigned          best;
  logic [PRIO_W-1:0]    best_prio;

  assign lut_cfg = cfg_in;

  // steps 1-2: highest remaining high priority
  always_comb begin
    found     = 1'b0;
    best      = 0;
    best_prio = '0;
    for (int unsigned i = 0; i < NUM_NODES; i++) begin
      if (!node_on[i] && prio[i] >= PRIO_W'(PRIO_MIN) && (!found || prio[i] > best_prio)) begin
        found     = 1'b1;
        best      = i;
        best_prio = prio[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_LOAD;
      node_on     <= '0;
      gate_en     <= 1'b0;
      rate        <= '0;
      data_size   <= '0;
      dpll_n      <= 8'd1;
      prio        <= '0;
      cfg_active  <= '0;
      conn_strobe <= 1'b0;
      conn_id     <= EXIT_ID;
      reconfig    <= 1'b0;
    end else begin
      conn_strobe <= 1'b0;
      reconfig    <= 1'b0;
      unique case (state)
        S_RUN: begin
          if (cfg_in != cfg_active) begin
            state   <= S_LOAD;
            gate_en <= 1'b0;
          end
        end
        S_LOAD: begin
          cfg_active <= cfg_in;
          prio       <= lut_entry.ctrl.prio;
          rate       <= lut_entry.data_rate;
          data_size  <= lut_entry.data_size;
          dpll_n     <= lut_entry.ctrl.dpll_n;
          node_on    <= '0;
          gate_en    <= 1'b0;
          reconfig   <= 1'b1;
          state      <= S_CONNECT;
        end
        S_CONNECT: begin
          if (found) begin
            node_on[best] <= 1'b1;           // step 3
            conn_strobe   <= 1'b1;           // steps 4-5
            conn_id       <= node_id_t'(best + 1);
          end else begin
            gate_en <= 1'b1;
            state   <= S_RUN;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // the clock gate is open only in steady operation
  assert property (@(posedge clk) disable iff (!rst_n) gate_en |-> state == S_RUN);
endmodule
