// noc_pkg - types and constants shared by the tunable-datarate ring NoC.
//
// Five application nodes sit on a unidirectional ring, numbered 1..5 in ring
// order: 1 FIFO, 2 seven-segment decoder, 3 ADC, 4 DPLL, 5 Kogge-Stone adder
// (this is the order of the node status traces in the integration waveform).
// Destination 0 is the ring's exit port, which sits at the ADC's ring stop.
// A flit carries one byte; every configuration of the look-up table is one
// packed record (data index, data size, data rate, data controls), the four
// fields named for the net configuration.
package noc_pkg;

  localparam int unsigned NUM_NODES = 5;
  localparam int unsigned ID_W      = 3;
  localparam int unsigned DATA_W    = 8;
  localparam int unsigned PRIO_W    = 4;
  localparam int unsigned CFG_W     = 4;   // configurations 0000..1111
  localparam int unsigned RATE_W    = 3;   // clock divide exponent: /2^rate
  localparam int unsigned SIZE_W    = 8;   // samples per configuration run

  typedef logic [ID_W-1:0] node_id_t;

  localparam node_id_t EXIT_ID  = 3'd0;
  localparam node_id_t FIFO_ID  = 3'd1;
  localparam node_id_t SEG_ID   = 3'd2;
  localparam node_id_t ADC_ID   = 3'd3;
  localparam node_id_t DPLL_ID  = 3'd4;
  localparam node_id_t ADDER_ID = 3'd5;

  // One ring flit.
  typedef struct packed {
    logic                valid;
    node_id_t            dst;
    node_id_t            src;
    logic [DATA_W-1:0]   data;
  } flit_t;

  // Per-node priorities, index 0 = node 1 (FIFO) ... index 4 = node 5 (adder).
  typedef logic [NUM_NODES-1:0][PRIO_W-1:0] prio_vec_t;

  // Data controls: priorities of the five nodes and the DPLL feedback divider.
  typedef struct packed {
    prio_vec_t           prio;
    logic [7:0]          dpll_n;
  } data_ctrl_t;

  // One look-up-table record ("net configuration").
  typedef struct packed {
    logic [CFG_W-1:0]    data_index;
    logic [SIZE_W-1:0]   data_size;
    logic [RATE_W-1:0]   data_rate;
    data_ctrl_t          ctrl;
  } cfg_entry_t;

  // Node status as displayed by the integration (OFF / ON).
  typedef enum logic {NODE_OFF = 1'b0, NODE_ON = 1'b1} node_status_e;

endpackage
