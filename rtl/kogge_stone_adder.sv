// kogge_stone_adder - parallel-prefix (Kogge-Stone) adder, the adder node's
// arithmetic unit.
//
// Bit-level generate and propagate are formed first (G_i = A_i & B_i,
// P_i = A_i ^ B_i, as in the document), then log2(WIDTH) prefix stages combine
// (G,P) pairs at distances 1, 2, 4, ... : G = G_hi | (P_hi & G_lo),
// P = P_hi & P_lo. The carry-in enters as generate bit -1. Sum bits are
// S_i = P_i ^ C_(i-1), again as in the document. Purely combinational.
//
// Ports: a, b (WIDTH bits), c_in; sum_out (WIDTH bits), c_out. WIDTH = 4 is the
// document's width; the prefix network for any WIDTH is this design's.
module kogge_stone_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c_in,
  output logic [WIDTH-1:0] sum_out,
  output logic             c_out
);
  localparam int unsigned STAGES = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  // g[s][i], p[s][i]: group generate/propagate after prefix stage s
  logic [STAGES:0][WIDTH-1:0] g, p;
  logic [WIDTH-1:0] p_bit;
  logic [WIDTH:0]   carry;

  // bit generate/propagate, with the carry-in folded into bit 0's generate
  assign p_bit = a ^ b;
  assign g[0]  = (a & b) | {{(WIDTH-1){1'b0}}, p_bit[0] & c_in};
  assign p[0]  = p_bit;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i >= (1 << s)) begin : g_combine
        assign g[s+1][i] = g[s][i] | (p[s][i] & g[s][i-(1<<s)]);
        assign p[s+1][i] = p[s][i] & p[s][i-(1<<s)];
      end else begin : g_pass
        assign g[s+1][i] = g[s][i];
        assign p[s+1][i] = p[s][i];
      end
    end
  end

  assign carry   = {g[STAGES], c_in};
  assign sum_out = p_bit ^ carry[WIDTH-1:0];
  assign c_out   = carry[WIDTH];
endmodule
