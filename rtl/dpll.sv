// dpll - all-digital phase-locked loop, the DPLL node.
//
// The three parts the document names are all here, clocked by the fast system
// clock clk:
//  * digitally controlled oscillator: a phase accumulator of ACC_W bits that
//    adds the frequency word fword every cycle; fout is its top bit, so
//    f(fout) = fword / 2^ACC_W * f(clk).
//  * phase detector: a sampled phase-frequency detector. The reference (ref_in,
//    synchronised by two flops) and the feedback clock (fout divided by sel) are
//    reduced to rising-edge strobes; whichever edge comes first raises UP (the
//    reference leads) or DN (the feedback leads) until the other edge arrives.
//  * loop filter: a proportional-integral low-pass filter. While UP (DN) is
//    high the integrator grows (shrinks) by KI per cycle and a proportional
//    kick of +KP (-KP) is added, so fword = FCENTER + integ + kick.
// After lock, f(fout) = sel * f(ref). locked rises after LOCK_CNT consecutive
// reference periods whose UP/DN pulse is at most LOCK_TOL cycles wide and
// falls on the first wider one. en = 0 freezes the loop (node disconnected).
//
// Ports: clk, rst_n, en, ref_in, sel[7:0] (feedback divider, 0 read as 1),
// fout, fb_out (divided feedback clock), locked, fword. The structure follows
// the document; the PFD type, the PI filter, the gains and widths are this
// design's choices.
module dpll #(
  parameter int unsigned ACC_W    = 16,
  parameter int unsigned FCENTER  = 1536,
  parameter int signed   KI       = 1,
  parameter int signed   KP       = 48,
  parameter int unsigned LOCK_TOL = 2,
  parameter int unsigned LOCK_CNT = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             ref_in,
  input  logic [7:0]       sel,
  output logic             fout,
  output logic             fb_out,
  output logic             locked,
  output logic [ACC_W-1:0] fword
);
  logic [2:0]       ref_sync;
  logic             ref_edge, fout_q, fout_edge, fb_edge;
  logic [ACC_W-1:0] acc;
  logic [7:0]       fb_cnt, n_eff;
  logic             up, dn;
  logic signed [ACC_W+1:0] integ, fsum;
  logic [15:0]      err_w;
  logic [7:0]       good_cnt;

  assign n_eff = (sel == 8'd0) ? 8'd1 : sel;

  // DCO
  always_ff @(posedge clk) begin
    if (!rst_n) acc <= '0;
    else if (en) acc <= acc + fword;
  end
  assign fout = acc[ACC_W-1];

  // edge strobes and feedback divider
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ref_sync <= '0;
      fout_q   <= 1'b0;
      fb_cnt   <= '0;
      fb_out   <= 1'b0;
    end else begin
      ref_sync <= {ref_sync[1:0], ref_in};
      fout_q   <= fout;
      if (fout_edge) begin
        fb_cnt <= (fb_cnt >= n_eff - 8'd1) ? 8'd0 : fb_cnt + 8'd1;
        fb_out <= (fb_cnt < (n_eff >> 1)) || (n_eff == 8'd1 && !fb_out);
      end
    end
  end
  assign ref_edge  = en && ref_sync[1] && !ref_sync[2];
  assign fout_edge = fout && !fout_q;
  assign fb_edge   = en && fout_edge && (fb_cnt == 8'd0);

  // phase-frequency detector, loop filter and lock detector
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      up       <= 1'b0;
      dn       <= 1'b0;
      integ    <= '0;
      err_w    <= '0;
      good_cnt <= '0;
      locked   <= 1'b0;
    end else if (en) begin
      if (up) integ <= integ + (ACC_W+2)'(KI);
      if (dn) integ <= integ - (ACC_W+2)'(KI);
      if (up || dn) err_w <= err_w + 16'd1;
      if (ref_edge && fb_edge) begin
        up <= 1'b0; dn <= 1'b0; err_w <= '0;
      end else if (ref_edge) begin
        if (dn) begin dn <= 1'b0; err_w <= '0; end
        else    begin up <= 1'b1; end
      end else if (fb_edge) begin
        if (up) begin up <= 1'b0; err_w <= '0; end
        else    begin dn <= 1'b1; end
      end
      // lock detector: judge every PFD pulse when it ends
      if ((up || dn) && err_w > 16'(LOCK_TOL)) begin
        good_cnt <= '0;
        locked   <= 1'b0;
      end else if ((ref_edge && fb_edge) || (ref_edge && dn) || (fb_edge && up)) begin
        if (good_cnt >= 8'(LOCK_CNT)) locked <= 1'b1;
        else good_cnt <= good_cnt + 8'd1;
      end
    end
  end

  always_comb begin
    fsum = (ACC_W+2)'(FCENTER) + integ;
    if (up) fsum = fsum + (ACC_W+2)'(KP);
    if (dn) fsum = fsum - (ACC_W+2)'(KP);
    if (fsum < 1) fword = 1;
    else if (fsum >= (ACC_W+2)'(1 << (ACC_W-1))) fword = ACC_W'((1 << (ACC_W-1)) - 1);
    else fword = fsum[ACC_W-1:0];
  end
endmodule
