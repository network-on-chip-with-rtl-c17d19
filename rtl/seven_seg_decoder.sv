// seven_seg_decoder - binary to seven-segment display decoder with an on/off
// state (the display node).
//
// A two-state machine (LUTSEG_OFF, LUTSEG_ON) follows the enable input; while
// ON, each din_valid loads din into the display register and seg shows its
// pattern. While OFF the display register holds. Segment order is {g,f,e,d,c,b,a},
// active high: 1 -> 0000110 and 2 -> 1011011, which are the two codes printed in
// the decoder waveform; the other fourteen codes (hex digits 0-F) follow the
// usual display font, a choice of this design. Output is registered: seg
// changes the cycle after din_valid.
//
// Ports: clk, rst_n, en (node connected), din_valid, din[3:0], seg[6:0],
// digit[3:0] (displayed value), state.
module seven_seg_decoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       din_valid,
  input  logic [3:0] din,
  output logic [6:0] seg,
  output logic [3:0] digit,
  output logic       state_on
);
  typedef enum logic {LUTSEG_OFF, LUTSEG_ON} seg_state_e;
  seg_state_e state;

  function automatic logic [6:0] decode(input logic [3:0] v);
    unique case (v)
      4'h0: decode = 7'b0111111;
      4'h1: decode = 7'b0000110;
      4'h2: decode = 7'b1011011;
      4'h3: decode = 7'b1001111;
      4'h4: decode = 7'b1100110;
      4'h5: decode = 7'b1101101;
      4'h6: decode = 7'b1111101;
      4'h7: decode = 7'b0000111;
      4'h8: decode = 7'b1111111;
      4'h9: decode = 7'b1101111;
      4'hA: decode = 7'b1110111;
      4'hB: decode = 7'b1111100;
      4'hC: decode = 7'b0111001;
      4'hD: decode = 7'b1011110;
      4'hE: decode = 7'b1111001;
      default: decode = 7'b1110001;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= LUTSEG_OFF;
      digit <= '0;
      seg   <= decode(4'h0);
    end else begin
      state <= en ? LUTSEG_ON : LUTSEG_OFF;
      if (state == LUTSEG_ON && din_valid) begin
        digit <= din;
        seg   <= decode(din);
      end
    end
  end

  assign state_on = (state == LUTSEG_ON);
endmodule
