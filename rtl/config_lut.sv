// config_lut - the configuration-settings look-up table.
//
// For each 4-bit configuration number it returns one packed record (see
// noc_pkg::cfg_entry_t): data index (the configuration number itself), data
// size (samples to move through the ring in this configuration), data rate
// (clock divide exponent, divide by 2^rate) and data controls (the priority of
// each of the five nodes and the DPLL feedback divider). The table is a
// combinational ROM. Only the priorities of configuration 0100 (FIFO 9,
// decoder 7, ADC 6, DPLL 5, adder 0) are taken from the integration waveform;
// every other entry is this design's choice, picked so that the entries
// together switch every node on and off and use several rates. Configuration
// 0000 connects nothing.
//
// Ports: cfg (configuration number), entry.
module config_lut
  import noc_pkg::*;
(
  input  logic [CFG_W-1:0] cfg,
  output cfg_entry_t       entry
);
  // priorities listed as {adder, DPLL, ADC, decoder, FIFO}
  function automatic prio_vec_t pv(input logic [PRIO_W-1:0] p_fifo, p_seg, p_adc, p_dpll, p_adder);
    pv = {p_adder, p_dpll, p_adc, p_seg, p_fifo};
  endfunction

  always_comb begin
    entry.data_index = cfg;
    unique case (cfg)
      //                    rate  size  fifo seg adc dpll adder   dpll_n
      4'h0: begin entry.data_rate = 3'd1; entry.data_size = 8'd0;  entry.ctrl.prio = pv(0, 0, 0, 0, 0);  entry.ctrl.dpll_n = 8'd1; end
      4'h1: begin entry.data_rate = 3'd1; entry.data_size = 8'd6;  entry.ctrl.prio = pv(4, 3, 9, 2, 8);  entry.ctrl.dpll_n = 8'd1; end
      4'h2: begin entry.data_rate = 3'd2; entry.data_size = 8'd6;  entry.ctrl.prio = pv(0, 5, 9, 6, 3);  entry.ctrl.dpll_n = 8'd2; end
      4'h3: begin entry.data_rate = 3'd1; entry.data_size = 8'd8;  entry.ctrl.prio = pv(7, 2, 8, 0, 0);  entry.ctrl.dpll_n = 8'd1; end
      4'h4: begin entry.data_rate = 3'd3; entry.data_size = 8'd6;  entry.ctrl.prio = pv(9, 7, 6, 5, 0);  entry.ctrl.dpll_n = 8'd2; end
      4'h5: begin entry.data_rate = 3'd2; entry.data_size = 8'd6;  entry.ctrl.prio = pv(3, 0, 7, 0, 9);  entry.ctrl.dpll_n = 8'd1; end
      4'h6: begin entry.data_rate = 3'd1; entry.data_size = 8'd4;  entry.ctrl.prio = pv(0, 8, 5, 0, 0);  entry.ctrl.dpll_n = 8'd3; end
      4'h7: begin entry.data_rate = 3'd4; entry.data_size = 8'd4;  entry.ctrl.prio = pv(6, 6, 6, 6, 6);  entry.ctrl.dpll_n = 8'd2; end
      4'h8: begin entry.data_rate = 3'd1; entry.data_size = 8'd0;  entry.ctrl.prio = pv(0, 0, 0, 9, 0);  entry.ctrl.dpll_n = 8'd4; end
      4'h9: begin entry.data_rate = 3'd2; entry.data_size = 8'd5;  entry.ctrl.prio = pv(2, 4, 6, 8, 1);  entry.ctrl.dpll_n = 8'd1; end
      4'hA: begin entry.data_rate = 3'd3; entry.data_size = 8'd5;  entry.ctrl.prio = pv(5, 0, 9, 0, 7);  entry.ctrl.dpll_n = 8'd2; end
      4'hB: begin entry.data_rate = 3'd1; entry.data_size = 8'd10; entry.ctrl.prio = pv(8, 9, 7, 0, 6);  entry.ctrl.dpll_n = 8'd1; end
      4'hC: begin entry.data_rate = 3'd2; entry.data_size = 8'd4;  entry.ctrl.prio = pv(0, 0, 9, 0, 0);  entry.ctrl.dpll_n = 8'd2; end
      4'hD: begin entry.data_rate = 3'd5; entry.data_size = 8'd3;  entry.ctrl.prio = pv(1, 2, 3, 4, 5);  entry.ctrl.dpll_n = 8'd1; end
      4'hE: begin entry.data_rate = 3'd1; entry.data_size = 8'd12; entry.ctrl.prio = pv(9, 1, 9, 0, 0);  entry.ctrl.dpll_n = 8'd1; end
      default: begin entry.data_rate = 3'd0; entry.data_size = 8'd8; entry.ctrl.prio = pv(15, 14, 13, 12, 11); entry.ctrl.dpll_n = 8'd2; end
    endcase
  end
endmodule
