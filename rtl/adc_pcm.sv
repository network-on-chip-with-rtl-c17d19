// adc_pcm - the analog-to-digital converter node, modelled as the document's
// four stages: signal generator, sampler, quantizer and PCM coder.
//
// The "analog" input is a SIG_W-bit amplitude produced on chip by a triangle
// generator that climbs by STEP per enabled cycle up to the top of its range
// and then falls back to 0 (the waveform shows a triangle; its slope and range
// are this design's). Every SAMPLE_DIV enabled cycles a sampling pulse fires:
// samp_out shows the pulse-amplitude-modulated signal (the amplitude during the
// pulse, 0 between pulses). The quantizer holds the sampled amplitude truncated
// to CODE_W bits and shows the reconstruction level (quant_out); the coder
// emits the CODE_W-bit natural binary code (pcm_out) with a one-cycle
// pcm_valid strobe. Latency, in enabled cycles: pulse -> quant_out 1 -> pcm 2.
//
// Ports: clk, rst_n, en (clock enable = the node's data-rate tick), asig,
// samp_out, quant_out, pcm_out, pcm_valid. CODE_W = 4 is the document's
// resolution; SIG_W, STEP and SAMPLE_DIV are this design's choices.
module adc_pcm #(
  parameter int unsigned SIG_W      = 8,
  parameter int unsigned CODE_W     = 4,
  parameter int unsigned STEP       = 5,
  parameter int unsigned SAMPLE_DIV = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  output logic [SIG_W-1:0]  asig,
  output logic [SIG_W-1:0]  samp_out,
  output logic [SIG_W-1:0]  quant_out,
  output logic [CODE_W-1:0] pcm_out,
  output logic              pcm_valid
);
  localparam int unsigned SHIFT  = SIG_W - CODE_W;
  localparam int unsigned SIG_MAX = (1 << SIG_W) - 1;
  localparam int unsigned DIV_W  = (SAMPLE_DIV > 1) ? $clog2(SAMPLE_DIV) : 1;

  logic              rising;
  logic [DIV_W-1:0]  div_cnt;
  logic              pulse;
  logic [CODE_W-1:0] level;
  logic              level_valid;

  // signal generator: triangle wave
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      asig   <= '0;
      rising <= 1'b1;
    end else if (en) begin
      if (rising) begin
        if (int'(asig) + int'(STEP) >= int'(SIG_MAX)) begin
          asig   <= SIG_W'(SIG_MAX);
          rising <= 1'b0;
        end else begin
          asig <= asig + SIG_W'(STEP);
        end
      end else begin
        if (int'(asig) <= int'(STEP)) begin
          asig   <= '0;
          rising <= 1'b1;
        end else begin
          asig <= asig - SIG_W'(STEP);
        end
      end
    end
  end

  // sampler: pulse train every SAMPLE_DIV enabled cycles
  assign pulse = (div_cnt == '0);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_cnt  <= '0;
      samp_out <= '0;
    end else if (en) begin
      div_cnt  <= (int'(div_cnt) == int'(SAMPLE_DIV) - 1) ? '0 : div_cnt + 1'b1;
      samp_out <= pulse ? asig : '0;
    end
  end

  // quantizer and coder
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      level       <= '0;
      level_valid <= 1'b0;
      quant_out   <= '0;
      pcm_out     <= '0;
      pcm_valid   <= 1'b0;
    end else begin
      pcm_valid <= 1'b0;
      if (en) begin
        level_valid <= pulse;
        if (pulse) begin
          level     <= asig[SIG_W-1:SHIFT];
          quant_out <= {asig[SIG_W-1:SHIFT], {SHIFT{1'b0}}};
        end
        if (level_valid) begin
          pcm_out   <= level;
          pcm_valid <= 1'b1;
        end
      end
    end
  end
endmodule
