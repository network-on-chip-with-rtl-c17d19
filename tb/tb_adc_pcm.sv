// tb_adc_pcm - runs the ADC model with a clock enable every other cycle and
// compares each PCM code with an independent model: a triangle that rises by
// STEP to the top of the range and falls back, sampled every SAMPLE_DIV
// enabled cycles and truncated to 4 bits. Also checks the sample spacing in
// enabled cycles, the pulse-amplitude output and the quantizer level.
module tb_adc_pcm;
  localparam int STEP = 5, SDIV = 4;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] asig, samp_out, quant_out;
  logic [3:0] pcm_out;
  logic pcm_valid;
  int checks = 0, failures = 0;
  int model_sig, model_dir, en_count, n_codes, last_en, sig_at_sample[$];

  adc_pcm #(.STEP(STEP), .SAMPLE_DIV(SDIV)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_sig = 0; model_dir = 1; en_count = 0; n_codes = 0; last_en = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      // the output register state now reflects edges up to here
      if (pcm_valid) begin
        int exp_code;
        exp_code = sig_at_sample.pop_front() >> 4;
        chk(pcm_out == 4'(exp_code), $sformatf("pcm code %0d vs %0d", pcm_out, exp_code));
        chk(quant_out == 8'(exp_code << 4), "quantizer level");
        if (last_en >= 0) chk(en_count - last_en == SDIV, "sample spacing");
        last_en = en_count;
        n_codes++;
      end
      chk(int'(asig) == model_sig, "triangle amplitude");
      en = (cyc % 2 == 0);
      if (en) begin
        // model of what the next edge does
        if (en_count % SDIV == 0) sig_at_sample.push_back(model_sig);
        if (model_dir == 1) begin
          if (model_sig + STEP >= 255) begin model_sig = 255; model_dir = 0; end
          else model_sig += STEP;
        end else begin
          if (model_sig <= STEP) begin model_sig = 0; model_dir = 1; end
          else model_sig -= STEP;
        end
        en_count++;
        @(negedge clk);
        chk(samp_out == (((en_count - 1) % SDIV == 0) ? 8'(sig_at_sample[$]) : 8'd0),
            "pulse amplitude output");
        if (pcm_valid) begin
          int exp_code;
          exp_code = sig_at_sample.pop_front() >> 4;
          chk(pcm_out == 4'(exp_code), "pcm code (b)");
          if (last_en >= 0) chk(en_count - last_en == SDIV, "sample spacing (b)");
          last_en = en_count;
          n_codes++;
        end
        chk(int'(asig) == model_sig, "triangle amplitude (b)");
        en = 0;
      end
    end
    chk(n_codes > 500, "enough codes");
    $display("codes=%0d", n_codes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
