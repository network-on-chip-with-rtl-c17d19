// tb_ring_router - drives one ring stop (node 2, and node 3 built as the exit
// stop) with random incoming flits, connection masks, local requests and
// ready signals, and compares every output with a reference model of the
// rules: exit for destination 0 at the exit stop, eject to a connected ready
// node, drop for a disconnected destination, otherwise forward; inject only
// into an empty slot of a connected stop; nothing moves without en. Each rule
// must be exercised at least once.
module tb_ring_router;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, en;
  logic [4:0] node_on;
  flit_t in_flit, inj_flit;
  logic inj_valid, ej_ready;
  flit_t out2, ej2, ex2, out3, ej3, ex3;
  logic inj_ready2, ej_valid2, exit_valid2, bp2, dr2, rc2;
  logic inj_ready3, ej_valid3, exit_valid3, bp3, dr3, rc3;
  int checks = 0, failures = 0;
  int n_exit = 0, n_ej = 0, n_drop = 0, n_fwd = 0, n_inj = 0, n_bypass = 0, n_recirc = 0;

  ring_router #(.MY_ID(3'd2), .IS_EXIT(1'b0)) dut2 (
    .clk, .rst_n, .en, .node_on, .in_flit, .out_flit(out2), .inj_valid, .inj_flit,
    .inj_ready(inj_ready2), .ej_valid(ej_valid2), .ej_flit(ej2), .ej_ready,
    .exit_valid(exit_valid2), .exit_flit(ex2), .ev_bypass(bp2), .ev_drop(dr2), .ev_recirc(rc2));
  ring_router #(.MY_ID(3'd3), .IS_EXIT(1'b1)) dut3 (
    .clk, .rst_n, .en, .node_on, .in_flit, .out_flit(out3), .inj_valid, .inj_flit,
    .inj_ready(inj_ready3), .ej_valid(ej_valid3), .ej_flit(ej3), .ej_ready,
    .exit_valid(exit_valid3), .exit_flit(ex3), .ev_bypass(bp3), .ev_drop(dr3), .ev_recirc(rc3));

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference model of one stop: returns expected outputs
  task automatic model(input int id, input bit is_exit, output flit_t nxt, output bit ex,
                       output bit ej, output bit drop, output bit ir, output bit byp);
    bit fwd;
    fwd = 0; ex = 0; ej = 0; drop = 0; ir = 0; byp = 0;
    if (en && in_flit.valid) begin
      if (in_flit.dst == 0) begin
        if (is_exit) ex = 1; else fwd = 1;
      end else if (int'(in_flit.dst) == id && node_on[id-1] && ej_ready) ej = 1;
      else if (int'(in_flit.dst) > 5 || !node_on[in_flit.dst-1]) drop = 1;
      else fwd = 1;
      byp = fwd && !node_on[id-1];
    end
    ir = en && !fwd && node_on[id-1] && inj_valid;
    nxt = fwd ? in_flit : (ir ? inj_flit : '0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t n2, n3, hold2, hold3;
    bit ex, ej, dr, ir, byp;
    en = 0; node_on = 0; in_flit = '0; inj_flit = '0; inj_valid = 0; ej_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(out2 == '0 && out3 == '0, "empty after reset");
    for (int k = 0; k < 4000; k++) begin
      en        = ($urandom_range(0, 3) != 0);
      node_on   = 5'($urandom);
      in_flit   = '{valid: 1'($urandom_range(0, 3) != 0), dst: 3'($urandom_range(0, 5)),
                    src: 3'($urandom_range(1, 5)), data: 8'($urandom)};
      inj_flit  = '{valid: 1'b1, dst: 3'($urandom_range(0, 5)), src: 3'd2, data: 8'($urandom)};
      inj_valid = 1'($urandom);
      ej_ready  = ($urandom_range(0, 3) != 0);
      hold2 = out2; hold3 = out3;
      #1;
      model(2, 0, n2, ex, ej, dr, ir, byp);
      chk(exit_valid2 == ex && ej_valid2 == ej && dr2 == dr && inj_ready2 == ir && bp2 == byp,
          "stop 2 strobes");
      chk(rc2 == (en && in_flit.valid && int'(in_flit.dst) == 2 && !ej && !dr && !ex && in_flit.dst != 0),
          "stop 2 recirculation");
      if (ex) n_exit++;
      if (ej) begin n_ej++; chk(ej2 == in_flit, "ejected flit"); end
      if (dr) n_drop++;
      if (ir) n_inj++;
      if (byp) n_bypass++;
      if (rc2) n_recirc++;
      if (n2.valid && !ir) n_fwd++;
      model(3, 1, n3, ex, ej, dr, ir, byp);
      chk(exit_valid3 == ex && ej_valid3 == ej && dr3 == dr && inj_ready3 == ir, "stop 3 strobes");
      if (ex) begin n_exit++; chk(ex3 == in_flit, "exit flit"); end
      @(negedge clk);
      chk(out2 == (en ? n2 : hold2), "stop 2 output slot");
      chk(out3 == (en ? n3 : hold3), "stop 3 output slot");
    end
    chk(n_exit > 0 && n_ej > 0 && n_drop > 0 && n_fwd > 0 && n_inj > 0 && n_bypass > 0 && n_recirc > 0,
        "every rule exercised");
    $display("exit=%0d eject=%0d drop=%0d fwd=%0d inj=%0d bypass=%0d recirc=%0d",
             n_exit, n_ej, n_drop, n_fwd, n_inj, n_bypass, n_recirc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
