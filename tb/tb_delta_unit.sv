// tb_delta_unit: Viterbi cell with and without a predecessor state.
// Random logb, transition costs and neighbour deltas are applied for many
// frames in both modes; after each update the register must hold the
// reference init or recursion value. It also counts how often the
// predecessor path and the self loop won, and both must occur.
module tb_delta_unit;
  import hmm_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, pred_wins = 0, self_wins = 0;

  logic clk = 0, rst_n = 0;
  mode_e mode;
  logic en, init;
  logic [47:0] logb, a_self, a_pred, dpred, d1, d0;

  delta_unit #(.HAS_PRED(1)) dut1 (.clk, .rst_n, .mode, .en, .init, .logb, .a_self, .a_pred,
                                   .delta_pred(dpred), .delta(d1));
  delta_unit #(.HAS_PRED(0)) dut0 (.clk, .rst_n, .mode, .en, .init, .logb, .a_self, .a_pred,
                                   .delta_pred(dpred), .delta(d0));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [47:0] rnd48(int unsigned span_bits);
    logic [47:0] v = {16'($urandom), 32'($urandom)};
    return v & ((48'd1 << span_bits) - 1);
  endfunction

  initial begin
    logic [47:0] e1, e0, p1, p0, ps, pp;
    en = 0; init = 0; mode = MODE_T1;
    logb = 0; a_self = 0; a_pred = 0; dpred = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    p1 = 0; p0 = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      mode   = ($urandom % 2) ? MODE_T2 : MODE_T1;
      init   = (i % 17 == 0);
      logb   = rnd48(40);
      a_self = rnd48(24);
      a_pred = rnd48(24);
      dpred  = p1 + rnd48(34) - 48'(1 << 33);
      en     = ($urandom % 4 != 0);
      ps = ref_trans(p1, a_self, mode == MODE_T2);
      pp = ref_trans(dpred, a_pred, mode == MODE_T2);
      if (!en)       begin e1 = p1; e0 = p0; end
      else if (init) begin e1 = logb; e0 = logb; end
      else begin
        e1 = ref_min(pp, ps) + logb;
        e0 = ref_trans(p0, a_self, mode == MODE_T2) + logb;
        if (pp < ps) pred_wins++; else self_wins++;
      end
      @(posedge clk); #1;
      checks += 2;
      if (d1 !== e1) begin failures++; $display("FAIL pred cell %0d: %h exp %h", i, d1, e1); end
      if (d0 !== e0) begin failures++; $display("FAIL first cell %0d: %h exp %h", i, d0, e0); end
      p1 = d1; p0 = d0;
    end
    checks++;
    if (pred_wins == 0 || self_wins == 0) begin failures++; $display("FAIL path coverage"); end
    $display("pred wins %0d, self wins %0d", pred_wins, self_wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
