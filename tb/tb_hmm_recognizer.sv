// tb_hmm_recognizer: end-to-end test of the full recognizer at its default
// size (28 HMMs x 3 states x 39 dimensions).
//
// 28 random models are loaded. Each utterance is generated from one
// "spoken" model (its state means plus small noise, 1 to 3 frames per
// utterance) and streamed through the valid/ready port. A behavioural
// log-Viterbi model of every HMM, in the mode the design is in, predicts the
// winner, its score and the margin to the runner-up; the result must match
// exactly and arrive 39*T+1 clock edges after the first dimension is taken;
// in Technique-1 the winner must be the spoken model. The threshold is set per utterance so
// that some Technique-2 results are too close: those must come back with
// redo, and replaying the utterance must give a Technique-1 result. Fixed
// Technique-1 and Technique-2 operation (adaptive off) is also exercised.
// Each mechanism is counted and one that never happened is a failure.
module tb_hmm_recognizer;
  import hmm_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_t2 = 0, n_t1 = 0, n_redo = 0, n_recompute = 0, n_recursion = 0, n_fixed = 0;
  int n_approx_visible = 0, n_gaps = 0, n_t2_miss = 0;

  logic clk = 0, rst_n = 0;
  logic param_we;
  param_wr_t param_wr;
  logic feat_valid, feat_last, feat_ready;
  logic [15:0] feat_data;
  logic adaptive_en;
  mode_e mode_sel, mode_o, result_mode;
  logic [23:0] threshold, result_score, result_margin;
  logic result_valid, result_redo;
  logic [4:0] result_phone;

  hmm_recognizer dut (.clk, .rst_n, .param_we, .param_wr, .feat_valid, .feat_data, .feat_last,
                      .feat_ready, .adaptive_en, .mode_sel, .threshold, .mode_o, .result_valid,
                      .result_phone, .result_score, .result_margin, .result_redo, .result_mode);

  always #5 clk = ~clk;

  int cycle = 0;
  bit dbg = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ref_hmm models [N_HMM];
  logic [15:0] fr [MAX_T][39];

  task automatic wr(int h, param_kind_e k, int s, int d, logic [47:0] v);
    param_we = 1; param_wr.hmm = 5'(h); param_wr.kind = k; param_wr.state = 2'(s);
    param_wr.dim = 6'(d); param_wr.data = v;
    @(negedge clk);
    param_we = 0;
  endtask

  // predicted outcome over all models in one mode
  task automatic predict(int T, bit approx, output int idx, output logic [23:0] best,
                         output logic [23:0] margin);
    logic [23:0] sc [N_HMM];
    logic [23:0] second;
    for (int h = 0; h < N_HMM; h++) begin
      logic [47:0] l = models[h].run(fr, T, approx);
      sc[h] = l[47:24];
    end
    if (dbg) for (int h = 0; h < N_HMM; h++) $display("score %0d = %0d", h, sc[h]);
    idx = 0; best = sc[0];
    for (int h = 1; h < N_HMM; h++) if (sc[h] < best) begin best = sc[h]; idx = h; end
    second = 24'hFFFFFF;
    for (int h = 0; h < N_HMM; h++) if (h != idx && sc[h] < second) second = sc[h];
    margin = second - best;
  endtask

  // stream the utterance in fr[0..T-1], wait for the result, check latency
  task automatic stream(int T, bit gaps);
    int c0 = -1;
    for (int t = 0; t < T; t++) begin
      for (int d = 0; d < 39; d++) begin
        if (gaps && ($urandom % 8 == 0)) begin
          feat_valid = 0; n_gaps++;
          @(negedge clk);
        end
        feat_valid = 1; feat_data = fr[t][d]; feat_last = (t == T - 1);
        checks++;
        if (!feat_ready) begin failures++; $display("FAIL not ready"); end
        if (c0 < 0) c0 = cycle + 1;          // accepted at the next rising edge
        @(negedge clk);
      end
    end
    feat_valid = 0; feat_last = 0;
    while (!result_valid) @(negedge clk);
    if (!gaps) begin
      checks++;
      if (cycle - c0 != 39 * T + 1) begin
        failures++; $display("FAIL latency %0d exp %0d", cycle - c0, 39 * T + 1);
      end
    end
    if (T > 1) n_recursion++;
  endtask

  task automatic check_result(int T, int spoken, bit approx, bit exp_redo);
    int idx; logic [23:0] best, margin;
    predict(T, approx, idx, best, margin);
    checks += 6;
    if (result_phone !== 5'(idx)) begin failures++; $display("FAIL phone %0d exp %0d", result_phone, idx); end
    if (result_score !== best)    begin failures++; $display("FAIL score %h exp %h", result_score, best); end
    if (result_margin !== margin) begin failures++; $display("FAIL margin %h exp %h", result_margin, margin); end
    if (result_redo !== exp_redo) begin failures++; $display("FAIL redo %b exp %b", result_redo, exp_redo); end
    if (result_mode !== (approx ? MODE_T2 : MODE_T1)) begin failures++; $display("FAIL result mode"); end
    if (!approx && idx != spoken) begin failures++; $display("FAIL spoken %0d recognized %0d", spoken, idx); end
    if (approx && idx != spoken) n_t2_miss++;
  endtask

  initial begin
    param_we = 0; param_wr = '0; feat_valid = 0; feat_last = 0; feat_data = 0;
    adaptive_en = 1; mode_sel = MODE_T2; threshold = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // load the 28 models
    for (int h = 0; h < N_HMM; h++) begin
      models[h] = new();
      models[h].randomize_model(0);
      for (int s = 0; s < 3; s++) begin
        for (int d = 0; d < 39; d++) begin
          wr(h, PK_MU, s, d, {32'h0, models[h].mu[s][d]});
          wr(h, PK_SIGMA, s, d, {32'h0, models[h].sigma[s][d]});
        end
        wr(h, PK_OMEGA,  s, 0, models[h].omega[s]);
        wr(h, PK_OMEGA0, s, 0, models[h].omega0[s]);
        wr(h, PK_A_SELF, s, 0, models[h].a_self[s]);
        wr(h, PK_A_PRED, s, 0, models[h].a_pred[s]);
      end
    end
    checks++;
    if (mode_o !== MODE_T2) begin failures++; $display("FAIL default mode"); end

    for (int u = 0; u < 10; u++) begin
      int T, spoken, idx;
      logic [23:0] best, m2, m1;
      bit force_close;
      T           = 1 + (u % 3);
      spoken      = int'($urandom % N_HMM);
      force_close = (u % 2 == 1);
      for (int t = 0; t < T; t++)
        for (int d = 0; d < 39; d++)
          fr[t][d] = 16'($signed(models[spoken].mu[(t * 3) / T][d]) + $signed(16'($urandom % 201)) - 16'sd100);
      predict(T, 1'b1, idx, best, m2);
      predict(T, 1'b0, idx, best, m1);
      if (m1 != m2) n_approx_visible++;
      threshold = force_close ? m2 + 24'd1 : ((m2 > 0) ? m2 : 24'd0);
      if (u >= 8) begin
        // fixed modes, no trigger whatever the margin
        adaptive_en = 0; mode_sel = (u == 8) ? MODE_T1 : MODE_T2;
        @(negedge clk);
        stream(T, u % 2 == 0);
        check_result(T, spoken, mode_sel == MODE_T2, 1'b0);
        n_fixed++;
        if (mode_sel == MODE_T2) n_t2++; else n_t1++;
        continue;
      end
      adaptive_en = 1;
      stream(T, u % 4 == 2);
      check_result(T, spoken, 1'b1, force_close);
      n_t2++;
      if (force_close) begin
        n_redo++;
        @(negedge clk);
        checks++;
        if (mode_o !== MODE_T1) begin failures++; $display("FAIL mode not switched"); end
        stream(T, 1'b0);                      // host replays the utterance
        check_result(T, spoken, 1'b0, 1'b0);
        n_recompute++; n_t1++;
        @(negedge clk);
        checks++;
        if (mode_o !== MODE_T2) begin failures++; $display("FAIL mode not restored"); end
      end
    end

    checks++;
    if (n_t2 == 0 || n_t1 == 0 || n_redo == 0 || n_recompute == 0 || n_recursion == 0 ||
        n_fixed == 0 || n_approx_visible == 0 || n_gaps == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("T2 results %0d, T1 results %0d, redo triggers %0d, recomputes %0d, multi-frame %0d, fixed-mode %0d, T1/T2 margins differing %0d, stream gaps %0d, T2 misrecognitions %0d",
             n_t2, n_t1, n_redo, n_recompute, n_recursion, n_fixed, n_approx_visible, n_gaps, n_t2_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
