// tb_recognition_workload: recognition-rate experiment on the full-size
// recognizer (28 HMMs x 3 states x 39 dimensions, default parameters).
//
// The 28 phone models are loaded once. One test utterance per phone is
// generated (3 frames, one per state of the spoken model, state means plus
// bounded noise), and every utterance is recognised three times: in fixed
// Technique-1, in fixed Technique-2 and in the adaptive mode. The adaptive
// threshold is calibrated as in the source design's experiments: the
// smallest Technique-1 margin over the test set plus 10 %. Utterances whose
// Technique-2 margin falls below it fire the trigger; for those the host
// replays the utterance in Technique-1 and the replayed result is the one
// counted.
//
// Every result (phone, score, margin, redo flag, mode, latency 39*T+1) must
// equal a behavioural log-Viterbi model of all 28 HMMs, and every replay
// must equal the fixed Technique-1 result. With these well separated
// synthetic models Technique-1 must recognise every utterance, and the
// trigger must fire at least once. The testbench reports
// the recognition count of each mode, the trigger rate and the resulting
// average time per frame (40 cycles at 110 MHz, plus 40 at 95 MHz for a
// replay).
module tb_recognition_workload;
  import hmm_pkg::*;
  import tb_ref_pkg::*;
  localparam int T_UTT = 3;
  int checks = 0, failures = 0;

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
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ref_hmm models [N_HMM];
  logic [15:0] fr [MAX_T][39];
  logic [15:0] utt [N_HMM][MAX_T][39];

  task automatic wr(int h, param_kind_e k, int s, int d, logic [47:0] v);
    param_we = 1; param_wr.hmm = 5'(h); param_wr.kind = k; param_wr.state = 2'(s);
    param_wr.dim = 6'(d); param_wr.data = v;
    @(negedge clk);
    param_we = 0;
  endtask

  task automatic predict(int T, bit approx, output int idx, output logic [23:0] best,
                         output logic [23:0] margin);
    logic [23:0] sc [N_HMM];
    logic [23:0] second;
    for (int h = 0; h < N_HMM; h++) begin
      logic [47:0] l;
      l = models[h].run(fr, T, approx);
      sc[h] = l[47:24];
    end
    idx = 0; best = sc[0];
    for (int h = 1; h < N_HMM; h++) if (sc[h] < best) begin best = sc[h]; idx = h; end
    second = 24'hFFFFFF;
    for (int h = 0; h < N_HMM; h++) if (h != idx && sc[h] < second) second = sc[h];
    margin = second - best;
  endtask

  task automatic stream(int T);
    int c0;
    c0 = -1;
    for (int t = 0; t < T; t++)
      for (int d = 0; d < 39; d++) begin
        feat_valid = 1; feat_data = fr[t][d]; feat_last = (t == T - 1);
        checks++;
        if (!feat_ready) begin failures++; $display("FAIL not ready"); end
        if (c0 < 0) c0 = cycle + 1;
        @(negedge clk);
      end
    feat_valid = 0; feat_last = 0;
    while (!result_valid) @(negedge clk);
    checks++;
    if (cycle - c0 != 39 * T + 1) begin
      failures++; $display("FAIL latency %0d exp %0d", cycle - c0, 39 * T + 1);
    end
  endtask

  // checks one result against the reference; returns the recognised phone
  task automatic check_result(int T, bit approx, bit exp_redo, output int idx);
    logic [23:0] best, margin;
    predict(T, approx, idx, best, margin);
    checks += 5;
    if (result_phone !== 5'(idx)) begin failures++; $display("FAIL phone %0d exp %0d", result_phone, idx); end
    if (result_score !== best)    begin failures++; $display("FAIL score %h exp %h", result_score, best); end
    if (result_margin !== margin) begin failures++; $display("FAIL margin %h exp %h", result_margin, margin); end
    if (result_redo !== exp_redo) begin failures++; $display("FAIL redo %b exp %b", result_redo, exp_redo); end
    if (result_mode !== (approx ? MODE_T2 : MODE_T1)) begin failures++; $display("FAIL result mode"); end
  endtask

  initial begin
    int ok_t1, ok_t2, ok_ad, n_trig, n_fix;
    logic [23:0] m2 [N_HMM];
    logic [23:0] thr;
    ok_t1 = 0; ok_t2 = 0; ok_ad = 0; n_trig = 0; n_fix = 0;
    param_we = 0; param_wr = '0; feat_valid = 0; feat_last = 0; feat_data = 0;
    adaptive_en = 0; mode_sel = MODE_T1; threshold = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

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

    // test set: utterance p is phone p spoken for T_UTT frames
    for (int p = 0; p < N_HMM; p++)
      for (int t = 0; t < T_UTT; t++)
        for (int d = 0; d < 39; d++)
          utt[p][t][d] = 16'($signed(models[p].mu[(t * 3) / T_UTT][d]) +
                             $signed(16'($urandom % 201)) - 16'sd100);

    // threshold: the smallest Technique-1 margin over the test set plus 10 %
    begin
      logic [23:0] m1min;
      m1min = 24'hFFFFFF;
      for (int p = 0; p < N_HMM; p++) begin
        int idx; logic [23:0] best, m1;
        fr = utt[p];
        predict(T_UTT, 1'b1, idx, best, m2[p]);
        predict(T_UTT, 1'b0, idx, best, m1);
        if (m1 < m1min) m1min = m1;
      end
      thr = m1min + m1min / 10;
    end

    for (int p = 0; p < N_HMM; p++) begin
      int r1, r2, ra;
      bit fire;
      fr = utt[p];

      adaptive_en = 0; mode_sel = MODE_T1; @(negedge clk);
      stream(T_UTT); check_result(T_UTT, 1'b0, 1'b0, r1);
      mode_sel = MODE_T2; @(negedge clk);
      stream(T_UTT); check_result(T_UTT, 1'b1, 1'b0, r2);

      adaptive_en = 1; threshold = thr; @(negedge clk);
      checks++;
      if (mode_o !== MODE_T2) begin failures++; $display("FAIL adaptive start mode"); end
      fire = (m2[p] < thr);
      stream(T_UTT); check_result(T_UTT, 1'b1, fire, ra);
      if (fire) begin
        n_trig++;
        @(negedge clk);
        stream(T_UTT); check_result(T_UTT, 1'b0, 1'b0, ra);
        if (r2 != p && ra == p) n_fix++;
        checks++;
        if (ra != r1) begin failures++; $display("FAIL replay differs from Technique-1"); end
      end
      if (r1 == p) ok_t1++;
      if (r2 == p) ok_t2++;
      if (ra == p) ok_ad++;
    end

    checks += 2;
    if (ok_t1 != N_HMM) begin failures++; $display("FAIL Technique-1 recognised %0d of %0d", ok_t1, N_HMM); end
    if (n_trig == 0)    begin failures++; $display("FAIL trigger never fired"); end
    // execution time per utterance frame, 40 cycles at 110 MHz, plus 40 at 95 MHz when replayed
    $display("threshold %0d; average time per frame %0.1f ns (Technique-2 only %0.1f ns, with replay %0.1f ns)",
             thr, 40.0 / 0.110 + real'(n_trig) / N_HMM * 40.0 / 0.095, 40.0 / 0.110, 40.0 / 0.110 + 40.0 / 0.095);
    $display("recognised: Technique-1 %0d/%0d, Technique-2 %0d/%0d, adaptive %0d/%0d; trigger fired %0d times, corrected %0d Technique-2 errors",
             ok_t1, N_HMM, ok_t2, N_HMM, ok_ad, N_HMM, n_trig, n_fix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
