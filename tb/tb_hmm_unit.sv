// tb_hmm_unit: one complete HMM (memory, three output-probability units,
// three Viterbi cells, termination) against the behavioural log-Viterbi
// model. A random model is loaded through the write port, then utterances
// of 1 to 6 frames are streamed in both modes; after each utterance the
// three state costs and the likelihood must match the model exactly.
// Sequencing strobes are generated here as the controller would.
module tb_hmm_unit;
  import hmm_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, mode_diff = 0;

  logic clk = 0, rst_n = 0;
  mode_e mode;
  logic param_we;
  param_wr_t param_wr;
  logic [15:0] o;
  logic [DIM_AW-1:0] dim;
  logic acc_en, first, delta_en, init;
  logic [47:0] delta [3];
  logic [47:0] lik;

  hmm_unit #(.HMM_ID(2)) dut (.clk, .rst_n, .mode, .param_we, .param_wr, .o, .dim, .acc_en, .first,
                             .delta_en, .init, .delta, .likelihood(lik));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(param_kind_e k, int s, int d, logic [47:0] v);
    @(negedge clk);
    param_we = 1; param_wr.hmm = 5'd2; param_wr.kind = k; param_wr.state = 2'(s);
    param_wr.dim = 6'(d); param_wr.data = v;
    @(negedge clk);
    param_we = 0;
  endtask

  initial begin
    ref_hmm m = new();
    logic [15:0] fr [MAX_T][39];
    param_we = 0; param_wr = '0; o = 0; dim = 0; acc_en = 0; first = 0; delta_en = 0; init = 0;
    mode = MODE_T1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m.randomize_model(0);
    for (int s = 0; s < 3; s++) begin
      for (int d = 0; d < 39; d++) begin
        wr(PK_MU, s, d, {32'h0, m.mu[s][d]});
        wr(PK_SIGMA, s, d, {32'h0, m.sigma[s][d]});
      end
      wr(PK_OMEGA, s, 0, m.omega[s]);
      wr(PK_OMEGA0, s, 0, m.omega0[s]);
      wr(PK_A_SELF, s, 0, m.a_self[s]);
      wr(PK_A_PRED, s, 0, m.a_pred[s]);
    end
    for (int u = 0; u < 12; u++) begin
      int T;
      logic [47:0] exp_lik, other;
      T = 1 + (u % 6);
      mode = (u % 2) ? MODE_T2 : MODE_T1;
      for (int t = 0; t < T; t++)
        for (int d = 0; d < 39; d++)
          fr[t][d] = 16'($signed(16'($urandom % 3001)) - 16'sd1500);
      exp_lik = m.run(fr, T, mode == MODE_T2);
      other   = m.run(fr, T, mode != MODE_T2);
      if (exp_lik != other) mode_diff++;
      void'(m.run(fr, T, mode == MODE_T2));  // leave m.delta for the current mode
      for (int t = 0; t < T; t++) begin
        for (int d = 0; d < 39; d++) begin
          @(negedge clk);
          delta_en = (d == 0 && t > 0);      // previous frame's update overlaps d = 0
          init     = (t == 1);               // that update is for frame t-1
          acc_en = 1; first = (d == 0); dim = 6'(d); o = fr[t][d];
        end
      end
      @(negedge clk);
      acc_en = 0; first = 0; delta_en = 1; init = (T == 1);
      @(negedge clk);
      delta_en = 0; init = 0;
      #1;
      for (int s = 0; s < 3; s++) begin
        checks++;
        if (delta[s] !== m.delta[s]) begin
          failures++; $display("FAIL utt %0d state %0d: %h exp %h", u, s, delta[s], m.delta[s]);
        end
      end
      checks++;
      if (lik !== exp_lik) begin failures++; $display("FAIL utt %0d lik %h exp %h", u, lik, exp_lik); end
    end
    checks++;
    if (mode_diff == 0) begin failures++; $display("FAIL modes never differed"); end
    checks++;
    if (m.pred_wins == 0) begin failures++; $display("FAIL predecessor path never taken"); end
    $display("utterances where T1 and T2 differ: %0d, predecessor wins %0d", mode_diff, m.pred_wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
