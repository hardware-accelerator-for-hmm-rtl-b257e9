// tb_recog_ctrl: sequencing and adaptive-mode behaviour of the controller.
// Utterances of 1..4 frames are streamed, with and without idle gaps.
// A monitor checks dim counting, that delta_en comes exactly one cycle after
// each frame's last dimension (init only on the first frame), that
// result_en comes one cycle after the last delta_en, and that feat_ready is
// low in between. The adaptive part checks: too_close in Technique-2 gives
// redo and a switch to Technique-1; the next result switches back; with
// adaptive_en low the mode follows mode_sel and redo stays low.
module tb_recog_ctrl;
  import hmm_pkg::*;
  int checks = 0, failures = 0, redo_cnt = 0, t1_passes = 0;

  logic clk = 0, rst_n = 0;
  logic feat_valid, feat_last, feat_ready, adaptive_en, too_close;
  mode_e mode_sel, mode;
  logic [DIM_AW-1:0] dim;
  logic acc_en, first, delta_en, init, result_en, redo;

  recog_ctrl dut (.clk, .rst_n, .feat_valid, .feat_last, .feat_ready, .adaptive_en, .mode_sel,
                  .too_close, .mode, .dim, .acc_en, .first, .delta_en, .init, .result_en, .redo);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: expected strobes derived from the accepted stream
  int exp_dim = 0, frame_in_utt = 0;
  logic exp_delta = 0, exp_init_next = 1, exp_init = 1, exp_last = 0, exp_result = 0;
  always @(posedge clk) if (rst_n) begin
    checks += 3;
    if (delta_en !== exp_delta)   begin failures++; $display("FAIL delta_en @%0t", $time); end
    if (result_en !== exp_result) begin failures++; $display("FAIL result_en @%0t", $time); end
    if (delta_en && init !== exp_init) begin failures++; $display("FAIL init @%0t", $time); end
    if (acc_en) begin
      checks += 2;
      if (dim !== DIM_AW'(exp_dim))    begin failures++; $display("FAIL dim %0d exp %0d", dim, exp_dim); end
      if (first !== (exp_dim == 0))    begin failures++; $display("FAIL first"); end
    end
    exp_result = exp_delta && exp_last;
    if (exp_delta) exp_init = exp_last;
    exp_delta = 0;
    if (acc_en) begin
      if (exp_dim == N_DIM - 1) begin exp_dim = 0; exp_delta = 1; exp_last = feat_last; end
      else exp_dim++;
    end
  end

  // streams one utterance; returns when result_en has been seen
  task automatic utterance(int T, bit gaps, bit close_flag, output logic got_redo);
    got_redo = 0;
    for (int t = 0; t < T; t++) begin
      for (int d = 0; d < N_DIM; d++) begin
        @(negedge clk);
        if (gaps && ($urandom % 3 == 0)) begin
          feat_valid = 0;
          @(negedge clk);
        end
        feat_valid = 1; feat_last = (t == T - 1);
        checks++;
        if (!feat_ready) begin failures++; $display("FAIL not ready mid-utterance"); end
      end
    end
    @(negedge clk);
    feat_valid = 0;
    too_close = close_flag;
    checks++;
    if (feat_ready) begin failures++; $display("FAIL ready while closing"); end
    while (!result_en) @(negedge clk);
    got_redo = redo;
    @(negedge clk);
    checks++;
    if (!feat_ready) begin failures++; $display("FAIL not ready after result"); end
  endtask

  initial begin
    logic r;
    feat_valid = 0; feat_last = 0; adaptive_en = 1; too_close = 0; mode_sel = MODE_T1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (mode !== MODE_T2) begin failures++; $display("FAIL default mode"); end

    utterance(3, 0, 0, r);                 // clear result in T2: no redo
    checks += 2;
    if (r) begin failures++; $display("FAIL unexpected redo"); end
    if (mode !== MODE_T2) begin failures++; $display("FAIL mode after clear result"); end

    utterance(2, 1, 1, r);                 // too close in T2: redo, go to T1
    checks += 2;
    if (!r) begin failures++; $display("FAIL no redo"); end else redo_cnt++;
    if (mode !== MODE_T1) begin failures++; $display("FAIL mode not T1"); end

    utterance(2, 0, 1, r);                 // recompute in T1: final, back to T2
    t1_passes++;
    checks += 2;
    if (r) begin failures++; $display("FAIL redo in T1"); end
    if (mode !== MODE_T2) begin failures++; $display("FAIL mode not back to T2"); end

    utterance(1, 1, 0, r);
    utterance(4, 1, 0, r);

    adaptive_en = 0; mode_sel = MODE_T1;   // fixed mode
    @(negedge clk);
    checks++; if (mode !== MODE_T1) begin failures++; $display("FAIL fixed mode T1"); end
    utterance(1, 0, 1, r);
    checks += 2;
    if (r) begin failures++; $display("FAIL redo with adaptive off"); end
    mode_sel = MODE_T2;
    @(negedge clk);
    if (mode !== MODE_T2) begin failures++; $display("FAIL fixed mode T2"); end

    checks++;
    if (redo_cnt == 0 || t1_passes == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
