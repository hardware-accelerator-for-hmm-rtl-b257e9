// hmm_recognizer: HMM-based phone recognizer with adaptive approximate
// arithmetic.
//
// A frame of 39 scaled 16-bit features (MFCCs with deltas and double
// deltas) is streamed one dimension per clock and broadcast to N_HMM
// monophone HMMs (hmm_unit), each scoring it in three states with a
// sequential multiply-accumulate (logb_unit) and a log-Viterbi cell
// (delta_unit). After the utterance's last frame each HMM reduces its state
// costs to a likelihood cost, and phone_compare picks the HMM with the
// smallest one: result_phone is its index. recog_ctrl sequences all of it
// and runs the adaptive scheme: Technique-2 (approximate adders, intended
// for the faster clock) by default, with a fall-back to Technique-1 (exact
// adders, slower clock) when the two best HMMs are closer than threshold.
// Then result_redo is raised and the host must replay the utterance; the
// next result is computed in Technique-1.
//
// Interface: model parameters are written through param_we/param_wr before
// recognition (see hmm_pkg::param_wr_t). Features use a valid/ready stream;
// feat_last marks the frames of the last frame of the utterance.
// result_valid pulses for one cycle with the result; mode_o is the mode in
// use and is meant to select the clock frequency (the clock source itself is
// outside this design).
//
// Timing: 39 cycles per frame; result_valid rises 2 cycles after the last
// dimension of the utterance is accepted (delta update, then result capture).
module hmm_recognizer
  import hmm_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // model load
  input  logic               param_we,
  input  param_wr_t          param_wr,
  // feature stream
  input  logic               feat_valid,
  input  logic [FEAT_W-1:0]  feat_data,
  input  logic               feat_last,
  output logic               feat_ready,
  // adaptive control
  input  logic               adaptive_en,
  input  mode_e              mode_sel,
  input  logic [CMP_W-1:0]   threshold,
  output mode_e              mode_o,
  // result
  output logic               result_valid,
  output logic [HMM_AW-1:0]  result_phone,
  output logic [CMP_W-1:0]   result_score,
  output logic [CMP_W-1:0]   result_margin,
  output logic               result_redo,
  output mode_e              result_mode
);
  logic [DIM_AW-1:0]  dim;
  logic               acc_en, first, delta_en, init, result_en, redo, too_close;
  mode_e              mode;
  logic [SCORE_W-1:0] lik [N_HMM];
  logic [HMM_AW-1:0]  best_idx;
  logic [CMP_W-1:0]   best_score, second_score, margin;

  recog_ctrl u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .feat_valid  (feat_valid),
    .feat_last   (feat_last),
    .feat_ready  (feat_ready),
    .adaptive_en (adaptive_en),
    .mode_sel    (mode_sel),
    .too_close   (too_close),
    .mode        (mode),
    .dim         (dim),
    .acc_en      (acc_en),
    .first       (first),
    .delta_en    (delta_en),
    .init        (init),
    .result_en   (result_en),
    .redo        (redo)
  );

  for (genvar h = 0; h < N_HMM; h++) begin : g_hmm
    logic [SCORE_W-1:0] unused_delta [N_STATE];
    hmm_unit #(.HMM_ID(h)) u_hmm (
      .clk        (clk),
      .rst_n      (rst_n),
      .mode       (mode),
      .param_we   (param_we),
      .param_wr   (param_wr),
      .o          (feat_data),
      .dim        (dim),
      .acc_en     (acc_en),
      .first      (first),
      .delta_en   (delta_en),
      .init       (init),
      .delta      (unused_delta),
      .likelihood (lik[h])
    );
  end

  phone_compare #(.NH(N_HMM)) u_cmp (
    .score        (lik),
    .threshold    (threshold),
    .best_idx     (best_idx),
    .best_score   (best_score),
    .second_score (second_score),
    .margin       (margin),
    .too_close    (too_close)
  );

  assign mode_o = mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result_valid  <= 1'b0;
      result_phone  <= '0;
      result_score  <= '0;
      result_margin <= '0;
      result_redo   <= 1'b0;
      result_mode   <= MODE_T2;
    end else begin
      result_valid <= result_en;
      if (result_en) begin
        result_phone  <= best_idx;
        result_score  <= best_score;
        result_margin <= margin;
        result_redo   <= redo;
        result_mode   <= mode;
      end
    end
  end

  logic unused_second;
  assign unused_second = ^second_score;
endmodule
