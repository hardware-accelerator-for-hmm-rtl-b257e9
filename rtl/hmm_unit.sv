// hmm_unit: one monophone HMM with its own model memory.
//
// Three left-to-right states, each with an output-probability unit
// (logb_unit) and a Viterbi cell (delta_unit). Every state's logb unit sees
// the same feature dimension o each cycle and reads its own mu/sigma at the
// current dimension. Once per frame (delta_en) the three delta cells update
// together; cell j takes delta_{t-1}(j-1) from cell j-1's register, so all
// cells use the previous frame's values. viterbi_term reduces the three
// final costs to the HMM's likelihood cost.
//
// Timing: feature dimensions with acc_en one per clock; delta_en in the cycle
// after the last dimension of a frame; likelihood valid from the cycle after
// the last delta_en. All sequencing comes from recog_ctrl.
//
// The decomposition (output-probability unit, optimized Viterbi cell and
// termination comparators, three of each per HMM) follows the source design;
// the memory interface is this design's choice.
module hmm_unit
  import hmm_pkg::*;
#(
  parameter int unsigned HMM_ID = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  mode_e              mode,
  // model load
  input  logic               param_we,
  input  param_wr_t          param_wr,
  // feature stream and sequencing
  input  logic [FEAT_W-1:0]  o,
  input  logic [DIM_AW-1:0]  dim,
  input  logic               acc_en,
  input  logic               first,
  input  logic               delta_en,
  input  logic               init,
  // results
  output logic [SCORE_W-1:0] delta      [N_STATE],
  output logic [SCORE_W-1:0] likelihood
);
  logic [FEAT_W-1:0]  mu     [N_STATE];
  logic [FEAT_W-1:0]  sigma  [N_STATE];
  logic [SCORE_W-1:0] omega  [N_STATE];
  logic [SCORE_W-1:0] omega0 [N_STATE];
  logic [SCORE_W-1:0] a_self [N_STATE];
  logic [SCORE_W-1:0] a_pred [N_STATE];
  logic [SCORE_W-1:0] logb   [N_STATE];

  hmm_param_mem #(.HMM_ID(HMM_ID)) u_mem (
    .clk    (clk),
    .we     (param_we),
    .wr     (param_wr),
    .rd_dim (dim),
    .mu     (mu),
    .sigma  (sigma),
    .omega  (omega),
    .omega0 (omega0),
    .a_self (a_self),
    .a_pred (a_pred)
  );

  for (genvar s = 0; s < N_STATE; s++) begin : g_state
    logb_unit u_logb (
      .clk    (clk),
      .rst_n  (rst_n),
      .mode   (mode),
      .acc_en (acc_en),
      .first  (first),
      .init   (init),
      .o      (o),
      .mu     (mu[s]),
      .sigma  (sigma[s]),
      .omega  (omega[s]),
      .omega0 (omega0[s]),
      .logb   (logb[s])
    );

    delta_unit #(.HAS_PRED(s != 0)) u_delta (
      .clk        (clk),
      .rst_n      (rst_n),
      .mode       (mode),
      .en         (delta_en),
      .init       (init),
      .logb       (logb[s]),
      .a_self     (a_self[s]),
      .a_pred     (a_pred[s]),
      .delta_pred ((s == 0) ? '0 : delta[(s == 0) ? 0 : s-1]),
      .delta      (delta[s])
    );
  end

  viterbi_term #(.NS(N_STATE)) u_term (
    .delta (delta),
    .p_out (likelihood)
  );
endmodule
