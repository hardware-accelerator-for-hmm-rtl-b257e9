// hmm_param_mem: trained-model storage of one HMM.
//
// Per state j it keeps the mean mu_jd and variance term sigma_jd of every
// feature dimension (16 bit each) and the 48-bit per-state constants omega_j,
// omega'_j (omega_j + log pi_j, used for the first frame), a_jj and
// a_(j-1)j. The host loads it through a write port; a write is taken when
// we is high and wr.hmm equals HMM_ID. Each state has its own mu/sigma
// arrays, read asynchronously at the current dimension, so the three
// output-probability units of the HMM read in parallel.
// Contents are not reset: the model must be loaded before recognition.
// The source design only says the trained values are stored; the organisation,
// write port and read timing are this design's choice.
module hmm_param_mem
  import hmm_pkg::*;
#(
  parameter int unsigned HMM_ID = 0
) (
  input  logic               clk,
  input  logic               we,
  input  param_wr_t          wr,
  input  logic [DIM_AW-1:0]  rd_dim,
  output logic [FEAT_W-1:0]  mu     [N_STATE],
  output logic [FEAT_W-1:0]  sigma  [N_STATE],
  output logic [SCORE_W-1:0] omega  [N_STATE],
  output logic [SCORE_W-1:0] omega0 [N_STATE],
  output logic [SCORE_W-1:0] a_self [N_STATE],
  output logic [SCORE_W-1:0] a_pred [N_STATE]
);
  logic hit;
  assign hit = we && (wr.hmm == HMM_ID[HMM_AW-1:0]);

  for (genvar s = 0; s < N_STATE; s++) begin : g_state
    logic [FEAT_W-1:0]  mu_mem    [N_DIM];
    logic [FEAT_W-1:0]  sigma_mem [N_DIM];
    logic [SCORE_W-1:0] omega_q, omega0_q, a_self_q, a_pred_q;
    logic               s_hit;

    assign s_hit = hit && (wr.state == s[STATE_AW-1:0]);

    always_ff @(posedge clk) begin
      if (s_hit && wr.kind == PK_MU && wr.dim < N_DIM[DIM_AW-1:0]) begin
        mu_mem[wr.dim] <= wr.data[FEAT_W-1:0];
      end
      if (s_hit && wr.kind == PK_SIGMA && wr.dim < N_DIM[DIM_AW-1:0]) begin
        sigma_mem[wr.dim] <= wr.data[FEAT_W-1:0];
      end
    end

    always_ff @(posedge clk) begin
      if (s_hit) begin
        case (wr.kind)
          PK_OMEGA:  omega_q  <= wr.data;
          PK_OMEGA0: omega0_q <= wr.data;
          PK_A_SELF: a_self_q <= wr.data;
          PK_A_PRED: a_pred_q <= wr.data;
          default: ;
        endcase
      end
    end

    assign mu[s]     = mu_mem[rd_dim];
    assign sigma[s]  = sigma_mem[rd_dim];
    assign omega[s]  = omega_q;
    assign omega0[s] = omega0_q;
    assign a_self[s] = a_self_q;
    assign a_pred[s] = a_pred_q;
  end
endmodule
