// hmm_pkg: shared sizes, types and helpers of the HMM phone recognizer.
//
// The numbers follow the design point of the accelerator: 28 monophone HMMs of
// 3 left-to-right states each, 39-dimensional feature vectors of 16-bit scaled
// integers (scale K = 100), 48-bit scores, and 24-bit "low halves" for the
// truncated additions of the optimized datapath. All scores are costs
// (absolute values of log probabilities), so every comparison keeps the
// smaller value.
package hmm_pkg;

  localparam int unsigned N_HMM    = 28;  // monophone models
  localparam int unsigned N_STATE  = 3;   // states per HMM
  localparam int unsigned N_DIM    = 39;  // feature dimensions
  localparam int unsigned FEAT_W   = 16;  // o, mu, sigma width
  localparam int unsigned SQ_W     = 32;  // (o-mu)^2 width
  localparam int unsigned SCORE_W  = 48;  // logb, delta, likelihood width
  localparam int unsigned LOW_W    = 24;  // width of the truncated additions
  localparam int unsigned CMP_W    = 24;  // bits compared across HMMs

  localparam int unsigned DIM_AW   = $clog2(N_DIM);
  localparam int unsigned HMM_AW   = $clog2(N_HMM);
  localparam int unsigned STATE_AW = $clog2(N_STATE);

  // Datapath mode of the adaptive system.
  //   MODE_T1: exact adders (custom optimized datapath, higher accuracy).
  //   MODE_T2: carry-predicting approximate adders (faster clock).
  typedef enum logic {
    MODE_T1 = 1'b0,
    MODE_T2 = 1'b1
  } mode_e;

  // Which parameter a model write targets.
  typedef enum logic [2:0] {
    PK_MU       = 3'd0,  // mean, per state and dimension (16 bit)
    PK_SIGMA    = 3'd1,  // scaled |variance term|, per state and dimension (16 bit)
    PK_OMEGA    = 3'd2,  // omega_j, per state (48 bit), used for t > 0
    PK_OMEGA0   = 3'd3,  // omega'_j = omega_j + log pi_j, per state (48 bit), used for t = 0
    PK_A_SELF   = 3'd4,  // a_jj, per state (48 bit)
    PK_A_PRED   = 3'd5   // a_(j-1)j, per state (48 bit), unused for state 0
  } param_kind_e;

  // One model-parameter write from the host.
  typedef struct packed {
    logic [HMM_AW-1:0]   hmm;
    param_kind_e         kind;
    logic [STATE_AW-1:0] state;
    logic [DIM_AW-1:0]   dim;
    logic [SCORE_W-1:0]  data;
  } param_wr_t;

endpackage
