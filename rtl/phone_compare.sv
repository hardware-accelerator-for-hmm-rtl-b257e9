// phone_compare: final comparison across all HMMs and the adaptive trigger.
//
// A binary tree of comparators picks the HMM with the smallest likelihood
// cost and reports its index, the recognized phone. Only the upper 24 bits
// of each 48-bit cost are compared. The inputs are padded to a power of two
// with the largest cost; ties go to the lower index.
//
// Besides the winner, every tree node also carries the second-smallest cost
// of its subtree (min of the losing side's best and the winning side's
// second), so the root knows the runner-up. When runner-up minus winner is
// below the threshold, too_close is raised; the controller uses it to switch
// from Technique-2 to Technique-1 and have the utterance recomputed.
// Combinational.
//
// The tree of two-input comparators and the 24-bit comparison follow the
// document. It states the trigger comes from the comparator level when the
// likelihoods are closer than a threshold; measuring that as the gap between
// the best and second-best HMM is this design's choice.
module phone_compare
  import hmm_pkg::*;
#(
  parameter int unsigned NH = N_HMM
) (
  input  logic [SCORE_W-1:0]  score [NH],
  input  logic [CMP_W-1:0]    threshold,
  output logic [HMM_AW-1:0]   best_idx,
  output logic [CMP_W-1:0]    best_score,
  output logic [CMP_W-1:0]    second_score,
  output logic [CMP_W-1:0]    margin,
  output logic                too_close
);
  localparam int unsigned LV  = (NH > 1) ? $clog2(NH) : 1;
  localparam int unsigned NP  = 1 << LV;
  localparam int unsigned IW  = (LV > HMM_AW) ? LV : HMM_AW;

  // leaves: padded costs, no runner-up yet
  logic [CMP_W-1:0] leaf_b [NP];
  logic [CMP_W-1:0] leaf_s [NP];
  logic [IW-1:0]    leaf_i [NP];

  for (genvar n = 0; n < NP; n++) begin : g_leaf
    if (n < NH) begin : g_real
      assign leaf_b[n] = score[n][SCORE_W-1 -: CMP_W];
    end else begin : g_pad
      assign leaf_b[n] = '1;
    end
    assign leaf_s[n] = '1;
    assign leaf_i[n] = IW'(n);
  end

  // level l merges pairs of the level below: best, second best, index
  for (genvar l = 0; l < LV; l++) begin : g_lvl
    localparam int unsigned NN = NP >> (l + 1);
    logic [CMP_W-1:0] ib [2*NN];
    logic [CMP_W-1:0] isec [2*NN];
    logic [IW-1:0]    ii [2*NN];
    logic [CMP_W-1:0] ob [NN];
    logic [CMP_W-1:0] os [NN];
    logic [IW-1:0]    oi [NN];

    if (l == 0) begin : g_in_leaf
      assign ib = leaf_b;
      assign isec = leaf_s;
      assign ii = leaf_i;
    end else begin : g_in_lvl
      assign ib = g_lvl[l-1].ob;
      assign isec = g_lvl[l-1].os;
      assign ii = g_lvl[l-1].oi;
    end

    for (genvar n = 0; n < NN; n++) begin : g_node
      logic             take_b;
      logic [CMP_W-1:0] lose_best, win_second;
      logic             unused_s;

      min_cmp #(.W(CMP_W)) u_best (
        .a(ib[2*n]), .b(ib[2*n+1]), .y(ob[n]), .b_lt_a(take_b)
      );
      assign lose_best  = take_b ? ib[2*n]   : ib[2*n+1];
      assign win_second = take_b ? isec[2*n+1] : isec[2*n];
      assign oi[n]      = take_b ? ii[2*n+1] : ii[2*n];

      min_cmp #(.W(CMP_W)) u_second (
        .a(lose_best), .b(win_second), .y(os[n]), .b_lt_a(unused_s)
      );
    end
  end

  logic [CMP_W-1:0] root_b, root_s;
  logic [IW-1:0]    root_i;
  assign root_b = g_lvl[LV-1].ob[0];
  assign root_s = g_lvl[LV-1].os[0];
  assign root_i = g_lvl[LV-1].oi[0];

  assign best_idx     = HMM_AW'(root_i);
  assign best_score   = root_b;
  assign second_score = root_s;
  assign margin       = root_s - root_b;
  assign too_close    = (margin < threshold);
endmodule
