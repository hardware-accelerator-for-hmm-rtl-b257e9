// delta_unit: log-Viterbi cell for one HMM state j.
//
// Holds delta_t(j) in a register and updates it once per frame (en):
//   t = 0 : delta <= logb                       (omega' already holds log pi)
//   t > 0 : delta <= min(delta_{t-1}(j-1) + a_(j-1)j,
//                        delta_{t-1}(j)   + a_jj) + logb
// Each "delta + a" keeps the upper 24 bits of delta and adds only the lower
// 24 bits (carry dropped); that 24-bit addition is exact in Technique-1 mode
// and uses approx_adder24 in Technique-2 mode. The final "+ logb" is a full
// 48-bit addition. The comparator passes on the smaller cost. State 0 of a
// left-to-right HMM has no predecessor (HAS_PRED = 0) and only follows its
// self loop.
//
// Timing: combinational from logb/delta_prev to the register; delta is the
// value after the last en. Reset clears it.
//
// The structure follows the source design (initialization merged into logb,
// truncated additions, approximate adder). Costs and min instead of
// probabilities and max follow its use of absolute log values. How the first
// state handles the missing predecessor is this design's choice.
module delta_unit
  import hmm_pkg::*;
#(
  parameter bit HAS_PRED = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  mode_e              mode,
  input  logic               en,          // update delta this cycle
  input  logic               init,        // t = 0
  input  logic [SCORE_W-1:0] logb,        // logb_j(o_t)
  input  logic [SCORE_W-1:0] a_self,      // a_jj
  input  logic [SCORE_W-1:0] a_pred,      // a_(j-1)j
  input  logic [SCORE_W-1:0] delta_pred,  // delta_{t-1}(j-1) from the neighbour
  output logic [SCORE_W-1:0] delta
);
  localparam int unsigned HI_W = SCORE_W - LOW_W;

  logic [SCORE_W-1:0] self_sum, pred_sum, best, rec;
  logic [LOW_W-1:0]   self_lo_x, self_lo_a, pred_lo_x, pred_lo_a;
  logic               unused_c0, unused_c1, unused_sel;

  // delta_{t-1}(j) + a_jj, lower half only
  assign self_lo_x = delta[LOW_W-1:0] + a_self[LOW_W-1:0];
  approx_adder24 u_add_self (
    .a(delta[LOW_W-1:0]), .b(a_self[LOW_W-1:0]), .sum(self_lo_a), .cout(unused_c0)
  );
  assign self_sum = {delta[SCORE_W-1 -: HI_W], (mode == MODE_T2) ? self_lo_a : self_lo_x};

  if (HAS_PRED) begin : g_pred
    // delta_{t-1}(j-1) + a_(j-1)j, lower half only
    assign pred_lo_x = delta_pred[LOW_W-1:0] + a_pred[LOW_W-1:0];
    approx_adder24 u_add_pred (
      .a(delta_pred[LOW_W-1:0]), .b(a_pred[LOW_W-1:0]), .sum(pred_lo_a), .cout(unused_c1)
    );
    assign pred_sum = {delta_pred[SCORE_W-1 -: HI_W], (mode == MODE_T2) ? pred_lo_a : pred_lo_x};

    min_cmp #(.W(SCORE_W)) u_cmp (.a(pred_sum), .b(self_sum), .y(best), .b_lt_a(unused_sel));
  end else begin : g_nopred
    logic unused_in;
    assign unused_in  = ^{a_pred, delta_pred};
    assign pred_lo_x  = '0;
    assign pred_lo_a  = '0;
    assign pred_sum   = '0;
    assign unused_c1  = 1'b0;
    assign unused_sel = 1'b0;
    assign best       = self_sum;
  end

  assign rec = best + logb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      delta <= '0;
    end else if (en) begin
      delta <= init ? logb : rec;
    end
  end
endmodule
