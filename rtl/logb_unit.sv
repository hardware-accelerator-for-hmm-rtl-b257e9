// logb_unit: output-probability unit for one HMM state.
//
// Computes the cost  logb = omega + sum_d sigma_d * (o_d - mu_d)^2  over the
// feature dimensions, one dimension per clock, with one multiply-accumulate
// datapath (difference, square, scale by sigma, accumulate):
//   diff = o + (-mu)            16 bit; exact adder in Technique-1 mode, the
//                               carry-predicting approx_adder16 in Technique-2
//   sq   = diff * diff          32 bit (diff taken as signed)
//   term = sigma * sq           48 bit
//   acc  <= (first ? 0 : acc) + term   when acc_en
// After the last dimension the accumulator holds the sum and logb is formed
// combinationally from the register:
//   logb[47:24] = acc[47:24]
//   logb[23:0]  = acc[23:0] + omega_sel[23:0]     (carry into bit 24 dropped)
// omega_sel is omega' (omega plus log pi, used for the first frame) when
// init is high and omega otherwise, so the Viterbi initialization needs no
// adder of its own.
//
// Timing: o/mu/sigma are presented in the same cycle as acc_en; logb is valid
// from the cycle after the last acc_en until the next acc_en with first=1 is
// clocked. Reset clears the accumulator.
//
// The datapath, widths, the truncated omega addition and the approximate
// subtractor follow the source design. The source design's select "t < T" on the
// accumulator demultiplexer is realised as the first/acc_en control here.
module logb_unit
  import hmm_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  mode_e              mode,
  input  logic               acc_en,     // accumulate this dimension
  input  logic               first,      // this dimension is d = 0
  input  logic               init,       // frame t = 0: use omega'
  input  logic [FEAT_W-1:0]  o,          // scaled feature o'_td
  input  logic [FEAT_W-1:0]  mu,         // scaled mean mu'_jd
  input  logic [FEAT_W-1:0]  sigma,      // scaled |sigma'_jd|
  input  logic [SCORE_W-1:0] omega,      // omega_j
  input  logic [SCORE_W-1:0] omega0,     // omega'_j
  output logic [SCORE_W-1:0] logb
);
  logic [FEAT_W-1:0]  neg_mu, diff_exact, diff_approx, diff;
  logic [SQ_W-1:0]    sq;
  logic [SCORE_W-1:0] term, acc_q, omega_sel;
  logic               unused_cout;

  assign neg_mu     = ~mu + 1'b1;
  assign diff_exact = o + neg_mu;

  approx_adder16 u_sub (
    .a    (o),
    .b    (neg_mu),
    .sum  (diff_approx),
    .cout (unused_cout)
  );

  assign diff = (mode == MODE_T2) ? diff_approx : diff_exact;
  assign sq   = SQ_W'($signed(diff) * $signed(diff));
  assign term = SCORE_W'(sigma) * SCORE_W'(sq);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
    end else if (acc_en) begin
      acc_q <= (first ? '0 : acc_q) + term;
    end
  end

  assign omega_sel = init ? omega0 : omega;
  assign logb      = {acc_q[SCORE_W-1:LOW_W], acc_q[LOW_W-1:0] + omega_sel[LOW_W-1:0]};
endmodule
