// viterbi_term: Viterbi termination for one HMM.
//
// Passes the state costs delta_T(0..N-1) through a chain of comparators
// (state 0 against state 1, the winner against state 2, ...) and outputs the
// smallest, the HMM's likelihood cost P(O|lambda). Combinational.
// The cascade and the 48-bit width follow the source design; selecting the
// minimum follows its use of absolute log values.
module viterbi_term
  import hmm_pkg::*;
#(
  parameter int unsigned NS = N_STATE
) (
  input  logic [SCORE_W-1:0] delta [NS],
  output logic [SCORE_W-1:0] p_out
);
  logic [SCORE_W-1:0] chain [NS];
  logic [NS-1:0]      unused_sel;

  assign chain[0]      = delta[0];
  assign unused_sel[0] = 1'b0;
  for (genvar s = 1; s < NS; s++) begin : g_cmp
    min_cmp #(.W(SCORE_W)) u_cmp (.a(chain[s-1]), .b(delta[s]), .y(chain[s]), .b_lt_a(unused_sel[s]));
  end

  assign p_out = chain[NS-1];
endmodule
