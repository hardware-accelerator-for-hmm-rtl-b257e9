// min_cmp: comparator that passes on the smaller of two unsigned operands.
//
// It forms B - A on W+1 bits (B plus the two's complement of A) and looks at
// the sign of the result: negative means B < A and B is chosen, otherwise A
// (so ties go to A). Scores in this design are costs (absolute log
// probabilities), so "best" is the minimum. Combinational.
module min_cmp #(
  parameter int unsigned W = 48
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,      // min(a, b)
  output logic         b_lt_a  // 1 when b was chosen
);
  logic [W:0] diff;

  assign diff   = {1'b0, b} + {1'b1, ~a} + {{W{1'b0}}, 1'b1};
  assign b_lt_a = diff[W];
  assign y      = b_lt_a ? b : a;
endmodule
