// carry_gen: block carry generator of the carry-predicting approximate adders.
//
// For one block of W operand bits it forms the per-bit generate g = a AND b and
// propagate p = a XOR b, the block carry-out assuming no carry into the block
//   cout = g[W-1] | g[W-2]&p[W-1] | ... | g[0]&p[1]&...&p[W-1]
// and the block propagate P = p[0]&...&p[W-1]. The approximate adder uses
// cout of two neighbouring blocks and P to predict the carry into the block
// above. Purely combinational. The carry equation is the source design's; reading
// the generate operator as AND is this design's reading of the standard
// definition.
module carry_gen #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         cout,   // carry out of the block with carry-in 0
  output logic         pblk    // all bits of the block propagate
);
  logic [W-1:0] g, p;

  always_comb begin
    g    = a & b;
    p    = a ^ b;
    cout = 1'b0;
    // Unrolled form of the sum of products: scanning from bit 0 upwards,
    // a generate survives if every higher bit of the block propagates.
    for (int unsigned i = 0; i < W; i++) begin
      cout = g[i] | (p[i] & cout);
    end
    pblk = &p;
  end
endmodule
