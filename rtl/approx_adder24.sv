// approx_adder24: 24-bit carry-predicting approximate adder.
//
// Same scheme as approx_adder16 with six 4-bit blocks, each with a carry
// generator and a 4-bit CLA. The carry into block k+1 is
//   cin[k+1] = P[k] ? cout[k-1] : cout[k]
// from the carry generators of the two blocks below; blocks 0 and 1 take
// carry-in 0. Carry-out is the top block's own carry-out. Combinational.
// Used for the truncated 24-bit additions delta + a of the Viterbi recursion.
module approx_adder24 (
  input  logic [23:0] a,
  input  logic [23:0] b,
  output logic [23:0] sum,
  output logic        cout
);
  localparam int unsigned NB = 6;

  logic [NB-1:0] blk_cout, blk_p, blk_cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    logic unused_c;

    carry_gen #(.W(4)) u_cg (
      .a    (a[4*k +: 4]),
      .b    (b[4*k +: 4]),
      .cout (blk_cout[k]),
      .pblk (blk_p[k])
    );

    if (k < 2) begin : g_cin0
      assign blk_cin[k] = 1'b0;
    end else begin : g_cinp
      assign blk_cin[k] = blk_p[k-1] ? blk_cout[k-2] : blk_cout[k-1];
    end

    cla4 u_cla (.a(a[4*k +: 4]), .b(b[4*k +: 4]), .cin(blk_cin[k]), .sum(sum[4*k +: 4]), .cout(unused_c));
  end

  assign cout = blk_cout[NB-1];
endmodule
