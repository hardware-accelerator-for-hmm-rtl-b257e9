// approx_adder16: 16-bit carry-predicting approximate adder.
//
// The operands are split into six blocks, from the least significant end:
// four 2-bit blocks (bits 1:0, 3:2, 5:4, 7:6) and two 4-bit blocks (11:8,
// 15:12). Each block has a carry generator that computes its carry-out with
// no carry-in, and its own adder (two full adders for a 2-bit block, a 4-bit
// CLA for a 4-bit block). No carry ripples between blocks. The carry into
// block k+1 is predicted from the two blocks below it:
//   cin[k+1] = P[k] ? cout[k-1] : cout[k]
// i.e. a carry out of block k-1 is passed on when block k propagates all its
// bits. The two lowest adders take carry-in 0. The result is exact unless a
// carry would have to cross two whole propagating blocks. Carry-out is the
// top block's own carry-out. Combinational.
//
// Block layout, prediction rule and carry-out follow the published adder
// design; nothing here is this design's own choice.
module approx_adder16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] sum,
  output logic        cout
);
  localparam int unsigned NB = 6;
  localparam int unsigned LO [NB] = '{0, 2, 4, 6, 8, 12};
  localparam int unsigned BW [NB] = '{2, 2, 2, 2, 4, 4};

  logic [NB-1:0] blk_cout, blk_p, blk_cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    localparam int unsigned L = LO[k];
    localparam int unsigned W = BW[k];

    carry_gen #(.W(W)) u_cg (
      .a    (a[L +: W]),
      .b    (b[L +: W]),
      .cout (blk_cout[k]),
      .pblk (blk_p[k])
    );

    if (k < 2) begin : g_cin0
      assign blk_cin[k] = 1'b0;
    end else begin : g_cinp
      assign blk_cin[k] = blk_p[k-1] ? blk_cout[k-2] : blk_cout[k-1];
    end

    if (W == 2) begin : g_fa
      logic c_mid;
      logic unused_c;
      full_adder u_fa0 (.a(a[L]),   .b(b[L]),   .cin(blk_cin[k]), .sum(sum[L]),   .cout(c_mid));
      full_adder u_fa1 (.a(a[L+1]), .b(b[L+1]), .cin(c_mid),      .sum(sum[L+1]), .cout(unused_c));
    end else begin : g_cla
      logic unused_c;
      cla4 u_cla (.a(a[L +: 4]), .b(b[L +: 4]), .cin(blk_cin[k]), .sum(sum[L +: 4]), .cout(unused_c));
    end
  end

  assign cout = blk_cout[NB-1];
endmodule
