// cla16: final 16-bit adder of the multiplier, G + H -> P.
//
// Four cla4 blocks each add four bits; the carry out of one block is the
// carry in of the next (lookahead inside a block, ripple between blocks).
// The carry in of the lowest block is 0. cout is the 17th bit; for the sum
// of the two words produced from an 8x8 product it is always 0.
// Purely combinational: four block delays in the worst case.
// The four blocks and the block-to-block carry follow the published adder.
module cla16
  import mult_pkg::*;
(
  input  logic [PROD_W-1:0] a,
  input  logic [PROD_W-1:0] b,
  output logic [PROD_W-1:0] sum,
  output logic              cout
);

  localparam int unsigned NBLK = PROD_W / 4;

  logic [NBLK:0] c;

  assign c[0] = 1'b0;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    cla4 u_cla (
      .a   (a[4*k +: 4]),
      .b   (b[4*k +: 4]),
      .cin (c[k]),
      .sum (sum[4*k +: 4]),
      .cout(c[k+1])
    );
  end

  assign cout = c[NBLK];

endmodule
