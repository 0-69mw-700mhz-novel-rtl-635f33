// pairwise_mult8: unsigned 8x8 -> 16-bit multiplier using the pair-wise
// (even/odd) partial-product algorithm.
//
// Both operands are split into the bits at even and odd positions (counting
// from 1), x = x_e + x_o and y = y_e + y_o, so that
//   x * y = x_e y_e + x_e y_o + x_o y_e + x_o y_o = Pee + Peo + Poe + Poo.
// Inside each group the AND terms of one weight lie two positions apart, so a
// single HA/FA per column produces a 16-bit partial product directly, its
// carries filling the zero bits in between (1st adder level). The one column
// per group that holds four terms leaves its fourth term out; these four
// spare bits form two sparse numbers,
//   M = x7y1 * 2^6 + x2y7 * 2^7 + x2y8 * 2^8,   N = x7y2 * 2^7.
// Six numbers are then reduced by three-to-two rows:
//   2nd level : Pee + Peo + Poe -> A + B,   Poo + M + N -> C + D
//   3rd level : A + B + C -> E + F          (D waits one level)
//   4th level : E + F + D -> G + H
// and a 16-bit adder of four ripple-connected 4-bit carry-lookahead blocks
// adds G + H into the product.
//
// Interface: x, y in; p = x * y out. The path is purely combinational: the
// multiplier has no clock, and a new operand pair may be applied once the
// previous result has settled. The top carry of every row and of the final
// adder is always zero because x * y < 2^16; an assertion checks this.
//
// The structure follows the published pair-wise design. Own choices: the
// operands are unsigned; N holds x7y2 at its true weight 2^7; the delay
// levels that balance arrival times in the circuit are plain wires here.
module pairwise_mult8
  import mult_pkg::*;
(
  input  logic [OP_W-1:0]   x,
  input  logic [OP_W-1:0]   y,
  output logic [PROD_W-1:0] p
);

  pp_groups_t        pp;
  logic [PROD_W-1:0] p_ee, p_eo, p_oe, p_oo;
  logic [3:0]        spare;            // {x2y8, x2y7, x7y2, x7y1}
  logic [PROD_W-1:0] m_num, n_num;     // the spare-bit numbers M and N
  logic [PROD_W-1:0] a_num, b_num, c_num, d_num;
  logic [PROD_W-1:0] e_num, f_num, g_num, h_num;
  logic [4:0]        top_carry;        // carries out of the top column

  and_generator u_and (
    .x (x),
    .y (y),
    .pp(pp)
  );

  adder_level1 u_lvl1 (
    .pp   (pp),
    .p_ee (p_ee),
    .p_eo (p_eo),
    .p_oe (p_oe),
    .p_oo (p_oo),
    .spare(spare)
  );

  // Spare bits placed at their weights.
  always_comb begin
    m_num    = '0;
    n_num    = '0;
    m_num[6] = spare[0];   // x7y1
    m_num[7] = spare[2];   // x2y7
    m_num[8] = spare[3];   // x2y8
    n_num[7] = spare[1];   // x7y2
  end

  // 2nd adder level
  csa_row #(.WIDTH(PROD_W)) u_lvl2_ab (
    .a(p_ee), .b(p_eo), .c(p_oe), .s(a_num), .cy(b_num), .cout(top_carry[0])
  );
  csa_row #(.WIDTH(PROD_W)) u_lvl2_cd (
    .a(p_oo), .b(m_num), .c(n_num), .s(c_num), .cy(d_num), .cout(top_carry[1])
  );

  // 3rd adder level
  csa_row #(.WIDTH(PROD_W)) u_lvl3 (
    .a(a_num), .b(b_num), .c(c_num), .s(e_num), .cy(f_num), .cout(top_carry[2])
  );

  // 4th adder level
  csa_row #(.WIDTH(PROD_W)) u_lvl4 (
    .a(e_num), .b(f_num), .c(d_num), .s(g_num), .cy(h_num), .cout(top_carry[3])
  );

  // Final carry-lookahead adder
  cla16 u_cla (
    .a   (g_num),
    .b   (h_num),
    .sum (p),
    .cout(top_carry[4])
  );

  // No row may carry past bit 15: every intermediate sum is at most x * y.
  always_comb begin
    assert (top_carry == '0)
      else $error("pairwise_mult8: carry out of the top column, x=%0d y=%0d", x, y);
  end

endmodule
