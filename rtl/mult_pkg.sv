// mult_pkg: types and constants shared by the pair-wise 8x8 multiplier.
//
// The multiplier splits each 8-bit operand into its "even" and "odd" bits,
// counting positions from 1 as x = <x8 .. x1> with x1 the least significant
// bit. x_e keeps x8, x6, x4, x2 (RTL bits 7, 5, 3, 1) and x_o keeps x7, x5,
// x3, x1 (RTL bits 6, 4, 2, 0). Multiplying the halves pair-wise gives four
// groups of 16 AND terms: ee, eo, oe and oo. Within a group the terms are held
// as a 4x4 matrix m[a][b] = (bit a of the x half) & (bit b of the y half),
// where "bit a" of a half is RTL bit 2a + offset (offset 1 for even, 0 for odd).
package mult_pkg;

  localparam int unsigned OP_W   = 8;          // operand width
  localparam int unsigned PROD_W = 2 * OP_W;   // product / partial-product width
  localparam int unsigned HALF_W = OP_W / 2;   // bits in one even/odd half

  typedef logic [HALF_W-1:0][HALF_W-1:0] pp_matrix_t;

  // AND terms of the four pair-wise groups.
  typedef struct packed {
    pp_matrix_t ee;   // x_e * y_e
    pp_matrix_t eo;   // x_e * y_o
    pp_matrix_t oe;   // x_o * y_e
    pp_matrix_t oo;   // x_o * y_o
  } pp_groups_t;

  // RTL bit offset of a half: even (1-based) positions sit on odd RTL bits.
  function automatic int unsigned half_offset(bit is_odd);
    return is_odd ? 0 : 1;
  endfunction

endpackage
