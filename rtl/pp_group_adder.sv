// pp_group_adder: column adder that turns one group of 16 AND terms into a
// single 16-bit partial product plus one spare bit (part of the 1st adder
// level).
//
// In a group, the terms m[a][b] with a + b = s all share the weight
// 2^(2s + OFF), OFF = offset_x + offset_y (0, 1 or 2). Columns therefore sit
// two bit positions apart, and the bit between two columns is always zero.
// Each column is added by one cell whose sum goes to bit 2s + OFF and whose
// carry goes to the empty bit 2s + OFF + 1:
//   s = 0, 6 : one term, passed through (no cell)
//   s = 1, 5 : two terms, half adder
//   s = 2, 4 : three terms, full adder
//   s = 3    : four terms; three go to a full adder and the fourth is brought
//              out on `spare`, to be added later through the M / N numbers.
// The spare term is the one with the lowest x index for the even x half
// (x2y8, x2y7) and the highest for the odd x half (x7y2, x7y1).
// Purely combinational; at most one adder cell between pp and p.
module pp_group_adder
  import mult_pkg::*;
#(
  parameter bit X_ODD = 1'b0,   // 1: x half is x_o, 0: x_e
  parameter bit Y_ODD = 1'b0    // 1: y half is y_o, 0: y_e
) (
  input  pp_matrix_t        m,      // m[a][b], see mult_pkg
  output logic [PROD_W-1:0] p,      // partial product
  output logic              spare   // fourth term of the 4-term column
);

  localparam int unsigned OFF    = half_offset(X_ODD) + half_offset(Y_ODD);
  localparam int unsigned NCOL   = 2 * HALF_W - 1;   // s = 0 .. 6
  localparam int unsigned SPARE_A = X_ODD ? HALF_W - 1 : 0;
  localparam int unsigned FA_A0   = X_ODD ? 0 : 1;  // first a of the full adder

  logic [NCOL-1:0] col_sum;
  logic [NCOL-1:0] col_cy;
  logic            spare_term;

  for (genvar s = 0; s < NCOL; s++) begin : g_col
    localparam int LO = (s > HALF_W - 1) ? s - (HALF_W - 1) : 0;
    localparam int HI = (s < HALF_W - 1) ? s : HALF_W - 1;
    localparam int N  = HI - LO + 1;

    if (N == 1) begin : g_pass
      assign col_sum[s] = m[LO][s-LO];
      assign col_cy[s]  = 1'b0;
    end else if (N == 2) begin : g_ha
      half_adder u_ha (
        .a   (m[LO][s-LO]),
        .b   (m[HI][s-HI]),
        .sum (col_sum[s]),
        .cout(col_cy[s])
      );
    end else if (N == 3) begin : g_fa
      full_adder u_fa (
        .a   (m[LO][s-LO]),
        .b   (m[LO+1][s-LO-1]),
        .cin (m[LO+2][s-LO-2]),
        .sum (col_sum[s]),
        .cout(col_cy[s])
      );
    end else begin : g_fa_spare
      full_adder u_fa (
        .a   (m[FA_A0][s-FA_A0]),
        .b   (m[FA_A0+1][s-FA_A0-1]),
        .cin (m[FA_A0+2][s-FA_A0-2]),
        .sum (col_sum[s]),
        .cout(col_cy[s])
      );
      assign spare_term = m[SPARE_A][s-SPARE_A];
    end
  end

  always_comb begin
    p = '0;
    for (int s = 0; s < NCOL; s++) begin
      p[2*s + OFF]     = col_sum[s];
      p[2*s + OFF + 1] = col_cy[s];
    end
    spare = spare_term;
  end

endmodule
