// and_generator: the 64 AND gates that form the partial-product bits.
//
// The operands are split into even and odd halves (see mult_pkg) and the four
// pair-wise groups ee, eo, oe, oo each get a 4x4 array of AND gates, so that
// pp.ee[a][b] = x[2a+1] & y[2b+1], pp.oo[a][b] = x[2a] & y[2b], and so on.
// The term pp.<g>[a][b] has weight 2^(2a + 2b + offset_x + offset_y).
// Purely combinational: one gate delay from x, y to pp.
// The grouping into four 4x4 arrays follows the published structure; the
// matrix layout of the output is this implementation's own.
module and_generator
  import mult_pkg::*;
(
  input  logic [OP_W-1:0] x,    // multiplicand, x[0] = x1
  input  logic [OP_W-1:0] y,    // multiplier,   y[0] = y1
  output pp_groups_t      pp
);

  logic [HALF_W-1:0] x_e, x_o, y_e, y_o;

  always_comb begin
    for (int k = 0; k < HALF_W; k++) begin
      x_e[k] = x[2*k + 1];
      x_o[k] = x[2*k];
      y_e[k] = y[2*k + 1];
      y_o[k] = y[2*k];
    end
    for (int a = 0; a < HALF_W; a++) begin
      for (int b = 0; b < HALF_W; b++) begin
        pp.ee[a][b] = x_e[a] & y_e[b];
        pp.eo[a][b] = x_e[a] & y_o[b];
        pp.oe[a][b] = x_o[a] & y_e[b];
        pp.oo[a][b] = x_o[a] & y_o[b];
      end
    end
  end

endmodule
