// csa_row: one three-to-two adder row (2nd, 3rd and 4th adder levels).
//
// Three WIDTH-bit numbers are reduced to two, a sum word s and a carry word
// cy, with one full adder per bit position, so that a + b + c = s + cy
// (+ cout * 2^WIDTH). The carry word is already shifted: cy[0] = 0 and
// cy[i+1] is the carry of column i. The carry of the top column leaves on
// cout. Columns in which one input is constantly zero reduce to half adders
// once synthesised (the published rows use half adders there).
// Purely combinational, one full-adder delay.
module csa_row #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] cy,
  output logic             cout
);

  logic [WIDTH-1:0] col_cy;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (s[i]),
      .cout(col_cy[i])
    );
  end

  always_comb begin
    cy   = {col_cy[WIDTH-2:0], 1'b0};
    cout = col_cy[WIDTH-1];
  end

endmodule
