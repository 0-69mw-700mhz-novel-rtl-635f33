// cla4: 4-bit carry-lookahead adder, the building block of the final adder.
//
// Each bit forms generate G_i = a_i & b_i and propagate P_i = a_i ^ b_i.
// All four internal carries and the carry out are then computed in parallel
// from G, P and cin with the expanded lookahead equations
//   c_{i+1} = G_i | P_i G_{i-1} | ... | P_i ... P_0 cin,
// and sum_i = P_i ^ c_i. Purely combinational.
// Generate/propagate based lookahead is the published choice; the equations
// written out here are the standard ones, with P_i taken as a XOR b.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout
);

  logic [3:0] g, p;
  logic [4:0] c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & cin);
    sum  = p ^ c[3:0];
    cout = c[4];
  end

endmodule
