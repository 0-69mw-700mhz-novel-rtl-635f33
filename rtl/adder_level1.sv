// adder_level1: the 1st adder level of the pair-wise multiplier.
//
// Four pp_group_adder instances turn the AND terms of the groups ee, eo, oe
// and oo into the 16-bit partial products Pee, Peo, Poe and Poo, such that
// x * y = Pee + Peo + Poe + Poo + (the four spare bits at their weights).
// The spare bits and their weights are
//   spare[3] = x2y8 (2^8), spare[2] = x2y7 (2^7),
//   spare[1] = x7y2 (2^7), spare[0] = x7y1 (2^6).
// Purely combinational. Output bits in the empty columns of each group that
// receive no carry (e.g. bits 0, 1, 3 and 15 of Pee) are constant zero; they
// are kept so that every partial product is a plain 16-bit word.
module adder_level1
  import mult_pkg::*;
(
  input  pp_groups_t        pp,
  output logic [PROD_W-1:0] p_ee,
  output logic [PROD_W-1:0] p_eo,
  output logic [PROD_W-1:0] p_oe,
  output logic [PROD_W-1:0] p_oo,
  output logic [3:0]        spare   // {ee, eo, oe, oo}
);

  pp_group_adder #(.X_ODD(1'b0), .Y_ODD(1'b0)) u_ee (.m(pp.ee), .p(p_ee), .spare(spare[3]));
  pp_group_adder #(.X_ODD(1'b0), .Y_ODD(1'b1)) u_eo (.m(pp.eo), .p(p_eo), .spare(spare[2]));
  pp_group_adder #(.X_ODD(1'b1), .Y_ODD(1'b0)) u_oe (.m(pp.oe), .p(p_oe), .spare(spare[1]));
  pp_group_adder #(.X_ODD(1'b1), .Y_ODD(1'b1)) u_oo (.m(pp.oo), .p(p_oo), .spare(spare[0]));

endmodule
