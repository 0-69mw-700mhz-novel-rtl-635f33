// half_adder: one-bit half adder, used where a column holds only two bits.
//
// sum = a ^ b, cout = a & b. Purely combinational. The circuit of the cell is
// not specified beyond its function, so the textbook form is used.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b;
    cout = a & b;
  end

endmodule
