// full_adder: one-bit full adder, the 3:2 counter of every adder level.
//
// The reference cell is a 10-transistor XOR / pass-transistor full adder with
// pins A, B, Cin, Sum and Cout. Only its logic function is modelled here:
// sum = a ^ b ^ cin and cout = majority(a, b, cin). The cell's transistor
// structure, sizing and delay are not represented. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic axb;   // shared XOR of the two operand bits

  always_comb begin
    axb  = a ^ b;
    sum  = axb ^ cin;
    cout = axb ? cin : a;   // pass-transistor style carry select
  end

endmodule
