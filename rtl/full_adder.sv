// full_adder: one-bit full adder, the cell that the ripple carry adders chain.
// sum = a xor b xor cin; cout is the majority of a, b and cin.
// Purely combinational. The gate equations are the standard ones; the design
// only asks for a ripple carry adder and leaves its cell open.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
