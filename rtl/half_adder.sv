// half_adder: one-bit half adder, the adding cell of the 2x2 Vedic multiplier.
// sum = a xor b, carry = a and b. Purely combinational, no clock.
// The 2x2 multiplier uses two of these; the gate equations are the standard
// half-adder ones.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
