// vedic_mult_64x64: 64x64-bit unsigned Vedic multiplier, the top of the design.
// s = a * b as a 128-bit product, plus cout, the carry out of the last ripple
// carry adder (257 ports in all: 64 + 64 + 128 + 1).
// The operands are split at bit 32. Four 32x32 Vedic multipliers form
//   a[31:0]*b[31:0], a[31:0]*b[63:32], a[63:32]*b[31:0], a[63:32]*b[63:32]
// and one combine stage adds them with three 64-bit ripple carry adders:
// s[31:0] is the low half of a[31:0]*b[31:0], s[63:32] comes from the second
// adder and s[127:64] with cout from the third. cout is 0 for every input,
// since the product always fits in 128 bits.
// The structure (four 32x32 blocks, three 64-bit ripple carry adders, the cout
// output) follows the design. There is no clock and no register: the product
// settles one combinational delay after the operands change.
module vedic_mult_64x64 (
  input  logic [63:0]  a,
  input  logic [63:0]  b,
  output logic [127:0] s,
  output logic         cout
);
  logic [63:0] ll, lh, hl, hh;

  vedic_mult #(.N(32)) u_mul_ll (.a(a[31:0]),  .b(b[31:0]),  .p(ll));
  vedic_mult #(.N(32)) u_mul_lh (.a(a[31:0]),  .b(b[63:32]), .p(lh));
  vedic_mult #(.N(32)) u_mul_hl (.a(a[63:32]), .b(b[31:0]),  .p(hl));
  vedic_mult #(.N(32)) u_mul_hh (.a(a[63:32]), .b(b[63:32]), .p(hh));

  vedic_combine #(.N(64)) u_combine (
    .ll  (ll),
    .lh  (lh),
    .hl  (hl),
    .hh  (hh),
    .p   (s),
    .cout(cout)
  );
endmodule
