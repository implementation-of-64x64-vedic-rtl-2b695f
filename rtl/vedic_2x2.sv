// vedic_2x2: 2x2-bit unsigned multiplier by the Urdhva Tiryagbhyam
// ("vertically and crosswise") rule, the leaf cell of the whole multiplier.
//   vertical  : s[0] = a0 & b0
//   crosswise : a0&b1 + a1&b0 in a half adder -> s[1] and carry c1
//   vertical  : a1&b1 + c1 in a second half adder -> s[2] and carry s[3]
// Four AND gates and two half adders, as the design prescribes; purely
// combinational (two half-adder delays after the AND gates).
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] s
);
  logic p00, p01, p10, p11;  // bit products a_i & b_j
  logic c1;

  assign p00 = a[0] & b[0];
  assign p01 = a[0] & b[1];
  assign p10 = a[1] & b[0];
  assign p11 = a[1] & b[1];

  assign s[0] = p00;

  half_adder u_ha_cross (
    .a    (p01),
    .b    (p10),
    .sum  (s[1]),
    .carry(c1)
  );

  half_adder u_ha_top (
    .a    (p11),
    .b    (c1),
    .sum  (s[2]),
    .carry(s[3])
  );
endmodule
