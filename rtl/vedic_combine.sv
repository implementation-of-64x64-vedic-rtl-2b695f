// vedic_combine: the adding stage of one level of the Vedic multiplier.
// The operands A = {A_M, A_L} and B = {B_M, B_L} are split into halves of
// H = N/2 bits, and their four H x H products (each N bits wide) arrive here:
//   ll = A_L*B_L, lh = A_L*B_M, hl = A_M*B_L, hh = A_M*B_M.
// The product is hh*2^N + (hl + lh)*2^H + ll, formed with three N-bit ripple
// carry adders:
//   adder 1: cross_sum = hl + lh                               (carry c1)
//   adder 2: mid       = cross_sum + (ll >> H)                  (carry c2)
//   adder 3: upper     = hh + ((mid >> H) | ((c1 + c2) << H))   (carry cout)
// p[H-1:0] comes straight from ll, p[N-1:H] from mid, p[2N-1:N] from adder 3.
// c1 and c2 have the same weight 2^(N+H); a half adder merges them so the sum
// is exact for any inputs (for true partial products they are never both 1,
// because hl + lh + (ll >> H) is then below 2^(N+1)). For the same reason cout
// is always 0 for true partial products; it is brought out, as the 64x64 top
// does, as the last adder's carry.
// Interface: four N-bit partial products in; 2N-bit p and cout out. The low
// H bits of p are wired straight from ll.
// The split into halves, the three ripple carry adders and the N-bit width of
// each adder follow the design; the order in which the three additions are
// chained and the half adder that merges c1 and c2 are this design's choice.
// Purely combinational. N must be a power of two, at least 4.
module vedic_combine #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   ll,
  input  logic [N-1:0]   lh,
  input  logic [N-1:0]   hl,
  input  logic [N-1:0]   hh,
  output logic [2*N-1:0] p,
  output logic           cout
);
  localparam int unsigned H = N / 2;

  if (N < 4 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("vedic_combine: N must be a power of two of at least 4");
  end

  logic [N-1:0] cross_sum, mid, ll_hi, op3, upper;
  logic         c1, c2, c_sum, c_car;

  // adder 1: the two crosswise products
  ripple_carry_adder #(.W(N)) u_rca_cross (
    .a   (hl),
    .b   (lh),
    .cin (1'b0),
    .sum (cross_sum),
    .cout(c1)
  );

  // adder 2: add the upper half of the vertical low product
  assign ll_hi = {{H{1'b0}}, ll[N-1:H]};

  ripple_carry_adder #(.W(N)) u_rca_mid (
    .a   (cross_sum),
    .b   (ll_hi),
    .cin (1'b0),
    .sum (mid),
    .cout(c2)
  );

  // merge the two carries of weight 2^(N+H)
  half_adder u_ha_carry (
    .a    (c1),
    .b    (c2),
    .sum  (c_sum),
    .carry(c_car)
  );

  // adder 3: the vertical high product plus everything carried up
  always_comb begin
    op3          = '0;
    op3[H-1:0]   = mid[N-1:H];
    op3[H]       = c_sum;
    op3[H+1]     = c_car;
  end

  ripple_carry_adder #(.W(N)) u_rca_upper (
    .a   (hh),
    .b   (op3),
    .cin (1'b0),
    .sum (upper),
    .cout(cout)
  );

  assign p = {upper, mid[H-1:0], ll[H-1:0]};
endmodule
