// vedic_mult: N x N-bit unsigned Vedic (Urdhva Tiryagbhyam) multiplier,
// p = a * b with a 2N-bit product. Purely combinational, no clock.
// The design's generalized N x N algorithm splits each operand into halves
// A_M/A_L and B_M/B_L, multiplies the four half-width pairs (vertically and
// crosswise) and adds the four products with three N-bit ripple carry adders;
// each half-width product is built the same way, down to the 2x2 cell.
// This module unrolls that recursion level by level instead of instantiating
// itself. Operands are cut into 2^k-bit blocks; level k holds the product of
// every pair (a block i, b block j) of width W = 2^k:
//   level 1     : (N/2)^2 vedic_2x2 cells on 2-bit blocks
//   level k > 1 : prod_k(i,j) = combine(prod_(k-1)(2i,2j),   prod_(k-1)(2i,2j+1),
//                                       prod_(k-1)(2i+1,2j), prod_(k-1)(2i+1,2j+1))
// with vedic_combine #(W), so level k is exactly the set of W x W multipliers
// of the recursive description; the last level (W = N) is the product.
// All products of one level sit in one flat vector, product (i,j) at
// bits [(i*M + j)*2W +: 2W] with M = N/W blocks per operand.
// The default N = 32 is the 32x32 module from which the 64x64 multiplier is
// built. N must be a power of two, at least 2. The carry out of every
// combine stage is always 0 for a true product; an assertion checks it.
module vedic_mult #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned LEVELS = $clog2(N);

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("vedic_mult: N must be a power of two of at least 2");
  end

  for (genvar lv = 1; lv <= LEVELS; lv++) begin : g_lvl
    localparam int unsigned W = 1 << lv;  // operand block width
    localparam int unsigned M = N / W;    // blocks per operand
    localparam int unsigned P = 2 * W;    // product width

    logic [M*M*P-1:0] prods;

    if (lv == 1) begin : g_cells
      for (genvar i = 0; i < M; i++) begin : g_i
        for (genvar j = 0; j < M; j++) begin : g_j
          vedic_2x2 u_cell (
            .a(a[2*i +: 2]),
            .b(b[2*j +: 2]),
            .s(prods[(i*M + j)*P +: P])
          );
        end
      end
    end else begin : g_combines
      localparam int unsigned MS = 2 * M;  // blocks per operand one level down
      logic [M*M-1:0] couts;

      for (genvar i = 0; i < M; i++) begin : g_i
        for (genvar j = 0; j < M; j++) begin : g_j
          vedic_combine #(.N(W)) u_combine (
            .ll  (g_lvl[lv-1].prods[((2*i)  *MS + 2*j)  *W +: W]),
            .lh  (g_lvl[lv-1].prods[((2*i)  *MS + 2*j+1)*W +: W]),
            .hl  (g_lvl[lv-1].prods[((2*i+1)*MS + 2*j)  *W +: W]),
            .hh  (g_lvl[lv-1].prods[((2*i+1)*MS + 2*j+1)*W +: W]),
            .p   (prods[(i*M + j)*P +: P]),
            .cout(couts[i*M + j])
          );
        end
      end

      // a true W x W product fits in 2W bits: no combine stage carries out
      always_comb begin
        assert (couts == '0)
          else $error("vedic_mult: a %0d-bit combine stage carried out", W);
      end
    end
  end

  assign p = g_lvl[LEVELS].prods;
endmodule
