# 64x64-bit Vedic multiplier (Urdhva Tiryagbhyam)

This is a combinational unsigned multiplier: two 64-bit operands in, a 128-bit
product out. It uses the *Urdhva Tiryagbhyam* ("vertically and crosswise")
rule of Vedic arithmetic. You split each operand into a high half and a low
half. You form the vertical products (low x low, high x high) and the two
crosswise products (low x high, high x low) side by side, then add them at
their weights.

Each half-width product is built the same way. The recursion ends at a 2x2-bit
cell made of four AND gates and two half adders. At each level, the four
partial products are summed by three ripple carry adders. The design has no
clock, no registers and no control logic: the product settles one
combinational delay after the operands change.

```
                  a[63:32] a[31:0]     b[63:32] b[31:0]
                      |       |            |       |
        +-------------+-------+------------+-------+-------------+
        |  32x32       32x32          32x32          32x32       |
        |  A_L*B_L     A_L*B_M        A_M*B_L        A_M*B_M     |
        |   (ll)        (lh)           (hl)           (hh)       |
        +----+-----------+--------------+--------------+---------+
             |           |              |              |
             |           +--- RCA 1 ----+              |
             |                  | cross, c1            |
             +--(ll >> 32)-- RCA 2                     |
             |                  | mid, c2              |
             |                  +----(mid >> 32, c1+c2)-- RCA 3 -- s[127:64], cout
             |                  |
        s[31:0] = ll[31:0]   s[63:32] = mid[31:0]
```

## Files

| file | module | what it is |
|---|---|---|
| `rtl/half_adder.sv` | `half_adder` | sum = a^b, carry = a&b |
| `rtl/full_adder.sv` | `full_adder` | the ripple-carry adder cell |
| `rtl/ripple_carry_adder.sv` | `ripple_carry_adder #(W=64)` | W full adders in a chain |
| `rtl/vedic_2x2.sv` | `vedic_2x2` | the 2x2 leaf cell |
| `rtl/vedic_combine.sv` | `vedic_combine #(N=64)` | adds four N-bit partial products into a 2N-bit product with three N-bit RCAs |
| `rtl/vedic_mult.sv` | `vedic_mult #(N=32)` | N x N multiplier: 2x2 cells plus one layer of combine stages per level |
| `rtl/vedic_mult_64x64.sv` | `vedic_mult_64x64` | **top**: four `vedic_mult #(32)` and one `vedic_combine #(64)` |

Each file in `tb/` is a self-checking testbench named `<module>_tb.sv`.

## The 2x2 cell

For `a = a1a0` and `b = b1b0`, the cell computes:

* `s0 = a0&b0`: the vertical product of the low bits.
* `a0&b1 + a1&b0` in a half adder: the crosswise products. This gives `s1` and a carry `c1`.
* `a1&b1 + c1` in a second half adder: the vertical product of the high bits. This gives `s2` and `s3`.

So the cell is four AND gates and two half adders. After the AND gates, the
delay is two half-adder delays. The structure is the same as a 2x2 array
multiplier.

## Combining four half-width products (`vedic_combine`)

This is the only non-trivial part of the design. Let `N` be the width of one
partial product, and `H = N/2` the width of the operand halves. The inputs are:

* `ll = A_L*B_L`
* `lh = A_L*B_M`
* `hl = A_M*B_L`
* `hh = A_M*B_M`

The product is:

    P = hh * 2^N  +  (hl + lh) * 2^H  +  ll

This is computed with three N-bit ripple carry adders:

1. **RCA 1** adds the two crosswise products: `cross = hl + lh`, with carry `c1`.
2. **RCA 2** adds the upper half of the low product: `mid = cross + (ll >> H)`, with carry `c2`.
3. **RCA 3** adds the rest to the high vertical product:
   `upper = hh + {c1 + c2, mid[N-1:H]}`. The two carries go in at bit `H` of the second operand. Its carry is `cout`.

The output is `P = {upper, mid[H-1:0], ll[H-1:0]}`. The lowest `H` bits of
the product come straight from `ll`; no gate touches them.

How the carries are handled:

* `c1` and `c2` have the same weight, 2^(N+H). A half adder adds them, and the two result bits go into the second operand of RCA 3. This makes the sum exact for any inputs, and the testbench checks that.
* For real partial products, both carries can never be 1 together. The reason is that `hl + lh + (ll >> H)` is at most 2^(N+1) - 3*2^H + 1.
* `cout` is always 0 for real partial products, because an N x N-bit product fits in 2N bits. The top still brings `cout` out as a port.
* Inside `vedic_mult`, an immediate assertion checks that no combine stage ever sets `cout`.

## N x N multiplier (`vedic_mult`)

The algorithm is recursive: an N x N multiplier is four N/2 x N/2
multipliers plus one combine stage. The module builds the same hardware with
generate loops, one level at a time, rather than having a module instantiate
itself.

At level `k`, the operands are cut into blocks of `W = 2^k` bits, and
`M = N/W` is the number of blocks per operand. The level computes the product
of every pair (block `i` of `a`, block `j` of `b`):

* **Level 1** is `(N/2)^2` 2x2 cells.
* **Level k > 1** has one `vedic_combine #(W)` per pair `(i, j)`. It is fed by the level-`k-1` products `(2i,2j)`, `(2i,2j+1)`, `(2i+1,2j)` and `(2i+1,2j+1)`, which are `ll`, `lh`, `hl` and `hh`.

All products of one level are kept in one flat vector, `g_lvl[k].prods`.
Product `(i, j)` sits at bits `[(i*M + j)*2W +: 2W]`. The last level has a
single entry, which is `p`.

For N = 32, the module holds 256 2x2 cells and 64 + 16 + 4 + 1 combine stages,
at widths 4, 8, 16 and 32.

`N` must be a power of two, at least 2; elaboration stops otherwise.

## Top level (`vedic_mult_64x64`)

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | 64 | multiplicand |
| `b` | in | 64 | multiplier |
| `s` | out | 128 | product `a*b` |
| `cout` | out | 1 | carry out of the last 64-bit RCA, always 0 |

That is 257 signals. The operands are split at bit 32. Four 32x32 `vedic_mult`
instances feed one `vedic_combine #(64)`, which holds three 64-bit ripple
carry adders.

Operands are unsigned. There is no parameter; the sizes below the top can be
changed through `vedic_mult #(N)`.

## Timing and size

The delay is the sum of the combine stages' ripple carry chains along the
critical path, plus the 2x2 cells. The design trades speed for regularity: it
has no carry-save or carry-lookahead reduction.

After coarse synthesis with yosys, the top is about 37,500 single-bit gates
(AND/OR/XOR), with no flip-flops or latches.

No FPGA area or timing figures are claimed for this RTL.

## Design choices

These points are fixed by the design:

* The split into halves and the four vertical/crosswise products.
* Three ripple carry adders per level, each as wide as one partial product.
* The 2x2 cell with four AND gates and two half adders.
* Building the 64x64 multiplier from four 32x32 multipliers.
* The 128-bit product plus `cout` as the top's outputs.

These are this implementation's own choices:

* **Order of the additions.** The crosswise sum comes first, then the upper half of the low product, then the high product.
* **Carry merging.** A half adder merges the two inner carries. The document does not say how those carries travel.
* **Equal halves.** The operands split into equal halves. One formulation of the general algorithm mentions parts of N/2+1 and N/2-1 bits, but the 64x64 structure uses bits 0-31 and 32-63, and that is followed.
* **Product width.** The product is 128 bits with a separate `cout`. One statement of the output width gives only 64 bits (`S63..S0`), which cannot hold a 64x64 product.
* **Full adder cell.** The ripple carry adders use the textbook full adder (XOR sum, majority carry), and each has a carry input that is tied to 0 here.
* **Generate loops.** The recursion is unrolled with generate loops, as described above.

## Verification

Each testbench drives its block once per cycle of a local clock, compares the
outputs with plain SystemVerilog arithmetic, has a watchdog, and ends with
`TB_RESULT checks=<n> failures=<n>`.

* `half_adder_tb`, `full_adder_tb`, `vedic_2x2_tb`: exhaustive.
* `ripple_carry_adder_tb`: at 64 bits, corner cases (a carry through all 64 bits, all ones, zero) plus 2,000 random vectors. At 4 bits, exhaustive.
* `vedic_combine_tb`: arbitrary 64-bit partial products, so that both inner carries and `cout` occur, checked against the 129-bit sum. Then 1,000 sets of real 32x32 partial products, for which `cout` must be 0. It counts each carry event and fails if one never happens.
* `vedic_mult_tb`: N = 2, 4 and 8 exhaustive; N = 32 with corner cases plus 5,000 random pairs.
* `vedic_mult_64x64_tb`: runs the top at full size.
  * Inputs: corner operands, then 20,000 random pairs, some with one half forced to all ones, plus 101 directed pairs that make the middle adder carry out. Those pairs have all-ones low halves and high halves that sum to 2^32 + 1; random operands almost never cause that carry.
  * Checks: `s == a*b` and `cout == 0`.
  * It also counts carries out of the crosswise and middle 64-bit adders, and fails if either never happened.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb tb/vedic_mult_64x64_tb.sv \
          --top-module vedic_mult_64x64_tb
./obj_dir/Vvedic_mult_64x64_tb
```

Replace the testbench name to run any other block. The full-size run takes
about a second. Lint a module with:

```
verilator --lint-only -Wall -y rtl rtl/<module>.sv
```
