// ripple_carry_adder: W-bit adder made of a chain of W full adders.
// Bit i's carry out feeds bit i+1's carry in, so the carry ripples from the
// least to the most significant bit; {cout, sum} = a + b + cin.
// Purely combinational; the delay grows linearly with W.
// The ripple structure is the one the design names for every adder of the
// combine stage; W defaults to 64, the width used at the 64x64 level.
module ripple_carry_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
