// vedic_mult_64x64_tb: end-to-end self-check of the 64x64 Vedic multiplier,
// with the top at its own (fixed) size.
// Corner operands (zero, one, all ones, single high bits, one half all ones)
// are applied first, then random operands, including random operands with
// one half forced to all ones so that the long carry chains are exercised.
// The 128-bit product s is compared with the arithmetic product a * b, and
// cout must be 0 for every input, as a 64x64 product fits in 128 bits.
// The mechanisms of the adding stage are counted from the product bits
// alone: a carry out of the crosswise adder (the two cross products sum to
// 2^64 or more) and a carry out of the middle adder (adding the upper half of
// the low product carries out again). Random operands almost never reach the
// second, so directed operands with all-ones low halves and high halves that
// sum to 2^32 + 1 provoke it. Each must occur at least once.
// One vector per clock of a local clock; a watchdog bounds the run.
module vedic_mult_64x64_tb;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  int   n_cross_carry = 0, n_mid_carry = 0;

  always #5 clk = ~clk;

  logic [63:0]  a, b;
  logic [127:0] s, expect_s;
  logic         cout;

  vedic_mult_64x64 dut (.a(a), .b(b), .s(s), .cout(cout));

  task automatic apply(input logic [63:0] ta, input logic [63:0] tb_);
    logic [64:0] cross_full, mid_full;
    logic [63:0] ll;
    a = ta; b = tb_;
    @(posedge clk);
    expect_s = 128'(ta) * 128'(tb_);
    checks++;
    if (s != expect_s || cout != 1'b0) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h * %h -> cout=%0d s=%h, expected %h", ta, tb_, cout, s, expect_s);
    end
    cross_full = 65'(64'(ta[63:32]) * 64'(tb_[31:0])) + 65'(64'(ta[31:0]) * 64'(tb_[63:32]));
    ll         = 64'(ta[31:0]) * 64'(tb_[31:0]);
    mid_full   = 65'(cross_full[63:0]) + 65'(ll[63:32]);
    if (cross_full[64]) n_cross_carry++;
    if (mid_full[64])   n_mid_carry++;
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, 64'd1);
    apply(64'd1, '1);
    apply('0, '1);
    apply(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    apply(64'h0000_0000_FFFF_FFFF, 64'hFFFF_FFFF_0000_0000);
    apply(64'hFFFF_FFFF_0000_0000, 64'hFFFF_FFFF_FFFF_FFFF);
    // low halves all ones and high halves summing to 2^32 + 1: the crosswise
    // sum lands just below 2^64 and the middle adder carries out
    apply(64'h8000_0000_FFFF_FFFF, 64'h8000_0001_FFFF_FFFF);
    for (int i = 0; i < 100; i++) begin
      logic [31:0] hi;
      hi = $urandom;
      apply({hi, 32'hFFFF_FFFF}, {32'(33'h1_0000_0001 - 33'(hi)), 32'hFFFF_FFFF});
    end
    for (int i = 0; i < 20000; i++) begin
      logic [63:0] ra, rb;
      ra = {$urandom, $urandom};
      rb = {$urandom, $urandom};
      case (i % 4)
        1: ra[31:0]  = '1;
        2: rb[63:32] = '1;
        default: ;
      endcase
      apply(ra, rb);
    end
    $display("events: crosswise adder carry=%0d middle adder carry=%0d",
             n_cross_carry, n_mid_carry);
    checks++;
    if (n_cross_carry == 0) begin failures++; $display("FAIL crosswise adder never carried out"); end
    checks++;
    if (n_mid_carry == 0) begin failures++; $display("FAIL middle adder never carried out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
