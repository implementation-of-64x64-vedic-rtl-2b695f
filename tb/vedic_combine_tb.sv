// vedic_combine_tb: self-check of the combine stage at its default N = 64.
// The four partial products are driven with arbitrary 64-bit values, so the
// carries of the first two adders and the carry out of the third all occur;
// {cout, p} must equal the 129-bit sum hh*2^64 + (hl + lh)*2^32 + ll, worked
// out here with plain arithmetic. Directed cases force both inner carries at
// once and a carry out; random cases follow, then products of real 32-bit
// halves, for which cout must stay 0. Each of the three carry events is
// counted and must have happened. One vector per clock of a local clock; a
// watchdog bounds the run.
module vedic_combine_tb;
  localparam int unsigned N = 64;
  localparam int unsigned H = N / 2;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  int   n_c1 = 0, n_c2 = 0, n_cout = 0;

  always #5 clk = ~clk;

  logic [N-1:0]   ll, lh, hl, hh;
  logic [2*N-1:0] p;
  logic           cout;
  logic [2*N:0]   expect_p;

  vedic_combine dut (.ll(ll), .lh(lh), .hl(hl), .hh(hh), .p(p), .cout(cout));

  task automatic apply(input logic [N-1:0] t_ll, t_lh, t_hl, t_hh);
    logic [2*N:0] cross_full;
    ll = t_ll; lh = t_lh; hl = t_hl; hh = t_hh;
    @(posedge clk);
    cross_full = (2*N+1)'(t_hl) + (2*N+1)'(t_lh);
    expect_p   = ((2*N+1)'(t_hh) << N) + (cross_full << H) + (2*N+1)'(t_ll);
    checks++;
    if ({cout, p} != expect_p) begin
      failures++;
      $display("FAIL ll=%h lh=%h hl=%h hh=%h -> %h, expected %h",
               t_ll, t_lh, t_hl, t_hh, {cout, p}, expect_p);
    end
    // carry of adder 1 (crosswise sum) and of the final adder, from the
    // operands alone; carry of adder 2 from the expected middle sum
    if (cross_full[N]) n_c1++;
    if ((((cross_full & {{(N+1){1'b0}}, {N{1'b1}}}) + (2*N+1)'(t_ll >> H)) >> N) != 0) n_c2++;
    if (expect_p[2*N]) n_cout++;
  endtask

  initial begin
    apply('0, '0, '0, '0);
    apply('1, '1, '1, '0);   // both inner carries at once
    apply('1, '1, '1, '1);   // and a carry out of the top
    apply('0, '1, 64'd1, '0);
    apply(64'hFFFF_FFFF_0000_0000, '1, '0, '0);
    for (int i = 0; i < 3000; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, {$urandom, $urandom}, {$urandom, $urandom});
    // real partial products of 32-bit halves: no carry out
    for (int i = 0; i < 1000; i++) begin
      logic [H-1:0] al, am, bl, bm;
      al = $urandom; am = $urandom; bl = $urandom; bm = $urandom;
      if (i == 0) begin al = '1; am = '1; bl = '1; bm = '1; end
      apply(al * bl, al * bm, am * bl, am * bm);
      checks++;
      if (cout !== 1'b0) begin
        failures++;
        $display("FAIL carry out set for a real product");
      end
    end
    $display("events: adder1 carry=%0d adder2 carry=%0d carry out=%0d", n_c1, n_c2, n_cout);
    checks++; if (n_c1 == 0)   begin failures++; $display("FAIL no adder 1 carry seen"); end
    checks++; if (n_c2 == 0)   begin failures++; $display("FAIL no adder 2 carry seen"); end
    checks++; if (n_cout == 0) begin failures++; $display("FAIL no carry out seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
