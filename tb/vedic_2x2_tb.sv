// vedic_2x2_tb: exhaustive self-check of the 2x2 Vedic multiplier cell.
// All 16 operand pairs are applied, one per clock of a local clock, and the
// 4-bit product is compared with a * b. A watchdog bounds the run.
module vedic_2x2_tb;
  logic clk = 1'b0;
  logic [1:0] a, b;
  logic [3:0] s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vedic_2x2 dut (.a(a), .b(b), .s(s));

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      @(posedge clk);
      checks++;
      if (s != 4'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d * %0d -> %0d", a, b, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
