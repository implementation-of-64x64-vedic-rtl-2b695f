// half_adder_tb: exhaustive self-check of the half adder.
// All four input pairs are applied, one per clock of a local clock, and
// {carry, sum} is compared with the arithmetic sum a + b.
// A watchdog ends the run with a failure if it has not finished in time.
module half_adder_tb;
  logic clk = 1'b0;
  logic a, b, sum, carry;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      @(posedge clk);
      checks++;
      if ({carry, sum} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> carry=%0d sum=%0d", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
