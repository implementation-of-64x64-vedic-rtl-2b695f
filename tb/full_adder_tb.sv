// full_adder_tb: exhaustive self-check of the full adder.
// All eight input combinations are applied, one per clock of a local clock,
// and {cout, sum} is compared with the arithmetic sum a + b + cin.
// A watchdog ends the run with a failure if it has not finished in time.
module full_adder_tb;
  logic clk = 1'b0;
  logic a, b, cin, sum, cout;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      @(posedge clk);
      checks++;
      if ({cout, sum} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> cout=%0d sum=%0d", a, b, cin, cout, sum);
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
