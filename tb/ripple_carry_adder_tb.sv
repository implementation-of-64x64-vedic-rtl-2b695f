// ripple_carry_adder_tb: self-check of the ripple carry adder at its default
// width of 64 bits and, exhaustively, at 4 bits.
// The 64-bit adder gets corner cases (a carry rippling through every bit,
// all ones, zero) and random operands; each {cout, sum} is compared with the
// 65-bit arithmetic sum a + b + cin. The 4-bit adder sees every a, b and cin.
// One vector per clock of a local clock; a watchdog bounds the run.
module ripple_carry_adder_tb;
  localparam int unsigned W = 64;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  logic [W:0]   expect_sum;

  ripple_carry_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  logic [3:0] a4, b4, sum4;
  logic       cin4, cout4;

  ripple_carry_adder #(.W(4)) dut4 (.a(a4), .b(b4), .cin(cin4), .sum(sum4), .cout(cout4));

  task automatic check64(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    a = ta; b = tb_; cin = tc;
    @(posedge clk);
    expect_sum = {1'b0, ta} + {1'b0, tb_} + {{W{1'b0}}, tc};
    checks++;
    if ({cout, sum} != expect_sum) begin
      failures++;
      $display("FAIL W=64 a=%h b=%h cin=%0d -> %h, expected %h", ta, tb_, tc, {cout, sum}, expect_sum);
    end
  endtask

  initial begin
    a4 = '0; b4 = '0; cin4 = 1'b0;
    check64('1, 64'd1, 1'b0);      // carry through all 64 bits
    check64('1, '0, 1'b1);         // carry in rippling through
    check64('1, '1, 1'b1);
    check64('0, '0, 1'b0);
    check64(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0);
    for (int i = 0; i < 2000; i++)
      check64({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));

    for (int v = 0; v < 512; v++) begin
      {cin4, a4, b4} = 9'(v);
      @(posedge clk);
      checks++;
      if ({cout4, sum4} != 5'({1'b0, a4} + {1'b0, b4} + {4'b0, cin4})) begin
        failures++;
        $display("FAIL W=4 a=%0d b=%0d cin=%0d -> %0d", a4, b4, cin4, {cout4, sum4});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
