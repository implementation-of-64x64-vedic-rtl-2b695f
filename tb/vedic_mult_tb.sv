// vedic_mult_tb: self-check of the recursive N x N Vedic multiplier.
// Four instances: N = 2, 4 and 8 are checked exhaustively (every operand
// pair), N = 32, the default and the building block of the 64x64 top, with
// corner cases (all ones, powers of two, zero) and random operands. Each
// product is compared with the arithmetic product a * b. One vector per clock
// of a local clock; a watchdog bounds the run.
module vedic_mult_tb;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [1:0]  a2, b2;
  logic [3:0]  p2;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [31:0] a32, b32;
  logic [63:0] p32, expect32;

  vedic_mult #(.N(2)) dut2 (.a(a2), .b(b2), .p(p2));
  vedic_mult #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));
  vedic_mult #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));
  vedic_mult          dut32 (.a(a32), .b(b32), .p(p32));

  task automatic check32(input logic [31:0] ta, input logic [31:0] tb_);
    a32 = ta; b32 = tb_;
    @(posedge clk);
    expect32 = 64'(ta) * 64'(tb_);
    checks++;
    if (p32 != expect32) begin
      failures++;
      $display("FAIL N=32 %h * %h -> %h, expected %h", ta, tb_, p32, expect32);
    end
  endtask

  initial begin
    a2 = '0; b2 = '0; a4 = '0; b4 = '0;
    for (int v = 0; v < 16; v++) begin
      {a2, b2} = 4'(v);
      @(posedge clk);
      checks++;
      if (p2 != 4'(int'(a2) * int'(b2))) begin
        failures++;
        $display("FAIL N=2 %0d * %0d -> %0d", a2, b2, p2);
      end
    end a8 = '0; b8 = '0; a32 = '0; b32 = '0;
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      @(posedge clk);
      checks++;
      if (p4 != 8'(int'(a4) * int'(b4))) begin
        failures++;
        $display("FAIL N=4 %0d * %0d -> %0d", a4, b4, p4);
      end
    end
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      @(posedge clk);
      checks++;
      if (p8 != 16'(int'(a8) * int'(b8))) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 %0d * %0d -> %0d", a8, b8, p8);
      end
    end
    check32('1, '1);
    check32('0, '1);
    check32('1, 32'd1);
    check32(32'h8000_0000, 32'h8000_0000);
    check32(32'h0001_0000, 32'hFFFF_FFFF);
    for (int i = 0; i < 5000; i++) check32($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
