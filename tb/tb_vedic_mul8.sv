// tb_vedic_mul8: exhaustive self-checking test of the 8x8 Vedic multiplier.
// First the worked example 173 x 58 = 10034, then all 65536 operand pairs,
// each compared with the product the testbench computes itself. The block
// is combinational and must show the product in the same cycle its
// operands are applied. A watchdog ends a stalled run with a failure.
module tb_vedic_mul8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0]  a, b;
  logic [15:0] p;

  vedic_mul8 dut (.a(a), .b(b), .p(p));

  task automatic apply(input logic [7:0] x, input logic [7:0] y);
    a = x; b = y;
    @(posedge clk);
    checks++;
    if (p !== 16'(x) * 16'(y)) begin
      failures++;
      if (failures < 20) $display("FAIL %0d x %0d = %0d, expected %0d", x, y, p, 16'(x) * 16'(y));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(8'd173, 8'd58);
    checks++;
    if (p !== 16'd10034) begin failures++; $display("FAIL 173 x 58 gave %0d", p); end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        apply(8'(i), 8'(j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
