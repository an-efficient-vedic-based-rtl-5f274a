// tb_array_mul4: exhaustive self-checking test of the 4x4 leaf multiplier.
// First the worked example 10 x 14 = 140, then all 256 operand pairs,
// each compared with the product the testbench computes itself. The block
// is combinational and must show the product in the same cycle its
// operands are applied. A watchdog ends the run with a failure if it stalls.
module tb_array_mul4;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [7:0] p;

  array_mul4 dut (.a(a), .b(b), .p(p));

  task automatic apply(input logic [3:0] x, input logic [3:0] y);
    a = x; b = y;
    @(posedge clk);
    checks++;
    if (p !== 8'(x) * 8'(y)) begin
      failures++;
      $display("FAIL %0d x %0d = %0d, expected %0d", x, y, p, 8'(x) * 8'(y));
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(4'd10, 4'd14);
    checks++;
    if (p !== 8'd140) begin failures++; $display("FAIL 10 x 14 gave %0d", p); end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        apply(4'(i), 4'(j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
