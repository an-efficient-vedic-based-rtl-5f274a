// tb_vedic_pe16: end-to-end self-checking test of the 16x16 Vedic
// processing element at its only configuration (no parameters).
//
// It applies the two worked examples of the design (10 x 14 and
// 173 x 58, which exercise only the low byte multiplier), corner operands
// (zero, one, all ones, single bytes) and random operand pairs, and
// compares the 33-bit result with the product computed by the testbench.
// It also counts how often each carry of the adder network occurred: c1
// (out of Q1 + Q2) and c2 (out of Q4 + Q0[15:8]) at the 16-bit level, and
// the same two carries inside the 8x8 sub-multipliers. A carry that never
// occurred counts as a failure. The element is combinational; the product
// is checked in the cycle its operands are applied. A watchdog ends a
// stalled run with a failure.
module tb_vedic_pe16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_c1 = 0, n_c2 = 0, n_c1_8 = 0, n_c2_8 = 0;
  logic [15:0] a, b;
  logic [32:0] s;

  vedic_pe16 dut (.a(a), .b(b), .s(s));

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    a = x; b = y;
    @(posedge clk);
    if (dut.u_comb.c1) n_c1++;
    if (dut.u_comb.c2) n_c2++;
    if (dut.u_m1.u_comb.c1) n_c1_8++;
    if (dut.u_m1.u_comb.c2) n_c2_8++;
    checks++;
    if (s !== 33'(x) * 33'(y)) begin
      failures++;
      if (failures < 20) $display("FAIL %0d x %0d = %0d, expected %0d", x, y, s, 33'(x) * 33'(y));
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'd10, 16'd14);
    checks++;
    if (s !== 33'd140) begin failures++; $display("FAIL 10 x 14 gave %0d", s); end
    apply(16'd173, 16'd58);
    checks++;
    if (s !== 33'd10034) begin failures++; $display("FAIL 173 x 58 gave %0d", s); end
    apply(16'h0000, 16'hFFFF);
    apply(16'h0001, 16'hFFFF);
    apply(16'hFFFF, 16'hFFFF);
    apply(16'hFF00, 16'h00FF);
    apply(16'h00FF, 16'hFFFF);
    apply(16'h8000, 16'h8000);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        apply(16'h1 << i, 16'hFFFF >> j);
    for (int n = 0; n < 200000; n++)
      apply(16'($urandom), 16'($urandom));
    checks += 4;
    if (n_c1 == 0)   begin failures++; $display("FAIL 16-bit carry c1 never occurred"); end
    if (n_c2 == 0)   begin failures++; $display("FAIL 16-bit carry c2 never occurred"); end
    if (n_c1_8 == 0) begin failures++; $display("FAIL 8-bit carry c1 never occurred"); end
    if (n_c2_8 == 0) begin failures++; $display("FAIL 8-bit carry c2 never occurred"); end
    $display("carries: c1 %0d, c2 %0d, 8x8 c1 %0d, 8x8 c2 %0d", n_c1, n_c2, n_c1_8, n_c2_8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
