// tb_cla_adder: self-checking test of cla_adder at 16 bits (the width of the
// processing element's adders) and at 8 and 4 bits (the widths used inside
// the 8x8 and 4x4 multipliers). Corner operands that make the carry travel
// the whole word, then random operands with random carry in, are compared
// with the sum computed by the testbench's own arithmetic. The adder is
// combinational; one clock period passes per vector. A watchdog ends the
// run with a failure if it does not finish.
module tb_cla_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;  logic ci16, co16;
  logic [7:0]  a8,  b8,  s8;   logic ci8,  co8;
  logic [3:0]  a4,  b4,  s4;   logic ci4,  co4;

  cla_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  cla_adder #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  cla_adder #(.WIDTH(4))  dut4  (.a(a4),  .b(b4),  .cin(ci4),  .sum(s4),  .cout(co4));

  task automatic apply(input logic [15:0] x, input logic [15:0] y, input logic ci);
    logic [16:0] e16; logic [8:0] e8; logic [4:0] e4;
    a16 = x; b16 = y; ci16 = ci;
    a8 = x[7:0]; b8 = y[7:0]; ci8 = ci;
    a4 = x[3:0]; b4 = y[3:0]; ci4 = ci;
    @(posedge clk);
    e16 = 17'(x) + 17'(y) + 17'(ci);
    e8  = 9'(x[7:0]) + 9'(y[7:0]) + 9'(ci);
    e4  = 5'(x[3:0]) + 5'(y[3:0]) + 5'(ci);
    checks += 3;
    if ({co16, s16} !== e16) begin
      failures++;
      $display("FAIL 16: %h + %h + %b = %h, expected %h", x, y, ci, {co16, s16}, e16);
    end
    if ({co8, s8} !== e8) begin
      failures++;
      $display("FAIL 8: %h + %h + %b = %h, expected %h", x[7:0], y[7:0], ci, {co8, s8}, e8);
    end
    if ({co4, s4} !== e4) begin
      failures++;
      $display("FAIL 4: %h + %h + %b = %h, expected %h", x[3:0], y[3:0], ci, {co4, s4}, e4);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'hFFFF, 16'h0000, 1'b1);
    apply(16'hFFFF, 16'hFFFF, 1'b1);
    apply(16'h7FFF, 16'h0001, 1'b0);
    apply(16'h0F0F, 16'h00F1, 1'b0);
    apply(16'hAAAA, 16'h5555, 1'b1);
    // every single carry-generating bit under an all-propagate word
    for (int i = 0; i < 16; i++) begin
      apply(16'hFFFF ^ (16'h1 << i), 16'h1 << i, 1'b0);
      apply(16'hFFFF, 16'h1 << i, 1'b0);
    end
    for (int n = 0; n < 20000; n++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
