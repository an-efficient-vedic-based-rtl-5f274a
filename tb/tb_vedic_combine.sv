// tb_vedic_combine: self-checking test of the Urdhva Tiryagbhyam adder
// network at HALF = 8 (16-bit element) and HALF = 4 (8x8 multiplier).
// Random operands are split into halves, the four cross products are
// computed by the testbench and fed in, and the assembled result is
// compared with the full product. Operands that make the carries c1 and
// c2 appear are included, and how often each appeared is counted; a carry
// that never appeared counts as a failure. One clock period per vector;
// a watchdog ends a stalled run with a failure.
module tb_vedic_combine;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_c1 = 0, n_c2 = 0;

  logic [15:0] q0, q1, q2, q3;  logic [32:0] s;
  logic [7:0]  r0, r1, r2, r3;  logic [16:0] t;

  vedic_combine #(.HALF(8)) dut16 (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .s(s));
  vedic_combine #(.HALF(4)) dut8  (.q0(r0), .q1(r1), .q2(r2), .q3(r3), .s(t));

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    logic [7:0] xl, xh, yl, yh;
    xl = x[7:0]; xh = x[15:8]; yl = y[7:0]; yh = y[15:8];
    q0 = 16'(xl) * 16'(yl); q1 = 16'(xl) * 16'(yh);
    q2 = 16'(xh) * 16'(yl); q3 = 16'(xh) * 16'(yh);
    r0 = 8'(xl[3:0]) * 8'(xl[3:0] ^ yl[3:0]);
    r1 = 8'(xl[3:0]) * 8'(yl[7:4]);
    r2 = 8'(xl[7:4]) * 8'(xl[3:0] ^ yl[3:0]);
    r3 = 8'(xl[7:4]) * 8'(yl[7:4]);
    @(posedge clk);
    if (dut16.c1) n_c1++;
    if (dut16.c2) n_c2++;
    checks += 2;
    if (s !== 33'(x) * 33'(y)) begin
      failures++;
      $display("FAIL 16: %h x %h = %h, expected %h", x, y, s, 33'(x) * 33'(y));
    end
    if (t !== 17'(xl) * 17'({yl[7:4], xl[3:0] ^ yl[3:0]})) begin
      failures++;
      $display("FAIL 8: got %h", t);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'hFFFF, 16'hFFFF);
    apply(16'hFF00, 16'h00FF);
    apply(16'h00FF, 16'hFFFF);   // c2 without c1
    apply(16'hFFFF, 16'h0001);
    apply(16'h0000, 16'h1234);
    for (int n = 0; n < 20000; n++)
      apply(16'($urandom), 16'($urandom));
    checks += 2;
    if (n_c1 == 0) begin failures++; $display("FAIL carry c1 never occurred"); end
    if (n_c2 == 0) begin failures++; $display("FAIL carry c2 never occurred"); end
    $display("carry c1 seen %0d times, c2 seen %0d times", n_c1, n_c2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
