// vedic_mul8: 8x8 unsigned multiplier built by Urdhva Tiryagbhyam from
// four 4x4 leaf multipliers.
//
// The operands are split into nibbles. Four array_mul4 blocks form the
// cross products q0 = aL*bL, q1 = aL*bH, q2 = aH*bL and q3 = aH*bH, and
// vedic_combine (HALF = 4, three 8-bit carry-lookahead adders) assembles
// the 16-bit product. This is the sub-multiplier that the 16x16 processing
// element uses four times.
//
// Interface: a, b (8 bits) in; p = a * b (16 bits) out.
// Timing: purely combinational.
//
// Using Urdhva Tiryagbhyam at this level over fast 4x4 leaves, with the
// same adder network as the 16-bit level, follows the design; the widths of
// the inner adders (8 bits) follow from it.
module vedic_mul8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0]  q0, q1, q2, q3;
  logic [16:0] s;   // s[16] is always 0 for a 16-bit unsigned product

  array_mul4 u_m0 (.a(a[3:0]), .b(b[3:0]), .p(q0));
  array_mul4 u_m1 (.a(a[3:0]), .b(b[7:4]), .p(q1));
  array_mul4 u_m2 (.a(a[7:4]), .b(b[3:0]), .p(q2));
  array_mul4 u_m3 (.a(a[7:4]), .b(b[7:4]), .p(q3));

  vedic_combine #(.HALF(4)) u_comb (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .s(s));

  assign p = s[15:0];
endmodule
