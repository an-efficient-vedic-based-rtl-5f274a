// vedic_pe16: Vedic processing element, a 16x16 unsigned multiplier for the
// cells of a systolic array.
//
// The multiplier is the part of a systolic-array processing element that
// sets its critical path. Here it is built by the Urdhva Tiryagbhyam method
// with no loss of precision: four 8x8 multipliers (vedic_mul8) form the
// cross products of the operand bytes,
//   Q0 = a[7:0]*b[7:0],  Q1 = a[7:0]*b[15:8],
//   Q2 = a[15:8]*b[7:0], Q3 = a[15:8]*b[15:8],
// and three 16-bit carry-lookahead adders (vedic_combine) assemble them:
//   Q4,C1 = Q1 + Q2
//   Q5,C2 = Q4 + {8'b0, Q0[15:8]}
//   S[32:16] = Q3 + {6'b0, C1+C2, Q5[15:8]}
//   S[15:8] = Q5[7:0],  S[7:0] = Q0[7:0]
// Each 8x8 multiplier is itself four 4x4 carry-save array multipliers and
// three 8-bit carry-lookahead adders.
//
// Interface: a, b (16 bits) in; s (33 bits) out, s[31:0] = a * b and s[32]
// the last adder's carry out, which is always 0.
// Timing: purely combinational, no clock or registers; a systolic cell
// would register its operands and result around it.
//
// The block structure, operand splits, adder operands and pads follow the
// design's block diagram; the 4x4 leaf multiplier and the internals of the
// adders are this implementation's own.
module vedic_pe16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [32:0] s
);
  logic [15:0] q0, q1, q2, q3;

  vedic_mul8 u_m0 (.a(a[7:0]),  .b(b[7:0]),  .p(q0));
  vedic_mul8 u_m1 (.a(a[7:0]),  .b(b[15:8]), .p(q1));
  vedic_mul8 u_m2 (.a(a[15:8]), .b(b[7:0]),  .p(q2));
  vedic_mul8 u_m3 (.a(a[15:8]), .b(b[15:8]), .p(q3));

  vedic_combine #(.HALF(8)) u_comb (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .s(s));
endmodule
