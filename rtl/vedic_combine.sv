// vedic_combine: the Urdhva Tiryagbhyam ("vertically and crosswise")
// combination step of the Vedic multiplier.
//
// An (2*HALF)x(2*HALF) product is split into four HALFxHALF cross products
// of the operand halves:
//   q0 = aL*bL, q1 = aL*bH, q2 = aH*bL, q3 = aH*bH.
// Three carry-lookahead adders of 2*HALF bits assemble the full product:
//   1. q4 = q1 + q2,                          carry c1
//   2. q5 = q4 + {HALF zeros, q0[upper half]}, carry c2
//   3. s[4H-1:2H] = q3 + {zeros, c1+c2, q5[upper half]}, carry s[4H]
// and the low bits are taken directly: s[H-1:0] = q0[lower half],
// s[2H-1:H] = q5[lower half]. With HALF = 8 this is the 16-bit element:
// the third adder's operand is a 6-bit zero pad, the two carries, and
// q5[15:8].
//
// c1 and c2 both carry weight 2^(3H) and enter the third adder as the two
// bit value c1 + c2 at bits H+1..H. (For unsigned operands they are never
// both 1, but the sum form is exact either way.) s[4H] is the third
// adder's carry out; it is always 0 for an unsigned product and is kept
// only because the element brings it out.
//
// Interface: q0..q3 (2*HALF bits each) in; s (4*HALF+1 bits) out.
// Timing: purely combinational.
//
// The adder network, its operands and the zero pads follow the design;
// giving the two carries the sum form is this implementation's reading.
module vedic_combine #(
  parameter int unsigned HALF = 8
) (
  input  logic [2*HALF-1:0] q0,
  input  logic [2*HALF-1:0] q1,
  input  logic [2*HALF-1:0] q2,
  input  logic [2*HALF-1:0] q3,
  output logic [4*HALF:0]   s
);
  localparam int unsigned W = 2 * HALF;

  logic [W-1:0] q4, q5, hi_sum, q0_hi, hi_in;
  logic         c1, c2, c3;
  logic [1:0]   carries;

  assign q0_hi   = {{HALF{1'b0}}, q0[W-1:HALF]};
  assign carries = {c1 & c2, c1 ^ c2};
  assign hi_in   = {{(HALF-2){1'b0}}, carries, q5[W-1:HALF]};

  cla_adder #(.WIDTH(W)) u_cla1 (.a(q1), .b(q2),    .cin(1'b0), .sum(q4),     .cout(c1));
  cla_adder #(.WIDTH(W)) u_cla2 (.a(q4), .b(q0_hi), .cin(1'b0), .sum(q5),     .cout(c2));
  cla_adder #(.WIDTH(W)) u_cla3 (.a(q3), .b(hi_in), .cin(1'b0), .sum(hi_sum), .cout(c3));

  assign s = {c3, hi_sum, q5[HALF-1:0], q0[HALF-1:0]};
endmodule
