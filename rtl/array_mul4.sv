// array_mul4: 4x4 unsigned multiplier, the leaf of the Vedic multiplier tree.
//
// Urdhva Tiryagbhyam is kept for the 8x8 and 16x16 levels only; at 4x4 a
// different fast multiplier is used so that the tree does not go down to
// 2x2 blocks and multiply the number of partial products. This block is a
// carry-save array multiplier: the sixteen partial-product bits a[j]&b[i]
// are reduced by three rows of full adders in which carries move down to
// the next row instead of along the row, and the last row's sums and
// carries are merged by a 4-bit carry-lookahead adder (cla_adder).
//
// Row i (1..3), column j adds a[j]&b[i], the previous row's sum from
// column j+1 and the previous row's carry from column j; its column-0 sum
// is product bit i. The merge adder forms product bits 7..4.
//
// Interface: a, b (4 bits) in; p = a * b (8 bits) out.
// Timing: purely combinational.
//
// That the 4x4 leaf is a non-Vedic fast multiplier follows the design; the
// choice of a carry-save array with a lookahead merge is this
// implementation's own, as the kind of fast multiplier is not specified.
module array_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] s_row, c_row;   // sums and carries leaving the last array row
  logic [3:0] merge_sum;
  logic       merge_cout;     // always 0: 15 * 15 < 2^8

  logic [3:0] low_bits;

  always_comb begin
    logic [3:0] s_prev, c_prev, s_cur, c_cur;
    logic       x, y, z;
    s_prev  = a & {4{b[0]}};
    c_prev  = '0;
    low_bits[0] = s_prev[0];
    s_cur   = '0;
    c_cur   = '0;
    for (int i = 1; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        x        = a[j] & b[i];
        y        = (j < 3) ? s_prev[(j+1) % 4] : 1'b0;
        z        = c_prev[j];
        s_cur[j] = x ^ y ^ z;
        c_cur[j] = (x & y) | (x & z) | (y & z);
      end
      low_bits[i] = s_cur[0];
      s_prev = s_cur;
      c_prev = c_cur;
    end
    s_row = s_prev;
    c_row = c_prev;
  end

  assign p = {merge_sum, low_bits};

  cla_adder #(.WIDTH(4)) u_merge (
    .a   ({1'b0, s_row[3:1]}),
    .b   (c_row),
    .cin (1'b0),
    .sum (merge_sum),
    .cout(merge_cout)
  );
endmodule
