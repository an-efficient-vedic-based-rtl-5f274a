// cla_adder: WIDTH-bit carry-lookahead adder with carry in and carry out.
//
// This is the adder the processing element uses to merge its partial
// products (three of them at 16 bits in the 16x16 element, three at 8 bits
// inside each 8x8 multiplier, one at 4 bits in the 4x4 leaf multiplier).
// The operands are cut into 4-bit groups. Each bit forms generate
// g = a & b and propagate p = a ^ b; each group forms a group generate and
// group propagate. A second lookahead level computes the carry into every
// group directly from cin and the group signals, and a first level computes
// the carry into every bit of a group from that group's carry in. Both
// levels use the flat sum-of-products form of the carry equation, so no
// carry ripples from group to group.
//
// Interface: a, b, cin in; sum = (a + b + cin) mod 2^WIDTH and cout out.
// Timing: purely combinational, no clock.
//
// The element's use of a carry-lookahead adder and its 16-bit width follow
// the design; the 4-bit grouping and the two-level structure are this
// implementation's own choice. WIDTH must be a multiple of 4.
module cla_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned GROUPS = WIDTH / 4;

  if (WIDTH % 4 != 0 || WIDTH == 0) begin : g_bad_width
    $error("cla_adder: WIDTH must be a non-zero multiple of 4");
  end

  // Carry into position n of a lookahead chain, in flat form:
  // c[n] = g[n-1] | p[n-1]g[n-2] | ... | p[n-1]..p[0]c0
  function automatic logic lookahead(input logic [WIDTH-1:0] gv,
                                     input logic [WIDTH-1:0] pv,
                                     input logic             c0,
                                     input int unsigned      n);
    logic c, term;
    c = 1'b0;
    for (int unsigned j = 0; j < WIDTH; j++) begin
      if (j < n) begin
        term = gv[j];
        for (int unsigned k = 0; k < WIDTH; k++)
          if (k > j && k < n) term = term & pv[k];
        c = c | term;
      end
    end
    term = c0;
    for (int unsigned k = 0; k < WIDTH; k++)
      if (k < n) term = term & pv[k];
    return c | term;
  endfunction

  logic [WIDTH-1:0]  g, p;        // bit generate / propagate
  logic [WIDTH-1:0]  gg, gp;      // group generate / propagate (low GROUPS bits used)
  logic [GROUPS:0]   gc;          // carry into each group, gc[GROUPS] = cout
  logic [WIDTH-1:0]  c;           // carry into each bit

  assign g = a & b;
  assign p = a ^ b;

  // First level, upward: group generate and propagate.
  for (genvar i = 0; i < WIDTH; i++) begin : g_group
    if (i < GROUPS) begin : g_used
      assign gg[i] = lookahead(WIDTH'(g[4*i +: 4]), WIDTH'(p[4*i +: 4]), 1'b0, 4);
      assign gp[i] = &p[4*i +: 4];
    end else begin : g_unused
      assign gg[i] = 1'b0;
      assign gp[i] = 1'b0;
    end
  end

  // Second level: carry into every group straight from cin.
  for (genvar i = 0; i <= GROUPS; i++) begin : g_gcarry
    assign gc[i] = lookahead(gg, gp, cin, i);
  end

  // First level, downward: carry into every bit from its group's carry in.
  for (genvar i = 0; i < GROUPS; i++) begin : g_bcarry
    for (genvar k = 0; k < 4; k++) begin : g_bit
      assign c[4*i+k] = lookahead(WIDTH'(g[4*i +: 4]), WIDTH'(p[4*i +: 4]), gc[i], k);
    end
  end

  assign sum  = p ^ c;
  assign cout = gc[GROUPS];
endmodule
