// carry_lookahead_adder: W-bit adder using propagate P(i) = A XOR B and
// generate G(i) = A AND B. Inside each 4-bit group all carries are computed
// directly from P, G and the group carry-in (two-level look-ahead logic), so
// they do not ripple bit by bit; the group carries then pass from group to
// group. Sum S(i) = P(i) XOR C(i). The group size of 4 follows the 4-bit
// look-ahead adder of the standard textbook structure; chaining the groups
// is this design's choice. Combinational.
module carry_lookahead_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG = (W + 3) / 4;   // number of 4-bit groups
  localparam int unsigned WP = NG * 4;

  logic [WP-1:0] p, g, c;
  logic [NG:0]   gc;                          // group carries

  assign p = WP'(a) ^ WP'(b);
  assign g = WP'(a) & WP'(b);
  assign gc[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    localparam int unsigned B0 = 4 * k;
    // Flattened look-ahead equations C(i+1) = G(i) | P(i) C(i)
    assign c[B0]   = gc[k];
    assign c[B0+1] = g[B0] | (p[B0] & gc[k]);
    assign c[B0+2] = g[B0+1] | (p[B0+1] & g[B0]) | (p[B0+1] & p[B0] & gc[k]);
    assign c[B0+3] = g[B0+2] | (p[B0+2] & g[B0+1]) | (p[B0+2] & p[B0+1] & g[B0])
                   | (p[B0+2] & p[B0+1] & p[B0] & gc[k]);
    assign gc[k+1] = g[B0+3] | (p[B0+3] & g[B0+2]) | (p[B0+3] & p[B0+2] & g[B0+1])
                   | (p[B0+3] & p[B0+2] & p[B0+1] & g[B0])
                   | (p[B0+3] & p[B0+2] & p[B0+1] & p[B0] & gc[k]);
  end

  logic [WP-1:0] s_full;
  assign s_full = p ^ c;
  assign sum    = s_full[W-1:0];
  // Carry out of bit W-1: C(W) = G(W-1) | P(W-1) C(W-1)
  assign cout   = g[W-1] | (p[W-1] & c[W-1]);
endmodule
