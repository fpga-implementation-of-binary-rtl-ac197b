// compressor_4to2: W-bit 4:2 compressor row. It adds four words to a
// sum/carry pair: x1 + x2 + x3 + x4 + cin = sum + carry (mod 2^W). Each bit
// holds two chained full adders; the first adds x1, x2, x3 and passes its
// carry sideways to the second adder of the next bit, the second adds the
// first's sum, x4 and that sideways carry. The sideways carry never ripples
// more than one bit, so the delay does not depend on W. carry[0] is cin.
// In the multiplier it merges the tree's carry-save output with the
// feedback pair (S, C). Combinational.
module compressor_4to2 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  input  logic [W-1:0] x4,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] s1, c1, c2;
  logic [W:0]   side;     // sideways carry between bit positions
  assign side[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa1 (.a(x1[i]), .b(x2[i]), .ci(x3[i]), .sum(s1[i]), .co(c1[i]));
    assign side[i+1] = c1[i];
    full_adder u_fa2 (.a(s1[i]), .b(x4[i]), .ci(side[i]), .sum(sum[i]), .co(c2[i]));
  end
  assign carry = {c2[W-2:0], cin};
endmodule
