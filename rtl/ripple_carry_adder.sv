// ripple_carry_adder: W-bit adder made of W full adders in series; the carry
// out of each stage is the carry in of the next, so the delay grows linearly
// with W. Smallest of the three final-stage adders. Combinational.
module ripple_carry_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .sum(sum[i]), .co(c[i+1]));
  end
  assign cout = c[W];
endmodule
