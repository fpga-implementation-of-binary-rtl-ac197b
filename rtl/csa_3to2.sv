// csa_3to2: W-bit carry-save adder (3:2 compressor row). Each bit position is
// a full adder; the sum bits form one output word and the carry bits,
// shifted one place left, the other. x + y + z = sum + carry (mod 2^W).
// carry[0] is always 0. Combinational.
module csa_3to2 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] co;
  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(x[i]), .b(y[i]), .ci(z[i]), .sum(sum[i]), .co(co[i]));
  end
  assign carry = {co[W-2:0], 1'b0};
endmodule
