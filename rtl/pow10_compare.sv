// pow10_compare: decides IP >= 10^n without first adding up IP = ps + pc.
//
// A 50-bit 3:2 compressor takes ps, pc + 1 and the bitwise inverse of 10^n.
// Because ~X = -X - 1 in two's complement, the three add up to IP - 10^n.
// pc + 1 costs nothing: the carry vector's LSB is always 0, so it is simply
// set to 1. A 50-bit adder then adds the compressor's two outputs and its
// sign bit (bit 49) is 1 exactly when IP < 10^n. Needs pc[0] = 0 and
// |IP - 10^n| < 2^49. Combinational.
module pow10_compare
  import bid_pkg::*;
#(
  parameter adder_e ADDER = ADD_CSEL
) (
  input  logic [49:0] ps,
  input  logic [49:0] pc,
  input  logic [46:0] pow10,
  output logic        ge       // ps + pc >= pow10
);
  logic [49:0] s, c, diff;
  logic        co;

  csa_3to2 #(.W(50)) u_csa (
    .x(ps), .y({pc[49:1], 1'b1}), .z(~{3'b000, pow10}), .sum(s), .carry(c));
  cpa_adder #(.W(50), .ADDER(ADDER)) u_add (
    .a(s), .b(c), .cin(1'b0), .sum(diff), .cout(co));

  assign ge = ~diff[49];

  logic unused;
  assign unused = co ^ pc[0] ^ (|diff[48:0]);
endmodule
