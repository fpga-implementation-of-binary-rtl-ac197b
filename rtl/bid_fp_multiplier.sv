// bid_fp_multiplier: decimal32 floating-point multiplier for operands in the
// binary-integer-decimal (BID) encoding.
//
// Z = A x B, rounded to 7 decimal digits in the selected rounding mode.
// Two BID decoders unpack A and B into sign, biased exponent and binary
// coefficient; the multiplier/rounder block multiplies and rounds; the BID
// encoder packs the result. The round-mode code is 000 ties-to-even,
// 001 toward zero, 010 toward +inf, 011 toward -inf, 100 ties-to-away.
//
// Handshake: when busy is low, a start pulse samples a, b and round_mode.
// done is high for one cycle when z is valid; z then holds until the next
// result. Latency is 3 cycles when the exact product fits in 7 digits and
// 8 cycles when it must be rounded (four extra passes through the shared
// multiplier). TREE (Dadda or Wallace reduction) and ADDER (ripple carry,
// carry look-ahead or carry select final adders) pick among the six
// structural variants; every variant gives identical results.
module bid_fp_multiplier
  import bid_pkg::*;
#(
  parameter tree_e  TREE  = TREE_WALLACE,
  parameter adder_e ADDER = ADD_CSEL
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [2:0]  round_mode,
  output logic [31:0] z,
  output logic        done,
  output logic        busy,
  output logic        inexact
);
  bid_fields_t fa, fb, fz;
  logic        rounded;

  bid_decoder u_dec_a (.x(a), .f(fa));
  bid_decoder u_dec_b (.x(b), .f(fb));

  mul_rounder #(.TREE(TREE), .ADDER(ADDER)) u_mr (
    .clk, .rst_n, .start, .fa, .fb, .mode(round_mode),
    .fz, .done, .busy, .rounded, .inexact);

  bid_encoder u_enc (.f(fz), .x(z));

  logic unused;
  assign unused = rounded;
endmodule
