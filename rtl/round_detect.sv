// round_detect: finds whether the 14-digit coefficient product must be
// rounded to 7 digits, and by how many digits d.
//
// Two leading-one detectors give A_lop and B_lop and k = A_lop + B_lop; the
// product lies in [2^k, 2^(k+2)). The LUT indexed by k returns the minimum
// digit count to drop, d' = n - 7, and the boundary 10^n; the comparator
// checks the carry-save product against 10^n, and a multiplexer gives
// d = d' (product < 10^n) or d' + 1. Rounding is required when k > 23, or when
// the low 25 bits of the product (exact for k <= 23) reach 10^7. All of this
// can run beside the multiply; here it is fed by the registered product.
// Combinational.
module round_detect
  import bid_pkg::*;
#(
  parameter adder_e ADDER = ADD_CSEL
) (
  input  logic [23:0] a_c,
  input  logic [23:0] b_c,
  input  logic [49:0] ps,        // carry-save product a_c * b_c
  input  logic [49:0] pc,
  input  logic [24:0] low25,     // (ps + pc) mod 2^25
  output logic [5:0]  k,
  output logic        round_req,
  output logic [2:0]  d
);
  logic [4:0]  a_lop, b_lop;
  logic        a_zero, b_zero;
  logic [2:0]  dp;
  logic [46:0] pow10;
  logic        ge;

  leading_one_detector #(.W(24)) u_loda (.x(a_c), .pos(a_lop), .zero(a_zero));
  leading_one_detector #(.W(24)) u_lodb (.x(b_c), .pos(b_lop), .zero(b_zero));

  assign k = {1'b0, a_lop} + {1'b0, b_lop};

  digits_lut u_lut (.k, .dp, .pow10);
  pow10_compare #(.ADDER(ADDER)) u_cmp (.ps, .pc, .pow10, .ge);

  assign d         = ge ? dp + 3'd1 : dp;
  assign round_req = (k > 6'd23) || (low25 >= 25'(TEN_P));

  // A zero coefficient gives a zero product, which the low-bit test handles.
  logic unused;
  assign unused = a_zero ^ b_zero;
endmodule
