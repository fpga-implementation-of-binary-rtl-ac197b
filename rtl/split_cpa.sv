// split_cpa: carry-propagate adder that turns the multiplier's carry-save
// pair into IP = ps + pc (50 bits).
//
// The low 25 bits go through one 25-bit adder. In parallel a compound adder
// (two 25-bit adders, carry-in 0 and carry-in 1) forms sum and sum + 1 of the
// high 25 bits; the carry out of the low adder selects which one is the upper
// half. The low 25 bits are also given out on their own: they alone decide
// whether a product with k <= 23 reaches 10^7. ADDER picks the adder type.
// Combinational.
module split_cpa
  import bid_pkg::*;
#(
  parameter adder_e ADDER = ADD_CSEL
) (
  input  logic [49:0] ps,
  input  logic [49:0] pc,
  output logic [49:0] ip,
  output logic [24:0] low25
);
  logic        c25, co0, co1;
  logic [24:0] hi0, hi1;

  cpa_adder #(.W(25), .ADDER(ADDER)) u_lo (
    .a(ps[24:0]), .b(pc[24:0]), .cin(1'b0), .sum(low25), .cout(c25));
  cpa_adder #(.W(25), .ADDER(ADDER)) u_hi0 (
    .a(ps[49:25]), .b(pc[49:25]), .cin(1'b0), .sum(hi0), .cout(co0));
  cpa_adder #(.W(25), .ADDER(ADDER)) u_hi1 (
    .a(ps[49:25]), .b(pc[49:25]), .cin(1'b1), .sum(hi1), .cout(co1));

  assign ip = {c25 ? hi1 : hi0, low25};

  // Carries out of bit 49 are beyond the 50-bit result.
  logic unused_co;
  assign unused_co = co0 ^ co1;
endmodule
