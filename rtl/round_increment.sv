// round_increment: final rounding step of the reciprocal-multiplication
// rounder.
//
// x holds bits 94:47 of P = IP * w_d (the discarded low 47 bits are gone).
// Its top 48 - v bits are the truncated product TP = floor(IP / 10^d) and its
// low v bits the remainder field R. The round bit r* is the MSB of R and the
// sticky bit s* the OR of the rest; together they tell whether the dropped
// digits were zero (00), below one half (01), exactly one half (10) or above
// (11). TP is incremented according to the rounding mode and the sign:
//   ties-to-even : r* and (s* or LSB of TP)
//   ties-to-away : r*
//   toward +inf  : positive and (r* or s*)
//   toward -inf  : negative and (r* or s*)
//   toward zero  : never
// If the incremented value is 10^7 it no longer fits in 7 digits: the
// coefficient becomes 10^6 and adj asks for one more exponent step.
// The +1 is a chain of 24 half adders (an incrementer), this design's choice
// for the increment the rounding step calls for. Combinational.
module round_increment
  import bid_pkg::*;
(
  input  logic [47:0] x,
  input  logic [4:0]  v,          // remainder width, 4 .. 24
  input  logic        sign,
  input  logic [2:0]  mode,
  output logic [23:0] zc,
  output logic        adj,
  output logic        inexact
);
  logic [47:0] rmask, tp;
  logic        r_bit, s_bit, inc;
  logic [24:0] ztmp;
  logic [24:0] icy;               // incrementer carry chain

  assign icy[0] = inc;
  for (genvar i = 0; i < 24; i++) begin : g_inc
    half_adder u_ha (.a(tp[i]), .b(icy[i]), .sum(ztmp[i]), .carry(icy[i+1]));
  end
  assign ztmp[24] = icy[24];

  always_comb begin
    rmask = (48'd1 << v) - 48'd1;
    tp    = x >> v;
    r_bit = x[6'(v) - 6'd1];
    s_bit = |(x & (rmask >> 1));
    unique case (mode)
      RM_RTZ:  inc = 1'b0;
      RM_RTP:  inc = ~sign & (r_bit | s_bit);
      RM_RTN:  inc =  sign & (r_bit | s_bit);
      RM_RTA:  inc = r_bit;
      default: inc = r_bit & (s_bit | tp[0]);   // ties-to-even, also codes 101..111
    endcase
    adj     = (ztmp == 25'(TEN_P));
    zc      = adj ? TEN_PM1 : ztmp[23:0];
    inexact = r_bit | s_bit;
  end

  // The upper 24 - v bits of TP are always zero for inputs below 10^14.
  logic unused;
  assign unused = |tp[47:24];
endmodule
