// bid_decoder: unpacks one BID-encoded decimal32 word.
//
// Bit 31 is the sign. If the two bits after the sign are not 11, the next 8
// bits are the biased exponent and the low 23 bits the coefficient. If they
// are 11, the exponent is bits 28:21 and the coefficient is 100 followed by
// the low 21 bits (its three implicit leading bits). A coefficient of 10^7 or
// more is non-canonical and reads as 0. The word is an exceptional value
// when the four bits after the sign are 1111; bit 26 then separates infinity
// (0) from NaN (1), as IEEE 754-2008 defines it. Combinational.
module bid_decoder
  import bid_pkg::*;
(
  input  logic [31:0]  x,
  output bid_fields_t  f
);
  logic [23:0] y;
  always_comb begin
    f.s = x[31];
    if (x[30:29] != 2'b11) begin
      f.e = x[30:23];
      y   = {1'b0, x[22:0]};
    end else begin
      f.e = x[28:21];
      y   = {3'b100, x[20:0]};
    end
    f.c = (y < TEN_P) ? y : '0;
    if (x[30:27] == 4'b1111) f.cls = x[26] ? CLS_NAN : CLS_INF;
    else                     f.cls = CLS_FINITE;
  end
endmodule
