// bid_encoder: packs sign, biased exponent and coefficient into a BID
// decimal32 word.
//
// A coefficient below 2^23 is stored as s | E(8) | c(23). A larger one (it
// then always starts with 100 in 24 bits) is stored as s | 11 | E(8) | c(21),
// the three leading bits being implied. Infinity is encoded s | 11110 | 0..0
// and NaN as 0 | 11111 | 0..0 (quiet NaN, IEEE 754-2008 layout, this
// design's choice of canonical pattern). Combinational.
module bid_encoder
  import bid_pkg::*;
(
  input  bid_fields_t  f,
  output logic [31:0]  x
);
  always_comb begin
    unique case (f.cls)
      CLS_INF: x = {f.s, 5'b11110, 26'd0};
      CLS_NAN: x = {1'b0, 5'b11111, 26'd0};
      default: begin
        if (f.c[23] == 1'b0) x = {f.s, f.e, f.c[22:0]};
        else                 x = {f.s, 2'b11, f.e, f.c[20:0]};
      end
    endcase
  end
endmodule
