// digits_lut: rounding look-up table indexed by k = A_lop + B_lop.
//
// The product of two coefficients whose leading ones sit at A_lop and B_lop
// lies in [2^k, 2^(k+2)), so its number of decimal digits is n or n+1 with
// n = number of digits of 2^k = ceil(k log10 2). For each k from 23 to 46
// the table holds the minimum number of digits to round off, d' = n - 7,
// and the boundary 10^n (the smallest power of ten above 2^k) that decides
// between n and n+1 digits. Below k = 23 the product has at most 7 digits and
// the entry for k = 23 is returned. Combinational.
module digits_lut (
  input  logic [5:0]  k,
  output logic [2:0]  dp,      // d' = n - p
  output logic [46:0] pow10    // 10^n
);
  always_comb begin
    unique case (k)
      6'd23: begin dp = 3'd0; pow10 = 47'd10000000        ; end   // n = 7
      6'd24: begin dp = 3'd1; pow10 = 47'd100000000       ; end   // n = 8
      6'd25: begin dp = 3'd1; pow10 = 47'd100000000       ; end   // n = 8
      6'd26: begin dp = 3'd1; pow10 = 47'd100000000       ; end   // n = 8
      6'd27: begin dp = 3'd2; pow10 = 47'd1000000000      ; end   // n = 9
      6'd28: begin dp = 3'd2; pow10 = 47'd1000000000      ; end   // n = 9
      6'd29: begin dp = 3'd2; pow10 = 47'd1000000000      ; end   // n = 9
      6'd30: begin dp = 3'd3; pow10 = 47'd10000000000     ; end   // n = 10
      6'd31: begin dp = 3'd3; pow10 = 47'd10000000000     ; end   // n = 10
      6'd32: begin dp = 3'd3; pow10 = 47'd10000000000     ; end   // n = 10
      6'd33: begin dp = 3'd3; pow10 = 47'd10000000000     ; end   // n = 10
      6'd34: begin dp = 3'd4; pow10 = 47'd100000000000    ; end   // n = 11
      6'd35: begin dp = 3'd4; pow10 = 47'd100000000000    ; end   // n = 11
      6'd36: begin dp = 3'd4; pow10 = 47'd100000000000    ; end   // n = 11
      6'd37: begin dp = 3'd5; pow10 = 47'd1000000000000   ; end   // n = 12
      6'd38: begin dp = 3'd5; pow10 = 47'd1000000000000   ; end   // n = 12
      6'd39: begin dp = 3'd5; pow10 = 47'd1000000000000   ; end   // n = 12
      6'd40: begin dp = 3'd6; pow10 = 47'd10000000000000  ; end   // n = 13
      6'd41: begin dp = 3'd6; pow10 = 47'd10000000000000  ; end   // n = 13
      6'd42: begin dp = 3'd6; pow10 = 47'd10000000000000  ; end   // n = 13
      6'd43: begin dp = 3'd6; pow10 = 47'd10000000000000  ; end   // n = 13
      6'd44: begin dp = 3'd7; pow10 = 47'd100000000000000 ; end   // n = 14
      6'd45: begin dp = 3'd7; pow10 = 47'd100000000000000 ; end   // n = 14
      6'd46: begin dp = 3'd7; pow10 = 47'd100000000000000 ; end   // n = 14
      default: begin
        if (k > 6'd46) begin dp = 3'd7; pow10 = 47'd100000000000000; end
        else           begin dp = 3'd0; pow10 = 47'd10000000;        end
      end
    endcase
  end
endmodule
