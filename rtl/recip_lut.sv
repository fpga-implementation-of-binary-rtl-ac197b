// recip_lut: reciprocal look-up table for rounding by multiplication.
//
// Dividing by 10^d is replaced by multiplying by w_d, a 48-bit scaled
// approximation of 10^-d:
//     v   = ceil(d * log2 10)             (4, 7, 10, 14, 17, 20, 24)
//     w_d = ceil(2^(47 + v) / 10^d)
// For any number to round below 2^47, the product IP * w_d then has
// floor(IP / 10^d) in bits 94 : 47+v and, in the v bits below, a remainder
// field that is 0 exactly when the dropped digits are 0, 2^(v-1) exactly at
// the halfway point, and below or above 2^(v-1) when the dropped digits are
// below or above one half. Seven entries, d = 1..7; d = 0 returns zeros.
// Combinational.
module recip_lut (
  input  logic [2:0]  d,
  output logic [47:0] wd,
  output logic [4:0]  v
);
  always_comb begin
    unique case (d)
      3'd1: begin wd = 48'hCCCC_CCCC_CCCD; v = 5'd4;  end
      3'd2: begin wd = 48'hA3D7_0A3D_70A4; v = 5'd7;  end
      3'd3: begin wd = 48'h8312_6E97_8D50; v = 5'd10; end
      3'd4: begin wd = 48'hD1B7_1758_E21A; v = 5'd14; end
      3'd5: begin wd = 48'hA7C5_AC47_1B48; v = 5'd17; end
      3'd6: begin wd = 48'h8637_BD05_AF6D; v = 5'd20; end
      3'd7: begin wd = 48'hD6BF_94D5_E57B; v = 5'd24; end
      default: begin wd = '0; v = '0; end
    endcase
  end
endmodule
