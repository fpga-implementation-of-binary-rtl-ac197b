// booth_radix8_ppgen: radix-8 Booth recoding for an unsigned N x N multiply.
//
// The multiplier n is scanned in overlapping 4-bit groups
// {n[3i+2], n[3i+1], n[3i], n[3i-1]} (n[-1] = 0, bits above N-1 are 0).
// Each group selects one multiple of the multiplicand m from
// {0, +-m, +-2m, +-3m, +-4m} by the radix-8 Booth table
// (value = -4 n[3i+2] + 2 n[3i+1] + n[3i] + n[3i-1]). 3m is the one "hard"
// multiple and is made by an adder, m + 2m. NPP = ceil((N+1)/3) groups are
// needed so that the top group sees a 0 above the unsigned MSB.
//
// Output: NPP partial-product rows, already shifted left by 3i and
// sign-extended to W bits, plus one extra row `neg` that holds the +1 of
// every negated (one's-complemented) multiple at bit 3i. The sum of all rows
// modulo 2^W is m * n. Full sign extension of each row is this design's
// choice (simpler than sign-encoding tricks). Combinational.
module booth_radix8_ppgen
  import bid_pkg::*;
#(
  parameter int unsigned N     = 24,
  parameter int unsigned W     = 50,
  parameter adder_e      ADDER = ADD_CSEL,
  localparam int unsigned NPP  = (N + 1 + 2) / 3
) (
  input  logic [N-1:0] m,             // multiplicand
  input  logic [N-1:0] n,             // multiplier
  output logic [W-1:0] pp  [NPP],     // shifted, sign-extended rows
  output logic [W-1:0] neg            // +1 correction bits of negated rows
);
  localparam int unsigned NX = 3 * NPP + 1;   // multiplier bits incl. n[-1] and zero padding
  localparam int unsigned MW = N + 3;         // signed width of a multiple (|4m| < 2^(N+2))

  // 3m = m + 2m
  logic [N+1:0] m3;
  logic         m3_co;
  cpa_adder #(.W(N+2), .ADDER(ADDER)) u_m3 (
    .a({2'b00, m}), .b({1'b0, m, 1'b0}), .cin(1'b0), .sum(m3), .cout(m3_co));

  logic [NX-1:0] nx;
  assign nx = {{(NX-N-1){1'b0}}, n, 1'b0};

  always_comb begin
    neg = '0;
    for (int i = 0; i < NPP; i++) begin
      logic [3:0]    grp;
      logic [MW-1:0] mag, row;
      logic          sgn;
      grp = nx[3*i +: 4];
      sgn = grp[3];
      // Magnitude of the selected multiple (Table: 0,1,1,2,2,3,3,4 and mirror)
      unique case (grp)
        4'b0000, 4'b1111: mag = '0;
        4'b0001, 4'b0010,
        4'b1101, 4'b1110: mag = MW'(m);
        4'b0011, 4'b0100,
        4'b1011, 4'b1100: mag = MW'({m, 1'b0});
        4'b0101, 4'b0110,
        4'b1001, 4'b1010: mag = MW'(m3);
        default:          mag = MW'({m, 2'b00});    // 0111 and 1000: 4m
      endcase
      // Negative multiples: one's complement here, +1 in the neg row
      if (sgn && grp != 4'b1111) begin
        row           = ~mag;
        neg[3*i]      = 1'b1;
      end else begin
        row           = mag;
      end
      pp[i] = W'({{(W-MW){row[MW-1]}}, row} << (3*i));
    end
  end

  // The adder's carry out is always 0 (m + 2m < 2^(N+2)).
  logic unused_m3_co;
  assign unused_m3_co = m3_co;
endmodule
