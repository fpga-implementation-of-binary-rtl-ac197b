// booth_multiplier: N x N unsigned binary multiplier with carry-save output
// and carry-save accumulation, (ps, pc) = m * n + s + c (mod 2^W).
//
// Structure: radix-8 Booth partial-product generation (NPP rows plus the
// row of +1 negation bits), a reduction tree (Dadda or Wallace, chosen by
// TREE) that brings the rows to a sum/carry pair, and a 4:2 compressor that
// adds the feedback pair (s, c) to that pair. The feedback lets the same
// multiplier accumulate several partial products of a wider multiply, which
// is how the rounding step reuses it. cin enters at bit 0 of the compressor
// carry; pc[0] equals cin, so with cin = 0 the LSB of pc is 0, which the
// 10^n comparator relies on. Combinational; the caller registers ps and pc.
module booth_multiplier
  import bid_pkg::*;
#(
  parameter int unsigned N     = 24,
  parameter int unsigned W     = 50,
  parameter tree_e       TREE  = TREE_WALLACE,
  parameter adder_e      ADDER = ADD_CSEL
) (
  input  logic [N-1:0] m,
  input  logic [N-1:0] n,
  input  logic [W-1:0] s,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] ps,
  output logic [W-1:0] pc
);
  localparam int unsigned NPP  = (N + 1 + 2) / 3;
  localparam int unsigned ROWS = NPP + 1;

  logic [W-1:0] pp [NPP];
  logic [W-1:0] neg;
  logic [W-1:0] rows [ROWS];
  logic [W-1:0] t_sum, t_carry;

  booth_radix8_ppgen #(.N(N), .W(W), .ADDER(ADDER)) u_pp (.m, .n, .pp, .neg);

  for (genvar r = 0; r < NPP; r++) begin : g_rows
    assign rows[r] = pp[r];
  end
  assign rows[NPP] = neg;

  if (TREE == TREE_DADDA) begin : g_dadda
    dadda_tree #(.ROWS(ROWS), .W(W)) u_tree (.rows, .sum(t_sum), .carry(t_carry));
  end else begin : g_wallace
    wallace_tree #(.ROWS(ROWS), .W(W)) u_tree (.rows, .sum(t_sum), .carry(t_carry));
  end

  compressor_4to2 #(.W(W)) u_c42 (
    .x1(t_sum), .x2(t_carry), .x3(s), .x4(c), .cin, .sum(ps), .carry(pc));
endmodule
