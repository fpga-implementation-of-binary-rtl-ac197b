// cpa_adder: W-bit carry-propagate adder whose structure is picked by the
// ADDER parameter: ripple carry, carry look-ahead or carry select. These are
// the three final-stage adders the multiplier is built and compared with.
// Combinational; sum and cout are the same for every choice.
module cpa_adder
  import bid_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter adder_e      ADDER = ADD_CSEL
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  if (ADDER == ADD_RCA) begin : g_rca
    ripple_carry_adder #(.W(W)) u_add (.a, .b, .cin, .sum, .cout);
  end else if (ADDER == ADD_CLA) begin : g_cla
    carry_lookahead_adder #(.W(W)) u_add (.a, .b, .cin, .sum, .cout);
  end else begin : g_csel
    carry_select_adder #(.W(W)) u_add (.a, .b, .cin, .sum, .cout);
  end
endmodule
