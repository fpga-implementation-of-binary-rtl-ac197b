// wallace_tree: reduces ROWS words of W bits to a sum/carry pair.
//
// At every level the rows are taken in groups of three and each group goes
// through a 3:2 carry-save adder row (csa_3to2), giving two rows; rows left
// over (one or two) pass to the next level unchanged. The row count therefore
// follows w(j+1) = 2*floor(w(j)/3) + w(j) mod 3 until two rows remain.
// sum + carry = sum of all input rows (mod 2^W). Combinational.
module wallace_tree #(
  parameter int unsigned ROWS = 10,
  parameter int unsigned W    = 50
) (
  input  logic [W-1:0] rows  [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  // Number of rows at a given level
  function automatic int unsigned rows_at(int unsigned lvl);
    int unsigned r = ROWS;
    for (int unsigned j = 0; j < lvl; j++) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  // Number of levels to reach two rows
  function automatic int unsigned num_levels();
    int unsigned r = ROWS, l = 0;
    while (r > 2) begin
      r = 2 * (r / 3) + r % 3;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned NL = num_levels();

  for (genvar l = 0; l < NL; l++) begin : g_lvl
    localparam int unsigned RIN  = rows_at(l);
    localparam int unsigned NG   = RIN / 3;
    localparam int unsigned ROUT = rows_at(l + 1);
    logic [W-1:0] rin  [ROWS];
    logic [W-1:0] rout [ROWS];
    if (l == 0) begin : g_first
      assign rin = rows;
    end else begin : g_next
      assign rin = g_lvl[l-1].rout;
    end
    for (genvar gi = 0; gi < NG; gi++) begin : g_csa
      csa_3to2 #(.W(W)) u_csa (
        .x(rin[3*gi]), .y(rin[3*gi+1]), .z(rin[3*gi+2]),
        .sum(rout[2*gi]), .carry(rout[2*gi+1]));
    end
    for (genvar p = 0; p < RIN % 3; p++) begin : g_pass
      assign rout[2*NG+p] = rin[3*NG+p];
    end
    for (genvar z = ROUT; z < ROWS; z++) begin : g_unused
      assign rout[z] = '0;
    end
  end

  if (NL == 0) begin : g_small
    assign sum   = rows[0];
    if (ROWS > 1) begin : g_two
      assign carry = rows[ROWS > 1 ? 1 : 0];
    end else begin : g_one
      assign carry = '0;
    end
  end else begin : g_out
    assign sum   = g_lvl[NL-1].rout[0];
    assign carry = g_lvl[NL-1].rout[1];
  end
endmodule
