// dadda_tree: reduces ROWS words of W bits to a sum/carry pair by Dadda
// column compression.
//
// The matrix is viewed column by column (bit weight 2^c holds one dot per
// row). The reduction runs through stages whose target heights are the Dadda
// sequence d1 = 2, d(j+1) = floor(1.5 * d(j)), taken from the largest value
// below ROWS down to 2. In each stage every column is brought down to the
// target height, counting the carries it receives from the column below in
// the same stage: a full adder (3:2 counter) removes two dots, a half adder
// (2:2 counter) removes one, and only as many counters as needed are placed.
// Carries out of the top column are dropped, so
// sum + carry = sum of all rows (mod 2^W).
//
// The counter placement is worked out at elaboration by the constant
// function place() from the column heights alone. The generate loops then
// build the network: in each stage and column the full-adder sums come
// first, then the half-adder sums, then the dots that pass through
// unchanged, then the carries from the column below. The carries of the top
// column (weight 2^W and up) are left unused on purpose. Combinational.
//
// The stage sequence and counter rules follow the usual Dadda method; the
// sequence uses floor(1.5 d) (a ceiling would give heights that 3:2 and 2:2
// counters cannot always reach). The dot ordering is this design's choice.
module dadda_tree #(
  parameter int unsigned ROWS = 10,
  parameter int unsigned W    = 50
) (
  input  logic [W-1:0] rows  [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  localparam int unsigned MAXH = ROWS + 2;   // room for the dots of a column

  // j-th Dadda height, j >= 1
  function automatic int unsigned dadda_d(int unsigned j);
    int unsigned d = 2;
    for (int unsigned i = 1; i < j; i++) d = (d * 3) / 2;
    return d;
  endfunction

  // Number of stages: largest j with d(j) < ROWS
  function automatic int unsigned num_stages();
    int unsigned j = 0;
    while (dadda_d(j + 1) < ROWS) j++;
    return j;
  endfunction

  localparam int unsigned NST = num_stages();

  // Placement of stage st (0 = first) in column col. what selects the
  // answer: 0 full adders, 1 half adders, 2 column height entering the
  // stage, 3 carries received from the column below.
  function automatic int unsigned place(int unsigned st, int unsigned col,
                                        int unsigned what);
    int unsigned ch  [W];
    int unsigned ncy [W+1];
    int unsigned nf, nh, h, t, k, res;
    res = 0;
    for (int unsigned x = 0; x < W; x++) ch[x] = ROWS;
    for (int unsigned s = 0; s < NST; s++) begin
      t = dadda_d(NST - s);
      for (int unsigned x = 0; x <= W; x++) ncy[x] = 0;
      for (int unsigned x = 0; x < W; x++) begin
        h  = ch[x] + ncy[x];
        nf = 0;
        nh = 0;
        k  = 0;
        for (int unsigned f = 0; f < MAXH; f++) begin
          if (h > t + 1 && ch[x] >= k + 3) begin
            nf++;
            k += 3;
            h -= 2;
          end else if (h > t && ch[x] >= k + 2) begin
            nh++;
            k += 2;
            h -= 1;
          end
        end
        if (s == st && x == col) begin
          case (what)
            0:       res = nf;
            1:       res = nh;
            2:       res = ch[x];
            default: res = ncy[x];
          endcase
        end
        ncy[x+1] = nf + nh;
        ch[x]    = ch[x] - 2 * nf - nh + ncy[x];
      end
    end
    return res;
  endfunction

  for (genvar i = 0; i < NST; i++) begin : g_stage
    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int unsigned NF  = place(i, c, 0);
      localparam int unsigned NH  = place(i, c, 1);
      localparam int unsigned CH  = place(i, c, 2);
      localparam int unsigned NCY = place(i, c, 3);
      localparam int unsigned NP  = CH - 3 * NF - 2 * NH;   // dots passed on
      localparam int unsigned OH  = NF + NH + NP + NCY;     // height after
      localparam int unsigned NC  = (NF + NH > 0) ? NF + NH : 1;

      logic [MAXH-1:0] src;    // dots entering the stage
      logic [MAXH-1:0] nxt;    // dots leaving the stage
      logic [NC-1:0]   co;     // carries sent to column c + 1

      if (OH > MAXH) begin : g_bad
        $error("dadda_tree: column %0d too high after stage %0d", c, i);
      end

      if (i == 0) begin : g_first
        for (genvar r = 0; r < MAXH; r++) begin : g_r
          if (r < ROWS) begin : g_dot
            assign src[r] = rows[r][c];
          end else begin : g_pad
            assign src[r] = 1'b0;
          end
        end
      end else begin : g_next
        assign src = g_stage[i-1].g_col[c].nxt;
      end

      for (genvar f = 0; f < NF; f++) begin : g_fa
        full_adder u_fa (.a(src[3*f]), .b(src[3*f+1]), .ci(src[3*f+2]),
                         .sum(nxt[f]), .co(co[f]));
      end
      for (genvar h = 0; h < NH; h++) begin : g_ha
        half_adder u_ha (.a(src[3*NF+2*h]), .b(src[3*NF+2*h+1]),
                         .sum(nxt[NF+h]), .carry(co[NF+h]));
      end
      if (NF + NH == 0) begin : g_noco
        assign co = '0;
      end
      for (genvar p = 0; p < NP; p++) begin : g_pass
        assign nxt[NF+NH+p] = src[3*NF+2*NH+p];
      end
      if (c > 0) begin : g_cin
        for (genvar q = 0; q < NCY; q++) begin : g_q
          assign nxt[NF+NH+NP+q] = g_stage[i].g_col[c-1].co[q];
        end
      end
      for (genvar z = OH; z < MAXH; z++) begin : g_zero
        assign nxt[z] = 1'b0;
      end
    end
  end

  if (NST == 0) begin : g_direct
    assign sum = rows[0];
    if (ROWS > 1) begin : g_two
      assign carry = rows[ROWS-1];
    end else begin : g_one
      assign carry = '0;
    end
  end else begin : g_out
    for (genvar c = 0; c < W; c++) begin : g_bit
      assign sum[c]   = g_stage[NST-1].g_col[c].nxt[0];
      assign carry[c] = g_stage[NST-1].g_col[c].nxt[1];
    end
  end
endmodule
