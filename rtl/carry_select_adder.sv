// carry_select_adder: the W-bit word is cut into blocks of BLK bits. The
// lowest block is a plain ripple-carry adder; every other block holds two
// ripple-carry adders, one assuming carry-in 0 and one assuming carry-in 1,
// and a multiplexer driven by the real carry from the block below picks the
// sum and the carry out. Only the multiplexers lie on the carry path between
// blocks. The block size is this design's choice. Combinational.
module carry_select_adder #(
  parameter int unsigned W   = 8,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NB = (W + BLK - 1) / BLK;
  localparam int unsigned WP = NB * BLK;

  logic [WP-1:0] ap, bp, sp;
  logic [NB:0]   bc;                  // carry into each block
  assign ap = WP'(a);
  assign bp = WP'(b);
  assign bc[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    if (k == 0) begin : g_first
      ripple_carry_adder #(.W(BLK)) u_rca (
        .a(ap[BLK-1:0]), .b(bp[BLK-1:0]), .cin(bc[0]), .sum(sp[BLK-1:0]), .cout(bc[1]));
    end else begin : g_sel
      logic [BLK-1:0] s0, s1;
      logic           c0, c1;
      ripple_carry_adder #(.W(BLK)) u_rca0 (
        .a(ap[k*BLK +: BLK]), .b(bp[k*BLK +: BLK]), .cin(1'b0), .sum(s0), .cout(c0));
      ripple_carry_adder #(.W(BLK)) u_rca1 (
        .a(ap[k*BLK +: BLK]), .b(bp[k*BLK +: BLK]), .cin(1'b1), .sum(s1), .cout(c1));
      assign sp[k*BLK +: BLK] = bc[k] ? s1 : s0;
      assign bc[k+1]          = bc[k] ? c1 : c0;
    end
  end

  assign sum = sp[W-1:0];
  // When W is not a multiple of BLK the carry out of bit W-1 sits inside the
  // last block: recover it from the padded sum bit (padding inputs are zero).
  if (WP == W) begin : g_exact
    assign cout = bc[NB];
  end else begin : g_pad
    assign cout = sp[W];
  end
endmodule
