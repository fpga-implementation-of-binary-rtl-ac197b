// tb_mul_rounder: the multiplier/rounder block in all six structural
// variants (Dadda or Wallace tree; ripple-carry, look-ahead or carry-select
// final adder) fed with the same unpacked operands. Every variant's result
// must match the reference model (after encoding), done must come 3 cycles
// after start without rounding and 8 with, busy must be high in between,
// and the rounded/inexact flags must be right.
module tb_mul_rounder;
  import bid_pkg::*;
  import bid_ref_pkg::*;

  localparam int NV = 6;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  bid_fields_t fa, fb;
  logic [2:0]  mode;
  bid_fields_t fz [NV];
  logic [NV-1:0] done, busy, rounded, inexact;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mul_rounder #(.TREE(TREE_DADDA),   .ADDER(ADD_RCA))  u0 (.clk, .rst_n, .start, .fa, .fb, .mode, .fz(fz[0]), .done(done[0]), .busy(busy[0]), .rounded(rounded[0]), .inexact(inexact[0]));
  mul_rounder #(.TREE(TREE_DADDA),   .ADDER(ADD_CLA))  u1 (.clk, .rst_n, .start, .fa, .fb, .mode, .fz(fz[1]), .done(done[1]), .busy(busy[1]), .rounded(rounded[1]), .inexact(inexact[1]));
  mul_rounder #(.TREE(TREE_DADDA),   .ADDER(ADD_CSEL)) u2 (.clk, .rst_n, .start, .fa, .fb, .mode, .fz(fz[2]), .done(done[2]), .busy(busy[2]), .rounded(rounded[2]), .inexact(inexact[2]));
  mul_rounder #(.TREE(TREE_WALLACE), .ADDER(ADD_RCA))  u3 (.clk, .rst_n, .start, .fa, .fb, .mode, .fz(fz[3]), .done(done[3]), .busy(busy[3]), .rounded(rounded[3]), .inexact(inexact[3]));
  mul_rounder #(.TREE(TREE_WALLACE), .ADDER(ADD_CLA))  u4 (.clk, .rst_n, .start, .fa, .fb, .mode, .fz(fz[4]), .done(done[4]), .busy(busy[4]), .rounded(rounded[4]), .inexact(inexact[4]));
  mul_rounder #(.TREE(TREE_WALLACE), .ADDER(ADD_CSEL)) u5 (.clk, .rst_n, .start, .fa, .fb, .mode, .fz(fz[5]), .done(done[5]), .busy(busy[5]), .rounded(rounded[5]), .inexact(inexact[5]));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bid_fields_t to_fields(logic [31:0] w);
    ref_op_t o;
    bid_fields_t f;
    o = ref_decode(w);
    f.s = o.s; f.e = 8'(o.e); f.c = 24'(o.c); f.cls = operand_class_e'(o.cls);
    return f;
  endfunction

  function automatic logic [31:0] enc(bid_fields_t f);
    if (f.cls == CLS_INF) return {f.s, 5'b11110, 26'd0};
    if (f.cls == CLS_NAN) return 32'h7C00_0000;
    return ref_encode(f.s, int'(f.e), longint'(f.c));
  endfunction

  int n_round = 0, n_exact = 0;

  task automatic run_one(input logic [31:0] a, input logic [31:0] b, input int md);
    ref_res_t e;
    int lat, exp_lat;
    e = ref_mul(a, b, md);
    @(negedge clk);
    fa = to_fields(a); fb = to_fields(b); mode = 3'(md); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done[0] && lat < 50) begin
      checks++;
      if (busy != '1) failures++;
      @(negedge clk);
      lat++;
    end
    exp_lat = (e.rounded && !e.special) ? 8 : 3;
    if (e.rounded && !e.special) n_round++; else n_exact++;
    checks++;
    if (lat != exp_lat) begin failures++; $display("latency %0d expected %0d", lat, exp_lat); end
    for (int i = 0; i < NV; i++) begin
      checks += 2;
      if (!done[i]) failures++;
      if (enc(fz[i]) != e.z) begin
        failures++;
        $display("variant %0d a=%08h b=%08h md=%0d got %08h expected %08h", i, a, b, md, enc(fz[i]), e.z);
      end
    end
    if (!e.special) begin
      checks += 2;
      if (rounded[5] != e.rounded) failures++;
      if (e.rounded && inexact[5] != (e.rclass != 0)) failures++;
    end
  endtask

  initial begin
    fa = '0; fb = '0; mode = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int md = 0; md < 5; md++) run_one(32'h5B08BBCB, 32'h8F000073, md);
    run_one(ref_encode(0, 101, 9999990), ref_encode(0, 101, 1000001), 2);
    for (int i = 0; i < 1500; i++)
      run_one(rand_operand(), rand_operand(), $urandom_range(0, 4));
    checks++;
    if (n_round == 0 || n_exact == 0) failures++;
    $display("rounded %0d, not rounded %0d", n_round, n_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
