// tb_bid_fp_multiplier: end-to-end test of the decimal32 BID multiplier at
// its default configuration.
//
// Directed cases first (the worked example in both of its roundings, every
// rounding mode, the 10^7 re-scaling case, specials, range limits), then
// random operands. Every result is compared with the reference model in
// bid_ref_pkg, and the latency is checked: 3 cycles from start to done
// without rounding, 8 with. The test counts how often each mechanism
// occurred and counts a failure for any that never did.
module tb_bid_fp_multiplier;
  import bid_ref_pkg::*;

  localparam int NRAND = 4000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic [2:0]  round_mode = '0;
  logic [31:0] z;
  logic        done, busy, inexact;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_noround, n_round, n_dplus, n_dbase, n_adjust, n_inc, n_ovf, n_unf, n_special;
  int n_mode [5];
  int n_rclass [4];
  int n_large_in, n_large_out, n_noncanon;

  bid_fp_multiplier dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input logic [31:0] ta, input logic [31:0] tb_, input int mode);
    ref_res_t exp;
    int       lat, exp_lat;
    exp = ref_mul(ta, tb_, mode);
    @(negedge clk);
    a = ta; b = tb_; round_mode = 3'(mode); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 50) begin
      @(negedge clk);
      lat++;
    end
    exp_lat = (exp.rounded && !exp.special) ? 8 : 3;
    checks++;
    if (z !== exp.z) begin
      failures++;
      $display("MISMATCH a=%08h b=%08h mode=%0d z=%08h expected %08h", ta, tb_, mode, z, exp.z);
    end
    checks++;
    if (lat != exp_lat) begin
      failures++;
      $display("LATENCY a=%08h b=%08h got %0d expected %0d", ta, tb_, lat, exp_lat);
    end
    // coverage of mechanisms
    if (exp.special) n_special++;
    else if (!exp.rounded) n_noround++;
    else begin
      n_round++;
      if (exp.dplus) n_dplus++; else n_dbase++;
      n_rclass[exp.rclass]++;
      if (exp.inc) n_inc++;
      if (exp.adjusted) n_adjust++;
      n_mode[mode]++;
    end
    if (exp.overflow) n_ovf++;
    if (exp.underflow) n_unf++;
    if (ta[30:29] == 2'b11 && ta[30:27] != 4'b1111) n_large_in++;
    if (z[30:29] == 2'b11 && z[30:27] != 4'b1111) n_large_out++;
    if (ref_decode(ta).cls == 0 && ref_decode(ta).c == 0 && ta[30:29] == 2'b11) n_noncanon++;
  endtask

  task automatic need(input string name, input int cnt);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("mechanism never exercised: %s", name);
    end else begin
      $display("  %-28s %0d", name, cnt);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Worked example: 572363E81 x -115E-71 -> -6582174E11 or -6582175E11
    run_one(32'h5B08BBCB, 32'h8F000073, 0);
    checks++; if (z !== 32'hB8646F9E) begin failures++; $display("example RTE wrong: %08h", z); end
    run_one(32'h5B08BBCB, 32'h8F000073, 4);
    checks++; if (z !== 32'hB8646F9F) begin failures++; $display("example RTA wrong: %08h", z); end
    for (int md = 0; md < 5; md++) run_one(32'h5B08BBCB, 32'h8F000073, md);
    // Re-scaling: 9999990 x 1000001 rounds up to 10^7
    for (int md = 0; md < 5; md++)
      run_one(ref_encode(0, 101, 9999990), ref_encode(md[0], 101, 1000001), md);
    // Largest product, exact small product, zeros
    run_one(ref_encode(0, 101, 9999999), ref_encode(0, 101, 9999999), 0);
    run_one(ref_encode(1, 101, 1234), ref_encode(0, 101, 5678), 0);
    run_one(ref_encode(0, 101, 0), ref_encode(0, 101, 9999999), 0);
    // Overflow and underflow of the exponent
    run_one(ref_encode(0, 191, 9999999), ref_encode(0, 191, 99), 0);
    run_one(ref_encode(1, 0, 12), ref_encode(0, 3, 34), 0);
    run_one(ref_encode(1, 191, 0), ref_encode(0, 191, 5), 0);   // zero keeps E = 191
    checks++; if (z !== ref_encode(1, 191, 0)) begin failures++; $display("zero clamp wrong: %08h", z); end
    // Non-canonical coefficient (reads as zero), infinity, NaN, inf x 0
    run_one(32'h7FFF_FFFF & 32'h67FF_FFFF, ref_encode(0, 101, 7), 0);
    run_one(32'h7800_0000, ref_encode(1, 101, 7), 0);
    run_one(32'h7C00_0000, ref_encode(0, 101, 7), 0);
    run_one(32'h7800_0000, ref_encode(0, 101, 0), 0);
    // Midpoint cases for ties-to-even with odd and even truncations
    run_one(ref_encode(0, 101, 12345675), ref_encode(0, 101, 1), 0);
    run_one(ref_encode(0, 101, 2469135), ref_encode(0, 101, 5), 0);
    run_one(ref_encode(0, 101, 2469137), ref_encode(0, 101, 5), 0);

    for (int i = 0; i < NRAND; i++)
      run_one(rand_operand(), rand_operand(), $urandom_range(0, 4));

    $display("mechanism counts:");
    need("no rounding needed", n_noround);
    need("rounding needed", n_round);
    need("d = d'", n_dbase);
    need("d = d' + 1", n_dplus);
    need("remainder exact", n_rclass[0]);
    need("remainder below half", n_rclass[1]);
    need("remainder exactly half", n_rclass[2]);
    need("remainder above half", n_rclass[3]);
    need("increment", n_inc);
    need("10^7 re-scaled to 10^6", n_adjust);
    need("mode ties-to-even", n_mode[0]);
    need("mode toward zero", n_mode[1]);
    need("mode toward +inf", n_mode[2]);
    need("mode toward -inf", n_mode[3]);
    need("mode ties-to-away", n_mode[4]);
    need("exponent overflow", n_ovf);
    need("exponent underflow", n_unf);
    need("special operand", n_special);
    need("11-prefixed input", n_large_in);
    need("11-prefixed result", n_large_out);
    need("non-canonical input", n_noncanon);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
