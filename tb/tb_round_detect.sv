// tb_round_detect: for random coefficient pairs (all digit counts), the
// product is split into a carry-save pair and round_req must say whether the
// product has more than 7 digits, d must be its digit count minus 7, and k
// must be the sum of the leading-one positions. The worked example
// 0x3885 x 0x1A84C (k = 29, d = 3) is included.
module tb_round_detect;
  import bid_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [23:0] a_c, b_c;
  logic [49:0] ps, pc;
  logic [24:0] low25;
  logic [5:0]  k;
  logic        round_req;
  logic [2:0]  d;

  round_detect dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_req = 0, n_noreq = 0, n_plus = 0, n_base = 0;

  task automatic check(input longint ac, input longint bc);
    longint p;
    logic [49:0] split, pv;
    int nd, kk, nlow;
    a_c = 24'(ac); b_c = 24'(bc);
    p = ac * bc;
    pv = 50'(p);
    split = {$urandom(), $urandom()};
    split[0] = 1'b0;
    pc = split;
    ps = pv - split;
    low25 = pv[24:0];
    #1;
    nd = ndigits(p);
    checks += 2;
    if (round_req != (nd > 7)) begin failures++; $display("a=%0d b=%0d req=%b", ac, bc, round_req); end
    if (nd > 7 && int'(d) != nd - 7) begin failures++; $display("a=%0d b=%0d d=%0d expected %0d", ac, bc, d, nd - 7); end
    if (ac != 0 && bc != 0) begin
      kk = lop(ac) + lop(bc);
      checks++;
      if (int'(k) != kk) begin failures++; $display("k=%0d expected %0d", k, kk); end
      nlow = ndigits(longint'(1) << kk);
      if (nd > 7) begin
        if (nd > nlow) n_plus++; else n_base++;
      end
    end
    if (nd > 7) n_req++; else n_noreq++;
  endtask

  initial begin
    check(64'h3885, 64'h1A84C);
    checks++; if (k != 6'd29 || d != 3'd3) failures++;
    check(572363, 115);
    check(9999999, 9999999);
    check(3162277, 3162278);
    for (int i = 0; i < 4000; i++)
      check(longint'($urandom()) % pow10($urandom_range(1, 7)),
            longint'($urandom()) % pow10($urandom_range(1, 7)));
    checks++;
    if (n_req == 0 || n_noreq == 0 || n_plus == 0 || n_base == 0) begin
      failures++; $display("coverage: req %0d noreq %0d d'+1 %0d d' %0d", n_req, n_noreq, n_plus, n_base);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
