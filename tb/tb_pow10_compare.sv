// tb_pow10_compare: ge must equal (ps + pc >= 10^n) for random products below
// 10^14 split into random carry-save pairs (pc[0] = 0), for every boundary
// 10^7..10^14, with the values 10^n - 1, 10^n and 10^n + 1 included.
module tb_pow10_compare;
  int checks = 0, failures = 0;
  logic [49:0] ps, pc;
  logic [46:0] pow10;
  logic        ge;

  pow10_compare dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ipv, p;
    logic [49:0] split;
    int n_ge = 0, n_lt = 0;
    for (int i = 0; i < 4000; i++) begin
      p = 10000000;
      for (int j = 0; j < $urandom_range(0, 7); j++) p *= 10;
      case (i % 4)
        0: ipv = p - 1;
        1: ipv = p;
        2: ipv = p + 1;
        default: ipv = longint'({$urandom(), $urandom()} % 64'd100000000000000);
      endcase
      split = {$urandom(), $urandom()};
      split[0] = 1'b0;
      pc = split;
      ps = 50'(ipv) - split;
      pow10 = 47'(p);
      #1;
      checks++;
      if (ge != (ipv >= p)) begin failures++; $display("ip=%0d 10^n=%0d ge=%b", ipv, p, ge); end
      if (ipv >= p) n_ge++; else n_lt++;
    end
    checks++; if (n_ge == 0 || n_lt == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
