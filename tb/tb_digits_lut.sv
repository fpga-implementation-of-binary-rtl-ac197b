// tb_digits_lut: for k = 23..46 the LUT must give d' = (digits of 2^k) - 7
// and 10^n = the smallest power of ten above 2^k, computed here by repeated
// multiplication; the example entry k = 29 gives d' = 2 and 10^9.
module tb_digits_lut;
  int checks = 0, failures = 0;
  logic [5:0]  k;
  logic [2:0]  dp;
  logic [46:0] pow10;

  digits_lut dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint p2, p10;
    int     n;
    for (int kk = 23; kk <= 46; kk++) begin
      k = 6'(kk);
      #1;
      p2 = longint'(1) << kk;
      p10 = 1; n = 0;
      while (p10 <= p2) begin p10 *= 10; n++; end
      checks += 2;
      if (int'(dp) != n - 7) begin failures++; $display("k=%0d d'=%0d expected %0d", kk, dp, n - 7); end
      if (longint'(pow10) != p10) begin failures++; $display("k=%0d 10^n=%0d expected %0d", kk, pow10, p10); end
    end
    k = 6'd29; #1;
    checks++; if (dp != 3'd2 || pow10 != 47'd1000000000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
