// tb_recip_lut: for d = 1..7, v must be the least width with 2^v >= 10^d and
// w_d must be ceil(2^(47+v) / 10^d), both computed here with 128-bit
// arithmetic.
module tb_recip_lut;
  int checks = 0, failures = 0;
  logic [2:0]  d;
  logic [47:0] wd;
  logic [4:0]  v;

  recip_lut dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] p10, num, w;
    int           ve;
    for (int dd = 1; dd <= 7; dd++) begin
      d = 3'(dd);
      #1;
      p10 = 1;
      for (int i = 0; i < dd; i++) p10 = p10 * 10;
      ve = 0;
      while ((128'd1 << ve) < p10) ve++;
      num = 128'd1 << (47 + ve);
      w = (num + p10 - 1) / p10;
      checks += 2;
      if (int'(v) != ve) begin failures++; $display("d=%0d v=%0d expected %0d", dd, v, ve); end
      if (128'(wd) != w) begin failures++; $display("d=%0d wd=%h expected %h", dd, wd, w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
