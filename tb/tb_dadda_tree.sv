// tb_dadda_tree: reduces 10 random 50-bit rows (the multiplier's size) and also
// 4, 6 and 13 rows; sum + carry must equal the sum of the rows (mod 2^W).
module tb_dadda_tree;
  int checks = 0, failures = 0;
  logic [49:0] r10 [10];
  logic [49:0] r4 [4];
  logic [49:0] r6 [6];
  logic [15:0] r13 [13];
  logic [49:0] s10, c10, s4, c4, s6, c6;
  logic [15:0] s13, c13;

  dadda_tree #(.ROWS(10), .W(50)) u10 (.rows(r10), .sum(s10), .carry(c10));
  dadda_tree #(.ROWS(4),  .W(50)) u4  (.rows(r4),  .sum(s4),  .carry(c4));
  dadda_tree #(.ROWS(6),  .W(50)) u6  (.rows(r6),  .sum(s6),  .carry(c6));
  dadda_tree #(.ROWS(13), .W(16)) u13 (.rows(r13), .sum(s13), .carry(c13));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [49:0] e10, e4, e6;
    logic [15:0] e13;
    for (int i = 0; i < 2000; i++) begin
      e10 = '0; e4 = '0; e6 = '0; e13 = '0;
      for (int r = 0; r < 10; r++) begin
        r10[r] = (i % 11 == 0) ? '1 : {$urandom(), $urandom()};
        e10 += r10[r];
      end
      for (int r = 0; r < 4; r++)  begin r4[r] = {$urandom(), $urandom()}; e4 += r4[r]; end
      for (int r = 0; r < 6; r++)  begin r6[r] = {$urandom(), $urandom()}; e6 += r6[r]; end
      for (int r = 0; r < 13; r++) begin r13[r] = (i % 7 == 0) ? '1 : 16'($urandom()); e13 += r13[r]; end
      #1;
      checks += 4;
      if (s10 + c10 != e10) begin failures++; $display("10 rows: %h + %h != %h", s10, c10, e10); end
      if (s4 + c4 != e4)    begin failures++; $display("4 rows wrong"); end
      if (s6 + c6 != e6)    begin failures++; $display("6 rows wrong"); end
      if (s13 + c13 != e13) begin failures++; $display("13 rows wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
