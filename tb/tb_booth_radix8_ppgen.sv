// tb_booth_radix8_ppgen: for random and corner 24-bit operands, each of the
// 9 rows must equal the Booth digit of its group times m, shifted by 3i
// (digit = -4 n[3i+2] + 2 n[3i+1] + n[3i] + n[3i-1], the radix-8 table), and
// all rows plus the negation row must add up to m * n (mod 2^50).
module tb_booth_radix8_ppgen;
  int checks = 0, failures = 0;
  logic [23:0] m, n;
  logic [49:0] pp [9];
  logic [49:0] neg;
  int n_digit [9];   // how often each digit value -4..4 was seen

  booth_radix8_ppgen #(.N(24), .W(50)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [49:0] total, row_val;
    logic [27:0] nx;
    int          dig;
    for (int t = 0; t < 3000; t++) begin
      m = 24'($urandom()); n = 24'($urandom());
      if (t == 0) begin m = '1; n = '1; end
      if (t == 1) begin m = '1; n = 24'h924924; end
      if (t == 2) begin m = 24'd0; end
      #1;
      total = neg;
      nx = {3'b000, n, 1'b0};
      for (int i = 0; i < 9; i++) begin
        dig = -4 * int'(nx[3*i+3]) + 2 * int'(nx[3*i+2]) + int'(nx[3*i+1]) + int'(nx[3*i]);
        n_digit[dig + 4]++;
        row_val = (50'(signed'(dig)) * 50'(m)) << (3 * i);
        checks++;
        if (pp[i] + ((50'(neg[3*i])) << (3*i)) != row_val) begin
          failures++;
          $display("row %0d digit %0d m=%h: %h", i, dig, m, pp[i]);
        end
        total += pp[i];
      end
      checks++;
      if (total != 50'(m) * 50'(n)) begin
        failures++;
        $display("sum m=%h n=%h: %h", m, n, total);
      end
    end
    for (int v = 0; v < 9; v++) begin
      checks++;
      if (n_digit[v] == 0) begin failures++; $display("digit %0d never selected", v - 4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
