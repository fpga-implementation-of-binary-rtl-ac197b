// tb_csa_3to2: sum + carry of the carry-save adder must equal x + y + z
// (mod 2^W), and carry[0] must be 0.
module tb_csa_3to2;
  int checks = 0, failures = 0;
  logic [49:0] x, y, z, sum, carry;
  csa_3to2 #(.W(50)) dut (.*);
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      x = {$urandom(), $urandom()}; y = {$urandom(), $urandom()}; z = {$urandom(), $urandom()};
      if (i % 9 == 0) begin x = '1; y = '1; z = '1; end
      #1;
      checks += 2;
      if (sum + carry != x + y + z) begin failures++; $display("%h %h %h", x, y, z); end
      if (carry[0] != 1'b0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
