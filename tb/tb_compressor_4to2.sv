// tb_compressor_4to2: sum + carry must equal x1 + x2 + x3 + x4 + cin
// (mod 2^W), and carry[0] must be cin.
module tb_compressor_4to2;
  int checks = 0, failures = 0;
  logic [49:0] x1, x2, x3, x4, sum, carry;
  logic        cin;
  compressor_4to2 #(.W(50)) dut (.*);
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      x1 = {$urandom(), $urandom()}; x2 = {$urandom(), $urandom()};
      x3 = {$urandom(), $urandom()}; x4 = {$urandom(), $urandom()};
      cin = 1'($urandom());
      if (i % 9 == 0) begin x1 = '1; x2 = '1; x3 = '1; x4 = '1; cin = 1'b1; end
      #1;
      checks += 2;
      if (sum + carry != x1 + x2 + x3 + x4 + 50'(cin)) begin
        failures++; $display("%h %h %h %h %b", x1, x2, x3, x4, cin);
      end
      if (carry[0] != cin) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
