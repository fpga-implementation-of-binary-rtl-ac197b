// tb_full_adder: exhaustive test of the full adder against a + b + ci.
module tb_full_adder;
  logic a, b, ci, sum, co;
  int checks = 0, failures = 0;
  full_adder dut (.*);
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, ci} = 3'(i);
      #1;
      checks++;
      if ({co, sum} != 2'(a) + 2'(b) + 2'(ci)) begin
        failures++;
        $display("a=%b b=%b ci=%b -> %b%b", a, b, ci, co, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
