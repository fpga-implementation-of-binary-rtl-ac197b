// tb_leading_one_detector: every single-bit value, the worked-example
// coefficients (572363 -> 19, 115 -> 6, 0x3885 -> 13, 0x1A84C -> 16), zero and
// random values against a floor(log2) reference.
module tb_leading_one_detector;
  int checks = 0, failures = 0;
  logic [23:0] x;
  logic [4:0]  pos;
  logic        zero;

  leading_one_detector #(.W(24)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [23:0] v, input int expv);
    x = v;
    #1;
    checks++;
    if (int'(pos) != expv || zero != (v == 0)) begin
      failures++;
      $display("x=%h pos=%0d expected %0d", v, pos, expv);
    end
  endtask

  function automatic int flog2(logic [23:0] v);
    int r = 0;
    while (v > 1) begin v = v >> 1; r++; end
    return r;
  endfunction

  initial begin
    check(24'd572363, 19);
    check(24'd115, 6);
    check(24'h3885, 13);
    check(24'h1A84C, 16);
    check(24'd0, 0);
    for (int i = 0; i < 24; i++) check(24'd1 << i, i);
    for (int i = 0; i < 2000; i++) begin
      logic [23:0] r;
      r = 24'($urandom()) >> $urandom_range(0, 23);
      check(r, flog2(r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
