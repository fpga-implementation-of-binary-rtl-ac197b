// tb_bid_decoder: decodes the worked-example operands, both coefficient
// layouts, non-canonical coefficients and special values, then random words,
// against the reference decoder.
module tb_bid_decoder;
  import bid_pkg::*;
  import bid_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] x;
  bid_fields_t f;

  bid_decoder dut (.x, .f);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] w);
    ref_op_t o;
    x = w;
    #1;
    o = ref_decode(w);
    checks++;
    if (f.cls != operand_class_e'(o.cls) ||
        (o.cls == 0 && (f.s != o.s || int'(f.e) != o.e || longint'(f.c) != o.c))) begin
      failures++;
      $display("x=%08h -> s=%b e=%0d c=%0d cls=%0d", w, f.s, f.e, f.c, f.cls);
    end
  endtask

  initial begin
    // 5B08BBCB = (+, 182, 572363); 8F000073 = (-, 30, 115)
    x = 32'h5B08BBCB; #1;
    checks++; if (f.s != 0 || f.e != 8'd182 || f.c != 24'd572363) failures++;
    x = 32'h8F000073; #1;
    checks++; if (f.s != 1 || f.e != 8'd30 || f.c != 24'd115) failures++;
    // 11 layout: 9999999 = 0x98967F -> low 21 bits 0x18967F
    x = {1'b0, 2'b11, 8'd101, 21'h18967F}; #1;
    checks++; if (f.c != 24'd9999999 || f.e != 8'd101) failures++;
    // non-canonical 11-layout coefficient reads as 0
    x = {1'b1, 2'b11, 8'd101, 21'h1FFFFF}; #1;
    checks++; if (f.c != 24'd0) failures++;
    x = 32'h7800_0000; #1; checks++; if (f.cls != CLS_INF) failures++;
    x = 32'hFC00_0000; #1; checks++; if (f.cls != CLS_NAN) failures++;
    for (int i = 0; i < 5000; i++) check((i % 2) ? $urandom() : rand_operand());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
