// tb_bid_encoder: encodes the worked-example result (-, 112, 6582175) and
// random finite values of every size (both layouts) against the reference
// encoder, and checks infinity and NaN patterns.
module tb_bid_encoder;
  import bid_pkg::*;
  import bid_ref_pkg::*;
  int checks = 0, failures = 0;
  bid_fields_t f;
  logic [31:0] x;

  bid_encoder dut (.f, .x);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nbig = 0;
    f = '{s: 1'b1, e: 8'd112, c: 24'd6582175, cls: CLS_FINITE}; #1;
    checks++; if (x != 32'hB8646F9F) begin failures++; $display("example: %08h", x); end
    f = '{s: 1'b1, e: 8'd112, c: 24'd6582174, cls: CLS_FINITE}; #1;
    checks++; if (x != 32'hB8646F9E) begin failures++; $display("example: %08h", x); end
    f = '{s: 1'b1, e: 8'd0, c: 24'd0, cls: CLS_INF}; #1;
    checks++; if (x != 32'hF800_0000) failures++;
    f = '{s: 1'b0, e: 8'd0, c: 24'd0, cls: CLS_NAN}; #1;
    checks++; if (x != 32'h7C00_0000) failures++;
    for (int i = 0; i < 5000; i++) begin
      f.s   = 1'($urandom());
      f.e   = 8'($urandom_range(0, 191));
      f.c   = 24'($urandom_range(0, 9999999));
      f.cls = CLS_FINITE;
      #1;
      if (f.c >= 24'd8388608) nbig++;
      checks++;
      if (x != ref_encode(f.s, int'(f.e), longint'(f.c))) begin
        failures++;
        $display("s=%b e=%0d c=%0d -> %08h", f.s, f.e, f.c, x);
      end
      // decoding the word must give the fields back
      checks++;
      if (ref_decode(x).c != longint'(f.c) || ref_decode(x).e != int'(f.e)) failures++;
    end
    checks++; if (nbig == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
