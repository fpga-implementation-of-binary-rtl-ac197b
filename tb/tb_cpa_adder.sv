// tb_cpa_adder: the three adder choices of cpa_adder, side by side at
// width 25, must all equal the simulator's addition.
module tb_cpa_adder;
  import bid_pkg::*;
  int checks = 0, failures = 0;
  logic [24:0] a, b, s_rca, s_cla, s_csel;
  logic        cin, c_rca, c_cla, c_csel;

  cpa_adder #(.W(25), .ADDER(ADD_RCA))  u_rca  (.a, .b, .cin, .sum(s_rca),  .cout(c_rca));
  cpa_adder #(.W(25), .ADDER(ADD_CLA))  u_cla  (.a, .b, .cin, .sum(s_cla),  .cout(c_cla));
  cpa_adder #(.W(25), .ADDER(ADD_CSEL)) u_csel (.a, .b, .cin, .sum(s_csel), .cout(c_csel));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [25:0] expv;
    for (int i = 0; i < 3000; i++) begin
      a = 25'($urandom()); b = 25'($urandom()); cin = 1'($urandom());
      if (i % 7 == 0) begin a = '1; b = 25'(i % 2); end
      #1;
      expv = 26'(a) + 26'(b) + 26'(cin);
      checks += 3;
      if ({c_rca, s_rca} != expv)   begin failures++; $display("rca %h %h", a, b);  end
      if ({c_cla, s_cla} != expv)   begin failures++; $display("cla %h %h", a, b);  end
      if ({c_csel, s_csel} != expv) begin failures++; $display("csel %h %h", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
