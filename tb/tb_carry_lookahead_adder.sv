// tb_carry_lookahead_adder: checks the adder at widths 7, 25 and 50 (including widths that
// are not a multiple of the 4-bit block) with random and corner operands,
// against the simulator's own addition.
module tb_carry_lookahead_adder;
  int checks = 0, failures = 0;

  logic [6:0]  a7,  b7,  s7;   logic c7, ci7;
  logic [24:0] a25, b25, s25;  logic c25, ci25;
  logic [49:0] a50, b50, s50;  logic c50, ci50;

  carry_lookahead_adder #(.W(7))  u7  (.a(a7),  .b(b7),  .cin(ci7),  .sum(s7),  .cout(c7));
  carry_lookahead_adder #(.W(25)) u25 (.a(a25), .b(b25), .cin(ci25), .sum(s25), .cout(c25));
  carry_lookahead_adder #(.W(50)) u50 (.a(a50), .b(b50), .cin(ci50), .sum(s50), .cout(c50));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a7  = 7'($urandom());  b7  = 7'($urandom());  ci7  = 1'($urandom());
      a25 = 25'($urandom()); b25 = 25'($urandom()); ci25 = 1'($urandom());
      a50 = {$urandom(), $urandom()}; b50 = {$urandom(), $urandom()}; ci50 = 1'($urandom());
      if (i % 5 == 0) begin a50 = '1; b50 = 50'(i % 3); a25 = '1; b25 = 25'(i % 2); a7 = '1; b7 = '0; end
      #1;
      checks += 3;
      if ({c7, s7} != 8'(a7) + 8'(b7) + 8'(ci7)) begin
        failures++; $display("W7 %h+%h+%b -> %b %h", a7, b7, ci7, c7, s7);
      end
      if ({c25, s25} != 26'(a25) + 26'(b25) + 26'(ci25)) begin
        failures++; $display("W25 %h+%h+%b -> %b %h", a25, b25, ci25, c25, s25);
      end
      if ({c50, s50} != 51'(a50) + 51'(b50) + 51'(ci50)) begin
        failures++; $display("W50 %h+%h+%b -> %b %h", a50, b50, ci50, c50, s50);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
