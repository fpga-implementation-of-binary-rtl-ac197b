// tb_split_cpa: ip must equal ps + pc (mod 2^50) and low25 its low 25 bits,
// including cases where the low half carries into the high half, for all
// three adder choices.
module tb_split_cpa;
  import bid_pkg::*;
  int checks = 0, failures = 0;
  logic [49:0] ps, pc, ip_r, ip_l, ip_s;
  logic [24:0] lo_r, lo_l, lo_s;

  split_cpa #(.ADDER(ADD_RCA))  u_r (.ps, .pc, .ip(ip_r), .low25(lo_r));
  split_cpa #(.ADDER(ADD_CLA))  u_l (.ps, .pc, .ip(ip_l), .low25(lo_l));
  split_cpa #(.ADDER(ADD_CSEL)) u_s (.ps, .pc, .ip(ip_s), .low25(lo_s));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [49:0] e;
    int ncarry = 0;
    for (int i = 0; i < 3000; i++) begin
      ps = {$urandom(), $urandom()}; pc = {$urandom(), $urandom()};
      if (i % 5 == 0) begin ps[24:0] = '1; pc[24:0] = 25'd1; end
      #1;
      e = ps + pc;
      if (26'(ps[24:0]) + 26'(pc[24:0]) >= 26'h200_0000) ncarry++;
      checks += 3;
      if (ip_r != e || lo_r != e[24:0]) begin failures++; $display("rca %h %h", ps, pc); end
      if (ip_l != e || lo_l != e[24:0]) begin failures++; $display("cla %h %h", ps, pc); end
      if (ip_s != e || lo_s != e[24:0]) begin failures++; $display("csel %h %h", ps, pc); end
    end
    checks++; if (ncarry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
