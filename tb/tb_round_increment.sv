// tb_round_increment: forms P = IP * w_d in 128-bit arithmetic (w_d from
// its defining formula, not from the LUT), feeds bits 94:47 with v, sign and
// mode, and compares the rounded coefficient and the adjust flag with
// integer division by 10^d and the rounding rule of each mode. Midpoints,
// exact values and results that round up to 10^7 are included.
module tb_round_increment;
  import bid_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [47:0] x;
  logic [4:0]  v;
  logic        sign;
  logic [2:0]  mode;
  logic [23:0] zc;
  logic        adj, inexact;

  round_increment dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_cls [4];
  int n_adj = 0;

  task automatic check(input int dd, input longint ip, input bit sg, input int md);
    logic [127:0] p10, w, pp;
    longint m, q, r, half;
    int ve;
    bit inc, eadj;
    p10 = 128'(pow10(dd));
    ve = 0;
    while ((128'd1 << ve) < p10) ve++;
    w  = ((128'd1 << (47 + ve)) + p10 - 1) / p10;
    pp = 128'(ip) * w;
    x  = pp[94:47];
    v  = 5'(ve);
    sign = sg;
    mode = 3'(md);
    #1;
    m = pow10(dd); q = ip / m; r = ip % m; half = m / 2;
    case (md)
      1: inc = 0;
      2: inc = !sg && r != 0;
      3: inc = sg && r != 0;
      4: inc = r >= half;
      default: inc = r > half || (r == half && q[0]);
    endcase
    q = q + longint'(inc);
    eadj = (q == 10000000);
    if (eadj) q = 1000000;
    n_cls[(r == 0) ? 0 : (r < half) ? 1 : (r == half) ? 2 : 3]++;
    if (eadj) n_adj++;
    checks += 3;
    if (longint'(zc) != q) begin failures++; $display("d=%0d ip=%0d md=%0d s=%b zc=%0d expected %0d", dd, ip, md, sg, zc, q); end
    if (adj != eadj) begin failures++; $display("adj d=%0d ip=%0d", dd, ip); end
    if (inexact != (r != 0)) begin failures++; $display("inexact d=%0d ip=%0d", dd, ip); end
  endtask

  initial begin
    longint ip, m;
    int dd;
    // worked example: 65821745 with d = 1 is a midpoint
    for (int md = 0; md < 5; md++) check(1, 65821745, 1, md);
    for (int i = 0; i < 6000; i++) begin
      dd = $urandom_range(1, 7);
      m = pow10(dd);
      // a 7-digit quotient with a random, zero, half or near-top remainder
      ip = (longint'($urandom_range(1000000, 9999999)) * m);
      case (i % 5)
        0: ip += 0;
        1: ip += m / 2;
        2: ip = 9999999 * m + m - 1;
        default: ip += longint'({$urandom(), $urandom()} % 64'(m));
      endcase
      check(dd, ip, 1'($urandom()), $urandom_range(0, 4));
    end
    checks++;
    if (n_cls[0] == 0 || n_cls[1] == 0 || n_cls[2] == 0 || n_cls[3] == 0 || n_adj == 0) begin
      failures++; $display("coverage gap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
