// tb_booth_multiplier: ps + pc must equal m * n + s + c + cin (mod 2^50), for
// the Dadda and the Wallace tree and for each final-adder choice of the 3m
// adder, with random and corner operands. pc[0] must equal cin.
module tb_booth_multiplier;
  import bid_pkg::*;
  int checks = 0, failures = 0;
  logic [23:0] m, n;
  logic [49:0] s, c;
  logic        cin;
  logic [49:0] ps_d, pc_d, ps_w, pc_w, ps_r, pc_r;

  booth_multiplier #(.TREE(TREE_DADDA),   .ADDER(ADD_CLA))  u_d (.m, .n, .s, .c, .cin, .ps(ps_d), .pc(pc_d));
  booth_multiplier #(.TREE(TREE_WALLACE), .ADDER(ADD_CSEL)) u_w (.m, .n, .s, .c, .cin, .ps(ps_w), .pc(pc_w));
  booth_multiplier #(.TREE(TREE_WALLACE), .ADDER(ADD_RCA))  u_r (.m, .n, .s, .c, .cin, .ps(ps_r), .pc(pc_r));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [49:0] expv;
    for (int t = 0; t < 3000; t++) begin
      m = 24'($urandom()); n = 24'($urandom());
      s = (t % 2) ? {$urandom(), $urandom()} : '0;
      c = (t % 3 == 0) ? {$urandom(), $urandom()} : '0;
      cin = (t % 4 == 0) ? 1'($urandom()) : 1'b0;
      if (t == 0) begin m = '1; n = '1; s = '0; c = '0; cin = 0; end
      if (t == 1) begin m = 24'd9999999; n = 24'd9999999; s = '0; c = '0; cin = 0; end
      #1;
      expv = 50'(m) * 50'(n) + s + c + 50'(cin);
      checks += 3;
      if (ps_d + pc_d != expv) begin failures++; $display("dadda m=%h n=%h", m, n); end
      if (ps_w + pc_w != expv) begin failures++; $display("wallace m=%h n=%h", m, n); end
      if (ps_r + pc_r != expv) begin failures++; $display("wallace/rca m=%h n=%h", m, n); end
      checks++;
      if (pc_d[0] != cin || pc_w[0] != cin) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
