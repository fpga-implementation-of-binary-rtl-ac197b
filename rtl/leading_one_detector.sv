// leading_one_detector: position of the most significant 1 of x (bit 0 is
// position 0). For x = 0 the result is 0 and zero is raised. A priority scan
// from the LSB up, so the highest set bit wins. Combinational.
module leading_one_detector #(
  parameter int unsigned W  = 24,
  localparam int unsigned PW = $clog2(W)
) (
  input  logic [W-1:0]  x,
  output logic [PW-1:0] pos,
  output logic          zero
);
  always_comb begin
    pos = '0;
    for (int i = 0; i < W; i++) begin
      if (x[i]) pos = PW'(i);
    end
    zero = (x == '0);
  end
endmodule
