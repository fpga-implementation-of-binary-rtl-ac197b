// full_adder: adds three bits (a, b and carry-in ci).
// sum = a XOR b XOR ci; co = majority(a, b, ci). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic sum,
  output logic co
);
  assign sum = a ^ b ^ ci;
  assign co  = (a & b) | (b & ci) | (a & ci);
endmodule
