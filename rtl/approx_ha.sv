// approx_ha: approximate half-adder.
//
// The exact half-adder sum needs an XOR; here the XOR is replaced by an OR, so
// Sum = x1 | x2 while Carry = x1 & x2 stays exact. The only wrong case is
// x1 = x2 = 1, where the result reads 3 instead of 2: the error is at most one.
// Both the equations and the truth table are the published ones.
// Purely combinational, no clock.
module approx_ha (
  input  logic x1,
  input  logic x2,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = x1 | x2;
    carry = x1 & x2;
  end
endmodule
