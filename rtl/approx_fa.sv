// approx_fa: approximate full-adder.
//
// One of the two XORs of the exact full-adder is replaced by an OR:
// W = x1 | x2, Sum = W ^ x3, Carry = W & x3. Inputs 110 give 01 (exact 10)
// and 111 give 10 (exact 11), so two of eight cases are wrong, each by one.
// Equations and truth table follow the published design; which partial
// product feeds which input is a choice of the multiplier that uses it.
// Purely combinational, no clock.
module approx_fa (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  output logic sum,
  output logic carry
);
  logic w;
  always_comb begin
    w     = x1 | x2;
    sum   = w ^ x3;
    carry = w & x3;
  end
endmodule
