// approx_comp42: approximate 4-2 compressor.
//
// Counts four equally weighted bits into two outputs (carry has weight 2).
// An exact count needs three output bits only when all four inputs are 1;
// this cell drops the third bit and returns 3 for that case. The sum uses
// one OR in place of an XOR plus the all-ones term W1&W2:
//   W1 = x1&x2, W2 = x3&x4
//   Sum   = (x1^x2) | (x3^x4) | (W1&W2)
//   Carry = W1 | W2
// All-zero inputs give zero outputs. The equations are the published ones.
// Purely combinational, no clock.
module approx_comp42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  output logic sum,
  output logic carry
);
  logic w1, w2;
  always_comb begin
    w1    = x1 & x2;
    w2    = x3 & x4;
    sum   = (x1 ^ x2) | (x3 ^ x4) | (w1 & w2);
    carry = w1 | w2;
  end
endmodule
