// rca: ripple-carry adder used as the vector-merge stage of a multiplier.
//
// Adds two W-bit operands with an explicit chain of exact full-adders, bit 0
// first, and returns a W+1 bit result (the last carry on top). The published
// multiplier names a ripple-carry adder for its final addition; the width
// parameter and the explicit bitwise chain are this design's choice.
// Purely combinational, no clock.
module rca #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   s
);
  logic cy;
  always_comb begin
    cy = 1'b0;
    for (int i = 0; i < W; i++) begin
      s[i] = a[i] ^ b[i] ^ cy;
      cy   = (a[i] & b[i]) | (cy & (a[i] ^ b[i]));
    end
    s[W] = cy;
  end
endmodule
