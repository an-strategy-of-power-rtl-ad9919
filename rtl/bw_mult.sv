// bw_mult: signed N x N Baugh-Wooley multiplier (the "main block" of the ANT
// multiplier).
//
// Baugh-Wooley turns a two's-complement product into a sum of positive bits.
// Partial product x[i]&y[j] sits in column i+j; it is complemented when exactly
// one of i, j is the sign position N-1; two constant ones are added in columns
// N and 2N-1. The sum, taken modulo 2^(2N), is the signed 2N-bit product.
// Here the bit rows are formed explicitly and summed with word adders, which
// leaves the choice of reduction tree to synthesis. The published design names
// the main block a Baugh-Wooley array of size 16x16; the row-sum form is this
// design's choice.
//
// Interface: x, y signed N-bit; p = x*y, signed 2N-bit. Combinational.
module bw_mult #(
  parameter int unsigned N = 16
) (
  input  logic signed [N-1:0]   x,
  input  logic signed [N-1:0]   y,
  output logic signed [2*N-1:0] p
);
  logic [2*N-1:0] row [N];
  logic [2*N-1:0] acc;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      row[j] = '0;
      for (int i = 0; i < N; i++) begin
        if ((i == N - 1) != (j == N - 1))
          row[j][i+j] = ~(x[i] & y[j]);
        else
          row[j][i+j] = x[i] & y[j];
      end
    end
    acc = '0;
    acc[N]     = 1'b1;
    acc[2*N-1] = 1'b1;
    for (int j = 0; j < N; j++) acc = acc + row[j];
    p = signed'(acc);
  end
endmodule
