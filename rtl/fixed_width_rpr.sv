// fixed_width_rpr: N x N signed fixed-width multiplier with truncation-error
// compensation, used as the reduced-precision replica (RPR) of the ANT
// multiplier.
//
// A fixed-width multiplier returns only the upper N bits of the 2N-bit
// product and drops most of the partial products below them. It uses the
// same Baugh-Wooley bit matrix as the main block (bw_mult), split into:
//   - the most significant part, columns N..2N-1, kept exactly;
//   - column N-1 (input correction vector, ICV) and column N-2 (minor input
//     correction vector, MICV), which are kept and added with their weights,
//     so the carry they would have sent into the kept part is recovered;
//   - columns 0..N-3, the truncated part, which are not built. Their mean
//     value (every AND bit there is 1 with probability 1/4) is added as a
//     constant, together with one half LSB for rounding.
// The output is bits 2N-1..N of that sum. The compensation adders sit beside
// the kept array, not in series with it, so they add no delay to the array.
// The split into a kept part, ICV and MICV follows the published structure;
// the exact correction formula is not published and is this design's own:
// the ICV/MICV columns added exactly plus a constant for the mean of the rest.
//
// Interface: x, y signed N-bit; p ~ (x*y) / 2^N, signed N-bit. Combinational.
module fixed_width_rpr #(
  parameter int unsigned N = 8
) (
  input  logic signed [N-1:0] x,
  input  logic signed [N-1:0] y,
  output logic signed [N-1:0] p
);
  // mean of the truncated columns 0..N-3 plus half an output LSB
  function automatic int unsigned comp_const(int unsigned n);
    int unsigned s;
    s = 0;
    for (int unsigned c = 0; c + 2 < n; c++) s += (c + 1) << c;
    return ((s + 2) >> 2) + (1 << (n - 1));
  endfunction

  localparam int unsigned COMP = comp_const(N);

  logic [2*N-1:0] row [N];
  logic [2*N-1:0] acc;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      row[j] = '0;
      for (int i = 0; i < N; i++) begin
        // only columns N-2 and above are built
        if (i + j >= N - 2) begin
          if ((i == N - 1) != (j == N - 1))
            row[j][i+j] = ~(x[i] & y[j]);
          else
            row[j][i+j] = x[i] & y[j];
        end
      end
    end
    acc = (2*N)'(COMP);
    acc = acc + ((2*N)'(1) << N) + ((2*N)'(1) << (2*N-1));
    for (int j = 0; j < N; j++) acc = acc + row[j];
    p = signed'(acc[2*N-1:N]);
  end
endmodule
