// ant_ecb: error-correction block of an algorithmic-noise-tolerant multiplier.
//
// The main block's product ya may be corrupted when the main block runs on a
// supply below its critical voltage; the reduced-precision replica's product
// yr is coarse but always right. The block scales yr up to the weight of ya,
// forms the difference ya - yr, and compares its magnitude with a threshold.
// If |ya - yr| > TH the main result is taken as wrong and the replica's
// result is passed on; otherwise ya is passed on unchanged.
// Subtractor, |.| > Th comparator and multiplexer are the published
// structure; the threshold value and the output format (the replica result
// shifted to full width, low bits zero) are this design's choice.
//
// Interface: ya signed YA_W bits, yr signed YR_W bits with its LSB at weight
// 2^SHIFT of ya; y_hat is YA_W bits; use_rpr is the multiplexer select.
// Combinational.
module ant_ecb #(
  parameter int unsigned YA_W  = 32,
  parameter int unsigned YR_W  = 8,
  parameter int unsigned SHIFT = 24,
  parameter logic [YA_W:0] TH  = (YA_W+1)'(3) << 24
) (
  input  logic signed [YA_W-1:0] ya,
  input  logic signed [YR_W-1:0] yr,
  output logic signed [YA_W-1:0] y_hat,
  output logic                   use_rpr
);
  logic signed [YA_W-1:0] yr_full;
  logic signed [YA_W:0]   diff;
  logic        [YA_W:0]   mag;

  always_comb begin
    yr_full = YA_W'(yr) <<< SHIFT;
    diff    = (YA_W+1)'(ya) - (YA_W+1)'(yr_full);
    mag     = diff[YA_W] ? -diff : diff;
    use_rpr = mag > TH;
    y_hat   = use_rpr ? yr_full : ya;
  end
endmodule
