// gmean_filter_tb: 3x3 geometric-mean image filter run on the 8x8
// approximate multiplier, compared with the same filter on an exact
// multiplier.
//
// A geometric-mean filter replaces each pixel by the ninth root of the
// product of its 3x3 neighbourhood; it removes Gaussian noise while keeping
// edges better than an arithmetic mean. Here the image is generated in the
// testbench: 48x48 pixels of 8 bits, a smooth gradient with a bright square,
// plus approximately Gaussian noise (sum of four uniform values). The nine
// pixels are multiplied one at a time on an 8x8 multiplier in a block
// floating-point form: the running product keeps an 8-bit mantissa with its
// top bit set and an exponent, and after each multiplication the 16-bit
// result is normalised back to 8 bits (truncating). The ninth root is taken
// in real arithmetic. The filter is run twice, with the exact product and
// with approx_mult8, and the PSNR of the approximate result against the
// exact one is reported and must reach 25 dB (a floor for a usable image,
// not a published figure). Border pixels are left out.
module gmean_filter_tb;
  localparam int W = 48, H = 48;
  logic [7:0]  alpha, beta;
  logic [15:0] prod;
  int checks = 0, failures = 0;
  logic [7:0] img [H][W];
  int n_mults = 0, n_diff = 0;
  real se = 0.0;

  approx_mult8 dut (.alpha(alpha), .beta(beta), .prod(prod));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // multiply on the exact or the approximate multiplier
  task automatic mul(input logic [7:0] a, input logic [7:0] b, input bit approx,
                     output logic [15:0] r);
    if (approx) begin
      alpha = a; beta = b;
      #1;
      r = prod;
      n_mults++;
      if (prod != 16'(a) * 16'(b)) n_diff++;
    end else begin
      r = 16'(a) * 16'(b);
    end
  endtask

  // geometric mean of the 3x3 block centred on (y, x)
  task automatic gmean(input int y, input int x, input bit approx, output real g);
    logic [7:0]  m;
    logic [15:0] r;
    int          e;
    m = 8'h80; e = -7;        // 1.0 as mantissa 128 * 2^-7
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++) begin
        mul(m, img[y+dy][x+dx], approx, r);
        if (r == 0) begin
          m = 0;
        end else begin
          // normalise: keep the 8 bits from the leading one down
          int lead;
          lead = 0;
          for (int b = 0; b < 16; b++) if (r[b]) lead = b;
          if (lead >= 7) begin
            m = 8'(r >> (lead - 7));
            e += lead - 7;
          end else begin
            m = 8'(r << (7 - lead));
            e -= 7 - lead;
          end
        end
      end
    if (m == 0) g = 0.0;
    else g = $exp(($ln(real'(m)) + real'(e) * $ln(2.0)) / 9.0);
  endtask

  initial begin
    real ge, ga, psnr;
    int npix, v;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        v = 40 + 2 * x + y;
        if (x > 14 && x < 34 && y > 14 && y < 34) v += 80;
        v += int'($urandom % 21) + int'($urandom % 21) + int'($urandom % 21)
           + int'($urandom % 21) - 40;
        if (v < 1) v = 1;
        if (v > 255) v = 255;
        img[y][x] = 8'(v);
      end
    npix = 0;
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++) begin
        gmean(y, x, 1'b0, ge);
        gmean(y, x, 1'b1, ga);
        se += (ge - ga) * (ge - ga);
        npix++;
        // the filtered value stays within the range of the pixels
        checks++;
        if (ga < 0.0 || ga > 256.0) begin
          failures++;
          $display("FAIL pixel (%0d,%0d) = %f", y, x, ga);
        end
      end
    if (se == 0.0) psnr = 99.0;
    else psnr = 10.0 * $log10(255.0 * 255.0 / (se / real'(npix)));
    $display("pixels %0d, multiplications %0d, approximate products %0d, PSNR %f dB",
             npix, n_mults, n_diff, psnr);
    checks++;
    if (psnr < 25.0 || n_diff == 0) begin
      failures++;
      $display("FAIL PSNR %f", psnr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
