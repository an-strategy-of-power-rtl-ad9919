// ant_multiplier_tb: clocked test of the ANT multiplier.
//
// Phase 1, error-free main block: for corner and random operands y_hat must
// equal x*y one clock after x, y are applied, and the replica must never be
// selected (this also checks that the threshold covers the replica's own
// error). Phase 2 imitates a main block run below its critical voltage: the
// main product is overridden for one cycle with a value whose upper bits are
// wrong (large error) or whose low bits are wrong (small error). A large
// error must make the block output the replica's value, (x_hi*y_hi rounded)
// at full weight; a small one must pass through unchanged. Phase 3 flips each
// bit position of the main product in turn and checks which are corrected.
module ant_multiplier_tb;
  logic               clk = 0, rst_n = 0;
  logic signed [15:0] x = 0, y = 0;
  logic signed [31:0] y_hat, ya_q;
  logic signed [7:0]  yr_q;
  logic               use_rpr;
  int checks = 0, failures = 0;
  int n_corrected = 0, n_small_passed = 0, n_clean = 0;
  longint max_gap = 0;

  ant_multiplier dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y), .y_hat(y_hat),
                      .use_rpr(use_rpr), .ya_q(ya_q), .yr_q(yr_q));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply operands, wait one clock, check the clean result
  task automatic clean_op(logic signed [15:0] a, logic signed [15:0] b);
    longint gap;
    @(negedge clk);
    x = a; y = b;
    @(posedge clk);
    #1;
    checks++;
    if (y_hat !== 32'(a) * 32'(b) || use_rpr !== 1'b0) begin
      failures++;
      $display("FAIL clean %0d*%0d got=%0d sel=%b", a, b, y_hat, use_rpr);
    end
    gap = longint'(32'(a) * 32'(b)) - longint'(yr_q) * (longint'(1) << 24);
    if (gap < 0) gap = -gap;
    if (gap > max_gap) max_gap = gap;
    n_clean++;
  endtask

  // apply operands with the main product overridden by flipping bit 'bitpos'
  task automatic faulty_op(logic signed [15:0] a, logic signed [15:0] b, int bitpos);
    logic signed [31:0] bad;
    logic signed [7:0]  rpr;
    longint exp_v, d;
    bad = (32'(a) * 32'(b)) ^ (32'(1) << bitpos);
    @(negedge clk);
    x = a; y = b;
    force dut.ya = bad;
    @(posedge clk);
    #1;
    release dut.ya;
    rpr = yr_q;
    d = longint'(bad) - longint'(rpr) * (longint'(1) << 24);
    if (d < 0) d = -d;
    exp_v = (d > 3 * (longint'(1) << 24)) ? longint'(rpr) * (longint'(1) << 24) : longint'(bad);
    checks++;
    if (longint'(y_hat) != exp_v) begin
      failures++;
      $display("FAIL faulty %0d*%0d bit %0d got=%0d exp=%0d", a, b, bitpos, y_hat, exp_v);
    end
    // the replica itself must be close to x*y
    checks++;
    if (longint'(rpr) * (longint'(1) << 24) - longint'(32'(a) * 32'(b)) > 3 * (longint'(1) << 24) ||
        longint'(32'(a) * 32'(b)) - longint'(rpr) * (longint'(1) << 24) > 3 * (longint'(1) << 24)) begin
      failures++;
      $display("FAIL replica %0d*%0d yr=%0d", a, b, rpr);
    end
    if (use_rpr) n_corrected++;
    else if (y_hat != 32'(a) * 32'(b)) n_small_passed++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (y_hat !== 0 || use_rpr !== 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    clean_op(16'sh7fff, 16'sh7fff);
    clean_op(-16'sh8000, -16'sh8000);
    clean_op(-16'sh8000, 16'sh7fff);
    clean_op(0, 16'sh1234);
    for (int k = 0; k < 20000; k++) clean_op(16'($urandom), 16'($urandom));
    for (int k = 0; k < 500; k++) begin
      faulty_op(16'($urandom), 16'($urandom), 27 + ($urandom % 4));   // large error
      faulty_op(16'($urandom), 16'($urandom), $urandom % 16);         // small error
    end
    // Sweep: which single-bit errors of the main product get corrected.
    // Flipping bit b moves the product by 2^b; with the replica within about
    // 2.3 of its LSBs (2^24 each) and a threshold of 3 LSBs, b <= 23 can never
    // be corrected and b >= 27 always is.
    for (int b = 0; b < 32; b++) begin
      int n0, hits;
      n0 = n_corrected;
      for (int k = 0; k < 50; k++) faulty_op(16'($urandom), 16'($urandom), b);
      hits = n_corrected - n0;
      checks++;
      if ((b <= 23 && hits != 0) || (b >= 27 && hits != 50)) begin
        failures++;
        $display("FAIL bit %0d corrected %0d of 50", b, hits);
      end
      if (b >= 22) $display("main-product bit %0d flipped: corrected %0d of 50", b, hits);
    end
    checks++;
    if (n_corrected == 0 || n_small_passed == 0 || n_clean == 0) begin
      failures++;
      $display("FAIL coverage corrected=%0d small=%0d clean=%0d", n_corrected, n_small_passed, n_clean);
    end
    $display("clean=%0d corrected=%0d small_passed=%0d max|x*y - yr*2^24|=%0d",
             n_clean, n_corrected, n_small_passed, max_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
