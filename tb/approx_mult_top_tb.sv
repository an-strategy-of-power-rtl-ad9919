// approx_mult_top_tb: end-to-end test of both multipliers at their default
// sizes, run concurrently through the top.
//
// ANT multiplier: a stream of random operands, one per clock; each result is
// checked one clock later. Some cycles imitate a voltage-overscaled main
// block by overriding its product: large errors must be replaced by the
// replica's value, small ones passed through. Counted mechanisms: clean
// results, corrections, small errors passed; each must occur.
// Approximate multiplier: random and corner operands; zero and one operands
// must give exact products, every product must stay within the error bound
// of its cells (each approximate cell off by at most one at its column, each
// OR of k generate bits by at most k-1). Counted: exact and approximated
// results; both must occur.
module approx_mult_top_tb;
  logic               clk = 0, rst_n = 0;
  logic signed [15:0] ant_x = 0, ant_y = 0;
  logic signed [31:0] ant_y_hat, ant_ya;
  logic signed [7:0]  ant_yr;
  logic               ant_use_rpr;
  logic [7:0]         am_alpha = 0, am_beta = 0;
  logic [15:0]        am_prod;
  int checks = 0, failures = 0;
  int n_clean = 0, n_corrected = 0, n_small = 0, n_am_exact = 0, n_am_approx = 0;
  // bound: stage-1 cells at columns 4..12, stage-2 cells at 2..13, OR gates
  // at 3..11 with 2,2,3,3,4,3,3,2,2 inputs
  localparam int AM_BOUND = 'h1ff0 + 'h3ffc
                          + (1 << 3) + (1 << 4) + 2 * (1 << 5) + 2 * (1 << 6) + 3 * (1 << 7)
                          + 2 * (1 << 8) + 2 * (1 << 9) + (1 << 10) + (1 << 11);

  approx_mult_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ant_step(logic signed [15:0] a, logic signed [15:0] b, int mode);
    // mode 0: clean, 1: large error injected, 2: small error injected
    logic signed [31:0] exact, bad;
    longint d, scaled;
    exact = 32'(a) * 32'(b);
    bad   = exact ^ (mode == 1 ? (32'(1) << (28 + $urandom % 3)) : 32'(1) << ($urandom % 12));
    @(negedge clk);
    ant_x = a; ant_y = b;
    if (mode != 0) force dut.u_ant.ya = bad;
    @(posedge clk);
    #1;
    if (mode != 0) release dut.u_ant.ya;
    scaled = longint'(ant_yr) * (longint'(1) << 24);
    checks++;
    case (mode)
      0: if (ant_y_hat !== exact || ant_use_rpr) begin
           failures++; $display("FAIL ant clean %0d*%0d -> %0d", a, b, ant_y_hat);
         end else n_clean++;
      1: if (!ant_use_rpr || longint'(ant_y_hat) != scaled) begin
           failures++; $display("FAIL ant large %0d*%0d -> %0d", a, b, ant_y_hat);
         end else n_corrected++;
      default: if (ant_use_rpr || ant_y_hat !== bad) begin
           failures++; $display("FAIL ant small %0d*%0d -> %0d", a, b, ant_y_hat);
         end else n_small++;
    endcase
    // the replica must be within 3 of its LSBs of the exact product
    d = longint'(exact) - scaled;
    checks++;
    if (d > 3 * (longint'(1) << 24) || d < -3 * (longint'(1) << 24)) begin
      failures++; $display("FAIL replica %0d*%0d yr=%0d", a, b, ant_yr);
    end
  endtask

  task automatic am_step(logic [7:0] a, logic [7:0] b);
    int e;
    am_alpha = a; am_beta = b;
    #1;
    e = int'(am_prod) - int'(a) * int'(b);
    if (e < 0) e = -e;
    checks++;
    if (e > AM_BOUND || ((a <= 1 || b <= 1) && e != 0)) begin
      failures++; $display("FAIL am %0d*%0d -> %0d", a, b, am_prod);
    end
    if (e == 0) n_am_exact++; else n_am_approx++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      begin
        ant_step(16'sh7fff, -16'sh8000, 0);
        for (int k = 0; k < 3000; k++) ant_step(16'($urandom), 16'($urandom), int'($urandom % 5 == 0) + int'($urandom % 7 == 0));
      end
      begin
        am_step(0, 8'hff); am_step(8'hff, 1); am_step(8'hff, 8'hff);
        for (int k = 0; k < 3000; k++) am_step(8'($urandom), 8'($urandom));
      end
    join
    checks++;
    if (n_clean == 0 || n_corrected == 0 || n_small == 0 || n_am_exact == 0 || n_am_approx == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("ANT: clean=%0d corrected=%0d small_passed=%0d; approx mult: exact=%0d approximated=%0d",
             n_clean, n_corrected, n_small, n_am_exact, n_am_approx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
