// ant_ecb_tb: checks the ANT error-correction block. For random and
// threshold-edge inputs the expected output is worked out with integer
// arithmetic: the replica value scaled by 2^SHIFT is output when
// |ya - scaled| > TH, ya otherwise.
module ant_ecb_tb;
  localparam int SHIFT = 24;
  localparam longint TH = 3 * (longint'(1) << SHIFT);
  logic signed [31:0] ya, y_hat;
  logic signed [7:0]  yr;
  logic               use_rpr;
  int checks = 0, failures = 0, n_sel = 0, n_keep = 0;

  ant_ecb dut (.ya(ya), .yr(yr), .y_hat(y_hat), .use_rpr(use_rpr));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint scaled, d;
    logic   exp_sel;
    #1;
    scaled  = longint'(yr) * (longint'(1) << SHIFT);
    d       = longint'(ya) - scaled;
    if (d < 0) d = -d;
    exp_sel = d > TH;
    checks++;
    if (use_rpr !== exp_sel ||
        longint'(y_hat) != (exp_sel ? scaled : longint'(ya))) begin
      failures++;
      $display("FAIL ya=%0d yr=%0d got=%0d sel=%b", ya, yr, y_hat, use_rpr);
    end
    if (exp_sel) n_sel++; else n_keep++;
  endtask

  initial begin
    for (int k = 0; k < 3000; k++) begin
      yr = 8'($urandom);
      // near the replica value, or anywhere
      if (k % 2 == 0)
        ya = 32'(longint'(yr) * (longint'(1) << SHIFT) + longint'($signed($urandom % 200_000_000)) - 100_000_000);
      else
        ya = 32'($urandom);
      check();
    end
    // exactly at and just past the threshold, both signs
    for (int s = 0; s < 2; s++)
      for (int off = 0; off < 2; off++) begin
        yr = 8'sd10;
        ya = 32'(longint'(yr) * (longint'(1) << SHIFT) + (s != 0 ? -longint'(1) : longint'(1)) * (TH + longint'(off)));
        check();
      end
    checks++;
    if (n_sel == 0 || n_keep == 0) begin
      failures++;
      $display("FAIL coverage sel=%0d keep=%0d", n_sel, n_keep);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
