// approx_mult8_tb: exhaustive check of the 8x8 approximate multiplier.
//
// A reference model in this file recomputes every column of the reduction
// from the partial products, using value tables of the three approximate
// cells ({carry,sum} as a 2-bit number) and integer addition for the final
// merge. All 65536 operand pairs are compared with the design. Further checks
// that do not depend on the model: a zero operand gives zero, multiplying by
// one is exact, the result stays within a bounded distance of the exact
// product, each generate OR gate G3..G11 is the OR of its column's generate
// bits, and the number of operand pairs for which such an OR is wrong matches
// the probability of two or more of its inputs being 1 (each 1/16). The mean error distance and the share of exact results are printed.
module approx_mult8_tb;
  logic [7:0]  alpha, beta;
  logic [15:0] prod;
  int checks = 0, failures = 0;

  approx_mult8 dut (.alpha(alpha), .beta(beta), .prod(prod));

  function automatic logic [1:0] ha(logic x1, logic x2);
    // table: 00->0, 01->1, 10->1, 11->3
    case ({x1, x2})
      2'b00: return 2'd0;
      2'b11: return 2'd3;
      default: return 2'd1;
    endcase
  endfunction

  function automatic logic [1:0] fa(logic x1, logic x2, logic x3);
    logic [1:0] t [8] = '{0, 1, 1, 2, 1, 2, 1, 2};
    return t[{x1, x2, x3}];
  endfunction

  function automatic logic [1:0] c42(logic x1, logic x2, logic x3, logic x4);
    logic [1:0] t [16] = '{0, 1, 1, 2, 1, 1, 1, 3, 1, 1, 1, 3, 2, 3, 3, 3};
    return t[{x1, x2, x3, x4}];
  endfunction

  function automatic int model(int al, int be);
    logic a [8][8];
    logic p [8][8];
    logic g [8][8];
    logic G [16];
    logic [1:0] st1 [16];   // stage-1 cell result at its column
    logic [1:0] st2 [16];   // stage-2 cell result at its column
    int r;
    for (int m = 0; m < 8; m++)
      for (int n = 0; n < 8; n++) a[m][n] = ((al >> m) & (be >> n) & 1) != 0;
    for (int m = 0; m < 8; m++)
      for (int n = 0; n < 8; n++) begin
        p[m][n] = a[m][n] || a[n][m];
        g[m][n] = a[m][n] && a[n][m];
      end
    // OR of generate bits g(m,n), m>n, m+n = col
    for (int col = 3; col <= 11; col++) begin
      G[col] = 0;
      for (int m = 0; m < 8; m++)
        for (int n = 0; n < m; n++)
          if (m + n == col) G[col] = G[col] || g[m][n];
    end
    st1[12] = ha(a[7][5], a[5][7]);
    st1[11] = ha(p[7][4], p[6][5]);
    st1[10] = fa(p[7][3], p[6][4], a[5][5]);
    st1[9]  = fa(p[7][2], p[6][3], p[5][4]);
    st1[8]  = c42(p[7][1], p[6][2], p[5][3], a[4][4]);
    st1[7]  = c42(p[7][0], p[6][1], p[5][2], p[4][3]);
    st1[6]  = c42(p[6][0], p[5][1], p[4][2], a[3][3]);
    st1[5]  = fa(p[5][0], p[4][1], p[3][2]);
    st1[4]  = ha(p[4][0], p[3][1]);
    st2[2]  = ha(a[2][0], a[0][2]);
    st2[3]  = fa(p[3][0], p[2][1], G[3]);
    st2[4]  = fa(st1[4][0], a[2][2], G[4]);
    for (int col = 5; col <= 11; col++)
      st2[col] = fa(st1[col][0], G[col], st1[col-1][1]);
    st2[12] = fa(st1[12][0], st1[11][1], a[6][6]);
    st2[13] = fa(a[7][6], a[6][7], st1[12][1]);
    r = int'(a[0][0]) + 2 * (int'(a[1][0]) + int'(a[0][1])) + 4 * int'(a[1][1])
      + (int'(a[7][7]) << 14);
    for (int col = 2; col <= 13; col++) r += int'(st2[col]) << col;
    return r;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Upper bound of |approx - exact|: every approximate cell is off by at most
  // one at its column, an OR of k generate bits by at most k-1.
  function automatic int error_bound();
    int b, ng;
    b = 0;
    for (int col = 4; col <= 12; col++) b += 1 << col;   // stage-1 cells
    for (int col = 2; col <= 13; col++) b += 1 << col;   // stage-2 cells
    for (int col = 3; col <= 11; col++) begin
      ng = 0;
      for (int m = 0; m < 8; m++)
        for (int n = 0; n < m; n++)
          if (m + n == col) ng++;
      b += (ng - 1) << col;
    end
    return b;
  endfunction

  int exp_v, exact, ed;
  int max_ed = 0, n_exact = 0, bound = 0;
  longint sum_ed = 0;
  // per column: operand pairs for which two or more generate bits are 1,
  // i.e. where the OR gate G[col] under-counts
  int or_miss [16] = '{default: 0};

  task automatic run_all();
    bound = error_bound();
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        alpha = 8'(i); beta = 8'(j);
        #1;
        exp_v = model(i, j);
        exact = i * j;
        for (int col = 3; col <= 11; col++) begin
          int ones;
          ones = 0;
          for (int m = 0; m < 8; m++)
            for (int n = 0; n < m; n++)
              if (m + n == col && ((i >> m) & (j >> n) & (i >> n) & (j >> m) & 1) != 0) ones++;
          // the OR output itself must be the OR of the column's generate bits
          checks++;
          if (dut.G[col] != (ones > 0)) begin
            failures++;
            if (failures < 10) $display("FAIL G%0d for %0d*%0d", col, i, j);
          end
          if (ones > 1) or_miss[col]++;
        end
        ed = int'(prod) - exact;
        if (ed < 0) ed = -ed;
        if (ed == 0) n_exact++;
        if (ed > max_ed) max_ed = ed;
        sum_ed += longint'(ed);
        checks++;
        if (int'(prod) != exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d got=%0d model=%0d", i, j, prod, exp_v);
        end
        if (i == 0 || j == 0 || i == 1 || j == 1) begin
          checks++;
          if (int'(prod) != exact) begin
            failures++;
            if (failures < 10) $display("FAIL trivial %0d*%0d got=%0d", i, j, prod);
          end
        end
        checks++;
        if (ed > bound) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d error %0d above bound %0d", i, j, ed, bound);
        end
      end
    // With uniform operands each generate bit is 1 with probability 1/16 and
    // the bits of one column are independent, so an OR of k of them is wrong
    // with probability 1 - (15/16)^k - k (1/16)(15/16)^(k-1). Over all 65536
    // pairs that is exactly 65536 - 15^k 16^(4-k) - k 15^(k-1) 16^(4-k).
    for (int col = 3; col <= 11; col++) begin
      int k, p15, expect_miss;
      k = 0;
      for (int m = 0; m < 8; m++)
        for (int n = 0; n < m; n++)
          if (m + n == col) k++;
      p15 = 1;
      for (int t = 0; t < k - 1; t++) p15 *= 15;
      expect_miss = 65536 - (15 * p15 + k * p15) * (1 << (4 * (4 - k)));
      checks++;
      if (or_miss[col] != expect_miss) begin
        failures++;
        $display("FAIL OR error count column %0d: %0d, expected %0d", col, or_miss[col], expect_miss);
      end
      $display("column %0d: OR of %0d generate bits wrong for %0d of 65536 pairs", col, k, or_miss[col]);
    end
    $display("mean error distance %0d/65536, max %0d (bound %0d), exact results %0d of 65536",
             sum_ed, max_ed, bound, n_exact);
  endtask

  initial begin
    run_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
