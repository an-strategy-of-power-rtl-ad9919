// fixed_width_rpr_tb: exhaustive check of the 8-bit fixed-width multiplier.
//
// Reference: the kept columns of the bit matrix add up to x*y minus the
// truncated part T = sum of x[i]&y[j]*2^(i+j) over i+j <= N-3, so the output
// must equal (x*y - T + K) >> N, with K the compensation constant (the mean
// of T plus half an LSB, worked out here in closed form). Also checks the
// accuracy: the output is within 1.5 LSB of x*y / 2^N and its mean error is
// within a quarter LSB of zero.
module fixed_width_rpr_tb;
  localparam int N = 8;
  logic signed [N-1:0] x, y, p;
  int checks = 0, failures = 0;
  int k_const, t, ref_v, max_err_q;
  longint sum_err = 0;   // in units of 2^-N LSB
  int max_abs = 0;

  fixed_width_rpr #(.N(N)) dut (.x(x), .y(y), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_all();
    int e;
    // mean of T: each bit of column c (c+1 of them) is 1 with probability 1/4
    // sum_{c=0}^{N-3} (c+1) 2^c = (N-3) 2^(N-2) + 1
    k_const = (((N - 3) * (1 << (N - 2)) + 1 + 2) >> 2) + (1 << (N - 1));
    for (int i = -128; i < 128; i++)
      for (int j = -128; j < 128; j++) begin
        x = 8'(i); y = 8'(j);
        #1;
        t = 0;
        for (int a = 0; a < N; a++)
          for (int b = 0; b < N; b++)
            if (a + b <= N - 3 && x[a] && y[b]) t += 1 << (a + b);
        ref_v = (i * j - t + k_const) >>> N;
        checks++;
        if (int'(p) != ref_v) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d got=%0d ref=%0d", i, j, p, ref_v);
        end
        e = int'(p) * (1 << N) - i * j;
        sum_err += longint'(e);
        if (e < 0) e = -e;
        if (e > max_abs) max_abs = e;
        checks++;
        if (e > 3 * (1 << (N - 1))) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d error %0d", i, j, e);
        end
      end
  endtask

  initial begin
    run_all();
    checks++;
    if (sum_err > 65536 * 64 || sum_err < -65536 * 64) begin
      failures++;
      $display("FAIL mean error %0d/65536", sum_err);
    end
    $display("mean error %0d/65536, max %0d (units of 2^-%0d LSB)", sum_err, max_abs, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
