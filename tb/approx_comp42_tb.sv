// approx_comp42_tb: exhaustive check of the approximate 4-2 compressor.
// The expected value carry*2+sum for each of the 16 inputs is written out
// by hand: the exact count of ones, except 3 for four ones and 1 for the
// four inputs 0101, 0110, 1001, 1010. Also checks: five wrong cases, each
// off by one, and zero output for zero input.
module approx_comp42_tb;
  logic x1, x2, x3, x4, sum, carry;
  int checks = 0, failures = 0, wrong = 0;
  // expected value indexed by {x1,x2,x3,x4}
  int exp_val [16] = '{0, 1, 1, 2, 1, 1, 1, 3, 1, 1, 1, 3, 2, 3, 3, 3};

  approx_comp42 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got, d;
    for (int v = 0; v < 16; v++) begin
      {x1, x2, x3, x4} = 4'(v);
      #1;
      got = 2*int'(carry) + int'(sum);
      checks++;
      if (got != exp_val[v]) begin
        failures++;
        $display("FAIL in=%b got=%0d exp=%0d", 4'(v), got, exp_val[v]);
      end
      d = got - $countones(4'(v));
      if (d != 0) wrong++;
      checks++;
      if (d > 1 || d < -1) begin failures++; $display("FAIL error %0d", d); end
    end
    checks++;
    if (wrong != 5) begin failures++; $display("FAIL wrong cases %0d", wrong); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
