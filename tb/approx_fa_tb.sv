// approx_fa_tb: exhaustive check of the approximate full-adder against its
// truth table (carry, sum), written out by hand. Exact addition except for
// inputs 110 (gives 01) and 111 (gives 10); each wrong case is off by one.
module approx_fa_tb;
  logic x1, x2, x3, sum, carry;
  int checks = 0, failures = 0, wrong = 0;
  // expected {carry,sum} indexed by {x1,x2,x3}
  logic [1:0] exp_tab [8] = '{2'b00, 2'b01, 2'b01, 2'b10,
                              2'b01, 2'b10, 2'b01, 2'b10};

  approx_fa dut (.x1(x1), .x2(x2), .x3(x3), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    for (int v = 0; v < 8; v++) begin
      {x1, x2, x3} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} !== exp_tab[v]) begin
        failures++;
        $display("FAIL in=%b got=%b%b exp=%b", 3'(v), carry, sum, exp_tab[v]);
      end
      d = 2*int'(carry) + int'(sum) - (int'(x1) + int'(x2) + int'(x3));
      if (d != 0) wrong++;
      checks++;
      if (d > 1 || d < -1) begin failures++; $display("FAIL error %0d", d); end
    end
    checks++;
    if (wrong != 2) begin failures++; $display("FAIL wrong cases %0d", wrong); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
