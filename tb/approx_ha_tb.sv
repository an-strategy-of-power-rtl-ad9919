// approx_ha_tb: exhaustive check of the approximate half-adder against its
// truth table (carry, sum), written out here by hand: 00->00, 01->01, 10->01,
// 11->11. Also checks that only one case differs from exact addition.
module approx_ha_tb;
  logic x1, x2, sum, carry;
  int checks = 0, failures = 0, wrong = 0;
  // expected {carry,sum} indexed by {x1,x2}
  logic [1:0] exp_tab [4] = '{2'b00, 2'b01, 2'b01, 2'b11};

  approx_ha dut (.x1(x1), .x2(x2), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x1, x2} = 2'(v);
      #1;
      checks++;
      if ({carry, sum} !== exp_tab[v]) begin
        failures++;
        $display("FAIL in=%b got=%b%b exp=%b", 2'(v), carry, sum, exp_tab[v]);
      end
      if (2*int'(carry) + int'(sum) != int'(x1) + int'(x2)) wrong++;
    end
    checks++;
    if (wrong != 1) begin failures++; $display("FAIL wrong cases %0d", wrong); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
