// rca_tb: checks the ripple-carry adder against the + operator, exhaustively
// at W = 6 and with random operands at the default width (16).
module rca_tb;
  logic [5:0]  a6, b6;
  logic [6:0]  s6;
  logic [15:0] a, b;
  logic [16:0] s;
  int checks = 0, failures = 0;

  rca #(.W(6)) dut6 (.a(a6), .b(b6), .s(s6));
  rca          dut  (.a(a),  .b(b),  .s(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a6 = 6'(i); b6 = 6'(j);
        #1;
        checks++;
        if (int'(s6) != i + j) begin
          failures++;
          $display("FAIL %0d+%0d=%0d", i, j, s6);
        end
      end
    for (int k = 0; k < 2000; k++) begin
      a = 16'($urandom); b = 16'($urandom);
      if (k == 0) begin a = '1; b = '1; end
      #1;
      checks++;
      if (s != 17'(a) + 17'(b)) begin
        failures++;
        $display("FAIL %0d+%0d=%0d", a, b, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
