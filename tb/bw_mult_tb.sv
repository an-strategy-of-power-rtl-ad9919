// bw_mult_tb: checks the Baugh-Wooley multiplier against signed '*':
// exhaustively at N = 5 and with corner and random operands at the default
// N = 16.
module bw_mult_tb;
  logic signed [4:0]  x5, y5;
  logic signed [9:0]  p5;
  logic signed [15:0] x, y;
  logic signed [31:0] p;
  int checks = 0, failures = 0;
  logic signed [15:0] corner [6] = '{16'sh8000, 16'sh7fff, 16'sh0000, 16'sh0001,
                                     16'shffff, 16'sh4000};

  bw_mult #(.N(5)) dut5 (.x(x5), .y(y5), .p(p5));
  bw_mult          dut  (.x(x),  .y(y),  .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16();
    #1;
    checks++;
    if (p !== 32'(x) * 32'(y)) begin
      failures++;
      $display("FAIL %0d*%0d=%0d", x, y, p);
    end
  endtask

  initial begin
    for (int i = -16; i < 16; i++)
      for (int j = -16; j < 16; j++) begin
        x5 = 5'(i); y5 = 5'(j);
        #1;
        checks++;
        if (int'(p5) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d=%0d", i, j, p5);
        end
      end
    foreach (corner[a]) foreach (corner[b]) begin
      x = corner[a]; y = corner[b];
      check16();
    end
    for (int k = 0; k < 5000; k++) begin
      x = 16'($urandom); y = 16'($urandom);
      check16();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
