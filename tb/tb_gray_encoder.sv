// tb_gray_encoder -- exhaustive check of the binary-to-Gray encoder.
// The expected code is built bit by bit (g3 = b3, gk = b(k+1) xor bk); the
// test also checks that consecutive binary values give codes one bit apart
// and the pairs printed in a reference simulation (0101 -> 0111, 1101 -> 1011).
module tb_gray_encoder;
  logic [3:0] bin, gray;
  int checks = 0, failures = 0;

  gray_encoder dut (.bin, .gray);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [3:0] exp, prev;
    for (int b = 0; b < 16; b++) begin
      bin = 4'(b); #1;
      exp[3] = bin[3];
      for (int k = 0; k < 3; k++) exp[k] = bin[k+1] != bin[k];
      check(gray === exp, $sformatf("bin %b gray %b exp %b", bin, gray, exp));
      if (b > 0) check($countones(gray ^ prev) == 1, $sformatf("adjacency at %0d", b));
      prev = gray;
    end
    bin = 4'b0101; #1 check(gray == 4'b0111, "0101");
    bin = 4'b1101; #1 check(gray == 4'b1011, "1101");
    bin = 4'b1001; #1 check(gray == 4'b1101, "1001");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
