// tb_gray_decoder -- exhaustive check of the Gray-to-binary decoder.
// The expected binary word is found by searching for the value whose Gray
// code (b xor b>>1) equals the input, and the pairs printed in a reference
// demodulator simulation (0111 -> 0101, 1011 -> 1101, 0110 -> 0100) are checked.
module tb_gray_decoder;
  logic [3:0] gray, bin;
  int checks = 0, failures = 0;

  gray_decoder dut (.gray, .bin);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int exp;
    for (int g = 0; g < 16; g++) begin
      gray = 4'(g); #1;
      exp = -1;
      for (int b = 0; b < 16; b++) if (((b ^ (b >> 1)) & 15) == g) exp = b;
      check(int'(bin) == exp, $sformatf("gray %b bin %b exp %0d", gray, bin, exp));
    end
    gray = 4'b0111; #1 check(bin == 4'b0101, "0111");
    gray = 4'b1011; #1 check(bin == 4'b1101, "1011");
    gray = 4'b0110; #1 check(bin == 4'b0100, "0110");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
