// tb_demodulator -- checks the demodulator on its own.
// The bench drives the 16 constellation points (computed from the phase
// with real arithmetic at amplitude 127*127/128, plus small random offsets)
// at sample strobes 4 to 9 clocks apart, and random samples on the cycles in
// between, which must be ignored.  After each strobe the decided Gray word,
// the binary word and the four serial bits (MSB first, in the four cycles
// after the strobe, with serial_valid high) are checked; serial_valid must
// be low when no word is being sent.
module tb_demodulator;
  logic clk = 0, rst_n = 0, sample = 0;
  logic signed [7:0] rx_i = 0, rx_q = 0;
  logic [1:0] sel;
  logic [3:0] gray_word, bin_word;
  logic serial_out, serial_valid;
  int checks = 0, failures = 0;

  demodulator dut (.clk, .rst_n, .rx_i, .rx_q, .sample, .sel, .gray_word,
                   .bin_word, .serial_out, .serial_valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int k, gap, ei, eq;
    real ph;
    repeat (2) @(negedge clk);
    check(!serial_valid, "valid after reset");
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      k = $urandom_range(0, 15);
      ph = (2 * k + 1) * 11.25 * 3.14159265358979 / 180.0;
      ei = $rtoi($floor(126.0 * $cos(ph) + 0.5)) + $urandom_range(0, 8) - 4;
      eq = $rtoi($floor(126.0 * $sin(ph) + 0.5)) + $urandom_range(0, 8) - 4;
      ei = ei > 127 ? 127 : ei < -128 ? -128 : ei;
      eq = eq > 127 ? 127 : eq < -128 ? -128 : eq;
      @(negedge clk);
      sample = 1; rx_i = 8'(ei); rx_q = 8'(eq);
      gap = $urandom_range(4, 9);
      for (int c = 1; c <= gap; c++) begin
        @(negedge clk);
        sample = 0; rx_i = 8'($urandom); rx_q = 8'($urandom);
        if (c <= 4) begin
          check(serial_valid && serial_out == k[4 - c],
                $sformatf("sym %0d bit %0d: out %b valid %b", k, 4 - c, serial_out, serial_valid));
          check(int'(gray_word) == (k ^ (k >> 1)) && int'(bin_word) == k,
                $sformatf("words %b %b for %0d", gray_word, bin_word, k));
        end else begin
          check(!serial_valid, "serial_valid between words");
        end
        if (c == gap) sample = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
