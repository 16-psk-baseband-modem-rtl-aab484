// tb_symbol_mapper -- checks the 16-ary mapper table and its read timing.
// Expected points are computed with real arithmetic: the Gray address is
// inverted by search to the phase index k, the point is at (2k+1)*11.25
// degrees, and each coordinate is cos/sin rounded to two decimals (the
// constellation's 0.98/0.83/0.56/0.20 levels) times 127, rounded.  The bench
// also checks the values printed in a reference modulator simulation and that
// a read appears one clock after rd_en together with a one-cycle valid.
module tb_symbol_mapper;
  logic clk = 0, rst_n = 0, rd_en = 0;
  logic [3:0] addr = 0;
  logic signed [7:0] i_out, q_out;
  logic valid;
  int checks = 0, failures = 0;

  symbol_mapper dut (.clk, .rst_n, .rd_en, .addr, .i_out, .q_out, .valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int level(input real v);
    real r2;
    r2 = $floor(v * 100.0 + 0.5) / 100.0;      // two decimals
    return $rtoi($floor(r2 * 127.0 + 0.5 + 1.0e-9) + ((r2 < 0) ? 0 : 0));
  endfunction

  function automatic int coord(input real v);   // symmetric rounding
    return v < 0 ? -level(-v) : level(v);
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int k, ei, eq;
    real ph;
    repeat (2) @(negedge clk);
    check(i_out == 0 && q_out == 0 && !valid, "reset");
    rst_n = 1;
    for (int g = 0; g < 16; g++) begin
      k = -1;
      for (int b = 0; b < 16; b++) if (((b ^ (b >> 1)) & 15) == g) k = b;
      ph = (2 * k + 1) * 11.25 * 3.14159265358979 / 180.0;
      ei = coord($cos(ph)); eq = coord($sin(ph));
      @(negedge clk); rd_en = 1; addr = 4'(g);
      @(negedge clk); rd_en = 0; addr = 4'($urandom);
      check(valid, "valid after read");
      check(int'(i_out) == ei && int'(q_out) == eq,
            $sformatf("gray %b: got (%0d,%0d) exp (%0d,%0d)", g[3:0], i_out, q_out, ei, eq));
      @(negedge clk);
      check(!valid && int'(i_out) == ei, "output held, valid one cycle");
    end
    // values printed in the reference modulator simulation
    @(negedge clk); rd_en = 1; addr = 4'b0000;
    @(negedge clk); check(i_out == 8'b01111100 && q_out == 8'b00011001, "0000 printed");
    addr = 4'b0001;
    @(negedge clk); check(i_out == 8'b01101001 && q_out == 8'b01000111, "0001 printed");
    addr = 4'b0111;
    @(negedge clk); check(i_out == 8'b10111001, "0111 printed");
    addr = 4'b1011;
    @(negedge clk); check(i_out == 8'b01000111, "1011 printed");
    rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
