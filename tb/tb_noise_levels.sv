// tb_noise_levels -- the modem with pseudo-random noise added to the
// received samples, at five noise levels.
//
// The modulator's filter outputs pass through a noise adder before the
// demodulator: each sample gets a value drawn from a 15-bit maximal-length
// PN generator (x^15 + x^14 + 1) and scaled to the range [-A, +A], and the sum
// is saturated to 8 bits.  Levels 1..5 use A = 2, 4, 7, 15, 31.
// The smallest distance from a noiseless symbol-centre value to a decision
// boundary is 8 codes (|Q| = 123 against C1 = 115), so levels 1..3 (A <= 7) must give no bit error at all; at
// level 5 (A = 31) errors must occur.  The bench prints the bit-error count
// of every level.
module tb_noise_levels;
  localparam int LATENCY = 22;
  localparam int SYMS = 600;
  localparam int AMP [5] = '{2, 4, 7, 15, 31};

  logic clk = 0, rst_n = 0, en = 0, serial_in = 0;
  logic [1:0] tx_sel, rx_sel;
  logic [3:0] tx_bin, tx_gray, rx_gray, rx_bin;
  logic signed [7:0] map_i, map_q, lpf_i, lpf_q, rx_i, rx_q;
  logic sym_center, serial_out, serial_valid;
  logic [14:0] pn = 15'h1;
  int amp = 0;
  int checks = 0, failures = 0, cycle = 0;
  int bit_cyc[$], bit_val[$];
  int errors = 0, nbits = 0;

  modulator u_mod (.clk, .rst_n, .en, .serial_in, .sel(tx_sel), .bin_word(tx_bin),
                   .gray_word(tx_gray), .map_i, .map_q, .lpf_i, .lpf_q, .sym_center);

  demodulator u_demod (.clk, .rst_n, .rx_i, .rx_q, .sample(sym_center), .sel(rx_sel),
                       .gray_word(rx_gray), .bin_word(rx_bin), .serial_out, .serial_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // PN generator, stepped twice per clock (one value for I, one for Q)
  function automatic logic [14:0] pn_step(input logic [14:0] s);
    return {s[13:0], s[14] ^ s[13]};
  endfunction

  function automatic int scaled(input logic [14:0] s, input int a);
    return int'(s % (2 * a + 1)) - a;
  endfunction

  function automatic logic signed [7:0] sat8(input int v);
    return 8'(v > 127 ? 127 : v < -128 ? -128 : v);
  endfunction

  logic [14:0] pn2;
  always_comb pn2 = pn_step(pn);
  always_comb begin
    rx_i = sat8(int'(lpf_i) + scaled(pn, amp));
    rx_q = sat8(int'(lpf_q) + scaled(pn2, amp));
  end
  always @(posedge clk) pn <= pn_step(pn2);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge clk) if (rst_n && bit_cyc.size() > 0 && bit_cyc[0] == cycle) begin
    void'(bit_cyc.pop_front());
    nbits++;
    if (!serial_valid || int'(serial_out) != bit_val.pop_front()) errors++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int s;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int lvl = 0; lvl < 5; lvl++) begin
      amp = AMP[lvl];
      errors = 0; nbits = 0;
      @(negedge clk);
      while (tx_sel != 2'd0) @(negedge clk);
      for (int n = 0; n < SYMS; n++) begin
        s = $urandom_range(0, 15);
        for (int b = 3; b >= 0; b--) begin
          bit_cyc.push_back(cycle + LATENCY + 3 - b); bit_val.push_back((s >> b) & 1);
        end
        en = 1;
        for (int b = 3; b >= 0; b--) begin serial_in = s[b]; @(negedge clk); end
      end
      en = 0;
      repeat (40) @(negedge clk);
      $display("noise level %0d (+-%0d codes): %0d bit errors in %0d bits", lvl + 1, amp, errors, nbits);
      check(nbits == 4 * SYMS, "all bits came out");
      if (amp <= 7) check(errors == 0, $sformatf("errors inside the decision margin at level %0d", lvl + 1));
      if (lvl == 4) check(errors > 0, "no errors at the highest level");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
