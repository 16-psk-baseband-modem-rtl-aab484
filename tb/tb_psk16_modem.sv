// tb_psk16_modem -- end-to-end test of the 16-PSK modem at its default size.
//
// Serial data goes in, the modulator's filter outputs loop into the
// demodulator, and the recovered serial data must equal the input, bit for
// bit, exactly 22 clocks later.  The bench also keeps its own model of the
// transmit filters (coefficients recomputed from the raised cosine with real
// arithmetic, products floored, sums modulo 2^8) and checks tx_i/tx_q on
// every clock.
//
// Stimulus: first the symbol sequence of a published reference simulation
// (binary 0000, 0001, 0101, 1101, 1001, 0100), whose mapper and Gray values
// are checked; then random symbols sent back to back; then random symbols
// with whole idle symbol periods between them.
// Mechanisms counted (each must occur): all 16 constellation points sent,
// idle symbol periods, product truncation (a product with non-zero dropped
// fraction bits), carry truncation (a filter output whose exact sum lies
// outside the 8-bit range and wraps), back-to-back symbols.
module tb_psk16_modem;
  localparam int N = 33;
  localparam int LATENCY = 22;
  localparam int IMPULSE = 5;      // first bit to filter input

  logic clk = 0, rst_n = 0, en = 0, serial_in = 0;
  logic signed [7:0] tx_i, tx_q, map_i, map_q;
  logic serial_out, serial_valid;
  logic [3:0] tx_bin, tx_gray, rx_gray, rx_bin;
  logic [1:0] tx_sel, rx_sel;

  int checks = 0, failures = 0, cycle = 0;
  int coef [N];
  int hist_i [N], hist_q [N];
  int imp_cyc[$], imp_i[$], imp_q[$];   // pending filter impulses
  int bit_cyc[$], bit_val[$];           // expected serial output bits
  int rx_gray_exp[$];
  int seen [16];
  int n_idle = 0, n_prod_trunc = 0, n_wrap = 0, n_b2b = 0, n_bits = 0;

  psk16_modem dut (.clk, .rst_n, .en, .serial_in, .tx_i, .tx_q, .serial_out,
                   .serial_valid, .tx_sel, .rx_sel, .tx_bin, .tx_gray, .map_i, .map_q, .rx_gray, .rx_bin);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d %s", cycle, what); end
  endtask

  function automatic real h_of(input real t);
    real s, pi;
    pi = 3.14159265358979;
    s = (t == 0.0) ? 1.0 : $sin(pi * t) / (pi * t);
    return $cos(2.0 * pi * 0.25 * t) / (1.0 - (t * t)) * s;
  endfunction

  function automatic int fdiv128(input int v);
    return (v >= 0) ? v / 128 : -((-v + 127) / 128);
  endfunction

  function automatic int coord(input real v);
    real a;
    a = $floor((v < 0 ? -v : v) * 100.0 + 0.5) / 100.0;
    return (v < 0 ? -1 : 1) * $rtoi($floor(a * 127.0 + 0.5));
  endfunction

  function automatic int wrap8(input int v);
    int w;
    w = v & 255;
    return w >= 128 ? w - 256 : w;
  endfunction

  // bench model of the two transmit filters, compared every clock
  always @(negedge clk) if (rst_n) begin
    int xi, xq, si, sq;
    xi = 0; xq = 0;
    if (imp_cyc.size() > 0 && imp_cyc[0] == cycle) begin
      void'(imp_cyc.pop_front()); xi = imp_i.pop_front(); xq = imp_q.pop_front();
    end
    for (int k = N - 1; k > 0; k--) begin hist_i[k] = hist_i[k-1]; hist_q[k] = hist_q[k-1]; end
    hist_i[0] = xi; hist_q[0] = xq;
    si = 0; sq = 0;
    for (int k = 0; k < N; k++) begin
      si += fdiv128(hist_i[k] * coef[k]);
      sq += fdiv128(hist_q[k] * coef[k]);
      if ((hist_i[k] * coef[k]) % 128 != 0) n_prod_trunc++;
    end
    if (si > 127 || si < -128 || sq > 127 || sq < -128) n_wrap++;
    check(int'(tx_i) == wrap8(si) && int'(tx_q) == wrap8(sq),
          $sformatf("tx (%0d,%0d) exp (%0d,%0d)", tx_i, tx_q, wrap8(si), wrap8(sq)));
  end

  // recovered bits: right value, right cycle
  always @(negedge clk) if (rst_n) begin
    if (bit_cyc.size() > 0 && bit_cyc[0] == cycle) begin
      void'(bit_cyc.pop_front());
      check(serial_valid && int'(serial_out) == bit_val.pop_front(),
            $sformatf("serial_out %b valid %b", serial_out, serial_valid));
      n_bits++;
    end else begin
      check(!serial_valid, "serial_valid with no bit due");
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // one symbol on the next symbol boundary
  task automatic send(input int s, input int idle_periods);
    int k, c0;
    real ph;
    @(negedge clk);
    while (tx_sel != 2'd0) begin en = 0; @(negedge clk); end
    repeat (4 * idle_periods) begin en = 0; @(negedge clk); end
    if (idle_periods > 0) n_idle++;
    else if (en) n_b2b++;
    c0 = cycle;
    k = s;
    ph = (2 * k + 1) * 11.25 * 3.14159265358979 / 180.0;
    imp_cyc.push_back(c0 + IMPULSE); imp_i.push_back(coord($cos(ph))); imp_q.push_back(coord($sin(ph)));
    for (int b = 3; b >= 0; b--) begin bit_cyc.push_back(c0 + LATENCY + 3 - b); bit_val.push_back((s >> b) & 1); end
    seen[s]++;
    en = 1; serial_in = s[3];
    for (int b = 2; b >= 0; b--) begin @(negedge clk); serial_in = s[b]; end
  endtask

  // reference sequence and the values printed for it
  int ref_bin [6] = '{4'b0000, 4'b0001, 4'b0101, 4'b1101, 4'b1001, 4'b0100};
  int ref_gray[6] = '{4'b0000, 4'b0001, 4'b0111, 4'b1011, 4'b1101, 4'b0110};

  initial begin
    int ok_map;
    real v;
    for (int k = 0; k < N; k++) begin
      v = h_of(-4.000001 + 0.25 * k) * 128.0;
      coef[k] = $rtoi(v >= 0 ? $floor(v + 0.5) : -$floor(-v + 0.5));
      if (coef[k] > 127) coef[k] = 127;
      hist_i[k] = 0; hist_q[k] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // reference sequence: check Gray and mapper values as each word appears
    fork
      begin
        for (int n = 0; n < 6; n++) send(ref_bin[n], 0);
        @(negedge clk); en = 0;
      end
      begin
        for (int n = 0; n < 6; n++) begin
          @(posedge dut.u_mod.word_valid); #1;
          check(int'(tx_bin) == ref_bin[n] && int'(tx_gray) == ref_gray[n],
                $sformatf("ref %0d: bin %b gray %b", n, tx_bin, tx_gray));
          @(posedge clk); #1;
          case (n)
            0: ok_map = (map_i == 8'b01111100 && map_q == 8'b00011001);
            1: ok_map = (map_i == 8'b01101001 && map_q == 8'b01000111);
            2: ok_map = (map_i == 8'b10111001);
            3: ok_map = (map_i == 8'b01000111);
            default: ok_map = 1;
          endcase
          check(ok_map == 1, $sformatf("ref %0d: mapper (%b,%b)", n, map_i, map_q));
        end
      end
      begin
        for (int n = 0; n < 6; n++) begin
          do @(negedge clk); while (!(serial_valid && rx_sel == 2'd0));
          check(int'(rx_gray) == ref_gray[n] && int'(rx_bin) == ref_bin[n],
                $sformatf("ref %0d: rx gray %b bin %b", n, rx_gray, rx_bin));
        end
      end
    join
    for (int n = 0; n < 2000; n++) send($urandom_range(0, 15), 0);
    for (int n = 0; n < 500; n++) send($urandom_range(0, 15), $urandom_range(0, 3) == 0 ? $urandom_range(1, 2) : 0);
    @(negedge clk); en = 0;
    repeat (40) @(negedge clk);

    check(bit_cyc.size() == 0, $sformatf("%0d bits never came out", bit_cyc.size()));
    for (int s = 0; s < 16; s++) check(seen[s] > 0, $sformatf("point %0d never sent", s));
    check(n_idle > 0, "no idle symbol period");
    check(n_b2b > 0, "no back-to-back symbols");
    check(n_prod_trunc > 0, "no product truncation");
    check(n_wrap > 0, "no filter sum wrapped");
    $display("bits %0d, back-to-back %0d, idle periods %0d, truncated products %0d, wrapped samples %0d",
             n_bits, n_b2b, n_idle, n_prod_trunc, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
