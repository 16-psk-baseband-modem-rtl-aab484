// tb_ber_sweep -- bit-error rate of the modem against Eb/N0.
//
// Modulator and demodulator are joined through an additive white Gaussian
// noise channel: every filter output sample gets an independent normal
// value (Box-Muller from $urandom) of standard deviation
//     sigma = sqrt(A^2 / (2 * 4 * Eb/N0)),   A = 126 codes
// (A is the symbol-centre radius, Es = A^2 = 4 Eb, N0/2 = sigma^2), is
// rounded and saturated to 8 bits.  For Eb/N0 = 10, 15, 20, 25 and 30 dB the
// bench sends random symbols and counts bit errors.  It prints the measured
// BER next to the Gray-coded 16-PSK approximation for an ideal detector,
//     BER ~ (1/2) * erfc(sqrt(Es/N0) * sin(pi/16)),  Es = 4 Eb
// (nearest-neighbour symbol errors, one bit wrong each, over 4 bits).
// Checks: every bit comes out; the BER falls as Eb/N0 rises; where the
// approximation predicts at least 100 errors the measured BER is no better
// than half of it (the threshold detector cannot beat the ideal one); the
// BER at 30 dB is below 1e-3.  The per-axis thresholds leave about 8 codes
// between the 0.98 and 0.83 levels where an ideal phase detector has about
// 24, so the measured curve lies several dB to the right of the ideal one.
module tb_ber_sweep;
  localparam int LATENCY = 22;
  localparam int SYMS = 6000;
  localparam int NPTS = 5;
  localparam real EBN0_DB [NPTS] = '{10.0, 15.0, 20.0, 25.0, 30.0};
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, en = 0, serial_in = 0;
  logic [1:0] tx_sel, rx_sel;
  logic [3:0] tx_bin, tx_gray, rx_gray, rx_bin;
  logic signed [7:0] map_i, map_q, lpf_i, lpf_q, rx_i, rx_q;
  logic sym_center, serial_out, serial_valid;
  real sigma = 0.0;
  int checks = 0, failures = 0, cycle = 0;
  int bit_cyc[$], bit_val[$];
  int errors = 0, nbits = 0;
  real ber [NPTS];

  modulator u_mod (.clk, .rst_n, .en, .serial_in, .sel(tx_sel), .bin_word(tx_bin),
                   .gray_word(tx_gray), .map_i, .map_q, .lpf_i, .lpf_q, .sym_center);

  demodulator u_demod (.clk, .rst_n, .rx_i, .rx_q, .sample(sym_center), .sel(rx_sel),
                       .gray_word(rx_gray), .bin_word(rx_bin), .serial_out, .serial_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic real uniform01();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(uniform01())) * $cos(2.0 * PI * uniform01());
  endfunction

  function automatic logic signed [7:0] noisy(input logic signed [7:0] v, input real s);
    real r;
    int n;
    r = real'(v) + s * gauss();
    n = $rtoi(r >= 0.0 ? r + 0.5 : r - 0.5);
    return 8'(n > 127 ? 127 : n < -128 ? -128 : n);
  endfunction

  // complementary error function (Abramowitz-Stegun 7.1.26), x >= 0
  function automatic real erfc(input real x);
    real t;
    t = 1.0 / (1.0 + 0.3275911 * x);
    return t * (0.254829592 + t * (-0.284496736 + t * (1.421413741 +
           t * (-1.453152027 + t * 1.061405429)))) * $exp(-x * x);
  endfunction

  // new noise on every sample, drawn just after each clock edge
  always @(posedge clk) begin
    #1;
    rx_i = noisy(lpf_i, sigma);
    rx_q = noisy(lpf_q, sigma);
  end

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
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int s;
    real ebn0, theory;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPTS; p++) begin
      ebn0 = 10.0 ** (EBN0_DB[p] / 10.0);
      sigma = $sqrt(126.0 * 126.0 / (8.0 * ebn0));
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
      ber[p] = real'(errors) / real'(nbits);
      theory = 0.5 * erfc($sqrt(4.0 * ebn0) * $sin(PI / 16.0));
      $display("Eb/N0 %4.1f dB (sigma %5.2f codes): %0d errors in %0d bits, BER %e, ideal detector %e",
               EBN0_DB[p], sigma, errors, nbits, ber[p], theory);
      check(nbits == 4 * SYMS, "all bits came out");
      if (theory * nbits >= 100.0) check(ber[p] >= 0.5 * theory, "BER better than an ideal detector");
      if (p > 0) check(ber[p] <= ber[p-1], "BER did not fall with Eb/N0");
    end
    check(ber[NPTS-1] < 1.0e-3, "BER at the highest Eb/N0 above 1e-3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
