// tb_modulator -- checks the modulator chain end to end on its own outputs.
// Random 4-bit symbols are sent serially (MSB first, with random idle
// symbol periods); for each the bench checks the binary word, its Gray code, the
// mapper's I/Q point (computed from the phase with real arithmetic), that
// sym_center rises exactly 21 clocks after the symbol's first bit, and that lpf_i/lpf_q at sym_center equal floor(127*v/128)
// of the mapper value v (the filter's centre tap, with no leakage from
// neighbouring symbols).
module tb_modulator;
  logic clk = 0, rst_n = 0, en = 0, serial_in = 0;
  logic [1:0] sel;
  logic [3:0] bin_word, gray_word;
  logic signed [7:0] map_i, map_q, lpf_i, lpf_q;
  logic sym_center;
  int checks = 0, failures = 0;
  int cycle = 0;
  int sent_sym[$], sent_cyc[$];
  int ncenter = 0;

  modulator dut (.clk, .rst_n, .en, .serial_in, .sel, .bin_word, .gray_word,
                 .map_i, .map_q, .lpf_i, .lpf_q, .sym_center);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int coord(input real v);
    real a;
    a = $floor((v < 0 ? -v : v) * 100.0 + 0.5) / 100.0;
    return (v < 0 ? -1 : 1) * $rtoi($floor(a * 127.0 + 0.5));
  endfunction

  function automatic int fdiv128(input int v);
    return (v >= 0) ? v / 128 : -((-v + 127) / 128);
  endfunction

  // at every symbol centre, compare with the oldest symbol sent
  always @(negedge clk) if (rst_n && sym_center) begin
    int s, k, ei, eq, g, c0;
    real ph;
    s = sent_sym.pop_front(); c0 = sent_cyc.pop_front();
    ncenter++;
    k = s;                               // binary word = phase index
    g = k ^ (k >> 1);
    ph = (2 * k + 1) * 11.25 * 3.14159265358979 / 180.0;
    ei = coord($cos(ph)); eq = coord($sin(ph));
    check(int'(lpf_i) == fdiv128(127 * ei) && int'(lpf_q) == fdiv128(127 * eq),
          $sformatf("sym %0d: lpf (%0d,%0d) exp (%0d,%0d)", s, lpf_i, lpf_q,
                    fdiv128(127 * ei), fdiv128(127 * eq)));
    check(cycle - c0 == 21, $sformatf("centre latency %0d", cycle - c0));
  end

  // word/gray/mapper consistency one and two cycles after each word
  always @(negedge clk) if (rst_n && dut.word_valid) begin
    int k, ei, eq;
    real ph;
    k = int'(bin_word);
    check(int'(gray_word) == (k ^ (k >> 1)), $sformatf("gray %b for %b", gray_word, bin_word));
    ph = (2 * k + 1) * 11.25 * 3.14159265358979 / 180.0;
    ei = coord($cos(ph)); eq = coord($sin(ph));
    @(negedge clk);
    check(int'(map_i) == ei && int'(map_q) == eq,
          $sformatf("map (%0d,%0d) exp (%0d,%0d) for %b", map_i, map_q, ei, eq, bin_word));
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // one symbol, MSB first, starting on a symbol boundary (sel = 00);
  // with idle set, whole idle symbol periods may come first
  task automatic send(input int s, input bit idle);
    @(negedge clk);
    while (sel != 2'd0) begin en = 0; @(negedge clk); end
    if (idle) while ($urandom_range(0, 2) == 0) repeat (4) begin en = 0; @(negedge clk); end
    sent_sym.push_back(s); sent_cyc.push_back(cycle);
    en = 1; serial_in = s[3];
    for (int b = 2; b >= 0; b--) begin
      @(negedge clk);
      serial_in = s[b];
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) send($urandom_range(0, 15), 0);
    @(negedge clk); en = 0;
    repeat (31) @(negedge clk);
    for (int n = 0; n < 100; n++) send($urandom_range(0, 15), 1);
    @(negedge clk); en = 0;
    repeat (31) @(negedge clk);
    check(ncenter == 400 && sent_sym.size() == 0, $sformatf("%0d centres", ncenter));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
