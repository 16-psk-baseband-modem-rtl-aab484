// tb_decision_device -- checks the symbol decision.
// 1) Each of the 16 constellation points, computed here from its phase
//    (2k+1)*11.25 degrees at amplitudes 127 and 127*127/128 and with up to
//    +-6 codes of added offset, must decide to the Gray code k xor (k>>1).
// 2) Every input pair in a sweep is compared with a bench model of the
//    thresholds 0.905, 0.695 and 0.38 of full scale (127).
module tb_decision_device;
  logic signed [7:0] rx_i, rx_q;
  logic [3:0] d;
  int checks = 0, failures = 0;

  decision_device dut (.rx_i, .rx_q, .d);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int thr(input real c);
    return $rtoi($floor(c * 127.0 + 0.5));
  endfunction

  function automatic logic [3:0] model(input int i, input int q);
    int mi, mq;
    mi = i < 0 ? -i - 1 : i;
    mq = q < 0 ? -q - 1 : q;
    return {q < 0, i < 0, !(mi > thr(0.695)), (mq > thr(0.905)) != (mq > thr(0.38))};
  endfunction

  initial begin
    #100000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    real ph, amp;
    int ei, eq;
    logic [3:0] g;
    for (int k = 0; k < 16; k++) begin
      g = 4'(k ^ (k >> 1));
      ph = (2 * k + 1) * 11.25 * 3.14159265358979 / 180.0;
      for (int a = 0; a < 2; a++) begin
        amp = a == 0 ? 127.0 : 127.0 * 127.0 / 128.0;
        for (int n = -6; n <= 6; n += 3) begin
          ei = $rtoi($floor(amp * $cos(ph) + 0.5)) + n;
          eq = $rtoi($floor(amp * $sin(ph) + 0.5)) - n;
          ei = ei > 127 ? 127 : ei < -128 ? -128 : ei;
          eq = eq > 127 ? 127 : eq < -128 ? -128 : eq;
          rx_i = 8'(ei); rx_q = 8'(eq); #1;
          check(d == g, $sformatf("k=%0d (%0d,%0d): d=%b exp %b", k, ei, eq, d, g));
        end
      end
    end
    for (int i = -128; i < 128; i += 3)
      for (int q = -128; q < 128; q += 5) begin
        rx_i = 8'(i); rx_q = 8'(q); #1;
        check(d == model(i, q), $sformatf("(%0d,%0d): d=%b exp %b", i, q, d, model(i, q)));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
