// tb_lpf -- checks the 33-tap truncating FIR against a bench-side model.
// The coefficients are recomputed here with real arithmetic from the raised
// cosine h(t) = cos(2*pi*b*t)/(1-(4*b*t)^2)*sinc(t), b = 0.25, sampled at
// t = -4.000001 + 0.25k and quantised as round(128*h) clipped to 127.  The
// model output is sum_k floor(x(n-k)*h(k)/128) taken modulo 256.  The bench
// drives an impulse (reading back the impulse response), a zero-stuffed
// symbol stream and random samples, and compares y(n) every clock.
module tb_lpf;
  localparam int N = 33;
  logic clk = 0, rst_n = 0;
  logic signed [7:0] x = 0, y;
  int checks = 0, failures = 0;
  int coef [N];
  int hist [N];      // hist[k] = x(n-k) as seen by the model

  lpf dut (.clk, .rst_n, .x, .y);

  always #5 clk = ~clk;

  function automatic real h_of(input real t);
    real s, pi;
    pi = 3.14159265358979;
    s = (t == 0.0) ? 1.0 : $sin(pi * t) / (pi * t);
    return $cos(2.0 * pi * 0.25 * t) / (1.0 - (t * t)) * s;
  endfunction

  function automatic int floordiv128(input int v);
    return (v >= 0) ? v / 128 : -((-v + 127) / 128);
  endfunction

  function automatic int model();
    int acc = 0;
    for (int k = 0; k < N; k++) acc += floordiv128(hist[k] * coef[k]);
    acc = acc & 255;
    return acc >= 128 ? acc - 256 : acc;
  endfunction

  task automatic step(input int xv);      // apply x for one clock and compare
    @(negedge clk);
    x = 8'(xv);
    for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = xv;
    #1;
    checks++;
    if (int'(y) != model()) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d exp %0d", xv, y, model());
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    real v;
    for (int k = 0; k < N; k++) begin
      v = h_of(-4.000001 + 0.25 * k) * 128.0;
      coef[k] = $rtoi(v >= 0 ? $floor(v + 0.5) : -$floor(-v + 0.5));
      if (coef[k] > 127) coef[k] = 127;
      hist[k] = 0;
    end
    check_peak: assert (coef[16] == 127 && coef[15] == 114 && coef[11] == -16);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // impulse response: 127 then zeros
    step(127);
    for (int k = 1; k < N + 4; k++) step(0);
    // zero-stuffed symbol stream, 4 samples per symbol
    for (int s = 0; s < 200; s++) begin
      step($urandom_range(0, 1) ? 124 : -124);
      step(0); step(0); step(0);
    end
    // random full-range samples (exercises wrap-around)
    for (int s = 0; s < 3000; s++) step($urandom_range(0, 255) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
