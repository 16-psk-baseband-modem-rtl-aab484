// lpf -- 33-tap FIR wave-shaping low-pass filter with 8-bit truncation.
//
// Direct form: x(n) enters a chain of TAPS-1 D flip-flop stages clocked every
// sample, giving x(n-1) .. x(n-32).  Each tap value is multiplied by an 8-bit
// coefficient h(k) (Q1.7, see psk16_pkg::LPF_COEF, a raised cosine with
// beta = 0.25 at four samples per symbol).  Every 16-bit product is truncated
// to 8 bits by dropping its 7 fraction bits (a floor), and the products are
// summed in a chain of 8-bit adders whose carry out is discarded, so the sum
// is kept modulo 2^8.  A value that fits in 8 bits is therefore exact up to
// the product truncations; when the shaped waveform between two symbol
// centres overshoots the 8-bit range it wraps.
//
// Interface: x is sampled at every clock; y = y(n) is combinational from x(n)
// and the delay line (no output register), as in the source design.
// The tap count, the structure and the truncation of products and sums follow
// the source design; the coefficient rounding, the choice of bits kept from a
// product and the reset of the delay line are this design's choices.
module lpf
  import psk16_pkg::*;
#(
  parameter int unsigned TAPS = LPF_TAPS,
  parameter coef_table_t COEF = LPF_COEF
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x,
  output sample_t y
);

  sample_t taps_q [1:TAPS-1];   // taps_q[k] = x(n-k)
  sample_t tap    [0:TAPS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < TAPS; k++) taps_q[k] <= '0;
    end else begin
      taps_q[1] <= x;
      for (int k = 2; k < TAPS; k++) taps_q[k] <= taps_q[k-1];
    end
  end

  always_comb begin
    logic signed [2*SAMPLE_W-1:0] prod;
    sample_t acc, c;
    tap[0] = x;
    for (int k = 1; k < TAPS; k++) tap[k] = taps_q[k];
    acc = '0;
    for (int k = 0; k < TAPS; k++) begin
      c    = COEF[k];
      // both operands sign-extended to the product width: the low 16 bits
      // of this product are the two's-complement product of the 8-bit values
      prod = {{SAMPLE_W{tap[k][SAMPLE_W-1]}}, tap[k]} * {{SAMPLE_W{c[SAMPLE_W-1]}}, c};
      acc  = acc + sample_t'(prod[2*SAMPLE_W-2:SAMPLE_W-1]);  // keep bits 14..7
    end
    y = acc;
  end

endmodule
