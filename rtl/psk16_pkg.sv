// psk16_pkg -- types and constants shared by the 16-PSK baseband modem.
//
// Samples are 8-bit two's complement with 127 standing for 1.0 (the mapper
// and decision thresholds) or 128 for 1.0 (the filter coefficients, Q1.7).
//
// LPF_COEF holds the 33 taps of the wave-shaping filter: the raised-cosine
// impulse response
//     h(t) = cos(2*pi*beta*t) / (1 - (4*beta*t)^2) * sinc(t/T),  beta = 0.25, T = 1
// sampled at t = -4.000001 + 0.25*k, k = 0..32 (four samples per symbol;
// the small offset steps around the 0/0 points at t = +-1), scaled by 128,
// rounded to the nearest integer, and the centre tap (1.0) clipped to 127.
// The beta, the tap count and the sampling grid follow the source design;
// the rounding and clipping rule is this design's choice.
package psk16_pkg;

  localparam int unsigned SAMPLE_W = 8;   // I/Q sample and coefficient width
  localparam int unsigned BITS_PER_SYM = 4;
  localparam int unsigned LPF_TAPS = 33;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic [BITS_PER_SYM-1:0]    nibble_t;

  // Constellation magnitudes 0.98, 0.83, 0.56, 0.20 times 127.
  // Index j: in the first quadrant the point of phase (2j+1)*11.25 deg has
  // I = SYM_MAG[j], Q = SYM_MAG[3-j].
  typedef logic [3:0][SAMPLE_W-1:0] mag_table_t;
  localparam mag_table_t SYM_MAG = {8'd25, 8'd71, 8'd105, 8'd124};

  // Decision thresholds 0.905, 0.695, 0.38 times 127: each lies midway
  // between two neighbouring magnitude levels (0.98/0.83, 0.83/0.56, 0.56/0.20).
  localparam logic [SAMPLE_W-2:0] THR_C1 = 7'd115;
  localparam logic [SAMPLE_W-2:0] THR_C2 = 7'd88;
  localparam logic [SAMPLE_W-2:0] THR_C3 = 7'd48;

  typedef logic signed [LPF_TAPS-1:0][SAMPLE_W-1:0] coef_table_t;
  // Element k is h(k); written from k = 32 down to k = 0.
  localparam coef_table_t LPF_COEF = {
    8'sd0,  8'sd1,  8'sd1,  8'sd0,  8'sd0,  8'sd1,  8'sd2,  8'sd3,
    8'sd0, -8'sd7, -8'sd15, -8'sd16, 8'sd0, 8'sd34, 8'sd77, 8'sd114,
    8'sd127,
    8'sd114, 8'sd77, 8'sd34, 8'sd0, -8'sd16, -8'sd15, -8'sd7, 8'sd0,
    8'sd3,  8'sd2,  8'sd1,  8'sd0,  8'sd0,  8'sd1,  8'sd1,  8'sd0};

endpackage
