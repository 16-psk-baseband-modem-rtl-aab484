// decision_device -- symbol decision for the 16-PSK demodulator.
//
// Turns one received 8-bit in-phase sample and one quadrature sample into
// the four Gray bits D3..D0 of the nearest constellation point:
//   D3 = sign of Q, D2 = sign of I,
//   D1 = NOT(|I| > C2)                  (the point lies near the Q axis),
//   D0 = (|Q| > C1) XOR (|Q| > C3)      (|Q| is one of the two middle levels).
// |x| is formed from bits 6..0 inverted when the sign bit is set (one's
// complement magnitude, |x|-1 for negative x), which keeps every comparator
// 7 bits wide; the thresholds lie midway between magnitude levels, so the
// one-code bias does not move a decision for the levels the mapper sends.
//
// Interface: purely combinational; the demodulator registers d on its symbol
// strobe.  The sign tests, the comparator/NAND/XOR structure and the threshold
// values 0.905 and 0.38 (times 127) follow the source design; C2 = 0.695,
// the midpoint of the 0.56 and 0.83 levels, and the magnitude formation are
// this design's reading and choice.
module decision_device
  import psk16_pkg::*;
#(
  parameter logic [SAMPLE_W-2:0] C1 = THR_C1,
  parameter logic [SAMPLE_W-2:0] C2 = THR_C2,
  parameter logic [SAMPLE_W-2:0] C3 = THR_C3
) (
  input  sample_t rx_i,
  input  sample_t rx_q,
  output nibble_t d
);

  logic [SAMPLE_W-2:0] mag_i, mag_q;

  always_comb begin
    mag_i = rx_i[SAMPLE_W-2:0] ^ {(SAMPLE_W-1){rx_i[SAMPLE_W-1]}};
    mag_q = rx_q[SAMPLE_W-2:0] ^ {(SAMPLE_W-1){rx_q[SAMPLE_W-1]}};
    d[3] = rx_q[SAMPLE_W-1];
    d[2] = rx_i[SAMPLE_W-1];
    d[1] = ~((mag_i > C2) & 1'b1);          // NAND with a constant 1
    d[0] = (mag_q > C1) ^ (mag_q > C3);
  end

endmodule
