// gray_encoder -- 4-bit binary to Gray code converter.
//
// The MSB passes through and every lower Gray bit is the XOR of a binary bit
// with the binary bit above it, so symbols on neighbouring constellation
// points differ in one bit.  Purely combinational.  The XOR structure is the
// source design's.
module gray_encoder
  import psk16_pkg::*;
(
  input  nibble_t bin,
  output nibble_t gray
);

  always_comb gray = bin ^ (bin >> 1);

endmodule
