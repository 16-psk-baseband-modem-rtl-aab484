// gray_decoder -- 4-bit Gray code to binary converter of the demodulator.
//
// bin[3] = gray[3]; each lower bit is the XOR of the binary bit above it with
// the Gray bit, a ripple chain of three XOR gates.  Purely combinational.
// The XOR chain is the source design's.
module gray_decoder
  import psk16_pkg::*;
(
  input  nibble_t gray,
  output nibble_t bin
);

  assign bin[3] = gray[3];
  assign bin[2] = bin[3] ^ gray[2];
  assign bin[1] = bin[2] ^ gray[1];
  assign bin[0] = bin[1] ^ gray[0];

endmodule
