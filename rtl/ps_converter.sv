// ps_converter -- parallel-to-serial converter of the demodulator.
//
// The selection lines sel = {s1, s0} are decoded into four one-hot enables;
// each enable ANDs one bit of the word and the four products are ORed onto
// serial_out.  sel = 00 selects bit 3, so a word leaves MSB first over four
// clocks as the counter driving sel steps 00, 01, 10, 11.  Purely
// combinational.  The AND-OR structure is the source design's; the bit
// order is this design's choice, matching sp_converter.
module ps_converter
  import psk16_pkg::*;
(
  input  nibble_t    word,
  input  logic [1:0] sel,
  output logic       serial_out
);

  logic [3:0] dec;   // one-hot decode of sel, dec[k] selects word[k]

  always_comb begin
    dec = '0;
    dec[3 - sel] = 1'b1;
    serial_out = |(dec & word);
  end

endmodule
