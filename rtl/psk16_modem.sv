// psk16_modem -- 16-PSK baseband modem, modulator looped into demodulator.
//
// Serial data enters the modulator four bits per symbol; the 8-bit outputs
// of its two wave-shaping filters are both brought out (for D/A converters)
// and connected directly to the demodulator, which decides each symbol at
// its centre sample and returns the bits serially.  There is no D/A, A/D or
// RF stage in between.
//
// Interface: one serial bit per clock while en is high; serial_out carries
// the recovered bits, MSB of each symbol first, while serial_valid is high.
// Timing: with the default 33-tap filters the first bit of a symbol leaves
// serial_out 22 clocks after it entered serial_in (4 to assemble the symbol,
// 1 mapper read, 16 filter delay, 1 decision register).
// The loop-back structure follows the source design; the symbol-centre strobe
// passed from modulator to demodulator is this design's choice.
module psk16_modem
  import psk16_pkg::*;
#(
  parameter int unsigned TAPS = LPF_TAPS
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    serial_in,
  output sample_t tx_i,
  output sample_t tx_q,
  output logic    serial_out,
  output logic    serial_valid,
  // observation points (the traces of a modem simulation)
  output logic [1:0] tx_sel,
  output logic [1:0] rx_sel,
  output nibble_t tx_bin,
  output nibble_t tx_gray,
  output sample_t map_i,
  output sample_t map_q,
  output nibble_t rx_gray,
  output nibble_t rx_bin
);

  logic       sym_center;

  modulator #(.TAPS(TAPS)) u_mod (
    .clk, .rst_n, .en, .serial_in,
    .sel(tx_sel), .bin_word(tx_bin), .gray_word(tx_gray),
    .map_i, .map_q, .lpf_i(tx_i), .lpf_q(tx_q), .sym_center
  );

  demodulator u_demod (
    .clk, .rst_n, .rx_i(tx_i), .rx_q(tx_q), .sample(sym_center),
    .sel(rx_sel), .gray_word(rx_gray), .bin_word(rx_bin),
    .serial_out, .serial_valid
  );

endmodule
