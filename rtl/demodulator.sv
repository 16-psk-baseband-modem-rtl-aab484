// demodulator -- 16-PSK baseband demodulator.
//
// The received 8-bit I and Q samples go to the decision device, whose four
// Gray bits are stored in a register when `sample` marks a symbol centre.
// The Gray decoder turns them back into the binary word, and the
// parallel-to-serial converter sends that word out MSB first, one bit per
// clock, under a 2-bit selection-line counter that restarts at 00 on every
// stored symbol.  serial_valid is high for the four cycles of each word.
//
// Timing: a symbol sampled in cycle t is in the register from t+1; its four
// bits appear on serial_out in cycles t+1 .. t+4.  Symbol centres must be at
// least four cycles apart.
// The decision device, Gray decoder and P/S converter follow the source
// design; the symbol strobe, the register and the counter restart are this
// design's choices (the source connects the modulator's filters straight to
// the decision device and does not describe symbol timing).
module demodulator
  import psk16_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  sample_t    rx_i,
  input  sample_t    rx_q,
  input  logic       sample,
  output logic [1:0] sel,
  output nibble_t    gray_word,
  output nibble_t    bin_word,
  output logic       serial_out,
  output logic       serial_valid
);

  nibble_t decided;

  decision_device u_dec (.rx_i, .rx_q, .d(decided));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gray_word    <= '0;
      sel          <= '0;
      serial_valid <= 1'b0;
    end else if (sample) begin
      gray_word    <= decided;
      sel          <= '0;
      serial_valid <= 1'b1;
    end else begin
      sel <= sel + 2'd1;
      if (sel == 2'd3) serial_valid <= 1'b0;
    end
  end

  gray_decoder u_gdec (.gray(gray_word), .bin(bin_word));

  ps_converter u_ps (.word(bin_word), .sel, .serial_out);

endmodule
