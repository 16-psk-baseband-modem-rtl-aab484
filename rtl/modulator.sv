// modulator -- 16-PSK baseband modulator.
//
// Serial bits arrive one per clock while en is high.  A free-running 2-bit
// selection-line counter drives the serial-to-parallel converter, which
// hands every group of four bits to the Gray encoder; the Gray code addresses
// the 16-ary mapper, which returns the 8-bit I and Q values of the symbol.
// Each branch then passes a wave-shaping FIR (lpf).  The filter runs at the
// bit clock, which is four samples per symbol and so matches the 0.25-symbol
// tap spacing of the filter: the mapper output enters the filters on the one
// cycle after it is read and zeros enter on the other three, so the filter
// output at each symbol centre is the symbol value with no interference from
// its neighbours.  sym_center marks that sample: it is the mapper strobe
// delayed by the filter's group delay of (TAPS-1)/2 clocks.
//
// en is held high or low for whole symbols (sel = 00 .. 11), so every symbol
// starts on the same four-clock grid and the zero gaps between symbol
// impulses stay multiples of four samples; an assertion checks this.  A
// symbol period with en low sends nothing (zeros into the filters).
//
// Timing: a symbol whose first bit is sampled in cycle c is in the word
// register from c+4, read into the mapper output at c+5 (also the cycle its
// impulse enters the filters) and at its centre on lpf_i/lpf_q in cycle
// c+5+(TAPS-1)/2 = c+21 with the default 33 taps.
// The block chain (S/P, Gray encoder, mapper, two LPFs) follows the source
// design; the zero-insertion into the filters, the whole-symbol rule for en
// and sym_center are this design's choices.
module modulator
  import psk16_pkg::*;
#(
  parameter int unsigned TAPS = LPF_TAPS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       serial_in,
  output logic [1:0] sel,
  output nibble_t    bin_word,
  output nibble_t    gray_word,
  output sample_t    map_i,
  output sample_t    map_q,
  output sample_t    lpf_i,
  output sample_t    lpf_q,
  output logic       sym_center
);

  localparam int unsigned DELAY = (TAPS - 1) / 2;

  logic    word_valid, map_valid;
  sample_t x_i, x_q;
  logic [DELAY-1:0] center_dly;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel <= '0;
    else        sel <= sel + 2'd1;
  end

  // en marks whole symbols: it may change only at a symbol boundary
  en_whole_symbols: assert property (@(posedge clk) disable iff (!rst_n)
    (sel != 2'd0) |-> (en == $past(en)))
    else $error("en changed inside a symbol");

  sp_converter u_sp (
    .clk, .rst_n, .en, .sel, .serial_in,
    .word(bin_word), .word_valid
  );

  gray_encoder u_genc (.bin(bin_word), .gray(gray_word));

  symbol_mapper u_map (
    .clk, .rst_n, .rd_en(word_valid), .addr(gray_word),
    .i_out(map_i), .q_out(map_q), .valid(map_valid)
  );

  // one impulse per symbol, zeros between
  always_comb begin
    x_i = map_valid ? map_i : '0;
    x_q = map_valid ? map_q : '0;
  end

  lpf #(.TAPS(TAPS)) u_lpf_i (.clk, .rst_n, .x(x_i), .y(lpf_i));
  lpf #(.TAPS(TAPS)) u_lpf_q (.clk, .rst_n, .x(x_q), .y(lpf_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) center_dly <= '0;
    else        center_dly <= {center_dly[DELAY-2:0], map_valid};
  end
  assign sym_center = center_dly[DELAY-1];

endmodule
