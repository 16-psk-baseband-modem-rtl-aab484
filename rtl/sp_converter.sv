// sp_converter -- serial-to-parallel converter of the 16-PSK modulator.
//
// Two selection lines sel = {s1, s0} steer each serial bit into one of four
// bit flip-flops: sel = 00 loads bit 3 (first bit, MSB), 01 bit 2, 10 bit 1
// and 11 bit 0.  When the fourth bit arrives (sel = 11 with en high) the three
// stored bits and the incoming one are loaded together into the output word
// register, so `word` changes once per symbol and `word_valid` pulses for one
// cycle after each load.
//
// Interface: en (the "E" strobe) marks a serial bit on serial_in; sel comes
// from the modulator's 2-bit selection-line counter.  Timing: the word is
// available one clock after its last bit was sampled.
// The AND-gate steering and the D flip-flops follow the source design; the
// MSB-first order, the word register and word_valid are this design's choice.
module sp_converter
  import psk16_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [1:0] sel,
  input  logic       serial_in,
  output nibble_t    word,
  output logic       word_valid
);

  logic [3:1] bit_q;   // bits 3..1 of the symbol being assembled

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_q      <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (en) begin
        unique case (sel)
          2'd0: bit_q[3] <= serial_in;
          2'd1: bit_q[2] <= serial_in;
          2'd2: bit_q[1] <= serial_in;
          2'd3: begin
            word       <= {bit_q, serial_in};
            word_valid <= 1'b1;
          end
        endcase
      end
    end
  end

endmodule
