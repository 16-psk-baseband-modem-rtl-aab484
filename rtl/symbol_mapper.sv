// symbol_mapper -- 16-ary mapper: Gray-coded symbol to 8-bit I/Q point.
//
// A 16-entry read-only memory, addressed by the 4 Gray bits, holds the
// in-phase and quadrature values of the 16-PSK constellation.  The point for
// Gray code g lies at phase (2k+1)*11.25 degrees, where k is the binary value
// whose Gray code is g; its coordinates are +-MAG[j] with j = k mod 4, taken
// from the four magnitudes 0.98, 0.83, 0.56, 0.20 (times 127).  The table is
// generated from MAG by the function make_point, which synthesis reduces to
// a 16-word constant look-up table.
//
// Interface: on a clock with rd_en high, addr is read and i_out/q_out are
// updated at the clock edge (synchronous read, one cycle latency); valid is
// high for the cycle after each read.  Outputs are two's complement.
// The memory-based mapping, its 8-bit fixed-point words and the Gray labels
// follow the source design; the synchronous read, two's complement coding and
// the exact rounding of the magnitudes are this design's choices.
module symbol_mapper
  import psk16_pkg::*;
#(
  parameter mag_table_t MAG = SYM_MAG
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    rd_en,
  input  nibble_t addr,
  output sample_t i_out,
  output sample_t q_out,
  output logic    valid
);

  typedef struct packed {
    sample_t i;
    sample_t q;
  } point_t;

  function automatic point_t make_point(input nibble_t g);
    nibble_t k;
    sample_t a, b;    // magnitude along / across the quadrant's first axis
    point_t  p;
    // Gray -> binary gives the phase index k
    k[3] = g[3];
    for (int n = 2; n >= 0; n--) k[n] = k[n+1] ^ g[n];
    a = sample_t'(MAG[k[1:0]]);
    b = sample_t'(MAG[2'd3 - k[1:0]]);
    unique case (k[3:2])
      2'd0: begin p.i =  a; p.q =  b; end
      2'd1: begin p.i = -b; p.q =  a; end
      2'd2: begin p.i = -a; p.q = -b; end
      2'd3: begin p.i =  b; p.q = -a; end
    endcase
    return p;
  endfunction

  point_t rd;   // table entry at addr

  always_comb rd = make_point(addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_out <= '0;
      q_out <= '0;
      valid <= 1'b0;
    end else begin
      valid <= rd_en;
      if (rd_en) begin
        i_out <= rd.i;
        q_out <= rd.q;
      end
    end
  end

endmodule
