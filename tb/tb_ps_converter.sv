// tb_ps_converter -- exhaustive check of the parallel-to-serial multiplexer:
// for every word and every selection value the output must be the word's
// bit 3 - sel (MSB first as sel counts 00, 01, 10, 11).
module tb_ps_converter;
  logic [3:0] word;
  logic [1:0] sel;
  logic       serial_out;
  int checks = 0, failures = 0;

  ps_converter dut (.word, .sel, .serial_out);

  initial begin
    #10000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit exp;
    for (int w = 0; w < 16; w++)
      for (int s = 0; s < 4; s++) begin
        word = 4'(w); sel = 2'(s); #1;
        exp = ((w >> (3 - s)) & 1) == 1;
        checks++;
        if (serial_out !== exp) begin
          failures++;
          $display("FAIL word %b sel %0d out %b exp %b", word, sel, serial_out, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
