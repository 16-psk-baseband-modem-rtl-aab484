// tb_sp_converter -- serial-to-parallel converter test.
// A 2-bit selection counter in the bench advances with en; random bits are
// sent with random idle cycles (en low) in between.  Each group of four bits
// must appear MSB first as one word, one clock after its fourth bit, with a
// single-cycle word_valid, and the word must hold until the next group.
module tb_sp_converter;
  logic clk = 0, rst_n = 0, en = 0, serial_in = 0;
  logic [1:0] sel;
  logic [3:0] word;
  logic       word_valid;
  int checks = 0, failures = 0;

  sp_converter dut (.clk, .rst_n, .en, .sel, .serial_in, .word, .word_valid);

  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sel <= 0; else if (en) sel <= sel + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [3:0] sym, last;
    last = 0;
    repeat (2) @(negedge clk);
    check(word == 0 && !word_valid, "reset state");
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      sym = 4'($urandom);
      for (int b = 3; b >= 0; b--) begin
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk); en = 0;
          check(!word_valid || b == 3, "word_valid in idle");
        end
        @(negedge clk);
        if (b != 3) check(!word_valid && word == last, $sformatf("word changed early: %b", word));
        en = 1; serial_in = sym[b];
      end
      @(negedge clk); en = 0;
      check(word_valid && word == sym, $sformatf("sym %0d: got %b valid %b exp %b", n, word, word_valid, sym));
      last = sym;
      @(negedge clk);
      check(!word_valid && word == sym, "word_valid longer than one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
