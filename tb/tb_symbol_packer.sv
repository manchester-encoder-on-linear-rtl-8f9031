// tb_symbol_packer: checks that the packer assembles the 16 half-bit symbols
// of a word in order, MSB first, and ignores the idle slot.
// The system clock has a 10 ns period; the testbench makes the bit clock (the
// system clock divided by two) and the slot counter itself and drives the
// line with a random level per half bit, remembering the 16 levels of each
// word. Each word_valid must be high in the system-clock cycle right after
// the last symbol was sampled and carry those 16 levels and the word's mode.
module tb_symbol_packer;
  timeunit 1ns; timeprecision 100ps;
  import codec_pkg::*;

  logic        clk = 1'b0, rst = 1'b1, line = 1'b0, bclk = 1'b0;
  logic [3:0]  slot = 4'd8;
  code_mode_e  word_mode_in = MODE_FM0, word_mode;
  logic [15:0] word, exp_word;
  logic        word_valid;
  int          checks = 0, failures = 0, n_words = 0;
  logic [15:0] q_word [$];
  code_mode_e  q_mode [$];
  int          q_time [$];
  int          cyc = 0;

  symbol_packer dut (.clk, .rst, .line, .bclk, .slot, .word_mode_in, .word, .word_mode, .word_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  // stimulus: one half bit per system clock
  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (60) begin
      // idle slot (two half bits), choose the next word's mode
      bclk = 1'b1; line = 1'($urandom);   // junk on the line
      @(posedge clk); #1;
      bclk = 1'b0; line = 1'($urandom);
      @(posedge clk); #1;
      word_mode_in = code_mode_e'(1'($urandom));
      for (int s = 0; s < 8; s++) begin
        slot = 4'(s);
        bclk = 1'b1; line = 1'($urandom); exp_word = {exp_word[14:0], line};
        @(posedge clk); #1;
        bclk = 1'b0; line = 1'($urandom); exp_word = {exp_word[14:0], line};
        @(posedge clk); #1;
        if (s == 7) begin q_word.push_back(exp_word); q_mode.push_back(word_mode_in); q_time.push_back(cyc); end
      end
      slot = 4'd8;
    end
    repeat (4) @(posedge clk);
    check(n_words, 60, "words seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word_valid must be high in the clock cycle right after the last sample
  always @(negedge clk) if (!rst && word_valid) begin
    n_words++;
    if (q_word.size() == 0) begin
      checks++; failures++; $display("FAIL unexpected word");
    end else begin
      check(word, q_word.pop_front(), "word");
      check(int'(word_mode), int'(q_mode.pop_front()), "mode");
      check(cyc, q_time.pop_front(), "latency");
    end
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
