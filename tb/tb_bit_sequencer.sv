// tb_bit_sequencer: checks the word framing on the bit-clock side.
// After reset the slot counter must sit in the idle slot, then count
// 0,1,..,7,8(idle),0,... The encoder data must be 0 in slot 0 and in the idle
// slot and follow the PRSG bit in slots 1..7; the PRSG steps in slots 1..7;
// the encoder reset is active in the idle slot; the word's mode is the value
// of mode_in at the end of the idle slot and holds for the whole word.
module tb_bit_sequencer;
  timeunit 1ns; timeprecision 100ps;
  import codec_pkg::*;

  logic        clk = 1'b0, rst = 1'b1, prsg_bit = 1'b0;
  code_mode_e  mode_in = MODE_FM0, word_mode, mode_m;
  logic [3:0]  slot;
  int          slot_m;
  logic        x, enc_rst, prsg_step;
  int          checks = 0, failures = 0, words = 0;

  bit_sequencer dut (.clk, .rst, .mode_in, .prsg_bit, .slot, .word_mode, .x, .enc_rst, .prsg_step);

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    @(posedge clk); @(posedge clk); #1;
    check(slot, 8, "reset slot");
    check(int'(enc_rst), 1, "reset enc_rst");
    rst = 1'b0; slot_m = 8; mode_m = MODE_FM0;
    repeat (400) begin
      // inputs change just after the edge, as registers on this clock would
      prsg_bit = 1'($urandom);
      mode_in  = code_mode_e'(1'($urandom));
      #3;
      check(slot, slot_m, "slot");
      check(int'(word_mode), int'(mode_m), "word_mode");
      check(int'(x), (slot_m >= 1 && slot_m <= 7) ? int'(prsg_bit) : 0, "x");
      check(int'(enc_rst), slot_m == 8, "enc_rst");
      check(int'(prsg_step), slot_m >= 1 && slot_m <= 7, "prsg_step");
      @(posedge clk);
      if (slot_m == 8) begin mode_m = mode_in; slot_m = 0; words++; end
      else slot_m++;
      #1;
    end
    check(int'(words > 40), 1, "words framed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
