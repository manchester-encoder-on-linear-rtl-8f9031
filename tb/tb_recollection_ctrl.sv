// tb_recollection_ctrl: checks the controller's sequencing and bit clock.
// The bit clock must toggle on every system clock.
// Each word_valid pulse (sent every 18 clocks, as the encoder side does, with
// a random word and mode) must give: the write with that word one clock later,
// the read of the same address the clock after, then the decoder load with
// the word's mode and one address step. No strobe may appear elsewhere.
module tb_recollection_ctrl;
  timeunit 1ns; timeprecision 100ps;
  import codec_pkg::*;

  logic        clk = 1'b0, rst = 1'b1, word_valid = 1'b0;
  logic [15:0] word = '0, mem_wdata;
  code_mode_e  word_mode = MODE_FM0, dec_mode;
  logic        bclk, mem_we, mem_re, dec_load, addr_step;
  logic        bclk_prev;
  int          checks = 0, failures = 0;

  recollection_ctrl dut (.clk, .rst, .word_valid, .word, .word_mode, .bclk, .mem_we, .mem_re,
                         .mem_wdata, .dec_load, .dec_mode, .addr_step);

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    bclk_prev = bclk;
    repeat (50) begin
      logic [15:0] w;
      code_mode_e  m;
      w = 16'($urandom); m = code_mode_e'(1'($urandom));
      word = w; word_mode = m; word_valid = 1'b1;
      for (int c = 0; c < 18; c++) begin
        @(negedge clk);
        word_valid = 1'b0; word = 16'($urandom); word_mode = code_mode_e'(1'($urandom));
        check(int'(bclk), int'(!bclk_prev), "bclk toggles");
        bclk_prev = bclk;
        check(int'(mem_we), int'(c == 0), "mem_we");
        if (c == 0) check(int'(mem_wdata), int'(w), "mem_wdata");
        check(int'(mem_re), int'(c == 1), "mem_re");
        check(int'(dec_load), int'(c == 2), "dec_load");
        check(int'(addr_step), int'(c == 2), "addr_step");
        if (c == 2) check(int'(dec_mode), int'(m), "dec_mode");
      end
    end
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
