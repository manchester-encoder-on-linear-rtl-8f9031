// tb_fm0_stream_run: runs the encoder the way a plain waveform run of it
// would: 1000 ns in FM0 mode (mode = 0, rst = 0 after a short reset) with a
// 10 ns bit clock, the data alternating 0/1 for the first bits and then held
// at 1. The line is sampled nine times per bit and every transition is counted.
// Expected from the FM0 rules alone, with no model of the encoder's insides:
//   * a transition at every bit boundary (rule 3);
//   * a mid-bit transition exactly when the bit is 0 (rules 1 and 2);
//   * hence, while X is held at 1, the line is a square wave at half the
//     bit rate: one transition per bit.
module tb_fm0_stream_run;
  timeunit 1ns; timeprecision 100ps;
  import codec_pkg::*;

  localparam int NBITS = 100;   // 1000 ns at 10 ns per bit
  localparam int NALT  = 12;    // bits of alternating data at the start

  logic       clk = 1'b1, rst = 1'b1, x = 1'b0, out;
  code_mode_e mode = MODE_FM0;
  int         checks = 0, failures = 0, mid = 0, edge_t = 0;

  fm0_manchester_encoder dut (.clk, .rst, .mode, .x, .out);

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic prev, first_a, last_b;
    @(posedge clk); #0.5;   // reset for one bit
    rst = 1'b0;
    last_b = 1'b0;
    for (int n = 0; n < NBITS; n++) begin
      int toggles;
      x = (n < NALT) ? 1'(n % 2) : 1'b1;
      toggles = 0;
      #0.5 first_a = out;
      prev = out;
      for (int k = 1; k < 9; k++) begin
        #1;
        if (out != prev) toggles++;
        prev = out;
      end
      check(int'(first_a != last_b), 1, "boundary transition");
      check(toggles, int'(x == 1'b0), "mid-bit transitions");
      last_b = prev;
      @(posedge clk); #0.5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
