// tb_prsg: checks the pseudo-random sequence generator.
// A reference LFSR written out bit by bit (feedback = s0 ^ s2 ^ s3 ^ s5,
// i.e. x^16 + x^14 + x^13 + x^11 + 1) runs alongside; state and output bit
// are compared after every clock, with `step` toggled at random so that hold
// cycles are covered. It then checks that the sequence repeats after exactly
// 65535 steps and that reset reloads the seed.
module tb_prsg;
  timeunit 1ns; timeprecision 100ps;

  logic        clk = 1'b0, rst = 1'b1, step = 1'b0;
  logic        bit_o;
  logic [15:0] state, ref_s;
  int          checks = 0, failures = 0;

  prsg dut (.clk, .rst, .step, .bit_o, .state);

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic [15:0] nxt(input logic [15:0] s);
    return {s[0] ^ s[2] ^ s[3] ^ s[5], s[15:1]};
  endfunction

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 1'b0; ref_s = 16'hACE1;
    check(state, ref_s, "seed");
    repeat (500) begin
      step = 1'($urandom);
      @(negedge clk);
      if (step) ref_s = nxt(ref_s);
      check(state, ref_s, "state");
      check(16'(bit_o), 16'(ref_s[0]), "bit");
    end
    // period
    step = 1'b1;
    begin
      logic [15:0] s0;
      int n;
      s0 = state; n = 0;
      do begin @(negedge clk); n++; end while (state != s0 && n < 70000);
      check(16'(n), 16'(65535), "period");
    end
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    check(state, 16'hACE1, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
