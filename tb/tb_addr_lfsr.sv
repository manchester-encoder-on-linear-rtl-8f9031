// tb_addr_lfsr: checks the address LFSR.
// With the input bit held at 0 it must run through all 15 non-zero addresses
// before repeating (x^4 + x^3 + 1). With random input bits and random steps it
// is compared after every clock with a reference that computes the new top
// bit as a0 ^ a1 ^ in_bit.
module tb_addr_lfsr;
  timeunit 1ns; timeprecision 100ps;

  logic       clk = 1'b0, rst = 1'b1, step = 1'b0, in_bit = 1'b0;
  logic [3:0] addr, ref_a;
  int         checks = 0, failures = 0;
  bit         seen [16];

  addr_lfsr dut (.clk, .rst, .step, .in_bit, .addr);

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    check(addr, 1, "seed");
    // maximal length with no input
    step = 1'b1;
    for (int i = 0; i < 15; i++) begin
      checks++;
      if (seen[addr]) begin failures++; $display("FAIL address %0d repeated early", addr); end
      seen[addr] = 1'b1;
      @(negedge clk);
    end
    check(addr, 1, "period 15");
    check(int'(seen[0]), 0, "zero never reached");
    // random input and step
    ref_a = addr;
    repeat (400) begin
      step = 1'($urandom); in_bit = 1'($urandom);
      @(negedge clk);
      if (step) ref_a = {ref_a[0] ^ ref_a[1] ^ in_bit, ref_a[3:1]};
      check(addr, ref_a, "addr");
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
