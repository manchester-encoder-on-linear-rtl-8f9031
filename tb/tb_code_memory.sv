// tb_code_memory: random writes and reads against an associative-array model.
// Every address is written first; then random mixes of write and read (and
// both at once, which must return the old word) are compared one cycle after
// the read.
module tb_code_memory;
  timeunit 1ns; timeprecision 100ps;

  logic        clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [3:0]  addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] model [16];
  int          checks = 0, failures = 0;

  code_memory dut (.clk, .we, .re, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    @(negedge clk);
    for (int a = 0; a < 16; a++) begin
      we = 1'b1; addr = 4'(a); wdata = 16'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    repeat (500) begin
      logic [15:0] exp;
      we = 1'($urandom); re = 1'($urandom); addr = 4'($urandom); wdata = 16'($urandom);
      exp = model[addr];
      if (we) model[addr] = wdata;
      @(negedge clk);
      if (re) begin
        checks++;
        if (rdata !== exp) begin
          failures++;
          $display("FAIL read addr %0d: got %h expected %h", addr, rdata, exp);
        end
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
