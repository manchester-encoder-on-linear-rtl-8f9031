// tb_fm0_manchester_encoder: checks the shared encoder against a reference
// model of both codes, half-bit by half-bit.
//
// The bit clock has a 10 ns period, high first. The data bit changes right
// after each rising edge. The line is sampled 3 ns into the high half (symbol
// A) and 3 ns into the low half (symbol B) and compared with
//   FM0:        A = ~Bprev, B = X ^ Bprev   (Bprev = 0 after reset)
//   Manchester: A = ~X,     B = X
// It also walks the four FM0 state codes (S1 = 11, S2 = 10, S3 = 01, S4 = 00)
// and checks every transition of the state diagram appears, and checks the
// example bit pattern 0,1,1,0,1 from reset.
module tb_fm0_manchester_encoder;
  timeunit 1ns; timeprecision 100ps;
  import codec_pkg::*;

  logic       clk = 1'b1;
  logic       rst = 1'b1;
  code_mode_e mode = MODE_FM0;
  logic       x = 1'b0;
  logic       out;
  int         checks = 0, failures = 0;
  logic       bprev;
  logic [1:0] st_prev, st_cur;
  int         trans_seen [4][2];  // [state code][X]

  fm0_manchester_encoder dut (.clk, .rst, .mode, .x, .out);

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // Send one bit and check both halves. Called just after a rising edge.
  task automatic send(input logic xv);
    logic a_exp, b_exp;
    x = xv;
    if (mode == MODE_FM0) begin
      a_exp = ~bprev;
      b_exp = xv ^ bprev;
    end else begin
      a_exp = ~xv;
      b_exp = xv;
    end
    #3 check(out, a_exp, "first half");
    #5 check(out, b_exp, "second half");
    if (mode == MODE_FM0) begin
      st_cur = {a_exp, b_exp};
      trans_seen[st_prev][xv]++;
      st_prev = st_cur;
    end
    bprev = b_exp;
    @(posedge clk); #0.5;
  endtask

  task automatic restart(input code_mode_e m);
    rst = 1'b1; mode = m;
    @(posedge clk); #0.5;
    rst = 1'b0; bprev = 1'b0; st_prev = 2'b00;  // reset state behaves as S4 (B = 0)
  endtask

  initial begin
    foreach (trans_seen[i, j]) trans_seen[i][j] = 0;
    @(posedge clk); #0.5;
    // FM0: pattern 0,1,1,0,1 from reset gives A/B = 10,11,00,10,00
    restart(MODE_FM0);
    send(0); send(1); send(1); send(0); send(1);
    repeat (200) send(1'($urandom));
    // Manchester
    restart(MODE_MANCHESTER);
    send(0); send(1); send(1); send(0); send(1);
    repeat (200) send(1'($urandom));
    // Back to FM0 after a reset
    restart(MODE_FM0);
    repeat (100) send(1'($urandom));
    // every edge of the FM0 state diagram was taken
    for (int s = 0; s < 4; s++)
      for (int b = 0; b < 2; b++) begin
        checks++;
        if (trans_seen[s][b] == 0) begin
          failures++;
          $display("FAIL transition from state code %02b with X=%0d never seen", s[1:0], b);
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
