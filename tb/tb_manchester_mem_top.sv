// tb_manchester_mem_top: end-to-end test of the whole codec at its default
// parameters.
//
// Independent models run alongside the design: the PRSG (taps written out bit
// by bit, seed 16'hACE1), the FM0 and Manchester encoders, and the address
// LFSR. For every word n the testbench expects
//   payload    = PRSG bits 7n .. 7n+6, behind a start bit 0;
//   wr_word    = the code of those 8 bits in the word's mode;
//   wr_addr    = a(n), with a(0) = 1 and a(n+1) the LFSR step of a(n) with
//                input bit = PRSG bit 7(n+1) (the PRSG output when the step
//                happens, during the next word's start bit);
//   one write every 18 system clocks (9 bit clocks per word);
// and the decoded payload bits must come out in PRSG order with no code
// error and no rejected word. The code mode is changed at random when a word
// has been decoded; the word after the one being encoded then takes it.
// Counted mechanisms, each must occur: FM0 words, Manchester words, mode
// switches between consecutive words, writes to an address already written
// (LFSR wrap), and complete decoded words.
module tb_manchester_mem_top;
  timeunit 1ns; timeprecision 100ps;
  import codec_pkg::*;

  localparam int NWORDS = 300;

  logic        clk = 1'b0, rst = 1'b1, mode = 1'b0;
  logic        line, bclk, wr_en, dec_bit, dec_valid, dec_err, dec_reject, dec_done;
  logic [3:0]  wr_addr;
  logic [15:0] wr_word;
  int          checks = 0, failures = 0;

  manchester_mem_top dut (.clk, .rst, .mode, .line, .bclk, .wr_en, .wr_addr, .wr_word,
                          .dec_bit, .dec_valid, .dec_err, .dec_reject, .dec_done);

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // PRSG bit stream
  logic prsg_bits [$];
  initial begin
    logic [15:0] s;
    s = 16'hACE1;
    for (int i = 0; i < 7 * (NWORDS + 4); i++) begin
      prsg_bits.push_back(s[0]);
      s = {s[0] ^ s[2] ^ s[3] ^ s[5], s[15:1]};
    end
  end

  function automatic logic [15:0] encode(input logic [7:0] bits, input logic m);
    logic [15:0] w;
    logic b, a, x;
    b = 1'b0;
    for (int s = 0; s < 8; s++) begin
      x = bits[7-s];
      if (!m) begin a = ~b; b = x ^ b; end
      else begin a = ~x; b = x; end
      w[15-2*s] = a;
      w[14-2*s] = b;
    end
    return w;
  endfunction

  // mechanisms
  int n_fm0 = 0, n_man = 0, n_switch = 0, n_rewrite = 0, n_decoded = 0;

  logic mode_q [$];
  int   word_n = 0, bit_n = 0, cyc = 0, last_wr = -1;
  logic [3:0] addr_m = 4'd1;
  logic last_mode;
  bit   written [16];

  always @(posedge clk) cyc++;

  // check writes and decoded bits at the falling edge (outputs are settled)
  always @(negedge clk) if (!rst) begin
    if (wr_en) begin
      logic [7:0] bits;
      logic       m;
      m = mode_q.pop_front();
      bits[7] = 1'b0;
      for (int k = 0; k < 7; k++) bits[6-k] = prsg_bits[7*word_n + k];
      check(wr_word, encode(bits, m), "wr_word");
      check(wr_addr, addr_m, "wr_addr");
      if (last_wr >= 0) check(cyc - last_wr, 18, "word period");
      last_wr = cyc;
      if (m) n_man++; else n_fm0++;
      if (word_n > 0 && m != last_mode) n_switch++;
      if (written[wr_addr]) n_rewrite++;
      written[wr_addr] = 1'b1;
      last_mode = m;
      addr_m = {addr_m[0] ^ addr_m[1] ^ prsg_bits[7*(word_n+1)], addr_m[3:1]};
      word_n++;
    end
    if (dec_valid) begin
      check(int'(dec_bit), int'(prsg_bits[bit_n]), "decoded bit");
      bit_n++;
    end
    if (dec_err)    begin checks++; failures++; $display("FAIL code error at %0t", $time); end
    if (dec_reject) begin checks++; failures++; $display("FAIL rejected word at %0t", $time); end
    if (dec_done) begin
      n_decoded++;
      check(bit_n, 7 * n_decoded, "bits per word");
      mode = 1'($urandom);
      mode_q.push_back(mode);
    end
  end

  initial begin
    mode_q.push_back(1'b0); mode_q.push_back(1'b0);
    repeat (5) @(negedge clk);
    rst = 1'b0;
    wait (n_decoded == NWORDS);
    @(negedge clk);
    check(bit_n, 7 * NWORDS, "decoded bits");
    check(int'(n_fm0 > 0), 1, "FM0 words");
    check(int'(n_man > 0), 1, "Manchester words");
    check(int'(n_switch > 0), 1, "mode switches");
    check(int'(n_rewrite > 0), 1, "address reuse");
    $display("words=%0d fm0=%0d manchester=%0d switches=%0d rewrites=%0d decoded_bits=%0d",
             word_n, n_fm0, n_man, n_switch, n_rewrite, bit_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((NWORDS + 10) * 18 * 10 * 1ns);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
