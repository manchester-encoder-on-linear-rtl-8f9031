// tb_code_decoder: checks decoding of stored code words.
// Words are built here by an independent encoder model (FM0: A = ~Bprev,
// B = X ^ Bprev from Bprev = 0; Manchester: A = ~X, B = X) from a start bit 0
// and 7 random payload bits. For each load the testbench checks, cycle by
// cycle, that slot k is reported k+1 clocks after load: payload bits and
// bit_valid, code_err only where expected, done with the last bit. Cases:
// clean words in both codes; one first-half symbol flipped (code error in
// that slot); start bit 1 (code error in slot 0); MSB 0 (reject, no decode).
module tb_code_decoder;
  timeunit 1ns; timeprecision 100ps;
  import codec_pkg::*;

  logic        clk = 1'b0, rst = 1'b1, load = 1'b0;
  logic [15:0] word = '0;
  code_mode_e  mode = MODE_FM0;
  logic        bit_o, bit_valid, code_err, reject, done, busy;
  int          checks = 0, failures = 0;
  int          n_reject = 0, n_err_words = 0, n_clean = 0;

  code_decoder dut (.clk, .rst, .load, .word, .mode, .bit_o, .bit_valid, .code_err, .reject, .done, .busy);

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // bits[7] is slot 0 (start bit), bits[6:0] the payload, MSB first
  function automatic logic [15:0] encode(input logic [7:0] bits, input code_mode_e m);
    logic [15:0] w;
    logic b, a, x;
    b = 1'b0;
    for (int s = 0; s < 8; s++) begin
      x = bits[7-s];
      if (m == MODE_FM0) begin a = ~b; b = x ^ b; end
      else begin a = ~x; b = x; end
      w[15-2*s]   = a;
      w[14-2*s]   = b;
    end
    return w;
  endfunction

  // load w and check the 8 slots; err_slot = -1 for none
  task automatic run(input logic [15:0] w, input code_mode_e m, input logic [7:0] bits, input int err_slot);
    @(negedge clk);
    word = w; mode = m; load = 1'b1;
    @(negedge clk);
    load = 1'b0; word = 16'($urandom);
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      check(int'(code_err), int'(k == err_slot), "code_err");
      check(int'(bit_valid), int'(k != 0), "bit_valid");
      if (k != 0 && k != err_slot) check(int'(bit_o), int'(bits[7-k]), "bit");
      check(int'(done), int'(k == 7), "done");
      check(int'(reject), 0, "no reject");
    end
    @(negedge clk);
    check(int'(busy), 0, "idle after word");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (200) begin
      logic [7:0] bits;
      code_mode_e m;
      logic [15:0] w;
      int kind, s;
      bits = {1'b0, 7'($urandom)};
      m = code_mode_e'(1'($urandom));
      w = encode(bits, m);
      kind = $urandom_range(0, 3);
      if (kind == 0) begin          // clean
        run(w, m, bits, -1); n_clean++;
      end else if (kind == 1) begin // flip the first-half symbol of slot s >= 1
        s = $urandom_range(1, 7);
        w[15-2*s] = ~w[15-2*s];
        run(w, m, bits, s); n_err_words++;
      end else if (kind == 2) begin // MSB 0: reject
        w[15] = 1'b0;
        @(negedge clk);
        word = w; mode = m; load = 1'b1;
        @(negedge clk);
        load = 1'b0;
        check(int'(reject), 1, "reject");
        check(int'(busy), 0, "not busy after reject");
        repeat (3) begin
          @(negedge clk);
          check(int'(bit_valid | code_err | done), 0, "silent after reject");
        end
        n_reject++;
      end else begin                // start bit 1 (Manchester would give MSB 0)
        bits[7] = 1'b1;
        w = encode(bits, MODE_FM0);
        run(w, MODE_FM0, bits, 0); n_err_words++;
      end
    end
    check(int'(n_clean > 0 && n_err_words > 0 && n_reject > 0), 1, "all cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
