// code_decoder: turns a stored 16-bit code word back into 1-bit data.
//
// On `load` it looks at the word's MSB. A stored word always begins with
// symbol A = 1 (the encoder starts each word from reset in FM0, and the start
// bit 0 gives high-then-low in Manchester), so a word whose MSB is 0 was never
// written by the encoder: it is rejected with a one-cycle `reject` pulse and
// not decoded. Otherwise the word is walked two symbols (A, B) per cycle, MSB
// first, for BITS_PER_WORD cycles:
//   FM0:        bit = ~(A ^ B); a code error if A equals the previous B
//               (no transition at the bit boundary; the previous B of slot 0
//               is the encoder's reset value 0).
//   Manchester: bit = B;        a code error if A equals B.
// Slot 0 is the start bit: it must decode to 0, else a code error. Slots
// 1..BITS_PER_WORD-1 are presented on `bit_o` with `bit_valid`.
// Interface: clk, rst (synchronous), load, word, mode, bit_o, bit_valid,
// code_err (one pulse per faulty slot, aligned with that slot's output),
// reject, done (with the last payload bit), busy.
// Timing: the start-bit slot is checked in the cycle after load, payload bit
// k (1-based) appears k+1 cycles after load; one new word may be loaded in the
// cycle that `done` is high or later.
// That a word is decoded only when its MSB is 1 follows the document; the
// decoding rules are the inverse of the encoder, and the error checks are this
// design's own addition.
module code_decoder
  import codec_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  logic [WORD_W-1:0] word,
  input  code_mode_e        mode,
  output logic              bit_o,
  output logic              bit_valid,
  output logic              code_err,
  output logic              reject,
  output logic              done,
  output logic              busy
);

  logic [WORD_W-1:0] sh;
  logic [SLOT_W-1:0] cnt;
  code_mode_e        mode_q;
  logic              prev_b;
  logic              sym_a, sym_b;
  logic              dec_bit, dec_err;

  assign sym_a = sh[WORD_W-1];
  assign sym_b = sh[WORD_W-2];

  always_comb begin
    if (mode_q == MODE_FM0) begin
      dec_bit = ~(sym_a ^ sym_b);
      dec_err = (sym_a == prev_b);
    end else begin
      dec_bit = sym_b;
      dec_err = (sym_a == sym_b);
    end
    if (cnt == '0 && dec_bit) dec_err = 1'b1;  // start bit must be 0
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sh        <= '0;
      cnt       <= '0;
      mode_q    <= MODE_FM0;
      prev_b    <= 1'b0;
      busy      <= 1'b0;
      bit_o     <= 1'b0;
      bit_valid <= 1'b0;
      code_err  <= 1'b0;
      reject    <= 1'b0;
      done      <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      code_err  <= 1'b0;
      reject    <= 1'b0;
      done      <= 1'b0;
      if (busy) begin
        bit_o     <= dec_bit;
        bit_valid <= (cnt != '0);
        code_err  <= dec_err;
        prev_b    <= sym_b;
        sh        <= {sh[WORD_W-3:0], 2'b00};
        cnt       <= cnt + 1'b1;
        if (cnt == SLOT_W'(BITS_PER_WORD - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (load) begin
        if (word[WORD_W-1]) begin
          sh     <= word;
          cnt    <= '0;
          mode_q <= mode;
          prev_b <= 1'b0;
          busy   <= 1'b1;
        end else begin
          reject <= 1'b1;
        end
      end
    end
  end

endmodule
