// symbol_packer: turns the encoder's line output into 16-bit code words.
//
// Runs on the system clock, which is twice the bit clock. At every rising
// system-clock edge it shifts in the level of the line; `bclk` is the bit
// clock level before that edge, so a sample taken while bclk = 1 is the
// first-half symbol A and one taken while bclk = 0 the second-half symbol B
// of bit slot `slot`. Samples from the idle slot are ignored. After the B
// symbol of the last slot the 16 symbols (A of slot 0 in the MSB) are
// presented on `word` with a one-cycle `word_valid` pulse, together with the
// mode the word was encoded in.
// Interface: clk, rst (synchronous), line, bclk, slot, word_mode_in, word,
// word_mode, word_valid. Latency: word_valid is high for the one cycle that
// follows the edge at which the last symbol is sampled.
// The 16-bit word width follows the document; the sampling scheme is this
// design's own.
module symbol_packer
  import codec_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              line,
  input  logic              bclk,
  input  logic [SLOT_W-1:0] slot,
  input  code_mode_e        word_mode_in,
  output logic [WORD_W-1:0] word,
  output code_mode_e        word_mode,
  output logic              word_valid
);

  logic [WORD_W-2:0] sh;  // the last WORD_W-1 samples
  logic              last;

  assign last = (slot == SLOT_W'(BITS_PER_WORD - 1)) && !bclk;

  always_ff @(posedge clk) begin
    if (rst) begin
      sh         <= '0;
      word       <= '0;
      word_mode  <= MODE_FM0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (slot != IDLE_SLOT) sh <= {sh[WORD_W-3:0], line};
      if (last) begin
        word       <= {sh, line};
        word_mode  <= word_mode_in;
        word_valid <= 1'b1;
      end
    end
  end

endmodule
