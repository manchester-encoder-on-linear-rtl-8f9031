// bit_sequencer: bit-clock side of the memory controller. It frames the data
// stream into words and drives the encoder's data and reset inputs.
//
// Runs on the bit clock. A slot counter walks 0 .. BITS_PER_WORD-1 and then
// the idle slot IDLE_SLOT, one step per bit clock. Slot 0 sends the start bit
// 0; slots 1..BITS_PER_WORD-1 send the PRSG output bit, and the PRSG is
// stepped at the end of each of those slots. In the idle slot the encoder is
// held in reset, so every word starts with B(t-1) = 0. The code mode is
// sampled from `mode_in` when a word starts and held for the whole word.
// Interface: clk (bit clock), rst (synchronous), mode_in, prsg_bit, slot,
// word_mode, x (to the encoder), enc_rst (to the encoder), prsg_step.
// `x`, `enc_rst` and `prsg_step` change only at the rising bit-clock edge.
// The framing is this design's own choice; the document only says that the
// controller stores encoded 16-bit words of data from the PRSG.
module bit_sequencer
  import codec_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  code_mode_e        mode_in,
  input  logic              prsg_bit,
  output logic [SLOT_W-1:0] slot,
  output code_mode_e        word_mode,
  output logic              x,
  output logic              enc_rst,
  output logic              prsg_step
);

  logic idle;
  logic payload;

  assign idle    = (slot == IDLE_SLOT);
  assign payload = (slot != '0) && !idle;

  always_ff @(posedge clk) begin
    if (rst) begin
      slot      <= IDLE_SLOT;
      word_mode <= MODE_FM0;
    end else begin
      slot <= idle ? '0 : slot + 1'b1;
      if (idle) word_mode <= mode_in;
    end
  end

  assign x         = payload ? prsg_bit : 1'b0;
  assign enc_rst   = rst | idle;
  assign prsg_step = payload;

endmodule
