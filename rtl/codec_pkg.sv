// codec_pkg: types and constants shared by the FM0/Manchester memory codec.
//
// A data word is framed as BITS_PER_WORD bit slots: slot 0 carries a start
// bit (always 0), slots 1..BITS_PER_WORD-1 carry payload bits. Each bit slot
// becomes two half-bit symbols on the encoder line (A in the first half of the
// bit clock, B in the second), so a word of 8 slots fills the 16-bit stored
// word. One further idle slot (IDLE_SLOT) follows every word; the encoder is
// held in reset during it so each word starts from a known state.
// The 16-bit width of the stored word follows the document; the framing
// (start bit, idle slot) and the mode encoding are this design's own choices.
package codec_pkg;

  // Code selection. FM0 = 0, Manchester = 1 (assumed polarity).
  typedef enum logic {
    MODE_FM0        = 1'b0,
    MODE_MANCHESTER = 1'b1
  } code_mode_e;

  localparam int unsigned WORD_W        = 16;          // stored code word width
  localparam int unsigned BITS_PER_WORD = WORD_W / 2;  // bit slots per word
  localparam int unsigned SLOT_W        = 4;           // holds 0..BITS_PER_WORD
  localparam logic [SLOT_W-1:0] IDLE_SLOT = SLOT_W'(BITS_PER_WORD);

endpackage
