// recollection_ctrl: the memory controller. It makes the bit clock and, for
// every encoded word, writes it to memory at the address from the LFSR, reads
// it back and hands it to the decoder.
//
// Runs on the system clock. `bclk` is a divide-by-two of the system clock and
// clocks the encoder side; it runs freely, also during reset, so reset must
// be held for at least 4 system clocks to reach the bit-clock side. When the symbol packer
// flags a complete word (word_valid) the controller walks four states:
//   WAIT  -> WRITE : mem_we, the word is written at mem_addr
//   WRITE -> READ  : mem_re, the same address is read back
//   READ  -> LOAD  : dec_load, the read word goes to the decoder;
//                    addr_step moves the address LFSR to the next address
//   LOAD  -> WAIT
// A word arrives every 2*(BITS_PER_WORD+1) system clocks, so the controller
// is always back in WAIT well before the next one; an assertion checks this.
// Interface: clk, rst (synchronous), word_valid, word, word_mode, bclk,
// mem_we, mem_re, mem_wdata, dec_load, dec_mode, addr_step.
// That each encoded word is stored at an LFSR address and then decoded back
// follows the document; the state sequence and the read-back of the same
// address are this design's own choices.
module recollection_ctrl
  import codec_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              word_valid,
  input  logic [WORD_W-1:0] word,
  input  code_mode_e        word_mode,
  output logic              bclk,
  output logic              mem_we,
  output logic              mem_re,
  output logic [WORD_W-1:0] mem_wdata,
  output logic              dec_load,
  output code_mode_e        dec_mode,
  output logic              addr_step
);

  typedef enum logic [1:0] {
    ST_WAIT,
    ST_WRITE,
    ST_READ,
    ST_LOAD
  } ctrl_state_e;

  ctrl_state_e state;

  // The bit clock is not reset: it keeps running during reset so that the
  // synchronous resets of the bit-clock side take effect.
  always_ff @(posedge clk) bclk <= ~bclk;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= ST_WAIT;
      mem_wdata <= '0;
      dec_mode  <= MODE_FM0;
    end else begin
      unique case (state)
        ST_WAIT: if (word_valid) begin
          state     <= ST_WRITE;
          mem_wdata <= word;
          dec_mode  <= word_mode;
        end
        ST_WRITE: state <= ST_READ;
        ST_READ:  state <= ST_LOAD;
        ST_LOAD:  state <= ST_WAIT;
        default:  state <= ST_WAIT;
      endcase
    end
  end

  assign mem_we    = (state == ST_WRITE);
  assign mem_re    = (state == ST_READ);
  assign dec_load  = (state == ST_LOAD);
  assign addr_step = (state == ST_LOAD);

  // A new word must never arrive while the previous one is still in flight.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    word_valid |-> state == ST_WAIT);

endmodule
