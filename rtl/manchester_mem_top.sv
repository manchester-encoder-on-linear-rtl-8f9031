// manchester_mem_top: a pseudo-random bit stream is line-coded with a shared
// FM0/Manchester encoder, packed into 16-bit code words, stored in memory at
// addresses from an LFSR, read back and decoded to 1-bit data again.
//
// Two clocks: the system clock `clk` (input) and the bit clock `bclk`, its
// divide-by-two made by the memory controller. The bit-clock side is the
// bit sequencer, the PRSG and the encoder; it sends one word as a start bit
// 0 and BITS_PER_WORD-1 PRSG bits, then one idle bit during which the encoder
// is reset. The system-clock side samples the line twice per bit (symbol
// packer), and the controller writes each finished word into the memory at
// the current LFSR address, reads it back and passes it to the decoder, which
// checks the word's MSB, decodes it and reports the payload bits serially.
// `mode` (0 = FM0, 1 = Manchester) is taken at the start of each word.
// Signals cross between the clock domains only from registers that are
// stable at the sampling edge: bit-clock registers change right after a
// system-clock edge and are read at the next one.
// Ports: clk, rst (synchronous, active high; hold for at least 4 clk cycles),
// mode, line (encoded line), bclk, wr_en/wr_addr/wr_word (memory writes),
// dec_bit/dec_valid (decoded payload bits), dec_err (code violation),
// dec_reject (word with MSB 0), dec_done (end of a decoded word).
// Throughput: one word of BITS_PER_WORD-1 payload bits every
// BITS_PER_WORD+1 bit clocks. The blocks and their order follow the
// document; the framing, clocking and handshakes are this design's own.
module manchester_mem_top
  import codec_pkg::*;
#(
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              mode,
  output logic              line,
  output logic              bclk,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [WORD_W-1:0] wr_word,
  output logic              dec_bit,
  output logic              dec_valid,
  output logic              dec_err,
  output logic              dec_reject,
  output logic              dec_done
);

  // bit-clock side
  logic              prsg_bit, prsg_step;
  logic [SLOT_W-1:0] slot;
  code_mode_e        seq_mode;
  logic              x, enc_rst;

  // system-clock side
  logic [WORD_W-1:0] pk_word, mem_wdata, mem_rdata;
  code_mode_e        pk_mode, dec_mode;
  logic              pk_valid, mem_we, mem_re, dec_load, addr_step;
  logic [ADDR_W-1:0] addr;

  bit_sequencer u_seq (
    .clk(bclk), .rst, .mode_in(code_mode_e'(mode)), .prsg_bit,
    .slot, .word_mode(seq_mode), .x, .enc_rst, .prsg_step
  );

  prsg u_prsg (
    .clk(bclk), .rst, .step(prsg_step), .bit_o(prsg_bit), .state()
  );

  fm0_manchester_encoder u_enc (
    .clk(bclk), .rst(enc_rst), .mode(seq_mode), .x, .out(line)
  );

  symbol_packer u_pack (
    .clk, .rst, .line, .bclk, .slot, .word_mode_in(seq_mode),
    .word(pk_word), .word_mode(pk_mode), .word_valid(pk_valid)
  );

  recollection_ctrl u_ctrl (
    .clk, .rst, .word_valid(pk_valid), .word(pk_word), .word_mode(pk_mode),
    .bclk, .mem_we, .mem_re, .mem_wdata, .dec_load, .dec_mode, .addr_step
  );

  addr_lfsr #(.ADDR_W(ADDR_W), .TAPS(ADDR_W'(4'b0011)), .SEED(ADDR_W'(1))) u_addr (
    .clk, .rst, .step(addr_step), .in_bit(prsg_bit), .addr
  );

  code_memory #(.ADDR_W(ADDR_W), .WORD_W(WORD_W)) u_mem (
    .clk, .we(mem_we), .re(mem_re), .addr, .wdata(mem_wdata), .rdata(mem_rdata)
  );

  code_decoder u_dec (
    .clk, .rst, .load(dec_load), .word(mem_rdata), .mode(dec_mode),
    .bit_o(dec_bit), .bit_valid(dec_valid), .code_err(dec_err),
    .reject(dec_reject), .done(dec_done), .busy()
  );

  assign wr_en   = mem_we;
  assign wr_addr = addr;
  assign wr_word = mem_wdata;

endmodule
