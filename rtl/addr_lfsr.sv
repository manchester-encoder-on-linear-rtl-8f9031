// addr_lfsr: address generator for the code memory.
//
// An ADDR_W-bit LFSR shifting right whose feedback (XOR of the state bits
// selected by TAPS) is further XORed with a serial input bit taken from the
// pseudo-random sequence generator before it enters the top bit. Each `step`
// moves to the next address; the current state is the address.
// Interface: clk, rst (synchronous, loads SEED), step, in_bit, addr.
// The document says the address comes from an LFSR whose input is taken from
// the PRSG; the width (16 locations), polynomial (x^4 + x^3 + 1), seed and the
// way the input is mixed in are this design's own choices.
module addr_lfsr #(
  parameter int unsigned        ADDR_W = 4,
  parameter logic [ADDR_W-1:0]  TAPS   = 4'b0011,
  parameter logic [ADDR_W-1:0]  SEED   = 4'b0001
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              step,
  input  logic              in_bit,
  output logic [ADDR_W-1:0] addr
);

  logic fb;

  assign fb = (^(addr & TAPS)) ^ in_bit;

  always_ff @(posedge clk) begin
    if (rst)       addr <= SEED;
    else if (step) addr <= {fb, addr[ADDR_W-1:1]};
  end

endmodule
