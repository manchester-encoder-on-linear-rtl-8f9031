// prsg: pseudo-random sequence generator, the data source of the codec.
//
// A WIDTH-bit Fibonacci LFSR shifting right: the feedback bit is the XOR of
// the state bits selected by TAPS and enters at the top; the serial output is
// state bit 0. With the defaults (x^16 + x^14 + x^13 + x^11 + 1, written as
// the mask 16'h002D) the sequence repeats every 65535 steps.
// Interface: clk, rst (synchronous, loads SEED), step (advance one position at
// the rising clk edge), bit_o (current output bit), state (whole register).
// The document only names the block and says it supplies the data; width,
// polynomial, seed and the step enable are this design's own choices.
module prsg #(
  parameter int unsigned        WIDTH = 16,
  parameter logic [WIDTH-1:0]   TAPS  = 16'h002D,
  parameter logic [WIDTH-1:0]   SEED  = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             step,
  output logic             bit_o,
  output logic [WIDTH-1:0] state
);

  logic fb;

  assign fb    = ^(state & TAPS);
  assign bit_o = state[0];

  always_ff @(posedge clk) begin
    if (rst)       state <= SEED;
    else if (step) state <= {fb, state[WIDTH-1:1]};
  end

endmodule
