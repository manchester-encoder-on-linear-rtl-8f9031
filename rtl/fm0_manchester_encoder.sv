// fm0_manchester_encoder: one shared datapath that produces either the FM0 or
// the Manchester line code of a serial bit stream.
//
// The bit clock `clk` is used both as the register clock and as data: its
// high half is the first half of a bit period (symbol A) and its low half the
// second (symbol B). The single flip-flop holds B(t-1), the second-half level
// of the previous bit. For FM0:
//     A(t) = ~B(t-1)          (a transition at every bit boundary)
//     B(t) = X ^ B(t-1)       (a mid-bit transition only when X = 0)
//     code = clk ? A(t) : B(t)
// For Manchester the code is X ^ clk (X = 0 gives high-then-low).
// The two codes share one NOT and one XNOR:
//     mux2  = mode ? clk : B(t-1)      (MUX_2)
//     n     = ~mux2                    FM0: A(t)   Manchester: ~clk
//     y     = X xnor n                 FM0: B(t)   Manchester: X ^ clk
//     out   = (clk & FM0) ? n : y      (MUX_1)
// and the flip-flop captures y at every rising clk edge, which in FM0 mode is
// B(t) at the end of bit t. In Manchester mode the flip-flop is not on the
// output path.
//
// Interface: clk, rst (synchronous, active high, clears B to 0 so the next bit
// starts with A = 1), mode (codec_pkg::code_mode_e), x (data bit, must be held
// for the whole bit period, changing only at the rising clk edge), out (line).
// `out` is combinational in clk, x and the flip-flop.
//
// The equations, the state codes and the component set (one flip-flop, two
// muxes, an XNOR, a NOT) follow the document; the exact wiring, the
// synchronous reset, the mode polarity and the AND that gates MUX_1's select
// with the mode are this design's own choices.
module fm0_manchester_encoder
  import codec_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  code_mode_e mode,
  input  logic       x,
  output logic       out
);

  logic b_prev;     // flip-flop: B(t-1)
  logic mux2;       // MUX_2: clk (Manchester) or B(t-1) (FM0)
  logic n;          // NOT:   A(t) in FM0, ~clk in Manchester
  logic y;          // XNOR:  B(t) in FM0, Manchester code
  logic first_half; // MUX_1 select

  always_ff @(posedge clk) begin
    if (rst) b_prev <= 1'b0;
    else     b_prev <= y;
  end

  always_comb begin
    mux2       = (mode == MODE_MANCHESTER) ? clk : b_prev;
    n          = ~mux2;
    y          = ~(x ^ n);
    first_half = clk & (mode == MODE_FM0);
    out        = first_half ? n : y;
  end

endmodule
