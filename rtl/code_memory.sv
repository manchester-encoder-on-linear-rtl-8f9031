// code_memory: the memory that holds the encoded words.
//
// A single-port synchronous RAM of 2**ADDR_W words of WORD_W bits. A write
// (we) stores wdata at addr on the rising clock edge; a read (re) returns the
// word at addr on rdata after that edge (one cycle latency) and holds it until
// the next read. Written as an array so synthesis can map it to a RAM macro;
// it has no reset and its contents start undefined.
// The 16-bit word follows the document; the depth and the single-port,
// one-cycle-read organisation are this design's own choices.
module code_memory #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned WORD_W = 16
) (
  input  logic              clk,
  input  logic              we,
  input  logic              re,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WORD_W-1:0] wdata,
  output logic [WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end

endmodule
