// scratchpad: a tile's software-managed data memory, one read/write port.
//
// WORDS 32-bit words (4 kB by default) with a one-cycle read: the word
// addressed in cycle t appears on rdata in cycle t+1 and stays there until
// the next read. A write in cycle t is visible to reads from t+1. Byte
// enables are not modelled; every access is a full word. Single port and
// 1-cycle latency follow the tile parameters of the architecture; the rest is
// a plain synchronous RAM.
module scratchpad
  import lac_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  word_t                    wdata,
  output word_t                    rdata
);
  word_t mem [WORDS];
  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
