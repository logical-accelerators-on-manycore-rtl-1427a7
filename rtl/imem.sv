// imem: instruction store read by the expander's fetch stage in place of its
// I-cache. WORDS 32-bit words (4 kB by default), word-addressed by pc[..:2];
// a request in cycle t returns the instruction in cycle t+1 (the 1-cycle hit
// latency of the I-cache). A write port loads the program. Misses, tags and
// refills of a real I-cache are not modelled: every fetch hits.
module imem
  import lac_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  word_t                    wdata,
  input  logic                     req,
  input  word_t                    pc,
  output word_t                    instr
);
  word_t mem [WORDS];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (req) instr <= mem[pc[$clog2(WORDS)+1:2]];
  end
endmodule
