// llc_bank: one last-level-cache slice as seen by a vector group.
//
// The slice holds its share of the address space in a data array and answers
// two kinds of request: ordinary single-word reads and writes from a core, and
// wide accesses (vload packets), which it streams back one word per cycle
// through llc_wide_resp. Every response carries the receiving core and
// scratchpad offset, so loaded data goes straight into scratchpads.
//
// Interface / timing: a single-word request is accepted when req_ready is
// high (not while a wide access streams); a read answers in the next cycle
// (hit latency 1) on the shared response port with self = 1, addressed to the
// requesting core and the offset it gave. A wide packet is accepted when
// pkt_ready is high; its first word leaves two cycles later, then one per
// cycle.
//
// The data array stands in for the whole slice: tags, replacement and the
// DRAM behind it belong to the baseline cache and are not modelled, so every
// access hits. The default size is one of 16 slices of a 256 kB LLC.
module llc_bank
  import lac_pkg::*;
#(
  parameter int unsigned WORDS = 4096      // 16 kB slice
) (
  input  logic            clk,
  input  logic            rst_n,
  // single-word port (word address inside the slice)
  input  logic            req_valid,
  output logic            req_ready,
  input  logic            req_we,
  input  logic [$clog2(WORDS)-1:0] req_addr,
  input  word_t           req_wdata,
  input  logic [7:0]      req_core,
  input  logic [11:0]     req_off,
  // wide access packets
  input  logic            pkt_valid,
  output logic            pkt_ready,
  input  wide_pkt_t       pkt,
  // response port: one word per cycle
  output logic            resp_valid,
  output llc_resp_t       resp
);
  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  logic          w_rd_en, w_meta_valid, w_meta_self, w_busy;
  logic [AW-1:0] w_rd_addr;
  logic [7:0]    w_meta_core;
  logic [11:0]   w_meta_off;

  llc_wide_resp #(.ADDR_W(AW)) u_wide (
    .clk, .rst_n,
    .pkt_valid, .pkt_ready, .pkt,
    .rd_en(w_rd_en), .rd_addr(w_rd_addr),
    .meta_valid(w_meta_valid), .meta_self(w_meta_self),
    .meta_core(w_meta_core), .meta_off(w_meta_off),
    .busy(w_busy)
  );

  assign req_ready = !w_busy && !pkt_valid;

  logic          rd_en;
  logic [AW-1:0] rd_addr;
  always_comb begin
    rd_en   = w_rd_en || (req_valid && req_ready && !req_we);
    rd_addr = w_rd_en ? w_rd_addr : req_addr;
  end

  word_t      rdata_q;
  logic       rv_q;
  llc_resp_t  meta_q;

  always_ff @(posedge clk) begin
    if (req_valid && req_ready && req_we) mem[req_addr] <= req_wdata;
    if (rd_en) rdata_q <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rv_q   <= 1'b0;
      meta_q <= '0;
    end else begin
      rv_q <= rd_en;
      if (w_meta_valid) begin
        meta_q.self <= w_meta_self;
        meta_q.core <= w_meta_core;
        meta_q.off  <= w_meta_off;
      end else begin
        meta_q.self <= 1'b1;
        meta_q.core <= req_core;
        meta_q.off  <= req_off;
      end
      meta_q.data <= '0;
    end
  end

  always_comb begin
    resp_valid = rv_q;
    resp       = meta_q;
    resp.data  = rdata_q;
  end

endmodule
