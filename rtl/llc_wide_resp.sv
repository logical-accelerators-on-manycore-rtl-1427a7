// llc_wide_resp: the response counter an LLC slice uses to answer one wide
// (vload) access with a stream of single-word responses.
//
// When a wide access hits, the counter is loaded. Each cycle the unit reads
// the word at Addr + (Cnt - Cnt0) and addresses it to
//   core   = BC + Cnt / RPC
//   offset = BO + Cnt % RPC
// then increments Cnt, until `count` words have been sent. One response per
// cycle is the port limit of the slice. Cnt / RPC and Cnt % RPC are 5-bit
// operations, small enough to compute directly every cycle.
//
// Interface / timing: pkt_valid & pkt_ready accepts a packet; the first read
// (rd_en/rd_addr) and its metadata (meta_valid/meta_*) appear in the next
// cycle and one per cycle after that. The data array is outside, with a
// one-cycle read; the slice pairs the delayed metadata with the read data.
// The response network is assumed always to accept a word (no back-pressure).
module llc_wide_resp
  import lac_pkg::*;
#(
  parameter int unsigned ADDR_W = 12   // word address width of the data array
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pkt_valid,
  output logic              pkt_ready,
  input  wide_pkt_t         pkt,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  output logic              meta_valid,
  output logic              meta_self,
  output logic [7:0]        meta_core,
  output logic [11:0]       meta_off,
  output logic              busy
);
  wide_pkt_t p_q;
  logic [4:0] cnt_q;     // current Cnt
  logic [4:0] left_q;    // responses still to send
  logic [4:0] rpc;

  assign busy      = (left_q != 5'd0);
  assign pkt_ready = !busy;
  assign rpc       = (p_q.rpc == 5'd0) ? 5'd1 : p_q.rpc;

  always_comb begin
    rd_en      = busy;
    rd_addr    = ADDR_W'(p_q.addr + 32'(cnt_q - p_q.cnt0));
    meta_valid = busy;
    meta_self  = p_q.self;
    meta_core  = p_q.base_core + 8'(cnt_q / rpc);
    meta_off   = p_q.base_off + 12'(cnt_q % rpc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q    <= '0;
      cnt_q  <= '0;
      left_q <= '0;
    end else if (pkt_valid && pkt_ready) begin
      p_q    <= pkt;
      cnt_q  <= pkt.cnt0;
      left_q <= pkt.count;
    end else if (busy) begin
      cnt_q  <= cnt_q + 5'd1;
      left_q <= left_q - 5'd1;
    end
  end

endmodule
