// spad_arbiter: shares a tile scratchpad's single read/write port among the
// three agents that can reach it in the same cycle.
//
// Fixed priority: 1) the local MXRA section (its schedule cannot wait),
// 2) remote requests arriving over the network (including words that fill
// frames), 3) the local core. Exactly one request is granted per cycle; the
// others see no grant and retry. The read data of the one-cycle scratchpad
// comes back in the next cycle on rdata, with rvalid_* telling whose read it
// was.
//
// Interface / timing: requests and grants are combinational in the same
// cycle; the grant drives the scratchpad port directly. The priority order is
// the architecture's; the port bundle is this design's.
module spad_arbiter
  import lac_pkg::*;
#(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  // requesters: 0 = MXRA, 1 = remote, 2 = local core
  input  logic [2:0]    req,
  input  logic [2:0]    we,
  input  logic [AW-1:0] addr [3],
  input  word_t         wdata [3],
  output logic [2:0]    gnt,
  output logic [2:0]    rvalid,
  // scratchpad port
  output logic          sp_en,
  output logic          sp_we,
  output logic [AW-1:0] sp_addr,
  output word_t         sp_wdata
);
  logic [2:0] rd_q;
  always_comb begin
    gnt = '0;
    if (req[0])      gnt[0] = 1'b1;
    else if (req[1]) gnt[1] = 1'b1;
    else if (req[2]) gnt[2] = 1'b1;
    sp_en    = |req;
    sp_we    = 1'b0;
    sp_addr  = '0;
    sp_wdata = '0;
    for (int i = 0; i < 3; i++) begin
      if (gnt[i]) begin
        sp_we    = we[i];
        sp_addr  = addr[i];
        sp_wdata = wdata[i];
      end
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_q <= '0;
    else        rd_q <= gnt & ~we;
  end
  assign rvalid = rd_q;

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
