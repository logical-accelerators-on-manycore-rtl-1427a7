// vload_packet_gen: the part of the scalar core's memory unit that turns a
// vload instruction into a wide access packet for an LLC slice.
//
// vload sp, addr, off, width, var carries the receiving scratchpad offset, the
// source byte address, the index of the first receiving vector core, the words
// per core and the variant. Combined with the group dimensions from the
// scalar core's vconfig, the unit works out how many words the request moves
// (width for SINGLE, width x vector length for GROUP, capped at one line; for
// SELF all of them return to the requester) and, for unaligned accesses, which
// part of which line the instruction covers: the SUFFIX part reads from the
// address to the end of its line, the PREFIX part reads the start of the next
// line, and its first response continues the count where the suffix stopped
// so that both halves land in the right cores and offsets.
//
// Purely combinational: pkt_valid/pkt follow the inputs in the same cycle.
// The mapping rule Cnt -> (BC + Cnt/RPC, BO + Cnt%RPC) is the architecture's;
// how the operands are packed and the clamping to one line are this design's.
module vload_packet_gen
  import lac_pkg::*;
#(
  parameter int unsigned LINE_WORDS = 16   // 64-byte lines
) (
  input  vconfig_t     vcfg,       // scalar core's vconfig (group dimensions)
  input  logic         vl_valid,
  input  logic [11:0]  vl_sp,      // (1) receiving scratchpad word offset
  input  logic [31:0]  vl_addr,    // (2) source byte address
  input  logic [7:0]   vl_core,    // (3) first receiving vector core
  input  logic [4:0]   vl_width,   // (4) words per vector core
  input  vl_var_e      vl_var,     // (5) variant
  input  vl_part_e     vl_part,    // aligned / suffix / prefix half
  output logic         pkt_valid,
  output wide_pkt_t    pkt
);
  localparam int unsigned LW = $clog2(LINE_WORDS);

  logic [31:0] waddr;
  logic [LW-1:0] w;          // word position inside the line
  logic [9:0] vlen, total, room;

  always_comb begin
    waddr = vl_addr >> 2;
    w     = waddr[LW-1:0];
    vlen  = 10'(vcfg.grp_cols) * 10'(vcfg.grp_rows);
    total = (vl_var == VL_GROUP) ? 10'(vl_width) * vlen : 10'(vl_width);
    if (total > 10'(LINE_WORDS)) total = 10'(LINE_WORDS);
    room  = 10'(LINE_WORDS) - 10'(w);

    pkt           = '0;
    pkt.base_core = vl_core;
    pkt.base_off  = vl_sp;
    pkt.rpc       = (vl_var == VL_SELF) ? 5'(total) : vl_width;
    pkt.self      = (vl_var == VL_SELF);
    unique case (vl_part)
      VL_PREFIX: begin
        pkt.addr  = (waddr & ~32'(LINE_WORDS - 1)) + 32'(LINE_WORDS);
        pkt.cnt0  = 5'(room);
        pkt.count = (total > room) ? 5'(total - room) : 5'd0;
      end
      default: begin  // aligned and suffix read from the address onwards
        pkt.addr  = waddr;
        pkt.cnt0  = 5'd0;
        pkt.count = (total > room) ? 5'(room) : 5'(total);
      end
    endcase
    if (vl_var == VL_SELF) pkt.base_core = 8'd0;
    pkt_valid = vl_valid && (pkt.count != 5'd0) && (vl_width != 5'd0);
  end

endmodule
