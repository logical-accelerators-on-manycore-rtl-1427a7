// rockcress_group: one software-defined vector group of a Rockcress manycore.
//
// The group is a scalar tile plus a ROWS x COLS rectangle of vector tiles,
// with the scalar tile to the west of the top-left vector tile, which is the
// expander. Instructions travel over the inet as a comb: along row 0 from west
// to east, and down every column from north to south, so in an m x m group the
// farthest core is 2m-2 hops from the expander. Each vector tile has
//   - an inet_fetch stage (the expander also has an instruction store),
//   - a scratchpad whose frame area is tracked by a frame_queue, and
//   - a pred_flag for predicated execution.
// The scalar tile's memory unit turns vload operands into a wide access
// packet (vload_packet_gen) for the LLC slice (llc_bank), which streams one
// word per cycle straight into the vector tiles' scratchpads; each arriving
// word bumps its frame counter there.
//
// The core pipelines, the mesh network and the LLC's tags/DRAM are the
// baseline manycore's and are not part of this block: each vector core's
// decode, execute, scratchpad and frame ports, and the scalar core's commit
// and memory ports, are brought out. Tile 0 of the per-tile arrays is the
// expander; vector tile k (row-major) has thread id k.
//
// Interface / timing:
//   - cfg_we[t] writes tile t's vconfig (t = 0 scalar, 1.. vector tiles in
//     row-major order); the bitmask is computed here from the tile position,
//     as every core's software would. A tile joins the group when it writes.
//   - sc_msg_* is the scalar core's vissue/devec message port.
//   - vl_* is a vload from the scalar core; sw_* a single-word LLC access.
//   - fs_ready/fs_base answer frame_start; remem frees the head frame.
//   - core scratchpad accesses wait while a network word is written
//     (network arrivals have priority for the single port).
module rockcress_group
  import lac_pkg::*;
#(
  parameter int unsigned ROWS       = 1,
  parameter int unsigned COLS       = 4,
  parameter int unsigned SPAD_WORDS = 1024,   // 4 kB scratchpad
  parameter int unsigned IMEM_WORDS = 1024,   // 4 kB I-cache
  parameter int unsigned LLC_WORDS  = 4096,   // 16 kB LLC slice
  parameter int unsigned NUM_CTR    = 5,
  parameter int unsigned CTR_W      = 10,
  localparam int unsigned VL  = ROWS * COLS,
  localparam int unsigned SAW = $clog2(SPAD_WORDS),
  localparam int unsigned IAW = $clog2(IMEM_WORDS),
  localparam int unsigned LAW = $clog2(LLC_WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // group formation
  input  logic [VL:0]        cfg_we,
  output logic [VL:0]        in_vector_mode,
  // scalar core: inet messages (vissue start PC, devec resume PC)
  input  logic               sc_msg_valid,
  input  inet_msg_t          sc_msg,
  output logic               sc_msg_ready,
  // scalar core: vload and single-word LLC port
  input  logic               vl_valid,
  output logic               vl_ready,
  input  logic [11:0]        vl_sp,
  input  logic [31:0]        vl_addr,
  input  logic [7:0]         vl_core,
  input  logic [4:0]         vl_width,
  input  vl_var_e            vl_var,
  input  vl_part_e           vl_part,
  input  logic               sw_valid,
  output logic               sw_ready,
  input  logic               sw_we,
  input  logic [LAW-1:0]     sw_addr,
  input  word_t              sw_wdata,
  input  logic [11:0]        sw_off,
  output logic               sc_resp_valid,   // words returned to the scalar core
  output llc_resp_t          sc_resp,
  // program load for the expander's instruction store
  input  logic               prog_we,
  input  logic [IAW-1:0]     prog_addr,
  input  word_t              prog_data,
  // per vector core: decode stage
  output logic [VL-1:0]      dec_valid,
  output word_t              dec_instr [VL],
  input  logic [VL-1:0]      dec_ready,
  // expander: branch resolution
  input  logic               br_valid,
  input  logic               br_taken,
  input  word_t              br_target,
  output logic               mt_active,
  // per tile: devec
  output logic [VL-1:0]      resume_valid,
  output word_t              resume_pc [VL],
  // per vector core: predication (execute stage)
  input  logic [VL-1:0]      ex_valid,
  input  word_t              ex_instr [VL],
  input  word_t              ex_rs1 [VL],
  input  word_t              ex_rs2 [VL],
  output logic [VL-1:0]      squash,
  // frame queue configuration (same CSR value written by every vector core)
  input  logic               fq_cfg_we,
  input  logic [SAW-1:0]     fq_base,
  input  logic [3:0]         fq_shift,
  input  logic [CTR_W-1:0]   fq_words,
  input  logic [4:0]         fq_nframes,
  // per vector core: frame_start / remem
  output logic [VL-1:0]      fs_ready,
  output logic [SAW-1:0]     fs_base [VL],
  input  logic [VL-1:0]      remem,
  output logic [VL-1:0]      frame_overrun,
  // per vector core: scratchpad access
  input  logic [VL-1:0]      sp_en,
  input  logic [VL-1:0]      sp_we,
  input  logic [SAW-1:0]     sp_addr [VL],
  input  word_t              sp_wdata [VL],
  output logic [VL-1:0]      sp_gnt,
  output word_t              sp_rdata [VL]
);

  // ------------------------------------------------------------------
  // vconfig each core writes (computed from its position)
  // ------------------------------------------------------------------
  function automatic vconfig_t cfg_of(input int unsigned t);
    vconfig_t c;
    c          = '0;
    c.grp_x    = 4'd1;
    c.grp_y    = 4'd0;
    c.grp_cols = 4'(COLS);
    c.grp_rows = 4'(ROWS);
    if (t == 0) begin
      c.role      = ROLE_SCALAR;
      c.icache_en = 1'b1;
    end else begin
      c.tid       = 8'(t - 1);
      c.role      = (t == 1) ? ROLE_EXPANDER : ROLE_VECTOR;
      c.icache_en = (t == 1);
      c.in_dir    = ((t - 1) < COLS) ? DIR_W : DIR_N;
    end
    return c;
  endfunction

  // ------------------------------------------------------------------
  // inet fabric
  // ------------------------------------------------------------------
  logic      out_valid [VL+1];
  inet_msg_t out_msg   [VL+1];
  logic      out_ready [VL+1];
  logic [3:0] in_valid [VL+1];
  inet_msg_t  in_msg   [VL+1][4];
  logic [3:0] in_ready [VL+1];
  vconfig_t   vcfg     [VL+1];

  // index of the tile at (r,c) of the vector rectangle; the scalar is 0
  function automatic int unsigned vidx(input int unsigned r, input int unsigned c);
    return 1 + r * COLS + c;
  endfunction

  always_comb begin
    for (int unsigned t = 0; t <= VL; t++) begin
      in_valid[t] = '0;
      for (int d = 0; d < 4; d++) in_msg[t][d] = '0;
    end
    // row 0 listens west, the others north
    for (int unsigned r = 0; r < ROWS; r++) begin
      for (int unsigned c = 0; c < COLS; c++) begin
        int unsigned t, w, n;
        t = vidx(r, c);
        w = (c == 0) ? 0 : vidx(r, c - 1);
        n = (r == 0) ? 0 : vidx(r - 1, c);
        if (r == 0) begin
          in_valid[t][DIR_W] = out_valid[w];
          in_msg[t][DIR_W]   = out_msg[w];
        end else begin
          in_valid[t][DIR_W] = out_valid[w];
          in_msg[t][DIR_W]   = out_msg[w];
          in_valid[t][DIR_N] = out_valid[n];
          in_msg[t][DIR_N]   = out_msg[n];
        end
      end
    end
    // a sender may send when every consumer of its output has room
    out_ready[0] = in_ready[vidx(0, 0)][DIR_W];
    for (int unsigned r = 0; r < ROWS; r++) begin
      for (int unsigned c = 0; c < COLS; c++) begin
        logic rdy;
        rdy = 1'b1;
        if (r == 0 && c + 1 < COLS) rdy = rdy && in_ready[vidx(r, c + 1)][DIR_W];
        if (r + 1 < ROWS)           rdy = rdy && in_ready[vidx(r + 1, c)][DIR_N];
        out_ready[vidx(r, c)] = rdy;
      end
    end
  end

  logic [VL-1:0] mt_arr;

  // expander instruction store
  logic  ic_req [VL+1];
  word_t ic_pc  [VL+1];
  word_t ic_instr;

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
    .req(ic_req[1]), .pc(ic_pc[1]), .instr(ic_instr)
  );

  // scalar tile fetch stage (message injection only)
  logic  s_dec_valid, s_resume_valid, s_mt;
  word_t s_dec_instr, s_resume_pc;
  logic  s_scr;

  inet_fetch u_scalar (
    .clk, .rst_n,
    .cfg_we(cfg_we[0]), .cfg(cfg_of(0)), .vcfg(vcfg[0]),
    .inet_in_valid(in_valid[0]), .inet_in(in_msg[0]), .inet_in_ready(in_ready[0]),
    .inet_out_valid(out_valid[0]), .inet_out(out_msg[0]), .inet_out_ready(out_ready[0]),
    .sc_msg_valid, .sc_msg, .sc_msg_ready(s_scr),
    .ic_req(ic_req[0]), .ic_pc(ic_pc[0]), .ic_instr('0),
    .dec_valid(s_dec_valid), .dec_instr(s_dec_instr), .dec_ready(1'b1),
    .br_valid(1'b0), .br_taken(1'b0), .br_target('0),
    .resume_valid(s_resume_valid), .resume_pc(s_resume_pc), .mt_active(s_mt)
  );
  assign sc_msg_ready = s_scr;

  // ------------------------------------------------------------------
  // LLC slice and wide accesses
  // ------------------------------------------------------------------
  logic      pkt_valid, pkt_ready;
  wide_pkt_t pkt;
  logic      resp_valid;
  llc_resp_t resp;

  vload_packet_gen u_vpg (
    .vcfg(vcfg[0]), .vl_valid, .vl_sp, .vl_addr, .vl_core, .vl_width,
    .vl_var, .vl_part, .pkt_valid, .pkt
  );
  // a vload that maps to no words retires at once
  assign vl_ready = pkt_ready || !pkt_valid;

  llc_bank #(.WORDS(LLC_WORDS)) u_llc (
    .clk, .rst_n,
    .req_valid(sw_valid), .req_ready(sw_ready), .req_we(sw_we), .req_addr(sw_addr),
    .req_wdata(sw_wdata), .req_core(8'd0), .req_off(sw_off),
    .pkt_valid, .pkt_ready, .pkt,
    .resp_valid, .resp
  );

  assign sc_resp_valid = resp_valid && resp.self;
  assign sc_resp       = resp;
  assign in_vector_mode[0] = (vcfg[0].role != ROLE_INDEP);

  // ------------------------------------------------------------------
  // vector tiles
  // ------------------------------------------------------------------
  for (genvar k = 0; k < VL; k++) begin : g_tile
    localparam int unsigned T = k + 1;
    logic arr;
    logic [3:0] unused_ntf_frame;
    logic unused_ntf_valid;
    logic [3:0] unused_head_idx;

    assign arr = resp_valid && !resp.self && (resp.core == 8'(k));

    inet_fetch u_fetch (
      .clk, .rst_n,
      .cfg_we(cfg_we[T]), .cfg(cfg_of(T)), .vcfg(vcfg[T]),
      .inet_in_valid(in_valid[T]), .inet_in(in_msg[T]), .inet_in_ready(in_ready[T]),
      .inet_out_valid(out_valid[T]), .inet_out(out_msg[T]), .inet_out_ready(out_ready[T]),
      .sc_msg_valid(1'b0), .sc_msg('0), .sc_msg_ready(),
      .ic_req(ic_req[T]), .ic_pc(ic_pc[T]), .ic_instr(ic_instr),
      .dec_valid(dec_valid[k]), .dec_instr(dec_instr[k]), .dec_ready(dec_ready[k]),
      .br_valid(k == 0 ? br_valid : 1'b0), .br_taken(br_taken), .br_target(br_target),
      .resume_valid(resume_valid[k]), .resume_pc(resume_pc[k]), .mt_active(mt_arr[k])
    );
    assign in_vector_mode[T] = (vcfg[T].role != ROLE_INDEP);

    pred_flag u_pred (
      .clk, .rst_n, .clear(cfg_we[T]),
      .ex_valid(ex_valid[k]), .ex_instr(ex_instr[k]), .ex_rs1(ex_rs1[k]), .ex_rs2(ex_rs2[k]),
      .flag(), .squash(squash[k])
    );

    frame_queue #(.NUM_CTR(NUM_CTR), .CTR_W(CTR_W), .OFF_W(SAW), .FIDX_W(4)) u_fq (
      .clk, .rst_n,
      .cfg_we(fq_cfg_we), .cfg_base(fq_base), .cfg_shift(fq_shift), .cfg_words(fq_words),
      .cfg_nframes(fq_nframes), .cfg_notify(1'b0),
      .arr_valid(arr), .arr_off(SAW'(resp.off)),
      .notify_i_valid(1'b0), .notify_i_frame('0),
      .notify_o_valid(unused_ntf_valid), .notify_o_frame(unused_ntf_frame),
      .head_ready(fs_ready[k]), .head_base(fs_base[k]), .head_idx(unused_head_idx),
      .remem(remem[k]), .overrun(frame_overrun[k])
    );

    // single port: network arrivals first, then the core
    logic           p_en, p_we;
    logic [SAW-1:0] p_addr;
    word_t          p_wdata;
    always_comb begin
      sp_gnt[k] = sp_en[k] && !arr;
      p_en      = arr || sp_en[k];
      p_we      = arr ? 1'b1 : sp_we[k];
      p_addr    = arr ? SAW'(resp.off) : sp_addr[k];
      p_wdata   = arr ? resp.data : sp_wdata[k];
    end

    scratchpad #(.WORDS(SPAD_WORDS)) u_spad (
      .clk, .en(p_en), .we(p_we), .addr(p_addr), .wdata(p_wdata), .rdata(sp_rdata[k])
    );
  end

  assign mt_active = mt_arr[0];

endmodule
