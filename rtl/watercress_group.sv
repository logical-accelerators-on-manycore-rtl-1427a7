// watercress_group: an MXRA group, a logical CGRA formed from the execute
// stages and scratchpads of ROWS x COLS neighbouring tiles.
//
// Each tile contributes an mxra_section (2x2 nodes on the core's functional
// units), its scratchpad behind an spad_arbiter (MXRA first, then remote
// requests, then the core), a frame_queue that counts words arriving in its
// scratchpad, an mxra_rr_turn copy and the fu_conflict check of its core.
// Together the sections form a (2*ROWS) x (2*COLS) array of nodes. A link
// that stays inside a tile is a direct connection; a link that crosses a
// tile boundary passes through one register, the one-cycle penalty for
// sending data into another core. Links that would leave the group carry 0.
//
// The top-left tile is the origin: cgracomm requests and configure requests
// (remote stores to the origin) enter there; configure/start messages then
// spread one hop per cycle, along row 0 eastwards and down every column, so
// the section h hops away runs its schedule h cycles later. When every
// section has finished, the group sends one completion message naming the
// requesting core and is ready for the next request.
//
// Remote frames: each tile's frame_queue may be set to notify another tile
// (notify_tgt) when one of its frames fills; the notification counts as one
// arrival in the same frame of the target, so a core that fetched data into
// a remote scratchpad can wait on its own frame for "N local words + 1".
//
// Interface / timing: per-tile arrays are indexed by tile, row-major. Core
// requests (core_*) are checked for FU conflicts in the cycle they are
// presented and, if granted, execute on the node's unit (result after that
// unit's latency). Scratchpad requests are granted in the same cycle; read
// data follows one cycle later. All CSR-like inputs (batch, cm_*, fq_*,
// pool_*) are written by software in every tile; here they are shared
// inputs, with cm_tile selecting the tile whose schedule is written.
module watercress_group
  import lac_pkg::*;
#(
  parameter int unsigned ROWS       = 2,
  parameter int unsigned COLS       = 2,
  parameter int unsigned SPAD_WORDS = 1024,   // 4 kB scratchpad per tile
  parameter int unsigned NUM_CFG    = 4,
  localparam int unsigned NT  = ROWS * COLS,
  localparam int unsigned TW  = (NT > 1) ? $clog2(NT) : 1,
  localparam int unsigned SAW = $clog2(SPAD_WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // group-wide CSR state
  input  logic [15:0]     batch,
  input  logic            cm_we,
  input  logic [TW-1:0]   cm_tile,
  input  logic [1:0]      cm_cfg,
  input  logic [1:0]      cm_node,
  input  logic [1:0]      cm_ctx,
  input  mx_ctx_t         cm_word,
  input  logic            cm_meta_we,
  input  logic [2:0]      cm_ii,
  input  logic [2:0]      cm_stages,
  input  logic [3:0]      cm_drain,
  // requests to the origin
  input  logic            conf_valid,
  input  logic [1:0]      conf_id,
  input  logic            work_valid,
  output logic            work_ready,
  input  mx_work_t        work,
  output logic            done_valid,
  output logic [5:0]      done_requester,
  output logic            busy,
  // round-robin pool
  input  logic            pool_we,
  input  logic [NT-1:0]   pool_mask,
  input  logic            rr_pass,
  input  logic            rr_leave,
  input  logic [TW-1:0]   rr_leave_id,
  output logic [NT-1:0]   my_turn,
  // per tile: core instruction on a shared unit
  input  logic [NT-1:0]   core_issue,
  input  fu_class_e       core_class [NT],
  input  mx_op_e          core_op [NT],
  input  word_t           core_a [NT],
  input  word_t           core_b [NT],
  output logic [NT-1:0]   core_stall,
  output logic [NT-1:0]   core_res_valid,
  output word_t           core_res [NT],
  // per tile: core scratchpad access
  input  logic [NT-1:0]   c_req,
  input  logic [NT-1:0]   c_we,
  input  logic [SAW-1:0]  c_addr [NT],
  input  word_t           c_wdata [NT],
  output logic [NT-1:0]   c_gnt,
  output logic [NT-1:0]   c_rvalid,
  // per tile: remote (network) scratchpad access
  input  logic [NT-1:0]   r_req,
  input  logic [NT-1:0]   r_we,
  input  logic [SAW-1:0]  r_addr [NT],
  input  word_t           r_wdata [NT],
  output logic [NT-1:0]   r_gnt,
  output logic [NT-1:0]   r_rvalid,
  output word_t           sp_rdata [NT],
  // frames
  input  logic            fq_cfg_we,
  input  logic [SAW-1:0]  fq_base,
  input  logic [3:0]      fq_shift,
  input  logic [9:0]      fq_words [NT],
  input  logic [4:0]      fq_nframes,
  input  logic [NT-1:0]   fq_notify,
  input  logic [TW-1:0]   notify_tgt [NT],
  output logic [NT-1:0]   frame_ready,
  output logic [3:0]      frame_idx [NT],
  input  logic [NT-1:0]   remem,
  // observation
  output logic [NT-1:0]   sec_running,
  output logic [3:0]      fu_busy [NT]
);

  // ---- node links across tiles ------------------------------------------
  word_t lo [NT][4][MX_DIRS];   // section outputs
  word_t xi [NT][4][MX_DIRS];   // section external inputs (registered)

  function automatic int opp(input int d);
    return (d + 4) % 8;
  endfunction

  // global source node of input d of local node n in tile t: returns
  // tile*4 + node, or -1 when the source is inside the same tile or outside
  // the group.
  function automatic int gsrc(input int t, input int n, input int d);
    int gr, gc, k;
    gr = (t / COLS) * 2 + n / 2;
    gc = (t % COLS) * 2 + n % 2;
    k  = (d % 2 == 0) ? 1 : 2;
    case (d / 2)
      0: gr = gr - k;
      1: gc = gc + k;
      2: gr = gr + k;
      default: gc = gc - k;
    endcase
    if (gr < 0 || gr >= int'(2 * ROWS) || gc < 0 || gc >= int'(2 * COLS)) return -1;
    if ((gr / 2) * COLS + gc / 2 == t) return -1;
    return ((gr / 2) * COLS + gc / 2) * 4 + (gr % 2) * 2 + gc % 2;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NT; t++)
        for (int n = 0; n < 4; n++)
          for (int d = 0; d < MX_DIRS; d++) xi[t][n][d] <= '0;
    end else begin
      for (int t = 0; t < NT; t++)
        for (int n = 0; n < 4; n++)
          for (int d = 0; d < MX_DIRS; d++) begin
            int s;
            s = gsrc(t, n, d);
            xi[t][n][d] <= (s >= 0) ? lo[s / 4][s % 4][opp(d)] : '0;
          end
    end
  end

  // ---- systolic start / configure path ---------------------------------
  logic    so_v [NT];
  mx_sys_t so_m [NT];
  logic    si_v [NT][2];
  mx_sys_t si_m [NT][2];
  always_comb begin
    for (int t = 0; t < NT; t++) begin
      int r, c;
      r = t / COLS;
      c = t % COLS;
      si_v[t][0] = (c > 0) ? so_v[t - 1] : 1'b0;
      si_m[t][0] = (c > 0) ? so_m[t - 1] : '0;
      si_v[t][1] = (r > 0) ? so_v[t - COLS] : 1'b0;
      si_m[t][1] = (r > 0) ? so_m[t - COLS] : '0;
    end
  end

  // ---- completion --------------------------------------------------------
  logic [NT-1:0] sec_done;
  logic [5:0]    sec_req [NT];
  logic [$clog2(NT+1)-1:0] done_cnt, done_add;
  logic may_start;

  always_comb begin
    done_add = '0;
    for (int t = 0; t < NT; t++) done_add = done_add + $bits(done_add)'(sec_done[t]);
  end
  assign busy      = (sec_running != '0) || (done_cnt != '0);
  assign may_start = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_cnt       <= '0;
      done_valid     <= 1'b0;
      done_requester <= '0;
    end else begin
      done_valid <= 1'b0;
      if (done_cnt + done_add == $bits(done_cnt)'(NT)) begin
        done_cnt       <= '0;
        done_valid     <= 1'b1;
        done_requester <= sec_req[0];
      end else begin
        done_cnt <= done_cnt + done_add;
      end
    end
  end

  // ---- remote frame notifications ---------------------------------------
  logic          ntf_o_v [NT];
  logic [3:0]    ntf_o_f [NT];
  logic          ntf_i_v [NT];
  logic [3:0]    ntf_i_f [NT];
  always_comb begin
    for (int t = 0; t < NT; t++) begin
      ntf_i_v[t] = 1'b0;
      ntf_i_f[t] = '0;
    end
    for (int s = NT - 1; s >= 0; s--) begin
      if (ntf_o_v[s]) begin
        ntf_i_v[notify_tgt[s]] = 1'b1;
        ntf_i_f[notify_tgt[s]] = ntf_o_f[s];
      end
    end
  end

  logic [NT-1:0] wr_unused;

  // ---- tiles ---------------------------------------------------------------
  for (genvar t = 0; t < NT; t++) begin : g_tile
    localparam int unsigned R = t / COLS;
    localparam int unsigned C = t % COLS;

    logic        s_req, s_we;
    logic [15:0] s_addr;
    word_t       s_wdata;
    logic [3:0]  s_core_v;
    mx_op_e      s_core_op [4];
    word_t       s_core_a [4], s_core_b [4], s_core_res [4];
    logic [3:0]  s_core_rv;
    logic [3:0]  grant;
    logic        stall;

    fu_conflict u_fc (
      .issue_valid(core_issue[t]), .issue_class(core_class[t]),
      .mx_busy(fu_busy[t]), .stall(stall), .grant(grant)
    );
    assign core_stall[t] = stall;
    always_comb begin
      for (int n = 0; n < 4; n++) begin
        s_core_v[n]  = grant[n];
        s_core_op[n] = core_op[t];
        s_core_a[n]  = core_a[t];
        s_core_b[n]  = core_b[t];
      end
      core_res_valid[t] = |s_core_rv;
      core_res[t]       = '0;
      for (int n = 0; n < 4; n++) if (s_core_rv[n]) core_res[t] = s_core_res[n];
    end

    mxra_section #(.NUM_CFG(NUM_CFG)) u_sec (
      .clk, .rst_n,
      .is_origin(t == 0), .sys_from_north(R > 0), .batch,
      .cm_we(cm_we && cm_tile == TW'(t)), .cm_cfg, .cm_node, .cm_ctx, .cm_word,
      .cm_meta_we(cm_meta_we && cm_tile == TW'(t)), .cm_ii, .cm_stages, .cm_drain,
      .conf_valid(t == 0 ? conf_valid : 1'b0), .conf_id,
      .work_valid(t == 0 ? work_valid : 1'b0), .work_ready(wr_unused[t]), .work,
      .may_start,
      .sys_in_valid(si_v[t]), .sys_in(si_m[t]), .sys_out_valid(so_v[t]), .sys_out(so_m[t]),
      .link_out(lo[t]), .ext_in(xi[t]),
      .sp_req(s_req), .sp_we(s_we), .sp_addr(s_addr), .sp_wdata(s_wdata), .sp_rdata(sp_rdata[t]),
      .core_valid(s_core_v), .core_op(s_core_op), .core_a(s_core_a), .core_b(s_core_b),
      .core_res_valid(s_core_rv), .core_res(s_core_res), .fu_busy(fu_busy[t]),
      .running(sec_running[t]), .done(sec_done[t]), .done_requester(sec_req[t])
    );

    // scratchpad and its arbiter
    logic [2:0]     a_gnt, a_rv;
    logic [SAW-1:0] a_addr [3];
    word_t          a_wdata [3];
    logic           p_en, p_we;
    logic [SAW-1:0] p_addr;
    word_t          p_wdata;
    always_comb begin
      a_addr[0] = SAW'(s_addr);  a_wdata[0] = s_wdata;
      a_addr[1] = r_addr[t];     a_wdata[1] = r_wdata[t];
      a_addr[2] = c_addr[t];     a_wdata[2] = c_wdata[t];
    end
    spad_arbiter #(.AW(SAW)) u_arb (
      .clk, .rst_n,
      .req({c_req[t], r_req[t], s_req}), .we({c_we[t], r_we[t], s_we}),
      .addr(a_addr), .wdata(a_wdata), .gnt(a_gnt), .rvalid(a_rv),
      .sp_en(p_en), .sp_we(p_we), .sp_addr(p_addr), .sp_wdata(p_wdata)
    );
    assign r_gnt[t]    = a_gnt[1];
    assign c_gnt[t]    = a_gnt[2];
    assign r_rvalid[t] = a_rv[1];
    assign c_rvalid[t] = a_rv[2];

    scratchpad #(.WORDS(SPAD_WORDS)) u_spad (
      .clk, .en(p_en), .we(p_we), .addr(p_addr), .wdata(p_wdata), .rdata(sp_rdata[t])
    );

    // words written by the network fill frames
    logic [3:0] hidx;
    logic       ovr;
    frame_queue #(.NUM_CTR(5), .CTR_W(10), .OFF_W(SAW), .FIDX_W(4)) u_fq (
      .clk, .rst_n,
      .cfg_we(fq_cfg_we), .cfg_base(fq_base), .cfg_shift(fq_shift), .cfg_words(fq_words[t]),
      .cfg_nframes(fq_nframes), .cfg_notify(fq_notify[t]),
      .arr_valid(a_gnt[1] && r_we[t]), .arr_off(r_addr[t]),
      .notify_i_valid(ntf_i_v[t]), .notify_i_frame(ntf_i_f[t]),
      .notify_o_valid(ntf_o_v[t]), .notify_o_frame(ntf_o_f[t]),
      .head_ready(frame_ready[t]), .head_base(), .head_idx(hidx),
      .remem(remem[t]), .overrun(ovr)
    );
    assign frame_idx[t] = hidx;

    mxra_rr_turn #(.NCORES(NT)) u_rr (
      .clk, .rst_n, .pool_we, .pool_mask, .pass(rr_pass), .leave(rr_leave),
      .leave_id(rr_leave_id), .my_id(TW'(t)), .turn(), .my_turn(my_turn[t]), .pool_empty()
    );
  end

  assign work_ready = wr_unused[0];

endmodule
