// mxra_section: the part of an MXRA that lives in one tile, a 2x2 array of
// nodes built around the core's functional units, plus the control that
// runs a compiled schedule on them.
//
// Nodes (row, col): (0,0) Load/Store, (0,1) IntAlu, (1,0) FpMul,
// (1,1) IntMul + FpAdd. Links between the four nodes are wired here; links
// that leave the tile are brought out (link_out / ext_in) and joined, through
// a one-cycle register, by the group.
//
// Control, as the architecture lists it for every tile:
//   - a context memory holding NUM_CFG schedules (4 contexts per node, plus
//     the II, the number of pipeline stages and a drain time); a configure
//     request copies one schedule into the nodes' configuration registers;
//   - a context counter that cycles 0..II-1 while a request runs, and an
//     iteration counter: a request runs batch + stages - 1 rounds of II
//     cycles, so that every one of its `batch` iterations passes every stage
//     of the modulo schedule; an LSU op of stage s acts only in rounds
//     s .. s+batch-1;
//   - a work queue for incoming cgracomm requests (origin section only);
//   - four base pointer registers, loaded from the request and rewritten by
//     SETPTR, and the 8 predication bits of the request;
//   - start propagation: the origin starts a request when the group is idle
//     and sends configure/start messages on its systolic output; every other
//     section listens to one neighbour (west or north), acts on the message
//     and passes it on one cycle later, so a section h hops from the origin
//     starts h cycles after it (the compiler shifts its schedule to match).
// When its rounds and the drain time are over, a section pulses `done`.
//
// Timing: configure takes effect at the clock edge that receives it. A
// request dequeued (or received) in cycle t runs context 0 in cycle t+1.
// The work queue depth (2), the context memory size, the drain field and the
// stage rule are this design's choices; the rest follows the architecture.
module mxra_section
  import lac_pkg::*;
#(
  parameter int unsigned NUM_CFG = 4,
  parameter int unsigned WQ_DEPTH = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // MXRA CSR
  input  logic        is_origin,
  input  logic        sys_from_north,   // 0: listen west, 1: listen north
  input  logic [15:0] batch,            // iterations per cgracomm
  // context memory programming
  input  logic        cm_we,
  input  logic [1:0]  cm_cfg,
  input  logic [1:0]  cm_node,
  input  logic [1:0]  cm_ctx,
  input  mx_ctx_t     cm_word,
  input  logic        cm_meta_we,
  input  logic [2:0]  cm_ii,
  input  logic [2:0]  cm_stages,
  input  logic [3:0]  cm_drain,
  // requests arriving at the origin
  input  logic        conf_valid,
  input  logic [1:0]  conf_id,
  input  logic        work_valid,
  output logic        work_ready,
  input  mx_work_t    work,
  input  logic        may_start,
  // systolic start/configure link
  input  logic        sys_in_valid [2],   // [0] west, [1] north
  input  mx_sys_t     sys_in [2],
  output logic        sys_out_valid,
  output mx_sys_t     sys_out,
  // node links
  output word_t       link_out [4][MX_DIRS],
  input  word_t       ext_in   [4][MX_DIRS],
  // scratchpad port of the LSU node
  output logic        sp_req,
  output logic        sp_we,
  output logic [15:0] sp_addr,
  output word_t       sp_wdata,
  input  word_t       sp_rdata,
  // functional units shared with the core
  input  logic [3:0]  core_valid,
  input  mx_op_e      core_op [4],
  input  word_t       core_a [4],
  input  word_t       core_b [4],
  output logic [3:0]  core_res_valid,
  output word_t       core_res [4],
  output logic [3:0]  fu_busy,
  // status
  output logic        running,
  output logic        done,
  output logic [5:0]  done_requester
);

  // pointer update from the section's load/store node
  logic        ptr_we_any;
  logic [1:0]  ptr_widx_l;
  logic [15:0] ptr_wdata_l;
  localparam node_kind_e KINDS [4] = '{NK_LSU, NK_IALU, NK_FPMUL, NK_IMFA};

  // ---- context memory -------------------------------------------------------
  mx_ctx_t    cmem [NUM_CFG][4][MX_CTX];
  logic [2:0] m_ii [NUM_CFG];
  logic [2:0] m_st [NUM_CFG];
  logic [3:0] m_dr [NUM_CFG];

  always_ff @(posedge clk) begin
    if (cm_we) cmem[cm_cfg][cm_node][cm_ctx] <= cm_word;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CFG; i++) begin
        m_ii[i] <= 3'd1; m_st[i] <= 3'd1; m_dr[i] <= 4'd0;
      end
    end else if (cm_meta_we) begin
      m_ii[cm_cfg] <= (cm_ii == 3'd0) ? 3'd1 : cm_ii;
      m_st[cm_cfg] <= (cm_stages == 3'd0) ? 3'd1 : cm_stages;
      m_dr[cm_cfg] <= cm_drain;
    end
  end

  // ---- work queue -------------------------------------------------------------
  mx_work_t wq [WQ_DEPTH];
  logic [$clog2(WQ_DEPTH+1)-1:0] wq_cnt;
  logic wq_pop, wq_push;
  assign work_ready = (wq_cnt < ($bits(wq_cnt))'(WQ_DEPTH));
  assign wq_push    = work_valid && work_ready;

  // ---- control ------------------------------------------------------------
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} sec_state_e;
  sec_state_e st;
  logic [1:0]  ctx;
  logic [17:0] rnd;                 // round (iteration-start) counter
  logic [2:0]  ii_q, stg_q;
  logic [3:0]  dr_q, dcnt;
  logic [15:0] ptr_q [4];
  logic [3:0]  ldp_q, stp_q;
  logic [5:0]  req_q;
  logic        ctx_we;
  mx_ctx_t     ctx_wdata [4][MX_CTX];

  logic        sel_v;
  mx_sys_t     sel_m;
  logic        do_conf, do_start;
  logic [1:0]  conf_sel;
  mx_work_t    start_work;

  always_comb begin
    sel_v = sys_from_north ? sys_in_valid[1] : sys_in_valid[0];
    sel_m = sys_from_north ? sys_in[1] : sys_in[0];
    if (is_origin) begin
      do_conf    = conf_valid && (st == S_IDLE);
      conf_sel   = conf_id;
      wq_pop     = (st == S_IDLE) && !do_conf && may_start && (wq_cnt != '0);
      do_start   = wq_pop;
      start_work = wq[0];
    end else begin
      do_conf    = sel_v && !sel_m.start;
      conf_sel   = sel_m.cfg;
      wq_pop     = 1'b0;
      do_start   = sel_v && sel_m.start;
      start_work = sel_m.work;
    end
    ctx_we = do_conf;
    for (int n = 0; n < 4; n++)
      for (int k = 0; k < MX_CTX; k++)
        ctx_wdata[n][k] = cmem[conf_sel][n][k];
  end

  // last round index: batch + stages - 2
  logic [17:0] last_rnd;
  assign last_rnd = 18'(batch) + 18'(stg_q) - 18'd2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ctx <= '0; rnd <= '0;
      ii_q <= 3'd1; stg_q <= 3'd1; dr_q <= '0; dcnt <= '0;
      for (int i = 0; i < 4; i++) ptr_q[i] <= '0;
      ldp_q <= '0; stp_q <= '0; req_q <= '0;
      sys_out_valid <= 1'b0; sys_out <= '0;
      done <= 1'b0;
      wq_cnt <= '0;
      for (int i = 0; i < WQ_DEPTH; i++) wq[i] <= '0;
    end else begin
      done          <= 1'b0;
      sys_out_valid <= 1'b0;
      // work queue
      if (wq_pop) begin
        for (int i = 0; i < WQ_DEPTH - 1; i++) wq[i] <= wq[i+1];
        if (wq_push) wq[$clog2(WQ_DEPTH)'(wq_cnt - 1'b1)] <= work;
      end else if (wq_push) begin
        wq[$clog2(WQ_DEPTH)'(wq_cnt)] <= work;
      end
      wq_cnt <= wq_cnt + $bits(wq_cnt)'(wq_push) - $bits(wq_cnt)'(wq_pop);

      if (do_conf) begin
        ii_q          <= m_ii[conf_sel];
        stg_q         <= m_st[conf_sel];
        dr_q          <= m_dr[conf_sel];
        sys_out_valid <= 1'b1;
        sys_out       <= '{start: 1'b0, cfg: conf_sel, work: '0};
      end
      if (do_start) begin
        sys_out_valid <= 1'b1;
        sys_out       <= '{start: 1'b1, cfg: 2'd0, work: start_work};
        for (int i = 0; i < 4; i++) ptr_q[i] <= start_work.ptr[i];
        ldp_q <= start_work.ld_pred;
        stp_q <= start_work.st_pred;
        req_q <= start_work.requester;
        ctx   <= '0;
        rnd   <= '0;
        if (batch == 16'd0) begin
          st   <= S_DRAIN;
          dcnt <= '0;
        end else begin
          st <= S_RUN;
        end
      end else begin
        unique case (st)
          S_RUN: begin
            if (ctx == 2'(ii_q - 3'd1)) begin
              ctx <= '0;
              rnd <= rnd + 18'd1;
              if (rnd == last_rnd) begin
                st   <= S_DRAIN;
                dcnt <= dr_q;
              end
            end else begin
              ctx <= ctx + 2'd1;
            end
          end
          S_DRAIN: begin
            if (dcnt == '0) begin
              st   <= S_IDLE;
              done <= 1'b1;
            end else begin
              dcnt <= dcnt - 4'd1;
            end
          end
          default: ;
        endcase
      end
      if (ptr_we_any) ptr_q[ptr_widx_l] <= ptr_wdata_l;
    end
  end

  assign running        = (st != S_IDLE);
  assign done_requester = req_q;

  // live stages in this round: stage s serves iteration rnd - s
  logic [3:0] stage_ok;
  always_comb begin
    for (int s = 0; s < 4; s++)
      stage_ok[s] = (st == S_RUN) && (rnd >= 18'(s)) && (rnd - 18'(s) < 18'(batch));
  end

  // ---- nodes and intra-section links -------------------------------------
  word_t node_in  [4][MX_DIRS];
  word_t node_out [4][MX_DIRS];
  logic        n_ptr_we [4];
  logic [1:0]  n_ptr_widx [4];
  logic [15:0] n_ptr_wdata [4];
  logic        n_sp_req [4], n_sp_we [4];
  logic [15:0] n_sp_addr [4];
  word_t       n_sp_wdata [4];

  // source node of input direction d of node n, or -1 when outside the tile
  function automatic int src_of(input int n, input int d);
    int r, c, k, dr, dc;
    r  = n / 2;
    c  = n % 2;
    k  = (d % 2 == 0) ? 1 : 2;
    dr = 0;
    dc = 0;
    case (d / 2)
      0: dr = -k;   // N: from above
      1: dc =  k;   // E: from the right
      2: dr =  k;   // S: from below
      default: dc = -k;  // W: from the left
    endcase
    r = r + dr;
    c = c + dc;
    if (r < 0 || r > 1 || c < 0 || c > 1) return -1;
    return r * 2 + c;
  endfunction

  // a node listening in direction d reads the source's output in the
  // opposite direction (N1 <-> S1, E2 <-> W2, ...)
  function automatic int opp(input int d);
    return (d + 4) % 8;
  endfunction

  always_comb begin
    for (int n = 0; n < 4; n++)
      for (int d = 0; d < MX_DIRS; d++) begin
        int s;
        s = src_of(n, d);
        node_in[n][d] = (s >= 0) ? node_out[s][opp(d)] : ext_in[n][d];
      end
  end

  for (genvar n = 0; n < 4; n++) begin : g_node
    mxra_node #(.KIND(KINDS[n])) u_node (
      .clk, .rst_n,
      .ctx_we, .ctx_wdata(ctx_wdata[n]),
      .active(st == S_RUN), .ctx_idx(ctx),
      .link_in(node_in[n]), .link_out(node_out[n]),
      .ptr(ptr_q), .ld_pred(ldp_q), .st_pred(stp_q), .stage_ok,
      .sp_req(n_sp_req[n]), .sp_we(n_sp_we[n]), .sp_addr(n_sp_addr[n]),
      .sp_wdata(n_sp_wdata[n]), .sp_rdata,
      .ptr_we(n_ptr_we[n]), .ptr_widx(n_ptr_widx[n]), .ptr_wdata(n_ptr_wdata[n]),
      .core_valid(core_valid[n]), .core_op(core_op[n]), .core_a(core_a[n]), .core_b(core_b[n]),
      .core_res_valid(core_res_valid[n]), .core_res(core_res[n]), .fu_busy(fu_busy[n])
    );
    for (genvar d = 0; d < MX_DIRS; d++) begin : g_out
      assign link_out[n][d] = node_out[n][d];
    end
  end

  // only the Load/Store node (0) touches the scratchpad and pointers
  assign sp_req      = n_sp_req[0];
  assign sp_we       = n_sp_we[0];
  assign sp_addr     = n_sp_addr[0];
  assign sp_wdata    = n_sp_wdata[0];
  assign ptr_we_any  = n_ptr_we[0];
  assign ptr_widx_l  = n_ptr_widx[0];
  assign ptr_wdata_l = n_ptr_wdata[0];

endmodule
