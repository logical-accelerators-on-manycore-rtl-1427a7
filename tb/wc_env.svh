// wc_env.svh: stimulus and checks for a Watercress MXRA group, shared by the
// group testbench and the top-level testbench. The including module defines
// clk, rst_n, check(), the localparams WCNT, WCTW and WCSAW, and connects the
// wc_* signals declared here to the group's ports. The scenario assumes the
// default 2 x 2 group of tiles (a 4 x 4 array of nodes).
//
// Every tile runs a two-stage, II = 4 schedule of c = a + b on its own
// scratchpad (loads through pointers 0 and 1, store through pointer 2),
// except tile 1, whose load/store node stores the sum computed in tile 0:
// the value crosses the tile boundary on the link from tile 0's integer ALU
// to tile 1's load/store node. This only works if tile 1 runs exactly one
// cycle behind tile 0, which is how the start request spreads.
//
// The test programs all context memories, configures the group, fills the
// scratchpads through the core ports and sends three cgracomm requests. While
// the array runs, the core of tile 0 keeps issuing integer-ALU instructions
// (stalled whenever the schedule uses the shared ALU) and scratchpad reads
// (held off whenever the array uses the port). Afterwards it checks the
// results in every tile, the completion messages, the start offsets of the
// four tiles, the arbiter's remote-over-core priority, a remote frame whose
// completion is notified to another tile, and the round-robin turn counter.

logic [15:0]      wc_batch = 16'd1;
logic             wc_cm_we = 0, wc_cm_meta_we = 0;
logic [WCTW-1:0]  wc_cm_tile = '0;
logic [1:0]       wc_cm_cfg = '0, wc_cm_node = '0, wc_cm_ctx = '0;
mx_ctx_t          wc_cm_word = '0;
logic [2:0]       wc_cm_ii = '0, wc_cm_stages = '0;
logic [3:0]       wc_cm_drain = '0;
logic             wc_conf_valid = 0;
logic [1:0]       wc_conf_id = '0;
logic             wc_work_valid = 0, wc_work_ready;
mx_work_t         wc_work = '0;
logic             wc_done_valid, wc_busy;
logic [5:0]       wc_done_requester;
logic             wc_pool_we = 0, wc_rr_pass = 0, wc_rr_leave = 0;
logic [WCNT-1:0]  wc_pool_mask = '0;
logic [WCTW-1:0]  wc_rr_leave_id = '0;
logic [WCNT-1:0]  wc_my_turn;
logic [WCNT-1:0]  wc_core_issue = '0;
fu_class_e        wc_core_class [WCNT];
mx_op_e           wc_core_op [WCNT];
word_t            wc_core_a [WCNT];
word_t            wc_core_b [WCNT];
logic [WCNT-1:0]  wc_core_stall, wc_core_res_valid;
word_t            wc_core_res [WCNT];
logic [WCNT-1:0]  wc_c_req = '0, wc_c_we = '0, wc_c_gnt, wc_c_rvalid;
logic [WCSAW-1:0] wc_c_addr [WCNT];
word_t            wc_c_wdata [WCNT];
logic [WCNT-1:0]  wc_r_req = '0, wc_r_we = '0, wc_r_gnt, wc_r_rvalid;
logic [WCSAW-1:0] wc_r_addr [WCNT];
word_t            wc_r_wdata [WCNT];
word_t            wc_sp_rdata [WCNT];
logic             wc_fq_cfg_we = 0;
logic [WCSAW-1:0] wc_fq_base = '0;
logic [3:0]       wc_fq_shift = '0;
logic [9:0]       wc_fq_words [WCNT];
logic [4:0]       wc_fq_nframes = '0;
logic [WCNT-1:0]  wc_fq_notify = '0;
logic [WCTW-1:0]  wc_notify_tgt [WCNT];
logic [WCNT-1:0]  wc_frame_ready;
logic [3:0]       wc_frame_idx [WCNT];
logic [WCNT-1:0]  wc_remem = '0;
logic [WCNT-1:0]  wc_sec_running;
logic [3:0]       wc_fu_busy [WCNT];

// mechanism counters
int wc_n_conf = 0, wc_n_start = 0, wc_n_xtile = 0, wc_n_fu_stall = 0, wc_n_core_served = 0;
int wc_n_arb_hold = 0, wc_n_arb_remote = 0, wc_n_notify = 0, wc_n_rr = 0, wc_n_done = 0;

// ---------------------------------------------------------------------------
// monitors
// ---------------------------------------------------------------------------
int         wc_cyc = 0;
int         wc_t_rise [WCNT];
logic [WCNT-1:0] wc_run_q = '0;
logic [5:0] wc_done_log [$];
always @(posedge clk) begin
  wc_cyc <= wc_cyc + 1;
  if (rst_n) begin
    wc_run_q <= wc_sec_running;
    for (int t = 0; t < WCNT; t++)
      if (wc_sec_running[t] && !wc_run_q[t]) wc_t_rise[t] <= wc_cyc;
    if (wc_done_valid) wc_done_log.push_back(wc_done_requester);
    if (wc_core_issue[0] && wc_core_stall[0]) wc_n_fu_stall++;
    if (wc_core_res_valid[0]) begin
      wc_n_core_served++;
      if (wc_core_res[0] != 32'd3) begin
        failures++;
        $display("FAIL: core result through the shared ALU");
      end
    end
    if (wc_c_req[0] && !wc_c_gnt[0] && wc_sec_running[0]) wc_n_arb_hold++;
  end
end

// ---------------------------------------------------------------------------
// helpers
// ---------------------------------------------------------------------------
task automatic wc_core_write(input int t, input int a, input word_t d);
  wc_c_req[t] = 1; wc_c_we[t] = 1; wc_c_addr[t] = WCSAW'(a); wc_c_wdata[t] = d;
  #1;
  while (!wc_c_gnt[t]) begin @(negedge clk); #1; end
  @(negedge clk);
  wc_c_req[t] = 0; wc_c_we[t] = 0;
endtask

task automatic wc_core_read(input int t, input int a, output word_t d);
  wc_c_req[t] = 1; wc_c_we[t] = 0; wc_c_addr[t] = WCSAW'(a);
  #1;
  while (!wc_c_gnt[t]) begin @(negedge clk); #1; end
  @(negedge clk);
  wc_c_req[t] = 0;
  check(wc_c_rvalid[t], "core read data valid one cycle after the grant");
  d = wc_sp_rdata[t];
endtask

task automatic wc_prog(input int t, input int n, input int c, input mx_ctx_t w);
  wc_cm_we = 1; wc_cm_tile = WCTW'(t); wc_cm_cfg = 2'd0;
  wc_cm_node = 2'(n); wc_cm_ctx = 2'(c); wc_cm_word = w;
  @(negedge clk);
  wc_cm_we = 0;
endtask

function automatic word_t wc_val(input int t, input int a);
  return 32'((t + 1) * 100000 + a * 7);
endfunction

// ---------------------------------------------------------------------------
// scenario
// ---------------------------------------------------------------------------
task automatic wc_run();
  mx_ctx_t w;
  word_t d;
  int ptrs [3][3] = '{'{10, 40, 70}, '{100, 130, 160}, '{200, 230, 260}};
  for (int t = 0; t < WCNT; t++) begin
    wc_core_class[t] = FC_NONE; wc_core_op[t] = OP_NOP; wc_core_a[t] = '0; wc_core_b[t] = '0;
    wc_c_addr[t] = '0; wc_c_wdata[t] = '0; wc_r_addr[t] = '0; wc_r_wdata[t] = '0;
    wc_fq_words[t] = 10'd2; wc_notify_tgt[t] = '0;
  end
  // ---- context memories ----
  for (int t = 0; t < WCNT; t++) begin
    w = '0; w.op = OP_LOAD; w.ptr_idx = 0; w.in_en[0] = 1;
    w.in_sel[0] = (t == 1) ? LD_W1 : LD_E1;                             wc_prog(t, 0, 0, w);
    w = '0; w.op = OP_LOAD; w.ptr_idx = 1; w.out_sel[LD_E1] = OS_FU;    wc_prog(t, 0, 1, w);
    w = '0; w.op = OP_STORE; w.ptr_idx = 2; w.stage = 1; w.out_sel[LD_E1] = OS_FU; wc_prog(t, 0, 2, w);
    w = '0;                                                             wc_prog(t, 0, 3, w);
    w = '0; w.out_sel[LD_W1] = OS_FU; w.out_sel[LD_E1] = OS_FU;         wc_prog(t, 1, 0, w);
    w = '0; w.in_en[0] = 1; w.in_sel[0] = LD_W1;                        wc_prog(t, 1, 1, w);
    w = '0; w.in_en[1] = 1; w.in_sel[1] = LD_W1;                        wc_prog(t, 1, 2, w);
    w = '0; w.op = OP_ADD;                                              wc_prog(t, 1, 3, w);
    for (int n = 2; n < 4; n++) for (int c = 0; c < 4; c++) wc_prog(t, n, c, '0);
    wc_cm_meta_we = 1; wc_cm_tile = WCTW'(t); wc_cm_cfg = 0;
    wc_cm_ii = 3'd4; wc_cm_stages = 3'd2; wc_cm_drain = 4'd1;
    @(negedge clk);
    wc_cm_meta_we = 0;
  end
  // ---- configure ----
  wc_conf_valid = 1; wc_conf_id = 2'd0;
  @(negedge clk);
  wc_conf_valid = 0;
  repeat (4) @(negedge clk);
  // ---- operands ----
  for (int r = 0; r < 3; r++)
    for (int t = 0; t < WCNT; t++) begin
      wc_core_write(t, ptrs[r][0], wc_val(t, ptrs[r][0]));
      wc_core_write(t, ptrs[r][1], wc_val(t, ptrs[r][1]));
    end
  // ---- three requests, with the core of tile 0 competing for its units ----
  wc_core_issue[0] = 1; wc_core_class[0] = FC_IALU; wc_core_op[0] = OP_ADD;
  wc_core_a[0] = 32'd1; wc_core_b[0] = 32'd2;
  wc_c_req[0] = 1; wc_c_we[0] = 0; wc_c_addr[0] = WCSAW'(1000);
  for (int r = 0; r < 3; r++) begin
    wc_work_valid = 1;
    wc_work = '0;
    for (int p = 0; p < 3; p++) wc_work.ptr[p] = 16'(ptrs[r][p]);
    wc_work.requester = 6'(20 + r);
    #1;
    while (!wc_work_ready) begin @(negedge clk); #1; end
    @(negedge clk);
  end
  wc_work_valid = 0;
  for (int i = 0; i < 400 && wc_done_log.size() < 3; i++) @(negedge clk);
  repeat (4) @(negedge clk);
  wc_core_issue[0] = 0;
  wc_c_req[0] = 0;
  @(negedge clk);
  // ---- results ----
  check(wc_done_log.size() == 3, $sformatf("three completions (%0d)", wc_done_log.size()));
  for (int i = 0; i < wc_done_log.size(); i++)
    check(wc_done_log[i] == 6'(20 + i), "completion names the requesting core");
  if (wc_done_log.size() == 3) wc_n_done += 3;
  begin
    int ok = 1;
    for (int r = 0; r < 3; r++)
      for (int t = 0; t < WCNT; t++) begin
        int src;
        src = (t == 1) ? 0 : t;
        wc_core_read(t, ptrs[r][2], d);
        check(d == wc_val(src, ptrs[r][0]) + wc_val(src, ptrs[r][1]),
              $sformatf("request %0d tile %0d: c = a + b", r, t));
        if (d != wc_val(src, ptrs[r][0]) + wc_val(src, ptrs[r][1])) ok = 0;
        if (t == 1 && d == wc_val(0, ptrs[r][0]) + wc_val(0, ptrs[r][1])) wc_n_xtile++;
      end
    if (ok) wc_n_conf++;
  end
  // the start request reaches each tile one cycle per hop from the origin
  check(wc_t_rise[1] - wc_t_rise[0] == 1 && wc_t_rise[2] - wc_t_rise[0] == 1 &&
        wc_t_rise[3] - wc_t_rise[0] == 2, "start offsets 0/1/1/2 cycles");
  if (wc_t_rise[3] - wc_t_rise[0] == 2) wc_n_start++;
  // ---- scratchpad arbiter: remote beats core ----
  wc_c_req[3] = 1; wc_c_we[3] = 0; wc_c_addr[3] = WCSAW'(5);
  wc_r_req[3] = 1; wc_r_we[3] = 1; wc_r_addr[3] = WCSAW'(900); wc_r_wdata[3] = 32'hBEEF;
  #1;
  check(wc_r_gnt[3] && !wc_c_gnt[3], "remote request wins over the core");
  if (wc_r_gnt[3] && !wc_c_gnt[3]) wc_n_arb_remote++;
  @(negedge clk);
  wc_r_req[3] = 0; wc_r_we[3] = 0;
  #1;
  check(wc_c_gnt[3], "core served once the remote request is gone");
  @(negedge clk);
  wc_c_req[3] = 0;
  wc_core_read(3, 900, d);
  check(d == 32'hBEEF, "remote write landed");
  // ---- remote frames: tile 0's frame completion is notified to tile 2 ----
  wc_fq_cfg_we = 1; wc_fq_base = WCSAW'(512); wc_fq_shift = 4'd1; wc_fq_nframes = 5'd4;
  wc_fq_words[0] = 10'd2; wc_fq_words[2] = 10'd1;
  wc_fq_notify = 4'b0001; wc_notify_tgt[0] = WCTW'(2);
  @(negedge clk);
  wc_fq_cfg_we = 0;
  for (int j = 0; j < 2; j++) begin
    wc_r_req[0] = 1; wc_r_we[0] = 1; wc_r_addr[0] = WCSAW'(512 + j); wc_r_wdata[0] = 32'(j);
    check(!wc_frame_ready[2], "tile 2 frame not ready before the notification");
    @(negedge clk);
  end
  wc_r_req[0] = 0; wc_r_we[0] = 0;
  check(wc_frame_ready[0], "tile 0 frame filled by remote writes");
  @(negedge clk);
  check(wc_frame_ready[2], "tile 2 frame ready through the notification");
  if (wc_frame_ready[2]) wc_n_notify++;
  wc_remem[2] = 1;
  @(negedge clk);
  wc_remem[2] = 0;
  check(!wc_frame_ready[2] && wc_frame_idx[2] == 4'd1, "remem moves tile 2 to its next frame");
  // ---- round-robin turn among the cores sharing the MXRA ----
  wc_pool_we = 1; wc_pool_mask = '1;
  @(negedge clk);
  wc_pool_we = 0;
  check(wc_my_turn == 4'b0001, "first turn to core 0");
  wc_rr_pass = 1;
  @(negedge clk);
  wc_rr_pass = 0;
  check(wc_my_turn == 4'b0010, "pass moves the turn to core 1");
  wc_rr_leave = 1; wc_rr_leave_id = WCTW'(1);
  @(negedge clk);
  wc_rr_leave = 0;
  check(wc_my_turn == 4'b0100, "a leaving holder hands the turn on");
  if (wc_my_turn == 4'b0100) wc_n_rr++;
endtask

task automatic wc_report();
  $display("watercress: configure=%0d start_propagation=%0d cross_tile=%0d fu_stall=%0d core_served=%0d",
           wc_n_conf, wc_n_start, wc_n_xtile, wc_n_fu_stall, wc_n_core_served);
  $display("watercress: arbiter_hold=%0d remote_priority=%0d notify=%0d round_robin=%0d completion=%0d",
           wc_n_arb_hold, wc_n_arb_remote, wc_n_notify, wc_n_rr, wc_n_done);
  check(wc_n_conf > 0, "mechanism: configure and run");
  check(wc_n_start > 0, "mechanism: start propagation");
  check(wc_n_xtile > 0, "mechanism: cross-tile link");
  check(wc_n_fu_stall > 0, "mechanism: FU conflict stall");
  check(wc_n_core_served > 0, "mechanism: shared FU used by the core");
  check(wc_n_arb_hold > 0, "mechanism: MXRA has scratchpad priority");
  check(wc_n_arb_remote > 0, "mechanism: remote before core");
  check(wc_n_notify > 0, "mechanism: remote frame notification");
  check(wc_n_rr > 0, "mechanism: round-robin turn");
  check(wc_n_done > 0, "mechanism: completion");
endtask
