// tb_mxra_section: self-checking test of an MXRA section (the execute stage
// of one tile seen as four CGRA nodes) and of the systolic start path.
//
// Two sections are instantiated: an origin and a follower that listens to
// the origin's configure/start link from the west. Each has a model
// scratchpad with a one-cycle read. Configuration 0 is a two-stage,
// II = 4 schedule of c = a + b:
//   round r   ctx0 LSU loads a (pointer 0)      ctx1 LSU loads b (pointer 1),
//                                               IALU latches a from the LSU
//             ctx2 IALU latches b                ctx3 IALU adds
//   round r+1 ctx0 IALU drives the sum west, LSU latches it
//             ctx2 LSU stores it through pointer 2 (stage 1)
// The test programs the context memory, configures, then sends several
// cgracomm requests with random pointers through the origin's work queue
// (depth 2, so it also sees backpressure) while may_start toggles. It
// checks, against its own arithmetic, the stored sums in both sections'
// memories, one done pulse per request with the requester id, the follower
// running one cycle behind, the run length ((batch + stages - 1) * II +
// drain cycles), that stores are issued only in live stages (a run of batch
// 3 writes exactly 3 times), and that the integer ALU serves the core only
// in the contexts where the schedule leaves it free.
module tb_mxra_section;
  import lac_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- shared programming inputs ----
  logic        cm_we = 0, cm_meta_we = 0;
  logic [1:0]  cm_cfg = 0, cm_node = 0, cm_ctx = 0;
  mx_ctx_t     cm_word = '0;
  logic [2:0]  cm_ii = 0, cm_stages = 0;
  logic [3:0]  cm_drain = 0;
  logic [15:0] batch = 16'd1;
  logic        conf_valid = 0;
  logic [1:0]  conf_id = 0;
  logic        work_valid = 0, work_ready, may_start = 1;
  mx_work_t    work = '0;

  // ---- section instances ----
  logic        sv [2][2];
  mx_sys_t     sm [2][2];
  logic        so_v [2];
  mx_sys_t     so_m [2];
  word_t       lo [2][4][MX_DIRS];
  word_t       ei [4][MX_DIRS];
  logic        sp_req [2], sp_we [2];
  logic [15:0] sp_addr [2];
  word_t       sp_wdata [2], sp_rdata [2];
  logic [3:0]  core_valid [2], crv [2], busy [2];
  mx_op_e      core_op [4];
  word_t       core_a [4], core_b [4], cres [2][4];
  logic        running [2], done [2];
  logic [5:0]  dreq [2];
  logic        wr_unused;

  for (genvar i = 0; i < 2; i++) begin : g_sec
    mxra_section u_sec (
      .clk, .rst_n, .is_origin(i == 0), .sys_from_north(1'b0), .batch,
      .cm_we, .cm_cfg, .cm_node, .cm_ctx, .cm_word, .cm_meta_we, .cm_ii, .cm_stages, .cm_drain,
      .conf_valid(i == 0 ? conf_valid : 1'b0), .conf_id,
      .work_valid(i == 0 ? work_valid : 1'b0), .work_ready(), .work, .may_start,
      .sys_in_valid(sv[i]), .sys_in(sm[i]), .sys_out_valid(so_v[i]), .sys_out(so_m[i]),
      .link_out(lo[i]), .ext_in(ei),
      .sp_req(sp_req[i]), .sp_we(sp_we[i]), .sp_addr(sp_addr[i]), .sp_wdata(sp_wdata[i]),
      .sp_rdata(sp_rdata[i]),
      .core_valid(core_valid[i]), .core_op, .core_a, .core_b,
      .core_res_valid(crv[i]), .core_res(cres[i]), .fu_busy(busy[i]),
      .running(running[i]), .done(done[i]), .done_requester(dreq[i])
    );
  end
  assign work_ready = g_sec[0].u_sec.work_ready;
  assign wr_unused  = so_v[1];
  always_comb begin
    sv[0][0] = 0; sv[0][1] = 0; sm[0][0] = '0; sm[0][1] = '0;
    sv[1][0] = so_v[0]; sm[1][0] = so_m[0];   // follower hears the origin from the west
    sv[1][1] = 0; sm[1][1] = '0;
    for (int n = 0; n < 4; n++) for (int d = 0; d < MX_DIRS; d++) ei[n][d] = '0;
  end

  // ---- model scratchpads ----
  word_t mem [2][1024];
  int    n_store [2] = '{0, 0};
  for (genvar i = 0; i < 2; i++) begin : g_mem
    always_ff @(posedge clk) if (sp_req[i]) begin
      if (sp_we[i]) begin
        mem[i][sp_addr[i][9:0]] <= sp_wdata[i];
        n_store[i] <= n_store[i] + 1;
      end else sp_rdata[i] <= mem[i][sp_addr[i][9:0]];
    end
  end

  // ---- done monitor ----
  int   n_done [2] = '{0, 0};
  int   t_done [2];
  logic [5:0] last_req;
  int   cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < 2; i++) if (rst_n && done[i]) begin
      n_done[i] <= n_done[i] + 1;
      t_done[i] <= cyc;
      if (i == 0) last_req <= dreq[0];
    end
  end

  task automatic prog(input int node, input int c, input mx_ctx_t w);
    cm_we = 1; cm_cfg = 0; cm_node = 2'(node); cm_ctx = 2'(c); cm_word = w;
    @(negedge clk);
    cm_we = 0;
  endtask

  mx_ctx_t w;
  int t_start, st_base;

  initial begin
    for (int i = 0; i < 4; i++) begin core_op[i] = OP_NOP; core_a[i] = 0; core_b[i] = 0; end
    core_valid[0] = 0; core_valid[1] = 0;
    for (int i = 0; i < 1024; i++) begin mem[0][i] = $urandom_range(0, 1 << 20); mem[1][i] = mem[0][i]; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- program configuration 0 ----
    w = '0; w.op = OP_LOAD; w.ptr_idx = 1; w.out_sel[LD_E1] = OS_FU;     prog(0, 1, w);
    w = '0; w.op = OP_STORE; w.ptr_idx = 2; w.stage = 1; w.out_sel[LD_E1] = OS_FU; prog(0, 2, w);
    w = '0;                                                              prog(0, 3, w);
    w = '0; w.op = OP_LOAD; w.ptr_idx = 0; w.in_en[0] = 1; w.in_sel[0] = LD_E1; prog(0, 0, w);
    w = '0; w.out_sel[LD_W1] = OS_FU;                                    prog(1, 0, w);
    w = '0; w.in_en[0] = 1; w.in_sel[0] = LD_W1;                         prog(1, 1, w);
    w = '0; w.in_en[1] = 1; w.in_sel[1] = LD_W1;                         prog(1, 2, w);
    w = '0; w.op = OP_ADD;                                               prog(1, 3, w);
    for (int n = 2; n < 4; n++) for (int c = 0; c < 4; c++) prog(n, c, '0);
    cm_meta_we = 1; cm_cfg = 0; cm_ii = 3'd4; cm_stages = 3'd2; cm_drain = 4'd1;
    @(negedge clk);
    cm_meta_we = 0;
    // ---- configure ----
    conf_valid = 1; conf_id = 0;
    @(negedge clk);
    conf_valid = 0;
    check(so_v[0] && !so_m[0].start, "origin passes the configuration on");
    @(negedge clk);

    // ---- a stream of single-iteration requests ----
    begin
      int ptrs [8][3];
      int sent = 0;
      for (int r = 0; r < 8; r++) begin
        ptrs[r][0] = r * 16;
        ptrs[r][1] = 300 + r * 16;
        ptrs[r][2] = 600 + r * 16;
      end
      while (sent < 8 || running[0] || running[1] || n_done[0] < 8) begin
        may_start = ($urandom_range(0, 3) != 0);
        if (sent < 8) begin
          work_valid = 1;
          work = '0;
          for (int p = 0; p < 3; p++) work.ptr[p] = 16'(ptrs[sent][p]);
          work.requester = 6'(sent + 5);
        end else work_valid = 0;
        #1;
        if (work_valid && work_ready) sent++;
        @(negedge clk);
      end
      work_valid = 0;
      repeat (4) @(negedge clk);
      check(n_done[0] == 8 && n_done[1] == 8, $sformatf("one completion per request in each section (%0d, %0d)", n_done[0], n_done[1]));
      check(t_done[1] == t_done[0] + 1, "follower finishes one cycle after the origin");
      check(last_req == 6'd12, "completion carries the requester");
      for (int r = 0; r < 8; r++)
        for (int i = 0; i < 2; i++)
          check(mem[i][600 + r * 16] == mem[i][r * 16] + mem[i][300 + r * 16],
                $sformatf("c = a + b, request %0d, section %0d", r, i));
    end

    // ---- one request of batch 3: run length and stage gating ----
    batch = 16'd3;
    may_start = 1;
    st_base = n_store[0];
    work = '0;
    work.ptr[0] = 16'd900; work.ptr[1] = 16'd901; work.ptr[2] = 16'd902;
    work_valid = 1;
    #1;
    check(work_ready, "queue free");
    @(negedge clk);
    work_valid = 0;
    t_start = cyc;
    // core shares the IALU while the section runs
    begin
      int served = 0, refused = 0;
      core_valid[0] = 4'b0010;
      core_op[1] = OP_ADD; core_a[1] = 32'd40; core_b[1] = 32'd2;
      while (running[0] || cyc <= t_start + 1) begin
        logic b;
        #1;
        b = busy[0][1];
        @(negedge clk);
        if (crv[0][1]) begin
          served++;
          check(cres[0][1] == 32'd42, "core result through the shared ALU");
        end
        if (b) refused++;
      end
      core_valid[0] = 0;
      check(served > 0 && refused > 0, "ALU shared: the core was both served and held off");
    end
    repeat (3) @(negedge clk);
    // one cycle in the work queue, (batch + stages - 1) * II cycles of
    // execution, drain cycles, and the cycle that raises done
    check(t_done[0] - t_start == 1 + (3 + 2 - 1) * 4 + 1 + 1, $sformatf("run length %0d", t_done[0] - t_start));
    check(n_store[0] - st_base == 3, $sformatf("stores only in live stages (%0d)", n_store[0] - st_base));
    check(mem[0][902] == mem[0][900] + mem[0][901], "batch result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
