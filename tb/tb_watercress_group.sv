// tb_watercress_group: self-checking test of a 2 x 2 Watercress group, the
// scratchpad tiles whose execute stages together form one MXRA (a CGRA of
// 4 x 4 nodes). The stimulus and checks live in wc_env.svh, shared with the
// top-level test; this file supplies the clock, reset, check bookkeeping,
// a watchdog and the instance. See wc_env.svh for the scenario: programming
// and configuring the array, cgracomm requests with a value crossing a tile
// boundary, systolic start offsets, FU-conflict stalls, scratchpad
// arbitration, remote frames with cross-tile notification and the
// round-robin turn. Every mechanism must be seen at least once.
module tb_watercress_group;
  import lac_pkg::*;
  localparam int WCNT = 4;
  localparam int WCTW = 2;
  localparam int WCSAW = 10;

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

`include "wc_env.svh"

  watercress_group dut (
    .clk(clk),
    .rst_n(rst_n),
    .batch(wc_batch),
    .cm_we(wc_cm_we),
    .cm_tile(wc_cm_tile),
    .cm_cfg(wc_cm_cfg),
    .cm_node(wc_cm_node),
    .cm_ctx(wc_cm_ctx),
    .cm_word(wc_cm_word),
    .cm_meta_we(wc_cm_meta_we),
    .cm_ii(wc_cm_ii),
    .cm_stages(wc_cm_stages),
    .cm_drain(wc_cm_drain),
    .conf_valid(wc_conf_valid),
    .conf_id(wc_conf_id),
    .work_valid(wc_work_valid),
    .work_ready(wc_work_ready),
    .work(wc_work),
    .done_valid(wc_done_valid),
    .done_requester(wc_done_requester),
    .busy(wc_busy),
    .pool_we(wc_pool_we),
    .pool_mask(wc_pool_mask),
    .rr_pass(wc_rr_pass),
    .rr_leave(wc_rr_leave),
    .rr_leave_id(wc_rr_leave_id),
    .my_turn(wc_my_turn),
    .core_issue(wc_core_issue),
    .core_class(wc_core_class),
    .core_op(wc_core_op),
    .core_a(wc_core_a),
    .core_b(wc_core_b),
    .core_stall(wc_core_stall),
    .core_res_valid(wc_core_res_valid),
    .core_res(wc_core_res),
    .c_req(wc_c_req),
    .c_we(wc_c_we),
    .c_addr(wc_c_addr),
    .c_wdata(wc_c_wdata),
    .c_gnt(wc_c_gnt),
    .c_rvalid(wc_c_rvalid),
    .r_req(wc_r_req),
    .r_we(wc_r_we),
    .r_addr(wc_r_addr),
    .r_wdata(wc_r_wdata),
    .r_gnt(wc_r_gnt),
    .r_rvalid(wc_r_rvalid),
    .sp_rdata(wc_sp_rdata),
    .fq_cfg_we(wc_fq_cfg_we),
    .fq_base(wc_fq_base),
    .fq_shift(wc_fq_shift),
    .fq_words(wc_fq_words),
    .fq_nframes(wc_fq_nframes),
    .fq_notify(wc_fq_notify),
    .notify_tgt(wc_notify_tgt),
    .frame_ready(wc_frame_ready),
    .frame_idx(wc_frame_idx),
    .remem(wc_remem),
    .sec_running(wc_sec_running),
    .fu_busy(wc_fu_busy)
  );

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    wc_run();
    wc_report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
