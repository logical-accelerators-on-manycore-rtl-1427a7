// logical_accel_top: two logical accelerators carved out of a tiled RISC-V
// manycore, side by side.
//
//   rockcress_group  - a software-defined vector group: a scalar core leads
//                      a row of vector cores that share one instruction
//                      stream over the instruction forwarding network, with
//                      wide LLC loads streaming into frame queues in the
//                      vector cores' scratchpads (ports rc_*).
//   watercress_group - an MXRA: the execute stages and scratchpads of a 2x2
//                      block of tiles joined into one coarse-grained
//                      reconfigurable array running compiled schedules
//                      (ports wc_*).
// The two are independent uses of the same kind of tile; they share only the
// clock and reset. Everything the baseline manycore provides (core
// pipelines, mesh network, LLC tags and DRAM) stays outside, and the signals
// where it would connect are the ports of this module. Defaults are the main
// configurations: a vector group of four (one scalar, one expander, three
// vector cores) and a 2x2-tile MXRA with 4 kB scratchpads.
module logical_accel_top
  import lac_pkg::*;
#(
  parameter int unsigned RC_ROWS       = 1,
  parameter int unsigned RC_COLS       = 4,
  parameter int unsigned RC_SPAD_WORDS = 1024,
  parameter int unsigned RC_IMEM_WORDS = 1024,
  parameter int unsigned RC_LLC_WORDS  = 4096,
  parameter int unsigned RC_NUM_CTR    = 5,
  parameter int unsigned RC_CTR_W      = 10,
  parameter int unsigned WC_ROWS       = 2,
  parameter int unsigned WC_COLS       = 2,
  parameter int unsigned WC_SPAD_WORDS = 1024,
  parameter int unsigned WC_NUM_CFG    = 4,
  localparam int unsigned RCVL  = RC_ROWS * RC_COLS,
  localparam int unsigned RCSAW = $clog2(RC_SPAD_WORDS),
  localparam int unsigned RCIAW = $clog2(RC_IMEM_WORDS),
  localparam int unsigned RCLAW = $clog2(RC_LLC_WORDS),
  localparam int unsigned WCNT  = WC_ROWS * WC_COLS,
  localparam int unsigned WCTW  = (WCNT > 1) ? $clog2(WCNT) : 1,
  localparam int unsigned WCSAW = $clog2(WC_SPAD_WORDS)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [RCVL:0]         rc_cfg_we,
  output logic [RCVL:0]         rc_in_vector_mode,
  input  logic                  rc_sc_msg_valid,
  input  inet_msg_t             rc_sc_msg,
  output logic                  rc_sc_msg_ready,
  input  logic                  rc_vl_valid,
  output logic                  rc_vl_ready,
  input  logic [11:0]           rc_vl_sp,
  input  logic [31:0]           rc_vl_addr,
  input  logic [7:0]            rc_vl_core,
  input  logic [4:0]            rc_vl_width,
  input  vl_var_e               rc_vl_var,
  input  vl_part_e              rc_vl_part,
  input  logic                  rc_sw_valid,
  output logic                  rc_sw_ready,
  input  logic                  rc_sw_we,
  input  logic [RCLAW-1:0]      rc_sw_addr,
  input  word_t                 rc_sw_wdata,
  input  logic [11:0]           rc_sw_off,
  output logic                  rc_sc_resp_valid,
  output llc_resp_t             rc_sc_resp,
  input  logic                  rc_prog_we,
  input  logic [RCIAW-1:0]      rc_prog_addr,
  input  word_t                 rc_prog_data,
  output logic [RCVL-1:0]       rc_dec_valid,
  output word_t                 rc_dec_instr [RCVL],
  input  logic [RCVL-1:0]       rc_dec_ready,
  input  logic                  rc_br_valid,
  input  logic                  rc_br_taken,
  input  word_t                 rc_br_target,
  output logic                  rc_mt_active,
  output logic [RCVL-1:0]       rc_resume_valid,
  output word_t                 rc_resume_pc [RCVL],
  input  logic [RCVL-1:0]       rc_ex_valid,
  input  word_t                 rc_ex_instr [RCVL],
  input  word_t                 rc_ex_rs1 [RCVL],
  input  word_t                 rc_ex_rs2 [RCVL],
  output logic [RCVL-1:0]       rc_squash,
  input  logic                  rc_fq_cfg_we,
  input  logic [RCSAW-1:0]      rc_fq_base,
  input  logic [3:0]            rc_fq_shift,
  input  logic [RC_CTR_W-1:0]   rc_fq_words,
  input  logic [4:0]            rc_fq_nframes,
  output logic [RCVL-1:0]       rc_fs_ready,
  output logic [RCSAW-1:0]      rc_fs_base [RCVL],
  input  logic [RCVL-1:0]       rc_remem,
  output logic [RCVL-1:0]       rc_frame_overrun,
  input  logic [RCVL-1:0]       rc_sp_en,
  input  logic [RCVL-1:0]       rc_sp_we,
  input  logic [RCSAW-1:0]      rc_sp_addr [RCVL],
  input  word_t                 rc_sp_wdata [RCVL],
  output logic [RCVL-1:0]       rc_sp_gnt,
  output word_t                 rc_sp_rdata [RCVL],
  input  logic [15:0]           wc_batch,
  input  logic                  wc_cm_we,
  input  logic [WCTW-1:0]       wc_cm_tile,
  input  logic [1:0]            wc_cm_cfg,
  input  logic [1:0]            wc_cm_node,
  input  logic [1:0]            wc_cm_ctx,
  input  mx_ctx_t               wc_cm_word,
  input  logic                  wc_cm_meta_we,
  input  logic [2:0]            wc_cm_ii,
  input  logic [2:0]            wc_cm_stages,
  input  logic [3:0]            wc_cm_drain,
  input  logic                  wc_conf_valid,
  input  logic [1:0]            wc_conf_id,
  input  logic                  wc_work_valid,
  output logic                  wc_work_ready,
  input  mx_work_t              wc_work,
  output logic                  wc_done_valid,
  output logic [5:0]            wc_done_requester,
  output logic                  wc_busy,
  input  logic                  wc_pool_we,
  input  logic [WCNT-1:0]       wc_pool_mask,
  input  logic                  wc_rr_pass,
  input  logic                  wc_rr_leave,
  input  logic [WCTW-1:0]       wc_rr_leave_id,
  output logic [WCNT-1:0]       wc_my_turn,
  input  logic [WCNT-1:0]       wc_core_issue,
  input  fu_class_e             wc_core_class [WCNT],
  input  mx_op_e                wc_core_op [WCNT],
  input  word_t                 wc_core_a [WCNT],
  input  word_t                 wc_core_b [WCNT],
  output logic [WCNT-1:0]       wc_core_stall,
  output logic [WCNT-1:0]       wc_core_res_valid,
  output word_t                 wc_core_res [WCNT],
  input  logic [WCNT-1:0]       wc_c_req,
  input  logic [WCNT-1:0]       wc_c_we,
  input  logic [WCSAW-1:0]      wc_c_addr [WCNT],
  input  word_t                 wc_c_wdata [WCNT],
  output logic [WCNT-1:0]       wc_c_gnt,
  output logic [WCNT-1:0]       wc_c_rvalid,
  input  logic [WCNT-1:0]       wc_r_req,
  input  logic [WCNT-1:0]       wc_r_we,
  input  logic [WCSAW-1:0]      wc_r_addr [WCNT],
  input  word_t                 wc_r_wdata [WCNT],
  output logic [WCNT-1:0]       wc_r_gnt,
  output logic [WCNT-1:0]       wc_r_rvalid,
  output word_t                 wc_sp_rdata [WCNT],
  input  logic                  wc_fq_cfg_we,
  input  logic [WCSAW-1:0]      wc_fq_base,
  input  logic [3:0]            wc_fq_shift,
  input  logic [9:0]            wc_fq_words [WCNT],
  input  logic [4:0]            wc_fq_nframes,
  input  logic [WCNT-1:0]       wc_fq_notify,
  input  logic [WCTW-1:0]       wc_notify_tgt [WCNT],
  output logic [WCNT-1:0]       wc_frame_ready,
  output logic [3:0]            wc_frame_idx [WCNT],
  input  logic [WCNT-1:0]       wc_remem,
  output logic [WCNT-1:0]       wc_sec_running,
  output logic [3:0]            wc_fu_busy [WCNT]
);

  rockcress_group #(
    .ROWS(RC_ROWS), .COLS(RC_COLS), .SPAD_WORDS(RC_SPAD_WORDS),
    .IMEM_WORDS(RC_IMEM_WORDS), .LLC_WORDS(RC_LLC_WORDS),
    .NUM_CTR(RC_NUM_CTR), .CTR_W(RC_CTR_W)
  ) u_rockcress (
    .clk,
    .rst_n,
    .cfg_we(rc_cfg_we),
    .in_vector_mode(rc_in_vector_mode),
    .sc_msg_valid(rc_sc_msg_valid),
    .sc_msg(rc_sc_msg),
    .sc_msg_ready(rc_sc_msg_ready),
    .vl_valid(rc_vl_valid),
    .vl_ready(rc_vl_ready),
    .vl_sp(rc_vl_sp),
    .vl_addr(rc_vl_addr),
    .vl_core(rc_vl_core),
    .vl_width(rc_vl_width),
    .vl_var(rc_vl_var),
    .vl_part(rc_vl_part),
    .sw_valid(rc_sw_valid),
    .sw_ready(rc_sw_ready),
    .sw_we(rc_sw_we),
    .sw_addr(rc_sw_addr),
    .sw_wdata(rc_sw_wdata),
    .sw_off(rc_sw_off),
    .sc_resp_valid(rc_sc_resp_valid),
    .sc_resp(rc_sc_resp),
    .prog_we(rc_prog_we),
    .prog_addr(rc_prog_addr),
    .prog_data(rc_prog_data),
    .dec_valid(rc_dec_valid),
    .dec_instr(rc_dec_instr),
    .dec_ready(rc_dec_ready),
    .br_valid(rc_br_valid),
    .br_taken(rc_br_taken),
    .br_target(rc_br_target),
    .mt_active(rc_mt_active),
    .resume_valid(rc_resume_valid),
    .resume_pc(rc_resume_pc),
    .ex_valid(rc_ex_valid),
    .ex_instr(rc_ex_instr),
    .ex_rs1(rc_ex_rs1),
    .ex_rs2(rc_ex_rs2),
    .squash(rc_squash),
    .fq_cfg_we(rc_fq_cfg_we),
    .fq_base(rc_fq_base),
    .fq_shift(rc_fq_shift),
    .fq_words(rc_fq_words),
    .fq_nframes(rc_fq_nframes),
    .fs_ready(rc_fs_ready),
    .fs_base(rc_fs_base),
    .remem(rc_remem),
    .frame_overrun(rc_frame_overrun),
    .sp_en(rc_sp_en),
    .sp_we(rc_sp_we),
    .sp_addr(rc_sp_addr),
    .sp_wdata(rc_sp_wdata),
    .sp_gnt(rc_sp_gnt),
    .sp_rdata(rc_sp_rdata)
  );

  watercress_group #(
    .ROWS(WC_ROWS), .COLS(WC_COLS), .SPAD_WORDS(WC_SPAD_WORDS), .NUM_CFG(WC_NUM_CFG)
  ) u_watercress (
    .clk,
    .rst_n,
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

endmodule
