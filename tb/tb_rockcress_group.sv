// tb_rockcress_group: end-to-end test of one Rockcress vector group (a
// scalar tile and a 1 x 4 row of vector tiles, the default size).
//
// The stimulus and checks live in rc_env.svh so that the top-level
// testbench runs the same scenario; see that file for what is exercised.
// This module instantiates the group, runs the scenario, and fails any
// mechanism that never happened.
module tb_rockcress_group;
  import lac_pkg::*;

  localparam int unsigned RCVL     = 4;
  localparam int unsigned RCSAW    = 10;
  localparam int unsigned RCIAW    = 10;
  localparam int unsigned RCLAW    = 12;
  localparam int unsigned RC_CTR_W = 10;
`define RC_INST dut

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

`include "rc_env.svh"

  rockcress_group dut (
    .clk(clk),
    .rst_n(rst_n),
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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    rc_run();
    rc_report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
