// tb_logical_accel_top: full-size end-to-end test of the whole design with
// default parameters: a Rockcress vector group (scalar tile plus a 1 x 4 row
// of vector tiles with the shared LLC bank) and a 2 x 2 Watercress group
// forming one 4 x 4 MXRA.
//
// The Rockcress scenario (rc_env.svh) and the Watercress scenario
// (wc_env.svh) are the same ones the group testbenches run, here reaching
// the groups through the top-level ports. Each scenario counts its
// mechanisms (group forming, vissue, instruction forwarding, inet
// backpressure, branch pause, vend, devec, the vload variants, frame stalls,
// remem, predication; configure, start propagation, cross-tile links, FU
// conflicts, scratchpad priority, remote frame notification, round-robin
// turn, completion), and a mechanism that never happens is a failure.
module tb_logical_accel_top;
  import lac_pkg::*;
  localparam int unsigned RCVL     = 4;
  localparam int unsigned RCSAW    = 10;
  localparam int unsigned RCIAW    = 10;
  localparam int unsigned RCLAW    = 12;
  localparam int unsigned RC_CTR_W = 10;
  localparam int WCNT  = 4;
  localparam int WCTW  = 2;
  localparam int WCSAW = 10;
`define RC_INST dut.u_rockcress

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
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

`include "rc_env.svh"
`include "wc_env.svh"

  logical_accel_top dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    rc_run();
    wc_run();
    rc_report();
    wc_report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
