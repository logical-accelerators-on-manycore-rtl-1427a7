// tb_fu_conflict: exhaustive test of the functional-unit conflict check.
//
// Every instruction class is tried against every combination of busy MXRA
// nodes. The expected answer comes from a table in the testbench of which
// section node holds the unit a class needs (integer ALU in node 1, FP
// multiplier in node 2, integer multiplier and FP adder in node 3; loads,
// stores and other classes need none of them): the core stalls exactly when
// that node is busy, and is otherwise granted the node.
module tb_fu_conflict;
  import lac_pkg::*;

  logic       issue_valid, stall;
  fu_class_e  issue_class;
  logic [3:0] mx_busy, grant;

  fu_conflict dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int node_of [8] = '{-1, 1, 3, 3, 2, -1, -1, -1};

  initial begin
    int n_stall = 0;
    for (int v = 0; v < 2; v++)
      for (int c = 0; c < 8; c++)
        for (int m = 0; m < 16; m++) begin
          logic e_stall;
          logic [3:0] e_grant;
          issue_valid = 1'(v);
          issue_class = fu_class_e'(c);
          mx_busy     = 4'(m);
          #1;
          e_stall = v && node_of[c] >= 0 && m[node_of[c]];
          e_grant = (v && node_of[c] >= 0 && !e_stall) ? 4'(1 << node_of[c]) : 4'd0;
          check(stall == e_stall, $sformatf("stall v=%0d class=%0d busy=%b", v, c, m));
          check(grant == e_grant, $sformatf("grant v=%0d class=%0d busy=%b", v, c, m));
          if (stall) n_stall++;
        end
    check(n_stall > 0, "stalls seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
