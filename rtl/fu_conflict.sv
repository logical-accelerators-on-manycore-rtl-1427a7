// fu_conflict: issue-stage check that keeps a core off the functional units
// its tile's MXRA section is using.
//
// The MXRA borrows the core's units and has priority, because its schedule is
// fixed in time. Each cycle the section reports which of its four nodes
// issue an operation (mx_busy, node order LSU, IntAlu, FpMul, IntMul+FpAdd).
// The core's next instruction is classified by the unit it needs; it stalls
// when that unit's node is busy. IntMul and FpAdd share one node, so either
// class stalls on it. Load/store, cgracomm and global memory requests have a
// path of their own and never stall here (scratchpad port conflicts are
// settled by the scratchpad arbiter); other instructions (e.g. divide) use
// units outside the MXRA.
//
// Purely combinational. `grant` routes an issuing instruction to the node
// that will execute it; stall and grant are never both set.
module fu_conflict
  import lac_pkg::*;
(
  input  logic       issue_valid,
  input  fu_class_e  issue_class,
  input  logic [3:0] mx_busy,
  output logic       stall,
  output logic [3:0] grant
);
  logic [3:0] need;
  always_comb begin
    need = '0;
    unique case (issue_class)
      FC_IALU:  need[1] = 1'b1;
      FC_FPMUL: need[2] = 1'b1;
      FC_IMUL,
      FC_FPADD: need[3] = 1'b1;
      default:  need = '0;
    endcase
    stall = issue_valid && ((need & mx_busy) != '0);
    grant = (issue_valid && !stall) ? need : '0;
  end
endmodule
