// pred_flag: the one-bit predication mask of a vector core.
//
// Microthreads have no divergent control flow; conditional work is done by
// predication instead. pred_eq rs1, rs2 sets the flag to (rs1 == rs2) and
// pred_neq rs1, rs2 to (rs1 != rs2). While the flag is 0 every other
// instruction executes as a nop; predication instructions always execute, so
// a later pred_eq x0, x0 turns the lane back on. The flag is 1 after reset
// and whenever the core (re)enters a vector group (clear).
//
// Interface / timing: ex_valid/ex_instr/ex_rs1/ex_rs2 come from the execute
// stage. squash is combinational: it tells the execute stage to drop this
// cycle's instruction. The flag updates at the clock edge, so it affects the
// next instruction. The encoding of pred_eq/pred_neq (custom-0, funct3 3/4)
// is this design's choice.
module pred_flag
  import lac_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  ex_valid,
  input  word_t ex_instr,
  input  word_t ex_rs1,
  input  word_t ex_rs2,
  output logic  flag,
  output logic  squash
);
  logic is_pred_eq, is_pred_neq;
  always_comb begin
    is_pred_eq  = ex_instr[6:0] == OPC_CUSTOM0 && ex_instr[14:12] == F3_PRED_EQ;
    is_pred_neq = ex_instr[6:0] == OPC_CUSTOM0 && ex_instr[14:12] == F3_PRED_NEQ;
    squash      = ex_valid && !flag && !is_pred_eq && !is_pred_neq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       flag <= 1'b1;
    else if (clear)                   flag <= 1'b1;
    else if (ex_valid && is_pred_eq)  flag <= (ex_rs1 == ex_rs2);
    else if (ex_valid && is_pred_neq) flag <= (ex_rs1 != ex_rs2);
  end
endmodule
