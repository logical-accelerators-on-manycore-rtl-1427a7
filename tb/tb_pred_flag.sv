// tb_pred_flag: self-checking test of the predication flag.
//
// A random stream of instructions (pred_eq, pred_neq, other custom and
// ordinary instructions, with random or equal operands) is executed. The
// test keeps its own flag: set after reset and after clear, and otherwise
// written by pred_eq / pred_neq. Each cycle it checks the flag and that an
// instruction is squashed exactly when the flag is off and the instruction
// is not itself a predicate write.
module tb_pred_flag;
  import lac_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  clear = 0, ex_valid = 0, flag, squash;
  word_t ex_instr = '0, ex_rs1 = '0, ex_rs2 = '0;

  pred_flag dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t custom(input logic [2:0] f3);
    return {17'h0, f3, 5'd0, 7'b0001011};
  endfunction

  logic m_flag = 1;
  int n_squash = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(flag, "flag set after reset");
    for (int t = 0; t < 5000; t++) begin
      int kind;
      logic is_pred;
      kind     = $urandom_range(0, 5);
      ex_valid = ($urandom_range(0, 4) != 0);
      clear    = ($urandom_range(0, 30) == 0);
      ex_rs1   = $urandom_range(0, 3);
      ex_rs2   = $urandom_range(0, 3);
      case (kind)
        0: ex_instr = custom(3'd3);                        // pred_eq
        1: ex_instr = custom(3'd4);                        // pred_neq
        2: ex_instr = custom(3'd1);                        // frame_start
        3: ex_instr = 32'h00b50533;                        // add
        4: ex_instr = {17'h0, 3'd3, 5'd0, 7'b0110011};     // same funct3, other opcode
        default: ex_instr = 32'h0000a083;                  // load
      endcase
      is_pred = (kind == 0 || kind == 1);
      #1;
      check(flag == m_flag, "flag value");
      check(squash == (ex_valid && !m_flag && !is_pred), "squash");
      if (squash) n_squash++;
      @(negedge clk);
      if (clear)                     m_flag = 1;
      else if (ex_valid && kind == 0) m_flag = (ex_rs1 == ex_rs2);
      else if (ex_valid && kind == 1) m_flag = (ex_rs1 != ex_rs2);
    end
    check(n_squash > 100, "squashes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
