// tb_inet_fetch: self-checking test of the Rockcress fetch stage in its three
// group roles.
//
// Expander: the tile is configured as expander listening west, a vissue
// message starts a short microthread held in a small instruction memory
// model (one-cycle read). The program has straight-line instructions, a
// conditional branch (resolved by the testbench some cycles after decode,
// taken), a jal and a closing vend. The test checks that every non-control
// instruction is sent both to decode and onto the inet, in program order;
// that branch and jal go to decode only; that nothing is sent while the
// branch is unresolved; that vend ends the microthread without being
// forwarded; and that a devec is forwarded and returns the tile to
// independent mode with the resume PC. Decode and the downstream inet
// apply random backpressure throughout.
//
// Vector: the tile listens north. A random stream of instructions arrives
// with random gaps; the test checks that the queue only ever accepts from
// its configured neighbour, never holds more than two entries, and passes
// every instruction exactly once, in order, to decode and onward.
//
// Scalar: vissue/devec messages from the commit stage go out on the inet
// with the inet's backpressure.
module tb_inet_fetch;
  import lac_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       cfg_we = 0;
  vconfig_t   cfg = '0, vcfg;
  logic [3:0] inet_in_valid = '0, inet_in_ready;
  inet_msg_t  inet_in [4];
  logic       inet_out_valid, inet_out_ready = 0;
  inet_msg_t  inet_out;
  logic       sc_msg_valid = 0, sc_msg_ready;
  inet_msg_t  sc_msg = '0;
  logic       ic_req;
  word_t      ic_pc, ic_instr;
  logic       dec_valid, dec_ready = 0;
  word_t      dec_instr;
  logic       br_valid = 0, br_taken = 0;
  word_t      br_target = '0;
  logic       resume_valid, mt_active;
  word_t      resume_pc;

  inet_fetch #(.QDEPTH(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- instruction memory model (one-cycle read) ----
  word_t imem [256];
  always_ff @(posedge clk) if (ic_req) ic_instr <= imem[ic_pc[9:2]];

  // ---- monitors ----
  word_t dec_log [$], out_log [$];
  inet_kind_e out_kind [$];
  int resume_n = 0;
  word_t resume_seen;
  always @(posedge clk) if (rst_n) begin
    if (dec_valid && dec_ready) dec_log.push_back(dec_instr);
    if (inet_out_valid && inet_out_ready) begin
      out_log.push_back(inet_out.data);
      out_kind.push_back(inet_out.kind);
    end
    if (resume_valid) begin
      resume_n++;
      resume_seen = resume_pc;
    end
  end

  // random backpressure
  logic bp_on = 0;
  always @(negedge clk) begin
    dec_ready      <= bp_on ? ($urandom_range(0, 3) != 0) : 1'b1;
    inet_out_ready <= bp_on ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  // branch resolution: answer a decoded branch a few cycles later
  int br_pending = 0;
  always @(posedge clk) begin
    br_valid <= 0;
    if (rst_n && dec_valid && dec_ready && dec_instr[6:0] == OPC_BRANCH) br_pending <= 4;
    else if (br_pending > 1) br_pending <= br_pending - 1;
    else if (br_pending == 1) begin
      br_pending <= 0;
      br_valid   <= 1;
      br_taken   <= 1;
      br_target  <= 32'h120;
    end
  end
  // nothing is forwarded while a branch is outstanding
  always @(posedge clk) if (rst_n && br_pending != 0) begin
    checks++;
    if (inet_out_valid && inet_out_ready) begin
      failures++;
      $display("FAIL: instruction forwarded during a branch pause");
    end
  end

  // occupancy never exceeds the queue size
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (dut.q_cnt > 2) begin failures++; $display("FAIL: queue overflow"); end
  end

  function automatic word_t addi(input int rd, input int imm);
    return {12'(imm), 5'd0, 3'd0, 5'(rd), 7'b0010011};
  endfunction
  localparam word_t BEQ  = {7'd0, 5'd0, 5'd0, 3'd0, 5'd8, 7'b1100011};   // beq x0,x0,+8 (target supplied)
  localparam word_t JAL8 = {1'b0, 10'd4, 1'b0, 8'd0, 5'd0, 7'b1101111}; // jal x0,+8
  localparam word_t VEND = {17'd0, 3'd0, 5'd0, 7'b0001011};

  task automatic configure(input role_e r, input dir_e d);
    @(negedge clk);
    cfg = '0;
    cfg.role = r;
    cfg.in_dir = d;
    cfg.grp_cols = 4;
    cfg.grp_rows = 1;
    cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // send one message from neighbour d (waits for acceptance)
  task automatic send(input int d, input inet_kind_e k, input word_t v);
    inet_in[d].kind = k;
    inet_in[d].data = v;
    inet_in_valid[d] = 1;
    @(posedge clk);
    while (!inet_in_ready[d]) @(posedge clk);
    @(negedge clk);
    inet_in_valid[d] = 0;
  endtask

  initial begin
    for (int i = 0; i < 4; i++) inet_in[i] = '0;
    for (int i = 0; i < 256; i++) imem[i] = addi(1, 1000 + i);
    imem[8'h40] = addi(1, 1);     // 0x100
    imem[8'h41] = addi(2, 2);     // 0x104
    imem[8'h42] = BEQ;            // 0x108
    imem[8'h48] = addi(3, 3);     // 0x120
    imem[8'h49] = JAL8;           // 0x124 -> 0x12C
    imem[8'h4B] = addi(4, 4);     // 0x12C
    imem[8'h4C] = VEND;           // 0x130
    repeat (2) @(negedge clk);
    rst_n = 1;
    bp_on = 1;

    // ================= expander =================
    configure(ROLE_EXPANDER, DIR_W);
    check(vcfg.role == ROLE_EXPANDER, "vconfig written");
    // wrong neighbour is never accepted
    inet_in_valid[DIR_N] = 1;
    inet_in[DIR_N] = '{kind: INET_VISSUE, data: 32'h100};
    @(negedge clk);
    check(!inet_in_ready[DIR_N], "only the configured neighbour is heard");
    inet_in_valid[DIR_N] = 0;
    send(DIR_W, INET_VISSUE, 32'h100);
    @(negedge clk);
    check(mt_active, "vissue starts a microthread");
    for (int i = 0; i < 100 && mt_active; i++) @(negedge clk);
    check(!mt_active, "vend ends the microthread");
    repeat (3) @(negedge clk);
    check(dec_log.size() == 6, $sformatf("expander decoded %0d instructions", dec_log.size()));
    if (dec_log.size() == 6) begin
      check(dec_log[0] == addi(1, 1) && dec_log[1] == addi(2, 2) && dec_log[2] == BEQ &&
            dec_log[3] == addi(3, 3) && dec_log[4] == JAL8 && dec_log[5] == addi(4, 4),
            "decode order follows taken branch and jal");
    end
    check(out_log.size() == 4, $sformatf("expander forwarded %0d instructions", out_log.size()));
    if (out_log.size() == 4) begin
      check(out_log[0] == addi(1, 1) && out_log[1] == addi(2, 2) &&
            out_log[2] == addi(3, 3) && out_log[3] == addi(4, 4),
            "only non-control instructions are forwarded, vend is not");
      foreach (out_kind[i]) check(out_kind[i] == INET_INSTR, "forwarded kind");
    end
    // devec
    out_log.delete(); out_kind.delete(); dec_log.delete();
    send(DIR_W, INET_DEVEC, 32'h2000);
    for (int i = 0; i < 20 && resume_n == 0; i++) @(negedge clk);
    check(resume_n == 1 && resume_seen == 32'h2000, "devec gives the resume PC");
    check(out_log.size() == 1 && out_kind[0] == INET_DEVEC, "devec is forwarded");
    @(negedge clk);
    check(vcfg.role == ROLE_INDEP, "devec returns to independent mode");

    // ================= vector =================
    out_log.delete(); out_kind.delete(); dec_log.delete();
    configure(ROLE_VECTOR, DIR_N);
    for (int i = 0; i < 300; i++) begin
      if ($urandom_range(0, 2) == 0) @(negedge clk);
      send(DIR_N, INET_INSTR, addi(5, i));
    end
    repeat (10) @(negedge clk);
    check(dec_log.size() == 300 && out_log.size() == 300, "every instruction decoded and forwarded once");
    for (int i = 0; i < 300 && i < dec_log.size() && i < out_log.size(); i++) begin
      check(dec_log[i] == addi(5, i), "decode order");
      check(out_log[i] == addi(5, i), "forward order");
    end
    send(DIR_N, INET_DEVEC, 32'h3000);
    repeat (6) @(negedge clk);
    check(resume_n == 2 && resume_seen == 32'h3000, "vector core leaves on devec");
    check(vcfg.role == ROLE_INDEP, "vector core back to independent mode");

    // ================= scalar =================
    out_log.delete(); out_kind.delete();
    configure(ROLE_SCALAR, DIR_N);
    for (int i = 0; i < 20; i++) begin
      sc_msg_valid = 1;
      sc_msg = '{kind: INET_VISSUE, data: 32'(i * 4)};
      @(posedge clk);
      while (!sc_msg_ready) @(posedge clk);
      @(negedge clk);
      sc_msg_valid = 0;
    end
    repeat (2) @(negedge clk);
    check(out_log.size() == 20, "scalar messages go out on the inet");
    for (int i = 0; i < out_log.size(); i++)
      check(out_log[i] == 32'(i * 4) && out_kind[i] == INET_VISSUE, "scalar message content");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
