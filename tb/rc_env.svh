// rc_env.svh: stimulus and checks for a Rockcress vector group, shared by
// the group testbench and the top-level testbench. The including module
// defines clk, rst_n, check(), the localparams RCVL, RCSAW, RCIAW, RCLAW,
// RC_CTR_W and the macro RC_INST (hierarchical path of the group instance),
// and connects the rc_* signals declared here to the group's ports.
//
// The scenario, for the default 1 x 4 group:
//   1. fill part of the LLC slice through the single-word port;
//   2. store a microthread in the expander's instruction memory:
//        frame_start, addi, beq (taken), addi (skipped), addi, remem, vend;
//   3. form the group (every core writes its vconfig) and set up the frame
//      counters (4-word frames);
//   4. vissue the microthread. A small model of each vector core's execute
//      stage accepts decoded instructions with random backpressure, stalls
//      on frame_start until its head frame is ready and frees the frame on
//      remem. The frames are filled by single vloads issued while the cores
//      wait, the last core's much later so that the inet queues fill up
//      behind it. The branch is resolved by the testbench, taken;
//   5. check every core's decoded stream, the scratchpad contents and the
//      frame counters; then group, self and unaligned (suffix + prefix)
//      vloads; predication; and devec with its resume PC.
// Each mechanism is counted; the including testbench requires every count
// to be non-zero.

logic [RCVL:0]         rc_cfg_we = '0, rc_in_vector_mode;
logic                  rc_sc_msg_valid = 0, rc_sc_msg_ready;
inet_msg_t             rc_sc_msg = '0;
logic                  rc_vl_valid = 0, rc_vl_ready;
logic [11:0]           rc_vl_sp = '0;
logic [31:0]           rc_vl_addr = '0;
logic [7:0]            rc_vl_core = '0;
logic [4:0]            rc_vl_width = '0;
vl_var_e               rc_vl_var = VL_GROUP;
vl_part_e              rc_vl_part = VL_ALIGNED;
logic                  rc_sw_valid = 0, rc_sw_ready, rc_sw_we = 0;
logic [RCLAW-1:0]      rc_sw_addr = '0;
word_t                 rc_sw_wdata = '0;
logic [11:0]           rc_sw_off = '0;
logic                  rc_sc_resp_valid;
llc_resp_t             rc_sc_resp;
logic                  rc_prog_we = 0;
logic [RCIAW-1:0]      rc_prog_addr = '0;
word_t                 rc_prog_data = '0;
logic [RCVL-1:0]       rc_dec_valid, rc_dec_ready;
word_t                 rc_dec_instr [RCVL];
logic                  rc_br_valid = 0, rc_br_taken = 0;
word_t                 rc_br_target = '0;
logic                  rc_mt_active;
logic [RCVL-1:0]       rc_resume_valid;
word_t                 rc_resume_pc [RCVL];
logic [RCVL-1:0]       rc_ex_valid = '0;
word_t                 rc_ex_instr [RCVL];
word_t                 rc_ex_rs1 [RCVL];
word_t                 rc_ex_rs2 [RCVL];
logic [RCVL-1:0]       rc_squash;
logic                  rc_fq_cfg_we = 0;
logic [RCSAW-1:0]      rc_fq_base = '0;
logic [3:0]            rc_fq_shift = '0;
logic [RC_CTR_W-1:0]   rc_fq_words = '0;
logic [4:0]            rc_fq_nframes = '0;
logic [RCVL-1:0]       rc_fs_ready;
logic [RCSAW-1:0]      rc_fs_base [RCVL];
logic [RCVL-1:0]       rc_remem = '0;
logic [RCVL-1:0]       rc_frame_overrun;
logic [RCVL-1:0]       rc_sp_en = '0, rc_sp_we = '0;
logic [RCSAW-1:0]      rc_sp_addr [RCVL];
word_t                 rc_sp_wdata [RCVL];
logic [RCVL-1:0]       rc_sp_gnt;
word_t                 rc_sp_rdata [RCVL];

// mechanism counters
int rc_n_form = 0, rc_n_vissue = 0, rc_n_fwd = 0, rc_n_bp = 0, rc_n_brpause = 0;
int rc_n_vend = 0, rc_n_devec = 0, rc_n_vl_group = 0, rc_n_vl_single = 0;
int rc_n_vl_self = 0, rc_n_vl_split = 0, rc_n_fs_stall = 0, rc_n_fs_ready = 0;
int rc_n_remem = 0, rc_n_squash = 0;

function automatic word_t rc_llc_val(input int a);
  return 32'hC0DE_0000 ^ (a * 32'h9E37);
endfunction
function automatic word_t rc_custom(input logic [2:0] f3);
  return {17'd0, f3, 5'd0, 7'b0001011};
endfunction
function automatic word_t rc_addi(input int rd, input int imm);
  return {12'(imm), 5'd0, 3'd0, 5'(rd), 7'b0010011};
endfunction
localparam word_t RC_FS    = {17'd0, 3'd1, 5'd0, 7'b0001011};
localparam word_t RC_REMEM = {17'd0, 3'd2, 5'd0, 7'b0001011};
localparam word_t RC_VEND  = {17'd0, 3'd0, 5'd0, 7'b0001011};
localparam word_t RC_BEQ   = {7'd0, 5'd2, 5'd1, 3'd0, 5'd8, 7'b1100011};

// ---------------------------------------------------------------------------
// vector core execute-stage model
// ---------------------------------------------------------------------------
word_t rc_dlog [RCVL][$];
logic  rc_wait_fs [RCVL] = '{default: 1'b0};
logic  rc_bp_on = 0;
int    rc_br_cnt = 0;

always @(negedge clk) begin
  for (int k = 0; k < RCVL; k++) begin
    logic r;
    r = rc_bp_on ? ($urandom_range(0, 3) != 0) : 1'b1;
    if (rc_wait_fs[k] && !rc_fs_ready[k]) r = 1'b0;   // frame_start stalls
    rc_dec_ready[k] <= r;
  end
end

always @(posedge clk) begin
  rc_remem <= '0;
  if (rst_n) begin
    for (int k = 0; k < RCVL; k++) begin
      if (rc_wait_fs[k]) begin
        if (rc_fs_ready[k]) begin
          rc_wait_fs[k] <= 1'b0;
          rc_n_fs_ready++;
        end else rc_n_fs_stall++;
      end
      if (rc_dec_valid[k] && rc_dec_ready[k]) begin
        rc_dlog[k].push_back(rc_dec_instr[k]);
        if (rc_dec_instr[k] == RC_FS) rc_wait_fs[k] <= 1'b1;
        if (rc_dec_instr[k] == RC_REMEM) begin
          rc_remem[k] <= 1'b1;
          rc_n_remem++;
        end
        if (k > 0) rc_n_fwd++;
      end
    end
    // inet backpressure: a full queue downstream holds a sender's output
    for (int t = 1; t < RCVL; t++)
      if (rc_mt_active && !`RC_INST.out_ready[t]) rc_n_bp++;
    // branch resolution, three cycles after the expander decodes a branch
    rc_br_valid <= 1'b0;
    if (rc_dec_valid[0] && rc_dec_ready[0] && rc_dec_instr[0][6:0] == 7'b1100011) rc_br_cnt <= 3;
    else if (rc_br_cnt > 0) begin
      rc_n_brpause++;
      if (`RC_INST.out_valid[1] && `RC_INST.out_ready[1]) begin
        failures++;
        $display("FAIL: instruction forwarded during a branch pause");
      end
      rc_br_cnt <= rc_br_cnt - 1;
      if (rc_br_cnt == 1) begin
        rc_br_valid  <= 1'b1;
        rc_br_taken  <= 1'b1;
        rc_br_target <= 32'h50;
      end
    end
  end
end

// words returned to the scalar core (vload SELF)
word_t      rc_self_data [$];
logic [11:0] rc_self_off [$];
always @(posedge clk) if (rst_n && rc_sc_resp_valid) begin
  rc_self_data.push_back(rc_sc_resp.data);
  rc_self_off.push_back(rc_sc_resp.off);
end

// ---------------------------------------------------------------------------
// helpers
// ---------------------------------------------------------------------------
task automatic rc_vload(input vl_var_e v, input vl_part_e p, input int word_addr,
                        input int sp, input int core, input int width);
  rc_vl_valid = 1;
  rc_vl_var   = v;
  rc_vl_part  = p;
  rc_vl_addr  = 32'(word_addr * 4);
  rc_vl_sp    = 12'(sp);
  rc_vl_core  = 8'(core);
  rc_vl_width = 5'(width);
  @(posedge clk);
  while (!rc_vl_ready) @(posedge clk);
  @(negedge clk);
  rc_vl_valid = 0;
endtask

task automatic rc_sp_read(input int k, input int off, output word_t d);
  rc_sp_en[k]   = 1;
  rc_sp_we[k]   = 0;
  rc_sp_addr[k] = RCSAW'(off);
  @(posedge clk);
  while (!rc_sp_gnt[k]) @(posedge clk);
  @(negedge clk);
  rc_sp_en[k] = 0;
  d = rc_sp_rdata[k];
endtask

task automatic rc_send(input inet_kind_e kind, input word_t v);
  rc_sc_msg_valid = 1;
  rc_sc_msg.kind  = kind;
  rc_sc_msg.data  = v;
  @(posedge clk);
  while (!rc_sc_msg_ready) @(posedge clk);
  @(negedge clk);
  rc_sc_msg_valid = 0;
endtask

task automatic rc_wait_streams();
  repeat (24) @(negedge clk);
endtask

// ---------------------------------------------------------------------------
// scenario
// ---------------------------------------------------------------------------
task automatic rc_run();
  word_t d;
  word_t prog [7];
  for (int k = 0; k < RCVL; k++) begin
    rc_ex_instr[k] = '0; rc_ex_rs1[k] = '0; rc_ex_rs2[k] = '0;
    rc_sp_addr[k] = '0;  rc_sp_wdata[k] = '0;
  end
  // 1. LLC contents
  for (int a = 0; a < 256; a++) begin
    rc_sw_valid = 1; rc_sw_we = 1; rc_sw_addr = RCLAW'(a); rc_sw_wdata = rc_llc_val(a);
    @(posedge clk);
    while (!rc_sw_ready) @(posedge clk);
    @(negedge clk);
  end
  rc_sw_valid = 0; rc_sw_we = 0;
  // 2. microthread at PC 0x40
  prog = '{RC_FS, rc_addi(1, 1), RC_BEQ, rc_addi(9, 9), rc_addi(2, 2), RC_REMEM, RC_VEND};
  for (int i = 0; i < 7; i++) begin
    rc_prog_we = 1; rc_prog_addr = RCIAW'(16 + i); rc_prog_data = prog[i];
    @(negedge clk);
  end
  rc_prog_we = 0;
  // 3. group formation and frame counters
  check(rc_in_vector_mode == '0, "all tiles independent after reset");
  rc_cfg_we = '1;
  @(negedge clk);
  rc_cfg_we = '0;
  check(rc_in_vector_mode == '1, "every tile joined the group");
  if (rc_in_vector_mode == '1) rc_n_form++;
  rc_fq_cfg_we = 1; rc_fq_base = '0; rc_fq_shift = 4'd2; rc_fq_words = RC_CTR_W'(4); rc_fq_nframes = 5'd4;
  @(negedge clk);
  rc_fq_cfg_we = 0;
  check(rc_fs_ready == '0, "no frame ready before any data");
  // 4. vissue, with the frames filled while the cores wait
  rc_bp_on = 1;
  rc_send(INET_VISSUE, 32'h40);
  rc_n_vissue++;
  repeat (30) @(negedge clk);
  check(rc_mt_active, "microthread still waiting for its frame");
  // cores 0..2 get their first frame now, core 3 much later, so the
  // others run ahead until core 3's inet queue is full
  for (int k = 0; k < RCVL - 1; k++) rc_vload(VL_SINGLE, VL_ALIGNED, 4 * k, 0, k, 4);
  repeat (40) @(negedge clk);
  check(rc_fs_ready[RCVL-1] == 1'b0, "last core still waiting for its frame");
  rc_vload(VL_SINGLE, VL_ALIGNED, 4 * (RCVL - 1), 0, RCVL - 1, 4);
  rc_n_vl_single++;
  for (int i = 0; i < 200 && rc_mt_active; i++) @(negedge clk);
  check(!rc_mt_active, "vend ended the microthread");
  if (!rc_mt_active) rc_n_vend++;
  repeat (20) @(negedge clk);
  rc_bp_on = 0;
  // 5. results of the microthread
  for (int k = 0; k < RCVL; k++) begin
    word_t e [$];
    e = (k == 0) ? '{RC_FS, rc_addi(1, 1), RC_BEQ, rc_addi(2, 2), RC_REMEM}
                 : '{RC_FS, rc_addi(1, 1), rc_addi(2, 2), RC_REMEM};
    check(rc_dlog[k].size() == e.size(), $sformatf("core %0d decoded %0d instructions", k, rc_dlog[k].size()));
    for (int i = 0; i < e.size() && i < rc_dlog[k].size(); i++)
      check(rc_dlog[k][i] == e[i], $sformatf("core %0d instruction %0d", k, i));
    check(rc_fs_base[k] == RCSAW'(4), "remem moved the head to frame 1");
    for (int j = 0; j < 4; j++) begin
      rc_sp_read(k, j, d);
      check(d == rc_llc_val(4 * k + j), $sformatf("group vload word %0d of core %0d", j, k));
    end
  end
  // group: one line spread over the group, 4 words per core, frame 1
  rc_vload(VL_GROUP, VL_ALIGNED, 16, 4, 0, 4);
  rc_wait_streams();
  check(rc_fs_ready == '1, "group vload fills frame 1 of every core");
  for (int k = 0; k < RCVL; k++)
    for (int j = 0; j < 4; j++) begin
      rc_sp_read(k, 4 + j, d);
      check(d == rc_llc_val(16 + 4 * k + j), "group vload data");
    end
  if (rc_fs_ready == '1) rc_n_vl_group++;
  // self: three words back to the scalar core
  rc_vload(VL_SELF, VL_ALIGNED, 40, 100, 0, 3);
  rc_wait_streams();
  check(rc_self_data.size() == 3, "self vload returns three words");
  for (int j = 0; j < 3 && j < rc_self_data.size(); j++)
    check(rc_self_data[j] == rc_llc_val(40 + j) && rc_self_off[j] == 12'(100 + j), "self vload data");
  if (rc_self_data.size() == 3) rc_n_vl_self++;
  // unaligned group vload crossing a line: suffix then prefix
  rc_vload(VL_GROUP, VL_SUFFIX, 62, 8, 0, 1);
  rc_vload(VL_GROUP, VL_PREFIX, 62, 8, 0, 1);
  rc_wait_streams();
  begin
    int ok = 1;
    for (int k = 0; k < RCVL; k++) begin
      rc_sp_read(k, 8, d);
      check(d == rc_llc_val(62 + k), $sformatf("unaligned vload word of core %0d", k));
      if (d != rc_llc_val(62 + k)) ok = 0;
    end
    if (ok) rc_n_vl_split++;
  end
  // predication on core 1
  rc_ex_valid[1] = 1; rc_ex_instr[1] = rc_custom(3'd4); rc_ex_rs1[1] = 7; rc_ex_rs2[1] = 7;   // pred_neq: false
  @(negedge clk);
  rc_ex_instr[1] = rc_addi(3, 3);
  #1;
  check(rc_squash[1], "instruction squashed under a false predicate");
  if (rc_squash[1]) rc_n_squash++;
  @(negedge clk);
  rc_ex_instr[1] = rc_custom(3'd3); rc_ex_rs1[1] = 5; rc_ex_rs2[1] = 5;                        // pred_eq: true
  #1;
  check(!rc_squash[1], "predicate writes are never squashed");
  @(negedge clk);
  rc_ex_instr[1] = rc_addi(3, 3);
  #1;
  check(!rc_squash[1], "instruction runs under a true predicate");
  @(negedge clk);
  rc_ex_valid[1] = 0;
  // devec
  rc_send(INET_DEVEC, 32'h300);
  begin
    logic [RCVL-1:0] seen;
    seen = '0;
    for (int i = 0; i < 40; i++) begin
      @(posedge clk);
      for (int k = 0; k < RCVL; k++)
        if (rc_resume_valid[k]) begin
          seen[k] = 1'b1;
          check(rc_resume_pc[k] == 32'h300, "resume PC");
        end
    end
    @(negedge clk);
    check(seen == '1, "every vector core received devec");
    check(rc_in_vector_mode[RCVL:1] == '0, "vector cores back to independent mode");
    if (seen == '1) rc_n_devec++;
  end
endtask

task automatic rc_report();
  $display("rockcress: form=%0d vissue=%0d forwarded=%0d inet_backpressure=%0d branch_pause=%0d vend=%0d devec=%0d",
           rc_n_form, rc_n_vissue, rc_n_fwd, rc_n_bp, rc_n_brpause, rc_n_vend, rc_n_devec);
  $display("rockcress: vload group=%0d single=%0d self=%0d suffix+prefix=%0d frame_start stall=%0d ready=%0d remem=%0d squash=%0d",
           rc_n_vl_group, rc_n_vl_single, rc_n_vl_self, rc_n_vl_split, rc_n_fs_stall, rc_n_fs_ready,
           rc_n_remem, rc_n_squash);
  check(rc_n_form > 0, "mechanism: group formation");
  check(rc_n_vissue > 0, "mechanism: vissue");
  check(rc_n_fwd > 0, "mechanism: instruction forwarding");
  check(rc_n_bp > 0, "mechanism: inet backpressure");
  check(rc_n_brpause > 0, "mechanism: branch pause");
  check(rc_n_vend > 0, "mechanism: vend");
  check(rc_n_devec > 0, "mechanism: devec");
  check(rc_n_vl_group > 0, "mechanism: group vload");
  check(rc_n_vl_single > 0, "mechanism: single vload");
  check(rc_n_vl_self > 0, "mechanism: self vload");
  check(rc_n_vl_split > 0, "mechanism: unaligned vload");
  check(rc_n_fs_stall > 0, "mechanism: frame_start stall");
  check(rc_n_fs_ready > 0, "mechanism: frame ready");
  check(rc_n_remem > 0, "mechanism: remem");
  check(rc_n_squash > 0, "mechanism: predication squash");
endtask
