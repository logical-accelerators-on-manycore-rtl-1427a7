// tb_mxra_node: self-checking test of one MXRA node in its two flavours.
//
// Integer-ALU node: four contexts are loaded and cycled 0,1,2,3,0,... with
// random data on all eight input links every cycle.
//   ctx 0 loads the operand registers from links N1 and E1,
//   ctx 1 issues the operation (ADD, or SUB with an immediate in a second
//         pass, which replaces operand B),
//   ctx 2 drives the result on link S1 and loads bypass 0 from W1,
//   ctx 3 drives bypass 0 on E2 and the FU output nowhere.
// The test computes what S1 and E2 must carry from the link values it
// drove. It also checks that the node reports its unit busy exactly in the
// contexts that use it, and that the core's own operations go through the
// unit in the free contexts and while the node is inactive, one cycle late.
//
// Load/store node: in front of a model scratchpad (one-cycle read) it loads
// through pointer 0, stores operand A through pointer 1 and writes pointer
// 2, checking addresses (pointer + offset), the load data on the output
// link, and that predication and the modulo-stage enable suppress stores
// and pointer writes.
module tb_mxra_node;
  import lac_pkg::*;

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

  // ---- shared stimulus ----
  logic        ctx_we = 0, active = 0;
  mx_ctx_t     ctx_w [MX_CTX];
  logic [1:0]  ctx_idx = 0;
  word_t       lin [MX_DIRS];
  logic [15:0] ptr [4];
  logic [3:0]  ld_pred = 0, st_pred = 0, stage_ok = 4'hF;
  logic        core_valid = 0;
  mx_op_e      core_op = OP_NOP;
  word_t       core_a = 0, core_b = 0;

  // ---- ALU node ----
  word_t       a_out [MX_DIRS];
  logic        a_sp_req, a_sp_we, a_ptr_we, a_crv, a_busy;
  logic [15:0] a_sp_addr, a_ptr_wdata;
  logic [1:0]  a_ptr_widx;
  word_t       a_sp_wdata, a_cres;
  mxra_node #(.KIND(NK_IALU)) u_alu (
    .clk, .rst_n, .ctx_we, .ctx_wdata(ctx_w), .active, .ctx_idx,
    .link_in(lin), .link_out(a_out), .ptr, .ld_pred, .st_pred, .stage_ok,
    .sp_req(a_sp_req), .sp_we(a_sp_we), .sp_addr(a_sp_addr), .sp_wdata(a_sp_wdata),
    .sp_rdata(32'd0), .ptr_we(a_ptr_we), .ptr_widx(a_ptr_widx), .ptr_wdata(a_ptr_wdata),
    .core_valid, .core_op, .core_a, .core_b,
    .core_res_valid(a_crv), .core_res(a_cres), .fu_busy(a_busy)
  );

  // ---- LSU node with a model scratchpad ----
  logic        l_ctx_we = 0;
  word_t       l_out [MX_DIRS];
  logic        l_sp_req, l_sp_we, l_ptr_we, l_crv, l_busy;
  logic [15:0] l_sp_addr, l_ptr_wdata;
  logic [1:0]  l_ptr_widx;
  word_t       l_sp_wdata, l_cres, l_sp_rdata;
  mxra_node #(.KIND(NK_LSU)) u_lsu (
    .clk, .rst_n, .ctx_we(l_ctx_we), .ctx_wdata(ctx_w), .active, .ctx_idx,
    .link_in(lin), .link_out(l_out), .ptr, .ld_pred, .st_pred, .stage_ok,
    .sp_req(l_sp_req), .sp_we(l_sp_we), .sp_addr(l_sp_addr), .sp_wdata(l_sp_wdata),
    .sp_rdata(l_sp_rdata), .ptr_we(l_ptr_we), .ptr_widx(l_ptr_widx), .ptr_wdata(l_ptr_wdata),
    .core_valid(1'b0), .core_op(OP_NOP), .core_a(32'd0), .core_b(32'd0),
    .core_res_valid(l_crv), .core_res(l_cres), .fu_busy(l_busy)
  );
  word_t spm [1024];
  always_ff @(posedge clk) if (l_sp_req) begin
    if (l_sp_we) spm[l_sp_addr[9:0]] <= l_sp_wdata;
    else         l_sp_rdata <= spm[l_sp_addr[9:0]];
  end

  function automatic mx_ctx_t nop_ctx();
    mx_ctx_t x;
    x = '0;
    return x;
  endfunction

  task automatic load_ctx(input bit lsu);
    @(negedge clk);
    if (lsu) l_ctx_we = 1; else ctx_we = 1;
    @(negedge clk);
    ctx_we = 0;
    l_ctx_we = 0;
  endtask

  task automatic rand_links();
    for (int d = 0; d < MX_DIRS; d++) lin[d] = $urandom;
  endtask

  int n_core = 0;

  initial begin
    for (int d = 0; d < MX_DIRS; d++) lin[d] = 0;
    for (int i = 0; i < 4; i++) ptr[i] = 0;
    for (int i = 0; i < 1024; i++) spm[i] = 32'hA000_0000 + i;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ================= ALU node =================
    for (int pass = 0; pass < 2; pass++) begin
      word_t a_l, b_l, w_l, exp_s1, exp_e2;
      logic  have = 0;
      for (int i = 0; i < 4; i++) ctx_w[i] = nop_ctx();
      ctx_w[0].in_en     = 2'b11;
      ctx_w[0].in_sel[0] = LD_N1;
      ctx_w[0].in_sel[1] = LD_E1;
      ctx_w[1].op        = (pass == 0) ? OP_ADD : OP_SUB;
      ctx_w[1].use_imm   = (pass == 1);
      ctx_w[1].imm       = 16'hFFFB;             // -5
      ctx_w[2].out_sel[LD_S1] = OS_FU;
      ctx_w[2].byp_en[0]      = 1'b1;
      ctx_w[2].byp_sel[0]     = LD_W1;
      ctx_w[3].out_sel[LD_E2] = OS_B0;
      load_ctx(0);
      active = 1;
      for (int r = 0; r < 200; r++) begin
        for (int k = 0; k < 4; k++) begin
          ctx_idx = 2'(k);
          rand_links();
          // the core tries to use the unit every cycle
          core_valid = 1;
          core_op    = OP_XOR;
          core_a     = $urandom;
          core_b     = $urandom;
          #1;
          check(a_busy == (k == 1), "unit busy only in the issuing context");
          if (k == 0) begin a_l = lin[LD_N1]; b_l = lin[LD_E1]; end
          if (k == 2 && have) check(a_out[LD_S1] == exp_s1, $sformatf("result on S1: %h want %h (a %h)", a_out[LD_S1], exp_s1, a_l));
          if (k == 3 && have) check(a_out[LD_E2] == exp_e2, "bypass 0 on E2");
          for (int d = 0; d < MX_DIRS; d++)
            if (!((k == 2 && d == LD_S1) || (k == 3 && d == LD_E2)))
              check(a_out[d] == 0, "unused outputs stay quiet");
          if (k == 2) w_l = lin[LD_W1];
          begin
            word_t ca, cb;
            logic  issued;
            ca = core_a; cb = core_b;
            issued = (k != 1);
            @(negedge clk);
            check(a_crv == issued, "core op served in a free context");
            if (issued) begin
              check(a_cres == (ca ^ cb), "core result");
              n_core++;
            end
          end
          if (k == 1) begin
            exp_s1 = (pass == 0) ? a_l + b_l : a_l - 32'hFFFF_FFFB;  // a - (-5)
            have = 1;
          end
          if (k == 2) exp_e2 = w_l;
        end
      end
      active = 0;
      core_valid = 0;
    end
    // inactive node: the core owns the unit
    active = 0;
    core_valid = 1; core_op = OP_SLTU; core_a = 3; core_b = 7;
    #1;
    check(!a_busy, "inactive node is never busy");
    @(negedge clk);
    core_valid = 0;
    check(a_crv && a_cres == 1, "core op while inactive");

    // ================= LSU node =================
    ptr[0] = 16'd100; ptr[1] = 16'd200; ptr[2] = 16'd300; ptr[3] = 16'd0;
    for (int i = 0; i < 4; i++) ctx_w[i] = nop_ctx();
    ctx_w[0].op = OP_LOAD;  ctx_w[0].ptr_idx = 2'd0; ctx_w[0].imm = 16'd7;
    ctx_w[0].in_en = 2'b01; ctx_w[0].in_sel[0] = LD_S2;
    ctx_w[1].out_sel[LD_W1] = OS_FU;
    ctx_w[2].op = OP_STORE; ctx_w[2].ptr_idx = 2'd1; ctx_w[2].imm = 16'd3; ctx_w[2].stage = 2'd1;
    ctx_w[3].op = OP_SETPTR; ctx_w[3].ptr_idx = 2'd2; ctx_w[3].stage = 2'd2;
    load_ctx(1);
    active = 1;
    for (int r = 0; r < 64; r++) begin
      word_t a_l;
      ld_pred  = 4'($urandom_range(0, 1));
      st_pred  = {1'b0, 1'($urandom_range(0, 1)), 2'b0};
      stage_ok = {1'b1, 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)), 1'b1};
      spm[107] = $urandom;
      for (int k = 0; k < 4; k++) begin
        ctx_idx = 2'(k);
        rand_links();
        #1;
        case (k)
          0: begin
            check(l_sp_req && !l_sp_we && l_sp_addr == 16'd107, "load address = pointer + offset");
            a_l = lin[LD_S2];
          end
          1: begin
            check(!l_sp_req, "no access in an empty context");
            check(l_out[LD_W1] == (ld_pred[0] ? 32'd0 : spm[107]), "load data (or zero when predicated)");
          end
          2: begin
            check(l_sp_req == (stage_ok[1] && !st_pred[1]), "store only in a live stage and when not predicated");
            if (l_sp_req) check(l_sp_we && l_sp_addr == 16'd203 && l_sp_wdata == a_l, "store address and data");
          end
          default: begin
            check(l_ptr_we == stage_ok[2], "pointer write gated by its stage");
            check(l_ptr_widx == 2'd2 && l_ptr_wdata == a_l[15:0], "pointer write value");
          end
        endcase
        @(negedge clk);
      end
    end
    active = 0;
    check(n_core > 1000, "core shared the unit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
