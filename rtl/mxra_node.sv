// mxra_node: one node of the MXRA, the logical CGRA built from the execute
// stages of neighbouring tiles.
//
// A node wraps one of the core's functional units with the registers and
// multiplexers that let a static schedule drive it:
//   - two operand registers, each loaded through an 8:1 multiplexer from the
//     eight incoming links (one or two nodes away, N/E/S/W), with a load
//     enable so a value can wait in the register for several cycles;
//   - four bypass registers, also behind 8:1 multiplexers, that carry a value
//     past the unit without using it;
//   - eight output multiplexers (5:1: the unit's result or one of the four
//     bypass registers) that drive the eight outgoing links;
//   - four configuration registers (contexts). The section's context counter
//     selects one per cycle, so a schedule repeats every II <= 4 cycles.
// The LSU node (KIND = NK_LSU) has no arithmetic unit: it accesses its tile's
// scratchpad at base pointer + immediate (LOAD, STORE), reads or writes the
// base pointer registers (GETPTR, SETPTR), honours the per-pointer load
// predicate (load returns zero) and store predicate (store is skipped), and
// performs side effects only when the op's modulo-schedule stage belongs to
// a live iteration (stage_ok).
//
// Sharing with the core: when the current context has no operation, the unit
// takes the core's instruction (core_*); its result returns on core_res after
// the unit's latency. fu_busy tells the core's issue stage that the MXRA owns
// the unit in this cycle.
//
// Timing: a value on a link in cycle t is captured in cycle t's context; the
// unit issues from the operand registers in cycle t+1 and its result drives
// the output multiplexers in cycle t+1+LAT-1 (LAT = 1 for IntAlu and LSU, 2
// for IntMul/FpAdd, 3 for FpMul). Bypass registers add one cycle per hop.
// Register counts, multiplexer sizes, directions, contexts and latencies
// follow the architecture; the context word layout and the LSU operations are
// this design's own.
module mxra_node
  import lac_pkg::*;
#(
  parameter node_kind_e KIND = NK_IALU
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        ctx_we,
  input  mx_ctx_t     ctx_wdata [MX_CTX],
  input  logic        active,
  input  logic [1:0]  ctx_idx,
  // links
  input  word_t       link_in  [MX_DIRS],
  output word_t       link_out [MX_DIRS],
  // LSU: tile scratchpad and base pointers
  input  logic [15:0] ptr [4],
  input  logic [3:0]  ld_pred,
  input  logic [3:0]  st_pred,
  input  logic [3:0]  stage_ok,
  output logic        sp_req,
  output logic        sp_we,
  output logic [15:0] sp_addr,
  output word_t       sp_wdata,
  input  word_t       sp_rdata,
  output logic        ptr_we,
  output logic [1:0]  ptr_widx,
  output logic [15:0] ptr_wdata,
  // shared use by the core
  input  logic        core_valid,
  input  mx_op_e      core_op,
  input  word_t       core_a,
  input  word_t       core_b,
  output logic        core_res_valid,
  output word_t       core_res,
  output logic        fu_busy
);
  mx_ctx_t ctx_q [MX_CTX];
  mx_ctx_t c;
  word_t   opa, opb;
  word_t   byp [MX_BYP];
  word_t   fu_res;
  word_t   b_eff;

  assign c       = active ? ctx_q[ctx_idx] : '0;
  assign fu_busy = active && (c.op != OP_NOP);
  assign b_eff   = c.use_imm ? word_t'($signed(c.imm)) : opb;

  // ---- registers ----------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MX_CTX; i++) ctx_q[i] <= '0;
      opa <= '0;
      opb <= '0;
      for (int i = 0; i < MX_BYP; i++) byp[i] <= '0;
    end else begin
      if (ctx_we)
        for (int i = 0; i < MX_CTX; i++) ctx_q[i] <= ctx_wdata[i];
      if (active) begin
        if (c.in_en[0]) opa <= link_in[c.in_sel[0]];
        if (c.in_en[1]) opb <= link_in[c.in_sel[1]];
        for (int i = 0; i < MX_BYP; i++)
          if (c.byp_en[i]) byp[i] <= link_in[c.byp_sel[i]];
      end
    end
  end

  // ---- functional unit ------------------------------------------------------
  if (KIND == NK_LSU) begin : g_lsu
    logic        ld_q, zero_q, gp_q;
    logic [15:0] gp_val_q;
    logic        live;
    logic [1:0]  unused_core_op_lsb;
    assign unused_core_op_lsb = {core_valid, ^{core_op, core_a, core_b}};
    always_comb begin
      live      = stage_ok[c.stage];
      sp_req    = 1'b0;
      sp_we     = 1'b0;
      sp_addr   = ptr[c.ptr_idx] + c.imm;
      sp_wdata  = opa;
      ptr_we    = 1'b0;
      ptr_widx  = c.ptr_idx;
      ptr_wdata = opa[15:0];
      unique case (c.op)
        OP_LOAD:   sp_req = 1'b1;
        OP_STORE:  begin sp_req = live && !st_pred[c.ptr_idx]; sp_we = 1'b1; end
        OP_SETPTR: ptr_we = live;
        default: ;
      endcase
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ld_q <= 1'b0; zero_q <= 1'b0; gp_q <= 1'b0; gp_val_q <= '0;
      end else begin
        ld_q     <= (c.op == OP_LOAD);
        zero_q   <= ld_pred[c.ptr_idx];
        gp_q     <= (c.op == OP_GETPTR);
        gp_val_q <= ptr[c.ptr_idx];
      end
    end
    always_comb begin
      fu_res = '0;
      if (ld_q)      fu_res = zero_q ? '0 : sp_rdata;
      else if (gp_q) fu_res = word_t'(gp_val_q);
    end
    assign core_res_valid = 1'b0;
    assign core_res       = '0;
  end else begin : g_alu
    logic   issue_mx, issue_core, ov, ot;
    mx_op_e fop;
    word_t  fa, fb;
    logic [3:0] unused_lsu;
    assign unused_lsu = {^ld_pred, ^st_pred, ^stage_ok, ^sp_rdata};
    always_comb begin
      issue_mx   = (c.op != OP_NOP);
      issue_core = !issue_mx && core_valid;
      fop        = issue_mx ? c.op : core_op;
      fa         = issue_mx ? opa : core_a;
      fb         = issue_mx ? b_eff : core_b;
    end
    mxra_fu #(.KIND(KIND)) u_fu (
      .clk, .rst_n,
      .in_valid(issue_mx || issue_core), .in_tag(issue_core),
      .op(fop), .a(fa), .b(fb),
      .out_valid(ov), .out_tag(ot), .res(fu_res)
    );
    assign core_res_valid = ov && ot;
    assign core_res       = fu_res;
    assign sp_req    = 1'b0;
    assign sp_we     = 1'b0;
    assign sp_addr   = '0;
    assign sp_wdata  = '0;
    assign ptr_we    = 1'b0;
    assign ptr_widx  = '0;
    assign ptr_wdata = '0;
  end

  // ---- output multiplexers ------------------------------------------------
  always_comb begin
    for (int d = 0; d < MX_DIRS; d++) begin
      unique case (c.out_sel[d])
        OS_FU:   link_out[d] = fu_res;
        OS_B0:   link_out[d] = byp[0];
        OS_B1:   link_out[d] = byp[1];
        OS_B2:   link_out[d] = byp[2];
        OS_B3:   link_out[d] = byp[3];
        default: link_out[d] = '0;
      endcase
    end
  end

endmodule
