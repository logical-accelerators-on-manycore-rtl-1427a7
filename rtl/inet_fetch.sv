// inet_fetch: a tile's fetch stage extended with the instruction forwarding
// network (inet) that lets a row of manycore tiles act as one vector unit.
//
// Every tile has one inet queue (2 entries) fed by a 4:1 multiplexer over the
// N/E/S/W neighbours; vconfig.in_dir picks the neighbour. What the stage does
// depends on the role written into vconfig:
//   SCALAR    - the leader. Messages from its commit stage (vissue start PC,
//               devec resume PC) go out on the inet (sc_msg_*).
//   EXPANDER  - the first vector core. A vissue message gives the start PC of
//               a microthread; the stage fetches it from its I-cache and sends
//               every instruction both to its own decode stage and out on the
//               inet. Conditional branches and jalr are kept local and fetch
//               pauses until the execute stage resolves them (br_*); jal is
//               followed in fetch. Control flow is never forwarded. vend ends
//               the microthread and is not forwarded either.
//   VECTOR    - the I-cache stays off; each instruction taken from the inet
//               queue goes to decode and, in the same cycle, out on the inet
//               to the next core. Nothing is ever squashed.
//   INDEP     - ordinary manycore core; the inet is unused (the baseline
//               fetch path is outside this module).
// A devec message is forwarded, returns the tile to INDEP and reports the
// resume PC (resume_*). A queue only accepts messages while its tile is in
// vector mode, so a sender waits until its neighbours have joined the group.
//
// Interface / timing: the inet and decode outputs are combinational from the
// queue head or the I-cache output; an instruction leaves only when decode
// and every downstream consumer accept it (dec_ready, inet_out_ready), which
// is how back-pressure travels up the group. The I-cache answers one cycle
// after ic_req. Queue depth 2 and the role/queue/mux structure follow the
// architecture; message encodings and the branch-resolution port are this
// design's own.
module inet_fetch
  import lac_pkg::*;
#(
  parameter int unsigned QDEPTH = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // vconfig CSR
  input  logic        cfg_we,
  input  vconfig_t    cfg,
  output vconfig_t    vcfg,
  // inet from the four neighbours
  input  logic [3:0]  inet_in_valid,
  input  inet_msg_t   inet_in [4],
  output logic [3:0]  inet_in_ready,
  // inet to the neighbours
  output logic        inet_out_valid,
  output inet_msg_t   inet_out,
  input  logic        inet_out_ready,
  // scalar core commit-stage messages (vissue / devec)
  input  logic        sc_msg_valid,
  input  inet_msg_t   sc_msg,
  output logic        sc_msg_ready,
  // I-cache port (expander)
  output logic        ic_req,
  output word_t       ic_pc,
  input  word_t       ic_instr,
  // decode stage
  output logic        dec_valid,
  output word_t       dec_instr,
  input  logic        dec_ready,
  // branch resolution from the expander's execute stage
  input  logic        br_valid,
  input  logic        br_taken,
  input  word_t       br_target,
  // leaving vector mode
  output logic        resume_valid,
  output word_t       resume_pc,
  output logic        mt_active      // expander: a microthread is being fetched
);

  localparam int unsigned QAW = (QDEPTH > 1) ? $clog2(QDEPTH) : 1;
  typedef enum logic [1:0] {EX_IDLE, EX_FETCH, EX_WAIT_BR} ex_state_e;

  vconfig_t  vcfg_q;
  inet_msg_t q [QDEPTH];
  logic [$clog2(QDEPTH+1)-1:0] q_cnt;
  ex_state_e st;
  word_t     pc_q;
  logic      have_instr;

  assign vcfg = vcfg_q;

  logic in_vec;
  assign in_vec = (vcfg_q.role == ROLE_VECTOR) || (vcfg_q.role == ROLE_EXPANDER);

  // ---- queue input side --------------------------------------------------
  logic      push, pop;
  inet_msg_t push_msg;
  always_comb begin
    inet_in_ready = '0;
    if (in_vec && q_cnt < QDEPTH[$bits(q_cnt)-1:0])
      inet_in_ready[vcfg_q.in_dir] = 1'b1;
    push     = inet_in_valid[vcfg_q.in_dir] && inet_in_ready[vcfg_q.in_dir];
    push_msg = inet_in[vcfg_q.in_dir];
  end

  logic      head_v;
  inet_msg_t head;
  assign head_v = (q_cnt != '0);
  assign head   = q[0];

  // ---- instruction classification (expander) ------------------------------
  logic [6:0] opc;
  logic is_br, is_jalr, is_jal, is_end;
  word_t jal_imm;
  always_comb begin
    opc     = ic_instr[6:0];
    is_br   = (opc == OPC_BRANCH);
    is_jalr = (opc == OPC_JALR);
    is_jal  = (opc == OPC_JAL);
    is_end  = is_vend(ic_instr);
    jal_imm = {{12{ic_instr[31]}}, ic_instr[19:12], ic_instr[20], ic_instr[30:21], 1'b0};
  end

  // ---- main datapath -----------------------------------------------------
  logic      go_fetch, next_have, dev_take;
  ex_state_e st_n;
  word_t     pc_n;

  always_comb begin
    pop            = 1'b0;
    inet_out_valid = 1'b0;
    inet_out       = '0;
    sc_msg_ready   = 1'b0;
    dec_valid      = 1'b0;
    dec_instr      = '0;
    resume_valid   = 1'b0;
    resume_pc      = head.data;
    ic_req         = 1'b0;
    ic_pc          = pc_q;
    st_n           = st;
    pc_n           = pc_q;
    next_have      = 1'b0;
    dev_take       = 1'b0;
    go_fetch       = 1'b0;

    unique case (vcfg_q.role)
      ROLE_SCALAR: begin
        inet_out_valid = sc_msg_valid;
        inet_out       = sc_msg;
        sc_msg_ready   = inet_out_ready;
      end
      ROLE_VECTOR: begin
        if (head_v) begin
          unique case (head.kind)
            INET_INSTR: begin
              dec_valid      = inet_out_ready;
              dec_instr      = head.data;
              inet_out_valid = dec_ready;
              inet_out       = head;
              pop            = dec_ready && inet_out_ready;
            end
            INET_DEVEC: begin
              inet_out_valid = 1'b1;
              inet_out       = head;
              pop            = inet_out_ready;
              dev_take       = inet_out_ready;
            end
            default: pop = 1'b1;  // nothing else is meant for a vector core
          endcase
        end
      end
      ROLE_EXPANDER: begin
        unique case (st)
          EX_IDLE: begin
            if (head_v) begin
              unique case (head.kind)
                INET_VISSUE: begin
                  pop  = 1'b1;
                  pc_n = head.data;
                  st_n = EX_FETCH;
                end
                INET_DEVEC: begin
                  inet_out_valid = 1'b1;
                  inet_out       = head;
                  pop            = inet_out_ready;
                  dev_take       = inet_out_ready;
                end
                default: pop = 1'b1;
              endcase
            end
          end
          EX_FETCH: begin
            if (!have_instr) begin
              ic_req    = 1'b1;
              ic_pc     = pc_q;
              next_have = 1'b1;
            end else if (is_end) begin
              st_n = EX_IDLE;  // vend: microthread done
            end else if (is_br || is_jalr) begin
              dec_valid = 1'b1;
              dec_instr = ic_instr;
              if (dec_ready) st_n = EX_WAIT_BR;
              else begin ic_req = 1'b1; next_have = 1'b1; end
            end else if (is_jal) begin
              dec_valid = 1'b1;
              dec_instr = ic_instr;
              ic_req    = 1'b1;
              next_have = 1'b1;
              if (dec_ready) begin
                pc_n  = pc_q + jal_imm;
                ic_pc = pc_n;
              end
            end else begin
              dec_valid      = inet_out_ready;
              dec_instr      = ic_instr;
              inet_out_valid = dec_ready;
              inet_out.kind  = INET_INSTR;
              inet_out.data  = ic_instr;
              go_fetch       = dec_ready && inet_out_ready;
              ic_req         = 1'b1;
              next_have      = 1'b1;
              if (go_fetch) begin
                pc_n  = pc_q + 32'd4;
                ic_pc = pc_n;
              end
            end
          end
          EX_WAIT_BR: begin
            if (br_valid) begin
              pc_n = br_taken ? br_target : pc_q + 32'd4;
              st_n = EX_FETCH;
            end
          end
          default: st_n = EX_IDLE;
        endcase
      end
      default: ;
    endcase
    resume_valid = dev_take;
  end

  assign mt_active = (vcfg_q.role == ROLE_EXPANDER) && (st != EX_IDLE);

  // ---- state -------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vcfg_q     <= '0;
      q_cnt      <= '0;
      st         <= EX_IDLE;
      pc_q       <= '0;
      have_instr <= 1'b0;
      for (int i = 0; i < QDEPTH; i++) q[i] <= '0;
    end else begin
      // queue (shift register FIFO)
      if (pop) begin
        for (int i = 0; i < QDEPTH - 1; i++) q[i] <= q[i+1];
        if (push) q[QAW'(q_cnt - 1'b1)] <= push_msg;
      end else if (push) begin
        q[QAW'(q_cnt)] <= push_msg;
      end
      q_cnt <= q_cnt + $bits(q_cnt)'(push) - $bits(q_cnt)'(pop);

      st         <= st_n;
      pc_q       <= pc_n;
      have_instr <= next_have;

      if (cfg_we) begin
        vcfg_q <= cfg;
        st     <= EX_IDLE;
      end else if (dev_take) begin
        vcfg_q <= '0;          // back to independent mode
        st     <= EX_IDLE;
      end
    end
  end

  // The inet queue never overflows: pushes only happen when it has room.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (q_cnt < QDEPTH[$bits(q_cnt)-1:0] || pop));

endmodule
