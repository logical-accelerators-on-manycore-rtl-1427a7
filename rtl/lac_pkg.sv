// lac_pkg: types and constants shared by the two logical accelerators built on
// a tiled manycore.
//
// Rockcress (software-defined vectors): tile roles, the vconfig CSR layout,
// inet messages, custom instruction encodings, wide-load (vload) operands and
// the wide access packet that the scalar core sends to an LLC slice.
//
// Watercress (MXRA, a logical CGRA made of the execute stages of several
// tiles): node kinds, link directions, node operations and the context word
// that configures one node for one cycle of the schedule.
//
// The architecture fixes the roles, the message kinds, the vload variants, the
// 8 link directions, 4 bypass paths, 4 contexts and the node kinds of its
// node table. Bit layouts, opcode values and field widths are this design's own
// choices; they are collected here so that they can be changed in one place.
package lac_pkg;

  // ------------------------------------------------------------------------
  // Common
  // ------------------------------------------------------------------------
  localparam int unsigned XLEN = 32;
  typedef logic [XLEN-1:0] word_t;

  // inet neighbour directions (the fetch-stage input mux)
  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_e;

  // ------------------------------------------------------------------------
  // Rockcress
  // ------------------------------------------------------------------------
  typedef enum logic [1:0] {
    ROLE_INDEP    = 2'd0,  // plain manycore core
    ROLE_SCALAR   = 2'd1,  // leads a vector group, issues vissue / vload / devec
    ROLE_EXPANDER = 2'd2,  // first vector core, fetches the microthread
    ROLE_VECTOR   = 2'd3   // receives instructions from the inet only
  } role_e;

  // vconfig CSR: 32-bit bitmask written by every core of a group.
  typedef struct packed {
    role_e      role;       // [31:30]
    dir_e       in_dir;     // [29:28] neighbour the inet queue listens to
    logic       icache_en;  // [27]    frontend / I-cache enabled
    logic [3:0] grp_x;      // [26:23] group origin column (top-left vector core)
    logic [3:0] grp_y;      // [22:19] group origin row
    logic [3:0] grp_cols;   // [18:15] group width  (vector cores)
    logic [3:0] grp_rows;   // [14:11] group height (vector cores)
    logic [7:0] tid;        // [10:3]  thread id inside the group
    logic [2:0] rsvd;       // [2:0]
  } vconfig_t;

  // Messages carried by the inet (one 32-bit payload per message).
  typedef enum logic [1:0] {
    INET_INSTR  = 2'd0,  // forwarded microthread instruction
    INET_VISSUE = 2'd1,  // scalar -> expander: start PC of a microthread
    INET_DEVEC  = 2'd2   // disband the group, payload is the resume PC
  } inet_kind_e;

  typedef struct packed {
    inet_kind_e kind;
    word_t      data;
  } inet_msg_t;

  // RISC-V major opcodes the fetch stage needs to recognise
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  // Rockcress custom instructions live in the custom-0 opcode space.
  localparam logic [6:0] OPC_CUSTOM0 = 7'b0001011;
  localparam logic [2:0] F3_VEND        = 3'd0;
  localparam logic [2:0] F3_FRAME_START = 3'd1;
  localparam logic [2:0] F3_REMEM       = 3'd2;
  localparam logic [2:0] F3_PRED_EQ     = 3'd3;
  localparam logic [2:0] F3_PRED_NEQ    = 3'd4;

  function automatic logic is_vend(input word_t i);
    return i[6:0] == OPC_CUSTOM0 && i[14:12] == F3_VEND;
  endfunction

  // vload variants: who receives the line, and which part of it
  typedef enum logic [1:0] {VL_SINGLE = 2'd0, VL_GROUP = 2'd1, VL_SELF = 2'd2} vl_var_e;
  typedef enum logic [1:0] {VL_ALIGNED = 2'd0, VL_SUFFIX = 2'd1, VL_PREFIX = 2'd2} vl_part_e;

  // Wide access packet: everything an LLC slice needs to stream a line back.
  typedef struct packed {
    logic [31:0] addr;       // word address of the first word to send
    logic [4:0]  count;      // number of responses (1..16)
    logic [4:0]  cnt0;       // value of Cnt for the first response
    logic [7:0]  base_core;  // BC: linear index of the first receiving vector core
    logic [11:0] base_off;   // BO: scratchpad word offset in the receiving core
    logic [4:0]  rpc;        // RPC: responses per core
    logic        self;       // VL_SELF: all responses go to the requester
  } wide_pkt_t;

  // One word delivered by the LLC to a scratchpad.
  typedef struct packed {
    logic        self;
    logic [7:0]  core;
    logic [11:0] off;
    word_t       data;
  } llc_resp_t;

  // ------------------------------------------------------------------------
  // Watercress / MXRA
  // ------------------------------------------------------------------------
  localparam int unsigned MX_CTX  = 4;  // contexts per node (II <= 4)
  localparam int unsigned MX_DIRS = 8;  // link directions in and out
  localparam int unsigned MX_BYP  = 4;  // bypass paths per node

  // node (row,col) inside a 2x2 section
  typedef enum logic [1:0] {
    NK_LSU   = 2'd0,  // (0,0) Load/Store, latency 1
    NK_IALU  = 2'd1,  // (0,1) IntAlu,     latency 1
    NK_FPMUL = 2'd2,  // (1,0) FpMul,      latency 3
    NK_IMFA  = 2'd3   // (1,1) IntMul + FpAdd, latency 2
  } node_kind_e;

  // Link directions: one or two nodes away in each cardinal direction.
  typedef enum logic [2:0] {
    LD_N1 = 3'd0, LD_N2 = 3'd1, LD_E1 = 3'd2, LD_E2 = 3'd3,
    LD_S1 = 3'd4, LD_S2 = 3'd5, LD_W1 = 3'd6, LD_W2 = 3'd7
  } link_dir_e;

  typedef enum logic [4:0] {
    OP_NOP    = 5'd0,
    // IntAlu
    OP_ADD    = 5'd1,  OP_SUB  = 5'd2,  OP_AND = 5'd3, OP_OR  = 5'd4,
    OP_XOR    = 5'd5,  OP_SLL  = 5'd6,  OP_SRL = 5'd7, OP_SRA = 5'd8,
    OP_SLT    = 5'd9,  OP_SLTU = 5'd10,
    // IntMul / FpAdd / FpMul
    OP_MUL    = 5'd11, OP_FADD = 5'd12, OP_FSUB = 5'd13, OP_FMUL = 5'd14,
    // Load/Store (scratchpad of the node's own tile)
    OP_LOAD   = 5'd16, OP_STORE = 5'd17, OP_GETPTR = 5'd18, OP_SETPTR = 5'd19
  } mx_op_e;

  // Output mux select: nothing, the functional unit, or one bypass register.
  typedef enum logic [2:0] {
    OS_NONE = 3'd0, OS_FU = 3'd1, OS_B0 = 3'd2, OS_B1 = 3'd3, OS_B2 = 3'd4, OS_B3 = 3'd5
  } out_sel_e;

  // One context of one node.
  typedef struct packed {
    mx_op_e                  op;
    link_dir_e [1:0]         in_sel;    // operand register input muxes (8:1)
    logic      [1:0]         in_en;     // operand register load enables
    link_dir_e [MX_BYP-1:0]  byp_sel;   // bypass register input muxes (8:1)
    logic      [MX_BYP-1:0]  byp_en;    // bypass register load enables
    out_sel_e  [MX_DIRS-1:0] out_sel;   // output muxes
    logic                    use_imm;   // operand B := sign-extended imm
    logic      [15:0]        imm;       // immediate / LSU word offset
    logic      [1:0]         ptr_idx;   // LSU: base pointer register
    logic      [1:0]         stage;     // modulo-schedule stage of an LSU op
  } mx_ctx_t;

  // Request carried by cgracomm: four scratchpad pointers and predication.
  typedef struct packed {
    logic [3:0][15:0] ptr;
    logic [3:0]       ld_pred;   // loads through pointer i return zero
    logic [3:0]       st_pred;   // stores through pointer i are skipped
    logic [5:0]       requester; // core that receives the completion message
  } mx_work_t;

  // Message on the systolic link that spreads configure / start requests
  // from the origin section to the rest of an MXRA group.
  typedef struct packed {
    logic       start;     // 1: start a request, 0: load configuration cfg
    logic [1:0] cfg;
    mx_work_t   work;
  } mx_sys_t;

  // Classes of instructions at a core's issue stage (for FU conflicts).
  typedef enum logic [2:0] {
    FC_NONE = 3'd0, FC_IALU = 3'd1, FC_IMUL = 3'd2, FC_FPADD = 3'd3,
    FC_FPMUL = 3'd4, FC_LSU = 3'd5, FC_CGRACOMM = 3'd6, FC_OTHER = 3'd7
  } fu_class_e;

endpackage
