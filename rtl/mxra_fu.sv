// mxra_fu: a core functional unit as the MXRA uses it, fully pipelined.
//
// KIND selects which of the core's units this is (the node kinds of the
// MXRA's 2x2 section):
//   NK_IALU  integer ALU, latency 1: add sub and or xor sll srl sra slt sltu
//   NK_FPMUL floating-point multiply, latency 3
//   NK_IMFA  integer multiply and floating-point add/sub, latency 2. The two
//            units share one node because they have the same latency, so their
//            results can never collide on the node's output.
// An operation presented with in_valid in cycle t produces its result in the
// output register LAT cycles later (out_valid in cycle t+LAT); one operation
// can start every cycle. in_tag travels with the operation, which lets the
// node tell results of the MXRA schedule from results of the core's own
// instructions. Operations that a kind does not implement return 0.
// Latencies follow the architecture's tables; the arithmetic is standard
// RISC-V integer and binary32 behaviour (see fp32_pkg).
module mxra_fu
  import lac_pkg::*;
  import fp32_pkg::*;
#(
  parameter node_kind_e KIND = NK_IALU,
  localparam int unsigned LAT = (KIND == NK_FPMUL) ? 3 : (KIND == NK_IMFA) ? 2 : 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_tag,
  input  mx_op_e op,
  input  word_t  a,
  input  word_t  b,
  output logic   out_valid,
  output logic   out_tag,
  output word_t  res
);
  word_t r;
  always_comb begin
    r = '0;
    unique case (KIND)
      NK_IALU: begin
        unique case (op)
          OP_ADD:  r = a + b;
          OP_SUB:  r = a - b;
          OP_AND:  r = a & b;
          OP_OR:   r = a | b;
          OP_XOR:  r = a ^ b;
          OP_SLL:  r = a << b[4:0];
          OP_SRL:  r = a >> b[4:0];
          OP_SRA:  r = word_t'($signed(a) >>> b[4:0]);
          OP_SLT:  r = word_t'($signed(a) < $signed(b));
          OP_SLTU: r = word_t'(a < b);
          default: r = '0;
        endcase
      end
      NK_FPMUL: r = (op == OP_FMUL) ? fp_mul(a, b) : '0;
      NK_IMFA: begin
        unique case (op)
          OP_MUL:  r = a * b;
          OP_FADD: r = fp_add(a, b);
          OP_FSUB: r = fp_add(a, {~b[31], b[30:0]});
          default: r = '0;
        endcase
      end
      default: r = '0;
    endcase
  end

  word_t pr [LAT];
  logic  pv [LAT];
  logic  pt [LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        pr[i] <= '0;
        pv[i] <= 1'b0;
        pt[i] <= 1'b0;
      end
    end else begin
      pr[0] <= r;
      pv[0] <= in_valid;
      pt[0] <= in_tag;
      for (int i = 1; i < LAT; i++) begin
        pr[i] <= pr[i-1];
        pv[i] <= pv[i-1];
        pt[i] <= pt[i-1];
      end
    end
  end
  assign res       = pr[LAT-1];
  assign out_valid = pv[LAT-1];
  assign out_tag   = pt[LAT-1];
endmodule
