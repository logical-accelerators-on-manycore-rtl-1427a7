// tb_mxra_fu: self-checking test of the three MXRA functional units.
//
// One unit of each arithmetic kind is driven with a random operation every
// cycle: the integer ALU (latency 1), the FP multiplier (latency 3) and the
// integer-multiply / FP-add unit (latency 2). The expected results are
// computed in the testbench (FP in double precision, rounded back to single
// precision by the testbench, on operands whose exponents keep the results normal and, for
// additions, keep the operands within a few binades of each other so that
// the double-precision intermediate is exact). Each result must appear
// exactly the unit's latency after its operands, with its valid bit and tag.
module tb_mxra_fu;
  import lac_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   v [3], tg [3], ov [3], ot [3];
  mx_op_e op [3];
  word_t  a [3], b [3], res [3];

  mxra_fu #(.KIND(NK_IALU))  u_alu (.clk, .rst_n, .in_valid(v[0]), .in_tag(tg[0]), .op(op[0]),
                                    .a(a[0]), .b(b[0]), .out_valid(ov[0]), .out_tag(ot[0]), .res(res[0]));
  mxra_fu #(.KIND(NK_FPMUL)) u_fpm (.clk, .rst_n, .in_valid(v[1]), .in_tag(tg[1]), .op(op[1]),
                                    .a(a[1]), .b(b[1]), .out_valid(ov[1]), .out_tag(ot[1]), .res(res[1]));
  mxra_fu #(.KIND(NK_IMFA))  u_imf (.clk, .rst_n, .in_valid(v[2]), .in_tag(tg[2]), .op(op[2]),
                                    .a(a[2]), .b(b[2]), .out_valid(ov[2]), .out_tag(ot[2]), .res(res[2]));

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

  localparam int N = 6000;
  localparam int LAT [3] = '{1, 3, 2};
  word_t e_res [3][N];
  logic  e_v [3][N], e_t [3][N];

  // random normal float with biased exponent in [lo, hi]
  function automatic word_t rnd_fp(input int lo, input int hi);
    return {1'($urandom_range(0, 1)), 8'($urandom_range(lo, hi)), 23'($urandom)};
  endfunction

  // single -> double (exact) and double -> single (round to nearest even)
  function automatic real f2r(input word_t x);
    return $bitstoreal({x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0});
  endfunction
  function automatic word_t r2f(input real r);
    logic [63:0] d;
    logic [23:0] m;
    logic [28:0] rest;
    int e;
    d = $realtobits(r);
    if (d[62:0] == '0) return {d[63], 31'd0};
    e    = int'(d[62:52]) - 1023 + 127;
    m    = {1'b0, d[51:29]};
    rest = d[28:0];
    if (rest > 29'h1000_0000 || (rest == 29'h1000_0000 && m[0])) m = m + 1;
    if (m[23]) e = e + 1;      // mantissa overflowed into the exponent
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic word_t ref_fmul(input word_t x, input word_t y);
    return r2f(f2r(x) * f2r(y));
  endfunction
  function automatic word_t ref_fadd(input word_t x, input word_t y);
    return r2f(f2r(x) + f2r(y));
  endfunction

  function automatic word_t ref_alu(input mx_op_e o, input word_t x, input word_t y);
    logic signed [31:0] sx;
    sx = x;
    case (o)
      OP_ADD:  return x + y;
      OP_SUB:  return x - y;
      OP_AND:  return x & y;
      OP_OR:   return x | y;
      OP_XOR:  return x ^ y;
      OP_SLL:  return x << (y % 32);
      OP_SRL:  return x >> (y % 32);
      OP_SRA:  return sx >>> (y % 32);
      OP_SLT:  return {31'd0, $signed(x) < $signed(y)};
      OP_SLTU: return {31'd0, x < y};
      default: return 0;
    endcase
  endfunction

  int n_fadd_cancel = 0;

  initial begin
    for (int u = 0; u < 3; u++) begin v[u] = 0; tg[u] = 0; op[u] = OP_NOP; a[u] = 0; b[u] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < N; t++) begin
      // check outputs produced by earlier inputs
      for (int u = 0; u < 3; u++) begin
        if (t >= LAT[u]) begin
          check(ov[u] == e_v[u][t - LAT[u]], "valid after the unit's latency");
          if (e_v[u][t - LAT[u]]) begin
            check(ot[u] == e_t[u][t - LAT[u]], "tag follows the result");
            check(res[u] == e_res[u][t - LAT[u]], $sformatf("result of unit %0d: got %h want %h", u, res[u], e_res[u][t - LAT[u]]));
          end
        end
      end
      // drive new operations
      for (int u = 0; u < 3; u++) begin
        v[u]  = ($urandom_range(0, 3) != 0);
        tg[u] = 1'($urandom_range(0, 1));
      end
      op[0] = mx_op_e'($urandom_range(1, 10));
      a[0]  = $urandom;
      b[0]  = ($urandom_range(0, 1) != 0) ? $urandom : 32'($urandom_range(0, 40));
      op[1] = OP_FMUL;
      a[1]  = rnd_fp(80, 170);
      b[1]  = rnd_fp(80, 170);
      op[2] = mx_op_e'($urandom_range(11, 13));
      if (op[2] == OP_MUL) begin
        a[2] = $urandom;
        b[2] = $urandom;
      end else begin
        int ex;
        ex   = $urandom_range(100, 150);
        a[2] = rnd_fp(ex, ex);
        b[2] = rnd_fp(ex - 3, ex + 3);
      end
      e_res[0][t] = ref_alu(op[0], a[0], b[0]);
      e_res[1][t] = ref_fmul(a[1], b[1]);
      case (op[2])
        OP_MUL:  e_res[2][t] = a[2] * b[2];
        OP_FADD: e_res[2][t] = ref_fadd(a[2], b[2]);
        default: e_res[2][t] = ref_fadd(a[2], {~b[2][31], b[2][30:0]});
      endcase
      if (op[2] != OP_MUL && e_res[2][t][30:23] < 8'd20) n_fadd_cancel++;
      for (int u = 0; u < 3; u++) begin
        e_v[u][t] = v[u];
        e_t[u][t] = tg[u];
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
