// fp32_pkg: single-precision floating-point add and multiply used by the
// MXRA's FpAdd and FpMul nodes.
//
// IEEE-754 binary32 with round-to-nearest-even. To keep the units small,
// subnormal inputs are read as zero and subnormal results are flushed to
// zero; infinities are produced on overflow and propagated; any NaN input or
// inf - inf gives the quiet NaN 0x7FC00000. The functions are combinational;
// the nodes put pipeline registers behind them to give the latencies of the
// core's units (FpAdd 2 cycles, FpMul 3 cycles). Flush-to-zero and the NaN
// policy are this design's own simplifications.
package fp32_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic logic [31:0] fp_mul(input logic [31:0] a, input logic [31:0] b);
    logic        s;
    logic [7:0]  ea, eb;
    logic [47:0] p;
    logic [23:0] m;
    logic        g, st;
    logic signed [10:0] e;
    logic [24:0] mr;
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    if ((ea == 8'hFF && a[22:0] != 0) || (eb == 8'hFF && b[22:0] != 0)) return QNAN;
    if (ea == 8'hFF || eb == 8'hFF) begin
      if (ea == 8'h00 || eb == 8'h00) return QNAN;   // inf * 0
      return {s, 8'hFF, 23'd0};
    end
    if (ea == 8'h00 || eb == 8'h00) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = 11'(ea) + 11'(eb) - 11'sd127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 11'sd1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    mr = {1'b0, m} + 25'(g && (st || m[0]));
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 11'sd1;
    end
    if (e >= 11'sd255) return {s, 8'hFF, 23'd0};
    if (e <= 11'sd0)   return {s, 31'd0};
    return {s, e[7:0], mr[22:0]};
  endfunction

  function automatic logic [31:0] fp_add(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] x, y;
    logic [7:0]  ex, ey, d;
    logic [26:0] mx, my, sh;
    logic [27:0] sum;
    logic signed [9:0] e;
    logic [4:0]  lz;
    logic [24:0] mr;
    logic        sticky;
    if ((a[30:23] == 8'hFF && a[22:0] != 0) || (b[30:23] == 8'hFF && b[22:0] != 0)) return QNAN;
    if (a[30:23] == 8'hFF && b[30:23] == 8'hFF) return (a[31] == b[31]) ? a : QNAN;
    if (a[30:23] == 8'hFF) return a;
    if (b[30:23] == 8'hFF) return b;
    if (a[30:23] == 8'h00 && b[30:23] == 8'h00) return {a[31] & b[31], 31'd0};
    if (a[30:23] == 8'h00) return b;
    if (b[30:23] == 8'h00) return a;
    // x has the larger magnitude
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    ex = x[30:23];
    ey = y[30:23];
    d  = ex - ey;
    mx = {1'b1, x[22:0], 3'b000};
    my = {1'b1, y[22:0], 3'b000};
    if (d >= 8'd27) sh = 27'd1;  // only the sticky bit survives
    else begin
      sticky = 1'b0;
      for (int i = 0; i < 27; i++)
        if (i < int'(d) && my[i]) sticky = 1'b1;
      sh = (my >> d) | 27'(sticky);
    end
    e = 10'(ex);
    if (x[31] == y[31]) begin
      sum = {1'b0, mx} + {1'b0, sh};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e   = e + 10'sd1;
      end
    end else begin
      sum = {1'b0, mx} - {1'b0, sh};
      if (sum == 28'd0) return 32'd0;
      lz = 5'd0;
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) break;
        lz = lz + 5'd1;
      end
      sum = sum << lz;
      e   = e - 10'(lz);
    end
    mr = {1'b0, sum[26:3]} + 25'(sum[2] && (sum[1] || sum[0] || sum[3]));
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 10'sd1;
    end
    if (e >= 10'sd255) return {x[31], 8'hFF, 23'd0};
    if (e <= 10'sd0)   return {x[31], 31'd0};
    return {x[31], e[7:0], mr[22:0]};
  endfunction

endpackage
