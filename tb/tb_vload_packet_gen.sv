// tb_vload_packet_gen: self-checking test of the vload packet generator.
//
// For random vload operands the test builds the list of (source word,
// receiving core, scratchpad offset) triples that the instruction must
// produce: word k of the request comes from word address addr/4 + k and goes
// to core first + k / width at offset sp + k % width (all to the requester at
// offset sp + k for the SELF variant). It then expands the packets the unit
// produces, word by word, with the LLC's counter rule and compares the two
// lists. Requests that fit inside one line use the aligned form; requests
// that cross a line are issued as a suffix and a prefix packet whose union
// must give the same list.
module tb_vload_packet_gen;
  import lac_pkg::*;

  vconfig_t   vcfg;
  logic       vl_valid;
  logic [11:0] vl_sp;
  logic [31:0] vl_addr;
  logic [7:0] vl_core;
  logic [4:0] vl_width;
  vl_var_e    vl_var;
  vl_part_e   vl_part;
  logic       pkt_valid;
  wide_pkt_t  pkt;

  vload_packet_gen dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected and produced responses, indexed by word position k
  logic [31:0] e_addr [16];
  logic [7:0]  e_core [16];
  logic [11:0] e_off  [16];
  logic        seen   [16];

  // expand the current packet and tick off matching expected words
  task automatic absorb(input logic [31:0] wbase, input string tag);
    for (int j = 0; j < int'(pkt.count); j++) begin
      int cnt, k;
      logic [31:0] a;
      logic [7:0]  c;
      logic [11:0] o;
      cnt = int'(pkt.cnt0) + j;
      a = pkt.addr + 32'(j);
      c = pkt.base_core + 8'(cnt / int'(pkt.rpc));
      o = pkt.base_off + 12'(cnt % int'(pkt.rpc));
      k = int'(a - wbase);
      if (k < 0 || k > 15) begin
        check(0, {tag, ": word outside the request"});
      end else begin
        check(!seen[k], {tag, ": word delivered twice"});
        seen[k] = 1;
        check(a == e_addr[k], {tag, ": address"});
        check(pkt.self || c == e_core[k], {tag, ": core"});
        check(o == e_off[k], {tag, ": offset"});
      end
    end
  endtask

  int n_group = 0, n_single = 0, n_self = 0, n_split = 0;

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int cols, rows, width, total, wpos, vlen;
      logic [31:0] wbase;
      cols  = $urandom_range(1, 4);
      rows  = $urandom_range(1, 2);
      vlen  = cols * rows;
      vcfg  = '0;
      vcfg.role     = ROLE_SCALAR;
      vcfg.grp_cols = 4'(cols);
      vcfg.grp_rows = 4'(rows);
      vl_var   = vl_var_e'($urandom_range(0, 2));
      width    = $urandom_range(1, 4);
      if (vl_var == VL_GROUP) begin
        total = width * vlen;
        if (total > 16) begin width = 16 / vlen; total = width * vlen; end
        if (width == 0) begin width = 1; total = vlen; end
      end else begin
        width = $urandom_range(1, 16);
        total = width;
      end
      vl_width = 5'(width);
      vl_sp    = 12'($urandom_range(0, 1000));
      vl_core  = (vl_var == VL_GROUP) ? 8'd0 : 8'($urandom_range(0, vlen - 1));
      wbase    = 32'($urandom_range(0, 4000));
      vl_addr  = wbase << 2;
      wpos     = int'(wbase % 16);
      for (int k = 0; k < 16; k++) begin
        seen[k]   = 0;
        e_addr[k] = wbase + 32'(k);
        e_core[k] = vl_core + 8'(k / width);
        e_off[k]  = vl_sp + 12'((vl_var == VL_SELF) ? k : k % width);
      end
      vl_valid = 1;
      if (wpos + total <= 16) begin
        vl_part = VL_ALIGNED;
        #1;
        check(pkt_valid, "aligned packet valid");
        check(pkt.self == (vl_var == VL_SELF), "self flag");
        absorb(wbase, "aligned");
      end else begin
        n_split++;
        vl_part = VL_SUFFIX;
        #1;
        check(pkt_valid, "suffix valid");
        check(int'(pkt.count) == 16 - wpos, "suffix reaches the end of the line");
        absorb(wbase, "suffix");
        vl_part = VL_PREFIX;
        #1;
        check(pkt_valid, "prefix valid");
        check(pkt.addr % 16 == 0, "prefix starts a line");
        absorb(wbase, "prefix");
      end
      for (int k = 0; k < 16; k++) check(seen[k] == (k < total), "every word delivered once");
      case (vl_var)
        VL_GROUP:  n_group++;
        VL_SINGLE: n_single++;
        default:   n_self++;
      endcase
      #9;
    end
    // an empty request produces nothing
    vl_width = 5'd0;
    vl_part  = VL_ALIGNED;
    #1;
    check(!pkt_valid, "zero-width vload sends no packet");
    check(n_group > 0 && n_single > 0 && n_self > 0 && n_split > 0, "all variants covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
