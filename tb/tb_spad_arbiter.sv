// tb_spad_arbiter: self-checking test of the scratchpad port arbiter.
//
// The arbiter sits in front of a real scratchpad. Random requests from the
// three requesters (MXRA, remote network, local core) are applied each
// cycle. The test checks the fixed priority MXRA > remote > core, that the
// granted request's address, write enable and data reach the memory port,
// that a granted read returns valid data one cycle later from a model of the
// memory, and that losers see no grant.
module tb_spad_arbiter;
  import lac_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] req = '0, we = '0, gnt, rvalid;
  logic [5:0] addr [3];
  word_t      wdata [3];
  logic       sp_en, sp_we;
  logic [5:0] sp_addr;
  word_t      sp_wdata, sp_rdata;

  spad_arbiter #(.AW(6)) dut (.*);
  scratchpad #(.WORDS(64)) u_sp (.clk, .en(sp_en), .we(sp_we), .addr(sp_addr),
                                 .wdata(sp_wdata), .rdata(sp_rdata));

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

  word_t model [64];
  int    prev_w = -1;      // requester whose read was granted last cycle
  word_t prev_d;
  int    n_block [3] = '{0, 0, 0};

  initial begin
    for (int i = 0; i < 3; i++) begin addr[i] = '0; wdata[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // initialise the memory through the core port
    for (int a = 0; a < 64; a++) begin
      model[a] = $urandom;
      req = 3'b100; we = 3'b100; addr[2] = 6'(a); wdata[2] = model[a];
      @(negedge clk);
    end
    req = '0; we = '0;
    @(negedge clk);
    for (int t = 0; t < 4000; t++) begin
      int w;
      req = 3'($urandom_range(0, 7));
      we  = 3'($urandom_range(0, 7));
      for (int i = 0; i < 3; i++) begin
        addr[i]  = 6'($urandom_range(0, 63));
        wdata[i] = $urandom;
      end
      #1;
      // read launched in the previous cycle
      if (prev_w >= 0) begin
        check(rvalid == 3'(1 << prev_w), "read data valid one cycle after grant");
        check(sp_rdata == prev_d, "read data");
      end else begin
        check(rvalid == '0, "no read valid without a read");
      end
      w = req[0] ? 0 : req[1] ? 1 : req[2] ? 2 : -1;
      check(gnt == ((w >= 0) ? 3'(1 << w) : 3'd0), "fixed priority MXRA > remote > core");
      for (int i = 0; i < 3; i++) if (req[i] && i != w) n_block[i]++;
      if (w >= 0) begin
        check(sp_en && sp_we == we[w] && sp_addr == addr[w], "winner drives the port");
        if (we[w]) check(sp_wdata == wdata[w], "write data");
      end else begin
        check(!sp_en, "port idle without requests");
      end
      @(negedge clk);
      prev_w = -1;
      if (w >= 0) begin
        if (we[w]) model[addr[w]] = wdata[w];
        else begin
          prev_w = w;
          prev_d = model[addr[w]];
        end
      end
    end
    check(n_block[1] > 0 && n_block[2] > 0, "lower-priority requesters were held off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
