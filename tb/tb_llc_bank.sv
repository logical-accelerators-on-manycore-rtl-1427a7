// tb_llc_bank: self-checking test of one LLC slice.
//
// The test first fills the slice with a pattern through the single-word port
// and reads back random words (the answer comes one cycle after the request,
// addressed to the requesting core's scratchpad). It then sends random wide
// packets and checks, against its own copy of the memory, that every
// response carries the right data, core and offset, that the first word
// appears two cycles after the packet is accepted and that the rest follow
// one per cycle, and that single-word requests are held off meanwhile.
module tb_llc_bank;
  import lac_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int W = 256;
  logic         req_valid = 0, req_ready, req_we = 0;
  logic [7:0]   req_addr = '0;
  word_t        req_wdata = '0;
  logic [7:0]   req_core = '0;
  logic [11:0]  req_off = '0;
  logic         pkt_valid = 0, pkt_ready;
  wide_pkt_t    pkt = '0;
  logic         resp_valid;
  llc_resp_t    resp;

  llc_bank #(.WORDS(W)) dut (.*);

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

  word_t model [W];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- fill through the single-word port ----
    for (int a = 0; a < W; a++) begin
      model[a]  = $urandom;
      req_valid = 1;
      req_we    = 1;
      req_addr  = 8'(a);
      req_wdata = model[a];
      check(req_ready, "write accepted");
      @(negedge clk);
    end
    req_valid = 0;
    req_we    = 0;
    // ---- scalar reads ----
    for (int t = 0; t < 100; t++) begin
      int a;
      a = $urandom_range(0, W - 1);
      req_valid = 1;
      req_addr  = 8'(a);
      req_core  = 8'($urandom_range(0, 63));
      req_off   = 12'($urandom_range(0, 1023));
      @(negedge clk);
      req_valid = 0;
      check(resp_valid, "scalar read answers next cycle");
      check(resp.data == model[a], "scalar read data");
      check(resp.self && resp.core == req_core && resp.off == req_off, "scalar read routed to requester");
    end
    @(negedge clk);
    check(!resp_valid, "no stray response");
    // ---- wide packets ----
    for (int t = 0; t < 200; t++) begin
      wide_pkt_t p;
      p = '0;
      p.rpc   = 5'($urandom_range(1, 16));
      p.count = 5'($urandom_range(1, 16));
      p.cnt0  = 5'($urandom_range(0, 16 - int'(p.count)));
      p.addr  = 32'($urandom_range(0, W - 17));
      p.base_core = 8'($urandom_range(0, 15));
      p.base_off  = 12'($urandom_range(0, 2000));
      pkt = p;
      pkt_valid = 1;
      req_valid = 1;           // a competing single-word read
      req_addr  = 8'd0;
      #1;
      check(pkt_ready, "packet accepted when idle");
      check(!req_ready, "packet wins over a single-word request");
      @(negedge clk);
      pkt_valid = 0;
      req_valid = 0;
      check(!resp_valid, "nothing one cycle after acceptance");
      @(negedge clk);
      for (int j = 0; j < int'(p.count); j++) begin
        int c;
        c = int'(p.cnt0) + j;
        check(resp_valid, "one word per cycle from the second cycle on");
        check(resp.data == model[p.addr + j], "wide data");
        check(resp.core == p.base_core + 8'(c / int'(p.rpc)), "wide core");
        check(resp.off == p.base_off + 12'(c % int'(p.rpc)), "wide offset");
        if (j < int'(p.count) - 1) check(!req_ready, "single port blocked while streaming");
        @(negedge clk);
      end
      check(!resp_valid, "stream length");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
