// tb_llc_wide_resp: self-checking test of the LLC wide-access counter.
//
// Random wide packets are offered. After a packet is accepted the unit must
// produce exactly `count` responses on consecutive cycles (one word per
// cycle), the j-th reading word addr + j and carrying the destination
// core = BC + (cnt0 + j) / RPC and offset BO + (cnt0 + j) % RPC, which the
// test computes itself. While it streams it must refuse new packets. The
// test also checks the total number of cycles per packet.
module tb_llc_wide_resp;
  import lac_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        pkt_valid = 0, pkt_ready;
  wide_pkt_t   pkt = '0;
  logic        rd_en, meta_valid, meta_self, busy;
  logic [11:0] rd_addr;
  logic [7:0]  meta_core;
  logic [11:0] meta_off;

  llc_wide_resp #(.ADDR_W(12)) dut (.*);

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(pkt_ready && !busy && !meta_valid, "idle after reset");
    for (int t = 0; t < 500; t++) begin
      wide_pkt_t p;
      int cyc;
      p = '0;
      p.rpc   = 5'($urandom_range(1, 16));
      p.count = 5'($urandom_range(1, 16));
      p.cnt0  = 5'($urandom_range(0, 16 - int'(p.count)));
      p.addr  = 32'($urandom_range(0, 4000));
      p.base_core = 8'($urandom_range(0, 15));
      p.base_off  = 12'($urandom_range(0, 2000));
      p.self  = 1'($urandom_range(0, 1));
      pkt = p;
      pkt_valid = 1;
      check(pkt_ready, "ready when idle");
      @(negedge clk);
      pkt_valid = 0;
      pkt = '0;
      cyc = 0;
      for (int j = 0; j < int'(p.count); j++) begin
        int c;
        c = int'(p.cnt0) + j;
        check(meta_valid && rd_en && busy, "one response per cycle");
        check(!pkt_ready, "no new packet while streaming");
        check(rd_addr == 12'(p.addr + 32'(j)), "read address");
        check(meta_core == p.base_core + 8'(c / int'(p.rpc)), "core = BC + Cnt/RPC");
        check(meta_off == p.base_off + 12'(c % int'(p.rpc)), "offset = BO + Cnt%RPC");
        check(meta_self == p.self, "self flag");
        @(negedge clk);
        cyc++;
      end
      check(!meta_valid && pkt_ready, "stream ends after count responses");
      check(cyc == int'(p.count), "cycles per packet");
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
