// tb_scratchpad: self-checking test of the single-port scratchpad.
//
// Random reads and writes against a model array. A read returns the word
// stored before the read on the next cycle; the output holds its value
// while the port is idle or writing.
module tb_scratchpad;
  import lac_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  localparam int W = 64;
  logic        en = 0, we = 0;
  logic [5:0]  addr = '0;
  word_t       wdata = '0, rdata;

  scratchpad #(.WORDS(W)) dut (.*);

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
  word_t last;

  initial begin
    @(negedge clk);
    for (int a = 0; a < W; a++) begin
      model[a] = $urandom;
      en = 1; we = 1; addr = 6'(a); wdata = model[a];
      @(negedge clk);
    end
    en = 1; we = 0; addr = 0;
    @(negedge clk);
    last = rdata;
    check(last == model[0], "first read");
    for (int t = 0; t < 3000; t++) begin
      int op, a;
      op = $urandom_range(0, 2);
      a  = $urandom_range(0, W - 1);
      en = (op != 2); we = (op == 1); addr = 6'(a); wdata = $urandom;
      @(negedge clk);
      if (op == 0) begin
        check(rdata == model[a], "read data");
        last = rdata;
      end else begin
        check(rdata == last, "output holds when not reading");
        if (op == 1) model[a] = wdata;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
