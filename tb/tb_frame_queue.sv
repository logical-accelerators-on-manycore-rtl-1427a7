// tb_frame_queue: self-checking test of the frame counters.
//
// A reference model keeps one arrival count per frame of the circular
// buffer. Random words are sent to frames inside the five-counter window, in
// any order; whenever the head frame is complete the consumer frees it with
// remem. Every cycle the test compares head_ready, head_base and head_idx
// with the model. It then checks the overrun flag (a word six frames ahead)
// and the remote-frame notification in both directions.
module tb_frame_queue;
  import lac_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       cfg_we = 0, cfg_notify = 0;
  logic [9:0] cfg_base = 10'd32;
  logic [3:0] cfg_shift = 4'd2;       // 4-word frame regions
  logic [9:0] cfg_words = 10'd4;
  logic [4:0] cfg_nframes = 5'd8;
  logic       arr_valid = 0;
  logic [9:0] arr_off = '0;
  logic       ni_v = 0;
  logic [3:0] ni_f = '0;
  logic       no_v;
  logic [3:0] no_f;
  logic       head_ready, remem = 0, overrun;
  logic [9:0] head_base;
  logic [3:0] head_idx;

  frame_queue dut (
    .clk, .rst_n, .cfg_we, .cfg_base, .cfg_shift, .cfg_words, .cfg_nframes, .cfg_notify,
    .arr_valid, .arr_off, .notify_i_valid(ni_v), .notify_i_frame(ni_f),
    .notify_o_valid(no_v), .notify_o_frame(no_f),
    .head_ready, .head_base, .head_idx, .remem, .overrun
  );

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int cnt [8];          // model: arrivals per absolute frame
  int head_m = 0;
  int frees = 0;
  int sent [8];         // words already sent per frame (distinct offsets)

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (cnt[i]) begin cnt[i] = 0; sent[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
    // ---- random out-of-order filling and in-order consumption ----
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int rel, f, w;
      // compare with the model (state after previous edge)
      check(head_ready == (cnt[head_m] >= 4), "head_ready");
      check(head_base == 10'(32 + head_m * 4), "head_base");
      check(head_idx == 4'(head_m), "head_idx");
      // drive this cycle
      arr_valid = 0;
      remem     = 0;
      rel = $urandom_range(0, 4);
      f   = (head_m + rel) % 8;
      if ($urandom_range(0, 3) != 0 && sent[f] < 4) begin
        w = sent[f];
        // scramble the word order inside the frame
        arr_off   = 10'(32 + f * 4 + ((w * 3 + f) % 4));
        arr_valid = 1;
      end
      if (head_ready && $urandom_range(0, 2) == 0) remem = 1;
      @(posedge clk);
      #1;
      if (arr_valid) begin
        cnt[f]++;
        sent[f]++;
      end
      if (remem) begin
        cnt[head_m]  = 0;
        sent[head_m] = 0;
        head_m = (head_m + 1) % 8;
        frees++;
      end
      @(negedge clk);
    end
    arr_valid = 0;
    remem     = 0;
    check(frees > 100, "frames were consumed");
    check(!overrun, "no overrun during legal traffic");
    // ---- overrun: a word six frames ahead of the head ----
    arr_off   = 10'(32 + ((head_m + 6) % 8) * 4);
    arr_valid = 1;
    @(negedge clk);
    arr_valid = 0;
    check(overrun, "overrun flagged beyond the counters");
    // ---- remote notification ----
    cfg_notify = 1;
    cfg_words  = 10'd3;
    cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
    for (int i = 0; i < 2; i++) begin
      arr_off = 10'(32 + 4 + i);  // frame 1
      arr_valid = 1;
      @(negedge clk);
      check(!no_v, "no notify before frame 1 fills");
    end
    ni_v = 1; ni_f = 4'd1;           // third arrival is a notification
    @(negedge clk);
    ni_v = 0;
    arr_valid = 0;
    check(no_v && no_f == 4'd1, "notify_o names frame 1 once it fills");
    @(negedge clk);
    check(!no_v, "notify_o is a single pulse");
    check(!head_ready, "head frame 0 still empty");
    for (int i = 0; i < 3; i++) begin
      ni_v = 1; ni_f = 4'd0;
      @(negedge clk);
    end
    ni_v = 0;
    check(head_ready, "three notifications fill frame 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
