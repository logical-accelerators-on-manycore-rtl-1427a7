// tb_mxra_rr_turn: self-checking test of the round-robin turn counter.
//
// The pool of cores that share an MXRA is loaded, then random pass and
// leave events are applied. A model in the testbench keeps the pool and the
// turn: loading the pool gives the turn to its lowest member, a pass moves
// the turn to the next member in increasing order (wrapping), and a core
// that leaves while holding the turn hands it on the same way. Every cycle
// the test compares turn, pool_empty and my_turn for a random core id.
module tb_mxra_rr_turn;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 4;
  logic         pool_we = 0, pass = 0, leave = 0;
  logic [N-1:0] pool_mask = '0;
  logic [1:0]   leave_id = '0, my_id = '0, turn;
  logic         my_turn, pool_empty;

  mxra_rr_turn #(.NCORES(N)) dut (.*);

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

  logic [N-1:0] m_pool = '0;
  int m_turn = 0;
  int n_pass = 0, n_leave = 0;

  function automatic int nxt(input int cur, input logic [N-1:0] p);
    for (int k = 1; k < N; k++)
      if (p[(cur + k) % N]) return (cur + k) % N;
    return cur;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(pool_empty && !my_turn, "empty pool after reset");
    for (int t = 0; t < 5000; t++) begin
      int ev;
      pool_we = 0; pass = 0; leave = 0;
      ev = $urandom_range(0, 9);
      if (ev == 0 || m_pool == '0) begin
        pool_we   = 1;
        pool_mask = 4'($urandom_range(1, 15));
      end else if (ev < 6) begin
        pass = 1;
      end else if (ev == 6) begin
        leave    = 1;
        leave_id = 2'($urandom_range(0, N - 1));
      end
      my_id = 2'($urandom_range(0, N - 1));
      #1;
      check(turn == 2'(m_turn), "turn");
      check(pool_empty == (m_pool == '0), "pool_empty");
      check(my_turn == (m_pool != '0 && m_turn == int'(my_id) && m_pool[m_turn]), "my_turn");
      @(negedge clk);
      if (pool_we) begin
        m_pool = pool_mask;
        m_turn = 0;
        while (!m_pool[m_turn]) m_turn++;
      end else begin
        logic [N-1:0] np;
        np = m_pool;
        if (leave) begin
          np[leave_id] = 0;
          n_leave++;
        end
        if (pass || (leave && int'(leave_id) == m_turn)) m_turn = nxt(m_turn, np);
        if (pass) n_pass++;
        m_pool = np;
      end
    end
    check(n_pass > 100 && n_leave > 100, "events exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
