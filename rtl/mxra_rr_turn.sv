// mxra_rr_turn: the round-robin turn counter that decides which core of an
// MXRA group may submit work to the shared array.
//
// Cores take turns: only the core whose id equals `turn` may send a
// cgracomm. When the active core has submitted its work it tells the group
// with a remote store (pass), and the turn moves to the next core, in
// increasing id order with wrap-around, that is still in the pool. A core
// with no more work leaves the pool (leave); if it held the turn, the turn
// moves on as for a pass. Every section keeps its own copy; all copies see
// the same messages and therefore agree.
//
// Interface / timing: pool_we loads the pool mask and gives the turn to the
// lowest core in it. pass / leave take effect at the clock edge; turn and
// my_turn are registered. With an empty pool, turn stays where it is and
// pool_empty is set. The architecture gives the counter and its update
// rules; the mask encoding is this design's.
module mxra_rr_turn #(
  parameter int unsigned NCORES = 4,
  localparam int unsigned IW = (NCORES > 1) ? $clog2(NCORES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pool_we,
  input  logic [NCORES-1:0] pool_mask,
  input  logic              pass,
  input  logic              leave,
  input  logic [IW-1:0]     leave_id,
  input  logic [IW-1:0]     my_id,
  output logic [IW-1:0]     turn,
  output logic              my_turn,
  output logic              pool_empty
);
  logic [NCORES-1:0] pool;

  // next member of `m` after `cur` (wrapping); cur itself if it is the only one
  function automatic logic [IW-1:0] next_of(input logic [IW-1:0] cur, input logic [NCORES-1:0] m);
    logic [IW-1:0] r;
    r = cur;
    for (int k = NCORES - 1; k >= 1; k--) begin
      int unsigned j;
      j = (int'(cur) + k) % NCORES;
      if (m[j]) r = IW'(j);
    end
    return r;
  endfunction

  function automatic logic [IW-1:0] first_of(input logic [NCORES-1:0] m);
    logic [IW-1:0] r;
    r = '0;
    for (int j = NCORES - 1; j >= 0; j--) if (m[j]) r = IW'(j);
    return r;
  endfunction

  logic [NCORES-1:0] pool_n;
  always_comb begin
    pool_n = pool;
    if (leave) pool_n[leave_id] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pool <= '0;
      turn <= '0;
    end else if (pool_we) begin
      pool <= pool_mask;
      turn <= first_of(pool_mask);
    end else begin
      pool <= pool_n;
      if (pass || (leave && leave_id == turn)) turn <= next_of(turn, pool_n);
    end
  end

  assign pool_empty = (pool == '0);
  assign my_turn    = !pool_empty && (turn == my_id) && pool[turn];

endmodule
