// frame_queue: frame counters that turn part of a tile scratchpad into a
// decoupled-access queue of "frames".
//
// A frame is a fixed-size region of the scratchpad that holds the data one
// microthread (or one MXRA invocation) consumes. The scratchpad area
// [cfg_base, cfg_base + cfg_nframes << cfg_shift) is used as a circular buffer
// of frames. Hardware keeps NUM_CTR counters: counter 0 belongs to the frame at
// the head of the queue, counter i to the i-th frame after it. Every word that
// arrives from the network for an address inside the area increments the
// counter of its frame, so words may arrive in any order. The head frame is
// ready once its counter reaches cfg_words. remem frees the head frame: all
// counters shift down by one, the last one is cleared and the head advances.
// The number of counters bounds how far ahead frames may be filled; a word for
// a frame beyond that raises `overrun` and is not counted.
//
// Remote frames (used by MXRA groups): when cfg_notify is set and an arrival
// completes a frame, `notify_o` pulses with that frame's index so that the
// tile that fetched the data can be told (one cycle after the filling
// arrival); a pulse on `notify_i` counts as one
// arrival into the named frame of this tile.
//
// Interface / timing: configuration is written with cfg_we (counters clear).
// arr_valid/arr_off and notify_i are counted in the cycle they are presented;
// head_ready/head_base are combinational from the registers, so frame_start
// in cycle t sees all arrivals up to cycle t-1. remem takes effect at the
// clock edge.
//
// From the architecture: counter per open frame, equality with the configured
// frame size, shift-left on free, five 10-bit counters, in-order frame
// consumption with out-of-order arrival within a frame, and the remote-frame
// notification. This design's own choices: frame regions are a power of two
// words (so the frame index is a shift, not a division) with the ready count
// configured separately, and the overrun flag.
module frame_queue
  import lac_pkg::*;
#(
  parameter int unsigned NUM_CTR  = 5,    // frame counters
  parameter int unsigned CTR_W    = 10,   // counter width
  parameter int unsigned OFF_W    = 10,   // scratchpad word-offset width (4 kB)
  parameter int unsigned FIDX_W   = 4     // frame index width (up to 16 frames)
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration CSR
  input  logic              cfg_we,
  input  logic [OFF_W-1:0]  cfg_base,     // first word of the frame area
  input  logic [3:0]        cfg_shift,    // log2(frame region words)
  input  logic [CTR_W-1:0]  cfg_words,    // arrivals that make a frame ready
  input  logic [FIDX_W:0]   cfg_nframes,  // frames in the circular buffer (>=1)
  input  logic              cfg_notify,   // send notify_o when a frame fills
  // words arriving from the network
  input  logic              arr_valid,
  input  logic [OFF_W-1:0]  arr_off,
  // remote-frame notification in / out
  input  logic              notify_i_valid,
  input  logic [FIDX_W-1:0] notify_i_frame,
  output logic              notify_o_valid,
  output logic [FIDX_W-1:0] notify_o_frame,
  // consumer side
  output logic              head_ready,
  output logic [OFF_W-1:0]  head_base,
  output logic [FIDX_W-1:0] head_idx,
  input  logic              remem,
  output logic              overrun
);

  logic [CTR_W-1:0]  ctr [NUM_CTR];
  logic [FIDX_W-1:0] head;
  logic [OFF_W-1:0]  base_q;
  logic [3:0]        shift_q;
  logic [CTR_W-1:0]  words_q;
  logic [FIDX_W:0]   nfr_q;
  logic              notify_q;

  // relative position (0 = head) of an absolute frame index
  function automatic logic [FIDX_W:0] rel_of(input logic [FIDX_W-1:0] f,
                                             input logic [FIDX_W-1:0] h,
                                             input logic [FIDX_W:0]   n);
    logic [FIDX_W:0] d;
    d = {1'b0, f} - {1'b0, h};
    if (f < h) d = d + n;
    return d;
  endfunction

  logic [OFF_W-1:0]  arr_rel_off;
  logic [OFF_W-1:0]  arr_fidx_full;
  logic              arr_in_area;
  logic [FIDX_W:0]   arr_rel, ntf_rel;
  logic [NUM_CTR-1:0] inc_arr, inc_ntf;

  always_comb begin
    arr_rel_off   = arr_off - base_q;
    arr_fidx_full = arr_rel_off >> shift_q;
    arr_in_area   = (arr_off >= base_q) && ({1'b0, arr_fidx_full} < (OFF_W+1)'(nfr_q));
    arr_rel       = rel_of(arr_fidx_full[FIDX_W-1:0], head, nfr_q);
    ntf_rel       = rel_of(notify_i_frame, head, nfr_q);
    inc_arr = '0;
    inc_ntf = '0;
    for (int i = 0; i < NUM_CTR; i++) begin
      inc_arr[i] = arr_valid && arr_in_area && (arr_rel == (FIDX_W+1)'(i));
      inc_ntf[i] = notify_i_valid && (ntf_rel == (FIDX_W+1)'(i));
    end
  end

  // counter values after this cycle's arrivals (before a possible shift)
  logic [CTR_W-1:0] ctr_inc [NUM_CTR];
  always_comb begin
    for (int i = 0; i < NUM_CTR; i++)
      ctr_inc[i] = ctr[i] + CTR_W'(inc_arr[i]) + CTR_W'(inc_ntf[i]);
  end

  assign head_ready = (ctr[0] >= words_q);
  assign head_base  = base_q + (OFF_W'(head) << shift_q);
  assign head_idx   = head;

  // a frame fills when its counter crosses cfg_words this cycle
  logic              notify_c_valid;
  logic [FIDX_W-1:0] notify_c_frame;
  always_comb begin
    notify_c_valid = 1'b0;
    notify_c_frame = '0;
    for (int i = 0; i < NUM_CTR; i++) begin
      if (notify_q && (inc_arr[i] || inc_ntf[i]) && ctr[i] < words_q && ctr_inc[i] >= words_q) begin
        notify_c_valid = 1'b1;
        notify_c_frame = FIDX_W'(({1'b0, head} + (FIDX_W+1)'(i)) % nfr_q);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CTR; i++) ctr[i] <= '0;
      head     <= '0;
      base_q   <= '0;
      shift_q  <= '0;
      words_q  <= '0;
      nfr_q    <= (FIDX_W+1)'(1);
      notify_q <= 1'b0;
      overrun  <= 1'b0;
      notify_o_valid <= 1'b0;
      notify_o_frame <= '0;
    end else if (cfg_we) begin
      notify_o_valid <= 1'b0;
      for (int i = 0; i < NUM_CTR; i++) ctr[i] <= '0;
      head     <= '0;
      base_q   <= cfg_base;
      shift_q  <= cfg_shift;
      words_q  <= cfg_words;
      nfr_q    <= (cfg_nframes == '0) ? (FIDX_W+1)'(1) : cfg_nframes;
      notify_q <= cfg_notify;
      overrun  <= 1'b0;
    end else begin
      notify_o_valid <= notify_c_valid;
      notify_o_frame <= notify_c_frame;
      if ((arr_valid && arr_in_area && arr_rel >= (FIDX_W+1)'(NUM_CTR)) ||
          (notify_i_valid && ntf_rel >= (FIDX_W+1)'(NUM_CTR)))
        overrun <= 1'b1;
      if (remem) begin
        for (int i = 0; i < NUM_CTR - 1; i++) ctr[i] <= ctr_inc[i+1];
        ctr[NUM_CTR-1] <= '0;
        head <= FIDX_W'(({1'b0, head} + 1'b1) % nfr_q);
      end else begin
        for (int i = 0; i < NUM_CTR; i++) ctr[i] <= ctr_inc[i];
      end
    end
  end

endmodule
