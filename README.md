# Logical accelerators on a manycore

A manycore chip is a sea of small, in-order, single-issue cores. Each has its
own instruction cache, its own scratchpad and a five-to-eight-stage pipeline.
That suits irregular, thread-parallel code. It is wasteful for two common
kinds of code:

- **Data-parallel loops.** Every core fetches and decodes the same
  instructions, and every core asks the memory system for its own small piece
  of each cache line.
- **Loops with instruction-level parallelism.** A single-issue core cannot
  exploit it at all.

This RTL builds two *logical accelerators* out of ordinary manycore tiles.
Software forms and disbands them at run time, and each adds only a little
hardware to a tile:

- **Rockcress: software-defined vectors.** A rectangle of tiles becomes one
  vector machine. A *scalar* core runs the control code. The first vector core,
  the *expander*, fetches the vector body (a *microthread*). It forwards each
  instruction to its neighbour over a dedicated one-cycle network, the *inet*,
  and the neighbour forwards it again. The other vector cores never fetch. Wide
  loads stream a whole cache line from the last-level cache (LLC) across the
  vector cores' scratchpads, which serve as decoupled load queues ("frames").
- **Watercress: the MXRA (Many eXecute-stage Reconfigurable Array).** A
  rectangle of tiles lends its execute-stage units (load/store unit, integer
  ALU, multiplier/FP adder, FP multiplier) to form a coarse-grained
  reconfigurable array, a CGRA. Each tile contributes a 2 x 2 *section* of four
  array nodes. A software-pipelined schedule then runs across the whole
  rectangle, with operands moving node to node over registered links. The
  cores keep running. They stall only when they need a unit that the schedule
  is using in that cycle.

`logical_accel_top` places one of each side by side, at the sizes used as the
main configuration: a vector group of four vector cores (V4) and a 2 x 2-tile
MXRA. The baseline core pipeline, instruction cache, mesh network and DRAM are
not part of this RTL. Where the new logic touches them, it exposes plain
request/response ports, and the testbenches model the other side.

## Rockcress

### Group roles and the vconfig word

Every core has a `vconfig` word (`lac_pkg::vconfig_t`). It holds:

- the core's role: independent, scalar, expander or vector;
- which neighbour its inet queue listens to;
- the group's shape, used by the wide loads.

A group forms when its cores write their vconfig. `rockcress_group` computes
those words from its `ROWS x COLS` parameters when `cfg_we` is pulsed.
Instructions flow east along row 0 from the expander, and from each core of
row 0 south down its column. A core forwards only when every core it feeds can
accept the instruction.

### The fetch stage (`inet_fetch`)

This is the heart of the vector side. It adds three things to a normal fetch
stage:

- a 4:1 mux choosing one neighbour's inet link;
- a two-entry queue;
- a bypass around the instruction cache.

What the stage does depends on the core's role:

- **Scalar.** Sends `vissue` (start a microthread at a PC) and `devec` (leave
  vector mode, resume at a PC) onto the inet from the commit stage.
- **Expander.** On `vissue` it fetches from the given PC. Each instruction goes
  to its own decode and to the inet.
  - Branches and jumps are *not* forwarded, since the group cannot diverge.
  - A conditional branch stops fetch until execute resolves it (`br_valid`).
    Its outcome must be the same for every core.
  - `vend` ends the microthread and is not forwarded.
- **Vector.** Takes instructions from the queue only. It decodes each one and
  forwards it to the next core in the same cycle it leaves the queue.
- **All roles.** `devec` is forwarded and returns the core to independent mode
  with `resume_valid/resume_pc`.

The queue's `ready` is the inet's backpressure, so a stalled core holds up the
cores upstream. With a two-entry queue and registered links, the chain runs at
one instruction per cycle when nobody stalls. The two-entry depth is this
design's choice.

### Frames (`frame_queue`)

Each vector core's scratchpad holds a ring of *frames* of `fq_words` words,
starting at a base address. A frame holds what one microthread iteration
consumes.

- **Counters.** Five 10-bit counters count the words that have arrived for the
  open frames. A word for a frame more than five frames ahead of the oldest is
  refused (`overrun`). The scalar core must not run that far ahead.
- **Consuming a frame.** `frame_start` stalls the vector core until the head
  frame is complete. `remem` frees the frame and moves the head on.
- **Arrivals can be out of order.** Only the count matters, not which word
  came first.
- **Counters shift.** Counter 0 always belongs to the head frame. Freeing
  the head shifts every count down one place and clears the last counter.

### Wide loads (`vload_packet_gen`, `llc_wide_resp`, `llc_bank`)

One `vload` issued by the scalar core becomes a single *wide access packet* to
the LLC. The packet holds the line address, the start offset, the number of
words per core, the base core and the base scratchpad offset. There are three
variants:

- **GROUP.** Stripes `width` words to each core of the group.
- **SINGLE.** Sends the words to one core.
- **SELF.** Returns the words to the scalar core.

For an unaligned load, the program issues the same vload twice:

- the **SUFFIX** part covers the start offset to the end of the line;
- the **PREFIX** part continues in the next line from where the suffix stopped.

At the LLC, a counter turns the packet into one response per cycle. Response
`Cnt` reads `Addr + Cnt` and goes to core `BC + Cnt / RPC` at scratchpad
offset `BO + Cnt % RPC`, where RPC is the number of responses per core.
`llc_bank` is a single-port 16 kB slice:

- it answers a scalar read one cycle after accepting it;
- it starts a wide stream two cycles after accepting it, then delivers one
  word per cycle.

### Predication (`pred_flag`)

Each vector core has a single one-bit mask. `pred_eq rs1, rs2` sets it to
`rs1 == rs2` and `pred_neq` to `rs1 != rs2`. While the mask is 0, every
instruction except another predication instruction is squashed to a nop.

### Putting it together (`rockcress_group`)

This is one scalar core position plus `ROWS x COLS` vector tiles. Each vector
tile has:

- an `inet_fetch`;
- a small instruction store standing in for the I-cache (`imem`, one-cycle
  read, written by the testbench);
- a `frame_queue`;
- a `pred_flag`;
- a scratchpad.

The tiles share one LLC slice with its wide-response counter. The decode
stream of each core and the execute-stage inputs (branch outcome, predicate
operands, `frame_start`, `remem`) are ports. The testbench plays the rest of
the pipeline.

## Watercress (MXRA)

### Nodes and contexts (`mxra_node`, `mxra_fu`)

A node is one reused functional unit plus:

- two operand registers (A and B);
- four bypass registers that carry a value past the unit;
- eight input links and eight output links, one or two nodes away in each
  compass direction;
- four *contexts*.

A context is one cycle of the node's schedule. Each context word
(`lac_pkg::mx_ctx_t`) says:

- which links load A, B and the bypass registers;
- which operation to issue, and whether an immediate replaces B;
- what each output link carries: the unit's result, a bypass register or
  nothing;
- for loads and stores, which of the four base pointers and which offset to
  use, and the pipeline stage the operation belongs to.

The section steps through contexts 0..II-1, the initiation interval.

Each tile's section has four node kinds. Node n sits at row n / 2, column
n % 2 of the tile's 2 x 2 block:

| Node | Kind | Latency |
|------|------|---------|
| 0 | load/store unit on the tile scratchpad | 1 |
| 1 | integer ALU | 1 |
| 2 | FP multiplier | 3 |
| 3 | integer multiplier / FP adder | 2 |

A result issued in context k appears on the node's output register in context
k + latency. The scratchpad reads in one cycle, so a load issued in context k
can be latched by a neighbour in context k + 1. The FP units are single
precision, round to nearest even, and flush denormals to zero.

### The section and its iteration control (`mxra_section`)

The section holds four things:

- **Contexts.** The context memory of its four nodes, for up to four stored
  configurations.
- **Schedule.** The II, the number of pipeline stages and a drain count of
  each configuration.
- **Work queue.** A two-entry queue of `cgracomm` requests. Each request has
  four pointers, predication bits and the requesting core.
- **Pointers.** The base-pointer registers.

**Running a request.** A request of batch B runs (B + stages − 1) rounds of II
cycles, then the drain cycles, then it raises `done`. In round r, an operation
of stage s is live only if `0 <= r − s < B`. This gates stores and pointer
writes during ramp-up and drain: a batch of 3 stores exactly 3 times. The
pointers are loaded from the request when it starts. They change only when the
schedule itself writes them: a load/store node reads a pointer (`GETPTR`), an
ALU adds the stride, and the load/store node writes the result back
(`SETPTR`). The stride is therefore part of the compiled schedule.

**Starting.** A section starts when its request arrives. That is its own queue
at the origin, or a start message from the west or north neighbour elsewhere.
It forwards the message east and south one cycle later.

### The group (`watercress_group`)

`ROWS x COLS` sections form one array of 2·ROWS x 2·COLS nodes. Each tile has
its own scratchpad, arbiter, frame queue and round-robin counter. Two rules
govern timing across tiles:

- **Links.** A link whose two ends are in different tiles passes through a
  register. Crossing a tile boundary therefore costs one extra cycle.
- **Start.** The start spreads one tile per cycle, so tile (r, c) runs r + c
  cycles behind the origin.

The two effects cancel for east- and south-going links: a tile's east
neighbour receives the value exactly when its own schedule, one cycle later,
expects it. A compiler must schedule west- and north-going links with this
skew in mind. The group sends the completion message to the requesting core
once every section has finished.

### Sharing with the cores

- **Functional-unit conflicts (`fu_conflict`).** Each cycle, the core's issue
  stage compares the class of the instruction it wants to issue with the
  section's `fu_busy`. The MXRA wins and the core stalls. `cgracomm` and
  global memory requests never conflict. A core instruction that does get
  through runs on the node's unit in a free cycle and returns one latency
  later.
- **Scratchpad port (`spad_arbiter`, `scratchpad`).** The single-port 4 kB
  scratchpad is granted first to the MXRA, then to remote stores/loads from
  the network, then to the local core. Giving remote requests priority over
  the local core is this design's choice.
- **Whose turn (`mxra_rr_turn`).** Every section keeps the same round-robin
  counter over a pool of cores. A core may send `cgracomm` only in its turn.
  It passes the turn with a broadcast `rr_pass`. A core leaving the pool while
  it holds the turn hands it on.
- **Remote frames.** When a tile's frame is complete, the tile can notify one
  partner tile (`fq_notify`, `notify_tgt`). The partner then treats its own
  frame as ready. This lets one core's LLC request fill scratchpads in several
  tiles.

## Timing conventions

- One clock `clk`.
- Active-low reset `rst_n`: asynchronous assertion, and the flops also reset
  on a clock edge while it is low.
- Handshakes are valid/ready and transfer on a clock edge where both are high.
- Scratchpads, the instruction store and the LLC slice register their read
  data: it is valid the cycle after the request is accepted.

## Where this design departs from, or adds to, the architecture

- **Pipeline, network, caches and DRAM are ports.** The baseline core
  pipeline, the instruction cache, the packet-switched mesh and DRAM are not
  built. The vector group's instruction store is a one-cycle memory. LLC
  misses are not modelled: the slice is preloaded through a port.
- **Encodings are this design's own.** This covers:
  - the vconfig bit layout;
  - the custom instructions (`vend`, `frame_start`, `remem`, `pred_eq`,
    `pred_neq`, all in the custom-0 opcode);
  - the wide-packet fields;
  - the context-word layout.
- **Depths and latencies.**
  - Inet queue and MXRA work queue: two entries each.
  - The LLC slice takes two cycles to start a stream.
  - Unit latencies: integer 1, multiply / FP add 2, FP multiply 3.
- **Not built: the core side of `cgracomm`.** There is no fence instruction
  and no batch CSR in a core. The group takes the batch count on a port and
  signals completion as a one-cycle pulse carrying the requester's id.
- **Not built.** There is no compiler or scheduler. Schedules are written by
  hand as context words, as the testbenches do. The group's stage count is
  limited to four and its II to four contexts.
- **MXRA group membership is fixed.** The group's size comes from the
  `ROWS x COLS` parameters, and its origin is always the top-left tile. No
  per-core register forms or disbands the group at run time. Configuration and
  `cgracomm` requests arrive on ports of the origin tile rather than as remote
  stores over the network.
- **The top module** just places the two accelerators side by side. On a chip,
  both would be modes of the same tiles.

## Simulating

All sources are plain SystemVerilog 2017. The packages must come first:

```
verilator --binary --timing -Wno-fatal --top-module tb_logical_accel_top \
    -y rtl -y tb +libext+.sv -Itb rtl/fp32_pkg.sv rtl/lac_pkg.sv tb/tb_logical_accel_top.sv
./obj_dir/Vtb_logical_accel_top +verilator+rand+reset+2
```

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. They are:

| Testbench | What it covers |
|---|---|
| `tb_inet_fetch` | expander with branch pause, jal and vend; vector stream with backpressure; scalar messages; devec |
| `tb_frame_queue` | random out-of-order arrivals against a model; overrun; notify |
| `tb_vload_packet_gen` | every variant, alignment and split against a per-word model |
| `tb_llc_wide_resp`, `tb_llc_bank` | the Cnt/RPC mapping, one response per cycle, read latencies |
| `tb_pred_flag`, `tb_scratchpad`, `tb_spad_arbiter`, `tb_fu_conflict`, `tb_mxra_rr_turn` | the small blocks against models, exhaustively where small enough |
| `tb_mxra_fu` | every operation of each node kind, the FP ones against a double-precision reference |
| `tb_mxra_node` | a four-context ALU schedule and a load/store schedule with predication and stage gating |
| `tb_mxra_section` | an origin and a follower running c = a + b; run length; stage gating; core sharing |
| `tb_rockcress_group`, `tb_watercress_group` | each group end to end (scenarios in `rc_env.svh`, `wc_env.svh`) |
| `tb_logical_accel_top` | both scenarios through the top at default parameters |

The two group scenarios count how often each mechanism happened, and a count
of zero is a failure:

- **Rockcress:** group forming, vissue, forwarding, inet backpressure, branch
  pause, vend, devec, the vload variants, frame stalls, remem, squashing.
- **Watercress:** configuration, start propagation, cross-tile links, FU
  stalls, scratchpad priority, remote-frame notification, round-robin turn,
  completion.
