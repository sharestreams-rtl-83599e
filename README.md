# ShareStreams: a hardware DWCS packet scheduler

A link that carries many streams has to decide, once per packet time, which
stream sends next. At 10 Gbit/s a 1500-byte frame lasts 1.2 µs and a 64-byte
frame 0.05 µs. A software scheduler that orders 32 streams on several
attributes at once cannot keep up with that. ShareStreams moves the decision
into hardware. The packets stay in host memory. The scheduler sees only, for
each stream:

- its service constraints: deadline, loss-tolerance x/y and request period;
- the 16-bit arrival time of its head packet.

For each decision it returns a 5-bit winner stream ID and a 16-bit timestamp.

The scheduling discipline is **DWCS** (Dynamic Window-Constrained Scheduling).
Each stream has a deadline and a window-constraint x/y: at most x of any y
consecutive packets may be late or lost. Streams are ordered on deadline
first, then on the window-constraint, then on arrival time. After every
decision the winner and every stream that missed its deadline have their
attributes adjusted. With suitable settings the same hardware behaves as:

- an EDF scheduler (x/y = 0/0);
- a static-priority scheduler (deadlines far away, priority given by x/y);
- a weighted fair-share scheduler;
- any mix of these.

The hardware has four parts:

- **N Register Base blocks**, one per stream. Each holds that stream's state and applies the DWCS update.
- **N/2 Decision blocks**, arranged as a single-stage *recirculating shuffle-exchange network*. The network finds the winner in log2 N clock cycles.
- **A Control & Steering unit** that steps the machine through LOAD, SCHEDULE and PRIORITY_UPDATE. It also keeps the scheduler's time.
- **A memory side**. It holds the constraint table, per-stream arrival-time queues kept full by a push/pull *streaming unit*, and a winner bank that the host reads.

Three variants of the architecture are built as well, and the top-level
parameter `ARCH` selects among the four:

| `ARCH` | Network | Register Base blocks | Clock cycles per decision |
|---|---|---|---|
| `ARCH_BA` (base architecture, default) | shuffle-exchange | plain | log2 N + 1 (3 for 4 streams, 6 for 32) |
| `ARCH_WR` (winner-only routing) | only winners recirculate | plain | log2 N + 1 |
| `ARCH_CA` (compute-ahead) | shuffle-exchange | precompute both outcomes | log2 N (2 for 4 streams, 5 for 32) |
| `ARCH_VS` (vertical scaling) | fixed network of `NET_STREAMS`, run in rounds over tiles | plain | (N/M)·log2 M + 2, with M = `NET_STREAMS` (8 for 16 streams on an 8-stream network) |

## Stream attributes and the 53-bit bus

Every Register Base block puts its stream on a 53-bit attribute bus
(`attr_t` in `sharestreams_pkg`):

| Field | Bits | Meaning |
|---|---|---|
| `deadline` | 16 | current deadline, in decision ticks |
| `x` | 8 | current loss numerator x' |
| `y` | 8 | current loss denominator y' |
| `arrival` | 16 | arrival time of the stream's head packet |
| `id` | 5 | stream ID |

The block also stores data that stays local and never goes on the bus:

- the request period T (16 bits);
- the original x and y;
- a violation flag;
- a drop flag;
- a 16-bit saturating deadline-miss counter.

The host writes a 48-bit constraint record per stream (`constraint_t`: first
deadline, x, y, period).

## The Decision block: ordering two streams in one cycle

`decision_block` is combinational. It takes two attribute buses, `a` and `b`,
and outputs the winner, the loser and `a_wins`. The DWCS rules are written as
a priority chain:

1. earlier deadline wins;
2. equal deadlines: the lower window-constraint x/y wins;
3. equal deadlines and both constraints zero (x = 0): the larger denominator y wins;
4. equal deadlines and equal non-zero constraints: the smaller numerator x wins;
5. otherwise first come, first served: the earlier arrival wins, and a full tie goes to `a`.

The chain is not evaluated one rule after another. Every comparison is
computed at the same time on a *value bus*:

- `d_lt`: deadline less-than;
- the two cross products `xa·yb` and `xb·ya` from two 8×8 multipliers, with `w_lt` comparing them;
- `y_gt`, `x_lt` and `arr_le`.

A *predicate bus* of equality tests then selects which of those comparisons
decides the outcome. Its tests are `d_eq`, `w_eq`, `x_zero`, `y_eq` and
`x_eq`.

Rule 2 compares fractions by cross-multiplying, so no divider is needed. When
both numerators are zero the products are equal, and rule 3 takes over. All
time compares are plain unsigned 16-bit compares.

## The recirculating shuffle-exchange network

This is the part that is easiest to misread, so here it is in detail.

A binary tournament over N streams needs N−1 comparators in log2 N levels, and
only one level is busy in any cycle. ShareStreams builds only the bottom
level: N/2 Decision blocks. It feeds their outputs back into their own
inputs, so one level of the tree runs per clock cycle.

`shuffle_exchange_network` has N positions, each a 53-bit stage register.

- **Inputs.** Position `i` drives input `i mod 2` of Decision block `i/2` through a 2:1 mux.
- **First SCHEDULE cycle** (`apply = 1`). The muxes take the Register Base block buses.
- **Later cycles.** The muxes take the stage registers.
- **Outputs.** On every `advance`, Decision block k writes its winner to position k and its loser to position N/2 + k. This is the inverse perfect shuffle.

Example with 8 streams, numbered 0–7 in the Register Base blocks:

```
cycle 1: blocks compare (0,1) (2,3) (4,5) (6,7)
         positions 0..3 <- the four winners, positions 4..7 <- the four losers
cycle 2: blocks compare (w01,w23) (w45,w67) (l01,l23) (l45,l67)
         winners of winners go to positions 0,1
cycle 3: block 0 compares the two remaining unbeaten streams
         position 0 <- the overall winner
```

After log2 N cycles, position 0 holds the only stream that never lost. The
result is exactly a binary tournament with the lower-numbered stream on the
`a` input. The reference model in the testbenches computes it that way.

The other positions are ranked by their win/loss history. This is not a fully
sorted list. Two streams that lost their first comparisons never meet again,
so their relative order is not established.

`winner_now` is the combinational winner output of Decision block 0. In the
last SCHEDULE cycle it already carries the overall winner, one cycle before
`order[0]` does. The compute-ahead variant uses it to finish in log2 N cycles.

### Winner-only routing

`winner_only_network` drops the loser wiring. It keeps N/2 winner registers
`w[]`:

- **Cycle 1.** Block j compares streams 2j and 2j+1 and stores the winner in `w[j]`.
- **Cycle s ≥ 2.** Only the blocks whose index j is a multiple of 2^(s−1) work. Each compares `w[j]` with `w[j + 2^(s−2)]`.

For 8 streams that means blocks 0 and 2 in cycle 2, then block 0 alone in
cycle 3. The winner and the timing are the same as in the base network, but
there is no ranking of the losers. The network keeps its own cycle counter.

### Vertical scaling: a fixed network run in rounds

The networks above grow with N. `vertical_tile_network` instead keeps a
network of a fixed size M (`NET_STREAMS`, default 8) and runs it several
times.

- **Tiles.** The N Register Base blocks form N/M tiles. Tile r holds streams r·M to r·M+M−1. Network input p is a register bank that holds streams p, p+M, p+2M, …
- **Rounds.** A mux puts one tile on the network at a time. Each round runs the shuffle-exchange for log2 M cycles, and its winner is stored.
- **Fold.** One extra Decision block compares the stored round winner (input b) with a best-so-far register (input a). The fold of a round winner happens during the first cycle of the next round, so it costs no time. Only the last one needs an extra cycle.

The SCHEDULE state therefore lasts (N/M)·log2 M + 1 cycles. For 16 streams
on an 8-stream network that is 3 + 3 + 1. The winner is a tournament inside
each tile, followed by a left-to-right comparison of the tile winners.

Every tile stays in on-chip registers with its own update logic, so
PRIORITY_UPDATE still takes one cycle. The variant saves Decision blocks and
network wiring at the cost of decision time. Swapping stream state
in and out of external memory, so that more streams than register sets could
be served, is not included.

## The decision cycle: LOAD, SCHEDULE, PRIORITY_UPDATE

`control_steering_unit` runs this sequence:

```
IDLE --run--> LOAD --> SCHEDULE(1) .. SCHEDULE(log2 N) --> PRIORITY_UPDATE --+
                           ^                                                  |
                           +-------------------------(run)--------------------+
```

**LOAD** takes one cycle, once per run.

- `load_en` copies every stream's constraints, its ID and its first arrival time into its Register Base block.
- The first arrival time is removed from each queue.
- The time counter is cleared.

**SCHEDULE** takes log2 N cycles (the control unit's `SCHED_CYCLES`; longer
for the vertically scaled network). `net_advance` clocks the network, and
`net_apply` is high only in the first of these cycles.

**PRIORITY_UPDATE** takes one cycle.

- The winner ID goes to every Register Base block with `update_en` and the current time.
- The winner ID and the current time, which serves as its timestamp, are written to the winner bank.
- The time counter advances by one tick.

So one time tick equals one decision. Deadlines, periods and arrival times
are all measured in decisions.

With compute-ahead blocks (`ARCH_CA`) there is no PRIORITY_UPDATE state.

- `precompute_en` marks the SCHEDULE cycles before the last.
- In the last SCHEDULE cycle, `update_en` is raised with the winner ID taken from `winner_now`.

**Stall.** The winner can only be written when the winner bank has room. If
it is full, the unit waits in the cycle that would write the winner. It holds
the network and all stream state, and counts the waiting cycles in
`stall_cycles`. No winner is lost and no update is skipped. The cost is that
the time counter does not advance while the unit waits.

`run` is sampled at decision boundaries. Lowering it returns the unit to IDLE
after the current update. Raising it again starts with a new LOAD.

## Priority update in the Register Base block

`register_base_block` compares its stream ID with the circulated winner ID,
and its deadline with the current time. It then takes one of three paths. The
arithmetic is in `sharestreams_pkg::dwcs_update`, so the compute-ahead block
uses the same function.

**Winner.**

- If y' > x', then y' decreases by 1.
- If x' and y' both become 0, or the violation flag was set, x' and y' are reset to the original x and y.
- The violation flag is cleared.
- deadline += T.
- The stream takes its next arrival time.

**Loser that missed its deadline** (deadline ≤ current time):

- If x' > 0, the late packet is dropped:
  - x' and y' each decrease by 1 (y' stops at 0);
  - if both reach 0 they are reset to the original values;
  - the drop flag is set;
  - the stream takes its next arrival time.
- If x' = 0, the stream has used up its loss allowance:
  - y' increases by 1, saturating at 255;
  - the violation flag is set.
- In both cases, deadline += T and the miss counter increases by 1.

**Loser that met its deadline.** Nothing changes.

Raising the denominator after a violation lowers the stream's x/y, which
raises its priority in the next comparisons. A winner gives up some priority
by lowering y'.

**Arrival times.** "Takes its next arrival time" means:

- the block raises `arrival_pop`;
- it loads the head of its queue in the same clock edge;
- if the queue is empty (`next_valid = 0`), the old arrival time stays and the pop is counted as an underrun.

### Compute-ahead Register Base blocks

`compute_ahead_register_block` stores the same state. While the network is
still working, it evaluates `dwcs_update` for both outcomes, winner and loser.
For the loser it checks for a deadline miss against the current time, which
cannot change before the update. It stores the two results in a winner and a
loser precompute register.

When the winner ID arrives, the block only has to select one of the two,
which removes a whole clock cycle from every decision. The price is a second
copy of the update logic and two extra state registers per stream.

## Arrival times, winners and the host side

`memory_interface` is the scheduler's side of the memory shared with the host.
It has three parts:

- **The constraint table.** One record per stream, written with `cons_wr_*` before a run. All records are presented to the Register Base blocks at LOAD.
- **`arrival_queue_bank`.** One circular FIFO of 16-bit arrival times per stream, `QUEUE_DEPTH` deep. All the FIFOs share one memory array.
  - Every head is visible at once, and the Register Base blocks pop the FIFOs independently.
  - A push to a full FIFO is refused.
  - A pop from an empty FIFO is counted in `underruns`.
- **`winner_id_bank`.** A FIFO of {ID, timestamp}, `WINNER_DEPTH` deep. The Control unit writes one entry per decision, and the host drains it with `win_rd_pop`. When it is full, the scheduler stalls.

`streaming_unit` keeps the arrival-time FIFOs filled in two ways.

- **Push.** A programmed-I/O write (`pio_*`) puts one arrival time into a stream's FIFO. PIO has priority on the FIFO write port.
- **Pull.** After a pulse on `pull_start`, the unit scans the FIFO levels round-robin. For each stream below `PULL_THRESHOLD` (default half full) it raises a refill request on `pull_req_*`. Each stream can have at most one request outstanding.
  - An external DMA engine answers with words on `dma_*`.
  - The stream's request is cleared when the FIFO passes the threshold again.

The PCI bridge, the DMA engine and the card SRAM are not part of this RTL; the
top brings their signals out as ports.

## Top level

`sharestreams_top` instantiates:

- `memory_interface` and `streaming_unit`;
- `control_steering_unit`;
- `N_STREAMS` Register Base blocks, plain or compute-ahead according to `ARCH`;
- the network chosen by `ARCH`: the shuffle-exchange, winner-only or tiled network.

| Parameter | Default | Meaning |
|---|---|---|
| `N_STREAMS` | 32 | streams; a power of two from 4 to 32 (5-bit IDs) |
| `QUEUE_DEPTH` | 256 | arrival-time FIFO depth per stream |
| `WINNER_DEPTH` | 256 | winner bank depth |
| `ARCH` | `ARCH_BA` | `ARCH_BA`, `ARCH_WR`, `ARCH_CA` or `ARCH_VS` |
| `NET_STREAMS` | 8 | network size for `ARCH_VS`; a power of two of at least 4 |

An unsupported `N_STREAMS` stops elaboration with an error.

The ports are grouped as follows.

- **Clock, reset and run:** `clk`, `rst_n` (asynchronous, active low), `run`.
- **Constraint writes:** `cons_wr_valid`, `cons_wr_stream`, `cons_wr_data`.
- **Push path:** `pio_valid`, `pio_stream`, `pio_time`, `pio_ready`.
- **Pull path:** `pull_start`; `pull_req_valid`, `pull_req_stream`, `pull_req_ready`; `dma_valid`, `dma_stream`, `dma_time`, `dma_ready`.
- **Winner output:** `win_rd_valid`, `win_rd_id`, `win_rd_time`, `win_rd_pop`.
- **Status:** `busy`, `current_time`, `decisions`, `stall_cycles`, `underruns`, per-stream `violation` and `dropped`.

To use the scheduler:

1. Hold reset.
2. Write each stream's constraints.
3. Push some arrival times.
4. Raise `run`.
5. Read winners as they appear.

With default parameters the design holds about 7100 flip-flop bits plus 136 Kbit of FIFO memory.

## How far it follows the original design, and where it departs

These points follow the published ShareStreams architecture:

- the field widths;
- the five-rule ordering chain and its single-cycle value/predicate evaluation with 8-bit multipliers;
- N/2 Decision blocks recirculated for log2 N cycles, with the attribute bus applied through muxes in the first cycle;
- the LOAD / SCHEDULE / PRIORITY_UPDATE timeline, with 3 cycles per decision at 4 streams;
- the three update paths of the Register Base block;
- the time counter that ticks once per winner;
- new arrival times only for winners and for streams that dropped a packet;
- the winner-only and compute-ahead variants, with their cycle counts;
- vertical scaling: tiled Register Base blocks on a fixed network, with the round winners combined in one extra cycle;
- push/pull refilling with a pull-start line.

The following are this design's own choices or departures:

- **DWCS arithmetic.** The original describes the update only as increments and decrements of the deadline, x' and y'. The exact rules above are the standard DWCS rules.
- **Counters.** The original lists 16-bit counters in each Register Base block without saying what they count. Here they count deadline misses.
- **"Sorted list".** The original says the network yields a sorted list of streams. With the wiring used here, only the winner is guaranteed. The remaining order is a ranking by win/loss history, and nothing downstream uses it. Scheduling several future packet times from one pass is therefore not supported.
- **Network wiring.** The positions where the winner and loser outputs re-enter the muxes are this design's reading: the inverse shuffle.
- **Load bus.** The original shows a 93-bit bus from the memory side to the Register Base blocks without a breakdown. Here, loading uses the 48-bit constraint record plus the 16-bit first arrival time and the stream ID.
- **Time wrap.** Time, deadlines and arrival times are 16-bit and compared unsigned, with no wrap-around handling. A run must stay below 65536 decisions. The original experiments used up to 64000.
- **Empty queues.** A stream whose arrival-time FIFO runs dry keeps competing with its last arrival time. There is no eligibility bit.
- **Host memory.** Card SRAM with a hardware semaphore is replaced by on-chip FIFOs with separate host and scheduler ports.
- **Stall, `run` and PIO priority.** The stall on a full winner bank, the `run` handshake and PIO taking priority over DMA are not specified by the original.
- **Not built.**
  - Saving and restoring tile state in external memory for vertical scaling. The original shows only a box for it. Here all tiles stay on chip.
  - Combining the rounds of vertical scaling by re-sorting the top streams of each round, the slower of the two combining methods the original mentions.
  - Relaxed priority updates.
  - The PCI bridge, the DMA engine, the SRAM chips and the host software.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. The expected
values come from `tb/ss_ref_pkg.sv`, an independent integer model. It
contains:

- the rule chain written as sequential if-statements;
- a recursive tournament;
- the DWCS update.

| Testbench | What it covers |
|---|---|
| `tb_decision_block` | random and corner-case pairs against the rule chain, both input orders |
| `tb_register_base_block`, `tb_compute_ahead_register_block` | every update path, saturation, resets, pops, empty queues |
| `tb_shuffle_exchange_network`, `tb_winner_only_network` | winner equals the tournament for N = 32 and smaller N, cycle counts |
| `tb_vertical_tile_network` | 16 streams on 8 and 32 on 4: winner equals the per-tile tournaments plus fold, after (N/M)·log2 M + 1 cycles |
| `tb_control_steering_unit` | state sequence, strobes, spacing of decisions, time counter, stalls (BA, CA, and a 7-cycle SCHEDULE state) |
| `tb_arrival_queue_bank`, `tb_winner_id_bank`, `tb_memory_interface`, `tb_streaming_unit` | FIFO contents against queue models, full/empty, underruns, PIO/pull/DMA |
| `tb_sharestreams_top` | end to end: BA at 4 streams, WR and CA at 8, VS with 16 streams on a 4-stream network; 400 decisions each |
| `tb_sharestreams_workloads` | the four 4-stream scheduling scenarios below, 64000 decisions each |
| `tb_sharestreams_full` | the top with all defaults (32 streams, 256-deep FIFOs, BA), 60000 decisions |

`tb/ss_top_harness.sv` plays the host and runs the model alongside the design.

- **Host side.** It writes the constraints and pushes arrival times by PIO. It answers pull requests with DMA bursts, and it drains the winner bank with deliberate pauses.
- **Model side.** For every decision it checks the winner ID, the timestamp, the time and the decision spacing.

The end-to-end testbenches count each mechanism and fail if any of them never
occurs:

- drops;
- violations;
- met deadlines;
- stalls;
- underruns;
- PIO pushes;
- pull requests;
- DMA words.

Measured shares from `tb_sharestreams_workloads`, each run 64000 decisions
long. The arrival-time FIFOs are made 65536 deep there, so that each holds a
whole run:

| Scenario | Constraints | Result |
|---|---|---|
| fair share | 7/8, 14/16, 6/8, 4/8 (target 1:1:2:4) | 8000 / 8000 / 16000 / 32001 |
| EDF | x/y = 0/0, equal periods, staggered deadlines | 16000 / 16000 / 16000 / 16001 |
| static priority + fair share | 2/4, 3/4, 3/4 plus a 0/255 stream whose first deadline is tick 63810 | 31906 / 15952 / 15952 (2:1:1) before; the static-priority stream takes 189 of the last 191 slots |
| fair share + EDF | 2/3 and 5/6 plus two EDF streams | EDF streams 16000 / 16000; fair-share streams 2:1 |

To run a testbench with Verilator 5, compile the package first, then the
reference package, then the rest:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sharestreams_pkg.sv tb/ss_ref_pkg.sv \
  rtl/decision_block.sv rtl/register_base_block.sv \
  rtl/compute_ahead_register_block.sv rtl/shuffle_exchange_network.sv \
  rtl/winner_only_network.sv rtl/vertical_tile_network.sv \
  rtl/control_steering_unit.sv \
  rtl/arrival_queue_bank.sv rtl/winner_id_bank.sv rtl/memory_interface.sv \
  rtl/streaming_unit.sv rtl/sharestreams_top.sv \
  tb/ss_top_harness.sv tb/tb_sharestreams_top.sv \
  --top-module tb_sharestreams_top
./obj_dir/Vtb_sharestreams_top
```

For a unit testbench, replace the last `tb/` file(s) with that testbench; only
the top-level testbenches need `ss_top_harness.sv`. The simulator is
two-state, and every register is reset, so results do not depend on initial
values.

Changing `N_STREAMS`, `QUEUE_DEPTH`, `WINNER_DEPTH` or `ARCH` on the harness
instance in `tb_sharestreams_top.sv` runs other configurations. The model
follows all of them.
