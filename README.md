# Clock-domain crossings for a Multiple Clock Domain (MCD) processor

An out-of-order superscalar processor (Alpha 21264-like) is split into four
clock domains that each have their own clock. The clocks have no phase
relation to one another, and each can be set anywhere from 250 MHz to 1.0 GHz
by dynamic voltage and frequency scaling (DVFS):

* **front end**: fetch, branch predictor, rename/dispatch, reorder buffer (ROB)
* **integer**: issue queue, ALUs, register file
* **floating point (FP)**: issue queue, FP units, register file
* **load/store (LS)**: load/store queue (LSQ), L1 data cache, L2 cache

Main memory is a fifth clock, outside the processor's control. Inside a
domain everything stays ordinary synchronous logic. The cost of splitting the
processor is paid only where a value crosses from one domain to another, and
that cost is a synchronization delay.

The idea behind this RTL: put every crossing in a queue that already exists
or is easy to add, and synchronize only the queue's per-entry *Valid* flags,
never its data. A FIFO crossing then costs no delay at all while the FIFO is
neither empty nor full. A crossing into an issue queue costs one
synchronization per entry, and an out-of-order core hides most of that cost
behind other work.

This repository holds that crossing fabric:
* the two queue types;
* the synchronizer they use;
* the squash distribution for mis-predicted branches;
* a per-domain DVFS sequencer;
* a top level, `mcd_top`, that wires all fifteen crossings between the
  domains.

The execution core itself (caches, predictor, ROB, ALUs, register files, LSQ
matching logic) is not included. Its side of every crossing is a port of
`mcd_top`.

## The fifteen crossings

| ch | payload | from → to | structure |
|----|---------|-----------|-----------|
| 1  | L1 I-cache fill line (from L2) | LS → front end | FIFO (only with an L2) |
| 2  | L2 miss request / line fill | LS ↔ memory | two FIFOs (`ch2q`, `ch2f`) |
| 3  | committed branch outcome | integer → front end | FIFO, starts the squash |
| 4  | integer load result | LS → integer | issue queue |
| 5  | FP load result | LS → FP | issue queue |
| 6  | effective address | integer → LS | issue queue |
| 7  | FP→integer conversion result | FP → integer | FIFO |
| 8  | integer→FP conversion result | integer → FP | FIFO |
| 9  | integer instructions | front end → integer | issue queue (20 entries) |
| 10 | FP instructions | front end → FP | issue queue (15 entries) |
| 11 | load/store operations | front end → LS | issue queue (64 entries, the LSQ) |
| 12 | integer completions | integer → front end (ROB) | issue queue |
| 13 | FP completions | FP → front end (ROB) | issue queue |
| 14 | load/store completions | LS → front end (ROB) | issue queue |
| 15 | L1 I-cache fill line (from memory) | memory → front end | FIFO (only without an L2) |

Traffic that the receiver takes strictly in order uses a FIFO. Traffic the
receiver may use in any order (instructions waiting to issue, load results,
completions that the ROB retires several at a time) uses an issue queue.

## The FIFO crossing (`mcd_fifo`)

This is the central structure. Its behaviour sets how much the domain split
costs.

**Storage and pointers.** Each side has a one-hot ring counter (`ring_counter`)
that points at its next entry. A write stores `data_w` into the entry under the
write pointer and advances the pointer. The read side always shows the entry
under the read pointer on `data_r`, built as an AND-OR bus of the entries.
A pop (`read` high while `empty` is low, on a rising `clk_r` edge) advances the
read pointer. Data registers are written only from the write clock and are
never synchronized.

**One Valid flag per entry, owned by neither clock.** The writer sets an
entry's flag and the reader clears it. The flag is stored as two toggle bits,
`wtog[i]` in the write domain and `rtog[i]` in the read domain, and
`valid[i] = wtog[i] ^ rtog[i]`. The writer flips `wtog[i]` only after it has
seen the entry free, and the reader flips `rtog[i]` only after it has seen it
full. So the two bits never change close together, and the XOR never glitches.

**Each side sees the flags through its own synchronizer.** `mcd_sync` samples
the whole Valid vector on the *falling* edge of that side's clock. Rising-edge
logic therefore gets a flag that has had half a cycle to settle. Both flags
are built only from these synchronized copies:

* `empty` = the read side's copy of Valid for the entry under the read
  pointer is 0.
* `full` = the write side counts at least `DEPTH - FULL_MARGIN` Valid entries.

**Why Full is raised early.** The producer may run up to F_max/F_min = 4
times faster than the consumer. It also needs time to react to `full`. So
`full` rises `FULL_MARGIN = F_max/F_min + 1 = 5` entries before the queue is
physically full. A write is stored whenever the entry under the write pointer
is free, so writes the producer makes after `full` rose go into those margin
entries and are kept. With the default `DEPTH = 9` (4 + 5), the producer sees
`full` after 4 words and the queue can take 5 more. Writing into a
physically full queue would lose data, and an assertion catches it.

**Timing, read side.** Take a word written on a rising `clk_w` edge into an
empty queue:

```
clk_w   _/‾‾\__/‾‾\__          write edge at t0
clk_r   ‾‾\__/‾‾\__/‾‾\__/‾‾
              ^ first falling clk_r edge after t0: Valid captured, empty drops
                 ^ next rising clk_r edge: the word can be popped here
```

If the write lands within the synchronizer window T_S (300 ps, 30 % of a
1 ns cycle) of that falling edge, a real synchronizer cell takes it one edge
later, which costs one more read cycle. A consumer that registers `empty`
before acting sees two read cycles from write to use when the window is
clear, and three when it is not. Once the queue holds data, reads run
back-to-back, one per cycle, with no extra synchronization cost.

**Timing, write side.** The writer's own write shows in its Valid copy at the
falling edge of the same write cycle, so `full` is correct at the next rising
edge. A pop frees its entry for the writer at the writer's next falling edge.

Ports: `clk_w, rst_w_n, write, data_w, full` and `clk_r, rst_r_n, read, data_r,
empty`. Both resets must be asserted together.

## The issue-queue crossing (`mcd_issue_queue`)

An issue queue is read in any order. A partly full queue therefore does not
hide anything: every entry must become visible to the scheduler on its own.
The structure uses the same toggle-pair Valid flag and falling-edge
synchronizers as the FIFO, but its entries are addressed individually.

* **Write side**: `WR_PORTS` ports. Port *p* takes the *p*-th lowest entry
  that the write side sees as free. `wr_ready[p]` says whether that entry
  exists this cycle.
* **Read side**: `vis[i]` says that entry *i* has reached the scheduler, and
  `entry_data[i]` shows its contents for outside wakeup logic, which returns
  `ready[i]`. Up to `RD_PORTS` visible-and-ready entries are selected, lowest
  index first (`rd_valid`, `rd_data`, `rd_idx`). An entry leaves on a rising
  edge where its port's `rd_take` is high. At most as many entries as are
  visible and ready can ever be issued.

An entry written on a rising write edge becomes visible at the next falling
read edge and can be issued on the rising read edge after that, however full
the queue is. A freed entry returns to the writer at its next falling edge.
Sizes in `mcd_top`:

| channel | depth | write / issue ports |
|---------|-------|---------------------|
| 9  | 20 | 4 / 4 |
| 10 | 15 | 4 / 2 |
| 11 | 64 | 4 / 2 |
| 4, 5, 6 | 8 | 2 / 2 |
| 12 | 16 | 4 / 4 |
| 13, 14 | 16 | 2 / 2 |

## The synchronizer

`mcd_sync` is the synthesizable part: a bank of falling-edge flip-flops with
asynchronous reset. In silicon each bit should map onto a glitch-free
synchronizer cell.

`sync_circuit_model` is a *behavioural timing model* of such a cell, for
simulation only. Its pins are `data_in`, `clock_n` (the cell is clocked by the
inverted clock, so it samples at the falling edge of the true clock) and
`data_out`. Inside, it keeps a dual-rail copy (`r1`/`r0`) that feeds an RS
latch. If `data_in` has been stable for at least `TS_PS` (300 ps) before the
sampling edge, the new value appears `TCQ_PS` (50 ps) after that edge.
Otherwise the old value is kept and the new one is taken at the next edge.
The output changes at most once per edge.

The model is not instantiated in the queues. The RTL cannot show the
T_S effect: in a two-state simulation a falling-edge flop always captures.

## Branch mis-prediction squash (`squash_bcast`)

Branch outcomes are computed in the integer domain, but they reach the front
end only through the channel-3 FIFO. The squash starts in the front end when
it pops an outcome whose `mispredict` bit is set. `squash_fe` is that pop
itself.

To reach the other domains, the front end flips a toggle. Each of the
integer, FP and LS domains samples the toggle with `mcd_sync` and turns the
change into a one-cycle `squash_*` pulse on its own rising edge. No separate
outcome FIFOs are needed from the integer domain to FP and LS. The cost is
that doomed instructions hold their resources slightly longer.

Two squashes must be a few destination cycles apart, or they merge into one.
The mis-predict penalty of the core (7 cycles) keeps them apart.

## DVFS sequencer (`dvfs_ctrl`, one per domain)

`dvfs_ctrl` takes a requested frequency `target_mhz`, clamped to 250–1000
MHz. It moves the `freq_mhz` and `volt_mv` set-points toward that frequency
at fixed rates:
* voltage: 1 mV every 66.9 ns;
* frequency: 1 MHz every 49.1 ns.

The domain keeps running throughout; there is no PLL re-lock pause. Two
limits enforce the ordering:
* the voltage never drops below what the present frequency needs, so when
  slowing down the frequency leads;
* the frequency never rises above what the present voltage supports, so when
  speeding up the voltage leads.

The voltage/frequency relation is the straight line from (250 MHz, 0.65 V) to
(1.0 GHz, 1.20 V). The sequencer is clocked by the 100 MHz reference. Each
quantity has a time accumulator that adds 10 ns per reference edge and steps
by 1 when the accumulator reaches its rate. The accumulator clears whenever
the quantity reaches its goal.

A full 250 ↔ 1000 MHz swing takes about 37 µs. Reset puts every domain at
1.0 GHz / 1.20 V. The policy that picks target frequencies is not part of
this design.

## `mcd_top`

`mcd_top` instantiates:
* the FIFOs of channels 1/15, 2 (request and fill), 3, 7 and 8;
* the issue queues of channels 4, 5, 6 and 9–14;
* `squash_bcast`, driven by channel 3 pops with the mispredict bit set;
* four `dvfs_ctrl` instances, indexed by `mcd_pkg::domain_e`: 0 front end,
  1 integer, 2 FP, 3 LS.

Clock and reset inputs: `clk_fe/int/fp/ls/mem/ref` and the matching
`rst_*_n`.

Port naming:
* FIFO channels: `chN_write`, `chN_wdata`, `chN_full`, `chN_read`,
  `chN_rdata`, `chN_empty`.
* Issue-queue channels: `chN_wr_en`, `chN_wr_data`, `chN_wr_ready`,
  `chN_vis`, `chN_entry`, `chN_ready`, `chN_rd_valid`, `chN_rd_data`,
  `chN_rd_idx`, `chN_rd_take`.

Payloads are the packed structs of `mcd_pkg`:

| struct | fields |
|--------|--------|
| `mem_req_t` | is_write, 64-bit address, 512-bit line |
| `branch_outcome_t` | mispredict, taken, pc, target |
| `reg_value_t` | 7-bit physical register, 64-bit value |
| `eff_addr_t` | 6-bit LSQ index, 64-bit address |
| `uop_t` | 32-bit instruction, 7-bit ROB tag, destination and two source physical registers |
| `completion_t` | ROB tag, exception |

A cache line is 8 × 64-bit words.

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `HAS_L2` | 1 | 1 builds channel 1; 0 builds channel 15 instead, for a core with no L2 |
| `FIFO_DEPTH` | 9 | entries per FIFO crossing |
| `IIQ_DEPTH`, `FIQ_DEPTH`, `LSQ_DEPTH` | 20, 15, 64 | issue-queue depths of channels 9, 10, 11 |
| `LD_Q_DEPTH`, `EA_Q_DEPTH`, `CMP_Q_DEPTH` | 8, 8, 16 | depths of channels 4–5, 6 and 12–14 |

When `HAS_L2 = 1`, the channel-15 outputs read as full/empty with zero data.
When `HAS_L2 = 0`, the channel-1 outputs do.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Build with plain Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mcd_pkg.sv rtl/mcd_sync.sv rtl/ring_counter.sv rtl/mcd_fifo.sv \
  rtl/mcd_issue_queue.sv rtl/squash_bcast.sv rtl/dvfs_ctrl.sv rtl/mcd_top.sv \
  tb/fifo_agent.sv tb/iq_agent.sv tb/domain_clock_model.sv tb/tb_mcd_top.sv \
  --top-module tb_mcd_top
./obj_dir/Vtb_mcd_top
```

To build a unit test, give its module and the RTL it uses, for example
`rtl/mcd_pkg.sv rtl/mcd_sync.sv rtl/ring_counter.sv rtl/mcd_fifo.sv tb/tb_mcd_fifo.sv`.
All testbenches run in seconds.

| testbench | what it proves |
|-----------|----------------|
| `tb_mcd_fifo` | the edge at which `empty` drops, predicted from the clock edges, over 12 phases; `full` after exactly 4 of 9 entries; the 5 margin entries keep late writes; a full queue drains one word per cycle; 3000 words of random jittered traffic, with the reader first slower and then faster than the writer, arrive in order |
| `tb_mcd_fifo_fig4` | the plain 4-entry queue with no margin, over 10 clock phases: the edges at which EMPTY drops after the first write, FULL rises after the fourth back-to-back write, FULL falls after the first read, and EMPTY rises after the last read |
| `tb_mcd_issue_queue` | per-entry visibility edge; lowest-free allocation and `wr_ready` while filling 20 entries; visible-and-ready selection, lowest index first; freed entries return to the writer; 4000 entries of random traffic issued exactly once, most of them out of order |
| `tb_mcd_sync` | output equals the input at the last falling edge, and reset clears it |
| `tb_sync_circuit_model` | changes 300 ps or more before the edge are captured at once; changes closer than that are captured one edge later; one output transition per change |
| `tb_squash_bcast` | one squash pulse per request in each of three unrelated clock domains, on the predicted edge, one cycle long |
| `tb_dvfs_ctrl` | the exact step trajectories for 1000→500 MHz and 500→1000 MHz, voltage-first and frequency-first ordering, clamping |
| `tb_mcd_top` | the whole fabric at default parameters (see below) |
| `tb_mcd_top_sa` | the same test for a smaller in-order core (StrongARM SA-1110-like): no L2, so channel 15 replaces channel 1; issue queues of 16/16/12 entries |

How `tb_mcd_top` runs:
1. The domain clocks come from a behavioural PLL model,
   `domain_clock_model`. Each follows its domain's DVFS frequency set-point,
   with a random phase and ±55 ps jitter.
2. The FP domain is sent down to 250 MHz and the LS domain to 500 MHz.
3. Every channel then carries random traffic with a scoreboard: 600 words per
   FIFO and 1500 entries per issue queue. Meanwhile the LS domain is raised
   back to 1.0 GHz.
4. Every 8th branch outcome is marked as mis-predicted, and each one must
   give exactly one squash pulse in all four domains.

The test counts the following mechanisms and fails if any of them never
happens:
* FULL and EMPTY on every FIFO;
* writes absorbed by the early-Full margin;
* out-of-order issue on every issue queue;
* issue-queue producer stalls;
* squashes;
* a DVFS down transition and a DVFS up transition.

## Choices made here, and where this RTL departs from the architecture

* **Valid flag as two toggles.** The architecture has one set/reset latch
  per entry, set from the write side and reset from the read side. Here it is
  two flip-flops and an XOR. The behaviour is the same and it synthesizes
  without latches.
* **Full/Empty logic.** It is described only as "Full/Empty state machines"
  fed by the synchronized Valid bits. Here the flags are plain combinational
  functions of those bits, as described above.
* **Write gating.** The architecture gates WRITE and READ into the ring
  counters. The gating elements are not specified, so here the pointers use
  enables.
* **T_S exists only in `sync_circuit_model`.** The queues assume a
  synchronizer that always captures at the falling edge. The possible extra
  cycle must come from the library cell.
* **Sizes not given by the architecture:**
  * the logical FIFO depth of 4 (total depth 9);
  * depths and port counts of channels 4, 5, 6, 12, 13, 14;
  * the issue-port split of 4 integer and 2 FP;
  * payload formats and 64-bit words.
* **Selection and allocation policies.** Both are lowest-index-first. No
  age order is kept, because the issue policy belongs to the core.
* **Squash transport.** The squash is sent as a synchronized toggle, and
  requests must be spaced (see above).
* **Reset.** Asynchronous reset, asserted in every domain together. The
  architecture does not specify reset.
* **DVFS details.** The voltage/frequency line and the accumulator stepping
  are this design's choices. The alternative DVFS style, where every
  frequency change stops the domain while its PLL re-locks, is not built:
  with tightly coupled domains it stalls the whole processor.
* **Not included.** The execution core of each domain, the PLLs and clock
  grids, the voltage regulators, and main memory. They are analog parts or
  unchanged parts of the base processor. The testbenches stand in for them
  with traffic agents and clock models.
