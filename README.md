# PAMS — a pattern-aware memory system in SystemVerilog

Processing cores that walk through arrays, tiles and linked structures spend
most of their time asking main memory for one address after another. PAMS
takes a different approach: a core describes **whole access patterns**. A
pattern is a base address, a stride, an element count and a few other fields,
held in a *descriptor*. The memory system then moves each pattern between a
shared SDRAM and an on-chip scratchpad by itself. It keeps SDRAM rows open
where the pattern allows. It skips patterns that are already on chip. It hands
the core whole windows of data, one window per clock cycle, reusing the
elements that overlap from one window to the next.

This RTL implements the architecture described in the publication *"PAMS:
Pattern Aware Memory System for Embedded Systems"*. It is an independent
implementation, not the authors' code. The publication describes the blocks and
what they do, but gives few widths, protocols or timings. Those are filled in
here and listed in [Departures and choices](#departures-and-choices).

```
            tile_* ──► tile unit ───────────────────────────────────────────────┐ (shares the PAMMC)
                                                                                 ▼
            program line ──► regular descriptor memory ─┐
 core ─ req_idx ───────────────────────────────────────►│
                                                         │  memory manager      PAMMC
 core ─ select/addr/ready ─► address manager ──────────►│  (priority,      ──► addr gen ─► bank manager ─► SDRAM
                              stride detector            │   history table)      │                          │
                              pattern controller         │                       ▼                          │
                              └─► irregular descriptor ──┘              column queue ◄──── read data ───────┘
                                   memory                                       │
                                                                   port A ──────▼
                                                        3D scratchpad (32 x 32 x 64 words)
                                                                   port B ──────┐
 core ◄── whole window / cycle ── register file (load, reuse, update) ◄─ data manager
 core ─── core_wr_* (results) ──────────────────────────────────────► port B
```

## Descriptors

All blocks share one descriptor format, `pams_pkg::descriptor_t`:

| field        | bits | meaning |
|--------------|------|---------|
| `local_addr` | 16   | scratchpad word address of element 0 |
| `main_addr`  | 32   | main-memory word address of element 0 |
| `prio`       | 4    | priority; a larger value is served first |
| `size`       | 16   | number of elements |
| `stride`     | 32   | signed distance between elements, in words |
| `offset`     | 6    | index of the next descriptor of a chain |
| `link`       | 1    | `offset` is valid (the chain goes on) |
| `dir`        | 1    | `DIR_LOAD` main → scratchpad, `DIR_STORE` scratchpad → main |

Element *i* of a pattern lives at `main_addr + i*stride` in SDRAM and at
`local_addr + i` in the scratchpad. A strided or scattered pattern therefore
lands on chip as a dense block. A *chain* is a list of descriptors linked
through `offset`, and it is transferred as one request. Descriptors live in two
64-entry memories (`descriptor_memory`):

* the **regular** memory holds static patterns. The core writes them over the
  program line (`prog_*`) and starts them by index (`req_*`);
* the **irregular** memory is filled at run time by the address manager.

## Run-time address manager: from addresses to descriptors

Some address streams are only known while the program runs. For these, the
core hands its addresses one at a time to the address manager (`rt_select`,
`rt_addr`, `rt_last`, `rt_ready`). An address is taken on a clock edge where
`rt_select` and `rt_ready` are both high. The manager turns the stream into as
few descriptors as it can:

1. A FIFO (8 entries) buffers the addresses.
2. The **stride detector** keeps the previous address in *reg 0* and outputs
   the difference `Address(t) − Address(t−1)`.
3. The **pattern controller** keeps the stride of the pattern it is building
   in *reg 1*. While each new stride equals reg 1, it increments *Size*. When a
   stride differs, it raises *start*: the descriptor is closed, and the current
   address opens the next one.
4. Each closed descriptor is written to the next free index of the irregular
   memory. Its `offset` points to the index after it. The last one (closed by
   `rt_last`) has `link = 0`. The chain's data is placed contiguously in the
   scratchpad from `rt_local_base`, and the descriptors get priority `rt_prio`.
5. Once the chain is complete, it is queued in the memory manager.

Example: the addresses `100,101,102,103, 500,505,510, 7, 9000,12000`
become four descriptors: `(100, stride 1, size 4)`, `(500, 5, 3)`,
`(7, 0, 1)` and `(9000, 3000, 2)`. The first address after a break always
opens a new descriptor, and the address after it fixes that descriptor's
stride. An irregular stream therefore costs one descriptor per run, and a
fully random one costs one descriptor per address.

Latency: an address reaches the pattern controller 3 cycles after it is taken.
A descriptor is written 1 cycle after it is closed. The FIFO is not popped in
the cycle after the last address of a stream.

## Memory manager: scheduling and reuse

`memory_manager` buffers the requests from both sources. It moves them one per
cycle into a 4-entry pending table, together with the priority and size read
from their head descriptor. When idle, it picks one pending request under one
of two policies, chosen by `sched_auto`:

* **programmed** (`sched_auto = 0`): the highest priority goes first. On a tie,
  the lowest table slot goes first;
* **automatic** (`sched_auto = 1`): priorities are ignored, and the request
  whose head descriptor moves the fewest elements goes first. Short transfers
  therefore do not wait behind long ones. On a tie, the lowest slot goes first.

It then walks the chosen request's chain. For each descriptor:

* if it is a **load** and the **history table** (`history_table`, 8 entries)
  shows the same pattern (main address, stride, size) already at the same
  scratchpad address, the descriptor is skipped. This costs one cycle, and
  `n_reused` counts it;
* otherwise the descriptor goes to the PAMMC, and the history table is updated
  when the transfer completes. A load inserts its pattern and drops every
  entry whose scratchpad area it overwrote. A store drops every entry whose
  main-memory span it overlaps, so a later load of that area transfers again.

When the chain ends, `done_valid` pulses with the request's index, and
`done_irr` says which descriptor memory it came from. Only one descriptor is
in flight at a time, whether it comes from the memory manager or the tile unit.

## PAMMC: the pattern-aware main-memory controller

`pammc` moves one descriptor's pattern:

* `pammc_addr_gen` expands `(main_addr, stride, size)` into one word address
  per cycle. A stride register and an adder step the address. A counter
  compared with the stream length acknowledges the end of the pattern.
* Each address is split into `{row[13:0], bank[2:0], column[9:0]}`. This gives
  8 banks of 16K rows of 1K 32-bit words.
* `bank_manager` issues `ACT`, `RD`, `WR`, `PRE` and `PREA` on the `sd_*` port.
  It works in one of two modes:
  * **single-bank mode** keeps one bank/row open. An access to that row issues
    at once. Any other access precharges all banks and activates the new row.
    This mode is used for patterns with a stride below one row (< 1024 words).
    A unit-stride pattern costs one activate and then streams one word per
    cycle.
  * **multi-bank mode** keeps one open row per bank and only precharges the
    bank it needs. This mode is used for strides of one row or more, which
    visit several banks. A second pass over the same rows finds them all
    still open. The banks also work in parallel. Each bank has its own timer,
    and the PAMMC passes the next address of the pattern (current + stride)
    along with the current one. While the current access waits for its bank,
    the free command slots precharge and activate the next access's bank. A
    row-stride stream where every access misses drops from 7 to 4 cycles per
    word.

  Timing respected: `T_RCD` (ACT to RD/WR) and `T_RP` (PRE to ACT), per bank,
  both 3 cycles by default. The SDRAM returns read data in order after its CAS
  latency. There is no refresh.
* For a load, read data passes through a 16-word column queue and is written to
  scratchpad port A. For a store, each word is read from port A and written to
  SDRAM, one word every two cycles.

`row_hits`, `activates` and `precharges` count what happened.

## Scratchpad, data manager and register file

The scratchpad (`scratchpad_memory`) has `SCRATCHPAD_BLOCKS` = 64 planes of
`SCRATCHPAD_WIDTH` × `SCRATCHPAD_HEIGHT` = 32 × 32 words. That is one 1K × 32
block RAM per plane, 64K words in all. A local address is
`plane*1024 + y*32 + x`, where x runs along the width and y along the
height. The scratchpad is a true dual-port RAM with a
one-cycle read latency:

* port A belongs to the PAMMC;
* port B belongs to the core side.

On port B the **data manager** serves sliding-window jobs (`dm_start`,
`dm_local_base`, `dm_n_win`, `dm_step`). Window *k* contains the words
`base + k*step … base + k*step + WIN − 1` (default `WIN` = 8). The **register
file** assembles each window:

* the *load register* collects only the elements new to the window;
* the *reuse register* holds the previous window;
* the *update register* is the reuse register shifted by `step`, with the new
  elements on top.

The core sees the whole window at once on `win[0..WIN-1]` (element 0 is the
oldest), with the handshake `win_valid`/`win_ready`. The first window costs
`WIN` scratchpad reads, and every later one costs `step`. With `step = 1` and
a ready core, a new window arrives every cycle. The core can write results
through `core_wr_*`. Each such write takes port B for that cycle and stalls the
data manager. A store descriptor then writes the results back to SDRAM.

## Tiles of a 3D data set

Large 3D data sets do not fit on chip. The tile unit (`auto_tiler`) moves them
one scratchpad-sized piece at a time. The data set is configured once:

* `cfg_ds_base`, `cfg_ds_width`, `cfg_ds_height` and `cfg_ds_depth` describe
  it. Element (x, y, z) is at `base + (z*height + y)*width + x`;
* `cfg_sp_base` says where the tile goes in the scratchpad.

A tile is named by its index (`tile_x`, `tile_y`, `tile_z`). It is the
32 × 32 × 64 block whose corner is that index times the scratchpad
dimensions. `tile_start` begins the transfer, and `tile_dir` selects load or
store. The unit walks the tile's rows, which are the 32 words contiguous in
main memory, y first, then z. It hands each row to the PAMMC as a unit-stride
transfer, so no descriptor memory is used. Row (y, z) lands at scratchpad
address `sp_base + z*1024 + y*32`, which matches the scratchpad layout above.

Tiles on the edge of a data set that is not a multiple of the tile size are
clipped. A tile wholly outside the data set finishes at once. `tile_done`
pulses when the last row is done, and `tile_rows` counts rows.

The tile unit and the memory manager share the PAMMC. When both want to
start, the memory manager goes first. A tile load empties the history table,
because it overwrites scratchpad areas the table may describe. A full
32 × 32 × 64 tile of a 128³ data set is 2048 rows. It loads at 1.24 and
stores at 2.15 cycles per word.

## Top-level interface (`pams_top`)

| group | ports | protocol |
|-------|-------|----------|
| program line | `prog_en, prog_idx, prog_desc` | write one regular descriptor per cycle |
| static requests | `req_valid, req_idx, req_ready` | one request per cycle; it is dropped if `req_ready` is low |
| run-time addresses | `rt_select, rt_addr, rt_last, rt_ready, rt_local_base, rt_prio` | valid/ready; `rt_last` ends the stream |
| completion | `done_valid, done_idx, done_irr` | one pulse per finished request |
| scheduling | `sched_auto`, `hist_clear` | policy select; empty the history table |
| tiles | `cfg_ds_*`, `cfg_sp_base`, `tile_start, tile_x, tile_y, tile_z, tile_dir, tile_busy, tile_done, tile_rows` | start while `!tile_busy`; `tile_done` pulses at the end |
| windows | `dm_*`, `win_valid, win, win_ready, win_reused` | one job at a time |
| core writes | `core_wr_en, core_wr_addr, core_wr_data` | one word per cycle into the scratchpad |
| SDRAM | `sd_cmd, sd_bank, sd_row, sd_col, sd_wdata, sd_rvalid, sd_rdata` | command per cycle; read data in order |
| status | `multi_bank, row_hits, activates, precharges, n_transfers, n_reused, hist_entries, dm_loads, dm_reuses, rt_start` | counters and flags |

All state changes on the rising edge of `clk`. `rst_n` is an active-low
asynchronous reset. Scratchpad contents are not reset.

Parameters of `pams_top` and their defaults:

* `SCRATCHPAD_WIDTH` = 32, `SCRATCHPAD_HEIGHT` = 32, `SCRATCHPAD_BLOCKS` = 64 —
  the published scratchpad geometry;
* `WIN` = 8, `T_RCD` = 3, `T_RP` = 3 — chosen here.

Widths are constants in `pams_pkg`.

## Departures and choices

What comes from the publication: the block structure, the descriptor fields,
the two descriptor memories, and the stride detector and pattern controller
(reg 0/comparator 0, reg 1/comparator 1/increment/start). Also: priority
scheduling, the existence of an automatic policy, the history table's purpose, the 32 × 32 × 64 scratchpad, the
load/reuse/update registers, the PAMMC address generator
(stride register, adder, address increment, compare, ack), the
bank/row/column split, the single- and multi-bank modes, and moving a 3D data
set one scratchpad-sized tile at a time, with the data-set fields (base,
width, height, dimension).

What is this design's own choice, because the publication does not give it:
all widths and depths, the 32-bit word, the address split order, every
handshake, the data manager's sliding-window job format, the history table's
match and invalidation rules, the rule of the automatic policy (shortest
transfer first), the multi-bank threshold (one row), the one-access bank
lookahead, the tile unit's row order, clipping and its sharing of the
controller, the SDRAM timing (no tRRD, tFAW or tRAS, no refresh), and the
direction bit and link bit in the descriptor.

Not implemented:

* **Parallel patterns per bank.** The described controller keeps a row-decoder
  FIFO per bank and can serve several patterns at once, each in its own bank.
  Here one pattern is served at a time, in order. Banks overlap only within a
  pattern, through the lookahead. The 1–32 KB row buffer is a
  16-word queue, and the controller does not pre-charge the next contiguous
  row ahead of time.
* **2D/3D descriptors.** Descriptors are 1D (size, stride). A 2D or 3D block
  is a chain of row descriptors, or, for scratchpad-sized tiles of a data
  set, the tile unit's job.
* **Word width versus capacity.** The publication quotes both a 32 × 32 × 64
  scratchpad and a 128 KB scratchpad. These agree only for 16-bit words. This
  design uses 32-bit words, so the default scratchpad holds 256 KB.
* The **MicroBlaze/ASHA cores**, the core-side **mode multiplexer**, and the
  **DDR3 SDRAM** and its PHY are outside the design. `tb/sdram_model.sv` is a
  behavioural SDRAM for simulation.

How the evaluated configurations fit the default build:

| configuration | needs | built | fits |
|---|---|---|---|
| static kernels (1–3 descriptors each) | ≤ 3 descriptors | 64 | yes |
| Laplacian, one descriptor per row of 128 × 128 | 128 descriptors | 64 | in two rounds |
| 32 × 32 × 64 tile of a 128³ data set | 2048 rows of 32 words | tile unit, 65536-word scratchpad | yes |
| 128 B / 4 KB transfers (32 / 1024 words) | size ≤ 1024 | size ≤ 65535 | yes |
| register-file windows of 8³ … 32³ elements | up to 32768 elements | `WIN` = 8 (parameter) | no |

## Simulation

Each block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5, from the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pams_pkg.sv tb/tb_pams_top.sv --top-module tb_pams_top -Mdir obj
obj/Vtb_pams_top
```

`tb_pams_top` runs the whole system at its default sizes against the SDRAM
model, in under a second. It runs these steps:

1. Programs static descriptors.
2. Checks that queued requests are served by priority.
3. Reads a 1024-word tile back as sliding windows at one window per cycle.
4. Reads a row-stride (multi-bank) pattern while the core writes, which
   stalls the data manager.
5. Sends a run-time address stream with three stride changes and checks the
   chain it becomes.
6. Requests a tile again, which is reused from the history table.
7. Stores the core's results to SDRAM and reloads them.
8. Loads a clipped tile of a small 3D data set with the tile unit while a
   static load shares the controller, and checks that the history table was
   emptied.

It counts each mechanism (single-bank and multi-bank accesses, row hits,
precharges, stride changes, stalls, register reuse, history reuse). It fails
if any of them never happened. The SDRAM model flags any command that breaks
the bank state or the `T_RCD`/`T_RP` timing.

Three more system-level testbenches run workloads at the default sizes:

* `tb_pams_throughput` copies 16K words from one SDRAM area to another
  through the scratchpad. It uses load/store descriptor pairs of 32 words
  (128 B) and of 1024 words (4 KB), and checks every copied word and the
  rate. Measured rates:

  | transfer | load | store |
  |---|---|---|
  | 128 B | 1.53 cycles/word | 2.44 cycles/word |
  | 4 KB | 1.02 cycles/word | 2.01 cycles/word |

* `tb_pams_stencil` computes one 32 × 32 tile of a 5-point Laplacian on a
  128 × 128 image. A chain of 34 row descriptors loads the haloed block with
  a single request. The core reads sliding windows and writes its results
  into the scratchpad. A chain of 32 store descriptors writes them back, and
  every result word is checked in SDRAM.

* `tb_pams_tile3d` loads tile (1, 2, 1) of a 128³ data set into the full
  scratchpad and stores it into a second data set. It checks all 65536
  words each way, and takes about half a minute.

The block testbenches are:

* `tb_descriptor_memory`, `tb_stride_detector`, `tb_pattern_controller` and
  `tb_address_manager`, which compare against descriptor lists computed in the
  testbench;
* `tb_history_table`, which runs against a reference table;
* `tb_scratchpad_memory`, which covers the full 64K-word array;
* `tb_auto_tiler`, which checks every row descriptor of interior, clipped and
  empty tiles;
* `tb_register_file` and `tb_data_manager`, which check window contents,
  reuse counts and the window rate;
* `tb_pammc_addr_gen`, `tb_bank_manager` and `tb_pammc`, which check
  addresses, open-row bookkeeping, the speed-up from the bank lookahead, the
  rate of unit-stride streams, and data through SDRAM;
* `tb_memory_manager`, which checks priority order, shortest-first order under
  the automatic policy, reuse, invalidation by a
  store and chain order.

All of them pass when state not covered by reset starts at random values.
