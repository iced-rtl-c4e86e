# A 6x6 CGRA with per-island voltage and frequency scaling

A coarse-grained reconfigurable array (CGRA) runs the inner loop of a kernel
as a software pipeline: every tile repeats a short schedule of operations, and
one new loop iteration starts every II cycles (the initiation interval). In a
typical mapping a few tiles do most of the work. The others forward data or
sit idle, but all of them still run at full voltage and clock.

This design splits a 6x6 array into nine islands of 2x2 tiles. Each island has
its own supply regulator, clock generator and control unit. Every island runs
at one of four levels:

| level | supply | clock | period in base-clock cycles |
|---|---|---|---|
| normal | 0.70 V | 434 MHz (base clock) | 1 |
| relax | 0.50 V | 217 MHz | 2 |
| rest | 0.42 V | 108.5 MHz | 4 |
| power-gated | off | none | – |

A compiler can put the tiles on a loop's critical recurrence in a normal
island, lightly used tiles in relax or rest islands, and power-gate unused
islands.

For a pipeline of kernels that stream data to each other, a DVFS controller
works on windows of 10 kernel executions. At the end of each window it finds
the slowest kernel. That kernel's islands go up one level; the islands of all
other kernels go down one level.

Everything here is synthesizable SystemVerilog, except two behavioural models:
the regulator (`ldo`) and the clock generator (`adpll`). Every module has a
self-checking testbench.

## Array layout

```
   row 5  30 31 | 32 33 | 34 35        islands:  6 | 7 | 8
   row 4  24 25 | 26 27 | 28 29
          ------+-------+------
   row 3  18 19 | 20 21 | 22 23                  3 | 4 | 5
   row 2  12 13 | 14 15 | 16 17
          ------+-------+------
   row 1   6  7 |  8  9 | 10 11                  0 | 1 | 2
   row 0   0  1 |  2  3 |  4  5
          ^
          left column: ports 0..5 of the scratchpad crossbar
```

- **Numbering.** Tile (r, c) is number `r*6 + c`. Row 0 is at the bottom, and north means row r+1.
- **Islands.** Island `(r/2)*3 + c/2` holds tiles (r, c).
- **Channels.** Every tile has one channel to and from each of its four neighbours.
- **Edges.** Channels at the array edge are tied off.
- **Scratchpad access.** Only the six left-column tiles reach the scratchpad. Tile in row r uses crossbar port r.

## Tokens and predication

A value on the fabric is a `token_t`: 32 data bits plus a predicate bit.
Branches become data flow, as follows:

- **`BR`** passes its first operand on. The predicate is cleared unless the condition operand is non-zero.
- **`PHI`** picks whichever of its two operands has its predicate set.
- **Ordinary operations** give the AND of their operands' predicates.
- **Loads and stores** with a predicate-0 address (or, for a store, predicate-0 data) make no memory access.
- **`EXIT`** ends the kernel only on a valid, non-zero operand.

Invalid tokens use the same channels and cycles as valid ones. The schedule
therefore never depends on the data.

## How a tile executes its schedule

This section matters most when you configure the array.

A tile (`tile.sv`) contains:

- a control memory (`ctrl_mem.sv`) of 32 configuration words;
- three operand registers;
- one single-cycle FU (`fu.sv`);
- a 6x7 crossbar (`tile_xbar.sv`);
- one dual-clock FIFO per output channel (`async_fifo.sv`, 8 entries).

The crossbar has six sources (N, E, S and W inputs, the FU result, and the
constant in the configuration word) and seven destinations (N, E, S and W
outputs, and operand registers 0–2). In one step, any source may go to any
number of destinations.

The control memory steps through words 0 .. II-1 and then wraps.

**Firing rule.** In each cycle of its island clock, a tile tries to execute
the current word. The step *fires* only when all of the following hold:

- every input channel the word routes has a token at its head;
- if the FU result is routed, or the operation is `ST` or `EXIT`, the FU has a result;
- every output FIFO the word writes has room.

When a step fires, four things happen in the same cycle:

- the routed inputs are popped;
- the outputs and operand registers are written;
- the operand registers the FU read are emptied;
- the control memory moves to the next word.

If a step cannot fire, the tile holds it and tries again in the next cycle. A
load that loses scratchpad arbitration also waits.

The firing rule makes the array independent of clock ratios. Take a schedule
made for all tiles at the base clock. In a rest island, each tile step takes
four base-clock periods instead of one. The FIFOs between islands absorb the
difference, and each tile waits for its data. The results stay the same; only
the throughput changes, to whatever the slowest island on a recurrence
allows. The compiler's job is to place only tiles that have slack into slow
islands.

**First pass.** A software pipeline starts with empty registers. During the
first pass through the schedule, a step whose operand registers are still
empty does not wait: its FU result is a predicate-0 token. These "fill"
tokens flow down the pipeline. Stores and exits ignore them, because a
predicate-0 store writes nothing.

A recurrence also needs a starting value. Set bit `boot[o]` in a word to make
destination `o` take the word's constant instead of its normal source, during
the first pass only.

Example: a counter that counts 1, 2, 3, … on a single-word schedule.

- `ADD`, with `sel[4] = FU` and `boot[4] = 1`, and `sel[5] = CONST` with constant 1.
- First pass: the step sends a fill token and loads 1 into both operands.
- From then on, the step adds the constant to its own previous result.

**Configuration word** (`ctrl_t` in `iced_pkg.sv`):

| field | meaning |
|---|---|
| `op` (5 bits) | the operation; see `op_e` |
| `sel[7]` (3 bits each) | source for each destination, in the order N, E, S, W, opnd0, opnd1, opnd2. Sources: N=0, E=1, S=2, W=3, FU=4, CONST=5; 7 means unused |
| `boot[7]` | use the constant for this destination during the first pass |
| `konst` (32 bits) | the constant |

Operations: `ADD SUB MUL DIV REM AND OR XOR SHL SHR EQ NE LT PHI BR LD ST MOV MAC EXIT`.

- Two-operand operations read registers 0 and 1.
- `MAC` also reads register 2.
- `LD`, `MOV` and `EXIT` read only register 0.
- Loads and stores use word addresses.

## Crossing between islands

Every output channel ends in a Gray-pointer FIFO:

- the producing tile writes it on its own clock;
- the neighbour reads it on the neighbour's clock (the tile's second clock input);
- two-flop synchronisers carry the pointers across.

A word written to the FIFO becomes visible to the reader two to three
reader-clock edges later. The depth of 8 covers this round trip. With it, a
stream between two tiles at the same clock runs at one token per cycle, which
`tb_tile` checks.

The three clocks are all derived from the base clock. Their edges line up, so
there are no metastability effects in simulation. The synchronisers are there
so that the design also works with clocks that are not aligned.

## Scratchpad

`spm.sv` is a 32 KB scratchpad: 8 banks of 1024 words of 32 bits.

- **Interleaving.** Word address bits [2:0] select the bank; the next 10 bits select the row.
- **Ports.** Each bank has one read port, read combinationally within the tile's cycle, and one write port, written on the clock.

`spm_xbar.sv` steers the six left-column ports to the banks:

- A read and a write to the same bank proceed in the same cycle.
- Two reads (or two writes) to one bank conflict. The lower row wins, and the loser's `gnt` stays low, so its tile stalls.
- `spm_conflict` at the top level reports such a cycle.

The DMA port (`dma_*`) takes both ports of the bank it addresses. While it is
active, the top level holds back all fabric requests.

## DVFS

### Per island

- `dvfs_ctrl_unit.sv` holds the voltage and frequency table and orders each level change:
  - **Going up:** raise the voltage, wait for power-good, then switch the clock and wait for lock.
  - **Going down:** slow the clock and wait for lock, then lower the voltage.
  - **Power-gating:** stop the clock first, then turn the regulator off.
  - `level` always shows the level whose voltage and clock are both in force.
  - Islands come out of reset power-gated and are then brought up to normal.
- `ldo.sv` models the regulator as a millivolt value that ramps 20 mV per base-clock cycle.
- `adpll.sv` models the clock generator:
  - It divides the base clock by 1, 2 or 4, and switches only at a period boundary.
  - Lock is reported 8 cycles after a change.

### Controller

`dvfs_controller.sv` keeps two tables:

- **mapTable:** a mask of the islands each kernel owns.
- **exeTable:** the base-clock cycles each kernel spent, from its `kernel_start` pulse to its termination, plus the number of terminations.

A window closes when every mapped kernel has finished 10 executions. At that point:

1. The kernel with the most cycles is the bottleneck; a tie goes to the lowest index.
2. The bottleneck's islands go up one level.
3. All other mapped islands go down one level, but never below rest.
4. The tables are cleared.

The host can set any island's level directly (`lvl_*`). This is how levels
chosen at compile time are applied, and the only way to power-gate an island.
`dyn_en` turns the window mechanism on or off.

Termination comes from the fabric:

1. A tile that executes `EXIT` toggles a signal.
2. A synchroniser turns that into a base-clock pulse for the island (`exit_pulse`).
3. A kernel is done (`kernel_done[k]`) when any island in its mask pulses.

## Top level (`iced_cgra.sv`)

Parameters, with their defaults:

| parameter | default |
|---|---|
| `ROWS`, `COLS` | 6 |
| `ISL` | 2 |
| `CTRL_DEPTH` | 32 |
| `FIFO_DEPTH` | 8 |
| `BANKS` | 8 |
| `BANK_WORDS` | 1024 |

All host ports run on the base clock. A run goes like this:

1. **Load configuration** with `run` low: `cfg_we`/`cfg_tile`/`cfg_addr`/`cfg_word` write words, and `cfg_ii_we` writes a tile's II.
2. **Load data** with `dma_*`.
3. **Start.** Pulse `kernel_start[k]` and raise `run`. Every tile begins at word 0 in its first pass.
4. **Wait** for `kernel_done[k]`. Let the pipeline drain, then lower `run`.
5. **Read results** through `dma_*`.
6. **Before the next run,** pulse `flush` (a few cycles, with `run` low). This empties every FIFO and operand register but keeps the configuration.

The outside world — the host CPU, main memory and the DMA engine — is not part
of this design. Its side is brought out as the ports above.

Observation outputs:

| output | meaning |
|---|---|
| `island_level` | current level of each island |
| `island_busy` | a level change is in progress |
| `island_vdd_mv` | modelled supply voltage |
| `island_clk` | generated island clock |
| `tile_fired` | per tile: the step fired |
| `exit_pulse` | per island: a tile executed `EXIT` |
| `spm_conflict` | a scratchpad bank conflict this cycle |
| `window_end`, `bottleneck` | a DVFS window closed, and which kernel was slowest |
| `rd_kernel` → `rd_cycles`, `rd_updates` | exeTable readout |

## Simulating

Each testbench is self-checking. It ends with
`TB_RESULT checks=<n> failures=<m>`, has a watchdog, and uses `$urandom` for
its stimulus. For example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_iced_cgra rtl/iced_pkg.sv tb/tb_iced_cgra.sv
./obj_dir/Vtb_iced_cgra
```

Substitute any `tb/tb_<module>.sv` to test a single block.

`tb_iced_cgra` runs the full array at its default parameters. It maps a
streaming kernel across three islands at three different levels. The kernel:

1. loads a[k] in the left column;
2. computes 3·a[k]+5 in a relax island;
3. routes the result through a rest island and back;
4. compares each value with a sentinel and runs `EXIT` in a fourth island;
5. stores the results through the left column.

Along the way it checks:

- **Clocks:** the island clock ratios 1:2:4, and no clock in power-gated islands.
- **Results:** every stored result, and that the predicate-0 fill tokens write nothing.
- **DVFS window:** ten runs under the window mechanism close exactly one window. The bottleneck's rest and relax islands each go up one level, and an eleventh run at the new levels still computes correct results.
- **Contention:** two left-column tiles loading from the same bank each cycle give bank conflicts, and a consumer that never reads gives back-pressure stalls.

The testbench counts each of these mechanisms and fails if any of them never
happens.

## Fit of the evaluated workloads

The kernels this design targets are loops of 12–42 operations, or 19–71
when unrolled twice, with recurrence lengths (RecMII) up to 23 cycles.

**Single kernel on the whole array** (36 tiles):

- Every kernel fits with II = max(RecMII, ⌈nodes/36⌉), which is 4–7 and well within the 32-word control memory.
- Inputs larger than the 8192-word scratchpad must be streamed in tiles by the DMA: `dtw`, `mvt` and `gemm` at 128x128.

**Pipeline of kernels, each on 1–4 islands of 4 tiles:**

- The worst case is the LU solver step: 69 nodes on 8 tiles with a 23-cycle recurrence. That gives II = 23 ≤ 32.
- The two evaluated applications (a graph neural network and an LU decomposition) each use all nine islands.

**Placement constraint.** Only left-column tiles can load or store, so a
kernel that touches memory needs a left-column island or a neighbour to
forward its data.

## Where this design departs from or goes beyond the reference architecture

- **Tile execution.** The elastic firing rule, the first-pass fill tokens and the boot bits are this design's choices. They reproduce the intended timing: a node at rest takes four base cycles, and early pipeline results are invalid. A statically scheduled array could instead rely on exact cycle counts.
- **Configuration.** The configuration word format, the opcode set, the 32-word control memory and the FIFO depth are this design's own.
- **FU count.** Each tile has one FU, not a set of FUs.
- **Memory access.** The scratchpad uses word addressing, word-interleaved banks, a combinational read and fixed-priority arbitration. A load completes in the tile's cycle.
- **Regulator and clock models.** `ldo` and `adpll` are behavioural models. Slew and lock times are placeholders, and the PLL model cannot produce clocks other than integer divisions of the base clock.
- **Rest clock.** The rest clock is exactly a quarter of the base clock (108.5 MHz), not 108 MHz.
- **Levels.** Static, compile-time levels are written by the host; no compiler is included. Power-gating is host-controlled, and the window mechanism never power-gates an island.
- **Kernel accounting.** The exeTable counts base-clock cycles from `kernel_start` to termination. A window ends only after every mapped kernel has finished 10 executions.
- **Single bottleneck.** Each window raises exactly one kernel, the one with the most cycles. A policy that raises several near-equal kernels would need a threshold, which is not defined here.
- **Not included:** the host CPU, main memory and DMA engine, the accelerator command interface, and any power or area estimation.
