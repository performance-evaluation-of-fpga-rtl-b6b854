# Pipelined cellular-automaton engine with ping-pong memory banks

This is the FPGA side of an accelerator for two-dimensional cellular automata
(CA). Its target is a lattice far too large to hold on chip, for example
1024 x 1024 cells. The lattice lives in two external SRAM banks. In each pass, or
**sweep**, the lattice streams out of one bank, through a pipeline of **n
compute blocks**, and into the other bank. Every block computes one generation,
so one sweep advances the lattice by n generations. The banks then swap roles,
and the next sweep runs in the opposite direction. The engine streams k cells
per memory word and holds only a narrow band of the lattice. Its throughput is
therefore set by the memory bandwidth multiplied by the pipeline depth n.

Two rules are provided and picked at compile time:

| rule | bits/cell | cells per 16-bit word (k) | default engine |
|---|---|---|---|
| Conway's Game of Life (B3/S23) | 1 | 16 | n = 16, w = 9 (the default build) |
| HPP lattice gas | 4 | 4 | n = 8, w = 16 recommended (see below) |

These sizes match a Spartan-3 starter board: an XC3S200, two 256K x 16
asynchronous SRAMs that share their address pins, and a 50 MHz clock. On that
board n = 16, w = 9 is the largest engine that fits.

## How the lattice is cut up

**Words.** A 16-bit memory word holds k vertically adjacent cells of one column.
Lane j of the word is row `word*k + j`, and it sits in bits `[j*SW +: SW]`. Storage is
column-major:

    address = column * (Y/k) + row_word

**Planes.** A compute block holds just three columns (left, middle, right), and
each column is only **w words** (w*k cells) tall. The lattice is therefore
processed in horizontal bands, called *computational planes*. A plane is streamed
through the engine column by column: w words of column 0, then w words of column
1, and so on.

**Why planes overlap.** A block has no data above the top row or below the bottom
row of its plane. It computes those two rows with a stand-in *boundary state*
(`bc_state`), so they come out wrong. After n blocks, n rows at each edge of the
plane are wrong. The engine writes back only the words that are wholly correct:

    margin  NMW = ceil(n / k) words at each edge (not written)
    stride  S   = w - 2*NMW words written per plane
    planes  M   = ceil((Y/k) / S) per sweep

Plane p reads row words `p*S - NMW ... p*S - NMW + w - 1`, taken modulo Y/k. Rows
wrap around, so the lattice is periodic top to bottom. When Y/k is not a
multiple of S, the last plane wraps past the bottom and rewrites a few words of
the first plane with the same values. This is harmless because it reads from the
other bank.

Example (Life default): 1024 rows give 64 words per column, with n = 16, k = 16
and w = 9. That makes NMW = 1, S = 7, and M = 10 planes per sweep.

For HPP, k = 4. With n = 16 and w = 9 the margin is 4 words at each edge. That
leaves one written word per plane and 256 planes per sweep, which explains why
this large engine is the *slowest* HPP setup. With n = 8 and w = 16, the margin
is 2 words, S = 12, and M = 22, and the run is about 3.3x faster.

**Columns wrap by re-reading.** A block emits a column only once both of its
neighbours have passed through. Each block therefore loses the first and last
column of its stream. To make the lattice periodic left to right, every plane
streams `x + 2n` columns: all x columns, then columns 0 ... 2n-1 a second time.
The columns that leave the engine are lattice columns n ... x-1, 0 ... n-1, in
that order. The write-column counter starts at n.

## Inside a compute block

A compute block (`ca_cb`) contains k processing elements (`ca_pe`), one for each
lane of the word. Each PE shifts its lane through a chain of 2w+3 stages, and the
chain advances once per word:

    stage 0 .. w-1     right column  (stage 0 = newest word)
    stage w .. 2w-1    middle column
    stage 2w .. 2w+2   first three words of the left column (the rest are never read)

Suppose row word r+1 of the right column has just arrived. The PE then presents three taps, each
holding the left, middle and right cells:

| tap | stages | meaning |
|---|---|---|
| `tap_next` | 0, w, 2w | row word r+1 |
| `tap_cur` | 1, w+1, 2w+1 | row word r (the one being computed) |
| `tap_prev` | 2, w+2, 2w+2 | row word r-1 |

PE j takes its upper row from `tap_cur` of PE j-1 and its lower row from
`tap_cur` of PE j+1. The two end lanes have vertical neighbours in other words.
PE 0's upper row is lane k-1 of word r-1 (`tap_prev` of PE k-1). PE k-1's lower
row is lane 0 of word r+1 (`tap_next` of PE 0). Both of these pass through
`ca_boundary`, which substitutes `bc_state` for the first word of a plane column
(upper row) and for the last word (lower row).

Each word carries a tag with a valid bit and its row-word index within the plane
column. The tags travel through a chain as deep as the data chains. A block's output is valid only when the
middle word and the same-row words of the left and right columns are all valid.
A block delays the stream by w+1 words, and its input register adds one more.
The engine's latency is therefore n*(w+2) - 1 word times. At each new plane, `clear` drops all tags.

The outputs of each block are combinational from its chains. The next block
registers them, so the critical path holds one rule evaluation.

## Rules

`life_rule` counts the 8 neighbours. A cell is alive in the next generation when
the count is 3, or when the count is 2 and the cell is alive now.

`hpp_rule` codes a site as one bit per particle, named by the direction the
particle moves: bit 0 = left, bit 1 = down, bit 2 = right, bit 3 = up. Rows grow
downwards. One step has two parts:

1. **Streaming.** The site gathers four particles:
   - the left-mover of its right neighbour
   - the right-mover of its left neighbour
   - the down-mover of the site above
   - the up-mover of the site below
2. **Collision.** A lone head-on pair is turned by 90°: `0101` (left+right)
   becomes `1010` (up+down), and the reverse. Every other configuration passes
   through unchanged.

## Memory timing and sweep sequencing

Both banks share the address, OE and WE pins, so each cycle can carry only one
access. One word time is two clocks: a **read cycle** and a **write cycle**.

- **Read cycle.** The control block puts the source address on the bus. The
  asynchronous SRAM returns the word within the same cycle, and the engine takes
  it in at the clock edge.
- **Write cycle.** The engine's current output word goes to the destination
  bank, if it is valid and lies inside the written window.

After the read stream ends, the control block keeps the pipeline advancing with
empty words until the plane's last word has been written. The control block (`ca_ctrl`) runs through
these states:

    IDLE -start-> PLANE (clear engine) -> RD -> WR -> RD -> ... -> PLANE ... -> SWEEP (swap banks) -> ... -> IDLE, done

Exact cycle counts, which the testbenches check:

    A (word times per plane) = w*(x + 2n) + 2n - NMW - 1
    clocks per plane          = 1 + 2*A
    clocks per sweep          = M*(1 + 2*A) + 1

The first sweep always reads bank A. After `sweeps` sweeps, `result_bank`
names the bank that holds the result: B after an odd number of sweeps.

Measured totals for 512 generations of a 1024 x 1024 lattice at 50 MHz:

| configuration | clocks | time |
|---|---|---|
| Life, n=16, w=9 (default build) | 6,102,112 | 122 ms |
| Life, n=16, w=6 | 6,519,328 (32 x one measured sweep) | 130 ms |
| Life, n=16, w=3 | 13,101,088 (32 x one measured sweep) | 262 ms |
| HPP, n=8, w=16 | 46,896,320 | 0.94 s |
| HPP, n=16, w=9 | 156.2 M (formula) | 3.1 s |

A simple analytical model of this architecture counts `w*(x + 3n + 1)` word
times per plane, and `Y/(w*k - 2n)` planes per sweep, a fractional number. For
the Life case, its simplest form, which drops the `3n + 1`, gives 5.39 M clocks.
The full form gives 5.65 M clocks. This design takes 6.10 M clocks. Its count per
plane is 9,534 word times, slightly below the model's 9,657. The difference is
that it must run 10 whole planes where the model counts 9.14.

Published measurements from the original board are read off plots, so they are
approximate. They give about 5.6 M, 6.6 M and 13.2 M clocks for the three Life
rows, and about 46 M and 158 M for the two HPP rows. These values are close to
this design's counts.

## Interfaces (`ca_accel_top`)

| group | ports | notes |
|---|---|---|
| command | `start`, `sweeps[15:0]`, `bc_state` → `busy`, `done` (1-cycle pulse), `result_bank` | `start` is sampled while idle. `sweeps = 0` gives `done` at once. |
| host memory port | `host_req`, `host_we`, `host_bank`, `host_addr`, `host_wdata` → `host_ready`, `host_rdata`, `host_rvalid` | One access per cycle, only while the engine is idle (`host_ready`). Read data arrives on the next cycle. |
| SRAM pins | `sram_addr`, `sram_oe_n`, `sram_we_n`, `sram_ce_n[1:0]`, `sram_dout[1:0]`, `sram_dq_oe[1:0]`, `sram_din[1:0]` | Index 0 = bank A. Each bidirectional data pad is split into a driven value, an enable and a read-back value. Byte enables are not used. |

In a complete system, a small microcontroller drives the host port. It loads the
lattice, starts the engine, waits for `done`, unloads the result and relays the
data to a PC over a serial line. That controller and its serial link are not
part of this RTL.

Reset `rst_n` is asynchronous and active low. It clears the control state and
the valid tags. The data shift registers are not reset.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `RULE` | `RULE_LIFE` | `RULE_LIFE` or `RULE_HPP` (package `ca_pkg`) |
| `SW` | from `RULE` | bits per cell |
| `K` | 16 / SW | cells per 16-bit word |
| `X`, `Y` | 1024, 1024 | lattice size |
| `N` | 16 | compute blocks (generations per sweep) |
| `W` | 9 | words per plane column |
| `AW` | 18 | SRAM address width (2^18 words = 512 KB per bank) |
| `GW` | 16 | width of the sweep count |

Constraints, checked at elaboration:
- k divides Y.
- w ≥ 2*ceil(n/k) + 1.
- w ≤ Y/k.
- x*Y/k ≤ 2^AW.

For the HPP build, set `RULE(RULE_HPP), K(4), N(8), W(16)`.

## Files

| file | content |
|---|---|
| `rtl/ca_pkg.sv` | rule enum, state width, HPP bit names |
| `rtl/life_rule.sv`, `rtl/hpp_rule.sv` | cell rules |
| `rtl/ca_boundary.sv` | plane-edge substitution |
| `rtl/ca_pe.sv` | processing element |
| `rtl/ca_cb.sv` | compute block |
| `rtl/ca_engine.sv` | pipeline of n blocks |
| `rtl/ca_ctrl.sv` | plane/sweep sequencer, address generation |
| `rtl/sram_port.sv` | shared-pin SRAM bus and host arbitration |
| `rtl/ca_accel_top.sv` | top level |
| `tb/sram_model.sv` | behavioural asynchronous SRAM (testbench only) |
| `tb/engine_harness.sv`, `tb/top_harness.sv` | reusable checkers with their own reference models |

## Simulation

Every testbench is self-checking. Each one prints a single
`TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench | what it runs |
|---|---|
| `life_rule_tb`, `hpp_rule_tb` | Exhaustive (512 and 65,536 inputs). HPP is also checked for conservation of mass and momentum. |
| `ca_boundary_tb`, `ca_pe_tb`, `sram_port_tb` | Randomised unit tests. |
| `ca_cb_tb`, `ca_engine_tb` | Random planes streamed with random gaps. Output data is compared with a cell-level reference, along with row tags, latency and column loss. |
| `ca_ctrl_tb` | Controller plus a real engine on a 20 x 96 Life torus. Checks the read-address order, per-sweep write coverage, cycle count and final lattice. |
| `ca_accel_top_tb` | Small end-to-end runs for Life and HPP through the host port. Each mechanism (plane change, bank swap, column re-read, row wrap, edge substitution, dropped margin words, host access, collisions) must occur at least once. |
| `ca_accel_full_tb` | Default build, 1024 x 1024 Life, 512 generations (under a minute of simulation). |
| `life_points_tb` | 1024 x 1024 Life with w = 3 and w = 6, one sweep each. |
| `hpp_workload_tb` | HPP at 1024 x 1024: all 512 generations at n=8, w=16, plus 2 sweeps at n=16, w=9 (about 2 min). |

Example with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
        rtl/ca_pkg.sv tb/ca_accel_full_tb.sv --top-module ca_accel_full_tb -o sim
    ./obj_dir/sim

## Where this implementation makes its own choices

- **Game of Life rule.** This is standard B3/S23: a live cell with other than
  two or three neighbours dies.
- **Boundaries.** The lattice is a torus in both directions. Hard, fixed-value
  lattice boundaries are not implemented. `bc_state` only fills plane edges
  that are never written back.
- **Margins.** The margin is rounded up to whole words. When k does not divide
  n (for example Life with n = 8), this costs some throughput compared with
  cell-exact overlap.
- **Always in planes.** The engine always works in overlapping planes, even
  when a whole lattice column would fit in one. So a plane must keep at least
  one written word: w ≥ 2*ceil(n/k) + 1.
- **Generation count.** Generations are a whole number of sweeps. There is no
  bypass for a final partial sweep.
- **Memory and host side.** The address map, the host-port protocol, the pin
  split and the write strobe held for a whole cycle are all this design's
  choices. Check them against the SRAM datasheet before use on hardware. In
  particular, real asynchronous SRAMs usually want WE to be released before the
  address changes.
