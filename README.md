# Multi-context FPGA with a reconfigurable context memory switch block

A multi-context FPGA keeps several complete configurations ("contexts") on
chip and switches between them in one cycle. This lets one array act as
different circuits over time. The usual cost is configuration memory. A
conventional multi-context switch stores one bit per context and selects one
with the context ID, so four contexts need four memory cells and a
multiplexer at every routing switch. Switch blocks hold most of an FPGA's
configuration, so this overhead dominates.

This design exploits two properties of real multi-context configurations:

* **Redundancy.** Most routing switches are on in every context or off in
  every context. Only a few percent of configuration bits change when the
  context changes. Such a switch needs one stored bit, not four.
* **Regularity.** Switches that do change often follow simple patterns, such
  as "on in contexts 0 and 2". Switches with the same pattern can share the
  hardware that produces it.

The storage element is a **floating-gate functional pass-gate (FGFP)**: a
single floating-gate transistor that is both the memory cell and the routing
switch. The switch block built from FGFPs is called a **reconfigurable context
memory (RCM)**. It spends a multi-context circuit only on the switches that
need one.

The RTL models the FGFP by its logic function. It builds the RCM, a
multi-context logic block, the cell, and a 4 x 4 array joined by single- and
double-length lines. All of it is synthesizable SystemVerilog.

## Context ID

There are `N_CTX = 4` contexts. The context ID `S` is 0..3, carried as two
bits `S1 S0`, and context *k* has `S = k`. In the device the ID is one
multi-valued voltage on the control gates. Its complement `S-bar = N-1-S`
(here `3-S`) is also distributed. In the RTL both are 2-bit numbers driven to
every switch block by `ctx_driver`.

A switch's behaviour across contexts is a 4-bit **pattern**, written
C3 C2 C1 C0. For example, `0101` is a switch that is on in contexts 0 and 2.

## From a pattern to transistors: literals and windows

An FGFP stores a threshold `vth` (0..4). It conducts when the level on its
control gate is at least `vth`:

    up-literal   UL(S, T) = 1 if S >= T

With `S-bar` on the gate instead, the same device gives a down-literal,
because `S <= T` is the same as `S-bar >= N-1-T`:

    down-literal DL(S, T) = UL(S-bar, N-1-T) = 1 if S <= T

Two FGFPs in series (a wired AND) give a **window literal**, which is on for
a run of consecutive contexts LO..HI:

    WL(S, LO, HI) = UL(S, LO) & UL(S-bar, N-1-HI)

Any pattern is the OR of its runs of ones. With four contexts a pattern has
at most two runs (`0101` and `1010` have two), and in general at most N/2.
So a multi-context switch is up to N/2 window literals in parallel (a wired
OR). For example, the `0101` switch is

    F(S) = WL(S,0,0) | WL(S,2,2)
         = (S>=0 & S-bar>=3) | (S>=2 & S-bar>=1)

| pattern class | examples | hardware |
|---|---|---|
| same in all contexts | `0000`, `1111` | one constant FGFP |
| follows S1 | `1100`, `0011` | one window literal |
| single run | `0001`, `0110` | one window literal |
| follows S0 | `1010`, `0101` | two window literals |

Threshold `4` is above every level, so it means "never conducts", and
threshold `0` means "always conducts". An FGFP that has never been
programmed is in its erased state and never conducts. An unconfigured array
is therefore inert.

## The RCM switch block (`rcm`)

The RCM crosses `H` horizontal tracks (inputs `h_in`) with `V` vertical
tracks (outputs `v_out`). It contains three kinds of FGFP:

1. **Crossing FGFPs**, one at each of the H x V crossings. The control gate
   is tied to the top level, so the FGFP is simply on (`vth = 0`) or off
   (`vth = 4`) in every context. This one device serves every
   context-independent switch, which is most of them.
2. **Literal paths**, `P` of them, shared by the whole block. A path is one
   window literal: an FGFP on `S` in series with an FGFP on `S-bar`.
3. **Entry and exit FGFPs** of each path: one from every horizontal track
   into the path, and one from the path to every vertical track. These are
   constant FGFPs like the crossings.

A context-dependent switch from track *h* to track *v* takes one path per run
in its pattern. Each such path has entry *h* and exit *v* on, and its window
set to that run. Switches that share a horizontal track and a pattern can
share paths by opening several exits: a `1010` signal fanning out to two
tracks costs two paths, not four. The number of windows per switch is set by
configuration, not fixed in silicon.

The model of the block, per vertical track *v*:

    v_out[v] = OR_h ( h_in[h] & cross[h][v] )
             | OR_p ( (OR_h h_in[h] & entry[p][h]) & window[p] & exit[p][v] )

**Size.** At the default 4 x 4 tracks with `P = 2`, the block has
16 + 2 x (4 + 4 + 2) = 36 FGFPs. Giving every crossing its own two-window
switch would take 16 x 4 = 64 FGFPs, so the RCM uses 56%. Against an SRAM
design (4 six-transistor cells, a 4:1 multiplexer and a pass transistor per
crossing), the saving is about an order of magnitude.

**Limits of the model.**

* Tracks have a direction. Horizontal tracks are inputs and vertical tracks
  are outputs. Several conducting paths onto one vertical track are ORed.
* A real pass-transistor network is bidirectional, and entering one path
  from two horizontal tracks would short them. The RTL ORs them instead and
  an assertion reports such a configuration at the next clock edge, so it
  should be avoided.
* Electrical behaviour (resistance, threshold spread, programming pulses)
  is outside the model.

**Programming.** The block is programmed one FGFP (or one window pair) per
clock through `prog_we`, `prog_addr` and `prog_data`. With `B = H*V` and
`STRIDE = H+V+1`:

| address | programs | data |
|---|---|---|
| `h*V + v` | crossing FGFP | threshold in bits [2:0] |
| `B + p*STRIDE + h` | entry of path p from track h | threshold |
| `B + p*STRIDE + H + v` | exit of path p to track v | threshold |
| `B + p*STRIDE + H + V` | window literal of path p | `wl_cfg_t {vth_up, vth_dn}` |

For run LO..HI, set `vth_up = LO` and `vth_dn = N-1-HI`. An unused path
keeps its exits off.

## FGFP and window literal (`fgfp`, `window_literal`)

`fgfp` is a 3-bit threshold register with a comparator:
`on = (level >= vth)`.

* The register has no reset, because the device is non-volatile.
* Its initial value is the erased state (4, never on).
* It changes only through `prog_we`.

`window_literal` is two `fgfp`s ANDed, one on `s` and one on `s_bar`. Both
blocks are combinational from the level to `on`.

## Cell (`mcfpga_cell`) and logic block (`logic_block`)

A cell is a logic block attached to an RCM. On each side (N, E, S, W) the
cell has:

* `SINGLE = 2` single-length lines that arrive from, and leave to, the
  adjacent cell;
* `DOUBLE = 1` double-length line that connects it to the cell two steps
  away.

The RCM's horizontal tracks are all 12 arriving lines plus the logic-block
output (H = 13). Its vertical tracks are all 12 departing lines plus the 4
logic-block inputs (V = 16). Any arriving line, or the logic-block output,
can therefore be routed to any departing line or logic-block input, per
context. Track numbers:

    horizontal  side*3 + t        single line t of that side (t = 0, 1)
                side*3 + 2        double line
                12                logic-block output
    vertical    side*3 + t, side*3 + 2   departing lines, as above
                12 + k            logic-block input k
    side: N = 0, E = 1, S = 2, W = 3

The cell's RCM has `P = 7` literal paths: 3% of its 208 crossings, rounded
up. That follows the observation that under 3% of configuration bits change
between contexts.

In the cell's programming port, addresses below `NRCM = H*V + P*(H+V+1)`
(418) go to the RCM. Address `NRCM + k` writes context *k* of the logic
block.

The logic block is a 4-input look-up table with its own truth table per
context, plus a flip-flop:

* `prog_data[16]` selects the registered output for that context.
* `prog_data[15:0]` is the truth table. Input 0 is the least significant
  index bit.
* The flip-flop loads every clock and is cleared by `rst_n`.

Look-up tables need little configuration, so they keep one plain word per
context; only routing uses the RCM.

## The array (`mcfpga_top`)

`ROWS x COLS = 4 x 4` cells. Row 0 is north and column 0 is west.

* A single-length line joins neighbouring cells.
* A double-length line runs from a cell to the cell two steps away in the
  same row or column, passing the cell between without entering its switch
  block. A long route then crosses half as many switch blocks.

One `ctx_driver` feeds `s` and `s_bar` to every cell.

Lines that would cross the array boundary are ports:

* `edge_in[side][pos]` and `edge_out[side][pos]`, where `pos` is the column
  on N/S and the row on E/W.
* Each holds 4 bits: the two single lines of the edge cell, the double line
  of the edge cell, then the double line of the cell one step inside.
* For a non-square array, positions beyond the shorter side are unused and
  `edge_out` is 0 there.

Programming selects a cell with `prog_cell = row*COLS + col` and uses that
cell's address map.

**Context switching and timing.** Raise `ctx_load` with `ctx_next` in one
cycle. After the next rising edge, `ctx` and every switch and look-up table
in the array are in the new context. Routing is combinational from
`edge_in` to `edge_out`. A logic block in registered mode adds one cycle.
Reset returns to context 0 and clears the flip-flops. It does not touch the
configuration.

**Combinational loops.** Like any FPGA routing fabric, the netlist has loops
through the crossbars: a line can leave a cell and come back, and a logic
block's output can reach its own input. Verilator reports these as
`UNOPTFLAT`. A configuration must not close such a loop unless a registered
logic block breaks it.

## What follows the architecture and what is this design's choice

The following follow the architecture:

* four contexts selected by a 2-bit ID, with S-bar = N-1-S;
* FGFPs as combined memory and switch, computing up-literals;
* down-literals built as up-literals on S-bar;
* window literals as series pairs, and switches as wired ORs of at most N/2
  windows;
* constant FGFPs between horizontal and vertical tracks for
  context-independent switches;
* a configurable number of windows per switch;
* cells made of a logic block and an RCM;
* single- and double-length lines.

The following are this design's own:

* the exact RCM network (shared paths with entry and exit FGFPs on every
  track) and `P`, chosen so that the 4 x 4 block lands near 60% of a
  full-switch-per-crossing design;
* the directed-track, wired-OR model of pass transistors;
* the logic block (4-input LUT per context, optional flip-flop), which the
  architecture only names;
* track counts, the array size, edge ports and the cell-level crossbar
  shape;
* the programming ports and address maps, and the one-cycle context load;
* the erased state being "never conducts".

## Files

| file | contents |
|---|---|
| `rtl/mcfpga_pkg.sv` | constants (`N_CTX`, widths, `VTH_NEVER`/`VTH_ALWAYS`), `wl_cfg_t`, side enum |
| `rtl/fgfp.sv` | FGFP: stored threshold, `on = level >= vth` |
| `rtl/window_literal.sv` | FGFP on S in series with FGFP on S-bar |
| `rtl/rcm.sv` | RCM switch block |
| `rtl/ctx_driver.sv` | context register, S and S-bar |
| `rtl/logic_block.sv` | multi-context 4-LUT with optional flip-flop |
| `rtl/mcfpga_cell.sv` | logic block + RCM, line/track mapping |
| `rtl/mcfpga_top.sv` | array, single/double lines, edges |
| `tb/mc_cfg_tb_pkg.sv` | pattern to window thresholds, and the one-bit-per-context reference |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_five_switch_workload` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
has a watchdog. For example, the end-to-end test at full default size:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
        rtl/mcfpga_pkg.sv tb/mc_cfg_tb_pkg.sv tb/tb_mcfpga_top.sv \
        --top-module tb_mcfpga_top
    ./obj_dir/Vtb_mcfpga_top

Replace `tb_mcfpga_top` by any other testbench name. `-Wno-fatal` is needed
because the fabric's combinational loops are reported as warnings.

What each test establishes:

* **`tb_fgfp`, `tb_window_literal`.** Every threshold pair at every level,
  retention, and the window for context 2 alone.
* **`tb_rcm`.** Every FGFP cleared; then the two-window switch `0101`; two
  crossings with pattern `1010` sharing both paths; and 30 random
  configurations. All are checked in every context against a switch block
  that stores one bit per crossing and context.
* **`tb_ctx_driver`.** Reset, the one-cycle load, S-bar, and hold.
* **`tb_logic_block`.** Every entry of every context's table, and the
  registered mode's one-cycle delay.
* **`tb_mcfpga_cell`.** Random constant crossings, plus context-dependent
  routes until the 7 paths run out, checked against a reference model of
  the crossbar and look-up table.
* **`tb_five_switch_workload`.** Five example switches `0001`, `1010`, `0000`,
  `1010`, `1111` in one cell, with the two identical switches sharing paths
  (3 paths in total).
* **`tb_mcfpga_top`.** The full 4 x 4 array at default parameters, with four
  contexts configured on row 1 and column 2:
  * context 0: a single-length route across the row;
  * context 1: a double-length route;
  * context 2: a combinational AND in a logic block;
  * context 3: a registered XOR;
  * in every context: a constant vertical double-length route.

  Contexts are switched in random order. The test checks the one-cycle
  switch and counts each mechanism it exercises.

The `tb/mc_cfg_tb_pkg.sv` helpers (`count_runs`, `run_window`) are the
recipe for turning a pattern into RCM programming writes.

## Changing the design

* **`N_CTX`** (package) sets the number of contexts; the widths follow.
  Testbenches that write patterns as 4-bit literals assume four contexts.
* **`rcm`**: `H`, `V`, `P`.
* **`mcfpga_cell` / `mcfpga_top`**: `SINGLE`, `DOUBLE`, `K` and `P`. `P`
  defaults to 3% of the cell's crossings. `ROWS` and `COLS` must each be at
  least 2.
* The address maps above are derived from these parameters. Testbenches
  compute them the same way.
