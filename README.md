# Low-power multiplexer tree with dynamic input selection control

Wide N-to-1 multiplexers are built from trees of 2-to-1 cells. In the usual
construction all cells of one tree level share one address bit. When that bit
changes, every cell of the level switches, and its output toggles, although
only one cell per level lies on the path from the selected input to the
output. With wide data (tens or hundreds of bits per cell) those useless
switching events cost a large share of the multiplexer's power.

This design gives **every cell its own selection signal** and puts a small
registered **controller** in front of the tree. When the address changes, the
controller updates only the selection signals of the cells on the new output
path. All other cells keep their previous selection, so at most one cell per
level switches because of a selection change. The price is the controller
itself: N-1 flip-flops plus some decode logic. That pays off once the data is
a few bits wide or more. The controller's own power is reduced further by
splitting it into two levels and clock-gating the lower level in groups.

The RTL is parameterised by the number of inputs `N` (a power of two), the
data width `W` and the clock-gating group size `G`. The defaults are the
largest configuration the architecture was evaluated at: 256 inputs of
128 bits, with eight clock-gated groups of 31 registers.

## The on-path update rule

Number the tree levels from 0 (next to the inputs) to S-1 (the output cell),
with S = log2 N. Cell `j` of level `l` chooses between nodes `2j` (select 0)
and `2j+1` (select 1) of the level below. For address `a`, the cell on the
path at level `l` is cell `a >> (l+1)`, and it must select `a[l]`.

The controller keeps one register per cell and applies this rule each cycle:

* register of cell `j` at level `l` loads `a[l]` **if** `a[S-1:l+1] == j`;
* otherwise it keeps its value.

The output cell (level S-1, j = 0) always loads `a[S-1]`.

An 8-input example. After address `000` all selections are 0. Address `011`
then changes only the level-0 cell 1 (S01) and the level-1 cell 0 (S10); the
output cell stays 0. A shared-select tree would have switched all four
level-0 cells and both level-1 cells.

**Resource sharing.** Written directly, the "on path" condition of a low-level
cell compares many address bits. Instead, the decode is built top-down: a
cell is on the path when its parent is on the path and the parent's address
bit points to it,
`upd(l, j) = upd(l+1, j>>1) & (a[l+1] == j[0])`.
The comparison of the high bits is thus shared by all levels below.
This is the *Single-Level Controller* (`sl_ctrl`).

## Two-Level Controller and clock-gated groups

In the single-level form every register is written every cycle: registers off
the path reload their own value through a hold multiplexer. That costs clock
and flip-flop power. The *Two-Level Controller* (`tl_ctrl`) cuts the tree at
level `G`:

* **Level-2 Controllers** (`l2_ctrl`), one per subtree of 2^G inputs, hold that
  subtree's 2^G - 1 cell registers. Each group has a latch-based clock gating
  cell (`cg_cell`). Its enable is "the upper address bits equal my group
  index". Only the group that contains the addressed input receives a clock
  edge. Inside the group the same on-path rule runs on the G low address
  bits, so its decode is much smaller than a full-tree decode.
* The **Level-1 Controller** handles the 2^(S-G) - 1 cells above the cut. It
  is a single-level controller on the upper S-G address bits and runs on the
  free clock.

Registers clocked per cycle:

| tree        | groups         | Level-1 regs | group regs | written per cycle | single-level |
|-------------|----------------|--------------|------------|-------------------|--------------|
| 32-to-1     | 4 of 7 (G=3)   | 3            | 7          | 10                | 31           |
| 64-to-1     | 4 of 15 (G=4)  | 3            | 15         | 18                | 63           |
| 64-to-1     | 8 of 7 (G=3)   | 7            | 7          | 14                | 63           |
| 128-to-1    | 4 of 31 (G=5)  | 3            | 31         | 34                | 127          |
| 128-to-1    | 8 of 15 (G=4)  | 7            | 15         | 22                | 127          |
| 256-to-1    | 4 of 63 (G=6)  | 3            | 63         | 66                | 255          |
| 256-to-1    | 8 of 31 (G=5)  | 7            | 31         | 38                | 255          |

Fewer, larger groups need fewer gating cells and enable decodes. More,
smaller groups need fewer register writes and less decode per group. The
default group size follows the sizing rule of the original architecture:

* `2^G - 1 = 2^(S-2) - 1` (four groups) for N < 256;
* `2^(S-3) - 1` (eight groups) for N = 256.

It is computed by `mux_tree_pkg::default_group_bits`. Groups smaller than
7 registers are not worth gating. When `G` gives such a group, `tl_ctrl`
builds the plain single-level controller instead. This happens for 8- and
16-input trees with the default `G`, and whenever `G = 0` is set explicitly.

For N = 16 the published tables do report a small gain from the two-level
form. The sizing rule, however, gives 3-register groups there, below the
7-register minimum. This RTL follows the minimum and does not gate 16-input
trees by default. Set `G = 3` to get two 7-register groups. For N above 256,
eight groups are used; the original rule does not cover those sizes.

## Timing and interface

Top module `lp_mux_tree #(N, W, G)`:

| port       | dir | width       | meaning                                           |
|------------|-----|-------------|---------------------------------------------------|
| `clk`      | in  | 1           | clock of the selection registers                  |
| `rst_n`    | in  | 1           | asynchronous, active-low reset: selects input 0   |
| `mux_sel`  | in  | log2 N      | address of the input to select                    |
| `mux_in`   | in  | N x W       | data inputs, `mux_in[i]` is input i               |
| `mux_out`  | out | W           | selected data                                     |
| `cell_sel` | out | N-1         | per-cell selection signals (for observation)      |

* The address is registered. `mux_out` equals `mux_in[a]` from the clock edge
  after `a` was presented. The data path has no register, so `mux_out`
  follows changes of the selected input within the same cycle.
* Everything is one clock domain. The gated group clocks are derived from
  `clk` through the gating latch. The group registers read only primary
  inputs and their own state.
* `cell_sel` uses a flat layout: cell `j` of level `l` is bit
  `N - (N >> l) + j` (`mux_tree_pkg::sel_offset`). It exists for tests and
  toggle counting and can be left open.
* Reset is this design's own addition; the original description has none. It
  is asynchronous so it also reaches groups whose clock is gated off.

## Files

`rtl/`:

* `mux_tree_pkg.sv`: index helper `sel_offset`, group sizing
  `default_group_bits`, `use_clock_gating`.
* `mux2_cell.sv`: W-bit 2-to-1 cell.
* `mux_tree_indep.sv`: the tree, one selection input per cell.
* `sl_ctrl.sv`: single-level controller with the shared on-path decode.
* `cg_cell.sv`: latch-based clock gating cell.
* `l2_ctrl.sv`: one clock-gated group (`cg_cell` + `sl_ctrl`).
* `tl_ctrl.sv`: two-level controller (Level-1 `sl_ctrl` + `l2_ctrl` groups),
  or the single-level fallback.
* `lp_mux_tree.sv`: top, `tl_ctrl` + `mux_tree_indep`.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:

* `tb_lp_mux_tree_full.sv`: the default 256 x 128 tree under the random
  workload, 64 x N = 16384 cycles with a new random address and new random
  data on all inputs every cycle.
* `tb_lp_mux_tree_configs.sv` with `lp_mux_tree_harness.sv`: 33
  configurations side by side, 64 x N cycles each. The random workload runs
  at N = 8 to 256, W = 1 and W = 128, with the default grouping. It also runs
  with the single-level controller (G = 0) at every N, and with the
  alternative grouping for 64, 128 and 256 inputs. The low-activity workload
  (one input rewritten per cycle) runs at every N with both controllers. The
  testbench prints the register writes per cycle of each configuration (the
  table above).
* `tb_lp_mux_tree_regfile.sv`: the default tree reading `regfile_1w.sv`, a
  behavioural single-write-port register file. One entry is written per
  cycle, which gives the low-switching input data of register-file reads.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends. For
example:

```
verilator --binary --timing --top-module tb_lp_mux_tree_full \
  -y rtl -y tb rtl/mux_tree_pkg.sv tb/tb_lp_mux_tree_full.sv
./obj_dir/Vtb_lp_mux_tree_full
```

The full-size runs take a few seconds. For lint: `verilator --lint-only -Wall
-y rtl rtl/mux_tree_pkg.sv rtl/lp_mux_tree.sv`.

The testbenches check the following:

* **Reference model.** Every cycle the per-cell selections are compared with
  an independent model that updates only the addressed path. The output is
  compared with the input addressed one cycle earlier. The tree test finds the
  expected input by walking the selection bits down from the output.
* **At most one change per level.** No level may change more than one
  selection signal per cycle.
* **Clock gating.** Each group's gated clock pulses exactly in the cycles its
  group is addressed. A gated-off group still resets. The register writes per
  cycle match the table above (18 and 14 for the two 64-input groupings, 38 at
  full size).
* **Transition counts.** Selection-signal transitions are counted against a
  tree whose levels share one select. Under random addresses at 256 inputs
  this gives about 4 transitions per cycle against about 128.
* **Events that must occur.** Suppressed level switches, gated-off groups,
  group changes, held addresses with changing data, and a reset in mid-run
  are counted, and each must happen at least once.

## How far it goes, and where it departs

* **Power is not modelled.** The architecture's claims are power ratios from
  gate-level analysis in a 0.18 um library. For 256 x 128 bits they are about
  0.42 of a conventional tree under random data, and about 0.07 when only one
  input changes per cycle. RTL simulation can only show the mechanisms behind
  them: fewer selection transitions and fewer register writes. Toggle counts
  from the testbenches are a proxy, not a power figure.
* **Explicit clock gating.** In the original flow, synthesis replaces the
  enable multiplexer with a gating cell. Here `cg_cell` is instantiated
  explicitly, a latch plus an AND. Lint and synthesis report a latch in it;
  that is intended. Map it to the library's integrated clock gating cell in
  a real flow and apply the usual clock-gating timing checks.
* **Hold multiplexers inside gated groups** are kept as drawn in the original
  Level-2 structure. The gating alone would already prevent writes of off-path
  groups.
* **Cell preservation.** The published flow kept synthesis from restructuring
  the tree into other cells. Each cell here is a separate `mux2_cell`
  instance. Preserving them (dont-touch on `mux2_cell`) is a synthesis-script
  matter and not expressed in the RTL.
* **W-bit cells.** `mux2_cell` is W bits wide with one select, standing for W
  one-bit library cells that share that select.
* **Power-of-two sizes only.** Unbalanced trees for other N are left open, as
  in the original work.
* **Not built.** The conventional shared-select tree is not part of the
  design; it appears only as a toggle count in the testbenches. The
  gated 3-register-group variant of the 8-input tree was found worse than no
  gating and is not offered.
