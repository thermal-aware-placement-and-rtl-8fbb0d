# Thermal-aware multi-voltage block selection and a counter-based inner-product multiplier

Hot spots form where blocks with a high power density sit close together.
The method behind this design attacks them in two ways. First, it spreads the hottest
blocks along the chip edges and surrounds them with white space. Second, it lowers the
supply voltage of busy blocks as far as their timing allows. That gives a floorplan of
voltage islands on three rails, V_low, V_medium and V_high. The method is then applied to
a signal-processing multiplier that computes inner products with counters instead of
multipliers and adders.

This repository holds synthesizable SystemVerilog for both parts:

* **`msv_proximity`**, the *proximity-factor unit*. For a placed floorplan it measures how
  strongly the hot blocks heat each block.
* **`msv_select`**, the *block selection engine*. It takes a table of floorplan blocks and
  computes, for each block, a thermal cost, a rank, a hot/edge-placement flag, a supply
  rail that still meets the critical timing, the resulting power, a white-space amount, and
  a flag that asks for a soft block to be enlarged.
* **`ip_array`**, the *counter-based inner-product array* (merged arithmetic). It computes
  `P = sum_{k=0}^{L-1} A_k * B_k` for unsigned operands, or for two's-complement operands
  using the modified Baugh-Wooley form. It can use a Dadda or a Wallace reduction tree.

`thermal_msv_top` places three parts side by side: the proximity unit chained into the
engine, one unsigned array and one signed array (both Dadda). Each part has its own ports,
and all share the clock and reset.

## The inner-product array

### Idea: count partial-product bits instead of adding products

Split each operand into bits:

    P = sum_k (sum_i A_k(i) 2^i)(sum_j B_k(j) 2^j)
      = sum_i sum_j C(i,j) 2^(i+j),   C(i,j) = sum_k A_k(i) & B_k(j)

`C(i,j)` is simply the number of ones among the L partial-product bits at position
(i,j). A processing element (PE) per position holds an AND gate and a small binary
counter. The AND output is the counter's enable. After L clocks the L "vertical" bits of
the position have become `W = floor(log2 L) + 1` "horizontal" bits. The final adder tree
therefore only has to add `M*N*W` bits instead of `L*M*N`, which is where the area saving
comes from.

```
 A_k (M bits) ──┐   one element pair per clock
 B_k (N bits) ──┤
                ▼
   M x N PEs: PP = A_k(i) & B_k(j)  (NAND on the signed sign row/column)
              W-bit counter, enable = PP, cleared at the first element
                │  after L elements
                ▼
   pipeline register (loaded once per L clocks: the "clock2 = L x clock1" edge)
                │
                ▼
   composite bit matrix: counter bit b of PE (i,j) has weight 2^(i+j+b)
   Dadda or Wallace tree of full/half adders → 2 rows → vector merging adder
                │
                ▼
   + eps (signed only)  →  P
```

### Signed operands

In two's complement the top bit of each operand has a negative weight. The modified
Baugh-Wooley rewrite turns each negative partial-product term `-x` into `(1 - x) - 1`.
This changes three things:

* The PEs of the sign row (`i = M-1, j < N-1`) and of the sign column (`j = N-1, i < M-1`)
  count **NAND** instead of AND bits. The corner PE `(M-1, N-1)` keeps AND, because its
  term is positive.
* Every PE keeps its ordinary weight `2^(i+j)`, so the tree is the same as in the unsigned
  array.
* The "-1" parts add up to one constant per element. Over a vector it is
  `eps = L * (-2^(M+N-1) + 2^(M-1) + 2^(N-1))`.
  This constant is fixed at elaboration and added to the tree output, modulo 2^PW.

The result `p` is `PW = M + N + W` bits wide. That is 11 bits at the default
M = N = 4, L = 7. In signed mode `p` is a two's-complement number; all values in the range
-392..448 fit.

### Timing

The design uses one clock. `ip_ctrl` counts the accepted elements. It marks the first
element of each vector (`clr`: the counter restarts from that element's bit, so no idle
cycle is needed between vectors). It raises `load` for one cycle after the L-th element.
That load enable is this design's stand-in for the separate clock2 = L x clock1.

| event | cycle |
|---|---|
| last element of a vector accepted (`in_valid` high) | t |
| pipeline register loads the finished counts | t+1 |
| `out_valid` pulses, `p` valid (held until the next result) | t+2 |
| first element of the next vector may be applied | t+1 |

The throughput is one inner product per L accepted elements. Dropping `in_valid` pauses
the counters, so a vector may arrive with gaps.

### The reduction tree (`ip_reduction_tree`)

The schedule is computed at elaboration by a constant function, and the adders are then
laid out with `generate` loops. Each stage takes one column's bits in a fixed order: its
full-adder sums, then its half-adder sums, then the bits it passes through, then the
carries arriving from the column below. Carries made in a stage are only used in the
next stage.

* **Dadda** (`TREE_DADDA`, the default): stage targets 2, 3, 4, 6, 9, 13, … A column is
  reduced only as far as the target needs, counting the incoming carries.
* **Wallace** (`TREE_WALLACE`): every complete group of three bits goes to a full adder,
  and a leftover pair goes to a half adder.

Both stop at two rows, which one `+` adds. At 4x4, L = 7 the tree has 48 input bits in 11
columns.

## The proximity factor (`msv_proximity`)

The method's cost function needs a proximity factor. It is large for a block that sits
close to hot blocks:

    P_B(i) = 256 * sum over hot blocks j != i of (p_i + p_j) / d_ij^2, divided by n

Here `p` is a block's power and `n` the number of hot blocks. A block is hot when its
power density is above the mean plus one standard deviation (`msv_hot_detect`, shared
with the engine). `d_ij` is the edge-to-edge distance of the two rectangles:
`d^2 = dx^2 + dy^2`, where dx and dy are the gaps between the rectangles, zero where
their extents overlap. Blocks that touch count as `d^2 = 1`. The result is in units of
1/256 and saturates at 16 bits.

The unit evaluates one (i, j) pair per clock using a combinational divider. `done` comes
`NBLK*(NBLK+1) + 2` cycles after `start`, which is 112 cycles for 10 blocks. In the top
level, `sel_start` starts this unit, and its `done` starts the engine with the computed
factors in place of the `proximity` fields of `sel_blk`. The factors are also output on
`sel_pb`. Hold `sel_blk` and `sel_geom` steady while `sel_busy` is high.

## The block selection engine (`msv_select`)

For `NBLK` blocks (default 10), each with a power density, a switching activity (Q0.8), a
proximity factor P_B, the delay-model constants `C_charge` and `k`, the switched
capacitance `C_total` and a soft-block flag, the engine does the following:

1. **Cost and rank.** `cost = (alpha*activity + beta*pd + gamma*P_B) >> 8`, where alpha,
   beta and gamma are Q0.8 fractions below 1 (`msv_cost`). Rank 0 is the hottest block;
   ties go to the lower index.
2. **Hot blocks → edge.** A block is hot when its power density is above the mean plus
   one standard deviation. The engine tests this with integers only:
   `N*pd > S` and `(N*pd - S)^2 > N*Q - S^2`, where `S = sum pd` and `Q = sum pd^2`.
   Hot blocks get `edge_place`.
3. **Rail assignment.** A block with `activity > act_thresh` starts on the lowest rail.
   The engine checks the delay model `T = C_charge*V / (k*(V-Vt)^2) < t_crit`, evaluated
   by cross-multiplication. While the check fails, the block moves up one rail, one clock
   per attempt. Quiet blocks stay on V_high, where all blocks start. If a block fails even
   on V_high, it keeps V_high and gets `timing_met = 0`.
4. **Power.** `power = C_total * V^2 * f` at the chosen rail.
5. **White space.** `whitespace = cost * ws_scale`: the more heat, the more halo.
6. **Soft blocks.** `resize` is set for a soft block with `cost > eps_thresh`.

Handshake: pulse `start` with the table applied. The engine latches the table and raises
`busy`. `done` pulses when all results in `res` are valid, and they stay valid until the
next start. Run time is `2 + sum(1 + rail attempts)` cycles; quiet blocks take 1 cycle
each.

The rails default to 1.2 / 1.5 / 1.8 V with Vt = 0.45 V, a choice that suits a 180 nm
process. They are parameters (`V_LOW_MV`, `V_MED_MV`, `V_HIGH_MV`, `VT_MV`). All other
quantities are unsigned integers in units of the user's choosing.

## What is not in the RTL, and where it departs from the method

* The geometric floorplanning is not here: block coordinates, moving hot blocks to the
  edges, rotation and swapping, reshaping soft blocks, routing, and the temperature model.
  The method does this in a software placer. The hardware takes a placement as input,
  computes its proximity factors and makes the decisions that feed the placer.
* The per-block form of the proximity factor, and the handling of touching blocks, are
  this design's reading of the formula.
* The supply rails, power grid and level shifters of the voltage islands are physical
  structures and are not modelled.
* The method's flowchart labels the two branches of the timing decision in the opposite
  way from its step list. The RTL follows the step list: a block is raised only while its
  delay is not below the critical timing.
* The rail voltages, the fixed-point formats, the white-space law (linear in cost), the
  hot-block test used for edge placement, the tie-breaking of ranks, the engine's cycle
  timing and the stream handshake of the array are this design's own choices.
* The PE counter is a synchronous binary counter, not a ripple counter, and clock2 is a
  load enable, not a second clock.
* The published area, power and delay comparisons (8-10% less area, about 3% less power
  and 5-13% less delay than a conventional array) are synthesis results for a 180 nm
  library. They cannot be checked by simulating this RTL.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ip_array`, top | `M`, `N` | 4, 4 | operand word lengths |
| `ip_array`, top | `L` | 7 | inner-product length; counter width `W = floor(log2 L)+1` |
| `ip_array` | `SIGNED_MODE` | 0 | 1 = two's complement (NAND PEs + eps) |
| `ip_array`, top | `TREE` | `TREE_DADDA` | or `TREE_WALLACE` |
| `msv_proximity`, `msv_select`, top | `NBLK` | 10 | number of floorplan blocks |
| `msv_select` | `V_LOW_MV`, `V_MED_MV`, `V_HIGH_MV`, `VT_MV` | 1200, 1500, 1800, 450 | rails and threshold in mV |

The two benchmark floorplans ami33 and ami49 have 33 and 49 blocks, so they need `NBLK`
set to 33 or 49.

## Files

`rtl/`
- `ip_pkg.sv`: tree type, width helpers, NAND placement, Baugh-Wooley constant
- `ip_pe.sv`: AND/NAND plus ones counter
- `ip_ctrl.sv`: L-element sequencing, clear and load (clock2) strobes
- `ip_pipe_reg.sv`: pipeline register
- `ip_reduction_tree.sv`: Dadda/Wallace reduction and vector merging adder
- `ip_array.sv`: the inner-product array
- `msv_pkg.sv`: block table and result types, rail enum
- `msv_cost.sv`: cost function
- `msv_hot_detect.sv`: hot-block test (mean plus standard deviation)
- `msv_proximity.sv`: proximity factor per block
- `msv_select.sv`: the selection engine
- `thermal_msv_top.sv`: the top level

`tb/`
- `tb_<module>.sv`: one self-checking testbench per module
- `tb_thermal_msv_top.sv`: the whole design at its default parameters
- `tb_msv_select_ami.sv`: 33- and 49-block floorplans, using the rig in `msv_select_rig.sv`

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. A watchdog ends a
run that hangs and counts it as a failure.

## Simulating

With Verilator 5, run from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ip_pkg.sv rtl/msv_pkg.sv tb/tb_thermal_msv_top.sv \
    --top-module tb_thermal_msv_top -Mdir obj_top
./obj_top/Vtb_thermal_msv_top
```

Use the same command for any other testbench: change the file name and `--top-module`,
and let `-Irtl -Itb` find the modules it uses. The end-to-end test runs in under a
second. It compares every result with a reference computed in the testbench: `sum A*B`
for the arrays, and floating-point mean, standard deviation and delay for the engine. It
checks that each result appears exactly two cycles after its vector ends. It also
requires that each mechanism occurs at least once:

- a proximity factor is nonzero
- every rail is used
- a block steps up a rail after a failed timing check
- a block misses timing on V_high
- a block is hot
- a soft block is resized
- a vector has an idle cycle inside it
- two vectors arrive back to back
- a signed result is negative
- an unsigned result is at full scale

`tb_ip_array` also runs a signed 8x6, L = 16 array. `tb_ip_reduction_tree` checks both
trees at 4x4/L = 7 and at 6x5/L = 12.
