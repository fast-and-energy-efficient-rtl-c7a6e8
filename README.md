# Approximate motion estimation for 4K UHD video

This is a motion estimator for HEVC-style video encoders. For every 8x8 and
16x16 block of a 64x64 coding tree unit (CTU) it finds the best matching block
in a reference frame, first at whole-sample precision and then at quarter-sample
precision. It saves energy in two ways:

1. **Fewer block sizes.** Only 8x8 and 16x16 prediction units (PUs) are
   searched. Together these two sizes cover a large share of the pixels an
   encoder predicts.
2. **Cheap arithmetic where errors are tolerated.** The absolute difference at
   the bottom of every SAD (sum of absolute differences) tree uses a
   lower-part-OR adder (LOA). The LOA drops the carry chain of the low bits.
   Only that first stage is approximate. Every adder above it is exact, so the
   error does not grow up the tree.

The integer search is a trimmed Test Zone Search (TZS). It always evaluates
candidates in groups of 16, one block line per clock, and it stops after at
most 240 candidates. This gives a bounded and known worst-case time per PU.
The fractional search (FME) interpolates and scores all 48 quarter and half
positions around the integer result. It uses the standard HEVC 8-tap luma
filters.

## Top level (`me_top`)

`me_top` holds six processing chains. Each chain is a TZS unit followed by an
FME unit:

| chains | PU size | PUs per chain per CTU | group |
|---|---|---|---|
| 4 | 8x8 | 16 | chain *m* covers the 32x32 quadrant *m* (raster order inside) |
| 2 | 16x16 | 8 | chain *m* covers the 64x32 half *m* |

All chains run at the same time. A chain's TZS starts its next PU as soon as
its previous result has been handed to the FME. While the FME is still busy,
the TZS holds its result and the chain's `tzs_stall` bit is high.

Each finished FME result is written into an 80-entry SAD table (SAD plus
quarter-sample vector):

- entries 0..63 hold the 8x8 PUs, at index chain·16 + k;
- entries 64..79 hold the 16x16 PUs, at index 64 + chain·8 + k.

The table is released only after every chain has finished the CTU. It is then
streamed out in index order on `out_valid/out_ready/out_idx/out_sad/out_qmv`.
A new CTU can start once the table has emptied (`ctu_busy` low).

### Memory ports

The frame memory is not part of the design. Every chain has its own read ports,
and the memory must answer in the same cycle as the request.

**TZS ports (`t8_*`, `t16_*`).** The TZS asks for one block line of 16
candidates at a time, and the memory returns 17 lines:

- `*_pu` names the PU; its position in the CTU is given by `pu8_x/pu8_y` and
  `pu16_x/pu16_y` in `me_pkg`;
- `*_line` names the line;
- `*_cand_mv` gives the 16 candidate vectors;
- `*_cur_line` returns the current-block line;
- `*_ref_line` returns the 16 reference lines at PU position + vector.

**FME ports (`f8_*`, `f16_*`).** The FME reads an (N+8)x(N+8) window whose
top-left corner is at PU position + integer vector − 4:

- `*_idx` names a window row (`*_vert`=0) or a window column (`*_vert`=1);
- `*_cur_line` returns current row `idx−4` during the row reads.

## The SAD datapath

**LOA (`loa_adder`).** The LOA splits the 8-bit add:

- The low `LOW` bits (5 by default) are a plain OR of the operands.
- The high bits are an exact adder.
- The carry into the high part is the AND of the two operands' top low bits.

`LOW=0` gives an exact adder.

**Absolute difference (`loa_absdiff`).** It computes `a + ~b` with one LOA:

- If the carry is set (a ≥ b), the result is the sum + 1, saturating at 255.
- Otherwise the result is the bitwise inverse of the sum.

With an exact adder this is exactly |a−b|.

**SAD tree (`sad_tree`).** It has N absolute differences, then a register, then
log2 N levels of plain ripple adders. There is a register after each level
except the last. From line in to line SAD out takes log2 N clock edges.

**Accumulator and comparator (`sad_accumulator`, `sad_comparator`,
`sad_comparator_tree`).**

- The accumulator loads the line SAD on the first line of a block and adds it on
  the other lines.
- The two-input comparator subtracts the two SADs. The sign of the difference
  selects the smaller SAD and its vector; on a tie, input 0 wins.
- The comparator tree registers each level. 16 inputs take 4 cycles. Inputs
  that are not a power of two are padded with the largest SAD.

## Integer search: the TZS schedule and its cycle count

`tzs_scu` evaluates 16 candidates in parallel. A new block line goes into the
16 SAD trees each cycle, and one comparator tree reduces the 16 block SADs.
Every candidate carries a tag (its vector and the log2 of its search step), so
the control can tell which expansion won.

`tzs_control` decides what to search next. The published architecture fixes
only these points:

- a zero start vector;
- no raster step;
- 16 candidates per expansion;
- at most 5 expansions in the first search;
- at most 240 candidates;
- a range of 31..148 cycles per 8x8 PU and 56..272 per 16x16 PU.

Within those limits, this design uses the following pattern.

**Expansion.** An expansion of step *s* around a centre has 16 points: the
8-point square of radius *s*, plus 8 points at (±s, ±2s) and (±2s, ±s). The
exact order is in `me_pkg::tzs_offset`. Every vector is clamped to ±64.

**First search.** Steps 1, 2 and 4 around (0,0).

- If a step-1 point wins, the search ends.
- If a step-4 point wins, a far phase follows with steps 8 and 16 around (0,0).
- Otherwise the search goes straight to refinement.

**Refinement.** Steps 1, 2, 4, 8 and 16 around the best point so far. This
repeats while it improves the SAD and while 5 more groups still fit under the
15-group (240-candidate) limit. (The (0,0) centre itself is never scored; it
would need a 17th candidate.)

**Timing.** A group of N lines issues in N cycles. After the last group of a
phase, the decision waits log2 N + 4 cycles for the trees, the accumulators and
the comparator. The next phase issues in the same cycle the decision is made.
So:

- cycles = groups·N + decisions·(log2 N + 4)
- 8x8: 3·8 + 7 = **31** (shortest) and 15·8 + 4·7 = **148** (longest)
- 16x16: 3·16 + 8 = **56** and 15·16 + 4·8 = **272**

These match the published figures exactly. They count from the first line
request to `res_valid`.

## Fractional search: interpolation schedule

`fme_module` runs a fixed schedule over the (N+8)² window.

1. **H phase, N+8 cycles.** Each window row is filtered horizontally for the
   three phases 1/4, 1/2 and 3/4. The unrounded results are written into the
   fractional buffer in `fme_interp`. The rounded samples of rows 4..N+3 are
   scored right away by 6 SAD trees, one per horizontal offset
   (−3, −2, −1, +1, +2, +3 quarter samples).
2. **V phase, N cycles.** Window columns 4..N+3 are filtered vertically. The 6
   vertical-offset candidates are scored.
3. **D phase, 3·(N+1) cycles.** For each horizontal phase, the N+1 buffered
   columns are filtered vertically. Each column feeds two neighbouring
   horizontal offsets, so 12 trees score the 36 diagonal candidates.

The interpolator is a 3-stage pipeline. Behind it are a tree, an accumulator
stage, and a 49-input comparator tree (padded to 64, 6 cycles). Input 0 of the
comparator is the integer result, so a whole-sample vector can still win.
Total latency:

- 5N + 11 + log2 N + 9 cycles
- **63** for 8x8 and **104** for 16x16, as published.

Rounding follows HEVC practice:

- H and V samples: `clip((s+32)>>6)`
- diagonal samples, from the unrounded horizontal values:
  `clip(((s>>>6)+32)>>6)`

## Where this design departs from, or adds to, the published architecture

- **TZS pattern.** The exact expansion pattern, its order and the refinement
  rule are this design's own (see above). They were chosen to meet the
  published limits and cycle counts.
- **Chains.** Four 8x8 chains, two 16x16 chains, and the PU grouping are a
  choice that splits the CTU evenly.
- **LOA split.** The 5 approximate / 3 exact bit split is a choice.
- **Comparisons.** Tie-breaking, and letting the integer position compete in
  the FME comparison, are choices.
- **Memory.** The memory system is left outside and must answer in one cycle.
  There is no search-window cache or data reuse.
- **Throughput is slightly below the published rate.** A worst-case CTU
  (every 8x8 PU taking 148 cycles) needs about 16·150 + 63 + 80 ≈ 2550 cycles:
  - each PU adds about 2 cycles of start/handshake overhead;
  - the table read-out (80 cycles) is not overlapped with the next CTU.

  The published 4K/30 fps operating point at 145 MHz allows about 2370 cycles
  per CTU, so this RTL needs about 156 MHz for the same worst case. Typical
  CTUs are much faster: 1074 and 1760 cycles from start to table release on the
  test frames.
- **Gate-level results.** Area, power and maximum clock rate depend on the
  technology. They are not reproduced here.

## Files

- `rtl/me_pkg.sv`: widths, vector types, the TZS offset table, HEVC filter taps,
  and the PU placement functions.
- `rtl/*.sv`: one module per file, as listed above. Every parameter defaults to
  the published configuration.
- `tb/tb_<module>.sv`: a self-checking testbench per module. Each prints
  `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
- `tb/tb_ref_pkg.sv`: the independent reference models.
  - bit-level LOA;
  - the TZS search (with its cycle count);
  - the HEVC interpolation and the 48-candidate FME search;
  - synthetic smooth frames with a known global motion.
- `tb/tb_me_top.sv`: runs two complete CTUs through the default configuration.
  - It checks all 160 table entries against the reference.
  - It counts TZS stalls, shortest and longest searches, integer and fractional
    winners, read-out back-pressure and table releases.
  - It fails if any of these never happened.

## Simulating

Any testbench can be built with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_me_top \
    rtl/me_pkg.sv tb/tb_ref_pkg.sv tb/tb_me_top.sv
./obj_dir/Vtb_me_top
```

Replace `tb_me_top` with any other `tb_<module>`. The full-CTU test runs in
well under a minute. All control state is reset; data registers are written
before they are read, so random power-up values do not matter.

To see how much the approximation costs, set `LOW` on `me_top` (or on
`LOA_LOW_BITS` in the package) to 0. This gives exact SADs.
