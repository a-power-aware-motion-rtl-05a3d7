# Power-aware motion estimation with content-based subsampling

Full-search block matching is the most expensive step in a video encoder:
every N x N current macro-block (CMB) is compared with every displaced
block in a search window, and the displacement with the smallest sum of
absolute differences (SAD) becomes the motion vector. This design lets the
cost of that search follow the battery. The SAD is taken only over the
pixels selected by a per-block 0/1 mask; processing elements (PEs) whose
mask bit is 0 have both operands forced to zero and stop switching.
Fewer ones in the mask mean less switching activity and less power.

A plain regular subsampling pattern loses high-frequency detail (aliasing)
and hurts the match quality quickly as the rate rises. Here the mask is
*content based*: a 3x3 gradient filter finds the block's edge pixels, and
the mask is the OR of those edge pixels and a regular 8-to-m pattern. Flat
areas are subsampled; edges are always kept. A small feedback loop
adjusts the edge threshold of every macro-block position from frame to
frame, so that the number of ones in the mask settles at the target the
host chose for the current power mode.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, parameterised,
and defaults to 16 x 16 blocks with a search range of -32..+31 in both
directions, for 352 x 288 frames (396 macro-blocks).

## The search criterion

For a candidate (u, v), -p <= u, v <= p-1, the content-based SAD is

    CSSAD(u,v) = sum over x,y in 0..N-1 of CSM(x,y) * |S(x+u, y+v) - R(x,y)|

where R is the current block, S the reference frame (coordinates relative
to the block's top-left corner), x horizontal and y vertical. The motion
vector is the (u, v) with the smallest CSSAD. Candidates are visited with
u in the outer loop and v in the inner loop, both from -p upwards, and
a later candidate replaces the best one only if it is strictly smaller, so
ties go to the first candidate in that order.

## Building the mask

**Regular pattern.** SM(x,y) = BM(x mod 4, y mod 4), where the 4 x 4 basic
mask holds step functions of the rate m (8-to-m, m = 2..8):

    BM = [ u(m-2) u(m-5) u(m-2) u(m-6)
           u(m-3) u(m-7) u(m-4) u(m-8)
           u(m-2) u(m-5) u(m-2) u(m-6)
           u(m-3) u(m-7) u(m-4) u(m-8) ],   u(n) = 1 for n >= 0, else 0

Each step of m adds two pixels per 4 x 4 tile. m = 2 keeps one pixel in
four and m = 8 keeps all of them. (`subsample_mask`, `me_pkg::bm_threshold`)

**Gradient.** One of three filters is built in, chosen by the `FILTER`
parameter. All three run on the 3 x 3 neighbourhood of each pixel:

| `FILTER`     | gradient G                                            | range   |
|--------------|-------------------------------------------------------|---------|
| `FILT_HPF`   | abs(8*centre - sum of the 8 neighbours) (default)      | 0..2040 |
| `FILT_SOBEL` | abs(column-direction Sobel) + abs(row-direction Sobel) | 0..2040 |
| `FILT_MORPH` | window max - window min (dilation minus erosion, flat 3x3) | 0..255 |

Neighbours outside the block are replaced by the nearest pixel inside it.

**Floating threshold and mask.** With Gmax and Gmin the extremes over the
block and m1 in [0, 1] the block position's threshold parameter:

    threshold = m1 * Gmax + (1 - m1) * Gmin
    edge(x,y) = G(x,y) >= threshold
    CSM(x,y)  = SM(x,y) OR edge(x,y),     csm_cnt = number of ones

m1 = 0 makes every pixel an edge (1-to-1, full quality). m1 = 1 keeps
only the strongest gradients on top of the regular pattern.

**Adaptive control.** After each block the stored m1 of that position is
updated for the next frame:

    m1 <- clamp to [0,1] of ( m1 + Kp * (csm_cnt - trg_cnt) / N^2 )

A mask with too many ones raises the threshold, and one with too few lowers
it. Kp sets the speed: useful values are 0.1 to 0.5, and the default is
0.3. The division by N^2 is a choice of this design (see "Choices and
departures").

## Datapath: PE array, shift register array and the snake

This is the least obvious part of the design.

```
 ref_pix ──► SRA col N-1 ──► PE col N-1 ──┐
            ┌─────────────────────────────┘ (top of PE col c+1 → bottom of SRA col c)
            └► SRA col N-2 ──► PE col N-2 ──┐
                    ...                      ...
            └► SRA col 0   ──► PE col 0   ──► (discarded)
```

* Each PE column sits on top of a column of the shift register array (SRA)
  holding 2p-1 pixel registers. A PE column plus its SRA column is a
  chain of L = N + 2p - 1 registers, exactly one column of the search
  window. On every shift all data move up by one.
* The chains are linked into one snake. New search-window pixels enter
  at the bottom of column N-1. The pixel leaving the top PE of column
  c+1 enters the bottom of SRA column c. The window is streamed one pixel
  per cycle in column-major order (all L rows of window column 0, then
  column 1, ...). So once the first N*L pixels are in (the fill), PE
  column c holds window column c. After every further L shifts the whole
  picture has moved one window column to the left.
* Between those alignments the PE array sees rows s..s+N-1 of window
  columns c..c+N-1. That is candidate u = c - p, v = s - p for
  s = 0..2p-1. The other N-1 shift positions of each column straddle
  two columns. They are not candidates, and the controller ignores them.
  After the last input pixel, 2p-1 more shifts (with no input) bring the
  last column's candidates into view.
* Each PE holds one CMB pixel R(x,y) and its mask bit. Its block
  elements are AND gates that zero both datapath operands when the bit is
  0. It adds |R - S| to the partial sum coming from the PE above. Column
  sums are combinational down the column (semi-systolic) and registered
  at the bottom. The parallel adder tree (`adder_tree`, log2 N levels,
  one register) adds the N column sums, and the motion-vector selector
  (`mv_selector`) compares and keeps the best.

The controller (`me_controller`) marks the shifts that produce a
candidate. It carries (u, v) down the three pipeline stages: column-sum
register, adder-tree register, selector. It raises `done` once the
selector holds the final result.

## Timing of one macro-block

With L = N + 2p - 1 and gap-free input streams:

| step | cycles |
|---|---|
| CMB load, one pixel per cycle (raster order) | N^2 |
| reference fill (N*L pixels), in parallel with the CMB load | N*L |
| edge extraction, overlapped with both loads | N^2 + N^2/2 + N + 4 |
| search: remaining window pixels plus 2p-1 tail shifts | L^2 - N*L + 2p - 1 |
| `done` after the start edge | **L^2 + 2p + 2** (6304 at N=16, p=32) |
| candidates evaluated | 4p^2 (4096) |

Edge extraction must finish before the first candidate, because every
candidate is evaluated with the final mask. The controller holds the last
fill pixel (`ref_ready` low, `edge_stall` high) until the mask is ready.
The fill takes N(N+2p-1) cycles, so this wait is zero when
N(N+2p-1) >= N^2 + N^2/2 + N + 4. At N = 16 that is p >= 6, so every
p > 8 is covered. The default p = 32 never waits; p = 5 waits 4 cycles.

Inside the edge extraction unit (`edge_extraction_unit`):

1. The CMB is written into a local buffer as it arrives.
2. The filter produces one gradient per cycle. It trails the load by
   N + 2 pixels, the point at which a pixel's 3 x 3 neighbourhood is
   complete.
3. The CSM generator (`csm_generator`) stores the gradients and tracks
   their max and min.
4. One cycle after the last gradient it forms the threshold.
5. It then builds the mask two pixels per cycle (`LANES`) while
   counting the ones. One lane would be 4 cycles too slow to hide edge
   extraction at N = 16, p = 9.

## Top-level interface (`power_aware_me`)

| port | dir | meaning |
|---|---|---|
| `start` | in | begin a block (ignored while `busy`); samples `mb_idx`, `sm_m`, `trg_cnt` |
| `mb_idx` | in | position of the block in the frame; selects its m1 entry |
| `sm_m` | in | regular pattern rate, 8-to-m, m = 2..8 |
| `trg_cnt` | in | target number of ones in the mask (e.g. 64..256 for N=16) |
| `cmb_valid/cmb_ready/cmb_pix` | | N^2 CMB pixels, raster order (y outer, x inner) |
| `ref_valid/ref_ready/ref_pix` | | L^2 search-window pixels, column-major: window (X, Y) is reference pixel (x0-p+X, y0-p+Y) |
| `done` | out | one-cycle pulse; results valid until the next `start` |
| `mv_u`, `mv_v` | out | signed motion vector (horizontal, vertical) |
| `min_cssad` | out | CSSAD of that vector |
| `csm_cnt` | out | ones in this block's mask |
| `m1_used` | out | threshold parameter used for this block (unsigned, 1.0 = 2^`M1_FRAC`) |
| `busy`, `phase`, `edge_stall` | out | status: running, current phase, fill waiting for the mask |
| `m1_sat_lo`, `m1_sat_hi` | out | the last m1 update was clamped at 0 / at 1 |

Both streams use valid/ready and may have gaps. A host picks the power
mode by choosing `sm_m` and `trg_cnt` for each block. For example,
8-to-2 with target 96 gives a 256-to-96 mask. The pattern should keep
fewer pixels than the target so that edges fill the rest.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | block size (power of two, >= 4) |
| `P` | 32 | search range: -P..P-1 |
| `NUM_MB` | 396 | block positions per frame (m1 entries); 352x288 / 16^2 |
| `FILTER` | `FILT_HPF` | gradient filter |
| `M1_FRAC` | 12 | fraction bits of m1 |
| `KP_Q` | 77 | Kp in units of 1/256 (77/256 = 0.30) |

Storage at the defaults: N^2 PE pixel pairs, 16 x 63 SRA pixels, a
256-entry CMB copy and a 256-entry gradient buffer in the edge extraction
unit, and 396 x 13-bit m1 entries, all reset to 0.

## Files

| file | block |
|---|---|
| `rtl/me_pkg.sv` | shared types (pixel, gradient, filter and phase enums), basic-mask table |
| `rtl/power_aware_me.sv` | top level |
| `rtl/edge_extraction_unit.sv` | CMB buffer, border multiplexers, filter, CSM generator |
| `rtl/hpf_filter.sv`, `rtl/sobel_filter.sv`, `rtl/morph_filter.sv` | gradient filters |
| `rtl/csm_generator.sv` | max/min, floating threshold, mask and count |
| `rtl/subsample_mask.sv` | regular 8-to-m pattern bit |
| `rtl/threshold_controller.sv` | per-position m1 memory and update |
| `rtl/pe.sv`, `rtl/pe_array.sv` | gated PE, N x N array with column sums |
| `rtl/shift_register_array.sv` | SRA delay lines |
| `rtl/adder_tree.sv` | parallel adder tree |
| `rtl/mv_selector.sv` | compare and select |
| `rtl/me_controller.sv` | phases, fill hold-off, candidate bookkeeping |
| `tb/me_ref_pkg.sv` | behavioural reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_power_aware_me_full` (defaults), `tb_csr_tracking` and `tb_kp_step` (control-loop runs on synthetic video) |

## Verification

Every module has a self-checking testbench. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog if
something hangs. The reference model (`tb/me_ref_pkg.sv`) is written
directly from the formulas above in integer and real arithmetic. It
covers the step-function mask, the three filters with border
replication, the threshold and mask, the m1 update, and the full search.

* `tb_power_aware_me` runs N = 8, p = 3 over 4 block positions and 26
  frames, with power-mode switches and gaps in both streams. It checks
  every block's m1, mask count, motion vector, minimum CSSAD, next m1
  and cycle count. It also counts the mechanisms and requires each to
  happen: fill stalls (p = 3 is too small to hide edge extraction),
  masked PEs, m1 clamped at 0 and at 1, mode switches, stream gaps and
  nonzero motion.
* `tb_power_aware_me_full` runs the default configuration (N = 16,
  p = 32) through two blocks with a mode switch. It checks the 6304-cycle
  latency and that no fill stall occurs. It runs in a few seconds.
* `tb_csr_tracking` runs the adaptive control on moving synthetic video
  (N = 16, p = 2, three block positions). Three copies of the design run
  side by side, one per gradient filter, and must stay in lockstep. It
  holds each target count 96..224 for 40 frames from a reset, then
  lowers the target 256 -> 208 -> 160 -> 112 every 40 frames. It prints
  the average mask count per target and filter. Over frames 10..39 the
  high-pass and Sobel copies stay within 3.5% of the target (for
  example 99.2 and 98.8 for 96, 193.8 and 194.0 for 192). The
  morphological copy settles more slowly at low targets (102.8 for 96,
  135.0 for 128), because m1 has further to travel from its start at 0.
  A target equal to the regular pattern's own count (64 with 8-to-2)
  cannot be met, because any edge pixel adds to it.
* `tb_kp_step` runs the same video with five loop gains side by side
  (Kp = 0.1 .. 0.5). Each starts from full rate and is asked for 160 of
  256 pixels for 30 frames. A higher gain reaches the target sooner:
  within 5% from frame 11 at Kp = 0.1, from frame 9 at 0.3 and from
  frame 1 at 0.5. The mean error over frames 1..5 falls from 28 to 4
  pixels. Over frames 10..29 the mean count is within 6.5% of the target
  at Kp = 0.1 and within 2% from Kp = 0.3 up. On this video the
  frame-to-frame ripple comes from the content and is about the same
  for every gain, so the loss of stability at high gain that a
  proportional loop can show does not appear here.
* The unit testbenches cover the filters (random and corner windows),
  the mask generator (including ties at m1 = 0 and m1 = 1), the
  controller (candidate order, counts, stall length, cycle count) and
  the datapath pieces.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/me_pkg.sv tb/me_ref_pkg.sv tb/tb_power_aware_me.sv \
    --top-module tb_power_aware_me -o sim
./obj_dir/sim
```

Replace the testbench name to run the others. The testbenches use
`$urandom` and need no external files.

## Choices and departures

These points are not fixed by the architecture description this RTL
follows. They are choices made here:

* **Gain normalisation.** The published update rule reads
  m1 += Kp * (csm_cnt - trg_cnt) with Kp = 0.3. Taken literally with
  counts in pixels, that saturates m1 at once. The count difference is
  therefore divided by N^2 (a fraction of the block), which makes
  Kp = 0.1..0.5 behave as a gain.
* **Number formats.** Pixels are 8 bits. Gradients are 11 bits. m1 has
  12 fraction bits, and updates are rounded to nearest. Kp is 8-bit Q0.8.
  The threshold comparison is exact: G * 2^12 against
  m1*Gmax + (2^12 - m1)*Gmin.
* **Reference data flow.** One pixel per cycle through a single snake
  chain. This costs N-1 idle shifts per window column: 6304 cycles for
  4096 candidates at the defaults. A wider input port could remove them
  but is not part of this design.
* **Edge-extraction overhead.** The mask scan handles two gradients per
  cycle. That makes edge extraction fully hidden for p >= 6 at N = 16,
  which covers the intended p > 8. The scan rate is this design's
  choice.
* **Border pixels.** Out-of-block neighbours are replaced by the nearest
  in-block pixel.
* **Sequencing.** One block at a time: the next CMB is loaded only after
  `done`. The m1 update is written as soon as the mask is ready; the
  running block keeps the value it latched at `start`.
* **Reset.** Asynchronous, active low. m1 resets to 0, so the first frame
  runs at 1-to-1.
* **Coordinates.** x (the first coordinate of the formulas) is
  horizontal. Because the morphological and Sobel gradients are symmetric
  under transposition, this affects only the orientation of the regular
  pattern and the tie-breaking order.

Not part of the RTL: the host processor that picks the power mode from
the battery state, and the battery monitor. The host drives `sm_m` and
`trg_cnt`. Frame memory and the addressing that produces the two pixel
streams are also left to the surrounding system.
