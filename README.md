# Bandwidth-scalable motion estimation with error detection and data recovery

Block-matching motion estimation (ME) is the costliest part of an H.264-style
video encoder, both in arithmetic and in the memory traffic needed to fetch
search windows. This design tackles both problems:

* A **bandwidth-scalable ME controller** turns a memory bandwidth allowance
  into a search range (SR) for every macroblock (MB). When past MBs used more
  than their share, the SR shrinks. When the motion of neighbouring MBs is
  small, the SR shrinks too. The per-MB window fetch therefore follows the
  budget instead of a fixed worst case.
* Every 4x4 processing element (PE) of the SAD array has **error detection
  and data recovery (EDDR)**. An independent residue-and-quotient (RQ) code
  of each 4x4 SAD is computed beside the PE. A mismatch is flagged, and the
  SAD is rebuilt from the code, so a faulty PE does not spoil the search.

The design is written in synthesizable SystemVerilog (IEEE 1800-2017). The
files are in `rtl/` and the testbenches in `tb/`.

## Structure

```
bwsme_eddr_top
├── bwsme_ctrl            bandwidth-scalable ME controller
│   ├── bw_alloc          budget, system SR, per-MB bandwidth share (divider, isqrt)
│   ├── bw_eff_calc       bandwidth efficiency G (divider)
│   └── sr_pred           bandwidth mode and final SR
└── me_engine             ME engine
    ├── me_ctrl           per-MB sequencer
    ├── pre_retrieval     memory handshake, fills the buffers
    ├── cur_buf, ref_buf  current MB and search-window buffers
    ├── sad_gen x NSAD    4-stage VBSME SAD tree of 16 eddr_pe
    │   └── eddr_pe       pe + tcg (16 rqcg) + edc + drc + selector
    ├── mode_decision     R-D cost per partition, MB mode, JBMA/JMVP
    └── mvp_gen           MV predictor and sum_mv, one-line MV memory
me_pkg                    shared constants and types
```

The external memory controller and frame store are not part of the RTL. The
top brings out their handshake. `tb/mem_model.sv` is a behavioural stand-in.

## How one MB is coded

1. The controller gives `mb_start`. With it come the MB position, its SR and
   the window origin. The window is centred on the MB position plus the
   predicted vector: `origin = 16*mb + mvp - sr`.
2. `pre_retrieval` fetches two rectangles from the memory controller:
   * the 16x16 current MB;
   * the (2·SR+16)² reference window.

   Each fetch is one request–acknowledge–address–data–finish transaction.
   `bw_used` counts the reference pixels received.
3. `me_ctrl` scans all (2·SR+1)² candidates in raster order. Each cycle it
   handles `NSAD` = 2 horizontally adjacent candidates. Every candidate goes
   into its own `sad_gen`, which produces all 41 H.264 partition SADs:
   * 16x16, then 16x8 (x2) and 8x16 (x2);
   * 8x8 (x4), 8x4 (x8), 4x8 (x8) and 4x4 (x16).
4. `mode_decision` keeps the lowest cost and its vector for each partition.
   The cost is `J = SAD + LAMBDA·(|dx|+|dy|)`, with dx/dy relative to the
   predictor. After the scan it selects among four candidates:
   * 16x16;
   * 16x8;
   * 8x16;
   * 8x8, where each 8x8 picks the cheapest of 8x8/8x4/4x8/4x4.

   Two costs go back to the controller:
   * JBMA is the cost of the chosen mode;
   * JMVP is the 16x16 cost at the predictor itself, i.e. without search.
5. The MB's 16x16 vector is written into the `mvp_gen` line memory. Then
   `mb_done` pulses with the mode, the vectors, JBMA, JMVP, `bw_used` and
   `err_cnt`. `err_cnt` counts the 4x4 SADs the EDDR found faulty and replaced.

With a memory that acknowledges in one cycle and streams one pixel per cycle,
an MB takes 274 + (2·SR+16)² + (2·SR+1)·⌈(2·SR+1)/NSAD⌉ cycles from `mb_start`
to `mb_done`. The first term covers 256 current pixels, two handshakes and the
4-stage pipeline drain.

## The bandwidth-scalable controller

`bwsme_ctrl` runs once per update period of `gp` frames of
`MB_COLS x MB_ROWS` MBs. Let NMB be the number of MBs in the period, and let
k count the MBs coded so far, starting at 0.

| Quantity | Computed as |
|---|---|
| Bandwidth budget | `BWbudget = (br / fr) · gp`, in pixels per period |
| System SR | `SRsys = floor((isqrt(BWbudget/NMB) − 16) / 2)`, clamped to 0…16. This is the largest SR whose window (2·SR+16)² fits the average share of one MB. |
| Share of each remaining MB | `BWFP = (BWbudget − BWused_total) / (NMB − k)`, recomputed after every MB |
| Efficiency of the last MB | `G = ((JMVP − JBMA) << 8) / BWused`, the R-D gain per fetched pixel, 8 fraction bits |
| Bandwidth mode | `BW_L` when `used_total > BWFP·k` (over budget). `BW_N` when `used_total ≥ ¾·BWFP·k`. `BW_H` otherwise. The first MB is `BW_N`. |
| Predicted SR | `Pred_SR = sum_mv >> {3, 1, 0}` for L / N / H |
| Final SR | `Final_SR = min(SRsys, max(Pred_SR, sum_mv/4))`. The first MB of a period uses SRsys. |

`sum_mv` is the sum of |x| and |y| of the vectors of the left, top and
top-right neighbours. It comes from `mvp_gen` for the next MB before that MB
starts, so the controller decides the SR without waiting.

All the divisions use a single sequential divider (`divider`, 33 cycles at
32 bits). The square root is a digit-by-digit unit (`isqrt`). There are no
multipliers apart from small constant ones.

A `bw_change` pulse means the available bandwidth has changed in the middle of
a period. The controller:
* loads the new `br`;
* recomputes BWbudget and SRsys;
* then continues from the current MB, with BWFP spread over the MBs that
  remain.

## EDDR: residue-and-quotient checking of every PE

For a modulus m (`RQ_M` = 64), any value S is `S = QT·m + RT` with
`RT = S mod m` and `QT = S div m`. The hardest part to follow is how the test
code is built without using the PE's own sum:

* `rqcg` works on one pixel pair. It splits both pixels into quotient and
  residue and forms the residue and quotient of |X−Y| from those parts. The
  operands are swapped when X < Y, and one quotient unit is borrowed when the
  residue difference is negative. This is where the absolute value is handled.
* `tcg` adds the sixteen residues and sixteen quotients with its own adders.
  It then folds the carry of the residue sum into the quotient. The result is
  RT and QT of the true 4x4 SAD. Its adders are separate from the PE's, so a
  fault in the PE cannot reach the check.
* `edc` splits the PE output into residue and quotient and compares both
  with (RT, QT). Any difference raises `err`.
* `drc` rebuilds the SAD as QT·m + RT.
* The selector in `eddr_pe` passes the PE result when `err` is low and the
  recovered one when it is high.

The SAD tree after the PEs therefore always sees a correct 4x4 SAD, provided
the fault is confined to the PE. `fault_xor` is a test input: one 12-bit mask
per PE, XORed into that PE's output to emulate a fault. Tie it to 0 in use.

## Interfaces

Top-level parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `MB_COLS`, `MB_ROWS` | 11, 9 | Frame size in MBs (QCIF) |
| `NSAD` | 2 | SAD generation modules |
| `LAMBDA` | 4 | Weight of the vector cost |

The SR limit (16) and the RQ modulus (64) are in `me_pkg`.

Top-level ports:

* **Control.**
  * `start` begins a period.
  * `br` (pixels/s), `fr` (frames/s) and `gp` (frames per period) set the
    budget.
  * `bw_change` loads a new `br` during a run.
  * `done` pulses at the end of the period.
* **Per MB.** Each `mb_done` pulse comes with the MB's results:
  * `mb_x`, `mb_y`, `sr`;
  * `mb_mode`, `sub_mode[4]`;
  * `mv`, `part_mvd[41]`;
  * `jbma`, `jmvp`, `bw_used`, `err_cnt`.

  The controller state is also visible: `bw_mode`, `bw_budget`, `sr_sys`,
  `bwfp`, `used_total`, `g` and `k`.
* **Memory handshake.** A transaction runs in this order:
  1. The design holds `mem_req` until the memory asserts `mem_ack`.
  2. For one cycle, `mem_addr_valid` carries the rectangle:
     * `mem_ref`: 0 for the current frame, 1 for the reference;
     * signed origin `mem_x`, `mem_y`;
     * size `mem_w` x `mem_h`.
  3. The memory returns the pixels in raster order, one per `mem_dvalid`
     cycle, on `mem_data`. Gaps are allowed.
  4. The memory raises `mem_finish` after the last pixel.

  Rectangles may reach outside the frame. What the memory controller returns
  there is its own choice; the model returns a synthetic texture. Assertions
  in `pre_retrieval` check the handshake order.

## Simulation

Every block has a self-checking testbench `tb/tb_<block>.sv`, which prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_top rtl/me_pkg.sv tb/tb_top.sv && obj_dir/Vtb_top
```

There are two end-to-end testbenches. Both share `tb/tb_top_body.svh`, which
recomputes everything from the memory model's pixels:
* the expected SRs;
* the 16x16 full-search results;
* the controller arithmetic.

They also require each mechanism to happen at least once:
* all three bandwidth modes;
* an SR clipped by SRsys;
* a change of SR between MBs;
* an EDDR detection with recovery;
* memory stalls;
* the wrap to a new frame, when the run spans more than one frame.

Both also apply one mid-run `bw_change` and check the controller's state after it.

| Testbench | Size | Fault injected | `bw_change` | Checks | Run time |
|---|---|---|---|---|---|
| `tb_top` | 4x3 MBs over two frames | in one MB | yes | 271 | short |
| `tb_top_full` | all defaults: one QCIF frame of 99 MBs | yes | yes | 1096 | about 10 s |

## Where this design goes beyond or departs from the method

* **RQ modulus.** m = 64 is a choice of this design.
* **PE structure.** The PE computes a whole 4x4 SAD in one combinational
  cycle rather than accumulating serially. This is needed to evaluate a full
  search position per cycle.
* **Budget to SR relation.** The window of one MB is taken as (2·SR+16)²
  pixels, so SRsys comes from a square root of the per-MB share.
* **Shift factors.** The three SR shift factors (3, 1, 0) are choices.
* **Mode thresholds.** The ¾ boundary between modes N and H is a choice.
* **Vector prediction.** The MV predictor is the H.264 median.
* **Cost and mode decision.** The cost uses a fixed λ = 4 with no mode
  overhead term. Sub-partitions below 8x8 are chosen per 8x8 quadrant.
* **Use of the efficiency G.** G is computed after every MB and reported on
  `g`. The method does not say how G enters the SR decision, so here the SR
  depends only on the bandwidth mode, `sum_mv` and SRsys.
* **What the budget counts.** The budget covers the reference window pixels
  `(2·SR+16)²` of each MB. The 256 current-MB pixels are fetched as well but
  are not charged against it.
* **Not included.** Power behaviour is a property of an implementation and is
  not modelled. The memory controller and frame store are not included.
