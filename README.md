# DVFS motion-estimation processor with adaptive break-off search

Block-matching motion estimation usually spends the same effort on every
macro-block (M-Blk): a full search over all 441 candidate positions of a
±10-pixel window.  This design instead *predicts*, before each M-Blk is
searched, how many candidates the search will need, and uses the prediction
to lower the clock frequency and the supply voltage of the datapath for that
M-Blk (dynamic voltage and frequency scaling, DVFS).  Since dynamic power
falls roughly with the cube of the work when both frequency and voltage
scale, a search that needs one eighth of the candidates can run at a much
lower power level instead of just finishing early.

The search itself is the *adaptively assigned breaking-off condition search*
(A²BCS): candidates are visited from the centre of the search window outward,
and the search stops once the best match has not improved for `n_q`
consecutive candidates.  `n_q` is not a distortion threshold but a count, so it
translates directly into a number of clock cycles, and therefore into a
frequency and a voltage.

The RTL covers the whole processor: the absolute-difference datapath, the
DVFS controller, and behavioural models of the two analog parts (PLL clock
driver and DC/DC converter).  Pictures are stored outside the processor.

## The break-off rule

For one M-Blk the candidates are numbered `n = 1, 2, …` in search order, and
`d(n)` is the sum of absolute differences (SAD) between the 16×16 current
block and the reference block at candidate `n`.

* `d_min` is the smallest `d(n)` seen so far; `n_m` is the `n` where it was
  found (ties keep the earlier, more central candidate).
* `n_r` counts the candidates since `d_min` last decreased.
* The search stops when `n_r` reaches `n_q`.  So the search visits
  `n_s = n_m + n_q` candidates.

`n_q` is predicted from history.  The value `n_m` of every M-Blk is stored.
For the M-Blk about to be coded, the controller takes the largest `n_m` among
the following four M-Blks:

* the M-Blk at the same place in the reference (previous) frame;
* the M-Blks above, to the left and above-left in the current frame.

Call this `Max. n_m`.  It is quantized to a power of two with
`2^(k+1) > Max. n_m ≥ 2^k`, and `k` is raised to at least `K = 4`.  Then
`n_q = 2^k`.  Only five values of `k` occur (4 … 8, since `n_m ≤ 441 < 512`),
and each selects one operating point:

| k | n_q | clock fc | supply VD | n_p | DC/DC switch |
|---|-----|----------|-----------|-----|--------------|
| 8 | 256 | 680 MHz  | 1.00 V    | 450 | SW1 |
| 7 | 128 | 340 MHz  | 0.60 V    | 225 | SW2 |
| 6 |  64 | 170 MHz  | 0.50 V    | 112 | SW3 |
| 5 |  32 |  85 MHz  | 0.45 V    |  56 | SW4 |
| 4 |  16 |  43 MHz  | 0.40 V    |  28 | SW5 |

`n_p` is the number of block matches that fit into one M-Blk time slot of
about 170 µs at that clock.  One block match takes 256 ADA clocks, so
`n_p ≈ fc · 170 µs / 256`.  A CIF picture has 396 M-Blks; at 15 frames/s each
M-Blk has about 168 µs.

The hardware stops a search at the first of three conditions.  The
`stop_cause` output reports which one applied:

1. `n_r` reaches `n_q`.  This is the A²BCS break-off.
2. `n` reaches `n_p`, so the M-Blk's time slot is used up.
3. `n` reaches 441, so the whole window has been searched.

Conditions 2 and 3 are guards added by this design.

A consequence worth knowing: `n_p(k) < 2^(k+1)`, so a search capped at `n_p`
can never produce an `n_m` that predicts a higher `k` than the one it ran at.
Operating points can only rise through neighbours that already have a higher
`n_m`.  For that reason the `n_m` memory is filled with 441 after reset.  The
first frame therefore runs at the highest point (k = 8), and later frames
settle down from there.

## Architecture

```
           clk_ctl (680 MHz)                       clk_ada (fc)
  mb_start ──► dvfs_controller ── k ──► pll_clock_driver ──► clk_ada
               │  nm_sram (396 × 9)     dcdc_converter  ──► vd_mv
               │  max_detector
               │  nq_quantizer, dvfs_table
               │  min_detector, bm_counter,
               │  breakoff_comparator
               │         run ───────────────► bm_sequencer ─► pix_req, pix_x/y, cand_mv
               │         ◄── busy, res_tgl,        │  spiral_gen
               │             res_d/n/mv  ◄──────── ada ◄──── pix_a, pix_b
  mb_done ◄────┘
```

* **ada**: the two-stage pipelined absolute difference accumulator.
  - Input registers feed `abs_diff`, which computes `|A−B|` on 8 bits.
  - The pipeline register holds that difference.
  - `accumulator` is 16 bits wide and its output register feeds back to the
    adder.

  The ADA takes one pixel pair per clock.  It loads instead of adding on the
  first pixel of a block match, so block matches follow each other with no
  gap.  `d_valid` marks `d(n)` three cycles after the last pair.
* **bm_sequencer** runs in the ADA clock domain.  While `run` is high, it
  issues the 256 pixel positions of each candidate and latches every finished
  `d(n)` together with `n` and the displacement.  It then flips `res_tgl`.
  `spiral_gen` produces the displacements in a square spiral: right 1, down 1,
  left 2, up 2, … until all positions of the ±10 window have been visited.
* **dvfs_controller** runs in the controller clock domain.  For each M-Blk it
  goes through these steps:
  1. It reads the four stored `n_m` values one after another into
     `max_detector`.
  2. It quantizes the maximum and registers `k` and the operating point.
  3. It raises `run`.
  4. It feeds each arriving `d(n)` to `min_detector` and `bm_counter`.
  5. When `breakoff_comparator` says stop, it lowers `run` and waits for the
     sequencer to go idle.
  6. It pulses `mb_done` and writes `n_m` back.

  From `mb_start` to `run`, steps 1 to 3 take 8 controller clocks, about
  12 ns.
* **nm_sram** holds one `n_m` per M-Blk position.  M-Blks are coded in raster
  order, so a single array serves two purposes:
  - The entry of the M-Blk being coded still holds the reference-frame value.
  - The entries above and to the left already hold current-frame values.
* **pll_clock_driver** and **dcdc_converter** are behavioural models of
  analog macros.  The PLL model is an oscillator with delays.  The converter
  maps the active-low switch controls to the supply voltage in mV.
  `me_processor` asserts that exactly one switch is on and that the supply
  matches the operating point.

### Controller clock gating

The controller has work only around the start and the end of an M-Blk, and
for one clock per arriving `d(n)`.  `clock_gate` stops its clock the rest of
the time.  The enable is sampled on the falling edge and ANDed with the clock.
The gated clock runs:

* in the prediction, arming and completion states;
* on a captured request: `mb_start` is first registered on the free-running
  clock, which keeps the request safe from the gate's falling-edge sampling;
* on the clock that takes a `d(n)`, and on the clock after it, which decides
  the break-off;
* while waiting for the sequencer to go idle after a stop.

The request register, the synchronizers and the `res_tgl` edge detector stay
on the free-running clock.  The controller is clocked on about 0.4 % of the `clk_ctl` edges
in the small end-to-end test, and on about 0.75 % in the full-size test.  `ctl_clk_on` shows the enable.

### Clock-domain crossing

The two clocks are unrelated.  Signals cross between them in three ways:

* `run` goes controller → ADA and `busy` goes ADA → controller.  Both are
  levels passed through two-flop synchronizers (`sync_2ff`).
* Each new `d(n)` is signalled by flipping `res_tgl`, which is also
  synchronized.
* `res_d`, `res_n` and `res_mv` stay stable for a whole block match (256 ADA
  clocks), so the controller reads them directly once it sees the flip.

The stop decision arrives in the ADA domain a few clocks late.  The block
match in progress at that moment is dropped, and any result it still
delivers is ignored.  The controller changes `k`, and with it the clock and
the supply, only while the sequencer is idle.

### Pixel interface

The processor does not store pictures.  In the `clk_ada` domain, whenever
`pix_req` is high, the surrounding system must return two pixels in the same
cycle, combinationally:

* `pix_a`: pixel (`pix_x`, `pix_y`) of the current M-Blk.
* `pix_b`: the reference-picture pixel at the same position, displaced by
  `cand_mv` (signed, −10 … +10).

`clk_ada` is an output so that the picture memory can run on it.

### Using the top

1. Wait for `ready`.  After reset, the `n_m` memory is first cleared for
   396 clocks.
2. Pulse `mb_start` for one `clk_ctl` cycle with the M-Blk position
   (`mb_x`, `mb_y`).  M-Blks must be coded in raster order.
3. When `mb_done` pulses, read `result` (`me_result_t` in `me_pkg`):
   - best displacement `mv`;
   - `d_min`;
   - `n_m`;
   - `n_s`, the number of block matches done;
   - `k`.

   `stop_cause` is `{window searched, n_p reached, n_q reached}`.

An M-Blk never takes longer than `n_p` block matches plus a few handshake
clocks.  The longest case is about 169.5 µs, at k = 7.

## Behaviour on moving pictures

`tb_me_workload` drives the full-size processor with a generated CIF
sequence of known motion:

* a textured background panning by one pixel per frame;
* a 96 × 80 object moving by (+3, −2) per frame;
* a 64 × 64 object moving by (−6, +4) per frame;
* a little noise in every frame.

For each M-Blk the testbench also runs a full search over all 441 positions.
The hardware matches the model of the algorithm exactly on every M-Blk.
Against full search:

| frame | operating points k4/k5/k6/k7/k8 | block matches vs. full search | same optimum as full search | PSNR (full search) |
|-------|---------------------------------|-------------------------------|-----------------------------|--------------------|
| 1 (after reset) | 0/0/0/0/396   | 1.6× fewer  | 396 of 396 | 31.87 dB (31.87 dB) |
| 2               | 326/45/24/1/0 | 14.7× fewer | 380 of 396 | 30.54 dB (31.28 dB) |

Charging each M-Blk the measured ADA power listed for its operating point
(1111, 344.1, 146.1, 65.15 and 26.12 µW for k = 8 … 4), frame 1 averages
1111 µW.  Frame 2 averages 38.6 µW, with 371 of 396 M-Blks at 65.15 µW or
less.  The testbench fails if that figure is not below a quarter of frame 1's.
The RTL itself models no power; these numbers only weight the chosen
operating points.

The 16 misses in frame 2 show the weak point of the prediction.  They are
M-Blks that the fast object has just entered.  In the previous frame those
places and their neighbours were slow background, so the predicted `n_p` of
28 ends the search before the object's displacement, which is 123 positions
into the spiral.  Objects that move by more than about two pixels per frame
into areas that used to be static are found one frame late.  Their
neighbourhood then has a large `n_m`.

## Where this design adds to the description it follows

Taken from the source:

* The ADA structure and widths.
* The DC/DC converter's five switches and their voltages.
* The operating-point table.
* The quantization rule with K = 4.
* The four neighbours used for prediction.
* The centre-outward search over ±10.
* The break-off at `n_r = n_q`.
* The 680 MHz controller clock.
* Gating the controller clock.

This design's own choices:

* The clock-domain handshake and the pixel interface.
* The clock-gate circuit and exactly when the controller clock is enabled.
* The exact spiral order.
* The stops at `n_p` and at 441.
* Initialising `n_m` to 441.
* The single-port `n_m` memory and its serial reads.
* Reset values.
* Dropping the block match in progress at break-off.

Not modelled:

* PLL lock time, and the settling of the supply.
* Any power behaviour.

The 43 MHz point is used as 43 MHz; halving 85 MHz would give 42.5 MHz.

## Files

`rtl/` contains one module or package per file:

* `me_pkg` (constants and types);
* `me_processor` (top);
* `dvfs_controller`, `nm_sram`, `max_detector`, `nq_quantizer`, `dvfs_table`,
  `min_detector`, `bm_counter`, `breakoff_comparator`;
* `bm_sequencer`, `spiral_gen`;
* `ada`, `abs_diff`, `accumulator`;
* `sync_2ff`, `clock_gate`;
* the models `pll_clock_driver` and `dcdc_converter`.

The top's parameters `MB_COLS_P` and `MB_ROWS_P` default to CIF (22 × 18).
Everything else is fixed in `me_pkg`.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`.  Each
prints `TB_RESULT checks=N failures=M`.  They compute the expected values
independently of the RTL; for example, `tb_spiral_gen` walks the spiral by
whole segments.  Three testbenches exercise the whole processor:

* `tb_me_processor` runs 3 frames of a 3 × 2 M-Blk picture.  It uses a
  synthetic reference picture whose SAD falls until a chosen candidate `n*`,
  and a software model of the complete algorithm.  It checks every M-Blk's
  result and stop cause, the ADA clock frequency and the supply of every
  operating point, and the 170 µs slot.  It also fails unless all five
  operating points, all three stop causes and a frequency change occurred,
  or if the controller clock is enabled on more than 5 % of the edges.
* `tb_me_processor_full` runs the top with default parameters: one full CIF
  frame plus two rows of the next.  It takes about a minute with Verilator.
* `tb_me_workload` runs the top with default parameters on two frames of a
  generated moving sequence.  See "Behaviour on moving pictures".  It takes
  about 80 s.

To run one, for example the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl +libext+.sv rtl/me_pkg.sv tb/tb_me_processor.sv \
  --top-module tb_me_processor
./obj_dir/Vtb_me_processor
```

The testbenches use only two-state values.  Registers that are read are
reset.
