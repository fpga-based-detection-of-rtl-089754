# SIFT interest point detection with interleaved octaves

This design finds SIFT interest points in a video-rate pixel stream. An
interest point is a pixel that is a strict minimum or maximum among its 26
neighbours in a Difference-of-Gaussian (DoG) scale space. The RTL computes
that scale space and its extrema, but not the descriptors that later stages
of SIFT build.

A straightforward pipeline needs one Gaussian filter for every (octave,
scale) pair. That is O·S filters, and the count grows with the image size,
because larger images need more octaves. This design uses only **S** filters,
whatever O is. Each filter serves every octave in turn:

- Octave 0 uses the filter every second clock cycle.
- Octave 1 has a quarter as many pixels, so it needs the filter once every 8 cycles.
- Octave 2 needs it once every 32 cycles, and so on.

A fixed schedule fits all octaves into the free cycles without any two
colliding. The cost is throughput: one image pixel per two clock cycles
instead of one per cycle. Adding an octave adds line memories and a small
rate buffer, but no multipliers.

Defaults: a 320×240 8-bit image, O = 3 octaves, S = 6 Gaussian scales per
octave (5 DoG images, 3 candidate scales), and 7-tap separable kernels with
σ0 = 1.6. At 145 MHz a frame takes about 1.06 ms, roughly 940 frames/s.

## Data flow

```
pixels ─► [in reg] ─► SCB0 ─► SCB1 ─► … ─► SCB(S-1)        (each SCB: hfilter ─► vfilter)
              ▲        │       │              │
              │        ▼       ▼              ▼
   octave 1.. │     scale_align (delay earlier scales)  ─►  DoG = L(s+1) − L(s)
   inputs     │                                                  │
              │                                                  ▼
   hsb (octave o-1, scale S-2, every 2nd pixel/row)     extrema_detection
                                                        (one is_extremum per octave)
```

Module hierarchy:

| module | role |
|---|---|
| `sift_detector_top` | top: DoG scale space plus extrema detection |
| `dog_scale_space` | scheduler, subscalers, SCB cascade, alignment, DoG subtraction |
| `octave_scheduler` | one-hot slot of the octave that owns the current cycle |
| `scb` | scale calculation block: `hfilter` then `vfilter` for one scale |
| `hfilter`, `vfilter` | shared horizontal / vertical 1-D filter for all octaves |
| `conv1d` | K multipliers, adder tree, rounding shift |
| `hsb` | subscaler and rate buffer between octave o-1 and octave o |
| `scale_align` | delay that lines an earlier scale up with the last one |
| `extrema_detection` | one `is_extremum` per octave |
| `is_extremum` | Min/Max reuse across scales, β flags, 3×3 window, OR of scales |
| `is_local_ext` | strict 3×3 local minimum or maximum with β gating |
| `sift_pkg` | types, defaults, latencies, kernel and schedule functions |

## The octave schedule

This is the core of the design. Count clock cycles from 1 after reset:

- Octave 0 owns every odd cycle: 1, 3, 5, …
- Octave o ≥ 1 owns one cycle in every `2·4^o`. Its first cycle `a_o` is the
  first cycle that no lower octave already owns.

With these rules, octave 1 takes cycles 2, 10, 18, … (period 8), octave 2
takes 4, 36, … (period 32), and octave 3 takes 6, 134, … (period 128).

No two octaves ever collide. Each octave's period is a multiple of every
lower octave's period. So if `a_o` is free once, every cycle `a_o + n·P_o`
is free too.

A free first cycle always exists. All octaves together occupy 1/2 + 1/8 +
1/32 + … < 2/3 of the cycles.

`octave_scheduler` implements the schedule with a free-running counter of
`2·O-1` bits, whose period is the period of the last octave. Each octave's
slot is a compare of `counter+1 mod P_o` with `a_o`. `sift_pkg` computes
`a_o` at elaboration time (`slot_first`). An assertion checks that the
slots are one-hot or empty.

The slot of octave 0 is the input handshake: `pix_ready = slot[0]`. For
octave o > 0, the slot is the moment when the subscaler may hand one pixel
to the shared filters.

## Scale calculation blocks (SCB)

Each scale s has one SCB. SCB 0 filters the octave inputs, and SCB s filters
the outputs of SCB s-1. Every SCB has O input and O output ports, one per
octave. Cascading lets a small fixed kernel reach large σ:

- SCB 0 blurs with σ0.
- SCB s blurs with the *incremental* σ that takes σ0·2^((s-1)/S) to
  σ0·2^(s/S).

The 2-D Gaussian is separable. An SCB therefore runs:

- **`hfilter`**: each octave has its own chain of K-1 registers. The chain
  shifts only on that octave's pixels. The octave that owns the cycle
  selects its K-tap window through a multiplexer into one shared `conv1d`.
- **`vfilter`**: each octave has K-1 line memories of `W>>o` pixels. When a
  pixel arrives, the memories are read at its column. In the next cycle the
  K-pixel column is filtered, and the memories are written back shifted down
  by one line. Two samples of one octave are at least two cycles apart, so
  this read-modify-write never overlaps the next one.
- **`conv1d`**: K multipliers, a K-input sum, rounding, and a right shift by
  8. The integer kernel is `round(256·g_j/Σg)`. The centre tap absorbs the
  rounding residue, so the kernel sums to exactly 256 and the output stays
  8 bits wide. Coefficients are computed at elaboration time from σ with
  `$exp`. There is no coefficient table.

Each SCB contains 2·K multipliers, independent of O. Memory per SCB is
(K-1)·Σ(W>>o) pixels: 3,360 bytes at the defaults.

Latency: `hfilter` 2 cycles and `vfilter` 3 cycles, so an SCB takes
`SCB_LAT` = 5 cycles.

## Streams and alignment

The image is treated as one continuous raster stream. Frames follow each
other back to back. The filters are not clipped at row or frame ends, so a
window near an edge uses pixels from the neighbouring row or frame. This
keeps the datapath free of border logic. The cost is border artefacts in a
band of (K/2)·S pixels at the default cascade, where scale values mix in
pixels from across the edge.

A centred K-tap filter can only produce the result for position p once
sample p + K/2 has arrived. So one SCB moves octave o's stream by

    Δ_o = (K/2)·(W>>o) + K/2   samples

In addition, it delays the stream by 5 cycles. For sample n of octave o:

- Scale s leaves the cascade as position `n - (s+1)·Δ_o`.
- The DoG images, taken after scale S-1, carry position `n - S·Δ_o`.

To subtract adjacent scales, every scale s < S-1 must be delayed until it
lines up with scale S-1. `scale_align` does this in two steps:

1. It delays the whole multi-octave bundle by `(S-1-s)·5 - 1` cycles in a
   register pipeline.
2. A per-octave circular buffer of `(S-1-s)·Δ_o` pixels then advances only
   on that octave's samples.

The outputs of all scales then arrive in the same cycle with the same
position, and the S-1 differences are registered side by side. Assertions
check that all the aligned valids agree.

These buffers are the largest memory in the design. At the defaults they
hold 15·(963+483+243) ≈ 25,000 pixels, more than the filter line memories
(20,160 pixels).

## Subscaling between octaves (HSB)

The input of octave o is Gaussian scale S-2 of octave o-1, keeping every
second pixel of every second row. The first `(S-1)·Δ` samples of that stream
are pipeline fill and are skipped. A pixel is then kept when its x and y are
both even.

Kept pixels arrive in bursts: one every other pixel of octave o-1, on every
other row. Octave o may take only one pixel per slot. `hsb` bridges the two
rates with an addressable shift register and an occupancy counter:

- A kept pixel shifts in at position 0.
- In each slot of octave o, the oldest entry (address `count-1`) is read out.

During an even row, W/2 pixels enter and W/4 leave. The odd row that follows
drains the rest. The depth is therefore `W_in/4 + 4`. A pixel that does not
fit sets the sticky `hsb_overflow` flag. At the defaults the highest levels
seen are 80 of 84 (octave 1) and 41 of 44 (octave 2). When the buffer is
empty, an octave's slot goes unused, and the SCBs see no sample for that
octave in that cycle.

Each octave's results trail the input by its own filter fill plus the fill
of every octave above it. At 512×512 with seven octaves, octave 6 produces
its first results in the fourth frame. A single image therefore has to be
followed by more input (the next frame, or padding) to flush its last rows
and its deepest octaves.

## Extrema detection

`extrema_detection` instantiates one `is_extremum` per octave. An
`is_extremum` receives that octave's S-1 DoG values in parallel, one pixel
per sample.

**Reuse across scales.** Instead of comparing each candidate with 26
neighbours, the block first forms pairwise results between adjacent DoG
images, then combines neighbouring pairs:

```
Min1_s = min(D_s, D_s+1)                 Max1_s likewise    (s = 0 … S-3)
Min2_c = min(Min1_c-1, Min1_c)           Max2_c likewise    (c = 1 … S-3)
```

`Min2_c` is the minimum over scales c-1, c and c+1 at this pixel. Each
pairwise result is shared by two candidate scales.

**β flags.** A pixel can be a minimum of `Min2_c` without being the value of
scale c itself, or it can tie with the scale above or below. The flag
`β_min_c = (Min2_c == D_c) && D_c != D_c-1 && D_c != D_c+1` (β_max likewise)
accepts only a candidate that is the unique extremum of its own column.

**3×3 window.** Two line memories per octave hold the previous two rows of
{Min2, Max2, β}. `is_local_ext` tests that the window centre is strictly
below (or above) all 8 neighbours and that β is set. The result is the same
as the classic 26-neighbour test with strict inequality.

Candidates on the one-pixel image border are masked, because their window
wraps. The per-scale results are ORed into one `kp` bit. `kp_min`/`kp_max`
say which scale and which kind of extremum it is, and a position counter
(which skips the stream offset) provides `kp_x`/`kp_y`.

## Interface and timing (`sift_detector_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `pix_valid`, `pix` | in | 1, 8 | raster-order pixel, taken when `pix_ready` |
| `pix_ready` | out | 1 | high every other cycle (slot of octave 0) |
| `kp_valid[o]` | out | O | one result per pixel of octave o, in raster order |
| `kp[o]` | out | O | pixel is an interest point at some scale |
| `kp_min[o]`, `kp_max[o]` | out | S-3 each | bit c-1: minimum / maximum at DoG scale c |
| `kp_x[o]`, `kp_y[o]` | out | 16 each | position in octave o's (W>>o)×(H>>o) image |
| `hsb_overflow[o]` | out | O | sticky: a pixel for octave o was lost |

- **Input rate**: at most one pixel every two cycles. `pix_valid` may be low
  in a slot, and that stalls the stream.
- **Output rate**: octave 0 delivers one result every two cycles once the
  input runs without gaps.
- **Output order**: results come in raster order per octave. Output i of
  octave o is position (i mod W_o, ⌊i / W_o⌋ mod H_o) of the stream.

## Parameters

All parameters live on `sift_detector_top` and are passed down:

- `O`, `S`, `K`: octaves, scales and kernel taps (defaults 3, 6, 7).
- `W`, `H`: image size (defaults 320, 240).

In `sift_pkg`:

- `PIX_W` = 8: pixel width.
- `COEF_F` = 8: coefficient scaling 2^8.
- `SIGMA0_X10` = 16: σ0 = 1.6.
- `XY_W` = 16: coordinate width.

`W>>o` and `H>>o` must stay at least 3 for the last octave.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```sh
# full design at its default size (320x240, O=3, S=6, K=7), two frames
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/sift_pkg.sv tb/sift_ref_pkg.sv tb/tb_sift_full.sv \
  --top-module tb_sift_full -o sim && ./obj_dir/sim

# any other testbench: replace the last file and the top module, e.g.
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/sift_pkg.sv tb/sift_ref_pkg.sv tb/tb_hsb.sv --top-module tb_hsb -o sim
```

| testbench | what it checks |
|---|---|
| `tb_octave_scheduler` | slots against the closed form, O=3 and O=5 |
| `tb_conv1d` | an independent integer kernel, latency 2 |
| `tb_hfilter`, `tb_vfilter`, `tb_scb` | per-octave filtered streams under the real schedule, latencies |
| `tb_hsb` | kept pixels and their order, plus overflow with a tiny buffer |
| `tb_is_local_ext`, `tb_is_extremum`, `tb_extrema_detection` | extrema against a direct 26-neighbour test, including planted ties |
| `tb_dog_scale_space` | every DoG value of every octave against a reference model |
| `tb_sift_detector_top` | end to end on twelve 32×24 frames |
| `tb_sift_full` | end to end at the default size, two frames |
| `tb_sift_workloads` | 1024×768 O=4 S=6 (one frame), 800×640 O=6 S=5 (two frames), 512×512 O=7 S=5 (five frames) |

The end-to-end tests use the shared body `sift_tb_body`. Its reference,
`sift_ref_pkg`, models the same integer arithmetic and continuous-stream
convention in plain behavioural code. Every keypoint output is compared
bit for bit, and each mechanism is counted; a mechanism that never happens
counts as a failure. The counted mechanisms are:

- interleaved slots of every octave;
- input stalls;
- subscaler bursts;
- empty slots;
- minima and maxima;
- ties rejected by β.

The default-size run takes a few seconds. The workload run takes about two and a half
minutes.

## Where this RTL departs from, or adds to, the method

Sources for each part of the design:

- **Taken from the method**: the S shared SCBs and the octave schedule; the
  register-chain / line-RAM filters with an octave multiplexer; K-1 line RAMs
  per octave per SCB; power-of-two coefficient scaling; the subscaler built
  from an addressable shift register and counter; the next octave's input
  taken from the second-to-last scale; the two-stage Min/Max reuse with β
  flags and the OR of scales; and the default configuration.
- **Own choices**, where the method gives no detail:
  - 8-bit Gaussian images and 9-bit DoG values.
  - 8 fractional coefficient bits, with the centre tap absorbing rounding.
  - Synchronous reset.
  - The scale alignment buffers.
  - The continuous-raster edge treatment, with no border clipping. The
    method does not say how image edges are handled.
  - The subscaler depth and overflow flag.
  - The per-scale and coordinate outputs, added next to the single keypoint
    bit per pixel.
- **Memory budget.** The published implementation uses 108 RAM blocks at
  the defaults. That is (K-1)·O·S, exactly the number of filter line
  memories in this RTL. The scale alignment buffers (about 25,000 pixels)
  and the two extrema line memories per octave come on top of that.
- **SCB 0 filters every octave.** SCB 0 blurs octave o > 0 with σ0 again,
  because every octave's input passes through all S SCBs, which is what the
  shared cascade implies. As a result, octave o's scale s is not exactly
  σ0·2^(o+s/S) with respect to the original image. This follows the
  architecture as described, not textbook SIFT.
- **Not included**: keypoint refinement, orientation and descriptors, which
  the method leaves to software; FPGA-specific RAM primitives; and any
  external memory or host interface.
