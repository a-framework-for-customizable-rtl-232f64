# Mutual-information accelerator for image registration

Intensity-based image registration searches for the geometric transform that
best aligns a *floating* image to a *reference* image. A software optimiser
(Powell, (1+1) evolutionary, ...) proposes a transform, the floating image is
resampled, and a similarity metric tells the optimiser how good the alignment
is. For multi-modal images (CT against PET, for example) the metric of choice
is **mutual information** (MI), and its evaluation is where the time goes: it
touches every pixel of both images on every iteration.

This repository is a SystemVerilog implementation of a configurable,
streaming MI engine. Given two images in memory it returns

    MI(R, F) = H(R) + H(F) - H(R, F),    H(X) = - sum_x p(x) log2 p(x)

together with the three entropies. Everything else in a registration (the
transform, the optimiser, buffer management) is host software and is not
part of this RTL.

## The idea: everything comes from one joint histogram

The joint histogram `J[i][j]` counts the pixel positions where the reference
has intensity `i` and the floating image has intensity `j`. Its row sums are
the reference histogram and its column sums the floating histogram, so one
pass over the pixels is enough. The rest is arithmetic over histogram
entries, whose number (`HS*HS`, `HS = 2^IBW`) does not depend on the image
size.

The probabilities are never formed. With `N` pixels,

    H = log2 N - (1/N) * sum_c c*log2(c)

so the lanes only compute the unscaled term `c*log2(c)` of each count `c`,
and the division by `N` is done once per histogram at the very end. MI is then

    MI = H_ref + H_flt - H_joint

By default this is done in fixed point with 23 integer and 19 fraction bits.
The integer width is what a 512x512 image needs: the largest possible sum
is `2^18 * 18 < 2^23`. With `ET_FLT = 1` stages 7 to 9 work in IEEE 754
single precision instead (see below).

## The pipeline

One core (`mi_core`) is a nine-stage dataflow pipeline. Every stage accepts
one beat per cycle, so no stage ever has to stall the one before it; streams
are registered `valid`/`last`/data bundles.

| Stage | Module | What it does |
|---|---|---|
| 1 | `input_fetch` (+ `ref_cache`) | Reads both images over one memory port, splits each `MBW`-bit word into `HPE = MBW/IBW` pixel pairs |
| 2 | `joint_hist_pe` x `HPE` | Each PE builds a partial joint histogram of its pixel lane, then streams it out `EPE` counts per beat |
| 3 | `joint_hist_sum` | Adds the `HPE` partial histograms lane by lane |
| 4 | (fan-out) | The joint stream feeds three branches |
| 5 | `ref_hist`, `flt_hist` | Row sums and column sums: the two single histograms, `EPE` counts per beat |
| 6 | (lane split) | Each `EPE`-wide beat feeds `EPE` entropy lanes |
| 7 | `entropy_pe` x `3*EPE` | `c*log2(c)` per count; the logarithm comes from `log2_fx` |
| 8 | `entropy_sum` x 3 | Adds the lanes and accumulates one sum per histogram |
| 9 | `mi_calc` | Divides by `N`, forms `H = log2 N - S/N` for each histogram, then MI |

Stages 7 to 9 exist in two versions. The `_flt` modules (`entropy_pe_flt`,
`entropy_sum_flt`, `mi_calc_flt`) replace the three above when `ET_FLT = 1`.

`mi_accel_top` places `NCORE` such cores side by side, each with its own
memory port, so that several registrations can run at once without
contending for a port.

The coarse cost of one MI evaluation is `ISS/HPE + HS*HS/EPE` cycles: the
histogram pass, then the drain of the joint histogram through stages 2 to 7.
Stages 8 and 9 add a small constant. The two terms are the two knobs. `HPE`
(set by the memory-port width) speeds up the pixel pass, and `EPE` speeds up
the histogram drain.

## The histogram PE (the hard part)

A histogram update is a read-modify-write of a block RAM. Consecutive
pixels often hit the same bin, which is a read-after-write hazard whenever
the RAM read has latency. `joint_hist_pe` follows the published scheme and
keeps the count of the most recent bin, `old`, in an accumulator register:

* incoming index equal to `old`: increment the register, no RAM traffic;
* different index: write the register back to `hist[old]`, then load
  `hist[curr] + 1` into the register and make `curr` the new `old`.

In this RTL the RAM read is synchronous. The read for an index is issued when
the pair arrives, and the comparison happens one cycle later when the data
returns. One case remains: a pattern `a b a`. The write-back of `a` (caused
by `b`) happens in the same cycle as the read of the second `a`, so the read
would return the stale value. A one-entry bypass forwards the written value
to the reader. Both the accumulator hits and the bypass are exercised and
counted by the testbenches.

The RAM holds `HS*HS/EPE` rows of `EPE` counts. The update path writes one
lane of a row, and the read-out reads a whole row per cycle, which gives the
`EPE`-wide output beat directly. Each row is zeroed as it is read, so the PE
is clean for the next image without a separate clear pass. Only after reset
does the PE spend `HS*HS/EPE` cycles zeroing its RAM, and `busy_o` is high
during that time. The count width is `clog2(ISS+1)` bits (19 for 512x512),
because one bin can hold every pixel.

The order of the joint index is `{ref, flt}`: rows are reference
intensities. That order is what lets `ref_hist` sum rows as they stream past
(`HS/EPE` consecutive beats). `flt_hist` instead keeps `HS/EPE` packed column
accumulators, adds every row into them, and emits them during the last row.

## Fetching and the reference cache

There is a single memory read port per core. In **direct mode** the fetch
unit alternates requests, reference word then floating word. Responses come
back in order, and each reference word is held until its floating partner
arrives. The port carries two words per pixel-word pair, so the pixel pass
takes `2*ISS/HPE` cycles at best.

In a registration the reference image never changes, so with `CACHE = 1`
the core can **prefetch** it once into `ref_cache`, a 2 Mbit on-chip
memory for 512x512x8. Every later `start` then streams only the floating
image and reads the matching reference word from the cache. That gives one
pair per cycle and `ISS/HPE` cycles for the pixel pass. The size given with
the prefetch is used for all cached runs. Until a reference has been
prefetched, a core with a cache works in direct mode.

Memory port protocol:

* Requests: `mem_req_valid_o` and `mem_req_addr_o` (a word address) are held
  until `mem_gnt_i` is high.
* Responses: `mem_rsp_valid_i` and `mem_rsp_data_i` arrive in request order,
  with any latency and no backpressure.
* Word layout: pixel `k` of a word is bits `[IBW*k +: IBW]`.

## The floating-point entropy type

`ET_FLT = 1` builds the entropy stages with 32-bit IEEE floats, using the
shared helpers in `fp32_pkg`. Every operation rounds to nearest-even.
Subnormals are flushed to zero, and infinities and NaNs cannot arise.

* **Stage 7.** `entropy_pe_flt` converts the count (exact, below `2^24`) and
  the `log2_fx` result to floats and multiplies them.
* **Stage 8.** `entropy_sum_flt` adds the lanes in order and then into the
  accumulator, in one cycle, so it too takes a beat per cycle.
* **Stage 9.** `mi_calc_flt` divides the 24-bit significand of each sum by
  the integer `N`, producing 48 quotient bits, one per cycle. It then rounds
  once, so `S/N` is correctly rounded.

Float rounding in the long accumulation costs a few 1e-6 bits of MI, about
the same as the fixed-point error. For example, 2FLT-2-2 below gives
1.913170 where the exact value is 1.913167. The fixed-point type needs no
floating-point units. Its Stage 7 multiplier is an integer one and Stage 8 is
a plain adder, so it is the cheaper of the two.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NCORE` | 1 | independent cores, one memory port each |
| `IBW` | 8 | pixel width; `HS = 2^IBW` histogram bins per image |
| `MBW` | 32 | memory port width; `HPE = MBW/IBW` histogram PEs |
| `EPE` | 4 | counts per histogram beat and entropy lanes per branch |
| `ISS` | 512*512 | largest image in pixels; sizes the counts and the cache |
| `CACHE` | 1 | build the reference cache |
| `ET_INT`, `ET_FRAC` | 23, 19 | fixed-point entropy format; `ET_FRAC` is also the precision of the logarithm |
| `ET_FLT` | 0 | 1: single-precision entropy stages |

The pixel width, port width, image size and fixed-point split are those of
the published evaluation. `EPE = 4` with the cache enabled is one of the
configurations that was evaluated (written "CFX-4-4" there: cached, fixed
point, HPE 4, EPE 4), chosen here as the default. `EPE` must be a power of two
no larger than `HS`. The defaults live in `rtl/mi_pkg.sv`.

Resource drivers: the `HPE` histogram RAMs of `HS*HS*CW` bits each
(4 x 1.2 Mbit by default) and the cache (2 Mbit) dominate. `EPE` sets the
number of logarithm pipelines. Each has `ET_FRAC` squaring multipliers of
about 24x24 bits, and there are `3*EPE` of them.

## Interface and timing

Per core (all ports of `mi_accel_top` are arrays indexed by core):

* `load_ref_i` (pulse, core idle): prefetch `n_words_i` words from
  `ref_base_i`. `ref_cached_o` rises when done.
* `start_i` (pulse, core idle): compute MI of the images at `ref_base_i` and
  `flt_base_i`, `n_words_i` words each. `n_words_i` may be smaller than
  `ISS/HPE`. The pixel count `N` is `n_words*HPE`.
* `busy_o`: high while a command runs and during the post-reset clear.
* `done_o` (one-cycle pulse): `mi_o`, `h_ref_o`, `h_flt_o` and `h_joint_o`
  are valid and hold until the next result. They are in bits. With
  `ET_FLT = 0` they are two's complement with `ET_FRAC` fraction bits
  (`mi_o / 2^19`); with `ET_FLT = 1` they are 32-bit IEEE singles.

Measured at the defaults on one 512x512 pair:

| Mode | Cycles | Coarse model |
|---|---|---|
| cached | 82,103 | `ISS/HPE + HS*HS/EPE` = 81,920 |
| direct | 147,639 | `2*ISS/HPE + HS*HS/EPE` = 147,456 |

The roughly 180 extra cycles are the memory latency, the logarithm
pipeline (21 cycles), and the Stage 9 division (three 42-step divisions).

## How far it can be trusted

Every module has a self-checking testbench in `tb/`. Results are compared
with double-precision entropies computed directly from the pixel arrays, not
from the hardware's formulation. MI and entropy errors are a few 1e-6 bits.

| Testbench | What it runs |
|---|---|
| `tb_mi_full` | All defaults, one 512x512 pair: a direct run, a prefetch, then a cached run, with the cycle count checked |
| `tb_mi_accel_top` | Two small cores running concurrently, one behind a memory that stalls at random; direct, prefetch and cached runs, and an identical-image run where MI must equal H(ref). Counts accumulator hits, write-backs, bypasses, stalls and each fetch mode, and fails if any never happened |
| `tb_mi_configs` | The evaluated configurations FX-32-8, 2FX-2-4, CFX-1-1, 2FLT-2-2 and 2CFLT-2-1 at full image size (the prefix digit is the core count, C means cached, FX/FLT the entropy type, then HPE and EPE); MI and cycles checked against the coarse model |
| `tb_mi_accuracy` | 100 random 64x64 pairs, from independent to fully dependent, through a fixed-point and a floating-point core; prints the mean squared MI errors (about 4e-12 fixed against float) |
| `tb_mi_core` | An uncached core with two PEs and one lane, on random, correlated, identical, constant and partial images |
| unit testbenches | One per stage; each uses its own reduced parameters |

Files in `tb/` that are not testbenches:

* `mem_model.sv` and `mi_cfg_run.sv` are helper models.
* `mi_ref_pkg.sv` holds the floating-point reference arithmetic.

## Departures from the published design

* **Logarithm.** The logarithm is a squaring-based base-2 fixed-point
  pipeline (`log2_fx`) rather than a vendor library core. Base 2 gives MI
  in bits and matches the 23-bit integer part. The floating-point type
  uses the same pipeline and converts its result to float, so its
  logarithm is exact to about `2^-19`, not to full single precision.
* **Stage 9 latency.** The published stage is "a few cycles". Here the
  deferred division by `N` is a sequential divider, one quotient bit per
  cycle for each of the three sums. It takes about 130 cycles in fixed
  point and 170 in floating point. That is a constant and is small next to
  the histogram pass.
* **Streams.** The published stages are joined by FIFOs. Here every stage
  takes a beat every cycle, so plain registered valid streams replace them,
  and nothing can stall once pixels flow. Where an element had to wait
  (a reference word waiting for its floating partner), a holding register
  does the job.
* **Host interface.** The control registers and the memory bus of the
  original platform are replaced by the plain command and memory ports
  above. The Python runtime, the framework that generates configurations,
  and the registration software are outside this RTL.
* **Memory placement.** Whether histogram RAMs and the cache go to block
  RAM or UltraRAM is left to synthesis.
* **PE clearing.** Clearing-on-read and the one-time clear after reset are
  this design's own. So are the bypass and the memory layout in rows of
  `EPE` counts.

## Simulating

A testbench compiles from the two folders; for example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/mi_pkg.sv rtl/fp32_pkg.sv tb/mi_ref_pkg.sv tb/tb_mi_full.sv \
        --top-module tb_mi_full
    ./obj_dir/Vtb_mi_full

Each testbench prints `TB_RESULT checks=N failures=M` and stops; a watchdog
ends a hung run with a failure. The full-size run takes about a second. The
testbenches read no files: images are generated in SystemVerilog.

To change the configuration, override parameters on `mi_accel_top`, or edit
the defaults in `mi_pkg`. Example: `#(.MBW(256), .EPE(8))` for 32 histogram
PEs and eight lanes, or `#(.ET_FLT(1))` for floating-point entropy. `n_words_i` grows with `ISS/HPE`, and the result width
with `ET_INT + ET_FRAC`. For images other than 512x512, keep `ET_INT` at
least `clog2(ISS * log2(ISS))`.
