# 16-point FFT: radix-2² 4-parallel feedforward pipeline and mixed-decimation transform

This RTL computes 16-point discrete Fourier transforms in fixed point, in two
ways that come from the same design proposal:

* **A streaming pipeline** (`mdc_fft16`). It takes four complex samples per
  clock cycle and returns four transformed samples per clock cycle. It uses
  the radix-2² algorithm on a *feedforward* (multipath delay commutator, MDC)
  structure. Data only moves forward through butterflies, rotators and small
  reordering buffers, with no feedback loops. A new 16-point transform can
  start every 4 cycles.
* **A mixed-decimation transform** (`md_fft`). It is combinational: all N
  samples go in at once and all N bins come out. The first stages use
  decimation in frequency (DIF) and the last stage uses decimation in time
  (DIT). Input and output are therefore both in natural order, and no
  bit-reversal memory is needed. It is built for N = 16, the main size, and
  for N = 8.

`m2dc_top` places the pipeline, a 16-point mixed-decimation transform and an
8-point mixed-decimation transform side by side. Each has its own ports.

## Number format

Every sample is a `fft_pkg::cplx_t`. This is a packed struct with two 16-bit
two's-complement parts, `re` and `im`. Twiddle factors use the same words in
Q2.14, where 16384 stands for 1.0. A complex product forms 32-bit products
and keeps bits 29..14. This brings the result back to 16 bits by truncation.

Additions keep 16 bits and wrap on overflow. No stage scales its result. A
16-point transform can grow by a factor of 16, so keep each input part
within about ±2000 (the testbenches use ±1000). Against a double-precision
DFT, the measured error is at most 2.7 LSB for the pipeline and 4.8 LSB for
the mixed-decimation transform.

`fft_pkg::w16(k)` gives W16^k = exp(−j2πk/16) as
`re = round(16384·cos(2πk/16))`, `im = −round(16384·sin(2πk/16))`. Only the
values for 0°, 22.5°, 45°, 67.5° and 90° are stored (16384, 15137, 11585,
6270, 0); the rest follow from symmetry. The smaller transforms take their
twiddles from the same table, since W_N^k = W16^(16k/N).

## The 4-parallel pipeline

### Data order

A transform enters as a *frame*: four consecutive input cycles, t = 0..3.
The input is interleaved across the four lanes, not in natural order:

| lane | t=0 | t=1 | t=2 | t=3 |
|------|-----|-----|-----|-----|
| 0    | x0  | x1  | x2  | x3  |
| 1    | x8  | x9  | x10 | x11 |
| 2    | x4  | x5  | x6  | x7  |
| 3    | x12 | x13 | x14 | x15 |

In general, lane l carries x[t + 8·l₀ + 4·l₁] in cycle t, where l₀ and l₁
are the bits of l.

The output comes in bit-reversed order, `dout[l] = X[bitrev4(4t + l)]`:

| lane | t=0 | t=1 | t=2 | t=3 |
|------|-----|-----|-----|-----|
| 0    | X0  | X2  | X1  | X3  |
| 1    | X8  | X10 | X9  | X11 |
| 2    | X4  | X6  | X5  | X7  |
| 3    | X12 | X14 | X13 | X15 |

### Stages

Each stage has two radix-2 butterflies (`r2_butterfly`), one on lanes 0/1
and one on lanes 2/3. The butterfly outputs are a+b on the upper lane and
a−b on the lower lane. Each stage handles one bit of the time index:

1. **Stage 1** pairs x[n] with x[n+8]. Lane 3 is then multiplied by −j
   (`trivial_rotator`: swap the two parts and negate one, with no
   multiplier). Lanes 1 and 2 then swap places.
2. **Stage 2** pairs n with n+4. Three non-trivial rotators (`rotator`) then
   multiply lanes 1, 2 and 3 by W16^φ. φ changes with the frame cycle t:

   | lane | φ for t = 0, 1, 2, 3 |
   |------|----------------------|
   | 1    | 0 2 4 6              |
   | 2    | 0 1 2 3              |
   | 3    | 0 3 6 9              |

   Each rotator reads its φ from its own four-entry `rotation_memory`.
   Lanes 1 and 2 swap again. Then a **shuffle with L = 2** runs on lanes
   0/1 and another on lanes 2/3.
3. **Stage 3** pairs n with n+2. Lanes 1 and 2 swap, a **shuffle with L = 1**
   runs on each lane pair, and lane 3 is multiplied by −j.
4. **Stage 4** pairs n with n+1.

### The shuffle (delay commutator)

The butterflies of one stage need partners that sit on other lanes or arrive
in other cycles than the previous stage left them. `shuffle` fixes this with
two buffers of L registers each and two multiplexers:

```
lo_d   = lo_in delayed by L cycles            (input buffer)
up_out = (sel ? lo_d : up_in) delayed by L    (output buffer)
lo_out =  sel ? up_in : lo_d
```

Say the upper lane carries block A and then block B, and the lower lane
carries block C and then block D, each block L samples long. With `sel = 0`
for the first L cycles and `sel = 1` for the next L:

* the upper output gives A, then C;
* the lower output gives B, then D;
* both outputs are aligned L cycles after the inputs.

In effect, B and C trade places. Each shuffle delays a frame by L cycles, so
the two shuffles add 2 + 1 = 3 cycles (N/P − 1, for N = 16 points and
P = 4 lanes).

### Control, valid and timing (`mdc_ctrl`)

A 2-bit counter numbers the valid input cycles of a frame. The
(valid, frame cycle) tag of each input set travels along with its data
through delay registers. This gives each part of the pipeline the frame
cycle of the samples it holds at that moment:

* the rotation memories use t in stages 1–2;
* the L = 2 shuffle selects with bit 1 of t;
* the L = 1 shuffle selects with bit 0 of t, three cycles later.

When no frame passes, both selects stay at 0. This lets a frame drain out of
the buffers without any following input. Frames may therefore be separated
by any number of idle cycles.

Interface timing:

* `din` and `in_valid` are sampled on the rising edge, into an input
  register.
* `dout` is registered. `out_valid` marks valid output sets, and `out_first`
  marks the t = 0 set of each frame.
* The first output set of a frame appears **5 cycles** after its first input
  set is sampled: 1 input register, 3 shuffle cycles, 1 output register.
* Frames sent back to back come out back to back, so the throughput is 4
  samples per clock cycle.
* If `in_valid` drops in the middle of a frame, the sticky `frame_err` flag
  is set. It is cleared by reset.
* `rst_n` is synchronous and active low. It clears only the control state:
  the data registers have no reset, and the valid tags say when they hold
  meaningful data.

## The mixed-decimation transform (`md_fft`, `dif_fft`)

For an N-point transform:

1. **Split.** Separate the even samples x[2m] from the odd samples x[2m+1].
2. **Transform each half.** Each half goes through an N/2-point DIF FFT,
   `dif_fft`. Its first butterfly stage forms a + b and (a − b)·W_M^j. That
   splits the problem into two half-size DIF FFTs, one for the even bins and
   one for the odd bins, and the split repeats down to 2 points. For N = 16,
   each 8-point half is therefore one stage plus two 4-point DIF FFTs. In
   the RTL the stages are unrolled into a chain of generate blocks. A DIF
   FFT leaves bin k at position bitrev(k).
3. **Transition.** Move position bitrev(k) back to position k. With all
   samples present at once this is only wiring, with no logic or storage.
4. **Final DIT stage.** Combine the two half spectra E and O:
   X[k] = E[k] + W_N^k·O[k] and X[k+N/2] = E[k] − W_N^k·O[k].
   This puts the output in natural order.

Multiplications by W^0 are left out. Multiplications by −j use the trivial
rotator. All other twiddles use `complex_mult`. The module has no registers,
so the whole transform is one combinational path. `N` may be 4, 8 or 16, and
`dif_fft`'s `M` may be 2, 4, 8 or 16. Both limits come from the 16-entry
twiddle table.

## Module overview

| module            | role |
|-------------------|------|
| `fft_pkg`         | `cplx_t`, Q2.14 constants, `w16()`, `bitrev()` |
| `r2_butterfly`    | a+b and a−b |
| `complex_mult`    | twiddle product, bits 29..14 kept |
| `trivial_rotator` | ×(−j) |
| `rotation_memory` | per-lane twiddle table indexed by the frame cycle (parameter `PHI`) |
| `rotator`         | `rotation_memory` + `complex_mult` |
| `shuffle`         | delay commutator (parameter `L`) |
| `mdc_ctrl`        | frame counter, valid tags and multiplexer selects |
| `mdc_fft16`       | the 4-parallel radix-2² pipeline |
| `dif_fft`         | combinational DIF FFT (parameter `M`) |
| `md_fft`          | mixed-decimation FFT (parameter `N`) |
| `m2dc_top`        | the pipeline plus 16- and 8-point `md_fft`, side by side |

`m2dc_top` has no parameters. Its ports are:

* `clk` and `rst_n`, used by the pipeline only;
* the pipeline's `mdc_in_valid`, `mdc_din[4]`, `mdc_out_valid`,
  `mdc_out_first`, `mdc_dout[4]` and `mdc_frame_err`;
* the combinational `md16_x[16]` → `md16_y[16]` and `md8_x[8]` → `md8_y[8]`.

## What comes from the source design and what is this implementation's own

Taken from the published design:

* the pipeline's structure: butterfly placement, lane swaps, the rotator
  coefficient lists, the shuffle buffer lengths (2 and 1) and where the
  buffers sit, the select timing, and selects taken from counter bits;
* the input and output data order;
* the mixed-decimation scheme (even/odd split, DIF halves, transition, DIT
  last stage) for 8 and 16 points;
* 16-bit data, with products cut to bits 29..14.

Choices made here:

* the Q2.14 reading of the twiddle format;
* truncation rather than rounding, and wrap-around rather than scaling or
  saturation;
* the input and output registers of the pipeline (the source shows no
  pipeline registers besides the shuffle buffers);
* the valid/frame handshake, the tag-driven selects that allow gaps and
  draining, `frame_err` and the reset behaviour;
* the transition as plain wiring;
* the twiddle table built by symmetry.

Limits and differences:

* The source describes the mixed-decimation flow graph as being mapped onto
  the feedforward pipeline, but it gives no architecture that merges them.
  Its pipeline produces bit-reversed output. Here the two are kept as
  separate datapaths, and the pipeline's output stays bit-reversed. A user
  who needs natural order from the stream must reorder it, or use `md_fft`.
* The source's sketch of the 16-point mixed-decimation flow graph shows only
  two DIF butterfly columns before the transition. That is too few for a
  16-point DFT. `md_fft` follows the description in words instead: two full
  8-point DIF FFTs, then one DIT stage. This is also what the 8-point
  example shows.
* Performance figures quoted for the source design are measured in
  nanoseconds on an FPGA: a 1.095 ns latency and 14.16 GS/s. The RTL fixes
  no clock, so those numbers cannot be checked here. At 4 samples per cycle,
  14.16 GS/s would need a clock of about 3.5 GHz.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The FFT testbenches share
`tb_fft_pkg`, which provides a double-precision DFT reference and tolerance
compares. What each one covers:

* `tb_mdc_fft16`:
  * 40 frames: an impulse, a shifted impulse, a constant, a tone and random
    data, some back to back and some with gaps;
  * every output sample against the DFT (tolerance 10 LSB);
  * 5-cycle latency, and 4-cycle frame spacing for back-to-back input;
  * `frame_err`.
* `tb_md_fft`: 200 vectors each for N = 16 and N = 8, all bins in natural
  order.
* `tb_dif_fft`: 200 vectors each for M = 8 and M = 4, bins in bit-reversed
  positions.
* `tb_shuffle`: tagged blocks through L = 2 and L = 1. Checks the A,C / B,D
  output order and the L-cycle alignment.
* `tb_mdc_ctrl`: compares every select, `t`, `out_valid` and `out_first`
  against its own record of the input tags, with gaps. Also checks
  `frame_err` and that reset clears it.
* `tb_r2_butterfly`, `tb_complex_mult`, `tb_trivial_rotator`: exact integer
  references, including overflow, ±1 and ±j.
* `tb_rotation_memory` and `tb_rotator`: the three coefficient lists against
  `cos`/`sin` computed in real arithmetic.
* `tb_m2dc_top` (top level, default sizes):
  * 48 frames through the pipeline and the same data through both `md_fft`
    instances;
  * counts that each mechanism happened at least once: back-to-back frames,
    frames after a gap, both shuffles crossing, draining after the input
    stops, a detected frame error, and 16- and 8-point transforms.

Each testbench was also run against a deliberately broken copy of its
module (for example a wrong sign, swapped lanes or a missing transition).
Every one of them reported failures.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fft_pkg.sv tb/tb_fft_pkg.sv tb/tb_m2dc_top.sv --top-module tb_m2dc_top
./obj_dir/Vtb_m2dc_top
```

For any other testbench, replace `tb_m2dc_top`. Verilator finds the modules
it needs in `rtl/` by file name. For lint only:
`verilator --lint-only -Wall -Irtl rtl/fft_pkg.sv rtl/m2dc_top.sv`. The only
warnings are about the deliberately unused low and high bits of the wide
product sums in `complex_mult`.

## Changing it

* **Word size or twiddle precision:** `DW` and `FRAC` in `fft_pkg`. The
  trig constants in `trig_q14` must then be rescaled to round(2^FRAC·cos).
* **Mixed-decimation size:** `md_fft #(.N(...))`, up to 16. Going beyond 16
  needs a larger twiddle table in `fft_pkg::w16`.
* **Pipeline size:** fixed at 16 points and 4 lanes. The wiring in
  `mdc_fft16` follows that size. A larger radix-2² feedforward FFT would
  repeat the stage pattern, with shuffles of length N/8, N/16, … and longer
  coefficient lists.
