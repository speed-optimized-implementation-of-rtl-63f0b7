# Chirplet transform accelerator

An ultrasonic echo is well described by a *chirplet*: a Gaussian-windowed chirp
with six parameters.

    C(t) = beta * exp(-alpha1*(t-tau)^2) * exp(j*2*pi*(phi + fc*(t-tau) + alpha2*(t-tau)^2))

The parameters are the amplitude `beta`, the time of arrival `tau`, the envelope
width `alpha1`, the phase `phi`, the centre frequency `fc` and the chirp rate
`alpha2`. Fast chirplet decomposition splits a measured signal into such echoes
one at a time. For each echo it searches the parameters one after another. For
every trial value it scores a trial chirplet against the signal with the
chirplet transform. That score is the zero-lag (centre) point of their
cross-correlation:

    CT = sum_n f[n] * conj(psi[n])

A decomposition needs a great many of these evaluations. Generating the 512-sample
trial chirplet, with its two exponentials per sample, is the costly part.

This RTL performs one such evaluation in hardware:

* **Parallel chirplet generator.** Seven IEEE-754 single-precision parameters in,
  a 512-sample complex chirplet out. Eight generators run side by side, so the
  output is 8 samples per clock. The first group leaves 14 cycles after the
  start pulse and the whole chirplet is out after 78 cycles.
* **Centre-point correlator.** It holds the measured signal and, once the chirplet
  has been written beside it, returns `CT` and `|CT|^2` 23 cycles later.

The search loop itself (peak search over the trial values, convergence tests,
subtracting the found echo) is software on a processor. It is not part of this RTL.

## The chirplet as computed

For sample index `n`, starting at 0, with sample period `tstep`:

    dt  = n*tstep - tau
    u   = alpha1 * dt^2                       Gaussian argument, alpha1 > 0
    p   = phi + fc*dt + alpha2*dt^2           phase in cycles (turns)
    out = beta * exp(-u) * (cos(2*pi*p) + j*sin(2*pi*p))

Units: `tau` and `tstep` in seconds, `fc` in Hz, `alpha1` and `alpha2` in 1/s^2,
and `phi` in **cycles**, not radians. The envelope is `exp(-alpha1*dt^2)`, so
`alpha1` is given as a positive number. The struct that carries the parameters is
`chirplet_params_t` in `rtl/chirplet_pkg.sv`.

An output sample is `cplx16_t`: a 16-bit real part and a 16-bit imaginary part,
both Q1.15. It is rounded and saturated to [-1, 1). `|beta|` must be below 2.

## Time-interleaved generation

A single pipelined generator makes one sample per clock. To get 8 per clock,
generator `k` (lane `k`) computes only samples `k, k+8, k+16, ...`. Each lane on
its own is a chirplet sampled at one eighth of the rate, far below what the
signal needs. The eight lanes are time-shifted by one sample period from each
other, though. Read side by side in one clock, they form 8 consecutive samples
of the full-rate chirplet.

A shared sequencer in `parallel_chirplet_gen` latches the parameters on `start`.
It then issues a group number `m` to all eight generators, one per clock. Lane
`k` forms `n = 8m + k`. Each lane also gets a flag saying whether `n` is below
the requested count, so a partly filled last group is marked lane by lane.

### One generator (`chirplet_generator`)

The arguments are built in floating point. The two exponentials are then read
from tables. Cycle numbers count from the group number entering the generator:

| cycles | operation |
|---|---|
| 0-2 | `n` converted to float (exact below 2^24), `t = n*tstep` |
| 2-4 | `dt = t - tau` |
| 4-6 | `dt^2` and `fc*dt` |
| 6-8 | `alpha1*dt^2`, `alpha2*dt^2`, `phi + fc*dt` |
| 8-10 | `p = (phi + fc*dt) + alpha2*dt^2` |
| 9, 10, 11, 12 | envelope path: table address, `exp(-u)`, times `beta`, alignment register |
| 11, 12 | phase path: table address, `sin` and `cos` |
| 13 | `beta*exp(-u)` times `cos` and `sin`, rounded to Q1.15 |

That is 13 cycles. The sequencer register in front adds one more, which gives
the 14 cycles from `start` to the first output. After that the generator takes a
new index every cycle, so 512 samples take 14 + 512/8 = 78 cycles.

Floats are turned into table addresses by `fp_to_fixed`:

* **Phase.** `round(p * 2^16) mod 2^16` is the fractional part of the phase in
  cycles, so it addresses one period of the sine table directly. Cosine is read
  from the same table a quarter period further on.
* **Envelope.** `round(u * 4096)`, saturated to 65535. The Gaussian table covers
  `u` in [0, 16), and `exp(-16)` is below one output step.

The amplitude `beta` is converted once to fixed point (16 fraction bits). The
three final multiplications are fixed point.

**Accuracy.** The test chirplet below (100 MHz sampling, `tau` = 2.56 us,
`alpha1` = `alpha2` = 1e12, `fc` = 5 MHz, `phi` = 0.75, `beta` = 0.25) is compared
with a double-precision model. The largest error is 1.7 steps of 2^-15, about
5e-5. Precision falls as `|p|` grows, because a single-precision phase keeps 24
significant bits. With `|p|` around 2^8 cycles the phase resolution reaches the
2^-16 table step. Long chirplets and large `fc*dt` therefore lose accuracy.

### Floating-point operators

`fp_mul` and `fp_add` are binary32 units with 2 pipeline stages each:

* rounding to nearest, ties to even;
* subnormal inputs read as zero, and subnormal results flushed to zero;
* infinities and NaN propagated, with NaN given as `0x7FC00000`.

`int_to_fp` converts an unsigned integer exactly (up to 24 bits). `fp_to_fixed`
rounds a float to fixed point, with either wrap or saturation.

### Tables

`exp_lut` holds `round(exp(-i/4096) * 2^16)`, limited to 65535. `sine_lut`
holds `round(32767 * sin(2*pi*i/65536))`. Each has 65536 entries of 16 bits and
a registered read, as from block RAM.

The contents are computed at elaboration from these formulas. An `initial`
block fills the array by calling a function that evaluates one entry with real
arithmetic, so no data file is needed. This form is accepted by Verilator and by
the slang-based Yosys flow, which both produce the initialised memory. With 8
generators the design holds 16 such tables of 1 Mbit each, 16 Mbit in all. Filling all 16 takes
more constant-evaluation steps than slang allows by default, so synthesise the
full design with a raised limit, e.g. `read_slang --max-constexpr-steps 100000000`
(a coarse Yosys synthesis of the top then takes about two minutes). A flow that cannot
evaluate real-valued functions at elaboration needs the same formulas
precomputed into its ROM initialisation format.

## Centre-point correlator (`xcorr_center`)

The correlator keeps two 512-sample buffers (`sample_buffer`):

* **Reference buffer.** The measured signal, written through `ref_wr_*`, 8
  samples per clock. It stays until it is overwritten, so many trial chirplets
  can be scored against one signal.
* **Estimate buffer.** Written from the generator bus.

Both buffers are read one 64-sample row per clock. Each of the 64 lanes forms
`a*c + b*d` and `b*c - a*d`, where `f = a + jb` and `psi = c + jd`. That takes
four multipliers per lane, 256 in all. A registered binary adder tree reduces
the lanes and an accumulator adds up the eight rows. A three-stage squarer then
forms `|CT|^2`.

Cycle budget from `start` (cycle 0):

| cycle | |
|---|---|
| 1 | row address |
| 2 | buffer read |
| 3 | operand registers |
| 4 | products |
| 5 | lane sums |
| 6-11 | adder tree (6 levels) |
| 12-19 | accumulation of 8 rows |
| 20-22 | squaring and sum |
| 23 | `result_valid`, `ct_re`, `ct_im`, `ct_mag2` |

Nothing is rounded: `ct_re` and `ct_im` are 42 bits and `ct_mag2` is 85 bits.
A real measured signal is loaded with zero imaginary parts.

## Top level (`chirplet_transform`)

| port | meaning |
|---|---|
| `params`, `ct_start`, `ct_mode` | start one operation. `ct_mode` = 0 generates only; 1 generates and correlates |
| `busy` | high from the cycle after `ct_start` until the operation ends; `ct_start` is ignored meanwhile |
| `ref_wr_en`, `ref_wr_addr`, `ref_wr_data[8]` | load the reference, row `ref_wr_addr` = samples `8*addr .. 8*addr+7` |
| `gen_valid`, `gen_lane_valid`, `gen_index`, `gen_samples[8]`, `gen_last` | the generated chirplet, 8 samples per clock, driven in both modes (e.g. towards a DMA engine) |
| `ct_valid`, `ct_re`, `ct_im`, `ct_mag2` | the result, `ct_valid` a one-cycle pulse |

Timing in mode 1 with the defaults:

* `ct_start` in cycle 0;
* chirplet groups in cycles 14 to 77;
* correlator start in cycle 78;
* `ct_valid` in cycle 101.

A processor drives an estimation step like this. It loads the reference once.
For each trial value of one parameter it issues a mode-1 operation and keeps the
largest `ct_mag2`. All ports are plain signals. The processor-bus register
interface and the DMA engine that would sit in front of them on an FPGA SoC are
not included.

## How this relates to the published design

The structure and the figures it is built to follow come from the paper
"Speed-Optimized Implementation of Fast Chirplet Decomposition Algorithm on
FPGA-SoC":

* floating-point argument generation;
* 65536-entry tables for the Gaussian and for sine/cosine;
* eight undersampled generators in parallel;
* 16+16-bit samples;
* 14 cycles of latency and 78 cycles for 512 samples;
* a centre-point correlation of 512 samples in 23 cycles, using 256 multipliers.

The points below are choices or readings made here. Keep them in mind when
comparing with that work:

* **Envelope sign.** The envelope is written `exp(-alpha1*dt^2)` and `alpha1` is
  given as positive. This matches a Gaussian window with the positive `alpha1` =
  1e12 of the test case.
* **Phase unit.** `phi` is in cycles, as the `2*pi*(phi + ...)` form of the chirp
  implies. A phase given in radians must be divided by `2*pi` first.
* **Fixed-point products.** The multiplications by `beta` and by the table values
  are fixed point, not floating point.
* **Pipeline splits.** The stages of the generator and the correlator were chosen
  here so that the 14-, 78- and 23-cycle counts come out. The source reports the
  cycle counts, not the stages.
* **Correlator layout.** The 64 lanes with four multipliers each are inferred from
  the 256 multipliers reported. The buffer organisation (8-wide writes, 64-wide
  reads) is also a choice made here.
* **Sequencer and control.** The shared sequencer, the `busy` rule, the lane-valid
  flags, the two-mode top level and the generator-to-correlator hand-over are
  this design's own.
* **Not checked here.** No claim is made about timing closure at the reported
  187.5 MHz, or about FPGA resource use beyond simple counting. The 16 Mbit of
  tables dominate the memory: about 456 36-kbit block RAMs if each sine table is
  one dual-port memory, against the 612 reported for the original generator
  array. The correlator has 256 multipliers, the number reported for it.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. Example with plain
Verilator, from the project root:

    verilator --binary --timing --assert -y rtl +libext+.sv \
        rtl/chirplet_pkg.sv tb/tb_fp_pkg.sv tb/tb_chirplet_transform.sv \
        --top-module tb_chirplet_transform
    ./obj_dir/Vtb_chirplet_transform

Replace the last testbench file and `--top-module` with another testbench:

| testbench | what it checks |
|---|---|
| `tb_chirplet_transform` | The whole design at default size. A 5 MHz reference; a centre-frequency sweep from 3 to 7 MHz must peak at 5 MHz. Every sample against a double-precision chirplet. `CT` against sums over the bus samples. 14 and 101 cycle timing. Generate-only mode, start while busy, reference reload. |
| `tb_parallel_chirplet_gen` | 512-sample test chirplet (14 / 78 cycles), a partly filled last group, a zero-length request, start while busy. |
| `tb_chirplet_generator` | One lane, three parameter sets, with and without gaps, 13-cycle latency. |
| `tb_xcorr_center` | Random and full-scale signals, lane-masked rewrites, 23-cycle latency, start while busy. |
| `tb_sample_buffer` | Masked writes, 64-wide reads, reads during writes. |
| `tb_fp_mul`, `tb_fp_add` | 20000 random and directed cases against exactly rounded double-precision results. |
| `tb_exp_lut`, `tb_sine_lut` | Table entries against the formulas. |

`tb/tb_fp_pkg.sv` holds the exact float conversions and the double-precision
chirplet model that the testbenches use as reference.

## Changing it

* **`NUM_GEN`** (top, default 8). The number of generators, which is also the
  bus width. `N_SAMPLES` must be a multiple of it, and the correlator writes
  `NUM_GEN` samples per row.
* **`N_SAMPLES`** (default 512). The chirplet length. It must be a multiple of
  `XC_LANES`. The correlator latency becomes
  `9 + log2(XC_LANES) + N_SAMPLES/XC_LANES` cycles.
* **`XC_LANES`** (default 64). Correlator lanes, a power of two. Fewer lanes
  means fewer multipliers and more cycles.
* **`LUT_ADDR_W`** (default 16). The table size. Smaller tables save memory and
  lose accuracy. The Gaussian table always spans [0, 16): `EXP_U_FRAC` in the
  generator is 12 for 16-bit addresses and should be `LUT_ADDR_W - 4`.
* **Sample index.** It must stay below 2^24 for `n*tstep` to be formed exactly.
* **Latency constants.** The generator latency `GEN_LAT` in `chirplet_pkg` is
  derived from the operator latencies `FP_MUL_LAT` and `FP_ADD_LAT`. The
  generator's stage alignment assumes both are 2, so a change there needs the
  generator's delay registers adjusted too.

## Files

`rtl/`: `chirplet_pkg` (types, latencies), `chirplet_transform` (top),
`parallel_chirplet_gen`, `chirplet_generator`, `fp_mul`, `fp_add`, `int_to_fp`,
`fp_to_fixed`, `exp_lut`, `sine_lut`, `xcorr_center`, `sample_buffer`.

`tb/`: one testbench per module above (except the two converters, which are
covered through the generator tests) and `tb_fp_pkg`.
