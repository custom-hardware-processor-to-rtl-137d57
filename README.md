# A figure-of-merit processor for fitting X-ray diffraction peaks

When diffraction peaks overlap strongly, many different sets of peaks
reproduce the measured profile almost equally well. Finding the best set is a
combinatorial search, usually done with an evolutionary algorithm (a genetic
algorithm or differential evolution). That algorithm asks the same question
for every candidate in every generation: how well does this candidate fit
the measurement? Almost all of the search time goes into answering it.

This RTL is a small floating-point processor that answers that question in
hardware. It takes one candidate, meaning the parameters of the peaks and of
the background. It compares the profile the candidate predicts with a
measured profile held in on-chip ROM and returns one number, the
chi-squared figure of merit. A lower value means a better fit. One processor
is small, so a board can hold many of them and score a whole population of
candidates in parallel.

## What is computed

The measured profile has `n` points. Point `i` holds `yobs_i`, the counts at
the angle `x_i = x_start + i * x_step` (in degrees 2-theta). The figure of
merit uses Poisson weights `1/yobs_i`:

    chi2 = sum_i (yobs_i - ycal_i)^2 / yobs_i

The model intensity `ycal_i` is a linear background plus two pseudo-Voigt
components for every peak:

    ycal(x) = bg0 + bg1*x + sum_peaks [ pV(x; i0, x01, w, eta) + pV(x; i0/2, x02, w, eta) ]

    pV(x; I, x0, w, eta) = I * [ eta / (1 + t^2) + (1 - eta) * exp(-ln2 * t^2) ],   t = (x - x0)/w

The pseudo-Voigt function mixes a Cauchy (Lorentzian) and a Gaussian
profile. Its parameters are:

- `I`: the peak height.
- `x0`: the position.
- `w`: the half width at half maximum.
- `eta`: the share of the Cauchy part, from 0 to 1.

Copper radiation adds two components to every peak:

- The CuK-alpha1 line, at `x01`.
- The weaker CuK-alpha2 line, at `x02`, with half the height and the same
  shape.

The alpha2 position follows from the alpha1 position:
`x02 = 2*asin(sin(x01/2) * 1.5444274/1.5405929)`. The processor takes `x02`
as an input, so whatever supplies the candidate computes it.

Every real number is an IEEE-754 single-precision word.

## Architecture

```
                 +------------------+        +----------------------------------+
  candidate ---> | merit_controller | <----> | pv_unit                          |
  start     ---> |                  |        |   pv_controller                  |
  fitness_rdy <- |                  |        |   2 x fp_addsub   2 x fp_div     |
  merit     <--- |                  |        |   1 x fp_mul      1 x fp_itof    |
                 +------------------+        +----------------------------------+
                   |            |
            +-------------+  +-------------------------------------------+
            | profile_rom |  | fp_addsub   fp_mul   fp_div   fp_itof     |
            | 512 x 13 b  |  | (main set of units)                       |
            +-------------+  +-------------------------------------------+
```

`fom_processor` is the top level. It contains four parts:

- **profile_rom**: the measured counts, 512 words of 13 bits. The ROM stores
  only counts. Each angle is worked out from its address. The ROM is filled
  from `rtl/profile_rom.hex`, so loading a different profile needs only a new
  file. The file has one hexadecimal word per line. The contents come only
  from `$readmemh`, so the synthesis flow must honour it in initial blocks.
  A flow that ignores it sees an empty memory and removes it.
- **Main floating-point units**: one adder/subtracter, one multiplier, one
  divider, and one converter from integer to float.
- **merit_controller**: walks through the profile and runs the main units
  and the pV unit. It adds up chi-squared, then raises `fitness_rdy` with the
  result on `merit`.
- **pv_unit**: computes one value of the pseudo-Voigt function. It has its
  own sequencer (`pv_controller`) and six floating-point units of its own:
  two adder/subtracters, two dividers, one multiplier and one converter.
  Having two of some units lets independent operations run at the same time.

### The pseudo-Voigt unit: eight steps

Most of the time is spent in this unit. `pv_controller` splits the pV formula into
eight steps. Each step starts its operations together and waits until all of
them have finished:

| step | operations (in parallel)                          | units             |
|------|---------------------------------------------------|-------------------|
| 1    | `d = x - x0`                                      | adder 0           |
| 2    | `t = d / w`                                       | divider 0         |
| 3    | `t2 = t * t`                                      | multiplier        |
| 4    | `a = 1 + t2`, `b = 1 - eta`, `c = ln2 * t2`       | adder 0, adder 1, multiplier |
| 5a   | `L = eta / a`                                     | divider 0         |
| 5b   | `G = exp(-c)`, iterative (below)                  | converter, multiplier, divider 1, adder 1 |
| 6    | `g = b * G`                                       | multiplier        |
| 7    | `s = L + g`                                       | adder 0           |
| 8    | `y = I * s`                                       | multiplier        |

Step 4 runs three operations at once. In step 5, the Cauchy division (5a)
runs on divider 0 while the exponential (5b) uses the other units.

### The exponential

There is no exponential unit. Step 5b sums the series of `e^c` for a fixed
number of terms, `EXP_ITERS`, and takes the reciprocal:

    e^c ~ sum_{k=0..EXP_ITERS} c^k / k!,      G = 1 / e^c

Because `c = ln2 * t^2` is never negative, every term is positive. This has
two consequences:

- The truncated sum never suffers from cancellation.
- Far from a peak (large `c`), the truncated sum is much smaller than `e^c`,
  so `G` comes out too large. But `G` is then far below the counts, so the
  error does not matter. If the sum overflows to infinity, `G` becomes 0.

The error is largest at moderate `c`, on the flanks of a peak. Each iteration
overlaps two pairs of operations:

- It converts `k` to a float while multiplying the current term by `c`.
- It adds the term to the sum while the next iteration's conversion and
  product are already running.

One iteration costs about 32 clocks, and the divider sets that cost.

`EXP_ITERS` is a trade between precision and speed. With 10 iterations (the
default) the 501-point benchmark scan takes 819,642 clocks. With 30 it takes
2,102,202 clocks, and the figure of merit moves only in its fifth
significant digit (529.59 against 529.53 for a slightly perturbed
candidate).

### The merit controller's schedule

For each point `i`, the merit controller does the following, in order:

1. It converts `i` to a float and reads ROM word `i`.
2. It converts the counts to a float (`yobs`) and forms `i * x_step`.
3. It computes `x = x_start + i * x_step`.
4. It starts the pV unit on the first component. The background
   `bg0 + bg1*x` is computed on the main units while the pV unit works.
5. It adds each pV result into `ycal` and starts the next component in the
   same clock.
6. After the last component it computes `e = yobs - ycal`, `e*e`, `e*e/yobs`,
   and adds the result to the sum.

Before the first point, the multiplier forms each peak's alpha2 height
(`i0 * 0.5`) once.

## Timing

Unit latencies, from start to `done`:

| unit | clocks |
|------|--------|
| adder, multiplier, converter | 1 (a new operation can start every clock) |
| divider | 29 (restoring division, one quotient bit per clock) |
| one pseudo-Voigt evaluation | 76 + 32 * EXP_ITERS (396 at the default) |
| one profile point | 4 * (76 + 32 * EXP_ITERS) + 52 (1636 at the default, 2 peaks) |
| one figure of merit | 6 + n * (clocks per point) |

The testbenches check all these numbers to the clock.

The processor this design follows was reported to take about 9 to
19 microseconds per figure of merit at about 110 MHz. That is only 1000 to
2100 clocks for a whole profile. This RTL does not come near that: at
110 MHz it needs about 7.5 ms for 501 points. Its dividers are bit-serial,
and it evaluates the four pV components of a point one after another. If
speed matters, the first things to change are the divider latency and the
number of `pv_unit` instances.

## Interface of `fom_processor`

| port          | dir | width     | meaning |
|---------------|-----|-----------|---------|
| `clk`, `rst_n`| in  | 1         | clock; asynchronous reset, active low |
| `start`       | in  | 1         | samples all inputs and begins a run, while `busy` is low |
| `n_points`    | in  | 10        | points to use, from address 0 (larger values are cut to 512) |
| `x_start`     | in  | 32        | angle of point 0 (single) |
| `x_step`      | in  | 32        | angular step (single) |
| `peaks[2]`    | in  | 5 x 32 each | `peak_params_t`: `i0`, `x01`, `x02`, `w`, `eta` |
| `bg0`, `bg1`  | in  | 32        | background `bg0 + bg1*x` |
| `busy`        | out | 1         | run in progress |
| `fitness_rdy` | out | 1         | low from `start`, high when `merit` is valid; holds until the next start |
| `merit`       | out | 32        | chi-squared (single) |

The parameters below are defined in `fom_processor`:

| parameter | default | meaning |
|-----------|---------|---------|
| `NPEAKS` | 2 | number of peaks |
| `EXP_ITERS` | 10 | number of terms in the exponential series |
| `ROM_DEPTH` | 512 | ROM words |
| `ROM_WIDTH` | 13 | ROM word width |
| `ROM_FILE` | `"rtl/profile_rom.hex"` | ROM contents; the path is relative to the directory the simulator runs in |

`fom_pkg` holds the shared types (`float_t`, `pv_params_t`,
`peak_params_t`), the constants and the rounding function.

## Floating-point conventions

All units use IEEE-754 single precision with these conventions:

- Results are rounded to nearest even.
- Subnormal inputs are read as zero, and results below the normal range are
  flushed to zero.
- Overflow gives infinity, and so does division by zero.
- NaN gets no special handling.

The figure of merit needs none of these edge cases, with one exception: a
profile word of 0 divides by zero and makes `merit` infinite.

## The stored profile

`rtl/profile_rom.hex` holds a simulated benchmark profile:

- **Range**: 25.00 to 35.00 deg in 0.02 deg steps, which is 501 points. The
  file continues to 35.22 deg to fill all 512 words.
- **Peaks**: two pseudo-Voigt peaks, `i0 = 1000` at 30.0 deg and `i0 = 500`
  at 30.5 deg, both with `w = 0.2` and `eta = 0.5`. Each peak has its alpha2
  companion.
- **Background**: `100 - 10*(x/25 - 1)`, that is `bg0 = 110` and
  `bg1 = -0.4`.
- **Noise**: Poisson noise, drawn with the normal approximation
  (mean `y`, variance `y`) and a fixed seed.

Scored against the parameters that generated it, the profile gives a
chi-squared close to the number of points (496.1 for 501 points), as it
should.

The benchmark these numbers come from was defined with a 0.01 deg step, which
gives 1001 points. That scan does not fit in 512 words, so the stored
profile uses half the sampling density.

## Verification

Every testbench in `tb/` checks itself. It ends by printing
`TB_RESULT checks=N failures=M`, and a watchdog stops it if it hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_fp_addsub`, `tb_fp_mul`, `tb_fp_div`, `tb_fp_itof` | Thousands of random and edge-case operands, compared bit for bit with the simulator's double arithmetic rounded to single (`fp_ref_pkg`). Also the latency of every operation. |
| `tb_profile_rom` | Every word against the file and against the noise-free model (within 6 sigma). Also the read latency. |
| `tb_pv_unit` | 10- and 30-iteration units against a double model of the same series, and the 30-iteration unit against the exact function. Latency, and how often the parallel steps 4 and 5 actually overlap. |
| `tb_fom_processor` | End to end at the default parameters: the benchmark candidate on 12 points and on the full 501-point scan, a scan longer than the ROM, an empty scan, random candidates, and back-to-back runs. Each result must match a double-precision model (`fom_ref_pkg`) to 1e-4, and each run must take the predicted number of clocks. It also counts that each mechanism happened: parallel pV steps, background computed during pV evaluations, alpha2 components, clipped and empty scans. |
| `tb_fom_exp_iterations` | The full benchmark scan with 10 and with 30 iterations side by side. |

To run a testbench with Verilator, start from the directory that holds `rtl/`
and `tb/`. The ROM file is read by a path relative to that directory.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fom_pkg.sv tb/fp_ref_pkg.sv tb/fom_ref_pkg.sv tb/tb_fom_processor.sv \
    --top-module tb_fom_processor -Mdir obj_tb
./obj_tb/Vtb_fom_processor
```

The other testbenches build the same way. Put their own file and top module
in place of `tb_fom_processor`. The full end-to-end run takes about one
second.

## Where this design makes its own choices

Some parts of this design are its own choices, not taken from the design it
follows. Keep them in mind when judging how far to trust it:

- **Floating-point units.** The original used vendor-generated cores. These
  are plain implementations of the same functions, with the latencies and
  edge-case handling described above.
- **Exponential algorithm.** Only "an iterative algorithm with a fixed
  number of iterations, using parallel operations" is known about the
  original. The positive-term series with a final reciprocal is this
  design's choice.
- **The operations inside the eight pV steps.** Only the step count is
  known, along with which steps run three and two operations at once. The
  split in the table above fits those counts.
- **Schedule of the merit controller**, including computing the background
  during pV evaluations.
- **Handshakes and the ports for candidate and scan.** This includes taking
  `x02` as an input rather than computing an arcsine.
- **Profile sampling**: 501 points at 0.02 deg instead of 1001 at 0.01 deg,
  set by the 512-word memory.
- **Speed**: see Timing. The reported per-evaluation times are not
  reproduced.
