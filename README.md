# Chirplet Transform Module: an FPGA accelerator for chirplet signal decomposition

Ultrasonic echoes that overlap in time can be separated by chirplet signal
decomposition. The method models each echo as a chirplet: a Gaussian-windowed
tone whose frequency may sweep. A chirplet has six parameters:

    psi(t) = beta * exp(-alpha1*(t - tau)^2) * cos(2*pi*(fc*(t - tau) + alpha2*(t - tau)^2 + phi))

These are amplitude `beta`, arrival time `tau`, centre frequency `fc`, envelope
factor `alpha1`, chirp rate `alpha2` and phase `phi`. The decomposition finds
the chirplet that matches the strongest echo best and subtracts it. It then
repeats on what is left. "Matches best" means the largest chirplet transform
|CT| = |sum_t f(t) psi(t)|, taken over a window f of the measured signal. The
search tries many candidate parameter sets, so it needs thousands of these
512-sample correlations per echo. Each correlation needs the candidate
chirplet generated first. That is the slow part.

The work is split across a system-on-chip:

* **Processor (software).** It buffers the signal and cuts the window. It runs
  the parameter search and subtracts each estimated chirplet.
* **Chirplet Transform Module (CTM, this RTL).** It generates chirplets
  several samples per clock and correlates them against the stored window at
  the same rate.

The CTM has three ports. The processor controls it through AXI4-Lite
registers. Two DMAs connect to its two AXI-Stream ports: one streams the
window in, and one carries generated chirplets out.

```
                 AXI4-Lite
                    |
              +-----------+   theta    +------------+   +-----------+  beats  +-------------+
              | ctm_regs  |----------->| sync_fifo  |-->| chirplet_ |-------->| chirp_demux |
              |           |            | (params)   |   | generator |         +-------------+
              |           |<--+        +------------+   +-----------+     in_estimation=1 |  in_estimation=0
              +-----------+   |                                               |            |
                 |  mode      |    +------------+     +-------+               v            v
                 +------------|----| sync_fifo  |<----| xcorr |<--------------+      +--------------+
                              +----| (results)  |     +-------+                      | symbol_decomp|--> m_axis
                                   +------------+         ^                          +--------------+   (estimated
                                                          | rows of 4 samples                           chirplet)
   s_axis (measured signal) ----> symbol_expander --------+
```

## How a parameter search uses the CTM

Each search step works on one parameter. The processor takes seven coarse
values around its current estimate and keeps the one with the largest |CT|.
It then takes six fine values around that winner, at a quarter of the coarse
spacing, and keeps the best of all thirteen. With the CTM this looks as
follows:

1. Stream the 512-sample window into `s_axis`. STATUS bit 28 shows when the
   window is fully stored.
2. Write the six parameter registers. The write to `PHI` pushes the whole set
   into the parameter FIFO. The FIFO holds 128 sets, so the processor can
   queue all seven coarse candidates back to back without checking whether
   the CTM is ready. Removing that per-transfer readiness poll is the reason
   the FIFOs exist.
3. The generator takes the sets in order and the correlator produces one
   |CT| per set. Each |CT| waits in the result FIFO.
4. Poll STATUS until the result count reaches 7, then read `RESULT` seven
   times. Each read pops one value, in the order the sets were written.
5. Queue the six fine candidates and read their results the same way.

When the search is done, set CTRL bit 0 to 0 (feedback mode) and push the
final parameter set. The chirplet then comes out of `m_axis` instead of going
to the correlator. The processor scales it and subtracts it from the signal.

The hardware correlates the candidate exactly as it is given and does not
normalise it. A wide envelope therefore scores higher only because it has more
energy. A search over `alpha1` should give every candidate the same energy
through `beta`: for a Gaussian envelope, `beta` proportional to
`alpha1^(1/4)`. `tb_chirp_estimate` does this.

## The chirplet generator (`chirplet_generator`)

This is the most involved block. For sample `t` it computes `beta` times a
Gaussian envelope times a cosine. It evaluates `LANES` = 4 consecutive
samples per clock in four identical lanes. Each lane has a 6-stage pipeline:

| stage | work |
|---|---|
| 0 | `d = t - tau` in Q12.8 (tau is used to 1/256 sample); a far flag is set when \|d\| >= 4096 samples |
| 1 | `d^2`, and the linear phase term `fc*d` (turns, modulo 1) |
| 2 | `x = alpha1*d^2`, split into a 4-bit integer part and 8 fractional bits (`x >= 16` gives 0). Total phase `fc*d + alpha2*d^2 + phi` modulo 1, top 10 bits kept |
| 3 | table reads: `exp(-int(x))` (16 entries), `exp(-frac(x))` (256 entries), `cos` (1024 entries) |
| 4 | amplitude `beta * exp(-int) * exp(-frac)` |
| 5 | amplitude times cosine, saturated to a signed 16-bit Q1.15 sample |

The tables are computed at elaboration: `cos(2*pi*i/1024)` in Q1.15,
`exp(-i/256)` and `exp(-i)` in Q1.16. The error sources are truncating the
phase to 10 bits (at most 0.6 % of the envelope), the 1/256 steps of the
exponent (0.4 %) and the final roundings. The testbenches hold every sample
to within 1.2 % of the local envelope plus 8 LSB of the floating-point
formula.

The pipeline stalls as a whole when its output is not ready. The next
parameter set is taken in the same clock as the last beat of the current
chirplet, so chirplets queued in the FIFO run without gaps: one 512-sample
chirplet every 128 clocks.

Parameter word formats (all 32-bit registers):

| register | format | meaning |
|---|---|---|
| BETA | unsigned Q1.15 in bits [15:0] | amplitude, 0x8000 = 1.0 |
| TAU | unsigned Q16.16 | arrival time, samples |
| FC | unsigned Q0.32 | cycles per sample |
| ALPHA1 | unsigned Q0.32 | 1/sample^2 |
| ALPHA2 | signed Q0.32 | cycles per sample^2 |
| PHI | unsigned Q0.32 | cycles (turns) |

## Correlation and the signal window

* **`symbol_expander`** receives the window one 16-bit sample per AXI-Stream
  transfer and is always ready. It writes sample `i` into bank `i mod 4`, row
  `i / 4`. TLAST, or the 512th sample, ends a window. A new window overwrites
  the stored one, so send it only while no correlation is running.
* **`xcorr`** receives each beat of 4 chirplet samples with its row index. It
  reads that row of the window, a synchronous read with the data one clock
  later, and adds the four products to a 42-bit accumulator. The accumulator
  restarts at row 0. After the last row it outputs `|acc| >> 15`, saturated
  to 32 bits. That is |CT| in units of signal LSBs times the chirplet's Q1.15
  scale. The result is valid 2 clocks after the last beat. The correlator
  refuses input only while a finished result is waiting for a full result
  FIFO.

## Mode switch and chirplet output

* **`chirp_demux`** sends beats to `xcorr` when CTRL bit 0
  (`in_estimation`) is 1, and to `symbol_decomp` when it is 0. The bit is
  sampled at the first beat of each chirplet. A mode change therefore never
  splits a chirplet between the two paths.
* **`symbol_decomp`** turns each 4-sample beat into four AXI-Stream transfers
  in time order. TLAST is set on the 512th sample. With the sink always ready
  it sends one sample per clock. The generator is then held back 3 clocks out
  of 4.

## Register map (`ctm_regs`, AXI4-Lite, 32-bit)

| offset | name | access | function |
|---|---|---|---|
| 0x00-0x10 | BETA, TAU, FC, ALPHA1, ALPHA2 | R/W | staged parameters |
| 0x14 | PHI | R/W | writing it pushes the staged set, with this phi, into the parameter FIFO. If the FIFO is full, the set is dropped, the response is SLVERR and the overflow flag is set |
| 0x18 | CTRL | R/W | bit 0: `in_estimation` (reset 1 = correlate). Writing bit 1 as 1 clears the overflow flag |
| 0x1C | STATUS | RO | [9:0] parameter FIFO fill, [25:16] result FIFO fill, 28 window loaded, 29 overflow, 30 generator busy, 31 result available |
| 0x20 | RESULT | RO | pops one \|CT\|. Reading it while empty returns 0 with SLVERR |

Byte strobes apply to the parameter registers. A write is accepted when the
address and the data are presented together. The write response and the read
data each arrive one clock after acceptance.

## Performance

| quantity | this RTL | reference measurements |
|---|---|---|
| clocks per 512-sample transform, engine only | 128 | — |
| clocks per transform in a coarse/fine search, bus traffic included | 133 (measured in `tb_chirp_estimate`) | 180 (1.2 us at 150 MHz), 181 (3.62 us at 50 MHz) |
| transforms per chirplet estimate | — | 1560 (1872 us / 1.2 us) |
| clocks per chirplet estimate | 1560 x 133 = 207 480 (CTM side only) | 280 800 |

The published measurements include the processor's own computation. The
figure for this RTL counts only the CTM and its register traffic.

## Files

`rtl/` (one unit per file):

| file | content |
|---|---|
| `ctm_pkg.sv` | parameter-set struct `theta_t`, register-map enum, response codes |
| `chirp_if.sv` | interface for the multi-lane sample stream (data[LANES], idx, last, valid, ready), with a stability assertion |
| `sync_fifo.sv` | single-clock FIFO with first-word fall-through and a fill count |
| `chirplet_generator.sv`, `chirp_demux.sv`, `xcorr.sv`, `symbol_expander.sv`, `symbol_decomp.sv`, `ctm_regs.sv` | the blocks above |
| `chirplet_transform.sv` | the top level |

Top-level parameters: `N_SAMPLES` = 512, `LANES` = 4 (a power of two that
divides `N_SAMPLES`, with `N_SAMPLES/LANES` >= 2), `SAMPLE_W` = 16,
`FIFO_DEPTH` = 128, `RES_W` = 32. The fixed-point formats inside the
generator assume `SAMPLE_W` = 16.

`tb/` holds one self-checking testbench per block (`tb_<block>.sv`), plus:

* `tb_chirplet_transform.sv`: the whole CTM at default size. It covers the
  window load, a coarse and fine search over `tau`, feedback-mode output
  under random back-pressure, parameter-FIFO overflow (SLVERR), result-FIFO
  back-pressure and the rate of 128 clocks per transform.
* `tb_chirp_estimate.sv`: a complete five-parameter estimate (130
  transforms), followed by subtraction of the estimated chirplet.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog.

To simulate with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps --top-module tb_chirplet_transform \
    -y rtl -y tb +libext+.sv rtl/ctm_pkg.sv tb/tb_chirplet_transform.sv
./obj_dir/Vtb_chirplet_transform
```

Replace the top-module name and the testbench file to run another test. Each
run takes under a second.

## What is and is not here, and where it departs from the source design

* **Taken from the source design:**
  * the split into CPU functions and a programmable-logic CTM;
  * the CTM's blocks and their connections: registers, parameter FIFO,
    generator, a switch to the correlator or to the output path, result
    FIFO, symbol expander and symbol decomposer;
  * the mode select (1 = correlate, 0 = output the estimated chirplet);
  * the six parameters;
  * FIFO depth 128 and the 512-sample window;
  * AXI-Lite for control and AXI-Stream for the signal and the estimated
    chirplet;
  * the coarse-then-fine search (7 + 6 points) used in the testbenches.
* **Own choices:**
  * the chirplet formula's exact scaling (parameters in turns);
  * real rather than complex chirplets;
  * all number formats;
  * 4 lanes;
  * the table-based exp and cos;
  * the pipeline depths;
  * the register map, with a push on the PHI write and SLVERR on overflow;
  * the banked window buffer;
  * the per-chirplet latching of the mode bit.
* **Not included:**
  * The processor, the two DMAs and the software functions (buffer,
    windowing, subtraction, parameter search). They sit outside the CTM; the
    testbenches play their roles.
  * Two further DMAs, one to program the generator and one to collect
    correlation results. They were suggested as an improvement over the
    register path, not part of the measured design.
* **Known limits:**
  * |CT| is the zero-lag inner product only; `tau` is searched instead.
  * No interlock stops a new window from overwriting the stored one during a
    correlation.
  * `tau` is resolved to 1/256 sample.
  * Samples more than 4095 samples from `tau` are forced to zero.
  * `s_axis_tready` is constantly 1.
