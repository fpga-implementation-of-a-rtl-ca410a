# Pseudo-random aggregate spectrum generator

A spectrum-sensing or dynamic-spectrum-access receiver has to be tested
against a band that is busy in ways nobody planned: signals that appear and
disappear at random, at random frequencies, with random bandwidths and
powers, on top of noise. This design makes such a band digitally. Several
independent *signal branches* each produce bursts of a random-symbol
modulated carrier. Every burst has its own random length, centre frequency,
bandwidth and power. The branches are summed and one complex white Gaussian
noise source is added. The result is a complex baseband stream at one sample
per clock, ready for a DAC or for direct connection to the system under
test.

Everything is synchronous to one clock, the sample clock. At the reference
rate of 1 MHz (1 Msps):

| property | range | set by |
|---|---|---|
| centre frequency | -250 kHz .. +250 kHz in 3.906 kHz steps (129 values) | 8-bit DDS step, restricted to +-64 |
| bandwidth (symbol rate) | Fs/12, Fs/10, Fs/8, Fs/6 | one of four interpolating raised-cosine filters |
| burst and gap length | 1 .. 255 ms, each drawn on its own | 8-bit count of a 1 kHz tick |
| amplitude against unit-variance noise | 0.1 .. 25.5 in steps of 0.1 | 8-bit power code |
| modulation | QPSK (16-QAM and 64-QAM by parameter) | random symbol table |
| spacing of simultaneous bursts | more than 32 steps (125 kHz) | co-channel guard |

## Files

| file | contents |
|---|---|
| `rtl/rasg_pkg.sv` | shared formats (16_12 samples, 32_24 products), PRNG primes and seeds, constant functions that build the tables at elaboration |
| `rtl/aggregate_top.sv` | top: three branches, guard, noise, output adders |
| `rtl/signal_branch.sv` | one branch: `ldapm` -> `filter_bank` -> `freq_gen_mixer` |
| `rtl/ldapm.sv` | random symbol source, two RNS PRNGs |
| `rtl/rns_prng.sv`, `rtl/ring_gen.sv` | residue-number-system uniform generator |
| `rtl/filter_bank.sv`, `rtl/fir_interp.sv` | four polyphase raised-cosine interpolators and the bandwidth multiplexer |
| `rtl/freq_gen_mixer.sv` | uniform generators, burst clock, DDS, complex mixer, power scaling |
| `rtl/burst_ctrl.sv` | burst timing and per-burst parameter latch |
| `rtl/cochannel_guard.sv` | keeps simultaneous bursts apart in frequency |
| `rtl/awgn_gen.sv`, `rtl/box_muller.sv` | complex Gaussian noise |
| `rtl/lfsr_urng.sv` | 47-bit leap-forward LFSR, the cheap uniform source |
| `tb/*_tb.sv` | one self-checking testbench per module (see Verification) |

Number formats are written `W_F`: W bits in total, two's complement, F of
them fractional. Samples, symbols and table values are 16_12. Mixer
products and the output are 32_24. Noise is 10_7.

## One signal branch

```
          on (gate)                 fsel            on, step, power
     +------------------+   +-----------------+   +------------------------+
     |                  v   |                 v   |                        |
  +--------+ sym  +-------------+ filt  +-----------------------------+    |
  | ldapm  |----->| filter_bank |------>| freq_gen_mixer              |----+--> sig (32_24)
  |2x RNS  |<-----| 4 RC interp |       | LFSRs, burst_ctrl, DDS, mix |
  +--------+ next +-------------+       +-----------------------------+
                                           req/cand_step ^  | grant
                                                         co-channel guard
```

Control flows backwards. The burst controller inside `freq_gen_mixer`
decides when a burst is on and which filter it uses. `on` gates the symbol
source, and `fsel` picks the filter. The selected filter's symbol request
(`data_ready`) paces the symbol source. So the symbol rate is set by the
chosen bandwidth, while the output always runs at one sample per clock.

### Symbols (`ldapm`)

The I and Q rails each take `BITS_PER_RAIL` bits from their own RNS PRNG.
These bits address a table of square-constellation levels scaled to unit
mean symbol power. For QPSK the levels are +-2896/4096 = +-0.707. The symbol
registers load on the filter's request. They load zero while the burst is
off. Because the gate sits before the pulse-shaping filter, a burst ramps in
and out through the filter's impulse response. Switching it on at the
output instead would splatter the spectrum.

### Uniform random numbers: the RNS PRNG (`rns_prng`, `ring_gen`)

This is the least obvious part of the design. Its goal is an 8-bit uniform
generator with a period far beyond any test, built from adders and small
tables only.

Take eight co-prime primes p_i = 857, 859, 877, 887, 907, 911, 919, 929.
Their product is M = 4.04e23. By the Chinese Remainder Theorem, a number
x mod M is the same thing as its eight residues x mod p_i, and

    x = sum_i  (M/p_i) * ((M/p_i)^-1 mod p_i) * (x mod p_i)      (mod M)

Each `ring_gen` holds one residue as a 10-bit index. Each step it adds 1
(or 2 for a skip) and subtracts p_i on overflow. Advancing all eight rings
by one is therefore the same as advancing x by one modulo M. A 1024-entry
table per ring stores that ring's CRT term reduced mod 256:

    LUT_i[r] = ((M/p_i) mod 256) * ((inv_i * r) mod p_i)  mod 256

The output byte is the sum of the eight table outputs mod 256. Each table
output on its own repeats with period p_i. Their sum repeats only when all
eight rings return to their seeds together, after M steps. The tables are
built at elaboration by constant functions in `rasg_pkg` (a modular power
gives the inverse). No table data is stored in files.

Pipeline: the `enable`/`skip`/`reset` inputs are registered; the resulting
command steps or reloads (`reset` jams the seeds) the ring indices; the
table outputs are registered; the sum is combinational. A value therefore
appears 3 cycles after the advance that makes it. `data_valid` marks the
first cycle it is visible. `count` counts advances since the last reset.

Each branch uses two of these generators, one per rail. Their seeds are the
reference seeds rotated by a per-branch offset, so no two generators in the
design start at the same point.

### Bandwidth (`filter_bank`, `fir_interp`)

Four filters run in parallel on the same symbols. They interpolate by
L = 12, 10, 8 and 6, so one symbol lasts L samples and the signal occupies
(1 + beta) * Fs / L. Each filter is a polyphase raised-cosine interpolator
with roll-off beta = 0.25 and a span of 8 symbols (8L taps). It keeps the
last 8 symbols. A phase counter p = 0..L-1 selects taps h[p + kL] for
output sample p. This equals zero-stuffing by L followed by the full FIR,
but uses one multiply-accumulate per symbol in the span instead of per tap.
Taps are 16_12 with a peak of 1.0, so symbol instants pass at unity gain.
Each filter raises `req` one cycle before it shifts in a symbol. A source
that loads a register on `req` is then in time.

The multiplexer passes on the output and the request of the filter chosen
by `fsel`. `fsel` changes only between bursts. By then the symbols have
been zero for at least one tick (1000 samples), which is much longer than
the filter memory. So the newly chosen filter starts from silence, and
switching filters produces no transient.

### Burst timing and parameters (`burst_ctrl`)

A divider makes a one-cycle `tick` every `TICK_DIV` = 1000 samples (1 ms).
The controller counts ticks up to a limit drawn from an 8-bit uniform
value, and then toggles the burst. A drawn 0 counts as 1, so on-times and
off-times are each 1..255 ticks. When an off period ends, the controller
raises `req` and offers the current random step to the co-channel guard.
On grant it turns on and latches the step, the power code, the filter
select and the new burst length. These stay fixed for the whole burst. If
the guard refuses, the controller retries each cycle with the next random
step. So a refused branch starts a few cycles late at another frequency
rather than being skipped.

### Frequency and mixing (`freq_gen_mixer`)

The DDS is an 8-bit phase accumulator over a 256-entry sine table and a
256-entry cosine table. Adding step s each sample produces a tone at
s * Fs / 256. Steps above 64 alias or collapse: step 128 reads only the
zeros of the sine, and steps 65..191 give tones whose amplitude varies
from sample to sample. The raw 8-bit step is therefore folded into range
before it is offered: 65..127 -> 1..63 and 128..191 -> 192..255. The
usable steps 0..64 (0 .. +Fs/4) and 192..255 (-Fs/4 .. 0) are then
roughly equally likely. The accumulator advances only while the burst is
on.

The mixer forms the full complex product of the filtered baseband X and
Y = cos + j sin:

    P_I = X_I cos - X_Q sin        P_Q = X_I sin + X_Q cos

in 32_24. It then scales by gain = 0.1 * power code (code 0 counts as 1),
using the 16_12 constant 410/4096 per code step. Latency from the filter
output to `sig` is 2 cycles. The table read adds one more cycle between
the accumulator and the mixer.

The four uniform generators here (step, length, power, filter select) are
independent 47-bit leap-forward LFSRs (x^47 + x^5 + 1, 8 steps per clock)
with different seeds. Each gives a fresh byte every clock.

## Putting branches together (`aggregate_top`)

### Co-channel guard

The guard (`cochannel_guard`) is combinational. A branch asking to start
is granted only if its step, read as a signed frequency (-64..+64), is more
than `MIN_STEP_SEP` = 32 steps away from:

- the step of every other branch that is on, and
- the offered step of every lower-numbered branch that asks in the same
  cycle.

The second rule stops two branches from starting next to each other in
the same cycle. 32 steps are 125 kHz. This is the largest symbol rate the
reference design assumes, and it keeps the centres of simultaneous signals
at least one such bandwidth apart. The L = 6 filter here gives 167 ksps,
so two bursts that both use it can still touch at their edges. Setting
`MIN_STEP_SEP` to 43 would rule that out as well. `GUARD_EN = 0` removes
the guard for tests that want co-channel interference. With steps limited
to -64..+64, at most four branches can be on at once under the guard.

### Noise

`awgn_gen` produces one complex sample per clock. Per rail, four
table-based Box-Muller units each produce a roughly Gaussian sample
R(u1) * cos(2 pi u2). R is a 1024-entry radius table, cos a 256-entry
table, and u1 and u2 come from a leap-forward LFSR. A registered adder tree
sums the four samples, which pulls the distribution closer to Gaussian. The
sum is halved back to unit variance and saturated to 10_7 (-4 .. +3.99).
The tails are cut at 4 sigma. Eight units with eight seeds keep the I and
Q rails independent.

### Output

The branch outputs are summed in a registered adder. The noise, shifted to
32_24, is added in a second registered adder. `real_out`/`imag_out` follow
the branch outputs by 2 cycles. The 32_24 format has 7 integer bits
(+-127). Three branches at full gain (25.5 each) plus filter overshoot and
noise stay inside this range. The sum is not saturated, so a configuration
with many more branches at full power can wrap.

For each branch the top also brings out `br_on`, `br_step`, `br_power` and
`br_fsel`. These are a ground-truth record of what is in the band at any
moment, which a classifier under test can be scored against. Step s means
s * Fs / 256 for s < 128, and (s - 256) * Fs / 256 otherwise.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `aggregate_top` | `NB` | 3 | number of branches |
| | `TICK_DIV` | 1000 | samples per burst tick (1 ms at 1 Msps) |
| | `GUARD_EN`, `MIN_STEP_SEP` | 1, 32 | co-channel guard on/off and spacing |
| | `OUT_W`, `OUT_F` | 32, 24 | output format |
| `signal_branch` | `BITS_PER_RAIL` | 1 | 1 QPSK, 2 16-QAM, 3 64-QAM |
| `fir_interp` | `L`, `SPAN`, `BETA` | -, 8, 0.25 | interpolation, span in symbols, roll-off |
| `filter_bank` | `L0..L3` | 12, 10, 8, 6 | the four interpolation factors |
| `awgn_gen` | `NOISE_W`, `NOISE_F` | 10, 7 | noise format |

Reset is synchronous and active high. Hold it for at least 4 clocks. After
reset all outputs are zero, every generator is back at its seed (the whole
output sequence is repeatable), and the first bursts are requested at the
first tick.

## Timing summary

| path | cycles |
|---|---|
| RNS PRNG advance -> new byte | 3 |
| filter request -> symbol in filter | 1 (request leads the shift by one cycle) |
| filter phase -> filtered sample | 1 |
| filtered sample -> branch output | 2 |
| accumulator -> table -> mixer | +1 |
| branch output -> `real_out`/`imag_out` | 2 |
| tick -> burst toggle | 1 (registered); start waits for grant |

## Verification

Each testbench compares the module against a model written independently
in the testbench. All of them print `TB_RESULT checks=N failures=M`, and all
have a watchdog.

- `lfsr_urng_tb`: cycle-by-cycle against a bit-serial LFSR, with random
  enables; histogram.
- `rns_prng_tb`: every output against a direct CRT computation of the
  state, under random enable/skip/reset; pipeline latency and
  `data_valid`.
- `ldapm_tb`: symbols against the PRNG model, gating, QPSK levels.
- `filter_bank_tb`: every filter output against a floating-point
  raised-cosine convolution; request spacing 12/10/8/6.
- `burst_ctrl_tb`: toggle times against drawn lengths (zero and maximum
  lengths included), latching, refusal and retry.
- `cochannel_guard_tb`: random requests against a kHz-distance model.
- `freq_gen_mixer_tb`: every output sample against
  gain * X * exp(j 2 pi phase / 256) with a model accumulator; step range;
  burst edges on ticks.
- `awgn_gen_tb`: variance, mean, kurtosis, I/Q correlation, repeatability
  after reset.
- `signal_branch_tb`: symbol pacing per filter; exact silence after a
  burst; centre frequency measured from the output's lag-1
  autocorrelation against the reported step.
- `aggregate_top_tb` (burst tick shortened to 10 clocks): each output
  sample equals the sum of the branch outputs plus the noise 2 cycles
  earlier, and simultaneous bursts respect the guard. It also counts, and
  requires, bursts on every branch, all four filters, positive and
  negative frequencies, step folding, guard refusals, two and three
  branches on together, long gaps and noise saturation.
- `aggregate_top_full_tb`: the same checks with every parameter at its
  default, over 30 million samples (30 s of signal at 1 Msps, about a
  hundred bursts per branch).

Checks are shared through `tb/aggregate_check.svh`. To simulate, for
example the end-to-end test:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rasg_pkg.sv tb/aggregate_top_tb.sv --top-module aggregate_top_tb
./obj_dir/Vaggregate_top_tb
```

The full-size test takes about a minute and a half including the build.
The synthesised size of the three-branch top is about 3,700 cells and
2,760 flip-flop bits, plus 733 kbit of table memory. Most of the memory
is the RNS tables: 2 generators x 8 tables x 1024 x 8 bits per branch.

## Where this departs from the reference design

The reference design is a block-diagram design built from vendor cores.
This RTL re-implements its structure, with these differences:

- **Mixer sign.** The reference states the quadrature product as
  X_I Y_Q - X_Q Y_I. Here it is X_I sin + X_Q cos, the actual complex
  product. Only that form moves the whole spectrum to the chosen
  frequency instead of mirroring half of it.
- **Power scale.** The reference describes an SNR range of -10 .. 14.06 dB
  from a 0.1 .. 25.5 multiplier, which is the multiplier read as a power
  ratio. Its dynamic-range rule adds the multipliers as magnitudes. Here
  the multiplier scales the amplitude, as that rule assumes. Against
  unit-variance noise this spans -20 .. +28 dB.
- **Filters.** The reference uses vendor FIR cores whose span and roll-off
  it does not give. Here they are polyphase raised-cosine filters with
  span 8 and beta 0.25, and the bandwidth ratios 1/12 .. 1/6 are read as
  interpolation factors.
- **Symbol rate.** The reference quotes 100 ksps, which is the L = 10
  filter here. The other filters give 83, 125 and 167 ksps.
- **Noise source.** The reference uses a vendor noise core of four
  Box-Muller transforms combined by central-limit summing. Here it is
  rebuilt from tables and LFSRs, with four units per rail. The table
  sizes and the 10_7 format are chosen here.
- **Guard behaviour.** The reference compares the branches' steps but does
  not say what happens on a conflict. Here the branch retries with a new
  random step. Simultaneous requests give priority to the lower-numbered
  branch, and the distance is taken between signed frequencies.
- **Symbol source.** The reference first draws symbol bits from an LFSR
  slice and later replaces it with the RNS PRNG. The RNS PRNG is used here.
  The table formula is the standard CRT reconstruction reduced mod 256.
- **Guard spacing.** The 32-step spacing is the reference's value, which
  it derives from a 125 ksps maximum symbol rate. It does not fully
  separate two bursts on the L = 6 filter (167 ksps).
- **PRNG pacing.** The reference's RNS PRNG produces a value every clock.
  Here the two symbol generators advance once per symbol request, so no
  random values are drawn and thrown away between symbols.
- **Counter width.** The RNS PRNG's advance counter is 32 bits.
- **Not modelled.** The FPGA device, the vendor gateway I/O blocks, and
  the resource and timing results per device and clock rate are not
  modelled. The design is one sample per clock with registered tables and
  products, and its timing at a given clock has not been analysed.
