# Polyphase filter bank channelizer

This design splits one wide-band complex (I/Q) sample stream into M (by
default four) equally spaced, equally wide frequency channels. Each channel
comes out decimated by M. It targets readout chains that multiplex many narrow-band
signals (frequency-multiplexed qubit readout, for example) and need fixed,
short latency. Doing this the direct way means mixing, filtering and
downsampling once per channel, which repeats the filter for every channel.

A polyphase filter bank (PFB) designs one prototype lowpass filter `h` and
shares it across all channels:

1. A **commutator** deals the input samples out to M branches. Each
   branch then runs at 1/M of the input rate.
2. Each branch filters its samples with one **phase** of the prototype: every
   M-th coefficient, starting at offset ρ.
3. An **M-point DFT** across the M branch outputs moves the prototype's
   passband to every channel centre at once.

For M = 4 the DFT needs no multipliers. All the arithmetic is then in the
phase filters, and they run at the branch rate. Other channel counts use a
general DFT with constant twiddle multipliers.

```
 in_i/in_q ──► commutator ──► polyphase_fir ──────────► dft4 ─────────► [decimator] ──► out_i/out_q
 (IN_LANES     (counter        (2 x M transpose           (M = 4:         (optional, keeps
  lanes)        demux)          FIRs, I and Q)             2 adder stages)  1 of DECIM)
                                                       or dft_direct
                                                          (other M)
```

The top module is `pfb_channelizer`. Its default parameters are the main
configuration: 4 channels, 8-bit samples, a 28-coefficient prototype (7 taps
per phase), one serial input stream and 7 clock cycles from the filter bank's
input to the channel outputs.

## The arithmetic the hardware implements

The input samples are x(s). Block n holds the M samples x(nM−M+1) … x(nM).
Branch ρ (ρ = 0..M−1) receives x_ρ(n) = x(nM − ρ) and filters it with phase
ρ of the prototype, p_ρ(m) = h(mM + ρ):

    y_ρ(n) = Σ_m p_ρ(m) · x_ρ(n − m)

Channel k is then

    y(n, k) = Σ_ρ y_ρ(n) · e^{+j2πρk/M}

Substituting gives y(n,k) = Σ_l h(l) · x(nM − l) · e^{+j2πkl/M}: the input is
shifted down by k·fs/M, lowpass-filtered with h, and every M-th sample is
kept. So channel k is centred at +k·fs/M, where fs is the input sample rate.
For M = 4, channel 3 is the same as −fs/4. Each channel has bandwidth fs/M
and output rate fs/M.

Two conventions are easy to get wrong, and the RTL fixes both:

- **Branch order.** The commutator turns counter-clockwise: the newest sample
  of a block goes to branch 0 and the oldest to branch M−1.
- **DFT sign.** `dft4` and `dft_direct` are ordinary forward DFTs,
  X(k) = Σ x_n e^{−j2πnk/M}, with the standard negative exponent. The
  channelizer needs the positive exponent. The top therefore reads channel k
  from DFT bin (M−k) mod M. For M = 4, channels 0 and 2 come straight from
  bins 0 and 2, and channels 1 and 3 come from bins 3 and 1.

The testbenches check both conventions. They compare the output with the
formula above evaluated directly, and they feed tones at known frequencies.

## Blocks

### `commutator`: from samples to branch vectors

The commutator is a counter-driven demultiplexer. The input arrives as
`IN_LANES` lanes per `in_valid` beat, and within a beat lane 0 holds the
oldest sample.

- **`IN_LANES = 1`** (serial stream, the default): a beat counter stores each
  valid sample in the next slot of the current block. It runs on the input
  clock `clk_in`. On the block's last sample the whole vector is copied to a
  holding register and a 2-bit block count advances. On the next edge of the
  branch-rate clock `clk`, the commutator sees the count change and presents
  the vector, with `out_valid` high for one `clk` cycle. A branch vector
  therefore appears once per M valid input samples.
- **`IN_LANES = M`** (for example an ADC that already delivers four parallel
  streams): there is nothing to demultiplex. The commutator is combinational
  wiring that reverses the lane order onto the branches, with
  `out_valid = in_valid`.
- **`1 < IN_LANES < M`**: the same counter collects M/IN_LANES beats per
  block. `IN_LANES` must divide M.

The first valid sample after reset starts a block. There is no way to realign
blocks other than reset.

### `fir_transpose`: one phase filter

Each phase filter is a transpose-form FIR:

- The input sample goes to every multiplier at once.
- The products enter an adder chain with a register between consecutive
  adders.
- The output is taken after the last adder.

The adder chain is pipelined by construction, so the filter can run fast
without an adder tree. It has TAPS−1 registers. There is no input delay line.

Coefficient order matters here. `COEFS` is given as the impulse response
p(0) … p(TAPS−1). The multiplier at the head of the chain (the one farthest
from the output) uses p(TAPS−1), and the one next to the output uses p(0).
The filter thus computes the ordinary convolution y(t) = Σ p(k)·x(t−k).

**Latency.** The product formed at the head of the chain passes all TAPS−1
registers before it reaches `y`. In this design's latency count, that is the
filter's latency: 6 sample steps for 7 taps. The chain advances only on
`in_valid`, which works as a clock enable at the branch rate. With
`OUT_REG = 0` (the default) `y` is combinational from the current input.
`OUT_REG = 1` adds an output register and one clock.

**Width.** Every register in the chain is DATA_W + COEF_W + clog2(TAPS) bits
wide, so nothing can overflow.

### `polyphase_fir`: the filter bank

`polyphase_fir` splits the prototype into its M phases at elaboration time,
p_ρ(m) = h(mM + ρ). It then instantiates two `fir_transpose` per branch, one
for I and one for Q, because the coefficients are real. All 2M filters share
`in_valid` and produce their outputs together. `TAPS` must be a multiple of
M; pad a prototype of any other length with zeros.

### `dft4`: the 4-point DFT without multipliers

For four points every twiddle factor is 1, −1, j or −j. A twiddle of ±j only
swaps the real and imaginary parts and flips one sign. The transform is
therefore two stages of adders:

    stage 1:  a = x0 + x2    b = x1 + x3    c = x0 − x2    d = x1 − x3
    stage 2:  X0 = a + b     X2 = a − b
              X1 = (Re c + Im d) + j(Im c − Re d)      (= c − j·d)
              X3 = (Re c − Im d) + j(Im c + Re d)      (= c + j·d)

The result is not divided by 4, so each output is 2 bits wider than its
input. `PIPE` sets 0, 1 or 2 register stages:

- `PIPE = 0`: combinational.
- `PIPE = 1` (default): the outputs are registered.
- `PIPE = 2`: the outputs and the stage-1 results are registered.

The pipeline registers load on every clock and carry the valid bit with the
data.

### `dft_direct`: the DFT for other channel counts

When M is not 4, the top uses `dft_direct` instead of `dft4`. It evaluates
the DFT sum straight from its definition. Each of the N outputs is a sum of N
constant complex products:

    (a + jb)(C − jS) = (aC + bS) + j(bC − aS),   C = cos(2πm/N), S = sin(2πm/N), m = nk mod N

The twiddles C and S are computed at elaboration time. They are rounded to
`TW_W` = 16 bits with 14 fractional bits, so that ±1 is exact. The sums are
kept at full width. The 14 fractional bits are then dropped with an
arithmetic shift, which rounds towards minus infinity. The gain therefore
matches `dft4`: a constant x on every input gives X(0) = N·x. Each output is
clog2(N) + 1 bits wider than its input. The extra bit covers the growth of
the rotated vector.

This is the simplest correct form, not the cheapest: it uses N² constant
multipliers per real and imaginary part, and synthesis reduces the trivial
ones (0, ±1). A pipelined FFT would replace it for large N. `PIPE` is 0
(combinational) or 1 (outputs registered, the default).

### `decimator`: output rate reduction

The decimator keeps the first of every `FACTOR` valid channel vectors and
drops the rest. It applies no filter, because the filter bank has already
limited each channel's bandwidth. It has one register stage.

In the top it is present only when `DECIM > 1`. That is the case when the
channel data must fit a slower link, for example four 16-bit complex channels
at 125 MS/s squeezed into 10 Gbit/s Ethernet by decimating by 8.

## Clocks, timing and flow control

The design is a pure pipeline. Every interface is a `valid` strobe with data,
and there is no back-pressure: a consumer must accept an output whenever
`out_valid` is high.

There are two clock inputs:

- **`clk_in`** runs the input side of the commutator, at the input sample
  rate for a serial stream.
- **`clk`** runs everything from the branch vectors on: the commutator's
  output register, the filter bank, the DFT and the decimator.

The two clocks must come from one source with their rising edges aligned. In
the main configuration `clk_in` is 200 MHz and `clk` is 50 MHz: a 4-channel
bank fed by one serial lane needs one branch vector per four input samples,
so the filters run at a quarter of the input clock. Tying both inputs to the
same clock also works; the branch vectors then appear every M input samples,
and the filters advance only on the valid strobe.

The handover between the clocks rests on two conditions:

- **Timing.** The holding register stays stable for a whole block, so `clk`
  must have at least one rising edge per block. An assertion
  (`a_no_lost_block`) reports a block that was overwritten before `clk`
  took it.
- **Related clocks.** The two clocks must not be unrelated. The handover has
  no synchroniser.

With four parallel lanes (`IN_LANES = M`) only `clk` is used.

Latency, counted from a branch vector entering the filter bank:

| stage                       | default | range                           |
|-----------------------------|---------|---------------------------------|
| phase filters (chain depth) | 6       | TAPS/M − 1, +1 with FIR_OUT_REG |
| DFT                         | 1       | DFT_PIPE = 0, 1, 2 (0, 1 if M ≠ 4) |
| total                       | 7       |                                 |

When a branch vector arrives on every `clk` edge, the 7 steps are 7 `clk`
cycles. This holds for four lanes on one clock and for a continuous serial
stream on a 4x `clk_in`. `tb_pfb_channelizer` measures both with an impulse.
The commutator's block collection comes before this count.

The throughput is one input sample per `clk_in` cycle per lane. At 200 MHz
with one lane, that is 200 MS/s of 8-bit I/Q: 3.2 Gbit/s of input, or
12.8 Gbit/s if the four channel outputs are each counted at the input rate.

## Word widths and scaling

| point                | width (defaults)                                  |
|----------------------|---------------------------------------------------|
| input                | DATA_W = 8                                        |
| phase filter output  | DATA_W + COEF_W + clog2(TAPS/M) − FIR_SHIFT = 27  |
| channel output       | phase filter width + 2 − DFT_SHIFT = 29           |
|                      | (M ≠ 4: phase filter width + clog2(M) + 1 − DFT_SHIFT) |

By default every stage keeps its full bit growth. `FIR_SHIFT` and
`DFT_SHIFT` drop that many least significant bits at the output of a stage.
This is an arithmetic shift right, with no rounding or saturation. It saves
resources in the stages that follow. The package function
`pfb_pkg::scaled_width` states the rule.

## Parameters of `pfb_channelizer`

| parameter     | default              | meaning                                                   |
|---------------|----------------------|-----------------------------------------------------------|
| `M`           | 4                    | number of channels; 4 uses `dft4`, others `dft_direct`    |
| `IN_LANES`    | 1                    | parallel input lanes, a divisor of M                      |
| `DATA_W`      | 8                    | input sample width (I and Q each)                         |
| `COEF_W`      | 16                   | coefficient width                                         |
| `TAPS`        | 28                   | prototype length, a multiple of M                         |
| `COEFS`       | `pfb_pkg::PROTO28`   | prototype h(0)…h(TAPS−1), packed, element 0 = h(0)        |
| `FIR_OUT_REG` | 0                    | extra output register in each phase filter                |
| `FIR_SHIFT`   | 0                    | LSBs dropped after the phase filters                      |
| `DFT_PIPE`    | 1                    | DFT pipeline stages (0, 1, 2; 0 or 1 when M ≠ 4)          |
| `DFT_SHIFT`   | 0                    | LSBs dropped after the DFT                                |
| `DECIM`       | 1                    | output decimation factor (1 = no decimator)               |

**The default prototype.** `PROTO28` is a 28-tap Hamming-windowed sinc with
cutoff fs/8, half the channel spacing of a 4-channel bank. It is quantised to
Q1.15, and `rtl/pfb_pkg.sv` gives its formula. It is a placeholder of the
right length: supply your own prototype through `COEFS` to set the channel
shape.

**Changing the prototype.** To use a different prototype, set `TAPS` and
`COEFS` together, because the default of `COEFS` only fits `TAPS = 28`.
`tb_pfb_integration` shows how to compute a prototype at elaboration time.

## How it was verified

Every module has a self-checking testbench in `tb/`. Each one compares the
module against values computed independently of its structure.

| testbench            | what it checks                                                                                   |
|----------------------|--------------------------------------------------------------------------------------------------|
| `tb_fir_transpose`   | Random stream with gaps against direct convolution. Output register and shift. Impulse response and the 6-step chain latency. |
| `tb_polyphase_fir`   | Each branch against Σ h(4m+ρ)·x_ρ(n−m). Impulse on one branch: latency and no crosstalk. |
| `tb_dft4`            | All pipeline depths and a shift, against the DFT sum with (−j)^(nk). Full-scale inputs. Valid delay. |
| `tb_dft_direct`      | 8 points with registered outputs, and 5 points combinational with a shift. Bit-exact against the same fixed-point sum. Within rounding of the ideal DFT. Valid delay. |
| `tb_commutator`      | Serial, 2-lane and 4-lane inputs with random gaps. Branch order and output timing. A serial instance on a 4x input clock. |
| `tb_decimator`       | Exactly vectors 0, 8, 16, … are kept, each one clock later.                                       |
| `tb_pfb_channelizer` | Six configurations side by side (serial, pass-through, remux, two clocks, truncation, all DFT depths, decimator), bit-exact against y(n,k). Measured latency of 7 clocks. Output counts. |
| `tb_pfb_full`        | Default parameters, 4x input clock. Tones at +fs/4 and −fs/4, bit-exact, and each tone appears only in its channel (1 and 3). |
| `tb_pfb_integration` | ADC-style setup: 4 lanes, 16-bit samples, 337-tap prototype padded to 340, decimation by 8. Tones at −4.685 MHz and +129.685 MHz (fs = 500 MHz) land in channels 0 and 1, the other channels stay below 1 %, and one output comes every 8 clocks. |
| `tb_pfb_channels8`   | M = 8 with a 56-tap prototype, serial input on an 8x input clock. Tones at the centres of channels 3 and 6, bit-exact against y(n,k); all other channels stay below 1 %. |

The tests use Verilator's two-state simulation. Every register that is read
is reset.

## Simulating

Each testbench ends with a line `TB_RESULT checks=N failures=F`. The
commands are run from the repository root. Any testbench builds the same
way; for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/pfb_pkg.sv tb/tb_pfb_channelizer.sv --top-module tb_pfb_channelizer -o sim
./obj_dir/sim
```

Lint a module on its own with:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/pfb_pkg.sv rtl/pfb_channelizer.sv \
    --top-module pfb_channelizer
```

## What this RTL decides on its own

The following points are design choices rather than part of the channelizer
method. Change them with care.

- **Clocking.** Two related clocks with a block-count handover, plus a
  clock-enable strobe in the filters. Unrelated clocks would need a proper
  clock-domain crossing, which this design does not have.
- **Remuxing.** For 1 < `IN_LANES` < M, the same counter collects whole
  blocks. Lane counts that do not divide M (or exceed it) are not supported.
- **Lane order and block alignment.** Lane 0 is the oldest sample, and the
  first sample after reset starts a block.
- **DFT pipeline placement.** The output registers come first; the stage-1
  register is added only for `DFT_PIPE = 2`.
- **Coefficients.** Width 16 bits; the default prototype values and the
  zero-padding rule.
- **Truncation.** Drops LSBs only, with no rounding and no saturation.
- **Decimator.** It keeps the first vector of each group.
- **Reset.** Asynchronous, active low.
- **DFT for M ≠ 4.** A direct DFT with 16-bit rounded twiddles and a
  floor on the fraction. Only M = 4 has the multiplier-free structure.

Not included:

- the pre- and post-processing stages that an oversampled or generalised-DFT
  (odd-stacked) filter bank would need;
- complex-coefficient phase filters;
- a time-multiplexed filter that serves several branches with one set of
  multipliers;
- any mapping onto vendor DSP primitives. Synthesis infers the multipliers
  and adders.
