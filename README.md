# Two-way analytical channelizer for an 80 MHz IEEE 802.11ac receiver

An 80 MHz 802.11ac OFDM symbol is, in effect, two 40 MHz 802.11n-sized
halves placed side by side: of its 256 subcarriers, 121 sit on each side of DC
and only three null subcarriers (-1, 0, +1, about 1 MHz) separate the halves.
If the halves are separated in the time domain, each one can be handled by a
128-point FFT and an existing 40 MHz receiver chain, in parallel.

This RTL is that separating stage. It takes the complex 80 MHz A/D stream and
produces two 40 MHz streams: `out_lp` carries the positive-frequency half,
`out_hp` the negative-frequency half. Each comes out already stripped of its
cyclic prefix (CP), as consecutive 128-sample FFT windows. The separation is
done by a decimating **analytical halfband filter**. This is a halfband
lowpass/highpass pair shifted by a quarter of the sample rate, so that it
separates positive from negative frequencies rather than low from high. It
works in one of two modes:

* **linear**: ordinary FIR filtering of the continuous stream, with the CP
  removed after decimation;
* **cyclic**: the CP is removed first, and each 256-sample symbol is filtered
  by cyclic convolution. The filter then uses none of the CP budget, at the
  cost of one symbol of extra latency.

The difficulty is the 1 MHz gap. The filter's transition band has to fit
between subcarriers +/-2 and the alias of the opposite band edge. For the
halfband prototype, that puts the passband edge at 0.453125 pi and the
stopband edge at 0.546875 pi. The default prototype order is N = 70 (60 dB
stopband).

## The analytical halfband filter

### From halfband to analytical

A halfband prototype of order N = 2M, with M odd, is

    G(z) = H(z^2) +/- 1/2 z^-M        (+ lowpass, - highpass)

Every tap at an even distance from the centre tap is zero, and the centre tap
is exactly 1/2. Multiplying the taps by j^(n-M) moves the passband from DC to
+fs/4. After that shift:

* the centre tap stays a plain delay with gain 1/2;
* every other non-zero tap becomes j times a real number. The real taps
  c(k) = (-1)^k g(2k), k = 0..M, form a Hilbert-transformer-like filter. They
  are antisymmetric: c(M-k) = -c(k).

### Decimating by two

Decimating by two splits the input into even and odd samples (the
"commutator"). Pair m holds x0 = x(2m) and x1 = x(2m+1):

    S(m)  = sum_{k=0}^{(M-1)/2} c(k) * ( x1(m-k) - x1(m-M+k) )    Hilbert branch
    d(m)  = x0(m - (M-1)/2)                                      delay branch
    y_lp  = j*S + 1/2*d          positive half, at fs/2
    y_hp  = j*S - 1/2*d          negative half, at fs/2

The even samples reach the outputs only through the delay branch. The odd
samples go through the Hilbert branch. That branch has M+1 taps but only
(M+1)/2 multipliers, because antisymmetry lets each coefficient multiply the
*difference* of the two samples that share it. At N = 70, this means 18
multipliers per real rail, running at the output rate. The delay branch is
(M-1)/2 = 17 pairs long.

### I and Q rails

A complex input needs one such real filter per rail (`analytic_hb_decim`).
The two rail results are combined as `y = y_I + j*y_Q` in
`analytic_filter_iq`. Both rails share the same coefficient set.

### Coefficients

The hardware holds only c(0..(M-1)/2), which is 18 signed Q1.15 words in
`coef_regs`. They are written through the `coef_we`/`coef_addr`/`coef_wdata`
port. No coefficient values are built in: they come from a filter design, and
reset clears them to zero.

To turn a halfband prototype g(n), n = 0..N, into register contents:

1. Normalise g(n) so that g(M) = 1/2 and the taps g(2k) sum to 1/2.
2. Write c(k) = (-1)^k g(2k) for k = 0..17, rounded to Q1.15.

A prototype of a lower order N' = 2 + 4k' can run on the same hardware.
Centre it inside the 71 taps, that is, shift it by (N - N')/2 samples, which
is always even. Leave the outer coefficients at zero. The group delay stays
the same, so nothing else changes.

The testbenches design their prototypes by the windowed-sinc method
(Blackman, or Kaiser with beta chosen from the wanted stopband attenuation).
`hb_coefs` and `hb_kaiser` in `tb/dfe_tb_pkg.sv` give the formulas. These are
convenient designs, not optimised ones. A minimax design with the passband
edge near 0.45 pi would give a sharper transition than the Kaiser designs
used here.

## Linear and cyclic modes

```
             +--------------+                               +-----------+
 MODE_LINEAR | commutator   |--pairs--+                  +->| cp_remover|--> out (32 of 160 dropped)
  in ------->| (even / odd) |         |   +------------+ |  | 160 / 32  |
             +--------------+         +-->| analytic_  |-+  +-----------+
                                      |   | filter_iq  |
             +------------+  +-----------------+       |    drop outputs with keep = 0
 MODE_CYCLIC | cp_remover |->| cyclic_sym_     |-pairs-+--> out (35 tail outputs dropped)
  in ------->| 320 / 64   |  | buffer (2 banks)|
             +------------+  +-----------------+
```

### Linear mode

The commutator forms one pair every two input samples. The filter runs
continuously, and the CP is removed at the 40 MHz rate (32 of every 160
outputs). The 128-sample window is outputs 32..159 of each symbol, counted
from the output of the pair that holds the symbol-start tag. The window's last
output therefore uses the symbol's last input sample. The filter has a memory
of 70 input samples and the CP is 64, so the first outputs of the window reach
6 samples into the previous symbol. Any multipath delay spread adds to that.
This is how linear filtering eats into the CP budget.

### Cyclic mode

The CP (64 of every 320 samples) is removed first. `cyclic_sym_buffer` then
stores the 256-sample symbol. Cyclic convolution is usually described as
"filter the block linearly, then add the last N output samples back onto the
first N". The buffer gets the same result another way: it replays the
symbol's own last N = 70 samples (35 pairs) ahead of the symbol. This loads
the filter state with the wrapped tail, and the outputs of those 35 pairs are
discarded. The filter hardware is the same in both modes.

The cost of this mode:

* **Latency.** A symbol must be stored completely before it is read.
* **Processing steps.** It takes (256 + 70)/2 = 163 filter steps per symbol,
  against 160 in linear mode. This fits easily into the 320 clocks a symbol
  takes to arrive at one sample per clock.

The buffer is two banks (ping-pong). Each bank is split into even-sample and
odd-sample memories, so a whole pair is read in one clock. One bank is read
while the other is written, and it can never overflow: a read (163 clocks)
always ends before the next write (at least 256 clocks) does.

### Measured cost of the two modes

The OFDM testbench described below measured the following EVM values.

| setting (16-QAM, 12-bit input)    | linear  | cyclic  |
|-----------------------------------|---------|---------|
| ideal channel, order 42 / 40 dB   | -40.8 dB | -42.8 dB |
| ideal channel, order 58 / 50 dB   | -49.2 dB | -49.9 dB |
| ideal channel, order 70 / 60 dB   | -51.3 dB | -49.9 dB |
| 50 ns rms multipath, order 42     | -34.2 dB | -36.8 dB |
| 150 ns rms multipath, order 42    | -11.2 dB | -35.4 dB |
| tone in the negative half, SIR 6 dB | -51.7 dB (order 70) | -26.6 dB (order 42) |
| tone in the negative half, SIR 30 dB | - | -41.9 dB (order 42) |
| white noise, SNR 25 dB            | -20.6 dB (order 70) | -20.8 dB (order 42) |
| same noise, no channelization     | -20.5 dB | -20.8 dB |

With white noise the channelized EVM is the same as that of a receiver
taking one 256-point DFT of the unfiltered input, in both modes: the
channelizer adds nothing measurable to the noise.

The long channel shows why cyclic mode exists: with 150 ns of delay spread,
linear filtering leaves too little of the CP. A single interfering tone shows
the other side. Cyclic filtering treats each block as periodic, so a tone
that is not periodic in the block leaks across the band. Linear filtering
rejects it cleanly.

## Interface and timing (`dfe_channelizer`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `mode` | in | 1 | `MODE_LINEAR` / `MODE_CYCLIC` (`dfe_pkg::mode_e`) |
| `coef_we`, `coef_addr`, `coef_wdata` | in | 1, 5, 16 | write coefficient c(addr), Q1.15 |
| `in_valid` | in | 1 | one complex sample this clock (at most one per clock) |
| `in_first` | in | 1 | this sample is the first of an OFDM symbol, CP included |
| `in_iq` | in | 2 x 12 | `iq_t` {re, im}, signed A/D words |
| `out_valid` | out | 1 | one sample of each branch this clock |
| `out_first` | out | 1 | sample 0 of a 128-sample FFT window |
| `out_lp`, `out_hp` | out | 2 x 16 | `out_iq_t`: positive / negative 40 MHz half |

* **Clock.** For real-time operation the clock runs at the 80 MHz sample rate
  or faster, with `in_valid` marking the samples. Idle cycles are allowed
  anywhere.
* **Symbol start.** `in_first` comes from the receiver's timing
  synchronisation, which is not part of this block. A symbol start resets the
  CP counters and realigns the even/odd pairing. Without `in_first`, the
  counters run freely with a period of 320 samples.
* **Latency in linear mode.** 5 clocks, from the clock that presents the
  second sample of a pair to the clock that presents its output.
* **Latency in cyclic mode.** 170 clocks, from the last sample of a symbol to
  that symbol's last output. Together with the 320-clock symbol itself, this
  stays far inside the 16 us (1280 clocks at 80 MHz) short interframe space.
* **Rate.** Both modes deliver 128 output beats per 320-sample symbol.
* **Mode changes.** `mode` may change at any time. A change clears every
  delay line, buffer and counter, and drops the sample offered in that clock.
  Change it between frames.

## Fixed-point format (`dfe_pkg`)

Input samples are 12-bit two's complement. Coefficients are Q1.15. Sums are
kept exactly in 36 bits, in units of 2^-15 input LSB. The outputs are rounded
(half up) and saturated to 16 bits after a shift of 13. An output LSB is
therefore a quarter of an input LSB: a passband signal comes out 4 times
larger, with 2 bits of fraction and more than 2 bits of headroom. All of
these widths are local choices, set as constants in `dfe_pkg`.

## Files

| file | contents |
|------|----------|
| `rtl/dfe_pkg.sv` | widths, `iq_t`, `pair_t`, `out_iq_t`, `mode_e`, `round_sat` |
| `rtl/analytic_hb_decim.sv` | one real rail: Hilbert branch with pre-subtraction, delay branch, `y_lp`/`y_hp` |
| `rtl/analytic_filter_iq.sv` | I and Q rails, complex combination, rounding |
| `rtl/commutator.sv` | even/odd split into pairs, realigned on `in_first` |
| `rtl/cp_remover.sv` | counter-based CP removal (320/64 at the input, 160/32 at the output) |
| `rtl/cyclic_sym_buffer.sv` | ping-pong symbol store that replays the wrapped tail |
| `rtl/coef_regs.sv` | 18 writable coefficient registers |
| `rtl/dfe_channelizer.sv` | top: both paths, mode control, output select |
| `tb/dfe_tb_pkg.sv` | halfband coefficient design (Blackman, Kaiser), reference rounding |
| `tb/tb_*.sv` | testbenches, below |

The `N`, `L` and `CP` parameters of the top and its submodules default to 70,
256 and 64. `N` must be 2 + 4k.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog.

* `tb_analytic_hb_decim`: random coefficients and samples. Each output is
  compared with the direct form: all 36 taps, no pre-subtraction. Also checks
  the one-clock latency and `clear`.
* `tb_analytic_filter_iq`: the complex reference, rounding and side-band tags
  with random data. Then tone tests with a real halfband design: a positive or
  negative tone must appear on its own branch, at least 35 dB above the other.
* `tb_commutator`, `tb_cp_remover`, `tb_cyclic_sym_buffer`: stream ordering,
  tags, restart on symbol start, free-running wrap, replay order
  (pairs 93..127, then 0..127), ping-pong overlap, and the start latency of a
  read.
* `tb_dfe_channelizer`: the whole design at default sizes. It runs linear,
  cyclic, then linear again, and every output word is compared with a
  direct-form reference (linear convolution, or convolution modulo 256). It
  also checks output counts, linear latency, the cyclic latency against the
  SIFS budget, and the separation of a single subcarrier (68 dB measured).
  It counts each mechanism: mode switches, CP drops before and after the
  filter, discarded tail outputs, and bank swaps.
* `tb_workload_ofdm`: 16-QAM 802.11ac symbols built with an inverse DFT.
  Each 128-sample window goes through a DFT, is equalised per bin from a
  training symbol, and its EVM is measured (table above). The checks are
  thresholds, and the orderings the design should show: a higher order gives
  a lower EVM, cyclic beats linear on a long channel, and under white noise
  neither mode is more than 1 dB worse than no channelization. The multipath
  profiles are simple exponential ones with the rms delay spreads of the
  indoor models D (50 ns) and F (150 ns), not the clustered models
  themselves.

With plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dfe_pkg.sv tb/dfe_tb_pkg.sv \
  rtl/analytic_hb_decim.sv rtl/analytic_filter_iq.sv rtl/commutator.sv \
  rtl/cp_remover.sv rtl/cyclic_sym_buffer.sv rtl/coef_regs.sv \
  rtl/dfe_channelizer.sv tb/tb_dfe_channelizer.sv --top-module tb_dfe_channelizer
./obj_dir/Vtb_dfe_channelizer
```

Every testbench finishes in well under a second.

## What follows the original proposal and what does not

**Taken from the original proposal:**

* the split into two 40 MHz halves;
* the polyphase analytical halfband structure: commutator, Hilbert branch with
  symmetric pre-subtraction and multipliers h0, h2, ..., a factor j, a delay
  branch with gain 1/2, and sum and difference outputs;
* one real filter per rail;
* the sizes L = 256, CP = 64 and N = 70;
* linear and cyclic operation on the same filter, with CP removal ahead of
  cyclic filtering.

**Chosen here:**

* all word lengths and the rounding;
* the valid/tag streaming interface, the reset and clear behaviour, and the
  pipelining;
* writable coefficients, with no built-in values;
* the exact delay (M-1)/2 of the delay branch that comes from pairing x(2m)
  with x(2m+1);
* the sign convention of `y_hp`;
* the realisation of cyclic convolution by replaying the tail from a
  ping-pong buffer;
* the placement of the linear-mode FFT window;
* resynchronisation on `in_first`.

**Not included:**

* the analog front end (LNA, I/Q mixers and LO, low-pass filters, AGC) and
  the A/D converters. `in_iq` stands for their output.
* the two 128-point FFTs and the rest of the 40 MHz receiver chains, which are
  existing 802.11n blocks. `out_lp` and `out_hp` are their inputs.
* timing synchronisation.
* the 160 MHz variant that would split into four 40 MHz signals.
* the non-halfband filter designs, which exist only as a software mapping.

**Not the same figure:** the original proposal quotes a complexity saving of
about 25 % for the cyclic realisation. That saving applies to block-wise
processing, where both modes would filter N extra samples per block. In this
streaming hardware the linear path never restarts, so cyclic mode does
slightly *more* work per symbol (163 against 160 filter steps).
