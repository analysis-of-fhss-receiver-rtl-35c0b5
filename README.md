# FH/BPSK receiver

A digital receiver for a signal that is both frequency-hopped (FHSS) and
binary phase-shift keyed (BPSK). The transmitter puts each data bit on a
0.556 MHz carrier as a phase of 0 or 180 degrees. It then multiplies the
result by a second carrier that hops pseudo-randomly among five frequencies
between 0.556 and 11.1 MHz. The receiver knows the hop sequence and the carrier
phase. It removes the hopping by multiplying with the same hopped carrier,
removes the BPSK carrier by multiplying with a local copy of it, and integrates
over each bit to decide 0 or 1. Everything runs on one 100 MHz master clock.
All carriers are read from a single 180-entry cosine table.

The RTL is SystemVerilog-2017 and synthesizable. It has no vendor primitives.
Testbenches are self-checking and run under plain Verilator.

## How the signal is taken apart

Write `c(n)` for the BPSK carrier sample, `s(n)` for the current hop
frequency's sample, and `b = +1/-1` for the bit. The receiver expects the
received sample to be

    r(n) = b * c(n) * s(n)          (plus noise)

It computes:

| stage | operation | width | what it contains |
|---|---|---|---|
| de-spread | `d = r * s`  | 24 bit | `b * c * s^2`: the BPSK signal, scaled by `s^2 = (1 + cos 2ws)/2` |
| mix       | `m = d * c`  | 32 bit | `b * c^2 * s^2`: never negative apart from the sign `b` |
| detect    | `sum of m over 180 samples` | 41 bit | sign = `b` |

The whole design rests on one fact: `c^2 * s^2` is never negative. So the sum
over a bit has the sign of `b`, whatever the hop frequency. The
double-frequency terms left by each multiplication average out over the bit.
They need no filter. Integration does the filtering, and a threshold at zero
makes the decision. For a full-scale signal the sum for one bit is about
`180 * 64^4 / 4`, roughly 7.5e8. That is far above the noise the testbench
adds, and far below the 41-bit range.

This only works when the local `c` and `s` match the transmitter's in
frequency, phase and hop timing. The receiver does no acquisition or tracking.
It assumes a frame-start strobe shared with the transmitter. At that strobe,
the carrier oscillators and the spread-code generator restart from phase 0 and
from their seed. Being off by one sample (2 degrees of carrier) does little
harm. A wrong hop code, or a wrong phase of the BPSK carrier, destroys the
result.

## Carriers: one table, several speeds

`carrier_lut` holds `round(64 * cos(2*pi*k/180))` for k = 0..179 as signed
8-bit values. The table is computed during elaboration with integer
fixed-point arithmetic: a Taylor series on the angle folded into the first
quadrant. No data file is needed.

`carrier_nco` is a phase counter modulo 180 that addresses the table. It
advances `STEP` entries per clock, so its frequency is `100 MHz * STEP / 180`:

| output | STEP | frequency | period |
|---|---|---|---|
| BPSK carrier, F1 | 1  | 0.556 MHz | 180 clocks |
| F2 | 5  | 2.78 MHz | 36 clocks |
| F3 | 10 | 5.56 MHz | 18 clocks |
| F4 | 15 | 8.33 MHz | 12 clocks |
| F5 | 20 | 11.1 MHz | 9 clocks |

`freq_synth` runs five of these in parallel. Every STEP is a whole number, so
every oscillator is back at phase 0 every 180 clocks. With hops of 180 samples,
each hop therefore starts its frequency at cos(0), no matter which frequency
came before. The steps are in `fh_pkg::HOP_STEP`.

## Hopping

`spread_code_gen` is a 7-bit maximal-length LFSR (x^7 + x^6 + 1, seed 0x5B).
It advances once per hop of 180 samples. The hop code is the LFSR state
modulo 5. `fhss_despreader` uses the code as the select of a 5-to-1
multiplexer over F1..F5, then multiplies the received sample by the selected
one. All five codes occur. Because of the modulo, codes 1 and 2 are slightly
more frequent: 26 of the 127 states give each of them, and 25 give each of the
others.

The hop length equals the bit length, so each bit is carried on one frequency.
Shorter hops only need `HOP_CYCLES` of `spread_code_gen` changed. Hop
boundaries then fall inside a bit, but the sign argument above still holds.
For each oscillator to start a hop at phase 0, the hop length must stay a
multiple of 180 / gcd(180, STEP).

## Detection

`threshold_detector` integrates and dumps. It adds up the 180 mixed samples of
a bit. On the last one it compares the total with 0: above 0 gives bit 1,
otherwise bit 0. It raises `bit_valid` for one clock, shows the total as
`metric` (the matched-filter peak), and clears the sum. A frame marker
restarts the bit count, so a new frame may start at any time, including
straight after the last sample of the previous one.

## Timing of the top level

The latency from the input to the decision is three clocks:

    cycle t0              rx_start = 1, rx_sample = sample 0
    t0 + 1                rx_sync register;  hop code and F1..F5 for sample 0
    t0 + 2                de-spread register; local carrier for sample 0
    t0 + 3                mixer register
    t0 + 183 + 180*k      rx_bit_valid = 1, rx_bit = bit k

`hop_code`, `hop_start` and `spread_freq` belong to the sample that is in the
`rx_sync` register, one cycle after it entered.

## FHSS-only mode

`fhss_only` is taken with `rx_start` and holds for that frame. It replaces the
local BPSK carrier by the constant 64. The chain is then a plain FHSS receiver
for a signal `b * s(n)`: de-spread, integrate, decide. The mode follows its
frame through the pipeline, so consecutive frames can differ.

## The comparison BPSK demodulator

A second, independent input path holds `bpsk_mux_demod`. It shows BPSK
detection as a choice between the two possible transmitted phases. Each
received sample is compared for equality with `cos(wt)` and with
`cos(wt + pi) = -cos(wt)` from its own local carrier. A match with the first
gives bit 1, a match with the second gives bit 0. No match, or a match with
both (at the carrier's zero crossings), holds the previous bit. This works
only on an exact, noise-free, phase-aligned replica of the carrier. It cannot
work on the de-spread signal, which is `c * s^2` and not `c`. For that reason
it is kept on its own input rather than in the FH/BPSK chain. `bpsk_start`
marks sample 0, and the bit for sample n appears two clocks later.

## Ports of `fhbpsk_receiver`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | 100 MHz clock, synchronous active-low reset |
| rx_start | in | 1 | with sample 0 of a frame: restart oscillators, code, bit count |
| rx_valid | in | 1 | sample valid (invalid samples enter as 0) |
| rx_sample | in | 16 | received sample, signed |
| fhss_only | in | 1 | taken at rx_start: frame without BPSK carrier |
| rx_bit / rx_bit_valid | out | 1 / 1 | decided bit, one-clock impulse per decision |
| rx_metric | out | 41 | integral at the last decision |
| hop_code / hop_start / spread_freq | out | 3 / 1 / 8 | current hop (for observation) |
| bpsk_start, bpsk_valid, bpsk_sample | in | 1, 1, 8 | plain BPSK input |
| bpsk_bit / bpsk_match | out | 1 / 1 | comparison demodulator output |

## Files

| file | content |
|---|---|
| `rtl/fh_pkg.sv` | sizes, hop steps, sample types |
| `rtl/carrier_lut.sv` | cosine table, computed at elaboration |
| `rtl/carrier_nco.sv` | phase counter plus table |
| `rtl/freq_synth.sv` | five NCOs, F1..F5 |
| `rtl/spread_code_gen.sv` | LFSR hop code |
| `rtl/rx_sync.sv` | input register, frame marker |
| `rtl/fhss_despreader.sv` | hop multiplexer and de-spread multiplier |
| `rtl/bpsk_mixer.sv` | carrier multiplier |
| `rtl/threshold_detector.sv` | integrate-and-dump and threshold |
| `rtl/bpsk_mux_demod.sv` | comparison BPSK demodulator |
| `rtl/fhbpsk_receiver.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_reference_runs.sv` | the three reference runs of the top level, bit pattern 11110010011 |

## Simulating

From the repository root, for any testbench:

    verilator --binary --timing --assert -Irtl -y rtl rtl/fh_pkg.sv \
        tb/tb_fhbpsk_receiver.sv --top-module tb_fhbpsk_receiver
    ./obj_dir/Vtb_fhbpsk_receiver

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops on its own.
A watchdog ends it if it hangs. Each one computes its expected values
independently of the RTL. Carriers come from real-valued `$cos`, the hop code
from its own LFSR model, and products and sums from 64-bit arithmetic.

`tb_fhbpsk_receiver` runs the top level at its default parameters. It builds
three back-to-back frames: 24 FH/BPSK bits with noise, 10 FHSS-only bits, and
12 FH/BPSK bits. Alongside them runs a plain BPSK stream of about 47 bits. It
checks every bit at its exact cycle, checks that no decision appears anywhere
else, checks the hop code on every sample, and checks the BPSK side path on
every sample. It fails if any of these never occurs: one of the five hop
frequencies, either bit value, the FHSS-only mode, a restart, or a phase
reversal. The run takes well under a second.

`tb_reference_runs` sends the bit pattern 1 1 1 1 0 0 1 0 0 1 1, without
noise, through three configurations: the comparison demodulator, the
FHSS-only mode and the full FH/BPSK chain. On the comparison path the output
bit changes two clocks after the phase of the input changes. In the two
integrating configurations the recovered sequence is the same pattern,
delayed by exactly one bit period.

## What is fixed by the original design and what is not

These follow the original FH/BPSK receiver description:

- the four stages: input synchronisation, de-spreading by multiplication with
  the hopped spreading signal, coherent BPSK demodulation by multiplication
  with the carrier, and threshold or impulse detection;
- the carrier table of 180 eight-bit samples, with a 100 MHz clock and a
  0.556 MHz carrier;
- five hop frequencies, chosen by a multiplexer under a pseudo-random code,
  spanning 0.556 to 11.1 MHz;
- the signal widths 16, 24 and 32 bits;
- the comparison demodulator, which maps the in-phase signal to bit 1;
- a decision one bit period after the bit starts.

Full-precision products are used throughout. A received sample of -3465
(0xF277) times a spreading sample of 60 (0x3C) gives the 24-bit de-spread
value 0xFCD3E4. Times the carrier peak of 64 (0x40) that gives the 32-bit
value 0xFF34F900. This datapath reproduces both numbers exactly.

These are this design's own choices:

- the amplitude of 64;
- the three inner hop frequencies;
- the LFSR, its seed and the modulo-5 mapping;
- one hop and one bit per 180 samples;
- integrate-and-dump as the matched filter, with a threshold of 0;
- the pipeline registers;
- the frame-start alignment in place of a synchroniser that would acquire
  the signal;
- the FHSS-only switch. The original ran its FHSS-only receiver as a separate
  circuit, with a 9-bit input and a 16-bit de-spread product that keeps the
  upper bits, which is the full product halved. Here FHSS-only frames use the
  full-width FH/BPSK datapath, so the products are larger by the factor 2 and
  by the constant 64 that stands in for the carrier. The decisions are the
  same;
- the hold behaviour of the comparison demodulator.

Not covered:

- acquisition and tracking of hop timing and carrier phase;
- any analog front end;
- the FPGA resource and power figures. They came from a vendor flow on a
  Spartan-6 and are not reproduced here.
