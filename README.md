# Multiplier-free reconfigurable FSK baseband processor

This is a baseband processor for a low-IF FSK receiver. It selects the channel
with two fourth-order IIR band-pass filters, one for each FSK tone, and
decides the bits with a counting demodulator. The filters have no multipliers.
Each coefficient dot product is computed by *distributed arithmetic* (DA): the
sums of every subset of the five coefficients are precomputed and stored in a
small SRAM. The filter state words then address that SRAM one bit plane at a
time, and an adder with a shifting accumulator puts the results together. To
move a filter to another centre frequency or bandwidth, you write new
partial-sum tables into its SRAMs. Nothing else changes.

The RTL implements the architecture of *"A Flexible Baseband Processor with
Multi-Resolution Spectrum-Sensing Functionality"*:

- DA with two bit planes per clock through dual-port SRAMs;
- one feedback and one feed-forward SRAM per filter;
- the word lengths (10-bit input, 16-bit coefficients, 14-bit state, 15-bit output);
- the accumulation order and the sign handling;
- the four coefficient sets of its evaluation.

That source gives no detail for the scheduling, the interfaces and the
demodulator. For those, this RTL makes its own choices, listed in
[Departures and own choices](#departures-and-own-choices).

## Signal flow

```
 ADC (10 bit, 2 MHz) --+--> da_iir_bpf #0 (tone '1') --y_ch0--+
                       |                                      +--> fsk_demod --> bit
                       +--> da_iir_bpf #1 (tone '0') --y_ch1--+
 cfg writes ----------------> partial-sum SRAMs of both filters
```

| quantity | width | format |
|---|---|---|
| ADC sample X | 10 | two's complement; sign-extended to 14 bits, i.e. X/16 in state units |
| coefficients A1..A5, B1..B5 | 16 | two's complement, 12 fraction bits (range ±8) |
| partial sums (SRAM word) | 19 | exact sum of up to five coefficients |
| state t0..t4 | 14 | two's complement fraction (1 sign bit, 13 fraction bits) |
| output Y | 15 | same LSB as the state, one more integer bit |

With a 16 MHz clock, a filter takes one sample every 8 clocks, so the sample
rate is 2 MHz. At that rate the four coefficient sets below put their pass
bands at 400 to 650 kHz.

## Distributed arithmetic, two bit planes per clock

Take five coefficients C1..C5 and five 14-bit two's-complement words w1..w5,
with bit 1 as the LSB and bit 14 as the sign. Then

    sum_k Ck*wk = sum_{n=1..13} S(n) * 2^(n-1)  -  S(14) * 2^13,
    S(n) = sum_k Ck * bit_n(wk)

S(n) depends only on the five bits of plane n. There are 32 possible values,
and the SRAM holds them all: word `a` holds `sum_k Ck * a[k-1]`. Tap 1 is the
address LSB. The address of plane n is simply the five bits `{w5[n], ..., w1[n]}`.

Port A of the dual-port SRAM reads the odd plane 2m-1 and port B reads the
even plane 2m. Step m therefore covers two planes, and a 14-bit word takes
seven steps (m = 1..7, LSB planes first). In each step the accumulator does
this (`da_accumulator`):

    P   = S(2m-1) + 2*S(2m)          (step 7: S(13) - 2*S(14), the sign plane)
    acc = (acc >>> 2) + P * 2^12     (step 1: acc = P * 2^12)

The accumulator has 12 guard bits below the integer product, so the right
shifts lose nothing. After step 7, `acc` equals `sum Ck*wk` exactly.
Coefficients have 12 fraction bits and the state has 13. So the new state word
is `acc[25:12]` = floor(sum Ck*wk / 2^12), taken modulo 2^14. The 15-bit
output is `acc[26:12]`. Bits above the field are dropped. The design has no
saturation (see [Headroom](#headroom)).

## The IIR filter on two DA blocks (`da_iir_bpf`, `addr_gen`)

The filter is a direct-form-II section:

    t0(n) = A1*X(n) - A2*t0(n-1) - A3*t0(n-2) - A4*t0(n-3) - A5*t0(n-4)
    Y(n)  = B1*t0(n) + B2*t0(n-1) + B3*t0(n-2) + B4*t0(n-3) + B5*t0(n-4)

There are two DA blocks. The feedback SRAM holds the partial sums of
(A1, -A2, -A3, -A4, -A5), so the subtractions are additions too. Its taps are
(X, t1..t4). The feed-forward SRAM holds those of (B1..B5), and its taps are
(t0..t4).

The feed-forward block needs t0(n), which the feedback block only finishes at
the end of the frame. The two blocks therefore run in parallel, one sample
apart. In the frame of sample n:

- the feedback block computes t0(n);
- the feed-forward block computes Y(n-1).

Five state registers r0..r4 hold t0(n-1)..t0(n-5). The feedback taps t1..t4
are r0..r3, and the feed-forward taps t0..t4 are r0..r4. Both address pairs
come from the same four shared registers, plus X on one side and r4 on the
other. That sharing is the "combined address generator". The price is one
sample of output delay: the frame of sample n emits Y(n-1). After reset,
Y(-1) = 0.

Frame timing, clocks relative to the clock edge that accepts the sample:

| cycle | 0 | 1 .. 6 | 7 | 8 |
|---|---|---|---|---|
| SRAM address | step 1 | steps 2..7 | (port A free) | |
| accumulate | | steps 1..6 | step 7; r0 <= t0(n), r1..r4 shift; next sample may be accepted | y_valid, y = Y(n-1) |

`in_ready` is high when the filter is idle and in cycle 7, so a new sample can
follow every 8 clocks. The feedback loop is closed inside the frame: the last
addition of cycle 7 goes straight into r0. The next frame's first address
(cycle 0) already uses it.

## Loading a channel

A filter is retuned by writing its two 32-word tables:

    feedback     word a = A1*a[0] - A2*a[1] - A3*a[2] - A4*a[3] - A5*a[4]
    feed-forward word a = B1*a[0] + B2*a[1] + B3*a[2] + B4*a[3] + B5*a[4]

Coefficients are integers in units of 2^-12. Each table word is a 19-bit two's
complement value. A `cfg_wr_t` write (`we`, `filter`, `sel` = `SRAM_FB` or
`SRAM_FF`, `addr`, `data`) stores one word per clock. The write takes SRAM
port A at once, so write only while the processor is idle: `adc_ready` high
and no sample offered. A write during a frame corrupts that frame. The filter
state is not cleared by a retune. The first output samples after it are a
transient of the old state through the new coefficients.

The four coefficient sets of the original evaluation, in units of 2^-12:

| set | centre / bandwidth | A1..A5 | B1..B5 | stop-band depth |
|---|---|---|---|---|
| 1 | 500 / 40 kHz | 4096, 0, 7631, 0, 3600 | 50, 0, 43, 0, 50 | 40 dB |
| 2 | 650 / 40 kHz | 4096, 7168, 10784, 6720, 3600 | 52, 68, 76, 68, 52 | 40 dB |
| 3 | 500 / 100 kHz | 4096, 0, 6642, 0, 2930 | 194, 0, 45, 0, 194 | 30 dB |
| 4 | 400 / 240 kHz | 4096, -4124, 5348, -2691, 1941 | 550, -192, -459, -192, 550 | 25 dB |

The denominator is 1 + A2 z^-1 + ... + A5 z^-4, and the numerator is
B1 + ... + B5 z^-4. `tb/tb_model_pkg.sv` holds these numbers and computes the
tables from them.

## Headroom

X enters at 1/16 of the state's full scale. A narrow resonator still has a
large gain from X to the state t0 at its centre frequency: about 63 for set 1
and 92 for set 2. A tone at the centre frequency therefore drives t0 out of
its 14 bits once its amplitude passes about 1/8 of the ADC range (roughly 90
to 130 LSB of 511). Above that, the state wraps, and the output is garbage,
not clipped. The tests use tone amplitudes of 32 and 48. If your input can be
larger, either scale it down in front of the processor or change the slice in
`da_accumulator` to saturate.

## FSK demodulator (`fsk_demod`)

The demodulator counts. For each output pair it compares the two filters'
envelopes. A filter's envelope here is the larger magnitude of its last two
output samples. A single sample is not enough: a 500 kHz tone sampled at
2 MHz is zero in every other sample. Over one symbol of `SYM_LEN` outputs
(default 100, i.e. 50 µs or 20 kbaud), it counts how often filter 0 wins. At
the end of the symbol it emits `bit_out` = 1 if the count is above
`SYM_LEN/2`, and reports the count in `bit_count`.

Symbols are counted from reset. There is no symbol-timing recovery, so the
transmitter's symbols must be aligned to the processor's sample count.

## Top-level interface (`baseband_processor`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock (16 MHz nominal), asynchronous active-low reset |
| adc_valid / adc_ready / adc_data | in / out / in | 1 / 1 / 10 | sample handshake; both filters accept together |
| cfg | in | cfg_wr_t | partial-sum SRAM write |
| y_valid, y_ch0, y_ch1 | out | 1, 15, 15 | filter outputs of the previous sample |
| bit_valid, bit_out, bit_count | out | 1, 1, 7 | demodulated bit and its count |

The SRAM contents are not reset. Load all four tables before the first sample.

Size after coarse synthesis: about 210 word-level cells, 400 flip-flop bits
and 2432 memory bits (4 × 32 × 19).

## Files

| file | contents |
|---|---|
| `rtl/bbp_pkg.sv` | widths, constants, `sram_sel_e`, `cfg_wr_t` |
| `rtl/dp_sram.sv` | 32 × 19 dual-port partial-sum memory (port A read/write, port B read), synchronous read |
| `rtl/da_accumulator.sv` | two-plane DA shift-accumulator with sign-plane subtraction |
| `rtl/addr_gen.sv` | sample and state registers, odd/even addresses for both SRAMs |
| `rtl/da_iir_bpf.sv` | one band-pass filter: frame control, addr_gen, 2 SRAMs, 2 accumulators |
| `rtl/fsk_demod.sv` | counting FSK demodulator |
| `rtl/baseband_processor.sv` | top level |
| `tb/tb_model_pkg.sv` | integer reference model and coefficient sets |
| `tb/tb_*.sv` | testbenches, one per module, plus `tb_filter_response` |

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_da_accumulator`: random coefficients and words, including the extremes.
  Compares against `floor(sum C*w / 2^12)` wrapped to 14 and 15 bits, and
  checks that `done` comes on the 7th step.
- `tb_dp_sram`: simultaneous reads on both ports, one-clock latency, and
  read-first on a write.
- `tb_addr_gen`: all four addresses for all seven steps against a shadow copy
  of X and the state.
- `tb_da_iir_bpf`: random samples, amplitudes and gaps, and back-to-back runs.
  Every output is compared bit-exactly with the direct-form-II integer model.
  Also checks:
  - the 9-clock output latency and the 8-clock sample spacing;
  - retunes between bursts across all four sets;
  - that writes addressed to the other filter are ignored.
- `tb_fsk_demod`: counts and decisions against a model, and `bit_valid` timing.
- `tb_filter_response`: for each of the four sets, measures the gain at three
  pass-band and two stop-band frequencies. The measurement correlates 400
  output samples with the test tone. Checks:
  - agreement with the ideal response of the same coefficients (measured
    within about 0.3 dB);
  - the stop-band depths in the table above.
- `tb_baseband_processor` (top at default parameters): a 2 MHz
  continuous-phase FSK stream (500 kHz = '1', 650 kHz = '0'), 48 symbols. It
  checks every filter output bit-exactly and every bit against the one sent.
  It retunes twice without reset, first swapping the tones, then widening
  filter 0 to set 3. The bit of the first symbol after each retune is not
  checked. The run also inserts idle gaps, and counts that back-to-back
  samples, gaps, rewrites of both filters, and both bit values all occur.

To run one with Verilator 5:

    verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/bbp_pkg.sv tb/tb_model_pkg.sv tb/tb_baseband_processor.sv \
        --top-module tb_baseband_processor
    ./obj_dir/Vtb_baseband_processor

Each testbench finishes in well under a second. Uninitialised memories must
be written before they are read; the testbenches do so.

## Departures and own choices

These points follow the original design: the DA formulation, the dual-port
SRAM with odd/even planes, the negated feedback coefficients, LSB-first
accumulation with a 2-bit right shift, the subtraction of the sign plane, the
word lengths, the sign extension of X, and the coefficient sets. The
following are choices of this RTL:

- **Schedule.** The frame is 8 clocks: 7 DA steps and 1 closing clock. The
  2 MHz sample rate is inferred from where the coefficient sets place their
  pass bands at a 16 MHz clock.
- **One-sample pipeline.** The feed-forward block runs one sample behind the
  feedback block and shares its state registers, so the output is one sample
  late.
- **No separate adder register.** The odd/even pair is combined and
  accumulated in the same clock. An extra register there would make the
  feedback loop longer than 8 clocks.
- **Wrap on overflow.** The result is taken as an exact bit field with guard
  bits, and overflow wraps.
- **Interfaces.** The SRAM word width (19 bits) and read-first behaviour, the
  configuration port, the valid/ready handshake and the reset are this
  design's own.
- **Demodulator.** Only its counting principle comes from the original. The
  envelope comparison, the fixed symbol framing and the symbol length are
  this design's own.
- **SRAM model.** The memories are plain arrays, not a process-specific SRAM
  macro. The analog front end (mixers, filters, ADC) is outside this RTL.
