# GSM baseband processor: channel coding, interleaving and GMSK for a telemedicine link

This design is the digital half of a GSM modem, small enough to sit next to an
ECG or other bio-signal processor on one low-cost FPGA. A 260-bit frame goes out
as a GMSK-modulated intermediate-frequency (IF) signal. An IF signal coming back
returns 260-bit frames, with a flag that says whether the most important bits
came through intact.

- **Transmitter:** it protects the frame with a cyclic code and a rate-1/2
  convolutional code. It then spreads the bits over four bursts, adds a training
  sequence and modulates them.
- **Receiver:** it demodulates the signal and estimates the channel from the
  training sequence. A Viterbi equalizer removes inter-symbol interference. The
  receiver then reorders the bits and corrects errors with a second Viterbi
  decoder.

Everything is plain synthesizable SystemVerilog. Sine and Gaussian filter tables
are computed at elaboration time, so there are no data files.

```
 tx_bit ─► channel_encoder ─► interleaver ─► burst_formatter ─► gmsk_modulator ─► tx_rf (IF)
           (cyclic_encoder,     8 x 57         tail + TSC +        diff. encoder,
            conv_encoder)                      data + guard        Gaussian FIR, NCO
                                                                          gsm_uplink

 rx_rf ─► gmsk_demodulator ─► viterbi_equalizer ─► diff_decoder ─► deinterleaver ─► channel_decoder ─► rx_bit
          BPF, mix, LPF,       channel estimate,     modulo-2         57 x 8            viterbi_decoder,
          discriminator        4-state trellis                                         parity check
                                                                          gsm_downlink
```

`gsm_baseband_top` places `gsm_uplink` and `gsm_downlink` side by side. They
share only the clock and reset. Anything between `tx_rf` and `rx_rf` lies
outside the design: the RF stage, the channel, and burst synchronisation.

## Frame and burst format

| Item | Size |
|---|---|
| Speech (or data) frame | 260 bits: 50 class Ia, 132 class Ib, 78 class II |
| Protected block | 50 Ia + 3 parity + 132 Ib + 4 zero tail = 189 bits |
| After the convolutional code | 378 bits, followed by the 78 class II bits uncoded = 456 |
| Interleaving | 8 blocks of 57 bits, sent as 4 bursts of 114 data bits |
| Burst on air | 3 tail (0) + 26 training + 114 data + 3 tail (0) = 146 bit periods |
| Gap after each burst | `GUARD_BITS` = 64 idle bit periods |

Frames enter with the first bit first and leave in the same order.

**Training sequence.** The 26 training bits are GSM training sequence code 0,
`00100101110000100010010111`. The modulator differentially encodes everything
it sends. The formatter therefore sends a pre-coded version, b(i) = b(i-1) xor
tsc(i) with b(-1) = 0, so that the symbols on air are the training code itself.

**Guard gap.** The receiver's equalizer needs about 365 clock cycles (46 bit periods) to finish a
burst after its last sample. The 64-bit gap gives it that time. A frame
therefore takes 4 × 210 bit periods, which is 6720 clock cycles at `OSR` = 8.

## Channel coding (`cyclic_encoder`, `conv_encoder`, `channel_encoder`)

**Cyclic code.** The 50 class Ia bits get 3 parity bits from the cyclic code
with g(x) = x³ + x + 1. It is a three-register LFSR:

```
r1 <= d ^ r3
r2 <= r1 ^ r3
r3 <= r2
```

After the 50th bit the registers hold the remainder of x³·m(x) / g(x). The
parity bits are sent r1 first, then r2, then r3.

**Convolutional code.** The 189-bit block runs through the rate-1/2 code with
G1 = 1 + D³ + D⁴ and G2 = 1 + D + D³ + D⁴. The four zero tail bits return the
encoder to state 0, which the decoder relies on.

**Channel encoder timing.** `channel_encoder` buffers the whole 260-bit frame.
It then sends 378 coded bits (c1, c2 alternating) and the 78 class II bits. The
last output bit leaves 456 cycles after the last input bit when the output is
never stalled.

**Decoder.** `viterbi_decoder` is a 16-state, hard-decision Viterbi decoder.
It makes one trellis step per cycle with all 16 add-compare-select units in
parallel, using 11-bit path metrics. It keeps a 189 × 16 decision memory and
traces back from state 0.

`channel_decoder` wraps the Viterbi decoder. It recomputes the parity over the
decoded class Ia bits with a second `cyclic_encoder` and raises `parity_ok` if
it matches. A frame whose Ia bits are wrong is therefore flagged rather than
silently passed on.

## Interleaving (`interleaver`, `deinterleaver`)

**Interleaver.** Coded bit k goes to row k mod 8, column k div 8 of an 8 × 57
memory. Row r then holds bits r, r+8, r+16 and so on. Burst b (0 to 3) is read
with row b on its even positions and row b+4 on its odd positions. A fade that
wipes out one burst therefore damages every 8th bit of the frame and nothing
more, which the convolutional code can correct.

**Deinterleaver.** This is the inverse: a 57 × 8 memory. Each burst is written
column by column into columns b and b+4. After the fourth burst it is read out
row by row.

Both blocks take a whole frame, then emit a whole frame, with valid/ready
handshakes on both sides.

## GMSK in fixed point (`gmsk_modulator`)

The clock is the sample clock, with `OSR` = 8 samples per bit. The modulator
processes each bit in this order:

1. **Differential encoder.** d = b xor b_prev. The NRZ level is +1 for d = 0
   and -1 for d = 1.
2. **Gaussian filter.** An FIR with 3·OSR + 1 = 25 taps, BT = 0.3. The taps are
   the Gaussian pulse exp(-t²/2σ²T²) with σ = √(ln 2)/(2π·BT), sampled at T/OSR.
   They are scaled so that they add up to exactly 2¹⁴/OSR. One bit held for OSR
   samples then turns the phase by exactly 2¹⁴/2¹⁶ of a turn, which is π/2
   (modulation index 0.5). The rounding remainder goes on the centre tap.
3. **Integrator.** A 16-bit phase accumulator, where 2¹⁶ is one full turn.
4. **I/Q.** A 256-entry sine table of amplitude 2047 gives cos and sin of the
   phase.
5. **IF mixing.** A 16-bit carrier NCO advances `CARRIER_STEP` per sample. The
   default 0x4000 puts the IF at a quarter of the sample rate. The IF output is
   `rf = (I·cos ω₀n − Q·sin ω₀n) >>> 11`, a 13-bit signed value.

A new bit is taken every OSR cycles (`bit_ready`). If no bit is offered the
modulator sends 0, so the signal never stops. `burst_start` pulses when the
first bit of a burst is taken. The receiver uses this pulse, delayed by the
channel delay, as its burst timing.

## Receiver front end: the discriminator (`gmsk_demodulator`)

The front end has the classical layout: band-pass filter, mixing with cos ω₀
and −sin ω₀, then low-pass filtering of both branches. It recovers the
information as a frequency discriminator rather than by tracking the carrier
phase, because GMSK with h = 0.5 carries each bit as a ±π/2 phase turn.

1. **Band-pass filter.** y[n] = x[n] − x[n−2]. At an IF of a quarter of the
   sample rate this passes the signal and blocks DC and half the sample rate.
2. **Mixing.** The filtered signal is multiplied with the NCO's cos and −sin
   outputs.
3. **Low-pass filter.** A two-sample average, which cancels the mixing product
   at twice the IF.
4. **Discriminator.** With I and Q recovered, I·ΔQ − Q·ΔI is proportional to
   the instantaneous frequency, Δ being the one-sample difference.
5. **Integrate and dump.** The discriminator is summed over each bit period.
   The sign of the sum is the differentially encoded symbol. Its value,
   saturated to ±127, is the soft value the equalizer uses.

The integration windows start `DUMP_DELAY` = 20 samples after `burst_start`.
That value is the pipeline delay of the modulator plus the demodulator, so that
each window is centred on one symbol's phase turn. If you change `OSR`, the
filter or the pipeline, recalibrate `DUMP_DELAY`. `gmsk_demodulator_tb` shows
how, using a signal synthesised in the testbench.

Because of the Gaussian filter, each soft value also contains about a quarter
of each neighbouring symbol. That is inter-symbol interference (ISI), and it is
what the equalizer removes.

## The Viterbi equalizer (`viterbi_equalizer`)

This is the most involved block. It works on one whole burst of 146 soft
values, in three phases.

**1. Channel estimate (16 cycles).** The channel is modelled with three taps:

```
r(n) = h0·a(n+1) + h1·a(n) + h2·a(n−1),    a = +1 for symbol 0, −1 for symbol 1
```

The estimate correlates the received training section with the known
symbols:

```
h_k = (1/16) · Σ_{j=0..15} r(3 + 4 + j + k) · a_tsc(5 + j)
```

For training code 0 this is exact. Its middle 16 symbols have zero
cross-correlation with shifts of up to ±5, so the other taps do not leak into
the estimate. The estimate goes to the `h_est` port so it can be observed.
With the modulator above and a clean loop-back, h1 is about 60 and h0 and h2 are about 15 to 20.

**2. Trellis (118 cycles).** The trellis has four states, (a(m−1), a(m−2)). It
starts in the state given by the last two training symbols.

- Step m compares r(m−1) with the hypothesis h0·a(m) + h1·a(m−1) + h2·a(m−2)
  for each of the 8 transitions. It does this by squared Euclidean distance,
  in the branch-metric cell.
- Four add-compare-select units update the 28-bit accumulated path metrics in
  parallel, and store a 4-bit decision vector per step.
- The 117 steps cover the 114 data symbols, the 3 tail symbols, and the symbol
  looked ahead past the end.

**3. Trace back (117 cycles), then output (114 handshakes).** The trace back
starts from the state with the smallest path metric. The decided data symbols
are sent with valid/ready, and `out_first` marks the first one.

While it works, the equalizer raises `busy`. It ignores input while busy.
`gsm_downlink` asserts that no burst starts while it is busy. The
transmitter's guard gap guarantees this.

**Differential decoding.** This runs after the equalizer, in `diff_decoder`
(out = in xor previous). The first data bit of each burst is decoded against
the last training bit, which is known. The equalizer therefore works in the
symbol domain, where the channel model is linear.

## Interfaces and timing

- **Clock and reset.** One clock, `clk`, which is also the sample clock. One
  synchronous active-low reset, `rst_n`.
- **`gsm_baseband_top`, transmit side.** `tx_valid`/`tx_ready`/`tx_bit` accept
  260-bit frames. The outputs are `tx_burst_start`, `tx_i`, `tx_q` and the
  13-bit IF `tx_rf`.
- **`gsm_baseband_top`, receive side.**
  - Inputs: the IF `rx_rf`, and `rx_burst_start`, which is the transmitter's
    `tx_burst_start` delayed by the same number of cycles as the signal.
  - Frame output: `rx_valid`/`rx_ready`/`rx_bit`, with `rx_last` on bit 260 and
    `rx_parity_ok` valid alongside.
  - For observation: `rx_raw_valid`/`rx_raw_bit` are the demodulator's own bit
    decisions, and `rx_h_est` is the channel estimate.
- **Parameters.**

  | Parameter | Default | Meaning |
  |---|---|---|
  | `OSR` | 8 | Samples per bit |
  | `DUMP_DELAY` | 20 | Receiver timing offset |
  | `CARRIER_STEP` | 0x4000 | IF as a fraction of the sample rate, ×2¹⁶ |

  Frame sizes, the burst layout and the tables are in `gsm_pkg`.
- **Latency.** A frame needs 6720 cycles on air. At the receiver, the last
  frame bit leaves roughly 1,300 cycles after the last burst ends: equalizer,
  deinterleaver read-out, Viterbi decoder and frame output. At OSR = 8 a 2.17 MHz sample
  clock would give the GSM rate of 270.833 kbit/s.

## Where this design departs from its source description

The source names the processing steps. Most sizes and formats above are this
design's own choices:

- **Burst formatter.** The source's transmitter feeds the interleaver straight
  into the modulator. Its receiver, however, estimates the channel from a
  training sequence. The tail and training fields and the guard gap were added
  so the receiver has one.
- **Burst pairing.** The source gives the 8 × 57 block split and the row/column
  memories. Pairing block b with block b+4 in one burst is this design's
  choice.
- **Demodulator.** The source describes its demodulator as coherent: band-pass
  filter, mixing with cos ω₀ and −sin ω₀, low-pass filter, sum, and a modulo-2
  adder. This design keeps that layout but combines I and Q as a frequency
  discriminator. The modulo-2 differential decoding moves behind the
  equalizer.
- **Filter sizes and fixed-point widths.** The filter sizes, the 3-tap
  equalizer, the fixed-point widths and the 16-symbol correlation window are
  not given in the source.
- **Not included.** The speech codec, the RF/IF analogue stage, and the
  bio-signal acquisition that the telemedicine system puts around the modem
  are not part of this RTL.
- **Size.** The source reports a very small implementation, a few dozen logic
  elements on a Cyclone IV E. This design is larger. Its memories alone hold
  about 25 kbit (frame buffers, interleaver, equalizer and decoder decision
  memories), and it has several multipliers. A generic mapping to 4-input LUTs,
  with the multipliers built from LUTs, gives about 10,700 LUTs and 1,000
  flip-flops. That is under half of the 22,320 logic elements of the device the
  source used.

## Simulating with Verilator

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops. `tb/gsm_ref_pkg.sv` holds
independent reference models (long-division CRC, convolutional code,
interleaver index) used by several testbenches.

A block testbench:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/gsm_pkg.sv tb/gsm_ref_pkg.sv tb/viterbi_equalizer_tb.sv --top viterbi_equalizer_tb
./obj_dir/Vviterbi_equalizer_tb
```

The end-to-end test, at the default parameters:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/gsm_pkg.sv tb/gsm_ref_pkg.sv tb/gsm_baseband_top_tb.sv --top gsm_baseband_top_tb
./obj_dir/Vgsm_baseband_top_tb +verilator+rand+reset+2
```

`gsm_baseband_top_tb` sends three random frames through the transmitter and
loops the IF back to the receiver. It adds uniform noise (±800 against a
2047 amplitude) to the second frame. It checks:

- every frame bit and the parity flag;
- the frame length;
- that the channel estimate has a main tap and two smaller positive side taps.

It also counts each mechanism at least once: bursts, idle guard bits, noisy
bursts, demodulator bit errors corrected downstream, and parity passes. It
runs in a few seconds.

Other testbenches to know:

- `gsm_downlink_tb` and `channel_decoder_tb` include a frame with a corrupted
  parity to show `parity_ok` going low.
- `viterbi_equalizer_tb` drives four synthetic channels with stronger ISI than
  the modulator produces.
