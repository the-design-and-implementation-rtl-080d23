# MPSK modulator with modulation recognition

A phase-shift-keying modulator normally has to be told in advance whether it
should send BPSK, QPSK or 8PSK. This design decides that by itself. A recogniser
looks at a received signal and estimates its fourth-order cumulants. From them
it works out which of the three kinds the signal is. The modulator then groups
the serial source bits into symbols of that kind (1, 2 or 3 bits). It encodes
them differentially and puts each symbol on a square carrier as one of 2, 4 or
8 phases. A demodulator is attached to the output in a loop. It recovers the
bits, so the whole chain can be checked end to end.

The RTL is written from the article *The Design and Implementation of Improved
MPSK Modulator with Signal Recognition Based on FPGA*. That article gives:

- the system's block structure;
- the serial-to-parallel rule;
- the differential encoder (a modulo-4 adder with a one-symbol delay in its
  feedback);
- the cumulant table and the minimum-distance decision rule;
- QPSK modulation and demodulation waveforms.

It gives no word widths, timing, carrier construction or recogniser
arithmetic. Those are this design's own choices, and every file header says
which parts are which. The section "Where this design departs from the source"
lists the differences.

## System structure

```
                 rx_x ──► signal_recognizer ──► mode (BPSK/QPSK/8PSK)
                                                   │
 x (serial bits) ──► serial_parallel ──► diff_encoder ──► phase_selector ──► y
                                                              ▲
                  clk ──► freq_divider ── f[7:0] (8 carrier phases)
                                                              │
                                   y, f, timing ──► mpsk_demod ──► dem_bit
```

| module | role |
|---|---|
| `mpsk_pkg` | `mod_t` (BPSK=0, QPSK=1, 8PSK=2), bits per symbol, phase-to-carrier-step helpers |
| `serial_parallel` | bit timing (`q`, `bit_tick`) and grouping of 1/2/3 source bits per symbol; the even/odd (I/Q) split for QPSK |
| `diff_encoder` | phase index = (previous index + symbol) mod M, or the plain symbol when `diff_en` = 0 |
| `freq_divider` | divides the clock into an 8-step square carrier and its eight 45° copies `f[7:0]` |
| `phase_selector` | for each symbol, routes the carrier copy of its phase to the output `y` |
| `signal_recognizer` | `hilbert_fir` → `nco_mixer` → `cumulant_est` → `mpsk_classifier` |
| `mpsk_demod` | correlates `y` against the carrier copies, decodes the phase and serialises the bits |
| `mpsk_modulator_top` | wires everything together |

## The modulation path

**Bit timing.** Each source bit lasts `BIT_CLKS` = 4 clocks. The modulator
takes `x` on the last clock of the bit, marked by `bit_tick`, so the source
must hold `x` for the whole bit period. A QPSK symbol therefore takes 8
clocks, and the counter `q` runs through 0..7 over two bits, as in the
published waveform. A BPSK symbol takes 4 clocks and an 8PSK symbol 12.
`start` low holds every counter and the carrier at 0.

**Grouping.** The bit number within a symbol, `en`, counts 0..k-1, where
k = log2(M). For QPSK, bits with `en` even go to I and bits with `en` odd go to
Q. The first bit of a symbol is its most significant bit. The recognised kind
is read when a symbol's first bit is taken. The symbol then keeps that kind,
so a kind change from the recogniser takes effect only at a symbol boundary.

**Differential encoding.** The symbol d is mapped to phase index d, meaning
d·360/M degrees (natural binary). It is then added modulo M to the previous
encoded index. For QPSK this is the modulo-4 adder with a delay register in
its feedback. BPSK uses modulo 2 and 8PSK modulo 8. The register starts at 0
after reset. With `diff_en` low the adder is bypassed, which gives plain MPSK
as in the published QPSK waveform. There 00/01/10/11 appear as
0°/90°/180°/270°.

**Carrier and selector.** The carrier is a square wave with a period of
8 clocks (8·`DIV` clocks in general). Copy `f[i]` is shifted by i·45°. It is
high while the angle 2π·p/8 + i·π/4 lies within a quarter period on either
side of zero, which makes it a cosine-like square wave. The selector turns
phase index d of an M-ary symbol into carrier step d·8/M and outputs
`f[step]` through a register. So `y` lags `f` by one clock. Because the carrier
runs freely, the phase of each symbol is measured against one continuous
reference. The symbol length does not have to be a whole number of carrier
periods: a BPSK symbol is half a period long, and an 8PSK symbol one and a
half.

**Timing.** Suppose the last bit of a symbol is taken in cycle T:

- the symbol is complete (`sym_valid`) in T+1;
- its encoded phase index (`yy`) appears in T+2;
- the selector latches the step in T+3;
- `y` carries the new phase from T+4 on.

## The recogniser

This is the hardest part to follow. The recogniser makes one decision per
window of `N` = 2000 input samples. Windows follow each other without a gap.

1. **Analytic signal.** `hilbert_fir` is a 31-tap Hilbert transformer: the
   ideal taps 2/(πn) for odd n, with a Hamming window. It produces
   `q = H{x}` together with `x` delayed by the filter's group delay. A cosine
   at the input comes out as exp(jωn). For carriers between 0.1 and 0.44 of
   the sample rate the filter's gain is within 0.4 % of 1. At 0.48 it drops
   to about 0.6, so the analytic signal keeps part of the negative
   frequency.
2. **Baseband.** `nco_mixer` multiplies by exp(-jθ). θ advances by the
   carrier estimate `fcw` (cycles per sample × 2^16) each sample, and 256-entry
   cosine and sine tables hold the values. Both tables are computed at
   elaboration. The carrier must be known. What is left is a constant phase
   offset, and the features ignore it.
3. **Scaling.** The baseband samples are shifted right by `Z_SHIFT` = 4 and
   saturated to 8 bits. That suits inputs of about ±1000 counts. Change
   `Z_SHIFT` for other levels; the products are sized for 8-bit samples.
4. **Cumulants.** `cumulant_est` sums z², |z|², z⁴, z³z* and |z|⁴ over the
   window. At the end it forms the cumulants multiplied by N², which needs no
   division:
   - N²C40 = N·S40 − 3·S20²
   - N²C41 = N·S41 − 3·S20·S21
   - N²C42 = N·S42 − |S20|² − 2·S21²

   For unit-power signals the theory gives:

   | kind | \|C40\| | \|C41\| | C42 |
   |---|---|---|---|
   | BPSK | 2 | 2 | −2 |
   | QPSK | 1 | 0 | −1 |
   | 8PSK | 0 | 0 | −1 |
5. **Decision.** The features are A1 = |C40|/|C42| and A2 = |C41|/|C42|. The
   references are [1,1] for BPSK, [1,0] for QPSK and [0,0] for 8PSK. The kind
   with the smallest T = |A1−a1| + |A2−a2| wins. `mpsk_classifier` multiplies
   every T by |C42|, so it needs no divider. It estimates complex magnitudes as
   max + 3/8·min, which is within 7 %. On a tie the lower-order kind wins.
   After reset the kind is QPSK.

The recogniser's latency is about 8 clocks from a window's last sample to
`rec_valid`.

**How reliable it is.** With 2000 samples and 20 to 25 samples per symbol, a
window holds only 80 to 100 symbols. For QPSK, the random mean of z² over so
few symbols is about 0.1, which makes |C41| ≈ 2·|M20|·M21. So A2 spreads by
about 0.2 even without noise, and a QPSK window now and then lands on the BPSK
side of the decision boundary at A2 = 0.5. Measured in simulation
(`tb_recognition_snr`, 20 windows per point, single signals):

| carrier / samples per symbol | no noise | −5 dB | 0 dB | 5 dB | 10 dB | 20 dB |
|---|---|---|---|---|---|---|
| 0.40 / 25: BPSK, QPSK, 8PSK | 20, 18, 20 | 3, 12, 10 | 20, 18, 20 | 20, 19, 20 | 20, 20, 20 | 20, 19, 20 |
| 0.48 / 20: BPSK, QPSK, 8PSK | 20, 18, 20 | 0, 13, 11 | 20, 11, 2 | 20, 15, 14 | 20, 18, 20 | 20, 18, 19 |

The counts are windows recognised correctly out of 20. They come from one
random seed and move by a window or two with another.

Near half the sample rate (0.48) the Hilbert filter is weaker, and results
suffer below 10 dB. Longer windows (`N`) reduce the spread. The widths then
need checking: the accumulators hold N·2^30.

## The demodulator

`mpsk_demod` keeps one agreement counter per carrier copy. Each clock it adds
1 to every copy that equals the received `y`. It must be given:

- the reference copies `f`;
- a `sym_start` strobe on the first clock of each received symbol;
- that symbol's kind.

At the next `sym_start`, the copy with the most agreements among those
allowed for the kind (every 8/M-th copy) gives the phase index `yy`. The
decoded symbol `yyy` is `yy` minus the previous index, modulo M. The bits then
go out MSB first, one every `BIT_CLKS` clocks, through an 8-bit queue. The
queue is needed because a short BPSK symbol may follow a long one before all
the long symbol's bits have left.

In the top, the demodulator uses the modulator's own carrier. Its symbol
strobe is the encoder's valid delayed by two clocks. There is no carrier or
timing recovery. A single flipped sample per symbol is still decoded
correctly. This is tested.

## Top-level interface (`mpsk_modulator_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start` | in | runs bit timing and carrier |
| `diff_en` | in | differential encoding (and decoding) on |
| `rec_clear` | in | restarts the recognition window and oscillator |
| `fcw[15:0]` | in | carrier estimate of the received signal |
| `rx_valid`, `rx_x[RX_W-1:0]` | in | received real samples (signed) |
| `rec_valid`, `mode` | out | decision strobe; current kind, which is used for the next symbol |
| `x` | in | serial source bit, held for `BIT_CLKS` clocks |
| `q`, `bit_tick` | out | clock count in the bit; `x` is taken at the end of a `bit_tick` cycle |
| `sym_valid`, `xx` | out | parallel symbol |
| `yy`, `sym_mode` | out | encoded phase index and its kind |
| `f[7:0]` | out | carrier copies |
| `y` | out | modulated signal |
| `dem_valid`, `dem_yy`, `dem_yyy`, `dem_mode` | out | demodulated symbol |
| `dem_bit_valid`, `dem_bit` | out | demodulated serial bits |

Parameters: `BIT_CLKS` = 4, `RX_W` = 12, `REC_N` = 2000.

## Where this design departs from the source

- **One signal at a time.** The source recognises the kinds of *two* signals
  that overlap in time and frequency. It uses cyclic cumulants at two
  symbol-rate cyclic frequencies, but it gives neither the estimator nor how
  those frequencies enter. The recogniser here handles a single signal with a
  known carrier. The source's results for signal pairs (recognition rates
  against SNR and against spectral overlap) therefore cannot be reproduced.
  The single-signal equivalent is the table above.
- **Input to the recogniser.** The source does not say which signal the
  recogniser examines. Here it has its own sample input, `rx_x`, and `fcw`.
- **8PSK and BPSK on the modulator.** The source's modulator waveforms are for
  QPSK: four phases, a 4-bit carrier-phase register and a modulo-4 adder. This
  design widens them to 2 and 8 phases: an 8-step carrier, modulo-2/8 adders
  and 1/3-bit grouping.
- **Chosen values.** Bit period, carrier period, word widths, filter length,
  table sizes, reset values, the `diff_en` bypass and the demodulator's method
  are all this design's choices.
- **Demodulator.** The source's demodulator waveform shows a 3-bit sample
  register and intermediate values that could not be tied to a rule. Only its
  outputs (phase index, 2-bit symbol, serial bits) are matched here.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mpsk_pkg.sv tb/tb_mpsk_modulator_top.sv --top-module tb_mpsk_modulator_top
./obj_dir/Vtb_mpsk_modulator_top
```

- `tb_mpsk_modulator_top` runs the whole design at its default parameters.
  It does two runs, one with differential encoding and one without. Each run
  sends BPSK, QPSK and 8PSK to the recogniser, three windows of each, some with
  noise. Every clock it checks `y` against a carrier model, and it checks that
  the demodulated bits equal the source bits. It also counts kind changes,
  symbols and decisions of each kind. It finishes in about a second.
- `tb_recognition_snr` measures the recognition rates above.
- The other testbenches each test one block against a model in the testbench:
  - cumulants against sums of the expanded polynomials in 64-bit integers;
  - the Hilbert and mixer outputs against `$sin` and `$cos`;
  - the decision against real-valued features;
  - the encoder and selector against modular arithmetic.

The simulator must support `--timing` (Verilator 5). The designs use no
vendor primitives.
