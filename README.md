# Digital frequency hopping with non-maximally decimated polyphase filter banks

A frequency-hopping (FH) transmitter normally hops its carrier with analog
synthesisers and mixers, one per hopping sub-carrier, because a digital hopper
would have to run at the full hopping bandwidth. This RTL does the whole hop
digitally. The idea is that a polyphase **up-converter channelizer** does three
things at once:

* it interpolates its input,
* it shapes the input with one low-pass prototype filter,
* it moves the input onto one of M equally spaced channels.

Hopping means choosing which channel input is fed, sample by sample. Nothing
runs faster than the output sample rate, and the cost of the filter bank grows
slowly with the number of channels.

The design has two parts, which sit side by side in the top level
`fh_radio_top`:

| part | module | what it is |
|---|---|---|
| Two-tier multi-carrier FH modulator | `mcfh_modulator` | An 8-path channelizer generates 8-FSK: the data symbol chooses the channel. Two PN-driven channel selectors (L = 2 by default) then place that FSK signal on 2 of the 32 channels of a second, 32-path channelizer. |
| 16-path engine | `up_2_to_16` | A complex 16-path channelizer with 1:8 up-sampling. A sinewave or white-noise test source feeds it, and a channel number set by hand chooses the output channel. This is the building block that both tiers of the modulator use. |

Both parts make one complex output sample per clock.

## The up-converter (`nmdfb_channelizer`)

### What it computes

With x(n) the input, h the prototype of M·K taps and k the selected channel,
the output is

    y(m) = exp(j·2π·k·m/M) · Σ_n x(n) · h(m − n·M/2)

This is interpolation by **M/2**, followed by a mix to k/M of the output rate.
Several selectors can be active at once (`L > 1`). Their contributions add,
and each input sample uses the channels that are set when it is taken. Channel
0 is DC. Channel k sits at k·F_out/M, and channels above M/2 are negative
frequencies.

The up-sampling factor is M/2 and not M. That is what "non-maximally
decimated" means here: the channels are F_out/M apart, but each input sample
covers twice that band. Both the passband and the transition band of a channel
can therefore carry signal without aliasing. A maximally decimated bank (1:M)
would lose the transition bands.

### How it computes it

The data path has five blocks:

```
x ─► channel_selector ─► circular_buffer ─► polyphase_filter ─► output_commutator ─► y
       (rotators)          (I and Q)          (I and Q)            (I and Q)
            ▲                   ▲                  ▲                     ▲
            └──────────── state_engine: take, flip, phase ───────────────┘
```

1. **Phase rotators instead of an IFFT (`channel_selector`).** A textbook
   channelizer puts an M-point IFFT in front of the filter. A hopper feeds only
   one or a few of the IFFT's inputs, so the IFFT output is simply x times the
   twiddles of the chosen channel: `v[r] = x · exp(j2π·k·r/M)` for r = 0..M−1.
   The selector computes these M products directly and adds one such set per
   enabled selector. This stage makes the signal complex, so every later stage
   exists twice, once for I and once for Q.
2. **Circular buffer (`circular_buffer`).** The output advances M/2 samples per
   input, not M. Between consecutive inputs the channel's carrier therefore
   gains an extra phase of π·k. To correct this, the vector of every other input
   is rotated circularly by M/2 positions. The state engine's `flip` bit
   alternates 0, 1, 0, 1, … from reset.
3. **M-path polyphase filter (`polyphase_filter`).** Path r holds the
   sub-filter h_r(n) = h(r + n·M). Because of the M/2 rate, its taps are two
   input samples apart (H_r(z²)). Each path therefore keeps a delay line of
   2K−1 samples and uses every other sample. The paths are computed one pair
   at a time: on output phase p the filter delivers path p (`a`) and path
   p+M/2 (`b`). Each pair uses K multipliers per rail.
4. **Output data buffer and commutator (`output_commutator`).** Path p+M/2 of
   one input belongs to the next input period. The commutator saves `b` in an
   M/2-entry buffer and adds it to `a` of the next input:
   `y(n·M/2+p) = a_p(n) + b_p(n−1)`. The sum is rounded and saturated to
   16 bits, and the M/2 results leave in phase order.
5. **State engine (`state_engine`).** Counts the output phase. It asserts
   `take` once every M/2 enables and supplies `flip`.

### Timing

* **Clock enable:** the channelizer advances only when `ce` is high. Each
  enable is one output sample.
* **Input:** `in_take` is high on the enable that consumes `x_i/x_q` (and
  `ch/ch_en`). This happens every M/2 enables, starting with the first enable
  after reset.
* **Latency:** the first of the M/2 outputs of an input is registered on the
  4th enable after the take. `y_valid` is high for one clock after each enable.

In a cascade, the second tier's `in_take` is used as the `ce` of the first
tier. The first tier then produces exactly one sample per second-tier input.

## The two-tier modulator (`mcfh_modulator`)

```
sym ─► tier 1: nmdfb_channelizer M1=8  ──► tier 2: nmdfb_channelizer N2=32 ─► dc_canceller ×2 ─► y
       (input = FSK_AMP, channel = symbol)   (channels = PN outputs, L=2)
                                              ▲
                         pn_sequence_generator × L, stepped every HOP_LEN inputs
```

* **Tier 1 (MFSK).** Every tier-1 input sample is the constant `FSK_AMP`,
  placed on the channel given by the current 3-bit symbol. A symbol lasts
  `SYM_LEN` tier-1 inputs. The `sym/sym_valid/sym_ready` stream accepts a
  symbol at the start of each symbol period. If no symbol is waiting, the
  input is zero for that period.
* **Hopping.** The complex tier-1 output drives all L selectors of tier 2. Each
  selector is steered by its own 16-bit LFSR (x¹⁶+x¹⁴+x¹³+x¹¹+1). The low 5
  bits of the LFSR are the channel, and every LFSR steps once per `HOP_LEN`
  tier-2 inputs (`hop_strobe`). `pn_load` reloads all LFSRs from `pn_seed`
  while the modulator runs, and restarts the dwell counter. `hop_en` switches
  each selector on or off.
* **Output.** A one-tap adaptive DC canceller per rail (`dc_canceller`,
  y = x − d, d += y/2¹⁰) removes the DC that rounding leaves.
* **Rates, with defaults M1=8, N2=32, SYM_LEN=4, HOP_LEN=16:**
  * tier 2 takes an input every 16 clocks;
  * tier 1 takes an input every 64 clocks;
  * a symbol lasts 256 output samples;
  * a hop also lasts 256 output samples.

If two selectors pick the same channel, their contributions add, giving that
carrier twice the amplitude.

## The 16-path engine (`up_2_to_16`)

`sig_generator → nmdfb_channelizer (M=16, L=1) → dc_canceller (I, Q)`

The source has two modes, chosen by `src_sel`:

* **Sine** (`src_sel` = 0): an 8-bit phase accumulator, stepped by 5 per
  sample, reads a 256-entry table of 2¹⁴·sin.
* **White noise** (`src_sel` = 1): a 32-bit Galois LFSR, stepped 16 times per
  sample, gives uniform samples in ±2¹³.

The source advances on every take. `ch` can be changed while the engine runs,
and the new channel applies from the next input taken.

## Numbers and tables

* **Samples** are 16-bit two's complement.
* **Twiddles** are 18-bit Q2.16.
* **Prototype coefficients** are 18-bit Q1.17.
* **Filter sums** are kept at 48 bits.

No table is stored in a file. `nmdfb_pkg` computes the sine, the twiddles and
the prototype at elaboration time with an integer Taylor series (Q28), so M
and K can be changed freely. The prototype is a windowed sinc of M·K taps
(K = 8 by default):

    h(j) = sinc(2t/M) · w(t),  t = j − (M·K−1)/2
    w(t) = 0.35875 + 0.48829·cos(2πt/N) + 0.14128·cos(4πt/N) + 0.01168·cos(6πt/N),  N = M·K

The cut-off is at half the input rate. Each of the M/2 interpolation phases has
unit gain. Measured on the 32-path engine, the response is flat within
0.001 dB out to 0.5/M of the output rate from the channel centre. It is 6 dB
down at 1/M, where the neighbouring channel's band crosses it. Beyond 1.5/M it
is at least 89 dB down. With 8 taps per path the transition band is about
1/M wide; raising K makes it steeper.

Yosys coarse synthesis of `fh_radio_top` at its defaults gives about 5,000
word-level cells and 4,600 flip-flop bits, plus the path delay lines kept as
memories. In `up_2_to_16` there are 96 multipliers in total: 32 in the filters
(2 rails × 2 paths × 8 taps) and 64 in the rotators. Half of the rotator
multipliers see a constant-zero imaginary input and can be optimised away.

## What is taken from the original design and what is chosen here

**Taken from the original FH design:**

* the two-tier structure, with 8-FSK in an 8-path first tier and a 32-path
  hopper;
* PN-steered channel selectors;
* PN sequences that can be changed at run time;
* hopping on two frequencies at once;
* the 16-path complex engine with 1:8 up-sampling;
* phase rotators in place of the IFFT;
* the circular buffer, state engine, M-path filter, output data buffer with its
  adder, and commutator;
* the partition h_r(n) = h(r+nM);
* the one-tap adaptive DC canceller after the commutator;
* the sine/noise test source;
* the manual channel selector.

**Chosen here, because the original gives no value:**

* all word widths;
* the prototype filter (length, window, cut-off);
* the H_r(z²) tap spacing, and the serial evaluation of one path pair per
  clock (the original FPGA build was fully parallel);
* the clock-enable and take timing;
* the synchronous active-high reset;
* L = 2, `SYM_LEN`, `HOP_LEN`, `FSK_AMP`;
* the LFSR polynomials and seeds;
* the DC canceller's step size;
* the sine frequency and the noise amplitude.

**Departures:**

* **Rotators in both tiers.** The block diagram of the two-tier modulator shows
  IFFTs and standard channelizers in both tiers. Here both tiers use the
  rotator-based, non-maximally decimated engine.
* **Unequal tier rates.** The original asks for tiers with equal channel
  spacing and output rate. In this cascade, tier 1 runs at 1/16 of the tier-2
  output rate.
* **No other modulations.** Baseband modulations other than MFSK, and the
  BFSK shortcut that would skip tier 1, are mentioned in the original but not
  built.
* **No spectrum sniffer or cognitive engine.** These are outside the
  transmitter. Their decisions enter through ports: `demo_ch`, `hop_en`,
  `pn_load/pn_seed`.
* **No output-rate target.** The 500 MHz output bandwidth of the original's
  simulation is not a target of this RTL. It delivers one sample per clock,
  and its multiply-add trees are not pipelined.

## Verification

Each module has a self-checking testbench in `tb/`. The reference models are
independent of the RTL:

* `tb_ref_pkg` computes the channelizer from its defining formula above (a
  direct convolution and mix in floating point), not from the polyphase
  structure.
* The unit testbenches use exact integer models or floating-point models,
  depending on the block.

| testbench | what it shows |
|---|---|
| `tb_nmdfb_channelizer` | Random complex input on one and two channels, with `ce` every 1, 2 or 3 clocks. Every output is checked against the formula within 3 LSB, and the rate and the 4-enable latency are checked. |
| `tb_up_2_to_16` | Sine then noise source, hopped 0 → 5 → 15 → 3 while running. Every output is checked within 6 LSB, and there are no gaps in the output. |
| `tb_mcfh_modulator` | Random 8-FSK symbols with idle gaps, two PN reloads while running, and one or two carriers. Every output is checked within 10 LSB against the cascade of two reference channelizers. Hop timing and hop channels are checked against an LFSR model. |
| `tb_fh_radio_top` | Both parts together at default parameters. It counts each mechanism (all 8 tones, idle symbols, hops, PN reloads, single- and dual-carrier samples, circular-buffer shifts, DC-canceller adaptation, manual hops, sine and noise samples) and fails if any count is zero. |
| `tb_hop_spectrum` | White noise through the 16-path engine, hopped to channels 0, 5 and 15. A windowed DFT finds the band centred on k/16, with 86–90 dB between in-band and far out-of-band power. The check requires more than 50 dB. |
| `tb_fh_spectrum` | A constant FSK symbol, hopped on two frequencies, then on one. At least 95 % of the DFT power must lie at the predicted tones (k/32 + s/128 of the output rate); each tone carries about half of it when two are active. |
| `tb_proto_response` | Impulse response of the 32-path engine on channels 0 and 11. Every sample is checked within 2 LSB against the prototype formula, evaluated here in floating point. The spectrum must be flat to 0.1 dB in the pass band and −6 dB ± 0.5 dB at the band edge. It must be more than 80 dB down in the stop band. |
| unit testbenches | `state_engine`, `channel_selector`, `circular_buffer`, `polyphase_filter` (also checks the prototype's symmetry and unit phase gain), `output_commutator` (including saturation), `dc_canceller`, `sig_generator`, `pn_sequence_generator` (including the 65535 period and the zero-seed guard). |

All of them pass. Each one also fails when a single deliberate fault is placed
in its block.

## Simulating

Verilator 5, from the repository root. The package must come first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/nmdfb_pkg.sv tb/tb_ref_pkg.sv \
    tb/tb_fh_radio_top.sv -y rtl --top-module tb_fh_radio_top
./obj_dir/Vtb_fh_radio_top
```

Replace `tb_fh_radio_top` with any other testbench name. Every testbench
prints `TB_RESULT checks=N failures=F`, and the full-size one runs in well
under a second. To change the number of paths, taps per path or selectors, set
`M`, `K` and `L` on `nmdfb_channelizer` (or `M1`, `N2`, `L`, `K` higher up).
M must be a power of two of at least 4.

## Files

* `rtl/nmdfb_pkg.sv`: types, fixed-point helpers, and the elaboration-time
  sine, twiddle and prototype functions.
* `rtl/state_engine.sv`, `channel_selector.sv`, `circular_buffer.sv`,
  `polyphase_filter.sv`, `output_commutator.sv`: the stages of the
  up-converter.
* `rtl/nmdfb_channelizer.sv`: the complex up-converter.
* `rtl/dc_canceller.sv`, `sig_generator.sv`, `pn_sequence_generator.sv`:
  support blocks.
* `rtl/up_2_to_16.sv`, `mcfh_modulator.sv`, `fh_radio_top.sv`: the assembled
  designs.
* `tb/`: one testbench per module; the spectrum testbenches `tb_hop_spectrum`,
  `tb_fh_spectrum` and `tb_proto_response`; and `tb_ref_pkg.sv`, the shared
  reference models.
