# Low-frequency QPSK transceiver for an FPGA

This design is a complete digital QPSK (quadrature phase-shift keying) link in
synthesizable SystemVerilog. A pseudo-random 50 kb/s bit stream is split into
bit pairs. Each pair becomes one of four carrier phases (45, 135, 225 or 315
degrees) of a 1 MHz carrier, so the symbol rate is 25 kbaud. A receiver then
recovers the bits from the modulated samples. Transmitter and receiver sit on
one chip and share one direct digital synthesizer (DDS), so demodulation is
coherent by construction. The modulated samples are also brought out to a
port, where a DAC could turn them into an analogue signal.

Everything runs on a single 50 MHz sample clock with clock enables. At the
default parameters the received bit stream equals the transmitted one,
delayed by exactly 5816 clocks (about 5.8 bit periods).

## Signal chain

```
TRANSMITTER
  random_data_gen ──► demux_s2p ──► unipolar_to_bipolar ──┬─► pulse_shaping_filter I ──► multiplier × cos ──┐
   (bit_en)           even→I, odd→Q                       └─► pulse_shaping_filter Q ──► multiplier × sin ──┴─► iq_sum ──► mod_out
                                                               (os_en)                    ▲ cos, sin            I·cos − Q·sin   │
                                                                                          dds ──────────┐                       │
RECEIVER                                                                                                │ same carriers         │
  band_pass_filter ◄──────────────────────────────────────────────────────────────────────────────────────────────────────────┘
        ├─► multiplier × cos ──► low_pass_filter ──► decision_circuit I ──┐
        └─► multiplier × sin ──► low_pass_filter ──► decision_circuit Q ──┴─► p2s_mux ──► down_sampler ──► rx_data
                                                      ▲ dec_en                ▲ sel         │
                                                      └───────────────────────┴─────────────┘ (timed from the transmitter's sym_en)
rate_gen supplies bit_en, sym_en and os_en.
```

`qpsk_transmitter` holds the upper row and the DDS. `qpsk_receiver` holds the
band-pass filter, the mixers, the low-pass filters, the decision circuits,
`p2s_mux` and `down_sampler`. `sdr_transceiver` is the top: it wires the
rate generator, the transmitter and the receiver, and feeds the transmitter
output straight into the receiver.

## Rates and clock enables

| quantity | value | clocks at 50 MHz |
|---|---|---|
| serial data rate (`bit_en`) | 50 kb/s | 1000 per bit |
| symbol rate (`sym_en`) | 25 kbaud | 2000 per symbol (`SPS`) |
| pulse-shaper sample rate (`os_en`) | 8 per symbol, 200 kHz | 250 |
| carrier | 1 MHz | 50 per period |

`rate_gen` counts 0 … SPS−1. It pulses `sym_en` and `bit_en` at count 0,
`bit_en` again at SPS/2, and `os_en` every SPS/OS counts. The bit source and
the demultiplexer advance on `bit_en`. The pulse shapers advance on `os_en`.
The DDS, the mixers and all filters after the shapers run on every clock.

## Transmitter

* **Bit source** (`random_data_gen`): a 32-bit Fibonacci LFSR with polynomial
  x³² + x²² + x² + x + 1. It shifts once per `bit_en`, and the output is the
  register's top bit.
* **Demultiplexer** (`demux_s2p`): the first bit of each pair (the even bit)
  becomes I, the second (odd) bit becomes Q.
* **Unipolar to bipolar**: bit 1 maps to +8192 and bit 0 to −8192.
* **Pulse shaping** (`pulse_shaping_filter`, built on the generic
  `fir_filter`): a raised-cosine interpolator with roll-off 0.5, a span of 4
  symbols and 8 samples per symbol (33 taps). Each symbol level is injected as
  a single impulse at the next shaper sample, and the other seven samples of
  the symbol are zero. The centre tap is exactly 1.0 (Q1.14), so at each
  symbol's peak the output equals the symbol level and the neighbouring
  symbols add nothing. The taps are computed during elaboration from
  h(t) = sinc(t)·cos(πβt)/(1 − (2βt)²). Between shaper samples the output is
  held, so the mixers see a staircase at 200 kHz.
* **DDS** (`dds`): a 32-bit phase accumulator with tuning word
  round(2³²·1 MHz / 50 MHz). It addresses a 1024-entry sine table of
  amplitude 16383, computed during elaboration. The cosine reads the same
  table a quarter period ahead.
* **Multipliers and summer**: `multiplier` computes (a·b) >>> 14, saturated
  and registered. `iq_sum` forms S = I·cos − Q·sin, saturated and registered.
  With these levels S peaks near 15 000 and never saturates.

## Receiver, and why one DDS is enough

The receiver multiplies the received signal by the same cosine and sine it
was modulated with. This only works if the carrier phase at the receive
mixers equals the phase that the signal left the DDS with. The mixer sees
the DDS value of the current clock. The signal, though, has passed through:

* the transmit multiplier (1 clock);
* the summer (1);
* the band-pass filter's register (1);
* the band-pass filter's group delay (47).

That adds up to 50 clocks, exactly one carrier period. This is why the
band-pass filter has 95 taps. If you change its length, the clock rate or the
carrier, keep this sum a whole number of carrier periods. Otherwise the
branches rotate into each other; a carrier-phase offset (delaying the
carriers) would then be needed.

* **Band-pass filter** (`band_pass_filter`): a Hann-windowed cosine FIR centred
  on 1 MHz, normalised to unity gain there. It rejects DC and the shaper's
  200 kHz-spaced staircase images well away from the carrier.
* **Mixers**: S·cos = I/2 + (2 MHz terms) and S·sin = −Q/2 + (2 MHz terms).
  That is why the Q decision circuit is built with `INVERT = 1`.
* **Low-pass filters** (`low_pass_filter`): a 25-tap moving average, kept as a
  running sum. Its nulls fall on every multiple of 50 MHz / 25 = 2 MHz, so the
  double-carrier product cancels exactly. The output is the sum >>> 4, a DC
  gain of 25/16. The nominal level at a symbol centre is therefore
  8192/2·25/16 = 6400.
* **Decision circuits** (`decision_circuit`): sign slicers that decide once
  per symbol, when `dec_en` is high, and hold the result.
* **Multiplexer** (`p2s_mux`): passes the held I decision during the first
  half of the following symbol and the Q decision during the second half.
* **Down-sampler** (`down_sampler`): takes the multiplexer output once per bit,
  a quarter symbol into each half. It yields `rx_data` with a one-clock
  `rx_data_valid` at 50 kb/s, I bit first.

## Receiver timing: the fixed delay

There is no timing recovery. The down-sampler takes its symbol phase from the
transmitter's `sym_en`, shifted by a constant `ALIGN`. `ALIGN` is the number
of clocks from a `sym_en` to the moment that symbol's pulse peak reaches the
low-pass filter outputs. `sdr_transceiver` derives it from the pipeline:

| step | clocks after `sym_en` |
|---|---|
| second bit of the pair on `data` | SPS/2 + 1 |
| level in the shaper, waiting for the next `os_en` | enters at SPS/2 + SPS/OS |
| shaper peak (centre tap, 16 shaper samples later, plus its register) | + SPS·SPAN/2 + 1 |
| transmit multiplier, summer | + 2 |
| band-pass filter (register + group delay) | + 48 |
| receive multiplier | + 1 |
| low-pass filter (two registers + group delay 12) | + 14 |
| **ALIGN** at the defaults | 1000 + 250 + 4000 + 1 + 65 = **5316** |

The down-sampler's counter is `ph = (t − ALIGN) mod SPS`, where t counts from
`sym_en`. The rest of the timing follows from it:

* At `ph = 0` it raises `dec_en`, so both branches are decided at the symbol
  centre.
* `sel` is low while `ph < SPS/2`, and the multiplexer passes I.
* The bits are captured at `ph = SPS/4` (I) and `ph = 3·SPS/4` (Q).
* From a bit's `tx_data_valid` to its `rx_data_valid` is therefore
  ALIGN + SPS/4 = **5816 clocks**.

The counter locks on the first `sym_en` after reset. The first five
`rx_data_valid` pulses come before any symbol has crossed the link and carry
no data.

The `ALIGN` formula in the top holds for the default shaper span (4), the
default filter lengths, and an even OS with SPS/OS > 4. Changing `BIT_HZ` or `OS`
is covered by the formula. Changing a filter length means updating the
constant `DATAPATH` term.

Deciding at the centre matters. The shaper output is held for 250 clocks, so
the waveform at the receiver is skewed by up to an eighth of a symbol. If you
sample a quarter symbol off-centre, the eye closes to about a fifth of its
nominal height. At the centre, the end-to-end test measures about 83% of
the nominal 6400.

## Number formats

* Every datapath signal is `sdr_pkg::sample_t`, a 16-bit signed value.
* Carriers and filter taps are Q1.14, where 1.0 = 16384. Products are
  brought back to sample scale with `>>> 14`, which rounds towards −∞.
* `sdr_pkg::sat` saturates wide intermediate values to 16 bits.
* All state is cleared by a synchronous, active-high `rst`.

## What follows the original description and what is this design's choice

These parts follow the published design:

* The block structure of transmitter and receiver.
* The 50 kb/s random data, the serial-to-parallel demux and the
  unipolar-to-bipolar conversion.
* Raised-cosine pulse shaping.
* A DDS with sine and cosine carriers at 1 MHz.
* The modulator equation S = I·cos − Q·sin.
* A band-pass filter at the receiver input, multipliers, FIR low-pass filters
  with a fixed delay, decision circuits, a multiplexer and a down-sampler.
* Coherent demodulation from the same DDS.
* Received data equal to transmitted data after a fixed delay.

These are this design's own choices:

* The 50 MHz clock.
* The 16-bit widths and Q1.14 scaling.
* The LFSR polynomial and seed.
* The even-bit-to-I mapping and the polarity (1 → +A).
* The shaper's oversampling, span and roll-off.
* The DDS accumulator and table sizes.
* The band-pass design and its length.
* The moving-average form and length of the low-pass filter.
* Deciding once per symbol at the centre.
* Deriving the receiver timing from the transmitter's strobe.

Departures and omissions:

* **Carrier synchronization** is not built. The original receiver diagram has
  a carrier-synchronisation block but describes nothing of it. This design
  uses the shared DDS instead, as the original transceiver block diagram
  does. A receiver on a separate clock or board would need carrier and symbol
  timing recovery, which this design does not have.
* **DAC interface** is not built. The original board drove an external DAC
  over a serial interface, but its protocol is not described. `mod_out`
  carries the 16-bit samples a DAC would take.
* **Carrier representation.** The original hardware waveforms show one-bit
  (square) carrier and modulated nets. This design uses 16-bit sampled
  sinusoids throughout.
* **Pulse shaping.** The original text says in one place that the DDS
  "helps" pulse shaping. Here, as in its block diagram, pulse shaping is a
  separate filter and the DDS only produces carriers.
* **Band-pass filter.** It appears in the original receiver diagram but not
  in its transceiver block diagram. It is included here.

## Files

`rtl/` holds one module or package per file:

| file | role |
|---|---|
| `sdr_pkg.sv` | widths, default rates, `sample_t`, symbol structs, `sat()` |
| `sdr_transceiver.sv` | top: rate generator, transmitter, receiver, `ALIGN` |
| `qpsk_transmitter.sv`, `qpsk_receiver.sv` | the two units |
| `rate_gen.sv` | bit, symbol and shaper-sample enables |
| `random_data_gen.sv`, `demux_s2p.sv`, `unipolar_to_bipolar.sv` | bit source and symbol mapping |
| `pulse_shaping_filter.sv`, `fir_filter.sv` | raised-cosine shaper on a generic FIR |
| `dds.sv`, `multiplier.sv`, `iq_sum.sv` | carrier generation and modulation |
| `band_pass_filter.sv`, `low_pass_filter.sv` | receive filters |
| `decision_circuit.sv`, `p2s_mux.sv`, `down_sampler.sv` | bit recovery |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sdr_pkg.sv tb/tb_sdr_transceiver.sv \
          --top-module tb_sdr_transceiver -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. The end-to-end test
`tb_sdr_transceiver` runs the top at its default parameters: 120 bits,
about 126 000 clocks, under a second. It checks:

* every received bit against the transmitted one, at the fixed 5816-clock
  delay;
* the bit, symbol and carrier periods;
* that all four constellation points were sent;
* that every kind of phase change between symbols occurred (0°, ±90°, 180°);
* that the modulated signal never saturates;
* the eye opening at each decision instant.

`tb_sdr_transceiver_rates` runs two more copies of the top, at 25 kb/s and
100 kb/s. It checks that the `ALIGN` formula still gives the right fixed
delay and error-free reception when only `BIT_HZ` changes.

The unit testbenches compare against independent models:

* the LFSR recurrence;
* the raised-cosine formula and zero inter-symbol interference;
* sine and cosine of the accumulator phase;
* exact FIR sums, tone rejection and group delay;
* bit-exact products;
* a receiver fed with a QPSK signal generated in the testbench.

## How far it has been checked

Every module passes its testbench under Verilator, and every file is accepted
by Verilator's lint and by the slang front end of Yosys. The link has only
been checked noiseless, in a digital loopback. The design has not been run
on an FPGA, and no DAC, channel, noise or frequency offset has been
simulated.
