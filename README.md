# COFDM baseband processor, 12 Mb/s, two clock domains

This is a transmitter and a receiver for coded OFDM in the style of IEEE
802.11a at its 12 Mb/s rate: a rate-1/2 convolutional code, QPSK on 48 data
sub-carriers, 4 BPSK pilots, a 64-point FFT and a 16-sample cyclic prefix.
One OFDM symbol carries 48 bits and lasts 4 µs.

The main idea is the clocking. Bits and QPSK symbols move at 12 MHz, one
per clock. OFDM samples move at 20 MHz, one per clock. Each side of the
link therefore runs two clock domains joined by asynchronous FIFOs. A
single domain would need 60 MHz, the least common multiple, with clock
enables. That would burn more power.

The receiver contains the harder algorithms:
- packet detection with a delayed auto-correlator
- symbol timing with a cross-correlator on the long training symbol
- carrier phase correction from the four pilots, using CORDIC arctangents
  and a linear fit across frequency
- channel estimation from the long training symbol, with one complex
  division per sub-carrier
- a Viterbi decoder that decodes one bit per clock

All RTL is SystemVerilog-2017. It is synthesizable apart from assertions.
It shares one package, `rtl/cofdm_pkg.sv`. The package computes every
table at elaboration time from its definition: training sequences,
twiddles, arctangent constants and the pilot plan.

## Top level: `cofdm_top`

`cofdm_top` places the transmitter (`cofdm_tx`) and the receiver
(`cofdm_rx`) side by side. They are not connected: the transmitter's
samples would go to a DAC and the receiver's come from an ADC. Both
converters and the 2.4 GHz radio are outside this design.

| port | domain | meaning |
|---|---|---|
| `clk12`, `clk20`, `rst_n` | – | the two clocks; asynchronous active-low reset, synchronised into each domain |
| `bit_in`, `enable` | 12 MHz | input bit and its strobe |
| `tx_ready` | 12 MHz | high while the TX FIFO can take another 48-bit frame |
| `tx_pkt_syms[15:0]` | 20 MHz | data symbols per transmitted packet |
| `tx_valid`, `tx_sample` | 20 MHz | transmitted samples (`cplx_t`: 16-bit I and Q) |
| `tx_busy`, `tx_underflow` | 20 MHz | a packet is in progress; the modulator found the FIFO empty |
| `rx_valid`, `rx_sample` | 20 MHz | received samples |
| `rx_pkt_syms[15:0]` | 20 MHz | data symbols per received packet (no signalling field is sent) |
| `rx_sync` | 20 MHz | pulse when the time synchroniser starts demodulating a packet |
| `rx_fifo_overflow` | 20 MHz | sticky: the RX FIFO overflowed |
| `bit_out`, `out_ce` | 12 MHz | decoded bit and its strobe |

Sample format: 16-bit two's complement. A QPSK point is ±5793
(√2/2 in Q13). The transmitter's IFFT scales by 1/64, so the time samples
are small, about ±1000. The receiver expects the same scale, with gain
within a few dB.

A packet is:
1. 160 samples of short training sequence (10 × 16)
2. 160 samples of long training sequence (a 32-sample guard, then 2 × 64)
3. `pkt_syms` data symbols of 80 samples each

## Transmitter (`cofdm_tx`)

- **Channel coder (`channel_coder`)**, 12 MHz:
  - `conv_encoder` is the K = 7 encoder with generators 133 and 171 (octal).
  - `interleaver` applies the 802.11a first permutation for 96 coded bits,
    i(k) = 6·(k mod 16) + ⌊k/16⌋. It has two RAM banks, so one symbol is
    written while the previous one is read.
  - `qpsk_mapper` maps each bit pair to ±5793 ± j5793.
  - Each 48-bit frame ends in six zero bits, which return the encoder to
    state 0, so the decoder can trace back from state 0. A frame thus
    carries 42 free bits.
- **TX FIFO (`async_fifo`)**: 256 QPSK symbols from 12 to 20 MHz. Pointers
  are Gray-coded with two-flop synchronisers.
- **Packet control** (in `cofdm_tx`), 20 MHz: a packet starts once the
  FIFO holds a whole symbol. `preamble_rom` plays the 320 training samples.
  The modulator is started so that its first sample follows the last
  preamble sample with no gap.
- **Modulator (`modulator`)**:
  - One 80-cycle slot per symbol. Sub-carriers −32..31 are walked in order.
    Data sub-carriers take a FIFO entry. The pilots at ±7 and ±21 get
    ±8192 times the 802.11a polarity sequence (x⁷ + x⁴ + 1, seeded with
    ones, one step per symbol). All other sub-carriers are zero.
  - `fft64` with `INVERSE = 1` does the IFFT.
  - `reorder_cp` undoes the FFT's bit-reversed output order and plays the
    last 16 samples first as the cyclic prefix.
  - Because the IFFT input is in −32..31 order rather than 0..63, every
    odd output sample has the wrong sign; `reorder_cp` negates them.

## FFT (`fft64`)

A radix-2² single-path delay-feedback pipeline. It has three butterfly
pairs with feedback delays 32/16, 8/4 and 2/1. The only factor inside a
pair is the trivial −j. Between the pairs sit two full complex
multipliers, with twiddles in Q14 computed in the package.

The pipeline advances only when a sample is valid. A frame's results
leave while the next frame enters, 71 advances after its first sample.
After the last frame, two zero frames flush the pipeline.

`SCALE_MASK` chooses which butterflies halve their output:
- The transmitter halves at all six, giving 1/64.
- The receiver halves at the first two only, giving 1/4, to keep
  resolution for the small received samples.

The same module serves both directions.

## Receiver timing: detection and synchronisation

This part decides whether a packet is ever received. It is split into
three modules.

**`short_preamble_corr`** uses the 16-sample period of the short
sequence. Two sliding 16-sample sums are built as integrator-comb
sections:
- the energy P[n] = Σ|r|²
- the delayed correlation S[n] = Σ r[n]·r*[n−16]

A packet is detected while both hold:
- |S|² ≥ (7/8)·P². In hardware this is P² − (P² >> 3), with
  `TSHIFT = 3`.
- P exceeds an energy floor, `PMIN`, so that silence does not detect.

Samples are cut to 12 bits first to keep the squares small.

**`long_preamble_corr`** correlates sign bits only. It keeps the signs of
the last 32 input samples and multiplies them by the conjugate signs of
the first 32 long-training samples, a multiplier-free ±1 reference. The
magnitude is taken as |Re| + |Im|. It peaks at 64 when the last input
sample is the 32nd training sample.

**`time_sync`** ties the two together:
1. The short detector must hold for `DET_RUN = 8` consecutive samples.
2. That arms the cross-correlator. The first value above `THR_L = 44` that
   is not smaller than its successor is the peak. The peak is the 32nd
   sample of the first long training symbol.
3. From the peak, every later sample position is known. The demodulator's
   first 80-sample window is started `EARLY = 2` samples ahead of the exact
   position. That window is the 16 samples before the second long symbol,
   then the symbol itself.

Starting a little early keeps a late peak or a channel echo out of the FFT
window. The resulting linear phase across frequency is the same in the
training symbol and the data, so channel estimation removes it.

If no peak arrives within `TIMEOUT = 400` samples, the search restarts. A
new search begins as soon as the demodulator has taken its last data
window, while it is still flushing the FFT, so back-to-back packets are
caught.

**`demodulator`** cuts the stream into 80-sample windows and drops each
cyclic prefix. It feeds 64 samples per window to the FFT. Window 0 is the
long training symbol; windows 1..`pkt_syms` are data. A bit-reversal buffer
returns each symbol's bins in natural order.

## Phase correction (`phase_corrector`)

This is the least obvious block, and the place where this design goes
furthest beyond a plain reading of the method.

**Measuring.** Each symbol's 64 bins are written into one of two RAMs. At
the same time a vectoring `cordic` measures the arctangent of every bin.
Twelve cycles later, the CORDIC latency, the phases of the pilot bins 7, 21,
43 and 57 (sub-carriers 7, 21, −21, −7) are taken.

An arctangent of I/Q only knows the phase modulo π. On top of that, the
pilots carry a ±1 polarity. So the raw pilot phases cannot be used directly.
This design therefore keeps, for each pilot, a register Rp that holds its
phase *relative to the long training symbol*:
- The training symbol clears Rp to 0.
- Each data symbol adds the change of the arctangent since the previous
  symbol, folded into (−π/2, π/2].

This has three effects:
- The polarity flips disappear, since they are multiples of π.
- A slow drift can build up past ±90° without a sign slip.
- The training symbol's correction is zero, so the channel estimate and
  all data symbols share one phase reference.

The limit: the phase may change by less than 90° between two consecutive
symbols.

Phases use 16 bits with π = 2¹⁵, so all differences wrap modulo 2π for free.

**Fitting.** The four pilot points (7, Rp₁), (21, Rp₂), (43, Rp₃) and
(57, Rp₄) define three line segments. For each segment the block computes
a slope m = ΔRp/Δk, with 10 fraction bits, and an intercept b.

**Correcting.** Eight cycles after the last pilot phase is known, the
stored symbol is read back in sub-carrier order −32..31, while the next
symbol is written into the other RAM. For each bin, the evaluator takes
b + m·k of the segment that contains the bin. Below bin 7 it holds Rp₁;
above bin 57 it holds Rp₄.

A rotation-mode CORDIC then turns the bin by minus that phase. The CORDIC
covers the whole circle: for |angle| > π/2 it pre-rotates by π. Its gain of
about 1.647 is not removed here; channel estimation divides it out.

Latency from a symbol's last input bin to its first output is 22 cycles.

## Channel estimation and equalisation

**`channel_est`** stores the phase-corrected long training symbol L_r[k] in
a 64-word RAM. For each data bin it computes

  y[k] · L_t[k] / L_r[k] = y[k] · conj(L_r[k]) · L_t[k] / |L_r[k]|²

L_t is the known ±1 training value, held in a small ROM. The quotient is
in Q13, so a clean QPSK point comes back as ±5793. A bin with L_r = 0
gives 0. The block has three pipeline registers.

The division removes at once:
- the channel's gain and phase per sub-carrier
- the CORDIC gain
- the linear phase caused by the early FFT window

**`channel_equalizer`** chains `phase_corrector` and `channel_est`. It
passes on only the 48 data sub-carriers of data symbols. These cross to
12 MHz through a 128-entry FIFO in `cofdm_rx`.

## Channel decoder (`channel_decoder`)

**`qpsk_demapper`** gives hard decisions: the sign of I, then the sign of Q.

**`interleaver`** with `INVERSE = 1` is the de-interleaver.

**`viterbi_decoder`**:
- 32 add-compare-select butterflies update all 64 states in one clock, so
  the decoder takes one coded pair and delivers one bit per clock.
- Path metrics are 8 bits and restart at each 48-bit frame. Within a
  frame they cannot overflow, so no normalisation is needed.
- Survivors are stored per frame. They are traced back from state 0,
  which the six-zero tail guarantees.
- Survivor and output memories are double-buffered, so the traceback of
  one frame overlaps the reception of the next.
- A frame's first bit leaves 50 clocks after its last input pair.

## Departures from the described processor

- **Phase reference.** Pilot phases are tracked relative to the training
  symbol, with mod-π steps (see above). The described method uses each
  symbol's raw arctangent, with a choice between θ and θ − π. That choice
  is ambiguous under pilot polarity and drift.
- **Packet length.** The number of data symbols per packet is an input on
  both sides, because no signalling field is sent.
- **Detection extras.** The detector adds an energy floor and a run-length
  condition. The demodulator window starts 2 samples early.
- **Quantisation.** The FFT scaling (1/64 on transmit, 1/4 on receive),
  the Q13/Q14 formats and the 12-bit cut in the auto-correlator are
  choices of this design.
- **No RF side.** The radio front end, the converters and the lab test
  equipment (test pattern ROM, serial links, logic analyser interface) are
  not included. The testbench generates the test pattern instead.

## Simulating

Each block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/cofdm_pkg.sv \
    tb/tb_cofdm_top.sv --top-module tb_cofdm_top -Mdir obj_top -o sim
./obj_top/sim
```

Use the same command for any other testbench, for example
`tb/tb_viterbi_decoder.sv` with `--top-module tb_viterbi_decoder`.

**`tb_cofdm_top`** runs the whole design at its default sizes. It sends
two back-to-back packets of 256 data symbols each (24,576 bits). This is
the largest size simulated.

The samples go through a model channel:
- gain 0.8 and phase 0.7 rad
- a carrier phase drift of 2·10⁻⁵ rad per sample (about 0.42 rad over a
  packet)
- an echo of 0.2 at 3 samples
- uniform noise
- a burst of strong noise, which forces bit errors that the Viterbi
  decoder must correct

The testbench checks every decoded bit. It also counts that each mechanism
happened:
- detection, peak and start
- modulator and demodulator flushes
- nonzero phase corrections
- FIFO back-pressure
- corrected hard-decision errors

It takes well under a second. The first input bit reaches the output after
about 50.5 µs.

**`tb_cofdm_sine`** is the processor's demonstration workload. One period
of a 12-bit sine, 256 samples, is sent as one 256-symbol packet, one sample
per 48-bit frame. At 12 Mb/s that is a 976.5625 Hz tone. The testbench
checks that every sample comes back exactly. It also checks that the
first-bit latency stays at or below 77 µs; the simulated latency is
50.5 µs.

**Other testbenches** check the blocks against models written
independently in the testbench: a direct DFT for `fft64`, bit-exact
correlator sums, a reference encoder, a floating-point channel division,
and so on. `tb_cofdm_tx` checks every data symbol of a packet by DFT.
`tb_cofdm_rx` feeds the real transmitter's output through a distorted
channel.

## Files

- `rtl/` holds one module or package per file, named after the module.
- `rst_sync` is a two-flop reset synchroniser.
- `tb/` holds `tb_<module>.sv` for each module.
