# One shared 8-point FFT for a 2x2 MIMO-OFDM transmitter

A MIMO-OFDM transmitter needs one inverse FFT per antenna, and every extra
transform costs area and power. This design keeps a single, small, fully
pipelined 8-point radix-2 FFT and lets both antenna streams take turns on it:
each stream collects a symbol in its own input buffer, a multiplexer hands
whole symbols to the FFT one after the other, and a demultiplexer drops each
result into that stream's output buffer. The FFT itself is built from nothing
but registered adders and subtractors (twelve of each, in three stages), with
constant twiddle rotations between the stages, and it accepts a new set of
eight samples every clock cycle. A streaming two-path delay-commutator form of
the same transform can be selected instead.

In front of the transform sit a 256-QAM mapper and a parser that deals the
modulated points to the two antennas; behind it, each antenna's output buffer
is read one sample at a time. The channel coder before the mapper and the
cyclic-extension / rate-conversion stage after the output buffers are not part
of this RTL: the top's `bits_*` input and `a_*`/`b_*` outputs are where they
connect.

```
 bits --> qam256_mapper --> stream_parser --+--> RAM1a --+           +--> RAM2a --> a_*
 (8 b/symbol)  256-QAM       antenna 0,1,.. |            |  MUX      |
                                            +--> RAM1b --+--> fft8 --+--> RAM2b --> b_*
                                                              (DEMUX)
                            \______________ fft_stage _______________/
```

## The butterfly network (`fft8`)

The transform is decimation in frequency, drawn out flat so that all eight
inputs and all eight outputs are present in the same cycle:

| stage | units | pairs | after the stage |
|---|---|---|---|
| 1 | adders A1-A4, subtractors S1-S4 | x[n] with x[n+4], n = 0..3 | difference n rotated by W8^n |
| 2 | adders A5-A8, subtractors S5-S8 | samples 2 apart inside each half | odd differences rotated by -j |
| 3 | adders A9-A12, subtractors S9-S12 | neighbours | - |

Here W8 = exp(-j 2 pi / 8). Each adder and subtractor (`bf_adder`,
`bf_subtractor`) adds or subtracts two complex samples and registers the
result, so every stage is one pipeline register and the latency is exactly
three cycles; `out_valid` is `in_valid` delayed by three.

Twiddles are constants, one `twiddle_mul` instance per position:

* W8^0: pass through;
* W8^2 = -j: swap real and imaginary parts and negate one (no arithmetic);
* W8^1 and W8^3: the sum and difference of the two parts scaled by 1/sqrt(2),
  done as a shift-and-add multiply by 181/256 (181 = 128+32+16+4+1) and
  rounded to the nearest integer, half up.

The network naturally leaves bin k at position bitrev(k) (position 1 holds
bin 4, position 3 holds bin 6, and so on). Because all eight bins exist at
once, the reorder is wiring only, and `X[k]` is bin k in natural order.

### Numbers

Inputs are 8-bit two's complement per part, outputs 15-bit. Every unit works
at 15 bits internally: eight 8-bit samples sum to at most 11 bits plus the
sqrt(2) growth of a rotation, so nothing can overflow or wrap, and no scaling
is applied between stages. The forward transform is therefore the plain,
unscaled X[k] = sum_n x[n] exp(-j 2 pi n k / 8).

Bins 0, 2, 4 and 6 never pass through an irrational twiddle and are exact.
Bins 1, 3, 5 and 7 carry the rounding of the W8^1/W8^3 rotations and can
differ from the exact DFT by about one unit (the testbenches allow 1.5).

## The delay-commutator core (`mdc_fft8`)

The same eight-point dataflow can also be laid out as a streaming pipeline
with two paths, and `fft_stage`/the top select it with `FFT_ARCH = 1`.
Samples enter one per cycle, x[0] first, and bins leave two per cycle as
the pairs (X[k], X[k+4]) for k = 0, 2, 1, 3.

```
x --+-- 4D --[BF I ]--------------- SW --2D--[BF II ]-------------- SW --D--[BF III]--> X(k)
    +-------[      ]-- *W8^n --2D-- SW ------[      ]-- *1/-j --D-- SW -----[      ]--> X(k+4)
```

* The first four samples of a symbol go into the 4-deep upper delay line;
  as samples 4..7 arrive on the lower path, Butterfly I pairs x[n] with
  x[n+4]. Its difference output is rotated by W8^n.
* In front of Butterfly II the lower path is delayed by two, a switch swaps
  the paths for the second pair of each group of four, and the upper path is
  delayed by two after the switch. The butterfly then sees (u0,u2), (u1,u3),
  (v0,v2), (v1,v3) on consecutive cycles. Odd differences are rotated by -j.
* Butterfly III has the same arrangement with single delays and pairs
  neighbours.

All delay lines shift every cycle. A valid token and a pair index travel with
the data and decide when the switches cross and which twiddle applies, so
idle cycles between symbols are fine; the eight samples of one symbol must be
consecutive (an assertion checks this). Each butterfly registers its outputs:
the first pair appears 3 cycles after the last sample, the fourth 6 cycles
after it. The arithmetic and rounding are those of `fft8`, so both cores give
identical bins.

Inside `fft_stage` with this core, the MUX reads a full input buffer out
serially over eight cycles and frees it after the last sample, the next
symbol can follow immediately, and the DEMUX writes bin pairs into the output
buffer as they emerge; a two-entry tag queue records which stream each symbol
in the core belongs to. The last-sample-to-first-bin latency of the stage
becomes 16 cycles (18 through the top), and a second stream whose symbol
completes at the same time waits while the first streams through.

The parallel core (default) is the one the published design reports as
implemented and measured; the delay-commutator core follows its block diagram
of the same transform.

## Sharing the transform (`fft_stage`)

Each antenna owns one input buffer (RAM1a, RAM1b) and one output buffer
(RAM2a, RAM2b), each one 8-sample symbol deep.

1. Samples arrive one per handshake on `s_*`, tagged with their antenna in
   `s_ant`; they fill that antenna's input buffer. `s_ready` reports whether
   the addressed buffer has room.
2. A stream may issue when its input buffer is full and its output buffer is
   free (empty and not already claimed by a symbol inside the FFT). Issuing
   sends all eight samples through the MUX to the FFT in one cycle, empties
   the input buffer, and claims the output buffer.
3. The stream tag travels in a 3-deep shift register beside the FFT pipeline;
   when the bins emerge, the DEMUX writes all eight into the tagged stream's
   output buffer at once.
4. Each output buffer is read one bin per handshake in bin order, `*_last`
   marking bin 7. Reading bin 7 frees the buffer.

If both streams could issue in the same cycle, the one that did not issue last
wins (round robin). `stall` is high while some full input buffer waits for its
output buffer to drain; during that time its `s_ready` is low and the
back-pressure reaches the parser, the mapper and finally `bits_ready`.

Latency with empty buffers and the default parallel core: last sample of a
symbol accepted -> first bin valid is 5 cycles (issue, three FFT stages,
output-buffer write). Through the whole top, last input byte -> first output
sample is 7 cycles. (With `FFT_ARCH = 1`, see above.)

### Inverse transform

With `inverse` high, the stage swaps the real and imaginary parts of every
sample on the way into the FFT and of every bin on the way out. Since
swap(FFT(swap(x))) equals the inverse DFT without the 1/N factor, the same
core delivers x[n] = sum_k X[k] exp(+j 2 pi n k / 8), unscaled. A transmitter
runs with `inverse = 1`; a receiver would use 0. Change `inverse` only while
the stage is empty: it is applied both when a symbol enters the FFT and when
its bins are written out.

## Front end

`qam256_mapper` turns each byte into one 256-QAM point: the upper nibble
gives the in-phase level and the lower nibble the quadrature level. Each
nibble is a Gray code (bit 3 first); its binary index i gives the level
2i - 15, so points are the odd integers -15..15 on each axis and neighbours
differ in one bit. The levels are left unnormalised so they fit the FFT's
8-bit inputs directly. The mapper has one output register (one-cycle latency,
one symbol per cycle).

`stream_parser` deals the points to antenna 0, 1, 0, 1, ... . It counts only
accepted symbols, so when the target antenna's buffer is full the parser
waits rather than skipping ahead, and symbol 2m on antenna 0 stays aligned
with symbol 2m+1 on antenna 1. Like the mapper it has one output register
(one-cycle latency, one symbol per cycle).

## Interfaces and timing

All modules use one clock `clk` and a synchronous active-low reset `rst_n`.
Streams use valid/ready: a transfer happens on a rising edge where both are
high. Shared types live in `fft_pkg`:

* `cin_t`: `{re, im}`, 8 bits each, signed;
* `cout_t`: `{re, im}`, 15 bits each, signed.

Top-level parameter: `FFT_ARCH` (0 parallel core, default; 1 delay-commutator
core). Top-level ports of `mimo_ofdm_fft_tx`:

| port | dir | width | meaning |
|---|---|---|---|
| `inverse` | in | 1 | 1 inverse DFT (transmit), 0 forward DFT |
| `bits_valid`, `bits_ready`, `bits` | in/out/in | 1/1/8 | coded bits, one byte per 256-QAM symbol |
| `a_valid`, `a_ready`, `a_data`, `a_last` | out/in/out/out | 1/1/30/1 | antenna a samples, 8 per symbol |
| `b_valid`, `b_ready`, `b_data`, `b_last` | out/in/out/out | 1/1/30/1 | antenna b samples |
| `stall` | out | 1 | a full input buffer is waiting |

With both outputs read at full speed and `FFT_ARCH = 0`, the path takes one
byte per cycle: one symbol pair (one 8-point transform per antenna) every 16
cycles. With `FFT_ARCH = 1` a symbol pair takes 31 cycles, because each
one-symbol output buffer waits out the longer latency of that core. The
parallel FFT core alone could accept one transform per cycle.

## How far this follows the published design, and where it departs

Taken from the published design: the 8-point size; the 8-bit input and 15-bit
output widths; three pipelined stages of four adders and four subtractors
named A1-A12 and S1-S12; the radix-2 Cooley-Tukey dataflow; 256-QAM; a parser
feeding two input RAMs, a MUX, one FFT, a DEMUX and two output RAMs; one
transform shared by two antenna streams.

Choices of this design, where the source is silent:

* complex ports (the published block shows one word per port);
* the twiddle multipliers: the source mentions a "flexible" multiplier but
  shows no multiplier between its adder stages; constant shift-add
  rotations with the rounding above are used;
* natural output order;
* one register per adder/subtractor (the source only says they are
  pipelined);
* signed arithmetic, no inter-stage scaling;
* the QAM bit labelling, the parser's alternating rule, buffer depths,
  round-robin arbitration, the swap-based inverse transform;
* a single clock with valid/ready handshakes. The source's block diagram uses
  three clocks (40 MHz coder, 100 MHz FFT, 20 MHz output); here rate
  differences are absorbed by back-pressure, and any clock-domain crossing is
  left to the integrator.

Not built: the convolutional encoder/puncturer/interleaver in front of the
mapper, the RAM3/ROM/MUX stage after the output buffers, the LDPC check-node
unit that also uses an FFT/IFFT pair, and the Alamouti space-time encoder the
source mentions. Butterflies with feedback delay lines (single-path
feedback style), which the source also draws, are not used: its text states
that the chosen architecture has no feedback.

The source describes the transmitter as four pipeline stages: store (the
coder), parse (here the mapper and the parser), FFT (here `fft_stage`) and
post. The first and last are outside this RTL.

Sizing checks against the source's numbers: an OFDM symbol must be
transformed within 4 us; at the 100 MHz FFT clock that is 400 cycles, while
this stage needs two issue cycles plus three of latency for both antennas.
The top coder rate of 108 Mbit/s is 13.5 M bytes/s at 8 bits per 256-QAM
symbol, well below the one byte per cycle the input accepts.

Sustained rate at the block diagram's figures (100 MHz clock, 20 M symbols/s
into each stream, each antenna output read at 20 M samples/s, so one
8-sample OFDM symbol per 40 cycles per antenna), measured by
`tb_sustained_rate` over 2 x 200 symbols:

* `FFT_ARCH = 0` keeps up: 40 cycles per symbol, never more than 2 cycles
  behind the input schedule.
* `FFT_ARCH = 1` does **not** keep up: it manages 55 cycles per symbol, about
  14.5 M samples/s per antenna. Each output buffer holds a single symbol, so
  after the last sample is read the antenna waits the 16-cycle latency of the
  delay-commutator path for the next result. To reach the full rate, the
  output buffer would have to be double-buffered.

## Verification

Every module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_bf_adder`, `tb_bf_subtractor` | random and corner operands, one-cycle latency, reset value |
| `tb_twiddle_mul` | all four K against an integer rounding model and the exact product (within 1) |
| `tb_fft8` | 300+ random and corner symbols with gaps against a floating-point DFT; exact even bins; latency 3; no lost or extra outputs |
| `tb_qam256_mapper` | all 256 bytes plus random ones under back-pressure; Gray property; latency 1 |
| `tb_stream_parser` | order and alternation counted over accepted symbols only, under random stalls; held outputs stable; full rate; latency 1 |
| `tb_mdc_fft8` | 400+ streamed symbols with random idle gaps against a floating-point DFT; pair order and `out_last`; first/last pair 3/6 cycles after the last sample |
| `tb_fft_stage` | random traffic on both streams, long output stalls, both modes, tie between streams, latency 5 |
| `tb_fft_stage_mdc` | the same with `FFT_ARCH = 1`, latency 16 |
| `tb_mimo_ofdm_fft_tx` | end to end at the design's only size: bytes -> QAM -> antennas -> inverse and forward DFT, latency 7; counts inverse/forward symbols per antenna, input back-pressure, stalls and ties, and fails if any never happened |
| `tb_mimo_ofdm_fft_tx_mdc` | the same with `FFT_ARCH = 1` |
| `tb_sustained_rate` | both cores side by side at the block diagram's input and output rates; same outputs, symbol framing, sustained rate (see above) |

Each testbench also has a cycle watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fft_pkg.sv \
    tb/tb_mimo_ofdm_fft_tx.sv --top-module tb_mimo_ofdm_fft_tx
./obj_dir/Vtb_mimo_ofdm_fft_tx
```

Replace the testbench name to run another. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/fft_pkg.sv rtl/<module>.sv`.
The simulator is two-state, so the testbenches reset everything they read.

## Files

| file | contents |
|---|---|
| `rtl/fft_pkg.sv` | sizes, sample types, widening helper |
| `rtl/bf_adder.sv`, `rtl/bf_subtractor.sv` | registered complex adder / subtractor |
| `rtl/twiddle_mul.sv` | constant W8^K rotation |
| `rtl/fft8.sv` | the three-stage parallel 8-point FFT |
| `rtl/mdc_fft8.sv` | the delay-commutator 8-point FFT |
| `rtl/fft_stage.sv` | buffers, MUX/DEMUX and scheduling around one shared FFT |
| `rtl/qam256_mapper.sv` | 256-QAM mapper |
| `rtl/stream_parser.sv` | two-antenna parser |
| `rtl/mimo_ofdm_fft_tx.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the rate test `tb_sustained_rate` |

## Changing it

The butterfly networks in `fft8` and `mdc_fft8` are written out for N = 8; `N_POINTS` and
`N_STAGES` in `fft_pkg` describe it but do not resize it. A larger transform
needs more stages and a wider set of twiddles. Widths are set in `fft_pkg`
(`IN_W`, `OUT_W`); keep `OUT_W >= IN_W + 4` so that no stage can overflow.
