# 16-QAM OFDM transceiver with (8,4) block coding

A complete transmit-and-receive chain for a 16-sub-carrier OFDM link with
16-QAM modulation and forward error correction, written as synthesizable
SystemVerilog. A pseudo-random bit stream is packed into bytes, protected by
two parallel (8,4) block codes, mapped onto Gray-coded 16-QAM levels,
turned into time-domain samples by a 16-point IFFT and, after the channel,
brought back through a 16-point FFT, threshold detection and block decoding
to a bit stream that must equal the one sent.

It is a hardware rendering of a published Simulink model that was run on a
Nexys4 (Artix-7 xc7a100t) board in FPGA-in-the-loop mode. The structure,
ratios, tables and transform settings follow that model; word lengths,
handshakes, bit orders and the choice of error-correcting code are this
design's own and are listed below.

## Signal chain

```
 transmitter                                              receiver
 -----------                                              --------
 pn_gen          1 bit / 8 cycles                          rx_sample (1 / cycle)
   |                                                          |
 sp_conv 1x8     bits -> byte                              sp_conv 16     -> frame
   |                                                          |
 block_coder     byte -> 2 x (8,4) = 16-bit codeword       fft16 (forward, unscaled)
   |                                                          |
 ps_conv 4x4     codeword -> four 4-bit symbols            ps_conv 16     -> 1 bin / cycle
   |                                                          |
 upsampler x16   each symbol held for 16 cycles            qam16_demapper thresholds -2, 0, +2
   |                                                          |
 qam16_mapper    {I,Q} di-bits -> levels -3,-1,+1,+3       downsampler /16 keep last copy
   |                                                          |
 sp_conv 16      16 samples -> frame                       sp_conv 4x4    -> 16-bit codeword
   |                                                          |
 fft16 (inverse, /16)                                      block_decoder  -> byte, 1 error / half
   |                                                          |
 ps_conv 16      -> tx_sample (1 / cycle)  ==channel==>     ps_conv 8x1   -> rx_bit
```

`ofdm_transceiver` wires all of this together. The channel is not inside
it: `tx_valid`/`tx_sample` leave the top and `rx_valid`/`rx_sample` enter
it, so a plain loopback gives the ideal channel of the original set-up and a
testbench can put any impairment in between.

## Cyclic prefix by repetition: one symbol per OFDM frame

The least obvious part of the design is how the cyclic prefix is made. It
is not the usual copy of the last samples of a time-domain frame. Instead,
each 4-bit 16-QAM symbol is repeated sixteen times by `upsampler` *before*
the I/Q split, and the receiver's `downsampler` keeps only the last of the
sixteen decisions and throws the first fifteen away. The idea is that a
dispersive channel corrupts the first copies and leaves the last one clean.

Because the repetition factor equals the transform length, every IFFT frame
carries sixteen copies of one symbol X on all sixteen sub-carriers. Its
IFFT is therefore an impulse: the first time-domain sample is X and the
other fifteen are zero (up to rounding). The receiver's FFT spreads it back
to X on every bin, the demapper decides all sixteen bins, and the
downsampler keeps bin 15. Consequences an engineer should know:

- Throughput is one 4-bit coded symbol per 16-sample frame, which after
  the rate-1/2 code is 2 data bits per frame, one per 8 samples. At one
  sample per clock the link carries `f_clk / 8` data bits per second.
- The upsampler and downsampler keep their groups aligned only by counting
  from reset. There is no frame marker; a lost or extra sample on the
  channel shifts every later decision.
- A disturbance added to one time-domain sample moves all sixteen bins by
  the same amount. The end-to-end testbench uses exactly this to create
  single-bit errors for the decoder to correct.

## Rates and timing

The whole chain runs on one clock with an asynchronous active-low reset.
The source is paced inside the top: with `run` high, `pn_gen` emits one bit
every `UPSAMPLE/2 = 8` cycles. Eight bits become 16 coded bits, four
symbols and 64 samples, so the transmitter delivers exactly one sample per
cycle; once the first frame is out, `tx_valid` stays high as long as `run`
does. Latencies of the stages:

| stage | latency |
|---|---|
| `pn_gen`, `block_coder`, `block_decoder`, mapper, demapper, downsampler | 1 cycle (registered output) |
| `sp_conv` | 1 cycle after the N-th element |
| `fft16` | 2 cycles (two pipelined radix-4 stages) |
| `ps_conv` | first element 1 cycle after the load |

With a wire as the channel, the first bit of each byte comes out of
`rx_bit` 167 cycles after it left `pn_gen`, the same for every byte;
received bytes appear as bursts of 8 bits on consecutive cycles, every 64
cycles.

Only `ps_conv` and `upsampler` have a ready signal, which the transmitter
uses to hand symbols to the upsampler at its pace. Everything else is
valid-only: at the built-in rate no converter can overflow, which
assertions in the top check and the `overflow` output reports.

## Number format and the transforms

Samples are complex (`ofdm_pkg::cplx_t`): 18-bit two's complement real and
imaginary parts with 10 fractional bits, so the 16-QAM levels -3, -1, +1,
+3 are -3072, -1024, 1024, 3072.

`fft16` computes a 16-point DFT as 4 x 4 (radix 2^2): two stages of
4-point transforms, each built from two layers of radix-2 butterflies, with
twiddle factors W16^(n2*k1) between the stages. Twiddles are
`round(2^14 * cos(2*pi*k/16))` and `round(2^14 * sin(2*pi*k/16))`, applied
with four real multiplications and two additions per complex product. A
whole frame is transformed at once (the order-16 serial-to-parallel
converter collects it), in natural order on both sides, and a new frame can
enter every cycle.

Two parameters select the two instances:

- `INVERSE=1, SCALE=1` for the transmitter: inverse transform, every
  butterfly output halved with rounding, 1/16 overall.
- `INVERSE=0, SCALE=0` for the receiver: forward transform, no scaling.

The pair is chosen so that IFFT followed by FFT returns the levels at their
original size, which is what the demapper's fixed thresholds -2, 0, +2
require. Internal words are 24 bits; outputs saturate at 18 bits and raise
`saturated`. Measured error against a floating-point DFT is under 2 LSB.

## 16-QAM mapping

A symbol's upper di-bit drives the in-phase part, its lower di-bit the
quadrature part. Both use the same Gray table:

| di-bit | level | received value s decides |
|---|---|---|
| 00 | -3 | s <= -2 |
| 01 | -1 | -2 < s <= 0 |
| 11 | +1 | 0 < s <= +2 |
| 10 | +3 | s > +2 |

## Error correction

`block_coder` splits a byte into two nibbles, and each nibble goes to its
own (8,4) coder; `block_decoder` mirrors this with two decoders. The code
is an extended Hamming code (`hamming84_enc`, `hamming84_dec`): in each
8-bit codeword, bits 0..6 are Hamming positions 1..7 (parity at positions
1, 2, 4; data at 3, 5, 6, 7), and bit 7 is overall parity. Each half
corrects one error and detects two, so up to two errors per 16-bit codeword
are corrected when they fall in different halves. `fec_corrected` and
`fec_uncorrectable` report, per half, what the decoder did.

Ordering: the first serial bit is bit 0 of a byte; the high nibble gives
codeword bits [15:8]; a codeword leaves as four symbols, bits [3:0] first.
The receiver undoes the same orders.

## Departures from the original model

- The original transforms are vendor blocks whose internal pipeline is not
  known. Here the 16-sample frame gathered by the serial-to-parallel
  converter is transformed in parallel, with the same length, radix 2^2
  factorisation and four-multiplier complex products. No general
  multipliers remain after synthesis because all twiddles are constants.
- The original settings of the bit-reversed-order and butterfly-scaling
  options are not known. All three are `fft16` parameters (`BITREV_IN`,
  `BITREV_OUT`, `SCALE`); natural order is used, and only the transmitter
  scales.
- The original model does not specify its (8,4) code; the extended Hamming
  code is this design's choice.
- The original repetition block may insert zeros rather than repeat;
  repetition is used here so that the kept copy is a true symbol.
- The pseudo-random source is a 6-bit LFSR, z^6 + z + 1, seeded 000001
  (period 63).
- Parts that are not logic are not included: the channel (ideal, a wire),
  the host-side scope that compared the streams, and the board link that
  the FPGA-in-the-loop tool flow generates.

## Files

| file | contents |
|---|---|
| `rtl/ofdm_pkg.sv` | sample types, sizes, the level and decision lookups `level_of` and `dibit_of` |
| `rtl/ofdm_transceiver.sv` | top level |
| `rtl/pn_gen.sv` | PN bit source |
| `rtl/sp_conv.sv`, `rtl/ps_conv.sv` | serial/parallel converters |
| `rtl/block_coder.sv`, `rtl/block_decoder.sv` | two-lane (8,4) coder and decoder |
| `rtl/hamming84_enc.sv`, `rtl/hamming84_dec.sv` | one (8,4) lane |
| `rtl/upsampler.sv`, `rtl/downsampler.sv` | prefix insertion and removal |
| `rtl/qam16_mapper.sv`, `rtl/qam16_demapper.sv` | 16-QAM mapping and detection |
| `rtl/fft16.sv` | 16-point FFT/IFFT |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_ifft16` and `tb_fft16` test the two `fft16` configurations |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops; a watchdog
ends a stuck run with a failure. With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl rtl/ofdm_pkg.sv \
    tb/tb_ofdm_transceiver.sv --top-module tb_ofdm_transceiver -y rtl
./obj_dir/Vtb_ofdm_transceiver
```

Replace the testbench name for any other test. `tb_ofdm_transceiver` runs
the top at its default sizes: 2,400 bits, half over a clean loopback and
half with the impairment described above. It checks that every bit arrives
unchanged, that the byte latency is constant, that the transmitter never
pauses while the source runs, and that prefix insertion, prefix removal and
error correction each actually happen (about 110 corrections in a run). The
block testbenches compare against models written independently in the
testbench: a floating-point DFT for `fft16`, the parity equations for the
coder, exhaustive single and double error patterns for the decoder, and the
decision table for the demapper.

## Changing the design

- Repetition factor and transform length are `UPSAMPLE` and `FFT_N` in
  `ofdm_pkg`. `fft16` is fixed at 16 points, and the one-symbol-per-frame
  alignment relies on `UPSAMPLE == FFT_N`.
- Word length and binary point are `SAMPLE_W` and `SAMPLE_FRAC`. The
  unscaled receive FFT can grow by 16, so keep at least 7 integer bits for
  levels up to 3 * sqrt(2).
- For a channel that delays the stream, raise `rx_valid` first with the
  first sample of a frame; the receiver's frame and group alignment counts
  from the first valid sample after reset.
