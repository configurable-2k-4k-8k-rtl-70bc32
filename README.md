# Configurable 2k/4k/8k FFT/IFFT core for DVB-T and DVB-H

OFDM broadcasting uses an IFFT in the transmitter and an FFT in the receiver,
and the transform size depends on the standard and mode: DVB-T uses 2048
(2k) and 8192 (8k) points, DVB-H adds 4096 (4k). This core computes all
three sizes, forward or inverse, with one streaming pipeline built for 8192
points. A shorter transform does not pad its input with zeros to 8192
samples. It bypasses the first pipeline stages instead, so a 2k symbol
costs 2048 clock cycles of input and not 8192. The core takes one complex
sample (2 x 16 bit) per clock, symbols back to back, and delivers the
results in natural order.

The design is written in synthesizable SystemVerilog (IEEE 1800-2017). Every
block has a self-checking testbench.

## The decomposition behind the bypass

8192 = 2 * 2 * 4 * 8 * 8 * 8. Split the time index n and the frequency index k
of an 8192-point DFT into mixed-radix digits:

| size | time index n                                    | frequency index k                                   |
|------|-------------------------------------------------|-----------------------------------------------------|
| 8k   | n5 + 8 n4 + 64 n3 + 512 n2 + 2048 n1 + 4096 n0  | k0 + 2 k1 + 4 k2 + 16 k3 + 128 k4 + 1024 k5          |
| 4k   | n5 + 8 n4 + 64 n3 + 512 n2 + 2048 n1            | k1 + 2 k2 + 8 k3 + 64 k4 + 512 k5                    |
| 2k   | n5 + 8 n4 + 64 n3 + 512 n2                      | k2 + 4 k3 + 32 k4 + 256 k5                           |

n0 and n1 take values 0..1, n2 takes 0..3, and n3, n4 and n5 take 0..7.
The same holds for the k digits. A decimation-in-frequency pipeline handles
the digits from the most significant time digit down, one stage per digit:

| stage | digit | radix | FIFOs x length | twiddle after it | 8k | 4k | 2k |
|-------|-------|-------|----------------|------------------|----|----|----|
| 1     | n0    | 2     | 1 x 4096       | W_8192           | x  |    |    |
| 2     | n1    | 2     | 1 x 2048       | W_4096           | x  | x  |    |
| 3     | n2    | 4     | 3 x 512        | W_2048           | x  | x  | x  |
| 4     | n3    | 8     | 7 x 64         | W_512            | x  | x  | x  |
| 5     | n4    | 8     | 7 x 8          | W_64             | x  | x  | x  |
| 6     | n5    | 8     | 7 x 1          | none             | x  | x  | x  |

Removing n0 and k0 from the 8k maps gives the 4k maps. Removing n1 and k1 as
well gives the 2k maps. Every remaining stage keeps its radix, its FIFO
lengths and its twiddle factors, because a stage depends only on the span of
its own digits. The 4k transform is therefore the 8k pipeline with stage 1
bypassed, and the 2k transform is the pipeline with stages 1 and 2 bypassed.
A bypassed stage is not clocked, and a multiplexer routes its input straight
to the next stage.

## A single-path delay-feedback stage

Each stage (`sdf_stage`) is a radix-R single-path delay-feedback (SDF) unit.
It works on blocks of NS = R*L samples. The position of a sample in its block
splits into a group p = pos / L (0..R-1) and an offset i = pos % L. The stage
owns R-1 FIFOs of length L (`sdf_fifo`):

* **Groups 0 to R-2 (fill).** The *FIFO input selector* writes the incoming
  sample into FIFO p. The *FIFO output selector* sends out what FIFO p held
  before: butterfly output p+1 of the previous block.
* **Group R-1 (compute).** The R-point butterfly (`bfly_r2`, `bfly_r4` or
  `bfly_r8`) takes the R-1 stored samples and the incoming one. Output 0
  leaves at once. Outputs 1 to R-1 go back into the FIFOs, and leave during
  the fill groups of the next block.

So the stage's output stream is its input stream delayed by (R-1)*L samples
and reordered so that butterfly output k at offset i sits at position
k*L + i. That sample is multiplied by the decimation-in-frequency twiddle
factor W_NS^(k*i).

For k = 0 the factor is exactly 1. The multiplier (`tw_mult`) then passes the
sample through unchanged (the "TW one" bypass). This avoids the small gain
error of the Q1.15 value 32767/32768 that stands for 1.

Each FIFO is a memory addressed by the offset i. It is read and rewritten at
the same address, in the beats its stage selects it, which makes it a FIFO
of length L without moving data. Stage 6 has L = 1 and no twiddle
multiplier.

`twiddle_rom` stores a quarter-wave cosine table of NS/4 + 1 entries,
computed at elaboration by a constant function:
C(m) = round(32767 * cos(2*pi*m/NS)). The quadrant of the exponent selects
the signs and whether the table is read at m or at NS/4 - m (the sine).

## Output order and the reorder buffer

The pipeline emits a symbol's results in stream order q. In 8k mode
q = 4096 k0 + 2048 k1 + 512 k2 + 64 k3 + 8 k4 + k5, and the natural index is
k = k0 + 2 k1 + 4 k2 + 16 k3 + 128 k4 + 1024 k5, so the digits come out
reversed. `reorder` writes each sample at its natural index into one half of
a double buffer (2 x 8192 words). Meanwhile it reads the other half, filled
by the previous symbol, in order. The halves swap every N beats.
`out_index` gives the natural index of each output.

A half is marked valid only if a head arrived at its position 0. Junk pushed
through while the pipeline drains is therefore never output.

## Arithmetic

* Samples are 16-bit two's complement real and imaginary parts (`cplx_t` in
  `fft_pkg`).
* Every butterfly divides by its radix, rounding half up and saturating.
  Over a transform this is 1/N, so the forward transform delivers X(k)/N.
* The radix-8 butterfly is a radix-2^3 structure. Its two multiplications by
  1/sqrt(2) use the constant 46341/65536 and keep 3 guard bits.
* The twiddle multiplication rounds at bit 15 and saturates.
* The IFFT exchanges the real and imaginary parts at the input and at the
  output, which turns the forward transform into the inverse one. With the
  1/N scaling the core delivers exactly x(n) = (1/N) sum X(k) W^(-nk).

Measured against double-precision DFTs, the outputs are within 1 to 3 LSB.
For large outputs the error grows by about |X|/4096 from the twiddle gain of
32767/32768.

## Interface and timing

| port        | dir | width | meaning                                                      |
|-------------|-----|-------|--------------------------------------------------------------|
| `clk`       | in  | 1     | clock                                                        |
| `rst_n`     | in  | 1     | asynchronous reset, active low                               |
| `in_valid`  | in  | 1     | `din` holds a sample                                         |
| `in_ready`  | out | 1     | the sample is taken in this cycle                            |
| `headin`    | in  | 1     | first sample of a symbol                                     |
| `mode`      | in  | 2     | 0 = 2k, 1 = 4k, 2 = 8k; sampled with `headin`                |
| `inverse`   | in  | 1     | 1 = IFFT; sampled with `headin`                              |
| `din`       | in  | 32    | sample {re, im}, 16-bit signed each                          |
| `out_valid` | out | 1     | `dout` holds a result                                        |
| `headout`   | out | 1     | first result (index 0) of a symbol                           |
| `out_index` | out | 13    | natural index of the result                                  |
| `dout`      | out | 32    | result {re, im}                                              |

* A symbol is N consecutive accepted samples, the first one with `headin`.
  `in_valid` may drop at any time. The whole pipeline then holds, since it
  advances one *beat* per accepted sample.
* Symbols of the same configuration may follow back to back. The core then
  takes and returns one sample per clock without gaps.
* Index 0 of a symbol leaves P + N beats after its head: headout goes high
  after the clock edge P + N edges after the one that took the head. P is
  the latency of the stages in use, the sum of (R-1)*L + 2 over them: 8203,
  4105 and 2055 beats in 8k, 4k and 2k mode.
* Measured from the head, the last result of a symbol leaves stage 6 after
  about 2N cycles. Natural order costs N more cycles in the reorder buffer.

### Control (`fft_ctrl`)

The state machine has three states:

* **IDLE.** It waits for `headin`. Samples without a head are taken and
  dropped.
* **RUN.** Every accepted sample is a beat.
* **DRAIN.** A head with a different `mode` or `inverse` is refused
  (`in_ready` low) and starts the drain. The FSM feeds zero samples until the
  previous symbols have left the reorder buffer: P + N beats, plus the
  missing samples if the last symbol was incomplete. It then returns to IDLE,
  which takes the waiting head with its new configuration.

The refused cycle is already a drain beat, so results keep streaming without
a bubble.

At the end of a stream, the last symbol leaves the core only while beats keep
coming. Send a head with a different configuration to flush it, or keep
feeding samples.

## Choices not fixed by the original description

These choices are this design's own:

* **Radix order.** The stage radices are 2, 2, 4, 8, 8, 8. The original
  description's summary table reads "2, 4, 8, 8, 8, 8", which would make
  32768 points. The digit maps and the stage-bypass rule above require
  2, 2, 4, 8, 8, 8.
* **Scaling.** The transform is scaled by 1/N, with rounding and saturation.
* **Handshake and mode switch.** The valid/ready handshake, the stall
  behaviour and the drain on a change of configuration are this design's
  own. So are the mode encoding and the `out_index` output.
* **Reorder buffer.** The reorder unit is a plain double buffer, which costs
  16384 words and N cycles of latency. The original design's reorder insides
  are unknown.
* **Memories.** The FIFO memories and the reorder buffer are written as
  arrays with asynchronous read. An FPGA or ASIC mapping to block RAM may
  want a registered read, which adds one pipeline register per stage.
* **Twiddle table.** Twiddles come from per-stage quarter-wave tables
  computed at elaboration, not from a table file.

## Size

* FIFOs: 8191 complex words (4096 + 2048 + 1536 + 448 + 56 + 7).
* Reorder buffer: 16384 complex words.
* Twiddle tables: 2049 + 1025 + 513 + 129 + 17 sixteen-bit entries.
* Multipliers: five complex twiddle multipliers (four real multiplications
  each) and the constant multiplications inside the radix-8 butterflies.

## Files

| file | content |
|------|---------|
| `rtl/fft_pkg.sv`     | sample type, mode enum, arithmetic helpers |
| `rtl/bfly_r2.sv`, `rtl/bfly_r4.sv`, `rtl/bfly_r8.sv` | butterflies |
| `rtl/sdf_fifo.sv`    | feedback FIFO memory |
| `rtl/twiddle_rom.sv` | twiddle factor table |
| `rtl/tw_mult.sv`     | twiddle multiplier with the TW-one bypass |
| `rtl/sdf_stage.sv`   | radix-R SDF stage |
| `rtl/reorder.sv`     | digit-reversed to natural order |
| `rtl/fft_ctrl.sv`    | control FSM |
| `rtl/fft_core.sv`    | top level |
| `tb/tb_<module>.sv`  | self-checking testbench of each module |
| `tb/tb_fft_frame.sv` | whole 68-symbol OFDM frames (IFFT) in all three modes |

## Simulation

With Verilator 5, for example for the end-to-end test:

    verilator --binary --timing --assert -Irtl rtl/fft_pkg.sv tb/tb_fft_core.sv \
        --top-module tb_fft_core -Mdir obj_core
    ./obj_core/Vtb_fft_core

Every testbench ends with `TB_RESULT checks=<n> failures=<m>` and has a
watchdog.

* `tb_fft_core` runs eight symbols at full size: 8k FFT (with and without
  input stalls), 8k IFFT, 4k FFT, 2k IFFT and 8k FFT. It checks every output
  against a DFT, and also checks the latency, back-to-back timing, the
  natural output order and that each mechanism occurred: stall, drain, one-
  and two-stage bypass, inverse, back to back.
* `tb_fft_frame` streams a 68-symbol frame of IFFT symbols per mode, about a
  million cycles, against a floating-point radix-2 reference FFT. It checks
  that no output cycle inside a frame is idle.

Each of these runs in seconds.

## How far it is verified

* Every module has been compared with independent floating-point models in
  simulation.
* Every testbench has been shown to fail on a deliberately broken copy of
  its module.
* Lint (Verilator `-Wall`) and elaboration by a second SystemVerilog front
  end are clean.
* Timing on an FPGA or in a standard-cell flow has not been measured.
* No gate-level simulation has been run.
