# 16-point FFT/IFFT processor built from an 8-point FFT

This is a small fixed-point processor that computes a 16-point discrete Fourier
transform (forward or inverse) of 16 complex words. The inputs arrive in
parallel and the results leave in parallel. The processor is meant as the
(I)FFT core of an OFDM modem.

The main idea is to avoid general multipliers. The 16-point transform is split
into two 8-point FFTs and one final radix-2 step. A radix-2 8-point FFT needs
no true multiplier: its only non-trivial constants are -j and (±1 - j)/√2. So
the whole transform needs:

- one time-shared 8-point FFT unit (adders, plus two multiplications by the
  constant 1/√2);
- one complex multiplier for the seven non-trivial "inter-dimensional"
  constants W16^1 … W16^7;
- sixteen complex add/subtract pairs.

A 5-bit counter sequences everything.

One transform takes **28 clock cycles** from start to valid results. A new
transform can start every 29 cycles.

## The decomposition

With N = 16 = 8 × 2, write the input index as n = l + 2m (l = 0..1, m = 0..7).
Write the output index as k = s + 8t (s = 0..7, t = 0..1). Then

    A(s + 8t) = Σ_{l=0..1} W2^(l·t) · [ W16^(s·l) · Σ_{m=0..7} B(l + 2m) · W8^(s·m) ]

where W_N = e^(-j2π/N). Read from the inside out:

1. **Two 8-point FFTs.** Y0 is the FFT of the even samples B(0), B(2), …, B(14).
   Y1 is the FFT of the odd samples B(1), B(3), …, B(15).
2. **Inter-dimensional constants.** Z1(s) = W16^s · Y1(s). The even set is
   multiplied by W16^0 = 1. So only 7 of the 16 constants need a multiplier.
3. **Second dimension.** This is a 2-point transform of each pair that is
   eight positions apart in the 16-word intermediate set:
   A(s) = Y0(s) + Z1(s) and A(s + 8) = Y0(s) − Z1(s).

This is the textbook decimation-in-time split into even and odd halves. The
first dimension is done by an FFT unit, not by butterflies on single samples.

## Block structure and data flow

```
 data_in ──► input unit ──► 8-point FFT ──► multiplier ──► second FFT ──► output unit ──► data_out
 (16 words)  (bank + mux)   (SDF, 1/clk)    (W16^s)       (2-point ×8)   (bank)           (16 words)
                 ▲                               ▲                            ▲
                 └──────────── 5-bit counter (ctrl_counter) ──────────────────┘
```

| Unit | Module | What it holds and does |
|---|---|---|
| Input unit | `input_unit` | Stores 16 complex words on start. Swaps real and imaginary parts in IFFT mode. A 16:1 multiplexer sends one word per clock, even samples first. |
| 8-point FFT unit | `fft8_unit` (3 × `sdf_stage`) | Streaming radix-2 DIF FFT. Takes one sample per clock, so each 8-point transform occupies it for 8 clocks. Results come out in bit-reversed order. |
| Multiplier unit | `multiplier_unit` | One complex multiplier with an 8-entry twiddle table. It rotates the odd-sample results by W16^s and passes the even-sample results unchanged. |
| Second FFT unit | `fft2_unit` | Buffers Y0. When the matching Z1(s) arrives, it produces A(s) and A(s+8) together. |
| Output unit | `output_unit` | Writes each pair into a 16-word bank at positions s and s+8. Swaps the parts back in IFFT mode. Raises `data_out_valid`. |
| Controller | `ctrl_counter` | Detects the rising edge of `data_start`, runs a 5-bit counter from 0 to 27 and decodes it into the control signals. |

Shared constants (twiddle table, bit reversal, latencies) are in
`fft16_pkg`.

The FFT units do not read the counter. Instead, a `sync` flag travels with the
data and marks the first word of each 8-word block. Each streaming stage
realigns its phase counter on that flag. The counter drives only the input
multiplexer, the twiddle selection and the end-of-transform flag.

### Schedule (counter value = clock after the start edge)

| Count | Event |
|---|---|
| start edge | Input bank loads; counter goes to 0 |
| 0 – 7 | Even samples B(0), B(2), …, B(14) enter the 8-point FFT |
| 8 – 15 | Odd samples B(1), …, B(15) enter the 8-point FFT |
| 10 – 17 | Y0 leaves the FFT unit (latency 10), in order s = 0,4,2,6,1,5,3,7; the multiplier passes it |
| 11 – 18 | Y0 is written into the second FFT unit's buffer |
| 18 – 25 | Y1 leaves the FFT unit; the multiplier applies W16^s |
| 19 – 26 | Z1(s) reaches the second FFT unit, which forms A(s) and A(s+8) |
| 20 – 27 | A(s) and A(s+8) are written into the output bank |
| 27 | `done` |
| 28 | `data_out_valid` high; `busy` low |

The 10-clock latency of the 8-point unit overlaps the input stream. The last
input sample enters at count 15. It then needs 10 clocks in the FFT pipeline
and one clock each in the multiplier, the butterflies and the output bank:
15 + 10 + 3 = 28.

## The streaming 8-point FFT

`fft8_unit` is a radix-2 decimation-in-frequency FFT with three butterfly
columns. Each column is a single-path delay-feedback (SDF) stage with
feedback depth D = 4, 2 and 1. A stage works in blocks of 2D samples:

- **First D samples.** Each sample is pushed into a D-deep shift line. The
  head of the line leaves the stage; it holds the previous block's twiddled
  differences.
- **Last D samples.** The line's head x(n) meets the new sample x(n+D). The
  sum x(n) + x(n+D) leaves the stage. The difference, multiplied by
  W_(2D)^n, is pushed back into the line.

A stage therefore delays the stream by D clocks, plus one clock for its output
register. The three stages together give 5 + 3 + 2 = 10 clocks. The stages run
on every clock, so a block flushes out by itself and the next block can follow
without a gap.

The column twiddles are W8^0..3 for D = 4, W8^0 and W8^2 for D = 2, and 1 for
D = 1. None needs a general multiplier:

- W8^2 = −j is a swap of real and imaginary part plus a negation.
- W8^1 = (1 − j)/√2 maps (r, i) to c·(r + i) and c·(i − r).
- W8^3 = (−1 − j)/√2 maps (r, i) to c·(i − r) and −c·(r + i).

Here c = 1/√2 = 23170 / 2^15, so each of these costs one add or subtract and
one constant multiplication per part. Synthesis turns that into shifts and
adds.

## Number format and accuracy

| Where | Bits per real/imaginary part | Why |
|---|---|---|
| Input words | 16 | word length of the design |
| 8-point FFT, multiplier | 20 | the worst-case 8-point result is below 8·√2·2^15 < 2^19 |
| Second FFT unit, outputs | 21 | the worst-case 16-point result is below 16·√2·2^15 < 2^20 |

All values are two's-complement integers. No value is ever scaled, so
**nothing can overflow** for any input, including all-(−32768) inputs.

Only the constant products are rounded (half up):

- 1/√2 with 15 fraction bits;
- W16^s = round(2^14·cos(2πs/16)) − j·round(2^14·sin(2πs/16)), as 16-bit
  words.

Against a floating-point DFT, the results of random full-scale inputs differ
by at most about 4 LSB. Most of that comes from the 14-bit twiddles. For
more accuracy, widen `TW_FRAC` and the twiddle words in `fft16_pkg`.

## Inverse transform

With `mode = 1`, the input unit swaps the real and imaginary part of every
word. The output unit swaps them back. Since swap(z) = j·conj(z), this gives
swap(FFT(swap(x))) = Σ x(n)·e^(+j2πnk/16). That is the inverse DFT **without
the 1/16 factor**: divide by 16 (shift right by 4) outside if you need the
normalised inverse. No coefficient changes between the two modes. The mode is
latched with the data, so `mode` only needs to be valid on the start edge.

## Interface

`fft16_top` (parameter `DATA_W_P = 16`):

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `data_start` | in | 1 | a rising edge starts a transform; may stay high |
| `mode` | in | 1 | 0 = FFT, 1 = IFFT |
| `data_in_re/im` | in | 16 × 16 | x(0..15) |
| `data_out_re/im` | out | 16 × 21 | X(0..15), in natural order |
| `data_out_valid` | out | 1 | results valid; stays high until the next start |
| `busy` | out | 1 | a transform is running |

Handshake rules:

- The inputs are captured on the clock edge that first sees `data_start`
  high after it was low. After that edge they may change.
- Rising edges while `busy` is high are ignored, and so is a level that simply
  stays high.
- The results hold until the next transform overwrites them.
- The earliest next start is the clock edge after `data_out_valid` rises.

## How this relates to the published design

The structure follows the published design: a parallel input register bank,
an 8-point radix-2 DIF FFT unit, an inter-dimensional multiplier unit, a
second FFT unit, an output register bank complementary to the input bank, and
a binary counter as master controller. The real/imaginary swap for the IFFT
and the `data_start`/`mode` signal names also come from it. The published
description is inconsistent in several places, and these choices resolve it:

- **Split of the transform.** The published formula uses two 8-point
  dimensions, which would make a 64-point transform. Here the split is 8 × 2,
  so the second FFT unit performs eight 2-point transforms instead of 8-point
  ones. The rest of the description still fits this: the 16 W16^(s·l)
  constants, seven non-trivial multiplications per set, two 8-point FFTs per
  transform, and data eight positions apart forming one input set of the
  second unit.
- **Bank size.** The input and output banks hold 16 words, not 64.
- **Counter width.** The counter is 5 bits, because the schedule needs counts
  up to 27. The published block diagram labels it 4-bit; the text says 5-bit.
- **Latency.** The published latency figures (33 cycles in one place, 90 in
  another) do not follow from any given schedule. This design takes 28.
- **Multiplier count.** The published text weighs one complex multiplier
  against seven parallel ones. Here the 8-point unit delivers one result per
  clock, so one multiplier runs at full speed.
- **Own choices.** The streaming SDF form of the 8-point unit, the number
  formats, the rounding, the reset and the start handshake are this design's
  own. Nothing in the published design fixes them.

## Simulation

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5, from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert rtl/fft16_pkg.sv rtl/*.sv tb/tb_fft16_top.sv \
          --top-module tb_fft16_top -o sim && ./obj_dir/sim
```

For a single unit, list the package, the unit and its testbench, for example
`rtl/fft16_pkg.sv rtl/sdf_stage.sv rtl/fft8_unit.sv tb/tb_fft8_unit.sv`.

| Testbench | What it checks |
|---|---|
| `tb_fft16_top` | End to end at default parameters against a floating-point DFT (tolerance 8 LSB). Stimuli: impulses, DC, tones, full-scale extremes and random data. Covers both modes, the 28-cycle latency, a held `data_start`, a start edge while busy, and back-to-back starts at the 29-cycle period. Ends with OFDM round trips: IFFT, divide by 16, FFT must return the original symbols. |
| `tb_fft8_unit` | 8-point results against a floating-point DFT, with blocks both back to back and with gaps. Also the 10-clock sync latency. |
| `tb_multiplier_unit` | Rotations against floating-point W16^s; pass-through of the even set. |
| `tb_fft2_unit` | Exact sums and differences, and the bit-reversed `out_idx`. |
| `tb_input_unit` / `tb_output_unit` | Feeding order B(2m+l), the swaps, the valid flag. |
| `tb_ctrl_counter` | Every decoded control signal for counts 0..27, and the edge detection. |

The top-level module contains one assertion: the last result pair must be
written on the clock the counter reports `done`. If you change a latency, this
assertion tells you when the schedule in `fft16_pkg` no longer matches the
pipeline.

## Changing the design

- **Data width.** Set `DATA_W_P` on `fft16_top`. The internal widths follow
  as +4 and +5 bits.
- **Pipeline latency.** If you add a register anywhere in the chain, update
  `FFT8_LAT`, `MULT_LAT` or `FFT2_LAT` in `fft16_pkg`. The counter's decode
  and `LAST_CNT` follow from them.
- **Twiddle precision.** Change `TW_FRAC` and the table in `fft16_pkg`. Each
  entry is round(2^TW_FRAC·cos) and round(2^TW_FRAC·sin) of 2πs/16.
- **Lint warning.** Verilator reports `SYNCASYNCNET` on `rst_n`. This comes
  from the assertion's `disable iff`, not from the circuit.
