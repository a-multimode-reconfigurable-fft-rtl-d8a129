# Multimode eight-path FFT processor (64/128/256/512 points)

This is an FFT processor for OFDM receivers that serve two kinds of wireless
network with one piece of hardware:

- high-rate WPAN (IEEE 802.15.3c style): 128, 256 and 512 points at up to 2.4 GS/s;
- WLAN (IEEE 802.11n style): 64 and 128 points at 20–40 MS/s.

To reach 2.4 GS/s at about 300 MHz, the processor takes **eight complex samples
per clock** and returns eight results per clock. A 512-point transform occupies
it for 64 clocks, and frames can follow each other with no gap.

The main idea is a **two-level (radix-16 × radix-32) decomposition** mapped onto
**multipath delay-feedback (MDF) pipelines**. The transform size is changed by
switching leading stages into plain delays. Nothing is rewired.

All RTL is SystemVerilog-2017 in `rtl/`. Every module has a self-checking
testbench in `tb/`.

## The algorithm

For N = 512, write the time index as n = 32·n1 + n2 and the frequency index as
k = k1 + 16·k2 (n1, k1 < 16; n2, k2 < 32):

    X(k1 + 16 k2) = Σ_n2 [ ( Σ_n1 x(32 n1 + n2) · W16^(n1 k1) ) · W512^(n2 k1) ] · W32^(n2 k2)

The computation has three parts:

1. A 16-point DFT over n1 for each n2. This is **module1**: four radix-2 stages.
2. A multiplication by the inter-level twiddle W_N^(n2·k1). This is the
   **CORDIC unit**.
3. A 32-point DFT over n2. This is **module2**: five radix-2 stages.

Smaller transforms keep the second level at 32 points and shrink the first
level to N1 = N/32:

| N   | N1 | module1 stages active | module2 stages active |
|-----|----|-----------------------|-----------------------|
| 512 | 16 | 4                     | 5                     |
| 256 | 8  | 3 (Stage1 bypassed)   | 5                     |
| 128 | 4  | 2                     | 5                     |
| 64  | 2  | 1                     | 5                     |

Every stage is radix-2 decimation in frequency. The stage working on bit m of
its sub-index multiplies the difference branch by W_(2^(m+1))^(index mod 2^m).
That twiddle does not depend on N, so a bypassed stage never changes the
twiddles of the stages after it.

## How eight paths carry a frame

Path l (0..7) carries the samples n = 8·t + l of a frame, one per clock, with
t = 0 … N/8−1. This placement decides the structure:

- **Bits 8..3 of n are bits of t.** Butterflies on these bits pair samples
  2^(bit−3) clocks apart on the same path. Each path therefore has a
  single-path delay-feedback stage, and eight of them in parallel form the MDF
  pipeline. These are Stage1–4 (module1, delays 32/16/8/4 clocks) and Stage5–6
  (module2, delays 2/1).
- **Bits 2..0 of n are the path number.** Butterflies on these bits pair
  samples on different paths in the same clock. These are Stage7–9: plain
  butterflies between paths l and l+4, l+2, l+1, with one register each.

### Delay-feedback stage (`fft_df_stage`)

The stage repeats a cycle of 2·D clocks in two halves:

- **First half:** the input is written into a D-word delay line. The head of
  the delay line is sent out; it holds the previous period's twiddled
  differences.
- **Second half:** the head (sample t−D) and the input (sample t) form a
  butterfly. The sum goes out. The difference, multiplied by the stage twiddle,
  goes back into the delay line.

The delay line is the processor's FIFO wrapper (`fft_sram_fifo`), written every
clock and read whenever it is full, so its fill stays at D. A **bypassed**
stage always behaves as in the first half, which turns it into a plain D-clock
delay. Bypassing keeps the latency the same for every size.

### Frame alignment

The stages hold no per-frame state. Each one knows where it is in a frame from
a **free-running counter**, reset to minus the number of clocks between the
pipeline input and that stage. As a result:

- A frame must enter module1 on a clock that is a multiple of N/8 after reset.
  The controller waits for such a clock. Back-to-back frames are aligned
  automatically.
- A valid bit travels with every sample. A frame needs no extra clocks to
  drain.
- Latencies are fixed for every size: module1 64, CORDIC 18, module2 8, in
  total `LAT_PIPE` = 90 clocks. The first result is in the output FIFO 91
  clocks after the frame's first word leaves the input FIFO.

### Output order

Results come out in the pipeline's natural digit-reversed order and are **not
reordered**. Each result is tagged with its frequency index on `out_idx`. At
frame position n:

- bits 4..0 hold k2, bit-reversed over 5 bits;
- bits log2(N)−1..5 hold k1, bit-reversed over log2(N)−5 bits;
- the frequency index is k = k1 + (N/32)·k2.

See `out_index` in `rtl/fft_pkg.sv`.

## Twiddle factors

- **Inside each level** the twiddles are W_L^j with L ≤ 32. All of them are
  entries of a 16-entry table of W_32^k = cos(2πk/32) − j·sin(2πk/32) in Q1.14,
  computed as round(16384·cos(2πk/32)). Multiplications by 1 and −j are exact.
  The others use a constant complex multiply with rounding.
- **Between the levels** (`fft_cordic_twiddle`) the twiddle is W_N^(n2·k1).
  The exponent is reduced modulo N and scaled to 512ths of a turn. One
  pipelined CORDIC rotator per path (`fft_cordic_rot`) applies it in three
  steps:
  1. an exact quarter-turn rotation by (−j)^q;
  2. 16 rotation-mode micro-rotations, with the angle in units of 2π/2^20;
  3. a gain correction by round(2^15·0.607253) = 19898.

## Word lengths and accuracy

- **Input:** 10-bit real and imaginary parts, packed as {re, im} with the real
  part in the high bits.
- **Internal and output:** 20 bits per part (`DW`). A 512-point transform of
  full-scale input needs at most 20 bits, so no stage scales and nothing can
  overflow.
- **Accuracy:** against a floating-point DFT, random full-scale frames show a
  largest error of about 17 LSB on outputs of typical size 10^4. The errors
  come from twiddle and CORDIC rounding. The end-to-end testbench allows 48 LSB.

## Control (`fft_ctrl`)

The controller is a five-state machine:

- **IDLE** waits until an environment is reported on `env_i`. It rejects a size
  the environment does not support and sets `cfg_err`. WLAN allows 64 and 128
  points. WPAN and WMAN allow all four sizes.
- **START** latches the environment and size, and spends 6 clocks configuring.
  The size sets how many input FIFO words (N/8) make up a frame.
- **WAIT** lasts at least 2 clocks. It then waits until both of these hold:
  - a whole frame is in the input FIFO;
  - the next clock is frame-aligned.

  A stop request (`stop_i`) or a changed environment or size request sends it
  to STOP.
- **WORK** feeds one word per clock for N/8 clocks. If the next frame will be
  complete by the end of the current clock (a word written into the input FIFO
  in that clock counts), it continues straight into it; otherwise it returns
  to WAIT. With a steady input of eight samples per clock, frames therefore run
  back to back through a 64-word input FIFO.
- **STOP** waits `LAT_PIPE` clocks for the pipeline to drain. It then pulses
  `flush`, which empties the delay lines and the input FIFO, and returns to
  IDLE. Results already in the output FIFO are kept.

A reset (`rst_n` low, asynchronous) returns to IDLE from any state.

## Input/output buffering (`fft_io_buffer`)

The buffering uses two 64-word FIFOs. Each word holds eight samples, so one
FIFO holds one 512-point frame.

- **Input.** `in_ser` = 0 accepts eight samples per clock. `in_ser` = 1
  accepts one sample per clock on `in_data[0]` and packs eight of them into a
  word; the first sample goes to path 0. This serial mode suits the WLAN rates.
  `in_ready` is low while the input FIFO is full, unless a word leaves it in
  the same clock.
- **Output.** Words leave through `out_valid`/`out_ready`.

### Stalls

One enable, `en`, gates every register of the pipeline, every delay line and
the controller's counters. It is low only in a clock where the output FIFO is
full and no word is read from it:

    en = !out_full || (out_ready && !out_empty)

While `en` is low the whole processor freezes, so no result is lost and no
frame needs to be held back. A consumer that is always ready never causes a
stall, and the processor then runs at eight samples per clock. Because the
position counters are also gated, frame alignment survives any pattern of
stalls.

## Files

| file | role |
|------|------|
| `rtl/fft_pkg.sv` | types (`cplx_t`, `samp_t`, states, sizes), constants, W_32 table, `out_index` |
| `rtl/fft_top.sv` | the processor |
| `rtl/fft_ctrl.sv` | control state machine |
| `rtl/fft_io_buffer.sv` | input packing, input/output FIFOs, pipeline stall enable |
| `rtl/fft_module1.sv` | Stage1–4, first level |
| `rtl/fft_cordic_twiddle.sv`, `rtl/fft_cordic_rot.sv` | inter-level twiddle by CORDIC |
| `rtl/fft_module2.sv` | Stage5–9, 32-point second level |
| `rtl/fft_df_stage.sv` | one radix-2 delay-feedback stage of one path |
| `rtl/fft_sram_fifo.sv` | FIFO wrapper used for all memories |
| `tb/tb_*.sv` | one self-checking testbench per module |

The testbenches are:

- `tb_fft_top` runs the whole processor at its default size. It covers:
  - 512-point frames back to back, with frame spacing and latency checked;
  - a size change through STOP;
  - 256-, 128- and 64-point frames, with serial input;
  - output back-pressure, which stalls the pipeline;
  - a rejected WLAN/512 request.

  Every result is compared with a floating-point DFT.
- `tb_fft_workloads` streams each of the five rate/size modes listed above,
  with an impulse, a single tone and random data. It measures the sustained
  input rate in samples per clock.
- The module testbenches check each module's function and latency alone.

## Simulating

With Verilator 5, for example for the end-to-end test:

    verilator --binary --timing --assert -Irtl rtl/fft_pkg.sv tb/tb_fft_top.sv \
              --top-module tb_fft_top -o sim
    ./obj_dir/sim

Each testbench ends with a line `TB_RESULT checks=<n> failures=<m>`. A
watchdog ends a run that hangs.

## Changing it

The following can be changed freely:

- `IW` and `DW` in `fft_pkg`. Keep DW ≥ IW + 10 to avoid overflow at 512
  points.
- `CW` with the table, and `CORDIC_ITER` with the atan table in
  `fft_cordic_rot`. If you change `CORDIC_ITER`, also update `LAT_TW`.
- `CFG_CYCLES` and `STOP_HOLD` in `fft_ctrl`.

The stage delays follow from `LANES` = 8 and `NMAX` = 512. Changing either one
means revisiting module1/module2, which have four and five stages.

## Limits and departures

- **Clock rate:** the 300 MHz target has not been checked by timing analysis.
  The CORDIC and the cross-path butterflies are pipelined one register per
  step, but the constant-twiddle multipliers sit in the same clock as the
  butterfly adders.
- **Output width:** results leave at the full internal width, 20 bits per
  part, with a 9-bit index per result. Together with the eight-sample input
  that is 568 signal pins. A version that returns 10-bit parts, as wide as the
  input and without indices, would need about 324, but it would have to scale
  or round the results.
- **Output order:** results are not put back in natural order; they carry
  their index instead.
- **WORK state:** WORK goes straight into the next frame when that frame is
  ready, which sustained full rate requires. It returns to WAIT, with its
  two-clock minimum, only when input is short.
- **Memories:** all memories are one generic register-array FIFO, not foundry
  SRAM or vendor FIFO cores.
- **CORDIC structure:** the CORDIC is a plain pipelined one; no further
  optimisation of its structure is attempted.
- **Out of scope:** the synchronisers ahead of the FFT and the equaliser after
  it are not included.
