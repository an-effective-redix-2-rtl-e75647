# Two-stream radix-2 FFT with natural-order output

This is a pipelined FFT processor that transforms two independent complex data
streams at the same time and delivers both results in natural frequency order,
without a bit-reversal buffer at the output. It implements the architecture of
the paper "An Effective Redix-2 FFT Processor Based On Parallel Processing of
Input Data Streams". Where the paper leaves details open, the choices made here
are listed under "Departures from the paper".

It uses the textbook split of an N-point transform into the N/2-point
transform `E` of the even samples and the N/2-point transform `O` of the odd
samples:

    X(k)     = E(k) + W_N^k O(k)
    X(k+N/2) = E(k) - W_N^k O(k)          k = 0 .. N/2-1,  W_N = exp(-j 2π/N)

The trick is in the choice of the two half-size FFTs:

* The **even** samples go, in natural order, through a **decimation-in-frequency
  (DIF)** FFT. A DIF FFT takes natural-order input and produces bit-reversed
  output.
* The **odd** samples go, in bit-reversed order, through a
  **decimation-in-time (DIT)** FFT. A DIT FFT takes bit-reversed input and
  produces natural-order output.

Both reorderings are needed anyway as *delays*. The odd samples of a frame
have to wait until the frame is complete. The even-sample result has to wait
until the matching odd-sample result arrives for the final butterfly. The
registers that provide these delays are therefore also used to reorder the
data. One DIF FFT and one DIT FFT are shared by the two streams. While the DIF
FFT works on the even half of stream X1, the DIT FFT works on the odd half of
stream X2, and then the other way round.

## Structure

```
 x1 ──► L1 input unit ──┐u1,u2                    ┌──► L3 reorder regs ──► L3 BF2 ──► y1 (X1 results)
                        ├─ SW1 ─► L2 DIF FFT  ─┐  │v1,v2
 x2 ──► M1 input unit ──┘u3,u4   ► M2 DIT FFT  ─┴ SW2
                                                  │v3,v4
                                                  └──► M3 reorder regs ──► M3 BF2 ──► y2 (X2 results)
```

All paths are two lanes wide, so one step carries two complex values.

| level | module | job |
|---|---|---|
| L1, M1 | `fft2s_in_dc` | Splits one stream into even and odd samples. Sends even pairs `(x(2m), x(2m+N/2))`. Sends odd pairs in bit-reversed order. |
| SW1 | `fft2s_switch` | NORMAL: L1→L2 and M1→M2. SWAP: L1→M2 and M1→L2. |
| L2 | `fft2s_mdc_dif` | N/2-point radix-2 DIF FFT in two-path multipath-delay-commutator (MDC) form. |
| M2 | `fft2s_mdc_dit` | N/2-point radix-2 DIT FFT in MDC form. |
| SW2 | `fft2s_switch` | NORMAL: L2→L3 and M2→M3. SWAP: L2→M3 and M2→L3. |
| L3, M3 | `fft2s_out_rsr` | Holds one stream's DIF result for N/2 cycles and reads it back in natural order. |
| L3, M3 | `fft2s_bf2` | Two radix-2 butterflies with their twiddle multipliers. Gives X(k), X(k+N/4), X(k+N/2) and X(k+3N/4). |
| — | `fft2s_ctrl` | Frame counter, stream phases, SW1 and SW2 modes. |
| — | `fft2s_commutator`, `fft2s_r2_stage`, `fft2s_cmul`, `fft2s_twiddle_rom`, `fft2s_pkg` | Building blocks of the MDC FFTs and shared definitions. |

The top level is `fft2s_top`.

## The schedule

Each stream delivers one sample per clock cycle. Frames of N samples follow
each other with no gap. Stream X2 starts N/2 cycles after X1. Time is
therefore cut into *windows* of N/2 cycles. In each window, each half-size FFT
receives one half-frame, as one pair every second cycle. For N = 16, counting
from X1's first sample:

| window (cycles) | L1 (X1) | M1 (X2) | SW1 | L2 DIF gets | M2 DIT gets |
|---|---|---|---|---|---|
| 0 (0–7) | loads x1(0..7) | – | – | – | – |
| 1 (8–15) | loads x1(8..15), sends evens | loads x2(0..7) | NORMAL | E-half of X1 frame 0 | (odd half of the previous X2 frame) |
| 2 (16–23) | sends odds of frame 0, loads frame 1 | sends evens | SWAP | E-half of X2 frame 0 | O-half of X1 frame 0 |
| 3 (24–31) | sends evens of frame 1 | sends odds of frame 0 | NORMAL | E-half of X1 frame 1 | O-half of X2 frame 0 |

SW1 is in SWAP mode during the first N/2 cycles of X1's frame and in NORMAL
mode during the second N/2 cycles.

The two FFTs have the same latency, so their outputs keep this pattern. SW2
is NORMAL when the DIF FFT output belongs to X1 and SWAP when it belongs to X2.
It therefore also changes mode every N/2 cycles. The controller takes SW2's mode from a stream-tag
bit that travels with the data through the FFTs. An assertion checks that the
two FFTs never hold the same stream at the same time.

The L3 unit therefore sees the DIF result of X1 frame j in one window and the
DIT result of X1 frame j in the next window, both on the same lanes v1, v2.
The following window is free, and then X1 frame j+1 comes. M3 sees the same
pattern for X2, shifted by one window.

## How the orders line up

This is the part that makes the output come out in natural order without a
separate buffer. Let M = N/2 be the half-size and `br` the bit reversal over
log2(N/4) bits.

* **Even path.** At phase n = N/2+2m, the input unit sends `(x(2m), x(2m+N/2))`,
  that is `(e(m), e(m+M/2))`. This is the natural input of a two-path DIF
  FFT. Holding `x(0), x(2), …, x(N/2-2)` until their partners arrive is the
  delay that the first butterfly needs anyway.
* **DIF output.** Step p of the DIF FFT carries `(E(br(p)), E(br(p)+N/4))`.
  The whole transform is in bit-reversed order. Even so, the two values of a
  step always differ by exactly N/4. So only the N/4 *steps* need to be
  reordered, never the lanes.
* **Odd path.** In the first half of the next frame, step p sends
  `(o(q), o(q+N/4))` with `q = br(p)`. The first and second quarter of the
  odd samples are each bit-reversed over N/4 points and sent side by side.
  This is exactly the bit-reversed input of a two-path DIT FFT.
* **DIT output.** Step k carries `(O(k), O(k+N/4))` in natural order.
* **Last stage.** The reorder registers keep the N/4 DIF steps in arrival
  order. They are read at address `br(k)` while the DIT step k passes. The
  two-parallel butterfly then forms

      X(k)      = E(k)      + W^k        O(k)
      X(k+N/2)  = E(k)      - W^k        O(k)
      X(k+N/4)  = E(k+N/4)  + W^(k+N/4)  O(k+N/4)
      X(k+3N/4) = E(k+N/4)  - W^(k+N/4)  O(k+N/4)

  for k = 0, 1, …, N/4-1, in that order.

## Input unit: one frame in N/2 registers

Each input unit (`fft2s_in_dc`) has N/2 data registers, called slots. Exactly
N/2 samples are waiting at any time:

* In the first half of a frame, one odd pair of the previous frame leaves
  every second cycle. Its two slots take the even sample and the odd sample
  that arrive in those two cycles.
* In the second half of a frame, each arriving even sample leaves at once,
  together with its held partner. The partner's slot takes the odd sample of
  the next cycle.

Because the samples leave in bit-reversed order, the slot of a sample changes
from frame to frame. Small tables of slot numbers record it: one entry per
held even sample, and one entry per odd sample for each of the last two
frames. At reset the odd table holds the identity map, so the first frame
finds all slots free.

## The half-size MDC FFTs

Both are two-path radix-2 pipelines with log2(N/2) butterfly stages
(`fft2s_r2_stage`). Between stages there is a delay commutator
(`fft2s_commutator`). For a block of 2D steps, the commutator emits first the
pairs `(a(r), a(r+D))` and then `(b(r), b(r+D))`, for r = 0..D-1. This is a
2×2 block transpose.

* **DIF FFT.** The commutators come *after* stages 0 .. S-2, with D = M/4, M/8, …, 1.
  Stage s multiplies the difference by W_L^m, with L = M/2^s and m = step mod L/2.
* **DIT FFT.** The commutators come *before* stages 1 .. S-1, with D = 1, 2, …, M/4.
  Stage s multiplies the lower operand by W_(2^(s+1))^j, with j = step mod 2^s.

Each commutator delays lane b by D steps before a 2×2 switch, and delays the
switch's upper output by another D steps. The switch swaps during the second
half of every block of 2D input steps. This uses 2D registers, the usual count
for an MDC commutator. With the delays placed this way, the sub-transforms
leave in the order they came in (the a-group before the b-group). Because of
that, the output orders described above hold.

All delay lines shift only when a valid pair arrives. So the unit works at the
half rate it gets here: one pair every second cycle. Because of the
commutators, a frame leaves only after part of the next frame has entered. The
processor is meant for continuous streams. To get the last frame out, feed at
least one more frame, for example zeros.

## Interface and timing (`fft2s_top`)

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | transform size; a power of two, at least 8 |
| `DW` | 16 | input word length (signed, per real/imaginary part) |
| `TWW` | 16 | twiddle word length; 1.0 = 2^(TWW-2) |
| `W` (derived) | DW + log2(N) + 1 | width inside the design and of the outputs |

* Pulse `start` for one cycle. X1 sample 0 must be on `x1_re/x1_im` in the next
  cycle. X1 sample n of each frame follows n cycles later.
* X2 sample 0 must be on `x2_re/x2_im` N/2 cycles after X1 sample 0.
* Both streams then continue at one sample per cycle with no gaps.
* `y1_valid` marks a result step of X1. `y1_k` is k. `y1_re[0..3]` and
  `y1_im[0..3]` hold X(k), X(k+N/4), X(k+N/2) and X(k+3N/4). The same holds
  for `y2_*` and X2.
* Each stream gives N/4 steps per frame, one every second cycle, so a frame of
  results fills N/2 cycles. This gives a throughput of one N-point transform
  per stream every N cycles. The results of X2 come exactly N/2 cycles after
  those of X1.
* The first X1 result appears 3N/2 + 2·log2(N) cycles after the `start` pulse.
  That is 32 cycles at N = 16.
* Reset `rst_n` is asynchronous and active low. It clears every register.

**Arithmetic.** No scaling is done. The internal width has log2(N)+1 guard
bits, so full-scale inputs cannot overflow. Twiddle products are rounded to
the nearest value. With full-scale random 16-bit inputs, the testbenches
accept a deviation from the exact DFT of at most ±96 at N = 16 and ±512 at
N = 128.

## Departures from the paper and choices made here

These points follow the paper:
* the split into an N/2-point DIF FFT for even samples and an N/2-point DIT FFT
  for odd samples;
* levels L1/M1, L2/M2 and L3/M3;
* the SW1/SW2 lane mappings and their N/2-cycle alternation;
* X2 delayed by N/2 cycles;
* odd samples bit-reversed in two N/4-point halves sent in parallel;
* the even result held and bit-reversed in front of a two-parallel last-stage
  butterfly;
* the default size of 16 points.

These points are this design's own, or differ from the paper:

* **Reordering registers.** The paper builds them as shift registers with
  multiplexers. Here they are directly addressed registers, with the same
  number of data registers:
  * Each input unit holds N/2 samples. Every arriving sample is written into
    the slot that the sample just sent out left free. Small tables of slot
    numbers record where each waiting sample is. There are 2 × N/2 + N/4
    entries of log2(N/2) bits, and the odd table exists twice because one
    frame's table is read while the next frame's is written. These tables
    are extra bits that the paper's shift-register form does not need.
  * The output reorder registers hold N/4 pairs, that is N/2 samples.
* **Control.** The paper supplies the switch controls from outside. Here
  `fft2s_ctrl` generates them, and SW2 follows a stream tag.
* **SW2 timing.** The paper has SW2 in the opposite mode to SW1 at every
  moment. Here SW2 follows SW1 with the delay of the half-size FFTs,
  N/2 + 2·log2(N/2) − 2 cycles (12 at N = 16). So the two modes are opposite
  only for part of each window. The data routing is the same as in the paper.
* **Not specified in the paper, chosen here:** the word lengths, the twiddle
  format, the interface, the lane order of the outputs, the valid-gated
  pipelines, and the commutator arrangement.
* **No higher-radix variant.** The paper shows a 128-point variant built from
  two radix-2³ 64-point FFTs. It is not implemented. With `N = 128`, the same
  RTL computes 128-point transforms with radix-2 half-size FFTs.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|---|---|
| `tb_fft2s_top` | The whole processor at default parameters. It runs 8 random frames per stream and compares every result with a direct DFT in real arithmetic. It also checks the index order, the frame rate (N cycles), the N/2-cycle offset between the streams and the latency. It counts both modes and the mode changes of SW1 and SW2, the reorder-register writes, the bit-reversed reads and the odd pairs sent. |
| `tb_fft2s_top_n128` | The same checks at N = 128. |
| `tb_fft2s_mdc_dif`, `tb_fft2s_mdc_dit` | Half-size FFTs against the DFT. They also check output order, cadence, latency and stream tag. |
| `tb_fft2s_in_dc` | Every output cycle of the input unit against the expected even/odd schedule. |
| `tb_fft2s_out_rsr` | Bit-reversed readout of the stored even result. |
| `tb_fft2s_bf2` | Butterfly results against real arithmetic. |
| `tb_fft2s_switch`, `tb_fft2s_ctrl` | Lane mapping, phases and switch timing. |

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_fft2s_top rtl/fft2s_pkg.sv tb/tb_fft2s_top.sv
./obj_dir/Vtb_fft2s_top
```

Replace `tb_fft2s_top` with any other testbench name. `rtl/fft2s_pkg.sv` must
come first, because the modules import it.

**To change the size**, set `N` on `fft2s_top`. The twiddle tables are
computed at elaboration from cos/sin, so no table file needs regenerating.
