# Low-power reconfigurable memory-based FFT processor (64 to 8192 points)

This is a single-processing-element FFT engine. One radix-2/4 butterfly and three
complex multipliers work in place on a four-bank data memory. The same hardware
computes 64-, 128-, 256-, ..., 8192-point forward transforms of 16-bit complex data.
A 4-bit control code selects the size for each transform.

Power is reduced by making the twiddle-factor (coefficient) inputs of the multipliers
toggle as little as possible:

* **Modified coefficients.** The coefficients are stored only modulo a quarter turn.
  The missing factor 1, -j, -1 or j is applied after the multiplier by a
  *phase compensator*, which only swaps and negates.
* **Coefficient ordering.** In the 64-point stage, the butterflies of each group run
  in an order chosen so that successive coefficient sets differ in few bits.
* **Coefficient steering.** In the 16-point stage, each product goes to the
  multiplier that already holds its coefficient.
* **Hold.** A coefficient ROM is read only when its multiplier needs a new value.

The architecture, control codes, bank mapping, coefficient order and latency follow
the design in C.-J. Huang's master's thesis *A Low Power Reconfigurable FFT Processor
with Minimum Switching Activity* (NCTU). The microarchitecture details are this
implementation's own. Where they go beyond or depart from the thesis, this is said
below.

## Using it

Top module: `fft_top` (`rtl/fft_top.sv`). It has no parameters; the defaults are the
full 8192-point design.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous reset, active high |
| `in_valid` | in | 1 | `in_data` holds a sample |
| `in_data` | in | 32 | `{re[15:0], im[15:0]}`, two's complement, natural order n = 0..N-1 |
| `sel` | in | 4 | control code, sampled together with the first sample |
| `busy` | out | 1 | transform or read-out in progress; samples offered now are ignored |
| `out_valid` | out | 1 | `out_data` holds a result |
| `out_data` | out | 32 | `{re, im}` of X(k)/N, natural order k = 0..N-1 |

Control codes: bit 3 is the radix-2 flag, and bits 2:0 are the number of radix-4
stages plus one.

| N | 64 | 128 | 256 | 512 | 1024 | 2048 | 4096 | 8192 |
|---|---|---|---|---|---|---|---|---|
| `sel` | 0100 | 1100 | 0101 | 1101 | 0110 | 1110 | 0111 | 1111 |
| stages S | 3 | 4 | 4 | 5 | 5 | 6 | 6 | 7 |
| compute cycles S·N/4+3 | 51 | 131 | 259 | 643 | 1283 | 3075 | 6147 | 14339 |

A transform runs in three phases:

1. **Load.** N samples are written on `in_valid`. Gaps between samples are allowed.
2. **Compute.** This phase starts right after the last sample. It takes S·N/4 + 3
   cycles, and `busy` is high.
3. **Read-out.** The N results come out one per cycle. `out_valid` goes high 3 cycles
   after the compute phase ends. Counted from the clock edge that takes the last
   sample, the first result is seen S·N/4 + 6 edges later.

When the last result has been read, the engine is idle again and takes the next
transform, of any size.

**Scaling.** The output is X(k)/N. Each radix-4 stage divides by 4 and the radix-2
stage divides by 2, with rounding. The result cannot overflow for any input.

## Datapath and pipeline

```
            +----------- four banks, 2048 x 32 each, 1 read + 1 write port ----------+
            |                                                                         |
   read --> commutator 1 --> radix-2/4 butterfly --> multiplier module --> phase     --> commutator 2 --> write
   (t)      (t+1)            (registered, t+1)       3 x cmult + buffers   compensators   (t+3)
                                                     (registered, t+2)     (t+3)
                                  coefficient generator (t+1) --> ROMs of 1024/2048/1024 words (data at t+2)
```

A butterfly is issued in cycle t. Its four operands are read at the end of t and
rotated into operand order by commutator 1. The butterfly runs in t+1 and the
multipliers in t+2. In t+3 the phase compensators correct the phases, commutator 2
rotates the words back to their banks, and the results are written into the same
locations they were read from. The controller issues one butterfly per cycle.
Stages follow each other with no gap, which is where S·N/4 + 3 comes from.

There is no interlock between stages, and none is needed. With the visiting order
below, none of the first three butterflies of a stage reads a sample that the last
three butterflies of the previous stage have yet to write. This was checked for all
eight sizes. The three cycles of the pipeline are drained only before the read-out.

## Memory banks and addressing

Sample n lives in bank `SEL(n) = (n[1:0] + n[3:2] + n[5:4] + ...) mod 4`, at in-bank
address `n >> 2`. For 128, 512, 2048 and 8192 points, the single top bit counts as one
more digit. For 16 points this gives bank 0 = {0, 7, 10, 13}, bank 1 = {1, 4, 11, 14},
and so on.

A radix-4 butterfly touches samples that differ only in one base-4 digit. Their banks
are therefore `rot, rot+1, rot+2, rot+3`, where `rot` is the bank of operand 0. That is
why both commutators are plain rotations by `rot`.

A radix-2 butterfly touches samples n and n+N/2, whose banks differ by 1, because
N/2 is the lone top bit. The controller runs the butterfly on n together with the one
on n+N/4, for n < N/4. Adding N/4 sets the upper bit of the next digit down, which adds
2 to the bank. So the four samples n, n+N/2, n+N/4 and n+3N/4 again sit in banks rot,
rot+1, rot+2 and rot+3.

## Stage schedule

The flow is decimation in frequency:

1. When the radix-2 flag is set, a radix-2 stage comes first. In cycle n
   (n = 0 .. N/4-1) it processes the pairs (n, n+N/2) and (n+N/4, n+3N/4). The
   differences are multiplied by W_N^n and W_N^(n+N/4) = W_N^n·(-j).
2. Then come K = log4(N/2^flag) radix-4 stages, with spans 4^(K-1) down to 1. Within a
   stage the butterfly counter enumerates groups (outer loop) and offsets m within the
   group (inner loop). Outputs 1, 2 and 3 are multiplied by W_L^m, W_L^2m and W_L^3m,
   where L = 4 × span. The last stage (span 1) has no twiddles.
3. The read-out undoes the mixed-radix digit reversal. Result k is read from the
   location whose base-4 digits are those of k in reverse order. With the radix-2 flag,
   k = 2r + t is read from t·N/2 + digitrev(r).

Stages are named by code = log4 L: stage 011 is the 64-point stage and stage 010 the
16-point stage.

## The low-switching coefficient scheme

This is the part that differs from a textbook memory-based FFT.

**Modified coefficients and phase compensation.** Every twiddle is written as
W_8192^e, with e < 3·8192/4 in a forward DIF flow. The coefficient generator
(`fft_coef_gen`) splits it into three parts:

* `addr = e mod 2048`, the ROM word, which holds W^addr;
* `q = e div 2048`, the quadrant;
* `triv`, set when `addr == 0`, meaning no multiplier is needed.

The multiplier computes x·W^addr. The phase compensator (`fft_phase_comp`) then
multiplies by (-j)^q:

* q = 0: pass through;
* q = 1: re ← im, im ← -re;
* q = 2: negate both parts.

This shrinks the ROM to a quarter wave. It also makes many coefficients equal that
would otherwise differ, for example W16^6 = W16^2·(-j). Products with a trivial
coefficient skip the multipliers through the one-cycle buffers of the multiplier
module. Butterfly output 0 always takes that path.

**Ordering in the 64-point stage.** The 16 offsets of each 64-point group are visited
in the order 0, 8, 5, 13, 10, 2, 1, 9, 12, 4, 7, 15, 14, 6, 3, 11. In the thesis this
order was found with a greedy nearest-neighbour search over the Hamming distances
between successive modified coefficient sets. The memory addresses follow the same
order, and this costs almost no extra address-bus toggling. The order is used in
every 64-point stage, including the 64-point stage of longer transforms.

**Steering in the 16-point stage.** Only W16^1, W16^2 and W16^3 occur, and each
multiplier keeps one of them: multiplier 0 holds W16^1, 1 holds W16^2, 2 holds W16^3.

| offset m | output 1 | output 2 | output 3 |
|---|---|---|---|
| 0 | trivial | trivial | trivial |
| 1 | W^1 → mult 0 | W^2 → mult 1 | W^3 → mult 2 |
| 2 | W^2 → mult 1 | trivial (·-j) | W^2·(-j) → mult 2, reloaded with W^2 |
| 3 | W^3 → mult 2, reloaded with W^3 | W^2·(-j) → mult 1 | W^1·(-1) → mult 0 |

Offset 2 needs W16^2 twice in the same cycle, so one multiplier must change its
coefficient and change it back. That costs 2 coefficient loads per group of four
butterflies, where a fixed output-to-multiplier assignment needs 6. The thesis
states zero changes in this stage; with three multipliers, the double W16^2 makes
that impossible here. Outside the 16-point stage, output p uses multiplier p-1.

**Three ROMs of different size.** ROM 1, behind multiplier 1, holds all 2048
quarter-wave words of W_8192. ROMs 0 and 2 hold only the even words, 1024 each, as
W_4096^k. Every radix-4 twiddle exponent is even, because L is at most 4096. Odd words
are needed only in the radix-2 stage of the 8192-point transform. There the two
products of a cycle need W^n and W^n·(-j), the same word in two quadrants. Output 1
goes to multiplier 1 and output 3 to multiplier 2, and both take ROM 1's word:
`share` switches multiplier 2's coefficient input from ROM 2 to ROM 1. As a side
effect, only one ROM word changes per radix-2 cycle.

**Hold.** Each ROM keeps its output word until its multiplier needs a different
coefficient. Each multiplier's product register is clocked only when the multiplier
is used.

The measured effect (`tb_fft_switching`) counts bits toggling at the three multiplier
coefficient inputs over a whole transform. The baseline is a conventional schedule
with natural order, fixed assignment and the full-range twiddle loaded every cycle.

| N | 64 | 128 | 256 | 512 | 1024 | 2048 | 4096 | 8192 |
|---|---|---|---|---|---|---|---|---|
| reduction, this RTL | 52 % | 44 % | 41 % | 36 % | 34 % | 31 % | 29 % | 28 % |
| reduction, thesis | 59.6 % | 45.2 % | 40.6 % | 34.1 % | 31.8 % | 28.5 % | 27.1 % | 25.2 % |

The benefit shrinks with N because only the last two twiddle stages are optimised.

The reordering moves the memory addresses too. Over one 64-point stage of a 64-point
transform, the four read-address buses toggle 102 bits in the reordered order against
100 in natural order. For 128 points and up, the reordered order toggles slightly
fewer address bits than natural order. `tb_fft_switching` reports both counts.

## Numerics

* **Data:** 16 bits per part.
* **Coefficients:** 16 bits per part with 14 fractional bits (1.0 = 16384).
* **Multiplier:** the products are summed at full precision, then rounded half-up
  and saturated.
* **Butterfly:** sums are kept at 19 bits, scaled, rounded and saturated.

With 100 random patterns per size at half full scale (`tb_fft_snqr`), every result is
within 2 LSB of the exact X(k)/N. The mean square error is about 0.15 LSB² at every
size. SNQR falls from 69.7 dB (64 points) to 48.5 dB (8192 points), because the signal
shrinks by 1/N while every stage adds rounding noise.

The ROM table is built by integer arithmetic when the ROM is initialised: sin and cos
from their Taylor series in 28-bit fixed point, then rounded. No table file is needed,
and synthesis tools can evaluate it.

## Design choices that are not in the thesis

* **Scaling.** Each stage scales by 1/4 or 1/2, so the output is X/N. The thesis does
  not describe a scaling scheme; its FPGA test reduced the input amplitude for the
  largest sizes to avoid overflow.
* **ROM contents and radix-2 pairing.** The thesis lists three ROMs of 1024, 2048
  and 1024 words, but gives neither their contents nor which radix-2 butterflies run
  together. The full-size ROM plus two even-word ROMs, and the (n, n+N/4) pairing
  that makes this split work, are this design's reconstruction.
* **Word format.** Data is packed `{re, im}` into 32 bits. Coefficients use 14
  fractional bits.
* **Read-out.** Results come out in natural order. The input handshake uses
  `in_valid` only, and `busy` is an added output.
* **16-point stage.** Steering costs 2 coefficient reloads per group; the thesis
  states zero (see above).
* **Forward only.** Only the forward transform is built; no inverse mode is described.
* **Memory model.** The memories are plain arrays: a simple dual-port RAM with
  synchronous, read-before-write read. A chip would map them to SRAM macros.

## Files

| file | contents |
|---|---|
| `rtl/fft_pkg.sv` | types, sizes, bank map, control-code helpers |
| `rtl/fft_top.sv` | top level, wiring of the datapath |
| `rtl/fft_controller.sv` | load/compute/read-out sequencing, addresses, stage schedule, butterfly order |
| `rtl/fft_memory.sv`, `rtl/fft_ram_bank.sv` | four-bank data memory |
| `rtl/fft_addr_map.sv` | bank select and in-bank address of four operands |
| `rtl/fft_commutator.sv` | rotation between bank order and operand order |
| `rtl/fft_butterfly.sv` | radix-4 / dual radix-2 butterfly with scaling |
| `rtl/fft_coef_gen.sv` | twiddle exponents, modified coefficients, steering, ROM read control |
| `rtl/fft_coef_rom.sv` | quarter-wave twiddle ROM |
| `rtl/fft_mult_module.sv`, `rtl/fft_cmult.sv` | three complex multipliers, multiplexers, bypass buffers |
| `rtl/fft_phase_comp.sv` | multiply by 1, -j, -1, j |

Testbenches in `tb/` are self-checking. Each prints `TB_RESULT checks=N failures=M`.

* One testbench per module, `tb_<module>.sv`.
* `tb_fft_top` runs all eight sizes at full size against a double-precision DFT. It
  checks the cycle counts, the size switching and a reset in the middle of a
  transform, and counts every mechanism used.
* `tb_fft_snqr` runs 100 random patterns per size and reports the error.
* `tb_fft_switching` is the coefficient-toggle workload described above.

To simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/fft_pkg.sv tb/tb_fft_top.sv --top-module tb_fft_top
./obj_dir/Vtb_fft_top
```

Each run takes a few seconds. The memories and registers that are read are either
reset or written before use, so the results do not depend on the initial random
state.
