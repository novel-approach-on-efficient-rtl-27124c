# 2-D 9/7 discrete wavelet transform: bit-parallel and digit-serial processors

This RTL computes the multi-level 2-D discrete wavelet transform (DWT) of an
image with the 9/7 biorthogonal filter pair used by JPEG2000. It has two
processors with the same interface:

* **Bit-parallel (BP).** Built for speed. A five-stage pipeline in fixed point
  takes one sample pair per clock.
* **Digit-serial (DS).** Built for area. It computes the same transform on
  radix-2 signed digits, one digit per clock, most significant digit first.
  Its precision is chosen per transform at run time: the number of digits
  spent on each word changes with it.

Both are built around the *flipping structure* of the lifting 9/7 transform.
Each lifting step is divided by its own coefficient, so every pipeline stage
has at most one constant multiplier on its path. The top level, `dwt2d_top`,
places the two processors side by side. Each has its own ports.

Default size: a 512 x 512 image of 8-bit pixels and up to seven decomposition
levels (`MAX_LEVELS = 7`). The number of levels (1..MAX_LEVELS) and, for the
digit-serial processor, the precision (2..14 fraction digits) are chosen at
run time, when a transform starts.

## The arithmetic: flipped lifting

The 9/7 lifting factorisation uses α = -1.586134342, β = -0.05298011854,
γ = 0.8829110762, δ = 0.4435068522 and ζ = 1.149604398. Call the even
samples s0 and the odd samples d0. The lifting steps are:

    d1[n] = d0[n] + α (s0[n] + s0[n+1])      s1[n] = s0[n] + β (d1[n-1] + d1[n])
    d2[n] = d1[n] + γ (s1[n] + s1[n+1])      s2[n] = s1[n] + δ (d2[n-1] + d2[n])
    low[n] = ζ s2[n]                          high[n] = d2[n] / ζ

In the flipped form, every intermediate value is scaled. The scale factors
also carry powers of two, which keep the multipliers inside (-1, 1):

    d1'[n] = C0 d0[n] + s0[n] + s0[n+1]                 C0 = 1/α             = -0.6304636206
    s1'[n] = C1 s0[n] + (d1'[n-1] + d1'[n]) / 16        C1 = 1/(16 αβ)       =  0.7437502472
    d2'[n] = C2 d1'[n] + (s1'[n] + s1'[n+1]) / 2        C2 = 1/(32 βγ)       = -0.6680671710
    s2'[n] = C3 s1'[n] + (d2'[n-1] + d2'[n]) / 2        C3 = 1/(4 γδ)        =  0.6384438531
    high[n] = C4 d2'[n]                                 C4 = 32 αβγ / ζ      =  2.065244244
    low[n]  = C5 s2'[n]                                 C5 = 64 αβγδζ        =  2.421021152

The divisions by 16 and 2 are free: they are wiring in the BP datapath and a
change of digit weight in the DS datapath. `dwt_pkg` holds the constants.
Each datapath quantises them to its own fraction widths:

| constant | BP fraction bits | DS fraction digits |
|----------|------------------|--------------------|
| C0       | 15               | 16                 |
| C1       | 18               | 15                 |
| C2       | 14               | 17                 |
| C3       | 19               | 18                 |
| C4       | 12               | 16                 |
| C5       | 12               | 18                 |

C4 and C5 have 12 fraction bits in BP. That rounding dominates the BP error:
about 2^-12 of the value.

## Bit-parallel engine (`bp_dwt97_1d`)

Pair k = (x[2k], x[2k+1]) enters in one cycle. The stages evaluate the
equations above one word behind one another:

| stage | computes |
|-------|----------|
| 0 | input register |
| 1 | d1'[k-1] = C0 x[2k-1] + x[2k-2] + x[2k] |
| 2 | s1'[k-1] = C1 x[2k-2] + (d1'[k-2] + d1'[k-1]) >>> 4 |
| 3 | d2'[k-2] = C2 d1'[k-2] + (s1'[k-2] + s1'[k-1]) >>> 1 |
| 4 | s2'[k-2] = C3 s1'[k-2] + (d2'[k-3] + d2'[k-2]) >>> 1 |
| 5 | low[k-2] = C5 s2'[k-2], high[k-2] = C4 d2'[k-2] |

Each "previous word" operand is simply the stage register's value from the
previous cycle. The pipeline therefore advances every cycle, and the pairs of
one line must arrive on consecutive cycles. The result that leaves with pair
k's tag is (low, high)[k-2], six clock edges after pair k was sampled.

Words are two's complement with 19 fraction bits. Inside the engine there
are 3 extra integer bits, and products are truncated to 19 fraction bits.

## Digit-serial engine (`ds_dwt97_1d`)

This is the hardest part of the design.

### Digits and word slots

A digit is -1, 0 or +1, coded on two bits: `10` = -1, `00` = 0, `01` = +1.
A two's complement word is already a signed-digit number: the sign bit is
digit -1 and every other set bit is digit +1. `sd_serializer` therefore only
picks bits, most significant first.

Time is divided into **word slots** of `iter` cycles (the iteration count).
One sample pair enters per slot, in the cycle where `in_ready` is high (the
last cycle of a slot). During the next slot every stage works on that word,
one digit per cycle.

Every digit stream inside the engine keeps the same slot boundaries. Streams
differ only in the weight of the digit in a slot's cycle 0, written 2^H: the
digit in cycle t weighs 2^(H-t). The whole datapath is built on this rule:

* **On-line adder** (`sd_online_adder`). It implements the recurrence
  W = 2R + (x+y)/4 and picks the digit z = round(W), which leaves the
  residual R = W - z.
  * |R| <= 1/2, so a digit in {-1, 0, 1} always suffices and the residual
    stays 5 bits wide.
  * The output digit weighs 4 times the input digit of the same cycle, and it
    is then registered. In all, the output stream has H + 3.
* **On-line constant multiplier** (`sd_const_mult`). It uses the same
  recurrence with the summand x·C·2^-(CIB+1), where |C| < 2^CIB. The
  constant is held in parallel. The output stream has H + CIB + 2: that is
  H + 2 for C0..C3 and H + 4 for C4 and C5.
* **Power-of-two scaling.** Dividing by 16 or 2 just lowers H. It costs
  nothing.
* **Alignment** (`sd_align`). Two operands of an addition must have the same
  H. The one with the smaller H is delayed by the difference, and the digits
  that would cross into the next slot are dropped.
* **One-word delay** (`cfg_shift_reg`). The z^-1 neighbour terms are delays of
  exactly one slot. The shift register length is set at run time to `iter`,
  so the delay follows the word length when the precision or the level
  changes.

Every on-line unit restarts its recurrence in a slot's first cycle. It forces
its output to 0 in that cycle, because the register still holds the previous
word's last digit. Nothing leaks from one word into the next. What falls past
the end of a slot is truncated.

### The nine stages

Let h = in_ib - 1, where in_ib is the number of integer digits of the input
word. The H of each stream (listed as h + n) is:

| stage | multiply path | add path |
|-------|---------------|----------|
| 1 | M0 = C0·o[k-1] (h+2) | A0 = e[k-1] + e[k] (h+3) |
| 2 | d1'[k-1] = align(M0, 1) + A0 (h+6) | |
| 3 | M1 = C1·e[k-1] (h+2) | A1 = (d1'[k-2] + d1'[k-1]) / 16 (h+5) |
| 4 | s1'[k-1] = align(M1, 3) + A1 (h+8) | |
| 5 | M2 = C2·d1'[k-2] (h+8) | A2 = (s1'[k-2] + s1'[k-1]) / 2 (h+10) |
| 6 | d2'[k-2] = align(M2, 2) + A2 (h+13) | |
| 7 | M3 = C3·s1'[k-2] (h+10) | A3 = (d2'[k-3] + d2'[k-2]) / 2 (h+15) |
| 8 | s2'[k-2] = align(M3, 5) + A3 (h+18) | |
| 9 | low = C5·s2' (h+22) | high = C4·d2' (h+17) |

`sd_to_twos` accumulates each output stream over the slot (A = 2A + d). In
the slot's last cycle it shifts the result into the 19-fraction-bit word
format, with shift = 19 + H - (iter - 1). The output pair appears one cycle
after the slot ends, tagged like the BP engine: pair k's tag comes with
(low, high)[k-2].

### Precision and word length

The low-pass output keeps iter - h - 23 fraction digits. The controller
derives `iter` for every pass from the requested precision:

    iter = in_ib - 1 + 23 + precision        (capped at ITER_MAX = 2·MAX_LEVELS + 40 = 54)
    in_ib = 2 + pass                         (pass = 2·level + direction)

Inputs start with 2 integer digits: a sign and a guard digit. They gain one
integer digit per 1-D pass. At precision 8 the word length therefore grows
from 32 cycles (level 1 rows) to 39 cycles (level 4 columns). This is how
the DS processor trades time for precision at run time.

## 2-D processor (`dwt2d_proc`, `dwt2d_ctrl`, `frame_mem`)

### Passes and memories

A transform of L levels is 2L passes: rows, then columns, of the current
low-low band. Two image-sized memories are used alternately:

* Row passes read memory A and write memory B.
* Column passes read B and write A.

A pass therefore never overwrites samples it has yet to read, and the result
always ends in A. The result uses the Mallat layout:

* the last level's LL band is in the top-left corner;
* each level's HL band is to its right, LH below it and HH on the diagonal.

### Line feed and edges

Each line of length L is sent as L/2 + 4 pairs, covering positions -4 to
L+3. Both ends use whole-sample symmetric extension: x[-j] = x[j] and
x[L-1+j] = x[L-1-j]. Feeding the extended line through the pipeline gives
exactly the symmetrically extended transform. The first four results of
each line are discarded.

Lines need L >= 8, so the deepest level of an N x N image needs N >> (levels-1) >= 8.

### Engine handshake and results

One pair register sits between memory and engine. It follows a valid/ready
handshake:

* The BP engine is always ready.
* The DS engine is ready once per slot.

Each pair carries the tag {line, m}. A result tagged m (with m >= 4) is
written as follows: low to position m-4, high to position L/2 + m-4.

A pass ends when its L·L/2 result pairs are written. An assertion checks
that no more arrive.

### Interface (per processor)

| port | dir | meaning |
|------|-----|---------|
| `load_en`, `load_addr`, `load_pixel[7:0]` | in | while idle: write pixel row*N+col, stored as pixel/256 |
| `start` | in | one-cycle pulse; samples `levels` (1..MAX_LEVELS) and `precision` (DS) |
| `busy`, `done` | out | busy during the transform; done pulses once at the end |
| `rd_addr` → `rd_data` | in/out | while idle: coefficient, 34-bit two's complement, 19 fraction bits, one cycle later |

### Timing

| processor | cycles per line | 512 x 512, four levels |
|-----------|-----------------|------------------------|
| BP | L/2 + 4 | 355,905 cycles (5.6 ms at 64 MHz) |
| DS | (L/2 + 4) · iter | 11.8 M cycles at precision 8 (22.5 ms at 524 MHz) |

Seven levels of the same image take 357,745 cycles on the BP processor and
about 14.0 M cycles on the DS processor at precision 14.

## Number formats

* Stored samples are DATA_W = 2·MAX_LEVELS + 1 + 19 bits, 34 by default:
  15 integer bits (the sign and a guard bit included, plus one bit of growth
  per 1-D pass) and 19 fraction bits. A smaller MAX_LEVELS narrows the
  memories and the datapath accordingly.
* The DS serializer sends only `in_ib` integer digits. The bits above them
  must be sign extension, which the per-pass digit count guarantees for
  8-bit images at every level.

## Choices made in this implementation

These points are not fixed by the original design description. This RTL
chooses them:

* **Memory.** The memory organisation (two ping-pong frame memories with two
  read and two write ports) and the Mallat output layout.
* **Edges.** Symmetric extension at the line ends.
* **Transposition.** The original design shrinks the buffer between the row
  and column filters with a parallel scanning order whose details are not
  specified. Here every pass goes through a full frame memory instead, so the
  2-D transform needs two N x N memories rather than a small transposing
  buffer.
* **Handshake.** The valid/ready handshake between controller and engine.
* **Word widths.** One internal word width for all levels. The original
  analysis sizes each signal per level.
* **Selection rule.** The on-line adder and multiplier use a two's
  complement residual with round-to-nearest digit selection. No particular
  carry-free cell design is followed.
* **Converter.** The DS output converter is a shift-and-add accumulator.
* **Word length.** The slot bookkeeping gives longer words than the published
  iteration counts (32–39 against 25–28 at precision 8). Its digit growth per
  stage is larger than that of a fully optimised design.
* **DS coefficients.** Their fraction digits are derived from the published
  digit counts, minus one integer digit (C0..C3) or three (C4, C5).
* **Levels.** The hardware is sized for the deepest run-time configuration,
  seven levels, so four-level transforms leave the top bits of each word
  unused.

## Accuracy

These errors come from the tests, against a double-precision model. The
model uses the unflipped lifting steps with symmetric extension.

| case | maximum absolute error |
|------|------------------------|
| BP, 512 x 512, four levels | 1.0e-3 (coefficients up to about 16) |
| DS, precision 8, same image | 1.9e-2 |
| BP, 512 x 512, seven levels | 8.2e-3 (coefficients up to about 64) |
| DS, precision 14, same image | 1.9e-2 |
| DS, 32 x 32, three levels, precision 13 | 7e-4 |

The bit-parallel error grows with depth because the final scale factors C4 and
C5 carry only 12 fraction bits: their relative error (about 1e-4) is applied
to low-low coefficients that reach 64 at level seven.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The packages must come first:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt2d_full.sv --top-module tb_dwt2d_full
    ./obj_dir/Vtb_dwt2d_full

The testbenches:

| testbench | what it runs | run time |
|-----------|--------------|----------|
| `tb_dwt2d_full` | both processors at full size: 512 x 512, four levels, DS at precision 8 | about 12 s |
| `tb_dwt2d_levels7` | both processors at full size: 512 x 512, seven levels, DS at precision 14 (51 iterations in the deepest pass) | about 15 s |
| `tb_dwt2d_top` | both processors on 32 x 32, three levels, DS at two precisions; counts edge mirroring, direction and level switches, ping-pong, DS back-pressure and iteration changes | short |
| `tb_dwt2d_proc`, `tb_dwt2d_ctrl` | the processor and the controller; the controller test uses a lazy-wavelet stand-in engine with random stalls | short |
| one per arithmetic block | BP and DS engines, serializer, on-line adder and multiplier, converter, configurable shift register, memory | short |

`tb/dwt_ref_pkg.sv` holds the floating-point reference model.

## Files

| file | contents |
|------|----------|
| `rtl/dwt_pkg.sv` | constants, digit coding, per-pass digit and iteration formulas |
| `rtl/dwt2d_top.sv` | both processors |
| `rtl/dwt2d_proc.sv` | one processor: controller, memories A and B, engine |
| `rtl/dwt2d_ctrl.sv` | pass sequencing, addressing, symmetric extension, write-back |
| `rtl/frame_mem.sv` | 2-read/2-write sample memory |
| `rtl/bp_dwt97_1d.sv` | bit-parallel flipped 9/7 pipeline |
| `rtl/ds_dwt97_1d.sv` | digit-serial flipped 9/7 pipeline |
| `rtl/sd_serializer.sv` | word to signed digits |
| `rtl/sd_online_adder.sv` | on-line adder |
| `rtl/sd_const_mult.sv` | on-line constant multiplier |
| `rtl/sd_align.sv` | in-slot digit delay |
| `rtl/cfg_shift_reg.sv` | run-time-length shift register, the one-word delay |
| `rtl/sd_to_twos.sv` | signed digits back to a word |
