# A one-adder DCT/IDCT processor core

This core computes the 8x8 two-dimensional discrete cosine transform (DCT)
and its inverse (IDCT) for image and video coding (JPEG, H.263, MPEG). It has
no multiplier. All the arithmetic goes through one 16-bit adder/subtractor
with a 0-3 bit shifter in front of one operand:

    BUS = (RA >> s) ± RB

All the knowledge of the transform sits in the controller. The controller is
a counter that drives a combinational circuit. Each cycle, that circuit picks
the operands, the shift, add or subtract, and the RAM address. Three ideas
keep the operation count low:

* **Direct 2-D algorithm.** A row-column method needs sixteen 1-D transforms
  for an 8x8 block. This core needs eight, plus some additions before or
  after them. The irregular data order this causes is absorbed by address
  generation, not by wiring.
* **Adder-based distributed arithmetic (DA).** Every constant coefficient is
  written in signed digits (canonical signed digit, CSD). An inner product
  `sum c_j u_j` is then rebuilt column by column. Each digit column is a
  small signed sum of inputs. The columns are combined from the least
  significant one upwards, with `acc = (acc >> s) ± column`.
* **Common subexpression sharing.** A digit column that occurs in several
  outputs, possibly with the opposite sign, is computed once, stored, and
  reused, wherever storing it saves cycles.

The RTL is SystemVerilog 2017. It is synthesizable, and it lints clean of
errors in Verilator and in slang.

## Block diagram

```
              +-------------------+      +--------------------------------+
 start ------>|  dct_controller   |--+   |          dct_datapath          |
 inverse ---->|  idct_controller  |  |   |  RAM/BUS -> MUX -> RA -> SHIFT -+--> ADD/SUB --> BUS
              |  counter + comb.  |  |   |  RAM/BUS -> MUX -> RB ---------+         |
              +-------------------+  |   +--------------------------------+         |
                        ctl (18 b)   +----> MUX_A/B, Latch_A/B, Reset_A/B,          |
                                     |      Shift, ADD/SUB                          |
                                     +----> RAM_Addr, Read/Write                    |
                                            +--------------------+                  |
 host port (when idle) -------------------->|  dct_ram 256 x 16  |<-----------------+
                                            |  one port          |----> read data to both MUXes
                                            +--------------------+
```

There is one control word per cycle (`dct_pkg::ctrl_t`). Its fields are the
control lines of the datapath:

| field | meaning |
|---|---|
| `addr` | RAM address |
| `ram_we` | write BUS into `RAM[addr]` (otherwise read) |
| `mux_a`, `mux_b` | register source: 0 = RAM read data, 1 = BUS |
| `latch_a`, `latch_b` | load the register |
| `reset_a`, `reset_b` | clear the register (wins over the load) |
| `shift` | RA is shifted right (arithmetic shift) by 0..3 bits |
| `sub` | 1: BUS = (RA>>s) − RB, 0: BUS = (RA>>s) + RB |

The RAM has one port. In a given cycle the core reads one word (and latches
it into RA and/or RB) or writes BUS, never both. BUS can be latched back into
RA or RB in the same cycle. That is how a running sum stays in RA without
touching the RAM.

Only RA passes through the shifter, and only RB can be subtracted. So the
accumulator always lives in RA and the term in RB. This is the "version 2"
shifter placement: shifter before the adder. With the shifter after the
adder, many shift-add steps would need an extra cycle.

## The direct 2-D algorithm, as addresses

Let θ = π/16, and let `F(k,l) = Σm Σn x(m,n) cos((2m+1)kθ) cos((2n+1)lθ)`.
For transform index i = 0..7, pair row m with column n = p(i,m), where
`(2n+1) ≡ ±(2i+1)(2m+1) (mod 32)`. For each fixed i this pairing picks one
sample from each row. Over the eight values of i it covers the whole block
exactly once. The product-to-sum identity then gives

    F(k,l) = ½ Σi [ C_i(k + (2i+1)l) + C_i(k − (2i+1)l) ]

C_i is the ordinary 8-point 1-D DCT of the sequence `z_i(m) = x(m, p(i,m))`.
Every frequency folds back onto 0..7:

* C(−r) = C(r)
* C(16 − r) = −C(r)
* C(8) = 0

The pairing has one more property: p(7−i, m) = 7 − p(i, m). So transforms
i and 7−i read the two ends of the same row pair, and a butterfly in front
of them halves the work. Write S_i and D_i for the 1-D DCTs of
`z_i + z_{7−i}` and `z_i − z_{7−i}` (i = 0..3). Frequency `(15−2i)l` equals
`16l − (2i+1)l`, so C_{7−i} enters with sign (−1)^l, and

    F(k,l) = ½ Σ_{i<4} [ W_i(k + (2i+1)l) + W_i(k − (2i+1)l) ]

with W = S for even l and W = D for odd l.

**DCT (`dct_controller`).** The controller runs in three phases.

* **Butterfly phase (i, m, t), 128 cycles.** For i = 0..3 and each row m,
  with n = p(i,m), the core reads x(m,n) into RA and x(m,7−n) into RB. It
  writes the sum back to x(m,n) and the difference to x(m,7−n). That is
  four cycles per pair on the one-port RAM.
* **1-D phase (blk, step).** This phase runs eight 1-D DCTs. The 1-D
  microprogram uses virtual operands: "input m", "result q" and "scratch j".
  The address generator maps "input m" of transform `blk` = i < 4 to the
  sum at `8*m + p(i,m)`. For `blk` = 4+i it maps to the difference at
  `8*m + 7 − p(i,m)`. It maps "result q" to `V_blk(q)` at `64 + 8*blk + q`.
* **Post-addition phase (k, l, t).** Each output takes 9 cycles. In cycle
  0, RA is cleared and the first term is fetched. In cycles 1 to 8, one term
  is added or subtracted per cycle and the next term is fetched. A term that
  folds to C(8) clears RB instead of reading. In the last cycle the sum is
  written over x(k,l), so the transform works in place.

**IDCT (`idct_controller`).** This is the same identity run backwards.

* **Pre-addition phase (b, q, t).** For b = i (even l) and b = 4+i (odd
  l), i = 0..3, it forms `G_b(q) = Σ ±Y(k,l)` over all (k, l of that
  parity, ±) whose folded frequency is q. This is the transpose of the
  post-addition. The address generator scans 16 candidate slots per G. A
  slot is one of the four l, times the sign ±, times residue +q or −q. At
  most one k in 0..7 matches each slot. Empty slots clear RB.
* **1-D phase.** Eight inverse 1-D transforms compute
  `2·Σq G_b(q)·½cos((2m+1)qθ)`. Transform i writes this even part E to
  `x(m, p(i,m))`. Transform 4+i writes the odd part O to `x(m, 7 − p(i,m))`.
* **Butterfly phase, 128 cycles.** The same butterflies as the DCT's first
  phase: `x(m,n) = E + O = z_i(m)` and `x(m,7−n) = E − O = z_{7−i}(m)`.

## The 1-D microprogram: digits, columns, sharing

The microprograms `DCT1D_PROG` and `IDCT1D_PROG` are not stored as data.
The package builds them at elaboration (`dct_pkg::gen_prog`) from seven
constants, c(i) = ½cos(iπ/16) as 16-bit fractions:

| i | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|
| c(i) | 7D8A | 7641 | 6A6D | 5A82 | 471C | 30FB | 18F8 |

The forward transform splits into an even half and an odd half:

* Even half: `V(0,4,2,6)` from `u_m = z(m) + z(7−m)`.
* Odd half: `V(1,3,5,7)` from `w_m = z(m) − z(7−m)`.

Each half is a 4x4 constant matrix. For each half the generator does four
things:

1. It recodes every coefficient in non-adjacent form (CSD). The forward
   transform uses c/2 and the inverse uses c. The DC row uses ½ in place of
   c(4), so the e(0) normalisation is not folded into the 1-D transform. That
   normalisation is needed by the 2-D identity.
2. For each output and each digit weight 2^−k, it takes the column of four
   digits over the four inputs. It normalises the sign of the column so that
   the first non-zero digit is +1.
3. It computes each distinct column (up to sign) once into a scratch word.
   A column with c non-zero digits costs c+1 cycles: c reads plus one write.
   The running sum stays in RA and is fed back from BUS. A single-digit
   column needs no work, because it is just an input. Storing pays off only
   for columns that are reused. A column used n times costs c + 1 + n
   cycles when stored, and n·c cycles when its inputs are added straight
   into the accumulator. The generator stores it only when that is
   cheaper, i.e. when (n − 1)(c − 1) ≥ 2.
4. It accumulates each output starting from the least significant column.
   Cycle 0 clears RA and fetches the first column into RB. Each later cycle
   computes `RA ← (RA >> s) ± RB` and fetches the next column, or the next
   input of a column that is not stored (with s = 0). A gap over 3
   bits is bridged by extra steps of 3 bits against a cleared RB. A final
   right shift brings the result to its weight, and the last cycle writes it.

The inverse runs the halves on G, leaves E(m) and O(m) in scratch, and ends
with the butterflies `z(m) = E + O` and `z(7−m) = E − O`. Its final scaling
shift stops one bit early, so its outputs carry a gain of 2. This is one
extra fraction bit at no cost in cycles.

With the default table the lengths are:

* 1-D DCT: 168 cycles.
* 1-D IDCT: 184 cycles.

Changing `CTAB` (or the recoding) changes the programs, and their lengths
follow automatically (`DCT1D_LEN`, `IDCT1D_LEN`).

## Number formats and precision

All words are 16-bit two's complement. Write X for the orthonormal DCT
coefficient and `e(0) = 1/√2`, `e(k>0) = 1`.

| | word at address | contents |
|---|---|---|
| DCT input | 8m+n | 4·x(m,n): 2 fraction bits, \|x\| ≤ 255 |
| DCT output | 8k+l | 2·F(k,l) = 8·X(k,l) / (e(k)e(l)) |
| IDCT input | 8k+l | 4·e(k)e(l)·X(k,l): the dequantised coefficient with its weights, 2 fraction bits |
| IDCT output | 8m+n | 32·x(m,n): 5 fraction bits |

The DCT output carries no e(k)e(l) factor. A quantiser normally absorbs that
factor. The IDCT expects the factors already applied.

For the DCT, these scales keep every intermediate value inside 16 bits for
|x| ≤ 255:

* row butterfly outputs ≤ 2040;
* column sums ≤ 16320;
* accumulators < 32640 (less than twice the largest column);
* post-addition sums ≤ 32640.

For the IDCT there is no such proof at this scale. The testbench runs the
extreme blocks without overflow: constant ±255, the ±255 checkerboard,
stripes and random ±255 signs. So does the IEEE 1180 style set with inputs
in [−300, 300] and coefficients clipped to ±2048. The scale was chosen for
precision. With integer input words and a 4·x output the peak error was 2
pixels, and the mean errors were ten times larger.

Accuracy, measured by the end-to-end testbench against floating point:

* **DCT:** the largest error is 7 output words, which is less than one
  orthonormal unit. It comes mostly from truncating right shifts. The
  testbench allows 10 words.
* **IDCT:** the largest error is 4 words, i.e. 1/8 pixel. Rounded pixels
  come back exactly. The testbench allows 8 words.

IDCT accuracy by the IEEE 1180 procedure (`tb_idct_precision`):

* 10,000 random blocks per set.
* Pixel ranges [−256, 255], [−5, 5] and [−300, 300], each also negated.
* Coefficients are computed in double precision, rounded and clipped.
* Output pixels are `(w + 16) >> 5`.

| item | limit | worst of the six sets |
|---|---|---|
| ppe, peak error | ≤ 1 | 1 |
| pmse, worst per-pixel mean square error | ≤ 0.06 | 0.040 |
| omse, overall mean square error | ≤ 0.02 | 0.030 (**not met**) |
| pme, worst per-pixel mean error | ≤ 0.015 | 0.034 (**not met**) |
| ome, overall mean error | ≤ 0.0015 | 0.0003 |

The two misses come from a small negative bias. Every right shift
truncates, and positions written as E + O collect the bias of both halves.
A rounding shifter was tried and made the bias positive and larger, so the
datapath keeps plain truncation.

## Timing and interface (`dct_core`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | start a transform (ignored while busy) |
| `inverse` | in | 1 | sampled with `start`: 0 DCT, 1 IDCT |
| `busy` | out | 1 | transform running; host RAM accesses are ignored |
| `done` | out | 1 | one-cycle pulse when the results are in RAM |
| `host_we`, `host_addr`, `host_wdata` | in | 1, 8, 16 | host write port (used when idle) |
| `host_rdata` | out | 16 | combinational read of `RAM[host_addr]` |

To run a transform:

1. Write the 64 block words at addresses 0..63.
2. Pulse `start`, with `inverse` set as needed.
3. Wait for `done`.
4. Read addresses 0..63.

`done` rises `DCT2D_CYCLES + 1` edges after the edge that sampled `start`
(`IDCT2D_CYCLES + 1` for the IDCT). The cycle counts are:

| | cycles | 1-D part | addition part |
|---|---|---|---|
| DCT | 2048 | 8 × 168 | 128 butterflies + 64 × 9 post-additions |
| IDCT | 2688 | 8 × 184 | 64 × 17 pre-additions + 128 butterflies |

RAM map: words 0-63 hold the block (input, then result), words 64-127 hold
`V_b(q)` or `G_b(q)`, and scratch words start at 128.

## Where this RTL departs from the published design

The published design describes the datapath, the controller style, the
coefficients and the techniques. It does not print the firmware of either
controller. The microprograms, the post-/pre-addition order, the RAM map,
the number formats and the handshake are therefore this implementation's
own. Specific differences:

* **Cycle counts.** The published schedule needs 121 cycles per 1-D DCT and
  1208 per 2-D DCT. The IDCT needs 119 and 1192. The published schedule
  uses hand-tuned scheduling, general (not strictly canonical) signed
  digits, and butterfly stages with 240 additions. This core needs 168 / 2048
  and 184 / 2688. As a result, one core at 33 MHz does **not** meet the
  H.263 QCIF DCT+IDCT budget of 84.2 µs per block (4736 cycles = 144 µs);
  it needs about 57 MHz for that. The digital still camera case, which has
  no deadline, runs as is.
* **Coefficient scaling.** The coefficients are c(i) = ½cos(iπ/16), not the
  √2-scaled ones that share slightly better. In the direct 2-D form only one
  1-D pass is made, so a √2 factor could not be removed by a shift.
* **Butterfly stages.** Only the first butterfly stage (the one in front of
  the 1-D transforms) is built. After it, the post-addition sums 8 folded
  terms per output. It does not use the later tree of butterfly stages.
* **The IDCT algorithm** is this implementation's inverse of its own DCT
  algorithm.
* **IDCT precision.** The published design reports meeting all five IEEE
  1180 limits. This core meets three. It misses the overall mean square
  error and the per-pixel mean error (see the precision table above).
* **Multi-datapath scaling.** The scaled-up variants with 2 or 8 datapaths
  sharing one RAM bus are not built.
* **Shift splitting.** Shift splitting (shifts longer than 3 bits done in
  3-bit steps) is implemented in the generator. It never occurs with the
  default coefficient table.

## Files

| file | contents |
|---|---|
| `rtl/dct_pkg.sv` | control word, RAM map, coefficient table, index mappings, microprogram generator |
| `rtl/dct_datapath.sv` | RA/RB, MUXes, shifter, adder/subtractor |
| `rtl/dct_ram.sv` | 256 x 16 one-port RAM, asynchronous read |
| `rtl/dct_controller.sv` | DCT counter + combinational circuit + address generator |
| `rtl/idct_controller.sv` | IDCT counter + combinational circuit + address generator |
| `rtl/dct_core.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_idct_precision.sv` | IEEE 1180 style IDCT accuracy run on the full core |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog guards against hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dct_pkg.sv tb/tb_dct_core.sv --top tb_dct_core
./obj_dir/Vtb_dct_core
```

Replace `tb_dct_core` with `tb_dct_datapath`, `tb_dct_ram`,
`tb_dct_controller` or `tb_idct_controller` for the unit tests. Use
`tb_idct_precision` for the IEEE 1180 style accuracy run, which takes
about a minute and a half.

* **`tb_dct_core`** runs 30 DCT and 30 IDCT blocks at full size in well
  under a second. It checks every output against floating point, checks the
  exact cycle counts and the busy lockout, and counts each mechanism
  (shared-column reuse, zero terms, BUS feedback, subtraction).
* **The controller testbenches** check the control streams against rules
  derived independently:
  * the one-port rule;
  * every input read once, and every result written once;
  * the input permutation;
  * the exact signed term multiset of each post- or pre-addition.
* **`tb_dct_datapath`** replays the two-cycle shifter example and random
  control words against a model.
