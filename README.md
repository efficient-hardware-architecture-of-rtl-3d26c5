# η_T pairing accelerator over GF(3^m)

This is an accelerator for the η_T (eta-T) Tate pairing on a supersingular elliptic curve
y² = x³ − x + b over a field of characteristic three. A pairing has two halves:

1. **Miller's loop.** It takes the points P and Q to an element F of the extension
   field GF(3^6m).
2. **Final exponentiation.** It raises F to M = (3^6m − 1)/N, where
   N = 3^m + 1 + μb·3^((m+1)/2).

Each half gets its own coprocessor, and the two run as a pipeline. While the
final-exponentiation unit works on pairing k, the Miller unit already computes pairing k+1.

- The Miller unit is a fixed-function datapath with one pipelined GF(3^m) multiplier. It is
  scheduled so that the multiplier takes a new operand pair in every cycle of the loop.
- The final-exponentiation unit is a small programmable engine:
  - three pipelined multipliers;
  - a four-input signed adder;
  - an iterating cubing unit;
  - a data memory with two read ports.

  It runs an instruction list loaded by the host.

A host reaches both units through an AHB-Lite slave port.

The default field is GF(3^97) with the trinomial x^97 − x^12 + 1 (that is, x^97 + x^12 + 2) and
b = 1. This is the configuration of the reference test chip. The RTL is parameterised in m, the
trinomial's middle exponent n, b and the multiplier digit size D. The same RTL therefore
describes, for example, the 126-bit-security field GF(3^709) with x^709 − x^117 + 1 and b = −1.

## Arithmetic building blocks

**Trits.** Every element of GF(3) is two bits {h,l}: 0 = 00, 1 = 01, 2 = 10. 11 is never produced.
- Addition is the six-gate formula t = (a_l | b_h) ^ (a_h | b_l), c = {(a_l | b_l) ^ t, (a_h | b_h) ^ t}.
- Negation swaps the two bits.

An element of GF(3^m) is `logic [M-1:0][1:0]`, with trit i at bits 2i+1:2i (`gf3_pkg`).

**`gf3m_mul`: digit-serial multiplier.** It computes a·b mod x^m − x^n + 1.
- The multiplier processes D trits of b per pipeline stage, most significant digit first.
- Each stage does c ← c·x^D + a·b_digit. The D overflowing trits are folded back with
  x^m = x^n − 1.
- There are S = ⌈M/D⌉ = 7 stages for M = 97, D = 14. A new product can enter every cycle.
  The result appears 7 cycles later.
- A tag travels alongside each product, so consumers know what came out.
- The fold is only correct when n + D − 1 < m, and an assertion checks this.

**`gf3m_cube`: cubing.** Cubing is linear in characteristic three: (Σ a_i x^i)³ = Σ a_i x^(3i).
The trits are spread to positions 3i, and the terms above m are reduced with the trinomial. The
whole thing is a small XOR network with no multiplier, and it finishes in one cycle.

**`gf3m_add4`: signed adder.** It computes Σ s_k·y_k over four operands, where each sign s_k is
0, +1 or −1.

## The Miller loop: one product per cycle

This is the most intricate part of the design (`miller_coproc`).

The extension field is GF(3^m)[σ, ρ] with σ² = −1 and ρ³ = ρ + b. F is kept as six coefficients:

  F = f0 + f1σ + f2ρ + f3σρ + f4ρ² + f5σρ²

The loop is the cube-root-free form of the η_T algorithm.

Prologue:
- xP += b, yP = −yP, xQ = xQ³, yQ = yQ³, t = xP + xQ.
- F = (−yP·t + yQ·σ + yP·ρ) · G.

Then (m−1)/2 times:
- xQ = xQ⁹ − b, yQ = −yQ⁹, t = xP + xQ.
- F = F³ · G, where G = −t² + yP·yQ·σ − tρ − ρ².

### Computing F³·G with 15 products

F³ costs no multiplications. Let c_j = f_j³, computed coefficient by coefficient by the cubing
unit. Frobenius also moves the basis: σ³ = −σ, ρ³ = ρ + b and (ρ²)³ = ρ² − bρ + 1. So
A = F³ has the coefficients:

  a0 = c0 + b·c2 + c4    a2 = c2 − b·c4    a4 = c4
  a1 = −c1 − b·c3 − c5   a3 = −c3 + b·c5   a5 = −c5

These are plain signed sums of registered values.

Write A = P + Qσ with P = (a0, a2, a4) and Q = (a1, a3, a5), and let X = −t² and Y = yP·yQ.
G splits into X + Yσ and −tρ − ρ².

- **The σ part** uses Karatsuba over σ:
  - X·P − Y·Q is the real part.
  - (X+Y)(P+Q) − X·P − Y·Q is the σ part.
  - This costs 9 products: X·p_i, Y·q_i and (X+Y)(p_i+q_i) for i = 0, 1, 2.
- **The ρ part.** Multiplying by −tρ − ρ² needs only the six products t·a_j. The ρ³ and ρ⁴ terms
  fold back through ρ³ = ρ + b. The remaining terms are a_j themselves.

Together with t·t and yP·yQ this gives 17 products per iteration. The multiplier takes one per
cycle, so an iteration is 17 cycles long.

### The schedule

| cycle | multiplier input |
|---|---|
| 0 | t·t |
| 1 | yP·yQ |
| 2–7 | t·a_j, j = 4, 2, 0, 5, 3, 1 |
| 8–10 | X·p_i, i = 2, 1, 0 |
| 11–13 | Y·q_i, i = 2, 1, 0 |
| 14–16 | (X+Y)(p_i+q_i), i = 2, 1, 0 |

How the schedule fits together:
- Each product carries a tag that names the accumulator or accumulators it feeds, together with
  the sign.
- The linear (product-free) terms are loaded into the accumulators in cycle 8.
- The last product of each coefficient returns seven cycles after issue. So the new coefficients
  complete in the order f4, f2, f0, f5, f3, f1, in cycles 1 to 6 of the next iteration.
- That order is chosen so that each a_j depends only on coefficients that are already complete.
  Each one is ready exactly one cycle before its t·a_j product is issued, so the loop never waits.
- The cubing unit is shared. It handles the six completed coefficients, and in cycles 9 to 12 the
  two double cubings of xQ and yQ.

The first iteration is different. It multiplies G by the sparse first factor
L = (−yP·t, yQ, yP, 0, 0, 0) directly. −yP·t comes from an extra prologue product, so that
iteration issues the t·a_j products in the order 4, 2, 5, 3, 1, 0.

Total latency is 17·(m+1)/2 + 10 cycles: 843 cycles for m = 97. The unit is busy for all of that
time and takes a new start as soon as `done` has pulsed.

## The final-exponentiation engine

`fe_coproc` executes 32-bit instructions from a 1024-word program memory. Its data memory holds
64 field elements (`dp_ram`, two synchronous read ports and one write port).

| op | code | effect |
|---|---|---|
| NOP | 0 | nothing |
| MUL | 1 | dst ← srca · srcb on multiplier `unit` (0–2); the result is written 8 cycles after issue |
| ADD | 2 | dst ← sA·srca + sB·srcb + sC·acc + sD·1. The four 2-bit signs are in imm[7:0], low first; acc is the previous sum; written 2 cycles after issue |
| CUBE | 3 | dst ← srca^(3^(imm+1)). The cubing unit iterates imm+1 times, in the background |
| END | 7 | wait until everything has been written, then pulse `done` |

Word layout: `{op[31:29], unit[28:27], dst[26:21], srca[20:15], srcb[14:9], imm[8:0]}`
(`gf3_pkg::fe_instr_t`).

Issue is in order, one instruction per cycle. The engine stalls an instruction in three cases:
- **Scoreboard.** A source or destination word is still pending, meaning a result has not been
  written yet. This covers both read-after-write and write-after-write hazards.
- **Write-port reservation.** A shift register of reserved write cycles would collide. The
  cubing unit takes the write port only in cycles that nothing has reserved.
- **Busy cube unit.** A CUBE arrives while the cubing unit is still busy.

Each MUL names one of the three pipelined multipliers, so many products are in flight at once,
interleaved with additions and long cube chains. A program is written as plain sequential code;
the hardware finds the overlap.

### The final exponentiation as a program

The program generator `fe_fexp` in `tb/gf3_ref_pkg.sv` builds a complete final exponentiation
for m = 97 out of these instructions. It uses M = (3^3m − 1)(3^m + 1)(3^m + 1 − μb·3^((m+1)/2)):

1. U = F^(3^3m − 1). Write F = A0 + A1σ with A0, A1 in GF(3^3m). The power 3^3m is conjugation
   over σ, so U = (A0 − A1σ)²/(A0² + A1²) = ((A0² − A1²) + A0A1σ)/(A0² + A1²).
2. V = U^(3^m)·U.
3. W = V^(3^m)·V·conj(V^(3^((m+1)/2))). After step 1 every value is unitary, so its inverse is its
   conjugate.

The pieces are built as follows:
- **Frobenius powers.** Each coefficient is cubed k times by a single CUBE instruction. Then the
  basis is mapped with σ → (−1)^k σ, ρ → ρ + kb and ρ² → ρ² − kbρ + k².
- **Inverse in GF(3^3m).** For a = a0 + a1ρ + a2ρ², the inverse is formed from cofactors:
  - b0 = (a0 + a2)² − a1² − b·a1a2
  - b1 = b·a2² − a0a1
  - b2 = a1² − a0a2 − a2²

  Then a·(b0 + b1ρ + b2ρ²) = w = a0b0 + b(a2b1 + a1b2), which lies in GF(3^m). The only GF(3^m)
  inversion, 1/w, uses Fermat's little theorem, as a chain of cube runs and multiplications.
- **GF(3^6m) products** use Karatsuba over σ: three GF(3^3m) products of nine multiplications
  each.

The program has 408 instructions:
- 147 multiplications;
- 234 additions;
- 1554 single cubings, packed into a few CUBE runs.

It runs in 2223 cycles and is checked against an independent big-integer square-and-multiply
computation of F^M. The cube runs dominate the time. Each 3^m power cubes six coefficients 97
times on the single cubing unit.

A dedicated torus formula for the 3^m + 1 power takes nine multiplications and no Frobenius map.
With it, the count drops to about 79 multiplications, 390 cubings and 180 additions, which takes
roughly 800 cycles. The engine has everything such a program needs, but that formula is not used
here.

## Pipelining and hand-off

`pairing_ctrl` is the main controller. It behaves as follows:
- It starts the Miller unit when the host sets CTRL.start.
- When the Miller unit finishes, it copies the six coefficients of F into FE data words 0 to 5,
  one per cycle, as soon as the FE unit is idle. It then starts the FE program.
- A start request waits (`start_wait` event) while a finished Miller result has not yet been
  handed off. Otherwise the next run would overwrite it.
- Apart from that, the next Miller loop overlaps the running final exponentiation (`overlap`
  event).
- With CFG.auto_fe = 0, the hand-off is skipped. The host then reads F, and it can load data and
  run the FE program on its own (CTRL bit 1).

### Register map

All accesses are 32-bit words. Field elements are split into ⌈2m/32⌉ little-endian words, which
is 7 words for m = 97. Trit i occupies bits 2i+1:2i of the 2m-bit image.

| address | access | contents |
|---|---|---|
| 0x00000 | W | CTRL: bit0 start a pairing, bit1 run the FE program alone |
| 0x00004 | RW | CFG: bit0 automatic hand-off (reset value 1) |
| 0x00008 | R | STATUS: bit0 start pending, bit1 Miller busy, bit2 hand-off pending, bit3 FE busy |
| 0x0000C | R | COUNT: completed FE runs |
| 0x01000 + i·0x100 + 4w | W | input i (0 xP, 1 yP, 2 xQ, 3 yQ), word w |
| 0x02000 + j·0x100 + 4w | R | Miller result f_j, word w |
| 0x04000 + 4k | W | FE program word k |
| 0x10000 + a·0x100 + 4w | RW | FE data word a. Writes go to a staging buffer, and writing word 6 commits the element. Only while the FE unit is idle. |

The bus interface (`ahb_slave`) is AHB-Lite with zero wait states and OKAY responses, and supports
only 32-bit transfers. Reads are served in the data phase. Writes are performed in the data
phase.

## Files

| file | contents |
|---|---|
| `rtl/gf3_pkg.sv` | trit encoding and GF(3) functions, default parameters, FE instruction format |
| `rtl/gf3m_mul.sv`, `gf3m_cube.sv`, `gf3m_add4.sv` | GF(3^m) arithmetic |
| `rtl/miller_coproc.sv` | Miller's-loop coprocessor |
| `rtl/dp_ram.sv`, `rtl/fe_coproc.sv` | final-exponentiation engine and its memory |
| `rtl/ahb_slave.sv`, `rtl/pairing_ctrl.sv` | bus interface, controller and register map |
| `rtl/pairing_top.sv` | top level |
| `tb/gf3_ref_pkg.sv` | reference model (integer-trit arithmetic, GF(3^6m) product and cube, the Miller loop) and the final-exponentiation program generator `fe_fexp` |
| `tb/tb_*.sv` | one self-checking bench per block, and the end-to-end and final-exponentiation benches |

## Simulating

Every bench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. Each one also has a
watchdog. Build a bench with Verilator 5 by listing the package files first:

```
verilator --binary -Wno-fatal -j 8 rtl/gf3_pkg.sv tb/gf3_ref_pkg.sv \
  rtl/gf3m_mul.sv rtl/gf3m_cube.sv rtl/gf3m_add4.sv rtl/dp_ram.sv rtl/fe_coproc.sv \
  rtl/miller_coproc.sv rtl/ahb_slave.sv rtl/pairing_ctrl.sv rtl/pairing_top.sv \
  tb/tb_pairing_top.sv --top-module tb_pairing_top
./obj_dir/Vtb_pairing_top
```

The benches and what they cover:

- **`tb_pairing_top`** runs the default-size design over the bus. It takes about 8 s.
  - It loads the final-exponentiation program and computes three complete pairings back to
    back. It checks every Miller result against the reference loop and every pairing value F^M
    against a big-integer square-and-multiply reference.
  - It then turns off the automatic hand-off and reads F over the bus. It writes F into the FE
    data words through the staging buffer, runs the final exponentiation alone and reads the
    pairing value back.
  - It counts the start-wait, overlap, FE-stall and hand-off events, and fails if any of them
    never happens.
- **`tb_miller_coproc`** checks three random pairings at m = 97 against the reference loop. It
  also checks the cycle count of 843.
- **`tb_fe_final_exp`** runs the final-exponentiation program described above on the engine
  alone and prints its cycle and operation counts, in about 2 s. The program generator
  (`fe_fexp`) lives in `tb/gf3_ref_pkg.sv`.

## Departures and limits

- **Miller latency.** The loop takes 843 cycles for m = 97, against the 833 reported for the
  reference implementation. Iterations are 17 cycles in both. The difference is in the prologue
  and in draining the multiplier pipeline.
- **Accumulators in the Miller unit.** The Miller unit uses per-coefficient accumulators fed by
  tagged products. A single four-input adder fed from memory is not used for this. The FE engine
  does have the four-input adder.
- **FE program.** The FE engine is programmable. The final-exponentiation program included here is
  generated by a testbench and takes 2223 cycles. A fully optimised schedule, with the torus formula
  for the 3^m + 1 power, reaches about 800 cycles, but it is not part of this repository.
- **ISA and memory.** The instruction set, the scoreboard and the write-port reservation are this
  design's own. So is the memory organisation: 64 words, two read ports and a separate write port.
- **Digit size.** The multiplier digit size (D = 14, giving seven stages) is this design's choice.
  For GF(3^709), D = 102 also gives seven stages. That configuration compiles through parameters
  but has not been simulated.
- **Not covered.** Pads, clocking, the physical implementation, the host processor and any
  elliptic-curve scalar-multiplication companion are outside this RTL. The AHB port is where they
  would attach.
- **Reset.** All control state is reset asynchronously. Datapath registers are not reset, and
  neither are the two memories.

### Tool notes

- Lint reports some unused signals. These are address bits above the decoded range, HTRANS[0]
  (sequential and non-sequential transfers are treated alike), the unused part of an element's
  last bus word, and instruction fields that a given stage does not use.
- Lint reports the reset as used both asynchronously and synchronously. The synchronous use is
  only the `disable iff` of the assertions in `miller_coproc` and `fe_coproc`.
