# Low-cost radix-2 Montgomery modular multiplier with a configurable carry-save adder

This is a radix-2 Montgomery modular multiplier for public-key arithmetic such as RSA
exponentiation. It computes

    result ≡ A · B · 2^-(K+2)  (mod N)

for an odd K-bit modulus N and operands A, B < 2N. It uses only one row of adder cells and no
carry-propagate adder in the loop. The default is K = 32.

The design rests on four ideas:

1. **One adder for everything.** A single row of carry-save cells does three jobs:
   - the Montgomery iterations;
   - pre-computing D = B + N;
   - converting the carry-save result back to binary.

   The adder never propagates a carry across the word. So the critical path is a multiplexer
   plus one full adder, whatever K is.
2. **A configurable adder cell.** Each cell can work as one full adder (`1F_CSA`, three inputs
   in carry-save form). It can also work as two half adders in series (`2H_CSA`). In the second
   mode one clock cycle does two carry-ripple steps of a binary conversion, so the conversion
   and the B + N pre-computation take about half as many cycles.
3. **Skipping zero iterations.** Some iterations add zero to an even carry-save pair whose two
   low bits are both zero. Such an iteration only divides by two. The design detects it one
   cycle early and folds it into the current iteration as an extra right shift.
4. **Quotient pre-computation.** The skip decision needs the next two quotient bits one
   iteration early. The operands are changed so that their low bits are known zeros, which
   makes those quotient bits cheap to compute.

## The arithmetic

The basic radix-2 Montgomery step is

    S ← (S + A_i·B + q_i·N) / 2,    q_i = (S + A_i·B) mod 2.

The design keeps S as a carry-save pair (SS, SC) and changes the operands:

| symbol | value | why |
|---|---|---|
| B^ | 8·B | bits 2:0 are zero, so A_i·B^ does not change the parity of S |
| N^ | N + 1 if N mod 4 = 3, 3N + 1 if N mod 4 = 1 | a multiple of 4 |
| D^ | B^ + N^ | the operand for A_i = q_i = 1; a multiple of 4 |

So every operand x added in an iteration has x[1:0] = 00. The quotient bit is just the parity
of the pair: q_i = SS_0 ⊕ SC_0.

**Why N^ works in place of N.** When q_i = 1 the pair is odd, so the sum bit at position 0
of the new pair is 1. The divide-by-two drops that bit. Dropping it subtracts exactly the 1
by which N^ exceeds N (or 3N). So each iteration really computes
(S + A_i·8B + q_i·M) / 2, with M = N or M = 3N. That is an ordinary Montgomery step.

**Loop length.** The loop runs for i = -1 … K+4:
- i = -1 is an empty warm-up iteration. It only produces q_0 and A_0 for the next cycle.
- i = 0 … K+1 consume the bits of A (bit K+1 is zero).
- The last three iterations add nothing. They divide by 8 and cancel the factor 8 in B^.

The overall factor is therefore 2^-(K+2). This is the "R = 2^(K+2)" form, which accepts
inputs up to 2N.

**Output range.** If N mod 4 = 3 (M = N), the result is below 2N. It can be fed straight back
as an operand; the testbench checks such chains. If N mod 4 = 1 (M = 3N), the result is only
guaranteed below 4N, and a further reduction is needed before reuse. That bound follows from
the formulas above; the description this design follows does not discuss it. The `result`
port is therefore K+2 bits wide.

## Skip detection and quotient pre-computation (`mm_skip_d`)

This is the least obvious part. In iteration i the adder forms the new pair
SS' = (SS ⊕ SC ⊕ x) >> 1 and SC' = maj(SS, SC, x). Because x_1 = x_0 = 0, the low bits of
the new pair depend on only five bits:

    SS'_0 = SS_1 ⊕ SC_1           SC'_0 = SS_0 · SC_0
    SS'_1 = sum bit 2 of adder     SC'_1 = SS_1 · SC_1

From these:

    q_{i+1}    = SS'_0 ⊕ SC'_0
    q_{i+2}    = SS'_1 ⊕ SC'_1                (valid when iteration i+1 is skipped)
    skip_{i+1} = ¬(A_{i+1} ∨ q_{i+1} ∨ SS'_0)

When skip_{i+1} is set, iteration i+1 would add 0 to an even pair whose bit 0 is zero in both
vectors. Halving each vector is then exact. So the registers load `s >> 2` and `c >> 1`
instead of `s >> 1` and `c`. The A shift register moves by two, and the next iteration uses
A_{i+2} and q_{i+2}.

Only the adder's bit-2 sum adds delay to this path. One rule is this design's own: no skip is
allowed on the last iteration (i = K+4), since it would divide by two once too often. The
controller's `skip_en` enforces it. Without the guard, about one random multiplication in
three comes out off by a factor of two.

## The configurable adder (`mm_cfa`, `mm_ccsa`)

Cell j has these inputs: `ss`, `sc`, `x`, a mode bit `alpha`, and the first-row half-adder
carry `c1_in` from cell j-1.

- With `alpha = 1` the cell is a full adder of `ss`, `sc` and `x`.
- With `alpha = 0`:
  - the cell's XOR and its `ss & sc` output (`c1_out`, sent to cell j+1) form the first
    half-adder row;
  - a multiplexer feeds `c1_in` instead of `x` into a second XOR/AND pair, which forms the
    second half-adder row.

Over the row, `s + 2c` equals `ss + sc + x` in the first mode and `ss + sc` in the second.
`c[j]` has weight 2^(j+1). The shifts that follow each mode are wiring in the register logic of
`scs_mm_new`:
- iteration: `SS ← s >> 1`, `SC ← c`;
- pre-addition and conversion: `SS ← s`, `SC ← c << 1`.

The exact gate choice inside the cell is this design's own.

## Operand multiplexer and zero detector

- **`mm_sm3`** chooses x from 0, N^, B^ and D^ using (A^_i, q^_i). One of the four inputs is
  zero, so it is built as two 2-to-1 stages and an AND gate.
- **`mm_zero_d`** is a wide NOR of SC. It ends each run of conversion cycles.

## Schedule (`mm_ctrl`) and timing

Each clock cycle the controller issues one operation from `mm_pkg::mm_op_e`:

| state | operation | effect |
|---|---|---|
| IDLE | `OP_LOAD` on `start` | capture A; B^, N^ from `mm_operand_prep`; SS = B^, SC = N^ |
| PRE_ADD | `OP_PRE_ADD` | one 1F step with x = 0 |
| PRE_CONV | `OP_CONV` while SC ≠ 0, then `OP_DLATCH` | 2H steps; then D^ = SS, SS = SC = 0, i = -1 |
| LOOP | `OP_ITER` | one iteration; i advances by 1, or by 2 on a skip, until i > K+4 |
| POST_CONV | `OP_CONV` while SC ≠ 0, then `OP_FINISH` | result = SS, `done` pulses |

The latency from the `start` cycle to `done` is 3 + c1 + L + c2 cycles:
- c1 and c2 are the conversion cycles before and after the loop;
- L = K + 6 minus the number of skipped iterations.

At K = 32, random operands gave 22 to 46 cycles. The 22 was for A = 0, where almost every
iteration is skipped.

Interface of `scs_mm_new`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | sampled while `busy` is low |
| `a`, `b` | in | K+1 | operands, each below 2N |
| `n` | in | K | odd modulus |
| `busy` | out | 1 | a multiplication is running |
| `done` | out | 1 | one-cycle pulse; `result` is valid from then until the next start |
| `result` | out | K+2 | congruent to A·B·2^-(K+2) mod N |

The datapath width is W = K + 6, because intermediate values stay below 8B + 3N < 19N. At
K = 32 the design holds 261 flip-flop bits: five 38-bit vectors, the A shift register, the
result and control.

## Where this departs from or adds to the source description

- The equations for q_{i+1}, q_{i+2} and skip_{i+1} were derived from the carry-save
  addition shown above. So were the gates of Skip_D, the adder cell and SM3. The source
  specifies a Skip_D with four XOR, three AND, one NOR and two multiplexers. This
  implementation reuses the adder's bit-2 sum and needs three XORs.
- The following are this design's own: the skip guard on the last iteration, the controller,
  the handshake, the reset, and the plain adder that forms N^ = 3N + 1.
- The FPGA build this design follows reported 75 flip-flops, 131 I/O pins and a comparator
  on the output path. This RTL stores full-width B^, N^ and D^ registers. It has no final
  comparison or subtraction, because none is described.
- The low-power claims rest on fewer cycles and a small adder. No power-specific circuitry is
  described, and none is built.

## Files and simulation

`rtl/`:
- `mm_pkg.sv`: types and constants
- `mm_cfa.sv`, `mm_ccsa.sv`: configurable adder cell and row
- `mm_sm3.sv`: operand multiplexer
- `mm_zero_d.sv`: zero detector
- `mm_skip_d.sv`: skip detector and quotient pre-computation
- `mm_operand_prep.sv`: B^ and N^
- `mm_ctrl.sv`: controller
- `scs_mm_new.sv`: top level

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=… failures=…`.

`tb_scs_mm_new` runs the top level at its default size. It checks:
- each result against a wide-integer reference;
- the result's range;
- the exact cycle count, against an integer model of the schedule;
- that skips, all four operand choices, both N^ formulas and multi-cycle conversions all
  occur, and that the last-iteration skip guard takes effect.

To run it:

    verilator --binary --timing --assert -Irtl rtl/mm_pkg.sv tb/tb_scs_mm_new.sv \
        --top-module tb_scs_mm_new
    ./obj_dir/Vtb_scs_mm_new

To run another block, swap in its testbench. To change the size, set `K` on `scs_mm_new`;
every width follows from it.
