# Digit-serial redundant-basis multipliers over GF(2^m)

Redundant-basis (RB) arithmetic represents an element of a binary field by
N coefficients, a_0 … a_{N-1}, and multiplies two elements as polynomials
modulo x^N − 1:

    c_k = XOR over i of  a_i · b_((k − i) mod N)        (cyclic convolution over GF(2))

Squaring is a fixed permutation of the bits and there is no modular
reduction beyond a wrap-around of indices, which makes RB attractive for
elliptic-curve and other GF(2^m) hardware. For example, with N = 163 (a
prime for which 2 is a primitive root) every element of GF(2^162) has such a
representation, and products computed modulo x^163 − 1 stay valid
representations.

This RTL implements three **digit-serial** RB multipliers that compute one
product in Q clock cycles using P *partial product generation units*
(PPGUs) working in a systolic chain, so that a new product can start every
Q cycles:

| structure | module   | per pipeline stage                   | critical path       | latency        |
|-----------|----------|--------------------------------------|---------------------|----------------|
| PS-I      | `rb_ps1` | 1 PPGU: AND, XOR, 1 register         | AND + XOR           | Q + P + 1      |
| PS-II     | `rb_ps2` | M PPGUs merged: M AND, M XOR, 1 reg. | AND + M XOR         | Q + ⌈P/M⌉ + 1  |
| PS-III    | `rb_ps3` | 1 PPGU: AND, XOR, 2 registers        | max(AND, XOR)       | Q + P + 2      |

All three have throughput 1 product / Q cycles. `rb_mult_top` puts the
three side by side on a shared operand input so they can be compared cycle
by cycle; a real design would keep the one it needs.

Default parameters: N = 163, P = 8, Q = 21 (P·Q = 168 ≥ N), M = 2. These
are this design's choice. The published description of these structures
gives no field size or digit size.

## The decomposition

Split the index of A as i = p·Q + q with digit p ∈ [0, P) and bit step
q ∈ [0, Q). Bits of A with i ≥ N are zero (padding). Then

    C = XOR over q  [ XOR over p  a_(pQ+q) · (B · x^(pQ+q)) ]

where B · x^k is B rotated k places towards higher indices. For a fixed q,
the inner XOR over the P digits is what the PPGU chain produces. The outer
XOR over the Q bit steps is what the accumulator does.

Three parts of the hardware realise this:

* **Operand A feed (`rb_a_stager`).** A is cut into P digits of Q bits.
  Each digit is a shift register that gives out its lowest bit first, one
  bit per cycle. PPGU p therefore sees a_(pQ+q) at step q.
* **Bit-permutation module, BPM (`rb_bpm`).** B is loaded into a register
  that rotates by one place every cycle, so at step q it holds B · x^q.
  The *bit distribution cell* is only wiring. It gives each PPGU a fixed
  rotation of that register, the one that makes PPGU p see
  B · x^(pQ+q).
* **PPGM and accumulator.** Each PPGU ANDs its A bit with its rotated B
  word (N AND gates). It then XORs in the registered sum of the previous
  PPGU and registers the result. The last PPGU's output goes into the
  *finite field accumulator* (`rb_ff_acc`), which is N XOR-and-register
  cells.

### Staggering, and why the BPM keeps two copies of B

The chain is systolic, and the sum for step q moves down it one stage per
cycle. PPGU p must therefore work on step q exactly d_p cycles after PPGU 0
does, where d_p is its stage index: d_p = p in PS-I and PS-III, and
d_p = ⌊p/M⌋ in PS-II. The feed does this with a d_p-stage delay line on
PPGU p's A bit. The line is cleared at reset, so PPGU p first sees d_p
zeros and then a_(pQ), a_(pQ+1), … .

The BPM register is shared, and at step q + d_p it holds B · x^(q+d_p).
PPGU p's fixed rotation is therefore **p·Q − d_p** (mod N), not p·Q. In
PS-I with N = P·Q, the last PPGU's word starts with coefficient
b_(Q+P−1).

Products overlap. The next product's B is loaded at the end of the last
step of the current one at PPGU 0, but PPGU p still needs the old B for d_p
more cycles. `rb_bpm` therefore keeps a second register holding the previous B,
which keeps rotating. During the first d_p steps of a product, PPGU p reads
that register instead of the current one. This costs N flip-flops and one
N-bit 2:1 multiplexer per lagging PPGU. It is what allows a new product
every Q cycles, and it requires ⌈P/M⌉ − 1 ≤ Q (PS-II) or P − 1 ≤ Q (PS-I,
PS-III). The published structure shows only the single rotating register
and does not say how overlapping products are handled; this second register
is this design's addition.

### Framing the accumulation

`rb_ctrl` counts the Q steps of the product at PPGU 0. For each step it
sends a marker {valid, first, last} down a delay line as deep as the
register path to the accumulator: P stages for PS-I, ⌈P/M⌉ for PS-II and
P + 1 for PS-III. A *first* partial sum overwrites the accumulator and
later ones XOR into it. A *last* partial sum raises `out_valid` in the next
cycle. Idle cycles carry all-zero A bits, so they add nothing.

## The three structures

* **PS-I** (`rb_ps1`, cell `rb_ppgu1`): one register per PPGU. The first
  PPGU has no predecessor and no XOR cell.
* **PS-II** (`rb_ps2`, cell `rb_ppgu2`): M adjacent PPGUs (M = 2 by
  default) share one pipeline stage and one register. This uses 1/M of the
  chain registers and shortens latency. The cost is a path of one AND and
  M XOR gates. If M does not divide P, the unused AND inputs of the last
  stage get zero digits. The published text gives M = 2 and says larger
  merges are possible; parameter M provides them. That text also calls
  the critical path of PS-II equal to that of PS-I. With the two XOR cells
  it describes placed in series, as here, the path is one XOR gate longer.
  The throughput is the same.
* **PS-III** (`rb_ps3`, cell `rb_ppgu3`): a register between the AND and
  XOR cells of every PPGU. While a PPGU multiplies step q it is adding step
  q − 1, so the critical path is a single gate. The price is N more
  flip-flops per PPGU and one more cycle of latency. The published text
  gives only the cell counts (one AND, one XOR, two registers) and the
  purpose. Where the second register sits is this design's reading.

Flip-flop counts at the defaults, from generic synthesis: PS-I 2019, PS-II
1339, PS-III 3326. For PS-I the breakdown is: 1304 in the PPGU chain, 326 in
the two BPM registers, 196 in the A digits and delay lines, 164 in the
accumulator, and the rest in control.

## Interface and timing

All multipliers have the same ports:

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1 | clock, rising edge |
| `rst_n`     | in  | 1 | asynchronous active-low reset |
| `in_valid`  | in  | 1 | `a` and `b` are offered |
| `in_ready`  | out | 1 | the pair is taken in this cycle if `in_valid` is high |
| `a`, `b`    | in  | N | operands, bit k = coefficient k |
| `out_valid` | out | 1 | one-cycle pulse: `c` holds a product |
| `c`         | out | N | A·B mod (x^N − 1) |

`in_ready` is high when the multiplier is idle, and in the last step of the
product in progress. Holding `in_valid` high therefore starts a product
every Q cycles. Offers made while `in_ready` is low are ignored.
Counted from the cycle in which the pair is accepted, `out_valid` rises
after the latency in the table above: 30 cycles for PS-I, 26 for PS-II and
31 for PS-III at the defaults. Products leave in order. Read `c` in the
cycle `out_valid` is high: when products follow back to back, the next product's first partial sum
replaces it in the following cycle; after an idle gap it holds longer.

`rb_mult_top` has one `in_valid`/`in_ready` pair for all three structures,
which run in lockstep. Each structure has its own `psX_out_valid` and
`psX_c`.

## Files

| file | contents |
|------|----------|
| `rtl/rb_pkg.sv` | step marker type, stage and rotation helper functions |
| `rtl/rb_ctrl.sv` | handshake, step counter, marker delay line |
| `rtl/rb_bpm.sv` | rotating B registers and bit distribution cell |
| `rtl/rb_a_stager.sv` | digit shift registers and stagger delay lines for A |
| `rtl/rb_ppgu1.sv`, `rb_ppgu2.sv`, `rb_ppgu3.sv` | PPGU cells of PS-I, PS-II, PS-III |
| `rtl/rb_ff_acc.sv` | finite field accumulator |
| `rtl/rb_ps1.sv`, `rb_ps2.sv`, `rb_ps3.sv` | the three multipliers |
| `rtl/rb_mult_top.sv` | the three side by side |
| `tb/rb_ref_pkg.sv` | reference cyclic convolution and rotation, written independently of the RTL |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/rb_ps_check.sv`, `rb_bpm_check.sv`, `rb_stager_check.sv` | reusable drivers/checkers used by the testbenches |

## Verification

Every testbench compares the module's outputs with a value computed
independently in the testbench. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_rb_mult_top` runs all three structures at the default size with
  no parameter overrides. It sends 60 random products, and the first uses
  B = 1. Offers come back to back, after idle gaps, and with operands that
  change while `in_ready` is low. For every product the testbench checks
  the value, the exact latency and the Q-cycle spacing of back-to-back
  acceptance. It also checks that each of these cases actually happened.
* `tb_rb_ps1/2/3` run each structure at the default size and at N = 13,
  P = 3, Q = 5. The small size has an odd P and N < P·Q, so it covers
  padding. `tb_rb_ps2` adds M = 3. Edge operands used: A = 0, A = all ones,
  A = x^(N−1), B = 1.
* `tb_rb_bpm` and `tb_rb_a_stager` check, in every cycle and for every
  PPGU, the rotation and A bit that PPGU must see. They do this for G = 1
  and G = 2, and they require the previous-B path and the leading zeros to
  occur.
* `tb_rb_ppgu*`, `tb_rb_ff_acc` and `tb_rb_ctrl` check the cells and the
  controller against cycle models.

To run one with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/rb_pkg.sv tb/rb_ref_pkg.sv tb/tb_rb_mult_top.sv --top-module tb_rb_mult_top
    ./obj_dir/Vtb_rb_mult_top

Replace the testbench name to run another. Every testbench finishes in well
under a second.

## What follows the published design and what does not

Taken from the published description:

* the three-part organisation: BPM with bit distribution cell, PPGM made of
  a PPGU chain, finite field accumulator;
* the AND, XOR and register cells of each PPGU, and PS-I's first PPGU
  without an XOR;
* A fed least-significant bit first per digit, with staggered leading
  zeros, and B rotated by the BPM;
* the PS-II merge of two PPGUs, with one fewer XOR in the first unit;
* the PS-III cell counts.

This design's own choices:

* N, P and Q; zero padding when N < P·Q;
* the `in_valid`/`in_ready` handshake and `out_valid` pulse;
* the reset, and the first/last markers that frame the accumulation;
* the second (previous-B) register in the BPM;
* the position of PS-III's second register;
* the generalisation of PS-II to M > 2.

The published description derives the structures from a signal-flow graph
by projection and feed-forward cut-set retiming. That derivation is not
reproduced here; only the resulting structures are built. Its FPGA and ASIC
area, delay and power comparisons are relative results on unstated field
sizes. They cannot be checked against this RTL, and no target-specific
implementation is included.
