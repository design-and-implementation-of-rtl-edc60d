# Vedic (Urdhva-Tiryagbhyam) multipliers and a redundant-basis GF(2^m) multiplier

This library holds two families of multipliers.

1. **Integer multipliers built by the Vedic "vertically and crosswise" rule
   (Urdhva-Tiryagbhyam).** An N x N product is formed from four N/2 x N/2 products:
   the two low halves ("vertical", right), the two high halves ("vertical", left) and the
   two cross terms ("crosswise"). Three ripple-carry adders combine them. The recursion
   starts at a 2x2 cell made of four AND gates and two half adders. All four sub-products
   are formed at the same time, so partial-product generation and addition overlap.
2. **A multiplier over the finite field GF(2^m) in the redundant basis (RB).** In the RB
   a product is a cyclic convolution of bit vectors over GF(2). Two versions are given:
   - a bit-parallel one;
   - a digit-serial one that takes Q clock cycles of accumulation plus the fill time of
     a P-stage systolic chain.

The two families are independent. `mult_top` places them side by side.

## Files

| file | what it is |
|---|---|
| `rtl/half_adder.sv` | half adder |
| `rtl/vedic_2x2.sv` | 2x2 cell: 4 ANDs, 2 half adders |
| `rtl/rc_adder.sv` | W-bit ripple-carry adder |
| `rtl/vedic_4x4.sv` | four 2x2 cells and three 4-bit adders |
| `rtl/vedic_8x8.sv` | four 4x4 blocks and three 8-bit adders |
| `rtl/vedic_nxn.sv` | generalised N x N multiplier (N a power of two, default 16), recursive |
| `rtl/rb_pkg.sv` | state type of the digit-serial RB sequencer |
| `rtl/rb_mult_parallel.sv` | bit-parallel RB multiplier |
| `rtl/rb_bpm.sv` | B permutation module: rotating B register |
| `rtl/rb_ppgu.sv` | partial-product generation unit: AND, XOR, register |
| `rtl/rb_ppgm.sv` | bit distribution cell, input skew and a chain of P PPGUs |
| `rtl/rb_mult_ds.sv` | digit-serial RB multiplier: A digit register, BPM, PPGM, accumulator, sequencer |
| `rtl/mult_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## The Vedic multiplier

### 2x2 cell

For A = a1a0 and B = b1b0:

```
s0      = a0 b0                          vertical
c1,s1   = halfadd(a0 b1, a1 b0)          crosswise
c2,s2   = halfadd(a1 b1, c1)             vertical
P       = {c2, s2, s1, s0}
```

Its delay is one AND gate plus two half adders. This is the same as a 2x2 array
multiplier. The rule starts to differ from an array multiplier only at larger sizes.

### Combining four sub-products (4x4, 8x8, N x N)

Split A = {AH, AL} and B = {BH, BL} into halves of H = N/2 bits. The four sub-products,
each N bits wide, are:

```
q0 = AL*BL    q1 = AL*BH    q2 = AH*BL    q3 = AH*BH
```

The product is q0 + (q1 + q2)·2^H + q3·2^N. Three N-bit ripple-carry adders compute it:

```
adder 1:  q1 + q2                          -> sum1, carry ca1
adder 2:  sum1 + (q0 >> H)                 -> sum2, carry ca2
adder 3:  q3 + {0..0, ca1|ca2, sum2[N-1:H]} -> P[2N-1:N]   (carry ca3)
P[H-1:0] = q0[H-1:0]
P[N-1:H] = sum2[H-1:0]
```

The carry bookkeeping is the subtle part:

- **ca1 and ca2 both have weight 2^(N+H).** They are never 1 at the same time:
  - if q1 + q2 overflows N bits, sum1 is at most 2;
  - then adding H bits of q0 cannot overflow again.

  So one OR merges them exactly into bit H of adder 3's second operand. This gate is a
  choice of this implementation. The block diagrams show both carries entering the
  third adder but not how.
- **ca3 is always 0**, because an N x N product fits in 2N bits. Each block has an
  immediate assertion on it.

`vedic_4x4` and `vedic_8x8` spell the structure out with fixed widths. `vedic_nxn`
unrolls the recursion into levels. Level 0 is a grid of 8x8 leaves (2x2 or 4x4 when
N < 8). Each higher level combines four neighbouring products into one of twice the
width. An N x N
multiplier therefore contains (N/2)^2 2x2 cells. Its critical path grows by three
N-bit ripple adders per level of recursion. The ripple adders keep the area small but
make the delay linear in N.

All Vedic blocks are combinational and unsigned.

## The redundant-basis GF(2^m) multiplier

### Arithmetic

Let n = m + 1, and let x be a primitive n-th root of unity. Then {1, x, ..., x^(n-1)} is a
redundant basis of GF(2^m): an element takes n bits, and every element has two
representations, a vector and its complement (because 1 + x + ... + x^m = 0). When n is prime and 2 is a primitive root mod n (a type-I optimal
normal basis exists), the product of A = Σ a_j x^j and B = Σ b_i x^i is a cyclic
convolution:

```
c_i = XOR_j a_j & b_((i-j) mod n)        i.e.  C = XOR_j a_j · B_j
```

Here B_j is B rotated up by j places; coefficient i of B_j is b_((i-j) mod n). The
product needs no modular reduction, and multiplying by x is a rotation. The result stays
in the RB; this library does no conversion to or from another basis.

The default field is m = 162 (n = 163; 163 is prime and 2 is a primitive root mod 163).
It can be changed with the parameter `M`. The RTL computes the cyclic convolution for
any n. Whether that product is a field multiplication depends on n meeting the
condition above.

### Digit decomposition

With P = ceil(n/Q), the n terms are split into Q groups. The u-th group is
C_u = XOR_{v=0..P-1} a_(u+vQ) · B_(u+vQ), and C = XOR_u C_u. When Q does not divide n, A
is padded with zeros to PQ bits; the padding only adds zero terms. The defaults are
Q = 8 and P = 21.

`rb_mult_parallel` builds the whole signal-flow graph at once: Q arrays of P
multiply-and-add nodes, then a final XOR of the Q array sums. It is combinational.

### Digit-serial structure (`rb_mult_ds`)

```
        A (digit register, P bits/clock) ----> PPGU 0 -> PPGU 1 -> ... -> PPGU P-1 -> accumulator -> c
                                                 ^         ^                 ^
 B -> BPM (rotate 1 place/clock) -> bit distribution: B_t rotated by 0, Q-1, 2(Q-1), ...
```

- **A register.** It holds A as Q digits of P bits. Digit u is a_u, a_(u+Q), ...,
  a_(u+(P-1)Q). It sends one digit per clock, then zeros.
- **BPM.** It holds B and rotates it one place per clock, so at clock t it holds B_t.
- **PPGU chain.** Unit v computes `R_v <= R_(v-1) XOR (a_bit & B_form)`. Two things
  make the chain systolic:
  - bit v of each digit reaches unit v through v skew registers;
  - unit v's B form is the BPM output rotated by v(Q-1) places. This is the **bit
    distribution cell**, which is pure wiring.

  At clock t, unit v therefore works on digit u = t - v. It needs B_(u+vQ) = B_t rotated
  by v(Q-1). That is what it gets, and it hands its partial sum for the same digit to
  unit v+1. C_u leaves the chain P clocks after digit u entered it.
- **Accumulator.** It XORs the Q digit products C_0 .. C_(Q-1).

### Interface and timing

- Hold `start` high for one clock while `busy` is low. `a` and `b` are captured on that
  edge.
- `busy` is high from the next clock until the result is ready. A `start` while busy is
  ignored.
- `done` rises on the **(P + Q)-th rising edge after the start edge**, which is 29 clocks
  at the defaults, and stays high for exactly one clock.
- `c` is valid while `done` is high and is held until the next start. A new
  multiplication can start in the clock after `done`.
- Reset (`rst_n`) is asynchronous and active low. It clears all registers.
- One multiplication runs at a time. The BPM is shared by all units, so two operations
  cannot overlap in the chain.

The hardware cost is:
- n + PQ + P(P-1)/2 register bits for the operands and the skew;
- P·n bits of PPGU registers;
- n accumulator bits;
- P·n AND gates and (P+1)·n XOR gates.

The bit-parallel version needs n² ANDs instead.

## The top level (`mult_top`)

Parameters: `N = 16` (Vedic N x N width), `M = 162`, `Q = 8`.

| ports | block |
|---|---|
| `a0..a3`, `b0..b3` (4 bits), `c0..c3` (8 bits) | four independent `vedic_4x4` lanes, c_k = a_k·b_k |
| `m8_a`, `m8_b`, `m8_p` | `vedic_8x8` |
| `mn_a`, `mn_b`, `mn_p` | `vedic_nxn #(N)` |
| `clk`, `rst_n`, `rb_start`, `rb_a`, `rb_b`, `rb_busy`, `rb_done`, `rb_c` | `rb_mult_ds` |
| `rb_c_par` | `rb_mult_parallel` on the same `rb_a`, `rb_b` |

Only the RB digit-serial multiplier uses the clock. If `rb_a` and `rb_b` are held from
start to done, `rb_c` equals `rb_c_par` when `rb_done` is high.

## Where this implementation makes its own choices

The following are not fixed by the design as described. They are choices made here:

- **Carry merge.** ca1 and ca2 are merged by an OR; this is exact, as shown above.
- **Unsigned operands** for all Vedic blocks.
- **Default widths.** N = 16 for the generalised multiplier, which is one level above
  the largest drawn size (8x8). The field size m = 162 and the digit count Q = 8.
- **Zero padding of A** when Q does not divide n. The original derivation assumes Q
  divides n, which cannot hold for a prime n with 1 < Q < n.
- **Sequencing of the digit-serial multiplier:**
  - one register per PPGU, with the Q-digit accumulation after the chain;
  - the start/busy/done handshake;
  - the reset style.

  The described structure shows extra registers and a feedback path around the first
  units, and their exact placement is not recoverable. The version here has the same
  data flow. Its latency is P + Q clocks and it accepts one operation per P + Q + 2
  clocks.
- **The top level.** The four lanes match a top-level schematic with four 4-bit operand
  pairs and four 8-bit results. The other blocks are added beside them.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops with a watchdog if it hangs. Reference
values come from integer `*` or from a bit-by-bit cyclic convolution written in the
testbench.

- The 2x2, 4x4 and 8x8 multipliers and both adder widths are tested exhaustively.
- N x N is tested at N = 2 (exhaustively), 16 and 32, with corner and random operands.
- The RB blocks are tested at the default n = 163 (Q = 8) and at n = 11 (Q = 4, with
  padding). The tests cover:
  - the unit element and multiplication by x^k;
  - the rotation direction of the BPM;
  - the digit product that leaves the PPGU chain at every clock;
  - the exact latency P + Q;
  - `done` lasting one clock and `start` being ignored while busy.
- `tb_mult_top` runs the whole top at its default parameters:
  - all 4x4 and 8x8 operand pairs;
  - random 16x16 products;
  - 30 RB multiplications compared with both the reference and the bit-parallel output.

  It counts the events that must happen at least once: crosswise-adder carries ca1 and
  ca2 in the 8x8 block, a start while busy, and a completed RB multiplication.

### Running a testbench with Verilator

```
verilator --binary --timing --assert --top-module tb_mult_top \
    -y rtl -y tb +libext+.sv rtl/rb_pkg.sv tb/tb_mult_top.sv -o sim
./obj_dir/sim
```

Replace `tb_mult_top` with any other testbench name. `rb_pkg.sv` must be listed before
the files that import it. `-Wall` lint gives one expected warning, SYNCASYNCNET: the
handshake assertions in `rb_mult_ds` use `rst_n` in `disable iff`, while the flip-flops
use it as an asynchronous reset.
