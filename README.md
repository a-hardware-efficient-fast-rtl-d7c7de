# Pipelined sign detection for the RNS moduli set {2^(n+1)-1, 2^n-1, 2^n}

A residue number system (RNS) stores an integer X as its remainders modulo a set of
coprime moduli. Addition and multiplication then split into small independent
channels, but questions about the *magnitude* of X become hard. One of these is the
sign. In the usual signed convention, X in [0, M) stands for a negative number when
X >= M/2 (M is the product of the moduli). A general sign test needs a full conversion
back to binary.

This RTL computes the sign bit for the three-modulus set

    m1 = 2^(n+1) - 1,   m2 = 2^n - 1,   m3 = 2^n

It uses one carry-save adder, one n-bit comparator and one parallel-prefix carry tree.
It never builds the binary value of X. The logic is split into a three-stage pipeline.
It takes one residue triple per clock and gives its sign two cycles later. The default
word size is n = 16, so x1 is 17 bits and x2 and x3 are 16 bits each. The dynamic
range is M = 131071 * 65535 * 65536, about 5.6e14.

## Why one n-bit sum decides the sign

Write X in mixed-radix form with m3 = 2^n as the last radix:

    X = alpha * (m1*m2) + Y,      0 <= Y < m1*m2,   0 <= alpha < 2^n

M/2 = m1*m2*2^(n-1). So X >= M/2 exactly when alpha >= 2^(n-1), and the sign is
the MSB of alpha. Two facts about these moduli make alpha cheap to compute:

* m1*m2 = 1 (mod 2^n), so x3 = alpha + Y (mod 2^n). This gives alpha = x3 - Y (mod 2^n).
* m1 = 1 (mod m2), so the two-modulus CRT for Y reduces to
  Y = x1 + m1 * |x2 - x1|_m2.

Substituting, and using m1 = -1 and -m2 = 1 (mod 2^n), gives

    alpha = | x3 + x2 - 2*x1 + floor((x2 - x1) / (2^n - 1)) |  mod 2^n

The hardware evaluates this as

    alpha = | ~x1'' + x2 + x3 + W |  mod 2^n,        sign = alpha[n-1]

using three definitions:

* **x1''** = `{x1[n-2:0], x1[n]}`. This is 2*x1 + x1[n] mod 2^n: x1 rotated left by one
  bit, with bit n-1 dropped. Its ones' complement plus one is its negation mod 2^n.
* **x1'** = `x1[n-1:0]`, the n low bits of x1.
* **W** is a correction bit. The floor term is always -x1[n] or -x1[n]-1. W = 1 in the
  first case. Working through the ranges of the residues gives

      W = (x2 > x1')  |  ((x2 == x1') & ~x1[n])

  The "+1" of the two's complement negation and the "-1" of the floor cancel into W.

So the whole test is a three-operand sum mod 2^n plus one carry-in W, followed by its
top bit. Only that bit is needed, so the low n-1 bits are never summed. They only feed
a carry tree.

## Datapath units

| unit | module | what it does |
|---|---|---|
| CSA mod 2^n | `csa_mod2n` | One row of full adders reduces ~x1'', x2, x3 to a sum word S (n bits) and a carry word C (n-1 bits). The carry out of bit n-1 is dropped. |
| comparator | `rns_comparator` | Computes x2 > x1' and x2 == x1'. Each bit gives a (greater, equal) pair. A binary tree merges the pairs from the MSB down (log2 n levels). |
| carry generation | `carry_gen` | Forms generate/propagate for each bit of S + 2C. It reduces bits n-2..0 to one group pair G, P. It passes on the half-sum P(n-1) = S[n-1] ^ C[n-2]. |
| prefix tree | `pg_tree` | The shared log-depth tree of the operator G = Ghi \| Phi&Glo, P = Phi&Plo. The carry tree and the comparator both use it. |
| post-processing | `post_proc` | The OR gate that forms W, then sign = P(n-1) ^ (G \| P & W). This is bit n-1 of S + 2C + W, with W as the carry into bit 0. |
| top | `rns_sign_detect` | Forms x1'' and its complement and the AND gate (x2 == x1') & ~x1[n]. Holds the two pipeline register ranks. |

`rns_sign_pkg` holds the default word size and the (G, P) pair type with its combine
function.

The comparator and the carry tree are the same circuit with different bit cells. In
both, a more significant field decides unless it is "transparent": all-propagate for
the adder, all-equal for the comparator. Then the less significant field decides.
`pg_tree` pads a width that is not a power of two on its least significant side with
the identity pair (G=0, P=1). So the carry tree over n-1 = 15 bits is a 16-leaf tree
with one leaf tied off.

## Pipeline and timing

```
            stage 1                    stage 2                     stage 3
 x1,x2,x3 ─► CSA mod 2^n  ─► S,C ─┐─► carry_gen ─► P(n-1),G,P ─┐─► post_proc ─► sign
          └► comparator   ─► >,= ─┤   AND gate  ─► eq&~x1[n]  ─┤   (OR → W)     w
                          x1[n] ──┤   (> passed on) ───────────┤
                         in_valid ┘reg                         ┘reg          out_valid
```

* Stage 1: CSA and comparator work in parallel.
* Stage 2: carry generation and the AND gate.
* Stage 3: the OR gate (W) and post-processing.

There is a register rank after stage 1 and after stage 2. A triple sampled with
`in_valid` at rising edge k gives `sign`, `w` and `out_valid` right after edge k+1.
That is two cycles of latency and a throughput of one triple per cycle. There is no
back-pressure. `rst_n` is asynchronous and active low, and clears both ranks (and so
`out_valid`).

The longest path is in stage 2: a log2(n-1)-level prefix tree. Stage 1 is one
full adder in parallel with a log2(n)-level compare tree. Stage 3 is three gates.

## Interface of `rns_sign_detect`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `in_valid` | in | 1 | x1, x2, x3 hold a residue triple |
| `x1` | in | N+1 | X mod (2^(N+1)-1), must be <= 2^(N+1)-2 |
| `x2` | in | N | X mod (2^N-1), must be <= 2^N-2 |
| `x3` | in | N | X mod 2^N |
| `out_valid` | out | 1 | result of a valid triple |
| `sign` | out | 1 | 1 when X >= M/2 (negative) |
| `w` | out | 1 | the correction bit W of the same triple, for observation |

The only parameter is `N` (default 16; N >= 3). The all-ones codes of x1 and x2 are
not residues. An assertion reports them, and the result for them is meaningless.

## What follows the published algorithm and what is this design's own

These parts follow the algorithm as published:

* the moduli set and the formula for alpha
* the definitions of x1'', x1' and W
* the split into CSA, comparator, carry generation and post-processing
* the binary tree shapes of the comparator and carry tree, drawn there for n = 16
* which logic sits in which of the three pipeline stages

These are choices of this design:

* **Registers.** The pipeline boundaries are described as clocked "interface latches".
  Here they are edge-triggered flip-flops, with no output register after stage 3. That
  gives a latency of 2 cycles.
* **Control.** The valid flag, the asynchronous reset and the range assertion were
  added here.
* **Comparator bit cell.** greater = a & ~b, equal = a XNOR b. The published
  description gives only the tree.
* **Adder cells.** The square cell (g = a&b, p = a^b) and the black-dot operator are
  the standard ones implied by the G/P notation.
* **Where W enters.** W is the carry into bit 0 and enters in post-processing. It does
  not fill the empty bit 0 of the shifted carry word.
* **Generality.** Any N >= 3 is supported. Non-power-of-two trees are padded as
  described above.
* **The `w` port** is an extra output for observation.

The published comparison reports 42 FPGA slices and 16.49 ns for this unit. Those
figures depend on the device and tools. This RTL does not reproduce them.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=<n> failures=<n>`.

* `tb_pg_tree`: trees of width 16, 15 and 5 against a serial ripple of the same
  operator. Directed patterns, an exhaustive 5-bit sweep and random fields.
* `tb_csa_mod2n`: checks s + 2*cy = a + b + c (mod 2^N) and the per-bit parity and
  majority. Random at N = 16, exhaustive at N = 4.
* `tb_rns_comparator`: against `>` and `==`. Random and single-bit-difference at
  N = 16, exhaustive at N = 6.
* `tb_carry_gen`: against integer addition of S + 2C (N = 16 random, N = 4 exhaustive).
* `tb_post_proc`: all 32 input combinations.
* `tb_rns_sign_detect`: end to end at the default N = 16. About 200,000 random numbers
  with idle cycles, the boundary numbers 0, M/2-1, M/2, M-1 and numbers near them, and
  numbers built to hit x2 == x1' with x1[n] = 0 and with x1[n] = 1. It also does a
  reset in mid-stream.
  * The testbench forms the residues from X and expects sign = (X >= M/2).
  * It checks W against its definition using signed floor division.
  * It checks the two-cycle latency for every item.
  * It counts each case (both signs, all four cases of W, bubbles, back-to-back items,
    the reset flush) and fails if any case never occurred.
* `tb_rns_sign_detect_small`: every number of the dynamic range for N = 3, 4, 5 and 6
  (840 to 512,064 numbers each), through `rns_sign_exhaust`.

Simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/rns_sign_pkg.sv \
    tb/tb_rns_sign_detect.sv --top-module tb_rns_sign_detect -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Each run takes seconds. Lint a module
with `verilator --lint-only -Wall -y rtl rtl/rns_sign_pkg.sv rtl/<module>.sv`.

## Changing it

* **Word size.** Set `N`. The trees, widths and padding follow it. The testbenches with
  fixed N = 16 hold their moduli as local parameters.
* **Deeper or shallower pipeline.** The stage boundaries are the two `always_ff`
  blocks in `rns_sign_detect`, on the structs `stage1_t` and `stage2_t`. Removing a
  rank reduces the latency by one. `tb_rns_sign_detect` takes the latency from its
  `LAT` local parameter.
