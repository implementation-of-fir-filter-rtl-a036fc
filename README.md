# Modulo 2^n − 2^k − 1 adder, with an FIR filter, a random number generator and a self test

Residue number systems (RNS) split arithmetic into independent channels, each
working modulo one member of a set of co-prime moduli. Moduli of the form
m = 2^n − 2^k − 1 fit well into such sets. This RTL implements an adder for
that channel type. It gets `(A + B) mod m` out of **one** carry computation
instead of the usual two parallel adders (one for A+B, one for A+B−m).

The default channel is n = 8, k = 4, so **m = 239**. Around the adder sit three
users:

* `fir_mod`: a 4-tap FIR filter whose additions are modulo adders;
* `mod_rng`: a word-wide shift register with modulo-adder feedback, used as a
  pseudo-random residue generator;
* `mod_bist`: an LFSR-driven built-in self test of the adder.

`rns_top` places these three side by side.

## The idea: compute A+B+T, then correct the carries

Let T = 2^n − m = 2^k + 1. For residues A, B < m:

```
(A + B) mod m  =  low n bits of A+B+T   if A+B+T >= 2^n   (i.e. A+B >= m)
                  A+B                   otherwise
```

A conventional design builds both sums. This one builds only the carries of
A+B+T. The carry out of that sum is the selection signal. When it is 0,
the carries of A+B are *derived* from the carries already computed, not
computed again.

T has exactly two ones, at bit 0 and bit k. The word is therefore split into
two halves:

* **A1**, bits 0 … k−1, sees A + B + 1 (carry-in 1 at bit 0);
* **A2**, bits k … n−1, sees A + B + 1 at its own bit k, plus the carry
  c_k out of A1.

The adder (`mod_adder`) is four purely combinational units in a row.

```
 a,b ──► mod_preproc ──g,p,g_msb──► mod_carry_gen ──c_t,cout,group P──► mod_carry_corr ──c_real──► mod_sum ──► s
                 │                                                          ▲                        ▲
                 └──────────────────────────── g, p ────────────────────────┴────────── p ───────────┘
```

### 1. Pre-processing (`mod_preproc`)

Each bit gets one of two cells:

| cell | inputs | generate g | propagate p |
|---|---|---|---|
| two-input | x, y | x·y | x ⊕ y |
| three-input (x, y, constant 1) | x, y, 1 | x + y | ¬(x ⊕ y) |

The three-input cell sits at bit 0 and bit k, where T has its ones. In A1 its
carry simply becomes g_0. In A2 the cell at bit k leaves a carry-save pair:
row-1 sums p_j and row-1 carries g_j, one place to the left. A second row of
two-input cells merges the pair into one (g′, p′) per bit:

```
g'_j = p_j · g_(j-1),   p'_j = p_j ⊕ g_(j-1)     j = k+1 … n-1
g'_k = 0,               p'_k = p_k
```

The row-1 carry out of the top bit (`g_msb`) cannot enter the prefix tree, so
it goes straight to the carry-out logic.

### 2. Carry generation (`mod_carry_gen`)

There is one Sklansky parallel-prefix tree per half (`sklansky_prefix`).
Any other prefix tree would do, and only this module would change.

* A1: c_i^T = G_(i−1:0) for i = 1 … k.
* A2: c_j^T = G′_(j−1:k) + P′_(j−1:k)·c_k^T. The carry from A1 enters
  through one row of "gray" cells after the tree.
* cout = g_msb + G′_(n−1:k) + P′_(n−1:k)·c_k^T.

The unit also hands on the group propagates that correction needs: P_(i−1:0)
of the plain A+B bits, and P′_(j−1:k) of A2.

### 3. Carry correction (`mod_carry_corr`), the hard part

When cout = 1 the A+B+T carries are used unchanged. When cout = 0 the sum
stage needs the carries of A+B. They come from two corrections.

**Low half (i = 1 … k).** A+B+T and A+B differ here only by the carry-in 1 at
bit 0. That carry-in changes c_i only if it propagates through all of bits
0 … i−1:

```
c_i^real = c_i^T · (cout + ¬P_(i-1:0))
```

In particular c_k of A+B is c_k^T·¬P_(k−1:0).

**High half (j = k+1 … n−1).** Call Y the A2 carry-save sum *without* any
carry-in. Then

```
A2 part of A+B+T  =  Y + c_k^T
A2 part of A+B    =  Y − 1 + c_k        (the cell at bit k added the 1 of T)
```

The carries are taken with respect to the merged propagates p′_j, because the
sum stage XORs with p′_j.

1. *Remove the carry-in.* The carries of Y alone are
   G′_(j−1:k) = c_j^T · ¬(P′_(j−1:k) · c_k^T).
2. *Subtract one when c_k = 0.* Y − 1 flips bit j exactly when bits
   k … j−1 of Y are all zero, written z_j:

   ```
   c_j^real = G'_(j-1:k) ⊕ (¬c_k · z_j)
   ```

z_j needs no carries. The sum of a carry-save pair is zero on bits
k … j−1 exactly when p′_k = 0 and p′_i = p′_(i−1) + g′_(i−1) for every
i = k+1 … j−1. This is a chain of equality checks, ANDed together.

Note that the corrected carry can be 1 where c^T is 0 (for example 16 + 0,
bit 5). A high-half correction that can only clear carries is therefore not
enough. The high half selects between c^T and the corrected value with cout.

### 4. Sum computation (`mod_sum`)

```
s_0 = ¬cout ⊕ p_0
s_k = c_k^real ⊕ ¬cout ⊕ p_k
s_i = c_i^real ⊕ p_i          (other bits; p_i = p'_i above bit k)
```

p_0 and p_k are the XNOR outputs of the three-input cells. Inverting them
when cout = 0 turns them back into the plain A+B partial sums.

### Worked example (n = 8, k = 4)

A = 215 (11010111), B = 177 (10110001):

| signal | value |
|---|---|
| g (g′ above bit 4) | 00100001, g_msb = 1 |
| p (p′ above bit 4) | 01010111 |
| c_t (c_7 … c_1) | 1100111 |
| cout | 1 |
| c_real | 1100111 |
| s | 10011001 = 153 = (215 + 177) − 239 |

For A = 42, B = 14: c_t = 0111110 and cout = 0. Correction gives
c_real = 0001110 and s = 56. `tb_mod_adder` checks all of these vectors.

## The three users

### FIR filter (`fir_mod`)

y[t] = Σ h[i]·x[t−i] mod m, for i = 0 … 3. This is a direct form with three
sample registers (z⁻¹), four multipliers, and a chain of three modulo adders.
The first adder adds taps 0 and 1, and each later one adds the next tap.

* x and the coefficients h[0..3] are residue inputs (8 bits each).
* The delay line shifts on every clock. A synchronous, active-high `rst`
  clears it.
* y is combinational: the output for x[t] is valid in the same cycle.

Each multiplier (`mod_mult`) reduces its product modulo m before the adder,
so every adder input is a valid residue. The reduction folds with
2^n ≡ 2^k + 1 (mod m): it multiplies the bits above n by 17 and adds them to
the low byte. Three folds and one conditional subtraction of m finish it.

### Random number generator (`mod_rng`)

There are 11 cells of 8 bits, each holding a residue. On every clock with `en`
they shift towards the output. Cell 0 receives the modular sum of cells
0, 1, 4, 7, 9 and 10, formed by a chain of five modulo adders:

```
x[t] = x[t-1] + x[t-2] + x[t-5] + x[t-8] + x[t-10] + x[t-11]   (mod 239)
```

The output is cell 10.

* `rst` loads the default seed (cell i = i + 1). `load` loads `seed` and takes
  priority over `en`.
* The all-zero state is a fixed point.
* The tapped cells are set by `TAP_MASK`.

The recurrence runs over the prime field GF(239). Its period is therefore
bounded by 239^11 − 1, about 1.45·10^26. That is below 2^88 − 1, the
period an 88-bit binary LFSR could reach. Whether these particular taps reach
the maximum has not been analysed.

### Self test (`mod_bist`)

A 16-bit maximal-length LFSR (x^16 + x^14 + x^13 + x^11 + 1) supplies the
operands: the upper byte is a, the lower byte is b. A byte of 239 or more has
239 subtracted. Over the full period of 65 535 steps every byte pair except
(0,0) appears, so every residue pair is applied.

A reference checker computes `a+b >= m ? a+b−m : a+b` and compares it, and
the adder's cout, with the adder under test. Mismatches are counted.

* Handshake: `start` while idle or done starts a run. `busy` is high for
  65 535 cycles (one pattern per cycle). Then `done` stays high, with
  `pass = (err_count == 0)`.
* `inject_fault` flips bit 0 of the result seen by the checker. This tests
  the checker itself.

## What follows the source design and what does not

Taken from the source design:

* the split into A1 and A2;
* the two cell types and where they sit;
* the second pre-processing row in A2;
* Sklansky trees, with A1's carry feeding A2 through gray cells;
* the low-half correction cell;
* the sum equations;
* the four-tap filter structure with modulo adders in the accumulation chain;
* the 11-cell, five-adder generator.

The published intermediate values (g, p, c^T, c^real and s for four operand
pairs) are reproduced exactly.

This design's own:

* **Second row of A2 and high-half correction.** The equations of the second
  pre-processing row, and the whole high-half carry correction (section 3
  above), are derived here. The published form of the high-half correction
  could not be made consistent with its own sum equations.
* **Multiplier.** The original multipliers truncate 16-bit products into the
  8-bit adders. This design reduces the products modulo m instead.
* **Generator taps.** The cells that feed the generator are read off a block
  drawing without printed indices. Cell "8" (index 7) is the least certain
  reading.
* **Self test.** The published design only states that the adder is self
  tested with an LFSR. Everything in `mod_bist` is this design's.
* **Control signals.** Reset style, seed load, enable and the top-level
  arrangement are this design's choices.
* **Reported results not reproduced.** The published FPGA results are not
  reproduced: an 11.21 ns filter delay and "12 registers". This filter has
  three 8-bit delay registers.
* **Baseline not built.** The conventional binary-adder FIR filter used
  there as a baseline is not included.

## Trust

* Every unit of the adder is checked exhaustively over all 239² residue pairs.
  The whole adder is checked the same way, including its carry out.
* The multiplier is checked exhaustively.
* The filter, generator and self test are checked cycle by cycle against
  software models.
* Each testbench was also run against a deliberately broken copy of its
  module and reported failures.

Inputs of m or more are outside the adder's contract and give undefined
results. Other (n, k) pairs are parameterised but have not been verified.

## Files

| file | content |
|---|---|
| `rtl/mod_pkg.sv` | modulus function, reference modular add, fold count |
| `rtl/mod_preproc.sv` | pre-processing unit |
| `rtl/sklansky_prefix.sv` | generic Sklansky prefix tree |
| `rtl/mod_carry_gen.sv` | carry generation (A1 and A2 trees, carry out) |
| `rtl/mod_carry_corr.sv` | carry correction |
| `rtl/mod_sum.sv` | sum computation |
| `rtl/mod_adder.sv` | the modulo adder |
| `rtl/mod_mult.sv` | modulo multiplier (product and fold reduction) |
| `rtl/fir_mod.sv` | 4-tap modulo FIR filter |
| `rtl/mod_rng.sv` | random number generator |
| `rtl/mod_bist.sv` | adder self test |
| `rtl/rns_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module; `tb_rns_top` runs the whole design at default parameters |
| `tb/tb_fir_step.sv` | filter step response (x = 1, all coefficients 1: output 1, 2, 3, 4, 4, …) |
| `tb/tb_rng_run.sv` | 200 000 generator steps: model match, no return to the seed, every residue produced |

Parameters: `N` (n, default 8) and `K` (k, default 4) on every module;
`TAPS` (4) on the filter; `STAGES` (11) and `TAP_MASK` on the generator;
`PATTERNS` (65 535) on the self test.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl rtl/mod_pkg.sv rtl/*.sv \
          tb/tb_rns_top.sv --top-module tb_rns_top -Mdir obj_top
./obj_top/Vtb_rns_top
```

Replace `tb_rns_top` with any other testbench name to run a single unit. All
testbenches finish in well under a second of wall time. For lint only:

```
verilator --lint-only -Wall -Irtl rtl/mod_pkg.sv rtl/rns_top.sv
```

This reports three unused-signal warnings. Two are intended: `wrap` in
`fir_mod` is there for the testbenches to observe, and the A1 group
propagates in `mod_carry_gen` are not needed. The third, on the unused upper
bits of a loop index in `sklansky_prefix`, is harmless.
