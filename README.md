# Area-optimized parallel syndrome calculator for Reed-Solomon decoders

A Reed-Solomon decoder starts by computing the syndromes of the received
word, the values S_i = R(alpha^i), i = 1..2t, of the received polynomial at the
roots of the generator polynomial. When throughput calls for p symbols per clock,
the usual structure gives each syndrome its own bank of p constant
finite-field multipliers and a (p+1)-input adder, so its area grows almost
linearly with p. At RS(255, 239, 8) with p = 8 the syndrome stage can take
about a quarter of a decoder.

This design turns the work of all 2t syndromes in one clock into a single
constant binary matrix product over GF(2). There are no separate multipliers
and no separate adders, only one XOR network. Its common sub-expressions are
shared across every lane and every syndrome. The RTL builds the matrix from
the field parameters at elaboration. It then runs the pairwise sharing
search in a constant function and generates the XOR network from the result.

The default configuration is RS(255, 239, 8) over GF(2^8) with 8 symbols per
clock: 64 input bits per clock, which is 12.8 Gb/s at 200 MHz.

## The p-parallel recurrence

With the word fed highest degree first, p symbols per beat, Horner's rule gives
for every syndrome i

    delta_i(j+1) = delta_i(j) * alpha^(i*p) + sum_{l=0}^{p-1} r_l(j) * alpha^(i*l)

where r_l(j) is lane l of beat j. Lane 0 holds the lowest-degree symbol of the
group, and delta_i starts at 0. After ceil(n/p) beats, delta_i = S_i. Each
syndrome needs one m-bit register. Everything else in the recurrence is
multiplication by constants and addition, both of which are linear over GF(2).

## One matrix for all syndromes

Multiplying an m-bit symbol by a constant alpha^e is an m x m binary matrix
whose row b holds the bits of alpha^(e+b). Take the p input symbols and the 2t
registers as one bit vector of length m*p + 2t*m. The whole recurrence for all
syndromes is then one product

    Delta(j+1) = [R(j)  Delta(j)] x [X_R ; X_Delta]

with a constant (m*p + 2t*m) x 2t*m matrix:

- `X_R` holds, for every syndrome i, the blocks for alpha^(i*l), l = 0..p-1.
- `X_Delta` is block diagonal, with the feedback constant alpha^(i*p) for each
  syndrome.

At the default size this is 192 x 128. Output bit c is the XOR of the input
bits with a 1 in column c. The field additions disappear into those XORs.

`sc_xor_combination` builds this matrix in a constant function, using bit k
of a symbol as the coefficient of alpha^k. It hands the matrix to
`cse_xor_network`.

## Sharing XOR sub-expressions

`cse_xor_network` implements any constant GF(2) matrix product. At
elaboration it runs a greedy pairwise matching search on the matrix. Rows are
terms (the inputs at first) and columns are outputs.

1. For every pair of rows, count the columns where both are 1.
2. Take the pair with the highest count. It becomes a new term v = x ^ y,
   which is one XOR gate.
3. In those columns, clear the pair's 1s. Append a row for v with 1s in
   exactly those columns.
4. Repeat until no pair of terms is shared by two or more outputs.

Each output is then an XOR tree over the terms left in its column. Ties go to
the first pair in row order. The module's default matrix is multiplication by
alpha^12 in GF(2^4) with x^4+x+1. On it, the search finds v1 = a0^a1 and then
v2 = a2^v1, and the gate count falls from 6 to 3. The testbench checks both.

Two-input XOR gate counts for the syndrome matrix:

| configuration | no sharing | complete search | as built by default |
|---|---|---|---|
| GF(2^8), p = 8, t = 8 (192 x 128) | 3768 | 1678 (474 shared terms) | 2847 (32 shared terms) |
| GF(2^8), p = 4, t = 1 | 154 | 98 | complete search |
| GF(2^4), p = 3, t = 2 | 99 | 68 | complete search |

**Why the default stops at 32 shared terms.** The search runs inside the
compiler as a constant function, and each round scans all row pairs. At the
full size the complete search needs 474 rounds. That is far beyond the
constant-evaluation step limit of the slang front end, which gives up between
32 and 35 rounds on this matrix. Verilator's constant evaluator is no better placed: it needs about half a minute for 32 rounds and over five minutes for 100. The default `CSE_TERMS = 32` keeps the 32
most widely shared terms. The rest of the sharing is left to logic synthesis,
which finds some sharing of its own. Small matrices run the complete search:
set `CSE_TERMS` to at least half the number of matrix entries, rows x columns / 2, which no search can exceed. With `CSE_TERMS = 0`
the module makes one plain XOR tree per output bit and elaborates fastest.
The sharing only changes gate structure, never the function.

Heavily shared terms have high fan-out and can slow the network. A fan-out
limit on the search would address that, but this design does not have one.

## Using `rs_syndrome_calc`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `in_valid` | in | 1 | `in_sym` carries a beat |
| `in_sym` | in | P x M | lane l of beat j = r_(NB*P - P*(j+1) + l) |
| `out_valid` | out | 1 | one-cycle pulse: the result is on `syndrome` |
| `syndrome` | out | 2T x M | element i-1 is S_i |
| `syn_error` | out | 1 | some syndrome is nonzero, so the word is corrupted |

- **Word length.** A word takes NB = ceil(N/P) beats, which is 32 for
  N = 255, P = 8. The first beat carries the highest-degree group.
- **Padding.** When P does not divide N, the top NB*P - N lanes of the first
  beat would be coefficients of degree N or higher. The block forces them to
  zero, so their contents are ignored. At the default this is lane 7 of the
  first beat.
- **Framing.** The block counts beats itself: the first valid beat after reset
  starts a word.
- **Flow control.** Idle cycles (`in_valid` low) may fall anywhere, including
  inside a word. There is no back-pressure.
- **Back-to-back words.** The first beat of a word ignores the old register
  contents, so words can follow each other with no gap.
- **Result timing.** `out_valid` rises in the cycle after the last beat. With
  no idle cycles that is NB cycles after the first beat. The result is shown
  for that one cycle only, because the registers take the next word's first
  beat at the following edge.

Parameters, with their defaults:

| parameter | default | meaning |
|---|---|---|
| `M` | 8 | bits per symbol |
| `P` | 8 | symbols per clock |
| `T` | 8 | correctable symbols; 2T syndromes |
| `N` | 255 | codeword length |
| `POLY` | `gf_pkg::default_poly(M)` | field polynomial, 0x11D for M = 8 |
| `CSE_TERMS` | 32 | bound on shared terms, see above |

The roots are alpha^1 .. alpha^2T. The field polynomial is not fixed by the
method. x^8+x^4+x^3+x^2+1 is the usual choice for RS(255, 239) and is used
here. It must match the encoder.

## What follows the published method and what is added

These parts follow the published architecture:

- the recurrence and the symbol order per beat;
- the one-matrix formulation [X_R; X_Delta] with registers feeding back;
- the pairwise sharing search;
- the default code RS(255, 239, 8) with p = 8.

These are this design's own choices:

- the beat counter, the in-block zero padding (the method assumes p divides
  n, yet uses p = 8 with n = 255);
- reset, the valid-only handshake, the single-cycle result pulse and the
  `syn_error` flag;
- the tie rule of the search;
- the field polynomial;
- the bound on shared terms.

The published results tap the syndromes either after the register or right
at the XOR outputs. Here they are taken after the register.

Not included: the later decoder stages (key-equation solver, Chien search,
Forney evaluation, the word buffer) and the encoder. Timing closure at
200 MHz was not checked. The gate counts above are XOR counts from the
search, not synthesized areas.

## Files

- `rtl/gf_pkg.sv`: field helpers (constant functions) and default field
  polynomials.
- `rtl/cse_xor_network.sv`: constant GF(2) matrix product with the sharing
  search.
- `rtl/sc_xor_combination.sv`: builds [X_R; X_Delta] and instantiates the
  network.
- `rtl/rs_syndrome_calc.sv`: the syndrome block (top): registers, beat
  counter, padding and result.
- `tb/tb_gf_pkg.sv`: reference field arithmetic, generator polynomial and
  codewords, written independently of `gf_pkg`.
- `tb/tb_cse_xor_network.sv`: the alpha^12 example, exhaustive, and a random
  12 x 10 matrix.
- `tb/tb_sc_xor_combination.sv`: random vectors against the recurrence, in
  three configurations. It also compares the gate and shared-term counts with
  a separate software model of the same search.
- `tb/tb_rs_syndrome_calc.sv`: end to end at the default parameters, 42
  words. It covers clean, corrupted and random words, idle cycles, back-to-back
  words and a garbage pad lane. It checks the results and the cycle timing.
- `tb/tb_sc_workloads.sv` with `tb/tb_sc_config.sv`: RS(255, 239, 8) at
  p = 1, 2, 4, 6, and RS(255, 255-2t, t) at p = 8 for t = 4, 6, 10, 16.
  These runs switch the sharing search off to keep elaboration short; sharing
  changes only the gate structure.

## Simulating

With Verilator 5, from the top folder:

    verilator --binary --timing --assert -y rtl -y tb rtl/gf_pkg.sv tb/tb_gf_pkg.sv \
        tb/tb_rs_syndrome_calc.sv --top tb_rs_syndrome_calc -o sim
    ./obj_dir/sim

Use the same command for the other testbenches with their file and top name.
Each testbench ends with a line `TB_RESULT checks=<n> failures=<n>`.

Elaboration takes under a minute at the default size, almost all of it spent
in the sharing search. The complete search at the default size would take
many times longer in a simulator's constant evaluator. That cost, along with
the front-end step limit, is why the default is bounded.
