# Multiplication by rational constants, correctly rounded

Dividing by 3, multiplying by 7/5, scaling by 1/9: a constant multiplier is
usually built by truncating the constant to a finite binary value and
implementing that as a sum of shifted copies of the input.  For a *rational*
constant a/b this wastes structure.  The binary expansion of a/b is
eventually periodic (1/3 = 0.010101..., 7/5 = 1.0110 0110 0110...), so a
product by 2^k repetitions of the period can be built from the product by
2^(k-1) repetitions with a single addition:

    pi_0     = x * p                      (p = the s-bit period)
    pi_(k+1) = (pi_k << 2^k * s) + pi_k   (twice as many periods, one adder)

The number of adders therefore grows with the logarithm of the precision
instead of linearly.  Because b is odd once powers of two are removed, the
exact product x*a/b also cannot come arbitrarily close to a rounding
midpoint, so a truncated constant only a few bits longer than the result is
enough to round the product *correctly*, as if the constant were exact.

This repository holds synthesizable SystemVerilog for:

* a periodic shift-and-add multiplier (`periodic_shift_add_mult`);
* a table-based (KCM) multiplier for the same constants (`kcm_rational_mult`);
* a correct-rounding stage shared by both (`cr_round`);
* a floating-point operator y = x * a/b on IEEE-layout operands
  (`fp_const_mult_rational`);
* a top level that builds the operator with both multipliers side by side
  (`rational_const_mult_top`).

Everything is combinational and fully parameterised by the constant (`A`,
`B`) and the precision.  All sizing — period, pattern, number of stages,
table contents — is computed at elaboration time from `A` and `B` by
constant functions in `rational_const_pkg`; there are no data files.  The
default configuration throughout is x * 7/5 in IEEE single precision.

## 1. From a/b to a period

`rational_const_pkg::periodic_rep(a, b)` rewrites the constant as

    a/b = 2^e * c/d = 2^e * (h + cf/d),    c, d odd,  cf < d

* `e` — the power of two (an exponent shift, no hardware);
* `h` — the integer header (`h = 1` for 7/5, `0` for 1/3);
* `s` — the period: the multiplicative order of 2 modulo d, i.e. the
  smallest s with 2^s mod d = 1;
* `p = floor(2^s * cf / d)` — the s-bit repeating pattern.

Since 2^s = kd + 1, one gets 2^s * cf/d = p + cf/d: shifting the fraction
by one period reproduces itself plus the integer p, which is exactly the
periodicity.  Examples: 1/3 gives s = 2, p = 01; 1/9 gives s = 6,
p = 000111; 7/5 gives h = 1, s = 4, p = 0110; 5/9 gives s = 6, p = 100011.

The integers are 64-bit, so periods up to about 60 bits are supported
(every odd d below 61, and many larger ones).

## 2. The periodic shift-and-add tree (`periodic_shift_add_mult`)

For 7/5 with a 24-bit significand the tree is:

| stage | operation | constant (binary) | width |
|-------|-----------|-------------------|-------|
| pi_0 | (x << 1) + x | 11 | 26 |
| pi_1 | (pi_0 << 4) + pi_0 | 110011 | 30 |
| pi_2 | (pi_1 << 8) + pi_1 | 11001100110011 | 38 |
| f = pi_3 | (pi_2 << 16) + pi_2 | 1100...110011 (30 bits) | 54 |
| r | (x << 31) + f, then one zero appended | 1.0110 0110 ... 0110 (32 fraction bits) | 56 + 1 |

Five adders build 7/5 to 33 significant bits.  Details of the construction:

* **Zero trimming.**  The period 0110 has a leading and a trailing zero.
  The datapath carries x * 11 only; the trailing zero is appended to the
  result as a constant bit, the leading zero simply never occupies a bit.
* **How far to double.**  If w fraction bits of the constant are needed, the
  doubling stops at the stage i with 2^i s < w <= 2^(i+1) s.  The last
  adder joins pi_i and the *smallest* earlier stage pi_j that still reaches
  w bits: f = (pi_i << 2^j s) + pi_j, giving F = (2^i + 2^j) s fraction bits.
  For 1/9 at 24 bits (w = 30, s = 6) this is pi_2 (4 periods) plus pi_0 (one
  period) = 30 bits, instead of doubling again to 48.
* **The header.**  h*x is produced by a small constant multiplier in
  parallel.  When j < i it is added to pi_j before the last adder (shorter
  critical path); when j = i it is added last.
* **Small constants** (the period p with its zeros removed, and h) are
  multiplied by `const_int_mult`, a plain binary shift-and-add (one adder
  per extra set bit).  With it the adder counts are 4, 5 and 5 for 1/3, 1/9
  and 7/5 at 24 bits, and one more per doubling of the precision.

The output `r` is the integer x * (h*2^F + floor(2^F * cf/d)): the product
by the constant truncated to F fraction bits.  `NUM_ADDERS` is exported as a
localparam.

## 3. How many bits, and rounding them (`cr_round`)

This is the subtle part of the design.

**Why few bits suffice.**  Let x be the N-bit significand (top bit set) and
P = x*c/d the exact product.  A rounding midpoint of a Q-bit result is
M = (2J+1) * 2^k for the binade's half-ulp 2^k.  Then

    P - M = (x*c - (2J+1) * 2^k * d) / d.

If 2^k < 1, multiply through by 2^-k: x*c*2^-k is even while (2J+1)*d is
odd, so |P - M| >= 2^k / d.  If 2^k >= 1 the numerator is an integer, so
either |P - M| >= 1/d or P = M exactly.  Around every midpoint there is
an exclusion zone of half-width Delta = 2^min(k,0) / d which P can only
enter by landing exactly on the midpoint.

**Choosing F.**  Truncating the periodic constant after F fraction bits
leaves an error of exactly 2^-F * cf/d on the constant, so r lies below P
by less than 2^(N+g) units of its LSB, with g = ceil(log2(cf/d)).  F is
taken as the larger of:

* the published bound: the constant to q + 1 + ceil(log2 b) bits;
* the bound this rounding stage needs: 2^(N+g-F) <= Delta.

For 1/3, 1/9 and 7/5 at 24, 53 and 113 bits both give, after rounding up to
a whole number of periods, the constant sizes 32/64/128, 30/60/120 and
33/65/129 bits (header included).

**Rounding.**  `cr_round` adds the error bound to r, so that
P <= r' < P + 2^(N+g).  It then picks the binade (the product of an N-bit
significand by K lies in [2^(N-1) K, 2^N K), two possible leading-one
positions), keeps Q bits and rounds to nearest:

* round bit 0: round down;
* round bit 1 and r' at least one error bound above the midpoint: round up;
* round bit 1 and r' less than one error bound above the midpoint: P is
  exactly the midpoint (it cannot be that close otherwise), so the tie is
  resolved to even.

The tie case is not academic: for 7/5 with a 24-bit result, every x that is
an odd multiple of 5 with 7x/5 >= 2^24 gives an exact odd integer that needs
25 bits, a true midpoint.  A truncated constant always lies below it and
would always round it down; the correction and tie test above make the
result round-to-nearest-even exactly.  A rounding carry renormalises the
result to 1.000... in the next binade.  For a constant with d = 1 (for
example 3/8) the product is exact and the stage is a plain
round-to-nearest-even.

Outputs: the Q-bit significand (leading one included), the binade offset
`eo` (0, 1 or 2) and `info` = {hi, up, tie, carry} for monitoring.  The
carry cannot occur for 7/5 when Q = N, and synthesis removes it there.

## 4. The table-based alternative (`kcm_rational_mult`)

The KCM method cuts x into chunks of `ALPHA` bits (4 by default; 5 or 6 on
FPGAs with larger LUTs).  Chunk X_i addresses a table holding
floor(X_i * c/d * 2^(weight + F)), all tables are aligned on the same LSB,
and the partial products are summed either by a chain of adders of
increasing width starting at the least significant table (`TREE = 0`, the
minimum-cost form and the default) or by a balanced tree (`TREE = 1`,
shallower).  The tables are generated at elaboration; the periodicity of
c/d makes their columns repeat, which synthesis exploits by itself.

Each table truncates by less than one LSB, so the sum is below the exact
product by less than NCH LSBs (NCH = number of chunks).  F is chosen so
that twice that bound, rounded to a power of two, fits the exclusion zone
(twice, because a table sum can be exact and the correction must exceed
the error strictly).  The same `cr_round` then gives bit-identical,
correctly rounded results.

## 5. The floating-point operator and the top

`fp_const_mult_rational` takes an IEEE-layout operand (`WE` exponent, `WF`
fraction bits; binary32 by default), multiplies {1, fraction} by c/d with the
chosen method (`METHOD` 0 = shift-and-add, 1 = KCM), rounds to WF+1 bits
and sets the exponent to E_in + e + floor(log2(c/d)) + eo.  Special values:

| input / result | output |
|----------------|--------|
| zero or subnormal input | signed zero (subnormals are flushed) |
| infinity | infinity |
| NaN | canonical quiet NaN (payload dropped) |
| result exponent above range | infinity |
| result below the normal range | signed zero (flush) |

Only positive constants are supported, so the sign passes through.

`rational_const_mult_top` instantiates the operator twice on the same input,
once per method, with outputs `y_sa`, `y_kcm`, `info_sa`, `info_kcm`.  Both
outputs are always identical; keeping both lets synthesis compare their cost
and lets each check the other.

## 6. Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| top, fp operator | `A`, `B` | 7, 5 | the constant a/b (positive integers) |
| top, fp operator | `WE`, `WF` | 8, 23 | exponent and fraction bits |
| top, fp operator, KCM | `ALPHA` | 4 | KCM table address bits |
| fp operator | `METHOD` | 0 | 0 shift-and-add, 1 KCM |
| multipliers, `cr_round` | `N`, `Q` | 24, 24 | input and result precision |
| KCM | `TREE` | 0 | chain (0) or balanced tree (1) |

Everything else (period, F, stage indices, table words, widths) is derived.
Single (8/23), double (11/52) and quadruple (15/112) precision have been
simulated for 1/3, 1/9 and 7/5.

## 7. Files and simulation

    rtl/rational_const_pkg.sv        constant functions, report type
    rtl/const_int_mult.sv            small integer constant multiplier
    rtl/periodic_shift_add_mult.sv   periodic shift-and-add tree
    rtl/kcm_rational_mult.sv         table-based multiplier
    rtl/cr_round.sv                  correct rounding
    rtl/fp_const_mult_rational.sv    floating-point operator
    rtl/rational_const_mult_top.sv   top: both operators side by side
    tb/tb_ref_pkg.sv                 exact reference (wide integer fractions)
    tb/tb_*.sv                       self-checking testbenches

Each testbench prints `TB_RESULT checks=N failures=M`.  To run one with
Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/rational_const_pkg.sv tb/tb_ref_pkg.sv \
        tb/tb_rational_const_mult_top.sv --top-module tb_rational_const_mult_top
    ./obj_dir/Vtb_rational_const_mult_top

| testbench | what it checks |
|-----------|----------------|
| `tb_rational_const_pkg` | periods and patterns of 1/3, 5/9, 7/5, 1/9, 1/5, 10/3, 3/8, 3/7; constant sizes and adder counts for 1/3, 1/9, 7/5 at 24/53/113 bits |
| `tb_const_int_mult` | x*C for several C |
| `tb_periodic_shift_add_mult` | every stage of the 7/5 tree against the constants of the table above; nine constant/precision pairs against x * floor(a*2^F/b) |
| `tb_cr_round` | rounding of 7/5, 1/3, 1/9, 3 against exact round-to-nearest-even, including exact ties and rounding carries |
| `tb_kcm_rational_mult` | table sums and error bound, chain and tree, ALPHA 4 and 5 |
| `tb_fp_const_mult_rational` | FP operator for 7/5 (both methods), 1/3, 1/9 (single and double), 10/3, 1/10, 3/8 with special values, overflow and underflow |
| `tb_rational_const_mult_top` | the default top end to end: both methods equal the reference; counts and requires binade choice, round up/down, ties both ways, overflow, zero/subnormal/infinity/NaN inputs |
| `tb_table1_workloads` | the nine operators 1/3, 1/9, 7/5 × single/double/quadruple through the top |

The reference model computes x*a/b as an exact fraction of 512-bit integers
and rounds it, without using any of the design's sizing functions.

## 8. How far to trust it, and where it goes beyond the method

Verified by simulation only (random plus targeted inputs, tens of thousands
per configuration); correctness of the rounding rests on the exclusion-zone
argument of section 3, which holds for any positive a/b.

Choices made here that the underlying method leaves open or does not cover:

* the tie correction in `cr_round` and the fraction-bit bound it implies
  (for 1/3 and 1/9 it asks for one or two bits more than the published
  bound, which rounding up to whole periods absorbs; for 7/5 the two agree);
* binary shift-and-add for the small sub-constants (a CSD or optimal
  decomposition would save adders for patterns with long runs of ones);
* when i = j the header is always added last, without comparing full-adder
  counts of the two bracketings;
* the KCM guard bits, derived from the same exclusion zone;
* the whole floating-point wrapper: IEEE layout, flush-to-zero, NaN
  handling, positive constants only;
* no pipelining: every block is combinational.  For throughput, registers
  can be placed between the doubling stages of the tree or between levels
  of the KCM adder tree.
