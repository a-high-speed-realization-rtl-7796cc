# Residue-to-binary conversion for {2^n, 2^n-1, 2^n+1} with signed-digit adders

A residue number system (RNS) stores an integer X as its remainders modulo a
few pairwise-prime moduli. Addition and multiplication then work on each
remainder separately and carry-free, but the final result must be turned back
into an ordinary binary number, and that conversion is usually the slow step.

This design converts from the popular three-moduli set

    m1 = 2^n,   m2 = 2^n - 1,   m3 = 2^n + 1,     M = 2^n (2^2n - 1)

to binary using the Chinese remainder theorem (CRT). Its main idea is to do
almost all of the CRT arithmetic in a **redundant signed-digit (SD)** number
system, where digits are -1, 0 or +1. In SD form a modular addition has no
carry chain at all, and the awkward modulus 2^n+1 becomes as easy as 2^n-1:
multiplying by 2 modulo 2^n+1 is a rotation with the wrapped digit negated,
and negating an SD digit is just flipping its sign bit. Only one
carry-propagating addition remains at the very end, and it is done with a
logarithmic-depth parallel-prefix adder.

The RTL is parameterised by `n` (`N`, default 16) and is fully combinational.

## The arithmetic

With residues x1 = X mod 2^n, x2 = X mod 2^n-1, x3 = X mod 2^n+1, the CRT for
this moduli set simplifies to

    X  = 2^n * D + x1
    D  = < -2^n*TA + (2^n+1)*TB + (2^n-1)*TC >  mod (2^2n - 1)
    TA = x1
    TB = < 2^(n-1) * x2 >          mod (2^n - 1)
    TC = < 2^(n-1) * x3 + x3 >     mod (2^n + 1)

The constants come from the modular inverses: modulo 2^n the weight of x1 is
-1, modulo 2^n-1 the inverse of 2 is 2^(n-1), and modulo 2^n+1 the inverse of
2 is 2^(n-1)+1. Because x1 < 2^n it lands untouched in the low n bits of X;
only D, a 2n-bit number, needs real work. D = k3*2^n + k2 gives the upper 2n
bits of X.

Worked example, n = 4 (M = 4080), X = 1000: residues (8, 10, 14).
TB = 8*10 mod 15 = 5, TC = 9*14 mod 17 = 7,
D = (-16*8 + 17*5 + 15*7) mod 255 = 62, and X = 16*62 + 8 = 1000.

## Signed digits and the carry-free modular adder (MSDA)

Each SD digit travels on two wires `{s, a}`: sign and magnitude
(`00` = 0, `01` = +1, `11` = -1; `10` is read as 0 and never produced). The
type is `sd_pkg::sd_digit_t`. An n-digit SD number covers
[-(2^n-1), 2^n-1], so a residue modulo m has several encodings; the
intermediate values are only known up to a multiple of m, which is all the
algorithm needs.

`msda` adds two n-digit SD numbers modulo m = 2^n + mu (mu = -1, 0 or +1)
with n identical `sdfa` slices working in parallel. Every slice has two
halves:

* **ADD1** looks at its own digits x_i, y_i and at the pair one position
  below, and chooses an intermediate sum w_i and carry c_i with
  x_i + y_i = 2 c_i + w_i:

  | case | w_i | c_i |
  |---|---|---|
  | \|x_i\| = \|y_i\| | 0 | (x_i+y_i)/2 |
  | \|x_i\| != \|y_i\|, lower pair sum zero or of opposite sign | x_i+y_i | 0 |
  | \|x_i\| != \|y_i\|, lower pair sum of the same sign | -(x_i+y_i) | x_i+y_i |

  The point of the rule: a carry arriving from below is either 0 or has the
  sign of the lower pair's sum, and w_i is chosen to have the opposite sign
  (or be 0), so the two can never add up to ±2.
* **ADD2** forms s_i = w_i + c_(i-1), which is therefore always a single digit.
  Nothing ripples further than one position, so the delay does not depend on n.

The modulus enters only at the ends of the ring. The carry out of the top
slice weighs 2^n, which is -mu modulo m, so it re-enters slice 0 multiplied
by -mu (a one-digit multiplier: pass for 2^n-1, negate for 2^n+1, drop for
2^n). Slice 0's ADD1 also needs a "lower pair"; it is given the top pair
multiplied by -mu, because that is the sign the incoming carry will have.
`sdfa` carries an assertion that the sum digit never leaves {-1, 0, +1}.

## Stage A: forming D in signed digits

`crt_converter` wires the blocks as follows (all SD, no carry chains):

| step | operation | block |
|---|---|---|
| 2A | TB = 2^(n-1)·x2 mod 2^n-1 (rotate left by n-1) | `sd_mod_shift`, MU=-1 |
| 2A | TC1 = 2^(n-1)·x3 mod 2^n+1 (rotate, wrapped digits negated) | `sd_mod_shift`, MU=+1 |
| 2B | E = 2^n·(-TA): -x1 in the upper n digits | `sd_const_mul` HI=-1 LO=0 (block E) |
| 2B | F = (2^n+1)·TB: TB in both halves | `sd_const_mul` HI=+1 LO=+1 (block F) |
| 2C | TC = TC1 + x3 mod 2^n+1 | `msda` n digits, MU=+1 |
| 2C | GB = E + F mod 2^2n-1 (in parallel with TC) | `msda` 2n digits, MU=-1 |
| 2D | GA = (2^n-1)·TC = 2^n·TC + (-TC) | `sd_const_mul` HI=+1 LO=-1 (block GA) |
| 2E | D = GB + GA mod 2^2n-1 | `msda` 2n digits, MU=-1 |

The binary residues enter as SD numbers whose digits are 0 or +1, so no input
conversion is needed, with one exception: x3 can equal 2^n, which needs n+1
bits. That value is passed to the SD datapath as the number -1 (congruent
modulo 2^n+1).

## Stage B: back to a single binary number

D is a 2n-digit SD number that represents the right value only modulo
2^2n-1 and may be negative. `sd_split` (the division block) splits it into
two non-negative binary words:

* DP has a 1 wherever D has a +1 digit (the positive part D+),
* DN has a 0 wherever D has a -1 digit and a 1 elsewhere. Since all digits
  of the negative part D- are 0 or -1, adding 2^2n-1 to it is a bitwise
  complement, so DN = D- + (2^2n-1) and DP + DN is congruent to D.

`mod_prefix_adder` adds DP and DN modulo 2^2n-1. It is a Kogge-Stone
parallel-prefix adder whose carry tree is cyclic: at each of the
ceil(log2 2n) levels, the (generate, propagate) group ending at bit i is
combined with the group ending 2^l bits below it, index taken modulo 2n. After
the last level every position sees all 2n bits around the ring, so the
end-around carry is already included and no second addition is needed.
Modulo 2^2n-1 the all-ones word is a second form of zero; the adder replaces it
with 0, so the upper 2n bits of X lie in [0, 2^2n-2] and X in [0, M-1].

Critical path: two MSDA slices (steps 2C and 2E; the shifts and constant
multipliers are wiring and inverters), one gate for the split, and the prefix
adder, which grows as log2(2n). Everything before the prefix adder has a delay
independent of n, which is why the scheme pays off for large n (16 and up).

## Interface

```
module crt_converter #(parameter int unsigned N = 16) (
  input  logic [N-1:0]   x1,  // X mod 2^N
  input  logic [N-1:0]   x2,  // X mod 2^N-1   (all ones is accepted as 0)
  input  logic [N:0]     x3,  // X mod 2^N+1   (0 .. 2^N)
  output logic [3*N-1:0] xb   // X, 0 <= X < 2^N (2^2N - 1)
);
```

Purely combinational, no clock and no reset; add registers around it if a
pipeline is needed. An immediate assertion flags an x3 above 2^N.

## Files

| file | content |
|---|---|
| `rtl/sd_pkg.sv` | SD digit type and helpers (value, negate, scale by -1/0/+1) |
| `rtl/sdfa.sv` | one SD full-adder slice (ADD1 + ADD2) |
| `rtl/msda.sv` | modulo 2^n+mu SD adder |
| `rtl/sd_mod_shift.sv` | end-around SD shift (TB, TC1) |
| `rtl/sd_const_mul.sv` | blocks E, F, GA |
| `rtl/sd_split.sv` | division block (DP, DN) |
| `rtl/mod_prefix_adder.sv` | modulo 2^W-1 cyclic Kogge-Stone adder |
| `rtl/crt_converter.sv` | the converter (top) |
| `tb/tb_*.sv` | self-checking testbenches, one per block, plus `tb_crt_sizes` |
| `tb/*_checker.sv`, `tb/sd_tb_pkg.sv` | parameterised test drivers and integer reference functions |

## Verification

Every testbench compares the design with plain integer arithmetic, prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

* `tb_sdfa`: every digit pair, lower pair and legal incoming carry; checks
  value conservation 2c+s = x+y+c_in and the carry sign.
* `tb_msda`: sizes 16/mod 2^16-1 (default), 16/mod 2^16+1, 32/mod 2^32-1,
  4/mod 17 and 8/mod 256, random and all-ones operands; the sum must be
  congruent to x+y.
* `tb_sd_mod_shift`, `tb_sd_const_mul`, `tb_sd_split`: random operands
  against the exact arithmetic meaning of each block; `tb_sd_split` also
  runs the digit pattern (-1,-1,-1,0,1,0), whose parts are D+ = 2 and D- = -56.
* `tb_mod_prefix_adder`: exhaustive at 5 and 8 bits, random plus corners at
  16 and 32 bits.
* `tb_crt_converter`: the converter at its default n = 16, about 200,000
  values (range edges, x3 = 2^n cases, X < 2^n cases, random). It also counts
  how often each internal mechanism fires (negative x3 digit, end-around
  carry of each MSDA, negative digits in TC and D, the prefix adder's
  end-around carry and its zero fix-up) and fails if any never fires. It runs
  in about a second.
* `tb_crt_sizes`: n = 4 for all 4080 values of X, n = 8 for 50,000 random
  values.

Run any of them with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sd_pkg.sv tb/sd_tb_pkg.sv tb/tb_crt_converter.sv --top-module tb_crt_converter
./obj_dir/Vtb_crt_converter
```

## Size

The published comparison (n = 4, 8, 16) gives gate-array gate counts and
delays: roughly 400, 850 and 1700 gates and 21.2, 22.9 and 24.6 ns. The
delay stays almost flat as n grows; the reported gain is a 34 % shorter
conversion time than a high-speed binary converter (carry-save adders, two
carry-propagate adders and a multiplexer) at
n = 16. These figures are for a 1 µm CMOS gate array and are not reproduced
here. Coarse synthesis of this RTL at n = 16 gives about 2,400 word-level
cells and no flip-flops.

## Choices not fixed by the algorithm

* **x3 input format.** x3 is an (n+1)-bit binary number; the value 2^n is
  fed into the SD datapath as -1.
* **Single zero in the last adder.** The final modulo 2^2n-1 adder maps its
  all-ones result to 0 with one wide AND. This keeps X inside [0, M-1]; it
  is needed, for example, whenever X < 2^n.
* **Internals of the prefix adder.** Only its type is prescribed (a modulo
  2^k-1 Kogge-Stone parallel-prefix adder). The cyclic tree with the
  end-around carry folded in is one standard way to build it. Propagate is
  a XOR b.
* **Closing the MSDA ring.** Slice 0 sees the top digit pair scaled by -mu as
  its lower neighbour.
* **Blocks E, F, GA** are one module with two constant parameters.
* **No pipelining, clock or reset.** The converter is specified as a single
  combinational path.
