# Overflow detection and correction for RNS addition by partial reverse conversion

In a residue number system (RNS) an integer X is held as its remainders
modulo a few pairwise coprime moduli. Addition is carry-free, channel by
channel, but it wraps silently: a sum that reaches the dynamic range M (the
product of the moduli) comes out as the sum minus M, and nothing in the
residues says so. The usual way to notice is a full residue-to-binary
conversion of the operands or of the sum.

This design notices it with less. For the three-moduli set
{2^{2n}-1, 2^n, 2^{2n}+1}, with M = 2^n (2^{4n}-1), every X in [0, M-1] splits as

    X = 2^n * alpha + x2,    x2 = X mod 2^n,    alpha = floor(X / 2^n) in [0, 2^{4n}-2]

The low part x2 is already a residue, so only alpha has to be converted; this
is the *partial* reverse conversion. For two operands,

    X + Y = 2^n * E + R,     E = alpha_x + alpha_y   (4n+1 bits)
                             R = x2 + y2             (n+1 bits), beta = MSB(R)

and the sum overflows, X + Y >= M, exactly when one of three conditions on the
top of E holds. The same E and R give the exact binary sum Z = 2^n E + R in
5n+1 bits, so an overflowed sum is not lost: it is returned correctly in a
range wider than M. The whole unit is combinational and built only from
full-adder chains, inverters, wiring and two multiplexers.

## Moduli set

The residues have these widths and ranges (n = `N`, n >= 2):

| residue | modulus    | width  | range          |
|---------|------------|--------|----------------|
| x1      | 2^{2n} - 1 | 2n     | 0 .. 2^{2n}-1 (all ones is a second code of 0) |
| x2      | 2^n        | n      | 0 .. 2^n - 1   |
| x3      | 2^{2n} + 1 | 2n + 1 | 0 .. 2^{2n}    |

At the default n = 2 the moduli are {15, 4, 17} and M = 1020; at n = 13 M is a
65-bit number and Z is 66 bits.

The method this RTL follows was published as applying to the set
{2^{2n-1}-1, 2^n, 2^n-1}. Its operand equations, word widths, overflow
conditions and worked examples, however, all belong to the set above, and this
RTL implements them as given. It is exact for {2^{2n}-1, 2^n, 2^{2n}+1} and
does not work for {2^{2n-1}-1, 2^n, 2^n-1}, whose range
2^n (2^{2n-1}-1)(2^n-1) is not of the form 2^n (2^{4n}-1).

## The partial reverse converter (`rns_prc`)

This is the part that takes most explaining. By the Chinese remainder theorem
over the moduli 2^{2n}-1 and 2^{2n}+1 (whose product is 2^{4n}-1),

    alpha = | (2^{3n-1} + 2^{n-1}) x1  -  2^{3n} x2  +  2^{3n-1} x3  -  2^{n-1} x3 |  mod (2^{4n}-1)

(using alpha = (x1-x2) 2^{-n} mod 2^{2n}-1 and alpha = (x3-x2) 2^{-n} mod 2^{2n}+1).
Modulo 2^{4n}-1, multiplying by 2^p is a p-bit left rotation of a 4n-bit word
and negation is the one's complement. So the four terms cost no logic beyond
inverters. `rns_oppr` (operand preparation) builds them, MSB first:

| word      | fields (MSB to LSB)                                   | value mod 2^{4n}-1   |
|-----------|-------------------------------------------------------|----------------------|
| psi1      | x1[n:0] (n+1), x1[2n-1:0] (2n), x1[2n-1:n+1] (n-1)     | (2^{3n-1}+2^{n-1}) x1 |
| psi2      | ~x2 (n), ones (3n)                                    | -2^{3n} x2           |
| psi3      | x3[n:0] (n+1), zeros (2n-1), x3[2n:n+1] (n)           | 2^{3n-1} x3          |
| psi4 (A4) | ones (n), ~x3 (2n+1), ones (n-1)                      | -2^{n-1} x3          |

The two rotated copies of x1 in psi1 occupy disjoint bits, so their sum is a
concatenation.

The four words are added modulo 2^{4n}-1:

    psi1, psi2, psi3 --> CSA 1 --> S1, C1
    S1, C1, A4       --> CSA 2 --> S2, C2
    S2 + C2 + 0      --> CPA 1 \
    S2 + C2 + 1      --> CPA 2 --> MUX 1 --> alpha

* **CSA 1 and CSA 2** (`eac_csa`) are 4n-bit carry-save adders with end-around
  carry. The carry word is the majority vector shifted left by one, and the bit
  shifted out of the top re-enters at bit 0, because 2^{4n} = 1 modulo
  2^{4n}-1. The words therefore stay 4n bits wide.
* **CPA 1 and CPA 2** (`rca`) are 4n-bit ripple-carry adders with carry in 0
  and 1. **MUX 1** takes the CPA 2 result when CPA 2 carries out, that is when
  S2 + C2 >= 2^{4n}-1, and the CPA 1 result otherwise. This folds the
  end-around carry of the final addition in parallel, without a second pass.
  It also turns the all-ones word, the second code of zero, into 0, so alpha
  comes out as a plain binary number. Choosing CPA 2's carry out as the select
  is this design's own choice. A select taken from CSA 1 cannot work here,
  because an end-around-carry CSA has no carry out.
* S2 = C2 = all ones would let an all-ones alpha through. That case cannot
  occur: it would need psi2 and psi4 all ones (x2 = 0, x3 = 0) together with
  psi3 all ones (x3 not 0).

The `sel` output shows which CPA the multiplexer took. The top leaves it
unconnected; the testbenches read it to count both cases.

## Overflow detection (`ovf_detect`)

CPA 3, 4n+1 bits, forms E = alpha_x + alpha_y. In parallel CPA 4, n+1 bits,
forms R = x2 + y2. MUX 2 passes 0 or 1 by the MSB of R, which gives beta.
Because X + Y = 2^n E + R with 0 <= R <= 2^{n+1}-2, the sum reaches
M = 2^n (2^{4n}-1) exactly when

| condition | test                                   | meaning                               |
|-----------|----------------------------------------|---------------------------------------|
| (i)       | E[4n] = 1                              | E >= 2^{4n}                           |
| (ii)      | E[4n-1:0] all ones                     | E = 2^{4n}-1: Z >= M whatever R is    |
| (iii)     | E[4n-1:1] all ones and beta = 1        | E = 2^{4n}-2 and R >= 2^n, so Z >= M  |

For E <= 2^{4n}-3 the sum is at most M - 2, so no other case overflows. The
three flags come out separately in the packed struct `ovf_cond_t` (package
`rns_ovf_pkg`), and their OR is `overflow`.

## Correction (`ovf_correct`)

CPA 5, 5n+1 bits, adds tau = 2^n E (E followed by n zeros) to R. The result
Z = X + Y is exact in every case, overflowed or not: it is the sum in a
range widened past M. The largest reachable Z is below 2^{5n+1}, so CPA 5's
carry out is always 0. The RTL does not convert Z back into residues.

## Top level (`rns_ovf_add`)

Two converters, one per operand, feed the detection unit, which feeds the
correction unit.

| port      | dir | width | meaning                              |
|-----------|-----|-------|--------------------------------------|
| x1,x2,x3  | in  | 2N, N, 2N+1 | residues of X                  |
| y1,y2,y3  | in  | 2N, N, 2N+1 | residues of Y                  |
| alpha_x, alpha_y | out | 4N | floor(X/2^n), floor(Y/2^n)       |
| e         | out | 4N+1  | E = alpha_x + alpha_y                |
| r         | out | N+1   | R = x2 + y2                          |
| beta      | out | 1     | MSB of R                             |
| cond      | out | 3     | `ovf_cond_t`: msb, all_ones, ones_beta |
| overflow  | out | 1     | X + Y >= M                           |
| z         | out | 5N+1  | X + Y in binary                      |

Parameter `N` (default 2) is n. Every module takes it, except `rca` and
`eac_csa`, which take a width `W`.

**Timing.** The unit has no clock, no registers and no reset; results follow
the inputs combinationally. Counted in full-adder delays along the ripple
chains, the critical path is the converter (CSA, CSA, a 4n-bit CPA and the
MUX), then CPA 3 (4n+1), then CPA 5 (5n+1). A clocked system should register
the inputs and outputs, and for large n it may need to cut this path into
pipeline stages. Neither is part of this RTL.

**Cost.** In full adders: each converter uses 2 x 4n for the CSAs and
2 x 4n for the CPAs, 32n for both converters. The detection adders add
(4n+1) + (n+1), for 37n+2 in total, and CPA 5 adds 5n+1 for correction.

## Files

| file                 | contents |
|----------------------|----------|
| `rtl/rns_ovf_pkg.sv` | `ovf_cond_t` |
| `rtl/rca.sv`         | ripple-carry adder, width W, carry in and out |
| `rtl/eac_csa.sv`     | carry-save adder modulo 2^W-1 |
| `rtl/rns_oppr.sv`    | operand preparation psi1..psi4 |
| `rtl/rns_prc.sv`     | partial reverse converter |
| `rtl/ovf_detect.sv`  | CPA 3, CPA 4, beta, overflow conditions |
| `rtl/ovf_correct.sv` | CPA 5, Z |
| `rtl/rns_ovf_add.sv` | top |
| `tb/tb_*.sv`         | one self-checking testbench per module, plus `tb_rns_ovf_add_wide` |
| `tb/*_harness.sv`    | parameterised checkers that the testbenches instantiate once per n |

## Verification

Each testbench compares the block with integer arithmetic done independently
in the testbench, on 128-bit values. It prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

* `tb_rns_ovf_add` runs the top at its defaults (n = 2) over **every** operand
  pair in [0, 1019]^2, about 1.04 million pairs. It checks alpha_x, alpha_y,
  E, R, beta, the three conditions, overflow and Z. It also checks one
  example value by value: X = 825, Y = 500 gives alpha_x = 206,
  alpha_y = 125, E = 101001011b = 331, R = 1, beta = 0, overflow through
  condition (i), and Z = 1325. It requires each mechanism to have occurred:
  each condition firing alone, no overflow, beta = 1, and both MUX 1 inputs
  in both converters. It runs in about 3 s.
* `tb_rns_ovf_add_wide` runs the top at n = 3, 8 and 13 on random pairs.
  Half of them are steered to within 2^{n+1} of M, where the conditions
  separate. It also checks X = 7280, Y = 16370 at n = 3, which gives no
  overflow and Z = 23650.
* `tb_rns_prc` covers the converter over the whole range at n = 2 and n = 3,
  including the all-ones code of x1, and randomly at n = 8 and 13.
  `tb_rns_oppr`, `tb_eac_csa`, `tb_rca`, `tb_ovf_detect` and `tb_ovf_correct`
  check the smaller blocks at the smallest and largest sizes.

To run one with plain Verilator from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing -y rtl -y tb rtl/rns_ovf_pkg.sv tb/tb_rns_ovf_add.sv \
              --top-module tb_rns_ovf_add
    ./obj_dir/Vtb_rns_ovf_add

For another testbench, substitute its name. `--lint-only -Wall` on any `rtl/`
file reports only the deliberately unused carry outs and the unused MUX
selects in the top.

## Choices this RTL makes

* The CSAs use end-around carry, and the CPAs are ripple-carry adders. The
  adder structure (two CSAs, two 4n-bit CPAs and a MUX; CPAs of 4n+1, n+1
  and 5n+1 bits) and the full-adder cost model come from the published
  method. The internal form of the adders is this design's.
* MUX 1 is selected by CPA 2's carry out (see the converter section).
* psi4 holds the complemented x3, as the negative term requires.
* The unit is combinational, with no clock, reset or input range check.
  Out-of-range residues (x3 > 2^{2n}) give meaningless results.
* The three overflow conditions (on the top) and MUX 1's select (on
  `rns_prc`) are brought out as extra outputs.
* There are no RNS channel adders for the residue sum itself. The outputs
  are the overflow flag and the binary sum.
* The default n = 2 is the size of the first worked example. The published
  cost comparison covers n = 2 to 13, and every n from 2 up works by
  setting `N`.

## Changing it

Set `N` on `rns_ovf_add` for another n; all widths follow from it. To cut
the delay, replace `rca` by a faster adder with the same ports (`a`, `b`,
`cin`, `s`, `cout`). The converter's MUX scheme only needs the carry out of
S2 + C2 + 1. To change how overflow is signalled, edit `ovf_detect`. The
testbenches derive all their expected values from X and Y alone, so they
keep working after such changes.
