# Booth-encoded multi-moduli squarers for RNS

Residue number system (RNS) processors most often work in three channels,
modulo 2^N-1, 2^N and 2^N+1. The 2^N+1 channel is usually kept N bits wide by
using the *diminished-one* representation, where a value A in 1..2^N is stored
as A-1. A squarer that can switch between these moduli lets one piece of
hardware serve any channel. That is useful for reconfigurable RNS processors
and for spare channels in fault-tolerant ones.

This RTL implements two such squarers:

* **`msq_squarer3`**: three moduli. It takes an N-bit operand and computes its
  square modulo 2^N-1, modulo 2^N, or modulo 2^N+1 in diminished-one form.
* **`msq_squarer4`**: four moduli. It covers the same three cases plus
  modulo 2^N+1 in normal form, with an (N+1)-bit operand and result in 0..2^N.

Both use the same idea. The operand is recoded in radix-4 modified Booth
form, which roughly halves the partial products a square needs. The bits that
land above weight 2^(N-1) are then folded back into the N-bit matrix according
to the modulus. This folding costs one small multiplexer per folded bit. The
matrix goes through a tree of N-bit carry-save adders (CSAs), whose top carry
re-enters at the bottom. A final parallel-prefix modulo adder adds the two
vectors the tree leaves. Everything is combinational and there is no clock.
`N` (default 8) may be any even number from 4 to 62.

## Interface

| module | ports | meaning |
|---|---|---|
| `msq_squarer3 #(N)` | `a[N-1:0]`, `f`, `r[N-1:0]` | `r = a² mod` the modulus selected by `f` |
| `msq_squarer4 #(N)` | `a[N:0]`, `f`, `r[N:0]` | the same; `a[N]` and `r[N]` matter only when `f = MOD_NORM` |
| `msq_top #(N)` | `a3,f3,r3`, `a4,f4,r4` | the two squarers side by side |

`f` has type `msq_pkg::msq_mode_e`:

| `f` | modulus | operand `a` | result `r` |
|---|---|---|---|
| `MOD_M1` (00) | 2^N-1 | A | A² mod 2^N-1. A zero result may come out as all ones, the second encoding of 0. |
| `MOD_POW2` (01) | 2^N | A | A² mod 2^N |
| `MOD_DIM` (10) | 2^N+1, diminished-one | A-1, A in 1..2^N | (A² mod 2^N+1) - 1 |
| `MOD_NORM` (11) | 2^N+1, normal | A in 0..2^N, N+1 bits | A² mod 2^N+1, N+1 bits |

The three-moduli squarer treats `MOD_NORM` as `MOD_DIM`. The diminished-one
form has no code for zero. In a full system a separate zero flag would inhibit
the operation, and that flag is not part of these modules. When 2^N+1 is
square-free, a nonzero operand never has a zero square. This holds for
N = 8, 12, 16, 20 and 32. It fails for N = 10, where 2^N+1 = 5²·41.

## How the square is formed

### Booth terms (`msq_booth_terms`)

With radix-4 digits A_i = -2a[2i+1] + a[2i] + a[2i-1] ∈ {-2..2}, the square
splits into

    A² = Σ 2^(4i) C_i  +  Σ 2^(4i+3) P_i
    C_i = A_i²                      (0, 1 or 4: only bits 0 and 2 are used)
    P_i = A_i · Y_i,  Y_i = Σ_{k>i} 4^(k-i-1) A_k   (i < N/2-1)

Y_i is the signed value of a[N-1:2i+2] plus a[2i+1]. Every P_i fits in N-1-2i
two's-complement bits. This gives N C-bits and N²/4-1 P-bits in total. For
example, at N = 8 there are 8 C-bits and 15 P-bits. Each P_i is built as a
Booth select of 0, Y or 2Y followed by a conditional negation.

The bit below a[0], called `a_m1`, is how the recoding is made modular:

* modulo 2^N it is 0;
* modulo 2^N-1 it is a[N-1], which adds a[N-1]·(2^N-1) ≡ 0;
* modulo 2^N+1 it is ~a[N-1], which makes the digits sum to A = a+1, so the
  recoding undoes the diminished-one offset by itself.

### Folding (`msq_ppgen`)

Every Booth bit has a fixed weight w, and it always lands in column w mod N.
Bits with w < N are the same in every mode, so they enter the matrix directly.
A bit z of weight 2^(N+i) passes through a multiplexer:

| modulus | ordinary bit | sign bit of a P_i |
|---|---|---|
| 2^N-1 | z (2^N ≡ 1) | ~z, plus the constant -2^(2i+1) |
| 2^N | 0 | 0 |
| 2^N+1 | ~z, plus the constant -2^i (2^N ≡ -1) | z |

Each modulus adds up its constants into one N-bit **correction word** `t`,
which forms one more matrix row. In the four-moduli squarer another row
carries `<-2A>` in normal mode and zeros otherwise. The operand's low N bits
drive the diminished-one logic, which by itself would produce (A+1)²-1.
Adding -2A turns that into A². The row holds the vector
`~a[N-2:0], a[N-1] | a[N]`, and its constant part, +3, goes into `t`. The
operand 2^N has only a[N] set. For it the OR makes the row all ones, which
gives the correct square, 1.

Bits are packed into rows column by column, so the matrix has exactly as many
rows as its tallest column. At N = 8 that is 5 rows for the three-moduli
matrix and 6 for the four-moduli one. Matrix cells that nothing fills are
constant 0.

| N | matrix bits (3-mod / 4-mod) | multiplexers | rows (3-mod / 4-mod) |
|---|---|---|---|
| 8 | 31 / 39 | 14 | 5 / 6 |
| 12 | 59 / 71 | 27 | 6 / 7 |
| 16 | 95 / 111 | 44 | 7 / 8 |
| 20 | 139 / 159 | 65 | 8 / 9 |
| 32 | 319 / 351 | 152 | 11 / 12 |

The multiplexer count is one per folded bit plus the `a_m1` selector.

### Correction words (`msq_pkg`)

These constants are the easiest part to get wrong, so `msq_pkg` computes them
at elaboration instead of storing a table. Modulo 2^N+1, three things shift
the result by a constant:

1. each folded ordinary bit leaves -2^i;
2. each CSA's inverted carry adds +1, and the tree has ROWS-2 CSAs;
3. the diminished-one final adder adds +1.

The word `t` cancels all three and leaves (A²-1) for `MOD_DIM`. For
`MOD_NORM` it leaves A²-1 in front of the final adder, and the adder's +1
makes that A². The words at N = 8 are:

| word | value at N = 8 |
|---|---|
| 2^N-1 | `D5` |
| 2^N+1 diminished-one, three-moduli | `87` |
| 2^N+1 diminished-one, four-moduli | `86` (one CSA more) |
| 2^N+1 normal | `89` |

The pattern stays the same at other widths, for example `8887`, `8886` and
`8889` at N = 16. These values follow from the conventions used here. The original
description of the architecture gives diminished-one words one larger: `88…8`
when N is a multiple of 4, `22…2` otherwise. Its 2^N-1 word and its
four-moduli normal word are the same as here. This design keeps its own
diminished-one words. The testbenches check every result against integer
squaring, exhaustively at N = 8 and N = 12.

### CSA tree (`msq_csa`, `msq_csa_tree`)

Each CSA is N bits wide. A multiplexer routes its carry out of bit N-1 into
bit 0 of its carry vector in one of three ways:

* unchanged, modulo 2^N-1 (end-around carry);
* dropped, modulo 2^N;
* inverted, modulo 2^N+1.

The tree follows Dadda's sequence (2, 3, 4, 6, 9, …). Each level brings the
row count down to the next smaller number in that sequence, using ROWS-2 CSAs
in all. At N = 8 the three-moduli tree has 3 CSAs in 3 levels, and the
four-moduli tree has 4 CSAs in 3 levels.

### Final adder (`msq_final_adder`)

The final adder is a Kogge-Stone prefix network over N bits. A multiplexer
picks the re-entrant carry `cin`:

| modulus | `cin` |
|---|---|
| 2^N-1 | G[N-1:0] |
| 2^N | 0 |
| 2^N+1 | ~G[N-1:0] |

With `cin = ~G`, modulo 2^N+1 the result is x+y+1, the diminished-one sum. An
extra prefix level forms `c[i] = G[i-1:0] | P[i-1:0]·cin`, and a row of XORs
gives the sum. In normal mode the adder also drives the result's top bit,
r[N] = ~G·P[N-1:0]. That is the one case where x+y+1 = 2^N.

## Where this design makes its own choices

* The encoding of `f` is this design's own.
* No pipeline registers. The design is combinational throughout.
* Each P_i is built as select-and-negate. Other P_i generators would work as
  well.
* The placement of bits in rows, and the choice of which rows feed each CSA,
  are this design's own. Both keep the tallest-column height.
* Modulo 2^N-1, zero may appear as all ones.
* Diminished-one zero operands are not handled.
* Operands above 2^N in normal mode (a[N] = 1 with other bits set) are
  invalid and give no defined result.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=… failures=…`. `tb_msq_ref_pkg` holds the integer reference.

| testbench | what it checks |
|---|---|
| `tb_msq_booth_terms` | every operand: each C_i and P_i, and the total against the square of the recoded value |
| `tb_msq_csa`, `tb_msq_csa_tree` | random vectors, trees of 3 to 7 rows; output sum modulo each modulus, +1 per CSA modulo 2^N+1 |
| `tb_msq_final_adder` | all 65,536 operand pairs in all four modes |
| `tb_msq_ppgen` | every operand, both variants; weighted matrix sum against the required congruence; 5 and 6 rows at N = 8; the bit and multiplexer counts of the size table above |
| `tb_msq_squarer3`, `tb_msq_squarer4` | exhaustive at N = 8 and 12; random at N = 10, 16, 20 and 32; all modes and the operand 2^N |
| `tb_msq_top` | end to end at the default N = 8, every operand and mode of both squarers |

`tb_msq_top` also counts how often each mechanism occurred:

* each mode;
* the operand 2^N, and a result of 2^N;
* an end-around carry;
* an inverted carry;
* a dropped carry;
* a zero result modulo 2^N-1.

It fails if any of them never occurs.

To run a testbench with Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/msq_pkg.sv tb/tb_msq_ref_pkg.sv \
        tb/tb_msq_top.sv --top-module tb_msq_top
    ./obj_dir/Vtb_msq_top

Every testbench runs in well under a second. To use another width, set `N` on
`msq_squarer3`, `msq_squarer4` or `msq_top`. Everything else, including the
matrix height, the tree shape and the correction words, follows from `N`.
