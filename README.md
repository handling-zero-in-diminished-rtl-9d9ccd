# Modulo 2^n+1 adders that handle zero without multiplexers

Residue number systems built on the moduli 2^n, 2^n-1 and 2^n+1 are limited by
the 2^n+1 channel: its residues 0 .. 2^n need n+1 bits. The usual answer is the
*diminished-one* code, which stores X-1 in n bits and so lets the channel use
n-bit adders. The catch is zero, which has no n-bit code. Adders for this code
have usually ignored zero, or handled it with a row of multiplexers after the
adder. Those multiplexers make the 2^n+1 channel slower than the other two.

This RTL carries zero as a separate bit and folds that bit into the adder's own
carry logic. No multiplexers follow the adder. The repository holds:

* three adder architectures, all computing the same sum:
  * a one-level carry look-ahead adder;
  * a parallel-prefix adder followed by a carry-increment stage;
  * a *totally* parallel-prefix adder. It recirculates the end-around carry
    inside every prefix level, so it needs only log2 n levels, the same as a
    plain n-bit adder.
* translators between ordinary binary residues and the zero-indicated code.
* a top level that wires everything into one addition channel.

All of it is combinational logic. There is no clock, no register and no latency.

## The number code

A residue X, with 0 <= X <= 2^n, is held in n+1 bits as `x_z X*`:

| X        | x_z | X* (n bits)        |
|----------|-----|--------------------|
| 0        | 1   | 0                  |
| 1 .. 2^n | 0   | X - 1              |

So X = X* + not(x_z). Example for n = 4 (modulus 17): 0 is `1_0000`, 1 is
`0_0000`, 16 is `0_1111`.

**Input rule.** Every module assumes *canonical* operands: X* = 0 whenever x_z = 1.
The translator produces only canonical codes. For any other code the sum is
undefined.

## How one adder covers every case

Take nonzero A and B, and let c_out be the carry out of the n-bit sum A* + B*.
Addition modulo 2^n+1 in diminished-one form is then

    S* = (A* + B* + not c_out) mod 2^n

Because the carry is inverted before it re-enters at bit 0, this is an
"end-around" carry. It differs from the one in a one's-complement adder.

Zero is handled by changing the re-entering carry to

    c*_-1 = not(a_z | b_z | c_out)

* **One operand zero.** Its X* is 0 and the carry-in is 0, so the adder
  passes the other operand through unchanged.
* **Both operands zero.** The adder gives 0.

The zero bit of the sum is

    s_z = a_z & b_z  |  not(a_z | b_z) & P_n-1,        P_n-1 = AND of all p_i = a*_i ^ b*_i

The second term covers two nonzero operands whose X* parts are bitwise
complements. Their sum is 2^n+1, which is 0 modulo 2^n+1. The adder then
returns S* = 0, which is the canonical zero. `dimone_sz_logic` implements s_z.

## The three adders

All three take `a_z, a_star, b_z, b_star` and return `s_z, s_star`. The width is
set by the parameter `N` (n). They share the bit cells

    g_i = a*_i & b*_i,   p_i = a*_i ^ b*_i,   t_i = a*_i | b*_i

and the carry operator `(g_h,p_h) o (g_l,p_l) = (g_h | p_h g_l, p_h p_l)`. That
operator is `gp_op()` in `dimone_pkg`.

### Carry-increment prefix adder (`dimone_cia_adder`)

This is the most direct of the three:

1. An ordinary integer prefix tree (`dimone_prefix_tree`, Kogge-Stone) gives
   (G_i, P_i) for bits i..0.
2. c*_-1 = NOR(a_z, b_z, G_n-1).
3. An increment row forms c*_i = G_i | P_i & c*_-1.
4. The sum bits are s*_i = p_i ^ c*_i-1.

The increment row adds one logic level after the tree. Any prefix algorithm can
replace the Kogge-Stone tree.

### One-level CLA (`dimone_cla_adder`)

c*_-1 is not formed first and then propagated. Instead it is substituted into
every look-ahead equation, so each carry becomes a single sum of products. Each
carry c*_i combines n (generate, propagate) terms, from most to least
significant:

| bits            | term used                                    |
|-----------------|----------------------------------------------|
| i .. 0          | (g_j, p_j)                                   |
| n-1 .. i+2      | (not t_j, not g_j)                           |
| i+1 (lowest)    | generate not g_j                             |

Then c*_i = OR over the terms of (generate of a term AND the propagates of every
term above it). At bit n-1 both g and t also absorb `a_z | b_z`; this is the
only place the zero bits enter the carries. Every product is written out, so a
carry is a two-level AND-OR. Its size grows as n^2 per carry, which makes this
adder best suited to small n.

### Totally parallel-prefix adder (`dimone_tpp_adder`)

This is the fastest of the three and the hardest to follow.

**The carries.** With g_n-1 replaced by a*_n-1 b*_n-1 | a_z | b_z, the carries are

    c*_i = G of  (G_i, P_i) o ~(G_n-1..i+1, P_n-1..i+1),      ~(G,P) = (not G, P)

Each carry spans all n bits: the bits below it directly, and the bits above it
"wrapped round" with an inverted generate. Computed literally, the wrapped group
is finished first and then inverted, which costs more than log2 n levels.

**The dual pair.** A (g, p) pair can be read as a function of its carry input:
c -> g | p c. Its *dual* computes not(g | p not c), which is again a pair:
(not g & not p, not g). For a single bit this is (not t_i, not g_i). Taking the
dual commutes with the `o` operator, and inverting the output of a group equals
applying the dual group to an inverted input.

**The ring.** Lay the n bit pairs on a ring of 2n positions:

    position k     = (g_k, p_k)          for k = 0 .. n-1
    position k + n = dual of (g_k, p_k)  for k = 0 .. n-1

Walking down the ring from position i+n crosses n dual pairs (bits i .. 0) and
then the plain pairs of bits n-1 .. i+1. Inverting the generate of that n-pair
group gives c*_i. A cyclic Kogge-Stone tree on the ring builds such groups. At
each level l, node k combines with node k - 2^l, modulo 2n, so after l levels
position k holds the 2^l pairs ending at k.

**The last level.** Let R be the ring after log2(n)-1 levels, where each group
has h = n/2 pairs. Every carry can be finished in either of two equivalent
ways:

    form B:  c*_i = not G( R[i+n] o R[i+h] )
    form A:  c*_i = G(R[i]) | P(R[i]) & not G(R[i+h])

Form A uses the inverted generate of the lower half, the `~` form above.

* Carries i = -1 .. h-2 use form B.
* Carries i = h-1 .. n-2 use form A.

With this split, the level before the last needs only n ring positions, one
per bit column. Columns 0 .. h-2 hold their dual-side group and the rest hold
the plain group. Synthesis removes every ring node that no carry uses. The
all-bit P_n-1 for s_z comes from the two halves at positions n-1 and h-1.

**Relation to the modulo 17 example.** At n = 4 the construction reduces to
the published minimal-depth modulo 17 adder. It has the same eight prefix
cells. Bit 0 of the first level holds (not t_0, not g_0) o (g_3, p_3). The four
carry equations are the same. `tb_dimone_tpp_modulo17` checks the internal
carries against those four equations for all 1024 inputs.

**Own choices.**

* The ring formulation and the form A / form B split rule are this design's
  own generalisation of the n = 4 example to any power of two. At n = 8 they
  give 26 prefix cells in log2 n = 3 levels.
* **Width.** `N` must be a power of two, at least 2. Elaboration stops with
  an error otherwise.

## Translators

`dimone_bin_to_dimone` converts binary X (n+1 bits) to the zero-indicated code:

* x_z = NOR of all bits.
* X* = (X + 2^n - 1 + x_z) mod 2^n. This adds the all-ones word with carry-in
  x_z. Each bit then generates x_i and always transmits, so the carry into
  bit i+1 is (x_i | .. | x_0 | x_z) and each sum bit is x_i XNOR (carry into
  bit i).

The circuit is one XNOR per bit plus OR trees. Values above 2^n are out of
range.

`dimone_to_bin` converts back with an incrementer: X = X* + not(x_z), in
n+1 bits so that X* = 2^n-1 can give 2^n.

## The channel (`dimone_adder_top`)

```
a_bin ─► dimone_bin_to_dimone ─┐               ┌► dimone_tpp_adder ─► tpp_s_z/tpp_s_star ─► dimone_to_bin ─► sum_bin
b_bin ─► dimone_bin_to_dimone ─┴► a_z/a_star, ├► dimone_cia_adder ─► cia_s_z/cia_s_star
                                  b_z/b_star ─┴► dimone_cla_adder ─► cla_s_z/cla_s_star
```

* The translated operands are outputs, for channels that keep values in the
  diminished-one code between operations.
* The three adders are alternatives. The top instantiates all of them on the
  same operands so that any one can be taken and the three can be compared. A
  real channel keeps one; normally that is the totally parallel-prefix adder,
  which feeds `sum_bin`.
* The default is `N = 4` (modulus 17), the worked example behind this design.
  Every module takes any `N`, except that the totally parallel-prefix adder,
  and therefore the top, needs a power of two.

## Files

| file | contents |
|------|----------|
| `rtl/dimone_pkg.sv` | `gp_t` pair type, `gp_op` (carry operator), `gp_dual`, `prefix_levels` |
| `rtl/dimone_sz_logic.sv` | zero bit of the sum |
| `rtl/dimone_prefix_tree.sv` | integer Kogge-Stone prefix tree |
| `rtl/dimone_cia_adder.sv` | prefix adder with carry-increment stage |
| `rtl/dimone_cla_adder.sv` | one-level carry look-ahead adder |
| `rtl/dimone_tpp_adder.sv` | totally parallel-prefix adder |
| `rtl/dimone_bin_to_dimone.sv`, `rtl/dimone_to_bin.sv` | translators |
| `rtl/dimone_adder_top.sv` | the channel |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the extra tests below |
| `tb/dimone_adder_checker.sv`, `tb/prefix_tree_checker.sv`, `tb/translator_checker.sv` | harnesses the testbenches instantiate at several widths |

## Verification

Every testbench compares its module with a reference computed from plain
integers: decode A and B, form (A + B) mod (2^n+1), encode the result. Each
prints `TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_dimone_tpp_adder`, `tb_dimone_cia_adder`, `tb_dimone_cla_adder` | exhaustive at n = 2, 4, 8; 20 000 random pairs at n = 16 and 32, a quarter of them with a zero operand and a quarter with a zero result |
| `tb_dimone_prefix_tree` | n = 4, 13, 32 against a ripple reference |
| `tb_dimone_bin_to_dimone`, `tb_dimone_to_bin` | every residue at n = 1, 4, 5, 8, 16 |
| `tb_dimone_sz_logic` | full truth table |
| `tb_dimone_adder_top` | the channel at its default n = 4: all 17 x 17 binary operand pairs, all outputs checked |
| `tb_dimone_adder_top_wide` | the same channel checks at n = 16, with 40 000 random pairs |
| `tb_dimone_tpp_modulo17` | internal carries of the n = 4 totally parallel-prefix adder against the modulo 17 carry equations |

The two channel testbenches also count the situations the zero handling exists
for. A situation that never occurs counts as a failure. The situations are:

* exactly one operand zero;
* both operands zero;
* nonzero operands with a zero sum;
* carry out set (re-entering carry 0);
* re-entering carry 1;
* an operand equal to 2^n.

To run any testbench with Verilator 5, from the repository root:

```
verilator --binary --timing -y rtl -y tb rtl/dimone_pkg.sv tb/tb_dimone_adder_top.sv \
          --top-module tb_dimone_adder_top
obj_dir/Vtb_dimone_adder_top
```

Replace the file and top-module name to run another testbench. Each one
finishes in well under a second of simulation.

## Limits and choices not fixed by the architecture

* **Purely combinational.** Registers, if wanted, go around the top.
* **Kogge-Stone tree** in the carry-increment adder. Any prefix algorithm
  works there.
* **CLA terms at bit n-1** use the complemented forms not(a_z|b_z|t_n-1) and
  not(a_z|b_z|g_n-1). This is what the derivation of the least significant
  carry gives.
* **Not included:** the multiplexer-based adder, which handles zero after a
  plain diminished-one adder. It is the conventional baseline these adders
  replace.
