# Hybrid parallel-prefix adders for RNS reverse conversion

A residue number system (RNS) represents an integer by its remainders with
respect to a few coprime moduli. The most common choice is {2^n-1, 2^n, 2^n+1}.
Arithmetic on the residues is carry-free and fast. Converting back to binary
(reverse conversion) is the slow part, and its critical path is almost always a
**modulo 2^k-1 addition**.

This RTL builds that addition from two pieces:

* a *regular* parallel-prefix adder, Brent-Kung or Kogge-Stone;
* a cheap conditional incrementer, the *modified excess-one unit*.

The incrementer is driven by two signals the prefix tree already produces.
The resulting adder, the **HMPE**, gives a modulo 2^k-1 sum with a single
encoding of zero. It needs neither a second carry pass nor a zero detector. A
second component, the **HRPX**, is for a plain adder whose second operand has a
run of constant ones in its upper bits. A prefix adder covers the variable low
bits, and each upper bit shrinks to an XOR and an OR. A complete
reverse converter for {2^n-1, 2^n, 2^n+1} shows where the HMPE sits: a
carry-save tree with end-around carry, then one HMPE.

Everything is combinational. There is no clock, reset or handshake.

## The prefix adder core

`pp_adder` is the textbook three-stage prefix adder:

| stage | logic |
|---|---|
| preprocessing | `g[i] = a[i] & b[i]`, `p[i] = a[i] ^ b[i]` |
| prefix carry tree | group pairs `G(i:0)`, `P(i:0)` by the operator `G = Ghi | Phi & Glo`, `P = Phi & Plo` |
| postprocessing | `s[i] = p[i] ^ c[i]`, where `c[i+1] = G(i:0)` |

The carry-in acts as the generate of an imaginary bit −1 whose propagate is
zero. It is folded into bit 0's generate before the tree. Besides the sum,
the adder exports the carry out `G(N-1:0)` and the whole-word propagate
`P(N-1:0) = &(a ^ b)`.

Two trees are available through `parameter tree_e TREE` (`pp_pkg`):

* `bk_tree`, Brent-Kung. An up-sweep forms power-of-two spans, then a
  down-sweep fills in the remaining positions. For N = 4 it is the familiar
  four-cell network: (1:0) and (3:2), then (3:0), then (2:0). It has about 2N
  cells, 2·log2 N − 1 levels and low fan-out.
* `ks_tree`, Kogge-Stone. At level l every bit combines with the bit 2^l
  below it. It has log2 N levels and about N·log2 N cells.

Both accept any N, not only powers of two. Every node computes both G and P
(a "black cell"). Synthesis removes the P halves nobody reads, which leaves
the "gray cells" of the classic drawings.

## HMPE: why "P or G, then add one" is a modulo 2^n-1 adder

`hmpe` is `pp_adder` followed by `excess_one_unit`. The increment control is
`ctl = P(n-1:0) | G(n-1:0)`, and the output is `s_h = s + ctl (mod 2^n)`.
The incrementer is a ripple AND chain
(`c[0] = ctl`, `c[i+1] = c[i] & s[i]`) with an XOR per bit. The synthesis tool
may restructure it.

The construction works because 2^n ≡ 1 (mod 2^n−1). Take residues a and b in
[0, 2^n−2], with cin = 0:

* **a + b ≥ 2^n.** The carry out G is set. Dropping the 2^n and adding 1 is
  exactly the end-around carry. The result a+b−2^n+1 is at most 2^n−3, so one
  increment is enough and it cannot overflow.
* **a + b = 2^n−1.** The operands are bitwise complements, so P is set and
  the raw sum is all ones. That is the *second* encoding of zero in modulo
  2^n−1 arithmetic. Adding 1 wraps it to all zeros.
* **a + b < 2^n−1.** Neither signal is set, and the sum passes through
  unchanged.

The result is therefore always in [0, 2^n−2], with zero as all zeros, which is
what a reverse converter needs downstream. A classic end-around-carry adder
feeds the carry out back into the carry tree. That either doubles the delay
or leaves the all-ones zero in place. P and G here come out of the prefix
tree in parallel with the sum, so the only extra delay is the increment.

An operand that is itself all ones (the redundant zero) with cin = 0 still
gives a congruent result. The one exception is both operands all ones: the
result is then all ones.

**Carry-in.** The HMPE carries a `cin` port, as the published 16-bit adders
do, but it is only characterised with cin = 0. Here cin is the prefix adder's
carry-in. The result is always congruent to a+b+cin. In one case it is not
canonical: cin = 1 with a+b = 2^n−2 gives all ones. Catching that case would
take an all-ones detector on the sum, which is exactly what this structure
avoids. Tie cin to 0 when a canonical result is required. The reverse
converter does.

## HRPX: an adder with a constant-ones upper operand

`hrpx` computes `s = a + {ones(N-K), b} mod 2^N`. The low K bits go through a
regular prefix adder (Brent-Kung by default). In each upper bit a full adder
with one input fixed at 1 reduces to

```
s[i]   = ~(a[i] ^ c[i])
c[i+1] =   a[i] | c[i]
```

That is a short XOR/OR ripple fed by the prefix adder's carry out, and the
final carry is dropped. The defaults N = 18 and K = 8 follow the published
example, where a17..a0 are added to b7..b0. Adders like this occur as the
final subtractor of some converters, whose second operand has a run of
constant ones.

## Reverse converter for {2^n-1, 2^n, 2^n+1}

`rns_reverse_converter` takes r1 = X mod (2^n−1), r2 = X mod 2^n and
r3 = X mod (2^n+1). It returns X in [0, (2^2n−1)·2^n). The low n bits of X
are r2. The upper part Y = ⌊X/2^n⌋ comes from the Chinese remainder theorem
for the pair {2^n−1, 2^n+1}. Both inverses equal 2^(n−1):

```
Y = 2^(n-1) · [ (2^n+1)·r1 − 2·r2 − (2^n−1)·r3 ]   mod (2^2n − 1)
```

Modulo 2^2n−1, multiplying by a power of two is a rotation and negation is
a bitwise complement. The bracket is therefore the sum of four 2n-bit vectors
formed by wiring and inverters:

| vector | bits | value mod 2^2n−1 |
|---|---|---|
| v1 | `{r1, r1}` | (2^n+1)·r1 |
| v2 | `~{0…0, r2, 0}` | −2·r2 |
| v3 | `{0…0, r3}` | r3 |
| v4 | `~{r3[n-1:0], 0…0, r3[n]}` | −2^n·r3 |

In v4, r3 = 2^n sets only r3[n], and 2^2n ≡ 1 moves that bit to position 0.
Two levels of `csa_eac` reduce the four vectors to two. A `csa_eac` is a 3:2
carry-save adder whose top carry wraps to bit 0. A 2n-bit HMPE then adds the
two vectors, and a rotation by n−1 applies the factor 2^(n−1). The HMPE never
sees two all-ones operands: that would require v3 to be all ones, which its
zero upper bits rule out. So Y is always canonical and X always lies in
range.

The default n = 8 makes the final adder the 16-bit HMPE. The operand
derivation is this design's own. Only the overall shape is the standard one
for this class of converter: a CSA tree with end-around carry, then a modulo
2^k−1 adder, with the HMPE as that adder.

## Top level

`hppa_top` has no parameters. It places four independent datapaths side by
side:

| prefix | block | ports |
|---|---|---|
| `conv_` | reverse converter, n = 8, Kogge-Stone HMPE | `r1[7:0] r2[7:0] r3[8:0]` → `x[23:0]` |
| `bk_` | 16-bit HMPE, Brent-Kung tree | `a[15:0] b[15:0] cin` → `s_h[15:0]` |
| `ks_` | 16-bit HMPE, Kogge-Stone tree | `a[15:0] b[15:0] cin` → `s_h[15:0]` |
| `hrpx_` | 18-bit HRPX, 8-bit Brent-Kung part | `a[17:0] b[7:0]` → `s[17:0]` |

The two stand-alone HMPEs are the adders the design is characterised with.
Published sums, which the tests reproduce: 850 + 650 = 1500 on the
Brent-Kung adder and 450 + 950 = 1400 on the Kogge-Stone one. Their reported
FPGA delays are 31.83 ns and 29.02 ns at about 56 mW each. Those numbers are
not checked here.
`conv_x[7:0]` is `conv_r2` wired straight through, by construction.

## Files

| file | content |
|---|---|
| `rtl/pp_pkg.sv` | `tree_e`, `gp_t`, prefix operator `pp_combine` |
| `rtl/bk_tree.sv`, `rtl/ks_tree.sv` | prefix carry trees |
| `rtl/pp_adder.sv` | regular prefix adder |
| `rtl/excess_one_unit.sv` | conditional incrementer |
| `rtl/hmpe.sv` | hybrid modulo 2^N−1 adder |
| `rtl/hrpx.sv` | hybrid adder with constant-ones upper operand |
| `rtl/csa_eac.sv` | end-around-carry carry-save adder |
| `rtl/rns_reverse_converter.sv` | {2^n−1, 2^n, 2^n+1} converter |
| `rtl/hppa_top.sv` | top level |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the outputs against integer arithmetic and prints
`TB_RESULT checks=N failures=M`. Each also has a time watchdog.

* Trees: exhaustive at N = 4, random at N = 16 and 18, against a ripple
  reference.
* `pp_adder`: exhaustive at N = 5, and random at 16 bits with full-length
  carry chains forced.
* `hmpe`: exhaustive at N = 4 for both trees. At 16 bits, random residues
  plus forced a+b = 2^n−1, a+b = 2^n−2 and wrap cases. The test also counts
  end-around carries and all-ones fix-ups.
* `hrpx`: exhaustive at N = 6, K = 3, and random at 18/8.
* `rns_reverse_converter`: every X of the n = 4 range, plus 50 000 random X
  and both range ends at n = 8, with r3 = 2^n forced.
* `hppa_top_tb`: all four datapaths at full size, 100 000 vectors. It counts
  each mechanism: end-around carry, all-ones fix-up, HRPX upper carry,
  r3 = 2^n, and a non-zero converter upper part. A mechanism that never
  fires counts as a failure.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pp_pkg.sv tb/hppa_top_tb.sv --top-module hppa_top_tb -o sim
./obj_dir/sim
```

Substitute any other `tb/*_tb.sv` for a unit test. Each run takes seconds.

## Changing it

* Width: `hmpe #(.N(...))`, `pp_adder #(.N(...))`, the trees and `csa_eac`
  accept any N ≥ 2.
* Tree: `.TREE(PP_BK)` or `.TREE(PP_KS)` on `pp_adder`, `hmpe`, `hrpx` and
  `rns_reverse_converter`.
* Converter size: `rns_reverse_converter #(.NR(n))`. The HMPE inside is 2n
  bits wide and the output 3n bits.
* HRPX split: `hrpx #(.N(total), .K(prefix bits))`.

## Scope and departures

* The only converter built is the one for {2^n−1, 2^n, 2^n+1}. The approach
  also covers converters with a final subtractor whose operand has constant
  bits, where the HRPX would be used. No such converter is specified in
  enough detail to build, so the HRPX stands alone.
* Not included: a forward (binary-to-residue) converter, the RNS modular
  arithmetic units between the converters, and ROM tables that some
  converters use.
* The `cin = 1` corner of the HMPE is described above.
* No pipelining and no registers. Delay depends on the tree choice and the
  target technology.
