# Brent-Kung parallel-prefix adder, with a Brent-Kung carry-select adder

A ripple-carry adder waits for the carry to walk through every bit, so its
delay grows linearly with the width. A parallel-prefix adder computes all
carries at once, as prefix combinations of per-bit *generate* and *propagate*
signals, in a number of gate levels that grows with log2 of the width. The
Brent-Kung arrangement of that prefix computation uses few cells and little
wiring: about 2n cells and 2·log2(n) − 1 levels for an n-bit adder. This
repository holds a 32-bit Brent-Kung adder (`brentkung`) as the main design.
Next to it is a 32-bit square-root carry-select adder (`csla_bk_bec`). Each
group of that adder is a small Brent-Kung adder, and a Binary to Excess-1
converter (BEC) supplies its carry-in-1 result.

Everything here is combinational. There is no clock, no reset and no
pipeline. A result is valid one gate delay after the inputs change.

## The three stages of the Brent-Kung adder

```
 a[31:0] b[31:0]            c0
    │       │                │
 ┌──▼───────▼──┐             │
 │ bk_preprocess│  p = a ^ b, g = a & b   (per bit)
 └──┬───────┬──┘             │
    p       g                │
 ┌──▼───────▼────────────────▼──┐
 │ bk_prefix_network            │  c[i] = carry out of bit i
 └──────────────┬───────────────┘
 ┌──────────────▼───────────────┐
 │ bk_postprocess               │  sum[i] = p[i] ^ c[i-1],  sum[0] = p[0] ^ c0
 └──────┬───────────────┬───────┘  c32 = c[31]
     sum[31:0]         c32
```

The ports `a`, `b`, `c0`, `sum` and `c32` give 98 pins
(32 + 32 + 1 in, 32 + 1 out).

## The prefix network: what is hard to see in the code

Two cells do all the work. Write a span of bits as a pair (G, P). G means
"this span produces a carry by itself" and P means "this span passes an
incoming carry through". Joining an upper span *h* with the adjacent lower
span *l* gives:

| cell | output | gates |
|------|--------|-------|
| black (`bk_black_cell`) | G = Gh \| (Ph & Gl), P = Ph & Pl | 2 AND, 1 OR |
| gray (`bk_gray_cell`)   | G = Gh \| (Ph & Gl)              | 1 AND, 1 OR |

The carry-in is merged into bit 0 first, with a gray cell:
c[0] = g[0] | (p[0] & c0). After that, every span that reaches down to
bit 0 has a G that *is* the carry out of its top bit. Its P is never needed
again. So any join whose result reaches bit 0 is a gray cell, and the other
joins are black cells.

The tree has an up-sweep (a binary reduction tree) followed by a down-sweep
that fills in the carries the up-sweep skipped. For 32 bits, `b` marks a
black cell and `g` a gray cell, and each node is given by its bit index. A
node joins with the node `span` bits below it:

| level | phase | span | joining nodes |
|------:|-------|-----:|---------------|
| 1 | up   | 1  | 1g 3b 5b 7b 9b 11b 13b 15b 17b 19b 21b 23b 25b 27b 29b 31b |
| 2 | up   | 2  | 3g 7b 11b 15b 19b 23b 27b 31b |
| 3 | up   | 4  | 7g 15b 23b 31b |
| 4 | up   | 8  | 15g 31b |
| 5 | up   | 16 | 31g |
| 6 | down | 8  | 23g |
| 7 | down | 4  | 11g 19g 27g |
| 8 | down | 2  | 5g 9g 13g 17g 21g 25g 29g |
| 9 | down | 1  | 2g 4g 6g … 30g (every even node from 2) |

That comes to 57 cells (26 black, 31 gray) plus the carry-in cell, and the
worst path crosses 9 cell levels plus the carry-in cell. The rule behind the
table is general, and `bk_prefix_network` builds it for any `WIDTH`:

* **up-sweep**, levels l = 0 … U−1 with U = clog2(WIDTH) and span s = 2^l:
  node i joins node i−s when (i+1) mod 2s = 0. The cell is gray if
  i+1 = 2s, and black otherwise.
* **down-sweep**, spans s = 2^(U−2) down to 1: node i joins node i−s with a
  gray cell when (i+1) mod 2s = s and i+1 > s.

Nodes that take no part at a level pass their pair on unchanged. Widths that
are not a power of two simply lose the nodes above `WIDTH`. The carry-select
adder relies on this for its 2- to 10-bit groups.

**Carry numbering.** Internally, `c[i]` is the carry *out of* bit i, so
`c[0]` is the carry from bit 0 into bit 1. The adder's carry-in is `c0` and
its carry-out is `c32`. Read as port names, these count carries by the bit
they enter. Do not mix the two conventions when probing the internal `c`
bus.

## The carry-select adder (`csla_bk_bec`)

The operands are cut into groups of 2, 2, 3, 4, 5, 6 and 10 bits, least
significant first (`bk_pkg::CSLA_GROUP`).

* Group 0 is a 2-bit Brent-Kung adder fed with the real carry-in.
* Each higher group of n bits adds its slice once, with carry-in 0, in an
  n-bit Brent-Kung adder. That gives an (n+1)-bit result r0, which holds the
  sum bits plus the carry-out.
* A BEC (`bec`, width n+1) computes r1 = r0 + 1. This is the group's result
  for carry-in 1. The BEC is smaller than a second adder: y[0] = ~x[0] and
  y[i] = x[i] ^ (x[0] & … & x[i−1]). Since a + b + 1 < 2^(n+1), r1 never
  overflows.
* A 2:1 multiplexer picks r1 or r0, using the carry out of the group below
  as its select.

All groups work in parallel, so only the multiplexer selects ripple from
group to group. Because the groups grow in size, a higher group's local sum
is ready at about the time its select arrives: this is the "square-root"
idea. The group sizes are a choice made for this implementation. If you
change `CSLA_GROUP`, keep its sum equal to `WIDTH`; an elaboration-time
`$error` enforces this.

## Files

| file | contents |
|------|----------|
| `rtl/bk_pkg.sv` | `ADDER_WIDTH` = 32, the carry-select group sizes and their offsets |
| `rtl/bk_gray_cell.sv`, `rtl/bk_black_cell.sv` | the two prefix cells |
| `rtl/bk_preprocess.sv` | per-bit p, g |
| `rtl/bk_prefix_network.sv` | the Brent-Kung carry tree, any width |
| `rtl/bk_postprocess.sv` | sum bits and carry-out |
| `rtl/brentkung.sv` | the Brent-Kung adder (`WIDTH` = 32) |
| `rtl/bec.sv` | Binary to Excess-1 converter (`WIDTH` = 11) |
| `rtl/csla_bk_bec.sv` | square-root carry-select adder (`WIDTH` = 32) |
| `rtl/cska_bk_top.sv` | top: both adders side by side, each with its own pins |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

The top, `cska_bk_top`, has the Brent-Kung adder's pins `a`, `b`, `c0`,
`sum` and `c32`, plus `csla_a`, `csla_b`, `csla_cin`, `csla_sum` and
`csla_cout` for the carry-select adder. The two adders share nothing.

## Where this departs from, or goes beyond, the design as published

* The published gate equations are not all consistent. One equation has the
  first carry cell as "p OR (g AND cin)", and this RTL uses
  g | (p & cin). Propagate is described once as an AND, but the RTL uses XOR
  as the equations give it. The gray cell is described once as a single AND,
  but the RTL uses AND-OR as its equation gives it.
* The published 32-bit diagram groups the bits in 8-bit columns, and the bit
  ranges of its intermediate boxes do not form a consistent tree. The RTL
  builds the textbook Brent-Kung tree above. It keeps the diagram's inputs,
  its carry-in merge at bit 0 and its carry outputs C0 … C31.
* The carry-select adder is described only in outline: Brent-Kung adder for
  one carry value, BEC for the other, a multiplexer stage and square-root
  grouping. The group sizes, the BEC's gates and the width of 32 bits are
  this implementation's choices. The outline also keeps a ripple-carry
  adder for the carry-in-0 path, while saying that the square-root adder is
  built from Brent-Kung adders. Here every group uses a Brent-Kung adder.
* The conventional and concatenation-incrementation carry-skip adders
  (CSKA) are earlier designs that serve only for comparison. They are not
  built.
* The published implementation targets a Spartan-3E XC3S100E. Its 98 pins do
  not fit the 66 I/O pins of that part, and this top, with both adders, has
  196 pins. The RTL is device-independent.

## Verification

Each testbench compares the module with values it computes itself: integer
addition, a bit-serial ripple of carries, or a truth table. Each testbench
also has a watchdog that fails it if it does not finish.

* `tb_bk_gray_cell` and `tb_bk_black_cell` try every input combination.
* `tb_bk_prefix_network` checks trees of 32, 1, 2, 3, 5, 10 and 17 bits
  against a ripple chain, with many long propagate runs.
* `tb_brentkung` checks 20 000 random and corner-case 32-bit additions,
  plus every input of a 4-bit instance. Among them is the published
  simulation case 7 + 12 = 19 with c0 = 0. That case also has
  g = 4 and p = 11, which `tb_bk_preprocess` checks.
* `tb_bec` tries every input of the 11-bit and 3-bit converters.
* `tb_csla_bk_bec` checks 20 000 additions. It also requires that every
  group above group 0 has taken both the carry-in-0 result and the BEC
  result.
* `tb_cska_bk_top` runs the whole top at its default parameters, with 50 000
  independent operand pairs for each adder. It counts a failure if any of
  the following never happened:
  * the Brent-Kung adder's carry-in used;
  * its carry-out;
  * a full 32-bit propagate chain with carry-in;
  * the carry-select adder's carry-out;
  * either select value in every carry-select group.

Each testbench has been run against a copy of its module with one
deliberate fault in it, and each of those runs reported failures.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bk_pkg.sv \
    tb/tb_cska_bk_top.sv --top-module tb_cska_bk_top -Mdir obj
./obj/Vtb_cska_bk_top
```

Any other testbench runs the same way: put its name in place of
`tb_cska_bk_top`. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>`. `rtl/bk_pkg.sv` must come first on the
command line, and `-Irtl` lets Verilator find the other modules by file
name. All of them take well under a second.

To change the adder width, set `WIDTH` on `brentkung`; any width of 1 or
more works. For the carry-select adder, change `bk_pkg::CSLA_GROUP`, and
keep its sum equal to `WIDTH`.
