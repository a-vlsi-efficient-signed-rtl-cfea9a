# Signed magnitude comparator for the RNS {2^n-1, 2^n, 2^(n+1)-1}

In a residue number system (RNS), an integer is held as its remainders modulo a few
pairwise co-prime moduli. Addition and multiplication then split into short,
independent channels. Comparison does not: the order of two numbers cannot be
read from any one residue. The usual remedy is to convert both operands back to
binary (Chinese remainder theorem), which needs wide modular adders.

This RTL compares two **signed** RNS numbers for the moduli set

    m1 = 2^n - 1,   m2 = 2^n,   m3 = 2^(n+1) - 1

without converting them back. For each operand, a few adders compute two short
**subrange identifiers**, PX (n bits) and QX (n+1 bits). Together with the residue
x1, these form the mixed-radix digits of the operand. The MSB of PX is the sign.
Three ordinary binary comparators and a handful of gates then give `X>Y`, `X=Y` and
`X<Y`. The whole circuit is combinational: the adders are Kogge-Stone
parallel-prefix adders, and the binary comparators are parallel-prefix
multiplexer trees, so the depth grows as log n.

## Number representation

* The dynamic range is `M = (2^n-1) * 2^n * (2^(n+1)-1)`, about 2^(3n+1).
* An operand X in `[0, M)` is given by `x1 = X mod m1` (n bits), `x2 = X mod m2`
  (n bits) and `x3 = X mod m3` (n+1 bits).
* Signed reading: an X below `M/2` stands for +X, and an X at or above `M/2`
  stands for `X - M`. The signed range is `[-M/2, M/2)`. For n = 4 that is
  `[-3720, 3720)`.
* Residues must be canonical. The all-ones patterns `x1 = 2^n-1` and
  `x3 = 2^(n+1)-1` are second codes of zero, and the comparator does not accept them.

## The subrange identifiers (the core idea)

Every X in `[0, M)` can be written uniquely in mixed radix:

    X = x1 + m1 * QX + m1 * m3 * PX,      0 <= QX < m3,  0 <= PX < 2^n

Two consequences drive the design:

1. **Order.** `x1 + m1*QX < m1*m3`, so comparing X with Y is the same as comparing
   the triples `(PX, QX, x1)` and `(PY, QY, y1)` lexicographically.
2. **Sign.** `X >= M/2 = 2^(n-1) * m1 * m3` exactly when `PX >= 2^(n-1)`. The sign is
   therefore the MSB of PX, with no separate sign detector.

The digits come out of the residues cheaply because of three identities:
`m1^-1 = -2 (mod m3)`, `m3 = -1 (mod 2^n)` and `m1 = -1 (mod 2^n)`. They give:

    QX = | 2 * (x1 - x3) |_m3
    PX = | QX - x1 + x2 |_2^n

Modulo `2^(n+1)-1`, doubling is a one-bit left rotation and negation is bitwise
inversion. So QX is a single end-around-carry addition `|A + B|_m3` of two
operands that cost only wiring and inverters:

    A = {x1, 0}            (= 2*x1, never wraps)
    B = rotl1(~x3)         (= 2*(m3 - x3) mod m3)

The low n bits of QX are `A_L + B_L + cin` (mod 2^n), where `cin` is the end-around
carry of the QX adder. Also, `A_L - x1 = x1` (mod 2^n). Together these turn PX into
a three-operand sum that does not wait for QX:

    PX = | x1 + x2 + B_L + cin |_2^n

This is computed with an n-bit carry-save adder, followed by an n-bit adder that
takes `cin` as its carry input and discards its carry out. PX and QX finish at
about the same time.

Worked example, n = 4 (moduli 15, 16, 31, M = 7440):

| X (signed) | x1 | x2 | x3 | QX | PX | check `x1 + 15 QX + 465 PX` |
|-----------:|---:|---:|---:|---:|---:|:---|
| 100        | 10 | 4  | 7  | 6  | 0  | 10 + 90 + 0 = 100 |
| -1 (7439)  | 14 | 15 | 30 | 30 | 15 | 14 + 450 + 6975 = 7439, MSB(PX) = 1 |

## QX adder: merged end-around carry and Kogge-Stone tree (`qx_gen`)

A modulo 2^k-1 adder must add 1 and drop the carry whenever `A + B >= 2^k - 1`.
That happens when either of these holds:

* the plain sum carries out: group generate `G(n:0) = 1`;
* the plain sum is all ones: group propagate `P(n:0) = 1`, with `p = a XOR b`.

Both group signals are already produced by the Kogge-Stone prefix tree that does
the addition. The end-around carry `cin = G(n:0) | P(n:0)` therefore comes out of
that same tree. It enters only the last carry stage, `c[i] = G(i:0) | P(i:0) & cin`,
so no second carry pass is needed. With the operand ranges above the result is
always canonical (never all ones). `cin` is also an output, because the PX adder
needs it.

## Kogge-Stone adder (`ks_prefix`, `ks_adder`)

* **Pre-processing:** `g = a & b` and `p = a ^ b`.
* **Prefix network (`ks_prefix`):** ceil(log2 W) levels. At level l, each bit
  i >= 2^l combines with bit i - 2^l:

      G = G_hi | P_hi & G_lo
      P = P_hi & P_lo

* **Post-processing:** `sum[i] = p[i] ^ c[i-1]`.

The carry input is folded in after the tree. `ks_adder` is the generic W-bit adder
with carry input. `qx_gen` reuses `ks_prefix` directly.

## Binary comparators (`bin_cmp`)

Each bit starts as a one-bit group: `gt = a & ~b`, `eq = a XNOR b`. A radix-2 tree
then merges the groups, upper group first:

    gt = eq_hi ? gt_lo : gt_hi
    eq = eq_hi & eq_lo

Each cell is a 2:1 multiplexer plus an AND gate. A lower group only matters when
all the bits above it are equal. Widths that are not a power of two are padded at
the bottom with groups that compare equal.

## Decision logic (`cmp_decision`)

    s     = MSB(PX) XNOR MSB(PY)            -- 1 when the signs agree
    X>Y   = s ? (PX>PY | PX=PY & QX>QY | PX=PY & QX=QY & x1>y1)
              : MSB(PY)                     -- signs differ: the negative one is smaller
    X=Y   = (PX=PY) & (QX=QY) & (x1=y1)
    X<Y   = NOR(X>Y, X=Y)

When the signs agree, both operands lie in the same half of `[0, M)`. There,
subtracting M does not change their order, so the unsigned digit order is the
signed order. Exactly one flag is set.

## Module map and interface

| file | contents |
|---|---|
| `rtl/rns_cmp_pkg.sv` | `cmp_result_t` = packed struct `{gt, eq, lt}` |
| `rtl/rns_signed_cmp.sv` | top: two `subrange_gen`, three `bin_cmp` (N, N+1, N bits), `cmp_decision` |
| `rtl/subrange_gen.sv` | PX, QX of one operand: `qx_gen` + `csa` + `ks_adder` |
| `rtl/qx_gen.sv` | (N+1)-bit modulo 2^(N+1)-1 Kogge-Stone adder with merged end-around carry |
| `rtl/ks_adder.sv`, `rtl/ks_prefix.sv` | Kogge-Stone adder and its prefix network |
| `rtl/csa.sv` | carry-save adder (row of full adders) |
| `rtl/bin_cmp.sv` | multiplexer-tree unsigned comparator |
| `rtl/cmp_decision.sv` | sign mux and flag gates |

The top `rns_signed_cmp #(N = 4)` has these ports:

* inputs `x1, x2, y1, y2` (`[N-1:0]`) and `x3, y3` (`[N:0]`);
* output `res` (`cmp_result_t`).

There is no clock, no reset and no handshake. The result is valid one
combinational delay after the inputs. The critical path runs through `qx_gen`,
then the CSA-fed PX adder, then the N-bit comparator of PX, then the mux.

`N` is the only parameter. Any N >= 2 elaborates. The default, 4, is the size
used in the description of the architecture. Operating points n = 4, 8, 12, 16,
20, 32 and 64 are all simulated (see below). Hardware per instance:

* two N-bit CSAs;
* two N-bit and two (N+1)-bit Kogge-Stone adders;
* two N-bit and one (N+1)-bit comparators;
* one mux and a few gates.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog. Build
and run any of them with verilator 5, for example:

    verilator --binary --timing --assert --top-module tb_rns_signed_cmp \
        -y rtl -y tb +libext+.sv rtl/rns_cmp_pkg.sv tb/tb_rns_signed_cmp.sv
    ./obj_dir/Vtb_rns_signed_cmp

| testbench | what it checks |
|---|---|
| `tb_rns_signed_cmp` | top at default N = 4 (see below) |
| `tb_rns_sizes` | top at N = 4, 8, 12, 16, 20, 32, 64 (see below) |
| `tb_subrange_gen` | PX, QX against integer division: every X at N = 4, 20 000 random X at N = 8 |
| `tb_qx_gen` | every operand pair at N = 4; random pairs and exact all-ones sums at N = 9 |
| `tb_ks_adder`, `tb_csa`, `tb_bin_cmp` | exhaustive at 4 (and 5) bits, random at 13 or 16 bits |
| `tb_cmp_decision` | random digit triples against signed integer order |

`tb_rns_signed_cmp` compares every X in the range with 26 partners:

* Y = X and X ± 1;
* the range ends and the values around zero;
* partners sharing x1, or x1 and QX;
* 16 random partners.

That is 193 440 checks against signed integers. The testbench also counts each
mechanism and fails if one never occurs: signs differ, both positive, both
negative, decided by PX, decided by QX, decided by x1, equal, and end-around
carry 0 and 1.

`tb_rns_sizes` uses `tb/rns_size_check.sv`. For each size it draws random and
boundary pairs with wide-integer reference arithmetic, up to a 193-bit range at
N = 64.

All of these pass.

## What is this design's own reading

* **Mapping from residues to A, B and the CSA inputs.** These formulas are
  derived here from the mixed-radix identity above. The derivation is consistent
  with the structure described for the architecture:
  * an (n+1)-bit adder for QX with `cin = G | P`;
  * a CSA over x1, x2 and the low half of B, whose result is added with `cin`
    and no carry out;
  * the sign taken from the MSBs of PX and PY.

  The exhaustive test of `subrange_gen` confirms the derivation.
* **Same-sign "greater than".** It is the lexicographic expression over the three
  comparators: two ANDs and one OR. The delay formula quoted for the original
  circuit mentions a 4-input AND, which this reading does not need.
* **Internal structure of the binary comparators.** The multiplexer prefix cell
  follows the MSB-first parallel-prefix comparator idea. The radix-2 tree is a
  choice made here. It is not a radix-4/16 tree, and it does not use a
  zero-detector decision module with left and right buses.
* **Signed range and canonical-residue requirement.** The range is `[-M/2, M/2)`
  and residues must be canonical. The output is a one-hot `{gt, eq, lt}` struct.
* **No registers.** The comparator is a single combinational block.
* **Areas, delays and power are not reproduced.** The reference evaluation used
  65 nm standard cells. Nothing here is tied to a cell library.

## Changing it

* To change the operand size, set `N` on `rns_signed_cmp`.
* To use another prefix adder, replace `ks_prefix`. It only has to return
  `G(i:0)` and `P(i:0)` for every bit. Both `ks_adder` and `qx_gen` keep working.
* To pipeline the comparator, the natural cut is between the subrange generators
  and the comparators: 3N+1 bits per operand.
