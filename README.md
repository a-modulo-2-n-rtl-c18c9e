# Modulo 2^n+1 multiplier with double-LSB residues

Residue number systems often use the modulus set {2^n-1, 2^n, 2^n+1}. The
2^n+1 channel is the awkward one: its residues run from 0 to 2^n, one value
too many for n bits. The usual workarounds are an (n+1)-bit code, where most
values of the extra bit are invalid, or a diminished-1 code with a separate
zero flag.

This design uses a third code, **double-LSB (DLSB)**. A residue is an ordinary
n-bit number plus a second least significant bit, and its value is
`n-bit part + second LSB`. Every code word is valid. The largest value, 2^n,
is the all-ones word, and all other values except 0 have two codes. This code
leads to a multiplier built from plain AND/NAND gates, standard full and half
adders and one conventional n-bit adder. Nothing else is needed to handle the
modulus: there is no zero flag, no correction constant, and the end-around
carry is never propagated a second time.

The RTL follows the scheme of G. Jaberipur, H. Alavi and S. Nejati, "A Modulo
2^n+1 Multiplier with Faithful Representation of Residues". It is written for
any width n >= 2. The default is n = 8 (modulus 257), which is one of the two
sizes the scheme was evaluated at, the other being 16. The sections below say
where this implementation makes its own choices.

## The DLSB code on the ports

Every DLSB port is an (n+1)-bit vector `d[n:0]`:

| bits      | meaning                          |
|-----------|----------------------------------|
| `d[n:1]`  | n-bit part x_{n-1} .. x_0        |
| `d[0]`    | second LSB x0'                   |

The value is `d[n:1] + d[0]`. For example, with n = 8, `9'h1FF` is 256 and
`9'h003` is 1 + 1 = 2. Natural ports are ordinary (n+1)-bit numbers in
[0, 2^n].

## Posibits and negabits

It helps to know how the design counts before reading the RTL.

* A **posibit** is an ordinary bit: logical 1 is worth +2^i in column i.
* A **negabit** is worth -2^i when set. This design always stores it
  **inverted**: logical 0 means -2^i and logical 1 means 0. An inverted
  negabit is therefore a normal bit with a constant -2^i offset attached.

A standard full adder gives the right value for any mix of the two kinds of
input. Only the kinds of its outputs change. With k negabit inputs, the sum
is a negabit when k is odd and the carry is a negabit when k >= 2. The same
holds for the half adder. So the hardware never needs to know which kind a
wire carries: the kinds only move a constant offset around, and that offset
can be counted once for the whole circuit (see below).

Modulo 2^n+1, weight 2^n is worth -1. So a bit that leaves column n-1
**returns to column 0 inverted**:

* a posibit carry c (worth +2^n, i.e. -1) becomes an inverted negabit `~c`;
* an inverted negabit carry s (worth (s-1)*2^n, i.e. 1-s) becomes the
  posibit `~s`.

In both cases the wire just goes through an inverter. This inverted
end-around carry is the only modular element in the reduction.

## Partial products (`ppg`)

With x = X + x0' and y = Y + y0', the product is the sum of X*Y, y0'*X,
x0'*Y and x0'*y0'. A bit x_i*y_j with i + j = n + k (k >= 0) is worth
-2^k modulo 2^n+1. It is therefore moved down to column k as a negabit,
which as an inverted bit is a NAND gate. The result is a rectangle:

```
row 0        y_0 AND x_i                      (posibits)
row 1        y0' AND x_i                      (posibits)
row 2        x0' AND y_i                      (posibits)
row j+2      j = 1..n-1: x_{i-j} AND y_j for columns i >= j,
                         NAND(x_{i-j+n}, y_j) for columns i < j
extra bit    x0' AND y0' in column 0
```

Column i holds n-1-i negabits and i+3 posibits, with 4 posibits in column 0.
That makes n(n+1)/2 + 2n + 1 AND gates and n(n-1)/2 NAND gates, one gate
level in total. The published scheme draws the y_j*x0' bits under each
shifted row. Gathering them into one row (row 2) is this implementation's
choice, and it does not change the value.

## Reduction tree (`ppr_tree`, `mcsa`, `hcsa`)

This is the part that needs the most explanation.

**Rows.** A modular carry-save row (`mcsa`) takes three n-bit rows through n
full adders. Its outputs are the sum row and the carry row, where the carry
row is shifted left by one with the inverted end-around carry in bit 0. The
half-adder row (`hcsa`) does the same for two rows. It has half adders in
columns 1..n-1 and a full adder in column 0, and that full adder takes in the
extra column-0 bit.

**Shape.** Each level takes its rows three at a time, and rows left over pass
down to the next level. Exactly one half-adder row is used. It goes on the
first level that has two rows left over. If no level does, it becomes a final
stage of its own. This rule is this implementation's. It reproduces the
published examples:

| n | rows per level      | stages                                         |
|---|---------------------|------------------------------------------------|
| 4 | 6, 4, 3, 2          | CSA I, II, III, then the half-adder stage      |
| 5 | 7, 5, 4, 3, 2       | CSA I, II (half-adder row beside it), III, IV  |
| 8 | 10, 7, 5, 4, 3, 2   | five levels, half-adder row beside level III   |

`modmul_pkg` computes the shape when the design is elaborated
(`ppr_rows`, `ppr_levels`, `ppr_hlevel`, `ppr_stages`).

**Why the last two rows sum to the product minus one.** The hardware handles
no constants, but the inverted negabits carry a hidden offset. In the
partial product matrix that offset is the sum of -2^i over all negabit
positions:

    -sum_i (n-1-i)*2^i = -(2^n - n - 1)  =  n + 2   (mod 2^n+1).

Full and half adders preserve it. Each inverted end-around carry lowers it by
exactly one, whichever kind of bit it carries. The tree has n carry-save rows
(each removes one of the n+2 rows) and one half-adder row, so n+1 end-around
carries in all. The offset left on the two output rows a and b is therefore
+1:

    x*y = a + b + 1   (mod 2^n+1).

In the published scheme, the half-adder stage exists to change bit kinds so
that the final adder produces posibits only. The count above is the same
condition: an offset of exactly +1.

## Final addition (`ks_adder`, `iea_adder`)

**DLSB product.** A conventional n-bit adder forms a + b = S + 2^n*c. Since
2^n = -1, the product is S - c + 1 = S + (1-c). The product is therefore
`p = {S, ~c}`: the inverted carry out is *stored* as the second LSB instead
of being added back in. S + (1-c) can never leave [0, 2^n], so the result is
always a valid code. This is the point of the DLSB code. The adder here is a
Kogge-Stone parallel prefix adder, but any n-bit adder with a carry out
would do.

**Natural product.** `iea_adder` computes (a + b + 1) mod (2^n+1) directly as
an (n+1)-bit number. It takes the inverted carry out of a + b as the carry
in, `cin = ~G[n-1:0]`, and folds it in with one extra level of prefix nodes,
`c_i = G[i:0] | P[i:0] & cin`. There is no loop back through the tree. Only
one sum needs bit n: a + b = 2^n - 1. In that case every half-sum is 1 and no
bit generates a carry, so `cin` = 1, the low bits wrap to 0 and the result is
2^n. Bit n is therefore the group propagate `P[n-1:0]`.

## Conversions (`nat2dlsb`, `dlsb2nat`)

* Natural to DLSB: `d[n:1] = a[n-1:0] XOR a[n]` (bitwise) and `d[0] = a[n]`.
  Values below 2^n keep their bits, and 2^n becomes all ones. Inputs above
  2^n are not residues and are not checked.
* DLSB to natural: the increment `d[n:1] + d[0]`.

## Top level (`modmul_top`) and timing

```
nat_mode, a, b --> [nat2dlsb x2] --mux--> dlsb_modmul --> p         (DLSB)
                                                      \-> p_nat     (natural, iea_adder)
                                          p --> dlsb2nat --> p_nat_inc (natural)
```

| port        | dir | width | meaning                                        |
|-------------|-----|-------|------------------------------------------------|
| `nat_mode`  | in  | 1     | 1: `a`, `b` are natural residues; 0: DLSB      |
| `a`, `b`    | in  | n+1   | operands                                       |
| `p`         | out | n+1   | product, DLSB                                  |
| `p_nat`     | out | n+1   | product, natural, from the end-around adder    |
| `p_nat_inc` | out | n+1   | product, natural, decoded from `p`             |

The whole design is combinational: it has no clock, no reset and no
registers. The delay runs through one gate level, the carry-save levels
(5 at n = 8, 6 at n = 16) and a log2(n)-level prefix adder. The operand
select and the two natural outputs are this implementation's way of putting
all the converters into one top level. The published scheme defines no top
level.

Parameter: `N` (operand width n), default `modmul_pkg::DEFAULT_N` = 8, on
every module.

## Where this implementation departs from the published scheme

* **Second LSB of the product.** The published n = 4 circuit keeps a
  column-0 half-adder sum as the product's second LSB. It adds the two n-bit
  rows with a diminished-1 style end-around carry adder. A bit-level model of
  that arrangement (with this design's row grouping) gives wrong products whenever the two rows sum to
  2^n - 1. That adder's carry loop has no stable solution in that case, and
  the result 2^n cannot be expressed. Here, the column-0 cell of the
  half-adder row is a full adder that absorbs the extra bit. The published
  scheme describes this form for the natural output. The second LSB is
  always the final adder's inverted carry out, which is the property the
  scheme names as the main benefit of DLSB. The product is exact for every
  input.
* **Natural-output adder.** The published scheme points to a totally
  parallel prefix end-around carry adder with reverse connections. This
  design uses the simpler equivalent mentioned alongside it: a regular prefix
  tree plus one extra level of nodes. The published scheme takes bit n from
  the leftmost carry node. Here it is the group propagate, as explained
  above.
* **Tree shape for general n.** The published scheme shows the tree only for
  n = 4 and 5. The rule above is this design's own. Which rows enter which
  carry-save adder may differ from the published drawings, but the number of
  levels matches. The matrix is one row deeper (n+2) than that of the
  (n+1)-bit-code multiplier it was compared with. That costs one more
  carry-save level only for n = 5 among 4..7, and only for n = 93, 140, 210,
  315, 473 and 710 among 64..1024. `tb_ppr_tree` confirms this for the level
  count computed by `modmul_pkg`.
* **Final adder.** The published scheme leaves the adder type open. This
  design uses Kogge-Stone.
* Not built: a pipelined version, compressors deeper than 3:2, and the
  reference designs the scheme was compared against.

## Verification

Each module has a self-checking testbench in `tb/`. The testbenches compute
expected values with integer arithmetic, never with the design's own
structure.

| testbench         | what it covers                                                             |
|-------------------|----------------------------------------------------------------------------|
| `tb_fa`, `tb_ha`  | truth tables; value kept under every posibit/negabit mix                   |
| `tb_ppg`          | matrix value = x*y mod 2^n+1, all code pairs n = 3,4,5,8, random n = 16    |
| `tb_mcsa`, `tb_hcsa` | s + cy = inputs + 1 (mod 2^n+1), n = 3,4,5,8,16                         |
| `tb_ppr_tree`     | a + b = rows + extra + n + 1 (mod 2^n+1), n = 2..8, 16; shape for n = 4, 5, 8; carry-save level counts against a tree one row shallower (see below) |
| `tb_ks_adder`     | exhaustive n <= 8, random n = 16                                           |
| `tb_iea_adder`    | exhaustive n <= 8, random and edge sums n = 16                             |
| `tb_nat2dlsb`, `tb_dlsb2nat` | every residue / every code word                                 |
| `tb_dlsb_modmul`  | all DLSB code pairs for n = 2..8 (includes non-prime moduli 9, 65, 129), random and corner values for n = 16 |
| `tb_modmul_top`   | default n = 8: all 262,144 DLSB code pairs and all 66,049 natural pairs; counts zero operands, 2^n operands, zero and 2^n products, second-LSB use, bit n of the natural result |

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. Testbenches for
several widths use a small checker module per width (`*_chk.sv`). To run one
with Verilator:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/modmul_pkg.sv tb/tb_modmul_top.sv --top-module tb_modmul_top
./obj_dir/Vtb_modmul_top
```

`modmul_pkg.sv` must come first, because every module takes its default
width from it. To change the width, override `N` on `modmul_top` or change
`DEFAULT_N`. The exhaustive top-level test takes a few seconds at n = 8.

## Files

| file                       | content                                           |
|----------------------------|---------------------------------------------------|
| `rtl/modmul_pkg.sv`        | default width, tree-shape and prefix-depth functions |
| `rtl/fa.sv`, `rtl/ha.sv`   | full and half adder cells                         |
| `rtl/ppg.sv`               | AND/NAND partial product matrix                   |
| `rtl/mcsa.sv`, `rtl/hcsa.sv` | carry-save and half-adder rows with inverted end-around carry |
| `rtl/ppr_tree.sv`          | reduction tree                                    |
| `rtl/ks_prefix.sv`         | Kogge-Stone prefix network                        |
| `rtl/ks_adder.sv`          | n-bit adder with carry out (DLSB product)         |
| `rtl/iea_adder.sv`         | inverted end-around carry adder (natural product) |
| `rtl/nat2dlsb.sv`, `rtl/dlsb2nat.sv` | code converters                         |
| `rtl/dlsb_modmul.sv`       | the multiplier                                    |
| `rtl/modmul_top.sv`        | top level                                         |
