# Recursive Vedic multiplier, 2x2 up to 32x32

An unsigned combinational multiplier built the "vertically and crosswise" way
(Urdhva Tiryagbhyam, a rule from Vedic arithmetic). To multiply two numbers, you
split each into a high half and a low half. You then form four products, two
vertical (low×low and high×high) and two crosswise (high×low and low×high),
and add them at their weights. In hardware the rule is applied recursively. A
2x2 multiplier made of AND gates and half adders is the leaf. Four of them
and three adders make a 4x4 multiplier. Four 4x4 multipliers make an 8x8, and
so on up to 32x32 with a 64-bit product. All the partial products of one level
are formed in parallel. The product of every size therefore settles after a
fixed combinational delay, which grows by about one adder per level.

Every size is a module of its own and can be used on its own:

| module        | operands | product | built from                                  |
|---------------|----------|---------|---------------------------------------------|
| `vedic_mul2`  | 2 + 2    | 4       | 4 AND gates, 2 `half_adder`                 |
| `vedic_mul4`  | 4 + 4    | 8       | 4 `vedic_mul2`, `cla_adder` 4, 6, 6 bits    |
| `vedic_mul8`  | 8 + 8    | 16      | 4 `vedic_mul4`, `cla_adder` 8, 12, 12 bits  |
| `vedic_mul16` | 16 + 16  | 32      | 4 `vedic_mul8`, `cla_adder` 16, 24, 24 bits |
| `vedic_mul32` | 32 + 32  | 64      | 4 `vedic_mul16`, `cla_adder` 32, 48, 48 bits|

`vedic_mul32` is the top of the hierarchy and contains every other module.
None of the modules has a clock, a reset or any state.

## The 2x2 leaf

With `a = {a1, a0}` and `b = {b1, b0}`:

```
q0        = a0·b0                  vertical, low
{c, q1}   = a1·b0 + a0·b1          crosswise: half adder 1
{q3, q2}  = a1·b1 + c              vertical, high, plus carry: half adder 2
```

Four AND gates make the partial products. One half adder sums the two
crosswise terms. A second half adder folds that carry into the high vertical
term. This is the published gate-level circuit. `half_adder` is a separate module
(XOR for the sum, AND for the carry) because the original design is also built
that way.

## One level of the recursion (the part to read carefully)

Every level from 4x4 up has the same structure, with `N` the operand width and
`H = N/2`. The operands split as `a = {aH, aL}`, `b = {bH, bL}`, and four
`H x H` multipliers produce `N`-bit products:

```
q0 = aL·bL    weight 2^0
q1 = aH·bL    weight 2^H
q2 = aL·bH    weight 2^H
q3 = aH·bH    weight 2^N
```

The product is `q0 + (q1 + q2)·2^H + q3·2^N`. The low `H` bits of `q0` are already
final, because nothing else reaches them. Everything above bit `H` is
built with three adders, one of `N` bits and two of `3H` bits:

```
q4 = q1 + (q0 >> H)            N-bit adder    (q0's upper half joins the crosswise column)
q5 = q2 + (q3 << H)            3H-bit adder   (second crosswise term next to the high vertical term)
q6 = q4 + q5                   3H-bit adder
p  = {q6, q0[H-1:0]}
```

None of these sums can overflow its adder, so the adders have no carry-out:

- `q4 <= (2^H-1)^2 + (2^H-1) = 2^H(2^H-1) < 2^N`.
- `q5 <= (2^H-1)^2 (2^H+1) < 2^(3H)`.
- `q6` is the whole product shifted right by `H`, which is below `2^(3H)`.

The published construction fixes the number of sub-multipliers, the operand
pairing of each, the number of adders and their widths (4 and 6 bits at the
4x4 level, 8 and 12 at the 8x8 level). It does not say which partial product
goes into which adder. The assignment above is this design's choice. It is the
usual one for this structure, and any assignment that fits those widths gives
the same product.

## The adders

`cla_adder #(W)` is a `W`-bit carry-lookahead adder. The 16-bit adder of the
16x16 level is described as carry-lookahead. Here every adder is one, at widths
4, 6, 8, 12, 16, 24, 32 and 48. The choice is this design's own. Bits are grouped
in fours. Inside a group each carry is the full lookahead term of the group's
carry-in,

```
c[i+1] = g[i] | p[i]·g[i-1] | ... | p[i]···p[base]·c[base],   g = x & y, p = x ^ y
```

and the carry out of one group is the carry-in of the next. This is the
familiar 16-bit adder made of four 4-bit lookahead blocks. A width that is not a
multiple of four, such as 6, ends in a shorter group. To change the adder
architecture, only this module needs to change. A plain `x + y` gives the same
function and leaves the choice to the synthesis tool.

## Timing

All of it is combinational. The product is valid one propagation delay after
the operands change, so the latency is zero clock cycles. To use the multiplier
in a clocked datapath, register the operands and the product outside it. The
original evaluation reports FPGA combinational path delays of 6.376 ns (2x2),
12.542 ns (4x4), 19.416 ns (8x8), 25.825 ns (16x16) and 32.237 ns (32x32).
These are results of one particular FPGA flow. The RTL neither models nor
guarantees them.

## Where this design departs from, or adds to, the original description

- **Signedness.** The multiplier is unsigned throughout. Signed operands are
  not discussed in the original, and its worked example is unsigned.
- **No registers.** One remark in the original ties larger sizes to more
  flip-flops. The reported figures, however, are all combinational path
  delays, and the construction contains no storage. This design follows the
  delay figures and has no flip-flops.
- **The general column method.** The digit-by-digit "vertically and
  crosswise" column scheme of the method (line diagrams for 2-, 3- and 4-digit
  numbers) appears only inside the 2x2 leaf. The larger sizes use the
  recursive four-quadrant construction, as the original hardware does. No
  direct N-column implementation is provided.
- **Adder assignment and architecture.** Which products share an adder, the
  lookahead group size of four, and the use of lookahead at every width are
  choices of this design, as described above.
- **Sizes.** The largest size is 32x32. A 64x64 multiplier is mentioned in the
  original only as a possible extension. One would be `vedic_mul32` instantiated
  four times with a 64-bit and two 96-bit `cla_adder`, the same pattern one
  level up.

## Verification

Each module has a self-checking testbench in `tb/`, named `tb_<module>.sv`. Each
testbench compares against integer arithmetic computed in the testbench. It
checks the result one time step after the inputs change, and it has a watchdog.

| testbench         | what it applies                                                        |
|-------------------|------------------------------------------------------------------------|
| `tb_half_adder`   | all 4 input pairs                                                      |
| `tb_cla_adder`    | widths 4, 6, 16 and 48 side by side; carry through every group; 20k random |
| `tb_vedic_mul2`   | all 16 operand pairs                                                   |
| `tb_vedic_mul4`   | all 256 operand pairs                                                  |
| `tb_vedic_mul8`   | 137 × 73 = 10001, then all 65,536 operand pairs                        |
| `tb_vedic_mul16`  | 64 corner pairs, 50k random pairs                                      |
| `tb_vedic_mul32`  | 100 corner pairs, 200k random pairs in three bit densities            |

`tb_vedic_mul32` runs the full design at its only size. It also counts how
often each mechanism occurred and fails if one never did:

- a zero operand;
- all-ones operands;
- a carry out of the crosswise column into the high vertical column;
- a carry inside the cross-term adder;
- the 137 × 73 example.

It runs in a few seconds.

Each testbench prints one line, `TB_RESULT checks=<n> failures=<n>`. To run one
with Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_vedic_mul32 \
    tb/tb_vedic_mul32.sv -o sim
./obj_dir/sim
```

`-Irtl` lets Verilator find each submodule in `rtl/<module>.sv`. The RTL
lints cleanly with `verilator --lint-only -Wall`.
