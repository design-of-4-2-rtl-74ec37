# 4:2 compressor and a 4x4 multiplier built from XOR-XNOR cells

Most of a multiplier's delay and power goes into adding up partial products.
The 4:2 compressor speeds that up: it takes four bits of one column, plus one
carry bit from the column to its right, and reduces those five bits to one sum
bit for this column and two carry bits for the next. Its outgoing carry `cout`
never depends on its incoming carry `cin`. So a row of compressors can chain
`cout` into the neighbour's `cin` without a carry rippling along the row.

The published design builds the compressor from two kinds of small cells:

- a dual-output **XOR-XNOR module**, which gives `a ^ b` and its complement
  at the same time;
- **2:1 multiplexers**.

It then uses the compressor to reduce the partial products of a 4x4 unsigned
multiplier. This repository holds RTL for that whole chain, from the
XOR-XNOR cell up to the multiplier. The design's interest lies in its
transistor-level circuits, which were tuned for power and delay. That part is
outside what RTL expresses. The RTL gives the logic of every cell and the
exact structure of the compressor and of the multiplier.

## Cell hierarchy

```
mult4x4                       4x4 -> 8 bit product (top)
 ├─ pp_gen                    16 AND gates
 ├─ pp_reduce                 one reduction level
 │   ├─ half_adder  (col 1)
 │   ├─ compressor_4_2 x3 (cols 2, 3, 4)
 │   │   └─ full_adder x2
 │   └─ full_adder  (col 5)
 └─ final_adder               carry-propagating adder, cols 3..6
     ├─ half_adder  (col 3)
     └─ full_adder x3 (cols 4..6)

full_adder  = xor_xnor + 2 x mux2
half_adder  = xor_xnor + AND
```

`mult_pkg` holds the shared types: the operand, product and partial-product
matrix types, and the `reduced_t` struct that carries the two rows from the
reduction level to the final adder.

## The XOR-XNOR cell and the full adder

`xor_xnor` has inputs `x1` and `x2`. Its outputs are `xo_r = x1 ^ x2` and
`xn_or = ~(x1 ^ x2)`. The names avoid the SystemVerilog keywords `xor` and
`xnor`.

A full adder (a 3:2 compressor) is made from one such cell and two
multiplexers:

```
d, dn = xor_xnor(a, b)           d = a ^ b, dn = ~d
s     = cin ? dn : d             = a ^ b ^ cin
cout  = d   ? cin : a            = majority(a, b, cin)
```

Because both polarities of `d` exist, the sum is only a multiplexer selected
by `cin`. The carry is also a multiplexer: when `a` and `b` differ, the carry
is `cin`; when they agree, it is `a`. From `cin` to either output there is
one multiplexer. The source says the compressor is made of XOR-XNOR circuits
and multiplexers, but it does not give this netlist. This netlist is this
implementation's choice.

The half adder takes its sum from the XOR output and its carry from an AND
gate. The source gives no circuit for the half adder, so this is also this
implementation's choice.

## The 4:2 compressor

```
        x1 x2 x3              x4
         │  │  │              │
       ┌─┴──┴──┴─┐            │
cout ◄─┤   FA    │            │
       └────┬────┘ s_mid      │
            │                 │
          ┌─┴─────────────────┴─┐
          │         FA          ├◄─ cin
          └────┬──────────┬─────┘
             carry       sum
```

The compressor is two full adders in series, as the source draws it. The
first full adder adds `x1`, `x2` and `x3`. Its carry leaves the cell as
`cout`. Its sum goes with `x4` and `cin` into the second full adder, which
gives `carry` and `sum`. The cell satisfies:

```
x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout)
```

`carry` and `cout` have the same weight, one column to the left.
`cout = majority(x1, x2, x3)` depends only on the inputs, never on `cin`.
That is why a `cout -> cin` chain across columns is only one cell deep. Any
five input bits fit, because their sum is at most 5 = 1 + 2·2.

## The 4x4 multiplier

The product is formed in three levels.

**Partial products.** `pp[i][j] = a[i] & b[j]`, with weight `2**(i+j)`.

**Reduction level.** Each column gets one cell. The cell type in each column
follows the source's dot diagram, and so does the number of bits each column
leaves behind. The column-to-column carry wiring is not drawn in the source.
This implementation chose the wiring that produces those bit counts:

| column | inputs                               | cell                 | bits left (sum row + carry row) |
|--------|--------------------------------------|----------------------|---------------------------------|
| 0      | a0b0                                 | none, passes down    | 1                               |
| 1      | a0b1 a1b0                            | half adder           | 1                               |
| 2      | a0b2 a1b1 a2b0 + HA carry, cin = 0   | 4:2 compressor       | 1                               |
| 3      | a0b3 a1b2 a2b1 a3b0, cin = cout(2)   | 4:2 compressor       | 2 (sum, carry of col 2)         |
| 4      | a1b3 a2b2 a3b1, x4 = 0, cin = cout(3)| 4:2 compressor       | 2 (sum, carry of col 3)         |
| 5      | a2b3 a3b2 + cout(4)                  | full adder           | 2 (sum, carry of col 4)         |
| 6      | a3b3                                 | none, passes down    | 2 (a3b3, full adder carry)      |

Two inputs are tied to constants:

- The column-2 compressor has `cin = 0`, because no compressor lies to its
  right.
- The column-4 compressor has `x4 = 0`, because that column has only three
  partial products.

Each compressor's `carry` stays in the next column as that column's second
bit. Its `cout` goes into the next column's cell. For the column-4
compressor, that cell is the full adder of column 5.

**Final addition.** Columns 0 to 2 are already product bits. A half adder on
column 3 and a ripple of full adders on columns 4 to 6 add the two rows. The
carry out of column 6 is `p[7]`. This adder is the only place where a carry
runs across columns.

## Timing and interface

Every module is combinational. There is no clock, reset or register, and the
source describes none. `mult4x4` has ports `a[3:0]`, `b[3:0]` and `p[7:0]`,
with `p = a * b` unsigned. The longest path goes through:

1. an AND gate;
2. the column-2 compressor's first full adder, which produces `cout`;
3. the second full adder of column 3;
4. the final adder's ripple from column 4 to column 7.

Widths are fixed at 4 and 8. The cell placement above is specific to the
4x4 case, so the modules have no width parameters.

## Not modelled

- Transistor-level circuits and layout. The source compares several
  XOR-XNOR circuits for power, delay and full-swing output at low supply
  voltage. They all have the same logic function, which is the one
  `xor_xnor` implements.
- Power and delay figures. These come from circuit simulation and have no
  RTL counterpart.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops, with a watchdog in case the
simulation hangs.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_xor_xnor`        | all 4 input pairs, both outputs |
| `tb_mux2`            | all 8 input combinations |
| `tb_half_adder`      | all 4 input pairs against `a + b` |
| `tb_full_adder`      | all 8 input combinations against `a + b + cin` |
| `tb_compressor_4_2`  | all 32 input combinations: the five-input sum identity; `cout` equals the majority of `x1..x3`; `cout` is unchanged when only `cin` flips |
| `tb_pp_gen`          | all 256 operand pairs: every bit, and the weighted sum equals `a * b` |
| `tb_pp_reduce`       | all 65536 partial-product matrices: the weighted value is preserved |
| `tb_final_adder`     | all 2048 values of the two rows: `p` equals their sum |
| `tb_mult4x4`         | all 256 products, then 512 random ones. It also counts how often each mechanism is exercised and fails if one never is: the half-adder carry, each `cout -> cin` link, a compressor with all five inputs at one, and a carry out into `p[7]` |

To run one testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/mult_pkg.sv tb/tb_mult4x4.sv \
          --top-module tb_mult4x4 -Mdir obj_mult && obj_mult/Vtb_mult4x4
```

Verilator finds the other modules through `-Irtl`, by their file names.
Always pass `rtl/mult_pkg.sv` first. To lint a module alone:

```
verilator --lint-only -Wall -Irtl rtl/mult_pkg.sv rtl/mult4x4.sv --top-module mult4x4
```
