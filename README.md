# 8x8 multiplier tiled from additive multiply modules

This is an unsigned 8-bit by 8-bit multiplier with a 16-bit product. It is
built without a separate partial-product adder tree. It is a grid of small
*additive multiply modules* (AMMs). Each AMM multiplies a 4-bit segment of one
operand by a 2-bit segment of the other, and in the same step adds two extra
operands. Those extra inputs take the partial sums of the neighbouring
modules, so the accumulation is spread over the array. The result is a
regular structure of ripple-carry adders built from one-bit full adders.

The full-adder cell is a parameter, so that the cost and power of different
adder circuits can be compared inside the same multiplier. Four cells are
provided:

- a behavioural adder;
- an XOR-mux cell;
- an XNOR-mux cell;
- an XOR/XNOR-mux cell.

The design is purely combinational. It has no clock, no registers and no
reset. A product is valid one propagation delay after the operands change.

## The 4x2 additive multiply module (`amm_4_2`)

```
o_pp[5:0] = i_a[3:0] * i_x[1:0] + i_y[3:0] + i_z[1:0]
```

The largest possible value is 15·3 + 15 + 3 = 63, so six output bits can
never overflow. This is why the module can take two addends for free: the
sum still fits in the width the product alone would need.

Inside there are two AND rows and three ripple-carry adders:

| stage      | width | adds                                      |
|------------|-------|-------------------------------------------|
| AND rows   | 4     | `pp0 = a & x[0]`, `pp1 = a & x[1]`        |
| `RCA_AX`   | 5     | `{0,pp0} + {pp1,0}` → `a*x` (6 bits)      |
| `RCA_AXY`  | 6     | `+ y`                                     |
| `RCA_AXYZ` | 6     | `+ z`, low six bits are `o_pp`            |

All carry-ins are tied to 0. The carry-out bits of the last two adders are
always 0, and lint reports them as unused.

## How eight AMMs make an 8x8 multiplier (`amm_mult_8x8`)

This tiling is the part that takes the most care to follow.

The multiplicand is cut into nibbles, `XL = a[3:0]` and `XH = a[7:4]`. The
multiplier is cut into bit pairs, `Yk = b[2k+1:2k]` for k = 0..3. This gives
two columns of four modules:

- `ML_k` computes `XL·Yk`, at weight 4^k;
- `MH_k` computes `XH·Yk`, at weight 16·4^k.

Every module output has six bits. They are split by weight and sent to the
module where the same weight sits at the bottom of an addend:

| source | bits      | weight of bit 0 | goes to                          |
|--------|-----------|-----------------|----------------------------------|
| `ML_k` | `o[1:0]`  | 4^k             | product bits `P[2k+1:2k]`        |
| `ML_k` | `o[3:2]`  | 4^(k+1)         | `i_y[1:0]` of `ML_(k+1)`         |
| `ML_k` | `o[5:4]`  | 16·4^k          | `i_z` of `MH_k` (same row)       |
| `MH_k` | `o[1:0]`  | 16·4^k          | `i_y[3:2]` of `ML_(k+1)`         |
| `MH_k` | `o[5:2]`  | 16·4^(k+1)      | `i_y` of `MH_(k+1)`              |

The last row supplies the top of the product:

- `ML_3 o[3:2]` gives `P[9:8]`;
- `MH_3 o[5:0]` gives `P[15:10]`.

Inputs with nothing to connect are tied to 0: both addends of `ML_0`, `i_y`
of `MH_0`, and `i_z` of every `ML_k`.

So partial sums flow three ways: down the low column, down the high column,
and back and forth between the columns in every row. The longest path goes
down the `XL` column, crossing into the `XH` column at each row, and ends in
`MH_3`.

The placement of the eight modules, their constant inputs and which product
bits each one drives all follow the published block diagram. The wiring
inside each bundle (which output bits drive which input bits) is not legible
there. It was derived from the bit weights above, and the exhaustive test
below confirms it.

## Full-adder cells

Every cell has the same ports: `i_cin`, `i_a1`, `i_a2` in, and `o_carry`,
`o_sum` out.

| module            | `FA_TYPE`         | sum                        | carry                   |
|-------------------|-------------------|----------------------------|-------------------------|
| `fa_generic`      | `FA_GENERIC`      | `{c,s} = a1 + a2 + cin`    | (same addition)         |
| `fa_xor_mux`      | `FA_XOR_MUX`      | `(a1^a2) ^ cin`            | `(a1^a2) ? cin : a1`    |
| `fa_xnor_mux`     | `FA_XNOR_MUX`     | `~(~(a1^a2) ^ cin)`        | `~(a1^a2) ? a1 : cin`   |
| `fa_xor_xnor_mux` | `FA_XOR_XNOR_MUX` | `cin ? ~(a1^a2) : (a1^a2)` | `(a1^a2) ? cin : a1`    |

The mux cells rely on one fact: when the two addends are equal, either of
them is the carry out; when they differ, the carry-in passes through.

The structures of the XOR-mux and XOR/XNOR-mux cells follow their published
schematics. For the XNOR-mux cell only the name is known. Its gate
arrangement here is this design's choice: the mirror image of the XOR-mux
cell. `rca_generic` picks the cell with a `generate` on `FA_TYPE`, and the
type `amm_pkg::fa_type_e` is shared by all levels.

## Top level (`amm_mult_top`)

The top holds four independent multipliers side by side, one per full-adder
cell. Each has its own operand and product ports, and array index `i` equals
the `fa_type_e` value:

```
input  logic [3:0][7:0]  i_a, i_b;
output logic [3:0][15:0] o_product;   // o_product[i] = i_a[i] * i_b[i]
```

Grouping the variants in one top is this design's choice. It lets one
netlist compare them. For a single multiplier, instantiate `amm_mult_8x8`
with the `FA_TYPE` you want (default `FA_GENERIC`).

## Files

| file                        | contents                                       |
|-----------------------------|------------------------------------------------|
| `rtl/amm_pkg.sv`            | `fa_type_e`, `NUM_FA_TYPES`                    |
| `rtl/fa_*.sv`               | the four full-adder cells                      |
| `rtl/rca_generic.sv`        | `WIDTH`-bit ripple-carry adder (default 5)     |
| `rtl/amm_4_2.sv`            | 4x2 additive multiply module                   |
| `rtl/amm_mult_8x8.sv`       | 8x8 multiplier, `FA_TYPE` parameter            |
| `rtl/amm_mult_top.sv`       | the four variants side by side                 |
| `tb/tb_<module>.sv`         | one self-checking testbench per module         |

## Verification

Every testbench checks exhaustively against integer arithmetic worked out in
the testbench. It prints `TB_RESULT checks=N failures=M`, and a watchdog
ends a run that hangs. Coverage by level:

- **Full-adder cells:** all 8 input combinations.
- **`rca_generic`:** all operand and carry-in combinations at widths 5 and 6,
  for every cell, with a check that a carry out of the top bit occurs.
- **`amm_4_2`:** all 4096 input combinations for every cell, with a check
  that the maximum output of 63 is reached.
- **`amm_mult_8x8`:** all 65,536 operand pairs for every cell.
- **`amm_mult_top`:** the same 65,536 pairs at the top's default
  configuration. Each variant gets a differently offset pair, which catches
  cross-wiring between the variants. For every variant it also counts three
  events and fails if one never occurs:
  - a hand-over from the `XL` column into an `XH` module;
  - a hand-over from an `XH` module into the next `XL` module;
  - a product with bit 15 set.

Run one test with plain Verilator, for example the top:

```
verilator --binary --timing --assert -y rtl --top-module tb_amm_mult_top \
  rtl/amm_pkg.sv tb/tb_amm_mult_top.sv
./obj_dir/Vtb_amm_mult_top
```

The package goes first on the command line and `-y rtl` finds the modules by file name. Each test runs in well under a second once it is built.

## Departures and open points

- Operands are unsigned. The AND-gate partial products imply this, but it is
  never stated.
- The wiring of each bundle between AMMs was derived from bit weights rather
  than copied from a drawing.
- Inside `RCA_AX`, `pp1` is placed one bit above `pp0`. This is the only
  alignment for which the module computes `a*x`.
- The XNOR-mux full adder is this design's own circuit.
- The published FPGA results were about 105 LUTs for the mux-cell variants
  and 110 for the generic one, with no registers and 16 input plus 16 output
  pins. They are not reproduced here. The register and pin counts match this
  RTL; LUT counts depend on the FPGA tools.
- The Wallace and Dadda tree multipliers the AMM was compared against are not
  included.
