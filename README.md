# Carry-free redundant binary signed-digit adders from NOR-only and NAND-only cells

An ordinary binary adder has to wait for a carry to ripple, or be looked ahead,
across the whole word. If every digit may take the values −1, 0 and +1 instead
of 0 and 1, a number has many spellings. That freedom can be used so that no
carry travels more than one position. The sum of two numbers of any length is
then ready after the delay of a single cell. Such an adder is called a
redundant binary signed-digit (RBSD) adder.

This RTL implements the adder cell in the two universal-gate forms proposed for
it: one built from NOR gates only and one from NAND gates only. Universal-gate
cells repeat a single gate type, which makes regular, uniform layouts. Each cell
is chained into a row to form a complete multi-digit adder.

## Digits on two rails

Each signed digit travels on two wires, `p` and `n`:

| digit | p | n |
|------:|:-:|:-:|
|    +1 | 1 | 0 |
|     0 | 0 | 0 |
|    −1 | 0 | 1 |

`p = n = 1` is not a legal digit, and no cell ever produces it.
`rbsd_pkg::rbsd_digit_t` is this two-bit struct. A DIGITS-digit number is the
packed array `rbsd_digit_t [DIGITS-1:0]`, with digit *i* weighted 2^i. Its value
is Σ d_i·2^i, so both signs are represented without a separate sign bit.

## How one cell adds without a carry chain

Digit position *i* adds the two operand digits, z = x_i + y_i ∈ {−2 … +2}. It
splits the result as z = 2·c_{i+1} + w_i, where c_{i+1} is a *transfer* sent
one position up and w_i is an interim digit kept here. The output digit is
s_i = w_i + c_i, where c_i is the transfer arriving from below. The trick is to
choose w_i so that this last addition never leaves {−1, 0, +1}. Nothing then
needs to be passed on from it.

The cell below tells this cell which way its transfer can go, with one bit:

* **m_{i+1} = ¬x_ip ∧ ¬y_ip**: "neither of my digits is +1". When this holds,
  the position's sum is ≤ 0, so the transfer it sends up is −1 or 0. Otherwise
  the sum is ≥ 0 and the transfer is 0 or +1.

With m_i known, an odd sum (one digit zero, the other ±1) is resolved so that it
cannot collide with the transfer from below:

| z  | m_i = 1 (c_i ∈ {−1,0}) | m_i = 0 (c_i ∈ {0,+1}) |
|---:|:-----------------------|:-----------------------|
| +2 | c=+1, w=0              | c=+1, w=0              |
| +1 | c=0, w=+1              | c=+1, w=−1             |
|  0 | c=0, w=0               | c=0, w=0               |
| −1 | c=−1, w=+1             | c=0, w=−1              |
| −2 | c=−1, w=0              | c=−1, w=0              |

The transfer itself travels as a single bit, **b = c + m**. Because m fixes
which two values c can take, one bit is enough: c = b − m. Similarly, w_i
is folded into a single bit d_i whose meaning depends on m_i. Written out, the
cell is five equations (with |x| = x_p ∨ x_n, "the digit is nonzero"):

```
m_{i+1} = ~x_ip & ~y_ip
d_i     = m_i ^ |x_i| ^ |y_i|
b_{i+1} = ~m_i & ~|x_i|  |  ~m_i & ~|y_i|  |  x_ip & y_ip  |  ~|x_i| & ~|y_i|
s_ip    = ~d_i &  b_i
s_in    =  d_i & ~b_i
```

Every output of cell *i* depends only on its own digits and on m_i and b_i.
m_i depends only on the digits of position *i−1*. b_i depends on those digits
and on m_{i−1}, which comes from position *i−2*. So a sum digit depends on at
most three neighbouring positions, and the longest path is a fixed number of
gate levels, whatever the word length. The testbenches check the equations against the table above for all 36 legal
input combinations of a cell. They also check the conservation law
2·c_{i+1} + s_i = x_i + y_i + c_i.

## The two cells

Both cells compute the same five equations. They differ in the gate type and in
the polarity of the two signals passed between neighbours:

| module          | gates       | takes from below | passes up            |
|-----------------|-------------|------------------|----------------------|
| `rac_prop_nor`  | 22 × NOR    | `mi`, `bibar`    | `mi_n`, `bibar_n`    |
| `rac_prop_nand` | 26 × NAND   | `mibar`, `bi`    | `mibar_n`, `bi_n`    |

Both have digit inputs `xip xin yip yin` and sum outputs `sip sin`. Cells of one
kind chain directly, `*_n` of cell *i* to the same-named input of cell *i+1*.
Each gate is an instance of `ul_nor` or `ul_nand`, an N-input gate. An inverter
is such a gate with its inputs tied together. The netlists are two-level
sum-of-products forms:

* `rac_prop_nor`
  * The four minterms of d_i are three-input NORs of complemented literals.
  * They are summed by a four-input NOR, which gives ¬d_i.
  * The four product terms of b_{i+1} are two-input NORs.
  * A four-input NOR sums them into ¬b_{i+1}.
* `rac_prop_nand`
  * The same arrangement, with NAND–NAND forms.
  * It gives d_i and b_{i+1} in true polarity.

The port names and the gate counts (22 and 26) match the published schematics
of the two proposed cells. The gate-by-gate wiring was derived here from the
equations. It was not copied from those schematics, so individual
gates may be connected differently from the original drawings.

The published layout results for these cells (0.12 µm six-metal CMOS,
VDD = 1.2 V) favour the NOR cell:

| cell      | area (µm²) | delay (ns) | power (µW) |
|-----------|-----------:|-----------:|-----------:|
| NOR-NOR   |      606.1 |      1.460 |     40.161 |
| NAND-NAND |      690.4 |      2.075 |     98.156 |

The RTL has zero-delay gates and reproduces none of these numbers.

## The adder row and the top

`rbsd_adder #(DIGITS, ARCH)` places DIGITS cells of one kind in a row.

* The bottom cell gets "no transfer": m_0 = 0 and b_0 = 0. With m_0 = 0, an odd
  lowest position always resolves to w = −1. So `s[0].p` is constantly 0, and
  synthesis reports that bit as constant.
* The output has DIGITS+1 digits. `s[DIGITS]` is the transfer out of the top cell,
  c = b − m, encoded by two extra gates as `p = b & ~m` and `n = ~b & m`.
  So the sum is exact, with no overflow.
* `ARCH` is `RAC_PROP_NOR` (the default) or `RAC_PROP_NAND`.
* Immediate assertions flag any operand digit driven with the illegal
  pattern `p = n = 1` (simulate with `--assert`).
* The inversions written between cells only restore true polarity for the
  shared `m`/`b` vectors. They cancel, and each cell drives its neighbour
  directly.

`rbsd_adder_top #(DIGITS = 8)` contains one row of each kind. Each row has its
own ports: `x_nor`, `y_nor` → `s_nor` and `x_nand`, `y_nand` → `s_nand`. This
lets the two architectures be exercised and compared side by side. Everything is
combinational, and there is no clock or reset.

The cells work for any length. DIGITS = 8 is only a default.

Converting from two's complement is a matter of wiring the value bits to the
`p` rails and the sign bit to the `n` rail of the top digit. Converting back to two's complement is a normal
subtraction, P − N. Neither converter is part of this RTL.

## Where this design makes its own choices

* **Digit encoding.** The three values are mapped to the rails as in the table
  above. The five equations add correctly under this mapping, and the exhaustive cell
  tests confirm it.
* **Netlist wiring.** The gate-level connections are this design's own, as
  described above. Only the gate types, counts and port names follow the
  published cells.
* **Adder assembly.** Chaining the cells into a row, the bottom boundary values,
  the top transfer digit and the default length are this design's own.
* **Not included.** Two older NOR-NOR and NAND-NAND cells exist that the
  proposed cells were compared against. They are not included.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
stops on its own. A watchdog ends the run if it hangs. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rbsd_pkg.sv tb/rbsd_ref_pkg.sv rtl/ul_nor.sv rtl/ul_nand.sv \
  rtl/rac_prop_nor.sv rtl/rac_prop_nand.sv rtl/rbsd_adder.sv rtl/rbsd_adder_top.sv \
  tb/tb_rbsd_adder_top.sv --top-module tb_rbsd_adder_top
./obj_dir/Vtb_rbsd_adder_top
```

| testbench           | what it covers |
|---------------------|----------------|
| `tb_rac_prop_nor`   | all 36 legal input combinations of the NOR cell against the rule table, plus conservation of value |
| `tb_rac_prop_nand`  | the same for the NAND cell |
| `tb_rbsd_adder`     | both rows, exhaustively at 3 digits (729 operand pairs) and with 4000 random pairs at 8 digits, digit by digit and by value |
| `tb_rbsd_adder_top` | the top at its default size with directed and 20 000 random operands, the two architectures against each other |

`tb_rbsd_adder_top` also counts how often each rule of the table fired. It fails
if any of these never happened: a +1 transfer, a −1 transfer, an odd sum under
m = 1, an odd sum under m = 0, a +1 top digit and a −1 top digit.

`tb/rbsd_ref_pkg.sv` is the reference model. It is written from the rule table,
not from the cell equations.

## Files

* `rtl/rbsd_pkg.sv`: digit type, architecture enum, helpers
* `rtl/ul_nor.sv`, `rtl/ul_nand.sv`: N-input NOR and NAND gates
* `rtl/rac_prop_nor.sv`, `rtl/rac_prop_nand.sv`: the two adder cells
* `rtl/rbsd_adder.sv`: a row of cells
* `rtl/rbsd_adder_top.sv`: both rows side by side
* `tb/`: reference package and the four testbenches above
