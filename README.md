# Multioperand adders in the binary stored-carry number system

This RTL sums many binary operands, such as the partial products of a multiplier. It
uses the **binary stored-carry (BSC)** number system: radix 2 with the digit set
{0, 1, 2}. A BSC number is redundant, so two BSC numbers can be added without a
carry chain. Each sum digit depends on at most three adjacent operand positions.
A multioperand adder is then a tree of small BSC adders, and one ordinary
carry-lookahead adder at the end turns the BSC result back into binary.

The adders are built from one idea of multi-valued current-mode logic. A signal
carries a current of 0, 1, …, m−1 units, and currents add when wires join. Few
current levels are allowed (m = 3, 4 or 5), because threshold detection gets
unreliable with more. So each adder first splits its digits into binary
components. It then adds only components of equal weight, which keeps every
current within m levels. All of the arithmetic below is designed around that
limit.

## How currents are represented in logic

A current of level k in {0 … m−1} is modelled as a bundle of m−1 one-bit
**unit lines**, of which k are active. This gives three rules:

* **Current sum.** Joining two currents concatenates their bundles: `{a, b}`.
  No logic is needed, just as no logic is needed when two wires meet.
* **Threshold.** The threshold function G_j(x) is "more than j lines are
  active".
* **BSC digit.** A BSC digit is a bundle of two lines. `00` is 0, `01` and `10`
  are 1, and `11` is 2, which is the usual unary code extended to both orders.
  Every module accepts all four patterns. The type is `bsc_pkg::bsc_digit_t`.

In a few places two one-unit currents can be shown never to be active together,
for example the transfer t_i and the carry c_i(2) of the 2-input adder. Their
sum then fits on one line, and the RTL writes it as an OR. An immediate
assertion checks each such claim in simulation.

## The converter cell: `mbc`

The mBC cell converts an m-valued current x into its binary components. They are
one-unit currents b[k] with x = Σ 2^k·b[k]. The cell first forms the thresholds
G_0 … G_{m−2}. It then decodes them into a one-hot level and steers that level
onto the binary outputs.

| Cell | Module | Input lines | Outputs |
|---|---|---|---|
| 3BC | `mbc #(.M(3))` | 2 | x(1) = G1, x(0) = G0·¬G1 |
| 4BC | `mbc #(.M(4))` | 3 | x(1), x(0) |
| 5BC | `mbc #(.M(5))` | 4 | x(2), x(1), x(0), with weights 4, 2, 1 |

The transistor-level CMOS and ECL versions of the 3BC cell are analog circuits
and are not part of this RTL. `mbc` gives their logic function.

## The adders, digit by digit

Throughout, the digit x_i of an operand is split as x_i = 2·x_i(1) + x_i(0).
Each adder family below also has an N-digit array module. Its generic loop
runs over the digit positions and wires carries between positions i−2, i−1
and i.

An array's sum is one to three digits wider than its operands, so no carry is
lost. The top sum digits take only a few values, so a synthesis tool finds
one or two of their bits constant at 0. This is expected.

### 2-input adder of 3BC cells: `bsc_2ia`, five 3BC cells per digit

1. Form p_i1 = x_i(1) + y_i(1) and p_i0 = x_i(0) + y_i(0). Both are in {0,1,2}.
   Split each with a 3BC cell.
2. Write the position sum p_i = 2·p_i1 + p_i0 as
   p_i = 2·c_{i+1}(2) + 2·c_{i+1}(1) + w_i, where
   * c_{i+1}(2) = p_i1(1)
   * c_{i+1}(1) = p_i1(1) + p_i1(0) + p_i0(1). At most one of these three is
     active.
   * w_i = p_i0(0)

   Both carries go to position i+1.
3. Split v_i = w_i + c_i(1) with a third 3BC cell. This gives the transfer
   t_{i+1} = v_i(1) and the bit v_i(0).
4. The sum digit is s_i = v_i(0) + t_i + c_i(2). It always lies in {0,1,2},
   because c_i(2) = 1 only when p_{i−1} = 4, and that forces t_i = 0.

The sum has N+1 digits.

### Modified 2-input adder: `bsc_m2ia`, with `enc3`

The same arithmetic as `bsc_2ia`. Three of the five 3BC cells are merged into a
3-valued encoder, which computes its outputs straight from thresholds:

* c_{i+1}(2) = G1(p_i1)
* c_{i+1}(1) = G0(p_i1) ∨ G1(p_i0)
* v_i(1) = c_i(1)·[p_i0 = 1]
* v_i(0) = [p_i0 = 1] XOR c_i(1)

### 3-input adder: `bsc_3ia`, three 3BC and three 4BC cells per digit

1. Form p_i1 and p_i0. Both are in {0…3}, and each is split by a 4BC cell.
2. Write p_i = 4·c_{i+2}(2) + 2·c_{i+1}(1) + w_i. The c(2) carry **skips one
   position**. An AND switch takes the case p_i1(0) = p_i0(1) = 1, which would
   be 2 + 2, and moves it into c(2):
   * c_{i+2}(2) = p_i1(1) + p_i1(0)·p_i0(1)
   * c_{i+1}(1) = p_i1(0) XOR p_i0(1)
3. Split v_i = w_i + c_i(1) + c_i(2), which is in {0…3}, with a 4BC cell into
   t_{i+1} and v_i(0). The sum digit is s_i = v_i(0) + t_i.

The sum has N+2 digits.

### Modified 3-input adder: `bsc_m3ia`, with `enc4`

Three 3BC cells per digit, plus a 4-valued encoder that replaces the two levels
of 4BC cells. The encoder's equations for c_{i+1}(1) and for w_i are written
from the decomposition and v-encoding truth tables:

* c_{i+1}(1) = G1(p_i0) XOR [p_i1 odd]
* w_i = [p_i0 odd]

### 4-input adder: `bsc_4ia`, four 3BC, three 5BC and one 4BC cell per digit

1. Split p_i1 and p_i0, both in {0…4}, with 5BC cells into weights 4, 2 and 1.
2. Write p_i = 4·c_{i+2}(3) + 4·c_{i+2}(2) + 2·c_{i+1}(1) + w_i, where
   * c_{i+2}(3) = p_i1(2) + p_i0(2)
   * c_{i+2}(2) = p_i1(2) + p_i1(1) + p_i1(0)·p_i0(1)
   * c_{i+1}(1) = p_i1(0) XOR p_i0(1)
3. A second stage splits u_i = w_i + c_i(1) + c_i(2) + c_i(3), which is in
   {0…4}. It gives u_i(0) and the carries u_{i+1}(1) and u_{i+2}(2).
4. A 4BC cell splits v_i = u_i(0) + u_i(1) + u_i(2) into t_{i+1} and v_i(0). The
   sum digit is s_i = v_i(0) + t_i.

The sum has N+3 digits. The critical path is one 3BC, two 5BC and one 4BC cell.

### Modified 4-input adder: `bsc_m4ia`, with `enc5`

Four 3BC cells per digit, plus one 5-valued encoder that replaces the three 5BC
cells and the 4BC cell. **This encoder is this design's own.** It is the
equations of the cells it replaces, written as a single block, because no
separate equations exist for it.

### 2-input adder on 5-valued sums: `bsc_52ia`

With five levels available, the position sum p_i = x_i + y_i in {0…4} is formed
directly as four lines. The digit then uses thresholds of p_i alone:

* c_{i+1}(1) = G1(p_i)
* w_i = [p_i odd]
* v_i(0) = w_i XOR c_i(1)
* t_{i+1} = w_i·c_i(1) ∨ G3(p_i)
* s_i = v_i(0) + t_i

Only the outline of this adder was available: thresholds of p_i, then v_i(0),
then t_{i+1}, then s_i = v_i(0) + t_i. The equations are this design's own.
They produce exactly the digits of `bsc_2ia`.

## The multioperand adder: `bsc_mop_tree`

The tree has three steps:

1. **Binary to BSC.** Two binary operands become one BSC operand. Bit k of each
   fills one line of digit k. This step needs no logic.
2. **Tree.** Each level feeds full groups of K operands (K = 2, 3 or 4) to
   K-input adders. One operand left over is passed on to the next level. Two or
   three left over go to a 2- or 3-input adder of the same family in the same
   level. The package functions `num_levels`, `num_main_adders` and
   `num_rem_adders` describe this plan.
3. **BSC to binary.** `bsc_to_bin` adds the two line-vectors of the result with
   a Kogge-Stone carry-lookahead adder.

For the 16 Booth partial products of a 32×32 multiplication, which become 8 BSC
operands, the tree is:

| Family (`KIND`) | Adders | Levels |
|---|---|---|
| `ADD_2IA`, `ADD_M2IA`, `ADD_52IA` | 7 two-input | 3 |
| `ADD_3IA`, `ADD_M3IA` | 3 three-input + 1 two-input | 2 |
| `ADD_4IA`, `ADD_M4IA` | 2 four-input + 1 two-input | 2 |

For the 64×64 case, 32 partial products become 16 BSC operands:

| Family | Adders | Levels |
|---|---|---|
| 2-input | 15 | 4 |
| 3-input | 7 + 1 | 3 |
| 4-input | 5 | 2 |

Every number in the tree has D = W + ⌈log2 NOPS⌉ digits. That is enough for
the exact sum of NOPS unsigned W-bit operands. Each adder's wider output is cut
back to D digits. This loses nothing, because all digits are non-negative, and
`bsc_add_node` asserts it.

The operands are treated as unsigned. With two's-complement Booth partial
products, the low W bits of `sum` are the product.

## Top level: `bsc_mop_top`

The top runs all seven adder families side by side on the same operands, with
one output per family:

* `sum[k]` is the binary result.
* `sum_bsc[k]` is the redundant BSC result.
* The index k is `bsc_pkg::adder_kind_e`.

The defaults are NOPS = 16 and W = 64: the Booth partial products of a 32×32
multiplication, already shifted into place. The Booth recoder itself is not
part of the RTL. The whole design is combinational, with no clock or reset.

Parameters:

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `bsc_mop_top`, `bsc_mop_tree` | `NOPS` | 16 | binary operands |
| `bsc_mop_top`, `bsc_mop_tree` | `W` | 64 | operand width |
| `bsc_mop_tree` | `KIND` | `ADD_2IA` | adder family |
| adder arrays | `N` | 64 | digits per operand |
| `mbc` | `M` | 3 | current levels |

## Choices made in this RTL

The carry logic of the 3- and 4-input cells is taken from the digit
decomposition tables, entry by entry. Where a closed-form expression can be
read in more than one way, the table decides. All of these choices are checked
exhaustively by the testbenches.

* **3-input adder, c_{i+1}(1).** This is p_i1(0) XOR p_i0(1), not a plain sum:
  the AND switch moves the case where both are 1 into c(2).
* **4-input adder, c_{i+2}(2) and c_{i+1}(1).** These are
  p_i1(2) + p_i1(1) + p_i1(0)·p_i0(1) and p_i1(0) XOR p_i0(1), as in the table.
* **4-valued encoder.** The expressions for c_{i+1}(1), and the w_i factor in
  v_i(1) and v_i(0), reproduce the tables.
* **Encoder variant of the 4-input adder.** The source gives no equations for
  it, so this adder is this design's own.
* **Remainder adders.** The modified 4-input family uses the modified 2-input
  adder for its remainder.
* **Operand width.** W = 64 is the product width of a 32×32 multiplication.
* **Final adder.** The Kogge-Stone form is a choice; the source asks only for
  a lookahead adder.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/bsc_pkg.sv \
          tb/tb_bsc_mop_top.sv --top-module tb_bsc_mop_top -Mdir obj
./obj/Vtb_bsc_mop_top
```

Use the same command for any other `tb/tb_<module>.sv`.

| Testbench | What it checks |
|---|---|
| `tb_mbc`, `tb_enc3`, `tb_enc4`, `tb_enc5` | Exhaustive over all valid inputs, against the position-sum arithmetic and the decomposition tables. |
| `tb_bsc_*ia` | 64-digit operands. Directed cases (all 2s, alternating, single positions) and 4000 random cases. The value of the sum must equal the sum of the values. |
| `tb_bsc_to_bin` | Random and directed BSC numbers against their value. |
| `tb_bsc_mop_tree` | The tree plan against the adder counts above. The default tree, plus a 13-operand 4-input tree that has an unpaired operand and a 3-operand remainder. |
| `tb_bsc_mop_top` | Full default size, all seven families. 500 signed 32×32 multiplications via a behavioural Booth recoder, plus random and all-ones operands. It counts that two-position carries, transfers, c(3) and u carries, and remainder adders all occur. |
| `tb_bsc_mop_64` | The 64×64 multiplication: 32 partial products of 128 bits, through the 3- and 4-input trees. |

Building the full top takes a few minutes in Verilator, and the 64×64
testbench about six. Simulation itself takes well under a second.
