# Accuracy-reconfigurable adders for error-tolerant video and image arithmetic

Pixels that end up in front of a human eye do not need exact arithmetic: an error in the
last bit or two of a sum is invisible. The adders here exploit that at run time. Every
one-bit cell of the adder has two modes. In **accurate** mode it adds normally. In
**approximate** mode it does not compute at all: it copies operand bits to its outputs
(sum = B, carry = A), and its full-adder logic can be powered down. A small decoder turns a
single number, the **degree of approximation** (DA), into the mode of every cell. DA is the
number of low-order bit positions that run approximately. DA = 0 gives an exact adder.
Raising DA trades accuracy for power, one bit position at a time. DA can change from one
addition to the next, so an encoder can tune accuracy per frame, per block or per operation.

Two adders are built from this idea:

* an 8-bit **ripple-carry adder/subtractor** made of dual-mode full adders (DMFA);
* a 16-bit **carry-lookahead adder** (CLA). Its lookahead tree is built from dual-mode
  leaf blocks (DMCLB1, DMCLB2) and dual-mode propagate/generate blocks (DMPGB1, DMPGB2).

`approx_arith_unit` holds both side by side. They have separate ports and share no signals.
All logic is combinational: there is no clock and no reset anywhere in the design.

## The dual-mode full adder

`dmfa` wraps a conventional full adder (`full_adder`) with two 2:1 multiplexers selected
by `app`:

| app | sum           | cout                        |
|-----|---------------|-----------------------------|
| 0   | a ^ b ^ cin   | ab + b·cin + a·cin          |
| 1   | b             | a                           |

The approximate outputs are not arbitrary. Of the eight input combinations, `cout = a` is
right in six. `sum = b` is right whenever `a == cin`.

In silicon, the full adder core is power gated while `app = 1`. A power switch has no logic
function, so the RTL models it as operand isolation instead. The core's inputs are forced to
0 in approximate mode, so the core does not toggle. A flow with power intent (UPF or CPF)
can replace this with a real switch on the `u_fa` instance.

## Ripple-carry adder/subtractor (`rab_rca`)

There are N = 8 DMFA cells in a chain. `app_decoder` sets `app[i] = (i < da)`. This
thermometer code keeps the approximate cells in the least significant positions, below an
exact upper part. Because an approximate cell passes `a` on as its carry, the result has a
simple form:

* the low `da` bits of the sum are the low `da` bits of B;
* the upper bits are the exact sum of the upper operand bits plus a carry in of `a[da-1]`.

For subtraction, `sub = 1` inverts B and inverts the carry into bit 0, so the result is
`a - b - cin`, where `cin` acts as a borrow in. The document only names the unit an adder
and subtractor, so this add/subtract control is this design's own choice.
With `sub = 1` and `da > 0`, the approximate low bits are the bits of `~b`.

## Reconfigurable carry-lookahead adder (`rab_cla`)

This is the hardest part of the design to understand, because approximation interacts with
the lookahead tree.

### Tree structure

The 16-bit adder is a binary tree:

```
level 5                         PGB1 (root, cout)
level 4              PGB1                          PGB2
level 3        PGB1        PGB2              PGB1        PGB2
level 2      PGB1 PGB2   PGB1 PGB2         PGB1 PGB2   PGB1 PGB2
level 1     CLB1 CLB2 CLB1 CLB2 ...   (16 leaves, bit 0 on the left)
```

* Leaves are one bit wide. A leaf forms P = a^b and G = ab, and its sum bit is S = P ^ Cin.
  The lower bit of each pair is a **DMCLB1**. It also forms Cout = G + P·Cin, which is the
  Cin of the **DMCLB2** on the upper bit.
* An inner block merges its lower child (PA, GA) with its upper child (PB, GB):
  P = PA·PB and G = GB + GA·PB. The lower child of every parent is a **DMPGB1**. It also
  forms Cout = G + P·Cin, the carry into its upper sibling. The upper child is a
  **DMPGB2**, which has no carry out.
* The root is a DMPGB1. Its Cout is the adder's carry out. Its P and G leave the adder as
  `grp_p` and `grp_g`, so several adders can be cascaded.
* The carry into any block is one of two signals. For a lower child it is the parent's
  carry in. For an upper child it is the Cout of its lower sibling.

In the RTL, nodes are numbered in heap order. The root is node 1, the children of node n
are 2n (lower half) and 2n+1 (upper half), and leaf N+i holds bit i. With this numbering
every even node and the root are type-1 blocks, and every odd node is a type-2 block.
`ci[n]` is the carry into node n's bit range.

### Approximate modes

| block  | approximate outputs                       |
|--------|-------------------------------------------|
| DMCLB1 | P = b, G = a, S = b, Cout = a             |
| DMCLB2 | P = b, G = a, S = b                       |
| DMPGB1 | P = PA, G = GB, Cout = G + P·Cin (unchanged formula) |
| DMPGB2 | P = PA, G = GB                            |

### Which blocks approximate (`cla_decoder`)

Leaf i is approximate when `i < da`. An inner block is approximate only when every block
below it is approximate. The decoder computes this as the AND of its two children's APP
signals. So a block is approximate exactly when its whole bit range lies below `da`.

### Effect on the result

The low `da` sum bits are B. The carry into the exact part no longer comes from a single
bit, as it does in the ripple adder. It is formed by the partly approximate blocks on the
path up the tree. For example, with da = 1, the carry into bit 2 is
`G1 + P1·(a0 + b0·cin)`, but the carry into bit 1 is just `a0`. Below the exact part the
adder is therefore not simply "B bits plus exact sum". The reference model in
`tb/rab_ref_pkg.sv` evaluates the tree level by level to predict it.

### Error versus degree of approximation

The table below measures the RTL's behaviour, not a published result. The operands are
uniform random, with cin = 0 and 20,000 samples per row. The error is the absolute
difference from the exact sum, carry out included.

| DA | CLA-16 mean error | CLA-16 wrong results | CLA-16 max error | RCA-8 mean error |
|----|------|-------|-------|------|
| 0  | 0    | 0 %   | 0     | 0    |
| 1  | 0.5  | 50 %  | 1     | 0.5  |
| 2  | 1.0  | 75 %  | 2     | 1.0  |
| 4  | 4.0  | 94 %  | 8     | 4.0  |
| 6  | 19.2 | 98 %  | 56    | 16.0 |
| 8  | 63.9 | 99.7 %| 128   | 63.9 |
| 12 | 1262 | 100 % | 3968  | –    |
| 16 | 16330| 100 % | 32767 | –    |

At DA = 16 the whole tree is approximate. The sum is B, and the carry out is
`a[15] | (b[0] & cin)`.

## Modules

| module | role |
|--------|------|
| `approx_arith_unit` | top: both adders side by side |
| `rab_rca`, `app_decoder`, `dmfa`, `full_adder` | 8-bit ripple-carry adder/subtractor and its parts |
| `rab_cla`, `cla_decoder`, `dmclb1`, `dmclb2`, `dmpgb1`, `dmpgb2` | 16-bit lookahead adder and its parts |

Parameters: `rab_rca #(N=8)`, `rab_cla #(N=16)` (N must be a power of two) and
`approx_arith_unit #(RCA_W=8, CLA_W=16)`. The DA input width defaults to
`$clog2(N+1)`. DA values above N approximate every position.

## Where this design makes its own choices

* **DA encoding.** DA is an unsigned count of approximate low-order positions, decoded as a
  thermometer code. The source architecture names a decoder and a degree of approximation
  but gives no encoding.
* **Approximate P of DMCLB1.** One description of the leaf blocks gives P = A in approximate
  mode for DMCLB1 and P = B for DMCLB2. Another says both approximate S and P by B. This
  design uses P = B for both.
* **Carry distribution in the tree.** The wiring from block Cout to sibling Cin is
  described for the leaves ("DMCLB1 Cout to DMCLB2 Cin"). The design applies the same rule
  on every level, and feeds the lower child from its parent's carry in.
* **DMPGB1 carry out in approximate mode** keeps the formula G + P·Cin, applied to the
  approximated P and G.
* **Power gating** of the DMFA core is modelled as input isolation (see above).
* **Subtraction control** (`sub`, inverted B and inverted carry in) and the `grp_p`/`grp_g`
  outputs are additions for usability.

### Not built

* A stand-alone, transistor-reduced approximate full adder with Cout = A. Its sum function
  is not defined precisely enough to write.
* Carry-bypass and carry-select versions. They would come from substituting DMFA cells into
  those adder types.
* Any video encoder or motion-estimation datapath that would use these adders.
* Power, which is an analog property outside the RTL. The dual-mode cells are meant to save
  power in approximate mode and cost slightly more than a plain full adder in accurate mode.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`:

* one-bit cells (`tb_full_adder`, `tb_dmfa`, `tb_dmclb1`, `tb_dmclb2`, `tb_dmpgb1`,
  `tb_dmpgb2`): exhaustive over all input combinations;
* decoders: every DA value. For `cla_decoder`, each inner node's expected mode is derived
  from the bit range it covers;
* `tb_rab_rca`: exhaustive over all 8-bit operand pairs, cin, add/subtract and DA 0..8
  (2.6 million checks). DA = 0 is also checked against integer arithmetic;
* `tb_rab_cla`: for every DA 0..16, corner operands plus 4,000 random ones, checked
  against the level-by-level reference model. DA = 0 is also checked against integer
  addition, and DA = 16 against its closed form;
* `tb_approx_arith_unit`: the top at its default sizes, 20,000 operations with DA changing
  between operations. It also counts the mechanisms it exercised: exact, partly and fully
  approximate operation of each adder, subtraction, approximate PG blocks, accuracy changes
  and approximation errors. A mechanism that never occurred is a failure.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_approx_arith_unit tb/rab_ref_pkg.sv tb/tb_approx_arith_unit.sv
./obj_dir/Vtb_approx_arith_unit
```

Replace the top module and testbench file to run any other testbench. Every testbench
except those of the one-bit cells imports `rab_ref_pkg`, so always list
`tb/rab_ref_pkg.sv` first.
