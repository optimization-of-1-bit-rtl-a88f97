# One-trit ternary ALU slice

This design is an arithmetic logic unit for one ternary digit. It uses
three-valued logic in place of binary. Each signal is a *trit* with three
ordered values, alpha < beta < gamma, whose weights are 0, 1 and 2. In a
circuit these would be three voltage levels: ground, half supply and full
supply. The case for ternary logic is hardware economy. A trit carries
log2(3) ≈ 1.58 bits, so fewer digits, wires and gates are needed for the
same information.

The slice takes two operand trits, X and Y. It computes thirteen
operations on them:

- four arithmetic operations: add, subtract, multiply and compare;
- nine ternary logic operations.

A binary select line S chooses between the two classes. Two select trits,
A and B, choose the operation inside the class. Every unit computes in
parallel, and a multiplexer built from ternary gates picks one result.
The slice is purely combinational.

## Trits on binary wires

The RTL runs on ordinary binary logic, so each trit is two wires
(`ternary_pkg::trit_t`):

| trit  | weight | code  |
|-------|--------|-------|
| alpha | 0      | 2'b00 |
| beta  | 1      | 2'b01 |
| gamma | 2      | 2'b10 |

The code 2'b11 is not a trit. Every block reads its trit inputs through
`trit_of()`, which reads 2'b11 as gamma. So no block can output anything
other than the three legal codes. Because the codes are in weight order,
comparing two codes as unsigned numbers compares the trits.

This two-wire code is this design's own choice. A transistor-level
ternary circuit with three voltage levels would carry each trit on one
wire. That circuit is not part of this RTL.

## The ternary gate set

Three operations do all the logic of the slice. All of them are in
`ternary_pkg`.

- **TAND** (written ·) is the minimum of its inputs. **TOR** (written +)
  is the maximum. With alpha as zero and gamma as one, these follow the
  usual lattice laws: idempotent, commutative, associative, absorptive
  and distributive.
- **Three inverters** (`t_inverter`, the *general ternary inverter*):

  | x     | STI (simple) | PTI (positive) | NTI (negative) |
  |-------|--------------|----------------|----------------|
  | alpha | gamma        | gamma          | gamma          |
  | beta  | beta         | gamma          | alpha          |
  | gamma | alpha        | alpha          | alpha          |

  STI is gamma − x. PTI rounds beta up before inverting, and NTI rounds it
  down.
- **Literals** (`t_decoder`). X^i is gamma when X = i and alpha
  otherwise. The two-value literals are ORs of these, for example
  X^alpha-beta = X^alpha + X^beta. The decoder derives all six literals
  from a single general inverter:
  - X^alpha = NTI(X);
  - X^gamma = NTI(STI(X));
  - X^beta = PTI(X) · STI(NTI(X)).

A literal is two-valued: it is always alpha or gamma. TAND with a literal
therefore acts as a gate. `r · gamma = r` passes r, and `r · alpha = alpha`
blocks it. The multiplexer is built on this.

## Operations

Code k = 3·A + B, with A and B read as weights 0..2.

| A, B          | k | S = 0 (arithmetic)                 | S = 1 (logic) |
|---------------|---|------------------------------------|---------------|
| alpha, alpha  | 0 | add: f = sum, cout = carry         | TAND          |
| alpha, beta   | 1 | subtract: f = diff, cout = borrow  | TOR           |
| alpha, gamma  | 2 | multiply: f = product, cout = carry| Ex-OR         |
| beta, alpha   | 3 | compare: f = alpha / beta / gamma for X<Y / X=Y / X>Y | STNAND |
| beta, beta    | 4 | unassigned                         | PTNAND        |
| beta, gamma   | 5 | unassigned                         | NTNAND        |
| gamma, alpha  | 6 | unassigned                         | STNOR         |
| gamma, beta   | 7 | unassigned                         | PTNOR         |
| gamma, gamma  | 8 | unassigned                         | NTNOR         |

- **Add** (`t_half_adder`): X + Y = sum + 3·carry. The carry is alpha or
  beta.
- **Subtract** (`t_half_subtractor`): X − Y = diff − 3·borrow. The borrow
  is beta when X < Y.
- **Multiply** (`t_multiplier`): X·Y = product + 3·carry. Only
  gamma·gamma = 4 carries: the product is beta and the carry is beta.
- **Compare** (`t_comparator`): one trit holds all three outcomes. cout
  is alpha.
- **Logic** (`t_logic_unit`). The NAND family is STI, PTI or NTI applied
  to TAND. The NOR family is STI, PTI or NTI applied to TOR. One general
  inverter after each gate gives all three forms at once. Ex-OR is
  X·STI(Y) + STI(X)·Y. cout is alpha for every logic operation.

For the unassigned arithmetic codes, f and cout are alpha and `op_valid`
is 0. `op_valid` is 1 for the thirteen assigned operations.

## The selecting multiplexer

This is the least obvious part. `t_alu_mux` uses no binary
multiplexer. It works only with the ternary gates above:

1. Two `t_decoder`s turn A and B into their literals. The select line for
   code k = 3i + j is `sel[k] = A^i · B^j`. Exactly one of the nine lines
   is gamma, and the others are alpha.
2. S becomes the trit `s_logic`: gamma when S = 1, alpha when S = 0. Its
   simple inverse, `s_arith = STI(s_logic)`, enables the other class.
3. Each candidate result is TANDed with its class enable and its select
   line. All the gated candidates are then TORed together. Every blocked
   candidate is alpha, the identity of TOR, so the TOR returns the one
   candidate that was passed. cout is built the same way from the
   arithmetic carries only. `op_valid` is the TOR of all the enables,
   compared with gamma.

## Interface and timing of `t_alu` (top)

| port       | dir | type    | meaning |
|------------|-----|---------|---------|
| `s`        | in  | logic   | 0 arithmetic, 1 logic |
| `a`, `b`   | in  | trit_t  | operation select trits |
| `x`, `y`   | in  | trit_t  | operand trits |
| `f`        | out | trit_t  | result |
| `cout`     | out | trit_t  | carry, borrow or product carry; alpha otherwise |
| `op_valid` | out | logic   | the select names an assigned operation |

There is no clock and no reset. The outputs follow the inputs after one
combinational delay. The top has no parameters.

## Where the design is its own

These points are this implementation's choices:

- The two-wire binary code of a trit.
- The cout and op_valid outputs, and alpha outputs for unassigned codes.
- The comparator's one-trit output code.
- The Ex-OR truth table. Ex-OR is named as an operation, but its table
  is not specified. The sum-of-products form with STI as the complement
  was chosen.
- The way the decoder builds the literals from one general inverter.
- The gate structure of the multiplexer.

The adder, subtractor, multiplier and comparator are specified by their
function only. They are written here as plain arithmetic on the weights.
A gate-level ternary version would have the same truth tables.

Known departures and limits:

- **One trit only.** The slice has a carry or borrow output but no carry
  input. So two slices cannot yet be chained into an n-trit ALU. A chained
  version would need full adders and full subtractors.
- **Hardware-cost figures do not carry over.** The transistor-count case
  for ternary logic (about 88 transistors against 118 for a comparable
  binary 1-bit ALU) assumes real three-level CMOS gates. Synthesised from
  this RTL, the slice becomes binary logic on the two-wire code, and its
  size says nothing about that comparison.

## Verification

Each block has a self-checking testbench in `tb/`. It compares the block
against values worked out independently in the testbench: truth tables
written out as constants, or integer arithmetic on the weights. Every
unit testbench is exhaustive, including the illegal code 2'b11.

- `tb_t_alu` runs all 2 × 9 × 9 = 162 combinations of S, A, B, X and Y
  through the full slice. It also counts how often each mechanism
  occurs: each operation, an addition carry, a subtraction borrow, a
  multiplication carry, each comparator outcome and an unassigned code.
  If any of them never occurs, it counts a failure.
- `tb_t_alu_mux` drives random candidate results through all 18 select
  combinations.

Every testbench ends with one line of the form
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Mdir obj \
    rtl/ternary_pkg.sv rtl/t_*.sv tb/tb_t_alu.sv --top-module tb_t_alu
./obj/Vtb_t_alu
```

Replace `tb_t_alu` with any other `tb/tb_*.sv` to run one block on its
own. For lint, use `verilator --lint-only -Wall rtl/ternary_pkg.sv rtl/t_*.sv
--top-module t_alu`.

## Files

- `rtl/ternary_pkg.sv`: the trit type, operation codes, and the
  TAND/TOR/inverter/literal functions.
- `rtl/t_inverter.sv`, `rtl/t_decoder.sv`: the general ternary inverter
  and the literal decoder.
- `rtl/t_half_adder.sv`, `rtl/t_half_subtractor.sv`,
  `rtl/t_multiplier.sv`, `rtl/t_comparator.sv`: the arithmetic units.
- `rtl/t_logic_unit.sv`: the nine logic operations.
- `rtl/t_alu_mux.sv`: the ternary-gate output multiplexer.
- `rtl/t_alu.sv`: the slice (top).
- `tb/tb_<module>.sv`: one testbench per module.
