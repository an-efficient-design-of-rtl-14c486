# 16-bit parity preserving adder/subtractor from P2RG reversible gates

This is a 16-bit adder/subtractor built only from one kind of reversible gate, the 5x5
Parity Preserving Reversible Gate (P2RG). A reversible gate has as many outputs as inputs
and maps every input pattern to a different output pattern, so no information is lost
inside the network. A parity preserving gate also keeps the XOR of its outputs equal to
the XOR of its inputs. A network made only of such gates keeps that property as a whole.
A fault that flips one wire therefore shows up as a mismatch between input parity and
output parity, and a single comparator at the boundary detects it.

One control line selects the operation. `ctrl = 0` gives `y = a + b`, `ctrl = 1` gives
`y = a - b`. The 16-bit unit is two 8-bit stages in cascade, and the carry/borrow of the
low stage feeds the high stage.

The RTL models the logic function of the reversible network with ordinary
synthesizable gates. It does not model the energy behaviour that motivates reversible
logic. It is useful as a bit-exact reference for the network, its costs and its
fault-detection property.

## The P2RG gate (`rtl/p2rg.sv`)

Inputs A..E, outputs P..T. With `G = A'C' ^ B'`:

```
P = A
Q = G ^ D
R = G&D ^ A&B ^ C
S = A&B' ^ C ^ G'&D
T = D ^ E ^ A&C
```

The testbench checks all 32 patterns. The gate is a bijection, and output parity equals
input parity. Two special cases do all the work in this design:

* **C = 0 makes the gate a full adder on A, B, D.** G becomes `A ^ B`, so `Q = A^B^D` (the
  sum) and `R = (A^B)&D ^ A&B` (the majority, i.e. the carry).
* **A = 0, D = 0 makes the gate a copier.** With `B = b`, `C = ctrl`, `E = x` the outputs
  are `P = 0`, `Q = b ^ ctrl`, `R = ctrl`, `S = ctrl`, `T = x`.

## One bit: two gates, no fan-out (`rtl/p2rg_cell.sv`)

Subtraction uses two's complement: `a - b = a + ~b + 1`. Each bit therefore needs
`b ^ ctrl` and a full adder, and the least significant bit needs a carry-in equal to
`ctrl`. A reversible network may not fan a wire out to two gates. Every extra copy of
`ctrl` must come out of a gate, and so must the constant 0 that the full adder needs.

```
            A=0  B=b  C=ctrl_in  D=0  E=a
            +----------------------------+
  gate 1    |            P2RG            |
            +----------------------------+
             P=0  Q=b^ctrl  R=ctrl  S=ctrl  T=a
              |     |         |       |      |
              |     |         |       +------|------> ctrl_out (to the next bit)
              |     |         |              |
            C=0   A=b^ctrl  E=ctrl  B=cin   D=a
            +----------------------------+
  gate 2    |     P2RG (full adder)      |
            +----------------------------+
             P=b^ctrl  Q=sum  R=cout  S  T=a^ctrl
             garbage                 garbage garbage
```

Gate 1 does three jobs. It forms `b ^ ctrl`. It produces two copies of `ctrl`: one goes
to gate 2, the other to the next bit. It also regenerates the 0 that gate 2 needs on
input C. Gate 2 is the full adder. Each bit costs 2 gates, 2 constant inputs (gate 1's
A and D) and 3 garbage outputs.

The least significant bit (`FIRST = 1`) differs in one place. Gate 1's R copy of `ctrl`
becomes the carry-in, which is the `+1` of two's complement subtraction. Gate 2's E input
then takes the `cin` port, which the user ties to 0. That is the one extra constant of
the whole unit, and it reaches only the garbage output T.

The published work gives the gate and the totals per width. It does not give this
per-bit wiring. The wiring here was found by a search over all connections of two P2RGs
for one that adds and subtracts, has no fan-out, and uses two constants per bit. The
search found a small family of equivalent solutions; this is one of them.

## Stages and the 16-bit unit (`rtl/p2rg_addsub_n.sv`, `rtl/p2rg_addsub16.sv`)

`p2rg_addsub_n` is a ripple chain of `WIDTH` cells (default 8). The carry and the `ctrl`
copy pass from bit to bit. `FIRST_STAGE = 1` makes bit 0 the `FIRST` cell; with
`FIRST_STAGE = 0` the chain takes its carry from `cin`.

`p2rg_addsub16` cascades a `FIRST_STAGE = 1` low stage and a `FIRST_STAGE = 0` high stage.
The high stage receives the low stage's carry and its `ctrl` copy, so `ctrl` enters the
network once. The design is purely combinational: no clock, no reset, and a critical path
of 16 carry stages of one gate each.

| Port           | Dir | Width | Meaning                                             |
|----------------|-----|-------|-----------------------------------------------------|
| `a`, `b`       | in  | 16    | operands; `a - b` in subtraction                    |
| `ctrl`         | in  | 1     | 0 = add, 1 = subtract                               |
| `y`            | out | 16    | sum or difference                                   |
| `cout`         | out | 1     | carry out of bit 15; in subtraction, 1 = no borrow  |
| `ctrl_out`     | out | 1     | the last `ctrl` copy (a garbage output)             |
| `garbage`      | out | 48    | three garbage outputs per bit, bit *i* at `[3i+2:3i]` |
| `parity_fault` | out | 1     | input and output parity of the network differ       |

`cout` is a true carry. In subtraction, a borrow is signalled by `cout = 0` (unsigned
`a < b`). Signed overflow is not flagged. The source describes none, and it can be
derived from the operand and result sign bits outside the unit.

### Cost

| Width | Gates | Constant inputs | Garbage outputs (this RTL) | Garbage (published table) |
|-------|-------|-----------------|----------------------------|---------------------------|
| 4     | 8     | 9               | 13                         | 16                        |
| 8     | 16    | 17              | 25                         | 32                        |
| 16    | 32    | 33              | 49                         | 64                        |

Gate and constant counts match the published figures (2N and 2N+1). The garbage counts
do not. For this structure, 3N garbage outputs come from gate 2 of each bit, plus the
final `ctrl` copy. The published garbage counts cannot be reached with its own gate and
constant counts. The 16-bit network has 33 primary inputs plus 33 constants, which is 66
wires in. Since the network is reversible, 66 wires also come out: 16 sums, 1 carry, and
therefore 49 garbage outputs, not 64. `p2rg_pkg` holds these cost formulas.

## Fault detection (`rtl/parity_check.sv`)

`parity_check` XORs every wire entering the network and every wire leaving it. Entering:
`a`, `b`, `ctrl` and the 33 constant zeros. Leaving: `y`, `cout`, `ctrl_out` and the 48
garbage outputs. It sets `parity_fault` when the two parities differ. Any fault that flips
an odd number of wires is caught, for example a stuck wire between two gates. Faults that
flip an even number of wires go unseen; parity cannot see them. The checker is ordinary
irreversible logic outside the reversible network. Comparing input and output parity is
the published method; its form as one XOR tree per side is this design's choice.

Note that the garbage outputs must be brought out for the check to work. They are not
"don't care" in this design.

## Departures from the source and open points

* The per-bit wiring of the two gates is this design's own (see above).
* The garbage counts differ from the published table (see Cost).
* How subtraction borrows (inverted carry, two's complement) and where the first
  carry-in comes from are not stated in the source. This design uses standard two's
  complement with the carry-in derived from `ctrl`.
* The source calls the design "parallel". That means all bits are computed by parallel
  gate columns; the carry still ripples, as the 2N gate count allows nothing else.

## Files

| File | Contents |
|------|----------|
| `rtl/p2rg_pkg.sv` | cost formulas, `op_e` (`OP_ADD`/`OP_SUB`) |
| `rtl/p2rg.sv` | the 5x5 gate |
| `rtl/p2rg_cell.sv` | one bit, two gates |
| `rtl/p2rg_addsub_n.sv` | WIDTH-bit stage |
| `rtl/parity_check.sv` | input/output parity comparator |
| `rtl/p2rg_addsub16.sv` | top: two 8-bit stages plus parity check |
| `tb/tb_p2rg.sv` | all 32 gate patterns, bijectivity, parity |
| `tb/tb_p2rg_cell.sv` | all inputs, inner and first cell |
| `tb/tb_p2rg_addsub_n.sv` | 8-bit stage, exhaustive (2^17) and random with carry-in |
| `tb/tb_parity_check.sv` | random vectors and every single-bit flip |
| `tb/tb_p2rg_addsub16.sv` | top at full size: corners, 100k random operations, fault injection |
| `tb/tb_p2rg_widths.sv` | the 4/8/16-bit versions and their costs |

## Simulating

Every testbench checks itself and ends with a line `TB_RESULT checks=N failures=M`. To
build and run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/p2rg_pkg.sv tb/tb_p2rg_addsub16.sv --top-module tb_p2rg_addsub16
./obj_dir/Vtb_p2rg_addsub16
```

The end-to-end test runs the unmodified top in about a second. It counts how often each
mechanism occurs and fails if any never does: addition, subtraction, carry and borrow
crossing between the 8-bit stages, carry out, borrow out, and detection of an injected
fault. It injects the fault by `force`-ing the wire from gate 1's T output to gate 2's D
input in bit 2 to 0.

To change the width, set `HALF_WIDTH` on `p2rg_addsub16`, or use `p2rg_addsub_n` directly
with `FIRST_STAGE = 1` and `cin` tied to 0.
