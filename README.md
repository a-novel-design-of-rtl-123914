# Reversible carry select adder built from MPFA and Fredkin gates

A carry select adder works out each result twice, once for a carry in of 0
and once for a carry in of 1, and lets the real carry pick one with a
multiplexer. This design applies that idea at the level of a single bit and
builds it entirely from *reversible* gates: 3-input/3-output gates whose
output pattern always identifies the input pattern uniquely, so no
information is erased. Each bit position holds two reversible full adders
(one with carry in 0, one with carry in 1) and two Fredkin gates used as
2:1 multiplexers. Chaining four such cells gives a 4-bit adder of 8 full
adders and 8 Fredkin gates.

The RTL is a gate-accurate, purely combinational model of that structure.
It adds correctly, shows every intermediate and "garbage" signal, and
synthesises like any adder. The low-power claims of reversible logic depend
on how the gates are built from transistors. That part cannot be expressed
in SystemVerilog and is not modelled here.

## Reversible building blocks

**Peres gate** (`rtl/peres_gate.sv`): 3 in, 3 out.

    P = A
    Q = A xor B
    R = (A and B) xor C

With C = 0, R is the AND of A and B, and Q is their XOR: that is a half
adder in one gate.

**Fredkin gate** (`rtl/fredkin_gate.sv`): a controlled swap.

    P = A
    Q = A ? C : B      (A'B + AC)
    R = A ? B : C      (AB + A'C)

The control A passes through unchanged. B and C go straight through when
A = 0 and change places when A = 1. Output Q alone is a 2:1 multiplexer
selected by A, which is the only way the adder uses this gate. The other
two outputs are garbage.

**Modified Peres Full Adder, MPFA** (`rtl/mpfa.sv`): two Peres gates in
series form a 4-in/4-out reversible full adder.

    Peres 1 (A, B, ai1)      -> GO1 = A,      Q1 = A xor B,  R1 = AB xor ai1
    Peres 2 (Q1, Cin, R1)    -> GO2 = A xor B, Sum = A xor B xor Cin,
                                Cout = (A xor B)Cin xor AB xor ai1

With the ancilla (constant) input `ai1 = 0`, `Cout` is the majority of A, B
and Cin, so the gate is a full adder. `ai1 = 1` inverts the carry. The
design ties it to 0 everywhere. GO1 and GO2 are the garbage outputs. The
input order of the second Peres gate, (Q1, Cin, R1), is the only
assignment of the three wires that makes a full adder.

## The 1-bit carry select cell

`rtl/rcsla_cell.sv` is the heart of the design:

    MPFA1: cin = 1, ai1 = 0  ->  S2, C2   (garbage x3, x4)
    MPFA2: cin = 0, ai1 = 0  ->  S1, C1   (garbage x1, x2)

    Fredkin (A = Cin, B = C1, C = C2)  ->  x7, COUT = Cin ? C2 : C1, x8
    Fredkin (A = Cin, B = S1, C = S2)  ->  x5, SUM  = Cin ? S2 : S1, x6

Both MPFAs depend only on A and B, because their carry inputs are
constants. They settle as soon as the operands arrive, whatever the carry.
The real carry in only drives the select input of the two Fredkin gates. So
the path from carry in to carry out in each bit is one multiplexer, not a
full adder.

Garbage of the cell, in `rcsla_pkg::cell_garbage_t`:

| bit | source           | value                        |
|-----|------------------|------------------------------|
| x1  | MPFA2 GO1        | A                            |
| x2  | MPFA2 GO2        | A xor B                      |
| x3  | MPFA1 GO1        | A                            |
| x4  | MPFA1 GO2        | A xor B                      |
| x5  | sum Fredkin P    | Cin                          |
| x6  | sum Fredkin R    | the sum that was not chosen  |
| x7  | carry Fredkin P  | Cin                          |
| x8  | carry Fredkin R  | the carry that was not chosen|

x5 and x7 are therefore a direct view of the carry into each bit. The
testbenches use them to check the carry chain inside the adder.

Each cell has 4 constant inputs (the two MPFA carry constants and two
`ai1 = 0`) and 8 garbage outputs. A, B and Cin each drive two gates. A
strictly reversible circuit would need explicit copy gates for such fan-out.
This design, like its source, does not add any.

## The N-bit adder

`rtl/rcsla.sv` (parameter `WIDTH`, default 4) chains `WIDTH` cells. Cell
*i* adds `a[i]`, `b[i]` and the carry out of cell *i-1*. Cell 0 takes `cin`,
and the last cell's carry is `cout`.

    cin -> [cell 0] -> [cell 1] -> [cell 2] -> [cell 3] -> cout
              |           |           |           |
            sum[0]      sum[1]      sum[2]      sum[3]

Timing: the design has no clock, no reset and no registers. After the
operands change, all MPFAs settle in parallel, two Peres gate delays. From
then on the carry ripples through one Fredkin multiplexer per bit, so the
worst case is two Peres delays plus `WIDTH` multiplexer delays. That worst
case happens when every bit propagates (`a xor b` all ones). Register the
inputs and outputs outside the adder if it is used in a clocked design.

Ports of `rcsla`:

| port      | dir | width        | meaning                                  |
|-----------|-----|--------------|------------------------------------------|
| `a`, `b`  | in  | `WIDTH`      | operands                                 |
| `cin`     | in  | 1            | carry in                                 |
| `sum`     | out | `WIDTH`      | sum                                      |
| `cout`    | out | 1            | carry out                                |
| `garbage` | out | `WIDTH` × 8  | per-cell garbage outputs; may be left open |

At `WIDTH = 4` the adder holds 8 MPFAs (16 Peres gates) and 8 Fredkin
gates. It has 16 constant inputs and 32 garbage outputs.

## Where this RTL makes its own choices

- **How the cells are joined.** The source describes the 1-bit cell and
  gives the 4-bit adder's gate count (8 MPFA + 8 Fredkin), which is four
  cells. It does not draw the connection between them. Carry out to carry
  in is used here.
- **Garbage and ancilla counts.** The source tabulates 8 ancilla inputs and
  36 garbage outputs for the 4-bit adder. Four cells built as the cell is
  drawn have 16 constant inputs and 32 garbage outputs, and that is what
  this RTL contains.
- **Fredkin equations.** One description of the Fredkin gate in the source
  repeats the Peres equations. The controlled-swap equations used here are
  the ones its gate diagram, its transistor-level walkthrough and its
  simulation example all agree on.
- **Reported example outputs.** Two simulation results quoted by the source
  disagree with the gate equations. For the Peres gate with a=1, b=0, c=0
  it quotes q=0, r=1; the equations (and its own transistor walkthrough)
  give q=1, r=0. For the 1-bit adder with a=1, b=1, cin=0 it quotes sum 1,
  carry 0. A full adder gives sum 0, carry 1. The RTL follows the equations,
  and the testbenches check these cases against them.
- **Width** is a parameter. The default is 4, the size the source evaluates.
- **Not modelled:** the CMOS and pass-transistor realisations of the gates.
  The transistor counts, power figures and quantum cost given for them have
  no counterpart in RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops through a watchdog if it hangs.

| testbench         | what it covers                                                   |
|-------------------|------------------------------------------------------------------|
| `tb_peres_gate`   | all 8 inputs; output is one-to-one; the a=1,b=0,c=0 example       |
| `tb_fredkin_gate` | all 8 inputs; pass/swap; ones conserved; one-to-one; 2 examples   |
| `tb_mpfa`         | all 16 inputs incl. `ai1 = 1`; garbage values; one-to-one         |
| `tb_rcsla_cell`   | all 8 inputs; sum, carry and all 8 garbage bits                   |
| `tb_rcsla`        | 4-bit default: all 512 operand/carry combinations, per-cell carries |
| `tb_rcsla_wide`   | `WIDTH = 16`: 20,000 vectors, every eighth a full-length carry    |

The two adder testbenches count four events and fail if any of them never
happens:
- a cell selecting its carry-in-0 result;
- a cell selecting its carry-in-1 result;
- a carry out;
- a carry that crosses every cell.

Expected values come from integer addition, not from the gate equations.

To simulate, for example the 4-bit adder:

    verilator --binary --timing --assert -Irtl \
        rtl/rcsla_pkg.sv rtl/peres_gate.sv rtl/fredkin_gate.sv rtl/mpfa.sv \
        rtl/rcsla_cell.sv rtl/rcsla.sv tb/tb_rcsla.sv \
        --top-module tb_rcsla -o sim
    ./obj_dir/sim

For the other testbenches, swap in their file and top module. `rcsla_pkg.sv`
must come first, because `mpfa`, `rcsla_cell` and `rcsla` import it.

## Files

- `rtl/rcsla_pkg.sv`: garbage-output struct types
- `rtl/peres_gate.sv`, `rtl/fredkin_gate.sv`: 3x3 reversible gates
- `rtl/mpfa.sv`: reversible full adder from two Peres gates
- `rtl/rcsla_cell.sv`: 1-bit carry select cell
- `rtl/rcsla.sv`: `WIDTH`-bit adder, the top level
- `tb/`: the testbenches listed above
