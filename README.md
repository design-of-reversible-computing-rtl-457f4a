# Garbage-free reversible computing systems in SystemVerilog

A reversible circuit computes a bijection: from its outputs the inputs can
always be recovered, so no information is erased on the way. A circuit is
*garbage-free* when it reaches this without extra output lines that carry
nothing but leftovers of the computation. The circuits here are all written
in that style. An adder does not map (A, B) to A + B, which would lose
information. It performs the *reversible update* (A, B) -> (A, B + A mod 2^n).
A multiplier carries a remainder along. A processor changes registers and
memory only in ways it can undo, and it can run a program backwards to its
starting state.

The RTL holds four independent designs, placed side by side in
`rev_systems_top`:

| prefix  | design                                  | modules |
|---------|-----------------------------------------|---------|
| `bob_`  | Bob, a reversible 16-bit processor      | `bob_cpu`, `bob_regfile`, `bob_memory`, `bob_br_update`, `bob_pc_update`, `rev_alu`, `vshape_adder`, `bob_pkg`, `rev_pkg` |
| `rbca_` | ripple-block carry adder                | `rbca_adder` |
| `cm_`   | multiplication by 2^k +/- 1 with remainder | `const_mult` |
| `gx_`   | three-line gate-level example           | `gate_example`, `cnot_gate`, `fredkin_gate` |

Only the processor has a clock. The other three are combinational.

## Bob: a processor that can run backwards

### Machine state and control flow

The state is the PC, a branch register **BR**, a direction bit **DIR**,
16 registers of 16 bits and a 64K-word memory. Programs and data share the
memory. The central rule is that **no instruction writes the PC**. Branch
instructions change BR (and RBRA also flips DIR). After every instruction
the PC moves by a step that depends only on BR and DIR:

    step    = (BR == 0) ? 1 : BR
    PC_next = DIR ? PC - step : PC + step

The new BR and DIR values are used. A jump therefore leaves BR non-zero.
The jump target must hold a *paired* branch that returns BR to zero, after
which execution goes on one word at a time. For example:

    41: BRA 6      ; BR = 6  -> PC = 47
    ...
    47: BRA -6     ; BR = 0  -> PC = 48

Since BR records how the machine arrived, the reverse path is always known.
Run backwards, the PC goes from 48 to 47. There `BRA -6` is undone
(BR = 6), the PC steps back to 41, and `BRA 6` is undone (BR = 0).

Conditional branches (`BEZ`, `BLTZ`, `BGEZ`) add their offset to BR only
when their test on a register holds. The branch at the target uses the same
test with the opposite offset. The tested register must not change between
the two branches.

### Running backwards

When DIR = 1, each instruction performs its **inverse**: ADD subtracts,
RL rotates right, BRA subtracts its offset, and so on. `RBRA off` adds its
offset and flips DIR. So `RBRA 0` at the end of a program turns the machine
round on the spot. The machine then walks back along the path it took and
undoes each instruction, until every register and memory word is back at
its starting value.

### Subroutine calls

`SWBR ra` exchanges BR with register `ra`, which must be zero beforehand.
A call and return look like this (also used in the testbenches):

    4:  BRA 6       ; call: BR = 6, jump to 10
    10: SWBR $1     ; $1 = 6 (the way back), BR = 0
    11: NEG  $1     ; $1 = -6
        ...body...
    16: BRA -6      ; jump to the entry SWBR
    10: SWBR $1     ; BR = -6, $1 = 0  -> PC = 4
    4:  BRA 6       ; BR = 0            -> PC = 5

### Instruction set

16-bit words: `[15:11]` opcode, `[10:7]` ra, `[6:3]` rb, `[6:0]` signed
imm7, `[10:0]` signed off11. An all-zero word is a NOP.

| op | mnemonic     | forward                | backward (DIR = 1)   |
|----|--------------|------------------------|----------------------|
| 1  | ADD ra rb    | ra += rb               | ra -= rb             |
| 2  | SUB ra rb    | ra -= rb               | ra += rb             |
| 3  | XOR ra rb    | ra ^= rb               | same                 |
| 4  | NEG ra       | ra = -ra               | same                 |
| 5  | ADDI ra imm  | ra += imm              | ra -= imm            |
| 6  | XORI ra imm  | ra ^= imm              | same                 |
| 7  | RL ra imm    | rotate left by imm[3:0] | rotate right        |
| 8  | RR ra imm    | rotate right           | rotate left          |
| 9  | EXCH ra rb   | swap ra and MEM[rb]    | same                 |
| 10 | SWBR ra      | swap ra and BR         | same                 |
| 11 | BRA off      | BR += off              | BR -= off            |
| 12 | RBRA off     | BR += off, flip DIR    | BR -= off, flip DIR  |
| 13 | BEZ ra imm   | if ra == 0: BR += imm  | ... BR -= imm        |
| 14 | BLTZ ra imm  | if ra < 0: BR += imm   | ... BR -= imm        |
| 15 | BGEZ ra imm  | if ra >= 0: BR += imm  | ... BR -= imm        |

ADD, SUB, XOR and EXCH with ra = rb would erase information, so they are
not allowed. Assertions in `bob_cpu` report them. `bob_pkg` has encoder
functions (`enc_rr`, `enc_ri`, `enc_br`) that assemble instruction words.

### Datapath and timing

One instruction completes per clock while `run` is high (`bob_cpu`):

1. The word at MEM[PC] is read combinationally. Fetching only reads it, so
   the fetch itself erases nothing.
2. `bob_regfile` reads ra and rb. `rev_alu` updates ra from rb or from the
   immediate, doing the inverse operation when DIR = 1.
3. EXCH writes the old ra into MEM[rb] and the memory word into ra. SWBR
   writes the old BR into ra.
4. `bob_br_update` forms the new BR and DIR. `bob_pc_update` forms the new
   PC from them.

Reset clears the PC, BR, DIR and all registers. The memory is zero at power-up
(an `initial` block) and is never reset. While `run` is low the machine holds
its state and the load port (`load_we`, `load_addr`, `load_data`) writes
memory. Two observation ports read any register or memory word. The output
`alu_anc` is the ALU adder's ancilla line, which is 0 whenever the adder
is clean.

### The reversible ALU (`rev_alu`)

A conventional ALU computes all results and selects one, which throws the
others away. This ALU puts its operations **in sequence**. Control lines
decide which stages act on the updated operand B. A stage that is not
selected passes B through. The first operand A is never changed.

1. controlled complement (SUB, NEG)
2. V-shaped adder, adding A (ADD, SUB) or 1 (NEG)
3. controlled complement (SUB)
4. controlled XOR with A (XOR)
5. controlled rotation by A[3:0] (RL, RR)

So SUB = ~(~B + A) and NEG = ~B + 1. With `inv = 1` the ALU performs the
inverse operation. The operation list is the one the instruction set above
needs.

### The V-shaped adder (`vshape_adder`)

A reversible adder cannot keep both the sum and the carry of each full
adder: that would need a copy of an input, which is garbage. Instead the
adder works in two ripples over the bits:

- **Forward ripple (MAJ cells):** the carries are computed. Each carry is
  left on the A line of the bit below it, and one ancilla line holds the
  carry into bit 0.
- **Top bit:** it gets its sum from two Feynman gates. The carry out is not
  needed for modular addition.
- **Backward ripple (UMA cells):** each carry is uncomputed, and the sum bit
  is left on the B line at the same time.

Afterwards the A lines and the ancilla hold exactly what they held before.
In the code the cascade is written gate by gate (Toffoli and Feynman gates
from `rev_pkg`) inside one `always_comb`. With `inv = 1` the same gates
run in the opposite order, each one undone, which subtracts. The logic depth
is about 2N cells.

## Ripple-block carry adder (`rbca_adder`)

The RBCA performs the same update as the V-shaped adder, with a shorter
critical path. The word is cut into N/BLK blocks:

1. All blocks at once: each block finds the carry it would produce by
   itself (generate) and whether it would pass an incoming carry straight
   through (propagate).
2. Carry correction: block carries ripple from block to block, one step per
   block. This is the only ripple across the whole word.
3. All blocks at once: each block adds with its corrected carry-in.

With BLK close to sqrt(N) both parts are about sqrt(N) long (N = 16,
BLK = 4 by default). `blk_carry` shows the corrected carry into every block.
`inv = 1` subtracts, using B - A = ~(~B + A). The module is written as
ordinary logic with this block structure. It is not a cascade of reversible
gates.

## Constant multiplier with remainder (`const_mult`)

A product A*M alone does not fix A and the multiplier together, so the
multiplier carries a remainder. Forward, (A, R) with 0 <= R < M maps to
P = A*M + R. Inverse, P maps to (P / M, P mod M). These two maps are a
bijection. M is 2^K + 1 (`PLUS = 1`) or 2^K - 1. The default M = 5 is
the factor needed by the lifting-scheme form of the H.264 integer
transform. The forward direction is one shift and one add or subtract. The inverse is a division by the
constant. `rem_ok` flags a remainder that is out of range.

## Gates and the gate-level example

- `cnot_gate #(NCTRL)`: inverts its target when all controls are 1. NCTRL =
  0, 1 and 2 give the NOT, Feynman and Toffoli gates. The top bit of
  `ctrl_in` is padding, so that NCTRL = 0 is legal.
- `fredkin_gate`: swaps its two data lines when the control is 1.
- `gate_example`: lines (A, B, C) -> (P, Q, R) through a Feynman gate
  (B controls C), a Toffoli gate (B and C control A), and a Fredkin gate
  (A swaps B and C). This gives P = A ^ (B & ~C), with Q and R equal to B and
  B ^ C, swapped when P = 1.

## How far this follows the published design

Taken from the design description:
- the block set of the processor: PC, BR, DIR, BR update, PC update,
  registers, ALU and memory;
- the rule that the PC is driven only by BR and DIR;
- the mnemonics ADD, NEG, XORI, SWBR and BRA, and paired branches;
- the sequential-stage principle of the ALU, built on the V-shaped adder;
- the two ripples of the V-shaped adder;
- the block and carry-correction organisation of the RBCA, with
  square-root block size;
- the (A*M + R) formulation of multiplication for M = 2^k +/- 1;
- the gate types and the three-gate example circuit.

Chosen here, and worth checking before reuse:
- the processor's word width, register count, memory size, encoding,
  single-cycle timing, load and observation ports;
- the instructions beyond the five named ones;
- the ALU operation list and stage order;
- the MAJ/UMA cells of the adder;
- the generate/propagate logic of the RBCA;
- the shift-and-divide form of the constant multiplier.

Of these, only the V-shaped adder and the gates are written as reversible gate
cascades. The rest is ordinary synchronous or combinational logic. Each step
of that logic is a bijection on the state, which the testbenches check, but a
reversible-gate netlist would have to be derived separately.

Not included:
- the lifting-scheme integer transforms (H.264 and the multiply-by-2
  family), because their factorisations are not available;
- the reversible BCD adders;
- the pass-transistor standard cells;
- the analog interface between reversible pass-transistor chips and static
  CMOS.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. The processor testbenches compare the
processor after every instruction with `tb/bob_ref_model.sv`, an independent
instruction-level model. Build and run one of them with Verilator:

    verilator --binary --timing --assert --timescale 1ns/1ps \
        --top-module tb_rev_systems_top -y rtl -y tb +libext+.sv -Irtl \
        rtl/bob_pkg.sv rtl/rev_pkg.sv tb/tb_rev_systems_top.sv -o sim
    ./obj_dir/sim

`tb_rev_systems_top` runs the whole design at its default sizes. A program
containing the branch-pair example, a subroutine call, conditional branches
and a memory exchange runs forwards to an RBRA, then backwards to its
start. The test checks that all state is restored, and that every
mechanism occurred: reversal, taken branches, SWBR, EXCH, the RBCA's block
carry ripple, multiplier round trips and Fredkin swaps. `tb_bob_cpu` also
runs 20 random straight-line programs forwards and back. The
`bob_memory` testbench uses a 256-word memory so that it can check every
word. The other testbenches test the default sizes. Some also test extra
instances: smaller ones for exhaustive checks, and a 64-bit RBCA with
blocks of 8.

To change sizes, use the module parameters: `AW` (processor memory),
`N`/`BLK` (RBCA), `N`/`K`/`PLUS` (multiplier), `N` (V-shaped adder). The
processor's 16-bit word and 16 registers are fixed in `bob_pkg`, because the
instruction encoding depends on them.
