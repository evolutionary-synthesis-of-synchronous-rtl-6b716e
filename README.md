# Synchronous state machines with evolvable control logic

A synchronous finite state machine is a bank of D flip-flops plus a block
of combinational control logic. That logic turns the primary inputs and the
current state into the primary outputs and the next state. Once the states
have codes, the cost of the machine (area and delay) is the cost of that
logic. The approach behind this design is to evolve the control logic rather
than derive it by hand with Karnaugh maps. A circuit is a *chromosome*: a
small matrix of two- and three-input gate cells, each gene naming a gate and
where its inputs come from. A genetic programming search then keeps circuits
that meet the truth table with few gate equivalents and a short critical path.

This RTL provides the hardware side of that idea:

* a **cell matrix** that runs any chromosome of this encoding, and a state
  machine (`evolvable_fsm`) whose control logic is that matrix, so loading a
  different chromosome gives a different machine;
* two **fixed machines** with hand-checked control logic:
  * the four-state teaching example (`table1_fsm`),
  * the eight-state `shiftreg` benchmark under its published state assignment
    (`shiftreg_fsm`);
* a top level (`evo_fsm_top`) that places the three machines side by side.

The genetic programming search itself (population, crossover, mutation,
fitness) is software and is not part of this RTL. The `lion9` and `train11`
benchmarks are not included either, because their transition tables are not
available here.

## The cell-matrix encoding

Signals are numbered. With the default 4-input matrix:

| numbers | signal |
|---|---|
| 0..3   | primary inputs of the matrix |
| 4..7   | their complements (free; no cell is spent on them) |
| 8..11  | outputs of the four cells of row 0 |
| 12..15 | outputs of row 1 |
| 16..19 | outputs of row 2 = the matrix outputs |

Each cell's gene (`evo_pkg::cell_gene_t`, 18 bits) holds a 3-bit gate code
and three 5-bit operand numbers. The cell's own output number is implied by
where the gene sits: gene `r*4 + c` is cell `c` of row `r`. Gate codes, with
the area (gate equivalents) and delay used to price a circuit:

| code | gate | operands used | gate equiv. | delay (ns) |
|---|---|---|---|---|
| 0 | NOT  | op0          | 1 | 0.0625 |
| 1 | AND  | op0, op1     | 2 | 0.209 |
| 2 | OR   | op0, op1     | 2 | 0.216 |
| 3 | XOR  | op0, op1     | 3 | 0.212 |
| 4 | NAND | op0, op1     | 1 | 0.13 |
| 5 | NOR  | op0, op1     | 1 | 0.156 |
| 6 | XNOR | op0, op1     | 3 | 0.211 |
| 7 | MUX  | D0=op0, D1=op1, select=op2 | 3 | 0.212 |

The costs are in `evo_pkg::GATE_EQUIV` and `GATE_DELAY`, with delays in units
of 0.1 ps. A cell may read any signal numbered below its own row: row 0 reads
only the inputs and their complements, and later rows read those plus every
earlier row. The matrix is therefore feed-forward by construction and three
gates deep. A gene that names a signal it may not read is not a legal
circuit of this encoding. Such an operand reads as 0 and `cfg_error` goes
high, so that a bad chromosome cannot form a loop.

`evo_pkg::CHROM_EXAMPLE` is a published example chromosome:
`AND(0,2) OR(4,3) XOR(1,6) MUX(5,7,7)`, then `NOR(10,9) AND(8,10) NAND(9,8) NAND(10,11)`,
then `MUX(13,14,11) XOR(11,12) MUX(15,14,15) AND(11,15)`.
`tb_cell_matrix` checks it against the same circuit written as equations.

The matrix is sized by parameters `N_IN`, `N_ROWS` and `N_CELLS`, which
default to 4, 3 and 4. The shared chromosome type `chrom_t` and `SIG_W = 5`
in `evo_pkg` are fixed to these defaults. A larger matrix needs those changed
as well.

## The evolvable state machine

`evolvable_fsm` wraps the matrix in the classic structure:

```
pi ──┐      ┌──────────────┐──► po  (Mealy, combinational)
     └─────►│ cell_matrix  │
 state ────►│  (chrom_q)   │──► next_state ──► state_reg (K D flip-flops) ──► state
            └──────────────┘
```

* Matrix inputs are `{state, pi}` and matrix outputs are `{next_state, po}`.
  With the defaults (1 input, 1 output, 3 state bits) that fills the
  4-input, 4-output matrix exactly. `N_PI + K` and `N_PO + K` must both
  equal 4; an elaboration-time assertion checks this.
* The chromosome sits in a 216-bit register. If `cfg_load` is high at a
  rising edge, that register takes `cfg_chrom` and the state register takes
  `RESET_STATE` instead of the next state. The new machine therefore starts
  from its initial state on the following cycle.
* The asynchronous active-low reset loads `INIT_CHROM` and `RESET_STATE`.

The default chromosome, `CHROM_SHIFTREG`, is one written for this design,
not an evolved one. Row 0 computes the four functions below, and rows 1 and
2 forward them with `AND(x,x)`. It makes the matrix behave exactly like
`shiftreg_fsm`, which the top-level test checks cycle by cycle.

## The fixed machines

**shiftreg** (`shiftreg_fsm`). Eight states, one input, one output. State
`st_k` goes to `st_(4·I + k/2)` and outputs bit 0 of `k`, so the output is the
input of three cycles earlier. Under the state assignment
`[4,0,3,7,5,1,2,6]` (st0 = 100, st1 = 000, …, bits `c2 c1 c0`) the logic is:

```
O  = c2 XNOR c1        n2 = NOT c0
n1 = c1 XOR c0         n0 = I XOR n1
```

That is 10 gate equivalents by the table above; the published evolved
circuit has 12. The XNOR on the output and the inverter driving a next-state
bit match the published evolved circuits. The shiftreg transition table
itself comes from the standard benchmark definition. The equations were
derived from that table and the assignment, not traced from a schematic.

**The four-state example** (`table1_fsm`). One input and a Mealy output. Its
table is:

| state | next (I=0 / I=1) | O (I=0 / I=1) |
|---|---|---|
| q0 | q0 / q0 | 0 / 0 |
| q1 | q2 / q2 | 0 / 1 |
| q2 | q0 / q0 | 1 / 0 |
| q3 | q2 / q2 | 1 / 1 |

The parameter `CODE` gives the state assignment. The default is
A1 = {00, 10, 01, 11}, the cheaper one; A0 = {00, 11, 01, 10} is the
alternative. The first written digit is bit 1. The logic decodes the state,
looks up the table and re-encodes, so any assignment gives identical
behaviour and synthesis finds the gates.

**Caveat:** in this table the next state does not depend on I. The published
schematics for this example, however, wire the input straight into one
flip-flop, so the I=1 next-state column may not be what was intended. As
tabulated, a machine reset into q0 stays there. `INIT_STATE` picks another
initial state so that every row can be exercised.

## Top level

`evo_fsm_top` has no parameters. It holds the example machine (A1), the
shiftreg machine and the evolvable machine. They share `clk` and `rst_n`;
each has its own ports (`t1_*`, `sr_*`, `ev_*`). Everything is positive-edge
clocked, and the outputs are combinational from the current state and inputs.

## Departures and choices made here

* Reset behaviour of every machine (asynchronous, active low, to the first
  listed state) is a choice of this design.
* The multiplexer's pin order (D0, D1, select) and the packing of a gene
  into 18 bits are choices of this design.
* Allowing later rows to read the primary inputs directly, and flagging
  illegal operands with `cfg_error`, are choices of this design.
* The evolvable machine's pin mapping, its one-cycle whole-chromosome load
  and the state restart on load are choices of this design.
* Not included:
  * `lion9` (9 states, 2 inputs) and `train11` (11 states, 2 inputs). Each
    needs 6 control-logic inputs and 5 outputs, more than the default matrix
    has, and their transition tables are not reproduced here.
  * The genetic programming engine itself.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. The shared reference models are in
`tb/tb_evo_model.sv`. One example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_evo_fsm_top \
    -y rtl -y tb +libext+.sv rtl/evo_pkg.sv tb/tb_evo_model.sv tb/tb_evo_fsm_top.sv
./obj_dir/Vtb_evo_fsm_top
```

| testbench | what it checks |
|---|---|
| `tb_logic_cell` | all 8 gates × 8 input patterns |
| `tb_cell_matrix` | example chromosome against hand-written equations; random legal and illegal chromosomes against an independent evaluator; the `cfg_error` flag |
| `tb_state_reg` | load latency and asynchronous reset |
| `tb_table1_fsm` | both assignments, from every initial state |
| `tb_shiftreg_fsm` | state codes; output equals the input three cycles earlier; all 8 states visited |
| `tb_evolvable_fsm` | default machine; the example chromosome; 20 random chromosomes; an illegal one; reload; reset |
| `tb_evo_fsm_top` | all three machines at default sizes; evolvable and fixed shiftreg in lockstep; reconfiguration and `cfg_error`, each counted |

To run another chromosome, build it with `evo_pkg::mk_gene(gate, op0, op1, op2)`
into a `chrom_t` (last gene first in a concatenation). Then pulse `cfg_load`
on `evolvable_fsm` or on the top's `ev_cfg_*` port.
