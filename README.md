# Self-repairing fault tolerant digital system

A small array of identical cells performs a set of ALU functions (add,
subtract, multiply, shift). Every result is checked as it is produced. A
wrong result is corrected on the spot; a cell that keeps producing wrong
results is switched off, and a neighbouring spare cell takes over its
function. Nothing has to be rerouted when this happens.

The idea comes from how cells in the body communicate through hormones. A
spare cell is an undifferentiated "stem" cell that sits next to several
working cells. When one of them dies, the spare copies that cell's genome
(the code for the function it performs) and becomes a copy of it. The
design has two layers:

* the **structural layer**: working cells, spare cells and the wires between
  them;
* the **gene control layer**: one *index changing unit* (ICU) per working
  cell, and one *differentiation unit* (DU) plus a few *index bits* per
  spare. This layer decides which spare replaces which cell.

Every cell also has its own **fault detection unit**. This unit tells a
transient fault (an upset that a reload cures) from a permanent one (a
broken cell).

All RTL is synthesizable SystemVerilog in `rtl/`. A self-checking
testbench for every module is in `tb/`.

## The cell array

```
 row 0:  W0  S0  W1  S1          W = working cell (slot k)
 row 1:  S2  W2  S3  W3          S = spare cell
 row 2:  W4  S4  W5  S5          edges wrap around (torus)
 row 3:  S6  W6  S7  W7
```

Cells form a checkerboard on a torus (`ROWS` x `COLS`, default 4 x 4).
Each working cell therefore has four spare neighbours: left, down, right
and top. Each spare has four working neighbours, so the spares are shared.
Working cell *k* is function **slot** *k*. Its genome is
`func_e'(k % 4)`: ADD, SUB, MUL and SHL, repeated. Working cells and spares
are both numbered in row-major order, each kind counted on its own.
`ROWS` and `COLS` must be even and at least 4. Otherwise two directions
would point at the same spare.

A spare never goes back to being free. A function can therefore be moved
at most four times, and fewer if a neighbour has already taken some of its
spares. With the default size there are 8 spares for 8 working cells.

## One cell: compute, check, correct

`working_cell` is used for the working cells, and inside every spare. A
cell holds:

* a genome register (`func_e`, 2 bits);
* `alu_core`, which performs the function named by the genome;
* `fault_detection_unit`, which contains:
  * `elementary_unit`, a gate-level rebuild of the same four operations:
    a ripple-carry adder, an AND-array multiplier and a mux-stage shifter.
    It runs under the **perfect genome** held by the ICU, not under the
    cell's own genome, which may be corrupted.
  * `comparator_unit1`, which raises a flag when the result differs from
    the reference.
  * `comparator_unit2`, which reports the syndrome, the lowest wrong bit
    (`err_loc`) and the number of wrong bits.

An operation issued in clock *t* appears at the cell's output in clock
*t+1*. Outputs `result`, `corrected` and `err_loc` are combinational on
the cell's registers. A flagged result is always replaced by the
reference, so the data leaving a cell is correct whether the fault is
transient or permanent. Classification works as follows:

| event (valid result)                   | state     | action                                  |
|----------------------------------------|-----------|-----------------------------------------|
| mismatch                               | OK        | correct, reload genome, go to RETRY     |
| match, not stale                       | RETRY     | back to OK (it was transient)           |
| mismatch, not stale                    | RETRY     | go to PERM: `fault` = 1, sticky         |
| mismatch or match, stale               | RETRY     | correct if needed, stay in RETRY        |

A result is **stale** if its operation was registered in the same clock as
the genome reload. Such a result was still computed with the old genome,
so it says nothing about whether the reload helped. With back-to-back
operations, a permanent defect is declared on the third wrong result. With
idle clocks between operations, it is declared on the second.

## Gene control layer

### Index bits (`sc_index_t`)

| bit   | meaning                                                           |
|-------|-------------------------------------------------------------------|
| state | 1 = spare is taken (and stays taken)                              |
| diff  | 1 = spare must still copy the genome of its working cell          |
| dir   | where the spare sits relative to the cell it serves: 00 left, 01 down, 10 right, 11 top |

### Index changing unit (one per working cell)

The ICU tracks which cell currently performs its function: the working
cell itself, or the spare given by (`on_spare`, `dir`). It watches that
cell's `fault` signal. On a fault it requests the first spare whose state
bit is 0, trying left, down, right and top in that order. This follows the
state-change table of the design:

| fault from        | spares already taken | spare chosen | dir |
|-------------------|----------------------|--------------|-----|
| W                 | none                 | left         | 00  |
| W or left spare   | left                 | down         | 01  |
| W, left or down   | left, down           | right        | 10  |
| W                 | left, down, right    | top          | 11  |

When the spare grants the request, the ICU switches at that clock edge and
isolates the working cell (`wc_en` = 0). If no spare is free, the ICU
raises `failed`. The OR of all `failed` signals is `system_failure`, and it
stops every slot (`slot_ready` = 0 everywhere).

### Collisions

Two working cells may want the same free spare in the same clock, for
example after one has used up its other spares. The spare grants exactly
one request: the one with the lowest direction code. The other ICU sees
the state bit set one clock later and moves on to its next spare, or
fails. Repairs of different working cells otherwise run fully in parallel.

### Differentiation unit (one per spare)

A grant sets the spare's index bits to state = 1, diff = 1 and dir = the
requester's direction. The DU then:

1. loads the perfect genome of working cell `dir` into the spare;
2. reads it back and compares it with the perfect genome;
3. clears `diff` if they match, and otherwise loads again.

The spare is `ready` three clock edges after the grant. From then on its
multiplexers take operands from working cell `dir`.

### Why nothing is rerouted

The operands of slot *k* go to all five candidate cells: the working cell
and its four spares. Only the cell that the ICU selects receives
`valid`. The slot's result port takes whichever candidate returned a valid
result, and a spare counts only if its `dir` points back at *k*. A repair
changes one ICU register and one set of index bits. No routing table is
involved, and results of operations already in flight during a repair are
not lost.

## Top-level interface (`ftds_top`)

Parameters: `ROWS` = 4, `COLS` = 4, `W` = 8. There are
NWC = NSC = ROWS*COLS/2 cells of each kind.

| port                                   | dir | per      | meaning                                         |
|----------------------------------------|-----|----------|-------------------------------------------------|
| `slot_a`, `slot_b` [W]                 | in  | slot     | operands                                        |
| `slot_valid`                           | in  | slot     | issue; taken only while `slot_ready`            |
| `slot_ready`                           | out | slot     | slot can take an operation this clock           |
| `slot_result` [2W], `slot_result_valid`| out | slot     | result, one clock after issue                   |
| `slot_corrected`, `slot_err_loc`       | out | slot     | result was replaced by the reference; wrong bit |
| `wc_fi_genome`, `sc_fi_genome` [2]     | in  | cell     | XOR mask into the genome in this clock (transient) |
| `wc_fi_stuck`, `sc_fi_stuck` [2W]      | in  | cell     | XOR mask on the datapath result while held (permanent) |
| `wc_fault`, `sc_fault`                 | out | cell     | permanent fault detected                        |
| `slot_on_spare`, `slot_dir`, `slot_failed` | out | slot | repair status                                   |
| `sc_idx`                               | out | spare    | index bits                                      |
| `system_failure`                       | out | -        | a function has no spare left; everything halts  |

Results are 2W bits wide:
* ADD: zero-extended sum.
* SUB: two's-complement difference over 2W bits.
* MUL: full unsigned product.
* SHL: `a << b[log2(W)-1:0]`.

Reset is synchronous and active low (`rst_n`). It restores every genome
and frees every spare.

The fault-injection ports are there to exercise and evaluate the repair
mechanism. Tie them to zero in a real use.

## What is the design's, and what was chosen here

The design itself provides:
* the two layers;
* four spares per working cell, shared between neighbours;
* the three kinds of index bits, and the left-down-right-top order of the
  state-change table;
* ICU isolation of the working cell, and system failure when no spare is
  left;
* DU differentiation, with the DU clearing the bit when it is done;
* a fault detection unit made of an elementary unit and two comparators,
  with correction, genome replacement, and a permanent fault when the
  error returns;
* the ALU application with addition, subtraction, multiplication and
  shifting.

Choices made here, where the design is silent:
* The checkerboard-on-a-torus layout and the 4 x 4 default. The design says
  only that each working cell has four spare neighbours and each spare
  four working neighbours.
* 8-bit operands with 2W-bit results, and the 2-bit genome coding. The
  genome carries the function only; the connection is given by the
  spare's direction bits.
* The left spare's direction code 00, which the table leaves blank.
* Direction bits give the spare's position relative to its working cell,
  as in the table (right spare = 10). One sentence of the design's
  description reads "10" as the working cell being on the right. The
  table was followed.
* The stale rule and the one-retry rule for transient versus permanent
  faults.
* The lowest-direction-first grant that prevents collisions.
* The DU's read-back check.
* The perfect genome as a constant in each ICU.
* The elementary unit as a structurally different rebuild of the
  datapath. This makes the fault detection unit a form of duplicate
  computation with a diverse reference.
* Fault-injection ports.

Not modelled: the FPGA platform, memory or area figures, and the
endocrine signalling itself beyond the tag-free result pickup described
above.

## Verification

Each module has a testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench                   | what it checks                                                   |
|-----------------------------|------------------------------------------------------------------|
| `tb_alu_core`               | all functions on corner and random operands, against integer math |
| `tb_elementary_unit`        | all functions on every 8-bit operand pair (262,144 cases)        |
| `tb_comparator_unit1/2`     | flag, syndrome, location and count on single, double and random errors |
| `tb_fault_detection_unit`   | transient, stale retry, permanent, stickiness, reset             |
| `tb_working_cell`           | one-clock latency, genome upset corrected and reloaded, isolation, genome load, stuck defect raises `fault` |
| `tb_differentiation_unit`   | every direction, timing, reload after a lost write               |
| `tb_spare_cell`             | grant and index bits per side, ready three clocks after grant, only the served side executes, collision, spare fault |
| `tb_index_changing_unit`    | the rows of the state-change table, lost collision, failure, halt |
| `tb_ftds_top`               | default size, end to end (below)                                  |
| `tb_ftds_random_faults`     | six random fault campaigns at default size, each until system failure: every result correct, no spare shared, index bits consistent, halt after failure |

`tb_ftds_top` runs the full default configuration. It keeps random traffic
on all eight slots and checks every result. Its fault sequence is:

1. a genome upset, which must be corrected and cured without a fault;
2. two permanent faults in the same clock, repaired in parallel;
3. a fault in a spare that is already serving;
4. three successive repairs of one slot;
5. a final collision, in which two slots want the same last spare. The
   winner is repaired, the loser fails, and the whole system halts.

The testbench works out every expected spare from its own map of the torus
and its own record of which spares are taken. It counts each mechanism, and
a mechanism that never occurs is a failure.

To simulate with Verilator, for example the top-level test:

```
verilator --binary --timing --assert --top-module tb_ftds_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/ftds_pkg.sv tb/tb_ftds_top.sv
./obj_dir/Vtb_ftds_top
```

For other tests, replace `tb_ftds_top` with the testbench's name. The package
must be read first.

## Changing it

* **Array size:** set `ROWS` and `COLS` (even, at least 4). The neighbour
  functions `spare_of` and `owner_of` in `ftds_top` compute the wiring.
* **Width:** set `W`. The elementary unit and the comparators scale with it.
* **Function set:** extend `func_e` in `ftds_pkg`, then `alu_core` and
  `elementary_unit`. Keep the two implementations structurally different.
* **Function per slot:** the `GEN` localparam in `ftds_top`.
* **Retry policy:** the state machine in `fault_detection_unit`.
