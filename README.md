# Survival array: a reconfigurable cell array that repairs itself while it runs

Most fault-tolerant reconfigurable arrays find faults in a separate test mode
and repair them through a central controller. Normal work stops while they do.
This design has neither. Every working cell checks each of its own results
against a stored table of correct answers, in the same cycle it computes them.
It reports the outcome to its four neighbours as 2-bit *survival codes*. A
spare cell next to a cell that reports a fault copies that cell's
configuration and takes over its work. A routing cell then sends the spare's
result to where the faulty cell's result used to go. Only neighbours take part
in a repair. Nothing is centralised, and the rest of the array keeps computing.

The idea comes from Embryonics, where arrays are modelled on how cells in a
living body are replaced. There, a single fault discards a whole row of cells.
Here each working cell has spares on two of its sides, so one fault uses up
exactly one spare.

## The grid

Cells sit on a `COLS x ROWS` grid (6 x 6 by default) in a fixed checkerboard.
The grid uses 0-based column `i` and row `j`, with row 0 at the bottom:

| place                | cell                    |
|----------------------|-------------------------|
| `i` even, `j` even   | SC, spare cell          |
| `i` odd, `j` odd     | RC, routing cell        |
| otherwise            | FC, functional (working) cell |

Row 5 of the default 6 x 6 array is at the top:

```
row 5:  FC RC FC RC FC RC
row 4:  SC FC SC FC SC FC
row 3:  FC RC FC RC FC RC
row 2:  SC FC SC FC SC FC
row 1:  FC RC FC RC FC RC
row 0:  SC FC SC FC SC FC
```

Every FC has two SCs and two RCs as its orthogonal neighbours:

- An FC in an even column has its SCs to the north and south, and its RCs to
  the east and west.
- An FC in an odd column has its SCs to the east and west, and its RCs to the
  north and south.
- Every SC and every RC has four FCs around it.
- Each RC also touches four SCs on its diagonals. Those are exactly the spares
  that can replace its four FCs.

Per two FCs there is one SC and one RC. `COLS` and `ROWS` must be even.

## A cell: FC and SC are the same hardware (`basic_cell`)

FCs and SCs are built from the same hardware. Which role a cell has depends
only on its genes. Each cell contains four parts:

- **`gene_memory`** holds 16 one-bit flags, R0000 to R1111:

  | bits    | meaning |
  |---------|---------|
  | [3:0]   | good results: the correct output for inputs 00, 01, 10, 11 |
  | [13:4]  | function flags, one-hot (see below) |
  | [14]    | life: 0 means the cell must not be used |
  | [15]    | role: 1 = working cell, 0 = spare |

- **`function_module`** computes a 1-bit result from the 2-bit input. The ten
  function flags, from bit 4 upward, select AND, OR, NAND, NOR, XOR, XNOR, ADD,
  SUB, INV or BUF:
  - ADD gives the carry of `in[1] + in[0]`.
  - SUB gives the borrow of `in[1] - in[0]`.
  - INV and BUF act on `in[0]` only.
  - If several flags are set, the lowest one wins. If none is set, the output
    is 0.
- **`scm`**, the self-checking module, checks every result:
  1. The input selects one of the four good-result flags through a 4:1
     multiplexer.
  2. An XNOR compares that flag with the function output.
  3. An encoder turns the comparison into four 2-bit codes, one per direction.
- **`srm`**, the self-repairing module, acts only in a spare (see below).

## Survival codes

A healthy cell sends these codes, as an 8-bit word in N, S, E, W order:

| direction | code |
|-----------|------|
| north     | 11   |
| south     | 00   |
| east      | 10   |
| west      | 01   |

A neighbour receives each code on its opposite side. A cell surrounded by
healthy cells therefore sees the fixed chain `00110110` on its N, S, E, W
inputs. One 8-bit compare checks all four neighbours at once.

A cell whose result is wrong, or whose life flag is 0, sends the complement of
each code. Every neighbour then sees a mismatch, whichever side it is on.

The check is on line. A fault shows up on the first result it corrupts. A
fault that corrupts no result for the inputs actually applied stays unseen.
That is inherent to the scheme.

## The repair protocol (`srm`)

This is the part that needs the most care. Each FC has two spares. Exactly one
of them must take over a failed FC, without any central arbiter.

**Who has priority.**
- For an FC with spares to its north and south, the **north** spare has
  priority.
- For an FC with spares to its east and west, the **east** spare has priority.

Seen from a spare, this gives:

- **Primary** sides: its south and west neighbours. For these FCs it is the
  prior spare, and it repairs them on its own authority.
- **Secondary** sides: its north and east neighbours. It repairs these only if
  the spare on the far side of that FC has not claimed it.

**How a spare tells the other spare.** Each spare exports:

- `primary_claim`, combinational: the south or west FC it is about to take.
- `taken`, registered and kept afterwards: the side of the FC it replaced.

The top level wires these to the secondary spare of the same FC:
- the spare two places south reads the north spare's claim;
- the spare two places west reads the east spare's claim.

Primary claims depend only on the spare's own inputs. So the two spares of one
FC settle who repairs in the same cycle, and there is no combinational loop.

When several neighbours of one spare fail at once, it picks the first in the
order S, W, N, E. A secondary side is skipped while its peer claims it.

**Copying the genes.** The downloading controller steps through three states:

1. **IDLE.** In any cycle where the spare is alive, passes its own check and
   `repair_en` is 1, a choice moves it to COPY and records the side.
2. **COPY.** The chosen neighbour's 16-bit gene word is written into the
   spare's gene memory. The copy gets life = 1 and role = working cell.
3. **ACTIVE.** Because its role is now "working", the spare ignores further
   survival codes. It now computes on the replaced FC's input, taken from that
   neighbour's input wire. It stays ACTIVE until reset.

**Timing.**
- The fault appears in the codes in the same cycle as the wrong result.
- On the next clock edge the spare has taken the FC.
- On the edge after that, the genes have been copied and the routing cell has
  switched.
- From then on the FC's place delivers correct results again: two clock edges
  from fault to repair.

**What counts as an available spare.** The life flag is 1, the role is spare,
and the spare's own self-check passes. A dead or faulty spare therefore never
claims anything, and the other spare of the FC steps in.

## Routing cells (`routing_cell`)

An RC has no function module. Its memory has 8 flags, half of a cell's 16.
These hold a 2-bit route for each of its four FC sides:

| route | meaning |
|-------|---------|
| 00    | direct: the FC drives the side |
| 01    | first candidate spare |
| 10    | second candidate spare |
| 11    | off: the side drives 0 |

The RC compares its four FCs' codes against `00110110`. Take a side whose FC
reports a fault and is still routed directly. If one of the two diagonal spares
that can replace that FC reports `taken` toward it, the RC switches the side to
that spare on the next edge. The route then stays.

`unrepaired` marks a faulty side that no spare has taken. The array ORs these
into `sys_fault`. That flag marks the case the array cannot handle itself, and
which has to be handled at system level.

## Top level (`survival_array`)

| port | direction | meaning |
|------|-----------|---------|
| `clk`, `rst_n` | in | clock and asynchronous active-low reset. Reset clears all genes, so every cell is dead until downloaded. |
| `repair_en` | in | hold at 0 while downloading, 1 in operation |
| `cfg_we`, `cfg_col`, `cfg_row`, `cfg_data[15:0]` | in | download of one cell per cycle. RCs take the low 8 bits. |
| `slot_in[ROWS][COLS][1:0]` | in | 2-bit input of each FC place |
| `slot_out[ROWS][COLS]` | out | result of each FC place. It is read through the FC's east RC (even columns) or north RC (odd columns), so it follows repairs. |
| `fault_inj[ROWS][COLS]` | in | inverts a cell's function output. It models a defect in tests; tie it to 0 otherwise. |
| `cell_ok`, `nbr_alarm`, `sc_taken`, `rc_route` | out | status per place: self-check result, "a neighbour is faulty", which FC each spare replaced, and each RC's routes |
| `sys_fault` | out | some FC is faulty and unrepaired |

`slot_in` and `slot_out` are only meaningful at FC places.

**Typical use:**
1. Reset.
2. With `repair_en = 0`, download each FC with life = 1, role = 1, one
   function flag and that function's truth table as good results
   (`{2'b11, flags, truth_table}`).
3. Download each SC as `16'h4000` (alive spare, no function) and each RC as 0.
4. Set `repair_en = 1`.

## How far to trust it, and where it is this design's own

The following come straight from the architecture and are implemented as
described:
- the checkerboard of FC, SC and RC;
- that FC and SC are identical;
- the 16-flag gene layout;
- the 4:1 mux, XNOR comparator and four-direction encoder of the check;
- the healthy codes and the `00110110` chain;
- the 8-bit parallel compare, analyzer and gene-copying controller of the
  repair;
- north-over-south priority;
- the half-size RC memory.

The following are choices of this design, made where the architecture leaves
the matter open:
- **Faulty-cell codes.** A faulty cell sends the complement of each healthy
  code. The architecture only says a faulty cell cannot produce all the right
  codes.
- **East-over-west priority** and the S, W, N, E order within one spare. With
  these, two faults in FCs (2,1) and (3,2) are repaired by spares (2,2) and
  (4,2). That is the expected outcome of the architecture's own example, which
  counts from 1.
- **The claim and taken handshake** between spares, and the IDLE, COPY, ACTIVE
  controller with its two-cycle repair. No clocking or latency is specified.
- **The meaning of the RC's 8 flags** and the candidate order. Also: the RC
  observes repairs rather than directing them.
- **The role flag encoding** (1 = working), and the extra members of the
  function set: XOR, XNOR, BUF, ADD as carry and SUB as borrow.
- **The download port** and `repair_en`, the reset behaviour, and `fault_inj`.
- **No application wiring between FCs.** Each FC place's input and output is a
  top-level port. The architecture mentions FC-to-FC connections stored in the
  genes but gives no format for them.

Not built:
- Current sensors for checking memory cells. These are analog.
- The host that downloads the genes.
- Whatever the system does when `sys_fault` rises.
- Faults in the interconnect between cells. These are outside the scheme.
- Faults in spare cells are caught only by the spare's own self-check, before
  it is used.
- A repaired spare is never released.

Hardware cost. The 2:1:1 ratio of FC to SC to RC means half of all cells do
the work. After synthesis a cell is about 88 word-level cells plus 20
flip-flops, and an RC about 75 plus 8. That puts the useful fraction of the
array at roughly 53%. Reasoning from an RC at half the size of a cell would
suggest about 57%.

## Files

Source files, bottom-up:
- `rtl/survival_pkg.sv`: directions, code constants, gene bit positions,
  route encoding
- `rtl/gene_memory.sv`, `rtl/function_module.sv`, `rtl/scm.sv`, `rtl/srm.sv`
- `rtl/basic_cell.sv`, `rtl/routing_cell.sv`
- `rtl/survival_array.sv`: the top level

Each module has a self-checking testbench `tb/tb_<module>.sv`. Two test the
whole array:
- `tb/tb_survival_array.sv` runs the default 6 x 6 array through these cases:
  - a fault-free run;
  - north priority;
  - a double fault in one cycle;
  - a dead prior spare, and a faulty prior spare;
  - east priority;
  - an FC on the east edge;
  - a sequence that uses up all spares.

  It checks every result every cycle, checks the two-edge repair time, and
  counts each mechanism.
- `tb/tb_survival_array_10x10.sv` runs a 10 x 10 array. That is the size that
  goes with a cell fault probability of about 0.01. It injects random faults
  one after another until one cannot be repaired, and predicts the spare for
  each fault from the geometry alone. Over 40 runs the array absorbs about 10
  faults on average before the first unrepairable one.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops on a
watchdog if it hangs.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/survival_pkg.sv \
    tb/tb_survival_array.sv --top-module tb_survival_array -Mdir obj
./obj/Vtb_survival_array
```

Swap in any other testbench name to run it. To lint a module, use
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/survival_pkg.sv rtl/<module>.sv`.
To change the array size, set `COLS` and `ROWS` (even numbers) on
`survival_array`.
