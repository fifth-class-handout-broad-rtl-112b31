# GasP broad branch and broad merge: a token-flow model in SystemVerilog

GasP is a family of self-timed pipeline circuits. Each module owns a *fire*
pulse and talks to its neighbours only through *state wires*. A state wire is
HI when the link between two modules holds a data element (FULL), and LO when
it holds a bubble (EMPTY). A linear GasP module fires when its predecessor
wire is FULL and its successor wire is EMPTY. Its fire pulse then does three
things:

- it copies the data;
- it drains the predecessor wire, driving it LO;
- it fills the successor wire, driving it HI.

This design adds two modules that fork and join a GasP pipeline:

- **Broad branch** (`gasp_bdbr`): one predecessor and two successors. It fires
  when the predecessor is FULL and *both* successors are EMPTY. It then fills
  both successors, so each branch gets a copy of every element (broadcast).
- **Broad merge** (`gasp_bdmr`): two predecessors and one successor. It fires
  when *both* predecessors are FULL and the successor is EMPTY. It then drains
  both predecessors and passes on the combined data, for example the two
  operands of an addition.

These modules are used to build FIFOs that split into two parallel branches
and join again. The question studied is what happens to latency and
throughput when the two branches have different lengths. The RTL reproduces
the answer exactly at the level of gate delays.

## Time model: one cycle per gate delay

The real circuit is asynchronous. Here it is written as synthesizable
synchronous RTL in which **one clock cycle stands for one gate delay** and a
fire pulse is a one-cycle high. Two numbers describe a GasP stage:

| quantity | gate delays | meaning |
|---|---|---|
| forward latency `FWD_GD` | 6 | fire of a module to the earliest fire of its successor |
| reverse latency `REV_GD` | 4 | fire of a module to the earliest fire of its predecessor |

A module can therefore fire at most once every 6 + 4 = 10 gate delays.

Both delays are lumped into the state wire block, `gasp_state_wire`. A fill
at cycle *t* shows as `full_seen` (the successor's view) from cycle *t*+6. A
drain at cycle *t* shows as `empty_seen` (the predecessor's view) from cycle
*t*+4. The module that changed the wire stops seeing the old state in the
very next cycle. In the circuit, the module's own driver holds the wire, and
this ends its fire pulse.

With this arrangement the modules themselves are pure firing logic plus a data
register:

- `fire` is a combinational AND of the registered views.
- `data` is loaded on `fire`.

The model fires each module at the earliest cycle its conditions allow. It is
therefore an exact as-soon-as-possible simulation of the pipeline as a
timed marked graph. Each state wire is a pair of arcs: forward with delay 6,
backward with delay 4. The token sits on the forward arc when the wire is
FULL and on the backward arc when it is EMPTY.

What the model leaves out is below the gate-delay level:

- transistor sizes (size-10 drivers, a size-40 AND column);
- the width of the fire pulse;
- the race between the drivers, where whichever fill or drain finishes first
  ends the pulse;
- different drain times for differently loaded wires.

To study a stage with other delays, change `FWD_GD`/`REV_GD` in `gasp_pkg`
or per `gasp_state_wire` instance. Both must be at least 2.

## Why unequal branches lose throughput

Take a branch/merge FIFO whose short branch has *s* linear modules and whose
long branch has *l*. Consider the loop that runs from the broad branch
forward along the long branch to the merge, then backward along the short
branch to the broad branch:

- it has *l*+1 forward arcs of 6 gate delays and *s*+1 backward arcs of 4;
- all wires start EMPTY, so the loop holds exactly *s*+1 tokens, namely the
  bubbles of the short branch;
- the token count on a loop never changes.

The steady-state period is therefore

    period = max( 6 + 4 ,  ((l+1)*6 + (s+1)*4) / (s+1) )  gate delays

Seen from the modules, the sequence runs like this:

1. The merge waits for the element still travelling down the long branch. Its
   lower input is late.
2. Meanwhile the short branch fills up.
3. The broad branch then waits for the short branch to become EMPTY again.
   Its upper successor input is late, because that news travels back only at
   the reverse latency.

The `late_a`/`late_b` outputs of both modules show which input is holding
them back.

Downstream of the merge, the elements come out in **bursts** of *s*+1 at the
full rate of one per 10 gate delays. Each burst ends with one longer gap.

| FIFO | branches *s*/*l* | modules | first element | period (gate delays) | pulse pattern after the merge |
|---|---|---|---|---|---|
| top | 2 / 2 | 10 | 30 from the linear module before the branch to the one after the merge (5 stages × 6) | 10 | even, 10 apart; on average 3 elements in that stretch |
| middle | 2 / 3 | 11 | | 36/3 = 12 | 10, 10, 16 repeating |
| bottom | 3 / 6 | 15 | 42 from broad branch to broad merge over the long branch (7 × 6) | 58/4 = 14.5 | 10, 10, 10, 28 repeating |

In the bottom FIFO the merge fires for the second time 58 gate delays after
the first pulse of the linear module in front of the branch. That module
refires after one full cycle of 10 gate delays. The element then needs 6 gate
delays to the branch and 42 along the long branch.

Every entry in this table, and the 58 above, is checked cycle by cycle by
`tb_gasp_bdbrmr`.

## Blocks

| file | block | what it is |
|---|---|---|
| `rtl/gasp_pkg.sv` | package | `FWD_GD` = 6, `REV_GD` = 4, `DATA_W` = 8 |
| `rtl/gasp_state_wire.sv` | state wire | FULL/EMPTY flag with the forward and reverse delays; asserts fill only when EMPTY, drain only when FULL |
| `rtl/gasp_linear.sv` | linear GasP module | `fire = pred_full & succ_empty`, data latch |
| `rtl/gasp_bdbr.sv` | broad branch | NOR of the two successor FULL levels, then AND with the predecessor: the three-input AND in two stages, with the two successors on the symmetric inputs; one data latch read by both successors |
| `rtl/gasp_bdmr.sv` | broad merge | symmetric NAND of the two predecessors, then AND with the successor; latches `{A, B}` |
| `rtl/gasp_source.sv` | source | fires whenever its successor is EMPTY; data 0, 1, 2, ... |
| `rtl/gasp_sink.sv` | sink | fires whenever its predecessor is FULL; keeps the last element and a count |
| `rtl/gasp_branch_chain.sv` | helper | *N* linear modules and *N*+1 state wires forming one parallel branch |
| `rtl/gasp_brmr_fifo.sv` | branch/merge FIFO | source → linear → broad branch ⇒ upper (`N_UP`) and lower (`N_LO`) branches ⇒ broad merge → linear → sink |
| `rtl/gasp_bdbrmr.sv` | top | the three FIFOs (2/2, 2/3, 3/6) side by side |

### Port conventions

Each GasP module has the following connections:

- a `*_full` input from each predecessor wire, plus that predecessor's data;
- a `*_empty` input from each successor wire;
- a `fire` output, which goes to the `drain` input of every predecessor wire
  and the `fill` input of every successor wire;
- a `data` output, valid from the cycle after `fire` and held until the next
  one.

The data bundled with a wire is the `data` register of the module that fills
it. A module cannot fire again until its successor has copied that data.

The upper branch connects to successor A of the broad branch and predecessor
A of the broad merge. The lower branch connects to B. After the merge the
data is twice as wide. A FIFO's sink therefore receives `{k, k}` as its
*k*-th element: the upper and lower copies of element *k*.

`gasp_brmr_fifo.fire` numbers the modules from the source:

| index | module |
|---|---|
| 0 | source |
| 1 | linear |
| 2 | broad branch |
| 3 .. 2+`N_UP` | upper branch |
| next `N_LO` | lower branch |
| next | broad merge |
| next | linear (the throughput probe) |
| last | sink |

Bit *i* of `top_fire` is module *i*+1 of the top FIFO. The middle FIFO's
probe is `mid_fire[9]` and the bottom FIFO's is `bot_fire[13]`.

`*_late` is `{branch late A, branch late B, merge late A, merge late B}`.

Reset is asynchronous and active low. It empties every state wire, with the
EMPTY state already visible to both sides, and clears every data latch.

## Choices made by this design

These points are not fixed by the circuit description and were chosen here:

- **Clocked model.** The clocked, one-cycle-per-gate-delay model, with both
  latencies lumped into the state wire (see above).
- **Data width.** 8 bits from the source, 16 after the merge.
- **Merge data.** The broad merge concatenates its inputs. Combining them in
  a binary operator would be the other use of a broad merge. The merge always
  takes both elements.
- **Source and sink.** They are GasP modules with their missing condition
  tied true. The source's counting data and the sink's element counter are
  added for checking.
- **Observation outputs.** The `late_a`/`late_b` outputs are added for
  observation. They do not affect firing.
- **Start state.** All wires start EMPTY.
- **Alternatives not built.** A broad branch that uses a single three-input
  NOR, and stronger variants of the broad merge, are not built. They have the
  same logic function and differ only in gate delays that this model does not
  resolve.

## Simulating

Each module has a self-checking testbench in `tb/`. Each testbench ends by
printing `TB_RESULT checks=N failures=M`. For example, to run the end-to-end
test at the default sizes:

    verilator --binary --timing --assert -Irtl -Itb rtl/gasp_pkg.sv \
        tb/tb_gasp_bdbrmr.sv --top-module tb_gasp_bdbrmr -Mdir obj -o sim
    obj/sim

Replace the testbench and top-module names to run another test:

| testbench | what it checks |
|---|---|
| `tb_gasp_state_wire` | the exact 6/4-cycle visibility of fills and drains, including a wire that starts FULL |
| `tb_gasp_linear` | firing rule and data copy, under random stimulus against a reference model |
| `tb_gasp_bdmr` | firing rule, data copy and `late_*` outputs, under random stimulus against a reference model |
| `tb_gasp_bdbr` | firing rule, data copy and `late_*` outputs, under random stimulus against a reference model |
| `tb_gasp_source` | firing rule and the counting data |
| `tb_gasp_sink` | firing rule, data copy and element count |
| `tb_gasp_brmr_fifo` | a balanced 2/2 FIFO and an unbalanced 1/4 FIFO: first-element latency, period (10 and 19) and data order |
| `tb_gasp_bdbrmr` | the three FIFOs of the table above: latencies, average periods, burst patterns, occupancy and data order; it also counts that branch fires, merge fires, merge waits and branch waits all occur |

Every testbench finishes in well under a second.

`gasp_brmr_fifo` takes any branch lengths of 1 or more through `N_UP` and
`N_LO`. The formula above predicts its period.
