# Parallel pipelined SAT solver

This is synthesizable SystemVerilog for a hardware solver of Boolean
satisfiability (SAT) problems given in conjunctive normal form. It follows the
architecture published as *A Parallel Pipelined SAT Solver for FPGA's*.

A pipelined SAT solver keeps its clauses in a ring of small clause circuits.
The values of all variables stream round the ring again and again. Each
clause looks at the values that pass it and fills in the value that is forced
whenever only one of its literals is still open. This mapping is regular:
adding a clause means filling one more slot. But every pass costs as many
cycles as there are clauses. This design cuts the ring into several short
rings, called **pipes**. Each pipe holds its own copy of the variables and
its own share of the clauses. The pipes work in parallel. Their results are
then combined by a tree of **merge units**, and the combined values are sent
back to every pipe. A **control unit** runs the search (decide, propagate,
backtrack) in the same way for all pipes.

```
             +-------------------------------------------+
             |  control unit: decisions, backtracking,    |
             |  global set, level tags, statistics        |
             +-----+-------------------------^-----------+
      broadcast bus|  (load / merge / decide)| merged words
        +----------+----------+              |
        v          v          v        +-----+------+
   +--------+ +--------+ +--------+     | merge tree |  log2(P) levels of
   | pipe 0 | | pipe 1 | | pipe P-1|--->| OR units   |  registered OR units
   +--------+ +--------+ +--------+     +------------+
   each pipe = variable memory + ring of CLAUSES_PER_PIPE clause modules
```

## Variable values and merging

Each variable takes two bits (`sat_pkg::val_e`):

| code | meaning     |
|------|-------------|
| `00` | undecided   |
| `01` | 0           |
| `10` | 1           |
| `11` | conflicting |

With this code, combining what two pipes know about a variable is a bitwise
OR. An undecided value takes on the other pipe's value, and equal values stay
as they are. A 0 from one pipe and a 1 from the other become `11`, which is a
conflict. A merge unit (`merge_unit`) is therefore just `BUS_W` two-bit OR
gates.

Variables always move in **words** of `BUS_W` variables. A complete set of
`NUM_VARS` variables is `W = NUM_VARS / BUS_W` words.

## How a clause finds implications (`clause_module`)

This is the least obvious part of the design. A clause module is one pipeline
register stage. In each cycle it sees at most one word: a slice of the
variables, not all of them. A clause's literals may therefore be spread over
several words that reach it on different cycles. The module keeps two kinds
of memory:

* a *seen false* bit per literal;
* a *satisfied* bit for the whole clause.

Inside one **iteration** values only move from undecided to decided. An
iteration is the series of passes a pipe makes between two broadcasts from
the control unit. So a fact learned in one pass still holds in the next
pass. The memory is cleared only by the first word of an iteration's first
pass (the `first` bit of the word header).

While a word is in the stage:

* **Implication.** Say the clause is not satisfied, every other literal is
  known false, and this literal's variable is in the word and undecided. Then
  the module writes into the outgoing word the value that makes the literal
  true.
* **Conflict.** If every literal is known false, the module sets the word's
  `conflict` flag. The flag travels on to the variable memory.
* **Pending.** At the last word of a pass, the module checks whether the
  clause is unsatisfied with exactly one literal not known false. If so, that
  literal's variable went past before the others were known false, so the
  implication can only be made in the next pass. The module sets the
  `pending` flag, which asks for that next pass.

Clause modules further down a pipe see the words already changed by the ones
before them. Implications that follow the order of the clauses in the pipe
therefore chain within one pass. Implications that run against that order
take one more pass for each step. The number of passes needed depends on the
instance and on how the clauses are placed. It is the *iterations per
decision* factor of the solver's cost model.

Clauses are loaded into configuration registers: up to `MAX_LITS` literals,
each given as (used, negated, variable index). A slot with no literal in use
passes words through unchanged. Clauses can be added to free slots between
runs. A clause must not name the same variable twice.

## A pipe (`variable_memory`, `clause_chain`, `sat_pipe`)

`clause_chain` puts `CLAUSES_PER_PIPE` clause modules in series.
`variable_memory` closes the ring. It holds two register sets of `NUM_VARS`
two-bit values:

* the current set, which it streams into the chain one word per cycle;
* a second set, which receives the words coming back `CLAUSES_PER_PIPE`
  cycles later.

When the last word of a pass is back, the second set becomes the current
one. The pipe then decides what to do next:

* **conflict**: a returned word carried the conflict flag or a `11` value.
  The pipe raises `conflict_o` and stops.
* **another pass**: some word came back changed, or the pending flag was set.
* **done**: nothing changed. The pipe raises `done_o` and waits.

Passes start every `W + CLAUSES_PER_PIPE + 2` cycles. Passes are not
overlapped.

Between iterations the pipe obeys broadcasts from the control unit:

* `BUS_LOAD` overwrites a word;
* `BUS_MERGE` overwrites a word and raises `changed_o` if the word differs
  from the pipe's own;
* `BUS_DECIDE` sets one variable.

On `merge_start` the pipe streams its set into the merge tree, one word per
cycle. On `abort_iter` it stops at once and flushes its chain in the same
cycle.

## Merging (`merge_tree`)

The merge tree has `log2(NUM_PIPES)` levels of merge units, with a register
after each level. In every cycle it takes the word with the same index from
every pipe. The merged word leaves `log2(NUM_PIPES)` cycles later, so a whole
merge takes `log2(NUM_PIPES) + W` cycles. The tree uses `NUM_PIPES - 1` merge
units. `NUM_PIPES` must be a power of two.

## The search (`control_unit`)

The control unit keeps four things:

* the global variable set;
* the decision level at which each variable was assigned;
* a stack of decisions;
* whether each decision has already tried both values.

Its sequence is:

1. **Load.** Broadcast the global set, one word per cycle.
2. **Iterate.** Start all pipes. If any pipe reports a conflict, abort all
   pipes and backtrack. When every pipe is done, merge.
3. **Merge.** Each merged word is written into the global set. Variables that
   become decided are tagged with the current level. The word is broadcast to
   the pipes one cycle after it leaves the tree. Two cycles after the last
   word there are three outcomes:
   * a `11` value means backtrack;
   * a word that differed from some pipe's own means all pipes iterate again
     on the merged set (back to 2);
   * otherwise every pipe holds the same set with nothing left to imply.
4. **Decide.** Take the lowest-numbered undecided variable, open a new level,
   set the variable to 0 and broadcast the decision (back to 2). If no
   variable is undecided, the instance is **satisfiable** and the global set
   is a satisfying assignment.
5. **Backtrack.** Pop every level whose decision has already tried both
   values, one level per cycle. Flip the top decision to 1 and clear every
   variable tagged with that level or a deeper one. Then reload (back to 1).
   If nothing is left to pop, the instance is **unsatisfiable**.

One iteration and merge run at level 0 before the first decision. They
handle unit clauses, and a conflict there means unsatisfiable.

All pipes always share the same decisions. Every iteration ends at the same
unit-propagation fixed point whatever the split of clauses. So the
decisions, backtracks and final assignment do not depend on the number of
pipes or on the clause placement. The testbenches check this. The number of
pipes only changes the cost of each step.

## Cost per step

| step | cycles (approximately) |
|------|--------|
| pass in one pipe | `W + CLAUSES_PER_PIPE + 2` |
| merge and update of all pipes | `log2(NUM_PIPES) + W + 3` |
| reload after backtrack | `W + 1` |
| decision | 2 |

This matches the published cost model: unit propagation time
`t_p·(e/p + v/B) + m_p·(log p + v/B)`, where e is the number of clauses,
p the number of pipes, v the number of variables and B the bus width in
variables. The counters on the top measure the inputs of that model for a
run: `cnt_decisions`, `cnt_backtracks`, `cnt_merges`, `cnt_iterations`,
`cnt_passes` (passes of pipe 0) and `cnt_cycles`.

## Interface of `sat_solver_top`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `cfg_we`, `cfg_pipe`, `cfg_clause`, `cfg_lits` | in | write one clause (`lit_t [MAX_LITS]`) into slot `cfg_clause` of pipe `cfg_pipe` |
| `start` | in | one-cycle pulse: solve the loaded clauses |
| `busy_o`, `done_o`, `sat_o` | out | search running; finished; answer (held until the next `start`) |
| `assign_o` | out | global set, two bits per variable; complete when `sat_o` is set |
| `cnt_*` | out | statistics of the last run (see above) |

Load every slot of every pipe before the first run. Write unused slots with
all literals disabled. Spread the clauses over the pipes; the testbenches put
clause *i* into pipe *i* mod P, slot *i* div P.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_PIPES` | 8 | number of pipes, power of two |
| `CLAUSES_PER_PIPE` | 64 | clause slots per pipe (512 in all) |
| `NUM_VARS` | 128 | variables; must be a multiple of `BUS_W` |
| `BUS_W` | 8 | variables per word (bus width) |
| `MAX_LITS` | 6 | literals per clause |

The published evaluation uses 2 to 64 pipes. It gives no bus width, variable
count or clause count. The defaults above are chosen so that every benchmark
of that evaluation fits:

* par8-1-c: 64 variables, 254 clauses;
* hole6: 42 variables, 133 clauses of up to 6 literals;
* aim-50 instances: 50 variables, 80 or 100 clauses;
* aim-100-3_4: 100 variables, 340 clauses.

These benchmark sizes come from the standard DIMACS set, not from the
publication.

## Where this design makes its own choices

The published description fixes the structure and the algorithm:

* pipes made of a ring of clause modules and a variable memory;
* the two-bit code and OR merge;
* a tree of merge units;
* iterate until no implication is left, then merge;
* re-iterate if the merge changed something, backtrack on any conflict.

It does not give the insides of the blocks. These are this design's own
choices:

* **Clause storage.** Clause modules are loaded at run time through
  registers. The original describes them as circuits built for each instance
  by reconfiguration. A loaded register plays that role and allows one
  bitstream for all instances.
* **Clause internals.** The seen-false and satisfied memory and the pending
  flag are this design's own.
* **Control.** The original gives the state machine to the variable memories.
  Here each variable memory runs its own pass sequencing. The decisions and
  backtracking, which are the same for all pipes, sit in the control unit.
* **Search strategy.** The decision order is lowest-numbered undecided
  variable, value 0 first. Backtracking is chronological with per-variable
  level tags. There is no clause learning: the dynamic learning logic and
  host run-time assist of the original architecture are future work there
  and are not part of this RTL.
* **Host link.** The system bus to the host is reduced to the clause write
  port and `start`/`done_o`.
* **Merge unit count.** The original counts `p/2 - 1` merge units for the
  tree. A binary tree over p inputs needs `p - 1` two-input units, and that
  is what is built.
* **Merge timing.** The register after each tree level and the one-cycle
  forwarding of merged words onto the broadcast bus are this design's own.
* **Bus.** The bus widths, header fields and bus commands are this design's
  own.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_merge_unit` | all 16 value pairs and random words against the merge table |
| `tb_merge_tree` | 8-pipe merges against a per-variable reference; latency of exactly 3 cycles |
| `tb_clause_module` | random clauses and passes against a declarative statement of when to imply, flag a conflict or flag pending; one-cycle latency; flush |
| `tb_clause_chain` | a chain of implications resolved in one pass in clause order, one link per pass in reverse order; latency; conflict; flush |
| `tb_variable_memory` | with a modelled chain: pass count and period, merge stream, change detection, decisions, conflicts, abort |
| `tb_sat_pipe` | random instances: fixed point and conflict equal to unit propagation computed in the testbench |
| `tb_control_unit` | with modelled pipes: SAT/UNSAT against exhaustive search, valid assignments, abort and broadcast protocol |
| `tb_sat_solver_top` | 4-pipe and 1-pipe solvers on 25 small instances; answers match exhaustive search; identical decisions, backtracks and assignments; every mechanism seen (pipe conflict, merge conflict, merge-triggered re-iteration, repeated passes, pending flag, SAT, UNSAT) |
| `tb_sat_solver_full` | the default-size solver (no parameter overrides) on the pigeonhole instance hole5 (unsatisfiable) and a 100-variable, 340-clause random 3-SAT instance with a planted solution; decisions, backtracks and assignment must equal a software search with the same strategy |
| `tb_sat_solver_scaling` | the same instances on 1, 2, 4, 8, 16, 32 and 64 pipes sharing 128 clause slots (64 variables, 8 per word): identical answers, decisions, backtracks and assignments; prints cycles and speed-up over one pipe |

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sat_pkg.sv tb/tb_sat_pipe.sv --top-module tb_sat_pipe
./obj_dir/Vtb_sat_pipe
```

At the default size, building the full-size testbench takes a few minutes.
Simulation runs at a few thousand cycles per second.

## Scaling with the number of pipes

`tb_sat_solver_scaling` prints the cycle counts below. The speed-up is the
cycles of one pipe divided by the cycles of p pipes. The 128 clause slots are
shared among the pipes. The planted instances are random 3-SAT instances with
a hidden solution.

| instance | 2 | 4 | 8 | 16 | 32 | 64 |
|----------|---|---|---|----|----|----|
| hole4 (20 variables, 45 clauses, unsatisfiable) | 0.90 | 1.28 | 1.77 | 2.17 | 2.46 | 2.61 |
| planted, 50 variables, 80 clauses | 1.43 | 2.16 | 2.80 | 3.40 | 3.77 | 3.93 |
| planted, 50 variables, 100 clauses | 1.30 | 2.02 | 2.74 | 3.34 | 3.71 | 3.87 |

The speed-up tapers off as pipes are added. A pass gets shorter, but every
merge still costs `W` cycles plus the depth of the tree, and merges make up
more and more of the run. With two pipes, hole4 is slower than with one. The
published results show both effects. The numbers depend on the random
instances and on how the clauses are placed in the pipes.

## Limits

* Search effort grows exponentially on hard instances. Without learning and
  with a fixed decision order, hole6 needs 3245 decisions and about 2.56
  million cycles at the default size. Set `HOLE_PIGEONS = 7` in
  `tb_sat_solver_full` to run it; it passes, but simulation takes several
  minutes. The planted 100-variable instance takes about 20,600 cycles.
* The instances of the published evaluation are not bundled. The
  testbenches generate instances of the same families and sizes instead.
* The cycle counts are those of this RTL. They are not the published speed-up
  figures, which came from a cycle-counting software model.
