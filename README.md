# On-chip control flow checking of HLS accelerators with Efficient Path Profiling

An accelerator produced by high-level synthesis (HLS) is a set of finite
state machines (FSMs), one per function, each driving a datapath. Its control
flow at run time is the sequence of states each FSM visits. This design
checks that control flow on chip, while the accelerator runs, against a golden
reference obtained by running the C source in software on the same input.

Storing the golden reference as a list of states costs a lot of memory.
Instead, the reference is encoded with Ball-Larus Efficient Path Profiling
(EPP):

- Each acyclic path through the function's control flow graph gets an integer
  identifier.
- That identifier is the sum of per-edge increments along the path.
- An HLS tool maps each basic block onto a consecutive run of FSM states, so the
  FSM has the same branch structure as the control flow graph.
- The same increments therefore number the FSM's paths. Edges inside a basic
  block carry increment 0.

A whole loop iteration then becomes one small number. A run of identical
iterations becomes one trace word with a repeat count ("EOPT" compression).

A checker sits next to each FSM. It sees only the FSM's state register and adds
up the edge increments as the FSM moves. Whenever a path closes, it compares
the sum with the next word of its trace memory. On the first difference it
raises a fault bit. It also reports its scope identifier and the trace offset
of the mismatch, which a host-side debugger can map back to the source. The
FSM itself is never modified.

The RTL contains a generic checker (`epp_checker`) and a complete example
system (`epp_debug_top`): a small C function with a branch, a call and a loop,
its callee, and one checker per FSM.

## The running example

```
BB1  cond = a > 0; if (in1)
BB2    target = a;
     else
BB3    target = init();
BB4  while (target != current && iter < 10) {
BB5    iter++; if (current < target)
BB6      current = pow(current, 2);
     else
BB7      current *= coeff;
BB8    temp[iter] = current; }
BB9  return current;
```

`example_accel` implements this as an FSM plus datapath. The state encoding is
binary, numbered depth first.

| state | basic block | notes |
|---|---|---|
| S_ENTRY (0) | entry | idle; waits for `start` and latches the inputs |
| S_1 (1) | BB1 | branch on `in1` |
| S_2 (2) | BB2 | `target = a` |
| S_3 (3), S_3W (4) | BB3 | S_3 calls `init()` (a call state); S_3W waits for the callee |
| S_4 (5) | BB4 | loop header; branch on the loop condition |
| S_5 (6) | BB5 | `iter++`; branch on `current < target` |
| S_6 (7) | BB6 | square |
| S_7A, S_7B (8, 9) | BB7 | two-cycle multiply by `coeff` |
| S_8A, S_8B (10, 11) | BB8 | write `temp[iter]`; S_8B -> S_4 is the feedback edge |
| S_9 (12) | BB9 | latch the result |
| S_EXIT (13) | exit | final state; `done` is high for one cycle |

Edges with a non-zero EPP increment:

| edge | increment |
|---|---|
| S_1 -> S_3 | 3 |
| S_4 -> S_9 | 2 |
| S_5 -> S_7A | 1 |
| auxiliary SEntry -> S_4 | 6 (the counter's restart value after the feedback edge) |

The auxiliary edge S_8B -> SExit carries increment 0. All other edges carry 0.

This gives nine path identifiers:

| id | path |
|---|---|
| 0 | entry, in1 branch, one iteration through BB6, feedback |
| 1 | entry, in1 branch, one iteration through BB7, feedback |
| 2 | entry, in1 branch, loop not entered, exit |
| 3, 4, 5 | as 0, 1, 2, but through BB3 (the `init()` call) |
| 6 | loop header, iteration through BB6, feedback |
| 7 | loop header, iteration through BB7, feedback |
| 8 | loop header, exit |

The default golden input is:

- `in1 = 0` and `init()` returns 100;
- `current = 2`, `iter = 0`, `coeff = 0`.

It executes the paths 3, 6, 6, 7, 6, 6, 6, 6, 6, 6, 8. The trace memory stores
these as 5 EOPT words: `{3}{6 x2}{7}{6 x6}{8}`.

`init_accel` is the callee `init()`. The C code only names it, so it is the
smallest callee that works. It has three states (idle, load, exit), reads the
`init_value` input, and has one path (id 0) per call. Its checker's trace is
one word per group of up to 8 calls.

## How a checker works

All checker operations run one cycle behind the FSM. The checker registers the
FSM's `present_state` and `next_state` first, so it does not lengthen the FSM's
critical path. Every checker has the same delay, so the first fault reported
in the system is still the first one that happened. Each cycle, with the
registered pair `(ps, ns)`:

1. **Accumulate.** The *increments memory*, addressed by `{ps, ns}`, returns
   the edge increment. The checker adds it to the EPP counter.
2. **Final state.** When `ps` is a final state, the counter already holds the
   complete path identifier, because a final state has no outgoing path edge.
   The checker compares it with the word of the *trace memory* at `cur_off`.
3. **Feedback edge.** The increments memory also flags feedback edges. On such
   an edge, the checker stores two values. The first is the closed path's
   identifier: the counter plus the auxiliary exit-edge weight. The second is
   the expected identifier, held in `prev_trace`. The counter restarts at the
   auxiliary entry-edge weight of the loop header. The two stored values are
   compared in the **next** cycle.
4. **Call state.** Suppose the FSM takes a wrong branch into a call. The
   callee's checker would then report a fault, but the real cause is in the
   caller. So in every state that starts a call, the caller's checker tests
   whether the partial path can still become the expected one:
   `0 <= expected - counter <= NumPaths(state) - 1`. With Ball-Larus
   numbering, all completions of a prefix have consecutive identifiers
   starting at the prefix sum, so this test is exact. A final state is the
   case NumPaths = 1, which reduces to equality.
5. **Trace position.** Each closed path (final state or feedback edge) uses up
   one occurrence of the current word `{rep, path}`. A repeat counter counts
   up to `rep`, then `cur_off` moves on to the next word. Closing a path after
   the last word is also a mismatch.
6. **Notify.** A mismatch from step 3 takes priority over one from steps 2 or
   4 in the same cycle, because it happened a cycle earlier. The one-bit
   checker state then goes from RUN to HALT. The fault bit, the scope
   identifier and the offset stay frozen until reset.

Timing seen from the FSM:

- Final-state and call-state mismatches appear on `fault_o` in the cycle after
  the FSM is in the offending state.
- A mismatch found by the delayed check appears two cycles after the FSM is in
  the source state of the feedback edge.
- `fault_o` is combinational in its first cycle and registered after that.

Checker hardware:

- the EPP counter, the closed-path register and `prev_trace`, each `TRACE_W`
  bits wide;
- one adder, plus a subtractor and two comparators for the checks;
- `cur_off` with its incrementer, and `prev_off`;
- the `META_W`-bit repeat counter;
- the trace memory (`TRACE_DEPTH` x (`META_W + TRACE_W`) bits);
- the increments memory.

The increments memory has 2^(2·STATE_W) words, but nearly all of them are
zero. A synthesis tool reduces it to a few gates (the table is built from a
sparse edge list).

## Configuring a checker for another FSM

`epp_checker` takes everything about the checked FSM as parameters. They are
all packed vectors, with entry *i* at index *i*.

| parameter | meaning |
|---|---|
| `STATE_W`, `ENTRY_STATE` | state width; the reset (entry/idle) state |
| `TRACE_W` | bits of a path identifier: ceil(log2(PathMax + 1)) |
| `META_W` | EOPT repeat bits *k* (at least 1); one word covers up to 2^k occurrences |
| `TRACE_DEPTH`, `TRACE_LEN`, `TRACE_INIT` | trace memory size, number of valid words, and the words `{rep, path}` |
| `OFF_W` | offset width, ceil(log2(TRACE_DEPTH + 1)) |
| `N_EDGES`, `E_SRC`, `E_DST` | edges with a non-zero increment, plus the feedback edges |
| `E_INC` | increment; for a feedback edge, the weight of its auxiliary edge to the exit |
| `E_FB`, `E_RST` | feedback flag; for a feedback edge, the weight of the auxiliary edge from the entry to its target |
| `FINAL_STATES`, `CALL_STATES` | one bit per state |
| `CALL_SPAN_M1` | per call state, the number of paths from it to the exit, minus one |
| `CHECKER_ID`, `ID_W` | scope identifier reported on a fault |

`example_pkg` holds these tables for both FSMs of the example. It also holds
`ex_golden()`, a constant function that runs the example function in software,
adds the same increments, and returns the EOPT trace. `epp_debug_top` calls it
at elaboration with its `GOLD_*` parameters. To check the accelerator on a
different input, change those parameters. If the accelerator is then run with
inputs that take another control flow, the checkers report where it first
diverges. The tests rely on this.

## Top-level interface (`epp_debug_top`)

- `clk`, `rst_n` (active-low, asynchronous).
- The example's `start`, `in1`, `a`, `init_value`, `cur0`, `iter0` and
  `coeff`. All are sampled when `start` is seen in the idle state, except
  `init_value`, which `init()` reads in its load state.
- `done` (one cycle) and `result`.
- `temp_raddr`/`temp_rdata`, a read port into `temp[]`: 16 words indexed by
  `iter[3:0]`.
- Per checker (index 0 for the example function, scope id 1; index 1 for
  `init()`, scope id 2): `chk_fault`, `chk_scope` and `chk_offset`. The offset
  is zero-extended to 8 bits.

A run on the default input takes 58 cycles from `start` to `done`:

- 5 cycles base;
- 2 cycles waiting for `init()`;
- 5 cycles per iteration through BB6 and 6 per iteration through BB7.

## What is this design's own

The approach, the checker structure (registered inputs, the trace memory at a
registered `cur_off`, `prev_trace`, the increments memory addressed by both
states, the delayed check, priority for the delayed mismatch, one-bit checker
state) and the example's states and edge weights follow the method described
above. The following are choices made here:

- **Counter restart value.** The method is described both ways: restart at the
  auxiliary entry-edge weight, and restart at 0. Only the first gives the
  example's path numbers 6, 7 and 8, so that is what is built.
- **Call-state check.** The method only says that the running path must be
  checked in call states. The span test and the `CALL_SPAN_M1` table are this
  design's.
- **Extra state and registers.** The added ones are the caller wait state
  `S_3W`, `prev_off` (so a delayed mismatch reports its own offset), the
  end-of-trace mismatch, and the hold-until-reset behaviour of the report.
- **Datapath schedule and data types.** The accelerator's schedule inside the
  states, 32-bit wrap-around integers, the start/done handshake, the
  `init()` body and the `temp[]` size are invented here. `cond = a > 0` is
  never read, so it is not built.
- **Trace memory read.** The trace memory is read combinationally from the
  registered `cur_off`. For a block RAM, move the register into the RAM's
  address port.
- **Golden trace source.** In a real flow the golden trace comes from
  executing the compiler's instrumented intermediate code on the host. Here a
  SystemVerilog constant function takes its place. Choosing the optimal *k* per
  checker is also a host-side step; the example uses k = 3.

Not built:

- the HLS flow that computes the increments and generates the checkers;
- the host debugger that maps a reported offset back to source lines;
- a link that carries notifications off chip (the checker outputs are plain
  ports);
- the benchmark accelerators used to evaluate the method. Their FSMs and traces
  are not available, so the design cannot run them.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

- `tb_epp_checker` drives the example's state graph directly and uses its own
  table of path identifiers. It covers: an exact match, a final-state mismatch,
  a delayed (feedback edge) mismatch, a call-state mismatch, running past the
  end of the trace, and a delayed and a call-state mismatch in the same cycle.
  For each mismatch it checks the offset, the scope identifier, the exact cycle
  and that the report is held. It also checks that the execution
  entry, BB1, BB2, BB4, BB5, BB6, BB8, BB4, BB9, exit becomes the path
  sequence 0, 8. It also builds a checker with a call scheduled in S_2 that
  expects path 5. A run that wrongly branches from S_1 to S_2 must be
  reported in S_2, before the call starts. In addition, 60 random multi-run trajectories are compared
  with a predictor that walks the expanded expected trace.
- `tb_epp_trace_rom`, `tb_epp_incr_rom` and `tb_epp_notifier` check the two
  memories word by word and the notifier's priority and hold behaviour.
- `tb_example_accel` checks the result, the `temp[]` writes and the latency
  formula against a C-like reference model, on fixed and random inputs.
  `tb_init_accel` checks the callee.
- `tb_epp_debug_top` runs the whole system at its default parameters:
  - the golden run, with no fault and both traces fully consumed;
  - a second run without reset, where the caller reports in its call state
    before the callee does;
  - three inputs whose control flow differs from the golden one, caught by the
    delayed check, the delayed check again, and the final-state check.

  It counts every checking mechanism and fails if one never happened.

To simulate with Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/example_pkg.sv \
    tb/tb_epp_debug_top.sv --top-module tb_epp_debug_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Every simulation ends within a
few thousand cycles.

## Files

| file | content |
|---|---|
| `rtl/example_pkg.sv` | state types, EPP tables and the golden-trace function of the example |
| `rtl/epp_checker.sv` | the control flow checker |
| `rtl/epp_trace_rom.sv` | trace memory |
| `rtl/epp_incr_rom.sv` | increments memory |
| `rtl/epp_notifier.sv` | mismatch selection and report |
| `rtl/example_accel.sv` | FSM and datapath of the example function |
| `rtl/init_accel.sv` | the callee `init()` |
| `rtl/epp_debug_top.sv` | the example system with two checkers |
| `tb/tb_*.sv` | one testbench per module |
