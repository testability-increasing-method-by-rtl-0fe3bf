# Easy-tested control FSM with a scannable state register and a Hamiltonian test cycle

Testing a finite state machine from its pins is hard when the tester cannot
choose the state the machine is in: it first has to apply a synchronizing or
homing sequence to learn or force the state, and only then can it check a
transition. This design removes that difficulty by adding a little redundant
hardware to an ordinary control FSM:

* the state register doubles as a **shift register** whose serial input and
  output are device pins, so any state can be loaded, and the current state
  read back, in as many clocks as the register has bits;
* the state table is **extended with a diagnostic mode** in which the machine
  walks a cycle through every one of its states (a Hamiltonian cycle of the
  extended state diagram), so all states and their outputs can be observed
  with one short input sequence.

The machine itself is written in the usual "FSM template" form: the
transition function and the output function are separate combinational
blocks, and the state is held in one clocked register. The example controller
is a five-state Moore machine with states `a1`..`a5` coded `001`..`101` in a
3-bit register.

## Block structure

```
            x ──►┌────────────────┐ fsm_next ┌────────────────┐ reg_next ┌─────────────────┐ state ┌──────────────┐
                 │etfsm_next_state├─────────►│etfsm_ham_cycle ├─────────►│ etfsm_state_reg ├──┬───►│ etfsm_output ├──► y
             ┌──►│ (transitions)  │          │ (diag mux)     │          │ (load / shift)  │  │    │ (Moore)      │
             │   └────────────────┘    diag─►└────────────────┘  sh,tdi─►└────────┬────────┘  │    └──────────────┘
             │                                        ▲                           └──► tdo    │
             └────────────────────────────────────────┴───────────────────────────────────────┘
```

| module | role |
|---|---|
| `etfsm_pkg` | state type `state_e` (all 8 codes named), widths, the cycle-successor function |
| `etfsm_next_state` | transition function of the example controller |
| `etfsm_ham_cycle` | diagnostic extension of the state table: next state = successor on the cycle when `diag = 1` |
| `etfsm_state_reg` | 3-bit state register with load and shift modes, asynchronous reset |
| `etfsm_output` | Moore output function |
| `etfsm_top` | the complete machine |

## Modes

`etfsm_top` has one clock and acts on its rising edge. The mode inputs are
taken in this order of priority:

| condition | what the register does on the clock edge |
|---|---|
| `rst = 1` (asynchronous) | goes to `a1` (`001`) at once |
| `sh = 1` | setting mode: `state <= {state[1:0], tdi}` |
| `diag = 1` | diagnostic mode: `state <=` successor of `state` on `a1→a2→a3→a4→a5→a1` |
| otherwise | normal mode: `state <=` table entry for (`state`, `x`) |

`y` and `tdo` are combinational functions of the registered state, so they
change only after a clock edge or a reset.

## The scan path (setting mode)

In setting mode the three flip-flops form a shift register. Bit 0 takes
`tdi`, and bit 2 is always visible on `tdo`. To force a code `c`, hold
`sh = 1` for three clocks and present `c[2]`, `c[1]`, `c[0]` on `tdi`, one per
clock. During the same three clocks the code that was in the register comes
out on `tdo`, most significant bit first: sample `tdo` before each of the
three edges. Loading and reading back therefore overlap.

This is what makes the machine easy to test. A single transition
(state `s`, input `x`) is checked in seven clocks, with no synchronizing or
homing sequence:

1. Shift `s` in (3 clocks, `sh = 1`).
2. Apply one normal clock with the chosen `x` (`sh = 0`, `diag = 0`). `y`
   before this edge is the Moore output of `s`.
3. Shift the next test state in (3 clocks, `sh = 1`), sampling `tdo`. The
   three sampled bits are the state the transition reached.

Repeating this for every state and input value checks the whole state table:
10 transitions for the example. Because the register can hold any 3-bit
code, the scan path can also load the three codes that are not states
(`000`, `110`, `111`). From these codes the machine goes to `a1` on the next
normal or diagnostic clock, and the outputs give `111`.

## The diagnostic cycle

While `diag = 1` the transition table is replaced by a fixed cycle through
the working states in code order: `a1→a2→a3→a4→a5→a1`. This cycle is added to
the diagram alongside the controller's own edges. It visits every state once
whatever the original table is, so the extended diagram always has a
Hamiltonian cycle. After any starting state (set by reset or by the scan
path), five diagnostic clocks show all five output words on `y` and bring
the machine back to where it started. The output words of the example
all differ, so the order of outputs identifies each state.

The cycle works only on the state code, so it does not change when the
controller's table changes. For a machine with a different number of states,
change `NUM_STATES` (and the state type) in `etfsm_pkg`.

## The example controller

The example's state table and outputs are illustrative. They are not tied
to any particular application:

| state | code | `y` | next, `x = 0` | next, `x = 1` |
|---|---|---|---|---|
| a1 | 001 | 000 | a1 | a2 |
| a2 | 010 | 001 | a4 | a3 |
| a3 | 011 | 010 | a5 | a5 |
| a4 | 100 | 100 | a2 | a5 |
| a5 | 101 | 011 | a5 | a1 |
| unused | 000, 110, 111 | 111 | a1 | a1 |

The machine is strongly connected. Its own edges do not contain the cycle
`a1..a5`: for example, there is no edge from `a3` to `a4`. This is why the
diagnostic extension is needed. To build another controller, rewrite the two
`case` statements in `etfsm_next_state` and `etfsm_output`. The scan path and
the diagnostic cycle stay as they are.

## What is fixed and what is chosen

These parts are fixed by the method:

* the 3-bit register for five states `a1`..`a5` coded `001`..`101`;
* the asynchronous reset to `a1`;
* the left shift that takes the serial input into bit 0 in setting mode;
* the split into transition, output and state-register parts;
* a Moore machine;
* a diagnostic mode that passes through every state.

These parts are choices made for this implementation:

* **Mode input.** There is one active-high setting-mode input `sh`. The
  equivalent form is an active-high "normal" enable, which is `sh` inverted.
* **Scan output.** `tdo` is bit 2 of the register.
* **Diagnostic input.** There is a separate `diag` input. `sh` has priority
  over it.
* **Cycle.** The cycle follows code order.
* **Unused codes.** In both modes these codes go to `a1`.
* **Example controller.** The example's state table, its one-bit input `x`
  and its 3-bit output words are illustrative.
* **No test controller.** No on-chip logic generates test sequences. The
  tester drives `sh`, `tdi` and `diag` from outside.

## Simulation

All files are SystemVerilog-2017. The package must be compiled first. To run
the end-to-end test with plain Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal -Irtl \
    rtl/etfsm_pkg.sv rtl/etfsm_next_state.sv rtl/etfsm_ham_cycle.sv \
    rtl/etfsm_state_reg.sv rtl/etfsm_output.sv rtl/etfsm_top.sv \
    tb/etfsm_top_tb.sv --top-module etfsm_top_tb -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and ends. They check
against reference values that are written out separately in the testbench,
not taken from the RTL.

| testbench | what it checks |
|---|---|
| `etfsm_state_reg_tb` | setting each of the 8 codes serially, with the old code read back on `tdo`; load; 2000 random load/shift clocks with asynchronous resets |
| `etfsm_next_state_tb` | all 16 (code, `x`) pairs of the state table |
| `etfsm_output_tb` | all 8 output words, and that the 5 states have different outputs |
| `etfsm_ham_cycle_tb` | pass-through when `diag = 0`; the successor of every code; a complete tour from `a1` |
| `etfsm_top_tb` | everything listed below |

`etfsm_top_tb` runs at the design's only size and takes well under a second.
It covers:

* the 7-clock scan test of all 10 transitions;
* a diagnostic tour from every state;
* recovery from every unused code;
* 3000 random clocks mixing all modes and resets, compared clock by clock
  with a reference model.

It also counts how often each mechanism occurred: reset, scan set, scan
unload, normal clock, each table edge, diagnostic clock, complete tour and
unused-code recovery. A mechanism that never occurred counts as a failure.
