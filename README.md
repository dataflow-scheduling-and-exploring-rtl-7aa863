# Sorting networks derived from scheduled dataflow

Sorting a handful of integers in hardware can be written as a short list of
`sort` statements, each one a compare-and-swap of two variables:

    (A1, B1) = sort(A0, B0)      -- A1 = min(A0, B0), B1 = max(A0, B0)

Nothing in such a list says how many comparators, registers or multiplexers
the hardware has. That is decided by *scheduling* the statements into clock
cycles and then *allocating* hardware to the scheduled statements: a
statement that needs the result of another must come in a later cycle,
statements in the same cycle need separate sorting elements, and variables
whose lifetimes do not overlap can share a register. This RTL takes one
four-input sorting description through that process and implements the
three results side by side, plus the five-input network the description is
reduced from:

| design             | schedule          | sorting elements | data flip-flops | operand/write-back muxes (2-input equivalents) | states | strobe → done |
|--------------------|-------------------|-----------------:|----------------:|-----------------------------------------------:|-------:|--------------:|
| `serial_sorter`    | serial, 6 steps   | 1                | 8·N             | 10·N                                           | 8      | 7 cycles      |
| `asap_sorter`      | ASAP/ALAP, 4 steps| 2                | 8·N             | 8·N                                            | 6      | 5 cycles      |
| `direct_sorter`    | ASAP/ALAP, 4 steps| 6                | 16·N            | 0                                              | 6      | 5 cycles      |
| `balanced5_sorter` | ASAP/ALAP, 5 steps, five inputs | 10 | 25·N            | 0                                              | 7      | 6 cycles      |

N is the operand width (`WIDTH`, 16 by default). All four sort into
ascending order: `OA` is the smallest value.

## The sorting element

`sort_element` is a comparator and a switch. The comparator computes
`gt = a > b`; when it is set the switch crosses, so `x` gets the smaller
operand and `y` the larger. Equal operands pass straight through. It is
purely combinational. `SIGNED = 1` makes the comparison two's complement;
the default is unsigned.

## The four-input description

The four-input sorters all implement these six statements (the names carry a
level number: `B2` is the value of lane B after its second update):

    A0 = IA; B0 = IB; C0 = IC; D0 = ID          -- latch the operands
    (A1, B1) = sort(A0, B0)
    (C1, D1) = sort(C0, D0)
    (B2, C2) = sort(B1, C1)
    (A3, B3) = sort(A1, B2)
    (C3, D3) = sort(C2, D1)
    (B4, C4) = sort(B3, C3)
    OA = A3; OB = B4; OC = C4; OD = D3

After the first two statements A1 ≤ B1 and C1 ≤ D1. The third puts the
smaller of the two inner values in B2, so A3 = min(A1, B2) is the overall
minimum and D3 = max(C2, D1) the overall maximum; the last statement orders
the two middle values.

The dependences allow two schedules:

* **serial** — one statement per cycle, six cycles;
* **ASAP/ALAP** — the as-soon-as-possible and as-late-as-possible schedules
  coincide here, so there is no slack to move anything: four cycles,
  `{A1B1, C1D1}`, `{B2C2}`, `{A3B3, C3D3}`, `{B4C4}`.

## Register allocation: twelve variables in four registers

This is the step that shapes the two shared datapaths, and the least obvious
one when reading the RTL. The twelve intermediate variables A1…C4 are each
live from the step that writes them to the last step that reads them (the
operand latches A0…D0 are kept apart). Two variables can share a register
when their lifetimes do not overlap, and a statement may read and write the
same register, because the write happens at the clock edge that ends the
step. For both schedules the variables partition into four registers:

| register | holds               |
|----------|---------------------|
| B1       | B1, B2, B3, B4      |
| C1       | C1, C2, C3, C4      |
| A1       | A1, A3              |
| D1       | D1, D3              |

With that allocation every statement becomes an in-place update of two of
the four registers, `(B1, C1) = sort(B1, C1)` and so on, and the result ends
in A1, B1, C1, D1. In the RTL those four registers are `a1`, `b1`, `c1`, `d1`
and OA…OD are wired straight from them.

A1 is only ever written with the smaller result and D1 only with the larger,
so they need no write-back multiplexer. B1 and C1 are written with either
result depending on the step, hence one 2-to-1 multiplexer in front of each.

## The three four-input implementations

### Serial: one shared sorting element

`serial_datapath` feeds its single sorting element through two 5-to-1
multiplexers, first operand from {A0, C0, A1, B1, C1}, second from {B0, D0,
B1, C1, D1}. O1 is the smaller result and O2 the larger:

| state | statement                  | operands | writes           |
|-------|----------------------------|----------|------------------|
| S0    | latch on strobe            | –        | A0..D0           |
| S1    | (A1,B1) = sort(A0,B0)      | A0, B0   | A1←O1, B1←O2     |
| S2    | (C1,D1) = sort(C0,D0)      | C0, D0   | C1←O1, D1←O2     |
| S3    | (B1,C1) = sort(B1,C1)      | B1, C1   | B1←O1, C1←O2     |
| S4    | (A1,B1) = sort(A1,B1)      | A1, B1   | A1←O1, B1←O2     |
| S5    | (C1,D1) = sort(C1,D1)      | C1, D1   | C1←O1, D1←O2     |
| S6    | (B1,C1) = sort(B1,C1)      | B1, C1   | B1←O1, C1←O2     |
| S7    | output step, sets done     | –        | –                |

`serial_controller` is an eight-state Moore machine (S0…S7) that emits a
`ser_ctrl_t` control word per state (see `sort4_pkg`).

### ASAP/ALAP with shared elements: sortX and sortY

Steps 1 and 3 hold two statements each, so two sorting elements are needed.
sortX executes one statement in every step; sortY only the second statement
of steps 1 and 3. That gives sortX 3-to-1 operand multiplexers ({A0, A1, B1}
and {B0, B1, C1}) and sortY 2-to-1 ones ({C0, C1} and {D0, D1}). B1 is
written from sortX's smaller or larger result, C1 from sortX's larger or
sortY's smaller result.

| state | sortX                 | sortY                 |
|-------|-----------------------|-----------------------|
| S1    | (A1,B1) = sort(A0,B0) | (C1,D1) = sort(C0,D0) |
| S2    | (B1,C1) = sort(B1,C1) | –                     |
| S3    | (A1,B1) = sort(A1,B1) | (C1,D1) = sort(C1,D1) |
| S4    | (B1,C1) = sort(B1,C1) | –                     |
| S5    | output step, sets done |                      |

Because a sorting element is commutative, swapping the operands of the S2/S4
statement would let one of the 3-input multiplexers shrink to two inputs.
That optimisation is not applied; the datapath keeps the multiplexer sets
listed above.

### Direct: one element per statement

`direct_datapath` gives every statement its own sorting element and every
variable its own register (A0…D0, A1…D1, B2, C2, A3…D3, B4, C4). No
multiplexers are needed; `direct_controller` raises one stage enable per
state (`ena0` with the strobe, then `ena1`…`ena4` in S1…S4). It takes as
many cycles as the shared ASAP/ALAP design but has no multiplexer in any
register-to-register path, at twice the flip-flops and three times the
sorting elements.

## The five-input balanced network

The four-input description is a reduction of a five-input one whose
dependences are spread evenly over the lanes, so that both of its schedules
are the same five steps of two statements each:

    (A1,B1) = sort(A0,B0); (C1,D1) = sort(C0,D0)
    (B2,C2) = sort(B1,C1); (D2,E2) = sort(D1,E0)
    (A3,B3) = sort(A1,B2); (C3,D3) = sort(C2,D2)
    (B4,C4) = sort(B3,C3); (D4,E4) = sort(D3,E2)
    (A5,B5) = sort(A3,B4); (C5,D5) = sort(C4,D4)
    OA = A5; OB = B5; OC = C5; OD = D5; OE = E4

This is odd-even transposition sorting, which sorts five values in five
rounds. `balanced5_sorter` implements it directly, in the style of the
direct four-input sorter: ten sorting elements, one register per variable
(25·N flip-flops), one stage enable per step, and the same handshake. The
schedule and the output mapping come from the description; its hardware
form, its handshake and its controller are this implementation's, made by
analogy with the four-input direct sorter.

## Handshake and timing

Every sorter has the same interface: `strobe`, `reset`, `done`, operands
`IA…`, results `OA…`, plus `busy`. Edge 0 is the rising edge that samples
`strobe = 1` in the idle state S0.

    edge 0        operands latched into A0.., done <= 0, leave S0
    edges 1..k    one schedule step per edge (k = 6, 4, 4, 5)
    edge k        result complete on OA..
    edge k+1      output step ends, done <= 1, back in S0
    afterwards    done stays 1 until strobe or reset is seen in S0

* `reset = 1` with `strobe = 0` in S0 clears `done` and nothing else; the
  last result stays on the outputs. `strobe` has priority over `reset`.
* `strobe` and `reset` are ignored while a sort runs. The operand inputs are
  only sampled at edge 0.
* `busy` is high outside S0. A new sort may be started in the very cycle
  `done` rises.
* `rst_n` (active low, asynchronous) resets the controllers to S0 with
  `done = 0`. Data registers have no reset; each is written before it is
  read.
* The outputs are wired from registers, so they change at the clock edges of
  a sort and show intermediate values while it runs.

Each controller asserts that a started sort runs to the idle state in the
expected number of cycles; the direct and five-input controllers also assert
that at most one stage enable is active.

## Cost after synthesis

Coarse (word-level) synthesis at WIDTH = 16 gives these flip-flop counts,
which match the 8·N / 8·N / 16·N data registers plus the controller's three
state bits and `done`:

| module             | flip-flop bits | word-level cells |
|--------------------|---------------:|-----------------:|
| `serial_sorter`    | 132            | 56               |
| `asap_sorter`      | 132            | 56               |
| `direct_sorter`    | 260            | 73               |
| `balanced5_sorter` | 404            | 108              |

Word-level cell counts do not reflect area (a 16-bit comparator is one
cell); map to a target library to compare the designs properly.

## Where this implementation makes its own choices

* **State count.** The original cost summary lists four controller states
  for the ASAP/ALAP and direct designs, which is their number of sort steps,
  while their state diagrams have six (idle, four steps, output). The
  controllers here have six. The serial state diagram repeats two state
  names; the serial controller uses eight distinct states (idle, six steps,
  output), the number that summary gives for it.
* **When done rises.** The output step's `done = 1` is taken, like every
  other step's action, at the clock edge that ends the step.
* **Added ports.** `rst_n` (power-on reset) and `busy` are additions.
* **Signedness.** The operands are described only as fixed-width integers;
  unsigned by default, `SIGNED = 1` for two's complement.
* **Operand swap in the ASAP/ALAP datapath** not applied (see above).
* **Five-input network.** Built as described above. Other five-input
  descriptions of the same task (a serial bubble-sort order and a relaxed
  variant with a seven-step schedule) are only compared against and are not
  built.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog:

* `sort_element_tb` — exhaustive 4-bit unsigned and signed, random 16-bit.
* `*_datapath_tb` — the testbench plays the controller and compares the
  registers after every step with its own evaluation of the statements;
  all orderings of distinct values, ties and extremes.
* `*_controller_tb` — control word or stage enable in every state, done
  latency, done hold, reset, strobe and reset ignored while busy,
  back-to-back sorts, `rst_n` in mid-sort.
* `*_sorter_tb` — end to end at 16-bit unsigned and 8-bit signed, cycle count
  from strobe to done, every ordering of distinct operands, random operands,
  input changes mid-sort.
* `sort4_top_tb` — all four sorters at default parameters, running
  concurrently from independent drivers and then in lock-step with equal
  operands. It counts completed sorts, orderings covered (24 or 120), ties,
  strobes and resets ignored while busy, done held, done cleared by reset
  and restarts while done was high, and fails if any count is zero.

All pass. Each testbench was also run against a deliberately broken copy of
its module (a wrong multiplexer input, a wrong write-back source, a skipped
state, swapped outputs) and reported failures.

## Simulating

All modules are in `rtl/`, one per file, with shared types in
`rtl/sort4_pkg.sv`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/sort4_pkg.sv tb/sort4_top_tb.sv --top-module sort4_top_tb
    ./obj_dir/Vsort4_top_tb

Replace the testbench file and top module to run another one. To lint a
module: `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv
rtl/sort4_pkg.sv rtl/<module>.sv --top-module <module>`. Verilator reports
`SYNCASYNCNET` on the controllers because the assertions sample `rst_n`
synchronously while the state register uses it asynchronously; it is
harmless.

The top, `sort4_top`, places the four sorters side by side with prefixed
ports (`ser_`, `asap_`, `dir_`, `b5_`) and shared `clk`/`rst_n`; each sorter
can also be used on its own. `WIDTH` and `SIGNED` are parameters of every
datapath, sorter and the top.
