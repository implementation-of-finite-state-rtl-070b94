# March SS memory BIST, built around a finite state machine

An embedded RAM is hard to test from the chip's pins. A built-in self-test
(BIST) engine next to it can test it at speed instead. The engine writes
known patterns, reads them back and flags any word that comes back wrong. This
design is such an engine. Its controller is a plain finite state machine that
runs one fixed March test, **March SS**. That keeps the controller small and
fast, but it cannot be reprogrammed for another algorithm.

A March test is a list of *March elements*. Each element is a short sequence
of reads and writes. It is applied to one address, then to the next, in
ascending (⇑) or descending (⇓) address order. March SS has six elements and
performs 22 operations per word, so it takes 22n operations on an n-word
memory:

| element | order | operations per address | state |
|---------|-------|------------------------|-------|
| M0 | any (run ⇑) | w0 | S0 |
| M1 | ⇑ | r0, r0, w0, r0, w1 | S1 |
| M2 | ⇑ | r1, r1, w1, r1, w0 | S2 |
| M3 | ⇓ | r0, r0, w0, r0, w1 | S3 |
| M4 | ⇓ | r1, r1, w1, r1, w0 | S4 |
| M5 | any (run ⇑) | r0 | S5 |

`w0` writes the all-zero word and `r1` reads a word and expects all ones.
Rereading a cell, and writing it with the value it already holds, sensitises
the faults March SS is known for. It covers all realistic simple static faults
of a RAM cell array:
- stuck-at faults
- transition faults
- coupling faults
- address decoder faults
- read-destructive and write-disturb faults

## Structure

```
              bist_en   reset   clk
                 |
          +--------------+  addr_load/step/up   +-------------------+
          | march_ss_fsm |--------------------->| address_generator |--addr--+
          |  IDLE,S0..S6 |<---------------------|                   |        |
          +--------------+      addr_last       +-------------------+        v
             |     |   | ctrl.we                                   +-------------------+
   bist_end <+     |   +------------------------------------------>| memory_under_test |
                   | ctrl.data  +----------------+  pattern        |   256 x 8 RAM     |
                   +----------->| data_generator |---------------->| wdata       rdata |
                   | ctrl.rd    +----------------+        |        +-------------------+
                   |                                      v expected        | actual
                   |                               +------------+           |
                   +------------------------------>| comparator |<----------+
                                       cmp_en      +------------+--> faultdetect
```

| file | role |
|------|------|
| `rtl/march_ss_pkg.sv` | State encoding, the per-cycle control word `bist_ctrl_t`, and the March SS element table as functions of the state (`element_up`, `element_len`, `element_op`, `next_element`). |
| `rtl/march_ss_fsm.sv` | The controller. |
| `rtl/address_generator.sv` | Up/down address counter with a "final address" flag. |
| `rtl/data_generator.sv` | Widens the controller's 0/1 data value into `0x00` or `0xFF`. That word is the write data and also the expected read data. |
| `rtl/comparator.sv` | Compares the read word with the expected word and drives `faultdetect`. |
| `rtl/memory_under_test.sv` | The RAM being tested: single port, synchronous write, combinational read. |
| `rtl/march_ss_bist_top.sv` | Wires the five blocks together. |

## The controller

The state machine has one state per March element. It steps
IDLE → S0 → S1 → … → S5 → S6. S6 is the end state, and `bist_end` is high
there.

Inside an element state, an operation counter (`op_idx`) walks through that
element's operations. The package function `element_op(state, op_idx)`
returns the current operation: a read or a write, and the data value. The
machine issues exactly one memory operation per clock, and the address stays
fixed while the counter runs. When the counter reaches the element's last
operation, one of two things happens:

- **Not at the final address.** The controller pulses `addr_step`, and the
  counter wraps to 0.
- **At the final address** (`addr_last`). The element is done. The state
  moves to the next element. In the same cycle the controller pulses
  `addr_load`, with `addr_up` set to the *next* element's order. The new
  element's first address (0 for ⇑, 2^ADDR_W−1 for ⇓) is therefore in place on
  the very next clock.

This handoff leaves no idle cycles between elements. The whole test is
22n + 1 clocks: one to leave IDLE, then 22n operations.

The address generator latches the order when it loads. Its `last` flag
therefore depends only on its own registers. This matters: if `last` also
depended on the controller's `addr_up` output, and `addr_up` depends on
`last`, the result would be a combinational loop.

The rules for `bist_en`:

- `bist_en` going high in IDLE starts a test.
- `bist_en` must stay high while the test runs. Dropping it in any state
  aborts the test and returns the machine to IDLE on the next clock.
- After the last operation, the machine waits in S6 with `bist_end` high
  until `bist_en` falls.

`reset` is synchronous and active high.

Two assertions in `march_ss_fsm` check that the operation counter stays
within the element, and that a write and a compared read are never issued in
the same cycle.

## Timing at the pins

Take the clock edge at which `bist_en` is first seen high as edge 0.

- Operation k (0-based) is on the memory port between edges k+1 and k+2.
  A write to memory takes effect at edge k+2.
- The comparator registers its result. `faultdetect` for a read at operation
  k is therefore visible after edge k+2.
- `faultdetect` is a per-read flag, not a sticky one. It is high for exactly
  one cycle per wrong read, and low after writes and after good reads. To get
  pass/fail, OR it into a sticky flag, or count its pulses.
- `bist_end` rises after edge 22n+1. That is the same cycle in which the
  result of the last read appears on `faultdetect`.

At the default size (256 words) a run is 5633 clocks.

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `ADDR_W` | 8 (256 words) | `march_ss_bist_top`, `address_generator`, `memory_under_test` |
| `DATA_W` | 8 | `march_ss_bist_top`, `data_generator`, `comparator`, `memory_under_test` |

The byte width follows the design's definition of the data background
(all-0 or all-1 byte). The 256-word depth is this design's choice; nothing
fixes it. Any `ADDR_W` ≥ 1 works.

## What is specified and what was chosen here

These parts follow the published design of this BIST:

- the block structure: an FSM controller, an address generator, a data
  generator, a comparator and the memory under test
- the signal names `bist_en`, `clk`, `reset`, `faultdetect` and `bist_end`
- the states IDLE, S0–S5 (one per element) and S6 (end)
- the March SS element list
- the all-0/all-1 byte data
- `faultdetect` high on a mismatch and low on a match

These are choices made here:

- **Address orders.** M1–M4 run ⇑ ⇑ ⇓ ⇓, as in the standard March SS
  definition. The two "any order" elements run ascending.
- **Controller internals.** The operation counter, the load/step handshake
  and the latched direction in the address generator.
- **Cycle timing.** One operation per clock, and a one-cycle registered
  `faultdetect`.
- **`bist_en` rules.** Abort when `bist_en` falls, and hold in S6 until
  `bist_en` is released.
- **Reset.** Synchronous, active high.
- **The memory.** Its depth, single-port organisation and combinational
  read. A RAM with a registered read would need the comparator's enable and
  expected data delayed by one cycle.
- **One algorithm only.** There is no algorithm-select input. The published
  text mentions selecting the algorithm in passing, but March SS is the only
  algorithm it defines.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Each has a watchdog that fails the run if it
hangs.

- **`march_ss_fsm_tb`.** Plays the address generator for a 16-word memory.
  On every cycle it checks the state, the address, the operation kind and the
  data value against a March SS list written out independently in the
  testbench. It also checks that a run is exactly 22n operations, the
  `bist_end` behaviour, an abort in the middle of S3, and a clean second run.
- **`address_generator_tb`, `data_generator_tb`, `comparator_tb`,
  `memory_under_test_tb`.** Block-level checks against reference values
  computed in the testbench.
- **`march_ss_bist_top_tb`.** The end-to-end test, run at the default
  parameters. It runs the BIST once on a good memory and once for each of
  these injected faults:

  | fault | wrong reads |
  |-------|-------------|
  | stuck-at 0 | 6 |
  | stuck-at 1 | 7 |
  | up transition | 6 |
  | down transition | 4 |
  | inversion coupling | 4 |
  | idempotent coupling | 1 |
  | read-destructive: a read of a 1 flips the cell and returns the flipped value | 6 |
  | deceptive read-destructive: a read of a 0 returns 0, then flips the cell | 2 |
  | write disturb: a write of 1 onto a 1 flips the cell | 2 |
  | address decoder (a write to one address also lands in a second cell) | 4 |

  Each fault is injected by correcting the RAM array through a hierarchical
  reference at every falling clock edge. The last three faults are triggered
  by the operation on the memory port. They show why March SS reads each
  cell twice and rewrites the value the cell already holds: the second read
  catches the deceptive read-destructive fault, and the read after the
  non-transition write catches the write disturb. The testbench keeps its own copy of
  the memory, with the same fault, and runs the March SS list over it. From
  that it predicts which reads must mismatch, and it checks `faultdetect` on
  every cycle of every run against that prediction. It also checks that
  `bist_end` rises at exactly 22n+1. It aborts one run half-way, and it fails
  if any of these never happened:
  - an ascending element
  - a descending element
  - a write
  - a compared read
  - a detected fault
  - an end of test
  - an abort

All testbenches pass. Each testbench was also run against a deliberately
broken copy of its block, and each of those runs fails. The testbench
memory models only the single-cell and two-cell faults listed above, one at a
time. Linked faults, faults spanning several bits of a word, and
neighbourhood-pattern faults are not exercised.

## Running it

Verilator 5 with `--timing` is enough. The package must come first. From the
repository root:

```
verilator --binary --timing --assert -y rtl rtl/march_ss_pkg.sv \
    tb/march_ss_bist_top_tb.sv --top-module march_ss_bist_top_tb
obj_dir/Vmarch_ss_bist_top_tb
```

Swap in any other `tb/*_tb.sv` and its module name to run a block test. The
full end-to-end run, eleven complete tests of a 256-byte memory, takes well
under a second.

## Changing it

- **Memory size.** Set `ADDR_W` and `DATA_W` on `march_ss_bist_top`. To test
  a memory outside the top, replace `u_mut` and bring `addr`, `ctrl.we`,
  `pattern` and `rdata` out as ports.
- **Another March algorithm.** Almost all of the algorithm lives in
  `march_ss_pkg`. To change it:
  1. Rewrite `element_up`, `element_len`, `element_op` and `next_element`.
  2. Adjust `MAX_OPS`, the longest element, which sizes the operation
     counter.
  3. Extend `state_e` if there are more than six elements.

  `march_ss_fsm` itself does not need to change.
