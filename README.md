# Non-scan test logic for an FSM controller

A controller built from a finite state machine is a block of combinational
logic (CC) plus a state register (SR). A combinational ATPG tool can produce
a complete test set for the CC by treating the SR outputs as extra inputs,
so every test pattern is a pair: a primary input value and an SR value. A
full scan chain can load any SR value, but it takes many shift cycles per
pattern and cannot run at speed. The design here loads the SR through the
controller's own state transitions instead. Each pattern costs about one
clock, everything runs at the functional clock, and the CC itself is left
untouched, so the combinational test set keeps its 100 % fault efficiency.

Two cases must be handled:

* **Valid test states.** The SR value of a pattern can be reached from
  reset. The tester steps the controller there through normal transitions,
  then *freezes* the SR (hold mode) and applies, one per clock, every input
  value that is tested in that state.
* **Invalid test states.** The SR value is one that normal operation can
  never produce, for example 4 flip-flops with only 10 used codes. A small
  piece of extra logic, the **invalid test state generator (ISG)**, steps
  the SR through exactly those values, in a fixed order starting at reset.
  A mode signal `t` chooses between the ISG and the CC.

To see the response of each pattern, the SR input is brought out as
`t_out`. It can use dedicated pins or borrow the data path's output pins.

## Structure

```
            x (primary inputs) ───────────────┬───────────────► example_cc ──► po
                                              │                    ▲   │ cc_ns
                                              │                 ps │   ▼
                                              └──► isg ──isg_ns──► mode_mux ◄── t
                                                    ▲              │ d = t_out ──► t_out
                                                    │ ps           ▼              └► tout_observe ──► po_pins
                                                    └──── state_register ◄── load (hold/load), rst
                                                               (q = ps)               ▲ dp_po, test_mode
```

| module | role |
|---|---|
| `dft_controller` | top: the example controller with its test logic |
| `example_cc` | combinational logic of the example 10-state controller |
| `isg` | invalid test state generator, combinational |
| `mode_mux` | `t = 0`: CC next state; `t = 1`: ISG output; its output is `t_out` |
| `state_register` | SR with synchronous reset and hold mode |
| `clock_gate` | enable-latch clock gate, used when hold is done by gating the clock |
| `tout_observe` | test multiplexer in front of the data path pins, with parity |
| `dft_pkg` | widths, state encoding, the example's ISG sequence |

Top-level ports: `clk`; `rst` (synchronous, to S0); `x[1:0]`; `t`; `load`
(1 loads the SR, 0 holds it); `test_mode` (1 switches the data path pins to
`t_out`); `dp_po[DP_W-1:0]` (the data path's outputs, which this design does
not contain); and the outputs `po[1:0]`, `t_out[3:0]` and
`po_pins[DP_W-1:0]`. In normal operation keep `t = 0`, `load = 1` and
`test_mode = 0`. The block then behaves as the plain controller, with one
transition per clock.

## Valid and invalid test states in the example

The example controller has ten states S0..S9 (reset state S0) in a 4-bit SR,
so the six codes 10..15 (IS1..IS6) are unreachable. The example test set
uses the valid test states {S0, S1, S2, S4, S9} and the invalid test states
{IS1, IS2, IS3}. The ISG therefore implements

```
S0 ─t=1─► IS1 ─t=1─► IS2 ─t=1─► IS3 ─t=1─► S0
```

The encoding is binary (Sk = k, ISk = 9 + k). In `isg` the sequence is a
parameter (`RESET_P`, `SEQ_P`, `N_IS_P`). The ISG compares the present state
with each list entry and outputs the next entry; after the last entry it
returns the reset state. Any state not on the list maps to the first entry.
Synthesis reduces this to a few gates because the list is constant. Which
order is used does not affect fault efficiency, only the ISG's area.

**Input-controlled flip-flops.** `PI_CTRL_MASK` marks SR bits that are
loaded directly from primary inputs while `t = 1`. The lowest marked bit
takes `x[0]`, the next `x[1]`, and so on. For those bits the ISG generates
nothing, so it gets smaller. If the controller has at least as many inputs
as flip-flops, the ISG is reduced to wiring. The default is `0`: the ISG uses
no inputs. When the mask is used, the tester must put the low bits of the
target state on `x` during each `t = 1` load.

## Hold mode (freezing the SR)

`state_register` offers both forms of hold mode, selected by `HOLD_BY_CLOCK`:

* `0` (default): a multiplexer in front of the flip-flops recirculates `q`
  when `load = 0`.
* `1`: the flip-flop clock is `clk AND load`, through `clock_gate`. The
  gate latches the enable while the clock is low, so an enable that changes
  while the clock is high cannot shorten or add a pulse. A bare AND gate
  would not have this protection.

In both forms reset wins over hold: while `rst = 1` the clock is let through.

## Observing `t_out`

`t_out` is the output of `mode_mux`, that is, the value the SR is about to
load:

* During a held pattern (`t = 0`, `load = 0`) it shows the CC's next-state
  response to the pattern, and `po` shows the output response.
* During an ISG load (`t = 1`) it shows the ISG's output, so the ISG and the
  `t = 1` leg of the multiplexer are tested as a side effect.

`tout_observe` covers controllers without spare pins. The data path is idle
while the controller is tested, so with `test_mode = 1` its output pins
carry `t_out`:

* If `DP_W >= 4`, bit i of `t_out` drives pin i.
* If there are fewer pins, all pins but the last carry direct bits, and the
  last pin carries the XOR of the remaining bits. A parity pin only detects
  an error on an odd number of those bits.

The default `DP_W = 2` therefore gives `pin0 = t_out[0]` and
`pin1 = ^t_out[3:1]`.

## Applying a test set

The tester drives `rst`, `x`, `t` and `load` every clock and compares `po`
and `t_out` (or `po_pins`) with the expected response before the rising
edge.

1. **Reset** (one cycle).
2. **Valid test states.** Walk a sequence from reset that visits every
   valid test state. For the example this is
   `S0 -(x=01)-> S1 -(01)-> S4 -(01)-> S0 -(10)-> S2 -(01)-> S5 -(01)-> S9`,
   with `t = 0` and `load = 1`. At the first visit of each valid test state,
   hold the SR (`load = 0`) and apply the pattern inputs, one per clock. The
   next transition follows in a separate cycle after the last pattern.
   Getting to a test state through its neighbours rather than through reset
   keeps the walk short. Choosing the walk is a travelling-salesman problem
   on the state graph and is done off-line.
3. **Reset** again, then **invalid test states.** Each `t = 1` cycle with
   `load = 1` steps the ISG to the next invalid test state. Hold it with
   `t = 0, load = 0` while its patterns are applied.

With `L_vt` the length of the walk in transitions, `N_is` the number of
invalid test states and `N_pat` the number of patterns, the whole test takes

```
L_vt + N_is + N_pat + 2   clock cycles
```

The "+2" counts the two resets. For the example with all 4 input values in
each of the 8 test states, this is 6 + 3 + 32 + 2 = 43 cycles. The
end-to-end testbench checks this exact count. For comparison, a full scan
chain needs `N_pat*(N_FF+1)+N_FF` cycles, which is 164 cycles for the same
32 patterns.

If the CC is faulty, the state reached by the walk may be wrong. That error
shows on `t_out` in the cycle that loads it, so it is still detected.

`tb_fault_detect` demonstrates this. It runs the 43-cycle sequence once for
each of 28 single stuck-at faults, on every bit of the CC next state, the CC
outputs, the present state and the ISG output. 27 of them change at least
one observed response. The remaining one is ISG bit 3 stuck at 1. IS1, IS2
and IS3 all have that bit set, so the fault changes only the unused return
step IS3 -> S0. The ISG is idle in normal operation, so this fault cannot
matter. The faults are injected on RTL nets. Faults inside the CC's gates
would need a gate netlist and an ATPG pattern set, which are outside this
RTL.

## The example controller (`example_cc`)

Only the controller's size and six of its transitions are given by the
method's worked example. Everything else in the table below is this
design's own choice: the other transitions, the two-bit input and output
widths, the outputs, and the behaviour in unreachable states.

| state | x=00 | x=01 | x=10 | x=11 | po[0] | po[1] |
|---|---|---|---|---|---|---|
| S0 | S0 | S1 | S2 | S3 | 0 | x[0] |
| S1 | S1 | S4 | S0 | S6 | 0 | x[1] |
| S2 | S2 | S5 | S0 | S7 | 0 | x[0] |
| S3 | S3 | S8 | S0 | S0 | 0 | x[1] |
| S4 | S4 | S0 | S9 | S9 | 1 | x[0] |
| S5 | S5 | S9 | S0 | S0 | 0 | x[1] |
| S6 | S6 | S0 | S0 | S0 | 0 | x[0] |
| S7 | S7 | S8 | S0 | S0 | 0 | x[1] |
| S8 | S8 | S9 | S0 | S0 | 0 | x[0] |
| S9 | S9 | S0 | S0 | S0 | 1 | x[1] |
| IS1..IS6 | S0 | S0 | S0 | S0 | x[1] | x[0] |

To use the test logic with another controller, replace `example_cc` and set
the widths in `dft_pkg`. The ISG sequence must then be set to that
controller's invalid test states, which come from its combinational test
set.

## Departures and limits

* The example's state table is mostly invented (see above). Anything
  measured on it, such as area or test length, describes this table and not
  any published circuit.
* The test patterns in the testbenches are exhaustive over the inputs of
  each test state. They are not the output of an ATPG run.
* The ISG is written as a lookup over the sequence and left to synthesis;
  no effort is made to pick an area-minimal order.
* Additions not required by the method: the latch in the clock gate, the
  `test_mode` select for pin sharing, and the mixed direct/parity pin
  layout.
* The data path, and the tester that produces the test sequence, are not
  part of this RTL. The data path's outputs enter through `dp_po`.
* Nothing here has been synthesised to gates or timed. The claim that the
  ISG is faster than the CC, which at-speed test of invalid patterns relies
  on, is not checked.

## Simulating

All testbenches print `TB_RESULT checks=N failures=M` and stop by
themselves. A watchdog ends a run that hangs. For example, with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_dft_controller \
  -y rtl -y tb +libext+.sv rtl/dft_pkg.sv tb/tb_ref_pkg.sv tb/tb_dft_controller.sv
./obj_dir/Vtb_dft_controller
```

| testbench | what it covers |
|---|---|
| `tb_dft_controller` | Three builds side by side on the same stimulus: default, clock-gated hold, and input-controlled ISG bits with 4 direct pins. Normal operation, then a complete test application. Checks the 43-cycle count and that every mechanism occurred. |
| `tb_dft_controller_full` | The default build alone, through normal operation and the complete test application. |
| `tb_fault_detect` | 28 injected stuck-at faults against the 43-cycle test sequence. |
| `tb_example_cc` | All 64 state/input pairs against the reference table. |
| `tb_isg` | Every state and input for three mask settings, plus the feedback walk from S0. |
| `tb_state_register` | Random reset/hold/load on both hold forms. |
| `tb_clock_gate` | Pulse counting, and enable changes during the high phase. |
| `tb_mode_mux`, `tb_tout_observe` | Exhaustive checks of the multiplexers and of the parity pins. |

`tb/tb_ref_pkg.sv` holds the reference model: the state table, the output
rules and the ISG walk. It is written separately from the RTL.
