# Self-timed finite state machine

This is a finite state machine with no clock. A clocked machine changes state on
a clock edge. This one changes state when a complete set of input values has
arrived. When it has finished, it signals completion on an acknowledgment line,
and the environment then withdraws the inputs again. Each line carries three
values: 0, 1 and "undefined" (U). Each line is built from two wires. The
machine is a self-timed combinational logic block with a self-timed
master-slave register in its feedback path. Both are built only from AND/OR
gates and Muller C-elements. No delay element and no timing assumption between
gates is needed for them to sequence correctly.

The machine is described by an ordinary state table, as a Mealy or Moore
machine would be. The RTL takes the table as a parameter. The default table is
a four-state traffic-light controller.

## Three-valued lines on two wires

Every input, output and state line is a `st_pkg::dr_t`, which has two rails:

| value | `r1` | `r0` |
|-------|------|------|
| U (spacer) | 0 | 0 |
| 0     | 0 | 1 |
| 1     | 1 | 0 |
| illegal | 1 | 1 |

A vector of lines is *defined* when every line has exactly one rail high. It is
*undefined* when every rail is low. Defined values (data) and all-undefined
vectors (spacers) must alternate. A vector that is partly defined is in
transition, and the circuits ignore it. The modules carry deferred assertions
(`assert final`) that flag a line with both rails high outside reset.

## One state transition: the four-phase cycle

This is the part to understand first. Signal names follow `st_fsm`: inputs `I`,
outputs `O`, present state `y` (internal `ps`), next state `Y` (internal `ns`)
and acknowledgment `ack_out`.

| phase | environment does | machine responds |
|-------|------------------|------------------|
| idle  | `I` all U | `y` holds the present state. `O` and `Y` are U. `ack_out` = 1 |
| 1 | makes some, not all, inputs defined | nothing changes |
| 2 | makes the last input defined | `O` and `Y` become defined with the table's values. The register stores `Y`. Then `y` becomes all U and `ack_out` falls |
| 3 | makes some, not all, inputs U | nothing changes. `O` and `Y` stay defined and `y` stays U |
| 4 | makes the last input U | `O` and `Y` become U. The register puts the stored `Y` on `y`, and `ack_out` rises |

Several rules follow from this cycle:

- The environment may apply new inputs only while `ack_out` = 1.
- It may remove them only after `ack_out` has fallen.
- Outputs are valid from the fall of `ack_out` until the inputs are removed.
- Inputs may arrive and leave in any order and at any speed.
- Unlike a fundamental-mode asynchronous machine, a single input change never
  causes a transition. Every transition needs a full data/spacer cycle of all
  the inputs.

Why the loop does not race: in phase 2 the present state `y` becomes U while
`I` is still defined. The logic block changes its outputs only when *all* its
inputs are U. Because `I` is still defined, `O` and `Y` hold. They are released
only when the environment removes `I` in phase 4, and only then does the
register release the new state onto `y`.

## The master-slave register (`st_ms`)

For each of the K lines, the register has two rails of master C-elements `w`
and two rails of slave C-elements `y`. Three completion detectors drive the
control lines. Each detector is an OR per line into one wide C-element. A
detector output goes to 1 when its whole vector is defined, goes to 0 when the
vector is all U, and holds in between.

- `A` = NOT(detector on `Y`): 0 when all inputs are defined, 1 when all are U.
- `B` = NOT(detector on `y`): 0 when all outputs are defined, 1 when all are U.
- `W` = NOT(detector on `w`). This is `ack_out`.
- Master: `w = C(Y, B)`. Slave: `y = C(w, A)`.

When the inputs become defined, `A` falls. Every slave C-element then sees
(`w` = 0, `A` = 0), so `y` clears to U. That raises `B`, and the master cells
copy `Y` into `w`. Once `w` is complete, `W` falls. When the inputs become U,
`A` rises and the slaves copy `w` to `y`. When `y` is complete, `B` falls and
`w` clears. Once `w` is empty, `W` rises. `W` therefore means "the slave has
finished its transition".

**Reset.** Reset presets or clears the slave C-elements so that `y` = `INIT`:
rail `r1` of bit i is set when `INIT[i]` = 1, and rail `r0` otherwise. The
inputs `Y` must be U during reset. The other cells settle by themselves while
reset is held.

**ack-in.** `ack_in` is optional (`USE_ACK_IN`). Its inverse is one more input
of the `W` C-element. With it, `W` falls only after a successor stage has
lowered its own acknowledgment, meaning it has taken the data. `W` rises only
after the successor has raised it again, meaning it has taken the spacer. This
placement is a choice of this implementation.

## The combinational block (`st_cl`)

`st_cl` must behave as follows:

- Its outputs stay U until every input is defined, then take the function value.
- They stay at that value until every input is U, then return to U.

It is built in minterm form:

- There is one NI-input C-element per input vector j. Its inputs are the rails
  that match j (`r1` where bit i of j is 1, `r0` otherwise).
- Output rail `f[o].r1` is the OR of the minterms whose table entry has bit o
  set. `f[o].r0` is the OR of the rest.

Exactly one minterm fires per defined input vector, so each output gets exactly
one rail. Reset clears every minterm. This is the simplest circuit with the
required behaviour. It is not area-optimised: it costs 2^NI C-elements of NI
inputs each, so it suits small machines.

## C-elements

- `c_element`: z = a·b + (a+b)·z. The output follows the inputs when they agree
  and holds when they differ.
- `c_element_pc`: the same with initialisation inputs, z = preset +
  ¬clear·(a·b + (a+b)·z). Preset wins over clear.
- `c_element_n`: the N-input extension, used in the detectors and the minterms.

All three are gate equations with the output fed back. This feedback is the
only storage in the design. It is why lint tools report circular combinational
logic (Verilator `UNOPTFLAT`, yosys "logic loop"). Those reports are expected:
the loops are the circuit. Synthesis maps these cells to plain gates with
loops, not to latches or flip-flops. For silicon you would normally replace
them with a library C-element cell.

## Specifying a machine (`st_fsm` parameters)

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 3 | number of inputs |
| `M` | 5 | number of outputs |
| `K` | 2 | number of state bits |
| `INIT` | `2'b00` | state after reset |
| `TABLE` | `st_pkg::traffic_light_table()` | `2**(N+K)` rows of `M+K` bits |
| `USE_ACK_IN` | 1 | include `ack_in` in the acknowledgment |

- The row index is `{y, I}`, with `I` in the low N bits.
- The row content is `{Y, O}`, with `O` in the low M bits.
- A Moore output is a column that depends only on the state part of the index.
  Both kinds of output can be mixed.

The default controller has inputs `I = {C, TL, TS}`: a car waiting on the farm
road, a long timeout and a short timeout. Its outputs are `O = {ST, HL, FL}`:
start-timer, highway light and farm-road light, with light codes 00 green,
01 yellow, 10 red. Its states are HG = 00, HY = 01, FG = 11, FY = 10.

| state | leaves when | goes to |
|-------|-------------|---------|
| HG | C and TL | HY |
| HY | TS | FG |
| FG | not C, or TL | FY |
| FY | TS | HG |

`ST` is 1 on each of these transitions. This table is the textbook version of
the controller. It is an example only; the method does not depend on it.

For a stand-alone machine, set `USE_ACK_IN = 0`; `ack_in` is then ignored.

## Trains of machines

When machine A drives machine B, connect A's `O` to B's `I` and B's `ack_out`
to A's `ack_in` (with `USE_ACK_IN = 1` on A). A then acknowledges its own
environment only after B has taken A's data or spacer. The alternative is to
leave `ack_in` unused and let the environment combine all acknowledgments
itself, for example in one wide C-element.

## Files

| file | content |
|------|---------|
| `rtl/st_pkg.sv` | `dr_t`, the U/0/1 constants, the traffic-light table function |
| `rtl/c_element.sv`, `c_element_pc.sv`, `c_element_n.sv` | C-elements |
| `rtl/dr_done.sv` | completion detector (OR per line into a C-element) |
| `rtl/st_ms.sv` | self-timed master-slave register |
| `rtl/st_cl.sv` | self-timed combinational block, minterm form |
| `rtl/st_fsm.sv` | top: `st_cl` and `st_ms` in a loop |
| `tb/tb_*.sv` | self-checking testbench for each module |
| `tb/tb_st_fsm_train.sv` | two machines linked through `ack_in` |
| `tb/tb_st_fsm_wire_delay.sv` | the machine's loop with random delays on every state wire |

## Simulating

The testbenches use delays and `wait`, so they need `--timing`. They print
`TB_RESULT checks=N failures=F`. For example:

    verilator --binary --timing --assert -Wno-fatal -Irtl \
        rtl/st_pkg.sv tb/tb_st_fsm.sv --top-module tb_st_fsm -o sim
    ./obj_dir/sim

`-Wno-fatal` is needed because Verilator reports the C-element loops as
warnings. Verilator has no X or U state of its own. The double-rail U is a
normal 00 value, and uninitialised nodes start with arbitrary values, which is
why reset matters.

Each testbench does the following:

- `tb_st_fsm` runs the default machine for 400 transitions from a model written
  in the testbench. It checks:
  - every phase of the cycle above, with inputs arriving and leaving one at a
    time in random order;
  - that a behavioural successor drives `ack_in` with random delays, and that
    `ack_out` never moves ahead of `ack_in`;
  - a reset from a state other than the initial one;
  - that every state and every state change was reached.
- `tb_st_fsm_wire_delay` rebuilds the loop from `st_cl` and `st_ms`. It gives
  every rail of the next-state and present-state wires a fresh random transport
  delay (1 to 15 time units) on each transition. The machine must still follow
  the model. In most transitions the new inputs arrive before the present
  state has reached the logic block, and the block has to wait for it.
- `tb_st_fsm_train` links two small machines as a train. B's acknowledgment
  reaches A over a delayed wire, and A must wait for it.
- `tb_st_ms` checks the register's cycle for 4-bit registers with and without
  `ack_in`.
- `tb_st_cl` checks the "wait for all, hold until all gone" behaviour against
  parity, majority, a constant and the traffic-light table.

## How far to trust it

- **Follows the design:**
  - the data/spacer cycle and its phase rules;
  - the register structure (detectors, `A`/`B`/`W`, master and slave
    C-elements);
  - the C-element gate equations with preset and clear;
  - resetting the slave C-elements and every C-element of the logic block;
  - `W` used as the acknowledgment.
- **Choices of this implementation:**
  - the rail order inside `dr_t`;
  - the minterm form of `st_cl`;
  - the N-input C-element equation;
  - where `ack_in` enters;
  - the table layout;
  - the example table and its sizes.
- **Partly shown by simulation:** inside each module the gates have zero delay.
  Random delays are applied only to the wires between the logic block and the
  register, and between stages of a train. That the circuit tolerates arbitrary
  delays of every gate and wire inside the modules (delay insensitivity) is not
  shown. That property also rests on assumptions about wire forks and signal
  stability that no RTL simulation can check. Gate-level timing simulation, or
  a formal check on the netlist, is needed for that.
- **Not included:** NAND/NOR versions of the gates, and any area or speed
  optimisation of the logic block.
