# De-synchronized latch circuits: replacing a clock with local handshakes

A synchronous circuit built from flip-flops can be turned into an asynchronous
one without touching its logic:

1. Split every flip-flop into its two latches, a master and a slave. They are
   called *even* and *odd* here.
2. Remove the clock.
3. Give every latch group a small handshake controller that decides when the
   group opens and closes.

A controller talks only to the controllers of the latches that feed it and of
the latches it feeds. Each controller has a *matched delay* as slow as the
logic in front of its latch. This makes a latch close only once its input has
settled.

The result behaves like the original in one specific way: every latch stores
exactly the same sequence of values it stored under the clock. This is *flow
equivalence*. Only the timing across the chip changes. A latch whose logic is
fast may run up to one data item ahead of or behind its neighbours. A slow
path no longer sets the pace of a part of the circuit it does not feed.

This repository holds SystemVerilog for that scheme:

* the building blocks: two latch controllers, the C-element join, the
  matched delay with taps, and the latch. One controller is a four-phase
  "semi-decoupled" design. The other is a two-phase design that allows the
  most overlap the rules permit.
* a complete, closed seven-latch example circuit with its datapath, run
  without a clock and checked value by value against the clocked original.
  It is built once with each controller type.
* a 16-stage, 64-bit linear pipeline with handshake ports at both ends.
  This is the size of a DES encryption pipeline, but the stage logic is a
  stand-in.
* the latch-enable generator of a four-stage pipelined processor. It can
  switch between the asynchronous controllers and two external
  non-overlapping clocks.

## Tokens, bubbles and the three rules

Treat each latch enable as a signal `X` with events `X+` (the latch opens) and
`X-` (the latch closes and captures). For every pair of latches where `A`
feeds `B`:

* `A+` and `A-` alternate. So do `B+` and `B-`.
* `B-` must come before the next `A+`. `B` must finish capturing the old value
  before `A` is allowed to change it. Breaking this is a hold violation.
* `A+` must come before `B-`. `B` may only capture once `A` is holding the
  new value. Breaking this is a setup violation: `B` would capture a bubble.

These three rules are all that is needed, and they allow a lot of overlap. For
example, two latches in a row may be transparent at the same time while a data
item ripples through both. In the synchronous circuit, the two phases of the
clock never overlap.

The rules also mean that two adjacent latches never differ by more than one
capture. The testbenches check this "synchronic distance" directly.

Which state the circuit starts in matters:

* **Even latches start transparent.** Their controllers hand their first
  request straight on.
* **Odd latches start closed.** Their datapath value is reset. Only odd
  latches need a datapath reset.

If the starting state is wrong, the circuit either deadlocks or loses its
first data item.

## The semi-decoupled latch controller (`semidec_ctrl`)

This is the part that needs the most care. Every controller is the same
circuit. A parameter `ODD` sets its reset state.

### Handshake signals

A controller has two four-phase channels:

* `ri`/`ai`: request in and acknowledge out, towards the predecessors;
* `ro`/`ao`: request out and acknowledge in, towards the successors.

`en` is the latch enable. High means the latch is transparent.

### Internal state

There are two set/reset memory elements:

```
state: set   when ri_d & ~ro            (close the latch: capture)
       reset when ~ri_d & ro & ao       (open the latch again)
ro:    set   when state & ~ao           (offer the new data downstream)
       reset when ~state & ao           (return to zero once the successor has it)
ai = state,  en = ~state
```

`ri_d` is `ri` after the matched delay.

### One cycle, in words

1. A predecessor raises its request.
2. After the pulse delay, the latch closes and raises `ai`. The predecessor is
   now free to move on.
3. As soon as the successor's acknowledge is low, the controller raises `ro`.
4. The predecessor lowers its request when it has new data in flight. That
   falling edge passes through the logic delay.
5. The latch re-opens only after two more things have happened:
   * the successor has taken the data (`ao` high);
   * this controller's own request is still up (`ro` high).

The second condition in step 5 is the subtle one. When an acknowledge comes
through a C-element join, it can still be high from the previous cycle. The
`ro` term makes sure the acknowledge belongs to the current request. Without
it, a short ring of latches ends up with every latch transparent at once. The
two-latch ring C↔D in the example circuit does exactly that.

### The delay edges

The delay on `ri` is asymmetric:

* The falling edge of the request carries the **logic delay**. That edge
  announces that the predecessor's latch has opened on new data, so the logic
  must settle before this latch may close.
* The rising edge carries the **pulse delay**. This is the minimum time the
  latch stays transparent.

One delay element therefore covers both timing requirements.

### Reset

| | even | odd |
|---|---|---|
| `state` | 0 (transparent) | 1 (closed, `ai = 1`) |
| `ro` | 0 | 0 |

### Assertions

The controller has four assertions on the handshake rules. Each request edge
must find `ai` at the opposite level. Each acknowledge edge must find `ro` at
its own level.

### Where this departs from the published controller

The published controller was described as gates. This one is written as two
behavioural set/reset latches, with the set and reset conditions worked out
from the required event orderings.

The published gate version closes the latch on the request alone. It relies on
a timing assumption: a request out always falls before the next request in
rises. This version keeps the full condition `ri_d & ~ro` and needs no such
assumption.

## The most concurrent controller (`desync_model_ctrl`)

This controller enforces the three rules and nothing more. A latch opens as
soon as every successor has taken its previous value, even if its own new
input has not arrived yet. So a data item can ripple through a chain of open
latches. The semi-decoupled controller instead waits for a full four-phase
return to zero between neighbours.

### Two-phase signalling

Each wire carries one event per transition, whether rising or falling:

* `ro` flips when the latch is open and its input for this round has arrived
  through the matched delay. At that point the latch output is the value it
  will store, and the successors are told.
* `ai` flips when the latch closes. This tells the predecessors their value
  was taken.
* `ri` and `ao` are the neighbours' `ro` and `ai`, joined by C-elements where
  there are several. With two-phase signals, a C-element output flips once
  every input has flipped.

### State conditions

The whole controller is three set/reset latches:

```
open   when closed, ai == ro, and (ao ^ ro) == ODD
valid  when open,   ro == ai, and (ri_d ^ ai) == ODD   -> ro := ~ai
close  when open,   ro != ai, and the minimum pulse has passed
       after closing, ai := ro
```

The `ODD` terms hold the one-event offset between odd and even latches at
reset. An even latch's first input is the reset value of the odd latches,
which is already there. An odd latch must wait for its even predecessors'
first event.

### Delays

* `ri` is delayed by the logic delay on both edges.
* A second delay on `en` sets the minimum pulse width.

### Why `ro` waits for valid data

`ro` is tied to valid data rather than to the opening edge, because real
logic has delay. A latch that opened early is still passing a changing value,
and its successor's logic delay must count from the moment the value is
final.

### Speed

In the seven-latch example, adjacent latches in this version are open
together several times more often than with the semi-decoupled controller.
Both versions store identical value sequences.

### Assertions

Two assertions check that every `ri` and `ao` event is the one the
controller is waiting for.

## C-element joins (`c_element`)

A latch with several predecessors must wait for all of their requests. A latch
with several successors must wait for all of their acknowledges.

An N-input Muller C-element handles this:

* its output rises when all inputs are high;
* its output falls when all inputs are low;
* otherwise it holds.

Its reset value is a parameter. A join starts at the reset level of the
signals it combines.

With the four-phase controller:

* joins of requests start at 0;
* joins of acknowledges from odd latches start at 1;
* joins of acknowledges from even latches start at 0.

With the two-phase controller, every join starts at 0.

## Matched delays and taps (`matched_delay`)

`matched_delay` is a **behavioural model**. It models a delay chain with
separate rise and fall times (`T_RISE_NS`, `T_FALL_NS`). A 2-bit `tap` selects
the full delay, 1/2, 1/4 or 1/8 of it.

In silicon, the longest tap is set about 20% above the static timing result.
Shorter taps are used after fabrication to find how fast the chip still runs.
Selecting a shorter tap makes the whole circuit run faster in simulation. In
hardware it would eventually break setup timing. A new tap value takes effect
at the next edge that goes through the delay.

Each edge is a blocking delay inside a loop. A change on the input while an
edge is still in flight is taken up once that edge has come out.

## The seven-latch example (`desync_fig13`, `fig13_pkg`)

This is a closed circuit of seven 8-bit latch groups:

* even groups: A, C, E;
* odd groups: B, D, F, G.

Their predecessors are:

```
A <- F, G     B <- A     C <- D, G     D <- C
E <- B, D     F <- E     G <- E
```

It contains:

* a pipeline A→B→E→F/G→A;
* a two-latch ring C↔D;
* cross links G→C and D→E.

### Joins

Five controllers need joins:

* requests are joined into A, C and E;
* acknowledges are joined into D, E and G.

### Logic and delays

The logic between the latches is defined in `fig13_pkg::f_next`. It is small
arithmetic chosen so that a lost, repeated or reordered value shows up in the
stored sequences. B copies A unchanged.

Each latch has its own logic delay (`T_LOGIC_NS`), so the network is
deliberately unbalanced.

The parameter `CONCURRENT` selects the controller type for all seven latches:

* 0 selects the semi-decoupled controller;
* 1 selects the most concurrent controller.

The joins and the datapath are the same in both cases.

### How the testbench checks flow equivalence

The testbench computes the clocked reference sequence of every latch
independently. It then compares each asynchronous capture, on each falling
enable edge, against the next value of that sequence.

## The linear pipeline (`desync_pipeline`)

### Structure

Each of the `NSTAGE` stages (default 16) has two `W`-bit latch groups
(default 64 bits):

* a master L1 (even), with the stage logic in front of it;
* a slave L2 (odd), which copies L1.

Every latch group has its own controller. Neighbours are wired directly:

* each controller's `ro` is the next one's `ri`;
* each controller's `ai` is the previous one's `ao`.

No joins are needed. The L1 controllers carry the stage's logic delay
(`T_STAGE_NS`). The L2 controllers carry only the pulse delay.

`CONCURRENT` selects the controller type for all latches:

* 1 (default): the most concurrent controllers, with two-phase ports;
* 0: semi-decoupled controllers, with four-phase ports.

The stage function rotates the value left by one bit and XORs it with a
constant for that stage. It only exists so that a lost, repeated or reordered
value shows up at the output.

### Talking to the pipeline

The producer acts like one more odd latch in front of the pipeline. The
consumer acts like one more even latch behind it. This has two consequences
that are easy to miss:

* **First input.** L1 of stage 0 is transparent during reset. It captures
  whatever is on `in_data` as soon as reset is released, without waiting for
  a request. So the first value must already be on `in_data` at that point.
* **First output.** The first `out_req` event offers the reset value of the
  last L2, which is zero. Results follow after that, in order.

Each later input value is offered with a request event. It must stay stable
until `in_ack` answers:

* two-phase: when `in_ack == in_req`, change the data, then toggle `in_req`;
* four-phase: raise `in_req` with the data and wait for `in_ack` high. Then
  change the data, lower `in_req` and wait for `in_ack` low. The falling
  edge starts the logic delay.

`out_data` is valid from an `out_req` event until `out_ack` answers it.

### Driving it from a clock

A synchronous circuit can feed the four-phase version directly:

* drive `in_req` with its clock;
* change the data on the falling clock edge;
* answer `out_req` after a short fixed delay.

The clock period must be no shorter than the pipeline's own cycle. If the
clock is too fast, the controllers' handshake assertions report it. The
testbench runs this mode at four times the measured cycle.

### Throughput

In the testbench, both versions are fed by environments that wait up to 3 ns
at random before each response. For 60 results, the two-phase concurrent
pipeline needs about 138 ns and the four-phase semi-decoupled one about
224 ns. The four-phase return to zero costs a round trip between neighbours
on every cycle, and the two-phase protocol has no such step.

## The processor clock generator (`aspida_ctrl`, `aspida_pkg`)

### Stages and latch groups

A four-stage latch-based pipeline has the stages IF, ID, EX and MEM.
Write-back is merged into ID, which also holds the register file. Each stage
has a master (L1) and a slave (L2) latch group, which gives eight latch
enables. One controller drives each group:

```
IF.L1  <- ID.L2            IF.L2  <- IF.L1
ID.L1  <- IF.L2 and MEM.L2  ID.L2  <- ID.L1
EX.L1  <- ID.L2            EX.L2  <- EX.L1
MEM.L1 <- EX.L2            MEM.L2 <- MEM.L1
```

ID, EX and MEM form a ring. ID joins two things with C-elements:

* the instruction arriving from IF with the result leaving MEM for
  write-back, on the request side;
* IF and EX, on the acknowledge side of ID.L2.

### Delays

* The L1 controllers carry the stage logic delays (`T_IF_NS` … `T_MEM_NS`).
* The L2 controllers carry only the pulse delay.

### Two modes

The `sync_mode` input selects the clocking, through one multiplexer per
enable:

* **de-synchronized** (`sync_mode = 0`): the enables come from the
  controllers;
* **synchronous** (`sync_mode = 1`): every L1 enable follows `global_l1` and
  every L2 enable follows `global_l2`. These are two non-overlapping clocks
  supplied from outside. This mode is used for scan test and comparison.

The raw controller outputs are also brought out as `ctrl_en`.

The processor datapath itself is not part of this design. Only the clocking
is.

## Top level (`desync_top`)

The top contains:

* the example circuit with semi-decoupled controllers (`ex_q`, `ex_en`);
* the same circuit with the most concurrent controllers (`mc_q`, `mc_en`);
* the 16-stage, 64-bit pipeline at its defaults (`pipe_*` ports);
* the processor clock generator.

They share only `rst` and `tap`. The top has no parameters.

## Timing model and what to expect

With all controllers alike, one full cycle of a latch takes about:

```
latch clock-to-output + logic delay + controller delay
```

The handshake overlaps the computation, because the next latch opens before
the data arrives.

In an unbalanced circuit:

* latches on the slowest path settle to a fixed period;
* all other latches run at the same average rate, with bounded offsets.

`tb_desync_fig13` checks two consequences of this:

* **Constant period.** With every logic delay equal, each latch opens with
  one constant period after start-up. This is 18 ns for 9 ns blocks on the
  full tap.
* **Never slower.** Take an unbalanced copy whose delays are all at most the
  balanced ones. The k-th opening of each of its latches is never later than
  in the balanced copy.

Hold timing needs no separate check. A latch cannot open again until its
successor has closed.

## Simulating

Everything simulates with plain Verilator 5 in timing mode. For example, the
end-to-end test at default parameters:

```
verilator --binary --timing --assert -Irtl \
    rtl/fig13_pkg.sv rtl/aspida_pkg.sv tb/tb_desync_top.sv --top-module tb_desync_top
./obj_dir/Vtb_desync_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_c_element` | random inputs against a reference C-element |
| `tb_matched_delay` | rise and fall delay on every tap |
| `tb_dlatch` | transparency, hold, reset |
| `tb_semidec_ctrl` | directed handshakes, including a stale acknowledge, for both reset states |
| `tb_desync_model_ctrl` | even and odd controllers against random-delay neighbours: close only after the request and logic delay, minimum pulse, open only after the acknowledge, one offer per round |
| `tb_desync_fig13` | both controller types: flow equivalence of all seven latches on two taps, synchronic distance ≤ 1, a very unbalanced delay set, overlap of adjacent latches under the concurrent controllers; a balanced copy for the two timing properties below |
| `tb_desync_pipeline` | full-size pipeline with each controller type: every output against a clocked reference with random-delay producers and consumers; the four-phase copy also driven from a free-running clock; throughput printed |
| `tb_aspida_ctrl` | liveness, hold ordering, drift, period per tap, non-overlapping synchronous enables |
| `tb_desync_top` | whole design at defaults; counts each mechanism (captures in both example circuits, pipeline results against a reference, adjacent latches open together, request and acknowledge joins, tap change, reset mid-run, synchronous cycles, mode switch) and fails if one never occurs |

### Simulator warnings

Verilator reports latches and combinational loops. These are intended: the
controllers and C-elements are asynchronous state-holding circuits. Each
module's opening comment says so.

## Trust and limits

The following are choices made in this design, not taken from a published
source:

* the logic functions, widths and reset values of the example circuit;
* the stage function of the pipeline and its handshake rules at the ports;
* the delay values;
* the exact acknowledge arcs of the processor controllers;
* the controllers written as set/reset behaviour rather than gates;
* the two-phase encoding of the most concurrent controller, with its request
  paced by valid data.

The following are not included:

* the datapath of the processor and its memories;
* the DES round logic and key schedule. The pipeline has the DES core's
  size, latch structure and controller type, but it does not compute DES.
* mixing controller types within one circuit. The rules allow it, but
  `CONCURRENT` sets the type for the whole circuit.
* delays in gates or wires: the matched delays are ideal.

Every timing check is done in zero-delay logic plus these ideal delays. Real
gates would need static timing analysis of the delay chains against the logic.
