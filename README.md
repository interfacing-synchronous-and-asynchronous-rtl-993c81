# Asynchronous stages in a synchronous pipeline, run by a stoppable clock

A synchronous pipeline clocks every stage at the worst-case delay of its slowest stage. An
asynchronous (self-timed) stage finishes early when its data allow. This design puts such stages
into an otherwise unchanged synchronous pipeline without any risk of metastability.

The idea is to generate the clock on chip with a **stoppable ring oscillator**. Each
asynchronous module gets a small handshake controller that turns the clock into a four-phase
REQ/ACK handshake. The modules' ACKs are ANDed into **RUN**. While RUN is low the ring cannot
produce its next rising edge: a slow asynchronous computation stretches the clock, and the
registers never sample changing data. Data pass through every module once per cycle, so no
arbitration (mutual exclusion) is needed. The ring is built from the same gates as the logic, so
the whole chip, synchronous part included, speeds up and slows down with temperature, voltage
and process.

Two controllers are provided, side by side in the top module `gsla_top`:

| | basic controller (`basic_interface`) | pipelined controller (`pipelined_interface`) |
|---|---|---|
| intended for | small clock loads (`BUFFERED=0`); large loads with `BUFFERED=1` | large clock buffer networks |
| registers around a module | CLK → module → CLK | CLK → module → **ACK** → CLK |
| REQ falls (precharge) | after CLK rises | after ACK rises, once CLK is low |
| REQ rises (compute) | when precharge ends (ACK low) | when CLK rises |
| RUN | AND of ACKs (buffered if `BUFFERED=1`) | AND of ACKs through an 8-level buffer tree |
| asynchronous modules | `N_ASYNC` = 2 by default | `N_ASYNC` = 1 by default (see below) |

## The stoppable clock

The ring (`stoppable_clock`) is: a NAND that holds the ring during reset, 15 inverters,
**PRECLK**, the clock stop gate with its staticizer, **CLK**, and a feedback inverter back to the
NAND. That is 19 gates with an odd number of inversions.

The clock stop gate (`clock_stop_gate`) is a set/reset state-holding gate:

* CLK is set when PRECLK and RUN are both high;
* CLK is cleared when PRECLK is low;
* otherwise CLK holds its value.

Because CLK holds once it has risen, RUN may fall at any time after a rising edge and up to just
before the next one. The clock therefore stops synchronously: it stays low if RUN is low when
PRECLK rises. It restarts asynchronously: CLK rises one stop-gate delay after RUN rises. A plain
AND gate in this position would instead need RUN to stay high until CLK has fallen.

## One cycle of the basic controller

The asynchronous modules are assumed to be precharged domino logic with a completion signal.
REQ low precharges the module, and ACK falls when precharge is done. REQ high starts the
computation, and ACK rises when the results are valid. The handshake controller
(`handshake_ctrl`) is another state-holding gate. REQ is pulled high when ACK is low (or in
reset), and pulled low when ACK and CLK are both high.

1. CLK rises. The registers after each module capture its results.
2. REQ falls, and the module precharges. Its ACK falls, so RUN falls.
3. REQ rises at once, and computation starts. This happens wherever in the cycle precharge ends;
   half a cycle is not set aside for precharge.
4. CLK falls, driven by the ring.
5. The module raises ACK. When every ACK is high, RUN rises.
6. CLK rises again at whichever comes later: the ring's own period, or RUN plus one stop-gate
   delay.

Rule for the module: the computation must not finish while CLK is still high. Otherwise step 2
would start again and destroy the result. `handshake_ctrl` checks this rule with an assertion.

## Large clock networks: the buffer tree inside the ring

A large chip drives its clock through a tree of ever larger inverters. The outputs of each level
are shorted together, so each level acts as one huge inverter. The reference network has ten
levels (1x, 1x, 2x, 4x, 8x, 32x, 32x, 128x, 512x, 2048x). Its delay is about 3 ns against a
period of about 8 ns: only one pulse is in the tree at a time, but stopping the clock at the
tree's input would act almost half a cycle late.

`buffered_stoppable_clock` therefore makes the tree part of the ring. The ring is the NAND,
7 inverters and 8 tree levels, and then the stop gate, which forms the last two levels (512x
gate and 2048x staticizer) at the leaves and drives the single global clock wire. RUN comes from
near-minimum-size logic, so it must be driven through its own 8-level tree (`buffer_tree`). That
costs over 2 ns from ACK rising to RUN rising.

`basic_interface` with `BUFFERED=1` is this configuration. It works, but the RUN tree sits on the
critical path of every stretched cycle. About 54–57% of the cycle then goes to control overhead.

## The pipelined controller

This is the part that takes the most care.

**Idea.** The slow part of the control loop is the RUN tree. The aim is to overlap it with
precharge. Precharge destroys the module's results, however, and in the basic scheme those
results are needed until CLK rises. So an extra register follows each asynchronous module and
captures its result on the **rising edge of ACK**. From that moment the module is free to
precharge, while RUN travels through its tree.

**Handshake** (`handshake_ctrl_pipelined`):

* CLK high (or reset) sets REQ high, and computation starts with the clock edge.
* ACK high while CLK is low sets REQ low. The result has already been captured, and the module
  now precharges.
* A series device gated by CLK low keeps REQ from being driven both ways. ACK may therefore rise
  before CLK has fallen: REQ then falls as soon as CLK does.

**RUN is a pulse.** ACK is now high only from the end of computation to the end of precharge.
RUN is that pulse, delayed by the RUN tree. CLK must rise while RUN is high. This gives two
rules for every module:

* ACK must fall (precharge done) before CLK rises, because CLK rising starts the next
  computation. `handshake_ctrl_pipelined` asserts this.
* ACK must not fall so early that RUN falls before the ring is ready to raise CLK. If it does,
  the clock stops for good. A module that can be this fast needs a minimum-delay path on its
  completion signal. This costs no performance, because such a module is not the one that sets
  the clock rate.

Take the worst-case corner with the delays used here: a 7.80 ns ring period, RUN rising 2.18 ns
and falling 2.10 ns after ACK, and 0.45 ns through the stop gate. Times are measured from a rising
CLK edge:

* ACK must fall between about 5.25 ns (7.80 - 0.45 - 2.10) and 7.80 ns.
* If ACK rises by about 5.17 ns (7.80 - 0.45 - 2.18), the clock runs free.
* If ACK rises later, the next edge comes at ACK + 2.18 + 0.45 ns.

The test benches model a module whose computation takes at least 4.8 ns and whose precharge
takes 1.16 ns, so they meet both rules.

**Reset.** Each module raises ACK during reset. When reset is released, CLK is low and ACK is
high, so REQ falls and the module precharges, and RUN falls about 2 ns later. The first clock
edge must come after precharge has ended and before RUN falls. With the reset NAND at the head
of the ring, that edge comes about 3.7 ns after release, which is too late. The pipelined
controller therefore places the NAND inside the clock tree (`NAND_POS = 8`, the first tree
level). The first edge then comes 8 gate delays plus the stop gate after release, 2.1 ns at the
worst corner. That lies inside the window at all four corners. The position must be even, so
that reset holds CLK low.

**Several modules.** Because each ACK is a short pulse, the AND of several modules' ACKs is high
only if their pulses overlap. This happens only when the modules finish within about one
precharge time of each other. `pipelined_interface` therefore defaults to one asynchronous
module. It keeps the AND gate, so `N_ASYNC > 1` can be used with modules that meet this
condition. The basic controller has no such limit: its ACKs stay high until the next clock edge.

## Timing and corners

The control gates (`clock_stop_gate`, `handshake_ctrl*`, `ack_and`) are zero-delay logic. All
delay sits in the behavioural models of the ring and the buffer trees. Their parameters (ps)
reproduce characterised cycle times at four corners. The inverter delay is fitted. The stop gate
and RUN-tree delays are the characterised values. The RUN falling delay was not characterised:
it is taken as 2.1 ns at the worst corner and scaled at the others.

| corner | basic ring: INV / STOP → period | buffered ring: INV / STOP / RUN↑ → period | pipelined ring: INV / STOP / RUN↑ → period |
|---|---|---|---|
| 90 °C, 3.0 V, slow (default) | 198 / 750 → 8.232 ns | 205 / 490 / 2320 → 7.950 ns | 203 / 450 / 2180 → 7.802 ns |
| 70 °C, 3.3 V, typical | 122 / 640 → 5.428 ns | 144 / 340 / 1620 → 5.576 ns | 140 / 340 / 1520 → 5.440 ns |
| 25 °C, 3.3 V, typical | 85 / 570 → 4.030 ns | 129 / 300 / 1470 → 4.986 ns | 127 / 300 / 1390 → 4.918 ns |
| 0 °C, 3.6 V, fast | 75 / 480 → 3.510 ns | 94 / 230 / 1100 → 3.656 ns | 94 / 230 / 1030 → 3.656 ns |

The period is 2 × (17 × INV + STOP). The defaults are the worst corner and live in `gsla_pkg`.
The other corners are set through the `INV_PS`, `STOP_PS`, `RUN_RISE_PS` and `RUN_FALL_PS`
parameters of the two controllers (see `tb/corners_tb.sv`). The free-running clock ranges from
about 122 MHz (worst corner) to 285 MHz (fast corner).

Because the handshake gates have no delay here, less of each cycle is lost to control than in a
transistor implementation. The characterised circuits lose roughly 25–35% of the cycle (basic),
54–57% (buffered) and 25% (pipelined). Use the models for function and for the order of events, not
for overhead figures.

## Files

`rtl/`:

| file | what it is |
|---|---|
| `gsla_pkg.sv` | datapath width and the worst-corner delays |
| `gsla_top.sv` | top: pipelined controller (`p_*` ports) beside the basic controller (`b_*` ports) |
| `pipelined_interface.sv` | pipelined controller with its registers |
| `basic_interface.sv` | basic controller with its registers; `BUFFERED=1` for large clock loads |
| `clock_stop_gate.sv` | state-holding clock stop gate (a latch) |
| `handshake_ctrl.sv` | basic handshake controller (a latch), with its timing assertion |
| `handshake_ctrl_pipelined.sv` | pipelined handshake controller (a latch), with its timing assertion |
| `ack_and.sv` | AND of the ACKs |
| `pipe_reg.sv` | rising-edge pipeline register, no reset |
| `stoppable_clock.sv` | behavioural model: 19-gate stoppable ring |
| `buffered_stoppable_clock.sv` | behavioural model: ring containing the clock tree; `NAND_POS` |
| `buffer_tree.sv` | behavioural model: buffer network as a transport delay |

The asynchronous modules and the synchronous logic between stages are not part of the design.
Their signals are ports:

* `stage_in`: data into the register in front of a module;
* `async_in` / `async_out`: the module's input and output;
* `req` / `ack`: the module's handshake;
* `stage_out`: data out of the register after a module, to the next synchronous logic;
* `ack_q`: the outputs of the ACK-clocked registers (pipelined controller only).

`DATA_W` / `WIDTH` = 32 is an arbitrary choice.

**Synthesis.** The three behavioural models contain `#` delays and a deliberate combinational
loop. They are not synthesizable: in silicon the ring is a custom cell, and so are the buffer
trees. The rest is synthesizable. The state-holding gates become latches by intent. The
registers after the asynchronous modules are clocked by ACK, so that clock domain must be
constrained accordingly.

## Simulating

All files use `timeunit 1ps`. Verilator needs `--timing` for the delays and `--assert` for the
handshake rules. For example, the end-to-end test at default parameters:

```
verilator --binary --timing --assert --top-module gsla_top_tb \
  -y rtl -y tb +libext+.sv rtl/gsla_pkg.sv tb/gsla_tb_pkg.sv tb/gsla_top_tb.sv
./obj_dir/Vgsla_top_tb
```

Every testbench ends with `TB_RESULT checks=N failures=M`. Each unit in `rtl/` has `tb/<unit>_tb.sv`.

The larger benches share some pieces:

* `domino_chain_model`: an asynchronous module modelled as a domino buffer chain. Precharge
  takes a fixed time. Computation takes 15 to 31 buffer delays (the range depends on the bench), chosen by the data.
* `pipe_scoreboard`: a cycle-level model of the registers. It checks every value through the
  pipeline and the time of every clock edge: max(previous edge + period, last ACK + RUN delay +
  stop-gate delay), within 30 ps.
* `basic_bench` and `pipelined_bench`: wrappers that put a controller, its module models and a
  scoreboard together.

The main benches are:

* `gsla_top_tb`: both controllers at their defaults. It requires each of these to occur: reset
  holding the clocks, stalled and free-running cycles on both sides, captures into the ACK
  register, and stalls caused by each of the two basic-side modules.
* `corners_tb`: all three configurations at all four corners.

## Where this departs from the circuits it models

* The control gates are zero-delay latches, not the transistor circuits; see *Timing and
  corners*.
* The pipelined controller defaults to one asynchronous module, for the reason given above.
  The pipeline drawings show two modules.
* The exact place of the reset NAND in the pipelined ring (`NAND_POS = 8`) is this design's
  choice. It was checked against the reset window at all four corners.
* A variant of the basic handshake controller adds a gate that hides a rising ACK until CLK
  falls. It is not included. The basic controller instead relies on its timing rule, and an
  assertion checks that rule.
* The buffer trees are single delay elements with separate rising and falling delays. Fan-out,
  shorting bars and load appear only through those delays. The delay is a transport delay, so
  RUN pulses shorter than the tree delay get through.
* Pipeline registers have no reset.
