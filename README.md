# Timing-error-tolerant capture stage with clock gating

Lower supply voltages, faster clocks, process variation and aging can make a
combinational path miss its clock edge now and then. This design lets a
pipeline register take in data that arrives **after** the rising clock edge
and still deliver it in the same cycle. It does not stretch the clock, replay
the operation or stall the pipeline. The mechanism is local and small:

* a **transition detector** watches the data input of the capturing
  flip-flop and raises `Er` for a short time after each transition;
* the capturing flip-flop is a **master-slave pair of latches** whose master
  latch has its own clock `CM`;
* a **master clock generator** sets `CM = not CLK or Er`. When a transition
  arrives during the high clock phase, the master latch opens again. The
  slave is transparent in that phase, so the late value goes straight
  through to the output.

The whole stage is fed by a **clock gate**. With the enable low, neither
flip-flop nor the error logic sees a clock edge, which saves clock power
while the stage is idle.

## Structure

```
                     path_src                path_dst (In)
  d --> [launch_ff] ----------> (your logic) ------+-------------> [capture_msff] --> q
            ^                                      |                 ^ CM     ^ slave
            |                                      v                 |        | clock
            |                          [transition_detector]         |        |
            |                                      | Er              |        |
            |                                      v                 |        |
            |                             [master_clock_gen] --------+        |
            |                                      ^ clock                    |
  clk,en -> [clock_gate] --- gclk -----------------+--------------------------+
```

| Module | Kind | Role |
|---|---|---|
| `tet_top` | RTL (contains one behavioural model) | one error-tolerant stage, wired as above |
| `clock_gate` | RTL | `gclk = clk & en`; `en` may change only while `clk` is low (asserted) |
| `launch_ff` | RTL | rising-edge launching flip-flop (Flip-flop 1) |
| `transition_detector` | behavioural model | `Er` high for `DELAY_NS` after each transition of `In` |
| `master_clock_gen` | RTL | `cm = ~clk \| er` |
| `capture_msff` | RTL (two latches) | master transparent while `cm`, slave while `clk` |

The combinational logic between the two flip-flops is not part of
`tet_top`. Its input comes out of the stage as `path_src`, and its output goes
back in as `path_dst`. Put your own logic between them. In simulation the
testbenches use a delayed wire there.

## How a late transition is corrected

Take a 10 ns clock that is high for 5 ns. Let data be launched at edge *k*.

1. **In time.** The data settles while the clock is low. The master latch
   is open (`CM` = 1) and takes it. At edge *k+1*, `CM` falls, the master
   closes and the slave passes the value to `q`. This is an ordinary
   flip-flop. `Er` pulses too, but it does nothing because `CM` is already
   high.
2. **Late.** The data settles δ ns after edge *k+1*, while the clock is
   high. The master has already closed on the old value, and `q` shows that
   old value. The transition makes `Er` rise, so `CM` rises, the master opens
   and the new value passes through the open slave to `q` at time
   *k+1 + δ*. When `Er` falls, the master closes on the new value.
3. **Back to back.** If stage A corrects late data, its output changes δ
   into the cycle. The next stage's path therefore starts late and may also
   arrive after its edge. That stage corrects it in the same way. The delay
   is absorbed ("borrowed") by the following stage instead of being handled
   by the system clock.

### Timing rules that follow from this

These come from the mechanism. The design does not give them as figures.

* **Correction window.** Data can be corrected if it settles before the
  clock falls. Data that settles in the following low phase looks like
  new data for the next edge, and the error goes unnoticed.
* **Minimum path delay.** `Er` cannot tell late data from new data that
  arrives too early. A path that changes during the high phase of the cycle
  that launched it would be passed through a cycle too soon. Every path into
  a capturing flip-flop must therefore be slower than the high phase (here
  longer than 5 ns). Add delay to short paths if needed.
* **Er width.** `Er` lasts `DELAY_NS` (default 1 ns). It must be long enough
  for the master and slave latches to pass the value. It should end before
  the clock falls, so that the master is not kept open into the next low
  phase. That last point is harmless in this model but costs hold margin in
  silicon.
* **Clock enable.** `clock_gate` is a plain AND gate with no enable latch.
  `en` must change only while `clk` is low, or `gclk` glitches. An
  assertion in the module reports a violation.

## Where this implementation chooses for itself

* Data is one bit wide, as in the block diagram.
* Both flip-flops have an asynchronous active-low reset `rst_n`.
* The gated clock drives Flip-flop 1, the slave latch and the master clock
  generator.
* The `Er` pulse is brought out of `tet_top` as a status output. The design
  itself only uses it inside the stage.
* The function of the detector and the master clock generator is stated
  above. The exact gate networks used in silicon are not reproduced.
* A *bit-flipping* variant, which corrects an error by complementing the
  flip-flop output, is sometimes described for this class of circuit. It is
  not built. This design uses only the transparent-window mechanism above.

## What cannot be trusted from RTL

`transition_detector` depends on the propagation delay of a buffer chain. It
is a behavioural model with a transport delay, so synthesis sees only a
constant. A real implementation needs a custom cell, or a characterised
delay line followed by an XOR-type comparison. All the timing arguments above
are about analog delays. The RTL simulations check the logic of the
mechanism under delays chosen by hand, not real timing. Power and path-delay
figures can only come from circuit simulation. The reference transistor-level
results for this style of circuit are about 1.34 mW and a 41.8 ns delay,
against 3.84 mW and 72.1 ns for an earlier design without clock gating.
Those numbers are not reproduced here.

The latches in `capture_msff` are intended, so lint tools report latch
inference on `m` and `q`.

## Parameters

| Parameter | Module | Default | Meaning |
|---|---|---|---|
| `TD_DELAY_NS` | `tet_top` | 1.0 | width of the `Er` pulse (transition detector delay), ns |
| `DELAY_NS` | `transition_detector` | 1.0 | same, on the detector itself |

## Simulation

Every file in `rtl/` and `tb/` carries `timescale 1ns/1ps`. The testbenches
need Verilator's timing support. For example, for the end-to-end test:

```
verilator --binary --timing --assert --top-module tet_top_tb \
    -y rtl -y tb +libext+.sv tb/tet_top_tb.sv -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it shows |
|---|---|
| `clock_gate_tb` | gated clock equals clock while enabled, low otherwise; edge count |
| `launch_ff_tb` | capture on the rising edge, hold, asynchronous reset |
| `transition_detector_tb` | pulse after every transition, its width, none on a steady input |
| `master_clock_gen_tb` | all input combinations of `CM` |
| `capture_msff_tb` | ordinary flip-flop behaviour, late data taken inside a reopened window, blocked outside it |
| `tet_top_tb` | 2000 cycles of the stage at default parameters. Path delays are random, some normal and some late, and the enable is random. Every cycle is checked against a reference model. It counts normal captures, corrected late data, `Er` pulses in the high phase, gated cycles and resets, and fails if any of them never happens. |
| `tet_borrow_tb` | two capturing stages in a row. Stage A's late output makes stage B late in the next cycle (back-to-back errors). Both stages are checked every cycle. |

In `tet_top_tb` about a third of the launches arrive late. An ordinary
flip-flop would have captured the wrong value in each of those cycles. The
stage delivers the right value every time.
