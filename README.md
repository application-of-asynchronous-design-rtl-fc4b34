# Microcontroller startup logic: clocked and clockless controllers

When a microcontroller is powered, something has to bring up its core supply
before any clocked logic can be trusted. This design holds the logic that does
it, in two versions that control the same analog cells:

* a **synchronous** controller: a small Mealy state machine on a 20 MHz clock
  with a three-stage synchronizer on every analog status input;
* an **asynchronous** controller: a clockless sequencer whose every channel to
  an analog cell is a 4-phase dual-rail handshake. It draws no dynamic power
  once it has finished, and it can work on a lower supply.

Both do the same job. The chip has two I/O supplies. VDDIO1 is nominally
3.3 V and is "good" above 1.6 V. VDDIO2 is nominally 5 V and is "good" above
3.3 V. The steps are:

1. Once the power-on reset (POR) releases, switch on voltage monitors 1 and 2
   and wait until one supply is good. VDDIO2 wins if both are good.
2. Switch on the bandgap reference on that supply and wait for it. Then switch
   on the regulator on the same supply at its lowest setting (selvdd = 000,
   600 mV).
3. Switch off monitors 1 and 2 and switch on monitor 3, which watches VDDCORE
   with a 1.6 V threshold.
4. Raise selvdd one 200 mV step at a time, each time waiting for the regulator
   to settle, until monitor 3 reports VDDCORE good. With the default cells this
   ends at selvdd = 101 (1600 mV). selvdd never goes past 111 (2000 mV).

The top module `startup_top` places both systems side by side. Each system
has its own supply inputs, its own copy of the analog cell models, and its own
VDDCORE, reset and status outputs.

## Signals and conventions

* Supplies are 16-bit unsigned millivolt values (`power_t` in `startup_pkg`).
* `selvdd` is 3 bits. The regulator output is `600 + 200*selvdd` mV, limited
  to its input supply. It is 0 without a bandgap.
* Threshold comparisons use "at or above".
* Cells are numbered by `cell_e`: MON1, MON2, MON3, REF1, REF2, VREG1, VREG2.
  Both controllers report the enables and selvdd as one `analog_ctrl_t`
  struct.
* All timing is in ns (`timescale 1ns/1ps`).

## The analog cell models (`por`, `voltage_monitor`, `voltage_reference`, `voltage_regulator`)

These are behavioural models, not synthesizable logic. Each counts time in
1 ns steps of an internal tick.

| cell | behaviour | default timing |
|---|---|---|
| `por` | `porneg` is low while both supplies are below 1000 mV. It goes high 100 ns after one supply rises above. | Tpor 100 ns |
| `voltage_monitor` | `ready` comes TReady after enable. `vok` follows the comparison once the result has been stable for TMeasure. `vok` is 0 before ready. | TReady 1000, TMeasure 100 |
| `voltage_reference` | `bandgap`/`ready` come TReady after enable. It needs at least 1000 mV of supply. | TReady 2000 |
| `voltage_regulator` | `ready` comes TStart after turn-on. After a selvdd change, ready drops and returns after TChange. | TStart 20000, TChange 1000 |

The regulator output reaches its new value `TRISE_NS` (500 ns) **before**
ready rises. So when the controller sees ready, monitor 3 has already had
time to measure the new VDDCORE. This matters for the asynchronous controller
(see below).

`analog_cells` wires one POR, three monitors, two references and two
regulators:

* monitor 1 on VDDIO1 (1600 mV), monitor 2 on VDDIO2 (3300 mV), monitor 3 on
  VDDCORE (1600 mV);
* reference and regulator 1 on VDDIO1, reference and regulator 2 on VDDIO2;
* VDDCORE is the larger of the two regulator outputs.

## The synchronous controller (`startup_logic_sync`)

The states are RESET → MON_ON → MON_SELECT → REF1_ON/REF2_ON →
VREG1_ON/VREG2_ON → INC ⇄ INC2. The enables and selvdd are registered outputs
computed by the next-state logic (Mealy). `porneg` low resets everything
asynchronously.

All ten status inputs pass through `input_synchronizer` (three flip-flops by
default). A change of an input therefore acts on the state at the fourth
clock edge.

INC raises selvdd when four things hold:

* the enabled regulator is ready;
* monitor 3 is ready;
* monitor 3 reports VDDCORE not yet good;
* selvdd is below 111.

INC2 gives monitor 3 time to see the new voltage. It returns to INC only once
the synchronized regulator ready has dropped. Without that condition, the
ready flag still in the synchronizer would allow a second step before the
regulator had reacted.

## The asynchronous controller

### Channels and data encoding

Every channel is 4-phase:

1. request (or valid data);
2. acknowledge;
3. return to zero;
4. acknowledge low.

Data is dual-rail: bit *i* is sent as `dt[i]` (a 1) or `df[i]` (a 0), and
all-zero is the spacer. The controller is the active side on every channel
except the supply choice.

| channel | controller | cell side | module |
|---|---|---|---|
| enable of each cell (7 × 1 bit) | push | passive push | `passive_push_if` |
| selvdd (3 bits) | push | passive push | `passive_push_if` (WIDTH 3) |
| ready of each cell (7) | passive sync | active sync | `sync_interface` |
| which supply is good (1 bit) | passive input | active push | `active_push_if` |
| vok of monitor 3 | pull | passive pull | `passive_pull_if` |

`porneg` is the controller's activation request, and `done` is its
acknowledge. `porneg` also clears the interface latches, so a power-down
leaves every cell disabled.

### Interface circuits (the hardest part to get right)

**`passive_push_if`** has one set/reset latch per bit: `dt` sets it, `df`
clears it, and the spacer leaves it alone. So the analog cell keeps seeing
the last value pushed. A bit acknowledges only when the latch already holds
the value on its rails: `(dt & q) | (df & ~q)`. The word acknowledges when
every bit does. So ack means "the cell has the new value", not merely "the
rails are valid".

**`sync_interface`** turns a level (`ready`) into one request event.
`pulse_gen` makes a short pulse on the rising edge of ready and feeds one
input of a C-element. The other input is `activate & ~ack`. The output
(`req`) rises with the pulse and falls after ack. The pulse must outlast the
acknowledge path; its width is `PULSE_NS`, 2 ns by default. A regulator that
settles again after a selvdd change gives a new rising edge of ready, and so
a new request.

**`passive_pull_if`** answers a pull with `dt = req & v` and `df = req & ~v`.
By default (`LATCHED = 1`) the level `v` comes from a latch that is
transparent while `req` is low and holds while `req` is high. A vok that
changes during a pull therefore cannot break the dual-rail code.

**`active_push_if`** decides which supply was good first. The two requests
are `vok & ready` of monitor 2 and of monitor 1, and they go to a `mutex2`.
Monitor 2 is on the mutex's first input, so it wins a tie.
Each grant goes through a pulse generator into a C-element, gated by
`activate & ~ack` as in the sync interface. The grant for monitor 2 drives
`dt` (value 1) and the grant for monitor 1 drives `df` (value 0). The push
happens once per power-up: the grant holds, so the C-element can fire again
only after a new pulse.

**`c_element`** is a latch that takes the common value of its inputs when
they agree. **`mutex2`** is two cross-gated latches. Grant 1 wins a tie, and
grant 2 waits for request 1 to fall. An assertion checks that the two grants
are never both high.

### The sequencer (`startup_logic_async`)

Each channel has a small port that performs one complete handshake while its
`go` input is high and then reports `done`:

* `hs_push_port` for enables and selvdd;
* `hs_sync_port` for readies;
* `hs_input_port` for the pushed supply choice;
* `hs_pull_port` for vok3.

The step (`async_step_e`) is held in a latch that follows an `always_comb`
next-step function. Every working step is followed by a "return" step
(suffix `_R`). In a return step all `go` inputs are low, and the sequencer
waits until every port has cleared `done`. That way no step can see a `done`
left over from the previous one.

The program is:

1. Push enable = 1 to monitors 1 and 2, and take both ready events.
2. Accept the supply choice.
3. Enable the chosen reference and wait for its ready.
4. Enable the chosen regulator.
5. Disable monitors 1 and 2.
6. Enable monitor 3 and wait for its ready.
7. Loop:
   * while the last vok3 value is 0, push `count+1` on selvdd (saturating at
     111);
   * wait for the regulator's ready event;
   * pull vok3.
8. When vok3 is 1, raise `done` and hold until `porneg` falls.

Two rules keep the ports safe against a zero-delay simulator and against
races between latches:

* The input and pull ports capture the data latch (`value`) first. They set
  their `got` flag only once the captured value equals the rail that is
  high. So ack cannot run ahead of the data.
* `count` is two latches: the incremented value is captured while it is
  pushed, and it is copied back while the controller waits for the
  regulator. The adder therefore never feeds back on itself.

The controller has no delay element for monitor 3. This relies on VDDCORE
crossing the threshold before the regulator reports ready, as the regulator
model does. A regulator that reports ready first would cause one extra selvdd
step.

### Latches and loops

The asynchronous parts are built from level-sensitive latches and feedback.
This is intended, and each module's header says so. Lint reports them as
latches, and reports non-blocking assignments inside latches. Synthesizing
these modules for a real chip needs an asynchronous flow: hazard-free
C-elements, a real mutex, and a delay-matched pulse generator.

## Where this design departs from its source description

* **INC2.** Here INC2 → INC waits for the synchronized regulator ready to
  drop. In the original it is unconditional.
* **Saturation.** selvdd saturates at 111 in both controllers. One earlier
  code listing stopped at 110; the written description was followed.
* **Asynchronous controller circuit.** The original was compiled from a
  higher-level handshake language. Here the same program is written by hand
  as a latch-based sequencer. Its size and its gate-level structure will
  differ.
* **Not built.** The optional external delay cell on the vok3 loop, and the
  earlier, larger variants of the asynchronous controller.
* **Oscillator.** Not modelled. The clock is an input of the top.
* **Model details that are this design's own choices.** The supply width, the
  ≥ comparison, the minimum supply of the references, `TRISE_NS`, the pulse
  width, and VDDCORE as the maximum of the two regulator outputs.

## Simulating

Every testbench in `tb/` checks itself. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/startup_pkg.sv \
    tb/tb_startup_top.sv --top-module tb_startup_top -Mdir obj
./obj/Vtb_startup_top
```

Use the same command for any `tb_<module>.sv`.

`tb_startup_top` runs the top at its default parameters and applies the same
supplies to both systems. It runs six power-ups, each after a power-down
that must reset everything:

* VDDIO1 only;
* VDDIO2 only;
* both;
* a supply that is too low at first, so both controllers must wait, then
  rises;
* both supplies ramping together in 18 µs steps of 500, 900, 1500 and
  2000 mV. The POR releases at 1500 mV, and only VDDIO1 ever becomes good;
* VDDIO1 sagging to 1300 mV after the regulator starts. VDDCORE cannot reach
  1600 mV, selvdd must stop at 111, and the asynchronous controller must not
  finish.

It counts each mechanism: waiting, both paths, selvdd steps, INC2, reset,
saturation and completion. It fails if any mechanism never happened. Each run
takes about 45 µs of simulated time.

The unit testbenches check the timing given for each cell:

* POR: 100 ns;
* monitor: 1000 ns and 100 ns;
* reference: 2000 ns;
* regulator: 20 µs and 1 µs;
* synchronizer: three-cycle latency.

They also check the handshake order of every interface.
`tb_startup_logic_async` plays all channel partners of the clockless
controller itself.

## Limits

* The analog models are idealized: supplies are step changes, and there is no
  noise or hysteresis.
* Metastability and arbitration time are not modelled. The mutex decides
  instantly, and the synchronizer is only as good as its stage count.
* The asynchronous circuits have been verified only in a zero-delay
  simulation with the unit delays of the pulse generators. Gate and wire
  delays of a real layout are not covered.
