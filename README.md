# Active quench and reset circuit with digital hold-off control for Geiger-mode APDs

A Geiger-mode avalanche photodiode (GM-APD) is biased a few volts above
breakdown, so a single absorbed photon sets off a self-sustaining avalanche.
The circuit around it must then do three things: **quench** the avalanche by
pulling the bias below breakdown, **hold it off** there long enough for trapped
charge to drain (otherwise the trapped charge fires false "afterpulses"), and
**reset** the bias so the diode can detect the next photon. The hold-off time is
a trade-off: too short gives afterpulsing, too long throws away count rate. It
must therefore be tuned for each diode.

This design sets the hold-off time digitally and linearly. An 8-bit code
`Input7..Input0` selects the hold-off as *code × one ring-oscillator period*.
The period is about 6.5 ns, so codes 1 to 255 span 6.5 ns to about 1.66 µs. The
same signal that ends the hold-off also starts the reset, so no second
monostable or pulse generator is needed.

## Signal flow

```
 APD cathode ──► comparator ──compo──┬──────────────► ring oscillator ──osc──┐
 (real, volts)   (Vref on + input)   │                                        │
                                     │          ┌── Node A = Rn ──► clock gate ◄┘
                                     │          │                      │ cnt_clk
                                     ├──clear──►│  8-bit J-K counter ◄─┘
                                     │          │        │ Q7..Q0
                                     │          │  XNOR with Input7..Input0 ─► Rn (low on match)
                                     │          │        │
                                     └──► Qp = compo·Rn  │──► reset buffers ──► pmos_gate_n
                                          (NMOS: quench)        (PMOS: reset, on when low)
```

| Signal | Meaning |
|---|---|
| `compo` | Comparator output. High while the cathode is below `Vref`, that is from the avalanche until the reset has recharged the cathode. |
| `qp` | Quench pulse. Drives the NMOS that shorts the cathode to ground. |
| `rn` | Code match, active low. Low once the counter has reached the code. |
| `node_a` | Counter clock enable. Equal to `rn`. |
| `pmos_gate_n` | `rn` after the buffer delay. Drives the PMOS that recharges the cathode to Vdd. |

## One detection cycle

1. **Idle.** The cathode is at Vdd (armed), `compo` = 0, the oscillator is
   stopped and the counter is held at 0. With a non-zero code `rn` = 1, so
   `qp` = 0 and the PMOS is off.
2. **Avalanche and quench.** The avalanche current through the sensing resistor
   pulls the cathode below `Vref`, and `compo` rises. At once `qp` rises and the
   NMOS grounds the cathode. The oscillator starts, and the counter leaves its
   clear state.
3. **Hold-off.** The counter advances by one on every oscillator period. `qp`
   stays high until the count equals the code.
4. **End of hold-off.** On the match, `rn` falls. This does three things:
   * `qp` falls, which ends the quench.
   * Node A blocks the oscillator clock. The counter freezes on the code, so
     `rn` stays low for the rest of the cycle although the oscillator is still
     running.
   * After the buffer delay, the PMOS turns on. Because of that delay, the NMOS
     is always off before the PMOS turns on.
5. **Reset and re-arm.** The cathode recharges past `Vref` and `compo` falls.
   This stops the oscillator and clears the counter. The count no longer
   equals the code, so `rn` rises and the PMOS turns off after the buffer
   delay. The diode is armed again.

The Node A clock gate (step 4) is what makes the reset automatic. Without it the
counter would run past the code, `rn` would rise again one period later, and
the reset would be cut short while `compo` is still high.

**Hold-off timing.** In these models the oscillator rests high when stopped and
produces its first rising edge one full period after it is enabled. The counter
therefore reaches `code` exactly `code × 6.5 ns` after `compo` rises, and that
is also the width of `qp`. Measurements on the fabricated chip fit this closely:

| Code | Measured | `code × 6.5 ns` |
|---|---|---|
| 29 (`00011101`) | 190 ns | 188.5 ns |
| 50 (`00110010`) | 326 ns | 325 ns |
| 181 (`10110101`) | 1.18 µs | 1176.5 ns |
| 255 (`11111111`) | > 1.6 µs | 1657.5 ns |

**Code 0 is not a valid setting.** The counter rests at 0, so with code 0 `rn`
would be low permanently and the PMOS would stay on. Use codes 1 to 255.

**Dead time.** The dead time is the shortest spacing between two counted
avalanches, for example under saturating light. It is the hold-off plus the
analog delays: the comparator, the buffer chain and the cathode recharge. The
chip measured 28.4 ns at code 1 (35.2 Mcounts/s). The delays in these models
are not calibrated to the chip, and the testbench front end gives about 16 ns
instead. The digital behaviour does not depend on them.

## Modules

| File | Kind | What it is |
|---|---|---|
| `rtl/aqr_pkg.sv` | package | Shared constants: `COUNT_W` = 8, `OSC_PERIOD_NS` = 6.5, the model delays, Vdd and Vref |
| `rtl/aqr_ic.sv` | top | Wires the blocks below into the circuit above |
| `rtl/hold_off_counter.sv` | RTL | `WIDTH`-bit synchronous up-counter built from `jk_flip_flop` cells; asynchronous clear from `compo` |
| `rtl/jk_flip_flop.sv` | RTL | Rising-edge J-K flip-flop with active-low asynchronous clear |
| `rtl/code_match.sv` | RTL | Per-bit XNOR of count and code, combined into the active-low `rn` |
| `rtl/quench_control.sv` | RTL | `qp = compo & rn`, `node_a = rn`, `cnt_clk = osc & node_a` |
| `rtl/ring_oscillator.sv` | behavioural model | Gated oscillator with a 6.5 ns period, running while `compo` is high |
| `rtl/avalanche_comparator.sv` | behavioural model | Real-valued comparator with a 2 ns transport delay |
| `rtl/reset_buffers.sv` | behavioural model | 2 ns non-inverting delay from `rn` to the PMOS gate |

The counter follows the classic synchronous J-K structure. All stages share one
clock and have J tied to K. Stage 0 toggles on every edge, and stage *i*
toggles when Q0 to Q(i−1) are all 1, which gives a plain binary up-count. The
counter, the comparator logic and the control gates are synthesizable.

The oscillator, comparator and buffer chain are analog on silicon, so they are
modelled behaviourally here, with delays and fork/join. To build silicon, replace
them with an inverter-ring oscillator trimmed to the step you want, a real
comparator and a buffer chain. The APD, its sensing resistor and the two switch
transistors are outside `aqr_ic`: the cathode voltage comes in on a `real`
port, and the two gate drives go out.

### `aqr_ic` ports

| Port | Dir | Type | Meaning |
|---|---|---|---|
| `v_cathode` | in | `real` | APD cathode voltage, in volts |
| `v_ref` | in | `real` | Comparator reference, in volts (2.5 V in the testbenches) |
| `code` | in | `logic [7:0]` | Hold-off code `Input7..Input0` |
| `qp` | out | `logic` | NMOS quench gate |
| `pmos_gate_n` | out | `logic` | PMOS reset gate, active low |
| `compo` | out | `logic` | Comparator output, brought out for observation |
| `rn` | out | `logic` | Match signal, brought out for observation |

## Where this departs from, or adds to, the original circuit

* **Gate functions.** The logic functions of the Qp gate, the Node A clock gate
  and the Rn gate are taken from the circuit's described behaviour. They are
  written as AND / AND / NAND-of-XNORs. The transistor-level gates on the chip
  may differ in polarity, for example a NAND followed by an inverter.
* **Node A.** Node A is taken to be `rn`. Only its behaviour is known: it goes
  low at the match and blocks the clock.
* **Counter carry chain.** The counter uses an AND carry chain. A
  binary 0-to-255 count needs one.
* **Invented values.** The comparator delay (2 ns), buffer delay (2 ns) and
  `Vref` (2.5 V) are placeholders. Vdd = 3.3 V follows from biasing the diode at
  30 V with −26.7 V on its anode.
* **Oscillator phase.** The oscillator's rest level and start-up phase are model
  choices. A real ring oscillator may add a fraction of a period of offset to
  every hold-off.
* **Clock and clear edges.** The counter counts on rising `cnt_clk` edges and
  clears on `compo` low. Neither edge is specified for the original circuit.

## Testbenches

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb/tb_aqr_ic.sv` | End to end at default parameters, with the behavioural front end `tb/apd_frontend_model.sv`. Checks hold-off = code × 6.5 ns for codes 29, 50, 181 (each within 3 % of the measured value), 1, 255 (> 1.6 µs) and random codes. Also checks that the counter freezes on the code during reset, that the PMOS turns on only after Qp has fallen, and that the circuit returns to idle. A photon arriving during hold-off must be ignored. Finally, under saturating light at code 1, the dead time must be constant. Each of these mechanisms is counted and must occur at least once. |
| `tb/tb_aqr_ic_code_sweep.sv` | Every code from 1 to 255: the width is exactly code × 6.5 ns, with 6.5 ns between consecutive codes |
| `tb/tb_hold_off_counter.sv` | Two full turns of 0 to 255 and wrap-around; the asynchronous clear, including while clocked |
| `tb/tb_jk_flip_flop.sv` | Random J/K against the characteristic equation; the asynchronous clear |
| `tb/tb_code_match.sv` | Exhaustive over all 65 536 count/code pairs |
| `tb/tb_quench_control.sv` | Exhaustive truth table |
| `tb/tb_ring_oscillator.sv` | The n-th rising edge comes at n × 6.5 ns; stops immediately and restarts |
| `tb/tb_avalanche_comparator.sv` | Polarity and delay in both directions; a moving reference |
| `tb/tb_reset_buffers.sv` | Delay on both edges, for many pulse widths |

The front end `tb/apd_frontend_model.sv` steps the cathode voltage in 50 ps
increments:

* When the NMOS is on (`qp` high), it pulls the cathode toward 0 V at 3.3 V/ns.
* When the PMOS is on (`pmos_gate_n` low), it pulls the cathode toward Vdd at 0.5 V/ns.
* An avalanche with neither switch on pulls the cathode down to 2.0 V.

A photon starts an avalanche only if the cathode is above 3.0 V. The model also
counts any time step in which both switches are on.

### Running with Verilator

All files carry `` `timescale 1ns / 1ps ``. Timing must be enabled, because
the models use delays. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/aqr_pkg.sv tb/tb_aqr_ic.sv \
          --top-module tb_aqr_ic -Mdir obj_aqr -o sim
./obj_aqr/sim
```

Replace `tb_aqr_ic` with any other testbench name. Verilator finds the other
modules through `-Irtl -Itb`. A lint run of the synthesizable parts alone
works too:
`verilator --lint-only -Wall -Irtl rtl/aqr_pkg.sv rtl/hold_off_counter.sv`.

Each run takes a second or two. Lint reports a few warnings that are expected:

* unused package constants, which only the testbenches use;
* the unconnected `q_n` outputs of the counter cells;
* the `node_a` net in `aqr_ic`, which is used inside `quench_control` but not at
  the top level.

### Changing the design

* **Step size.** Change `OSC_PERIOD_NS` in `aqr_pkg`. On silicon this is the
  number of ring-oscillator stages.
* **Range.** Change `COUNT_W` in `aqr_pkg`. The counter and comparator follow
  it; the testbench code lists assume 8 bits.
* **Dead time.** The dead time is set by `COMP_DELAY_NS`, `BUF_DELAY_NS` and the
  front end's slew rates.
