# Synthesizable digital LDO with a voltage-to-time comparator

A low-dropout regulator (LDO) holds an output Vout at a reference Vref, fed from a
slightly higher supply Vin. A digital LDO does this with a bank of PMOS switches between
Vin and Vout and a controller that sets how many of them conduct. A conventional design
decides "Vout too high or too low?" with an analog voltage comparator. That comparator
needs careful hand layout, because its offset sets the regulation accuracy.

This design has no voltage comparator. The comparison is done in the time domain, using
only standard cells:

* One pulse train goes into two identical 128-inverter chains at the same moment.
* One chain is powered by Vref and the other by Vout. Inverter delay falls as the supply
  rises, so each chain is a voltage-controlled delay line (VCDL).
* At the end of the chains, a single D flip-flop decides which pulse arrived first. The
  Vout chain feeds its D pin and the Vref chain (through a buffer) its clock pin. This is
  a bang-bang phase detector. Its output is HIGH when Vout > Vref and LOW when
  Vout < Vref.
* A proportional-integral (PI) controller, clocked by the same pulse train, turns that one
  bit into a 7-bit count. A thermometer decoder expands the count into 128 gate signals
  for 128 identical PMOS switches.

The two chains have the same layout, so they have no systematic offset between them.
The prototype this RTL models was a 65 nm CMOS regulator: Vin = 1.0 V, Vout = 0.8 V,
10 mA maximum load, an off-chip 220 pF output capacitor, and a 10.4 MHz internal clock.

```
 freq_sel ─► clock_pulse_gen ──clk/pulse──┬──────────────┬───────────────┐
             (ring osc, 16-FF divider,    │              │               │
              16:1 mux)                   ▼              ▼               │
                               inverter_chain   inverter_chain           │
                                 (Vref supply)   (Vout supply)           │
                                      │ inn           │ inp              │
                                      ▼               ▼                  ▼
                                     bang_bang_pd ──pd_out──► ldo_digital_controller
                                                               (PI + therm_decoder)
                                                                      │ sw_gate_n[127:0]
                                                                      ▼
                                        Vin ──► pmos_switch_array ──► Vout (off-chip C, load)
```

## The control loop and its timing

This is the least obvious part of the design, so it comes first.

The clock and the pulse train are **the same signal**. Take one rising edge n of `clk`:

1. The edge goes into both delay lines. At 800 mV each line takes about 1.28 ns in the
   model used here, and longer at lower supplies.
2. When the Vref line's edge reaches the flip-flop clock, the flop stores the Vout line's
   level. `pd_out` now reflects the sign of Vout − Vref at about edge n.
3. At edge n+1 the controller takes `pd_out` as Input = −1 (HIGH) or +1 (LOW). It then
   updates
   `Intg[n] = Intg[n−1] + KI·Input` and `Output[n] = Intg[n] + KP·Input`.
4. Right after edge n+1 the registered 7-bit `code` changes, and so do the 128 gates.

So there is one clock of delay between the comparison and the action. This is the z⁻¹ of
the loop. The line delay must be shorter than the clock period. At 10.4 MHz (96 ns) it
easily is. At the fastest taps (666 and 333 MHz) the pulses overlap inside the lines,
which still works as a delay comparison.

The proportional term (KP = 1) exists for stability. With an integral path only, the
loop's phase margin is small and it tends to oscillate. KP adds an immediate one-step
correction on top of the integral value.

Saturation: both `intg` and `code` are clamped to 0…127. Under overload the code sits at
127 and does not wrap to 0. The integrator does not wind up beyond 127, so it recovers
as soon as the load drops.

## Code to switches

`therm_decoder` maps code c to gate bits 0…c LOW, so c+1 switches conduct. The bits are
active low because each bit drives a PMOS gate directly. A 7-bit code then covers all 128
switches. The price is that one switch always conducts, even at code 0. The original
design states 7-bit code, 128-bit thermometer code and 128 switches, but not the exact
mapping; this mapping is this design's choice.

## Clock and pulse generator

* `ring_oscillator`: a free-running ring, modelled behaviourally. Its period is 0.7512 ns
  (1331 MHz).
* `ripple_divider`: 16 toggle flip-flops, each feeding Q̄ back to D. Each flop is clocked by
  the rising edge of the previous Q, so tap k runs at f_ring / 2^(k+1). Counted from reset,
  the taps read (−n) mod 2^16 after n ring edges: it is a down counter.
* `clock_mux`: a 16-to-1 mux with the 4-bit `freq_sel`.

The divider count, the mux size and the 4-bit select follow the original. The ring
frequency is this design's choice. It puts the 10.4 MHz operating clock at `freq_sel = 6`
(96.15 ns) and the fastest tap at 666 MHz. In a system-on-chip, this generator can be
replaced by any existing clock.

## Behavioural models of the analog cells

The cells below are analog, so they are behavioural models (`real` values in mV and µA,
and `#` delays). They simulate with Verilator's `--timing`, but they do not synthesize.
Every constant in them is an estimate made for this RTL. None comes from measured silicon.

| model | behaviour | constants |
|---|---|---|
| `vcdl_inverter` / `inverter_chain` | transport delay per stage `T·(V/(V−Vth)²)` normalised to 800 mV | 10 ps/stage at 800 mV, Vth = 350 mV, 128 stages |
| `inverter_chain` | output held LOW when its supply is below the detector's logic threshold | 500 mV (Vin/2) |
| `pmos_switch_cell` | triode conductance, current limited in saturation, off when gate HIGH | 0.5 µA/mV, Vdsat = 300 mV (100 µA at 200 mV dropout) |
| `pmos_switch_array` | sum of 128 cells | 12.8 mA at 200 mV dropout |
| `ring_oscillator` | toggles every half period | 0.7512 ns |

The logic-threshold clamp models a real limitation: the pulse leaving a chain swings only
to that chain's supply. If Vref is below the threshold of the Vin-powered flip-flop, the
detector is never clocked and regulation stops. Vref therefore has a lower limit.

The off-chip capacitor and load are not part of the RTL. The testbench model
`tb/ldo_output_node.sv` is a 220 pF capacitor in parallel with a resistor R = Vout/Iload,
integrated every 0.5 ns.

## What is synthesizable

The following are plain synthesizable RTL: `ldo_digital_controller`, `therm_decoder`,
`bang_bang_pd`, `ripple_divider` and `clock_mux`. In the original flow only the controller
went through logic synthesis. The other parts were generated directly as netlists of
standard cells, with the PMOS switch added to the cell library as an inverter cell without
its NMOS. `bang_bang_pd` and `ripple_divider` are clocked by data-derived clocks, and that
is the intent: the detector is clocked by the Vref line and each divider stage by the
previous stage.

`sdldo_top` and `clock_pulse_gen` contain behavioural models, so as wholes they are
simulation models.

## Departures and open points

* The following are not given by the original and are chosen here: KI = 1, the
  code-to-switch mapping, the clamping, the asynchronous active-low resets (detector,
  controller, divider), the ring frequency, and all analog constants.
* The setup-compensating buffer on the detector clock is a wire. Its delay, and the
  flip-flop's setup and hold times and metastability, are not modelled. An exact tie
  between the two lines is decided by simulation event order.
* Current consumption, current efficiency and the Vref supply current are analog
  quantities and are not modelled.
* The load is resistive (R = Vout/Iload) in the testbench. The measured undershoot
  (about 300 mV, with the PMOS switches driven into saturation) is larger than the
  model's 176 mV. This is because the switch model is much simpler than a real PMOS.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_sdldo_top` runs the whole regulator at its default sizes in closed loop with the
output-node model. Vin = 1.0 V, Cout = 220 pF, 10.4 MHz clock.

| operation | settling (1 µs mean within ±30 mV) |
|---|---|
| start-up 0 → 800 mV at 10 mA | 8.3 µs |
| Vref 800 → 600 mV | 5.1 µs |
| Vref 600 → 800 mV | 3.6 µs |
| load 10 → 5 mA | 4.2 µs |
| load 5 → 10 mA | 3.6 µs (undershoot to 624 mV) |

For comparison, the published measurements are about 4.4–4.5 µs for the reference steps
and 6.0–6.6 µs for the load steps.

The same test also covers:

* overload (20 mA): the code saturates at 127 and recovers;
* Vref = 450 mV, below the detector threshold: the detector stops and then resumes;
* a switch to the 20.8 MHz clock.

`tb_sdldo_freq_sweep` repeats the 10 ↔ 5 mA load steps at every clock setting from
10.4 MHz (`freq_sel = 6`) up to 665.6 MHz (`freq_sel = 0`). Settling shortens roughly in
proportion to the clock: 4.0 µs at 10.4 MHz, 2.2 µs at 20.8 MHz and 1.4 µs at 41.6 MHz.
From 83 MHz up, the 1 µs mean no longer leaves the ±30 mV band at all.

`tb_sdldo_top` counts HIGH and LOW decisions, code increments and decrements, and saturation, and
fails if any of them never happened.

Simulating with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/ldo_pkg.sv tb/tb_sdldo_top.sv \
    --top-module tb_sdldo_top -o sim && ./obj_dir/sim
```

Any other testbench runs the same way. The closed-loop run simulates about 130 µs and
takes roughly half a minute. All modules use `timeunit 1ns; timeprecision 1fs`. The
femtosecond precision is needed: 10 mV of supply changes one stage's delay by only about
0.3 ps (about 40 ps over the whole line), so a 1 ps grid would round small errors away.

## Changing it

* Gains: `KP` and `KI` on `sdldo_top` / `ldo_digital_controller`.
* Line length: `VCDL_STAGES` on `sdldo_top`.
* Ring frequency: `RING_PERIOD_NS`.
* Switch strength: `G_UA_PER_MV` and `VDSAT_MV` on `pmos_switch_array`.
* Shared widths (7-bit code, 128 switches, 16-stage divider, 4-bit select) are in
  `rtl/ldo_pkg.sv`.

A larger maximum load current is obtained with more switches. `ldo_digital_controller`
and `therm_decoder` take `CODE_W` and size the thermometer code as 2^CODE_W.
