# One-shot digital charge balancer for a biphasic current stimulator

A constant-current neural stimulator delivers a cathodic pulse followed by an
anodic pulse of the same nominal charge. Mismatch in the current sources,
switch timing and the electrode itself leaves a small residual charge after
every pulse pair, and over thousands of pulses that charge builds up as a
voltage on the electrode's double-layer capacitance, which damages tissue and
electrode. This design keeps that residual voltage in a safe band. It measures
the electrode once per stimulation cycle, right after the anodic pulse, and
uses two tools:

* **Anodic pulse modulation** for large imbalances that persist. The 8-bit
  code of the current-steering DAC used for the anodic pulse is moved, so the
  following pulse pairs carry a different amount of charge.
* **Offset balance current** for small or one-off imbalances. A 1 uA DC
  current is pushed into or pulled out of the electrode during the quiet time
  between pulses, for at most 1 ms. The on-time is computed from the single
  sample ("one-shot"), so the ADC does not run in a loop while the current
  flows.

Everything is digital and runs from one 1 MHz clock. The DAC, output current
driver, level shifter, electrode and ADC are analog parts outside the RTL.
The top module, `cb_top`, drives their digital inputs and reads the ADC word.

## Numbers behind the thresholds

The default parameters come from this stimulator model:

| quantity | value |
|---|---|
| DAC full scale / resolution | 1 mA / 8 bit, so I_LSB = 3.9 uA |
| stimulation rate | 100 Hz (10 ms period = 10000 clocks) |
| pulse widths | 0.5 ms cathodic + 0.5 ms anodic (10 % duty cycle) |
| double-layer capacitance C_dl | 100 nF |
| balance current I_bal | 1 uA, at most 1 ms per cycle |

Two thresholds follow from these values:

* **Vth1 = I_LSB x t_anod / C_dl ~ 20 mV.** One DAC step on the anodic pulse
  moves the residual by this much per cycle. It is the smallest error that
  modulation can correct.
* **Vth2 = I_bal x t_bal,max / C_dl = 10 mV.** This is the most that one
  maximum-length balance injection can remove.

The residual potential V_E is a signed 12-bit ADC code with 100 uV per LSB,
covering +-204.8 mV. In these units Vth1 = 200 codes and Vth2 = 100 codes. The
1 uA current moves V_E by 10 uV per 1 us clock, so removing one code takes
`CYC_PER_CODE` = 10 clocks. All of these values are parameters in `cb_pkg`
and on `cb_top`.

## Operation regions

The sample falls into one of five regions:

| region | V_E | class |
|---|---|---|
| 1 | above +Vth1 | unsafe |
| 2 | +Vth2 .. +Vth1 | safe |
| 3 | -Vth2 .. +Vth2 | safe |
| 4 | -Vth1 .. -Vth2 | safe |
| 5 | below -Vth1 | unsafe |

A value exactly on a threshold belongs to the inner region. In the safe
regions the balancer does nothing. Because the safe band (+-Vth1) is twice as
wide as what the balancer aims for (+-Vth2), it does not have to act after
every cycle.

## The decision made once per stimulation cycle

`count` holds the number of consecutive unsafe samples. The processor handles
each new sample like this:

1. **Safe sample.** `count` is cleared. Nothing else happens.
2. **Unsafe sample, `count` becomes 1 or 2 (not yet persistent).** A
   full-length balance current (1000 clocks) is requested: push (source) when
   V_E < 0, pull (sink) when V_E > 0. The anodic code does not change, so a
   single disturbance never alters the stimulation amplitude.
3. **Unsafe sample, `count` reaches 3 (persistent).** The processor splits
   |V_E| into whole multiples of Vth1 and a rest:
   `dN = |V_E| div Vth1`, `rest = |V_E| mod Vth1`. A serial divider does this
   in about 14 clocks.
   * The anodic code moves by dN: up when V_E < 0, down when V_E > 0. It
     saturates at 0 and 255.
   * If the rest is above Vth2, a balance current is requested for
     `(rest - Vth2) x CYC_PER_CODE` clocks. That brings the remainder to Vth2.
     The rest is always below Vth1, so this time is never more than 1 ms.
   * `count` starts again from 0.

The new anodic code stays in place afterwards. The next modulation needs
three more unsafe samples in a row.

**Why `count` restarts after a modulation.** The anodic code is an
integrator: it stays changed. The residual V_E is also an integral, since it
is accumulated charge. If modulation fired on every unsafe sample once
`count` had reached 3, each step would be sized from the whole accumulated
residual and applied to every later pulse. This double integration
over-corrects. In closed-loop simulation, with a persistent +15 mV per cycle,
it swung the residual to about 450 mV. Restarting the count limits modulation
to at most once every three cycles. The loop then stays bounded: about 50 mV
peak for +15 mV per cycle, and about 75 mV for -30 mV per cycle.
This is a choice of this design.

## Timing of one stimulation cycle (defaults, in 1 MHz clocks)

```
0      500      1000 1001..~1020           up to ~2020          9999
|cath  |anod    |ADC |sample->region->decide|push/pull (<=1000)  ...rest|
```

* `stim_timing` counts 0..9999. `cath_en` is high for clocks 0..499 and
  `anod_en` for 500..999. `adc_start` pulses at clock 1000. `rest` is high
  from 1000 to 9999.
* The ADC may answer at any time during the resting interval.
* After the ADC answers, `input_mux` holds the word (1 clock) and
  `region_detector` classifies it (1 clock).
* `cb_processor` then decides. A safe or non-persistent decision takes one
  clock. A modulation takes about 16 clocks, because of the serial division.
* `balance_ctrl` raises push or pull on the clock after the request. It holds
  the line for exactly the requested number of clocks.
* A modulated code first reaches the DAC in the next cycle's anodic phase.
  During the cathodic phase the DAC gets the fixed `stim_code`, and outside
  the pulses it gets 0.

`balance_ctrl` never injects during a pulse. A request that arrives outside
the resting interval waits for it, and an injection is cut off if a pulse
begins. Neither case can happen with the default timing. The
`balance_ctrl` testbench exercises both, and an assertion in `cb_top` checks
that no balance current flows during a pulse.

## Modules

| file | role |
|---|---|
| `rtl/cb_pkg.sv` | widths, default thresholds, `region_e`, `bal_dir_e`, `bal_req_t` |
| `rtl/stim_timing.sv` | phase sequencer. Makes the 100 Hz stimulation tick as an enable, not a second clock |
| `rtl/input_mux.sv` | selects and holds the ADC word of the previous stimulation cycle |
| `rtl/region_detector.sv` | dual-threshold classifier, registered |
| `rtl/cb_processor.sv` | persistence count, anodic code, balance request (the one-shot decision) |
| `rtl/udiv_seq.sv` | serial restoring divider used by the processor |
| `rtl/balance_ctrl.sv` | push/pull pulse generator, plus a total on-time counter |
| `rtl/cb_top.sv` | top level: wires the blocks together and multiplexes the DAC code |

Ports of `cb_top`:

* **Inputs:** `clk` (1 MHz) and `rst_n` (asynchronous, active low).
* **Stimulation control:** `stim_en` and `stim_code`. When `stim_en` is low,
  the sequencer stops and the anodic code reloads from `stim_code`.
* **ADC:** `adc_start` goes out as the sample request. `adc_valid` and
  `adc_data` come back (signed, 100 uV/LSB).
* **Driver controls:** `dac_code`, `cath_en`, `anod_en`, `bal_push`,
  `bal_pull`. These go to the level shifter and driver.
* **Status, for monitoring:** `stim_tick`, `anod_code`, `region`, `count`,
  the one-cycle event strobes `ev_idle`, `ev_nonpersist` and `ev_modulate`,
  and `bal_total_cyc`.

The push/pull naming is this design's: push sources current and raises V_E.

Synthesised with default parameters, the design has about 230 word-level
cells and 163 flip-flops. It has no memory.

## Design choices

These points follow the behaviour described for the method:

* the two thresholds and their values;
* five regions, with idle in the middle three;
* persistence after three consecutive unsafe samples;
* a 1 ms balance current for non-persistent errors;
* modulation followed by a computed balance time that leaves the residual at
  Vth2;
* a higher anodic amplitude for a negative residual;
* one sample per cycle, taken after the anodic pulse;
* a 1 MHz processor clock and a 100 Hz stimulation rate.

These points are this design's own:

* **ADC word.** The ADC format (12 bits, 100 uV) is not specified. To change
  it, edit `VE_W` and the code-valued parameters.
* **Pulse timing.** The 0.5 ms + 0.5 ms split and the absence of an
  inter-phase gap are chosen here.
* **Modulation step.** The step is dN = floor(|V_E| / Vth1), computed by
  division.
* **Count restart.** The count restarts after a modulation (see above).
* **Saturation.** The code saturates at 0 and 255, and the counter saturates.
* **Region registers.** The region detector and the input register add one
  clock each.
* **Single clock.** The 100 Hz rate is a clock enable, not a second clock.

Not included:

* **Analog parts.** The level shifter, DAC, driver, electrode and ADC are
  outside the RTL.
* **FPGA memory.** The reference FPGA build reported about 27.6 kbit of
  memory and 1206 registers. What that memory held is not known, and nothing
  here uses a memory.
* **Exact match with the reference measurement.** That measurement ran 1 s
  with a 15 mV residual per cycle. Its anodic code settled at 91 LSB from 100,
  with 53.2 ms of balance current. The model in this testbench reaches a
  bounded residual with 35 ms of balance current, and the code moves by only
  1 to 2 LSB. The measured electrode was a physical network, so the size of
  the code shift is not expected to match.

## Simulating

Each testbench checks itself, ends with a `TB_RESULT checks=N failures=M`
line, and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
          rtl/cb_pkg.sv tb/tb_cb_top.sv --top-module tb_cb_top -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_cb_top` with its name.

| testbench | what it checks |
|---|---|
| `tb_stim_timing` | every output on every clock against a counter model; 10000-clock period; sample at clock 1000; restart after disable |
| `tb_input_mux` | hold and valid behaviour with random words |
| `tb_region_detector` | all codes within +-3 of each threshold, plus random codes, against a millivolt reference; one-clock latency |
| `tb_cb_processor` | each decision against a reference model in microvolts: count, code (including saturation and reload), balance direction and length, decision latency |
| `tb_balance_ctrl` | exact pulse lengths; one line at a time; waiting for the resting interval; cut-off; total on-time |
| `tb_cb_top` | closed loop at full default size with `tb/stim_frontend_model.sv` (DAC, driver, 100 nF parallel to 10 MOhm electrode, ADC) |

`tb_cb_top` runs three scenarios:

* **A:** +15 mV residual per cycle for 1 s. Peak |V_E| is about 52 mV,
  against about 0.95 V without balancing. The balance current is on 3.5 % of
  the time.
* **B:** -30 mV per cycle for 0.6 s. The residual stays below 100 mV.
* **C:** a single -28 mV disturbance. It is corrected without any change to
  the code.

In every cycle, `tb_cb_top` checks the DAC code and the push/pull time, and
compares the anodic code and count with a reference model. It also requires
that every mechanism happen at least once: idle, non-persistent balance,
modulation up and down, modulation with no balance needed, push, and pull.
The whole run takes about one second of CPU time.
