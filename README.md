# In-field path-delay measurement for FPGAs with a phase-shifted PLL clock

Aging, mainly BTI and hot-carrier effects, slowly makes the logic of a deployed chip slower.
The only way to see how much timing margin a user circuit in an FPGA has left is to measure
its delay on the chip, in the field, and to repeat the measurement over the product's
lifetime. This RTL does that for a scan-inserted user circuit, without reconfiguring the
FPGA. It uses:

* a logic BIST (LFSR pattern generator, scan chains, MISR signature) that tests the circuit
  with launch-off-capture delay tests;
* a **variable test timing**: the time between the launch and the capture clock edge is
  shortened step by step. The FPGA PLL's dynamic phase shift delays the launch clock, not
  a chain of delay elements, because delay elements in FPGA fabric cannot be matched;
* a sweep that looks for the shortest launch-to-capture time at which every pattern still
  passes. That time, `t_fastest`, is the measured delay;
* a ring-oscillator temperature sensor and a linear correction. Together they turn the
  measured delay into the delay at a reference temperature. Measurements taken months
  apart at different temperatures can then be compared, and what remains of the difference
  is aging.

The default numbers are those of the published evaluation on an Intel Cyclone IV device:

| quantity | value |
|---|---|
| system / initial test clock | 100 MHz, so t0 = 10000 ps |
| phase-shift step PS (VCO period / 8) | 96.15 ps |
| maximum number of phase steps N | 49, reaching 5288.65 ps |
| test patterns per BIST run | 32 |
| temperature coefficient of delay (example) | 7.34 ps/degC |
| reference point (example) | 8942.35 ps at 70 degC |

## How the test clock is built

This is the part that needs the most care. It is in `rtl/test_timing_generator.sv`.

The PLL supplies two clocks with the same 10 ns period:

* `clk` (CLK), the original clock;
* `dclk` (DCLK_i), the same clock delayed by `i * PS` through the PLL's dynamic phase-shift
  port.

The scan flip-flops are clocked by `tclk`, which is the OR of three gated clocks:

```
shift mode (se = 1):   one SCLK pulse per shift request; SCLK = CLK / 2 (20 ns)
capture (se = 0):      one DCLK_i pulse = launch, then the next CLK pulse = capture

CLK      _|‾‾|__|‾‾|__|‾‾|__|‾‾|__|‾‾|__
DCLK_i   __|‾‾|__|‾‾|__|‾‾|__|‾‾|__|‾‾|_      (delayed by i*PS)
            E0    E1    E2    E3    E4
tclk     ...shift...     ^launch ^capture     launch at E2 + i*PS, capture at E3
se       ‾‾‾‾‾‾‾‾‾|____________________|‾‾‾   falls at E0 + T/2, rises at E3 + T/2
```

The launch edge comes `i*PS` after CLK edge E2 and the capture edge is CLK edge E3. The test
timing is therefore

    t_i = T - i * PS = t0 - i * PS        (t_0 = 10000 ps is the at-speed test)

Each of the three gates is a latch that is transparent while its own clock is low, i.e. an
integrated clock gate. A pulse that gets through is therefore always a whole pulse. The gate
enables are timed so that no enable ever changes near an edge it gates:

* the SCLK enable changes only on the CLK edges at which SCLK falls;
* the DCLK enable (`launch_arm`) and `se` are retimed to the falling edge of CLK. The launch
  enable is high from half a period before CLK edge E2 to half a period after it. Exactly one
  DCLK pulse passes, the one that starts `i*PS` after E2. This holds for
  `0 <= i*PS < T/2`: 49 x 96.15 = 4711.35 ps against 5000 ps. A phase range beyond half a
  period would need a different enable window;
* the CLK enable is a standard rising-edge clock-gate enable.

The LFSR and the MISR step on the falling edge of CLK, in the cycle that follows a shift
edge. As a result, nothing that the test-clocked scan flip-flops sample ever changes on a
test-clock edge. The latches are intended: synthesis reports three latch bits, and all
three are these clock gates. In an FPGA they should be mapped to the device's clock-enable
or clock-control resources, or constrained as clock gates.

`func_mode = 1` is the user functional mode: `tclk` follows CLK and `se = 0`.

## The measurement sweep

`rtl/test_controller.sv` runs the flow below:

1. Reset the PLL phase to zero (i = 0, t_fastest = t0) and start a temperature reading.
2. Run one BIST pass with test timing t_i.
3. If any pattern fails, stop. The result is the current t_fastest.
4. If all patterns pass and i < N, set t_fastest = t_i, step the PLL phase once
   (i = i + 1) and go to 2.
5. If all patterns pass and i = N, stop with `limit_reached`. t_fastest then stays at t_{N-1},
   as the original flow chart has it. The circuit is faster than the sweep can resolve.

The measured delay is `d_measured = t0 - PS * i_fastest`. It is an upper bound on the
circuit's critical-path delay for the applied patterns, within one phase step. If the fail
comes at step 0, the circuit fails at speed; `fail_found` is set and `i_fastest = 0`.

## One BIST run

`rtl/bist_sequencer.sv` applies `NUM_PATTERNS` patterns. For each pattern it does the
following, in order:

1. It requests `CHAIN_LEN` shift pulses. These load the next pattern from the LFSR and
   unload the previous response into the MISR.
2. It compares the MISR signature with the golden signature of that pattern.
3. It requests one launch/capture pair.

The first unload only holds the chains' initial contents. The MISR does not compact it, and
pattern 1 gets no decision. The signature accumulates, so once a pattern fails, every later
pattern of the run fails too. The published measurement tables show this behaviour.

The golden signatures are kept in a 32 x 16-bit table inside the sequencer. A run with
`learn = 1` fills the table instead of comparing. The controller asserts learn only for the
i = 0 (at-speed) run of a measurement started with `learn` high. This is meant for the
reference measurement under controlled conditions. The response to the last capture of a
run is not unloaded.

`seed` sets the LFSR start state. Choosing seeds for good delay-fault coverage is left to
the user.

## Temperature and correction

`rtl/ro_temp_sensor.sv` counts the edges of a ring oscillator (`ro_clk`, from outside the
module) during a window of 4096 CLK cycles. The crossing between clock domains uses a
synchronised gate; the count is read only after the counter has stopped. The count is
converted with a two-point linear calibration:

    T = cal_temp + ((count - cal_count) * cal_slope) >>> 8     [0.01 degC]

`cal_slope` is in 1/256 of 0.01 degC per count. It is negative for an oscillator that slows
down when warm.

`rtl/delay_correction.sv` computes, two cycles after `start`:

    D_corrected = D_measured - alpha * (T - T0)
    D_aging     = D_corrected - D0

`alpha` comes from characterisation. `(T0, D0)` is the reference measurement. All three are
inputs, because they belong in nonvolatile memory outside this design. The product
`alpha * (T - T0)` is rounded to the nearest 0.01 ps. A positive `d_aging` that grows over
repeated measurements is the aging signal. This RTL applies no threshold.

### Number formats (`rtl/dm_pkg.sv`)

| quantity | type | unit |
|---|---|---|
| delays (`d_measured`, `t_current`, `d0`) | 32-bit unsigned | 0.01 ps |
| `d_corrected`, `d_aging` | 32-bit signed | 0.01 ps |
| temperatures | 16-bit signed | 0.01 degC |
| `alpha` | 16-bit unsigned | 0.01 ps/degC |

With these units, 10000 ps = 1 000 000, PS = 9615 and 7.34 ps/degC = 734 are all exact.

## Top level and external parts

`rtl/delay_meas_top.sv` connects: test_controller, bist_sequencer, test_timing_generator,
lfsr, scan_chains (the user circuit's flip-flops, 4 chains x 14 by default), misr,
ro_temp_sensor and delay_correction. Four parts are not logic and stay outside. They
connect through ports:

| external part | ports | simulation model |
|---|---|---|
| PLL with dynamic phase shift | `clk`, `dclk` in; `ps_req`, `ps_op` out, `ps_done` in | `tb/pll_model.sv` |
| user logic between the scan flip-flops | `cut_q` out, `cut_d` in | `tb/cut_model.sv` |
| ring oscillator | `ro_clk` in | `tb/ring_osc_model.sv` |
| nonvolatile memory | `alpha`, `d0`, `t0`, `cal_*` in | testbench variables |

The phase-shift handshake is simple. The controller holds `ps_req` with `ps_op`
(`PS_OP_INIT` returns the phase to zero, `PS_OP_STEP` adds one step) until `ps_done` pulses.
A Cyclone IV PLL needs a small adapter on its `phasestep`/`phaseupdown`/`phasedone` port;
that adapter is not included.

Operation:

1. Pulse `start`. The design is busy until `done` pulses.
2. `step_valid/step_idx/step_pass` log each phase step.
3. `dec_valid/dec_pattern/dec_pass` log each pattern decision.
4. The results hold until the next `start`: `i_fastest`, `d_measured`, `fail_found`,
   `limit_reached`, `t_measured`, `d_corrected` and `d_aging`.

A first measurement with `learn = 1` under known conditions provides `D0 = d_measured` and
`T0 = t_measured`. Store them and feed them back on `d0`/`t0` for later measurements.

Run time: one BIST run takes about NUM_PATTERNS x (2 x CHAIN_LEN + 7) CLK cycles, about
11 us at the defaults. A full sweep of 50 steps therefore takes about 0.6 ms. The
temperature window adds 41 us, which overlaps with the sweep.

## Simulation

All files use `timescale 1ps/10fs`, so 96.15 ps steps are exact. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dm_pkg.sv tb/tb_delay_meas_top.sv --top-module tb_delay_meas_top
obj_dir/Vtb_delay_meas_top
```

Replace the testbench name to run any other. Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_delay_meas_top` | Whole system at default size. Functional mode, then a learn/reference run at 70 degC (8942.35 ps, step 11). Then 40 and 100 degC, 300 ps of aging, a circuit too fast for the sweep (limit) and one too slow for the system clock (step-0 fail). Every launch/capture interval on `tclk` is timed against t_i. |
| `tb_temp_sweep` | 40..100 degC in 5 degC steps. Measured delay 8750.05 to 9134.65 ps (384.6 ps spread); corrected delays spread 90.7 ps. |
| `tb_test_timing_generator` | Launch-to-capture interval = 10000 - 96.15 i ps for i = 0..20 and 49; shift pulses at 20 ns with SE high; functional mode. |
| `tb_test_controller` | Sweep flow: fail after 11 and after 7 passing steps (8942.35 / 9326.95 ps), at-speed fail, limit at N = 49. |
| `tb_bist_sequencer` | Shift/capture counts, no decision for pattern 1, learn then compare, a corrupted pattern fails it and all later ones. |
| `tb_lfsr`, `tb_misr`, `tb_scan_chains` | Against independent models; LFSR period 65535. |
| `tb_ro_temp_sensor` | Counts and temperatures over 40..100 degC within 1.5 degC. |
| `tb_delay_correction` | Exact arithmetic against real-number computation, including the 70 degC / 8942.35 ps / 7.34 ps/degC example. |

The user-logic model gives the critical path 8900 ps at 70 degC, rising about 7.3 ps/degC.
A few near-critical paths are set to 90–97 % of it. A pattern detects a path only if it
toggles that path's output. The oscillator model's period grows 0.15 % per degC.

## What follows the original method and what is this design's own

These follow the method:

* the measurement principle: two PLL outputs, launch on the phase-shifted clock, capture
  on the original clock, t_i = t0 - PS*i;
* the sweep and its stopping rules, including t_fastest staying at t_{N-1} at the limit;
* LFSR/scan/MISR BIST with per-pattern signature decisions and no decision for pattern 1;
* the linear temperature correction and the aging difference;
* the default sizes: 32 patterns, N = 49, 96.15 ps steps, 100 MHz.

These are this design's own choices:

* the gating circuit, the CLK/2 scan clock and all handshakes;
* 4 x 14 scan flip-flops (sized for a ~53-flip-flop benchmark circuit);
* 16-bit LFSR and MISR, polynomial x^16+x^14+x^13+x^11+1;
* golden signatures learned in the at-speed run;
* a single-oscillator sensor with a two-point linear calibration. The original sensor
  computes temperature from several ring oscillators by a method not reproduced here;
* the number formats and rounding;
* starting the temperature reading together with the sweep.

There are two structural differences from the original block diagrams:

* One temperature sensor is instantiated. The original structure shows two sensors in the
  user logic but does not say how their readings are combined.
* The reference pair (T0, D0) enters on inputs. The original drawing has the measurement
  circuit and the sensor deliver it directly. Here it comes from outside because it has to
  survive power cycles in nonvolatile memory. The host copies `d_measured`/`t_measured` of
  the reference run into that memory.

## Limits and trust

* Everything is checked in zero-delay RTL simulation against behavioural PLL, logic and
  oscillator models. Nothing here has been timed on an FPGA. The clock gates, and the
  half-period relation between `se`/`launch_arm` and the launch edge, need proper clock
  constraints in a real implementation.
* The resolution is one phase step (96.15 ps). The measured delay is the fastest passing
  timing, not the path delay itself.
* The PLL model ignores phase-step error. The measured steps on silicon deviate by tens of
  picoseconds.
* Only the delay-measurement part of a larger in-field test architecture is here. These
  are not included: memory BIST, a test access port, a test-log memory, and threshold or
  moving-average judgement of aging.
