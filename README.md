# Picosecond skew lock for multiple FPGA serial transceivers

Several high-speed transceivers (Xilinx GTH-class, 2.5 Gb/s) in one FPGA are
meant to drive outputs whose relative timing must be fixed, for example the
channels that drive the modulators of a quantum-key-distribution light source.
Every transceiver divides its PLL clock down to a serial clock and then to a
16-bit parallel clock. Those dividers start at an arbitrary moment after each
power-up or reset, so the skew between two channels comes out as a random
multiple of the 400 ps unit interval (UI), anywhere in the 6.4 ns parallel
clock period.

This design removes that skew and can also set it to a chosen value. A
carry-chain time-to-digital converter (TDC) in the FPGA fabric measures where
each slave channel's parallel clock edge falls against the master channel's
edge. A controller then steps each slave transceiver's built-in phase
interpolator (PI) until the measured skew matches the target. The PI moves
the clock in units of 3.125 ps. The TDC bin is about 10 ps, and the
controller averages many TDC readings, so the lock sits on a picosecond-level
grid. With the jitter modelled in the testbenches, the locked skew spreads by
0 to 1.7 ps RMS.

## Structure

```
 master GTH ── parallel clock ──────────────┬───────────────► system clock of all logic
                                            │ (TDC reference)
 slave GTH 0 ── parallel clock ─┐           ▼
 slave GTH 1 ── parallel clock ─┤  ┌─────────┐ hit ┌──────────────────────────────┐
      ...                       ├─►│ hit_mux ├────►│ tdc: tdl_carry_chain         │
                                │  └────▲────┘     │      → DFF row → tdc_encoder │
                                │       │ sel      └──────────────┬───────────────┘
                                │  ┌────┴─────────────────────────▼─┐ code, valid
                                │  │ pi_control                     │
                                │  └────┬───────────────────────────┘
                                │       │ step_req, step_ch, {dir, W}
                                │  ┌────▼─────────┐ (one per slave)
 slave GTH i ◄── pi_en, {dir,W} ───┤ pi_step_sync │  master clock → slave clock
                                   └──────────────┘
```

| File | Module | Role |
|---|---|---|
| `rtl/tsync_pkg.sv` | package | PI step command type, state type, shared constants |
| `rtl/time_sync_top.sv` | `time_sync_top` | top level: wires the parts below |
| `rtl/hit_mux.sv` | `hit_mux` | picks the slave clock that the TDC measures |
| `rtl/tdc.sv` | `tdc` | delay line, sampling flip-flop row, encoder |
| `rtl/tdl_carry_chain.sv` | `tdl_carry_chain` | **behavioural model** of the CARRY8 delay line |
| `rtl/tdc_encoder.sv` | `tdc_encoder` | thermometer code → bin number of the rising edge |
| `rtl/pi_control.sv` | `pi_control` | measure / compare / step loop over all slaves |
| `rtl/pi_step_sync.sv` | `pi_step_sync` | carries step commands into each slave's clock domain |

The transceivers themselves are not part of the RTL: their PLL, phase
interpolator, PI port logic, dividers and serializer are hard blocks of the
FPGA. `time_sync_top` takes their parallel clocks as inputs and drives their
PI step ports (`TXPIPPMEN` / `TXPIPPMSTEPSIZE`-style) as outputs. For
simulation, `tb/gth_tx_clock_model.sv` models one transceiver's TX clocking:
a random divider release, edge jitter and the PI steps.

## Measuring the skew: the carry-chain TDC

**Delay line.** The hit signal, the selected slave's parallel clock, enters
the carry input of a chain of CARRY8 primitives. Each CARRY8 has 8 carry-out
bits, and the edge ripples up through them with a few picoseconds per bit.
The factor `M` says how many of the 8 carry-outs per CARRY8 become taps:
`M = 4` taps every second carry-out, and `M = 2` every fourth. With `M = 4`,
613 taps cover the 6.4 ns clock period, so one bin is about 10.4 ps. With
`M = 2`, 309 taps give about 20.9 ps per bin. `M = 4` is the default; its
resolution is flatter across the line.

**Sampling.** On every rising edge of the master clock, a row of flip-flops
captures all taps at once. Tap `k` shows the hit as it was `(k+1)` bins
earlier. The hit is a clock with 50 % duty, so the captured line holds a
piece of its waveform: low after its last falling edge, high back to its
rising edge, and low again beyond that.

**Encoding.** `tdc_encoder` finds the lowest `k` with `tap[k] = 1` and
`tap[k+1] = 0`, which is the rising edge. It outputs `code = k + 1`. A code
`c` means that the slave's rising edge came between `c` and `c + 1` bins
before the master's edge. A later slave clock therefore gives a smaller code.
If no rising edge is in the line, `valid` is low. This happens when the slave
edge is less than one bin ahead of the master edge. The encoder reports the
lowest transition, so a bubble (one stray 0 among the ones) below the real
edge gives a code that is too small. Averaging dilutes such codes but does
not remove them.

**Latency.** The flip-flop row adds one master-clock cycle and the encoder
register adds another. A code therefore comes out two cycles after the edge
that sampled it, and a new code arrives every cycle.

**Model only.** The delay line's whole function is the silicon delay of the
carry chain. `tdl_carry_chain` is therefore a simulation model with `#`
delays, not synthesizable logic: it has a uniform 5.22 ps per carry-out. A
real chain has very uneven bins, some close to zero and some over 30 ps. On
hardware, replace this module with placed CARRY8 instances and keep its
ports (`hit` in, `taps` out). The rest of the TDC is plain RTL.

## The lock loop (`pi_control`)

The controller runs on the master parallel clock. It visits the slaves one
at a time:

| State | What happens | Cycles |
|---|---|---|
| SELECT | point `hit_mux` at this slave | 1 (only on a channel change) |
| SETTLE | wait for the mux, the TDC pipeline and the last PI step to take effect | `SETTLE_CYCLES + 1` = 17 |
| MEASURE | sum `2**AVG_LOG2` = 64 valid codes (give up after 128 cycles) | 64 (128 if too few valid codes) |
| DECIDE | compare the mean with the target; lock, or issue one step | 1 |

One correction cycle therefore takes 82 master-clock cycles, about 0.52 µs.

**Decision rule.** The mean is kept as a bin count with 8 fraction bits
(Q.8), and so is each slave's target.
- `error = mean - target`.
- If `|error| ≤ DEADBAND_Q8` (38/256 of a bin, which is half a PI unit), the
  slave is marked `locked` and the controller moves on to the next slave.
- Otherwise it sends one step of weight `W = round(|error| × GAIN_Q4 / 16)`,
  held to 1..15. `GAIN_Q4 = 53` is 10.44 ps per bin divided by 3.125 ps per
  PI unit, in 1/16 units.
- The step delays the slave when the error is positive (a code too large
  means the slave is too early) and advances it otherwise.
- A large error thus moves 15 units (47 ps) per cycle. Crossing the full
  6.4 ns takes about 140 cycles, or 70 µs.

**Edge outside the line.** If fewer than 64 of 128 codes are valid, the
slave's edge sits in the first bin. The controller then sends a full delaying
step. That pushes the edge past the master's edge, and it reappears at the
far end of the line.

**Visit order.** After a lock, or after `VISIT_STEPS` steps without one, the
controller moves to the next slave. It keeps cycling through the slaves
forever, so it also tracks drift. With jitter, one average can fall just
outside the deadband. `locked` then drops until the next single-unit step
brings it back.

**Targets.** Targets must lie inside the line, about 1 to 612 bins. Locking
to target `t` places the slave's edge `(t + 0.5)` bins of about 10.44 ps
before the master's edge. The half bin appears because a code counts whole
bins the edge has passed. To line a slave up exactly with the master (skew
0 or 6.4 ns), choose a target a few bins inside the line and compensate for
that fixed offset outside this logic.

## Sending steps to the transceivers

A PI step command is `{delay, W[3:0]}`. One unit of `W` moves the serial
clock by `1 / (64 · D_txout)` UI, which is 3.125 ps for a 400 ps UI and
`D_txout = 2`. Each slave samples its PI port on its own parallel clock, and
that clock has an arbitrary phase to the master. `pi_step_sync` therefore
turns each request into a toggle plus a held command. A two-flip-flop
synchroniser in the slave domain then raises `slave_pi_en[i]` for exactly
one slave cycle, with the command on `slave_pi_stepsize[i]`. This takes 2 to
4 slave cycles. The settle time is at least 8 cycles, which keeps the held
command stable; an assertion checks that.

## Parameters (`time_sync_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `N_SLAVES` | 2 | slave channels (the master is not counted) |
| `TAPS` | 613 | delay-line taps (309 for `M = 2`) |
| `M` | 4 | carry-outs tapped per CARRY8 |
| `CO_DELAY_PS` | 5.22 | model only: delay per carry-out |
| `AVG_LOG2` | 6 | log2 of codes averaged per measurement |
| `SETTLE_CYCLES` | 16 | wait after a select or a step (≥ 8) |
| `GAIN_Q4` | 53 | PI units per bin × 16 |
| `DEADBAND_Q8` | 38 | lock window in 1/256 bin |
| `VISIT_STEPS` | 256 | steps before the next slave gets a turn |

The numbers of taps, `M`, the 1..15 weight range, the 3.125 ps PI unit, the
6.4 ns parallel clock and the 400 ps UI come from the transceiver and TDC
setup this design targets. The slave count, averaging, settle time, gain,
deadband and visit rule are this design's own choices. If you change the tap
count, the bin width or the PI unit, recompute `GAIN_Q4` and `DEADBAND_Q8`.
An averaging window of 64 was chosen because an 18 ps RMS single-shot TDC,
averaged 64 times, gives about 2.3 ps. More averaging gives a finer lock but
a slower loop.

## Where this RTL goes beyond its source description

The measurement chain (carry-chain line, flip-flop row, encoder), the mux of
slave clocks, the master clock as reference, and the PI step formula are
described. The following parts are filled in here:

- The encoder method (rising-edge search, lowest match) and all pipeline
  registers.
- The whole control algorithm: averaging, proportional step, deadband, visit
  order and the out-of-line recovery.
- The clock-domain crossing of step commands.
- The direction bit beside `W[3:0]`.
- Reset behaviour: synchronous, active low, clears the flip-flop row, the
  encoder and the controller.
- The uniform delay line of the model. The real chain's uneven bins cause
  code nonlinearity; no code-density or INL calibration is included. Such
  calibration would sharpen the TDC.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Example with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/tsync_pkg.sv rtl/*.sv tb/gth_tx_clock_model.sv tb/time_sync_top_tb.sv \
  --top-module time_sync_top_tb -o sim && obj_dir/sim
```

| Testbench | What it shows | Run time |
|---|---|---|
| `tb/tdl_carry_chain_tb.sv` | tap arrival times for `M = 4` / 613 taps and `M = 2` / 309 taps | < 1 s |
| `tb/tdc_encoder_tb.sv` | random single- and double-edge lines, no-edge lines, a bubble, reset | < 1 s |
| `tb/tdc_tb.sv` | codes across the whole period, first-bin case, 2-cycle latency | < 1 s |
| `tb/hit_mux_tb.sv` | selection, out-of-range select | < 1 s |
| `tb/pi_control_tb.sv` | loop on a numeric plant: step rule, deadband, cycle counts, out-of-range, disable | < 1 s |
| `tb/pi_control_visit_tb.sv` | with `VISIT_STEPS = 4`: a slave is left after exactly 4 unlocked steps, both still lock | < 1 s |
| `tb/time_sync_top_tb.sv` | whole design at default parameters with transceiver models: steps delivered, lock accuracy, RMS, every mechanism | ~ 6 s |
| `tb/relock_precision_tb.sv` | 6 targets (750-5650 ps) × 6 power-ups × 2 slaves at default parameters | ~ 95 s |

Results at the defaults with the models' jitter: the locked skew lies within
0.5 ps on average of `(target + 0.5)` bins. Its spread over 12 locks per
target is 0 to 1.7 ps RMS, with at most a 6.25 ps span (two PI units). These
figures depend on the jitter assumed in the transceiver model (±20 ps uniform
per edge) and on the uniform bins of the line model. They show that the loop
works; they do not predict results on hardware.
