# PLL-Delay: 40 MHz clock and trigger recovery with a self-calibrating PLL

A detector front end needs two things from the control system: the 40.08 MHz
machine clock, with little jitter because it samples analog signals, and the
first-level trigger decisions. Both travel on a single line, `CLK_T1`. It
carries the clock, and a trigger is sent by leaving out one clock pulse. This
chip rebuilds both signals from that line:

* a charge-pump PLL with a low loop gain regenerates a clean clock from the
  rising edges of `CLK_T1`. The low gain keeps it calm when pulses go missing;
* a trigger decoder notices each missing pulse and outputs a trigger;
* a delay line moves the clock in 1.04 ns steps across a whole period, and
  delays the trigger by up to 16 clock periods in the same fine steps;
* an I2C slave holds the delay settings and reports the calibration status.

A low-gain VCO has a narrow tuning range. Across process corners, temperature
and radiation damage, that range may miss 40.08 MHz altogether. The chip gets
around this with **self-calibration**. A second control, the VCO offset
current, moves the whole tuning curve. After every reset a small state machine
searches for an offset that lets the loop lock.

The RTL contains synthesizable logic for every digital block. The analog parts
are behavioural models: the charge pump, loop filter and VCO. These models are
enough to simulate the whole closed loop in `verilator`: acquisition,
calibration, lock and trigger recovery.

## Block map

```
 CLK_T1 ──┬──────────────► phase_detector ─UP/DN─► charge_pump ─I─► loop_filter ─Vc─┐
          │                  ▲ fb = phase 0          (model)          (model)         │
          │                  │ pd_mode                                                 ▼
          │                  │                 ip_code, high_gain ───────────────►  vco (model)
          │            calibration_fsm ◄── locked ── lock_detector ◄── phases 0,6,18   │
          │                  │ cal_done                                              24 phases
          ├──► trigger_decoder (sample on phase 6) ──► delay_line ──► t1_out         │
          │                                               ▲     └───► clk_out  ◄─────┘
          └──► lock_detector                  i2c_slave ──┘ cfg
                                        SCL/SDA/address ──► i2c_slave ◄── status
```

| File | Kind | What it is |
|---|---|---|
| `rtl/plldelay_pkg.sv` | package | phase count, widths, register map, status and config structs, calibration states |
| `rtl/plldelay_top.sv` | structural | the chip |
| `rtl/phase_detector.sv` | logic | PFD / bang-bang PD, switchable |
| `rtl/charge_pump.sv` | analog model | ±10 µA current |
| `rtl/loop_filter.sv` | analog model | R–C1 ∥ C2 integrator |
| `rtl/vco.sv` | analog model | 12-stage ring, 24 phases, offset-current curves, two gains |
| `rtl/lock_detector.sv` | logic | lock decision from two CLK_T1 samples |
| `rtl/calibration_fsm.sv` | logic | offset-current / gain search |
| `rtl/trigger_decoder.sv` | logic | missing-pulse detection |
| `rtl/delay_line.sv` | logic | 24-phase clock select, coarse + fine trigger delay |
| `rtl/i2c_slave.sv` | logic | I2C slave and configuration registers |

VCO phase 0 is both the PLL feedback and the clock of all the logic. The VCO
keeps running through reset and before lock, so the calibration always has a
clock.

## The 24 phases

The ring has 12 differential delay cells. With period T, each cell delays by
T/24. The true and complement outputs of the cells therefore give 24 phases:
`phase[k]` is `phase[0]` delayed by k·T/24, which is 1.04 ns at 40.08 MHz.
Three uses are built on this:

* **feedback**: `phase[0]` goes to the phase detector. At lock, its rising edge
  coincides with the rising edge of `CLK_T1`.
* **sampling**: `phase[6]` is a quarter period after that edge. There,
  `CLK_T1` is high unless the pulse is missing, and that sample feeds the
  trigger decoder. `phase[18]` is a quarter period before the next edge, where
  `CLK_T1` must be low when the loop is in lock.
* **deskew**: the delay line picks the output clock from any of the 24 phases.

## Phase detector: two modes

During acquisition the detector is a three-state phase-frequency detector. A
reference edge sets UP, a feedback edge sets DN, and both are cleared as soon
as both are set. It pulls in frequency as well as phase, but it reacts badly
to a missing pulse. The feedback edge sets DN, and DN stays on for a whole
period until the next reference edge. The VCO then gets a large kick of about
0.8 ns.

Once the loop is in lock, the calibration switches the detector to a two-state
(bang-bang) mode. At each feedback edge it samples the reference level. High
means the reference came first (UP); low means it did not (DN). The chosen
output is driven for one stage delay, from `phase[0]` to `phase[1]`. A missing
pulse now costs a single 1.04 ns DN correction. In simulation the clock phase
error stays around 0.1 ns, against a 0.5 ns requirement.

## Self-calibration

The VCO follows `f = PROCESS · (F_BASE + ip_code · F_STEP + Kvco · Vc)`. Each
offset code `ip_code` (0..15) gives one straight curve across the 0–2.5 V
control range. With the model's default numbers the low-gain curves are each
10 MHz wide and 4 MHz apart, so neighbouring curves overlap. `PROCESS` scales
everything and stands for the chip-to-chip and dose-dependent spread. High-gain
mode triples Kvco.

`calibration_fsm` runs this search after every reset:

```
RESET → IP_INIT (code 0) → WAIT (WAIT_CYCLES) → CHECK
CHECK  locked, code < 15            → HOLD (keep code) → END
CHECK  locked, code = 15            → END
CHECK  not locked, code < 15        → IP_INC (code + 1) → WAIT
CHECK  not locked, code = 15, low   → HIGH (high gain on) → IP_INIT
CHECK  not locked, code = 15, high  → END with cal_failed
END    locked: stay; pd_mode = cal_done = 1
END    not locked (lost, or failed) → IP_INIT   ("calibration failed" path)
```

Each code takes `WAIT_CYCLES + 1` cycles, plus one cycle for the step to the
next code. The cycles are counted on the recovered clock, so a code takes
25.7 µs with the default 1024 cycles when the VCO is at 40 MHz, and longer
while it still runs slow (about 52 µs for code 0 of a nominal chip). A nominal
model chip locks on code 6 about 243 µs after reset. A slow chip with
`PROCESS = 0.45` never locks in low gain. It finishes its first sweep, switches
to high gain and locks on code 13. A chip with `PROCESS = 0.3` cannot lock at
all: it reports `cal_failed` and keeps retrying. With the model numbers, low
gain covers `PROCESS` from 0.50 to 4.0, and high gain extends this down to 0.40.

`cal_done` enables the trigger decoder: no triggers come out before the loop is
locked. The gain mode is kept across a restart. Only a reset returns to low
gain.

### Lock detector

The lock detector is this design's own. In each cycle it looks at the two
`CLK_T1` samples:

* phase 6 high and phase 18 low: a **good** cycle;
* phase 18 high: a **bad** cycle. The reference is more than a quarter period
  off, or at another frequency;
* both low: a **neutral** cycle, i.e. a missing pulse.

`locked` rises after `LOCK_COUNT` (128) good cycles with no bad cycle among
them, and falls on the first bad one. Neutral cycles neither count nor break
the run, so triggers do not disturb lock.

One limit comes with this scheme. A loop stuck at a rail a few tens of kHz off
frequency drifts through the window slowly, and may be seen as locked for a
moment. If that happens during CHECK, the machine ends the calibration. It
restarts once the drift produces a bad cycle. A line that stops gives only
neutral cycles. More than `MAX_MISSING` (8) of them in a row also clear
`locked`, because triggers are isolated missing pulses.

## Trigger path and delays

`trigger_decoder` samples `CLK_T1` on `phase[6]` and retimes the sample to
`phase[0]`. If the pulse at clock edge n is missing, `t1` is high from edge
n+1 to edge n+2.

`delay_line` then applies two delays:

* **coarse**: a 15-stage shift register selects 0..15 cycles (`trg_coarse`).
* **fine**: a flip-flop clocked on phase `(trg_fine + 1) mod 24` retimes the
  result.

The trigger leaves `t1_out` `trg_coarse·T + (trg_fine+1)·T/24` after `t1`
changed, which is at most 16 T. The `+1` keeps the delay monotonic. Phase 0
would retime on the very edge that launched the data and add a full period.

The output clock is `phase[clk_fine]`, a combinational 24:1 multiplexer. In
silicon this is a 24:2 differential multiplexer and a converter to a
single-ended signal. A change of `clk_fine` can produce a short clock pulse,
so change it while the clock output is not in use. Select values above 23 act
as 23.

## I2C registers

The 7-bit device address comes from `i2c_addr`. SCL and SDA are oversampled by
the 40 MHz chip clock, which is fine for standard and fast mode. SDA is open
drain: `sda_oe = 1` pulls it low.

| Ptr | Bits | Register |
|---|---|---|
| 0x00 | [4:0] | clock phase, 0..23 |
| 0x01 | [4:0] | trigger fine delay, 0..23 |
| 0x02 | [3:0] | trigger coarse delay, 0..15 cycles |
| 0x03 | [7:0] | status (read only): cal_failed, cal_done, high_gain, locked, ip_code[3:0] |

A write is `S, addr+W, ptr, data…, P`. A read is
`S, addr+W, ptr, Sr, addr+R, data…, P`. The pointer increments after every
data byte.

## Analog models and their numbers

Some values follow the chip description:

* 12 VCO stages and 24 phases;
* a 10 µA charge pump;
* a 2.5 V supply;
* an R–C1 ∥ C2 loop filter with `b = 1 + C1/C2 ≈ 20` and `ωc·T2 = 2`. With
  these, the phase margin is about 59°.

The rest are this design's choices:

* crossover `ωc = 2π·200 kHz`, which gives R = 33 kΩ, C1 = 48 pF and
  C2 = 2.53 pF;
* VCO curves: 10 MHz base, 4 MHz per code, 4 MHz/V low gain, 12 MHz/V high gain;
* 16 offset codes.

The loop filter integrates its two capacitor voltages with forward-Euler steps
of at most 0.5 ns. The steps fall on every change of the charge-pump current,
so narrow PFD pulses are integrated exactly. The VCO model steps a 12-bit
Johnson counter every `1/(24 f)`, with `f` taken from the present control
voltage.

The differential input receiver and output drivers are not modelled. Neither
are the replica bias and amplitude control of the VCO cells, nor the phase
buffers.

## Where this departs from, or goes beyond, the chip description

* The lock detector, the I2C register map and protocol, and the widths
  (4-bit offset code, 5-bit phase selects) are this design's own.
* In the calibration, the first value tried is code 0 itself, as the written
  description says. (The state diagram draws an increment right after
  initialisation.)
* The failure case in high gain and the restart on loss of lock are this
  design's own.
* The trigger delay is built into `delay_line`, next to the clock phase
  selection. The original block diagram takes T1 straight from the trigger
  decoder, and does not show where its delay is applied.
* The trigger has its own fine-delay register. One statement of the
  description limits the trigger to whole clock periods; the more detailed
  one gives it 1.04 ns resolution, which is what is built.
* All the analog numbers listed above are assumptions, so loop dynamics such
  as the peak error after a missing pulse are not reproduced exactly. The
  original design simulation shows about 310 ps of peak error after one
  missing pulse. This model shows about 20 ps, because its PD-mode correction
  is a single 1.04 ns pulse. With ±100 ps of input jitter and random triggers,
  the clock phase error stays within 0.12 ns.

## Simulating

Testbenches are in `tb/`. Each one prints `TB_RESULT checks=N failures=M`.
Every file sets `timeunit 1ns; timeprecision 1fs`. A block test builds like
this (the package goes first):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/plldelay_pkg.sv tb/tb_plldelay_full.sv --top tb_plldelay_full
./obj_dir/Vtb_plldelay_full
```

| Testbench | What it checks |
|---|---|
| `tb_phase_detector` | UP/DN pulse widths in both modes, missing pulse in both modes |
| `tb_charge_pump` | current for all UP/DN combinations |
| `tb_loop_filter` | ramp, charge conservation, clamping against closed-form values |
| `tb_vco` | frequency vs (Vc, code, gain), clamping, spacing of all 24 phases |
| `tb_lock_detector` | lock time in cycles, triggers, phase and frequency errors |
| `tb_calibration_fsm` | code order, final settings and cycle counts for lock at code 0/5/15, high gain, failure, loss of lock |
| `tb_trigger_decoder` | one pulse per missing pulse, at the expected cycle; disabled decoder |
| `tb_delay_line` | clock delay for all 24 phases; trigger delay for all coarse values |
| `tb_i2c_slave` | writes, reads, burst, auto-increment, status, wrong address |
| `tb_plldelay_top` | three chips on one line (nominal, high gain needed, cannot lock); jitter, deskew, trigger timing, every mechanism |
| `tb_plldelay_full` | one chip at default parameters: calibrate, program, 100 µs of triggers |
| `tb_missing_pulse` | phase error before and after isolated missing pulses, default parameters |

Helpers in `tb/`: `clk_t1_encoder` (sending side, adds input jitter if asked),
`i2c_master_model` and `phase_gen` (ideal 24 phases).

The whole-chip tests simulate 0.7 ms to 2 ms of chip time, which takes
seconds. Useful knobs on `plldelay_top`:

* `PROCESS` moves the VCO curves.
* `WAIT_CYCLES` shortens or lengthens the calibration steps.
* `LOCK_COUNT` makes the lock decision stricter or quicker.

Only the logic blocks are meant for synthesis. The top and the three analog
models use real numbers and delays, and are for simulation.
