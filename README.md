# Sigma-delta coded networked servo controller

## The idea

A position loop for an AC servo is split across two FPGAs joined by serial wires.
The usual approach sends whole sampled words over the link. Here each end sends only a
**three-level delta code** per control cycle: +1, 0 or -1, in two bits. The receiving
end integrates the codes in an up/down counter, which is a sigma modulator, and so
rebuilds the value. A frame is only two payload bits, so the link adds almost no
latency, and the networked loop can close at the same 100 kHz as the local current loop.

Integrating codes has one weakness: a single corrupted code leaves a permanent offset.
To fix this, a slow **compensation channel** runs beside each code channel. It carries
the low *n* bits of the value the sender is tracking, one bit per cycle. After *n* cycles
the receiver has the whole word and compares it with its own counter as it stood in the
same cycle. If the two differ by at most *n*, the receiver corrects its counter. A larger
difference is taken to mean the word itself was corrupted, so it is ignored.

The remote node runs a two-degrees-of-freedom position controller in single-precision
floating point. The local node runs a deadbeat current controller with space-vector PWM.

```
  controller_node (remote)                         servo_node (local)
  pos_ref ─► position_controller ─► delta_mod ─ch1 (2 b/cycle)─► sigma_mod ─► iq_ref ─► current_controller ─► PWM
                                    comp_tx   ─ch4 (1 b/cycle)─► comp_rx ──┘            (ADC, d-q, deadbeat,
  pos_fb ◄─ sigma_mod ◄──────────────────────── ch2 (2 b/cycle)─ delta_mod ◄─ motor_counter ◄─ encoder
            ▲ comp_rx ◄──────────────────────── ch3 (1 b/cycle)─ comp_tx                       SVM sector, firing)
```

## Channels and frames

* The delta code is `01` = +1, `00` = 0 and `11` = -1. A received `10` counts as 0.
* Each channel is one data wire plus a request-to-send (RTS) wire. RTS is active high.
* A frame is sent as: RTS high, one idle lead bit, a start bit `0`, then the payload LSB first.
  The data wire idles at `1`.
* The receiver samples each bit five times (`OVERSAMPLE` = 5), takes the middle sample, and
  aborts a frame whose start bit is not low at mid-bit.
* Per cycle, ch1 and ch2 each carry 2 bits and ch3 and ch4 each carry 1 bit.

## Cycle timing

* One cycle is 500 clocks of 20 ns, which is 10 µs.
* Both nodes start a cycle at clock 0. A code received during cycle *k* is applied at the
  start of cycle *k+1*, so both ends step in the same cycle.
* **Compensation.** The word is latched every `COMP_BITS` = 8 cycles. The bit sent in cycle *k*
  is taken at the receiver's strobe in cycle *k+1*. The receiver then computes
  `d = word − snapshot` modulo 2^8 as a signed number:
  * if 0 < |d| ≤ 8, it adds *d* to the counter;
  * if |d| > 8, it rejects the word.
* **Remote node (controller_node).** The position controller starts at clock 3 and finishes
  at clock 26. Its output in current codes is delta-modulated and sent on ch1 and ch4.
* **Local node (servo_node).** The encoder counter is sampled at clock 0 and sent on ch2 and
  ch3. The current loop starts at clock 3. The PWM carrier restarts on the same strobe with
  all legs off.
* **PWM update.** The new on-times arrive 75 clocks into the period. The PWM window is
  centred, so at that point it has not opened yet. The on-times therefore act in the same
  period, clamped to the roughly 348 clocks left before the centre.
  * This matters for stability. If the on-times applied one period late, the deadbeat loop
    would have poles at √F11 ≈ 0.99 and would ring.
  * The clamp works as a voltage limit of about 70 %.

## Blocks

| Block | What it is |
|---|---|
| `motor_counter` | 4x quadrature counter with synchroniser, direction, step strobe |
| `delta_modulator`, `sigma_modulator` | three-level coder and up/down-counter decoder (with correction input) |
| `serial_tx`, `serial_rx` | RTS/start-bit serial driver and 5x-oversampling receiver |
| `comp_tx`, `comp_rx` | compensation word serialiser and threshold comparator |
| `fp_mul`, `fp_add`, `int_to_fp`, `fp_to_int`, `fp_div`, `fp_dot` | IEEE-754 single-precision units (3-stage multiplier and adder) |
| `position_controller` | 2DOF controller u = C1 r + C2 y as one 4-state modal system, ZOH at T = 10 µs, 23 clocks |
| `trig_rom` | 12-bit angle → 10-bit sin/cos (quarter-wave table) |
| `adc_interface` | sequencer for two 8-bit converters, 42 clocks |
| `axis_converter` | integer Clarke + Park transform |
| `speed_unit` | ω = 2π/(P·n·T) from the interval between encoder counts |
| `deadbeat_unit` | q-axis deadbeat firing time, d-axis drive to 0, inverse Park (18 clocks) |
| `svm_sector`, `firing_time` | sector from α/β, t1/t2 per sector, leg on-times |
| `pwm_gen` | centre-aligned 100 kHz PWM, 2-clock resolution, on-times act in the period they are loaded |
| `current_controller` | the current loop: ADC → d-q → deadbeat → SVM → PWM, update 75 clocks after start |
| `controller_node`, `servo_node`, `sd_ncs_top` | the two FPGAs and the top that joins them |

The analog noise-injection circuit and the motor/inverter/converter hardware are not logic.
The system testbench `tb/tb_sd_ncs_top.sv` models them behaviourally:

* the noise circuit as random bit inversions on the channel wires;
* the plant as a PM motor from J, D and KT, an ideal inverter at 30 V, an encoder and converters.

## Where this departs from the document

* **Bit rate.** The document sends a bit in 20 ns with 5x oversampling, which needs a
  250 MHz sampling clock. Here the receiver oversamples at the 50 MHz system clock, so a
  bit lasts 100 ns, which is 10 Mbit/s. A 2-bit frame still takes only 400 ns of the 10 µs
  cycle.
* **Position controller latency** is 23 clocks, which is 460 ns. The document gives 400 ns.
* **Current loop latency** is 75 clocks. The document gives 91 clocks. The split also
  differs: 2 clocks for axis conversion, 18 for deadbeat, and 12 for sector plus firing time.
* **Delta modulator.** It tracks: it compares the input with the value the far end holds,
  not with the previous sample. A fast input is followed one step per cycle instead of
  being lost.
* **Compensation.** The threshold *n* = 8 and the 8-bit word width are chosen here. The
  comparison uses only the low 8 bits.
* **Firing-time table.** The sector conditions and firing-time formulas follow the
  hexagon geometry. The active-vector order per sector is chosen here.
* **Assumed values.** The motor resistance (2.8 Ω), inductance (1.1 mH), pole pairs (4),
  encoder resolution (8192 counts per revolution) and current scales are assumed. Only the
  30 V supply and the Table 3-I mechanical values come from the document.
* **Dead time.** No dead time is generated. It is left to the gate driver (600 ns).
* **Converter strobes** are active high.


## Running

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and stops.
Build one with plain Verilator from the repository root. Put the package first, and let
Verilator find the other modules through `-y`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb --top-module tb_sd_ncs_top \
  rtl/sd_pkg.sv tb/tb_sd_ncs_top.sv
./obj_dir/Vtb_sd_ncs_top
```

The floating-point testbenches need their reference package as well:
`tb_fp_mul`, `tb_fp_add`, `tb_fp_convert`, `tb_position_controller`, `tb_speed_unit`,
`tb_deadbeat_unit` and `tb_svm`. Add `tb/tb_fp_pkg.sv` after `rtl/sd_pkg.sv` for those.
The full-system testbench runs at the default parameters. It takes about 40 s.

## Results

Every testbench passes with 0 failures:

| Testbench | Checks |
|---|---|
| fp_mul | 4001 |
| fp_add | 4001 |
| fp conversions | 6000 |
| motor counter | 7 |
| delta modulator | 3002 |
| sigma modulator | 3000 |
| serial link | 900 |
| compensation channel | 4000 |
| position controller | 6000 |
| trig ROM | 8192 |
| ADC interface | 1200 |
| axis converter | 6000 |
| speed unit | 366 |
| PWM | 2727 |
| deadbeat | 6001 |
| SVM | 8008 |
| current controller | 1506 |
| current steps | 505 |
| full system | 45536 |

The full-system test runs 40 000 cycles (0.4 s) of a 1 rad position step with channel noise.
Results:

* the compensation channels accepted 716 words and rejected 200;
* all six SVM sectors were used;
* 95 % of the step was reached at 0.197 s;
* the final position was 1.007 rad, with no overshoot.

`tb_current_step` drives the current loop into a locked-rotor R-L motor at 30 V. It applies
steps of 0.125 A, 0.25 A and 0.5 A.

| Step | Periods to within 0.04 A | Note |
|---|---|---|
| 0.125 A | 1 | deadbeat |
| 0.25 A | 2 | |
| 0.5 A | 5 | limited by the inverter voltage |

The d-axis current stays within 0.13 A during steps.
