# Delay-line supply-voltage monitor with one-clock-cycle conversion

A supply droop on a logic power domain slows every gate on it. This
instrument measures that slowdown directly. The clock is sent through a
delay line powered from the monitored supply (VDD_ACT). The line is tuned
so that, at the lowest supply of interest (0.95 V), the delayed clock
arrives exactly one clock period later. When the supply is higher the line
is faster, so the delayed edge arrives early. A time-to-digital converter
(TDC) on a separate, quiet supply (VDD_REF) then measures how early at the
next clock edge. The result is one thermometer bit per 10 mV from 0.95 V to
1.20 V, and it is ready one clock cycle after the edge that launched it.

The reading can be taken in the same cycle as a timing-slack measurement on
a critical path. The slack monitor raises `lock_req` and the instrument
freezes the reading until software collects it over an IEEE 1687 (IJTAG)
network. Software also calibrates the line once against process variation:
the line is closed into a ring oscillator and its edges are counted.

```
            VDD_ACT                         VDD_REF
   CLK ──► VarDelay ── DEL_CLK ──► TDC (25 taps, sampled by CLK) ─┐
             ▲  ▲ DEL_SEL                                        │ 25-bit thermometer
   mode_cal ─┘  └──────────── Controller ◄───────────────────────┘
   ring_reset_n ◄──────────── │ lock stage, calibration counter (12 bit)
                              ├─► thermo2bin ─ 5 bit ─┐
                              └─ 12-bit count ────────┴─► mux (mode) ─► read TDR ─► SO
   IJTAG SI ─► SIB ─[config TDR: mode, DEL_CTRL]─► SIB ─[read TDR]─► SO
```

## How a measurement works

The clock has period T = 5 ns (200 MHz). A rising CLK edge at time 0 enters
VarDelay and leaves as DEL_CLK after τ(VDD_ACT). The next CLK edge comes at
T. The gap Δτ = T − τ is zero at 0.95 V and grows to about 2 ns at 1.20 V
on a typical die.

The TDC passes DEL_CLK down a chain of 25 buffers. Flip-flop *i* samples
the output of buffer *i* on the CLK edge at T. It reads 1 if DEL_CLK's
rising edge got through stages 0..*i* before that CLK edge, that is, if the
cumulative delay D_i ≤ Δτ. The result is a thermometer code.

The dependence of τ on supply is strongly non-linear: a 10 mV step at 0.95 V
changes τ about four times as much as one at 1.2 V. The buffer delays
therefore shrink along the chain (about 160 ps for the first, 40 ps for the
last). They are chosen so that bit *i* turns on when VDD_ACT crosses
0.96 + 0.01·*i* V on a typical die at 25 °C. That linearises the result:
code = ⌊(VDD_ACT − 0.95 V) / 10 mV⌋, from 0 to 25.

Timing, cycle by cycle:

| CLK edge | what happens |
|---|---|
| n | CLK edge enters VarDelay with the supply of this cycle |
| n+1 | TDC flip-flops hold the code for cycle n (one-cycle conversion) |
| n+2 | if `lock_req` is high at this edge, the controller copies that code into its hold register |
| later | software captures the 5-bit result through the read register |

The converter counts the ones in the held code. An isolated bubble (a 0
below a 1) then costs at most one LSB. The instrument only measures the
average delay over one cycle. Droops much shorter than 5 ns are averaged.

## Calibration of the delay line

Process variation moves τ by tens of percent, so the line length is
trimmable. It has 35 fixed elements followed by 32 selectable ones, and
the 5-bit DEL_SEL picks the tap after selectable element DEL_SEL
(35 + DEL_SEL + 1 elements). In calibration mode, a mux in front of the line
replaces CLK with NAND(RESET, DEL_CLK). The line then becomes a ring
oscillator with period ≈ 2τ.

The controller runs each measurement as follows:

1. It clears the 12-bit counter and holds the NAND's RESET input
   (`ring_reset_n`) low for 4 cycles, so that clock edges still travelling
   in the line drain out. Without this, several pulses keep circulating and
   the count comes out two to three times too high.
2. It releases the ring for 4 more cycles.
3. It raises EN_CAL for exactly 255 CLK cycles. Every rising DEL_CLK edge in
   that window is counted.

A line tuned to τ = T oscillates at half the clock, so it gives
255 / 2 ≈ 127. Software tries the taps, reads each count and keeps the tap
whose count is closest to 127. In the model, that tap is 14 (typical),
4 (slow) or 28 (fast). The choice is made once per chip and stored by
software. At power-up software writes it together with
mode = monitoring.

On entry to monitoring mode the controller freezes DEL_SEL. A later write
of DEL_CTRL has no effect until the mode is changed. A measurement restarts
whenever DEL_CTRL changes while the mode stays calibration. The last count
stays readable after the mode is left.

The tap value also reveals the die's process corner. Software can use it,
together with a temperature reading, to correct the result (see
"Limits").

## Modes

| mode field | mode | VarDelay | TDC (Cal_CTRL) | read register shows | `pwr_en` |
|---|---|---|---|---|---|
| 0 (and 3) | off | carries CLK, unused | held at 0 | 0 | 0 |
| 1 | monitoring | carries CLK, DEL_SEL frozen | samples every cycle | 5-bit result, zero-extended | 1 |
| 2 | calibration | ring oscillator | held at 0 | 12-bit edge count | 1 |

`pwr_en` is meant for an external switch on VDD_REF, the off mode being
there to stop the instrument itself from ageing. The controller and the
mode register would have to stay powered (or the IJTAG network restore
them) for the instrument to be switched back on; this RTL does not model
power domains.

## IJTAG access

Ports: `si`, `ce` (capture), `se` (shift), `ue` (update), `sel`, `rst`,
`tck`, `so`. Capture, shift and update all take effect on the rising TCK
edge while `sel` is high. (IEEE 1687 networks often update on the falling
edge; this one uses the rising edge throughout.)

Two segment-insertion bits (SIBs) reset closed, so after `rst` the path is
2 bits long. Shift `11` and update to open both. The path is then 21 bits,
listed from `so`:

| bits from `so` | cell |
|---|---|
| 0 | SIB of the read segment (keep 1) |
| 1..12 | read register bits 0..11 (captured: result or count) |
| 13 | SIB of the configuration segment (keep 1) |
| 14..18 | DEL_CTRL[4:0] |
| 19..20 | mode[1:0] |

Shift the first bit for cell 0 first. The configuration register captures
its own value, so each scan reads back what was last written. The fields
cross into the CLK domain through two-flop synchronisers, which means a
write takes effect 2–3 CLK cycles after the update. A calibration
measurement lasts 8 + 255 cycles (about 1.3 µs) after the write. Wait at
least that long before the scan that reads the count; at 25 MHz TCK one
21-bit scan alone takes about 1 µs.

## The behavioural models

VarDelay (`var_delay`) and the TDC delay chain (`tdc`) are analog in
nature. They are written as behavioural models with the ports of the real
cells. Everything else is synthesizable RTL.

* **Element delay.** One VarDelay element delays by
  t = K·V / (V − Vth·(1 − α·(T − 25 °C))). That is the shape of the
  first-order CMOS inverter delay. V is VDD_ACT, T the die temperature.
  The constants are this model's own (`vei_model_pkg`):

  | corner | K | Vth (V) | element at 0.95 V | tuned line at 1.2 V |
  |---|---|---|---|---|
  | typical | 1.00 | 0.724 | 100 ps | 3.0 ns |
  | slow | 0.97 | 0.775 | 125 ps | 2.6 ns |
  | fast | 1.08 | 0.639 | 78 ps | 3.5 ns |

  α = 0.0003 /°C. The slow line bends more and the fast line less.
* **TDC stages.** Their delays are computed from the typical curve. The
  TDC runs from the fixed VDD_REF, so its delays do not depend on VDD_ACT
  or on temperature. The corner scales them by 1.20 (slow) and 0.75 (fast).
  The slow scale is capped so that the whole TDC line stays shorter than
  half a clock period. A longer line makes its last taps see the previous
  DEL_CLK pulse, and the code wraps.
* **How delays are simulated.** Verilator rejects delays whose value is
  only known at run time. Each edge entering VarDelay therefore forks a
  process that waits the rounded delay in picoseconds as a sum of constant
  power-of-two waits. The supply is read when the edge enters the line
  (transport delay, 1 ps resolution).
* **How the TDC samples.** The TDC does not simulate its 25 buffers. It
  records the last DEL_CLK edges. At a CLK edge, tap *i* takes DEL_CLK's
  level at (now − D_i).
* **Inputs.** `vdd_act_mv` (integer mV) and `temp_c` (signed °C) stand in
  for the physical supply and temperature. `CORNER` (0 typical, 1 slow,
  2 fast) is an elaboration parameter.

Response of the model after calibration at 0.95 V and 25 °C, from
`tb_vei_corner_sweep` (VDD_ACT 0.955..1.205 V in 10 mV steps; ideal is
0, 1, …, 25):

| corner | 25 °C | 75 °C | 125 °C |
|---|---|---|---|
| typical | exact | ≤ 2 LSB off | ≤ 4 LSB off |
| slow | ≤ 1 LSB | ≤ 2 LSB | ≤ 4 LSB |
| fast | ≤ 1 LSB | ≤ 1 LSB | ≤ 3 LSB |

Heat lowers Vth and speeds the line, so hot readings come out high. They
saturate at 25 near the top of the range. Correcting for this is a
software task that combines the temperature and the calibration tap with
an offset table. It is not part of this RTL.

## Limits and departures

* The TDC has 25 flip-flops, one per 10 mV step, matching the 0..25
  output range. Stage delays are ideal values. Real minimum-size buffers
  come in steps, and their quantisation error is not modelled.
* The conversion from thermometer code to binary counts ones. The mode
  encoding, the bit order of the configuration register, the
  synchronisers, the 8-cycle settle, DEL_SEL freezing, the saturating
  counter and the active-high asynchronous `reset` are all choices of this
  design.
* The calibration counter is clocked by DEL_CLK itself and enabled by
  EN_CAL from the CLK domain. A count can differ by one edge at either end
  of the window. The 127 target leaves room for that.
* Not included: the temperature sensor, the timing-slack monitor (it
  appears only as the `lock_req` input), the software compensation and the
  VDD_REF power switch.

## Files

| file | contents |
|---|---|
| `rtl/voltage_ei.sv` | top: the four blocks, the output mux and the IJTAG network |
| `rtl/var_delay.sv` | VarDelay behavioural model (delay line / ring oscillator) |
| `rtl/tdc.sv` | TDC behavioural model (delay chain) with its sampling flip-flops |
| `rtl/vei_controller.sv` | modes, lock stage, calibration sequencer and counter |
| `rtl/thermo2bin.sv` | 25-bit thermometer to 5-bit binary |
| `rtl/vei_ijtag.sv`, `rtl/ijtag_sib.sv`, `rtl/ijtag_tdr.sv` | IJTAG network, SIB, TDR |
| `rtl/vei_pkg.sv` | mode and sequencer enums |
| `rtl/vei_model_pkg.sv` | delay formulas of the models |
| `tb/tb_*.sv` | self-checking testbenches, one per block, plus the corner sweep |

`tb_voltage_ei` runs the top at its default parameters end to end: it
calibrates over IJTAG, sweeps the supply, and checks locking, holding,
one-cycle conversion, tap freezing and off mode.

## Simulating

Verilator 5 with timing support:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/vei_pkg.sv rtl/vei_model_pkg.sv tb/tb_voltage_ei.sv \
    --top-module tb_voltage_ei -o sim
./obj_dir/sim
```

Replace `tb_voltage_ei` with any other testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. All of them finish in
well under a second. To study another corner or temperature, change
`CORNER` on `voltage_ei` or drive `temp_c`. To change the tuning range,
change `N_FIXED`. To fit a different clock, change `CLK_PERIOD_PS`: it sets
the TDC stage delays, and the calibration target stays half of the
window.
