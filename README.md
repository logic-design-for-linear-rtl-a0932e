# Engine-oil degradation monitor: least-squares slope in logic

As engine oil oxidises, its optical transmittance (%T) at the relevant infrared
band falls. This design watches that fall instead of counting kilometres. Once
an hour it takes one %T reading from an optical sensor and ADC, fits a straight
line to the last ten readings by least squares, and grades the oil as
**normal**, **warning** or **critical**. From warning on, it also estimates how
many hours remain before %T has fallen to half its fresh-oil value. That
halving is the point at which the oil should be changed.

All of this is integer arithmetic in registers, adders, multipliers and
dividers. There is no processor and no sample memory beyond the ten-deep window.
The architecture comes from a published FPGA/ASIC engine-oil monitor: hourly
sampling, a 10 × 9-bit shift-register window, least-squares sums and slope, a
percent-drop block, a fuzzy grading unit, and a conditional unit that gates a
lifetime prediction. The published description leaves some things unspecified:
the number formats, the fuzzy membership functions, the decision thresholds and
the prediction formula. Those are this design's own choices, listed in
[Where this design chooses](#where-this-design-chooses).

## Data flow

```
 data_in (9-bit %T code) ─┐
                          ▼
 clock_divider ──tick──► data_collector ──► lsm_sums ──► lsm_arith ──slope──┐
       │  hour            │ ref, newest                                      ▼
       └──────────────────┴──────────► percent_drop ──drop_pct──► fuzzy_logic_unit
                                                                            │ severity
                                                        conditional_unit ◄──┘
                                                              │ cond
                                                        prediction_unit ──► predicted
```

| module | role |
|---|---|
| `oil_pkg` | widths, the sums struct, the condition enum, the fuzzy-degree struct |
| `clock_divider` | one-cycle `hour_tick` per hour; 9-bit running hour, which stops at 511 |
| `serial_input` | chain of enabled D flip-flop words with all stages tapped (10 × 9 bits) |
| `data_collector` | reference register for the t = 0 sample, plus two `serial_input` chains: %T (y) and hour stamps (x) |
| `lsm_sums` | Σx, Σx², Σy, Σxy over the window |
| `lsm_arith` | slope = SSxy / SSxx in signed Q7.8 |
| `percent_drop` | ⌊100·(ref − T)/ref⌋ |
| `fuzzy_partition` | normal/warning/critical degrees of one input (helper) |
| `fuzzy_logic_unit` | fuzzifies slope, drop and hour; applies the rules; defuzzifies by centroid |
| `conditional_unit` | turns the severity into the NORMAL/WARNING/CRITICAL outputs; the condition only rises |
| `prediction_unit` | remaining hours to the half-%T point |
| `oil_monitor_top` | wires the above together |

The sensor and ADC are outside the design; their 9-bit code is the `data_in`
port. No display driver is included. The condition flags, the estimate, the
slope, the percentage drop and the fuzzy degrees are all top-level ports, so
LEDs, 7-segment digits or a bus interface can be added outside.

## Sampling and the sliding window

`clock_divider` raises `hour_tick` in the first cycle after reset and then
every `CLK_PER_HOUR` clocks. `hour` is the running hour of the sample being
taken (0, 1, 2, …). The default of 180 000 000 000 cycles assumes a 50 MHz
board clock; set it to match your clock. After the tick for hour 511 the
counter stops and raises `hour_full`, and no more samples are taken. A
wrapping counter would give the regression a time axis that jumps back to 0.

`data_collector` stores the sample at hour 0 as the fresh-oil reference `ref_t`
and puts nothing into the window. Each later sample is shifted into the %T
chain, and its hour stamp goes into the hour chain in the same cycle. After
hour 10 the window holds hours 1–10. From then on, each new sample drops the
oldest one, so a fresh slope comes out every hour (hours 1–10, then 2–11, and
so on).

## Least-squares slope (the core arithmetic)

With x the hour stamps and y the %T codes of the N = 10 window entries, the
regression slope is

    slope = SSxy / SSxx
    SSxx  = Σx² − (Σx)²/N
    SSxy  = Σxy − Σx·Σy/N

`lsm_sums` forms the four sums with one adder tree per sum and registers them.
Sum widths are 13 bits for Σx and Σy and 22 bits for Σx² and Σxy. These widths
cover up to 16 window entries of 9 bits without overflow.

`lsm_arith` does not divide by N. It multiplies both SS terms by N instead:

    N·SSxx = N·Σx² − (Σx)²        N·SSxy = N·Σxy − Σx·Σy

The quotient is the same, and the two integer divisions by N, which would each
truncate, disappear. The numerator is shifted left by 8 before the single
signed division, so the slope comes out in **Q7.8**: %T codes per hour × 256.
The result is rounded toward zero and saturated to 16 bits. A window whose hour
stamps are all equal makes SSxx zero and gives a slope of 0. This only happens
once the hour counter has stopped.

Falling oil quality means a negative slope. With consecutive hour stamps,
N·SSxx is always 825, so one code per hour of decline reads as −256.

## Grading: the fuzzy unit

Three crisp quantities describe the oil. Each is split into three overlapping
sets by `fuzzy_partition`, using breakpoints B1 < B2 < B3. Degrees are 8-bit,
and 255 means full membership.

```
 255 ┤normal\      /\warning   /critical
     │       \    /  \        /
   0 ┤........\../....\....../.......
            B1   B2    B3
```

| input | meaning | B1 / B2 / B3 (default) |
|---|---|---|
| decline rate | max(0, −slope), Q.8 codes/h | 512 / 768 / 1024, i.e. 2 / 3 / 4 codes/h |
| percentage drop | from `percent_drop` | 30 / 45 / 50 % |
| running hour | hour stamp of the newest sample | 200 / 300 / 400 h |

The rules follow the two alarms the method is built around. A steeply falling
slope is the warning sign. The oil-change point is %T at half its fresh value.

- *normal* = min of the three normal degrees. The oil is normal only as far as
  every input says so.
- *warning* = max of the rate's warning degree, the rate's critical degree, and
  the warning degrees of drop and hour. However steep the slope, it only ever
  raises a warning.
- *critical* = max of the critical degrees of drop and hour.

The unit defuzzifies by centroid, with set centres 0, 128 and 255:

    severity = (128·μwarning + 255·μcritical) / (μnormal + μwarning + μcritical)

`conditional_unit` reads severity < 96 as normal, 96 to 159 as warning and 160
or more as critical. It holds the worst condition reached until reset, so a
noisy reading cannot clear an alarm. The thresholds are set against the
centroid. A fully critical input gives a severity of at least 191, so a 50 %
drop always reads critical: this is the oil-change rule. In practice critical
is reached at about 47 % drop when the slope is also raising a warning. A pure
warning gives exactly 128. Along the decline-rate axis alone, warning starts
near 2.75 codes/h.

Every breakpoint and threshold is a parameter. Only the 50 % drop point comes
from the original method. The rate and drop defaults are tuned to reproduce
the published example run: warning at 84 h with about 54 h of life predicted,
and critical at 135 h. They are not fitted to measured oil data, which should
replace them in any real use.

## Prediction

    remaining hours = (T − ref/2) / (−slope)

`prediction_unit` computes this in integers as `((T − ref/2) << 8) / rate`,
truncated and saturated to 16 bits. A flat or rising slope gives 65535, and %T
already at half the reference gives 0. The estimate is marked valid
(`pred_valid`) once the condition is warning and is forced to 0 at critical. In
the normal condition the raw estimate is still driven but marked invalid. It is
unstable then, because a nearly flat slope makes it very large.

## Timing

Each block registers its result and passes a one-cycle valid strobe to the
next:

| cycle after `sample_tick` | event |
|---|---|
| 0 | sample and hour stamp enter the registers |
| 1 | `upd`: window shows the sample; percent drop and sums are computed |
| 2 | sums and drop are registered |
| 3 | slope is registered |
| 4 | severity is registered |
| 5 | condition is updated |
| 6 | estimate is registered; `result_valid` pulses |

No result is produced for samples 0–9 (the reference and the window fill). A
sample's result is complete long before the next sample arrives, so the chain
needs no back-pressure. `CLK_PER_HOUR` must be at least 8. Reset is
synchronous and active low.

## Where this design chooses

- **Window length:** 10. The original method's summary mentions a regression
  "every 5 data", but its register description and diagrams use ten stages.
- **Slope:** SSxy/SSxx, the standard least-squares slope. It is scaled by N
  rather than divided by N, and is a signed Q7.8 value.
- **Sample and hour codes:** 9 bits, as in the original. The meaning of a %T
  code (its scale against percent transmittance) is left to the ADC.
- **Percentage drop:** an integer percentage, truncated.
- **Fuzzy unit:** the membership shapes, breakpoints (except 50 %), rules and
  centroid defuzzifier are this design's own.
- **Conditional unit:** the thresholds and the rising-only latch are this
  design's own.
- **Prediction:** linear extrapolation to half the reference; the 16-bit width
  is this design's own.
- **Clock divider:** the 50 MHz default, the tick at hour 0 and the stop at
  hour 511 are this design's own.
- **Not included:** the sensor and ADC front end, and a display driver.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`; the helper `fuzzy_partition` is covered by `tb_fuzzy_logic_unit`. Each prints
`TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module tb_oil_monitor_top rtl/oil_pkg.sv tb/oil_ref_pkg.sv \
    tb/tb_oil_monitor_top.sv -o sim
obj_dir/sim
```

`tb_oil_monitor_top` runs a synthetic oil over the whole 0–511 hour range with
an 8-cycle "hour" (`CLK_PER_HOUR = 8`; everything else at its defaults). %T
starts at 400 and falls by 0.1 code/h with ±1 code of noise. From hour 80 it
falls by 0.5 code/h. `tb/oil_ref_pkg.sv` is an independent model: slope in
floating point from the mean-centred formula, plus drop, fuzzy grading and
extrapolation. The testbench checks every output of every update against this
model, checks that each result arrives exactly 6 cycles after its sample, and
counts each behaviour of the design:

- reference capture
- window fill
- sliding updates
- each of the three conditions
- valid, saturated and zeroed estimates
- the hour counter stopping

This oil declines too slowly to trip the slope warning. It goes to warning at
hour 275, when the drop and age inputs take over, and critical at hour 326.

`tb_oil_lifetime_run` replays the shape of the published example with a
synthetic oil. %T falls by 0.1 code/h until hour 76, then by 3 codes/h. The
testbench requires:

- warning within ±3 h of 84 h, with 54 ± 10 h predicted;
- a prediction that never rises while in warning;
- critical within ±3 h of 135 h, with the estimate at 0.

At the defaults the design gives warning at 84 h with 59 h predicted, and
critical at 137 h.

No simulation was run at the real `CLK_PER_HOUR` default. One hour is 1.8 ×
10¹¹ cycles, so a full run is out of reach for a cycle simulator. The clock
divider is tested on its own over its whole hour range with a 5-cycle period.

## Resources

The whole design is about 390 flip-flops. Its arithmetic is a few dozen adders
and multiply-accumulates, plus one 48-bit divider (slope), one 32-bit divider
(prediction), one 18-bit divider (centroid) and one 16-bit divider (percent
drop). Each divider is combinational, so with a slow sample rate one clock
cycle per stage is plenty. At high clock rates, the 48-bit divider is the path
to pipeline or to make iterative first.
