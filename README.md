# Space vector modulator for a two-level three-phase inverter

This RTL generates the six IGBT gate signals of a two-level, three-leg voltage
source inverter by **space vector modulation (SVM)**. SVM drives the bridge from
one rotating voltage reference `v* = vd + j·vq`. Sinusoidal PWM drives each leg
from its own sine wave. SVM gets about 15 % more fundamental output voltage
from the same DC link: the phase peak is `Vdc/√3` instead of `Vdc/2`.

Switching states can come from two sources, chosen by `use_live`:

* **Stored patterns.** A switching waveform that was computed offline is
  sampled every 5 µs and held in three 1-bit memories (Sa, Sb, Sc). The
  design replays it at 200 kHz. This is how a small FPGA board can drive the
  inverter with no arithmetic in the fabric.
* **Live modulation.** A fixed-point SVM datapath computes the sector, the
  dwell times and the switching pattern of every carrier period from the
  `vd`/`vq` inputs. The same modulator can then sit under any AC-motor
  controller that produces a d/q voltage demand.

Both sources go through a dead-time ("blanking time") generator. It keeps both
IGBTs of a leg off for a little over 2 µs at every commutation.

```
                 ┌────────────┐   ┌──────────────┐   ┌─────────────────┐
 clk ──────────► │ svm_clk_div│──►│svm_addr_     │──►│ 3 × svm_pattern │──┐ rom {Sa,Sb,Sc}
                 │ ÷250       │en │counter 0..N  │   │ _rom 16384×1    │  │
                 └────────────┘   └──────────────┘   └─────────────────┘  │    ┌──────────────┐  saup/salow
                                                                          ├─►──│ svm_blanking │  sbup/sblow
 vd, vq ───────► svm_modulator ───────────────────────────────────────────┘ mux│ dead time    │  scup/sclow
                 (sector → on-times → levels → carrier compare → mapping)   ▲  └──────────────┘
                                                                  use_live ─┘
```

## The modulation algorithm

### Sectors and the two adjacent vectors

A two-level inverter has eight switching states `{Sa,Sb,Sc}`. A `1` means the
upper switch of that leg is on.

| vector | V0  | V1  | V2  | V3  | V4  | V5  | V6  | V7  |
|--------|-----|-----|-----|-----|-----|-----|-----|-----|
| a b c  | 000 | 100 | 110 | 010 | 011 | 001 | 101 | 111 |
| angle  | –   | 0°  | 60° | 120°| 180°| 240°| 300°| –   |

V1 to V6 have length `2/3·Vdc` and divide the plane into six 60° sectors.
Sector 1 spans 0° to 60°, sector 2 spans 60° to 120°, and so on
counter-clockwise. `svm_sector_id` finds the sector without computing an
angle. It compares `vq` with `±√3·vd`, which are the 60° and 120° lines. The
ranges are half-open: [0°,60°), [60°,120°), [120°,180°), [−180°,−120°),
[−120°,−60°) and [−60°,0°). The zero vector counts as sector 1, and exactly
180° counts as sector 4.

Two active vectors bound each sector. The convention below is the hardest part
of the design and needs care:

* **v_a** is the bounding vector with *one* switch on: V1, V3 or V5.
* **v_b** is the bounding vector with *two* switches on: V2, V4 or V6.
* `θ_sec` is measured from v_a towards v_b. In sectors 1, 3 and 5 this runs
  counter-clockwise. In sectors 2, 4 and 6 it runs clockwise. For example, a
  reference at −130° lies in sector 4, between V5 (−120°) and V4 (180°), with
  `θ_sec = 10°`.

With this convention, the pattern V0 → v_a → v_b → V7 changes one leg per
step in every sector.

### Dwell times (`svm_on_time`)

`svm_on_time` first rotates the reference into the sector's frame, giving
`v_α` along v_a and `v_β` perpendicular to it. The rotations are by 0°, 120°
or 240°, mirrored in the even sectors, so they need only the constants 1/2 and
√3/2. The dwell times in one switching period T then follow from the
volt-second balance `v*·T = v_a·t_a + v_b·t_b`:

```
tb/T = √3 · vβ/Vdc
ta/T = 3/2 · vα/Vdc − √3/2 · vβ/Vdc
tz/T = 1 − ta/T − tb/T          (split equally between V0 and V7)
```

The inputs are already normalised to Vdc, so the hardware never divides.
Suppose a reference lies outside the hexagon (`ta+tb > T`). Then `ta` is
limited to T, `tb` to `T−ta`, `tz` becomes 0 and `ovm` is raised.

### Comparison levels and carrier (`svm_duty_ratio`, `svm_switch_states`)

The three dwell times become three levels, which are compared with a
symmetric triangular carrier running from 1 (the peak) to 0 and back:

```
d1 = 1 − tz/(2T)
d2 = 1 − tz/(2T) − ta/T
d3 = 1 − tz/(2T) − ta/T − tb/T   (= tz/(2T))
s_k = (d_k ≥ carrier)
```

The levels are kept directly in carrier counts (0 … `HALF_PERIOD`). The carrier
counter starts each period at its peak and counts `H, H−1 … 1, 1, 2 … H`. Each
value appears once per slope, so a level `c` keeps its signal high for exactly
`2c` clocks. One period of `{s1,s2,s3}` is therefore

```
000 | 100 | 110 |  111  | 110 | 100 | 000
tz/4  ta/2  tb/2   tz/2   tb/2  ta/2  tz/4
```

The levels are latched in the last clock of each period, so a period never
mixes two references.

### Mapping (`svm_vector_map`)

The pattern `100` means "v_a" and `110` means "v_b". `000` and `111` are V0
and V7:

| sector | 1  | 2  | 3  | 4  | 5  | 6  |
|--------|----|----|----|----|----|----|
| 100 →  | V1 | V3 | V3 | V5 | V5 | V1 |
| 110 →  | V2 | V2 | V4 | V4 | V6 | V6 |

For the −130° example with |v*| = 45 V, Vdc = 100 V and T = 1 ms, the design
gives ta = 597.1 µs, tb = 135.3 µs and tz = 267.6 µs. Sc is on for 86.5 % of
the period, Sb for 26.8 % and Sa for 13.4 %, all centred on the middle of the
period.

## Stored-pattern playback

`svm_clk_div` makes a 1-clock strobe every 250 clocks, which is 200 kHz from
50 MHz. On each strobe `svm_addr_counter` steps 0, 1, … `NUM_DATA` (12001) and
then returns to 0. One pass is 12002 samples, or 60.01 ms: three cycles of a
50 Hz output. Three `svm_pattern_rom` instances, each 16384 × 1 bit, are read
at that address with one clock of latency.

On an FPGA these memories would be initialised from a file when the device is
configured. Here they have a write port instead (`ld_en`, `ld_addr`,
`ld_data = {Sa,Sb,Sc}`). Load them while `rst_n` is low, or at any time: the
read side keeps running. The top-level testbench shows how to build a pattern.
It samples a continuous-time SVM model (50 Hz reference, 1 kHz carrier) every
5 µs.

## Dead time (`svm_blanking`)

This stage follows the classic counter structure:

* `svm_blanking_div`, a mod-18 divider, makes a tick every 18 clocks
  (360 ns).
* `svm_upper_counter` counts ticks for each leg while its state is 1 and is
  held at 0 while the state is 0.
* `svm_lower_counter` does the opposite.
* `svm_blank_comparator` switches a gate on once its counter reaches
  `BLANK_TICKS` (7).

A gate turns off at the first clock edge after its state drops. The other
gate of the leg turns on 109 to 126 edges after the change. So both switches
are off for 108 to 125 clocks (2.16 to 2.5 µs at 50 MHz), and never on
together. Assertions in `svm_blanking` check the "never on together" rule.
A state that lasts less than the dead time never reaches its gate.

## Interface of `svm_inverter_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 50 MHz clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `vd`, `vq` | in | 16 | reference, signed Q1.15 as a fraction of Vdc. The inscribed circle has radius 1/√3 (18919). |
| `use_live` | in | 1 | 1 = live modulator, 0 = stored patterns |
| `ld_en`, `ld_addr`, `ld_data` | in | 1, 14, 3 | pattern memory write port, `ld_data = {Sa,Sb,Sc}` |
| `saup` … `sclow` | out | 1 each | gate signals, upper and lower switch of legs a, b, c |
| `sw_state` | out | 3 | selected `{Sa,Sb,Sc}` before dead time |
| `sector` | out | 3 | sector (1..6) used by the live modulator in the current period |
| `period_start` | out | 1 | first clock of a live carrier period |
| `ovm` | out | 1 | live reference was outside the hexagon and was clamped |
| `rom_addr` | out | 14 | current pattern address |

Parameters and their defaults: `HALF_PERIOD` = 25000, which gives a 1 kHz
carrier. For 2.55 kHz use 9804. The others are `CLK_DIV` = 250,
`NUM_DATA` = 12001, `ROM_DEPTH` = 16384, `AW` = 14, `BLANK_DIV` = 18,
`BLANK_TICKS` = 7, `CW` = 13 (dead-time counter width) and `VW` = 16.

**Latency.** In the live path, the reference in the input register is taken
three clocks before a period boundary and drives the whole next period. The
gate outputs add one register after the mapping and then the dead time. In the
stored path, the state appears one clock after its address.

## How far it has been checked

Every module has a self-checking testbench in `tb/`. The checks are made
against values computed independently: a floating-point model in
`tb/svm_ref_pkg.sv` works from `atan2`, `θ_sec` and the dwell-time equations.

* `tb_svm_sector_id`, `tb_svm_on_time`, `tb_svm_duty_ratio` and
  `tb_svm_vector_map` check against this model. They use random references,
  exact sector boundaries and the −130° example.
* `tb_svm_switch_states` checks three things: the carrier shape, `2c` clocks
  on per level, and the per-period latch.
* `tb_svm_modulator` checks, for 120 random references, that the average space
  vector of a period equals the reference within 0.004·Vdc. It also checks
  that each period starts with V0 and that one leg switches per step.
* `tb_svm_inverter_top` runs the whole design at its default parameters in
  about 4.5 M clocks. It loads and replays a full 12002-sample pattern, checks
  every replayed state and the address wrap, and then runs the live modulator
  for one 50 Hz cycle. It also forces over-modulation and watches dead time
  and shoot-through throughout. Each of these must happen at least once.
* `tb_svm_workloads` sweeps the modulation index M at both carrier
  frequencies. It measures the 50 Hz component of the phase voltage
  `v_an = Vdc/3·(2Sa − Sb − Sc)`, with Vdc = 100 V:

| M | expected M·Vdc/√3 | 1 kHz carrier | 2.55 kHz carrier |
|---|---|---|---|
| 0.2 | 11.547 V | 11.462 V | 11.529 V |
| 0.4 | 23.094 V | 22.996 V | 23.081 V |
| 0.6 | 34.641 V | 34.538 V | 34.628 V |
| 0.8 | 46.188 V | 46.008 V | 46.188 V |
| 1.0 | 57.735 V | 57.495 V | 57.692 V |

At 1 kHz the result is 0.4 to 0.7 % low, and at 2.55 kHz it is within 0.15 %.
The reason is that the reference is sampled once per period: it moves 18° per
period at 1 kHz and 7° at 2.55 kHz. The RMS values are these amplitudes
divided by √2.

## Design choices that are this implementation's own

* The number formats are this implementation's own: Q1.15 references
  normalised to Vdc, Q1.15 dwell fractions, and √3 as a 17-bit constant.
  Sector boundaries are exact to about 10⁻⁵.
* The reference is sampled once per carrier period, at the carrier peak. The
  sector is latched together with the levels.
* The over-modulation handling is a simple clamp: `ta` first, then `tb`.
* The pattern memories have a write port instead of configuration-time
  contents. `use_live` and the load port are additions.
* In the dead-time generator, the following are assumptions chosen so that
  the dead time is never below 2 µs: the counter polarity, saturation at the
  counter maximum, a clock enable instead of a derived clock, and the
  threshold of 7 ticks.
* All registers have an asynchronous active-low reset, the dead-time stage
  included.
* Other carrier frequencies need a different `HALF_PERIOD` parameter. The
  carrier frequency is not a run-time input.

Not included: the power stage (IGBT bridge, gate drivers, DC link, load) and
the SPWM modulator that SVM is usually compared with.

## Simulating

Every file is one module or package, named after it. The packages must come
first. With Verilator 5:

```sh
# whole design, default parameters
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_svm_inverter_top \
    rtl/svm_pkg.sv tb/svm_ref_pkg.sv tb/tb_svm_inverter_top.sv -o sim && ./obj_dir/sim

# any block: replace the testbench name, e.g. tb_svm_modulator, tb_svm_workloads
```

The `-Irtl -Itb` flags let Verilator find the other modules by file name.
Each testbench ends with a line `TB_RESULT checks=N failures=M`. To
synthesise, read `rtl/svm_pkg.sv` and then the other files of `rtl/`. The top
is `svm_inverter_top`.

| file | role |
|------|------|
| `svm_pkg.sv` | formats, constants, `sector_t`, `sw_state_t`, vectors V0–V7 |
| `svm_sector_id.sv` | sector from vd/vq |
| `svm_on_time.sv` | rotation into the sector frame, ta/tb/tz, clamp |
| `svm_duty_ratio.sv` | levels d1..d3 in carrier counts |
| `svm_switch_states.sv` | triangular carrier, comparators, per-period latch |
| `svm_vector_map.sv` | {s1,s2,s3} + sector → {Sa,Sb,Sc} |
| `svm_modulator.sv` | live modulator pipeline |
| `svm_clk_div.sv`, `svm_addr_counter.sv`, `svm_pattern_rom.sv` | stored-pattern playback |
| `svm_blanking_div.sv`, `svm_upper_counter.sv`, `svm_lower_counter.sv`, `svm_blank_comparator.sv`, `svm_blanking.sv` | dead time |
| `svm_inverter_top.sv` | top |
