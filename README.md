# Space-vector PWM modulator for a three-phase inverter

A two-level, three-phase voltage source inverter has eight switch states.
Six of them put a voltage vector of fixed length on the motor, 60 degrees
apart, and two ([000] and [111]) put none. Space-vector PWM builds any
reference vector inside the hexagon of the six vectors. In each switching
period it holds the two active vectors next to the reference for times
proportional to their share, and fills the rest of the period with zero
vectors. This RTL does that in hardware. A frequency command turns the
reference vector, and a modulation index sets its length. The design
produces the three pole signals and then the six gate signals for the inverter
switches, at a fixed 20 kHz switching frequency.

Three switching patterns can be selected at run time. They differ in how the
zero time is placed:

| `pattern` | name | zero vector | effect |
|---|---|---|---|
| 0 | symmetric | half [000] at both ends, half [111] in the middle | seven segments, one pole toggles per step |
| 1 | odd 60-degree bus-clamped | [111] in sectors I, III, V; [000] in II, IV, VI | one pole does not switch for each 60 degrees |
| 2 | even 60-degree bus-clamped | [000] in I, III, V; [111] in II, IV, VI | same, other parity |
| 3 | symmetric | (same as 0) | |

## Blocks

```
             +-----------+  carrier, period_start
  clk ------>|  divider  |-----------------+------------------------+
             +-----------+                 |                        |
             +-----------+  sector, frac   v                        |
 freq_step ->| frequency |-------------> +---------+  PWMA..C  +-----------+--> gate_hi[2:0]
 phase_seq ->|  ratio    |               | decoder |---------->| dead time |--> gate_lo[2:0]
             +-----------+  mod_index -->|         |           +-----------+
                            pattern ---->|         |             ^       ^
                                         +---------+          dead_band start_stop
                                          addr | ^ data
                                         +-----v---+
                                         | storage |  sine table, 0..60 deg
                                         +---------+
```

| file | block |
|---|---|
| `rtl/svpwm_pkg.sv` | pattern enum, sector type, vector table and helper functions |
| `rtl/svpwm_divider.sv` | switching-period counter and triangular carrier |
| `rtl/svpwm_freq_ratio.sv` | reference-angle accumulator (frequency ratio select) |
| `rtl/svpwm_sin_rom.sv` | sine table over one sector (storage) |
| `rtl/svpwm_decoder.sv` | dwell times, vector order, carrier comparison |
| `rtl/svpwm_dead_time.sv` | complementary gate signals with dead band, start/stop |
| `rtl/svpwm_top.sv` | the modulator |

## How the reference angle is held

The angle is never stored in degrees. It is a sector number 0..5, standing
for sectors I..VI, plus a 20-bit fraction of the 60-degree sector. Once per
switching period the fraction is advanced by `freq_step`. A carry moves the
vector into the next sector, and a borrow moves it back when `phase_sequence`
is 1 (reverse rotation, phase order A-C-B). No division by six, no arctangent
and no angle normalisation are needed. The fundamental frequency is

    f1 = fs * freq_step / (6 * 2^20),      freq_step = round(6 * 2^20 * f1 / fs)

With fs = 20 kHz this gives a resolution of 3.2 mHz, and `freq_step` must stay
below 2^20 (f1 < 3.33 kHz). Example: a four-pole motor at 1000 rpm runs at
f1 = 33.3 Hz, so `freq_step` = 10486 (600 switching periods per revolution).
At 200 rpm, f1 = 6.67 Hz and `freq_step` = 2097.

## Dwell times

Take the reference at angle theta (0..60 degrees) inside sector k, with
modulation index m. Here m = 1 is the largest circle that fits in the hexagon,
a phase-voltage amplitude of Vdc/sqrt(3). The two neighbouring active vectors
are held for

    T1 = m * Ts * sin(60 deg - theta)      (vector V_k)
    T2 = m * Ts * sin(theta)               (vector V_(k+1))
    T0 = Ts - T1 - T2                      (zero vectors)

Vectors are numbered around the hexagon: V1=[100], V2=[110], V3=[010],
V4=[011], V5=[001], V6=[101]. The bits are poles {A,B,C}, and 1 means the
upper switch is on.

The decoder works in half-period units, because the carrier covers one
half-period on its way up and another on its way down. So
t1 = HALF*m*sin(60-theta), where HALF = 1250 clocks. The table gives
sin(theta) at address a and sin(60 deg - theta) at address 256-a. The two reads
take two clocks, and one clock of multiply-and-order follows. `mod_index` is
unsigned with 2^15 = 1.0, and values above 1.0 are clipped to 1.0, so there is
no over-modulation. At m = 1, rounding can make t1+t2 one count larger than
HALF; t2 is then trimmed so that t0 = 0.

## Vector order, compare levels and polarity (the hard part)

Going from [000] to [111] one pole at a time, the inverter always passes
first the active vector with one pole high (V1, V3 or V5) and then the one
with two poles high (V2, V4 or V6). In odd sectors V_k is the one-pole vector;
in even sectors it is V_(k+1). From this the decoder names three poles:

* **first**: the pole high in the one-pole vector (on longest);
* **second**: the extra pole of the two-pole vector;
* **last**: the remaining pole.

Each pole gets a compare level C and a polarity bit. The carrier is a
symmetric triangle 0, 1, .., 1249, 1249, .., 1, 0. A pole with polarity 0 is
on while carrier >= C, for exactly 2*(HALF-C) clocks, centred on the middle of
the period. A pole with polarity 1 is on while carrier < C, for 2*C clocks
split over both ends. With t_single and t_double the half-period dwell times of
the one-pole and two-pole vectors:

| zero vector used | polarity | first | second | last |
|---|---|---|---|---|
| both (symmetric), t0h = t0/2 | 0 | t0h | t0h + t_single | t0h + t_single + t_double |
| [000] only | 0 | t0 | t0 + t_single | HALF (never on: clamped low) |
| [111] only | 1 | HALF (always on: clamped high) | t0 + t_double | t0 |

So in sector I the symmetric pattern runs [000] [100] [110] [111] [110] [100]
[000]. Odd bus clamping runs [111] [110] [100] [110] [111] in sector I, with
pole A held high. In sector II it runs [000] [010] [110] [010] [000], with pole
C held low. The period always starts and ends in the zero state. So in
bus-clamped mode, crossing between a [111] sector and a [000] sector toggles
all three legs at the period boundary.

## Timing

* One switching period is CLK_HZ/FS_HZ = 2500 clocks at 50 MHz. `period_start`
  is high for its first clock.
* At `period_start` the decoder makes the levels computed during the previous
  period active. It also samples `sector`/`frac` (before this period's advance),
  `mod_index` and `pattern`. The new levels are ready 5 clocks later
  (`calc_done`) and are used from the next `period_start`. The pole signals
  therefore lag the sampled angle by one switching period. Inputs can change at
  any time; each change takes effect one or two periods later.
* `pwm` is registered, one clock after the carrier. The gates follow one clock
  after `pwm` with no dead band, or `dead_band` clocks later than that on the
  side that turns on.
* After reset the poles stay at [000] for the first switching period, until
  the first levels are ready.

## Dead time and start/stop

When a pole changes, both switches of its leg go off. The new switch turns on
after `dead_band` clocks. A pole pulse shorter than the dead band restarts the
wait, so the gate misses that pulse. With `start_stop` low all six gates are
off. After it rises, each leg waits one dead band before driving. An assertion
checks that the two gates of a leg are never on together. `dead_band` is an
8-bit run-time input; at 50 MHz, 50 clocks is 1 us.

## Top-level interface (`svpwm_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `freq_step` | in | 20 | reference-vector step per period (see above) |
| `phase_sequence` | in | 1 | 0: A-B-C rotation, 1: A-C-B |
| `mod_index` | in | 16 | modulation index, 32768 = 1.0 |
| `pattern` | in | 2 | switching pattern (table at the top) |
| `dead_band` | in | 8 | dead time in clocks |
| `start_stop` | in | 1 | 1: gates driven, 0: all off |
| `gate_hi`, `gate_lo` | out | 3 | upper / lower switch of legs {A,B,C} |
| `pwm` | out | 3 | pole signals before dead time |
| `sector` | out | 3 | sector of the pattern being output |
| `period_start`, `calc_done` | out | 1 | period strobe; decoder finished |

Parameters: `CLK_HZ` (50 000 000), `FS_HZ` (20 000), `FRAC_W` (20, angle
fraction), `AW` (8, table address: 257 entries), `DW` (16, table word),
`MW` (16, modulation index), `DBW` (8, dead-band counter). For another clock
or switching frequency, change `CLK_HZ`/`FS_HZ`; the carrier width follows.

## What is taken from where

The following come from the description of the modulator:

* the 20 kHz switching frequency;
* the dwell-time equations and the vector numbering around the hexagon;
* the minimum-switching symmetric sequence, with [000] at the ends and [111]
  in the middle;
* the two 60-degree bus-clamped schemes and their example sequences;
* the five functional blocks (divider, frequency ratio select, decoder,
  storage, dead time) and their connections;
* the phase-sequence and start/stop controls.

The following are this design's own choices:

* the 50 MHz clock;
* the sector-plus-fraction angle accumulator;
* a sine table as the storage contents, computed at elaboration (a fixed-point
  Taylor series, see `svpwm_sin_rom.sv`);
* all word widths;
* the level-and-polarity form of the comparison;
* the one-period pipeline;
* the dead-time counter and the run-time dead-band input;
* the modulation-index input;
* how undefined pattern code 3 and values above 1.0 are handled.

The original block diagram also shows a control input labelled K. Its purpose
is not described, so it has no counterpart here. The inverter bridge, the gate
driver, the motor and the host PC are outside this RTL; the gate outputs are
where the driver connects.

Known limits:

* The angle is quantised to 60/256 degree per table step (up to 0.23 degree),
  and the low 12 bits of the fraction only feed the accumulator.
* There is no over-modulation and no minimum-pulse suppression.
* The dead time is not compensated in the volt-seconds.

## Verification

Each testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
stops on a watchdog if it hangs.

| testbench | what it checks |
|---|---|
| `tb/tb_svpwm_divider.sv` | carrier value every clock, exactly 2500 clocks per period |
| `tb/tb_svpwm_freq_ratio.sv` | accumulator against an integer model, random steps and direction, revolution length |
| `tb/tb_svpwm_sin_rom.sv` | every table entry against `$sin` (within 1 LSB), read latency |
| `tb/tb_svpwm_decoder.sv` | per-pole on-time against T1, T2, T0 worked out with reals; one pole per transition; start state; clamped pole; the two example sequences; 5-clock calculation |
| `tb/tb_svpwm_dead_time.sv` | every gate, every clock, against a sliding-window reference, several dead bands, stop/start |
| `tb/tb_svpwm_top.sv` | whole design at default parameters. Volt-seconds of every period (ideal inverter) against the reference vector, within 0.003 Vdc. Also checks sector stepping both ways, revolution length, clamped rail, gate behaviour with and without dead band, stop, and bus-clamped sector changes that toggle all three legs. It counts each mechanism and fails if one never occurred. |
| `tb/tb_svpwm_speeds.sv` | one full revolution at 1000 rpm with each pattern and at 200 rpm (four-pole motor assumed), default parameters, volt-seconds every period |

All of them run at the default parameters. To run one with plain Verilator
from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_svpwm_top \
        -y rtl -y tb +libext+.sv -Irtl rtl/svpwm_pkg.sv tb/tb_svpwm_top.sv
    ./obj_dir/Vtb_svpwm_top

`tb_svpwm_top` simulates about 2.2 million clocks. `tb_svpwm_speeds`
simulates about 24 million clocks and takes roughly 15 s.
