# Universal fault-tolerant four-phase digital PWM controller

A controller for switch-mode DC-DC converters. It drives up to four buck
power stages, either as one interleaved multiphase converter or as up to
four independent converters. Its central part is a four-phase digital
pulse-width modulator (MDPWM) that runs from a slow clock, only 8 or 9
clocks per switching period. It still reaches 8 bits of duty-ratio
resolution in hardware and 11 bits on average, because it combines three
mechanisms:

* a shared **counter** sets the coarse position of the falling edge (3 bits);
* a **delay line** of 32 current-starved cells, kept equal to one clock
  period by a matching loop, sets the fine position (5 bits);
* a **sigma-delta modulator** dithers the remaining 3 bits over
  successive periods.

Interleaving with an odd number of phases is the hard part. Three phases
need a 9-state counter, and 9 does not divide 256. A conversion step
therefore splits each 8-bit duty word into counter steps and delay cells so
that the duty ratio stays monotonic. Because of this the controller can
keep running when a phase fails. An over-current flag turns that phase off.
The management unit then re-spreads the remaining phases, going from 90°
to 120° and then to 180° spacing, down to a single phase after three
failures.

The RTL is SystemVerilog (IEEE 1800-2017). The digital parts are
synthesizable. The two analog parts, the delay line and the dead-time
delay, are behavioural models with real-valued delays.

## Block structure

```
               mode  phase_req  ocp  ocp_clear
                 |       |       |      |
              +--v-------v-------v------v--+  adc_clk[4] (ADC sample strobes, out)
              |   mmu (management unit)    |---------------------------->
              +----------------------------+
   e[4] (ADC    | comp_en, pid_clk   | phase_enable, phase_sel, phase_angle
   errors, in)  v                    v
   ------> 4 x pid ---d[4]---> mdpwm -----dpwm[4]----> 4 x deadtime --> c[4], c_n[4]
                 (interleaved: all     |  prog_counter (8/9 states, shared)
                  phases take pid 1)   |  sync_block   (offsets, set pulses, mode)
                                       |  4 x mdpwm_phase:
                                       |      sigma_delta -> num_conv -> launch
                                       |      delay_line (model) + delay_match
                                       |      output latch
```

| File | Block |
|---|---|
| `rtl/mdpwm_pkg.sv` | widths, mode enum, conversion and offset functions |
| `rtl/prog_counter.sv` | 8/9-state counter |
| `rtl/sync_block.sv` | phase slots, counter offsets, set conditions, 9-state mode |
| `rtl/sigma_delta.sv` | 11-bit to 8-bit first-order modulator |
| `rtl/num_conv.sv` | duty word split and comparison with the counter |
| `rtl/delay_line.sv` | behavioural model of the 32-cell line and its taps |
| `rtl/delay_match.sv` | delay matching loop, coarse/fine bias codes |
| `rtl/mdpwm_phase.sv` | one phase: the above plus the output latch |
| `rtl/mdpwm.sv` | four phases, shared counter and synchronization |
| `rtl/pid.sv` | programmable PID compensator |
| `rtl/mmu.sv` | management unit: faults, angle refresh, enables, strobes |
| `rtl/deadtime.sv` | behavioural model of the dead-time generator |
| `rtl/univ_mdpwm_ctrl.sv` | top level |

The windowed delay-line ADCs are not included. The top takes their signed
4-bit error words as inputs (`e`) and gives out their sample strobes
(`adc_clk`).

## How one phase makes a pulse

All timing is counted in clock edges of `clk`. The counter output `r`
runs 0..7, or 0..8 in 9-state mode. Each phase has an offset `s`, the
counter state at which its period starts.

1. **Set.** On the clock edge that ends counter state `s`, the output goes
   high. At the same edge the phase captures the sigma-delta word `dc`, the
   offset and the mode for this period.
2. **Launch.** `num_conv` gives a target counter state
   `(counter part of dc + s) mod M`, with M = 8 or 9. On the edge that ends
   the target state, a transition is launched into the delay line. If the
   target equals `s`, this is the same edge as the set.
3. **Reset.** The output falls after `N_dl` cell delays. A 32:1 multiplexer
   taps the line after `N_dl` cells.

Pulse width = (counter steps) · T_clk + N_dl · t_cell. The delay matching
loop holds t_cell at T_clk/32 in 8-state mode and at T_clk/28.44 in 9-state
mode. Either way one cell is 1/256 of the switching period.

The set/reset latch is built from two toggle flip-flops in the clock
domain. `S` is set to `~L` when the period starts. The launch copies `S`
into `L`, and `L` runs through the line. The output is
`S xor (L after N_dl cells)`. Both edges of `L` travel the line the same way,
so a late reset can never swallow the next set, even at duty ratios close
to 1. When the set and a zero-cell launch fall on the same edge
(`dc = 0`), nothing appears at the output. A disabled phase is forced low
immediately.

Periods: 8·T_clk, or 9·T_clk while exactly three phases are enabled. A
1 MHz converter with four phases therefore needs an 8 MHz clock. The
switching frequency is set by choosing the clock frequency.

## Three phases: the 9-state split

In 8-state mode the split is plain binary: `dc[7:5]` counter steps and
`dc[4:0]` cells. In 9-state mode a counter step is 256/9 ≈ 28.44 cells, so
no bit field works. `num_conv` computes the split from dc (functions in
`mdpwm_pkg`):

```
N_cn = floor(9·dc / 256)                 counter steps (0..8)
N_dl = round((9·dc mod 256) / 9)         cells (0..28)
duty = N_cn/9 + N_dl/256
```

This is the minimum-error choice that keeps the counter part as large as
possible. The result is monotonic in dc. The relative error is zero for
dc ≤ 28, peaks at 1.5 % at dc = 29 (where the first counter step replaces
cells), and is below 0.4 % above dc ≈ 85. The same two functions can fill
two 256-entry look-up tables if a ROM is preferred.

## Keeping the delay line at one clock period

The cell delay follows the model
`t_cell = T0 / (coarse + fine/16)`. This is the dual-bias current-starved
cell: a coarse and a fine current source are mirrored into the cell with
different ratios. With T0 = 25 ns, the 6-bit coarse and 5-bit fine codes
cover about 0.385 ns to 400 ns per cell. That spans 100 kHz to 10 MHz
switching (39 ns to 390.6 ps needed).

`delay_match` checks each launch one clock after it happened:

| mode | edge must have passed | must not have passed |
|---|---|---|
| 8 states | n31 (31 cells) | n32 (32 cells) |
| 9 states | n28 (28 cells) | n28a (28 + 0.44 cells) |

If the edge has already passed the late tap, the line is too fast: fine
code −1. If it has not yet reached the early tap, the line is too slow:
fine code +1. Between the two taps, the loop holds and raises `locked`.
The fine code carries into the coarse code at its ends (fine 31 → coarse+1
and fine 16; fine 0 → coarse−1 and fine 15). This keeps the current
monotonic. The loop makes one step per switching period per phase. Going
from the reset code (32/16) to the 80 MHz clock takes about 460 periods.
A full clock step between 80 MHz and 1.2 MHz takes about 1000.

**Slow-line guard.** Just after a large clock increase, the line can be
several periods long. With more than one edge in flight a tap could show
an older edge of the right level, and the loop would lock falsely. To
prevent this, a phase only launches when the end of the line has settled
(n32 equals `L`). A launch that falls due while the line is busy is
dropped: the pulse ends on that clock edge, and the loop is told "too
slow". Pulses are therefore only clock-accurate until the loop has caught
up.

Limits of the window scheme: a fine step must be smaller than the window
(one cell in 8-state mode, 0.44 cell in 9-state mode). At the slowest
clocks, where the coarse code is 0 or 1, the loop can dither by one fine
step around the window.

## Phase angles and fault tolerance

`sync_block` keeps a 2-bit **slot** per phase. These are written one phase
at a time through `phase_sel` (address) and `phase_angle` (slot). The
number N of enabled phases fixes the spacing of the slots:

| N | counter states | offsets (clocks) | spacing |
|---|---|---|---|
| 4 | 8 | 0, 2, 4, 6 | 90° |
| 3 | 9 | 0, 3, 6 | 120° |
| 2 | 8 | 0, 4 | 180° |
| 1 | 8 | 0 | – |

New slots and a new N take effect at the counter wrap, so a running period
is never cut short. Disabling a phase takes effect immediately.

`mmu` closes the fault loop:

* `ocp[i]` marks phase i as failed. It is turned off within one clock and
  stays off until `ocp_clear` or reset.
* When the set of enabled phases changes, an angle refresh starts: one
  phase's slot is written per switching period, for all four phases. The
  slots come from a stored table: the slot of a phase is the number of
  enabled phases below it. So after phase 4 fails, phases 1–3 get slots
  0, 1, 2, and once phase 2 fails as well, phases 1 and 3 get 0 and 1.
  `refreshing` is high meanwhile. During the refresh some phases can
  briefly share an offset.
* Interleaved mode (`mode = MODE_INTERLEAVED`) enables compensator 1 only,
  and its duty command drives every phase. Multi-output mode
  (`MODE_MULTI`) enables one compensator per enabled phase, and phase i
  takes compensator i.
* The ADC "clock" of each enabled compensator is a one-clock strobe at the
  first clock of every switching period. The PID strobe follows one clock
  later.

In multi-output mode the same slot table spreads the outputs over the
period. If one of four outputs fails there, the counter also goes to 9
states, because the rule "three enabled phases → 9 states" does not look
at the mode.

The "parallel converter" use (several phases switching in step) has no
mode of its own here: the slot table always spreads the enabled phases.

## Compensator

`pid` is an incremental PID evaluated on each PID strobe:
`u[n] = u[n-1] + ka·e[n] + kb·e[n-1] + kc·e[n-2]`, i.e. ka = Kp+Ki+Kd,
kb = −(Kp+2Kd), kc = Kd. The coefficients are signed 12-bit in units of
1/16 of a duty LSB. `u` saturates to the 11-bit range, which also prevents
integrator wind-up. `e` is signed, and positive when the output is below
its reference. Disabling a compensator clears it.

## Top-level interface (`univ_mdpwm_ctrl`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (8 or 9 per switching period), async active-low reset |
| `mode` | in | `op_mode_e` | interleaved / multi-output |
| `phase_req` | in | 4 | phases that should run |
| `ocp`, `ocp_clear` | in | 4, 1 | over-current flag per phase; re-arm |
| `e` | in | 4×4 | ADC error words, signed |
| `ka`, `kb`, `kc` | in | 4×12 | PID coefficients per compensator |
| `dt_code` | in | 4 | dead time, in 1 ns units in the model |
| `c`, `c_n` | out | 4 | main and synchronous-rectifier gate signals |
| `dpwm` | out | 4 | PWM signals before dead time |
| `adc_clk` | out | 4 | ADC sample strobes |
| `phase_enable`, `locked`, `refreshing`, `mode9` | out | | status |

Reset: the counter starts at 0, all slots are 0 and no phase runs. The bias
codes start at coarse 32 and fine 16 (`delay_match` parameters).
`phase_enable` follows `phase_req` one clock later. A newly enabled phase
starts at its present offset, and its new slot and spacing apply from the
next counter wrap. A new duty command applies from the next period start
of each phase.

## What is modelled and what is a design choice

Taken from the controller's description: the block set and how the blocks
are connected; the 4-bit shared 8/9-state counter and its rule (9 states
for three phases); the 90/120/180° spacings; the 11→8-bit sigma-delta; the
3-bit/5-bit split; the minimum-error split for three phases (the formulas
above reproduce its error curve); the 32-cell line with a 32:1 multiplexer
and taps after 28, 28.44, 31 and 32 cells; a dual-current cell with
delay ∝ 1/(I_fine/K1 + I_coarse/K2); a matching loop that lowers the
current when the clock period is longer than the line; refreshing the
phase angles from a stored table after a phase failure; and one
compensator in interleaved mode.

Choices made here, where the description gives only the function:

* the reading of the 2-bit `phase_angle` as a slot whose spacing depends
  on N, and of `phase_sel` as its write address;
* one OCP flag per phase (the controller has an over-current input; which
  phase tripped has to be known);
* the toggle form of the output latch and the slow-line guard;
* the window test on the printed taps, the fine-to-coarse carry, the code
  widths and the current-law constants of the delay model;
* first-order sigma-delta; incremental PID and its number formats;
* refresh speed (one phase per period), strobe timing and the slot table;
* the dead-time generator (delay on both turn-on edges, 4-bit code,
  1 ns unit).

Not included: the windowed delay-line ADCs (analog front end, not
described in enough detail to build), the programmable current-source
DACs (folded into the delay-line model), and anything about power
consumption or layout.

The delay-line and dead-time models sample asynchronous taps directly
with the clock. A silicon implementation needs the usual care at that
mixed-signal boundary. Verilator reports a few harmless lint warnings
there (delays whose value is not known statically, and a signal used both
in a delay model and in clocked logic).

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5 (`--timing` is needed for
the delay models):

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -y rtl -y tb +libext+.sv rtl/mdpwm_pkg.sv tb/tb_univ_mdpwm_ctrl.sv \
  --top-module tb_univ_mdpwm_ctrl -Mdir obj && ./obj/Vtb_univ_mdpwm_ctrl
```

| Testbench | What it shows |
|---|---|
| `tb_prog_counter` | 0..7 / 0..8 ramps, wrap, period length |
| `tb_sync_block` | offsets and set conditions for 4/3/2/1 phases, wrap-time update |
| `tb_sigma_delta` | any 8 consecutive words sum to the 11-bit command; saturation |
| `tb_num_conv` | exhaustive split and compare in both modes; monotonicity and error bounds of the 3-phase split |
| `tb_delay_line` | tap arrival times against the current law |
| `tb_delay_match` | step direction, window, carry, blocked launches, saturation |
| `tb_deadtime` | both dead times, no overlap |
| `tb_pid` | step-by-step against an integer reference |
| `tb_mmu` | slots after each failure, shutdown, compensator enables, strobe timing |
| `tb_mdpwm_phase` | pulse width against dc/256 (8 states) and N_cn/9 + N_dl/256 (9 states) over the duty range, within 1.5 cells; offsets; 11-bit mean; zero duty; shutdown |
| `tb_mdpwm` | 90°/120°/180° start times, periods, independent duty ratios |
| `tb_freq_range` | clock steps 80 MHz → 1.2 MHz → 80 MHz (10 MHz / 150 kHz switching): re-lock and correct width after each step |
| `tb_univ_mdpwm_ctrl` | end to end at default parameters, closed around a simple averaged buck and ADC model: 4-phase 1 MHz regulation at 1.8 V, load step, OCP on phase 4, 3 and 2 (120° in 9 states, then 180°, then a single phase), recovery, and multi-output regulation at 1.2/1.8/2.5/3.3 V; counts every mechanism |

The end-to-end run simulates about 4 ms of converter time in a few
seconds. The buck model in that testbench is a first-order averaged
approximation. It shows the loop closes and the reconfiguration holds
regulation. It is not a power-stage simulation.
