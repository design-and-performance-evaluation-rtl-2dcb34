# Pulsed-latch shift register

A shift register normally spends two latches per bit: a master-slave
flip-flop is a pair of latches, and the second one exists only to stop data
from racing through more than one stage while the clock is high. This design
keeps **one latch per bit** and solves the race a different way. No two
neighbouring latches are ever open at the same time. Each is opened by a
narrow clock pulse, and the pulses reach the latches of a short run one after
the other, starting at the output end. Every latch therefore takes its
neighbour's value from the previous period before that neighbour is
overwritten. Data moves exactly one stage per clock period, like a flip-flop
register, with half the storage elements. Only a handful of pulsed-clock
lines run along the register, whatever its length.

The default configuration is a 128-bit register, built from 16 groups of 8
latches and clocked at 500 MHz with 4 data phases. The storage, grouping and
control logic are synthesizable SystemVerilog. The two clock-shaping blocks,
the pulse generator and the delay line that staggers its pulse, depend on
gate delays. They are written as timed behavioural models.

## One clock period

The rising edge of the system clock produces one pulse `phi`, 60 ps wide
(three inverter delays). A delay line copies it onto five lines that fire in
a fixed order. With the default 200 ps gap between pulses:

```
t (ps)     0    60  260  320  520  580  780  840  1040 1100
ph_t      _/‾‾‾‾\___________________________________________
ph[0]     __________/‾‾‾‾\__________________________________
ph[1]     ____________________/‾‾‾‾\________________________
ph[2]     ______________________________/‾‾‾‾\______________
ph[3]     ________________________________________/‾‾‾‾\____
```

- `ph_t` opens the **temporary storage latches**. Each one copies the cell
  just upstream of it while that cell still holds last period's value.
- `ph[0]` opens the last cell of every segment, which loads its neighbour.
- `ph[1]` and `ph[2]` open the cells further towards the input, in order.
- `ph[3]` opens the first cell of every segment, which loads the
  temporary latch in front of it.

The pulses are over 1.1 ns into the 2 ns period. For the rest of the period
every latch is closed, and the serial input and the enable may change.

## Segments, groups and the temporary latches

This is the part of the design that is easiest to get wrong.

With `K` phases, at most `K` consecutive cells can be opened in the
"downstream first" order. A longer chain must reuse a phase, and that breaks
the order at one point: the cell after the break would open only after its
upstream neighbour had already been overwritten. Such a cell would receive a
bit two stages old in one period, so that bit is duplicated and the one
before it is lost. A **temporary storage latch** at that point fixes this. It
opens on `ph_t`, before any data phase, and keeps the old value for the
downstream cell to read on `ph[K-1]`. It adds no latency, because the copy
and the read happen in the same period.

So the register is cut into **segments** of `K` cells, and each segment is
preceded by one temporary latch:

```
 d ─► [T]─►c0─►c1─►c2─►c3 ─► [T]─►c4─►c5─►c6─►c7 ─► [T]─►c8 ... c127 ─► q_ser
 phase: t   3   2   1   0      t   3   2   1   0      t   3
        └──────────── sub-register (group of N = 8) ──────────┘
```

Counted from the output end of its segment, cell *i* is opened by phase
*i* mod `K`. Cells in different segments share a phase, but never read each
other directly.

The design is described as groups of `N` = 8 latches with a temporary latch
at each group boundary, driven by `K` = 4 phases. Those numbers do not
combine into a race-free chain. Eight cells in a row would need eight
distinct opening times. This implementation keeps both numbers: the
sub-register `pl_subreg` holds `N` cells, and inside it there is a temporary
latch every `K` cells (two per group by default). The cost is one extra
latch per `K` bits, 1.25 latches per bit in total, against the ideal 1.125.
`N` must be a multiple of `K`. A group size equal to `K` gives the leanest
form of the same structure.

The pulsed-clock line count is `K + 1` (four data phases plus `ph_t`). It
does not depend on `L`.

## Timing rule

The phase spacing must satisfy, per clock period,

```
t_cq + t_hold  <=  DELTA  <=  T_clk / (K + 1) - T_p
```

The left side ensures that a cell's output has settled, and its reader's
hold time is met, before the next pulse opens the next cell. The right side
ensures that all `K + 1` pulses, each `T_p` wide and separated by gaps of
`DELTA`, fit into one period. The usual form of this rule has `K` in place of
`K + 1`. Here the boundary pulse `ph_t` takes one slot of its own, so `K + 1`
is used. `pl_phase_ctrl` checks the rule at elaboration. The defaults are
t_cq = 97 ps, t_hold = 20 ps, DELTA = 200 ps, T_p = 60 ps and
T_clk = 2000 ps, which gives 117 <= 200 <= 340.

At the default `DELTA` the rule holds up to about 769 MHz (T_clk >= 1300 ps).
At 800 MHz, set `DELTA_PS` to 190 or less. Anywhere from 117 ps to 190 ps
works.

## Clock gating and output steering

`pl_ctrl` holds a gating latch that is transparent while the clock is low,
like an integrated clock-gating cell. It passes `shift_en` to the pulse
generator as `pg_en`. Because `pg_en` cannot change while the clock is high,
a change of `shift_en` never clips or creates a pulse. With `shift_en` low,
no pulse fires anywhere and the register holds its contents with no clock
activity.

The serial output `q_ser` is always the last cell. The parallel bus `q_par`
carries the contents in `OUT_PARALLEL` mode and is held at zero in
`OUT_SERIAL` mode, so a 128-bit bus does not toggle while the register is
used as a delay line.

## Top-level interface (`pl_shift_register`)

| Port       | Dir | Width | Meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1     | system clock, 500 MHz by default |
| `rst_n`    | in  | 1     | asynchronous clear of every latch, active low |
| `shift_en` | in  | 1     | 1: shift in this period; 0: hold, no pulses |
| `mode`     | in  | `out_mode_e` | `OUT_SERIAL` or `OUT_PARALLEL` |
| `d`        | in  | 1     | serial data in |
| `q_ser`    | out | 1     | serial data out |
| `q_par`    | out | `L`   | parallel data out, `q_par[0]` nearest the input |

| Parameter  | Default | Meaning |
|------------|---------|---------|
| `L`        | 128     | register length; a multiple of `N` |
| `N`        | 8       | cells per sub-register; a multiple of `K` |
| `K`        | 4       | data phases |
| `TINV_PS`  | 20      | inverter delay of the pulse generator's chain |
| `CHAIN`    | 3       | inverters in the chain (odd); T_p = `CHAIN * TINV_PS` |
| `DELTA_PS` | 200     | gap between consecutive pulses |
| `TCLK_PS`  | 2000    | clock period used by the timing-rule check |

Timing:

- `d` is sampled by `ph_t` at the rising edge. `shift_en` is sampled by the
  gating latch as the clock rises.
- Both must be stable from before the rising edge until the last phase closes
  (1.1 ns with the defaults). Changing them late in the period, after the
  pulses, is safe.
- A bit applied in period *n* is in `q_par[0]` at the end of period *n*. It
  is on `q_ser` at the end of period *n* + `L` − 1.
- Throughput is one bit per period: 500 Mbit/s at 500 MHz.

## Files

| File | Contents |
|------|----------|
| `rtl/pl_pkg.sv` | default sizes and timing, `out_mode_e`, the spacing-rule function |
| `rtl/pl_cell.sv` | one pulsed-latch storage cell (D latch with clear) |
| `rtl/tsl_bank.sv` | temporary storage latches, all opened by `ph_t` |
| `rtl/pl_subreg.sv` | sub-register: `N` cells in segments of `K`, with their temporary latches |
| `rtl/pl_pulse_gen.sv` | shared pulse generator (behavioural: delay chain and AND) |
| `rtl/pl_phase_ctrl.sv` | non-overlap delayed-clock controller (behavioural delay line) |
| `rtl/pl_ctrl.sv` | clock-gating latch and output steering |
| `rtl/pl_shift_register.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_pl_sr_prbs` and `tb_pl_sr_freq` |

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and ends with `$finish`. The behavioural clock blocks need timing support:

```
verilator --binary --timing --assert -Irtl rtl/pl_pkg.sv tb/tb_pl_shift_register.sv \
          --top-module tb_pl_shift_register -o sim
./obj_dir/sim
```

Use the same command with another testbench name for the others.

- `tb_pl_shift_register` runs the full 128-bit design at its defaults, with
  a behavioural reference beside it. It streams random data with idle
  periods and mode changes. It measures the latency of a single marker bit,
  pushes an alternating pattern through the register (this would expose any
  race-through) and resets the register in the middle of the data. After
  every period it checks the outputs and the number of pulses on every clock
  line. It also counts the shifts, idle periods, serial-mode and
  parallel-mode periods and resets, and each of them must have occurred.
- `tb_pl_sr_prbs` runs 8-, 16-, 32-, 64- and 128-bit registers side by side.
  Each is fed 10,000 periods of PRBS-15 (x^15 + x^14 + 1), first with a new
  bit every period and then with each bit held for two periods. It checks
  the contents every period and the measured activity factor: about 0.49 and
  0.24.
- `tb_pl_sr_freq` sweeps the clock from 100 MHz to 800 MHz in steps of
  100 MHz. The periods are rounded to even picoseconds, and the 800 MHz
  register uses a 180 ps gap. Each register gets 600 periods of random data
  with idle periods. The checks are made right after the last pulse of each
  period.
- The block testbenches cover the following:
  - `tb_pl_cell`: the cell is transparent, holds and clears.
  - `tb_tsl_bank`: the bank copies and keeps the copy while its input
    changes.
  - `tb_pl_subreg`: the testbench drives the pulses itself and checks one
    stage per period across a segment boundary.
  - `tb_pl_pulse_gen`: pulse position and the 60 ps width, and no pulse when
    disabled.
  - `tb_pl_phase_ctrl`: the delay of every phase, its width, and that no two
    lines overlap.
  - `tb_pl_ctrl`: gating-latch transparency and freeze, and the output
    steering.

The simulations are zero-delay for the latches. They prove the ordering and
the logic. They do not verify the electrical margins of the timing rule,
which depend on the real cells.

## Synthesis and what the models do not capture

- `pl_cell`, `tsl_bank`, `pl_subreg` and `pl_ctrl` infer latches on purpose.
  Lint tools report them as latches. Verilator's lint also reports
  "no latches detected" for the one-wide temporary latch slices, which is a
  false report: they are latches.
- `pl_pulse_gen` and `pl_phase_ctrl` describe delay circuits. A synthesis
  tool drops their delays, so the pulse generator collapses to a constant and
  every latch behind it is optimised away. In a real implementation these two
  blocks are hand-built cells. Use the models for simulation only, and
  replace them with the custom cells or characterised delay elements before
  synthesis.
- Each tap of the delay line reproduces a `T_p`-wide pulse after its delay,
  instead of passing the input waveform through. This is correct as long as
  the whole pulse sequence ends within one clock period, which is what the
  timing rule requires.
- The pulse generator's lumped delay must be shorter than half the clock
  period.

## Departures and own choices

- A temporary latch sits every `K` cells instead of every `N`; see above.
- A single pulse generator and delay line serve the whole register, rather
  than one per group. This keeps the number of pulsed lines independent of
  the length.
- There is one extra pulse line, `ph_t`, for the temporary latches. It fires
  first in every period.
- Cells are opened output end first. This is the only order that gives one
  stage per period.
- Values that are this design's own choices:
  - inverter delay 20 ps, so T_p = 60 ps;
  - gap 200 ps;
  - hold time 20 ps.
- Values taken from the published design:
  - the cell's data-to-Q delay of 97 ps;
  - T_p = 3 inverter delays;
  - 500 MHz, 128 bits, groups of 8, 4 phases.
- The reset, the gating latch, the zeroed parallel bus in serial mode and
  all port names are this design's own.
- The cell is modelled as non-inverting.
- Power, delay, leakage and transistor-count figures belong to a
  transistor-level implementation. RTL simulation cannot reproduce or check
  them.
