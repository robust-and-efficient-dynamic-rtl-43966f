# Hybrid dynamic voltage scaling controller with automatic process identification

A dynamic voltage scaling (DVS) system lowers a processor's supply when the
processor does not need its full speed. Dynamic energy goes with the square of
the supply, so every 10 mV counts. There are two usual ways to pick the supply:

* **Lookup table (LUT).** Each target frequency has a voltage that was
  characterized in advance. To be safe on every chip, those voltages are taken
  for the slowest process split at the hottest temperature. A typical or fast
  chip therefore runs far above the voltage it needs.
* **Closed loop.** A replica of the critical path is measured on the chip and
  the supply is servoed until the replica just meets the target. This
  follows temperature, but the loop is slow. When the processor suddenly
  needs full speed ("panic mode"), the only safe move is to jump to the
  worst-case voltage.

This design combines the two and adds one step. At calibration it finds out
which process split the chip belongs to. It does this by measuring a small
ring oscillator at a supply of about 1.0 V. At that voltage the effect of
temperature on the threshold voltage cancels its effect on mobility, so the
oscillator's speed depends on the process only. From then on:

1. **LUT mode.** A new target frequency takes its voltage from the LUT
   column of *this chip's split*, still characterized at worst-case
   temperature.
2. **Performance-monitoring mode.** Once the regulator reaches that voltage,
   a critical-path replica is counted against the target and the supply is
   trimmed up or down to follow temperature.
3. **Panic mode.** The supply jumps to the peak voltage of *this chip's
   split*, not of the slowest split. It therefore rises less and falls back
   sooner.

With three splits (slow, typical, fast) and a process spread of ±3 sigma, about
half of all parts can run at the typical voltage instead of the worst-case
one. At 200 MHz, with 1.5 V for the slow split and 1.0 V for the fast split,
that saves roughly 15 % of the energy in LUT mode. More splits give more
savings, up to about 29 % with 40 splits. Beyond about ten splits the extra
gain is small.

## Block structure

```
            CPU bus                         ro_clk (ring oscillator)
               |                                 |
        +--------------+   RO LUT writes   +--------------------+
        | perf_manager |------------------>| process_identifier |
        |  f_target reg|                   |  freq_counter      |
        |  mode request|                   |  ro_lut            |
        +--------------+                   +--------------------+
          |f_target  |mode                         | split
          |          |        LUT writes           v
          |          |    +------------------------------+
          |--------------->  split_lut  (rows x splits)   |
          |          |    +------------------------------+
          |          |          | v_out, v_peak
          v          v          v
   cpr_clk -> freq_counter -> freq_error -> dvs_controller -> v_target  -> regulator
   (replica)      (+)    f_target (-)            ^                           |
                                                 +---------- reg_done -------+
```

| Module | Role |
|---|---|
| `dvs_top` | Connects everything. Its ports go to the CPU bus, the two oscillators, the regulator and the PLL. |
| `perf_manager` | CPU-facing registers: the `f_target` register, mode requests, table programming and status. |
| `process_identifier` | Counts the ring oscillator for one window, looks the count up in `ro_lut` and latches the split. |
| `ro_lut` | One characterized ring-oscillator count per split. Maps a count to the split. |
| `split_lut` | Frequency and voltage table, one row per target frequency and one voltage column per split. |
| `freq_counter` | Counts the cycles of an asynchronous oscillator in a fixed window of reference clocks. It is used twice. |
| `freq_error` | Replica count minus target count, signed. |
| `dvs_controller` | Mode sequencing. The only driver of `v_target`. |
| `dvs_pkg` | Shared enums (`mode_e`, `ctrl_state_e`), default voltages and the register map. |

The following are outside the RTL: the ring oscillator, the critical-path
replica, the voltage regulator, the PLL and the CPU. The oscillators are
analog circuits whose speed depends on the supply. The replica has to copy the
critical path of the particular processor being supplied. Their outputs enter
on `ro_clk` and `cpr_clk`. `v_target` and `reg_done` connect to the regulator,
and `f_target` is brought out for the PLL. The testbenches use behavioural
models of the oscillators and the regulator (`tb/osc_model.sv`,
`tb/vreg_model.sv`).

## Units

* **Voltage.** An 8-bit code in steps of 10 mV. Code 100 is 1.0 V, code 150 is
  1.5 V.
* **Frequency.** The number of oscillator cycles in one measurement window of
  `WINDOW` (default 64) reference-clock cycles. With a 10 MHz reference, a
  window lasts 6.4 µs and 200 MHz reads as 1280. `f_target`, the frequency
  column of `split_lut`, the `ro_lut` entries and the replica measurement all
  use this unit, so the hardware never converts between units. Software
  converts MHz to counts with `count = f × WINDOW / f_ref`.
* **Splits.** Numbered from the slowest (0) to the fastest (`NUM_SPLITS-1`).

## The controller: modes and how they hand over

This part needs the most care. `dvs_controller` is a single state machine
(`ctrl_state_e`):

| State | `v_target` | Leaves when |
|---|---|---|
| `IDLE` | `V_MAX` (1.5 V) after reset | a request arrives |
| `CAL_RAMP` | `V_TI` (1.0 V) | the regulator is done. It then pulses `pid_start`. |
| `CAL_MEAS` | `V_TI` | `pid_done`. It then goes to `LUT`. |
| `LUT` | follows `split_lut.v_out` for the current `f_target` and split | the regulator is done at that voltage. It then goes to `MONITOR`. |
| `MONITOR` | unchanged; replica counter enabled (`mon_en`) | a frequency error calls for a step, or a request arrives |
| `MON_WAIT` | one step above or below | the regulator is done. It then goes back to `MONITOR`. |
| `PANIC` | `split_lut.v_peak`, the largest voltage in the split's column | the regulator is done. It then goes to `MONITOR`. |

**Requests.** The performance manager sends a one-cycle `mode_valid` with a
`mode_e`:
* `MODE_RUN` is sent automatically whenever software writes `f_target`. It
  goes to `LUT`. Every change of target goes through the table, whether the
  frequency rises or falls.
* `MODE_PANIC` goes to `PANIC`.
* `MODE_CAL` goes to `CAL_RAMP`.

Requests are accepted in every state except the two calibration states. A
calibration always completes and then enters `LUT` with whatever `f_target`
is current at that moment, so a target written during calibration is not
lost.

**The monitoring law** is a bang-bang loop with a dead band. Each measurement
window gives `err = replica_count − f_target`. Then:

* If `err < MARGIN`, the replica is too slow, or inside the safety margin.
  The supply goes up one `V_STEP`.
* If `err > MARGIN + DEADBAND`, the replica has more slack than needed. The
  supply goes down one `V_STEP`.
* Otherwise the supply holds; this is the lock band.

Steps are clamped to the range `V_FLOOR` (0.9 V) to `V_MAX`. After each step
the replica counter is switched off until the regulator has settled. This
means every error the loop acts on comes from a window measured entirely at
the new voltage. `DEADBAND` must be larger than the count change that one
step causes, or the loop will hunt. With the defaults (32 counts against
about 16 counts per 10 mV near 200 MHz) it locks.

**The regulator handshake.** `reg_done` is treated as a level that means "the
supply equals `v_target`". A regulator may still show the previous target's
`done` for a cycle or two after `v_target` changes. For that reason the
controller ignores `reg_done` for `DONE_BLANK` cycles after every change of
`v_target`. If your regulator reports `done` later than that, raise
`DONE_BLANK`.

**Before calibration**, `split` reads 0 (slowest). Every LUT voltage resets
to `V_MAX` and the RO table resets so that it reports split 0. An
unprogrammed or uncalibrated system therefore behaves like a conventional
worst-case DVS system, which is safe.

## Process identification

To calibrate, software writes `MODE_CAL`. The controller ramps to 1.0 V,
waits for the regulator and starts `process_identifier`. That block enables
its `freq_counter` on `ro_clk` and takes the first full window. The count is
then looked up in `ro_lut`, and the result is latched into `split` and
`ro_count`. `done` comes `WINDOW + 3` cycles after `start`.

Entry *s* of `ro_lut` is the count that split *s* gives at 1.0 V. The lookup
returns the fastest split whose entry the count reaches:

* a chip between two corners gets the **slower** one;
* a chip slower than the slow corner gets split 0;
* a chip faster than the fast corner gets the fastest split.

Entry 0 is stored with the rest of the table, but it cannot change the
result.

## Frequency measurement across clock domains

`freq_counter` keeps a free-running Gray-code counter in the oscillator's
clock domain. The reference domain samples it through two flip-flops. Only
one bit of a Gray code changes at a time, so each sample is a value the
counter really held, even when the oscillator is much faster than the
reference. The binary value is recovered in the reference domain. At the end
of each window the previous sample is subtracted from the current one.

Both ends of a window are sampled through the same synchronizer delay, so a
window covers exactly `WINDOW` reference periods, and the count is exact to
±1. The first window opens on the first cycle `en` is seen high, and
`count_valid` arrives `WINDOW + 1` cycles later. The oscillator must make fewer
than 2^`COUNT_W` cycles per window. That is 65535 with the defaults, which
covers more than 10 GHz at a 10 MHz reference.

## Tables and the register map

`split_lut` row *r* holds a frequency `f[r]` and one voltage per split.
Rows must be programmed in rising frequency. For a target, the table picks the
first row whose frequency is at least the target. A request between two rows
therefore gets the voltage of the faster row, never less than it needs. A
request above every row gets the last row and raises `out_of_range`.

The CPU bus uses 16-bit word addresses. A write is one cycle of `bus_wr`.
Reads are combinational.

| Address | Access | Contents |
|---|---|---|
| `0x0000` | rw | `f_target` in counts. A write also issues `MODE_RUN`. |
| `0x0001` | w | mode request: 0 run, 1 calibrate, 2 panic |
| `0x0002` | r | `[11]` LUT out of range, `[10]` identifier busy, `[9]` calibrated, `[8:3]` split, `[2:0]` controller state |
| `0x0003` | r | `v_target` code |
| `0x0004` | r | ring-oscillator count of the last calibration |
| `0x0005` | r | LUT row selected for `f_target` |
| `0x0100 + s` | w | `ro_lut` entry of split *s* |
| `0x0200 + r` | w | `split_lut` frequency of row *r* |
| `0x1000 + 64·r + s` | w | `split_lut` voltage of row *r*, split *s* |

The table contents come from characterizing the product: the ring
oscillator at 1.0 V for each corner, and the critical path at the hottest
temperature for each corner and frequency. Nothing in the RTL depends on
particular values.

## Parameters (`dvs_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_SPLITS` | 3 | process splits (slow, typical, fast) |
| `NUM_FREQ` | 8 | LUT rows, i.e. target frequencies software can request |
| `COUNT_W` | 16 | frequency count width |
| `VCODE_W` | 8 | voltage code width (10 mV steps) |
| `WINDOW` | 64 | reference cycles per frequency measurement |
| `V_TI` | 100 | calibration voltage, 1.0 V |
| `V_MAX` | 150 | highest supply, 1.5 V |
| `V_FLOOR` | 90 | lowest supply the monitoring loop may set, 0.9 V |
| `V_STEP` | 1 | monitoring step, 10 mV |
| `MARGIN` | 8 | replica counts required above target |
| `DEADBAND` | 32 | width of the lock band in counts |
| `DONE_BLANK` | 4 | cycles `reg_done` is ignored after a target change |

More splits give finer voltage steps and more savings. `NUM_SPLITS` can be
set up to 64, the limit of the register map. The status register shows the
split in 6 bits.

## What is specified and what is chosen here

These parts follow the architecture: three splits; calibration at about
1.0 V; choosing the slower corner; per-split LUT voltages at worst-case
temperature; LUT mode first, then replica monitoring; panic to the split's
own peak; 1.0 V and 1.5 V as the voltage range at 200 MHz.

The following are this design's own choices:
* **Microarchitecture.** The window counter with Gray-code transfer, the
  bang-bang monitoring law, the dead band, the step size and the voltage
  limits, the `done` blanking and the register map are all this design's own
  choices.
* **Resets.** The reset values that fall back to worst-case operation are
  this design's own choice.
* **How requests enter `LUT` mode.** Every new target goes through `LUT`
  mode. One could instead reserve `LUT` mode for increases and let the loop
  handle decreases. Using the table both ways is also safe.
* **Replica margin.** The architecture calls for a small *voltage* margin,
  to cover mismatch between the replica and the real critical path. The loop
  measures the replica on the same supply it controls, so it would simply
  cancel a fixed voltage offset. The margin is therefore applied as a
  frequency margin instead: `MARGIN` extra counts above the target. Pick
  `MARGIN` from the replica's worst mismatch.
* **Measurement.** One window per calibration, without averaging.
* **Software side.** How software predicts the next task's needs is not part
  of the RTL; only the register side of the performance manager is built.

## Simulation

All testbenches are self-checking and end with a
`TB_RESULT checks=N failures=M` line. For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/dvs_pkg.sv tb/tb_dvs_top.sv --top-module tb_dvs_top
./obj_dir/Vtb_dvs_top
```

| Testbench | What it shows |
|---|---|
| `tb_freq_counter` | counts within ±1 for oscillators from 18 to 1940 counts per window, faster and slower than the reference; exact report cadence; no reports while disabled |
| `tb_ro_lut` | reset behaviour, boundaries, slower-corner rule, 500 random counts |
| `tb_process_identifier` | splits for counts at, between, above and below the corners; latency `WINDOW + 3`; split held between calibrations |
| `tb_split_lut` | row search, out of range, voltage per split, peak per split, reset contents |
| `tb_freq_error` | signed difference and timing, including the extremes |
| `tb_dvs_controller` | every state and transition, both clamps, lock band edges, done blanking, request during calibration |
| `tb_perf_manager` | register writes, requests, table strobes, address range checks, status reads |
| `tb_dvs_top` | end to end, at the default parameters (see below) |
| `tb_energy_savings` | LUT-mode energy workload over 300 parts (see below) |
| `tb_split_count_savings` | the same workload on systems built with 3, 4, 10 and 40 splits (see below) |
| `tb_panic_recovery` | panic mode on a calibrated and an uncalibrated (worst-case) system side by side (see below) |

**`tb_dvs_top`** closes the loop through oscillator and regulator models
whose speed depends on supply, process and temperature. The oscillator model
is, like real silicon, temperature-insensitive at 1.0 V. The testbench
characterizes the model into both tables and then runs the following steps:
1. It calibrates a typical part at −40 °C.
2. It requests 200 MHz. LUT mode sets the typical voltage, and monitoring
   trims the supply down to lock.
3. It heats the part to 125 °C. Monitoring raises the supply, and the replica
   still meets 200 MHz.
4. It requests panic. The supply goes to the typical split's peak, which is
   below the slow split's, and then returns to lock.
5. It requests a target beyond the table, which is flagged out of range, and
   then a lower target.
6. It recalibrates fast, slow and between-corner parts.

Each mechanism is counted, and each must occur at least once: calibration,
LUT entries, up steps, down steps, lock, panic, out of range, and every split.

**`tb_energy_savings`** draws parts from a Gaussian process distribution,
with the slow corner at −3σ and the fast corner at +3σ. Each part is
calibrated and asked for 200 MHz. The 200 MHz row holds 1.5 V for the slow
split and 1.0 V for the fast split. The 1.25 V for the typical split is an
illustrative value. The testbench checks each part's split and voltage, and
compares the average saving against worst-case 1.5 V operation with the
closed-form value of about 15.3 %. A run gives about 14.8 % over 300 parts;
no part of that sample is fast, as expected at 0.13 %.

**`tb_split_count_savings`** builds four systems with 3, 4, 10 and 40 splits
and runs the same 300 parts through all of them. The corners are spread evenly
from −3σ to +3σ. At 200 MHz the voltages fall linearly from 1.5 V at the
slowest corner to 1.0 V at the fastest. For every part and system, the test
checks the split and the voltage. Mean savings come out at about 14.8 %,
19.9 %, 26.8 % and 29.2 %. The gain flattens beyond ten splits, and each added
split makes the ring-oscillator counts of neighbouring corners closer (about
20 counts apart at 40 splits with these models). With more entries, identification
becomes less reliable. On silicon this is made worse because the
temperature-insensitive voltage differs slightly from split to split.

**`tb_panic_recovery`** runs two identical typical chips locked at 200 MHz.
Only one of them has been calibrated; the other keeps the slowest split, as a
conventional worst-case system would. Both get a panic request at the same
moment. The calibrated one peaks lower (1.29 V against 1.50 V with the models
used), then both settle back to the same locked voltage. The calibrated one
settles sooner (about 960 against 2500 reference cycles) and uses less energy
during the recovery. The test checks each of these points.

The oscillator and regulator models are illustrative and not characterized
silicon. They show that the control works, not what the voltages of a
particular process would be.
