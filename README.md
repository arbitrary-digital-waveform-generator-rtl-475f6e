# Period-stepping pulse generator for the BASYS3 board

A one-bit "arbitrary" waveform generator: instead of a fixed square wave, the
output walks through a table of ten periods, 10 M to 100 M clock cycles long
(100 ms to 1 s at the board's 100 MHz clock). Every period opens with a
high pulse of fixed length, 25 M cycles (250 ms), and is low for the rest. So on an
oscilloscope the high time stays put while the low time grows from one
period to the next. After the tenth period the sequence starts again. The whole
circuit is a 32-bit cycle counter, a 4-bit table index and one output
register.

Files:

| file | contents |
|---|---|
| `rtl/awg_pkg.sv` | default period table and high time, the table entry type |
| `rtl/arbitrary_waveform_generator.sv` | the generator (the top module) |
| `tb/tb_arbitrary_waveform_generator.sv` | cycle-by-cycle self-checking test at 1/10^6 time scale |
| `tb/tb_awg_full_size.sv` | default-size test: one full sequence plus the start of the next (612 M cycles) |

## How the output is produced

Two comparisons on the counter drive everything:

* **End of period**: `counter == PERIODS[period_index] - 1`. On that clock
  edge the counter restarts at 0, the output is set to 1 and the index moves
  to the next entry. After entry 9 it goes back to entry 0.
* **End of high time**: `counter == HIGH_TIME - 1`. On that edge the output is
  cleared and the counter keeps counting.

The end-of-period test has priority. Both comparisons use the counter
*before* the edge, so a period of `P` cycles spans exactly `P` clock edges,
and the fall comes `HIGH_TIME` edges after the rise.

A consequence that is easy to miss: **a period no longer than the high time
never reaches the clear point**. With the default table, entries 0 (10 M) and
1 (20 M) are shorter than the 25 M high time. The output then stays high
straight through them and into entry 2. The waveform is therefore not ten
separate pulses.

| span (default table, 100 MHz) | output |
|---|---|
| entry 0, first pass after reset | low 10 M cycles (100 ms) |
| entries 1 and 2 | high 45 M (20 M + 25 M, 450 ms), low 5 M |
| entry 3 .. entry 9 | high 25 M, then low 15 M, 25 M, ... 75 M |
| entries 0, 1 and 2 on later passes | high 55 M (10 M + 20 M + 25 M), low 5 M |

One sequence is 550 M cycles (5.5 s). Rising edges come 50 M cycles apart at
first, then 40 M, 50 M, ... 100 M, then 60 M apart on every later pass (entry 9
to entry 3, through 0, 1 and 2).

## Reset and the table index

`reset` is asynchronous and active high. It clears the counter and the output
immediately, without waiting for a clock edge. It does **not** clear
`period_index`. The index gets the value 0 only at power-up, through the
register's initial value, as FPGA configuration allows. While reset is high
the index holds. This matches the original design, and it has a visible effect.
A reset in the middle of the sequence resumes at the table entry that was
active. That first period after reset is entirely low, because the output only
goes high at the end of a period.

If you want reset to restart the sequence at entry 0, add `period_index <= '0`
to the reset branch of the `always_ff` and remove the initial value. Lint's
`PROCASSINIT` warning on `period_index` will then go away too.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `CNT_W` | 32 | cycle counter width |
| `NUM_PERIODS` | 10 | table entries; the index is `$clog2(NUM_PERIODS)` bits |
| `PERIODS` | `awg_pkg::DEFAULT_PERIODS` = `(k+1) * 10_000_000`, k = 0..9 | period of each entry, in clock cycles |
| `HIGH_TIME` | 25_000_000 | high time at the start of each period, in clock cycles |

All times are in clock cycles, and the module does not assume a clock
frequency. To change the waveform, pass another `PERIODS` array (of
`awg_pkg::period_t`). If you change `NUM_PERIODS`, also pass a `PERIODS`
array of that length. An elaboration-time check rejects a zero entry or one
too large for `CNT_W`.

Two assertions run in simulation. One checks that the index stays inside the
table. The other checks that the counter never passes the end of the current
period.

## Clock and board

The module has three ports: `clk`, `reset` and `waveform_out`. On the BASYS3
board they go to these pins, all LVCMOS33:

* `clk`: pin W5, the 100 MHz oscillator, constrained as a 10 ns clock.
* `reset`: pin W19, a push button.
* `waveform_out`: pin A14, a Pmod pin probed by the oscilloscope.

The original design also mentions a vendor clock-synthesis block
(a Clocking Wizard, i.e. an MMCM/PLL) for choosing the clock frequency. No
configuration for it is given, and the board constraints clock the design
straight from the oscillator, so none is instantiated here. Put one in front
of `clk` if you need another time base. Scaling the clock scales every time
in the table above.

## Where this departs from the original design

* The period table is a parameter. In the original it is a fixed constant
  with the same ten values.
* The original comment gives the high time as "25 ms at 100 MHz". The
  constant is 25,000,000 cycles, which is 250 ms, and its simulated waveform
  shows 250 ms pulses. This design uses the cycle count.
* The original's text says the waveform can be chosen by an input signal.
  Its circuit has no such input and steps through the table by itself, and
  this design does the same.
* The assertions and the elaboration check are additions.

## Verification

`tb_arbitrary_waveform_generator` scales the table down by 10^6 (periods 10,
20, ..., 100 cycles, high time 25). This keeps the same shape, including the
two periods shorter than the high time. After every clock edge it compares the
output with a reference computed from the description above, not from a copy
of the counter. The reference works out which table entry and which position
inside it each edge falls on. The test runs more than two full sequences. Then
it applies two resets mid-sequence, one between clock edges. After each reset it
checks that the output clears at once and that the sequence resumes at the
entry it was on. It counts five behaviours and fails if any of them never
occurs:

* a rise at the start of a period;
* a fall at the end of the high time;
* a period boundary crossed while high;
* a wrap from entry 9 to entry 0;
* a reset in the middle of the sequence.

`tb_awg_full_size` uses the default parameters. It waits only for output
changes, and turns the simulation time of each change into a clock-edge count.
It runs through 612 M cycles: one full sequence and the next wrap. It checks
every transition against an expected list built from the default table. It also
checks every rise-to-rise interval, and the number of transitions. The run
takes roughly four to five minutes of CPU time.

Running with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl rtl/awg_pkg.sv \
    rtl/arbitrary_waveform_generator.sv tb/tb_arbitrary_waveform_generator.sv \
    --top-module tb_arbitrary_waveform_generator -Mdir obj_small
./obj_small/Vtb_arbitrary_waveform_generator

verilator --binary --timing --assert -O3 -Irtl rtl/awg_pkg.sv \
    rtl/arbitrary_waveform_generator.sv tb/tb_awg_full_size.sv \
    --top-module tb_awg_full_size -Mdir obj_full
./obj_full/Vtb_awg_full_size
```

Each test prints `TB_RESULT checks=N failures=M` and ends. Verilator's lint
(`--lint-only -Wall`) gives two expected warnings on the generator. Both are
explained in the module's header comment. One is the initial value on
`period_index`. The other is `reset` used both as an asynchronous reset and as
the disable condition of the assertions.
