# Self energy meter (SEM) core for FPGAs

An FPGA design often wants to know how much power it is drawing right now: to pick a clock
rate, to switch part of itself off, or simply to profile a routine. This core lets it measure
its own core supply current from the inside, with a tiny external circuit and a few hundred
logic cells.

The idea is to turn current into pulses. A small board circuit sits between the supply and
the FPGA core regulator and produces a digital pulse train whose frequency grows with the core
current (roughly 1 kHz to 200 kHz over 5 mA to 100 mA). Every pulse stands for a fixed packet
of charge. The FPGA only has to count pulses: the count since reset is the charge (and, at a
fixed core voltage, the energy) used since reset. The count per unit time is the mean current.
The RTL here is the counting, timing and storage side. The board circuit is analog; a
behavioural model of it is used by the testbenches.

## The external converter, and how to turn counts into milliamps

The board circuit has three parts:

* A 0.5 Ω shunt in front of the core regulator.
* An op-amp stage that copies the shunt drop into a current `I_FPGA · R_shunt / R_gain`, with
  R_gain = 1.5 kΩ.
* A micropower 555 timer. That current charges the timer's internal capacitor C_T from 0 V up
  to a 2.048 V reference. The timer then discharges it and holds it at 0 V for a dead time t_d
  of about 1.2 µs.

One output cycle therefore lasts

    T(I) = R_gain · C_T · V_ref / (R_shunt · I)  +  t_d          f(I) = 1 / T(I)

This law is not quite linear, because of t_d. To recover the current from a measured
frequency, invert it:

    I = R_gain · C_T · V_ref / (R_shunt · (1/f − t_d))

`tb/itof_model.sv` implements this law with C_T = 100 pF, a value this design chose. With it,
5 mA gives 8.1 kHz, 11.5 mA gives 18.4 kHz, 58.5 mA gives 85 kHz and 170 mA gives 208 kHz.
Calibrate C_T and t_d for a real board. The RTL does not depend on them: it stores raw counts
and periods, and the conversion to mA is done afterwards by the software that reads the RAM.

What the three meters store, and how each becomes a current:

| meter | stored word | mean current over an interval |
|---|---|---|
| periodic LT | accumulated pulse count at each CLK SLOW rise | `f = (w[k] − w[k−1]) · f_slow`, then invert the law |
| spaced LT | (count, CLK SLOW edge index) pairs | `f = Δcount · f_slow / Δindex` |
| spaced ST | (period in 20 MHz cycles, time stamp) pairs | `f = 20 MHz / period`, per converter cycle |

Here `f_slow` = 2 MHz / SLOW_DIV = 2.44 Hz. One count is ±1 pulse (periodic and spaced LT), or
±1 reference cycle (spaced ST). This gives the accuracy figures below. The end-to-end testbench
converts the stored words back into current with this formula and checks the result.

## Three meters

The design offers three versions of the meter. They differ in how they measure frequency and
in when they store.

**Counting input pulses during a slow clock (long term, LT).** Over one period of a slow
reference, the number of input pulses is proportional to the input frequency, to within ±1
pulse. To keep that under 1 % at the lowest frequency (1 kHz), at least 100 pulses must be
counted. The reference must therefore be slower than 10 Hz, so this design uses CLK SLOW =
2.44 Hz. The counter is never cleared: each stored word is a running total. The whole
consumption since reset is always available, and any interval is a difference of two words.

* `sem_periodic_lt` stores the running count at every CLK SLOW rise. With 8192 words (32 kB)
  it records for 8192 / 2.44 Hz ≈ 56 min. Then `is_full` (ISFULL) rises and storing stops.
* `sem_spaced_lt` looks at the same CLK SLOW rises, but stores only those where its `save`
  input is high. The stored words are then not evenly spaced. Each one therefore carries a
  time stamp: the number of earlier CLK SLOW rises, counted by a second pulse counter. A second
  control block and a second RAM hold the time stamps. Use it to record the consumption only
  while some condition of the design holds.

**Counting reference cycles during one input period (short term, ST).** For a short event,
such as one processor routine, a 2.44 Hz window is useless. `sem_spaced_st` instead counts
20 MHz cycles across each converter period. The error is ±1 cycle, which is 10 % of the
shortest period (5 µs at 200 kHz) at most, and so under 1 %. While `save` is high, every period
that ends is stored with a time stamp, the 20 MHz cycle count at the edge that ended it. The
stored periods give a current profile at the converter's own resolution. Because each period
is one charge packet, the number of stored periods between two triggers also measures the
energy used between them.

**Subroutine trigger.** `call_ret_trigger` watches an MSP430-compatible processor's opcode
fetches. It raises its output from a CALL until the matching RET, counting nested calls. In
`sem_top`, `st_use_cpu_trig = 1` routes this trigger to the ST meter's `save` input. The
result is the current profile and energy of exactly one routine.

## Block structure

```
sem_top
├── sem_periodic_lt ── freq_div ─ pulse_counter ─ save_ctrl ─ sem_ram
├── sem_spaced_lt ──── freq_div ─ pulse_counter (f_in) ─ save_ctrl ─ sem_ram (counts)
│                                 pulse_counter (CLK SLOW) ─ save_ctrl ─ sem_ram (time stamps)
├── call_ret_trigger
└── sem_spaced_st ──── period_counter ─ save_ctrl ─ sem_ram (periods)
                       time base ─────── save_ctrl ─ sem_ram (time stamps)
```

| module | role |
|---|---|
| `sem_pkg` | shared constants: clock rates, divider, widths, depths, MSP430 opcodes |
| `freq_div` | CLK SLOW from CLK SYS: a counter, square wave of period `DIV` cycles |
| `pulse_counter` | 2-state machine (input low / high) that counts rising edges, with an optional synchroniser |
| `period_counter` | reference cycles between consecutive input rises, with a one-cycle `valid` strobe |
| `save_ctrl` | the control block: write on each rise of `save_clk` (gated by `save` if `TRIGGERED`), advance the address, ISFULL |
| `sem_ram` | simple dual-port RAM, synchronous write and read, so the application can read while the meter writes |
| `call_ret_trigger` | CALL/RET nesting counter |
| `sem_*` | the three meters |
| `sem_top` | all three meters and the trigger on one `f_in` pin |

## Clocks, synchronisation and timing

* Clocks. The LT meters run on `clk_sys` (2 MHz) and the ST meter on `clk_fast` (20 MHz),
  both from the device PLL. The trigger runs on the processor clock `clk_cpu`. CLK SLOW is not
  a clock: `freq_div` produces it as a registered level in the `clk_sys` domain, and the
  control blocks detect its rising edges there.
* Synchronisers. `f_in` is asynchronous and enters every meter through two flip-flops. The
  `save` inputs of the spaced meters also go through two flip-flops, so they may come from any
  domain. They are levels and should be held for at least a few cycles around the edge they
  select.
* Minimum pulse width. After synchronisation the pulse counter needs the input high for at
  least one cycle and low for at least one. At 2 MHz this holds up to several hundred kHz. The
  converter's high time (≈ t_d = 1.2 µs) is 2.4 cycles.
* Reset. `rst_n` is asynchronous, active low, and must be released synchronously to each
  clock. The synchronisers reset to the high state, so an input that is high at reset is not
  counted as an edge. RAM contents are not cleared. `n_saved` tells how many words are valid.

Cycle-level timing, all checked by the testbenches:

| event | when |
|---|---|
| `f_in` rise → `count` increments | at the second `clk_sys` edge after the edge that first samples it |
| first CLK SLOW rise | `DIV − DIV/2` cycles after reset, then every `DIV` cycles |
| CLK SLOW rise → word written / `n_saved`++ | stored value = count at the rise; `n_saved` updates 1 cycle after the rise |
| ST: `f_in` rise → period pair written | `n_saved` updates 3 `clk_fast` edges after the first edge that samples the rise |
| ST time stamp | `clk_fast` cycles from reset to the cycle the closing rise is detected |
| RAM read | `rd_data` valid one cycle after `rd_addr` |

## Sizes and limits (defaults)

| item | value | consequence |
|---|---|---|
| pulse counter | 32 bit | wraps after 2³² / 200 kHz ≈ 6 h |
| periodic RAM | 8192 × 32 bit (32 kB) | 56 min record at 2.44 Hz |
| spaced LT RAMs | 2 × 1024 × 32 bit (8 kB) | 1024 selected CLK SLOW rises |
| spaced ST RAMs | 2 × 1024 × 32 bit (8 kB) | 1024 converter periods, ≈ 20 ms at 32 mA |
| total RAM | 48 kB | fits a device with 56 kB of block RAM |
| CLK SLOW | 2 MHz / 819672 = 2.440000 Hz | |

All depths and widths are parameters of `sem_top` and of the meters. The RAM depth and the
counter width together set how long a record lasts.

## Where this design follows the published one and where it chooses

Follows the published design:

* The two measuring methods and their clock choices (2 MHz, 2.44 Hz, 20 MHz).
* The three meter versions.
* The structure of each meter: divider, pulse counter state machine, control block with
  ISFULL, and RAM. The spaced LT version has a second pulse counter, control block and RAM for
  the time stamp, counting CLK SLOW edges.
* The 32-bit counter and 4-byte words.
* The 32 kB periodic record.
* The CALL/RET subroutine trigger.

Chosen here, where the published description stops:

* CLK SLOW is a counter-divided level edge-detected in the CLK SYS domain, not a PLL output.
* Two-flip-flop synchronisers on `f_in` and on `save`, and the reset values of the
  synchronisers.
* What the ST meter stores: one (period, time stamp) pair per input period while `save` is
  high. Its time stamp is a free-running 20 MHz counter. The first partial period after reset
  is dropped, and the period counter saturates.
* The spaced depths (1024) and the time-stamp widths (32 bits).
* All three meters in one top, and the selector between an external ST trigger and the CALL/RET
  trigger.
* MSP430 opcode decoding (CALL = `0001 0010 10xx xxxx`, RET = `0x4130`), nested-call counting,
  and the need for an opcode-fetch strobe from the processor.
* A read port on every RAM instead of exporting the memory through a debug tool.

Not included:

* The PLL.
* The analog board circuit (shunt, regulator, op-amp stage, timer, reference). It is modelled
  only for simulation.
* The circuits the meter was demonstrated on.
* Software that converts the stored words into milliamps (the formula is above).

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_sem_top rtl/sem_pkg.sv tb/tb_sem_top.sv
./obj_dir/Vtb_sem_top
```

* `tb_sem_top` runs the whole core at reduced sizes (1 ms CLK SLOW, small RAMs) for 6.7 ms of
  circuit time. The converter model is driven with a current step from 11.54 mA to 58.5 mA.
  The test checks every stored word against the model's own pulse count, and the currents
  recomputed from the words: within 10 % over 1 ms windows at 18 kHz, within 1.5 % over a
  3 ms window, and within 1 % for every ST period. It also checks ISFULL on all three meters,
  skipped and taken spaced saves, both ST trigger sources and a nested call. It counts each of
  these mechanisms and fails if any never occurs.
* `tb_sem_top_full` runs the core with every parameter at its default for 0.65 s of circuit
  time (two real 2.44 Hz periods), at 32.61 mA. It checks the CLK SLOW timing (409836 and
  819672 cycles), the first two periodic words, a current recomputed to within 1 %, a spaced
  LT save with time stamp 1, and the ST periods. It takes about 10 s to run.
* `tb_workload_currents` runs the periodic meter at full size through twelve supply currents,
  from 11.7 mA to 170.6 mA. These are the states of a measured design: idle, a processor, a
  multiplier, an FFT, a radio physical layer and an AES core, active and in standby. For each
  current, one full 2.44 Hz interval is turned back into milliamps. Every current comes back
  within 0.02 % of the value applied to the model; the test requires 0.2 %. At 170.6 mA the
  converter runs at 208 kHz, still counted correctly with a 2 MHz system clock. The test takes
  about 17 s.
* The block testbenches drive their inputs in step with the clock and predict every stored
  value and every cycle exactly.

`tb/itof_model.sv` is the behavioural converter. It takes a current in mA as a `real`, and its
parameters are R_shunt, R_gain, C_T, V_ref and t_d.
