# Power management driven by a Guaranteed Percentage scheduler

This is a small multithreaded microcontroller core whose real-time scheduler also runs
its power management. The core runs up to four hardware threads. Each thread is
scheduled by **Guaranteed Percentage (GP)**: in every scheduling interval it gets a fixed
number of pipeline cycles, its percentage. The threads' needs are therefore known in
hardware at all times. At the start of every interval the core adds up the percentages
of the active threads. It then picks the slowest pipeline clock that still supplies that
many cycles, and requests the lowest supply voltage that clock allows. Pipeline cycles
left over at the end of an interval are gated. No software is involved. A thread whose
start needs a higher voltage is held back until the supply has had time to rise. Running
threads are never slowed down.

The RTL covers:

- the clock divider;
- the GP scheduler;
- the power manager, which chooses the divider, the voltage, the activation delay and
  the gating;
- the priority manager that holds the two together;
- the multithreaded fetch stage with its instruction windows;
- the stage registers of the four-stage pipeline.

The bytecode decoder, operand fetch, execute, memory and I/O units are not included. The
pipeline carries the fetched bytes and thread numbers to ports where those units would
attach.

```
                 act_req / deact_req      cfg (percentages)
                          |                      |
          +---------------v----------------------v----------------+
          | priority_manager                                      |
          |   gp_scheduler  --grant/needed-->  power_manager      |
          |        ^                         |  |   |    |        |
          +--------|-------------------------|--|---|----|--------+
                   | iw_ready    div_next/load  |   |    | vdd_mv (to the regulator)
          +--------+--------+   +-------------v-+   |    |
          | instruction_    |   | freq_divider  |   | of_en / ex_en
          | fetch (PCs, IWs)|   |  -> pipe_tick |   |
          +--------^--------+   +---------------+   v
                   | mem_*          ID reg -> OF reg -> EX reg  -> id_* / ex_*
```

Everything runs on one base clock, `clk`. The pipeline clock is a clock enable,
`pipe_tick`, and the gated stages use the enables `of_en` and `ex_en`. A synthesis flow
turns each enable into a clock gate.

## Intervals, percentages and the divider

A GP interval is about 100 base cycles long. At divider factor *f* it holds
count = floor(100 / *f*) pipeline cycles. A thread with percentage *p* gets exactly *p*
pipeline cycles per interval, so the guarantee does not depend on the clock. The power
manager picks the slowest factor whose count is still at least the sum *S* of the active
percentages. The resulting pipeline frequency is never below what the threads need.

| factor | count (pipeline cycles) | base cycles | chosen for S | XScale-like V | Crusoe-like V |
|---|---|---|---|---|---|
| 1   | 100 | 100 | 67..100 | 1.10 | 1.30  |
| 1.5 | 66  | 99  | 51..66  | 1.00 | 1.05  |
| 2   | 50  | 100 | 41..50  | 1.00 | 0.95  |
| 2.5 | 40  | 100 | 34..40  | 1.00 | 0.875 |
| 3   | 33  | 99  | 29..33  | 0.85 | 0.85  |
| 3.5 | 28  | 98  | 26..28  | 0.85 | 0.80  |
| 4   | 25  | 100 | 23..25  | 0.85 | 0.80  |
| 4.5 | 22  | 99  | 21..22  | 0.85 | 0.80  |
| 5   | 20  | 100 | 11..20  | 0.85 | 0.80  |
| 10  | 10  | 100 | 7..10   | 0.85 | 0.80  |
| 15  | 6   | 90  | 0..6    | 0.85 | 0.80  |

A sum above 100 also runs at factor 1. The threads then cannot all get their share; it
is up to software not to over-subscribe. The table lives in `rtl/pm_pkg.sv`. The counts
come from the formula. The voltages are the two characteristics the design was evaluated
with, stored in millivolts.

`freq_divider` makes the fractional factors with a phase accumulator that counts in half
base cycles. Factor 1.5 ticks 2, 1, 2, 1 … base cycles apart. Loading a new factor clears
the accumulator, so an interval of *n* ticks lasts exactly *n · f* base cycles, for
example 66 ticks at 1.5 take 99 base cycles. The divider changes only on the first tick
of an interval.

## Voltage first, then frequency: the activation delay

The supply must never be below the level the running clock needs. The power manager
therefore requests

    vdd_mv = max( V(divider running now), V(divider for all active and pending threads) )

**Going down.** When a thread is deactivated, the divider slows at the next interval
start, and the voltage request falls in the same cycle.

**Going up.** When a thread is requested (`act_req`), it first becomes *pending*. The
voltage request rises at once to the level the new sum needs. The thread becomes
*active* `ACT_DELAY` base cycles later:

- 3700 cycles with the Crusoe-like table (the default);
- 2100 cycles with the XScale-like table.

Only then does it count in the sum, so the divider can speed up only after the regulator
has had the delay to settle.

The delay is part of every thread's start latency. A real-time thread's worst-case
execution time must include it. A deactivation request cancels a pending activation.

`vdd_mv` is a request to an external regulator, which is not part of the RTL. The
end-to-end testbench models one that slews 1 mV every 7 base cycles. It checks that the
modelled supply never falls below the level of the running divider.

## Gating the cycles nobody needs

Because the frequency is rounded up, some pipeline cycles in an interval are left over.
Once every thread has used its cycles, or no window holds an instruction, the scheduler
reports the cycle as not `needed`. The empty slot travels down the pipeline:

- `of_en` drops one pipeline cycle later, for the operand-fetch stage;
- `ex_en` drops two cycles later, for the execute / memory / I/O stage.

The decode stage, which holds the priority manager, always runs. The fetch stage works
only on demand and is not gated.

## The GP scheduler

`gp_scheduler` keeps one counter per thread of the cycles granted in the current
interval. In each pipeline cycle it grants one thread that:

- is active;
- has a byte in its instruction window;
- is still below its percentage.

Among the threads that qualify it picks round robin. The counters clear at each interval
start.

A thread that becomes active in the middle of an interval is first scheduled at the next
interval start. The running interval's divider was chosen without that thread, and
letting it run would take cycles the other threads are guaranteed.

## Fetch stage and instruction windows

`instruction_fetch` has one PC and one instruction window per thread. A window holds 8
bytecode bytes. When a window holds fewer than 4 bytes, the stage fetches an aligned
32-bit word for it and pushes the four bytes, lowest address first. Only one memory
request is outstanding at a time. The memory port is a valid/ready request plus a
response strobe, with any latency. When several windows need a refill, they take turns.
A PC load (thread start or branch) empties the window. A fetch already in flight for that
thread is then discarded.

## Top level: `komodo_pm_top`

| Port group | Meaning |
|---|---|
| `cfg_we`, `cfg_tid`, `cfg_pct` | Write a thread's percentage. Values above 100 are clamped. Change a percentage only while its thread is inactive. |
| `act_req`, `deact_req` | Per-thread activation and deactivation, normally from the interrupt/signal logic. |
| `pc_load*` | Set a thread's PC. |
| `mem_*` | Instruction memory: request valid/ready/address, response valid/data (32 bits). |
| `id_valid/tid/instr` | The byte the scheduler has just sent to decode. |
| `ex_valid/tid/instr` | The same byte two gated stages later. |
| `pipe_tick`, `of_en`, `ex_en` | Pipeline clock enable and the enables of the two gated stages. |
| `div_cur`, `vdd_mv`, `interval_start`, `count_left`, `sum_cur`, `active`, `pending` | Power-management state, for the regulator and for observation. |

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_THREADS` | 4 | Hardware thread slots. |
| `TECH` | `TECH_CRUSOE` | Voltage table; `TECH_XSCALE` is the alternative. |
| `ACT_DELAY` | 3700 (2100 for XScale) | Activation delay in base cycles. |
| `EN_FREQ`, `EN_VOLT`, `EN_GATE` | 1, 1, 1 | Switch each technique off separately. Without frequency adjustment the divider stays at 1 and the interval at 100 cycles. Without voltage scaling the top voltage is used and there is no activation delay. Without gating, `of_en` and `ex_en` follow every tick. |
| `IW_DEPTH`, `IW_THRESHOLD` | 8, 4 | Window size and refill threshold in bytes (`IW_DEPTH` is a power of two). |
| `ADDR_W`, `INSTR_W`, `FETCH_W` | 32, 8, 32 | Address, instruction unit and fetch widths. |

Assertions in the RTL check these rules:

- no thread exceeds its budget;
- the voltage request never falls below the running divider's level;
- the divider in use matches the power manager's choice;
- the gated stage registers load only on their enables.

## Energy on a vehicle-control workload

`tb/tb_agv_energy.sv` runs eight copies of the core side by side for 3.2 million base
cycles: four combinations of the techniques, each with both voltage tables. The threads
are the four control threads of a line-following vehicle:

| Thread | Percentage | Work |
|---|---|---|
| camera | 25 % | per pixel |
| line detection | 30 % | per picture |
| steering | 3 % | per picture |
| PWM generation | 2 % | per picture |

Work is modelled as instruction counts. Each thread is activated when it has work and
deactivated when the work is done. Energy is the sum over base cycles of F·U², relative
to running at full speed and top voltage. A gated cycle costs 30 % of a running one.
With about 21 % average utilisation the results are:

| Techniques | XScale-like | Crusoe-like | Published, XScale / Crusoe |
|---|---|---|---|
| gating only | 0.448 | 0.448 | 0.454 / 0.454 |
| frequency only | 0.252 | 0.252 | 0.26 / 0.259 |
| frequency + voltage | 0.150 | 0.106 | 0.183 / 0.14 |
| all three | 0.134 | 0.095 | 0.164 / 0.127 |

The published values came from a recorded camera trace driving the real vehicle program
(22.6 % utilisation), which is not available here. The thread model's instruction counts
are therefore synthetic. The ordering and the rough size agree; the exact values are not
expected to. The testbench checks:

- the ordering;
- that the gating-only energy equals util + 0.3·(1 − util);
- that no picture misses its deadline.

## Simulating

Every testbench is self-checking and ends with a line `TB_RESULT checks=N failures=M`.
With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/pm_pkg.sv tb/tb_komodo_pm_top.sv --top-module tb_komodo_pm_top -o sim
./obj_dir/sim
```

Substitute any of the testbenches:

| Testbench | What it checks |
|---|---|
| `tb_freq_divider` | Tick spacing for every factor, and interval lengths after a load. |
| `tb_gp_scheduler` | Exact shares, the stall at the end of an interval, and a random comparison against a reference model. |
| `tb_power_manager` | Three configurations (Crusoe, XScale, all off), each against a cycle-by-cycle reference model (`pm_ref_check`), plus directed checks of delays, voltages and interval lengths. |
| `tb_priority_manager` | Scheduler and power manager together with the divider, the clamp, and the 60/30/0/90/100 % cases. |
| `tb_instruction_fetch` | Byte order, thresholds, PC reloads, random memory latency. |
| `tb_komodo_pm_top` | The whole core at its default parameters: a vehicle-like activation schedule, exact shares, interval lengths, the 3700-cycle delay, the executed byte stream, and the regulator model. Every mechanism must occur at least once. |
| `tb_agv_energy` | The energy workload above (about 10 s). |

`fetch_mem_model`, `pm_ref_check` and `agv_system` are helper modules used by the
testbenches.

## How this RTL relates to the original design

These parts follow the published design:

- the four pipeline stages and four thread slots;
- GP scheduling with a per-interval budget and a stall;
- the eleven divider factors;
- the interval count floor(100 / factor);
- the "not below the required frequency" rule;
- the two voltage tables and the two activation delays;
- voltage-before-frequency ordering;
- gating of exactly the operand-fetch and execute stages;
- the three techniques as separate options.

These are this design's own choices, because the original says nothing about them:

- **Threshold.** The published selection rule writes its thresholds as strict
  comparisons ("sum < 66 → 1.5"). This design lets a sum equal to the count use that
  divider. 66 % thus runs at 1.5, where the strict form would give 1. This is the
  reading that keeps the frequency "as near as possible, but not below" the demand.
- **Thread slots.** The evaluated FPGA prototype had six thread slots; the core
  description has four. `NUM_THREADS` defaults to 4.
- **Mid-interval activation.** A thread activated mid-interval waits for the next
  interval. The original leaves this open.
- **Activation delay.** The delay applies only when voltage scaling is on.
- **Round robin.** Round-robin order among eligible threads.
- **Gating timing.** The one- and two-cycle staging of the gating enables.
- **Divider.** A clock enable instead of a separate divided clock net.
- **Fetch.** Window size, threshold, 32-bit fetch with little-endian byte order, and the
  memory handshake.
- **Configuration.** The percentage write port and its clamp.

Not built:

- the bytecode decoder and microcode ROM;
- operand fetch and execute logic;
- memory and I/O access units;
- the stack register sets;
- the signal unit that turns I/O events into thread activations;
- the memory interface and peripherals;
- the voltage regulator.

The decode slot takes one bytecode byte per granted cycle. A real decoder would take a
whole instruction, possibly several bytes. The scheduling and power logic does not depend
on this.
