# SDDLL: a delay-locked loop closed in software

A delay-locked loop (DLL) delays a reference clock through a digitally
controlled delay line (DCDL) until the delayed clock lines up with the next
reference edge. The delay is then exactly one reference period, and taps along
the line give evenly spaced clock phases. In a conventional all-digital DLL a
fixed hardware state machine turns phase-detector decisions into delay-line
settings. In the **software-defined DLL (SDDLL)** that state machine is gone. A
CPU on a WISHBONE bus reads the phase state and time measurements from the DLL
hardware, runs the locking algorithm as a program, and writes the 24-bit
control word back. A new locking strategy, or a new specification, then means
new software, not a new chip.

This repository holds SystemVerilog for that platform, after the SDDLL master's
thesis (National Chiao Tung University, 2011; TSMC 65nm silicon). It contains:

* synthesizable RTL for the digital parts: the shared bus, the data memory,
  the DLL's bus slave, the 8-order moving-average filter and the clock
  extender;
* timing-accurate behavioural models, with femtosecond precision, for the
  parts that are analog or delay-based circuits in silicon: the delay lines,
  phase detector, pulse amplifier, TDC, duty-cycle corrector and system-clock
  generator;
* in `tb/`, a behavioural CPU that runs the locking software, so the whole
  loop can be simulated end to end.

The CPU (an OpenRISC or1200) and the program flash are external parts that the
original design does not design either. The top level brings out their bus
ports.

## Block diagram

```
                    sddll_top
  ref_clk ─┬──────────────────────────────────────────────► saca ──► sys_clk (bus clock)
           │
           │   ┌──────── DLL (dll_core) ───────────────────────────────────────┐
           ├──►│ multiphase_dcdl (8 x coarse+fine line) ─ P0..P7 ─► duty_cycle_corrector ─► p_out[7:0]
           │   │        ▲ control word                 │ P7               (8 x dcc_unit)
           │   │        │                              ▼
           ├──►│ clock_extender ─ extended pulse ─┐   pfd ── lead / lag / comparison toggle
           └──►│                                  MUX ◄─ phase error
           │   │                                   ▼
           │   │                           opl_pa ─► tdc ── TDC value / done
           │   └────────▲──────────────────────────────────────────┬────────────┘
           │            │ ma_filter (8 samples, 1 per ref period)  │
           │   ┌────────┴───────────── dll_wb_regs ◄───────────────┘ (synchronizers)
           │   └──────────────┬────────────────────────────────────
           │          wb_shared_bus ── wb_ram (8MB)
           │             │      └──── flash port (fl_*, external)
           │          CPU port (m_*, external)
```

## The control word

The eight delay lines are identical, and all are driven by the same 24-bit
word. The coarse part selects large steps and the fine part switches
capacitive loads:

| bits  | field | steps | step per line | range per line |
|-------|-------|-------|---------------|----------------|
| 23:17 | C1    | 128   | 0.95 ns       | 120.65 ns      |
| 16:12 | C2    | 32    | 20.32 ps      | 630 ps         |
| 11:8  | F1    | 16    | 1.516 ps      | 22.7 ps        |
| 7:4   | F2    | 16    | 133.22 fs     | 2.0 ps         |
| 3:0   | F3    | 16    | 11.53 fs      | 173 fs         |

One line also has 0.775 ns of intrinsic delay. Each field's full range roughly
equals one step of the field above it. The packed word is therefore almost a
binary number: adding 1 to it is the smallest delay step, and the filter
averages it as a number. One F3 step moves the last tap by 8 × 11.53 fs ≈
90 fs, which is the resolution of the whole line. The total delay spans
6.2 ns .. 971 ns, so the loop locks from about 1.03 MHz to 161 MHz.

The C1 section is not a long gate chain. Each input edge, rising or falling,
becomes a narrow pulse that laps a 0.95 ns loop while a counter counts to C1.
The pulse then takes the C2 path, and a divide-by-2 at the end rebuilds the
clock from the pulses. The counter holds only one pulse at a time, so an input
edge that arrives while a pulse is in the line is lost, and the rebuilt clock
inverts. Each half period of the input must therefore be longer than one
line's delay. For eight lines in series, the line delay is T/8 at lock, so
this holds.

`sddll_pkg::dcdl_ctrl_t` is this layout as a packed struct.

## Measuring time: extender, PFD, pulse amplifier, TDC

The software needs two kinds of measurement, and both go through one time-to-
digital converter (TDC) with 20 ps resolution:

* **Reference period.** `clock_extender` divides the reference by two. Its
  output is high for exactly one reference period (MUX select 0).
* **Phase error.** `pfd` pairs every rising edge of the last phase P7 with
  the nearest reference rising edge. It reports *lead* (P7 early, so the delay
  must grow) or *lag* (P7 late, so it must shrink). It toggles a comparison
  flag and emits a pulse |error| + 200 ps wide (MUX select 1). The 200 ps is
  the detector's minimum output pulse.

The selected pulse passes through `opl_pa`, the pulse amplifier with one-pulse
lock. It stretches the pulse by a fixed 300 ps delay path, so even a pulse of
a few ps stays measurable. It also passes only the first pulse after
`error_set` is released. A measurement is therefore: raise and drop
`error_set`, wait for `tdc_done`, read the value. The value does not change
until the next arming. Software subtracts the known offsets: 15 counts
(300 ps) for a period measurement, 25 counts (500 ps) for a phase error.

`tdc` models a loop of 64 cells of 20 ps with a lap counter. Its value is
laps × 64 + cells passed, which is floor(width / 20 ps). With 20 bits it
covers 20.9 µs.

## The bus and the DLL registers

`wb_shared_bus` connects one master to three slaves, decoded on
`adr[31:28]`: 0 = flash, 1 = data memory, 2 = DLL, anything else is answered
with zero. The request is registered once and the slaves register their ack.
An access therefore takes three system cycles, from the edge where the master
raises `stb` to the edge where it samples `ack`. Only single classic cycles
are supported.

`dll_wb_regs` (byte offsets within the DLL region):

| offset | name   | access | contents |
|--------|--------|--------|----------|
| 0x00   | CTRL   | RW | [23:0] control word (before the filter) |
| 0x04   | CONFIG | RW | [0] MUX select (1 = phase error), [1] error_set (reset value 1), [2] filter enable |
| 0x08   | STATUS | RO | [0] lead, [1] lag, [15:8] comparison count, [16] TDC done |
| 0x0C   | TDC    | RO | TDC value |
| 0x10   | FILT   | RO | control word after the filter, as applied to the delay line |

Everything that comes from the DLL is asynchronous to the system clock and
passes through two-flop synchronizers. The comparison count advances by one per
PFD comparison, and lead/lag are captured at the same moment. Software waits
for a *new* phase state by spinning on this count.

## The locking software

The algorithm lives in `tb/sddll_cpu_model.sv` as tasks of a behavioural bus
master. It is the part of the design that is meant to change.

1. **TDC mapping of the reference period.** Measure the extended pulse.
   Assume the line is linear and set every line to period / 8. This starts
   the loop close to one period, which rules out false locking (start below
   half a period) and harmonic locking (start above 1.5 periods).
2. **Coarse tune.** Measure the phase error.
   * Below 10 counts (200 ps): go to the fine tune.
   * Above 60 counts (1.2 ns): map the error itself onto the word, using its
     lead/lag sign.
   * Otherwise: step the coarse part (C1|C2) by one toward lock.

   On leaving, the word is set just below the target with the fine part
   cleared. The target then lies inside the fine range.
3. **Prune-and-search.** A binary search over the 12 fine bits, MSB first,
   driven by lead/lag only. Small errors cannot be measured by the TDC.
4. **Fine sequential search.** Step the whole word by ±1 (one F3 step). The
   loop is **locked** when the phase state has alternated lead/lag four times.
   Tuning then stops.
5. **Monitoring.** Every few periods the phase error is re-measured. An error
   of 10 counts or more sends the loop back to step 2.

Every tune must wait until a comparison has been made with the *new* delay.
An edge already inside the line when the word changes still carries the old
delay, so one tune costs about two reference periods. Any extra software time
per tune adds "redundancy cycles" to the lock-in time. With the filter on,
software also waits until FILT equals CTRL, because the filter adds up to eight
reference periods of delay to each change.

## Duty-cycle correction

The delay line keeps whatever duty cycle the reference has. Unit i of
`duty_cycle_corrector` is set by the rising edge of Pi and cleared by the
rising edge of P(i+4 mod 8), which is half a period later when locked. Each
edge is turned into a 50 ps pulse that drives an SR latch. The corrected phase
therefore has exactly a 50% duty cycle and keeps the rising edge of Pi.

## System clock: SACA

`saca` is the semi-asynchronous clock generator. Its period is
stages × 140 ps (1..64 stages). It restarts with a rising edge after every
reference rising edge, runs `mult` cycles (0 = until the next reference edge),
and never glitches. A reference edge that arrives mid-cycle takes effect when
that cycle ends.

## What was simulated

`tb/tb_sddll_top.sv` runs the whole platform at its default parameters (8MB
memory). The reference has a 45% duty cycle and the system clock is 31 stages
(4.34 ns). The results:

| scenario | lock-in (reference cycles) | last phase vs reference |
|----------|----------------------------|-------------------------|
| lock at 1.052 MHz from reset | 40 | −48 fs |
| reference drifts by +430 ps, coarse sequential relock | 42 | −8 fs |
| reference jumps to 1.25 MHz, relock by mapping the phase error | 38 | −64 fs |
| filter on, back to 1.052 MHz | 156 | −48 fs |

For comparison, the original work reports lock in about 48 and 52 reference
cycles at 1.052 MHz and 1.25 MHz, and 16 fs and 48 fs residual phase error.
Its or1200 program has its own instruction timing, so these numbers only show
the same order. The testbench also checks that tap spacing is period/8 within
2 ps, that all corrected phases are 50% duty, that the flash and memory
answer, and that every mechanism ran at least once. With the filter on, it
also counts the control words the delay line receives that differ from the
word software wrote, which are the filter's intermediate averages.

Every block also has its own self-checking testbench, `tb/tb_<block>.sv`.
`tb_multiphase_dcdl` includes the classic pre-layout check of the delay line.
It feeds a free-running 100 MHz clock with control word 0 (6.2 ns in total)
and with C1 = 1 (13.8 ns in total, longer than a period). Every tap must pass
every cycle with its 5 ns high time, (i+1) line delays after the reference.

## Running it

Everything runs under Verilator 5 with timing support. The files carry
`` `timescale 1ps/1fs ``. Example, for the end-to-end run:

```
verilator --binary --timing --assert -y rtl -y tb rtl/sddll_pkg.sv \
          tb/tb_sddll_top.sv --top-module tb_sddll_top -o sim
./obj_dir/sim
```

Any `tb_<block>` runs the same way. Each testbench prints
`TB_RESULT checks=N failures=M`. Each simulation finishes in seconds.

## Where this differs from the original, and what to trust

* **Behavioural models.** The delay lines, PFD, pulse amplifier, TDC,
  duty-cycle corrector and SACA are circuit-level designs in the original
  (gate chains, capacitive loads, a counter-based coarse line). Here they are
  timing models built from the published step sizes, so they are ideal and
  linear. The coarse line keeps the structure of the circuit: edge pulses, a
  lap counter and a divider. Jitter, non-linearity, the PFD's 45 ps dead zone and rise/fall
  imbalance are not modelled. These models are not synthesizable. `sddll_top`
  and `dll_core` contain them and are simulation models as a whole.
* **Delay models.** The coarse line (edge pulse, lap counter, divider) loses
  edges that come while a pulse is in flight, as the circuit does. The fine
  line is a plain inertial delay: it swallows input pulses shorter than its
  delay of at most 100 ps.
* **Frequency range.** The delay model follows the published per-field step
  sizes and its 6.2 ns .. 966 ns delay range (1.035 .. 161.29 MHz). A second
  published range, 0.517 .. 143.678 MHz, would need twice the maximum delay.
  It conflicts with the step sizes and is not supported.
* **Design choices not given by the original:**
  * the address map and register map;
  * the three-cycle bus implementation;
  * the 300 ps pulse-amplifier delay path;
  * the 64-cell TDC loop and its 20-bit output;
  * the filter's sample rate (one sample per reference period) and its
    behaviour when switched on;
  * the 50 ps narrow pulses of the duty-cycle corrector;
  * the SACA control (stage count and cycles per reference period; the
    original reports 103..1231 MHz for 64 stages of 140 ps, and
    stages × 140 ps reproduces the low end but not the top);
  * reset values;
  * the intrinsic-delay split of 700 ps coarse and 75 ps fine.
* **Locking software.** The software follows the published strategy:
  thresholds of 10 and 60 TDC counts, TDC mapping, prune-and-search,
  sequential search, and lock on alternating lead/lag. The number of
  alternations (4), the give-up limit (64 fine steps), the monitoring interval
  and the "start just below the target" rule are this design's choices. The
  software's instruction timing is not modelled: it is a bus master whose
  tasks take only their bus cycles.
* **Not included.** The or1200 CPU and its 1 KB instruction cache, the flash
  contents, and the compiled C program.

## Files

| file | what |
|------|------|
| `rtl/sddll_pkg.sv` | control-word struct, step sizes, address and register maps |
| `rtl/sddll_top.sv` | platform top |
| `rtl/wb_shared_bus.sv`, `rtl/wb_ram.sv` | bus and data memory (synthesizable) |
| `rtl/dll_wb_regs.sv`, `rtl/ma_filter.sv`, `rtl/clock_extender.sv` | DLL bus slave, filter, extender (synthesizable) |
| `rtl/dll_core.sv` | DLL hardware assembly |
| `rtl/multiphase_dcdl.sv`, `rtl/coarse_delay_line.sv`, `rtl/fine_delay_line.sv` | delay-line models |
| `rtl/pfd.sv`, `rtl/opl_pa.sv`, `rtl/tdc.sv` | measurement path models |
| `rtl/duty_cycle_corrector.sv`, `rtl/dcc_unit.sv` | duty-cycle corrector models |
| `rtl/saca.sv` | system-clock generator model |
| `tb/sddll_cpu_model.sv` | behavioural CPU with the locking software |
| `tb/flash_model.sv` | behavioural program ROM |
| `tb/tb_*.sv` | self-checking testbenches |
