# SPWM gate-signal generator for a single-phase full-bridge inverter

A full-bridge inverter turns a DC supply into AC by switching four power transistors. Driven with
plain square waves, its output is rich in harmonics. Sinusoidal pulse-width modulation (SPWM)
instead chops each half cycle into many pulses whose widths follow a sine, so that the output,
after the load's own filtering, approximates a sinusoid. This RTL generates those gate signals
for a 50 Hz output, for two modulation indices (0.5 and 0.75), on an FPGA clocked at 50 MHz.

The key idea is that nothing is computed at run time. The crossings of the sine reference with
the triangular carrier are worked out in advance, turned into switch-on and switch-off times in
microseconds, and stored as constants. The hardware is a microsecond counter that spans one 20 ms
period and a set of window comparators that switch the outputs at the tabulated times.

## The bridge and its switch pairs

```
        +Vs ───────┬──────────────┐
                  S1              S3
                   ├──── LOAD ────┤
                  S4              S2
        0 V ───────┴──────────────┘
```

S1 and S2 are switched together and drive current through the load in one direction. S3 and S4
drive it in the other. In this design, S1-S2 receive 20 pulses during the positive half of the
50 Hz reference (0 to 10 ms), and S3-S4 receive the same 20 pulses during the negative half
(10 to 20 ms). The two pairs are never on together. Each pair has a single gate signal that is
routed to both of its switches.

## The switching table (`rtl/spwm_pkg.sv`)

The pulse times come from natural sampling:

* The reference is `ma * sin(theta)`, where `theta` runs over 0..180 degrees for one half cycle.
* The carrier is a triangle between 0 and 1. It repeats every 9 degrees, which gives 20 carrier
  periods per half cycle. It touches 0 at `c_n = 4.5 + 9(n-1)` degrees, for n = 1..20.
* Pulse n is on while the reference is above the carrier. Its start `alpha_n` and its end `beta_n`
  are the two solutions of `|theta - c_n| / 4.5 = ma * sin(theta)` on either side of `c_n`.
* Each angle is rounded to the nearest 0.09 degree and converted to time with
  `t = theta * (10 ms / 180 deg)`. Every edge therefore falls on a multiple of 5 us.

This gives the following times, in microseconds, for the positive half cycle. The negative half
uses the same pulses shifted by 10000 us.

| n | ma 0.5 start | ma 0.5 end | ma 0.75 start | ma 0.75 end |
|---|---|---|---|---|
| 1 | 240 | 260 | 235 | 265 |
| 2 | 720 | 780 | 710 | 795 |
| 10 | 4625 | 4875 | 4565 | 4940 |
| 11 | 5125 | 5375 | 5065 | 5435 |
| 20 | 9740 | 9760 | 9735 | 9765 |

The rest of the rows are in the package.

* The pattern is close to mirror-symmetric about 5 ms. Pulse n and pulse 21-n have nearly equal
  widths.
* Pulses are narrowest near the zero crossings: 20 us at ma 0.5 and 30 us at ma 0.75.
* Pulses are widest at the peak: 250 us at ma 0.5 and 370-375 us at ma 0.75.

There is one deliberate exception to the rounding rule. At ma 0.75, pulse 10 ends at 4940 us
(88.92 degrees), not 4935 us. The exact crossing, 88.874 degrees, sits almost on a rounding
boundary, and the reference switching table this design reproduces uses 4940. Pulse 10 is
therefore 375 us wide while pulse 11 is 370 us wide.

Only ma = 0.5 and ma = 0.75 are provided. To add an index or change the number of pulses, compute
new rows with the formula above and add them to the package. The decoder then needs a new enum
value.

## Time base and clocks

| Block | Module | What it does |
|---|---|---|
| PLL | `altpll_model` | 50 MHz in, 25 MHz out (ratio 1/2, 0 degree phase, 50 % duty). The 25 MHz is brought out as `output25MHz` only. |
| Clock divider | `clock_divider` | 50 MHz down to 1 MHz, 100 kHz, 10 kHz, 1 kHz, 100 Hz, 10 Hz and 1 Hz square waves. It also gives a one-clock strobe every microsecond. |
| Time base | `mod_counter` (two copies) | Counts 0..19999, one step per microsecond, which is exactly one 20 ms reference period. |

The original FPGA build clocks the counters from the divided 1 MHz clock. Here everything runs on
the 50 MHz clock, and the counters advance on the microsecond strobe. The count sequence is the
same, and the design keeps a single clock domain.

The PLL is an analog vendor block. `altpll_model` only reproduces its configured output: a
divide-by-2 aligned to the input's rising edges. In a real FPGA build, use the vendor PLL in its
place.

There are two counters, one per modulation index, as in the original block diagram. They share
the same strobe and reset, so they run in lockstep.

## Switch-pattern decoders (`spwm_switch_decoder`)

Each decoder is set by two parameters:

* `MA`: `MA_050` or `MA_075`
* `HALF`: `HALF_POS` for the S1-S2 pattern, `HALF_NEG` for the S3-S4 pattern

Its output is high while the count lies in any of its 20 windows `[alpha_n, beta_n)`. The windows
are checked by 20 comparator pairs in parallel, and the result is ORed and registered. The
register removes comparator glitches before the signal reaches the gate drivers. It also adds one
50 MHz clock of latency.

## Dead time between the pairs

Between the last S1-S2 pulse and the first S3-S4 pulse there is a stretch where both pairs are
off. The same happens at the end of the period.

* At ma = 0.5 it lasts 480 us (9760 to 10240 us).
* At ma = 0.75 it lasts 470 us (9765 to 10235 us).

No separate dead-time logic exists: the gap comes directly from the table. Oscilloscope
measurements of the original FPGA build reported 420 us and 460 us. The tabulated pulse times
give the values above, and this RTL follows the table. The top also carries an assertion that
the two pairs never conduct together.

## Top level (`spwm_generator`)

| Port | Dir | Meaning |
|---|---|---|
| `clockin50MHz` | in | 50 MHz board clock |
| `rst` | in | synchronous, active-high reset; all gates low |
| `output25MHz`, `output1MHz` | out | PLL and divider outputs, for observation |
| `s1_ma050` … `s4_ma050` | out | gate signals for ma = 0.5 (S1 = S2, S3 = S4) |
| `s1_ma075` … `s4_ma075` | out | gate signals for ma = 0.75 |

The parameter `CLK_HZ` (default 50 000 000) is the board clock. The time base stays at 1 us
whatever its value, as long as it is a multiple of 1 MHz.

After reset is released, the time base starts at 0. Pulse 1 of the first period begins 240 us
(ma 0.5) or 235 us (ma 0.75) later, plus about one microsecond for the first strobe. The pattern
then repeats every 20 ms exactly.

The gate signals leave the FPGA on expansion-header pins, one pin per switch and index. The pin
assignment is a board-level constraint and is not part of the RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `tb_spwm_switch_decoder` sweeps all 20000 counts through all four decoders. It computes its
  expected pattern independently: it solves the crossing equation by bisection with real
  arithmetic and rounds to 5 us. It then compares every count. It also checks the reference-table
  rows edge by edge, the pulse count per half, that the pairs never overlap, and the one-clock
  latency.
* `tb_mod_counter` runs two full periods with a random enable and checks every count and the wrap.
* `tb_clock_divider` measures the period and high time of every output. The 10 Hz and 1 Hz
  outputs use a second instance with a 2 MHz input clock.
* `tb_altpll_model` checks the 25 MHz period, the duty cycle and the edge alignment.
* `tb_spwm_generator` runs the whole design at its default parameters for two full 20 ms periods
  (about 2 million clocks, a few seconds in Verilator). It checks the following:
  * S1 = S2 and S3 = S4
  * that the pairs never overlap
  * 20 pulses per pair per period
  * every reference-table edge to the clock
  * the exact 20 ms period
  * both dead-time gaps
  * both clock outputs

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/spwm_pkg.sv tb/tb_spwm_generator.sv --top-module tb_spwm_generator -o sim
./obj_dir/sim
```

To lint the design: `verilator --lint-only -Wall -Irtl -y rtl rtl/spwm_pkg.sv rtl/spwm_generator.sv`.

## Where this RTL departs from the original FPGA build

* The counters run from the 50 MHz clock with a 1 us enable instead of a divided clock.
* The decoder outputs are registered, and there is an explicit reset. The original build
  describes neither.
* The interior rows of the switching table are recomputed from the natural-sampling rule. They
  agree with every published row, with the single exception described above, which uses the
  published value.
* The PLL is a behavioural model.
* The power stage, the board pins and the configuration flash lie outside the logic and are not
  modelled.
