# Reversible-multiplexer all-digital duty cycle corrector

Double-data-rate interfaces and double-sampling converters use both edges of a
clock, so they need a clock whose high and low phases are equal. This design
takes a clock with any duty cycle between about 25 % and 75 % and produces a
clock of the same frequency with a 50 % duty cycle, using only digital
control: two bang-bang loops, two delay lines and a handful of reversible
(Fredkin) multiplexers.

The main idea is to let a delay-locked loop (DLL) *measure* the low phase of
the clock, and then to stretch the high phase until it is as long as what the
DLL measured.

## Signal path

```
clk_in ──┬──────────────► B ┐
         └─► inverter ───► C ┤ Fredkin (A = duty_s) ── Q ─► coarse DDCC ─► fine DDCC ──► X
                             ┘                                ▲               ▲
                                                  coarse_code ┘     fine_code ┘
X ─► inverter (i_x) ─► NAND DCDL (dll_code) ─► Y

X, Y ─► Fredkin (A = 0) ─► PD  ─► dll_up/dll_down ─► DLL controller ─► dll_code, lock
X, Y ─► Fredkin (A = 0) ─► DCD ─► dcc_up/dcc_down ─► DCC controller ─► coarse/fine code,
                                                                        duty_s, ddcc_lock
Y ──────────────► B ┐
Y ─► inverter ───► C ┤ Fredkin (A = duty_s) ── Q ─► clk_out
```

* **DDCC** (digital duty-cycle correction), coarse and fine: each stage ORs the
  clock with a delayed copy of itself, so the output rises with the input and
  falls later by the selected delay. X is the corrected clock.
* **NAND DCDL** (digitally controlled delay line): delays the inverted X to
  give Y.
* **PD** (phase detector) and **DCD** (duty cycle detector): one flip-flop each.
* **DLL and DCC controllers**: saturating up/down counters with lock detection,
  clocked by a separate controller clock `g_clk`.

## How the two loops find 50 %

Let X have high time *H* and low time *L*, with *H* + *L* = *T*. Y is the
inverted X delayed by *D*, so Y rises *D* after each falling edge of X and
falls *D* after each rising edge of X.

1. **DLL loop.** The PD samples Y on every rising edge of X. If Y is already
   high, Y's rising edge came first, so *D* < *L* and the DLL controller
   increases the code; otherwise it decreases it. Starting from code 0, the
   loop settles with *D* = *L*: Y's rising edges line up with X's. The code
   starts at 0 on purpose, so the loop cannot settle a whole period late.
2. **DCC loop.** Only after the DLL has locked, the DCD samples Y on every
   falling edge of X. X falls *H* after its rising edge, Y falls *D* = *L*
   after it. If Y is still high, *H* < *L*: the DCC controller lengthens the
   high phase one step. If Y is already low, *H* > *L*: it shortens it. The
   falling edges meet only when *H* = *L*, i.e. at 50 %.
3. Each DCC step changes *L* by one step, and the DLL, which keeps running,
   follows it. The DCC steps far more slowly than the DLL (every 32 `g_clk`
   cycles against every 4), so the DLL has settled again before each DCC
   decision.

When locked, Y is X inverted and delayed by half a period, which is X itself
shifted by one period: a 50 % clock. `clk_out` is taken from Y.

### Clocks above 50 %

The DDCC stages can only lengthen the high phase. When the DCD asks for a
shorter high phase while the correction code is already 0, the DCC controller
sets `duty_s`. That switches the input multiplexer to the inverted `clk_in`
(whose duty cycle is then below 50 %) and the output multiplexer to the
inverted Y, so `clk_out` keeps the polarity of `clk_in`. Because *L* has just
changed a lot, the DCC controller also pulses `relock`, which clears the DLL's
lock flag; the DCC waits until the DLL has locked again.

### Lock detection and dither

Both loops are bang-bang, so at the target they alternate up and down by one
step. A controller counts consecutive direction reversals (a step in the same
direction clears the count): 4 reversals give the DLL `lock`, 2 give
`ddcc_lock`. The DLL keeps tracking after lock (the lock flag stays up until
`relock` or reset). The DCC code is frozen at lock, so the only dither left on
`clk_out` is the DLL's single 10 ps step.

## The reversible multiplexer

Every multiplexer is a Fredkin gate, a three-input, three-output reversible
gate (`fredkin_gate.sv`):

| A | B | C | P | Q | R |
|---|---|---|---|---|---|
| 0 | b | c | 0 | b | c |
| 1 | b | c | 1 | c | b |

P = A, Q = ~A·B + A·C, R = A·B + ~A·C. A is the select line, Q is the
multiplexer output, R carries the unselected input, and P (a copy of the
select) is the "garbage" output that keeps inputs and outputs equal in number.
No input value is lost, which is the point of building the multiplexers
reversibly. In this design P and R are left unused everywhere.
The gate passes B and C straight through at A = 0 and swaps them at A = 1.

The two Fredkin gates that hand X and Y to the detectors have their select
tied low, so X is always the detectors' reference and Y the compared signal.

## Delay lines and sizes

All times are in picoseconds; every file sets `timeunit 1ps`.

| Part | Structure | Step | Steps | Range |
|---|---|---|---|---|
| Coarse DDCC | tap line of buffers + OR | 80 ps | 16 (4 bits) | 0–1200 ps |
| Fine DDCC | tap line of buffers + OR | 10 ps | 8 (3 bits) | 0–70 ps |
| NAND DCDL | 511 cells of two NANDs + NAND-NAND tap selector | 10 ps | 512 (9 bits) | 10–5120 ps |

The coarse and fine codes are the upper and lower bits of one 7-bit counter,
and one coarse step equals eight fine steps, so together they give one linear
0–1270 ps range in 10 ps steps.

These parts are **behavioural models**: their delays are SystemVerilog delays,
which simulate but do not synthesise into timing. The DDCC stages simulate
each buffer. The DCDL model does not simulate each gate: it computes the delay
of the NAND chain, (2·code + 2)·5 ps, and releases every input edge that much
later from a small queue (a transport delay, several edges in flight). An edge
already in flight keeps its delay when the code changes.

The detectors, both controllers and the Fredkin gates are synthesizable.

### Operating range

* Frequency: the DLL line must be at least the low time of the clock being
  corrected, so at 50 % the slowest clock is about 100 MHz; the design is
  sized and tested for 250 MHz to 1 GHz.
* Duty cycle: the OR stretch works only while the stretch is shorter than the
  high phase being stretched; otherwise the delayed pulse starts after the
  original has ended and the output shows two pulses. With inversion this
  allows 25 %–75 % input duty, further limited by the 1.27 ns DDCC range
  (at 250 MHz: about 18 %–82 %, so the 25 %–75 % limit applies).
* Resolution: 10 ps (one fine step, one DCDL cell). The DCC code freezes at
  whichever side of its dither it locks on, so the output high time ends
  within about one step of half a period: simulated results range from
  49.0 % to 51.0 % at 1 GHz and from 50.00 % to 50.02 % at 250 MHz.

## Interface and timing of `hr_addcc`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `g_clk` | in | 1 | controller clock, may be asynchronous to `clk_in` |
| `dcc_rst` | in | 1 | active-high reset, synchronous to `g_clk`; also resets the detectors and disables the DCDL |
| `clk_in` | in | 1 | clock to correct |
| `clk_out` | out | 1 | corrected clock |
| `lock` | out | 1 | DLL locked |
| `ddcc_lock` | out | 1 | DCC locked; `clk_out` is at 50 % |
| `duty_s` | out | 1 | 1 when the inverted input is being corrected |
| `phase_s` | out | 1 | phase detector's last sample |
| `x`, `y` | out | 1 | internal clocks X and Y |
| `dll_code` | out | 9 | DCDL code |
| `coarse_code`, `fine_code` | out | 4, 3 | DDCC codes |

Parameters: `DLL_BITS`, `NAND_PS`, `COARSE_BITS`, `FINE_BITS`, `COARSE_PS`,
`FINE_PS`, `DLL_DIV`, `DCC_DIV`, with defaults from `hr_addcc_pkg`. Keep
`COARSE_PS = FINE_PS << FINE_BITS` for a linear range.

Crossing clock domains: the detector outputs change on edges of X and are
brought into the `g_clk` domain by two-flop synchronisers in each controller.
A DLL step is decided every 4 `g_clk` cycles, which covers the synchroniser
latency plus one X edge, as long as `g_clk` is no faster than about twice
`clk_in`.

Lock time grows with the distance to travel: each DLL step takes 4 `g_clk`
cycles and each DCC step 32. With `g_clk` at 8.13 ns and `clk_in` at 250 MHz,
40 % duty: DLL lock after about 8 µs (240 steps), DCC lock after about 19 µs.

Code changes are not synchronised to X, so a change while the old and new
taps differ can lengthen or shorten one pulse of X or Y; the loops treat that
as one wrong decision.

## What comes from the published architecture and what is this design's own

Taken from the published design: the block structure (input reversible
multiplexer on the clock and its inverse, coarse and fine DDCC in series
giving X, inverted X through a NAND-based DCDL giving Y, reversible
multiplexers feeding a PD and a DCD, separate DLL and DCC controllers, output
reversible multiplexer on Y and its inverse), the order of operation (DLL
locks first, then the DCC corrects until it locks), the Fredkin gate, and the
signal names (`g_clk`, `dcc_rst`, `clk_in_b`, `x`, `i_x`, `lock`, `ddcc_lock`,
`duty_s`, `phase_s`).

One difference in substance: the published description has the duty cycle
detector compare the DLL output with the *input* clock. Here it compares the
DLL output with X, the input clock after correction, because only the
corrected clock shows whether the correction is complete.

This design's own choices: how each detector compares edges, the counters,
synchronisers, update rates and lock rules, the use of `duty_s` for inverting
clocks above 50 %, the `relock` handshake, the DDCC and DCDL structures, all
delay sizes and the operating range. The published design reports power, area
and delay from an FPGA tool flow; nothing here reproduces those numbers.

## Files

`rtl/`

* `hr_addcc_pkg.sv` — default sizes, step type of the bang-bang loops
* `hr_addcc.sv` — top level
* `fredkin_gate.sv` — reversible multiplexer
* `coarse_ddcc.sv`, `fine_ddcc.sv` — pulse-stretch stages (models)
* `nand_dcdl.sv` — DLL delay line (model)
* `pd.sv`, `dcd.sv` — detectors
* `dll_ctrl.sv`, `dcc_ctrl.sv` — controllers

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`. `tb_hr_addcc` runs the whole design at
its default sizes: 250 MHz at 40 % and 65 % duty (the second needs inversion
and a DLL relock) and 1 GHz at 42 %, and checks the output period and a high
time within 40 ps of half a period; it also checks that every mechanism
(DLL lock, DCC lock, inversion, relock, coarse and fine steps) occurred.
`tb_hr_addcc_sweep` covers the operating range: 250, 400, 500, 667, 800 and
1000 MHz, each at 30 %, 45 %, 55 % and 70 % duty, with the same checks and
with the inversion expected exactly for the points above 50 %.

## Simulating

Verilator 5 with timing support:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/hr_addcc_pkg.sv \
    tb/tb_hr_addcc.sv --top-module tb_hr_addcc -o sim
obj_dir/sim
```

`-Wno-fatal` is needed because Verilator warns (ZERODLY) about every delay
whose value is only known at run time, which the delay-line models and the
testbench clocks use on purpose.

Replace `tb_hr_addcc` by any other testbench name to run a unit test. The
end-to-end test covers about 49 µs of simulated time and runs in about a
second.
