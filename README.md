# Timing-error-tolerant flip-flop with in-cycle correction and time borrowing

A flip-flop at the end of a critical path can store a wrong value when the
path is slower than planned, because of a voltage droop, heating or ageing.
The data then arrives just after the rising clock edge it was meant for. The
usual fixes detect the late arrival and then spend a clock cycle on recovery:
they replay, stall or flip the bit a cycle later. This design repairs the
value **inside the same cycle**, and it never touches the system clock:

* A **transition detector** on the flip-flop's D input emits a short pulse
  `Er` on every edge of D.
* A **master clock generator** feeds the flip-flop's master latch with
  `CM = Er | ~CLK` instead of `~CLK`. While CLK is high the slave latch is
  open. A late edge of D therefore reopens the master for the pulse width,
  both latches are transparent, and the late but correct value reaches Q.
  Edges of D while CLK is low are ordinary arrivals: CM is already high then
  and the pulse changes nothing.
* A corrected flip-flop launches its new value late, so the *next* stage
  has less than a full period (a **successive-stage error**). A
  **time-borrowing circuit** remembers that a correction took place. For the
  following cycle it clocks the next stage's flip-flop with a delayed clock
  `CLKDD`, whose rising edge comes `CLKD_PS` later.

The RTL is single-bit, as the circuit is usually drawn: three flip-flops with
two small logic stages between them.

```
            b1                              b2
            |                               |
 d --FF1--> comb_and_or_nand --[PATH1]--+--> FF2 --> comb_andn_or_nor --[PATH2]--> FF3 --> q3
     (CLK)                              |    ^ master: CM          (CLK_TB)         ^
                                        |    | slave : CLK                          |
                                        +-> transition_detector --Er--> master_clock_generator --CM--+
                                                                                                  |
                                             time_borrowing_circuit <-- CM, CLK ------------------+
                                                   |
                                                   +-- CLK_TB --> FF3 (both latches)
```

`[PATH1]` and `[PATH2]` are delay elements. They stand for the propagation
delay of the logic, which the zero-delay gate models lack. They are what
creates the timing errors in simulation.

## Why a master-slave flip-flop with two clock pins

`master_slave_ff` is an ordinary rising-edge flip-flop built from two
latches. The master is transparent while `master_clk = 1` and the slave while
`slave_clk = 1`. With `master_clk = ~CLK` and `slave_clk = CLK` it behaves
exactly like `always_ff @(posedge clk)`. The correction depends on the master
enable being a separate pin. FF1 and FF3 use the plain connection. FF2
(`error_tolerant_ff`) gets `CM` on its master pin.

Timeline of one correction, at the default values (20 ns clock, rising edge
at t = 0):

| t (ns) | event |
|---|---|
| 0 | CLK rises. FF2's master closes on the old D, so Q keeps the stale value. |
| 1 | The late D edge arrives. `Er` goes high and `CM` goes high, so both latches are transparent and Q takes the new value. |
| 3 | `Er` falls after `PULSE_PS` = 2 ns. The master closes and holds the new value. |
| 10 | CLK falls. The master is open again, as normal. |

A correction is possible only if the late edge lands while CLK is high. For
stage-1 path delay `T1`, clock period `T` and high phase `Th`, that means
`T < T1 < T + Th`. The pulse must be at least as long as the master latch's
setup time, and it should be no longer than needed: while it lasts, the
flip-flop is transparent and a second edge would pass through too.

## Transition detector

`Er = (In & dly(~In)) | (~In & ~dly(~In))`, where `dly` is a delay buffer of
`PULSE_PS`. The first AND term covers rising edges and the second AND term,
with both inputs inverted, covers falling edges. The result is
`In XOR In(t - PULSE_PS)`: a pulse of width `PULSE_PS` that starts at each
edge.

One consequence is worth knowing. A **hazard** on the late path is a glitch
of width `w < PULSE_PS`, as when two inputs of the logic change a fraction of
a nanosecond apart. It produces two pulses of width `w` that are `PULSE_PS`
apart, not one long pulse. Between the two pulses FF2 holds the glitch
value. Q is only correct after the second pulse, `PULSE_PS` later than for a
clean edge, and that also delays the data into stage 2. The pipeline
testbenches therefore change only one input of the stage-1 logic per cycle.

## Time-borrowing circuit

`time_borrowing_circuit` has three parts:

1. **`CM_SR` latch.** It is set by `CM & CLK`, which is high only when a
   correction pulse occurs in the high phase. It is cleared by the flip-flop
   output `Q`, and the clear wins when both are active.
2. **D flip-flop on `CLKB = ~CLK`.** It loads `CM_SR` at the falling edge,
   so `Q` (the `borrow` port) rises at the end of the cycle that had a
   correction. `Q` then clears the latch. At the next falling edge it loads
   0, unless a new correction has set the latch again. Its RESET input is
   `rst`.
3. **Clock select.** `CLKD` is CLK through a delay buffer of `CLKD_PS`, and
   `CLKDD = CLK & CLKD`. `CLK_TB = Q ? CLKDD : CLK`. CLKDD rises `CLKD_PS`
   late and falls together with CLK. `Q` only changes at a falling edge of
   CLK, when both mux inputs are low, so switching clocks never produces a
   glitch.

The next stage's flip-flop is clocked entirely by `CLK_TB`. In a borrowed
cycle its master stays open `CLKD_PS` longer and its capture edge is
`CLKD_PS` late. Stage-2 data that arrives up to `CLKD_PS` after the edge is
still caught. Data launched in that cycle must take longer than `CLKD_PS` to
reach FF3, or it would be caught a cycle early (hold).

**Borrowing at most every other cycle.** A correction in a cycle where `Q` is
already 1 is lost, because the clear wins. So if stage-1 errors occur in two
consecutive cycles, the second one gets no borrowed clock. FF3 then misses
its late data, unless stage 2 has enough slack. The testbenches keep stage-1
errors at least two cycles apart, and `tb_time_borrowing_circuit` checks that
the second of two back-to-back corrections is dropped.

## Parameters and timing defaults

All delays are integer picoseconds. Their defaults live in `rtl/tet_pkg.sv`
and are chosen for a 20 ns clock with a 50% duty cycle. None of them is a
property of the method.

| parameter | default | meaning |
|---|---|---|
| `PULSE_PS` | 2000 | error-pulse width (transition detector delay buffer) |
| `CLKD_PS` | 3000 | delay of CLKDD's rising edge behind CLK |
| `PATH1_PS` | 21000 | modelled stage-1 path delay: 1 ns too slow, so every stage-1 change is a timing error |
| `PATH2_PS` | 19500 | modelled stage-2 path delay: in time normally, 0.5 ns late after a corrected FF2 |

To model a stage that is in time, set its path delay below the clock period.

## Modules

| file | kind | content |
|---|---|---|
| `tet_pkg.sv` | package | default delays and clock period |
| `delay_buffer.sv` | behavioural model | transport delay: every input edge reappears `DELAY_PS` later |
| `transition_detector.sv` | gates and delay buffer | edge-pulse generator |
| `master_clock_generator.sv` | gates | `CM = Er \| ~CLK` |
| `master_slave_ff.sv` | latches | two-latch flip-flop with separate master and slave enables |
| `comb_and_or_nand.sv` | gates | stage-1 example logic: NAND of AND and OR of (a, b), which is `~(a&b)` |
| `comb_andn_or_nor.sv` | gates | stage-2 example logic: NOR of (~a & b) and (a \| b), which is `~(a\|b)` |
| `error_tolerant_ff.sv` | structure | FF2: detector, generator and master-slave flip-flop |
| `time_borrowing_circuit.sv` | latch, flip-flop, gates, delay buffer | CLK / CLKDD selection |
| `tet_pipeline_top.sv` | structure | the three-flip-flop pipeline; top module |

The top's ports are `clk`, `rst`, `d`, `b1` and `b2` in, and `q1`, `q2` and
`q3` out. `er`, `cm`, `cm_sr`, `borrow` and `clk_tb` are brought out for
observation. `d` reaches `q3` after three rising edges. The second operands
`b1` and `b2` of the two logic blocks are top-level inputs and should change
shortly after a rising edge, like `d`.

**Synthesis.** The gates, latches and flip-flop are synthesizable. The delay
elements are not: in silicon they are sized buffer chains, and their delays
must be set and verified at the transistor or layout level. Synthesis tools
reject the behavioural delay model, so a netlist needs a delay cell
substituted for `delay_buffer`. The latches in `master_slave_ff` and the
`CM_SR` latch are intended.

## How it was verified

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

* `tb_transition_detector` checks every 50 ps, against irregular input edges,
  that `Er` is high exactly during `PULSE_PS` after each edge.
* `tb_error_tolerant_ff` uses random in-time, late and absent arrivals. It
  checks that Q holds the stale value right after the edge and the correct
  value 5 ns later.
* `tb_time_borrowing_circuit` checks, cycle by cycle, that `CLK_TB` rises
  late only after a correction, that it never glitches, and that
  back-to-back corrections drop the second.
* `tb_tet_pipeline_top` runs the top at its default parameters for 300
  cycles. It compares q1, q2 and q3 with an ideal cycle-level pipeline, and
  counts stale FF2 values, corrections, borrowed cycles, late FF3 inputs and
  in-time FF3 changes. It fails if any of these mechanisms never happens.
* `tb_tet_pipeline_delays` runs three configurations side by side:
  - no timing error (15 / 15 ns);
  - a stage-1 error only (21 / 15 ns);
  - a successive-stage error with a larger margin (22.5 / 18.5 ns).

Verilator is a two-state simulator, so the latches start at random values.
The testbenches clock a few cycles before checking. Delays are behavioural,
and only the relative timing of edges is modelled: no setup or hold window
and no clock-to-Q delay. The margins found here are therefore those of an
ideal circuit.

Run one testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tet_pkg.sv tb/tb_tet_pipeline_top.sv --top-module tb_tet_pipeline_top
./obj_dir/Vtb_tet_pipeline_top
```

## Choices this implementation makes

The circuit's structure is as published. The transition detector's gates, the
master clock equation and the arrangement of the three flip-flops, detector,
generator and time-borrowing circuit all follow it, as does the time-borrowing
circuit's latch, falling-edge flip-flop and CLK/CLKDD selection. The
following are this design's own choices:

* all delay values, and the 20 ns clock they are sized for;
* `CLKDD = CLK & CLKD` (delayed rise, unchanged fall), so the clock switch is
  glitch-free;
* `CLKB` taken as the inverted clock;
* the set/reset latch having the clear win;
* the flip-flop's SET input unused and its RESET brought out as `rst`;
* the second operands of the two logic blocks as primary inputs, and the
  single-bit width;
* no reset on the data flip-flops;
* modelling path delay with delay buffers after the logic.

Not included: transistor-level power, area and delay figures, which need a
process library. Also not included are alternative schemes such as pulsed
latches and the time-borrowing flip-flops of earlier work.
