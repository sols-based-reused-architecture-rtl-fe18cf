# FM0 / Manchester / Miller line encoder with a shared datapath

DSRC (dedicated short-range communication, the 5.8/5.9 GHz vehicle-to-vehicle
and vehicle-to-roadside link) transmitters encode their bit stream before
modulation. The goal is a DC-balanced waveform that carries its own timing.
FM0 and Manchester are the usual codes, and Miller code is common in RFID.
Each code puts two half-bit levels ("half-cells") into every bit period.

This encoder makes all three codes with one small datapath instead of three
separate encoders:

* FM0 and Manchester share everything: two multiplexers, an XNOR, an
  inverter and a single state flip-flop. Only the settings of two control
  bits differ between them.
* The Miller output comes from a toggle flip-flop fed with the same data bit.
* A final multiplexer picks which branch drives the output.
* The flip-flop of the branch that is not in use is clock-gated, so it uses no
  dynamic power.

The idea behind the shared datapath is similarity-oriented logic
simplification (SOLS). The FM0 and Manchester equations are rewritten until
they use the same gates. The only difference left is what goes into the first
multiplexer: the stored state (FM0) or the data bit (Manchester).

## The codes, half-cell by half-cell

A bit period is one clock period and starts at a rising edge of `clk`. The
first half-cell is the high phase of `clk` and the second is the low phase.
So the output changes at twice the bit rate, and `clk` itself selects the
half-cell.

| code | first half-cell | second half-cell | property |
|---|---|---|---|
| FM0 | `~B` | `B' = B ^ x` | a transition at every bit boundary, plus one mid-bit for a 0 |
| Manchester | `~x` | `x` | 1 = low→high, 0 = high→low |
| Miller (as built) | `M` | `M' = M ^ x` | a mid-bit transition for every 1 |

`B` is the FM0 level of the previous second half-cell. `M` is the Miller
branch level.

## How one flip-flop serves FM0 and Manchester

`sols_fm0_manchester` is built as follows:

```
            mode1                clk
              |                   |
  q ------>|0  \             |1  \
  x_in --->|1  /---- m_a1 -->|    \                      y
              mux a1          |    /---- m_a2 ---->o------>
  xnor(q,x_in) ------------->|0  /      (inverter)
                              mux a2
  d_ffb (a3): d = ~xnor(q, x_in), clock = rising edge of gclk, clr active-low
```

* **FM0** (`mode1 = 0`, `clr = 1`). While `clk` is high, `y = ~q`. While
  `clk` is low, `y = ~xnor(q, x) = q ^ x`. On the rising edge that ends the
  bit, `d_ffb` stores that second-half value. So `q` is always `B`, the level
  that the next bit must invert at its start.
* **Manchester** (`mode1 = 1`, `clr = 0`). The clear holds `q` at 0. In the
  first half `y = ~x`, and in the second half `y = ~xnor(0, x) = x`.

The figure-level structure drives the flip-flop's D input from the inverter
output. At the capture edge that output is switching between half-cells, so
a zero-delay simulation would race. The flip-flop therefore takes its D input
from the inverted XNOR instead. That is the value the inverter output holds
for the whole second half-cell, which the capture edge ends. The logic is the
same, and this tap has no race.

## Miller branch

The Miller branch is a T flip-flop (`t_ff`). `x_in` is its toggle input, and
it toggles on the falling clock edge, which is the middle of the bit. A 1
therefore produces a mid-bit transition and a 0 produces none.

This is exactly the structure of the architecture. It does **not** produce
the extra bit-boundary transition that the textbook Miller code places
between two consecutive 0s. To get full Miller code, add a one-bit memory of
the previous bit and a boundary toggle (`x_prev == 0 && x == 0`).

## Control settings

| code | `mode1` | `clr` | `mode2` |
|---|---|---|---|
| FM0 | 0 | 1 | 1 |
| Manchester | 1 | 0 | 1 |
| Miller | 0 | 1 | 0 |

`mode2 = 1` routes the FM0/Manchester branch to `enc_out`, and `mode2 = 0`
routes the Miller branch.

`clr` is an active-low, asynchronous clear of both flip-flops. Manchester mode
keeps it asserted. Any Manchester cell (or a low pulse on `clr`) therefore
restarts FM0 and Miller from level 0, which gives their starting level.

`sols_pkg::ctrl_for()` returns these settings for a `code_e` value.

## Clock gating

Each flip-flop has its own `clock_gate`. This is a standard latch-based
integrated clock gate, and both latches are intentional.

* `d_ffb` is rising-edge. Its gate (`FALLING = 0`) latches `mode2` while
  `clk` is low, and outputs `clk & en`.
* `t_ff` is falling-edge. Its gate (`FALLING = 1`) latches `~mode2` while
  `clk` is high, and outputs `clk | ~en`.

Because of the latch phases, a mode change made just after a rising edge
already applies to the bit that begins at that edge. The idle branch keeps its
state. FM0 resumes from its last level after a Miller run, and Miller resumes
from its last level after an FM0 run.

## Interface and timing (`sols_encoder`)

| port | dir | meaning |
|---|---|---|
| `x_in` | in | data, one bit per `clk` period |
| `clk` | in | bit clock; high = first half-cell, low = second |
| `mode1`, `clr`, `mode2` | in | code selection, see the table above |
| `enc_out` | out | coded output, two half-cells per bit |

* Drive `x_in` and the mode bits from registers clocked on the rising edge of
  `clk`.
* The output is combinational from `clk`, `x_in` and the state. In Manchester
  mode it changes at a bit boundary when `x_in` changes. If `x_in` arrives
  late after the edge, a pulse as wide as that delay appears at the boundary.
  Register `enc_out` on a 2× clock if a clean output is required.
* Latency is zero: each bit appears in the same clock period in which it is
  presented.
* The throughput is one bit per clock. The DSRC rates of 500 kb/s, 4 Mb/s and
  27 Mb/s need clocks of 500 kHz, 4 MHz and 27 MHz.
* The published FPGA prototype of this architecture (Spartan-3E) reports a
  5.776 ns path delay. Since the output changes every half period, that delay
  would allow roughly 86 Mb/s.

## Files

| file | content |
|---|---|
| `rtl/sols_pkg.sv` | `code_e`, `sols_ctrl_t` and the mode table `ctrl_for()` |
| `rtl/mux1.sv` | 2:1 multiplexer (`sel = 1` picks `b`) |
| `rtl/d_ffb.sv` | D flip-flop, rising edge, active-low asynchronous clear |
| `rtl/t_ff.sv` | T flip-flop, falling edge, active-low asynchronous clear |
| `rtl/clock_gate.sv` | latch-based clock gate for rising- or falling-edge flip-flops |
| `rtl/sols_fm0_manchester.sv` | shared FM0/Manchester datapath |
| `rtl/sols_encoder.sv` | top: both branches, clock gates, output multiplexer |

The design has no size parameters. `clock_gate`'s `FALLING` only chooses the
gate type.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_mux1` tests all input combinations exhaustively.
* `tb_d_ffb` and `tb_t_ff` use random data and random asynchronous clears.
* `tb_clock_gate` drives the enable at random. It samples every time unit, so
  a glitch is caught.
* `tb_sols_fm0_manchester` compares random FM0 and Manchester runs against the
  code definitions. It also checks hand-worked patterns, for example FM0
  `11001` → half-cells `11 00 10 10 11`.
* `tb_sols_encoder` is the end-to-end test at the default configuration:
  * random runs that switch at random among all three codes, with reference
    models for each code;
  * a count of gated clock edges per bit: each branch's flip-flop must get an
    edge only while its branch is selected;
  * a check that each code, each kind of switch, each gated-off branch and the
    clear all occurred;
  * fixed patterns, for example Miller `10110` → `01 11 10 01 11`.
* `tb_dsrc_rates` runs 200 bits of each code at each of the three DSRC rates.
  It checks the coded levels, checks that FM0 starts every bit with a
  transition, checks that no FM0/Manchester level lasts longer than one bit
  period, and checks that the elapsed simulated time matches the rate.

To run one testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  rtl/sols_pkg.sv tb/tb_sols_encoder.sv --top-module tb_sols_encoder -o sim
./obj_dir/sim
```

## Where this RTL goes beyond or departs from the architecture

The architecture fixes the gates, their connections and the control table.
The following are this design's own choices:

* **Edges and half-cell order.** Bits start at the rising edge, and the first
  half-cell is the high phase. `d_ffb` captures on the rising edge and `t_ff`
  toggles on the falling edge.
* **Multiplexer select sense.** This follows from what each code needs.
* **Clear.** `clr` is active-low and asynchronous, because Manchester uses
  `clr = 0` to hold the state at 0.
* **Control settings.** `mode2 = 1` selects FM0/Manchester, since both
  codes leave through the same multiplexer input. Miller runs with
  `clr = 1` so that its flip-flop is not held cleared.
* **Flip-flop D input.** `d_ffb` is fed from the inverted XNOR rather than the
  inverter output, as explained above.
* **Clock gating.** The architecture calls for clock gating without giving a
  circuit. The latch-based gates and their enables are this design's.
* **Miller code.** The Miller branch makes only the mid-bit transitions for
  1s, as described above.
* **Not covered.** The rest of a DSRC transceiver (microprocessor,
  modulation, error correction, clock recovery, RF front-end, receive-side
  decoding) is outside this RTL.
