# PPRAM-Link physical layer — common-clocking and source-synchronous ports

PPRAM-Link is a point-to-point link between merged DRAM/logic chips. Each direction is a
parallel bus of 17 lines (a 16-bit symbol and a flag bit), 50 MHz in the reference design.
The standard offers two clocking methods, and this RTL builds both. The top module,
`pplink_phy_top`, gives a node one port of each kind. Most of this document is about the
common-clocking port, the harder of the two; the source-synchronous port has its own
section further down.

With common clocking, all the chips share one clock source. Each line still reaches the receiver with its own
board delay, so the receiver cannot just clock all 17 lines in with its own clock. Some
lines would be sampled on a data edge. Lines that differ by more than a few nanoseconds
would be caught in different clock cycles.

This RTL brings such a link up without any per-board tuning. It puts a digitally
controlled delay-locked line (DLL) on each received line. A fixed, timer-driven start-up
sequence then sets every DLL from training patterns sent by the other end. After that the
link carries one 17-bit word per clock in each direction, with a fixed latency.

## How a link comes up

Both ends of a link leave reset in the same cycle and run the same timer
(`phy_ctrl_cc`), so the sender always knows what the receiver is doing. No handshake is
needed. There are four phases, then a steady state:

| phase | sender drives on all 17 lines | receiver does | default length |
|---|---|---|---|
| `PH_RESET` | low | nothing | 16 cycles |
| `PH_CLK_DESKEW_A` | its own clock | every Fine DLL moves its tap until the received clock **falls** at the receiver's rising clock edge | 256 cycles |
| `PH_SIG_DESKEW` | sync pattern: all ones for one cycle in every 8 | compares, per symbol line, the cycle the marker shows up in with the flag line's, and moves that line's Coarse DLL by ±1 cycle | 96 cycles |
| `PH_CLK_DESKEW_B` | its own clock again | Fine DLLs re-lock, starting from where they are | 256 cycles |
| `PH_KEEP` | logical-layer words | DLL settings held, `link_ready` = 1 | until reset |

**Why "falls at the rising edge".** The sender launches data on its rising edge, which is
also when its clock pattern rises. If the received clock *falls* exactly when the
receiver samples, then the data edges are half a cycle away from the sampling point. The
receiver therefore samples in the middle of each bit. This is the "anti-phase" condition.

**Why a second clock phase.** Phase A only makes each line sample cleanly. It says nothing
about *which* cycle each line's bit lands in. The sync pattern fixes that in whole cycles
through the Coarse DLLs. A real coarse element is only roughly one cycle long: 10.3 to
28.5 ns across process corners for a nominal 20 ns. Changing it therefore also moves the
phase, and phase B repairs that.

In each de-skew phase the receiver starts adjusting 16 cycles (`GUARD`) after the phase
begins. Words of the previous pattern that are still on the wires or in the delay lines
have drained out by then.

## The DLLs

Each received line has this path:

```
rx_pad[i] ──► Coarse DLL (symbol lines only) ──► Fine DLL delay line ──► capture FF @ clk ──► rx_word[i]
                     ▲                                  ▲                     │
                sync_deskew                   fine_dll_ctrl ◄── phase_comparator
```

That makes 33 DLLs per receiver: 17 Fine and 16 Coarse. The flag line has no Coarse DLL
and serves as the reference for inter-signal de-skew. To line up with the symbol lines,
whose Coarse DLLs rest at two elements (two cycles), the flag is delayed by two register
stages after capture.

**Fine DLL** (`fine_dll`):
- **Delay line.** 66 equal elements of 1 ns (`delay_line`). A tap chooses how many are in
  the path.
- **Comparator.** The phase comparator (`phase_comparator`) samples the delayed line twice:
  at the receiver clock's rising edge, and one element later, through a second copy of the
  same element on the clock (dt_comp). The two samples decide the next move:
  - high, then low: the falling edge lies inside the 1 ns window → **lock**.
  - high, then high: the fall is still to come → **remove** one element.
  - low at the edge: the fall has passed → **add** one element.
- **Counter.** The tap counter (`fine_dll_ctrl`) starts mid-line (tap 33). It acts on one
  decision every `SETTLE` = 8 cycles, so the line and the comparator's 2-cycle pipeline can
  settle. It allows at most 16 changes per de-skew phase. Sixteen of the fastest-corner
  elements (0.63 ns) still cover half a clock period. 66 elements cover two such
  adjustments, one in phase A and one in phase B. If a phase uses all 16 changes without
  locking, `exhausted` is raised.

**Coarse DLL** (`coarse_dll`):
- **Delay line.** Three elements of one clock period (20 ns).
- **Setting.** It rests at 2 elements, which counts as "0". An `early` pulse adds an element
  (+1 cycle). A `late` pulse removes one (−1 cycle). At most 2 changes are allowed per phase.
- **Control.** The pulses come from `sync_deskew`. It keeps the last three captured words.
  Whenever the flag bit of the middle word is 1, a symbol bit that was 1 a word earlier is
  early, and one that is 1 a word later is late. After a correction, the next marker is
  ignored while the lines settle. `sig_aligned` reports a measurement that found every bit
  on the flag's word.

## The source-synchronous port

When the two chips have their own clock sources, the sender forwards its clock on an 18th
line (`tx_clk_pad`) next to the 17 data lines. The receiver captures data on the
**falling** edge of that received clock. The data edges come with the sender's rising
edge, so the falling edge is mid-bit, provided every data line arrives in step with the
clock line. Only the line-to-line skew is left to remove, and that needs just one Fine DLL
per data line (17 in all, 33 elements = one cycle each) and no Coarse DLLs.

Start-up (`phy_ctrl_ss`) has a single de-skew state:

| phase | sender drives | receiver does | default length |
|---|---|---|---|
| `SS_RESET` | low | nothing | 16 cycles |
| `SS_SIG_DESKEW` | every data line toggles each cycle | each Fine DLL moves the line's edges onto the received clock's rising edge | 256 cycles |
| `SS_RUN` | logical-layer words | DLLs held; words go through the elastic buffer | until reset |

The receiver's copy of the timer and all DLL counters run on the received clock, so they
count the sender's cycles exactly. The node's reset reaches that clock domain through a
two-flop synchronizer.

**Comparator** (`phase_comparator_ss`). It looks at three samples of the delayed line:
- the capture at the falling edge just before (`m`);
- the rising edge (`s0`);
- one element after the rising edge (`s1`).

Then:
- `s0 != s1`: the edge lies inside the 1 ns window → **lock**.
- `s0 == s1`, differs from `m`: the edge came between the falling and the rising edge,
  too early → **add** an element.
- all three equal: the edge is still to come → **remove** an element.

The counter starts mid-line (tap 16). The same `fine_dll` is used, with `SOURCE_SYNC=1`
selecting this comparator and the falling-edge capture.

**Elastic buffer** (`elastic_buffer`). Words are written on the received clock and read
on the node's own clock:
- a 16-entry ring, with Gray-coded pointers crossing through two-flop synchronizers;
- reading starts once the read side sees 5 words. With the synchronizer delays the real
  fill is then near the middle;
- after that one word is read per node cycle while any is present, so the fill absorbs
  jitter and the slow drift between the two clock sources;
- `rx_valid` marks delivered words. Sticky `eb_overflow` and `eb_underflow` report a
  buffer that ran full or empty.

With the two clocks 500 ppm apart the fill moves by one word per 2000 cycles. A link that
runs continuously for much longer than that needs words to be dropped or inserted at idle
times. That is logical-layer work (see "Not included").

## Module map

| module | kind | role |
|---|---|---|
| `pplink_pkg` | package | widths (`SYMBOL_W`=16, `LINK_W`=17), `cc_phase_e`, `ss_phase_e`, `cmp_e`, `SYNC_PERIOD` |
| `pplink_phy_top` | top | `pplink_phy_cc` and `pplink_phy_ss` side by side, sharing only the reset |
| `pplink_phy_cc` | model | common-clocking port: `phy_ctrl_cc` + `phy_tx_cc` + `phy_rx_cc` |
| `pplink_phy_ss` | model | source-synchronous port: two `phy_ctrl_ss`, line register, 17 `fine_dll`, `elastic_buffer` |
| `phy_ctrl_ss`, `phase_comparator_ss`, `elastic_buffer` | RTL | source-synchronous control, comparator, clock-domain buffer |
| `phy_ctrl_cc` | RTL | phase timer and the control strobes derived from it |
| `phy_tx_cc` | RTL | selector: clock / sync pattern / registered data onto the lines |
| `phy_rx_cc` | model | 16 `coarse_dll` + 17 `fine_dll`, flag alignment, `sync_deskew` |
| `fine_dll` | model | `delay_line` ×2 + `phase_comparator` (or `phase_comparator_ss`) + `fine_dll_ctrl` |
| `coarse_dll` | model | `delay_line` + 2-bit saturating setting register |
| `delay_line` | model | transport-delay model of the custom delay line |
| `phase_comparator`, `fine_dll_ctrl`, `sync_deskew` | RTL | synthesizable DLL control |

"Model" marks a module that contains the delay lines. In silicon these are hand-laid-out
chains of inverters with a multiplexer per element. Here `delay_line` models them with
simulation delays, so any module that contains one can be simulated but not synthesized.
All the control around them is ordinary synthesizable SystemVerilog. To take the design to
silicon, replace `delay_line` with the custom macro; its ports are `din`, `sel` and `dout`.

## Interface and timing of `pplink_phy_cc`

- `clk`: the shared 50 MHz clock. `rst_n` is an asynchronous reset, active low. Both ends
  of a link must release it in the same cycle.
- `tx_word[16:0]` (`{flag, symbol}`): sampled every rising edge while `link_ready` is high,
  and driven onto `tx_pad` one cycle later. There is no valid/ready handshake. The logical
  layer sends a word every cycle, idle words included.
- `rx_word[16:0]`: the received word, one per cycle, meaningful once `link_ready` is high.
  The latency from `tx_word` at one node to `rx_word` at the other is fixed once the link is
  up. It depends on the trace delays: 5 cycles for the traces in the end-to-end test.
- `tx_pad` / `rx_pad`: the 17 output and input lines. In the clock phases `tx_pad` carries
  the clock itself, through a multiplexer.
- Status outputs for bring-up and test:
  - `phase`
  - per-line `fine_tap`, `fine_cmp` and `fine_locked`
  - `fine_exhausted`
  - per-symbol-line `coarse_tap`
  - the `coarse_early` / `coarse_late` pulses
  - `sig_aligned` and `sig_measured`

Start-up takes `RESET_CYCLES + CLK_A_CYCLES + SIG_CYCLES + CLK_B_CYCLES` = 624 cycles
(12.5 µs at 50 MHz) with the defaults.

## Interface of `pplink_phy_ss` and `pplink_phy_top`

`pplink_phy_ss` has the same data interface, with these differences:
- `clk` is the node's own clock.
- `rx_word` comes with `rx_valid`.
- Lines: `tx_pad` plus `tx_clk_pad` (the forwarded clock) out, `rx_pad` plus `rx_clk_pad` in.
- `link_ready` means this node's sender is in `SS_RUN`.
- Start-up takes 16 + 256 cycles.
- Latency: `tx_word` is driven one cycle after it is presented. Add the trace delay, the
  capture and the elastic-buffer fill (about 8 words).

In `pplink_phy_top` every port of the two sub-blocks appears with a `cc_` or `ss_` prefix.
The clock inputs are `cc_clk` (shared board clock) and `ss_clk` (own clock), and there is
one `rst_n`.

## Parameters

| parameter | default | meaning | origin |
|---|---|---|---|
| `FINE_ELEM` | 66 | Fine DLL elements | reference design |
| `FINE_TD_PS` | 1000 | Fine element delay, ps (0.63–1.67 ns over corners) | reference design |
| `FINE_CHANGES` | 16 | Fine tap changes allowed per phase | reference design |
| `COARSE_ELEM` | 3 | Coarse DLL elements | reference design |
| `COARSE_TD_PS` | 20000 | Coarse element delay, ps (10.3–28.5 ns over corners) | reference design |
| `COARSE_CHANGES` | 2 | Coarse changes allowed per phase | reference design |
| `SETTLE` | 8 | cycles between Fine tap decisions | this design |
| `RESET_CYCLES`, `CLK_A_CYCLES`, `SIG_CYCLES`, `CLK_B_CYCLES` | 16, 256, 96, 256 | phase lengths | this design |
| `GUARD` | 16 | cycles at the start of a phase before adjusting | this design |
| `pplink_phy_ss`: `FINE_ELEM` | 33 | source-synchronous Fine DLL elements | reference design |
| `pplink_phy_ss`: `DESKEW_CYCLES` | 256 | length of the one de-skew state | this design |
| `pplink_phy_ss`: `EB_DEPTH` | 16 | elastic buffer entries | this design |
| `SYNC_PERIOD` (package) | 8 | sync marker spacing | this design |

## What follows the standard and what is this design's own

These follow the published standard and its reference circuit:
- the 17-line link and the common clock;
- the three start-up states, run by a timer;
- the sender's clock pattern;
- 33 DLLs per receiver;
- Fine DLLs of equal 1 ns elements with a two-sample comparator and a register counter;
- Coarse DLLs of three 20 ns elements selecting −1/0/+1 cycle;
- the change budgets of 16 and 2;
- the 50 MHz clock.

This design chose the following; the standard leaves them open or only outlines them:
- the comparator's decision table and its 2-cycle pipeline;
- starting the Fine counter mid-line, and reading the change budget as "per de-skew phase";
- all phase lengths, `SETTLE` and `GUARD`;
- the sync pattern. The standard uses an SCI-style sync packet; here it is one all-ones
  word per 8 cycles;
- the flag line as the inter-signal reference, with two compensating register stages;
- mapping −1/0/+1 to 1/2/3 coarse elements;
- placing the Coarse DLL before the Fine DLL;
- driving the lines low in reset, and registering `tx_word` once.

For the source-synchronous port:
- The standard says data is taken with the inverted reference clock, and this design does
  so. It also says the flag bit serves as the sampling signal. A line that carries the
  flag cannot also be a free-running clock, so here the clock has a line of its own.
- The toggle pattern in the de-skew state stands in for the standard's sync packet.
- The three-sample comparator rule and the elastic buffer's structure, depth and start
  level are this design's own.

One modelling simplification: in `delay_line` an edge takes the delay of the tap that was
selected when it entered the line. The real multiplexer switches the output at once. The
two differ only in the few nanoseconds after a tap change.

## Not included

- **Logical layer.** This covers the SCI-based transactions (including gather/scatter,
  active messages, suspend/resume), flow control, error recovery and node-ID
  initialization. The packet format and protocol machines are not specified in enough
  detail to implement.
- **Chips and cores built on the link.** The MOE chip (76-bit multiply-add unit, RISC
  integer unit, memories, link interface unit) and the generic link-interface IP core.
- **I/O cells.** LVTTL / LVDS / GTL / SSTL pads.

## Simulating

Everything runs with Verilator 5 in timing mode. All files use `` `timescale 1ps/1ps `` and
integer-picosecond delays. Verilator rounds delays to the time unit, so a nanosecond time
unit would put fractional board delays onto clock edges. Example, two nodes joined by both
link types at full size:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pplink_pkg.sv tb/pplink_phy_top_tb.sv \
          --top-module pplink_phy_top_tb
./obj_dir/Vpplink_phy_top_tb
```

It prints `TB_RESULT checks=N failures=0` at the end. Every testbench in `tb/` is
self-checking in the same way and has a watchdog:

| testbench | what it shows |
|---|---|
| `pplink_phy_top_tb` | Two `pplink_phy_top` nodes joined by both links at default sizes. The two source-synchronous clocks are 20.000 and 20.010 ns. 300 words go each way on each link. Counts every mechanism of both methods and fails if one never happens. |
| `pplink_phy_ss_tb` | The source-synchronous port alone. Line skews up to 11 ns and a 500 ppm clock offset. All Fine DLLs must lock (stepping up and down), and 400 words per direction must come through the elastic buffers in order. |
| `elastic_buffer_tb`, `phase_comparator_ss_tb`, `phy_ctrl_ss_tb` | Source-synchronous units, each against an independent reference. The elastic buffer is run with a slightly slow reader and a much too slow one. |
| `pplink_phy_cc_tb` | The common-clocking end-to-end test. Two nodes, default sizes, traces from 0.4 to 29.5 ns per line. Every Fine DLL locks in A and B. Coarse DLLs move +1 and −1 where the skew calls for it. 300 random words go each way, unchanged and at a fixed latency. Counts each mechanism and fails if one never happens. Runs in under a second. |
| `phy_rx_cc_tb` | The receiver alone, fed by a transmitter model with 17 and −12 ns skews. |
| `fine_dll_tb` | Lock tap and lock time for six trace delays, against a tap worked out from the waveform. |
| `phase_comparator_tb`, `fine_dll_ctrl_tb`, `coarse_dll_tb`, `delay_line_tb`, `sync_deskew_tb`, `phy_ctrl_cc_tb`, `phy_tx_cc_tb` | Each unit against an independent reference. |

`board_trace` in `tb/` is a pure transport delay standing for a circuit-board trace.

## How far to trust it

- The DLL behaviour has only been exercised at the typical element delays, plus whatever
  the unit tests sweep.
- Process-corner behaviour depends on the real delay macro and has not been checked against
  it. That covers Fine elements of 0.63–1.67 ns and coarse elements well away from 20 ns,
  for which phase B has to correct the coarse step.
- Each line's skew must stay within about ±1 cycle of the flag line after fine locking.
  Larger skews are outside what −1/0/+1 can fix, and `sig_aligned` stays low.
- The source-synchronous port has been run at one clock offset (500 ppm) and one set of
  trace delays, for a few hundred words after start-up. It has not been run for long
  enough for the elastic buffer to drift to either end.
