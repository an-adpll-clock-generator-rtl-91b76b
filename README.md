# A line-locked all-digital PLL for video capture

A video capture front end has to sample analog RGB with a pixel clock that
it makes from the horizontal sync (Hsync) of the graphics card. The pixel
clock is the Hsync frequency times the *total* horizontal resolution: 800
for VGA at 60 Hz, 1344 for XGA, 2160 for UXGA. So the PLL multiplies a
31–107 kHz reference up to 25–230 MHz, with factors in the thousands, and the
divided pixel clock must stay phase aligned with Hsync.

A loop with such a large factor is hard to keep stable. Every DCO step is
multiplied by N when it becomes a phase error at the detector. A
conventional PFD also mis-reports (cycle slips) when the loop is far from
lock. This design avoids both problems with five cell-based blocks:

* **Two-cycle frequency compare.** During acquisition the DCO is stopped
  between measurements. Each search step restarts it on a reference edge,
  lets it run M cycles and compares the divided edge with the next
  reference edge. No phase error is carried from one step to the next. The
  detector is cleared before every step, so it never works in its
  gain-inversion region.
* **A staged search on a four-stage DCO.** A 12-bit successive
  approximation (SAR) sets the coarse delay, a 4-bit linear stage (LIN)
  refines it, and a binary search over *how many* cycles of each divided
  period use a slightly longer delay (DIT1, dithering) finishes it. There
  are at most 12 + 8 + 20 = 40 steps, plus in the worst case one last DIT1
  comparison, and each takes two reference cycles. Lock therefore comes
  after about 80 reference cycles at most.
* **Dithered phase tracking.** After lock the DCO runs freely. A second,
  finer dither (DIT2) is moved up or down after each reference edge, which
  keeps the divided clock on Hsync.

The RTL follows a published 90 nm design (2.4K gates). The control logic,
phase detector and divider are synthesizable SystemVerilog. The oscillator
and the output delay line are gate-delay circuits and are given here as
behavioural models, using the delays reported for the original circuit
at its fast, typical and slow process corners.

## Block diagram

```
             +-------+ IS_UP,IS_DN  +-------+ TUNE1[11:0] +-------+ CLK_DCO +-------+
 CLK_IN ---->|  PFD  |------------->|       | TUNE2[3:0]  |       |-------->|  ADJ  |--+--> (gated) CLK_DCOO
     |       |       |<-------------| CTRL  | TUNE3,TUNE4 |  DCO  |         |       |  |
     |   +-->|       | PFD_GET,     |       | DCO_EN      |       |  ADJUST>|       |  |
     |   |   +-------+ PFD_RB,RB2   |       |------------>|       |         +-------+  |
     |   |                          +-------+                                         |
     +---|------------------------->|DCO_CNT|<----------------- clk_adj ---------------+
         +---------- CLK_DIV -------| /MULTI|---------------------------> (gated) CLK_DIVO
                                    +-------+
```

| Module | Block | Kind |
|---|---|---|
| `adpll_top` | whole loop, outputs gated until lock | structural |
| `adpll_ctrl` | control unit: search and tracking state machine | RTL |
| `adpll_pfd` | phase/frequency detector without self-reset | RTL |
| `adpll_dco_cnt` | divide-by-MULTI counter, 12.5 % duty CLK_DIV | RTL |
| `adpll_therm_dec` | 4-to-16 thermometer decoder (linear stage and ADJ) | RTL |
| `adpll_clk_gate` | glitch-free output clock gate | RTL |
| `adpll_dco` | four-stage ring oscillator | behavioural model |
| `adpll_adj` | 16-step output delay line | behavioural model |
| `adpll_pkg` | widths and the state type | package |

Top-level ports: `rstb` (active-low reset/enable), `clk_in` (Hsync), `multi[11:0]`,
`adjust[3:0]`, `clk_dcoo` (pixel clock), `clk_divo` (divided clock). Both
outputs stay low until the loop has locked.

## The control unit

This is the part that needs the most explanation. Everything in `adpll_ctrl`
except one flip-flop runs on the DCO clock, taken after the adjustment
line. That clock only exists while the DCO is enabled.

### Starting and stopping the DCO without a system clock

`DCO_EN` is the XOR of two toggle flops:

* `start_tog`, clocked by `CLK_IN`, flips on a reference rising edge while
  the DCO is stopped;
* `stop_tog`, clocked by the DCO, flips when a search step ends.

A reference edge therefore starts the oscillator directly. Its first rising
edge follows the reference edge by the enable-gate delay, and the counter,
cleared at the previous stop, reads 1 on that edge and raises `CLK_DIV`. The
divided clock thus starts in phase with Hsync. The first DCO edge after a
start (flag `restart`) begins a step. Its synchronizer is preloaded with ones
so that the starting edge is not counted again. A DCO edge that arrives
after a stop, before the enable has fallen, is ignored and holds the
counter at zero.

### One search step (two reference cycles)

| DCO cycle | action |
|---|---|
| start (ref edge 1) | count = 1, CLK_DIV rises; PFD is still cleared |
| count = 2 (`PFD_EN_CNT`) | `PFD_RB` released: the PFD is armed |
| … M cycles … | CLK_DIV rises again when the count wraps M→1 |
| ref edge 2 seen (3-flop synchronizer) | `PFD_GET` pulse: the first arrival is latched |
| +2 cycles | result read, `PFD_RB` low, DCO stopped, counter cleared, word updated |
| ref edge 3 | next step starts |

### States

`state` uses the codes IDLE = 0, SAR = 1, LIN = 2, DIT1 = 4, DIT2 = 8.

* **SAR**: `TUNE1` starts at `12'h800`, and each step decides one bit, MSB
  first. IS_UP (divided clock late, DCO too slow) clears the bit under test
  and IS_DN keeps it. The next lower bit is then set. This takes 12 steps.
* **LIN**: `TUNE2` starts at `4'b1000`, which is 8 ones in the thermometer
  code. It moves by one per step, down on IS_UP and up on IS_DN. The stage
  ends when the result flips polarity, leaving the word unchanged, or when
  the word reaches 0 or 15. That is at most 8 steps.
* **DIT1**: `TUNE3` is high from DCO count `fra3` to the end of each divided
  period, so `M − fra3 + 1` cycles run long by the third stage's delay.
  `fra3` starts at M/2 and a step counter starts at M/4. On every polarity
  flip the step is halved. The step is then added to `fra3` on IS_UP (fewer
  long cycles) or subtracted on IS_DN. A step that has moved `fra3` twice
  without a flip is halved too. The stage ends when the step reaches 0.
  With a 10-bit step this gives at most 20 moves, plus the comparison that
  ends the stage. Its last step is still a stopped-DCO step.
* **DIT2**: the DCO now runs continuously and the outputs are enabled. The
  PFD is re-armed halfway through each divided period, at count M/2, so an
  edge just after a clear is never taken for the next comparison. After
  each reference edge `fra4`, which controls the finer `TUNE4` dither, moves
  by `DIT2_STEP`. On a polarity flip it returns to M/2, the value it held
  during the whole search. The frequency found in DIT1 therefore stays the
  centre of the tracking range.

Both dither bits toggle in every state. `fra4` stays at M/2 until tracking
begins, so the search already includes the fine dither's average.

A comparison that latched neither IS_UP nor IS_DN is ignored. Each stage's
first comparison counts as "no change".

## Phase detector

`adpll_pfd` records the first rising edge of `CLK_IN` (LAG) and of
`CLK_DIV` (LEAD). Nothing resets them except `PFD_RB` from the control
unit. `UP` is set when the reference came first, `DN` when the divided
clock came first, and later edges change nothing. A rising `PFD_GET` copies
UP/DN into `IS_UP`/`IS_DN`, and `PFD_RB2` clears those.

The original circuit picks the winner with a cross-coupled gate pair. Here
each edge flop also samples whether the other edge was still absent, which
gives the same result without a combinational loop. Edges in the same
simulation instant set both outputs, and the control unit then treats the
result as IS_UP. Only the sign of the phase error is ever reported.

## Oscillator and delay-line models

The stage values are the original circuit's simulated delays. The
parameter `CORNER` (in `adpll_top`, `adpll_dco` and `adpll_adj`) selects
the process corner: `CORNER_FF` (1.1 V, −40 °C), `CORNER_TT` (1.0 V,
40 °C, the default) or `CORNER_SS` (120 °C). Each value adds to the DCO
period:

| Stage | Control | FF | TT | SS |
|---|---|---|---|---|
| base | — | 1474 ps | 2387 ps | 4212 ps |
| SAR | TUNE1 bit 0 … bit 11 | 12 … 19850 ps | 19 … 31668 ps | 33 … 52337 ps |
| LIN | TUNE2 0…15 (thermometer) | +0 … 47 ps | +0 … 64 ps | +0 … 96 ps |
| DIT1 | TUNE3 | +60 ps | +96 ps | +168 ps |
| DIT2 | TUNE4 | +10 ps | +13 ps | +17 ps |

The SAR weights are close to binary. At TT they are 19, 36, 71, 138, 264,
522, 1039, 2073, 4085, 8077, 16062 and 31668 ps. The full tables are in
`adpll_dco.sv`. The period ranges are 1.47–41.7 ns at FF, 2.39–66.6 ns at
TT and 4.21–110.6 ns at SS. Every corner therefore covers every VESA mode
from VGA (39.7 ns) to UXGA 85 Hz (4.36 ns). Fine resolution gets worse at
SS, where the dither steps are larger.

`adpll_dco` works out the period 1 ps after each
rising edge, so it uses the words set on that edge. It holds the clock low
while disabled and never shortens a cycle when it stops.

`adpll_adj` delays every edge by one of 16 values selected by `ADJUST`.
At TT these run from 331 ps to 3758 ps in steps of about 228 ps. At FF
they run from 203 ps to 2298 ps, and at SS from 601 ps to 6755 ps.
The model is a transport delay, so clocks faster than
the delay still pass. The counter and the control unit run on the delayed
clock, so the loop aligns the *delayed* clock with Hsync. Raising `ADJUST`
therefore moves the raw DCO earlier by the added delay.

Supply noise and oscillator jitter are not modelled, and neither are
temperature changes during operation.

## Where this RTL departs from, or adds to, the original

* The original's state diagram is not available. The state flow here
  follows the written description of the four stages and the state codes
  seen in its waveforms.
* These choices are this design's own: the exact DCO-cycle offsets of the
  PFD commands, the arming points (count 2 in search, M/2 in tracking), the
  toggle-based start/stop, the reference synchronizer and the counter
  clear.
* In tracking, the original re-enables the PFD right after the clear that
  follows each reference edge. Here it is re-armed at count M/2. If the
  divided clock trails the reference by more than the few cycles of the
  command sequence, an early re-arm would record that late edge as a lead
  for the *next* comparison and report the wrong sign.
* The LIN stage's last step, the one whose result flips, ends the stage
  without moving `TUNE2`. DIT1 halves its step before it applies it.
* DIT1 also halves a step that has moved `fra3` twice without a polarity
  flip. The original halves only on a flip and quotes a 2n-step bound for
  an n-bit step counter. Reference jitter can hide the flip indefinitely,
  for example once `fra3` has reached its limit, and the extra rule keeps
  that bound.
* The DIT2 step is described only as "configurable". Here it is the
  parameter `DIT2_STEP`, default 8 (8 × 13 ps per reference cycle, more
  than the ≤96 ps error DIT1 leaves).
* Ending LIN when `TUNE2` saturates, clamping `fra3`/`fra4` to 1…M+1, and the
  IS_UP priority on a tie were added.
* The output gating (a falling-edge enable flop on `CLK_DCOO`, an AND on
  `CLK_DIVO`) is this design's choice. The original only says that the
  outputs start at lock.
* The model's largest period is about 140 ps below the original's quoted
  maximum at each corner, because the quoted stage figures do not add up
  exactly.
* Not modelled: the 1 ps detector dead zone and analog jitter.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

* `tb_adpll_therm_dec`: all 16 codes.
* `tb_adpll_pfd`: reference first and divided clock first, including a
  1 ps separation, late edges ignored, the clears.
* `tb_adpll_dco_cnt`: count sequence, period and duty cycle for M = 16 to
  2160, and restart after a clear.
* `tb_adpll_dco`: the period for a set of control words against the table
  above at all three corners, start delay and clean stop.
* `tb_adpll_adj`: all 16 delays on both edges at all three corners, and a
  250 MHz clock through the longest setting.
* `tb_adpll_ctrl`: the control unit in a closed loop with an abstract DCO
  and PFD written in the testbench, for two target frequencies. It checks
  the SAR start word and first decision, the 12 SAR steps, LIN ≤ 8, DIT1
  ≤ 20, lock ≤ 80 reference cycles, a DCO stop in every search step and
  none in tracking, a residual error within two DIT1 steps, bounded
  tracking phase, and `fra4` restores.
* `tb_adpll_top`: the whole loop at default parameters for VGA, SVGA,
  XGA, SXGA, UXGA and a 100 kHz × 2000 case, with ±200 ps random Hsync
  jitter.

`tb_adpll_top` checks, for every mode:

* no output edge before lock;
* lock within 80 reference cycles;
* exactly MULTI pixel clocks per divided period;
* CLK_DIVO high for MULTI/8 − 1 pixel clocks;
* the mean pixel frequency;
* the Hsync-to-CLK_DIVO phase error is below 3 ns.

`tb_adpll_corners` runs two copies of the loop, one at FF and one at SS,
with the same stimulus. Each runs VGA, UXGA and 200 MHz. It checks lock
within 80 reference cycles, MULTI pixel clocks in every divided period,
and phase error below 3 ns.

`tb_adpll_jitter` runs the five display modes at the typical corner with
Hsync jitter of 0, ±600 and ±1200 ps. It checks lock and an exact pixel
count in every divided period at every level. It checks phase error
below 3 ns only without jitter, and prints it otherwise.

In VGA `tb_adpll_top` also steps ADJUST and checks the delay between the raw DCO edge and
CLK_DIV. Finally it checks that every mechanism happened: SAR, LIN and DIT1
steps, LIN ending on a polarity flip, DIT1 halving, DCO stops, both PFD
results, DIT2 corrections and restores, and ADJUST changes.

Typical results: lock after 54–70 reference cycles. The mean pixel
frequency is exact to the kHz. The largest Hsync-to-CLK_DIVO phase error over 40
locked periods stays below 2.5 ns with ±200 ps of Hsync jitter. The
original circuit's full-chip simulation reports 0.9–1.8 ns under the same
jitter. The FF and SS corners lock in 56–76 reference cycles.

Larger Hsync jitter turns some search decisions around, because every
comparison is a single pair of edges. The loop still locks and never
slips a pixel clock. Over many random sequences, though, the phase error
reaches about 6 ns at ±600 ps and 10–20 ns at ±1200 ps. A tracking loop
this slow cannot filter jitter of that size. The original silicon
likewise showed about 7 ns of phase difference with more than 1 ns of
Hsync jitter.

## Simulating

With Verilator 5 (timing support is needed for the behavioural models):

```
verilator --binary --timing --no-sched-zero-delay --assert -Irtl -Itb \
    rtl/adpll_pkg.sv tb/tb_adpll_top.sv --top-module tb_adpll_top
./obj_dir/Vtb_adpll_top
```

The same command with another `tb_*.sv` and `--top-module` runs the block
testbenches. Verilator resolves the other modules through `-Irtl`, because
every module lives in a file of its own name. The design's flops have
asynchronous active-low resets, so a testbench must give `rstb` a falling
edge. The end-to-end run takes about 2 s.

To use the loop, hold `rstb` low, set `multi` (16…4095) and apply Hsync on
`clk_in`, then release `rstb`. `clk_dcoo` and `clk_divo` start once
tracking begins. For synthesis, `adpll_dco` and `adpll_adj` must be
replaced by the real cell-level oscillator and delay line, with the same
ports.
