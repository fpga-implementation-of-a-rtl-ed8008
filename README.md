# Majority Mean-Timer: bunch-crossing identification for drift-tube chambers

A muon crossing a drift-tube super-layer leaves one hit in each of its four
layers. The front end measures only *when* each wire collected its charge,
t_j, counted in the LHC orbit. The muon's own crossing time t0 is not measured.
Each drift time T_j = t_j - t0 is unknown, and so is the side of the wire the
muon passed on. Yet the hits of one straight track are not independent. On a
regular staggered layout, any three of them satisfy an integer linear relation
(the *mean-timer* relation), and that relation can be solved for t0. This RTL
applies that relation to every plausible group of three hits and every side
assumption. It lets all candidates vote in a histogram of t0 values, one bin
per 25 ns bunch crossing (BX), and reports the most voted BX as the parent
bunch crossing of the muon. It also flags whether the vote is backed by four
aligned hits (high quality) or only three (low quality).

The design is a synthesizable SystemVerilog model of the histogram-based
Majority Mean-Timer (MMT) trigger stage published for the CMS drift tubes at
the HL-LHC. The block structure, the equation, the time unit, the output
precision and the quality definition follow that publication. Widths, formats,
the macro-cell layout and scheduling details are choices of this
implementation. They are listed under "What is this design's own" below.

## The mean-timer relation

Distances across the layer are measured in *half cells*: the distance an
electron drifts in the maximum drift time TMAX. Layers 0 and 2 have wires at
x = 0, 2, 4, … and layers 1 and 3 are shifted by half a cell, to x = 1, 3, 5, ….
A hit in layer y at wire x_w lies at

    x = x_w + s * T / TMAX         s = +1 (right of the wire) or -1 (left)

For three hits in layers y1 < y2 < y3 to lie on one straight line,

    c1*x1 + c2*x2 + c3*x3 = 0,   c1 = -(y3-y2), c2 = y3-y1, c3 = -(y2-y1)

Substituting and writing a_j = c_j * s_j and b = -(c1*xw1 + c2*xw2 + c3*xw3)
gives the mean-timer relation with integer coefficients:

    a1*T1 + a2*T2 + a3*T3 = b*TMAX
    (a1 + a2 + a3) * t0   = a1*t1 + a2*t2 + a3*t3 - b*TMAX

Note that b depends only on which wires fired, not on the sides. When
a1 + a2 + a3 = 0 the relation does not contain t0 (for example, all hits on the
same side of three consecutive wires), so the candidate is discarded.

`mmt_equations` evaluates this for one group of three hits and all eight side
assumptions at once. With den = a1+a2+a3 made positive and num the right-hand
side, it does the following:

* The candidate is accepted only if every implied drift time lies within
  [-TOL, TMAX+TOL]. This is checked exactly on integers as
  `-den*TOL <= den*t_j - num <= den*(TMAX+TOL)`. No division and no rounding
  are involved.
* The candidate's bin is `floor(num / (8*den)) + BIN_NEG`. One time unit is
  3.125 ns, so 8 units make one BX. Bins start BIN_NEG crossings before the
  window, because a muon can cross up to one drift time before its first hit.
  One small divider per lane (divisor 1 to 6) is the only division in the
  design.

Wrong side assumptions usually produce either no solution inside the drift
window or t0 values that scatter. The correct one produces the same t0 from
every group of three hits on the track. A clean four-hit track gives four
agreeing candidates (the four groups of three layers). That is why the vote
works, and why a bin fed by all four layers is called high quality.

## Macro-cells and patterns

Only neighbouring wires can belong to one track, so the super-layer is
processed in *macro-cells* of 18 wires: four layers of 5, 4, 5 and 4 cells.
Positions are numbered layer by layer, 0–4, 5–8, 9–13 and 14–17. A *pattern* is
three positions in three different layers whose wires are no further apart, in
half cells, than their layers are apart. That allows tracks up to about 60°
from the perpendicular. There are 72 patterns. `mmt_pkg` enumerates them at
elaboration time with a constant function. No table file is needed, and the
coefficients c1..c3 and b of each pattern are computed from the geometry
above.

The default super-layer has 4 × 17 wires, channel = layer*17 + cell. It is
covered by 7 macro-cells: macro-cell m starts at cell 2m of every layer, so
neighbouring macro-cells share half their wires. A muon near a boundary can
therefore trigger two macro-cells, and the payload carries both.

## Pages and windows

Hits arrive asynchronously and out of order, tagged with their orbit time.
`mmt_hit_collector` cuts time into pages of 16 BX (400 ns, about the maximum
drift time) and files each hit into the buffer of its page. A hit can be up to
one page late; older ones are dropped and counted. At every page boundary it
closes the *window* made of the two pages before the previous one, and replays
its hits on the TDC hit bus. Consecutive windows overlap by one page. Every
muon's hits span less than one page, so all of them land together in at least
one window, whatever the phase between the muon and the page boundaries. This
is what makes the scheduling *time-hermetic*. A muon can be found in two
consecutive windows; the duplicate is not suppressed.

Orbit times wrap at 3564 BX. The collector compares every hit with the current
page start modulo the orbit, and pages run freely across the wrap. Inside a
window, times are 9-bit offsets from the window start.

## Data flow and timing

```
TDC words ─► mmt_hit_collector ─TDC hit bus─► mmt_hit_driver ─mapped hits─► mmt_sl_processor ×7 ─t0/quality─► mmt_payload_builder ─► payload
                 ▲                                                            (mmt_equations + mmt_histogram)
             mmt_synch (BX, orbit, pages)
```

| block | does | cycles per window (defaults) |
|---|---|---|
| `mmt_synch` | BX counter (5 clocks per BX at 200 MHz), orbit wrap, 16-BX page tick | – |
| `mmt_hit_collector` | decode, page buffers (4 × 30 hits), window replay | win_start +1, hits from +2, win_end at +62 |
| `mmt_hit_driver` | compares each hit's channel with every position of every macro-cell; keeps the earliest time per wire | frame 1 cycle after win_end |
| `mmt_sl_processor` | four patterns per cycle (`LANES`), 8 sides each in parallel, 2-stage equations, histogram, winner | result 23 cycles after the frame (ceil(72 / LANES) + 5) |
| `mmt_histogram` | 50 one-BX bins, adds up to 32 candidates per cycle, records layers per bin; fullest bin wins, lowest on a tie | 1 cycle after finish |
| `mmt_payload_builder` | waits for all macro-cells, writes header + one word per trigger | header 2 cycles after the results |

A page lasts 80 cycles at the defaults. The replay (2·DEPTH+3 = 63 cycles up
to the frame) and the pattern loop (23 cycles) both fit in it, so the chain
accepts one window per page without back-pressure. The collector issues
`win_end` at a fixed cycle for this reason. Assertions check both budgets at
the start of simulation. From the end of a window's second page to its
payload header takes 63 + 23 + 2 = 88 cycles (440 ns at 200 MHz).

### Interfaces

Input TDC word (`mmt_pkg::tdc_word_t`, 25 bits): `channel[7:0]`, `bx[11:0]`
(0..3563) and `fine[4:0]` (1/32 BX). The algorithm time is bx*8 + fine/4.
Words with channel ≥ 68 are dropped and counted.

Per macro-cell t0 / quality bus (`mc_result_t`): `found`, `hq`, `t0_bx[11:0]`
(BX in the orbit).

Payload, one 32-bit word per cycle on `pl_valid`, with `pl_first` and `pl_last`:

| word | bits |
|---|---|
| header | `[31:28]=A` `[27:16]` first BX of the window, `[15:8]` number of triggers, `[7:0]` sequence number |
| trigger | `[31:28]=5` `[27:24]` macro-cell, `[23]` high quality, `[11:0]` t0 BX |

A window without triggers produces a lone header.

Monitoring counters on the top: `n_late`, `n_overflow` (page buffer full),
`n_bad_channel`, `n_overrun` (a frame reached a busy processor; cannot happen
within the budgets above), `n_payloads`.

## Parameters (top)

| parameter | default | meaning |
|---|---|---|
| `N_MC` | 7 | macro-cells (the published demonstrator used 7 for one mini-chamber) |
| `MC_STRIDE` | 2 | cells between macro-cell starts |
| `CLK_PER_BX` | 5 | clock cycles per 25 ns (200 MHz) |
| `PAGE_BX` | 16 | page length in BX |
| `DEPTH` | 30 | hits per page buffer |
| `TMAX` | 124 | maximum drift time, 3.125 ns units (387.5 ns) |
| `TOL` | 4 | drift-time tolerance, 3.125 ns units |
| `NBINS`, `BIN_NEG` | 50, 18 | histogram bins and bins before the window start |
| `LANES` | 4 | patterns evaluated per cycle in each super-layer processor |

If you change `CLK_PER_BX`, `PAGE_BX`, `DEPTH` or `LANES`, keep
`PAGE_BX*CLK_PER_BX ≥ 2*DEPTH+3` and `≥ ceil(72/LANES)+5`; assertions report
a violation at the start of simulation. The 160 MHz setting of the cosmic-ray
demonstrator is `CLK_PER_BX = 4` (64 cycles per page) with everything else
at its default. There the replay takes 63 cycles, the pattern loop 23, and
the latency is 88 cycles (550 ns).

## What follows the published design, and what is this design's own

Follows the published design: the block chain (synch, hit collector with a
paged scheme, hit driver, per-macro-cell super-layer processor with equations
and histogram, payload builder); the mean-timer equation and the a1+a2+a3 ≠ 0
rule; integer coefficients from geometry and sides; an 18-wire macro-cell on
four staggered layers; 3.125 ns time unit; t0 output in whole BX; high and low
quality for four and three aligned hits; 200 MHz clock; seven macro-cells per
mini-chamber.

This design's own: the 5-4-5-4 cell split and half-cell staggering inside the
macro-cell; the neighbouring-wire rule that defines the 72 patterns; the
macro-cell overlap; TMAX, TOL and the acceptance window; page length, buffer
depth, late-hit tolerance and the two-page window; the TDC word and payload
formats; the layer-mask test for quality and the tie rule; four patterns per
cycle as the degree of parallelism.

Differences and omissions:

* The publication's super-layer processor also applies corrections for the
  non-uniform drift field. Their form is not given, so they are not included.
  Drift times follow a straight line from 0 to TMAX.
* The published implementation reports a latency below 500 ns without saying
  between which two events. This one takes 440 ns at 200 MHz from the end
  of a window to its payload header. Most of that time (63 cycles) goes to
  replaying the window's hits one per cycle.
* The front-end link receiver (GBT) and the test-stand data acquisition are not
  part of this RTL. The top takes decoded TDC words.
* Duplicate triggers from overlapping windows and overlapping macro-cells are
  passed on, not removed.

## How far it has been checked

Each block has a self-checking testbench in `tb/`, and every testbench ends by
printing `TB_RESULT checks=N failures=M`:

* `tb_mmt_equations` checks all 72 patterns, with random and track-like
  hits, against a reference (`tb_mmt_ref_pkg`). The reference solves the
  collinearity directly from wire coordinates and does not use the
  coefficient table. It also checks the table itself.
* `tb_mmt_sl_processor` builds simulated muons (four hits, three hits, noise,
  empty) and matches the brute-force reference on bin, vote count and
  quality. It requires at least 95% of clean four-hit muons to come out high
  quality within one BX of the true crossing. A wrong side combination
  occasionally outvotes the true one. It also checks the 23-cycle latency and
  overrun counting. A second processor with `LANES = 5`, whose last step is
  only partly used, must give identical results after 20 cycles.
* `tb_mmt_hit_collector` covers page filing, late, overflow and unknown-channel
  drops, the window contents and the orbit wrap.
* `tb_mmt_hit_driver` covers the channel-to-position map, shared wires and
  earliest-hit selection.
* `tb_mmt_histogram` covers counts, ties, empty windows and quality.
* `tb_mmt_synch` compares BX, orbit and page counters with the cycle count.
* `tb_mmt_payload_builder` compares word formats, flags and staggered
  arrival.
* `tb_mmt_top` runs the whole chain at its default size for 19,000 cycles,
  more than one orbit. It compares every payload word with the reference
  model fed with the generated hits and checks the header timing. It requires
  high- and low-quality triggers, empty windows, late, overflow and
  unknown-channel drops, shared macro-cell wires, repeated wires and a window
  across the orbit wrap to occur.
* `tb_mmt_top_160` runs the same stimulus and checks (`tb_mmt_top_env`)
  on the top at 160 MHz (`CLK_PER_BX = 4`), for 293 windows.

The reference model is an independent formulation of the same algorithm. It
shows that the RTL does what this README describes. It cannot show how close
that is to the published firmware, which was compared with its own C emulator.

## Simulating

With Verilator 5 (two-state; everything read is reset):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mmt_pkg.sv tb/tb_mmt_ref_pkg.sv tb/tb_mmt_top.sv --top-module tb_mmt_top
./obj_dir/Vtb_mmt_top
```

Replace `tb_mmt_top` with any other testbench name (`tb_mmt_top_160`,
`tb_mmt_histogram`, ...) to run it. Packages must
come first on the command line. Building the full top takes about half a
minute, and the simulation under a second.
