# Mark II secondary trigger processor in SystemVerilog

A solenoidal particle detector sees charged tracks, in the plane across the
beam, as circular arcs that start at the beam line. This processor decides,
within about 34 µs of a primary trigger, whether an event holds such tracks,
so that background can be thrown away before the data acquisition computer
sees it. It is a model in synthesizable SystemVerilog of the track-finding
processor described for the SLAC/LBL Mark II detector (1977): 12 data
channels, 24 curvature modules, three track counters, a master clock, a
trigger decision box, a test path and a raw-data display.

The central idea is to **turn the detector instead of searching it**. Every
detector layer is a ring of hit bits held in a recirculating shift register.
All rings are rotated together past a fixed pickoff point. A straight track
from the centre then shows up as hits on every layer *on the same clock*.
A curved track arrives on the outer layers a little later (or earlier). If
each layer's bit stream is delayed by the right amount, those hits line up
again. The delays, plus a *widening* of each hit that gives the search
tolerance, define a **road**. Each of the 24 curvature modules holds one
road, so one rotation tests every azimuth against 24 curvatures at once. A
programmable lookup table then decides whether enough layers are hit.

## Block diagram

```
 hits ─load─► 12 data shift registers ──► Test-Pickoff ──12 data lines──► 24 curvature modules
 (one per layer, recirculating)    ▲          │  ▲                      (widen, delay, 4K x 2 lookup)
                                   │ burped   │  │ test write / read         │ A   │ B   │ C
                                   │ shifts   │  └── command bus             ▼     ▼     ▼
 start ──► Master Clock ───────────┘          ▼                         track counter x 3
  (burp ROM, reset, run, gate, busy)       display ──► X, Y, Z          (merge, count, store)
                                                                              │ 2-bit groups
                                                                              ▼
                                                                   Trigger Control Box ──► accept / reenable
```

All modules run on one 10 MHz clock (`clk`). The "burped" clocks of the
data shift registers and the gated clock of the curvature modules are clock
enables.

## The burped clock: one angular speed for rings of different size

Layers have different numbers of elements: 252 on the outer drift chamber
layer, 216 on the next, 144 on the innermost, 96 on each endcap fan-blade
layer and 48 scintillation counters. For a straight track to give
coincident hits, every ring must turn through the same angle per clock.
The 252-element ring therefore shifts on every clock, and a ring of N
elements shifts on only N of every 252 clocks. The missing pulses are spread
as evenly as possible. The rule (`mk2_burp_prom`) is

    layer c shifts on main step s  <=>  floor((s+1)*N_c/252) != floor(s*N_c/252)

A 216-element ring thus shifts on 6 of every 7 clocks, and a 144-element
ring on 4 of every 7. After k clocks a ring of N elements has moved
floor(k*N/252) places. Its pickoff bit on scan clock k is therefore element
floor(k*N/252) mod N, which sits at azimuth about 2πk/252. The pattern is a
ROM computed at elaboration from `LAYER_LEN`.

A side effect is that a smaller ring shows each element for 252/N clocks,
with up to one clock of jitter against the 252-step frame. The wideners must
cover that jitter as well as the road width.

The curvature modules are not burped. Their delays are always counted in
the 252-step frame, as if every layer had 252 elements.

## One scan, clock by clock

`mk2_master_clock` runs this sequence for each primary trigger (`start`):

| phase | clocks | signals |
|---|---|---|
| RESET | 2 | `sys_reset`: clears wideners, VLSR counters, latches and counters |
| SCAN  | 341 | `run` (curvature modules clocked), `burp[11:0]` from the ROM |
| gate  | scan clocks 89..340 | `gate` (252 clocks, one revolution), `gate_first` on 89 |
| END   | 1 | `scan_end`: track counters close an open interval |
| HOLD  | 2 | track counter lookup, then the accept/reenable pulse |

`busy` covers all 346 clocks (34.6 µs) and blocks further triggers. The scan
is longer than one revolution (341 > 252) because a module output can come
up to 64 (delay) + 15 (widening) + a few (burp jitter, pipeline) clocks after
the data passed the pickoff. The gate is open for exactly one revolution, so
each azimuth is counted once. The gate start is a register (default 89 =
341 - 252). If it is set later, the scan is stretched to cover the gate.

Latency from ring to track counter: element a of the 252-ring is on the
pickoff during scan clock a. The Test-Pickoff registers it (1 clock), the
widener registers it (1), the VLSR delays it by D, and the module's output
register adds 1. The module output therefore reflects pickoff clock
k - 4 - D - m on scan clock k, where m = 0..width is the widening. A track
at azimuth a through a road of delay D is counted near gate clock
(a + 4 + D - 89) mod 252.

## Curvature module

`mk2_curvature_module` has 12 channels. Each channel is a widener followed
by a VLSR:

* **Widener** (`mk2_widener`): a hit holds the output high for `width`
  (0..15) further clocks. It uses a retriggerable down counter.
* **VLSR** (`mk2_vlsr`): a variable-length shift register of 1..64 clocks.
  It is built as the original was: a 64 x 1 RAM and an address counter
  whose period is the delay. On each clock the addressed cell is read into
  the output latch, then overwritten with the new bit. The same cell comes
  round again after D clocks. The RAM is not cleared. Its first D outputs
  after a reset are stale, which is why the gate opens late.

The 12 delayed bits address a 4096 x 2 **track logic memory** that the
computer loads. Any Boolean function of the 12 channels can thus classify
a clock as null, A, B or C, for example "5 of 6 axial layers" or "inner
layers plus all three endcap layers". The class drives three track outputs
(A, B, C) through a register. While the gate is open, the outputs also set
a sticky output latch (`led`), which drives the front-panel lamps and can
be read over the bus.

**Programming a road.** Suppose a track of some curvature crosses layer c at
azimuth a + δ_c, in 252-step units. Give channel c the delay D_c = D0 - δ_c.
The hits then coincide D0 + 4 clocks after azimuth a passes the pickoff. The
end-to-end test uses D_c = 20 for a straight road and
D_c = 20 + 2(5 - c) for tracks that advance 2 steps per layer. Delays must
stay within 1..64, which bounds the curvature one road can cover.

## Track counter: merging, boundary and counting

There is one `mk2_track_counter` per class. Its 32 inputs take the class
outputs of up to 32 modules (24 are used; the rest are tied low). Roads
overlap, so one track usually fires several modules on nearby clocks. The
counter merges them:

1. While the gate is open, the first clock on which any input fires opens
   an **anti-chatter interval** of `ac+1` clocks (1..16, programmable).
   Later firings do not extend it.
2. Inputs firing inside the interval are ORed into a 32-bit `fired` mask.
3. On the interval's last clock, one track word is written at address MAR
   of a 64 x 44 memory, and MAR (the 6-bit track count) is incremented.

Track word (`tc_word_t`):

| bits | field |
|---|---|
| 31:0 | modules that fired in the interval |
| 39:32 | gate clock (0..251) on which the interval opened: the track's azimuth |
| 40 | the interval opened on the first gate clock |
| 41 | the interval was still open when the gate closed (unterminated) |
| 43:42 | zero |

Two boundary cases need care, because the gate cuts the circle at one
azimuth:

* **Unterminated interval.** A track near the end of the revolution may
  still be inside its interval when the gate closes. At `scan_end` the open
  interval is closed, stored (bit 41 set) and counted, so the track is not
  lost.
* **Condition A.** Gate clock 251 and gate clock 0 are neighbouring
  azimuths. A track across that line is seen twice: once as an interval that
  opens on the first gate clock, and once as the unterminated interval at
  the end. When both happen, the counter sets Condition A and uses MAR - 1
  instead of MAR for the lookup below. The memory still holds both words.

One clock after `scan_end`, the corrected count addresses a 64 x 2 **trigger
logic memory**. Its output is the class's 2-bit `group`, an arbitrary
reduction of the count such as "0, 1, 2, 3 or more tracks", and `done`
pulses. MAR stops at 63. Further tracks set an overflow flag and are not
stored.

## Trigger decision

`mk2_trigger_control` looks up the three groups {C, B, A} in a 64 x 1 table
that the computer loads. One clock later it pulses `accept` (record the
event) or `reenable` (reset the detector front end and wait). Any rule on
the three groups is a table entry.

## Test path and display

* `mk2_test_pickoff` drives the backplane data lines from the ring outputs.
  It also lets the computer write a pattern serially into any ring, which
  shifts that ring one place per write (element 0 first), and read it back
  bit by bit. A whole event can thus be put in without the detector, and
  the ring registers themselves can be tested.
* `mk2_display` stores the 12 data lines on each of the first 252 scan clocks.
  It then draws them continuously as 12 concentric circles on an X-Y-Z
  scope. Channel c is drawn on radius 10 + 10c. The outputs are 8-bit X/Y
  codes centred on 128, and Z lights the beam for a hit. A frame is
  12 x 252 points at one point per clock.

## Performance on track-finding workloads

`tb_mk2_workload_tracks` sets up the full processor as a finder for the six
axial layers:

* 24 roads spread evenly over a range of curvatures;
* widening 4 on every channel;
* "at least 5 of 6 layers" as class A;
* an anti-chatter interval of 16.

The layer radius is taken as proportional to the layer's cell count. A
track of curvature parameter S, which is its azimuth shift at the outer
layer, then crosses layer c at phi0 + S*N_c/252. Road i uses delays
D_c = 32 - round(S_i*(N_c/252 - 0.778)). Azimuth is measured at a middle
reference radius (0.778 is the mean N_c/252). As a result, every road that
sees a track fires on about the same clock, and the overlapping roads merge
into one track. Without that reference, roads of different curvature fire
at times up to 30 clocks apart, and most tracks are counted twice.

Results, each event with one random noise point per layer:

| workload | result |
|---|---|
| 300 random tracks, curvature in [-30, 30] | 300 found, each counted exactly once (8 across the gate boundary, corrected by Condition A) |
| noise only, 1 / 2 / 4 / 8 points per layer | false track in 0 / 0 / 1 / 16 of 60 events |

These numbers rest on the assumed geometry. They show that the mechanism
works, and they do not reproduce a measured detector efficiency.

## Command bus

The original modules sit in a CAMAC crate system. Here that becomes one
broadcast command (`camac_cmd_t`: strobe, station N, subaddress A, function
F, 24-bit W) and a response (`camac_rsp_t`: R, Q, X). Only the addressed
module answers, and the top ORs the answers together. A command takes
effect on the clock edge that ends its strobe. Reads are combinational
within the strobe.

| station | module | commands |
|---|---|---|
| 1 | master clock | F16 A0 gate start; F0 A0 read it; F0 A1 {busy, scans done} |
| 2 | Test-Pickoff | F16 A0 select layer; F16 A1 insert bit W0; F16 A2 advance; F0 A1 selected bit; F0 A3 all 12 bits |
| 3 | trigger control | F16 A0 table pointer; F16 A1 write bit, pointer+1; F0 A1 read; F0 A2 {accepts, last decision, last groups} |
| 4, 5, 6 | track counters A, B, C | F16 A0 interval-1; F16 A1/A2 trigger logic pointer/data; F0 A3 {group, overflow, condA, MAR}; F16 A4 word pointer; F0 A4/A5 word bits 23:0 / 43:24 |
| 8 + i | curvature module i | F16 A0..A11 channel {delay-1 on W9..W4, width on W3..W0}; F16 A12/A13 logic memory pointer/data (auto-increment); F0 A13 read; F0 A14 latch; F9 A0 clear latch |

An insertion or advance in the Test-Pickoff shifts the ring one clock after
the command. A scan leaves every ring rotated by 341 x N/252 places. Each
event must therefore be loaded (or written through the Test-Pickoff) before
its primary trigger.

Assertions check two rules:

* only one module answers a command (`mk2_trigger_top`);
* the gate is closed when `scan_end` comes, and `gate_first` falls inside
  the gate (`mk2_track_counter`).

## Sizes and parameters

Defaults are those of the published system: 12 channels (`N_CH`), 24
curvature modules (`N_CM`), a 252-step revolution, a 341-clock scan, a
252-clock gate, 0..15 widening, a 1..64 VLSR, a 4K x 2 track logic memory,
32-input track counters with a 64 x 44 track memory, and a 64 x 2 trigger
logic memory. Sizes that were not published are this design's choices:

* **Layer sizes.** Channels 0-5 are the axial drift chamber layers, inner
  to outer: 144, 168, 192, 204, 216 and 252 elements. Only 144, 216 and
  252 are known. Channels 6-8 are endcap fan-blade layers of 96 elements
  each. Channel 9 is the 48 scintillation counters. Channels 10-11 are two
  inner stereo layers of 144 elements. Change `LAYER_LEN_DEF` in `mk2_pkg`
  or the `LAYER_LEN` parameter of the top. The burp ROM follows.
* **Timing around the scan.** Reset lasts 2 clocks and the hold 2 clocks,
  giving 346 clocks of busy. The published total is 34 µs; this design
  takes 34.6 µs. At a 1 kHz primary trigger rate that is 3.5 % dead time.
* **Encodings.** The class codes (1 = A, 2 = B, 3 = C) and the track word's
  four flag bits are this design's own. So are the fixed-length,
  non-extending anti-chatter interval, the interval's time being its
  opening clock, MAR saturation, and the bus subaddress map.
* **Decision box.** The Trigger Control Box is a plain lookup table. Only
  its function is published.
* **Display.** The display's storage, radii and codes are this design's.
  So are the one-register buffering of the backplane and the parallel load
  port of the rings (the detector readout that fills them is outside this
  design).

Not included: the detector front-end electronics, the computer and its
crate interface, the oscilloscope and its deflection amplifiers, the
crystal oscillator, and the clock and backplane cabling.

## Files

`rtl/`: `mk2_pkg` (types, sizes, the bus structs), `mk2_trigger_top`,
`mk2_master_clock` with `mk2_burp_prom`, `mk2_data_sr`, `mk2_test_pickoff`,
`mk2_curvature_module` with `mk2_widener` and `mk2_vlsr`,
`mk2_track_counter`, `mk2_trigger_control`, `mk2_display`.

`tb/`: one self-checking testbench per module, `tb_<module>`. Each prints
`TB_RESULT checks=N failures=M`. The testbenches compare against models
written independently of the RTL:

* `tb_mk2_trigger_top` runs the full-size design (default parameters) end
  to end. It programs 24 modules, 3 counters and the decision table over
  the bus, then runs six events:
  * a straight track with noise and a trigger during busy;
  * two curved tracks;
  * an endcap track;
  * noise only;
  * a track with a scintillator hit plus a track across the gate boundary;
  * an event written through the Test-Pickoff.

  A clock-level model predicts every stored track word, count, Condition A,
  group and decision, and the number of points the display lights. The
  test also checks that each mechanism occurred at least once.
* `tb_mk2_workload_tracks` runs the efficiency and noise workloads above
  (about 25 seconds).
* `tb_mk2_track_counter` adds interval lengths 1 to 16 and the 63-track
  overflow.
* `tb_mk2_curvature_module` checks random delays and widths against a
  widen-and-delay model.

## Simulating

With Verilator 5 (two-state; the testbenches initialise what they read):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/mk2_pkg.sv tb/tb_mk2_trigger_top.sv --top-module tb_mk2_trigger_top
./obj_dir/Vtb_mk2_trigger_top
```

Any other testbench builds the same way. `tb_mk2_trigger_top` takes about
20 seconds and `tb_mk2_workload_tracks` about 25; each of the others takes
a second or less. For lint only, run
`verilator --lint-only -Wall -Irtl -y rtl rtl/mk2_pkg.sv rtl/mk2_trigger_top.sv`.

## How far to trust it

* Every block passes its own testbench, and each testbench has been shown
  to fail on a deliberately broken copy of its block.
* The end-to-end model shares the burp formula and the latency figures
  above with the RTL. The formula is the published rule and the latencies
  follow from the register chain, but a misreading common to both would not
  show.
* The track-finding efficiency was simulated only with the assumed layer
  geometry above. The roads, road widths and lookup rules in the tests
  were chosen for the tests, not tuned for the real detector. The
  efficiency against the track's distance from the beam line was not
  simulated.
