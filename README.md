# Collaborative Routing Architecture (CRA) — FPGA routing fabric in SystemVerilog

An island-style FPGA routes signals through three kinds of separate parts:
wire segments, connection boxes (wires to logic-block pins) and switch
boxes (turns between wires). Their sizes are fixed at design time, so a
circuit that needs many straight wires but few turns leaves switch boxes
idle while it runs out of connection-box and channel capacity.

The Collaborative Routing Architecture merges these parts into one
**routing module** per tile, wrapped around the tile's logic block. A
routing module has two parts:

* **Bypass interconnects.** These are short, fast wires that cross the
  module along both axes. Each has one tri-state buffer per direction. A
  long wire is a chain of bypasses through neighbouring modules, with no
  switching point on it.
* **A switching core.** It is built from multiplexers and does the work
  of both the switch box and the connection box. The same MUX can serve a
  turn for one mapping and a logic-block output for another. Because MUX
  outputs feed other MUXes, the core can also chain MUXes. This lets it
  reach track pairs that have no direct switching point, at some extra
  delay. The source calls this the *dynamic switching matrix* and the
  chained routes *extended switching paths*.

This repository holds synthesizable RTL for the routing fabric: the
switching core, bypass interconnects, configuration memory, routing
module, shared inter-tile wires and an array top level. The logic block
is not included (see *What is not here*).

## Sizes

| name | meaning | default | origin |
|---|---|---|---|
| `W` | tracks per side of a switching core (switching width) | 72 | published configuration |
| `D` | switching density: core lines each incoming signal can turn onto directly | 3 | published configuration |
| `NI`, `NO` | logic-block inputs and outputs | 16, 4 | published configuration |
| `NX`, `NY` | tiles in the array | 4 × 4 | this design's choice |

At the defaults one tile has 288 MUXes with 4 inputs each, 288 pass switches,
288 bypass buffers and 1440 configuration bits:

* The core's switches: 288 × 4 MUX inputs + 288 pass switches = 1440.
* The core's bits: 288 × 3 select bits + 288 pass bits = 1152.
* The bypass bits: 288.

These counts match the published per-tile resource counts.

## Geometry and naming

Sides are numbered N = 0, E = 1, S = 2, W = 3 (`cra_pkg::side_e`). Track `t` on
the E and W sides is a horizontal track; on the N and S sides it is a vertical
track.

Each track on a tile edge is **one wire shared by both neighbours**
(`cra_wire_node`). Up to four drivers can drive it:

* the switching core of each neighbour, through a pass switch;
* the bypass buffer of each neighbour.

At the array edge, an external I/O driver takes the place of the missing
neighbour. In `cra_fabric`:

* horizontal wire `h(x, y, t)` lies between column `x-1` and column `x`,
  for `x = 0..NX`;
* vertical wire `v(x, y, t)` lies between row `y-1` and row `y`.

Tile `(x, y)` has index `k = y*NX + x`.

Tri-state logic is modelled with two values. A driver is a `drive_t`
(`en`, `val`). A wire carries the OR of its enabled drivers and reads 0 when
nothing drives it. `conflict` goes high when any wire has two or more enabled
drivers. That can only happen with an invalid configuration, or when an
external driver fights the fabric.

## The switching core (`cra_switching_core`)

This is the part worth reading slowly.

At each track position `(s, t)` the core has three things:

1. **A core line.** It starts at the edge of side `s` and runs across the
   core.
2. **A MUX (`cra_core_mux`).** Its output *is* that core line. It has `D`
   switching inputs taken from core lines of the two perpendicular sides,
   plus one logic-block output.
3. **A pass switch.** It joins the core line to the shared wire outside.

The line's value is:

```
line(s,t) = MUX output        if the MUX is enabled
          = outside wire      else if the pass switch is on
          = 0                 otherwise
```

The core drives the outside wire only when both the MUX and the pass switch
are on.

An incoming signal takes this path:

1. It enters through a pass switch onto its line.
2. A MUX on a perpendicular side selects that line. This is the turn.
3. The signal leaves through that MUX's pass switch.

If the second MUX's pass switch is off, its line stays inside the core.
Another MUX can then pick it up, which forms an extended path.

### MUX input wiring

For each side `s`, call its two perpendicular sides `A(s)` and `B(s)`:

| side `s` | `A(s)` | `B(s)` |
|---|---|---|
| N | W | E |
| S | E | W |
| E | N | S |
| W | S | N |

Input `k` of the MUX at `(s, t)` reads:

| input `k` | reads core line |
|---|---|
| 0 | `(A(s), t)` |
| 1 | `(B(s), t)` |
| 2 | `(B(s), t+1)` |
| 2j, j ≥ 2 | `(B(s), t+j)` |
| 2j+1, j ≥ 1 | `(A(s), t-j)` |

An input whose track falls outside `0..W-1` is tied to 0. The rows from
`k = 3` on apply only when `D > 3`; they are this design's own extension.

With `D = 3` every interior core line feeds exactly three MUXes, and every
MUX reads three lines. Counting turns in both directions, horizontal
track `r` and vertical track `c` share a direct switching point when
`|r − c| ≤ 1`. In a 3-track core that is 7 of the 9 track pairs. The two corner pairs, `(0, 2)` and `(2, 0)`, need an
extended path through three MUXes. An example:

```
west track 2 ─► N MUX 2 (input 0) ─► W MUX 1 (input 2) ─► S MUX 0 (input 2) ─► south track 0
```

The N2 and W1 lines stay inside the core because their pass switches are
off. `tb_cra_switching_core` and `tb_cra_fabric` both route exactly this
path.

`tb_cra_switching_matrix` checks this capability on a 3-track core. It
works without the wiring table:

1. It discovers each MUX input's source by probing, with one MUX enabled
   at a time.
2. It searches for direct and three-MUX paths between every horizontal
   and vertical track.
3. It simulates each path it finds.

The result is 7 direct switching points forming the band, and all 9
pairs once extended paths are used.

**The wiring is directional in track number.** A turn keeps the track
number or lowers it by one:

* horizontal `r` can turn onto vertical `r` or `r−1`;
* vertical `c` can turn onto horizontal `c` or `c−1`.

Chains of MUXes therefore reach any lower track, but never a higher one.
For example, the corner pair is reached from vertical track 2 to
horizontal track 0, not from horizontal 0 to vertical 2. A router has to
plan for this, for example by turning in a neighbouring tile.

### Structural loops

Because MUX outputs are MUX inputs, the core contains structural
combinational loops, and so do the tile-to-tile wires. This is true of any
programmable interconnect. Lint tools report it, Verilator as `UNOPTFLAT`.

A loop becomes real only if a configuration closes a ring of enabled
drivers, and such a configuration is invalid. A simulator may then fail to
converge, so avoid such configurations in tests. Keeping `route_en` low
until a configuration is complete rules out accidental rings (see below). Synthesis of this RTL
into a real FPGA fabric would need the usual loop-breaking timing
constraints.

### MUX select codes (`cra_core_mux`)

With `SW = clog2(D+2)` bits there are `D + 2` meaningful patterns; for
`D = 3` that is 3 bits and 5 patterns:

| code | meaning |
|---|---|
| 0 | high-Z (not driving) |
| 1 … D | switching input `code − 1` |
| D+1 | logic-block output |
| others | high-Z |

Code 0 means high-Z, so a cleared configuration drives nothing anywhere.

### Logic-block pins

Pins are dealt round-robin over the tracks of every side. Pin
`p = t mod (NI + NO)`:

* Pins `0 … NO−1` are the outputs.
* Pins `NO … NO+NI−1` are the inputs.

**Outputs.** Every MUX has a logic-block output as its last input. The
MUX at track `t` takes output `t mod NO`.

**Inputs.** Logic-block input `j` can read the core lines of tracks
`m*(NI+NO) + NO + j` on every side, for tap `m = 0 … TPS−1`, where
`TPS = ceil(W/(NI+NO))`. At the defaults `TPS = 4`. The routing module
gives the logic block all of these candidate lines on `lb_in_cand[j]`,
with index `s*TPS + m`. Choosing among them is left to the logic block. A
tap whose track does not exist reads 0.

The signal reaches such a line in one of two ways:

* from outside, through the pass switch of that track (for example a
  bypass wire from a neighbouring tile);
* from another MUX of the same core.

## Bypass interconnects (`cra_bypass`)

Per track there is one buffer for each direction, each with its own bit:

| bit | direction | drives side | from side |
|---|---|---|---|
| `0*W+t` | west → east | E | W |
| `1*W+t` | east → west | W | E |
| `2*W+t` | south → north | N | S |
| `3*W+t` | north → south | S | N |

A chain of west → east bits in a row of tiles gives one long wire. Only the
two ends enter a switching core.

## Configuration (`cra_config_chain`, `cra_routing_module`, `cra_fabric`)

Each tile's bits form a shift register. While `cfg_shift` is high, each
rising edge of `clk` shifts every tile's bits one place down. Bit 0 is sent
first.

Bit layout inside a tile (`cra_pkg::cfg_*_bit`), with `SW` bits per select
field:

| bits | contents |
|---|---|
| `[0, 4·W·SW)` | MUX select of `(s, t)` at `(s*W + t)*SW`, LSB first |
| `[4·W·SW, 4·W·(SW+1))` | pass switch of `(s, t)` at offset `s*W + t` |
| `[4·W·(SW+1), 4·W·(SW+2))` | bypass buffer at offset `dir*W + t` |

The tiles are chained: tile `k` holds bits `[k*NCFG +: NCFG]` of the
array's configuration vector. `cfg_in` enters at the last tile, and
`cfg_out` leaves from tile 0.

Loading the array takes exactly `NX*NY*NCFG` cycles: 23 040 at the
defaults. Shifting the same number again reads the configuration back out
on `cfg_out`.

`rst_n` (asynchronous, active low) clears every bit, which leaves the
fabric fully undriven. Routing paths are combinational. Only configuration
is clocked.

`route_en` is a global routing enable, and this design adds it. While it
is low, each tile masks its stored configuration, so every MUX, pass
switch and bypass buffer is off. This is what an FPGA does while it is
being configured. Hold it low from power-up until the last bit is loaded,
and also while reading back. Without it, flip-flops that power up with
arbitrary contents, or a half-shifted configuration, could close a ring
of drivers. A simulator with random initial state then fails to settle
before the first reset.

## Files

| file | content |
|---|---|
| `rtl/cra_pkg.sv` | default sizes, `side_e`, `drive_t`, wiring rules and bit layout as functions |
| `rtl/cra_core_mux.sv` | (D+1)-input MUX with high-Z pattern |
| `rtl/cra_switching_core.sv` | 4W MUXes, 4W pass switches, logic-block taps |
| `rtl/cra_bypass.sv` | 4W bypass buffers |
| `rtl/cra_config_chain.sv` | one tile's configuration shift register |
| `rtl/cra_routing_module.sv` | core + bypass + configuration of one tile |
| `rtl/cra_wire_node.sv` | shared inter-tile wire, driver resolution and conflict flag |
| `rtl/cra_fabric.sv` | top: NX × NY array, edge I/O, logic-block pins as ports |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_cra_switching_matrix` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Each has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/cra_pkg.sv tb/tb_cra_fabric.sv --top-module tb_cra_fabric
./obj_dir/Vtb_cra_fabric
```

`tb_cra_fabric` runs the whole array at its default size: 4 × 4 tiles,
W = 72. On a typical workstation Verilator takes a few minutes to build it,
and the run takes about 20 seconds. The run does the following:

1. Loads the configuration with `route_en` low and checks the cycle
   count. It then checks that nothing is routed until `route_en` rises.
2. Drives every routing mechanism with 0 and with 1: long bypass wires
   running east, west and south, a single turn, the three-MUX extended path, a logic-block output onto
   the fabric, an edge wire into a logic-block input, a bypass into a
   neighbour's logic-block input, and undriven wires.
3. Provokes a driver conflict.
4. Reads the configuration back, with `route_en` low again.

It counts each mechanism and fails if one never happened.

`tb_cra_switching_core` also compares 300 random loop-free configurations
against a reference model written inside the testbench.
`tb_cra_switching_matrix` maps the switching capability of a 3 × 3 core
(see above).

To change sizes, override the parameters of `cra_fabric`. `W`, `D`, `NI`
and `NO` propagate to every module; `TPS` and `NCFG` are derived.

## How far to trust it, and where it departs from the source

* **Follows the source.** The following are all as published:
  * the split of each tile into bypass interconnects and switching core;
  * one tri-state buffer and one bit per bypass direction;
  * each MUX having `d+1` inputs with the last from the logic block;
  * `d + 2` select patterns, one of them high-Z;
  * a pass switch per track position;
  * shared edge wires between modules;
  * the band of direct switching points and its extension by chaining
    MUXes;
  * all default sizes except the array;
  * the per-tile resource counts.
* **This design's own choices.** The source does not state the following:
  * the exact MUX-input wiring (chosen to reproduce the published
    switching-point pattern and example paths);
  * the select encoding;
  * the pin-to-track assignment;
  * serial configuration with an asynchronous clear, and its bit order;
  * the array size;
  * external drivers at the array edge;
  * the driver-conflict flag;
  * the global routing enable `route_en`.
* **Output pins.** The source says both that every MUX has a logic-block
  output input and that each pin reaches about `W/(NI+NO)` MUXes per side.
  This design follows the first statement.
* **Input pins.** Input pins expose candidate lines rather than a chosen
  line, because the selection logic belongs to the logic block.
* **Timing and area.** Timing, transistor sizing and area are analog
  properties and are not modelled. The RTL is zero-delay. The source's
  claims about delay and minimum channel width concern routing software
  and circuit results, which are outside this RTL.
* **Capacity.** At the default 4 × 4 array, channel width is ample for
  the benchmark circuits the source evaluates: they need 12–22 tracks and
  the fabric has 72. Logic capacity is not. Those circuits need a few
  hundred to over a thousand 4-output logic blocks, so a real fabric would
  set `NX` and `NY` to 20 or more.

## What is not here

The **logic block** is not included. It is a Virtex-II style block with 16
inputs and 4 outputs, reused unchanged from a baseline FPGA. Its logic,
its input selection and its own configuration bits (1049 per tile) are
not specified. `cra_fabric` brings its pins out as ports: `lb_out` in and
`lb_in_cand` out. The **routing software**, which chooses bypass versus
core paths and finds extended paths, is also outside this RTL.
