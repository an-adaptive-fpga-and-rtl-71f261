# A self-routing reconfigurable fabric (HIDRA routing units over a molecule plane)

In an ordinary FPGA, a computer places and routes the design before the device
is configured, and the routing never changes after that. This fabric can
build its own connections while it runs. It has two planes:

* a **molecule plane**: small logic elements (a 16-bit LUT and a flip-flop)
  linked to their neighbours by switch boxes;
* a **routing plane**: one routing unit above every 2x2 group of
  molecules. The units connect a net's *source* molecule to its *target*
  molecules without any central controller, using the HIDRA algorithm
  (Hardware Incremental Distributed Routing Algorithm).

A molecule that wants a connection raises a request. The routing units then
pick one requester, find the partner with the same 16-bit identifier, run a
parallel Lee-style wave across the plane, and set their switchboxes along
the path they find. After that, the source molecule's value reaches the
target molecule through a chain of multiplexers, with no clock in the path.
New connections can be requested at any time, and paths already built are
never overwritten.

The design follows the published description of HIDRA and its variants for
the POEtic bio-inspired chip. Where that description is silent, the choices
made here are listed in [Departures and own choices](#departures-and-own-choices).

## The routing process

All routing units run the same sequence in lockstep, because every phase
change is visible to all of them on the *prop* (propagation) lines. One
process connects one target to its source:

| phase | cycles | what happens |
|---|---|---|
| election | 1 | Every unit that wants a connection drives `1` on its prop lines. The lowest requesting unit, and the leftmost one among equals, becomes **master**. |
| identifier | `ID_W` (16) | The master puts its identifier on the prop lines, one bit per cycle. Every unit asks its element to shift its own identifier (`el_id_shift`), and sources and targets compare bit by bit. The shared `trigger` line marks the last bit. |
| role | 1 | The master drives `1` if it is a source. If so, the other sources with the same identifier drop out. If it is a target, the other matching targets drop out. The participating source is the **root** of the wave. |
| expansion | e | A wave starts at the root (see below). Each unit it reaches stores its **origin**, the side the wave came from. |
| trace | 1 | The target, once reached, drives `1` on the prop lines to end the process. It also sends `1` towards its origin. Each reached unit passes that `1` on to its own origin, in the same cycle, until it reaches the source. On the clock edge, every unit on the path sets its multiplexer towards the next hop to select its origin. The target's element multiplexer selects its origin too. |

So a process takes **19 + e cycles**. Without obstacles, e is the Manhattan
distance for basic HIDRA (the larger of |dx| and |dy| with 8 neighbours) and
at most 2 for the line-search variants. The
routing-plane testbench checks these counts exactly.

While a process runs, each unit's `val_out` lines carry controller
signals, not the switchbox outputs. Data paths therefore pause during
routing and resume in the idle state.

If the wave cannot reach any partner, the trigger fires again after
`EXP_LIMIT` expansion cycles (default X·Y). The process is then dropped. The
master sets `failed`, which also raises the plane's `congestion` output, and
stops requesting until its element withdraws the request. The idea is that
a supervisor moves some components and tries again.

### Election with the prop lines

The prop lines form a combinational broadcast tree with no loops:

* a unit that drives sends on all four sides (prop lines are always the
  four cardinal ones, also with 8 neighbours);
* a `1` from the west goes north, south and east;
* a `1` from the east goes north, south and west;
* a `1` from the south goes north only;
* a `1` from the north goes south only.

Every unit receives the broadcast in the same cycle. A unit sees a `1` on
its south input when some unit in a lower row drives, and on its west input
when a unit further west in its own row drives. A requesting unit that sees
neither becomes master. The same lines carry the identifier and the role
bit, since only the master drives in those phases.

### Expansion: the four algorithms

Only the expansion differs between the variants. The `ALGO` parameter
selects one of them.

* **Sending rule (all variants).** A reached unit drives `1` towards
  neighbour *d* only if its multiplexer towards *d* is free, or is already
  configured to select the unit's own origin. For the source, that means
  selecting its element. The second case is an existing path of the same
  source, which may be re-used. Any other configured multiplexer blocks the
  wave. When several neighbours reach a unit in the same cycle, the origin
  is taken in the order N, E, S, W.
* **`ALG_HIDRA`** is a parallel Lee wave. A unit reached in cycle *t* sends
  in cycle *t+1*, so the wave advances one hop per cycle and finds a
  shortest free path.
* **`ALG_RC`** (reduced congestion) makes every unit already on a path of
  this source a starting point too. In the first expansion cycle, the root's
  `1` flows combinationally along the source's configured multiplexers, and
  every unit it passes sends in all allowed directions at once. A new target
  is therefore joined to the nearest point of the existing tree instead of
  to the source, which uses fewer multiplexers. In the testbench, a second
  target costs 4 multiplexers instead of 7.
* **`ALG_RT`** (reduced time) is a line search. A unit that is reached
  passes the wave straight through to the opposite side in the same cycle.
  One cycle therefore covers a whole row or column, and two cycles cover
  any point that one bend can reach. Paths are not always the shortest.
* **`ALG_RTC`** combines RC and RT: the source's tree starts lines in the
  first cycle.

### Switchbox and its configuration bits

With 4 neighbours, each routing unit has five multiplexers:

* four towards the neighbours, each choosing among the other three
  neighbours and the element;
* one towards the element, choosing among the four neighbours.

Each multiplexer has 3 bits: a *configured* flag, which marks it as part of
a path, and a 2-bit select. For the multiplexer towards side *d*, a select
of *d* itself means "the element". An unconfigured multiplexer outputs `0`.
Directions are numbered N=0, E=1, S=2, W=3 everywhere, and the opposite of
*d* is `d ^ 2`.

### Eight neighbours

With `NB = 8` every unit also links to its four diagonal neighbours. The
same modules are used, only wider:

* `val` lines and the expansion order are N, NE, E, SE, S, SW, W, NW
  (indices 0 to 7), and the opposite of *d* is `(d + 4) mod 8`;
* the origin and every select have 3 bits, so the switchbox holds
  9 multiplexers of 4 bits, 36 bits in all;
* the prop lines, and with them the election, are unchanged.

A diagonal step counts as one hop, so paths get shorter: a target 4 units
up and 4 units right is reached in 4 expansion cycles instead of 8. Only the
cardinal `val` lines cross the plane border; the diagonal ones of border
units are left unconnected.

## The molecule plane

A molecule (`poetic_molecule`) has 8 switch-box input lines and 8 output
lines, two per side. Line index is `2*dir + line`.

* Each output multiplexer picks one of 8 sources, with selects 0–5 for the
  six lines of the other three sides in N, E, S, W order, 6 for the
  molecule output, and 7 for `0`.
* Four multiplexers pick the LUT inputs from the 8 input lines.

| mode | behaviour |
|---|---|
| `MOL_LUT4` | output = `lut[{i3,i2,i1,i0}]`, combinational or registered (`seq`) |
| `MOL_SHIFT` | 16-bit shift register, serial in `i0`, out `lut[15]` |
| `MOL_ROUTE_OUT` | net source: `i0` goes into the routing plane; the LUT holds the net identifier |
| `MOL_ROUTE_IN` | net target: the output is the value from the routing plane; the LUT holds the identifier of the wanted source |

In the two route modes, the LUT works as a rotating 16-bit shift register
read MSB first. After the 16 shifts of a process, it holds the identifier
again. The `init` bit decides whether the molecule starts a connection or
only waits to be found.

The `hidra_interface` of each routing unit serves the first molecule of its
2x2 group, in order (x,y), (x+1,y), (x,y+1), (x+1,y+1), that is in a route
mode.

**Configuration.** All molecules form one serial chain. Chain position
`my*2X + mx` starts from the south-west corner. Each word is a `mol_cfg_t`
of 57 bits (see `hidra_pkg`), shifted MSB first with `cfg_en` high. The word
of the last molecule goes in first. While `cfg_en` is high, no molecule
raises a request. During reset, switch-box and `val_out` outputs are held at
`0`, so a random power-up state cannot oscillate through the neighbours.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `X`, `Y` | 20, 20 | routing units; the molecule grid is 2X by 2Y |
| `ALGO` | `ALG_HIDRA` | expansion variant: `ALG_HIDRA`, `ALG_RC`, `ALG_RT`, `ALG_RTC` |
| `NB` | 4 | neighbours per routing unit: 4 or 8 |
| `ID_W` | 16 | identifier length, which sets the trigger period |
| `EXP_LIMIT` | `X*Y` | expansion time-out in cycles |

## Modules

Each file in `rtl/` holds one unit:

* `hidra_pkg`: directions, enums, the configuration structs and helpers.
* `hidra_prop_unit`, `hidra_serial_cmp`, `hidra_switchbox`: the parts of
  a routing unit.
* `hidra_controller`: the state machine and expansion logic, holding the
  switchbox configuration bits (15, or 36 with 8 neighbours).
* `hidra_routing_unit`: controller, switchbox and `val_out` multiplexers.
* `hidra_trigger`: the shared trigger line.
* `hidra_routing_plane`: the array, with its border lines brought out for
  tiling.
* `poetic_molecule`: the logic element.
* `hidra_interface`: connects a routing unit to its four molecules.
* `poetic_fabric`: the top.

The two planes contain combinational structures that pass through
neighbours: data paths, the one-cycle traceback and the RT lines. Tools
report these as circular logic. They are structural only, because a
configured path never closes a cycle. The loops through LUTs in the
molecule plane are real only if the user configures a ring.

## Simulating

Every testbench in `tb/` checks its results itself. Each ends by printing
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing -Wno-fatal -Wno-UNOPTFLAT -y rtl -y tb rtl/hidra_pkg.sv \
    tb/tb_hidra_routing_plane.sv --top-module tb_hidra_routing_plane -o sim
./obj_dir/sim
```

* `tb_hidra_routing_plane` is the main functional test. Four 6x6 planes,
  one per algorithm, get the same scenarios. It checks:
  * target-started and source-started nets;
  * a decoy with a one-bit-different identifier;
  * a duplicate source dropping out;
  * two simultaneous requests served bottom-left first;
  * path re-use (multiplexer counts);
  * data through the paths;
  * the time-out.

  It also checks the exact cycle count of each process.
* `tb_poetic_fabric` is the end-to-end test at 4x4 routing units. It loads
  the chain and lets three nets route themselves (one of them cannot be
  routed and times out). Data then runs from a fabric edge through a LUT4
  inverter, a source molecule, the routing plane and a target molecule to
  another edge.
* `tb_hidra_routing_plane_n8` compares a 4-neighbour plane with 8-neighbour
  HIDRA and HIDRA-RC planes (6x6). It checks the diagonal shortcut
  (e = 4 instead of 8), joining an existing tree (e = 2 with RC), the
  multiplexer counts, data and the time-out.
* `tb_hidra_plane_workload` routes 25 random nets with 3 targets each on
  two 20x20 planes: one with all defaults and one with 8 neighbours and
  HIDRA-RC. It checks that every request ends connected or timed out, that
  each connected target receives its own source's data, and that the
  8-neighbour RC plane fails no more often. With the built-in placement, 69
  of 75 paths are routed with 4 neighbours and all 75 with 8. Building the
  8-neighbour model takes Verilator about ten minutes.
* Block tests cover the controller (including the RT line and blocking by
  an existing path), the routing unit, the molecule (chain, LUT, switch box,
  shift, route modes), the interface, the comparator, the trigger, the
  switchbox and the prop unit.

The simulator must start from a defined state, so the testbenches assert
`rst_n` from time 0.

The largest sizes simulated are the 4x4 fabric (8x8 molecules) end to end
and the 20x20 routing plane on its own. The default 20x20 fabric builds, but a Verilator
model of it takes about ten minutes to compile, and its full test (a
91,200-bit configuration load followed by routing) did not finish within
five minutes of simulation, so no testbench runs it at that size.

## Departures and own choices

* **Neighbourhoods 4 and 8 are built, 3 and 6 are not.** Triangular and
  hexagonal grids need a different plane layout and prop tree, which are
  not described. The 8-neighbour version (HIDRA-RC with 8 neighbours is
  the recommended choice for a new chip) leaves the diagonal border lines
  unconnected, although the published pin count includes them. Its
  expansion order among the diagonals is this design's choice.
* **The controller has 5 states, not 6,** because the election shares the
  idle cycle. It has three flip-flops beyond the documented five:
  reached, root and failed. Register and transistor counts therefore do
  not match the published area figures.
* **Congestion detection uses the trigger as a time-out.** The original
  only says that a flag reports that no path was found. The master's sticky
  `failed` flag and its no-retry rule are also this design's own choices.
* **The traceback is combinational**, finishing in one cycle. This matches
  the single path-creation cycle in the published latency of 19 cycles.
* **Some forwarding and selection rules are own choices:**
  * the prop forwarding rules for a `1` from the east and from the north;
  * in the RT variant, the line continues only opposite the
    priority-selected origin;
  * an unconfigured multiplexer outputs `0`;
  * the interface serves the lowest-index molecule in a route mode.
* **The molecule is simplified.** The two-3-LUT mode, the mode in which a
  molecule reconfigures other molecules, and the remaining unnamed modes
  are not modelled. The switch-box input order, the LUT-input multiplexers,
  using `i0` as the routed value and the serial configuration format are
  all own choices.
* **Paths are never removed** except by reset. No disconnect mechanism is
  described.
* **The on-chip 32-bit processor is not included.** Its parallel access to
  the fabric is not described.
