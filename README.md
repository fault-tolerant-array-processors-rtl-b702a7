# Self-repairing mesh array with single-track switches

A mesh of processing elements (PEs) keeps working when PEs fail. Around an
N x M core sit a spare row above, a spare row below, a spare column on the
left and a spare column on the right. When a PE fails, the design does not
search for a new mapping of the whole array. It shifts the work of a single
straight line of PEs by one step towards the spare at the end of that line.
That line is called a *compensation path*. Between every two neighbouring PEs
there is a switch with only one track per channel, and each switch sets
itself from the state of its two neighbours. No central controller and no
global wiring is involved. The failed PE itself becomes a piece of wire.

This RTL implements the run-time side of the scheme published by Kung, Jean
and Chang, "Fault-Tolerant Array Processors Using Single-Track Switches":

* the switch fabric;
* the per-PE reconfiguration controller: retry of transient errors,
  declaration of permanent faults, choice of a path, a message wavefront
  that tells every PE about the new path, and reactivation of a recovered
  PE;
* the smaller variant with one spare row and one spare column.

The application PE itself is not part of it. Its link ports and control
signals are brought out of the top level.

## Compensation paths and the rules they must obey

Coordinates are (row x, column y). The physical frame has rows 0..N+1 and
columns 0..M+1 without the four corners. Logical PE (i,j), with 1 <= i <= N
and 1 <= j <= M, starts out at physical (i,j).

If PE (x,y) fails and chooses, for example, an east path, then:

* the logical indexes held by (x,y+1) .. (x,M+1) each move one column east;
* (x,y+1) now holds logical (x,y), ..., and the spare (x,M+1) holds (x,M);
* (x,y) holds nothing.

So every logical index ends up at most one step from home.

```
  before:  (x,y-1) [x,y] (x,y+1) (x,y+2) ... (x,M)  spare
  after:   (x,y-1)  XX   (x,y)   (x,y+1) ... (x,M-1) (x,M)
```

A set of such straight paths can be routed with one track per channel if two
rules hold:

1. **No intersection.** No PE lies on two paths. This includes a path that
   would run through a failed PE or end at a spare already in use.
2. **No near-miss.** An east path from (x1,y1) and a west path from (x2,y2)
   may not lie in neighbouring rows (|x1-x2| = 1) with y1 < y2, that is, side
   by side and overlapping. The same holds for a south and a north path in
   neighbouring columns.

`ftsw_pkg::path_conflict` checks both rules for two paths. It works on the
bounding boxes of the paths, plus the near-miss test.

## How a switch sets itself

Every PE has two *routing states*:

* the **VRS** describes its place on a vertical path;
* the **HRS** describes its place on a horizontal path.

| value | VRS meaning                        | HRS meaning                       |
|-------|------------------------------------|-----------------------------------|
| 0     | not on a vertical path             | not on a horizontal path          |
| 1     | healthy, on a south path           | healthy, on an east path          |
| 2     | failed, origin of a south path     | failed, origin of an east path    |
| 3     | failed, origin of a north path     | failed, origin of a west path     |
| 4     | healthy, on a north path           | healthy, on a west path           |

A switch between horizontal neighbours (SW2) has two W/E terminals facing
the PEs. Its N/S terminals continue a vertical channel to the next switch up
and down. It has four states:

* **a**: N-S (the channel passes the switch);
* **b**: W-E (the two PEs are linked directly);
* **c**: W-S and N-E;
* **d**: W-N and S-E.

Its state is a table lookup on (VRS of the west PE, VRS of the east PE):

```
           east: 0  1  2  3  4
  west 0:        b  c  c  d  d
  west 1:        d  b  d  -  -
  west 2:        d  c  a' a  -
  west 3:        c  -  a  a' d
  west 4:        c  -  -  c  b
```

The table can be understood as follows. A healthy PE with VRS 0, 1 or 4
holds logical row x, x-1 or x+1. The routing state of its neighbour tells
whether that logical row now sits above, level with, or below row x in the
neighbour's column. The west PE's link therefore leaves its switch through
E (state b), S (state c) or N (state d). If the west PE holds nothing, the
east PE's need decides the state. If neither holds anything, the channel
passes (state a).

Entries marked `-` need a south path and a north path that near-miss, so
they cannot occur. `switch_ctrl` reports them on `legal`, and the top level
ORs them into `route_illegal`. The two entries marked `a'` are two
neighbouring failed PEs whose paths run side by side in the same direction.
No link uses that switch, so it is simply set to a.

A switch between vertical neighbours (SW1) is the same element in a
transposed frame:

* its W/E terminals face the upper and lower PE;
* its N/S terminals continue the horizontal channel to the west and east;
* it is fed the HRS of the upper and lower PE.

As a result, horizontal links only ever use the vertical channel segments,
and vertical links only the horizontal ones.

A failed PE that is the origin of a path becomes a connecting element. It
joins its N and S terminals (vertical path) or its W and E terminals
(horizontal path). The link between the two logical neighbours on either
side of it then runs straight through it.

The testbenches check the result as a whole rather than switch by switch.
Every PE model drives its logical index on all four ports. After each
reconfiguration, every logical PE must receive exactly its four logical
neighbours.

## Run-time reconfiguration, step by step

Each physical PE has a `recon_cell`:

1. **Retry.** The PE's self-test reports one result per task (`chk_valid`,
   `chk_err`). A first error makes `retry_ctrl` request a retry. The PE and
   its four neighbours are held (`pe_hold`). If a retry passes, the fault
   was transient and nothing else happens.
2. **Declare.** After `MAX_RETRY` (default 10) failed retries in a row, the
   PE is declared faulty and goes dormant.
3. **Choose a path.** The cell picks the shortest direction that its
   *placement state* still allows; ties go N, S, W, E. If no direction is
   allowed, or the PE already carries someone else's path, `fail` is set and
   the whole array has failed (`array_failed`).
4. **Wavefront.** The cell sends the message (origin, direction) to its
   neighbours. Every cell applies each message once and passes it on. Each
   message link is a valid/ready pair, and a cell holds one message. A
   message reaches a PE at Manhattan distance d exactly d clocks after the
   origin applied it, which gives a diamond-shaped front. Each PE receives
   it only once because the spread follows a spanning tree: first along the
   origin's row, then up and down every column. For a failed spare in the
   top or bottom row the order is reversed.
5. **Apply.** Every cell updates its placement state. A cell on the new
   path:
   * checks that no other path already runs through it (otherwise the
     array fails);
   * takes its routing state from the table above, so the adjacent
     switches change;
   * takes over the logical index, and so the job, of its predecessor on
     the path (`take_job` pulse, `log_x`/`log_y`).
6. **Reactivate.** A dormant PE keeps testing itself. Its first clean test
   sends a cancellation message along the same tree. The path is dissolved,
   jobs are handed back (`give_job`), and the blocking it caused is
   removed.

**Placement state with counters** (`placement_state`). Each PE holds one
counter per direction. The counter for a direction is the number of live
paths that this PE's own path in that direction would cross or near-miss.
This includes any path through the PE itself. A creation message increments
the counters it affects, and a cancellation decrements them. A direction is
allowed while its counter is zero. Each counter can count up to 2(N+M),
one path per spare, which is the most that can exist at once.

**Failed spares.** A failed spare sends a zero-length path (direction
`DIR_NONE`). No path can then end on it. A spare that fails while in use
fails the array.

## The single-spare variant

`ft_array #(.SINGLE_SPARE(1))` builds the smaller frame:

* spares only in row N+1 and column M+1;
* row 0 and column 0 are empty sites;
* paths run only east or south, so only intersection has to be avoided.

Each PE then keeps two bits instead of counters (`src_placement`): H, a
horizontal path may still pass, and V, a vertical one may. A new east path
from (ox,oy) clears:

* both bits on the path itself (region A);
* H in the rest of its row (region B);
* V in the rows above it at columns >= oy (region C).

A south path does the same with rows and columns swapped. Cancellation sets
the cleared bits back. Two bits cannot remember that a second path also
blocks a direction, so after overlapping cancellations the state is
optimistic. This is why the main design uses counters. On a fault, a PE in
state HV takes the shorter of east and south (ties go south).

## Modules

```
ft_array                 top: frame, switches, message mesh
├─ recon_cell            one per PE site
│  ├─ retry_ctrl         transient / permanent / dormant / recovered
│  ├─ placement_state    4 counters (double-spare frame)
│  └─ src_placement      2 bits     (single-spare frame)
├─ switch_ctrl           switch table, one per switch
└─ st_switch             the switching element, one per switch
ftsw_pkg                 types, path geometry, path_conflict()
```

### Top level, `ft_array`

| parameter | default | meaning |
|-----------|---------|---------|
| `N`, `M` | 8, 8 | logical rows and columns (physical frame (N+2) x (M+2)) |
| `DW` | 8 | width of one track direction (8-bit data track) |
| `MAX_RETRY` | 10 | failed retries before a fault is declared permanent |
| `SINGLE_SPARE` | 0 | 1 selects the single spare row/column variant |

Per-site ports are arrays indexed `[row][column]`. Link ports add a terminal
index `P_N, P_S, P_W, P_E`.

* **Self-test:** `chk_valid`, `chk_err` in; `retry_req`, `dormant`,
  `pe_hold` out.
* **PE links:** `pe_out` in, `pe_in` out. The path from `pe_out` through
  the switches to `pe_in` is combinational.
* **Border:** `ext_in`/`ext_out` for terminals that face out of the array.
  At other terminals they are zero or ignored.
* **Status:** `faulty`, `on_path`, `log_valid`, `log_x`, `log_y`,
  `take_job`, `give_job`, `msg_seen`, `cell_fail`.
* **Array-wide:** `array_failed`, `route_illegal`.

Control is synchronous with an active-low synchronous reset. At reset no
paths exist and every direction is allowed.

### Timing

* A self-test error retries on the next clock.
* A permanent fault is declared with the `MAX_RETRY`-th failed retry.
* The faulty PE applies its own message 2 clocks after the declaration.
* A PE at Manhattan distance d applies the message d clocks later. This
  assumes no other message competes for the same cell. Concurrent messages
  from different faults queue, one per cell per clock.
* Routing states and switch settings change in the clock a cell applies the
  message. The logical links through the array are combinational.

## Where this departs from the published scheme

These parts are taken from the published scheme:

* the frame with double spare rows and columns;
* the switch and its four states;
* the routing states and the switch table;
* placement by straight compensation paths under the intersection and
  near-miss rules;
* four blocking counters per PE;
* retry before declaring, with suspended neighbours;
* the wavefront to every PE;
* the on-path check;
* job hand-over and reactivation;
* the 2-bit placement state machine of the single-spare example;
* the 8-bit track width and the 8 x 8 default size.

The following are this design's own choices:

* **Clocking.** The published array is self-timed with asynchronous
  handshakes. This RTL is synchronous, with valid/ready message links.
* **Message spread.** The spanning-tree order and the one-message buffer are
  this design's. The scheme only asks that the information spread like a
  wavefront.
* **Diagonal states.** Which diagonal pair is state c and which is d was
  fixed so that the switch table builds every link.
* **Switch table `x` entries.** Their reading ("no link uses this switch")
  and the handling of (2,2)/(3,3) are this design's.
* **HRS.** It is defined as the transposed VRS.
* **Blocking rule.** The counters' rule is taken complete from the two
  placement rules. The published description lists only examples.
* **Tie-breaking and the retry bound.** Tie order N, S, W, E. `MAX_RETRY =
  10` is read from a 10-clock average transient duration.
* **Failed spares** fence themselves off with a zero-length path.
* **Widths, reset and border ports.**

## Not included

* **The application PE.** Its datapath, local memory and the transfer of a
  job's data are application-specific. Only the hand-over pulses and the
  logical index are provided.
* **The on-line self-test circuit.** Its results enter through
  `chk_valid`/`chk_err`.
* **The centralized reconfiguration program.** This is the maximum
  independent set search over a "contradiction graph" of candidate paths,
  used at fabrication time and for switch, wire and connection faults. It
  runs on a host computer. Its result, a set of paths, is what this
  hardware builds at run time.
* **Partitioned arrays.** In these, neighbouring subarrays share a spare
  column. Run-time rules for a shared spare are not defined.
* **Faulty switches, wires and connections.** The array assumes switches and
  wiring are fault-free.

## Circuit note

The track network is made of bidirectional multiplexers: switches, and
failed PEs acting as wires. Lint and synthesis tools therefore report
circular combinational logic through the switch output arrays of
`ft_array`. The loops exist in the netlist, but no legal combination of
switch states closes one. With legal states every link is a simple path from
one PE to its logical neighbour. `route_illegal` flags the only
routing-state pairs that the table does not cover.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_st_switch` | every state, every terminal, random data, against a table of terminal pairs |
| `tb_switch_ctrl` | all 64 routing-state pairs against the derivation above (where each PE's link must go) |
| `tb_placement_state` | thousands of random path creations and cancellations; reference enumerates the PEs of every path |
| `tb_retry_ctrl` | transient, permanent, dormant and recovery sequences, and random results, against a reference state machine |
| `tb_recon_cell` | one cell with scripted neighbours: joining and leaving a path, own fault and recovery, blocked directions, array failure, arbitration of two messages, suspension, one-clock relay |
| `tb_src_placement` | regions A/B/C of east and south paths, the four states, path choice |
| `tb_ft_array` | whole 8 x 8 array at default parameters (see below) |
| `tb_reliability` | fault-injection experiment (see below) |

`tb_ft_array` covers:

* a transient fault;
* one permanent fault per path direction;
* exact wavefront timing;
* a recovery;
* a failed spare;
* two faults declared in the same clock;
* a final fault with no way out, which must fail the array.

After every step it checks that every logical index is placed once, next
to home, and that every logical link is routed.

`tb_reliability` injects permanent faults at random PEs until the array
fails. It runs 200 trials each at 4 x 4 and 8 x 8, and 4 x 4 for the
single-spare variant. A reference model of the placement rules predicts
survival and path direction for every fault, and routing is checked after
each one. The printed histogram of faults survived per trial is the
quantity behind the survival probability of i faults.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_ft_array \
  -y rtl -y tb +libext+.sv rtl/ftsw_pkg.sv tb/tb_ft_array.sv
./obj_dir/Vtb_ft_array
```

Substitute another testbench name for the others. The design resets every
register it reads, and the testbenches initialize their own state, so results
do not depend on the simulator's initial values. `tb_reliability` prints its
histograms. Building the full 8 x 8 array takes about two minutes; every
simulation then runs in seconds.
