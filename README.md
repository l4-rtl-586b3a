# L4 maze-routing accelerator (SystemVerilog)

Detailed routing of an integrated circuit is often done with Lee's maze
router. Lee's router works on a three-dimensional grid of gridpoints, (x, y)
across the die and z for the metal layer. It connects two terminals in three
phases:

1. **Expansion.** A wavefront grows breadth-first from the source. Each
   gridpoint it reaches records the direction the wave came from.
2. **Backtrace.** From the target, the router follows the recorded
   directions back to the source. The gridpoints it passes become the wire.
3. **Cleanup.** All wavefront labels are erased.

In software, expansion costs O(L·d²) for a connection of length d on L
layers, and cleanup touches every gridpoint. This design does the work in
hardware. A two-dimensional array of small processing elements (PEs) has one
PE per (x, y) position. Each PE stores the state of its gridpoint on every
layer and steps through the layers one per clock. Every PE therefore works
on the same layer in the same cycle, and neighbouring PEs can pass the
wavefront between them. One expansion step over all layers takes L clocks,
so expansion costs O(L·d). Cleanup takes L clocks.

On top of plain Lee routing, the accelerator supports:
- **multi-terminal nets.** A partial net is labelled TRACED and used as the
  source of the next expansion.
- **etching,** which helps rip-up and reroute. When the wavefront is stuck,
  one expansion step may pass through existing wires. The wire points it
  cuts are reported, and the host knows which nets to rip up. Fixed
  obstacles and terminals can be marked UNETCHABLE.

The default configuration is a 32 × 32 grid with 16 layers and etching
enabled.

```
 command words ──► ┌──────────────┐ rs1,rs2 ┌─────────┐ row_sel
  (32 bit)         │              ├────────►│ row dec ├──────────┐
                   │   control    │ cs1,cs2 ┌─────────┐ col_sel  ▼
 result words ◄─── │     unit     ├────────►│ col dec ├────► ┌──────────┐
  (32 bit)         │ (+ cycle     │ CMD, STATE_IN, ETCH_EN,  │ PE array │
                   │   counter)   ├─────────────────────────►│ GX × GY  │
                   │              │◄─────────────────────────┤          │
                   └──────────────┘  STATUS (AND of all PEs) └──────────┘
```

## Gridpoint states

Each gridpoint holds a 4-bit state and an ETCHED bit (`l4_pkg::cell_t`):

| state | code | meaning |
|---|---|---|
| EMPTY | F | free |
| BLOCKED | 0 | obstacle or routed wire; etching may pass through it |
| UNETCHABLE | 8 | obstacle that etching may not pass (terminals, fixed blockages) |
| XE, XW, XN, XS, XU, XD | 1–6 | reached by the current expansion from the east, west, north, south, layer above or layer below |
| TRACED | 7 | part of the partial connection of the current multi-terminal net; acts as a wave source |

ETCHED is set when an expansion enters a BLOCKED point. EMPTY is all ones, so
the AND of many states is EMPTY only if every one of them is EMPTY. A region
READ is therefore a "line probe": it tells the host whether a box is free.

The conventions are: east is x+1, north is y+1 and up is z+1.

## The processing element and its layer timing

`l4_pe` keeps its LAYERS gridpoint states in a ring of registers. Cell 0 is
the gridpoint being processed this cycle (CS). Its next state (NS) enters at
the top of the ring, and the ring rotates every clock. Every PE starts at
layer 0 after reset, so all PEs are always on the same layer.

The control unit keeps a copy of the layer counter. Each broadcast command
therefore applies to one layer that the control unit knows. The
`layer_first` and `layer_last` flags are broadcast with each command. They
tell the PE when it is at the bottom or top of the layer stack.

The PE commands (`pe_cmd_e`) are:

| command | effect on the current layer |
|---|---|
| READ | A selected PE (row select AND column select) drives its state on STATE_OUT. Every other PE drives all ones. |
| WRITE | A selected PE takes STATE_IN. ETCHED is cleared. |
| CLEARX | An expanded point becomes EMPTY, or BLOCKED if ETCHED is set. |
| CLEART | A TRACED point becomes BLOCKED. This is the final cleanup of a multi-terminal net. |
| EXPAND | An EMPTY point (or, with etch enable, a BLOCKED point) whose neighbour is expanded or TRACED takes XE, XW, XN, XS, XU or XD. The first neighbour in that order wins. |

During EXPAND, two bits of STATE_OUT report status. Bit 0 is low if a
selected PE (the target) is expanded. Bit 1 is low if any PE entered an
expanded state this cycle. The array ANDs STATE_OUT over all PEs and
registers the result.

### Why one sweep is exactly one wavefront step

A gridpoint must not be reached through a neighbour that was itself reached
earlier in the same sweep. Otherwise a via stack could be crossed in one
step and paths would no longer be shortest. The neighbour flags are chosen
so that this cannot happen:
- The east, west, north and south neighbours are the same layer in other
  PEs. They all change at the same clock edge, so each PE sees its
  neighbours' old states.
- The "up" neighbour is ring cell 1. That layer has not been processed yet
  in this sweep.
- The "down" neighbour comes from a one-bit register. It holds the expanded
  flag of the layer processed one cycle earlier, taken before that layer
  was updated.

Each sweep starts at layer 0. Sweep k therefore labels exactly the points at
distance k.

## The control unit: how a route runs

`l4_control_unit` accepts 32-bit command words and emits 32-bit result
words. Both streams use a valid/ready handshake.

Command word layout (`cmd_word_t`): `op[31:28]`, `a[27:14]`, `b[13:0]`. A
point is `{x[4:0], y[4:0], z[3:0]}`.

| op | command | action |
|---|---|---|
| 2 | SELECT a b | Stores a box. The corners may be given in any order. |
| 4 | WRITE | Writes state `b[3:0]` to every point of the box, one layer rotation. No reply. |
| 3 | READ | Replies `RS_READ` with the AND of all states in the box in bits 4:0. |
| 1 | ROUTE a b | Routes a two-terminal connection. The path becomes BLOCKED. |
| 5 | ROUTE_EXTEND_INIT a b | Like ROUTE, but the path stays TRACED. Use it for the first two terminals of a net. |
| 6 | ROUTE_EXTEND b | Connects terminal b to the TRACED partial net. |

Result word layout (`result_word_t`): `kind[31:28]`, `a[27:14]`, `b[13:0]`.

| kind | word | contents |
|---|---|---|
| 1 | SEGMENT | one straight wire segment from a to b |
| 2 | ETCH | etched point a |
| 3 | DONE | route completed; bits 27:0 = cycles spent on the command |
| 4 | FAIL | route refused; bits 27:0 = cycles spent on the command |
| 5 | READ | AND of the states read, in bits 4:0 |

A route goes through these steps:

1. **Finish the previous net** (ROUTE and ROUTE_EXTEND_INIT only). One CLEART
   rotation turns any TRACED net left from earlier into BLOCKED. No separate
   "net finished" command exists: the next net finishes the previous one.
2. **Prepare the terminals.** The unit writes the source as TRACED, so it
   starts the wave. It writes the target as EMPTY, so the wave can enter it.
   (ROUTE_EXTEND skips the source write; the TRACED net is the source.)
   The target stays selected by the decoders while the wave grows.
3. **Expansion.** EXPAND sweeps run back to back, each covering layers
   0 … L-1.
   - The status of a sweep is evaluated when the status of its last layer
     comes back, two clocks later. By then layer 0 of the next sweep has
     already been issued. This is harmless: after a hit it only expands
     points that CLEARX removes, and after a sweep with no progress it
     changes nothing.
   - Target reached: go to the backtrace.
   - No point entered (the wave is stuck):
     - If ETCHING=1, the next sweep runs with etch enable, for that one
       sweep only. Normal sweeps then continue.
     - If an etching sweep also makes no progress, or ETCHING=0, the route
       is refused (FAIL).
4. **Backtrace.** For each point the unit selects the point's PE, READs it
   on its layer and WRITEs it BLOCKED (TRACED for the multi-terminal
   commands). It then steps to the neighbour named by the direction state.
   - A SEGMENT word is sent at each change of direction. A via run is a
     segment of its own.
   - An ETCH word is sent for each point that has ETCHED set.
   - The backtrace stops on a TRACED point (the source or the partial net)
     and sends the last segment.
5. **Cleanup.** One CLEARX rotation erases the wave. Etched points that are
   not on the new path return to BLOCKED. A ROUTE then runs one CLEART
   rotation, which turns its TRACED source into BLOCKED.
6. A DONE (or FAIL) word carries the cycle count from `l4_cycle_counter`.

Segments chain from the target to the source. The first segment starts at
the target, and each segment starts where the previous one ended.

Terminals lose their UNETCHABLE marking when they are routed: the target
becomes EMPTY and then BLOCKED, and the source becomes TRACED and then
BLOCKED. A host that wants terminals protected rewrites them as UNETCHABLE
afterwards.

A host does rip-up with SELECT + WRITE EMPTY, one command per straight
segment.

### Latency

- Every broadcast command is registered in the control unit. The row and
  column decoders add one register stage. The PE array's status AND adds
  another.
- An expansion step costs L clocks.
- A backtrace step costs up to two layer rotations, because READ and WRITE
  of the same point must each wait for its layer.
- Each SELECT, READ or WRITE host command takes one rotation.

Measured at the default size (32 × 32 × 16, `tb_l4_full`):

| route | path length | cycles (command in to DONE) |
|---|---|---|
| (0,0,0) → (0,0,1) | 1 | 164 |
| (0,0,0) → (31,31,15), empty grid | 77 | 3772 |
| same, through two walls with a gap | 139 | 6758 |

On a 32 × 32 × 6 array (`tb_l4_workloads`), the random benchmarks took on
average:
- 483 cycles per two-terminal net (90 successive nets);
- 771 cycles per net of 2–5 terminals (40 nets).

## Files

| file | contents |
|---|---|
| `rtl/l4_pkg.sv` | states, commands, word layouts, helper functions |
| `rtl/l4_pe.sv` | processing element |
| `rtl/l4_pe_array.sv` | GRID_X × GRID_Y PEs, neighbour wiring, registered status AND |
| `rtl/l4_range_decoder.sv` | registered row or column range decoder (used twice) |
| `rtl/l4_cycle_counter.sv` | per-command cycle counter |
| `rtl/l4_control_unit.sv` | host-command sequencer |
| `rtl/l4_top.sv` | the accelerator core |

Parameters of `l4_top` are GRID_X, GRID_Y (≤ 32), LAYERS (2…16) and
ETCHING. The limits come from the 5-bit and 4-bit coordinate fields of the
32-bit words. A larger array needs wider words: change `CW` and `ZW` in the
package and the word structs.

Each layer's state is written as a register ring, 5 bits per gridpoint. On an
FPGA this ring maps naturally onto shift-register LUTs. As plain flip-flops,
the default array has about 83,000 state bits.

## Simulation

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -y rtl rtl/l4_pkg.sv tb/tb_l4_top.sv --top-module tb_l4_top
./obj_dir/Vtb_l4_top
```

| testbench | what it covers |
|---|---|
| `tb_l4_pe` | one PE under random commands, against a reference model |
| `tb_l4_pe_array` | 5 × 4 × 3 array under random commands and expansion sweeps, against a whole-grid model; every expansion direction occurs |
| `tb_l4_range_decoder`, `tb_l4_cycle_counter` | the small blocks |
| `tb_l4_control_unit` | control unit with etching disabled: sweep count = path length, via/bend segments, refused route, cycle count, broadcast protocol |
| `tb_l4_top` | end to end on 6 × 5 × 3 (see below) |
| `tb_l4_full` | default size, three complete routes (about 75 s to compile, under 1 s to run) |
| `tb_l4_workloads` | 32 × 32 × 6: 90 random two-terminal nets, 40 random nets of 2–5 terminals, and a congested run of 90 multi-terminal nets that forces etching |

`tb_l4_top` checks against a breadth-first search and a grid model kept in
the testbench:
- the two-net etching example, including its step count;
- a refused route;
- random routes;
- multi-terminal nets;
- line probes and full read-back of the grid.

## Departures and open points

- **Not included:** the command and result FIFOs, the PCI target and the host
  software. The two word streams are the top's ports.
- **Widths:** the original drawing of the PE shows a 2-bit command and 3-bit
  state ports. Those widths only cover the four basic commands. TRACED,
  UNETCHABLE, ETCHED and the two cleanup commands need 3-bit commands and
  5-bit states, so the ports are wider here. An unexplained PE input ("pref")
  in that drawing is not built.
- **This design's own choices:**
  - the word layouts and opcodes;
  - the exact command sequence of each phase, and the absence of a reply to
    SELECT and WRITE;
  - the up/down timing that keeps sweeps breadth-first, and the layer flags;
  - implicit net finishing by the next ROUTE or ROUTE_EXTEND_INIT;
  - writing the target EMPTY before expansion;
  - detecting a failed expansion step with a sweep that makes no progress.
    In the etching example, the blocked wave costs one extra, empty sweep
    before the etching sweep.
- **Backtrace speed.** The backtrace uses only READ and WRITE, so it is
  slower than expansion. Going by the published run times, the original
  backtraced faster. A combined read-and-write PE command would roughly halve
  the backtrace cost.
- **Clock rate.** Timing closure on an FPGA (the original ran the array at
  30 MHz) has not been attempted.
