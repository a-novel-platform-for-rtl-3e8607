# CONFETTI tissue: a synchronous Game of Life on a grid of routing and compute FPGAs

CONFETTI is a prototyping machine for cellular, bio-inspired hardware. It is built from
many small FPGAs rather than one large one. Each small compute board, the **ECell**, sits
on a routing FPGA. The routing FPGAs form a 2-D mesh, and each is wired only to its four
neighbours by short serial links. Eighteen of these nodes (a 6 x 3 grid) make one
**EStack**. EStacks plug together edge to edge into one larger surface. There is no global
clock: every ECell has its own oscillator, and every link carries its sender's clock. The
RTL keeps it that way. Each node has its own clock input, and every signal that passes
from one node to another crosses a clock boundary.

This RTL describes that machine running the experiment used to measure what global
synchronisation costs on such a surface. Conway's Game of Life is spread over all ECells,
8 x 8 cells per ECell. A global "next generation" signal is relayed from node to node
through the routing FPGAs. At the default size (3 x 2 EStacks, 108 nodes) the automaton
has 144 x 48 cells. Each cell is one pixel of the LED display on top of the stacks.

Around the automaton the RTL also contains the machine's housekeeping logic:
- loading an ECell's FPGA configuration from the Flash next to its routing FPGA;
- the per-ECell pixel squares of the display;
- switching the fans on when a board gets hot.

All code is synthesizable SystemVerilog-2017. Every module has a self-checking
testbench. The top-level testbench runs the whole 108-node machine at its default
parameters and compares it cell by cell with a reference model.

## How the machine is put together

```
confetti_top            SX x SY EStacks (3 x 2), border links stitched together
 └─ estack              NX x NY nodes (6 x 3), border links brought out as edge_* ports
     ├─ per node:
     │   ├─ erouting_fpga       the routing FPGA
     │   │   ├─ erouting_switch    four neighbour links <-> one ECell link
     │   │   ├─ sync_relay         forwards the global sync level
     │   │   ├─ sync_gen           sync source (active in one node only)
     │   │   └─ config_loader      Flash -> ECell FPGA configuration
     │   ├─ ecell_gol           the ECell, configured as an 8 x 8 Life tile
     │   │   ├─ gol_array          the 64 cells
     │   │   └─ ecell_comm         four 64-bit direction buses over one link
     │   │       └─ link_tx / link_rx
     │   │                         └─ async_fifo   crossing into the receiver's clock
     │   └─ display_tile        the ECell's 8 x 8 x 24-bit pixel square
     └─ thermal_monitor     fans on/off for the whole EStack
confetti_pkg            shared types: dir_e, link_t, WORD_W, LINK_LANES
```

The switch inside `erouting_fpga` uses `link_rx` and `link_tx` too, one pair per
direction.

Coordinates are the same at every level. x grows to the east and y to the south. Node
(x, y) of an EStack has index `y*NX + x`, and EStack (sx, sy) has index `sy*SX + sx`.
Direction-indexed arrays use `dir_e`: N = 0, E = 1, S = 2, W = 3. Inside a tile,
cell (r, c) is bit `r*N + c`, with row 0 on the north side.

## Clock domains

Each node (one routing FPGA and the ECell on it) runs from its own clock, `node_clk`. In
the real machine these are separate ~50 MHz oscillators, close in frequency but never in
phase. Nothing in the RTL assumes any relation between two node clocks. Three kinds of
signal cross between nodes, and each has its own crossing:

| signal | crossing | where |
|---|---|---|
| link data | sampled on the sender's forwarded clock, then an asynchronous FIFO | `link_rx`, `async_fifo` |
| global sync level | two-flop synchroniser | `sync_relay`, `ecell_gol` |
| `load` request from outside | two-flop synchroniser, rising edge | `ecell_gol` |

A fourth clock, `board_clk`, runs the parts that look at a whole EStack: the display
read-out and the thermal monitor. The display squares are the only memory written in one
domain and read in another. Each is written on its ECell's clock and read on the board
clock. A pixel read while it is being rewritten may show the old or the new colour.

The routing FPGA and its ECell share the node clock in this design. The original boards
do not say how those two are clocked. The links between them cross through the same
FIFO anyway, so giving the ECell its own clock only needs a second clock port.

`rst_n` is one asynchronous reset for the whole machine. In hardware its release should
be synchronised to each node clock. The RTL leaves that to the board, and in simulation
it cannot go wrong.

## The links

Each pair of neighbouring FPGAs has one link in each direction. In hardware a link is
three LVDS pairs: a forwarded clock and two data lanes, D0 and D1. Here a link is the
4-bit packed struct `link_t`:
- `fclk` is the sender's clock, forwarded;
- `strobe` is high while a frame is on the wire;
- `d[1:0]` carries the data lanes.

The strobe has no pair of its own on the real boards; it stands for framing that would
otherwise be coded into the data.

- The sender changes `strobe` and `d` on the rising edge of its clock. The receiver
  samples them on the falling edge of `fclk`, in the middle of the bit.
- A W-bit word goes out as W/2 consecutive beats, least significant bits first. Lane k
  of beat b carries bit `2*b + k`.
- `link_tx` takes a new word in the cycle of the previous frame's last beat, so frames
  are separated by one idle cycle.
- `link_rx` rebuilds the word in the sender's domain and writes it into a four-word
  `async_fifo` with Gray-coded pointers. On the receiver's side the FIFO is emptied at
  once: `out_valid` pulses for one cycle, two to four receiver cycles after the last
  beat. If the strobe drops in mid-frame, `link_rx` throws the partial frame away.
- Every node uses two frame sizes:
  - ECell ↔ routing FPGA: 256 bits (four 64-bit direction words), 128 beats.
  - Routing FPGA ↔ routing FPGA: one 64-bit word, 32 beats.

## One generation, step by step

This is the part of the design that needs the most care. Each tile must see its eight
neighbouring cells across every border, including the diagonal ones. But a tile has no
diagonal link, and even its straight links pass through two routing FPGAs.

**1. The synchronisation event.** The sync source is global node (0, 0), the north-west
corner. Its `sync_gen` toggles a level every `SYNC_PERIOD` cycles (1024 by default).
Each routing FPGA synchronises the level it receives from one fixed upstream neighbour
(two flops), registers it once more, and passes it on to all four neighbours and to its
own ECell:
- nodes in global row 0 take the level from the west;
- all other nodes take it from the north.

These choices form a spanning tree, so a toggle cannot loop back on itself. Each hop costs
three cycles of the receiving node's clock plus up to one cycle of phase. The farthest
node is 23 hops from the source on the 18 x 6 grid, so it sees the toggle about 70 to 90
cycles late. A level is sent rather than a pulse because an edge of a level survives a
clock crossing and a one-cycle pulse might not. Every toggle, rising or falling, starts
one generation.

**2. Exchange A: columns east and west.** The tile (`ecell_gol`) fills its west word with
its column 0 and its east word with its column N-1. Its north and south words are zero.
`ecell_comm` sends the four words to the routing FPGA as one frame.

**3. Routing.** `erouting_switch` splits the frame and sends word d on the link towards
direction d. Words that arrive from the neighbours wait in a two-entry FIFO per
direction. When every enabled direction holds a word, one word is taken from each FIFO
and the four go up to the ECell as one frame. A disabled direction gives an all-zero
word. Directions are disabled on machine borders with nothing attached, so cells beyond
the edge of the machine count as dead. The FIFOs absorb the relay skew: a neighbour that
started earlier may send its next word before this node has collected the current set.
A word that finds its FIFO full sets the sticky `overflow` flag. The tests never see it.

**4. Exchange B: rows north and south, with corners.** The tile now knows its west and
east halo columns. It sends its row 0 to the north and its row N-1 to the south. Each row
is extended at both ends by the matching halo cell, making N+2 bits, column -1 first.
The extended row the tile gets back from its north neighbour is therefore the complete
row above it, including the two diagonal corner cells. Those corners travelled east or
west in exchange A and then north or south in exchange B. This is why one generation
needs two exchanges.

**5. Step.** `gol_array` computes all N x N next states in one clock: a cell is born
with exactly 3 live neighbours and survives with 2 or 3.

**6. Draw.** The tile writes its N x N pixels into its `display_tile`, one per cycle.
Live cells are `LIVE_RGB` (white by default) and dead cells `DEAD_RGB` (black). The tile
then waits for the next toggle.

A toggle that arrives before all this is finished is dropped and sets the tile's
sticky `overrun` flag. `SYNC_PERIOD` must cover the slowest tile's generation.

### Timing

At the default size one generation takes about **750 clock cycles**. That is measured in
the full-machine testbench, from the source toggle to the last tile going idle, with node
clocks within 3 % of each other. It includes the relay skew and the clock crossings.

| phase | cycles |
|---|---|
| frame ECell → routing FPGA | 128 |
| routing FPGA → neighbour | 32 |
| neighbour → ECell | 128 |
| exchange A + exchange B, each with three link crossings | about 2 × 300 |
| draw | 64 |

The default `SYNC_PERIOD` of 1024 cycles of the source node's clock leaves about 25 %
margin. That margin also has to cover the spread of the node clock frequencies. At a
50 MHz clock the period gives 48.8 kHz per generation. The original hardware ran its links at 500 Mbit/s per lane, ten
bits per 50 MHz clock. This RTL moves one bit per lane per clock, so its generation
rate cannot be compared directly with the rates measured on the real machine. See
"Departures" below.

## Configuration from Flash

Each routing FPGA has a 16 Mbit Flash next to it, split into 16 slots of 128 KiB, each
able to hold one ECell configuration. A `cfg_start` pulse on a node makes its
`config_loader` do the following:
1. Hold `prog_b` low for 32 cycles, then wait for `init_b`.
2. Read `CFG_BYTES` bytes from slot `cfg_slot`. Each byte is read from a byte-wide Flash
   port with a fixed 6-cycle access time, then shifted out on `din`, most significant bit
   first, one bit per `cclk` period of two cycles.
3. Keep clocking until the FPGA raises `done` (`cfg_ok`), or give up after 64 more
   clocks (`cfg_error`).

The pins follow the usual slave-serial scheme for FPGAs. `CFG_BYTES` = 130,952 is the size
of an XC3S200 bitstream. A full load takes about 2.9 M cycles.

## Display and temperature

`display_tile` is a 64 x 24-bit memory. The ECell writes it on its own clock, and the
display side reads it on the board clock with one cycle of latency. `estack` and `confetti_top` decode a surface coordinate
(`disp_x`, `disp_y`) to the right tile, so the whole display surface can be read pixel by
pixel. How the LED panel is scanned is not modelled.

`thermal_monitor` takes the 18 temperature readings of an EStack as unsigned °C. It
registers the maximum and the sensor that holds it. The fans (`fan_on`) go on at 60 °C
and off again below 50 °C. The gap stops them switching back and forth at one threshold.

## Departures from the original platform, and what is not here

- **Clock crossings.** The original platform gives the separate oscillators and the
  forwarded link clock, but not how data crosses between them. The sampling edge, the
  FIFO and the synchronisers are this design's own. So is sharing one clock between a
  routing FPGA and its ECell.
- **Link rate.** The RTL moves one bit per lane per clock. The 500 Mbit/s serialisation of
  the real links belongs to the FPGA I/O (DDR or SERDES primitives) and is not modelled.
  Two statements of per-direction bandwidth disagree: 1 Gbit/s for the two data lanes, and
  500 Mbit/s for the packet-router version. This design follows the two-lane link.
- **No packet router.** The original platform also ran a packet-switched network-on-chip
  of five routers per routing FPGA. It is an existing core that is not specified here,
  and the fastest synchronous run used direct links without it. `erouting_switch`
  implements only the direct scheme.
- **Design choices of this RTL.** The original platform fixes none of the following:
  - the framing and the frame strobe;
  - the two-exchange halo scheme;
  - the spanning-tree relay;
  - the Flash and configuration pin timing;
  - the fan thresholds;
  - the pixel colours;
  - the parallel `load` port used to seed patterns (a rising edge, held for at least
    three cycles of the node's clock);
  - `SYNC_PERIOD`.
- **Outside the RTL:**
  - the LVDS pads and clock managers;
  - the ECell SRAM, which this application does not use;
  - the Flash chips and the host interface that rewrites them;
  - the temperature chips, fans and DC/DC converters of the power board;
  - the LED panel driver;
  - the touch sensors, whose use is not specified.

  Where these parts meet the logic, their signals are ports of `confetti_top`.
- **The 12 x 12 variant.** The original platform also ran 12 x 12 cells per ECell. Set
  `N = 12` to get it. The halo words need N+2 ≤ 64 bits, and `gol_array` is tested at
  N = 12. The display squares then grow to 12 x 12, larger than the real 8 x 8 LED squares.

## Simulating

Any testbench builds with plain Verilator 5. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module confetti_top_tb -y rtl -y tb +libext+.sv -Irtl \
  rtl/confetti_pkg.sv tb/confetti_top_tb.sv
./obj_dir/Vconfetti_top_tb
```

Each testbench prints `TB_RESULT checks=N failures=M`. Each also has a watchdog that ends
the run with a failure if it hangs.

| testbench | what it shows |
|---|---|
| `link_tb`, `link_rx_tb` | framing, bit order, frame length, dropped partial frames; the receiver runs on a clock unrelated to the sender's |
| `async_fifo_tb` | order and completeness across two unrelated clocks, full flag |
| `ecell_comm_tb` | word layout of the 256-bit frame, `done` pulse |
| `erouting_switch_tb` | split, gather, FIFO order, disabled ports give zeros, overflow |
| `sync_gen_tb`, `sync_relay_tb` | period, three-cycle relay per hop, source selection |
| `gol_array_tb` | Life rule against a reference, at N = 8 and N = 12 |
| `display_tile_tb` | pixel memory with separate write and read clocks, one-cycle read latency |
| `ecell_gol_tb` | both exchanges, corners, next state, pixel writes, overrun |
| `config_loader_tb`, `erouting_fpga_tb` | bit-exact configuration load, cycle count, timeout |
| `thermal_monitor_tb` | maximum search, fan hysteresis |
| `estack_tb` | a lone EStack on three node clocks, 8 generations vs reference, display read-back |
| `confetti_top_tb` | the full 3 x 2 machine at default parameters (see below) |

`confetti_top_tb` runs the default machine end to end, in about 5 minutes including the
build. Its nodes run from four oscillators of slightly different frequencies and phases
(node n of EStack s takes oscillator (s + n) mod 4), so every pair of neighbours is in
different clock domains. It:
- loads random soup into all 108 tiles;
- runs 12 generations, checking all 6912 cells and all counters after each one;
- measures the generation time;
- reads the whole display back;
- in parallel, loads a full-length configuration into one node from a Flash model and
  heats one EStack until its fans come on.

It counts each mechanism (relayed sync toggles, frames crossing EStack borders, live
cells on the machine edge, configuration, fan switch-on, display read-back) and fails if
any of them never happens. `tb/flash_model.sv` and `tb/fpga_cfg_model.sv` are behavioural
models of the Flash read port and the FPGA configuration pins, used only by testbenches.

## Parameters worth changing

| parameter | where | default | meaning |
|---|---|---|---|
| `SX`, `SY` | `confetti_top` | 3, 2 | EStacks across and down |
| `NX`, `NY` | `confetti_top`, `estack` | 6, 3 | nodes per EStack |
| `N` | all Life modules | 8 | cells per tile side |
| `SYNC_PERIOD` | `confetti_top` down to `sync_gen` | 1024 | cycles per generation; must exceed the generation time |
| `NUM_SLOTS`, `SLOT_BYTES`, `CFG_BYTES` | `config_loader` | 16, 131072, 130952 | Flash layout and bitstream size |
| `T_ON`, `T_OFF` | `thermal_monitor` | 60, 50 | fan thresholds in °C |
