# Island-style FPGA fabric with the Imran switch block and depopulated clusters

This is a synthesizable SystemVerilog model of a programmable logic fabric. It
has a complete, configurable island-style FPGA and two routing ideas:

- **The Imran switch block.** Routing wires span S tiles, so at any switch block
  only some of the tracks in a channel end and the rest pass straight through.
  The switch block treats the two groups differently:
  - tracks that end are joined by a **Wilton** pattern, which is good for
    routability;
  - tracks that pass through get one **disjoint** switch each, which is cheap.

  The result routes almost as well as a full Wilton block, with far fewer
  switches.
- **Depopulated interconnect matrices.** Inside each logic cluster, the matrix
  that feeds the lookup tables may be only partly populated: a cluster input or
  a feedback reaches only 25, 50 or 100 % of the lookup-table inputs. That saves
  logic area but costs routability. All six patterns studied for this
  architecture can be built with parameters: 100/100, 50/100, 25/100, 100/50,
  50/50 and 25/25.

The model describes function, not electricity:

- A programmable switch is an ideal connection controlled by one configuration
  cell.
- The whole array is loaded through one serial configuration chain and then runs
  a user circuit.
- Transistor sizing, buffers, delay and area, which are what the architecture
  was originally evaluated on, are not modelled.

## Contents

| File | Module | Role |
|---|---|---|
| `rtl/fpga_pkg.sv` | `fpga_pkg` | Stagger, Wilton, connection-block and matrix formulas shared by RTL and testbenches |
| `rtl/lut.sv` | `lut` | K-input lookup table |
| `rtl/ble.sv` | `ble` | Basic logic element: LUT, flip-flop, bypass multiplexer |
| `rtl/interconnect_matrix.sv` | `interconnect_matrix` | Cluster-internal matrix, one binary-select multiplexer per BLE input |
| `rtl/logic_block.sv` | `logic_block` | Cluster of N BLEs with the matrix and local feedback |
| `rtl/imran_switch_block.sv` | `imran_switch_block` | The switch block |
| `rtl/classic_switch_block.sv` | `classic_switch_block` | Disjoint, universal and Wilton blocks for comparison |
| `rtl/cb_in.sv`, `rtl/cb_out.sv` | `cb_in`, `cb_out` | Input and output connection blocks |
| `rtl/config_chain.sv` | `config_chain` | Shift-register configuration cells |
| `rtl/fpga_tile.sv` | `fpga_tile` | One tile: switch block, two channel pieces, connection blocks, cluster, cells |
| `rtl/fpga_top.sv` | `fpga_top` | NX × NY array of tiles |

Each file opens with a comment giving its interface, timing and configuration
layout. Every module has a self-checking testbench `tb/tb_<module>.sv`. One more
testbench, `tb/tb_fpga_arch_sweep.sv`, builds the larger evaluated
architectures.

## The array and its tile

Tile (x, y) holds four things:

- a switch block at its lower-left corner;
- a horizontal channel piece H running east from the switch block;
- a vertical channel piece V running north from it;
- a logic cluster in the space above H and to the right of V.

The cluster takes its I inputs from V through the input connection block. Its N
outputs drive H through the output connection block. Tiles abut, so the east
end of H meets the switch block of tile (x+1, y), and the north end of V meets
tile (x, y+1). Channel ends at the array boundary become the ports
`io_w_*`, `io_e_*`, `io_s_*` and `io_n_*`. They stand in for I/O blocks, which
are not modelled.

Defaults (all are parameters of `fpga_top`):

| Parameter | Default | Meaning |
|---|---|---|
| `NX`, `NY` | 4, 4 | Array size (chosen here) |
| `W` | 16 | Tracks per channel |
| `S` | 4 | Segment length in tiles |
| `N` | 4 | BLEs per cluster |
| `K` | 4 | LUT inputs |
| `I` | 2N+2 = 10 | Cluster inputs |
| `FCW` | W/2 = 8 | Tracks each pin can reach (Fc = 0.5 W) |
| `IN_PCT` / `FB_PCT` | 100 / 100 | Matrix population for cluster inputs / feedbacks |

## Segments and the stagger

Every track is a wire of length S tiles. The wire ends are staggered so that
each switch block sees some wires end and the rest continue. The rule is:

> track t ends at the switch block of tile (x, y) when (POS + t) mod S = 0,
> with POS = (x + y) mod S.

Horizontal and vertical tracks with the same number end at the same switch
blocks. Write M for the number of tracks that end at a given block. M = W/S when
S divides W. Otherwise M is ⌊W/S⌋ or ⌈W/S⌉, depending on POS
(`fpga_pkg::term_count`). Any W is accepted, so the odd channel widths measured
for this architecture (30, 35, 41, …, 73) can be built.

A useful consequence: a wire of class t mod S only ever meets wires of the same
class. Wilton switches only join tracks that end at the same block, and the
disjoint switch keeps the track number. So the routing falls into S independent
subsets. A purely disjoint block would give W subsets, so each Imran subset is
larger and offers more routing choices.

## How wires are modelled: flows on a wired-OR

This is the least conventional part of the RTL. It explains the lint warnings
the fabric produces.

A real routing wire is a bidirectional net: whichever switch drives it, every
switch on it sees the value. Tri-state nets do not synthesize, so each wire
endpoint carries two unidirectional signals:

- `<side>_in`: what arrives at this block from the wire, meaning the OR of
  everything driven onto it beyond this block;
- `<side>_out`: what this block puts onto the wire.

A closed switch between ends A and B adds `A_in` to `B_out` and `B_in` to
`A_out`. An undriven wire reads 0.

This matches the real net exactly as long as every net has at most one driver,
which a legal configuration (a routed netlist) guarantees. Two things follow:

- **Output pins drive both directions.** A logic-block output driving H is ORed
  into both flows of H, so the value reaches both ends of the wire.
- **The fabric has structural combinational cycles.** A wire can be reached from
  several switches, and the flow network contains the cluster's combinational
  path. So the netlist contains combinational cycles that exist structurally but
  never carry a value. Verilator reports these as `UNOPTFLAT` for
  `logic_block`, `fpga_tile` and `fpga_top`.

  Any configuration that is a set of trees with no combinational loop in the
  user circuit opens every cycle. A random configuration may close one, which is
  why the `run` input exists (see below).

## The Imran switch block

`imran_switch_block` has four sides of W tracks.

**Pass-through tracks** (W − M of them): the wire continues straight through the
block, from left to right or from bottom to top. One configuration bit joins
horizontal track t to vertical track t, which is the disjoint pattern with a
single switch per track. Through the flow model, that one switch makes all four
turns available.

**Ending tracks** (M of them) are numbered 0 … M−1 by local index j = t div S
within the subset. Six switch groups of M bits connect them with the Wilton
mapping:

| Group | Connects | Track on the other side |
|---|---|---|
| LR | left j ↔ right j | j |
| TB | top j ↔ bottom j | j |
| LT | left j ↔ top | (M − j) mod M |
| LB | left j ↔ bottom | (j − 1) mod M |
| RT | right j ↔ top | (j − 1) mod M |
| RB | right j ↔ bottom | (2M − 2 − j) mod M |

Each incoming wire end can therefore reach three others (Fs = 3). The block
holds W + 5M switches: 36 at W = 16, S = 4. A Wilton block in the same segmented
channel needs four switches per pass-through track, 6M + 4(W − M) = 72.

The configuration layout is `cfg[0 .. W−M−1]`, one bit per pass-through track
in ascending track order, followed by group g (in the order LR, TB, LT, LB,
RT, RB) at `cfg[W−M + g·M + j]`.

With S = 1 every track ends everywhere, and the block reduces to a Wilton block.

### The blocks it is compared with

`fpga_top` and `fpga_tile` take a parameter `SB_TYPE`. It selects:

- `SB_IMRAN` (the default);
- or one of three earlier blocks, built in `classic_switch_block` for the same
  staggered channel: `SB_DISJOINT`, `SB_UNIVERSAL` or `SB_WILTON`.

Each earlier block is defined by a track pattern over all W tracks. Side
letters are L, T, R and B; i is the incoming track.

| Pattern | LR, TB | L–T | L–B | R–T | R–B |
|---|---|---|---|---|---|
| disjoint | i | i | i | i | i |
| universal | i | W−1−i | i | i | W−1−i |
| Wilton | i | (W−i) mod W | (i−1) mod W | (i−1) mod W | (2W−2−i) mod W |

Switches per track:

- A track that ends at the block gets all six switches.
- A track that passes through keeps only the four turns, joining the whole wire
  to the crossing wire:
  - With disjoint, the four turns all join the same two wires, so one switch is
    built.
  - With universal and Wilton, four are built.

So the disjoint block costs the same as Imran (W + 5M), and the other two cost
6M + 4(W − M). What Imran gains over disjoint is routability: disjoint keeps
every signal on its track number, which gives W isolated domains.

## Connection blocks

- Input pin p of the cluster can connect to tracks (p + j·W/FCW) mod W of V, for
  j = 0 … FCW−1. Bit `cfg[p·FCW + j]` controls that switch.
- Output o can drive the same formula's tracks on H.

A pin with several switches closed reads the OR of their tracks. A legal
configuration closes at most one per pin.

## The cluster: interconnect matrix and BLEs

**BLE.** A BLE is a K-input LUT followed by a D flip-flop and a multiplexer that
selects either the registered or the combinational output. Its configuration
bits are:

- `cfg[2^K − 1 : 0]`: the truth table, indexed by the input vector;
- `cfg[2^K]`: 1 selects the flip-flop.

All flip-flops of a cluster share the clock. `rst_n` clears them asynchronously.

**Interconnect matrix.**

- *Rows.* Each of the N·K BLE inputs is a row, r = b·K + p, fed by its own
  multiplexer.
- *Candidates.* A row's candidates are the I cluster inputs followed by the N
  BLE outputs, which feed back inside the cluster. Depopulation keeps
  - cluster input c when c mod (100/IN_PCT) = r mod (100/IN_PCT);
  - feedback f when f mod (100/FB_PCT) = r mod (100/FB_PCT).

  So in 50/100 each cluster input reaches half of the BLE inputs, and every
  feedback still reaches all of them.
- *Selects.* Each row's select is a SELW = ⌈log2(I+N+1)⌉-bit binary number. It
  picks the n-th remaining candidate in the order above, which is a binary-tree
  multiplexer. A value past the last candidate gives 0.

A depopulated cluster is no longer symmetric. A signal must arrive on an input
pin that actually reaches the row that needs it, and a BLE can only use
feedbacks that reach its inputs. `tb_fpga_arch_sweep` shows this: in some
patterns BLE 0 cannot see its own output on input 1, so the route goes through a
second BLE used as a buffer.

## Configuration and start-up

Each tile has one `config_chain` of TILE_BITS cells. Its layout, LSB first, is:

| Field | Bits at defaults | Offset at defaults |
|---|---|---|
| switch block, W + 5M | 36 | 0 |
| input connection block, I·FCW | 80 | 36 |
| output connection block, N·FCW | 32 | 116 |
| matrix selects, N·K·SELW | 64 | 148 |
| BLE b (truth table, then FF select) | 17 each | 212 + 17·b |

That is 280 cells per tile at the defaults.

The chains of all tiles are joined in the order (0,0), (1,0), …, (NX−1,0),
(0,1), …. While `cfg_en` is high, each clock shifts one bit in at `cfg_in`.
The first bit shifted in lands in cell 0 of the last tile. A full load takes one
clock per cell: 4480 at the defaults. When S does not divide W the tiles differ
in size, and the chain length is the sum of them. `cfg_out` is the end of the
chain, so a configuration can be read back by shifting it around again.

Start-up sequence:

1. Hold `run` low.
2. Pulse `cfg_rst_n` low to clear the configuration (all switches open).
3. Shift the bitstream in.
4. Drop `cfg_en`, pulse `rst_n` low to clear the user flip-flops, and raise
   `run`.

While `run` is low every LUT output is forced to 0. This keeps a
half-loaded configuration from closing an inverting combinational ring, which
would oscillate.

## Simulating

Any simulator with SystemVerilog-2017 support works. With Verilator (5.x):

```sh
verilator --binary --timing -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/fpga_pkg.sv tb/tb_fpga_top.sv --top-module tb_fpga_top
./obj_dir/Vtb_fpga_top
```

Replace `fpga_top` with any other testbench name.

`-Wno-fatal` is needed because of the `UNOPTFLAT` warnings for the fabric's
structural cycles, described above. No other warning in the circuit
needs it.

Every testbench:

- ends by printing `TB_RESULT checks=<n> failures=<n>`;
- has a watchdog that fails the run if it hangs.

| Testbench | What it checks |
|---|---|
| `tb_lut`, `tb_ble` | Every table entry; registered and bypass paths; reset; `run` hold |
| `tb_interconnect_matrix` | Every select of every row against the connection rule, for 100/100, 50/100 and 25/25; population percentages |
| `tb_logic_block` | A four-BLE sequential circuit using inputs, feedback, combinational and registered BLEs, compared cycle by cycle with a behavioural model |
| `tb_imran_switch_block` | Every switch, one at a time, against a reference, for W/S = 16/4 (all four stagger classes), 16/1, 8/2, 16/8, 16/16, 30/4, 73/4; Fs = 3 |
| `tb_cb_in`, `tb_cb_out` | Every switch against the track formula |
| `tb_config_chain` | Shifting, hold, reset, serial output |
| `tb_fpga_tile` | A hand-placed route through one tile's switch block, connection blocks and cluster |
| `tb_fpga_top` | Full default array. Loads a 4480-bit bitstream and reads it back. Runs a two-cluster circuit (a toggle flip-flop and an XOR) routed across the array through Wilton turns, Wilton straight connections, disjoint switches and pass-through segments. Checks every edge output each cycle. |
| `tb_classic_switch_block` | The three earlier blocks against an independent switch-list model, for several W, S and stagger classes; Fs = 3; disjoint domains; Wilton equals Imran at S = 1 |
| `tb_fpga_arch_sweep` | The twelve evaluated architectures (below) as single tiles running one routed circuit |
| `tb_fpga_sb_compare` | All four switch blocks at S = 1, 2, 4, 8, 16, each as a one-tile array routing a net through a turn, the cluster and out again |

Building `tb_fpga_arch_sweep` takes a few minutes, because it elaborates twelve
differently sized tiles. The others build in seconds.

## Evaluated architectures

The architecture was evaluated at these sizes (K = 4, S = 4, I = 2N+2,
Fc = 0.5W). The channel widths are the minimum widths measured by place and
route:

| N | Matrix | W |
|---|---|---|
| 4 | 100/100, 50/100 | 30, 35 |
| 8 | 100/100, 50/100 | 41, 48 |
| 12 | 100/100, 50/100, 25/100, 50/50, 25/25 | 51, 60, 61, 65, 73 |
| 16 | 100/100, 50/100 | 57, 68 |

A 100/50 cluster of N = 4 was also evaluated, with no width reported.

Each one is an override of `fpga_top`'s parameters, and `tb_fpga_arch_sweep`
builds all of them. The defaults (W = 16, N = 4, 100/100) are the switch block's
reference size and the smallest cluster.

The switch blocks were compared at segment lengths S = 1, 2, 4, 8 and 16 with
N = 4. Each point is a value of `S` and `SB_TYPE`; `tb_fpga_sb_compare` builds
all twenty of them.

## Design choices and departures

The following are not fixed by the architecture description and were chosen
here:

- **Wilton mapping.** The table above is the standard Wilton permutation,
  applied within the subset of ending tracks. The description only says that
  Wilton rotates each diagonal connection by one track relative to disjoint.
- **Earlier blocks in a segmented channel.** They apply their pattern over all
  tracks, and a pass-through track keeps four turning switches (one for
  disjoint). The universal pattern is read from its drawing.
- **Stagger rule.** (POS + t) mod S, with POS = (x + y) mod S.
- **Pin placement.** Inputs come from the vertical channel and outputs go to the
  horizontal one. The track spread formula of the connection blocks is also a
  choice.
- **Fc.** Both 0.25 W and 0.5 W appear for this architecture. 0.5 W is used: it
  is the value given for the Imran block.
- **Matrix diagonal.** The A/B patterns are defined only by their percentages;
  the modulo rule that says which pin reaches which row is a choice.
- **Configuration cells** are a serial shift chain with a reset. How the
  original cells are written is not described.
- **The `run` input** is added so that random or partial configurations cannot
  oscillate.
- **Not modelled.**
  - Electrical switch implementation: the mix of pass transistors and
    tri-state buffers, and buffer sizing.
  - Delay and area.
  - Global clock routing: the clock is a plain port.
  - I/O blocks.
- **Scaled sizes.**
  - The array defaults to 4 × 4. The original experiments size the array to
    each benchmark circuit.
  - The default W is 16, the switch-block example size, not a measured width.
    The measured widths are reached by parameter override.
- **Trust.** Each block is checked against an independent reference or an
  exhaustive sweep. Each testbench was confirmed to fail on a deliberately
  broken copy of its module. No placement, routing or bitstream tool is
  included: configurations in the testbenches are written by hand from the
  formulas above.
