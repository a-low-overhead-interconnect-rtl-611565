# A low-overhead virtual interconnect for intermediate fabrics

An *intermediate fabric* is a coarse-grained reconfigurable device that is
itself implemented on an FPGA. Circuits are placed and routed onto its few
large resources (multipliers, adders, FFT units: "computational units", CUs)
rather than onto tens of thousands of LUTs. That makes place-and-route orders of
magnitude faster, and the same circuit runs on any FPGA that can hold the fabric.
The cost is area. Every virtual routing resource becomes real multiplexers and
configuration flip-flops on the host FPGA, and in a classic island-style fabric
(switch boxes, connection boxes, multi-source tracks) that virtual interconnect
takes most of the LUTs.

This RTL implements an interconnect built to cut that cost, as a complete
configurable fabric of 16-bit DSP CUs. The central observation:

* A virtual track that *n* resources can drive needs an *n*:1 mux. But a track
  with **exactly two** possible drivers needs no mux. It becomes two plain
  directional wires, one in each direction.
* So **every track in this fabric has exactly two ends, both switch boxes**.
  Tracks therefore cost no logic at all.
* No connection boxes are used. The CUs connect **directly to diagonal channels
  of the neighbouring switch boxes**.
* The switch boxes take on the extra CU channels without growing much. Each
  box output is a mux of 4 or 5 inputs. On 4-input-LUT FPGAs a 4:1 mux costs the
  same LUTs as a 3:1 mux, and a 5:1 mux costs less than a 6:1 mux. The extra
  inputs are therefore nearly free.

The price is routability: fewer paths exist between any two points than in a
classic fabric.

## Fabric layout

An `ROWS x COLS` fabric (default 5x5) is a grid of cells:

```
row 0            IN   IN   IN   IN   IN        fabric inputs  (fab_in)
rows 1..ROWS-2   CU   CU   CU   CU   CU        16-bit DSP units
row ROWS-1       OUT  OUT  OUT  OUT  OUT       fabric outputs (fab_out)
```

A switch box (SB) sits at every cell corner, so there are `(ROWS+1) x (COLS+1)`
boxes. Box `(r,c)` is the top-left corner of cell `(r,c)`.

```
   SB(r,c) ============ SB(r,c+1)        ===  track pair (one wire each way)
      |  \            /    |
      |   \ out   out/     |             cell output -> SE input of SB(r,c)
      |      CELL(r,c)     |                          -> SW input of SB(r,c+1)
      |   / A       B \    |             operand A   <- NE output of SB(r+1,c)
      |  /             \   |             operand B   <- NW output of SB(r+1,c+1)
   SB(r+1,c) ========== SB(r+1,c+1)
```

* **Tracks.** A row channel holds `H_TRACKS` (default 2) tracks and a column
  channel holds `V_TRACKS` (default 4). A track is a pair of opposite wires
  between neighbouring boxes: `s_out` of box `(r,c)` drives `n_in` of box
  `(r+1,c)` and the reverse, and likewise `e_out`/`w_in` along a row.
* **Cells.** A cell's output goes up into the two boxes above it. Its two
  operands come from the two boxes below it. Data thus climbs out of a CU into
  the interconnect and descends into the next CU. Inputs enter at the top, and
  feed-forward pipelines run downward to the outputs at the bottom.
* **Grid edges.** A box input with no neighbour is tied to 0. The output row
  drives nothing back into the boxes.

## Switch box (`switch_box.sv`)

Each box has four planar channels (N, E, S, W) and four diagonal CU channels.
SW and SE are inputs carrying the outputs of the cells below. NW and NE are
outputs feeding the operands of the cells above. Every output is a configured
mux followed by a register:

| output | inputs (select code 0, 1, 2, 3, 4)    | select bits |
|--------|---------------------------------------|-------------|
| N out  | SW, W, S (straight through), E, SE    | 3           |
| S out  | SW, W, N (straight through), E, SE    | 3           |
| W out  | N, E, SE, S                           | 2           |
| E out  | N, W, SW, S                           | 2           |
| NW out | N, E, SE, S                           | 2           |
| NE out | N, W, SW, S                           | 2           |

Codes 5 to 7 on a 5-input mux output 0. No output can select the input on its
own side, because a U-turn back along the same track is never useful.

With several tracks per channel, output track *i* connects to track *i* of the
other channels, wrapped modulo that channel's track count. NW uses track 0 of
the neighbouring channels and NE uses track 1. The two operands of a CU
therefore arrive on different column tracks. With 2 row and 4 column tracks,
column tracks 2 and 3 can only run straight or take values from the CU
channels and the row tracks. They cannot turn onto a row track. This
per-track mapping is one reasonable topology, not the only one: the
architecture leaves the box topology open and expects it to be tuned per
application. To change it, edit the mux input lists in `switch_box.sv` (and
the route builder in `tb/tb_route_pkg.sv`).

At the default size each box has 8 five-input muxes, 6 four-input muxes and
36 configuration bits.

## Computational units and realignment (`dsp_cu.sv`, `realign_delay.sv`)

A CU applies one configured operation to operands A and B and registers the
result:

| `op` | function          |
|------|-------------------|
| 0    | A + B             |
| 1    | A - B             |
| 2    | A * B (low 16 bits) |
| 3    | A (pass)          |

All arithmetic is modulo 2^16, so the results are the same for signed and
unsigned operands. The multiply is meant to map onto a hard DSP multiplier.

Switch-box hops are registered, so two operands usually reach a CU after
different numbers of cycles. The router does not do pipelined routing.
Instead, each operand passes a **realignment register**: a 0 to 15 cycle
delay that is part of the configuration, sized like an SRL16 shift register.
The place-and-route tool sets it so that both operands of a CU line up. This
works only for feed-forward pipelined datapaths, which is the fabric's target.

## Configuration

All configuration bits form one shift chain (`cfg_chain.sv`). A bitfile is the
chain image sent LSB first: after a complete load, chain bit *i* holds the
*i*-th bit shifted in. The chain layout, defined by the functions in
`if_pkg.sv`, is:

1. One slice per switch box, for boxes `(r,c)` in row-major order. Each slice
   has `6*V_TRACKS + 4*H_TRACKS + 4` bits, laid out from the LSB as: N-out
   selects for tracks 0..V-1 (3 bits each), then S-out selects, then W-out
   selects for tracks 0..H-1 (2 bits each), then E-out selects, then NW, then NE.
2. One 10-bit slice per CU for rows 1..ROWS-2 in row-major order: `op` (2 bits),
   `dly_a` (4 bits), `dly_b` (4 bits), in struct `cu_cfg_t`.
3. One bit per output cell: 0 selects channel A (from the NE output of the
   lower-left box), 1 selects channel B (from the NW output of the lower-right
   box).

At 5x5 that gives 36x36 + 15x10 + 5 = **1451 bits**, stored in 46 words of 32
bits.

`if_top.sv` stores the bitfile in a block RAM (`config_bram.sv`), written
through the `bf_we/bf_addr/bf_wdata` port. A one-cycle pulse on `cfg_start`
starts the programmer (`programmer.sv`). The programmer reads the RAM and
shifts one bit per cycle, fetching the next word while the current word is
still shifting. `cfg_done` rises `CFG_BITS + 2` cycles after `cfg_start` and
stays high until the next start. The fabric keeps computing while it is being
loaded, so its outputs are meaningless until `cfg_done` is high. Writing a new
bitfile and pulsing `cfg_start` again reconfigures the running fabric.

## Timing

Every switch-box hop takes one cycle. Input and output cells add no delay.
A CU adds one cycle plus the realignment delay of its operand. A route of
*k* boxes from an input to an output therefore has latency *k*, and every
output delivers one result per cycle.

## Interfaces of the top level (`if_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `bf_we`, `bf_addr`, `bf_wdata` | in | 1, log2(words), 32 | bitfile RAM write port |
| `cfg_start` | in | 1 | start loading the bitfile |
| `cfg_busy`, `cfg_done` | out | 1 | loading; loaded |
| `fab_in` | in | COLS x 16 | one value per input cell per cycle |
| `fab_out` | out | COLS x 16 | one value per output cell per cycle |

Parameters: `ROWS`, `COLS`, `DATA_W`, `H_TRACKS`, `V_TRACKS`. Their defaults are
in `if_pkg.sv`. The realignment depth (`REALIGN_DEPTH`) and the RAM word width
(`CFG_WORD_W`) are package constants.

## What follows the architecture and what is this design's choice

Taken from the architecture:

* the 2-source tracks implemented as wire pairs, with no connection boxes;
* CU I/O wired to the diagonal channels of the adjacent switch boxes;
* the input lists and output registers of the switch-box muxes, capped at 4
  and 5 inputs;
* an NxM fabric made of an input row, N-2 CU rows and an output row;
* 16-bit tracks, 2 tracks per row channel and 4 per column channel;
* realignment registers in front of every CU, 16 deep;
* a bitfile held in block RAM and shifted into the configuration registers by
  a programmer.

This design's own choices:

* the straight-through input of the N-out mux is S in, the mirror image of
  S out;
* every track is a two-way wire pair; a per-track direction, which would
  suit strongly feed-forward applications, is not a parameter;
* the per-track mapping inside a box, and the select encodings;
* the CU operation set. The architecture says only "16-bit DSP CU", so the
  compare and divide units that some applications use are not provided;
* output cells that choose between two channels;
* one configuration chain for the whole fabric, its bit order, and the 32-bit
  RAM words;
* the programmer's handshake and load rate of one bit per cycle;
* asynchronous reset to zero of all configuration and pipeline registers; the
  realignment shift registers and the RAM are not reset;
* the default size of 5x5. The architecture was evaluated at sizes from 3x3 up
  to 16x16; any of them is a parameter setting.

Not provided: floating-point and FFT CUs, and the place-and-route and
fabric-generation software that would produce bitfiles and topologies.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_switch_box` | every output against its input list, with random selects and data; one-cycle hop; reset |
| `tb_realign_delay` | every delay 0..15 against a history buffer |
| `tb_dsp_cu` | all four operations with random realignment delays |
| `tb_io_output`, `tb_cfg_chain`, `tb_config_bram`, `tb_programmer` | select; shift order, hold and tail output; read latency; load order, bit count and `CFG_BITS+2` load time |
| `tb_fabric` | 3x3 fabric: two hand-routed circuits shifted in one after the other, outputs checked cycle by cycle at the exact route latency |
| `tb_if_top` | default 5x5 top end to end: bitfile written to RAM, loaded by the programmer, checked; then reconfigured with a second circuit. It counts, and requires, every mechanism: load, reconfiguration, each CU op, realignment, row-track turn, straight hops, CU diagonals, both output channels |
| `tb_table1_sizes` | the same two circuits on 3x3, 8x8, 12x8 and 16x16 fabrics (helper `tb_size_runner`); the 16x16 bitfile is 12660 bits |
| `tb_matmul_kernel` | the inner-product kernel of a matrix multiply (two multiplier CUs feeding an adder CU in the next row) on the default 5x5 fabric, one result per cycle |

The circuits are routed by hand in `tb/tb_route_pkg.sv`. That package also
builds bitfiles, of up to 16384 bits, from its own description of the chain
layout. The RTL has only been simulated. It has not been run on an FPGA,
and no area or clock figures are claimed here.

Simulate with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/if_pkg.sv tb/tb_route_pkg.sv \
    tb/tb_if_top.sv --top-module tb_if_top -o sim && ./obj_dir/sim
```

For the other testbenches, change the top module. Unit testbenches do not
need `tb_route_pkg.sv`.
