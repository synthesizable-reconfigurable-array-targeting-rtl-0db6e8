# A synthesizable reconfigurable array for distributed arithmetic

Dot products with constant coefficients, y = Σ c_k·x_k, are the core of
DCTs, FIR filters and similar media kernels. **Distributed arithmetic (DA)**
computes them with no multiplier. The K inputs are fed in bit by bit, and in
every cycle the K current bits form an address into a lookup table (LUT).
The table holds all 2^K partial sums of the coefficients. A shift-accumulator
adds up the table outputs, weighting each by its bit position, and after B
cycles (B = input word length) the dot product is ready.

This repository holds a coarse-grain reconfigurable array tuned for exactly
that pattern. It has two kinds of cluster:

* **add-shift clusters** for the shift registers, adders and
  shift-accumulators;
* **memory clusters** for the tables.

An FPGA-like mesh of 8-bit and 1-bit tracks joins the clusters. The whole
array is plain synthesizable SystemVerilog with flip-flop configuration
memory. It can therefore be dropped into a system-on-chip as a soft core and
configured by a host processor at run time.

The default instance has 4 × 8 clusters: 24 add-shift and 8 memory clusters.
That is enough for a complete 8-point 1-D DCT, either the plain DA form or
the odd-even form. The end-to-end testbench runs both forms on the
default-size array.

## The DA recursion the array implements

Take a 12-bit two's-complement input x = −x₁₁·2¹¹ + Σ_{n<11} x_n·2ⁿ. With
bits fed LSB first, each cycle n does

    acc ← (acc ± LUT[x_{1,n} … x_{K,n}] · 2^8) >>> 1

This is a 16-bit arithmetic right shift. The operation is a subtraction in
the sign-bit cycle (n = 11) and an addition otherwise. After 12 cycles,
acc = ⌊Σ c_k·x_k / 16⌋, with 8-bit table words and a 16-bit result. In the
array this maps onto three units:

| DA part | Array resource |
|---|---|
| parallel-to-serial converter (12 bits) | one add-shift cluster, 3 modules chained as a right shift register |
| LUT (2^K × 8) | one memory cluster; its address is eight 1-bit tracks |
| shift-accumulator (16 bits) | one add-shift cluster, 4 modules in shift-accumulate mode |

## Add-shift clusters (`addshift_module`, `addshift_cluster`)

The unit of arithmetic is a **4-bit module** with one register and one
ripple-carry adder. It has four modes:

| Mode | Operation |
|---|---|
| `AS_ADD` | a ± b. The result is combinational or registered (`oreg`). The module is parallel, or digit-serial when `serial` is set: the carry out of bit `dw_m1` is stored and fed back, so a digit of 1–4 bits is added per cycle (1 bit = bit-serial). |
| `AS_SHREG` | shift register. `ld` loads a in parallel; otherwise it shifts right or left by one bit per cycle. |
| `AS_ACC` | accumulator. `ld` clears it. It does q ± b, or with `shacc` a shift-accumulation: right is `(q ± b) >>> 1`, left is `(q << 1) ± b`. |
| `AS_OFF` | unused. Holds its state and drives zero. |

Add or subtract is fixed by `neg`, or follows the cluster's SUB pin; the DA
sign-bit cycle uses the SUB pin. Four modules make a cluster. Cascade
switches, set in each module's configuration, pass signals between
neighbours:

* the carry goes up (`CIN_CHAIN`);
* the right-shift bit comes down and the left-shift bit goes up
  (`SIN_CHAIN`).

With these, a cluster works as one 8-, 12- or 16-bit unit or as independent
4-bit units. In right shift-accumulation, the top module shifts in the sign
of the *extended* sum (`SIN_SIGN`), which is bit 4 of the 5-bit result.
Because of this the 16-bit accumulator never overflows in the recursion
above.

Cluster pins:

| Kind | Pins |
|---|---|
| 8-bit inputs | A0, A1, B0, B1 (operands A and B, 16 bits each) |
| 8-bit outputs | Y0, Y1 |
| 1-bit inputs | SIN, CIN, LD, SUB, EN (shared by the four modules) |
| 1-bit outputs | SOUT, COUT (each from a module chosen in the configuration) |

Operations wider than 16 bits chain clusters through the mesh using CIN,
COUT, SIN and SOUT.

## Memory clusters (`mem_element`, `mem_cluster`)

The basic element is a dual-port 64 × 8 RAM. One port is written from the
configuration port, and the other is an asynchronous read port used during
operation. Each element has its own power enable: when off, it ignores
writes and reads as zero.

A cluster groups four elements. `nwide_m1` and `ndeep_m1` set how many sit
side by side and how many are stacked, giving the geometries

    64×8, 64×16, 64×24, 64×32, 128×8, 128×16, 192×8, 256×8

Element `row·nwide + lane` holds lane `lane` of words `64·row … 64·row+63`.
Read address bits 7:6 select the row, and the lanes appear on the four 8-bit
outputs. Lanes and rows outside the chosen geometry read zero.

The read address comes either from one 8-bit pin or from **eight 1-bit
pins** (`addr_bits`). With the second form, the serial outputs of eight
bit-serial shift registers address a DA table directly. Table writes use the
same logical addressing.

## The mesh (`sbox`, `cbox`, `io_block`, `da_array`)

Horizontal channel segments run above and below every cluster row, and
vertical segments run left and right of every column. Each segment carries
**six 8-bit and six 1-bit tracks**.

* **Switch box** (`sbox`), one at every crossing, edges included. A track can
  be switched to the track with the *same index* on each of the other three
  sides (Fs = 3). Each direction has its own bit, just as each direction of
  a buffered switch is its own buffer.
* **Connection boxes** (`cbox`). Cluster (r, c) has one on the vertical
  segment to its right and one on the horizontal segment below it. Every pin
  can reach every track of its width (Fc = 6), with one bit per pin/track
  pair. An output pin may drive several tracks.
* **I/O blocks** (`io_block`), one on every edge segment. The host drives
  selected tracks through them and reads all tracks back.

Switches are **OR-resolved**: each driver gives zero when off, and a track is
the OR of all its drivers. With at most one enabled driver per track, this
gives the same result as a tri-state bus. It needs no internal tri-states,
so it works in two-state simulation and in any synthesis flow.

The mesh can form closed paths (for example, a ring of switch boxes). A valid
configuration never closes one. Lint tools still report the static loops,
for the same reason they would in any FPGA routing fabric.

## Configuration (`cfg_regs`, address map in `da_pkg`)

The host writes 32-bit words through a simple port: `cfg_we`, `cfg_addr`
(16 bits) and `cfg_wdata`. Every word can be read back on `cfg_rdata`. All
configuration is stored in flip-flops, and writes can happen while the array
runs.

| Address | Content |
|---|---|
| `(r·COLS + c)·16 + 0..2` | cluster configuration (`as_cfg_t`, 96 bits; or `mem_cfg_t` in word 0) |
| `(r·COLS + c)·16 + 4..7` | C-box right of cluster (`cbox_cfg_t`, 108 bits) |
| `(r·COLS + c)·16 + 8..11` | C-box below cluster |
| `ROWS·COLS·16 + (i·(COLS+1) + j)·8 + 0..4` | switch box at crossing (i, j) (144 bits) |
| `ROWS·COLS·16 + (ROWS+1)·(COLS+1)·8 + k` | edge I/O blocks: top, bottom, left, right (12 drive enables each) |
| bit 15 set | table write: `addr[14:10]` memory cluster (row-major count), `[9:8]` lane, `[7:0]` word, data `wdata[7:0]` |

Reset clears every word. While reset is held, all configuration outputs are
forced to zero, so whatever the flip-flops hold at power-up cannot close a
loop in the mesh before they are cleared.

Multi-word structures are packed low word first. At the default size there
are 896 configuration words.

Switch-box bit `(t·4 + o)·3 + k` turns on the path into side `o` on track
`t`. The path comes from side `(o + 1 + k) mod 4`, with sides numbered
N = 0, E = 1, S = 2, W = 3. Track indices 0–5 are the 8-bit tracks and 6–11
the 1-bit tracks.

## Timing

Routing and memory reads are combinational. The only state is in the
add-shift modules, the memory elements and the configuration registers, all
on one clock, with an asynchronous active-low reset.

A bit-serial 12-bit DA word therefore takes one load cycle and 12
accumulate cycles. The critical path runs from shift register through mesh,
table and mesh again into the accumulator's carry chain, all in one cycle.

## Mapping the 8-point DCT

The end-to-end testbench `tb/tb_da_array.sv` maps two DCT forms onto the
default array:

1. **Plain DA.** It uses:
   * eight 12-bit shift registers (columns 0–1);
   * eight 256 × 8 tables, one per output, in the two memory columns;
   * eight 16-bit shift-accumulators (columns 3 and 7, beside the memories).

   The eight serial bits are broadcast over 1-bit tracks to all eight
   tables. This needs 16 of the 24 add-shift clusters and all 8 memory
   clusters.
2. **Odd-even decomposition.** Eight 12-bit adders/subtractors (columns 4–5)
   form x_i + x_{7−i} and x_i − x_{7−i} first. Each output then needs only a
   4-input table: 16 words in a 64 × 8 geometry with three of the four
   elements switched off. This uses every cluster of the array. The inputs
   are limited to 11 bits so the 12-bit sums cannot overflow.

The testbench reconfigures the array between the two forms at run time. It
finds the routes with a small maze router written in SystemVerilog:

* each net stays on one track index, which the same-index switch boxes need;
* each net grows as a tree from its source;
* a net that fails is moved to the front and the routing is retried.

Coefficients are round(30·c(u)·cos((2i+1)uπ/16)). Every output is checked
in three ways:

* against a bit-exact model of the recursion;
* against the exact dot product, to within one output LSB;
* for a latency of exactly 12 cycles after the load cycle.

## Where the design makes its own choices

The architecture fixes these points, and they are followed:

* the two cluster types and their sizes (4-bit modules, four per cluster;
  64 × 8 elements, four per cluster, with the geometries above and
  per-element power switches);
* the add-shift functions;
* the 4 × 8 arrangement with three add-shift clusters per memory cluster;
* six 8-bit and six 1-bit tracks, Fc = 6 and Fs = 3;
* C-boxes right of and below each cluster;
* flip-flop configuration loaded by a host.

The architecture does not specify the following, so they are choices of
this design:

* **Switch realisation.** OR-resolved buses instead of tri-state buffers; the
  behaviour is the same for legal configurations.
* **Switch-box pattern.** Same-index (disjoint) connections.
* **Pins.** The cluster pin list and pin roles, including the eight-bit
  address path from 1-bit tracks into a memory cluster.
* **Timing choices.** Asynchronous table reads. Add-then-shift for
  right-shift accumulation, with sign extension from the sum. `ld` marks the
  start of a word.
* **Memory grouping.** The mapping of lanes and rows onto elements.
* **Host interface.** The host port and configuration address map, and the
  edge I/O blocks as the way data enters and leaves the array. Edge channels
  and edge switch boxes are added so that I/O can reach the mesh.

The following points depart from, or read between, the architecture
description:

* **Input adder width in the odd-even DCT.** The drawing labels the input
  adders "12-bit", while the prose calls them 8-bit adders mapped to two
  modules. The testbench follows the drawing: 12-bit adders on three modules
  with 11-bit inputs.
* **Odd-even table depth.** The odd-even tables are described as 32 × 8 and
  as one 256 × 8 element each, while a 4-input table needs 16 words. The
  testbench uses 16 words in 64 × 8 geometry.
* **Performance numbers.** Area, power and frequency results (77 MHz for
  the array in 0.18 µm CMOS, against 210–250 MHz for hardwired ASIC DCTs)
  are not reproduced; nothing here is tied to a technology. The default
  array has a long combinational path (shift register → mesh → table → mesh
  → 16-bit carry chain), so its clock rate depends heavily on how far the
  router spreads a net.
* **Design-time sizing of the mesh.** The architecture lets the designer
  change the track counts, Fc and Fs. Here the track counts are constants in
  `da_pkg` (`N_TRK8`, `N_TRK1`). Connection boxes always reach every track
  (Fc = number of tracks), and switch boxes are fixed at Fs = 3. The
  configuration address map leaves room for up to seven tracks of each width
  before the per-tile word counts would have to grow. The array size
  (`ROWS`, `COLS`) is a parameter of the top.
* **Wider memories.** Memories wider than one cluster are built by routing
  the same address tracks to several memory clusters; no dedicated
  memory-to-memory links exist.
* **System around the array.** The host processor, the bus and the rest of
  the system-on-chip are outside the array, and none of them is built.

## Files

| File | Content |
|---|---|
| `rtl/da_pkg.sv` | types, pin assignment, configuration structs, address map |
| `rtl/addshift_module.sv`, `rtl/addshift_cluster.sv` | add-shift module and cluster |
| `rtl/mem_element.sv`, `rtl/mem_cluster.sv` | memory element and cluster |
| `rtl/sbox.sv`, `rtl/cbox.sv`, `rtl/io_block.sv` | mesh switches and edge I/O |
| `rtl/cfg_regs.sv` | configuration registers and table-write decoder |
| `rtl/da_array.sv` | top level (parameters `ROWS`, `COLS`) |
| `tb/tb_<block>.sv` | a self-checking testbench per block, and `tb_da_array` end to end |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops on its
own. A watchdog ends it if it hangs. For example, with Verilator 5:

    verilator --binary --timing -Wno-fatal --top-module tb_da_array \
        rtl/da_pkg.sv $(ls rtl/*.sv | grep -v da_pkg) tb/tb_da_array.sv
    ./obj_dir/Vtb_da_array

The block testbenches are built the same way. Each one needs `da_pkg.sv`
first and then the RTL files of its block.

The end-to-end run at the default size takes about two minutes to compile
and under a second to simulate. Verilator's UNOPTFLAT warnings come from the
mesh loops and the cascade vectors described above. They are expected.
