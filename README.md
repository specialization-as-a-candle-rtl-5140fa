# Specialized hardware for the dark-silicon era: an image processing unit, conservation cores and a ring network in SystemVerilog

Chips can no longer power all of their transistors at full speed at the same time. One answer is to
spend the spare area on specialized hardware. Such hardware is far more energy-efficient than a
general-purpose core, and it is dark whenever it is not needed. This repository holds synthesizable
SystemVerilog for three published designs built on that idea:

* **The Image Processing Unit (IPU) of Pixel Visual Core.** A programmable stencil machine for camera
  pipelines. Eight cores each pair a 16x16 SIMD lane array (the Stencil Processor, STP) with a pool
  of line buffers (the Line Buffer Pool, LBP). The cores sit on a bidirectional ring, and an I/O
  block moves images in and out with a 16-channel DMA.
* **A GreenDroid tile with conservation cores (c-cores).** A c-core is a small accelerator
  generated from one hot function of a program. It shares the L1 data cache with the tile's CPU and
  is controlled through a pipelined register tree (the *state tree*). Patching hardware lets a c-core
  keep running newer versions of its function. The c-core built here is the array-sum example.
* **The MURN on-chip ring network of the MiniDroid test chip.** 80-bit packets circle a
  unidirectional ring of switches. Each switch can power down, reset or disable the design node
  behind it. An I/O block turns packets into bytes on four 8-bit off-chip channels.

`rtl/candle_top.sv` puts the three side by side. They do not talk to each other, and each brings
out its own ports.

## Building and simulating

Every file holds one module or package. `ipu_pkg` and `murn_pkg` must be compiled first. A
testbench and everything it needs build with plain Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/ipu_pkg.sv rtl/murn_pkg.sv tb/tb_ipu_lane.sv --top-module tb_ipu_lane
    ./obj_dir/Vtb_ipu_lane

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>`. Each has a watchdog that
counts a failure if the test hangs.

* The unit testbenches run in seconds. They override sizes where that helps; for example,
  `tb_ipu` uses 2 cores with 8x8 arrays.
* `tb/tb_candle_top.sv` runs the whole design end to end, with the IPU reduced to 2 cores of
  8x8 lanes. It builds in about half a minute. It counts each mechanism it exercises and fails if
  one of them never happened.
* The design has not been simulated at its default size: 8 cores, 16x16 arrays, 8192-word line
  buffers and 16 DMA channels. Verilator turns the 8 x 400 lanes into several hundred C++ files
  of generated code. On a 4-core machine their compilation runs far beyond an hour, even without
  C++ optimisation. The largest configuration simulated is the end-to-end test above: 2 cores of
  8x8 compute lanes (12x12 with halo), 4 line buffers of 1024 words, 4 DMA channels, plus the full
  GreenDroid tile and MURN ring. Full-size arrays are exercised only by lint and synthesis.
  To run `tb_candle_top` at full size, set its size localparams to the defaults.

`tb/ipu_prog_pkg.sv` holds small helpers that assemble IPU instructions and a 3x3-blur program.
The testbenches use them.

## The Image Processing Unit

### Data flow

An image pipeline is a chain of *kernels*, such as blur, demosaic or tone map. The IPU runs one
kernel per core and keeps every intermediate image on chip:

1. A DMA input channel reads the image from external memory in 4x4 blocks. It pushes them over
   the ring into a line buffer of the first core.
2. That core's Sheet Generator loads a *sheet* into the lane array: 16x16 pixels plus a 2-pixel
   halo on each side, so 20x20. The stencil program computes one output pixel per compute lane.
3. The Sheet Generator stores the 16x16 result, block by block, over the ring into a line buffer
   of the next core.
4. The last stage writes into the I/O block's own pool, LBP0. A DMA output channel drains it to
   memory.

Every step runs at the speed of its consumer. Line buffers give the back-pressure: a writer that
would overwrite rows a reader still needs is stalled, and a reader that asks for rows not yet
written is *starved* and waits. The pipeline therefore needs no global schedule. The hardware counts
stall and starve cycles per pool, and STP stall cycles per core.

### Line buffers (`ipu_line_buffer`, `ipu_lbp`)

A line buffer is a circular window onto an image. It has one writer and up to 8 readers, each
with its own read pointer:

* The writer's position is the number of complete rows written.
* A reader *releases* rows it no longer needs by advancing its pointer.
* A write of a 4-row band is allowed only while it stays within the capacity, `2^cap` rows, of the
  slowest enabled reader.
* A read of a 4x4 block is allowed once every row it touches has been written.
* A read outside the image is answered by the border mode: 0 zero, 1 repeat the edge pixel,
  2 mirror about the edge pixel. Because of this the halo of edge sheets needs no special code.

Each pool has 8 buffers of 8192 16-bit words (128 KB per pool). Configuration goes through the CSR
port, fields 0 to 4: width, height, capacity (log2 of rows), border mode and reader-enable mask.
Enabling resets the pointers.

### Stencil Processor (`ipu_stp`, `ipu_stp_array`, `ipu_lane`, `ipu_scalar_lane`, `ipu_sheet_gen`)

**Lanes.** The array is 20x20 lanes.

* The inner 16x16 are *compute lanes*. Each has 10 registers of 16 bits, two ALUs, a
  multiply-add unit (16x16 multiply plus 32-bit add, optional arithmetic right shift) and an
  8-cycle divider.
* The outer ring is *halo lanes*. They have 4 registers and only hold and shift data.
* Registers 0 to 3 of every lane can be read by other lanes through a 2D torus shift network: N,
  E, S or W, 1 to 4 hops, in one instruction.
* Each lane also has a small scratchpad (64 words in compute lanes, 32 in halo lanes). All lanes
  access the same scratchpad address together.

**Vector-math modes.** One instruction drives both ALUs in one of four modes:

| Mode | Meaning |
|---|---|
| `INDEP` | Two independent operations. |
| `CHAIN` | ALU0's result feeds ALU1 in the same cycle. |
| `PAIR` | The two ALUs form one 32-bit operation on register pairs. |
| `MAD` | Multiply-add into a register pair. |

A divide is issued as an ALU op. Its result is written at the end of the 8th cycle, and the scalar
lane holds issue until then.

**Scalar lane.**

* It holds the instruction RAM: 2048 entries of 119-bit VLIW words, written over the CSR port as
  four 32-bit staging words plus a commit.
* It has 16 scalar registers, one ALU, branches, and a broadcast operand into the lanes.
* Its control operations are:
  * sheet load / store (`SHLD`/`SHST`);
  * release line-buffer rows (`REL`);
  * wait for the Sheet Generator (`WAIT`);
  * interrupt and halt.
* A VLIW word packs a scalar part, a vector-math part, a vector-memory part and a 10-bit memory
  immediate. The immediate holds the shift direction in bits 1:0 and the hop count in bits 4:2;
  for sheet operations it holds the register and line buffer. The exact layout is in `ipu_pkg`.

**Sheet Generator.**

* It moves one 4x4 block per cycle.
* Loading a 20x20 sheet takes 25 blocks. The sheet is centred on the 16x16 compute region, and
  border modes fill whatever lies outside the image.
* Storing writes the 16 blocks of the compute region as flits on the ring. The destination can be
  any core's line buffer, or LBP0.
* It stalls on a starved read or when the ring pushes back.

### Ring and I/O block (`ipu_noc_stop`, `ipu_dma`, `ipu`)

**Ring.**

* The nine stops are linked clockwise in the order: I/O block, 1, 3, 5, 7, 8, 6, 4, 2. This
  interleaving places neighbouring core numbers one or two hops apart.
* Each flit carries one 4x4 block with its destination, line buffer and position.
* The sender picks the shorter direction. Each hop is one register stage with valid/ready.
* A flit takes hops + 2 cycles: one to enter the ring, one per hop, one to leave.
* A core can be powered off through the global power mask. Its stop keeps forwarding through
  traffic, but drops and counts flits addressed to it, and the core ignores start commands.

**DMA.** There are 16 channels, and each moves one rectangle in 4x4 blocks:

* input: memory to a line buffer of any pool;
* output: a line buffer of LBP0 to memory.

Active channels take turns round robin, one block per turn. A channel whose source buffer is not
ready gives up its turn, so a waiting output channel never blocks an input channel.

**CSR map (`ipu`).**

* `csr_addr[15:12]` selects the unit: 0 the I/O block, 1 to 8 a core, 15 global.
* `csr_addr[11:8]` selects the function:
  * core functions: instruction staging, instruction commit, line-buffer fields, start;
  * I/O block functions: line-buffer fields of LBP0, DMA channel fields. The DMA fields are
    direction, base, width, height, destination unit, line buffer, a spare field, and go.
  * global: the power mask.
* `irq` pulses when a program halts, a program interrupts, or a DMA channel completes.

The map is spelled out in the header of `rtl/ipu.sv`.

## The GreenDroid tile

### The array-sum c-core (`cc_array_sum`)

The c-core is a hardware copy of a loop that sums `n` words starting at address `a`. Its datapath
holds the registers `sum`, `a`, `i` and `n`, with an adder, an address adder (`a + 4*i`), a
comparator and a load unit. Its controller follows the function's control-flow graph
(init, s1, s2, s3, return) plus a self-loop that waits for the load to return.

*Patching* lets the same silicon run a changed version of the function:

* Generalized operators:
  * `cc_addsub` adds or subtracts;
  * `cc_gen_cmp` evaluates any of <, <=, >, >=, ==, !=;
  * `cc_bitwise_alu` computes and, or, xor or nor.
* Configurable constants (`cc_cfg_const`): the low 8 bits of a constant can be rewritten, the
  upper 24 are fixed.
* An exception bit on each of the 5 state transitions. Taking a marked transition stops the
  c-core in an exception state and raises an interrupt. Software then finishes that part of the
  function and resumes the c-core at a chosen state.

The c-core's status word is `{exc_edge[10:8], done[5], exc[4], state[3:0]}`. Its register map is in
the header of `rtl/cc_array_sum.sv`.

### State tree (`cc_state_tree`)

The CPU reaches every c-core register through a pipelined tree. The 32-bit address holds c-core
id `[31:26]`, basic block `[25:13]` and register `[12:0]`. The request climbs down three register
stages (tile, c-core, leaf), and a read answer climbs back up three:

* a write lands at the leaf in its 3rd cycle;
* a read answers in its 6th cycle.

### Cachelet and tile (`cc_cachelet`, `greendroid_tile`)

* Each c-core loads through a *cachelet*: a small direct-mapped, write-through L0 with 1 to 4 lines
  and tags compared inside the c-core. A hit answers in one cycle. A miss fills the line from the
  L1.
* The tile multiplexes its one L1 data-cache port between the CPU and the c-cores. A running
  c-core owns the port, and CPU accesses wait.
* The CPU, the caches and the mesh network are outside the tile. Their ports are brought out.

## The MURN ring (`murn_switch`, `murn_io_block`, `murn_ring`)

**Packets.** The 80-bit packet, least significant field first, is: source id (4 bits),
destination id (4), command bit (1), opcode (7) and data (64). Id 0 is the I/O block.

**Switches.** Packets travel one switch per cycle around a unidirectional ring. A switch takes a
packet whose destination is its own id off the ring:

* A *command* packet configures the switch itself. The opcodes are 1 power, 2 reset and 3 enable,
  with the new value in data bit 0.
* A *data* packet goes to the node. If the node is powered off, disabled or held in reset, the
  packet is dropped and counted.

Switches never power down, so the ring stays whole.

**I/O block.**

* Each of the four channels has a byte-wide valid/ack pair in each direction.
* A packet leaves as 10 bytes, least significant first, on the lowest-numbered enabled idle
  channel. Each byte is held until it is acknowledged.
* Ten bytes received on a channel become one packet on the ring.
* A disabled channel acknowledges nothing.

**Design nodes.** Their ports, including the power, reset and enable controls, are brought out of
`murn_ring`.

## What the tests cover

Every testbench compares against values it computes itself, from random stimulus (`$urandom`).

* **Operator units.** ALU, multiply-add, divider and the c-core operators are checked
  exhaustively on their modes, with random operands.
* **Divider timing.** The divider's 8-cycle latency is checked, both alone and in a lane.
* **Lane array.** Torus shifts in all directions and hop counts.
* **Sheet Generator.** Sheet loads and stores take one cycle per 4x4 block. This is checked at
  an 8x8 array: 9 cycles per load, 4 per store.
* **Line buffers.** Stall, starve, all three border modes and wrap-around.
* **Ring.** Latency of hops + 2 cycles to every destination, back-pressure, and power-down drops.
* **DMA.** Round-robin channels.
* **State tree.** Write and read latency (3rd and 6th cycle).
* **Cachelet.** Hits, misses and write-through.
* **Array-sum c-core.** Every patch and both exception points.
* **MURN.** Channel choice, byte order, command packets and drops.
* **IPU end to end.** `tb_ipu` and `tb_candle_top` run a 3x3 box blur as a two-stage pipeline:
  1. DMA in to core 1, with a repeat border;
  2. horizontal sums to core 2, with a mirror border;
  3. vertical sums to LBP0;
  4. DMA out to memory.

  They compare every output pixel with a reference. They also require line-buffer stalls, starved
  reads and STP stalls to have happened. Finally they power down core 2 and check that its traffic
  is dropped.
* **Full design.** `tb_candle_top` also runs the array-sum c-core (plus an exception run) and
  MURN traffic with a node power-down. It prints a count for each mechanism.

## Where this RTL departs from the published designs

**Numbers.** These follow the published designs: 8 cores, 16x16 compute lanes with a 2-lane halo,
10 and 4 registers per lane, 16-bit words, 119-bit VLIW, 8 line buffers of 128 KB per pool with 8
readers each, 16 DMA channels, an 8-cycle divide, 4 shift-visible registers with up to 4 hops, 3-
and 6-cycle state-tree latency, and the MURN packet and channel format. Everything below is this
design's own choice.

**Encodings and maps (not published):**

* opcodes;
* the VLIW field layout inside its 119 bits;
* the CSR map;
* MURN switch opcodes;
* c-core register maps;
* the ring's flit format.

**Policies (not published):**

* DMA round robin;
* lowest-free-channel selection in the MURN I/O block;
* reclaiming line-buffer space in whole 4-row bands;
* splitting each pool's SRAM equally between its 8 buffers.

**Simplified:**

* The ring carries only writes (block pushes). A Sheet Generator reads only its own pool.
* Scratchpad access is uniform across lanes. Per-lane divergent addressing is not built.
* The Sheet Generator does not up- or downsample, stride or transpose.
* The DMA does not read camera streams or load instruction RAMs. Instruction RAMs are written over
  the CSR port. The DMA has no row pitch separate from the width, so it cannot cut a stripe out of
  a wider frame.
* The MURN channels run on the core clock. The published design clocks them source-synchronously.

**Not built** (outside the scope of RTL from the published description):

* the IPU's control CPU, MMU, shared storage pool, MIPI, PCIe and LPDDR4 interfaces, and DRAM;
* the tile's MIPS CPU, FPU, caches and mesh network;
* the MiniDroid PLL, pads and SRAM macros;
* the adapter between a MURN switch and a design node;
* c-cores other than array sum. Real c-cores are generated per application.

**Capacity.** A full 12-megapixel frame (4032 pixels wide) does not fit a line buffer in one
piece. A 24-row band would need about 97 k words against 8192. Running it would need vertical
stripes, and for that the DMA would need a row pitch.
