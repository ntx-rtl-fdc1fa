# NTX — a near-memory training accelerator cluster in SystemVerilog

Training a deep neural network is mostly long float32 reductions:
convolutions, fully connected layers and their gradients. Each one is a loop
nest that multiplies and accumulates values from memory. NTX moves that work
into the logic layer of a memory cube, close to the data.

The processor core does not issue every multiply-accumulate. It describes a
whole nest of up to five loops once: loop bounds, start addresses and
per-loop strides. It then hands the nest to a small coprocessor, the NTX.
The NTX walks the nest by itself with hardware loop counters and address
generators. It streams operands from the cluster's shared scratchpad and
accumulates them without rounding in a wide fixed-point register. It writes
results back at the loop level chosen in the command.

One RISC-V core controls eight NTX in a cluster. The cluster has:

* 128 kB of banked, tightly coupled data memory (TCDM);
* a 2D DMA engine that double-buffers tiles between the TCDM and main memory.

Sixteen clusters share a 128 kB L2 and reach the memory cube through an SoC
interconnect. That is the small configuration; 64 clusters make the big one.
This repository has the RTL of that SoC, minus the processor cores and the
memory cube itself, and self-checking testbenches for every module.

```
  ntx_soc:  16 x ntx_cluster --(DMA 64b, core 32b)--> ntx_soc_interconnect
                                                       |-- ntx_l2 (128 kB)
                                                       '-- 4 x 256-bit ports to the memory cube

  ntx_cluster:
            core data port (core_req_i / core_rsp_o)
                     |
               ntx_cluster_bus ---- NTX 0..7 registers, DMA registers, SoC port
                     |
  +------------------+---------------------------------------------+
  |                 ntx_tcdm_xbar (19 masters x 32 banks)           |
  +--+-----+-----+-----+-----+ ... +-----+-----+-----+-----+--------+
     |     |  2 ports per NTX      |     | 2 DMA ports |
     |   ntx 0 ...             ntx 7   ntx_dma ---- 64-bit SoC port
     |
  32 x ntx_tcdm_bank (1024 x 32 bit each = 128 kB)
```

## The loop-nest offload model

An NTX command describes a perfectly nested loop of up to five levels.
L0 is the innermost loop and L4 the outermost. The body of each innermost
iteration is one operation `x = f(x, a, b)`. Take the convolution kernel the
design targets, with the outermost output-channel loop kept on the core:

```
for n in 0..N-1                 L4
  for m in 0..M-1               L3     init x = b[k]      (init level 3)
    for d in 0..D-1             L2
      for u in 0..U-1           L1
        for v in 0..V-1         L0     x += in[d][n+u][m+v] * w[k][d][u][v]
    y[k][n][m] = x                     (store level 3)
```

The command word gives three levels:

* **outer level**: how many loops run (1..5).
* **init level**: the accumulator is initialised whenever all loops *below*
  this level are at iteration 0. Level 0 means every iteration; level 3 in the
  example means once per output pixel. The initial value is 0.0 or a word read
  through AGU0, AGU1 or AGU2.
* **store level**: the accumulator is written to the address in AGU2 whenever
  all loops below this level are at their last iteration.

### Hardware loops (`ntx_hwloop`)

There are five 16-bit counters. Each holds the *last index* of its loop, that
is, iterations − 1, so 65536 iterations fit. Every step advances L0. When a
counter is at its last index it wraps to 0 and enables the next counter for
that one step. The step also reports the **highest level that advanced**.
That level drives the address generators. Loops above the outer level act as
if they are always at their last iteration.

### Address generators (`ntx_agu`)

There are three AGUs. Each is a 32-bit address register with five strides,
one per loop level. On each step, an AGU adds exactly one stride: the stride
of the highest loop level that advanced.

A stride is therefore not "distance between iterations of this loop" in the
usual sense. It is the jump from the last iteration of all inner loops to the
first iteration of the next outer iteration. For a plain row-major walk over
`A[M][N]` with loops L0 = n and L1 = m:

| AGU | stride L0 | stride L1 |
|---|---|---|
| `A` | `4` | `4` (the next row follows) |
| vector `x[n]`, reused per row | `4` | `-4*(N-1)` (rewind) |
| output `y[m]` | `0` | `4` |

The AGU roles:

* AGU0 feeds operand *a* on read stream 0. A command can select AGU1 or AGU2
  for *a* instead, for example to update a vector in place.
* AGU1 feeds operand *b* on read stream 1.
* AGU2 is the store address. It is also a possible init source.

Base addresses are loaded when a command starts.

## Exact accumulation (`ntx_fmac`, `ntx_pcs_norm`)

The multiply-accumulate unit never rounds inside a reduction. Each product of
two float32 values is exact: a 48-bit mantissa and an exponent. It is shifted
to its binary position and added into a **300-bit two's-complement
fixed-point accumulator**. The binary point sits 150 bits from the bottom.
That covers the product of any two normal float32 values and leaves headroom
for long sums. Because of this, the result of a reduction does not depend on
the order of its terms. Only the final conversion back to float32 rounds.

A 300-bit adder in one cycle would be slow, so the accumulator is split into
**two 150-bit segments** and kept in *partial carry-save* form:

* Each cycle, the low segment adds its part of the shifted product.
* Its carry-out is not passed on in the same cycle. It is registered.
* The high segment adds its part plus the carry saved from the previous cycle.

The state is `{hi, carry, lo}`. Its value is `hi·2^150 + carry·2^150 + lo`.
The unit takes one product per cycle with no stall. Results beyond the range
set a sticky overflow flag.

`ntx_pcs_norm` turns that state back into float32 when a result is stored:

1. Resolve the pending carry into the high segment.
2. Take the sign and the magnitude.
3. Find the leading one.
4. Round to nearest-even on guard/sticky bits.
5. Produce denormals, zero (+0) or infinity as needed. Overflow gives infinity.

In this RTL the conversion is combinational.

## Operations (`ntx_fpu`)

The datapath takes one micro-command per cycle from its command FIFO. Each
micro-command is init / body / store with its operand sources. The datapath
waits until every operand it needs is in the read-data FIFOs and there is room
in the store FIFO.

| opcode | value | body | operand b |
|---|---|---|---|
| MAC    | 0 | x += a·b | *AGU1 |
| NMAC   | 1 | x −= a·b | *AGU1 |
| ADD    | 2 | x += a   | 1.0 |
| SUB    | 3 | x −= a   | 1.0 |
| MAX    | 4 | x = max(x, a) | – |
| MIN    | 5 | x = min(x, a) | – |
| ARGMAX | 6 | index of the largest a | – |
| ARGMIN | 7 | index of the smallest a | – |

MAC/NMAC/ADD/SUB use the exact accumulator. Details:

* An init from memory loads `1.0·value` into the cleared accumulator.
* MAX/MIN use a float comparator and a 32-bit ALU register.
* ARGMAX/ARGMIN also keep a 16-bit index counter:
  * it counts body iterations since the last init;
  * the init value, if any, counts as index 0;
  * ties keep the first index;
  * the stored result is the index as an unsigned integer.
* With the ReLU bit set, negative results are stored as +0.
* A store leaves the datapath one cycle after its last body.

## Memory side: streams, FIFOs and the writeback interleaver (`ntx_interleaver`)

Each NTX has two 32-bit master ports into the TCDM. They carry two read
streams (operands a and b) and one write stream (results). The FIFOs are:

| FIFO | depth |
|---|---|
| command | 5 |
| read address, each stream | 5 |
| read data RD0, RD1 | 5 |
| store address | 7 |
| store data | 7 |

Port use:

* Port 0 serves read stream 0 and port 1 serves read stream 1.
* A store goes out on a port that has no read to issue in that cycle, port 1
  first.
* When the store FIFOs are full, a store takes port 1 ahead of its read, so
  results always drain.

A read is issued only if its data FIFO will have room for the answer. Each
port never has more reads in flight than free entries, so no port ever has to
drop data.

The controller (`ntx_controller`) issues one body per cycle when nothing
stalls. It adds one extra cycle (an *init slot*) wherever the initial value
comes from memory. It stalls whenever a FIFO it would push into is full, so
bank conflicts in the TCDM back-pressure the whole NTX without losing data.
A command counts as done when the last store has been written to memory.

Without stalls, an `M×N` matrix-vector product with memory init takes
`M·N + M` cycles plus a fixed pipeline latency of a few cycles. The
testbench checks this.

## Programming an NTX (`ntx_regif`)

Registers are 32 bits wide, at byte offsets from the NTX's base:

| offset | register | meaning |
|---|---|---|
| 0x00 | STATUS | [0] busy, [1] command slot full (read only) |
| 0x04 | CTRL | [0] interrupt enable |
| 0x08 | IRQ | [0] done flag; write 1 to clear |
| 0x10 + 4j | BOUND j | last index of loop j (j = 0..4) |
| 0x30 + 4g | BASE g | start address of AGU g (g = 0..2) |
| 0x40 + 4(5g+j) | STRIDE g,j | stride of AGU g for loop j |
| 0x80 | CMD | write the command word to launch |

The command word has these fields:

| bits | field |
|---|---|
| [17:16] | operand a source: 0 = *AGU0, 1 = *AGU1, 2 = *AGU2, 3 = opcode default (*AGU0) |
| [15] | ReLU |
| [14:13] | init source: 0 = *AGU0, 1 = *AGU1, 2 = *AGU2, 3 = 0.0 |
| [12:10] | outer level |
| [9:7] | store level |
| [6:4] | init level |
| [3:0] | opcode |

How commands are staged and queued:

* BOUND, BASE and STRIDE writes go to a staging area.
* Writing CMD copies the staging area and the command word into a one-entry
  command slot. The core can then prepare the next command while the current
  one runs.
* When the slot is already full, the CMD write is not granted until the slot
  empties. The core stalls on the bus instead of losing the command.

Loop bounds and strides that stay the same across commands are written only
once.

## The cluster (`ntx_cluster`)

**Interconnect (`ntx_tcdm_xbar`).** 19 masters share 32 banks:

* the core's bus at master 0;
* NTX k's two ports at masters 1+2k and 2+2k;
* the DMA's two ports last.

Words are interleaved across banks: the bank is address bits [6:2]. Each bank
takes one request per cycle and arbitrates round-robin. The losers see no
grant and retry, which is a bank conflict. Read data returns one cycle after
the grant.

**Cluster bus (`ntx_cluster_bus`).** This bus decodes the core's data
accesses:

| address | target |
|---|---|
| `0x1000_0000` – `0x1001_FFFF` | TCDM |
| `0x1020_0000 + k·0x100` | NTX k registers |
| `0x1020_1000` | DMA registers |
| anything else | the SoC port (`soc_req_o`) |

The bus has one access in flight. It waits for the answer, however late it
comes from the SoC side, before it forwards the next request.

**DMA (`ntx_dma`).** The DMA moves `REPS` rows of `LEN` bytes between the
64-bit SoC port and the TCDM. Source and destination have separate row
strides. Each 64-bit beat is one external access and two 32-bit TCDM writes
or reads on its two ports. The registers are:

| offset | register |
|---|---|
| 0x00 | SRC |
| 0x04 | DST |
| 0x08 | LEN |
| 0x0C | SRC_STRIDE |
| 0x10 | DST_STRIDE |
| 0x14 | REPS |
| 0x18 | START |
| 0x1C | STATUS |

START and STATUS bits:

* START bit 0 sets the direction. 1 means TCDM → external.
* STATUS bit 0 is busy. Bit 1 is done; write 1 to clear it.
* Addresses and lengths must be multiples of 8.

**Buses.** All buses use a request/grant handshake. A request is accepted in
a cycle where `req` and `gnt` are both high. `rvalid` and `rdata` follow
later, for writes too. Inside a cluster they follow exactly one cycle later.
At the SoC level they may take any number of cycles, in request order.

## The SoC (`ntx_soc`, `ntx_soc_interconnect`, `ntx_l2`)

`ntx_soc` holds `NUM_CLUSTERS` clusters (default 16), the L2 and the SoC
interconnect. Each cluster has two masters on the interconnect:

* its DMA (64 bit);
* its processor's accesses that leave the cluster. These are 32 bit, carried
  in the upper or lower half of a 64-bit access according to address bit 2.

The interconnect is a crossbar with round-robin arbitration per target. Its
targets:

| address | target |
|---|---|
| `0x1C00_0000` – `0x1C01_FFFF` | L2: 64-bit, one-cycle latency |
| anything else | one of `NUM_PORTS` (default 4) 256-bit ports to the memory cube |

Cube ports are interleaved on 32-byte lines: the port is address bits [6:5].
A 64-bit access uses the 64-bit lane given by address bits [4:3]. Its byte
enables move to that lane, and read data is taken from it.

A cube port may answer after any delay, but in order. A small FIFO per
target records which master and lane each answer belongs to. A target with a
full FIFO accepts nothing more.

Each cluster sees its own TCDM and peripherals at the same addresses. One
cluster cannot address another cluster's TCDM. Clusters share data through
the L2 or the cube.

## What is modelled and what is not

Faithful to the architecture:

* 5 nested 16-bit hardware loops.
* 3 AGUs with 32-bit addresses and 5 strides each, adding the stride of the
  highest advancing loop.
* A single-rounding ~300-bit accumulator in two carry-save segments.
* Normalisation back to float32.
* The FIFO depths listed above.
* Two memory ports per NTX with two read streams and one write stream.
* 8 NTX per core, 128 kB TCDM in 32 banks on a logarithmic interconnect.
* A 2D DMA with a 64-bit SoC port.
* Configurable init and store levels.
* Comparator, ALU register, index counter and ReLU in the datapath.

Choices of this design, where the architecture gives no detail:

* the register map, command word layout and opcode encoding;
* the set of operations besides MAC;
* the position of the binary point (150 fraction bits);
* the interleaver's port policy;
* the DMA register map and its one-beat-at-a-time sequencing;
* the cluster address map;
* the bank word interleaving and round-robin arbitration;
* the one-entry command slot;
* the SoC address map, the number of cube ports and the line interleaving
  across them.

Departures and limits:

* **One clock.** The architecture runs the NTX at twice the cluster
  frequency (1.5 GHz vs 0.75 GHz). Here everything runs on one clock.
* **Not included:**
  * the RISC-V cores and their instruction caches;
  * the memory cube: main logic-base interconnect, vault controllers, DRAM
    and serial links.

  The cores' data ports and the 256-bit cube ports are ports of `ntx_soc`.
  The testbenches play the cores and the cube.
* The architecture has one 64-bit link per cluster into the SoC interconnect.
  Here the DMA and the processor have one link each.
* NaN inputs are not treated specially.
* Normalisation is combinational. A fast implementation would pipeline it.
* The DMA keeps only one beat in flight. It is slower than a real burst
  engine, but its function is the same.

## Simulation

Each module `X` in `rtl/` has a self-checking testbench `tb/tb_X.sv`. Each
testbench:

* prints `TB_RESULT checks=<n> failures=<m>`;
* has a watchdog.

`tb/ntx_tb_pkg.sv` holds float32 helpers for the testbenches.

Run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/ntx_pkg.sv tb/tb_ntx_soc.sv --top tb_ntx_soc -o sim
./obj_dir/sim
```

### Full SoC test (`tb_ntx_soc`)

`tb_ntx_soc` runs the whole SoC at its default size. That is 16 clusters of
8 NTX, plus the L2 and four cube ports. The testbench plays the sixteen cores
and the cube. The cube grants at random and answers after random delays. All
clusters work at the same time. Each cluster:

1. loads two vectors from the cube by 2D DMA;
2. runs a dot product on one of its NTX;
3. writes the result to the L2 by DMA;
4. reads it back through the interconnect;
5. writes and reads a word in the cube;
6. copies a vector back to the cube.

It counts and requires arbitration stalls, L2 accesses, traffic on every cube
port, one NTX completion per cluster and overlapping DMA transfers.
The run ends after about 1300 cycles. Building the 16-cluster model takes
about seven minutes on one core.

Lint tools may report a circular combinational path through the cluster
bus when the cluster sits inside the SoC. It is not a real loop. The header
of `ntx_cluster_bus.sv` explains why.

### Cluster test (`tb_ntx_cluster`)

`tb_ntx_cluster` runs the full cluster at its default size: 8 NTX, 32 banks,
128 kB. The testbench acts as the core and as main memory. It runs a
double-buffered, tiled convolution:

* 8 output channels, one per NTX;
* 4 input channels;
* 3×3 kernels;
* two tiles of 8×8 outputs from an 8×16 image.

The flow:

1. The DMA loads tile 1 while the NTX compute tile 0.
2. Results are written back by DMA.
3. Every output is compared with a reference computed in the testbench.

It counts and requires each mechanism at least once:

* DMA transfers in and out;
* DMA traffic overlapping NTX work;
* TCDM bank conflicts;
* init slots;
* stores on both ports;
* datapath stalls;
* commands queued while busy;
* done interrupts.

It takes about half a minute including the build.

The smaller testbenches cover:

* rounding and denormal corner cases of the normaliser;
* one MAC per cycle through the accumulator;
* the cycle count of a matrix-vector product;
* random traffic on the interconnect, with starvation checks.
