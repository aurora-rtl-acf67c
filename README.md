# A parametric king-mesh CGRA with double-buffered scratchpads

This is synthesizable SystemVerilog for a coarse-grained reconfigurable
array (CGRA) built from the generic architecture template of *AURORA:
Automated Refinement of Coarse-Grained Reconfigurable Accelerators*. In
AURORA, a design-space-exploration flow specialises that template for a set
of loop kernels. It picks the tile count, the operations of each functional
unit, the links between tiles and the buffer sizes. This RTL implements the
template itself, at the 4x4 design point the paper uses as an example
starting point. It has the knobs the exploration turns: per-FU operation
sets, tiles without an FU, a removable set of mesh links, and the
configuration and buffer sizes.

The main idea is spatial, statically scheduled execution. A loop body is
split into operations, and each tile is given the operations it runs in each
cycle of one loop iteration. The tiles repeat that schedule every II cycles
(the initiation interval), so a new iteration starts every II cycles. Nothing
in the array stalls or handshakes. A compiler or a person decides, for every
cycle, which value each tile computes and which wire carries it.

```
            north data buffer (2 halves x 2 banks)
          +----+----+----+----+
  west    | T  | T  | T  | T  |   east
  data    +----+----+----+----+   data      every T links to its 8 neighbours
  buffer  | T  | T  | T  | T  |   buffer    (N, NE, E, SE, S, SW, W, NW)
          +----+----+----+----+
          | T  | T  | T  | T  |
          +----+----+----+----+
          | T  | T  | T  | T  |
          +----+----+----+----+
            south data buffer
   DMA unit <-> system memory;   controller <-> host core
```

## Execution model: one configuration word per tile per cycle

Every tile contains a functional unit (FU), a configuration memory, two
general registers and a crossbar. The controller broadcasts one index,
`cfg_idx`, that counts 0, 1, ..., II-1, 0, ... while a kernel runs. In each
cycle every tile reads the configuration word at that index. The word says:

* which operation the FU performs (`op`, plus an immediate `imm` and a flag
  `use_imm` that replaces operand b by the immediate);
* for each of the 14 crossbar sinks, whether it is driven and from which of
  the 11 sources.

| crossbar sources (index)        | crossbar sinks (index)                  |
|---------------------------------|-----------------------------------------|
| 0..7 inports N, NE, E, SE, S, SW, W, NW | 0..7 outports, same order        |
| 8 FU result (`SRC_FU`)          | 8..11 FU operands a, b, c, d            |
| 9, 10 registers 0, 1 (`SRC_REG`)| 12, 13 registers 0, 1 (`DST_REG`)       |

All sources are flip-flops, so a cycle is always
*register → crossbar → FU → register*. The timing rules a schedule must
follow are:

* **Hops.** A value routed to outport `d` in cycle t is at the neighbour's
  inport `opposite(d)` in cycle t+1. It stays there until the sender
  overwrites it. A value moves one tile per cycle, diagonals included.
* **FU results.** An operation computed in cycle t is on the `SRC_FU` source
  from cycle t+1. It stays there until the next value-producing operation.
  `OP_NOP` and `OP_STORE` leave it unchanged.
* **Loads.** `OP_LOAD` in cycle t reads the buffer at `a + imm`. The word is
  on `SRC_FU` in cycle t+1, the same as an ALU result, and stays there.
* **Registers.** A register sink written in cycle t holds the new value from
  t+1.
* **Unused slots.** A configuration entry that was never written reads as a
  NOP with no routes, so unused tiles and unused slots do nothing.
* **Invocations.** A kernel runs for exactly `ii * iter` cycles. The cycle a
  start is accepted, every tile register is cleared, so each run starts from
  zeros. Pipeline fill and drain are part of `iter`.

### A worked mapping

`tb/tb_aurora_top.sv` maps the recurrence `s[i] = s[i-1] + 3*a[i]` with
II = 2 onto three tiles. Reading the mapping is the quickest way to learn the
model:

| tile | slot 0 | slot 1 |
|------|--------|--------|
| (0,0), west buffer | `LOAD a = FU` (address i); reg0 ← FU | `ADD reg0 + 1`; outport E ← FU (the loaded a[i]) |
| (0,1) | `MAC inW * 3 + reg0` (fused) | reg0 ← FU; outport SW ← FU |
| (1,0), west buffer | `ADD FU + 1` (store counter) | `STORE` word from inport NE at `FU + OUT_BASE - 3` |

Tile (0,0) keeps the loop counter in its FU-result register. Tile (0,1) keeps
the running sum in a register, and the fused multiply-add closes the
recurrence in one cycle. Tile (1,0) receives each sum over a diagonal link.
The first two iterations only fill this pipeline, so the kernel is started
with `iter = N + 2`.

## Functional units

`aurora_fu` is combinational. Its operations (`op_e` in `rtl/aurora_pkg.sv`)
are:

| group | operations |
|-------|-----------|
| arithmetic | `MOV` a, `ADD`, `SUB`, `MUL` (low 32 bits) |
| logic, shifts | `AND`, `OR`, `XOR`, `SHL`, `LSHR`, `ASHR` (shift amount b[4:0]) |
| compare | `LT` (signed), `LTU`, `EQ`, `NE`; the result is 1 or 0 |
| predication | `SEL`: c ≠ 0 ? a : b. Control flow becomes data flow. |
| memory | `LOAD` buffer[a+imm]; `STORE` buffer[a+imm] ← b |
| fused (complex FU) | `MAC` a*b + c; `MACLT` (a*b + c) < imm; `MSALT` ((a*b) + (c − d)) < imm (both compares signed) |

A *basic* FU has single operations only. A *complex* FU also has chains that
finish in one cycle. That shortens a loop-carried dependence at the price of
a longer critical path. The parameter `OP_MASK` (one bit per opcode; the
package defines `OPS_ALL` and `OPS_BASIC`) sets which operations an FU
instance is built with. An operation outside the mask does nothing and
raises `illegal`.

`MSALT` is the four-node pattern of the paper's tile drawing: a product and
a difference are added, and the sum is compared. The drawing gives the
nodes but not which value enters where. The operand assignment here is this
design's, and it is the only operation that uses the fourth operand d.

## Data buffers, banks and double buffering

There are four buffers, one on each side of the array: 0 west, 1 east,
2 north, 3 south. Each buffer has two halves. Each half has `NBANKS`
word-interleaved banks (bank = address mod NBANKS) of `BANK_DEPTH` words. By
default that is 2 x 128 words per half.

* **Which tiles can access memory.** Only edge tiles do, through their FU's
  load/store port. Column 0 uses the west buffer and column COLS-1 the east
  buffer; the port number is the row. The other tiles of row 0 use the north
  buffer and the other tiles of the last row use the south buffer; the port
  number is the column. Interior tiles have no memory port. They get data
  over the mesh.
* **Halves.** The tiles see the half selected by `array_half`. The DMA unit
  always sees the other half. `swap` exchanges the halves of all four
  buffers, and is accepted only while no kernel runs. This lets the next
  data tile come in, and the previous results go out, while the array
  computes.
* **Bank conflicts.** Each bank serves one tile access per cycle. If two
  ports hit the same bank in one cycle, the lower-numbered port wins. The
  other access is dropped (a lost load returns 0) and `conflict` goes high
  for that cycle. A correct static schedule places its accesses so that this
  never happens; `conflict` is there to catch a bad schedule.
* Reads take one cycle. Addresses wrap at the buffer size.

## Host interface (`aurora_top`)

The host core and the system memory are outside the design. A typical
sequence is:

1. Write configuration words with `cfg_we`, `cfg_tile` (row*COLS+col),
   `cfg_waddr` and `cfg_wdata`.
2. Move input data into the inactive half with the DMA. Set `dma_dir`=0,
   `dma_buf`, `dma_mem_addr`, `dma_buf_addr` and `dma_len`, then pulse
   `dma_start` and wait for `dma_done`.
3. Pulse `swap`.
4. Pulse `start` with `ii` and `iter`. `done` pulses `ii*iter + 1` cycles
   after the start cycle. Meanwhile the DMA can fill or drain the other half.
5. Swap again and read results out with `dma_dir`=1.

The memory bus is request/grant. `mem_req` is held until `mem_gnt`, and read
data returns with `mem_rvalid` any number of cycles later. The DMA keeps one
word in flight.

## Specialising the template

| parameter | where | meaning | default |
|-----------|-------|---------|---------|
| `ROWS`, `COLS` | top, array | array size (COLS ≥ 3 so that every buffer has a tile) | 4, 4 |
| `CFG_DEPTH` | top, array, tile | configuration words per tile, the largest II | 8 |
| `NBANKS`, `BANK_DEPTH` | top, buffer | banks per half, words per bank | 2, 128 |
| `OP_MASK` | top, array (32 bits per tile), tile, FU | operations each FU has (`OPS_BASIC`: a basic FU) | all 20 everywhere |
| `HAS_FU` | top, array (1 bit per tile), tile | 0: the tile is only a switch | all 1 |
| `LINK_MASK` | top, array (8 bits per tile) | king-mesh directions each tile keeps. A link exists when both of its end tiles keep it. `8'h55` in every tile gives a plain N/E/S/W mesh. | all 8 |

For tile t = row*COLS+col, the per-tile fields are bits `[32t+31:32t]` of
`OP_MASK`, bit `t` of `HAS_FU` and bits `[8t+7:8t]` of `LINK_MASK`. These
are the knobs that the AURORA exploration changes per tile.

The 4x4 size is the example starting point named in the paper. The paper
gives no data width, configuration depth or buffer size for a design. The
32-bit word, 8 configuration words and 256 words per buffer half are this
design's choices.

## How this RTL relates to the AURORA template

These parts follow the paper: the tile parts (FU, configuration memory,
registers, crossbar); the king mesh; the four scratchpad buffers made of
banks; basic and complex FUs; one configuration word per cycle, with the
number of words used setting II; removable tiles and FUs; predication by
select; a DMA unit with double buffering; and a compute time of II x #iter
per invocation.

These parts are this design's own: the word width; the opcode set and its
encoding; the crossbar source and sink lists; the timing of hops and loads;
the edge-tile-to-buffer mapping; bank interleaving and conflict handling; the
DMA descriptor and memory bus; the host interface; and the clear at start.

Not included:

* The AURORA exploration and mapping flow (loop transformations, operation
  fusion, simulated annealing, the estimation model). That is software.
* Any specific generated design. The paper reports results for specialised
  designs but does not describe their RTL.
* The systolic, CCA-like and MAERI-like variants of the paper's Figure 2.
  These are examples of what the template expresses. The mesh and
  switch-tile parts of them can be set with `LINK_MASK` and `HAS_FU`. They
  are not built or tested as separate designs.
* The host core and the system memory. A behavioural memory is in
  `tb/aurora_mem_model.sv`.

### The paper's workloads

The paper's workloads are gemm, conv, fir, blowfish, susan, latnrm, fft,
adpcm, bicg and mvt. Each has 12 to 55 operations before unrolling, which
fits the 128 operation slots (16 tiles x 8 words), although routing is
checked only for the example above. Only fir, blowfish and latnrm fit the
1024 words of one buffer half untiled. The others (for example gemm with
64x64 matrices, or susan with 600x450 pixels) must be loop-blocked into data
tiles. That is the intended use of the DMA and the double buffers. These
footprints assume one 32-bit word per element.

Two workloads are mapped by hand and simulated at the default size:

* **fir** (`tb/tb_aurora_fir.sv`) is a systolic 3-tap filter over 64
  samples at II = 1. A row of tiles acts as a delay line for x, with three
  cycles per hop. A row of fused-MAC taps passes partial sums, with two
  cycles per hop. Since x moves one cycle slower per hop than the partial
  sums, each tap adds the next older sample. It produces 64 outputs in 78
  cycles.
* **mvt** (`tb/tb_aurora_mvt.sv`) computes x1 = x1 + A·y1 for a 32x32
  matrix. The loop is blocked one row per invocation. x1[r] rides along as
  a 33rd column against a constant 1 in y1. While one row is computed, the
  DMA loads the next row into the other buffer half and drains the previous
  result. That is 32 invocations of 40 cycles each. The q = A·p half of
  bicg is the same kernel.

gemm, conv, blowfish, susan, latnrm, fft and adpcm are not mapped.

## Files

`rtl/`, one module or package per file:

* `aurora_pkg` holds the shared types: opcodes, configuration word and
  memory request.
* `aurora_fu`, `aurora_cfg_mem`, `aurora_xbar` and `aurora_tile` make up a
  tile.
* `aurora_array` is the tile grid and king-mesh wiring.
* `aurora_data_buffer` is one double-buffered, banked scratchpad.
* `aurora_dma` is the DMA unit and `aurora_ctrl` the invocation controller.
* `aurora_top` is the accelerator.

`tb/`:

* There is one self-checking testbench per module, `tb_<module>.sv`. Each
  prints `TB_RESULT checks=N failures=M` and has a cycle-count watchdog.
* `aurora_tb_pkg.sv` holds the shared helpers: an independent FU reference
  model and configuration-word builders.
* `aurora_mem_model.sv` is the behavioural memory model. It grants after a
  random wait and returns read data after a random delay.
* `tb_aurora_fir.sv` and `tb_aurora_mvt.sv` are the workload runs described
  above.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_aurora_top \
    -y rtl -y tb rtl/aurora_pkg.sv tb/aurora_tb_pkg.sv tb/tb_aurora_top.sv
./obj_dir/Vtb_aurora_top
```

Replace `tb_aurora_top` with any other testbench name. `tb_aurora_top` runs
at the default parameters, with no overrides. It runs the kernel above twice
with DMA transfers overlapping compute, then checks the following:

* both result vectors against a software prefix sum;
* that every run takes exactly II x iter cycles;
* that each of these happened at least once: DMA in and out, swaps,
  overlap, fused MAC, a diagonal-link transfer, and a provoked bank
  conflict.

The unit testbenches compare against their own models with random
stimulus:

* the FU, every opcode, against a reference function;
* the tile, random configurations against a cycle model;
* the buffer, random multi-port traffic against a two-half memory model;
* the DMA, random transfers checked word by word;
* the controller, random II and iteration counts.

All testbenches pass.
