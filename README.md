# Amber accelerator subsystem in SystemVerilog

Amber is a coarse-grained reconfigurable array (CGRA) for dense linear
algebra: imaging, vision and neural-network kernels. This RTL covers its
accelerator subsystem. Three ideas shape the hardware:

* **Configuration is fast enough to change at run time.** Each of the 16
  global-buffer (GLB) tiles keeps bitstreams in the same SRAM banks as
  application data. Each GLB tile pushes one configuration word per cycle into
  its own lane of a pipelined configuration network. All 16 lanes run in
  parallel: 16 x 28-bit words, or 448 bits, per cycle. Each GLB tile can
  reconfigure and restart its own two columns of the array while the other
  columns keep running. This is dynamic partial reconfiguration (DPR).
* **Memories are streams, not random-access ports.** The global buffer, the
  MEM tiles and the PE register files all use the same affine streaming
  controller. The controller walks an N-deep loop nest and produces two things
  for each iteration:
  * an address, `offset + sum(stride_k * i_k)`;
  * an issue cycle, computed the same way.

  Both are kept as running sums, so the controller needs no multiplier.
* **Expensive arithmetic is composed, not built in.** The PE's BFloat16 ALU has
  helper operations that get the mantissa (GETMAN) and subtract exponents
  (SUBEXP). A MEM tile can act as a lookup ROM. Together these build division
  from three PEs and one MEM tile, so no PE needs a divider.

## Array organisation

| Part | Default size |
|---|---|
| CGRA | 32 columns x 16 rows = 512 tiles |
| Tile types | 384 PE tiles and 128 MEM tiles; columns 3, 7, 11, ... are MEM |
| Global buffer | 16 GLB tiles x 2 banks x 128 KB = 4 MB |
| MEM tile SRAM | 512 x 64 bit = 4 KB |
| PE register file | 32 x 16 bit = 64 B |
| Routing | a 16-bit and a 1-bit network, 5 tracks per side each |

Every column holds a single tile type. GLB tile `t` serves columns `2t` and
`2t+1`:
* its load unit drives north track 0 of row 0 in column `2t`;
* its store unit samples north track 0 of row 0 in column `2t+1`;
* its configuration unit writes both columns.

A kernel that needs a MEM tile spans at least four columns, so the array holds
up to eight such kernels side by side.

Module hierarchy:

```
amber_top
├── amber_glb            16 x amber_glb_tile
│   └── amber_glb_tile   2 x amber_sram_sp (16384 x 64), amber_glb_ld, amber_glb_st, amber_glb_pcfg
├── amber_cfg_net        per-column configuration pipeline, host word merge
└── amber_cgra           NCOL x NROW amber_tile
    └── amber_tile       amber_sb (16b, 1b), amber_cb x 6, amber_pe_core | amber_mem_core
        ├── amber_pe_core   amber_alu, amber_pe_rf
        └── amber_mem_core  2 x amber_sipo, amber_sram_sp (512 x 64), 2 x amber_piso
amber_stream_ctrl        ID + AG (+ SG), used by every memory above (amber_id, amber_ag, amber_sg)
amber_pkg                geometry, opcodes, configuration records
```

## The affine streaming controller (`amber_stream_ctrl`)

This block is used everywhere, so it is worth understanding first. It has
three parts:

* **ID (iteration domain).** A chain of up to six counters with per-level
  extents.
* **AG (address generator).** An accumulator that holds the current address.
* **SG (schedule generator).** An accumulator that holds the cycle on which
  the current iteration must happen. A free-running cycle counter is compared
  with it, and the comparison is the enable.

**Why no multiplier is needed.** When level `k` increments, all lower levels
wrap to zero at the same moment. The address therefore changes by a constant:

    delta_k = s_k - sum_{j<k} s_j * (extent_j - 1)

The configuration stores these deltas, not the strides. Each step adds the
delta of the highest level that increments. The conversion from strides is the
compiler's job. `tb_amber_stream_ctrl` holds a reference implementation of
the conversion.

**Configuration record.** `affine_cfg_t` is 21 16-bit registers:

| Register | Field |
|---|---|
| 0 | `dims` (0 disables the controller) |
| 1..6 | extents |
| 7 | address offset |
| 8..13 | address deltas |
| 14 | start cycle |
| 15..20 | schedule deltas |

A 14-register half form holds `dims`, the extents, one offset and six deltas.
It is used where only an AG or only an SG is needed.

**Timing.** `start` sets the cycle counter to 0. Iteration `n` asserts `valid`
with its `addr` on cycle `sched(n)`. Schedules must be strictly increasing.

## MEM tile (`amber_mem_core`)

A single-port 512 x 64-bit SRAM serves two 16-bit input streams and two
16-bit output streams. This is "wide fetch":

* **Inputs.** Each input has a schedule generator. On each scheduled cycle the
  SIPO takes a word. When the SIPO holds four words it requests a 64-bit write.
* **Shared write address.** Both SIPOs share one write address generator. A
  priority encoder serves SIPO 0 first.
* **Reads.** One read controller (AG plus SG) issues wide reads for both
  outputs. In `dual` mode it alternates between output 0 and output 1. Each
  PISO hands out words on its output's schedule.
* **Delayed read.** Writes win the single port. A read that collides with a
  write moves to a one-entry hold slot and is issued on the next cycle. Keep
  this in mind when writing schedules: reads slip by at most one cycle.
* **Chaining.** With ctrl bit 2 or 3 set, an output forwards the
  neighbour's `chain_in` stream on cycles when it has nothing of its own. This
  lets several MEM tiles act as one larger buffer.
* **ROM mode** (`mode = 1`):
  1. Input 0 fills the SRAM as usual.
  2. Afterwards, every cycle, input 1 is taken as a word address: bits 10:2
     select the row and bits 1:0 the lane.
  3. Output 0 returns the entry one cycle later.

  This is the lookup table used for BFloat16 reciprocal.
* **`err` (sticky).** Set by a SIPO overflow, a read delayed twice, or an
  output whose scheduled word is not ready. Any of these means the schedule
  is wrong.

| Register | Contents |
|---|---|
| 0 | ctrl: `[1:0]` mode, `[2]` chain out0, `[3]` chain out1, `[4]` dual |
| 1 / 15 | input 0 / input 1 schedules (half form) |
| 29 / 43 | output 0 / output 1 schedules (half form) |
| 57 | write AG (half form) |
| 71..91 | read controller (full form) |

## Processing element (`amber_pe_core`, `amber_alu`, `amber_pe_rf`)

**Operands.** Two 16-bit operands come through connection boxes. Each operand
can be passed through, delayed by one register, or replaced by a constant.

**LUT.** Three 1-bit inputs, each optionally delayed, index an 8-entry LUT.
The LUT bit is the ALU's carry/select input. It is also a 1-bit output.

**COND.** Selects a flag and drives the other 1-bit output.

**ALU operations.**

| Class | Operations |
|---|---|
| INT/BIT | ADD, SUB, ADC, SBC, ABS, GTE, LTE, SEL, MUL (low half), SHR, SHL, OR, AND, XOR |
| BFloat16 | FADD, FSUB, FCMP, FMUL, GETMAN, ADDIEXP, SUBEXP, EXP2F, F2INT, GETFR, INT2F |

**BFloat16 arithmetic.** Results are truncated, not rounded. Subnormal values
are flushed to zero.

**How the division helpers fit together.** Write `b = 1.f * 2^x`.

1. `GETMAN b` gives `f`.
2. A MEM ROM maps `f` to a BFloat16 value `{g,h}` equal to `1/1.f`.
3. `SUBEXP({g,h}, b)` builds `{sign, e_gh - e_b + 127, g}`, which is `1/b`.
4. `FMUL a, 1/b` gives `a/b`.

**Register file.** A 64-byte register file is written from operand 0 by one
affine controller and read by another. Its read stream is the PE's second
16-bit output. This makes a PE usable as a small delay line or reuse buffer.

The ALU is combinational. A PE adds latency only through its optional operand
registers.

## Routing (`amber_sb`, `amber_cb`, `amber_tile`, `amber_cgra`)

**Switch boxes.** Each tile has a 16-bit and a 1-bit switch box with 5 tracks
per side. Each outgoing wire has a 4-bit selector:

| Bits | Meaning |
|---|---|
| `[2:0]` = 0 | drive zero (the reset value, so an unconfigured array has no loops) |
| `[2:0]` = 1..3 | the same track from the other three sides, clockwise from the outgoing side |
| `[2:0]` = 4, 5 | core output 0 or 1 |
| `[3]` | send through a pipeline register |

**Connection boxes.** Each one selects `side*5 + track + 1`, or zero when the
select is 0.

**Configuration registers of a tile** (7-bit address):

| Register | Contents |
|---|---|
| 0..9 | switch-box selectors, 4 per register; wire index `(width*4 + side)*NT + track` |
| 10..15 | connection boxes: 16-bit CB 0..2, then 1-bit CB 0..2 |
| 16 and up | core registers |

**Combinational paths.** A route with no pipeline register is combinational
through every tile it crosses. A configuration that closes a loop without a
register is an invalid configuration; the hardware does not detect it. Lint
tools report the mesh as a possible combinational loop for this reason.

## Configuration path (`amber_glb_pcfg`, `amber_cfg_net`)

**Word format.** A configuration word is 28 bits:
`{col (relative to the GLB tile), row[3:0], reg[6:0], data[15:0]}`.

**Bitstream storage.** Bitstreams are stored two words per 64-bit GLB row, in
bits 27:0 and 59:32. The configuration unit reads rows at bank priority below
load and store. Its output is one word per cycle: the first word of each row
passes straight through and the second is buffered.

**Pipeline.** Each column has a register at its top. A second register sits
mid-column for the lower eight rows. The upper rows see a word one cycle after
it enters the network, and the lower rows two cycles after. The tile's
register is written one cycle after that.

**Host path.** The host can write single 32-bit words
`{col[4:0], row[3:0], reg[6:0], data[15:0]}`. A host word is accepted only
when the owning lane is idle.

**Full-array cost.** A full-array bitstream of about 1,100 words per GLB tile
takes about 2.2 µs at 520 MHz. This is an estimate, not a simulated
measurement.

## Global buffer (`amber_glb_tile`, `amber_glb_ld`, `amber_glb_st`, `amber_glb`)

**Load unit.** An affine controller over 16-bit word addresses. It reads a
64-bit row only when the row changes, and emits a word on every scheduled
cycle.

**Store unit.** Samples its column on scheduled cycles. It writes one 16-bit
lane per write, using a lane mask.

**Bank arbitration.** Per bank, in priority order:

1. load
2. store
3. configuration
4. host

A store that loses its bank to the load is dropped and sets `err`, so give the
load and the store different banks.

**GLB tile registers** (host register port):

| Register | Contents |
|---|---|
| 0..20 | load controller |
| 21..41 | store controller |
| 42 | bank select: `[0]` load, `[1]` store, `[2]` bitstream |
| 43 | bitstream start row |
| 44 | bitstream word count |
| 45 | command pulses: `[0]` run (starts the load, the store and both columns' controllers on the same cycle), `[1]` configure |

**Host memory port.** Host reads return one cycle after `host_gnt`.

**Typical sequence for one kernel on GLB tile `t`:**

1. Write the data and the bitstream into the banks.
2. Program registers 42–44 and write 45 = 2 (configure).
3. Wait for `cfg_busy[t]` to fall.
4. Program the load and store controllers.
5. Write 45 = 1 (run).
6. Wait for `st_busy[t]` to fall.
7. Read the results back.

## Departures and open points

* **GLB tile neighbours.** The global buffer's neighbour links between GLB
  tiles are not implemented. Each GLB tile reaches only its own two banks and
  its own two columns.
* **Outside this RTL.** The application processor, the AXI-Lite host bus,
  clocking and pads are not included. The top has plain host ports instead.
* **Encodings are this design's own.** This covers:
  * every register map and configuration word format;
  * the track count;
  * arbitration orders;
  * the chaining rule;
  * the PE operand modes and COND codes.

  Treat them as one consistent choice, not as a reference encoding.
* **Helper-operation semantics are reconstructed.** This applies to GETMAN,
  ADDIEXP, SUBEXP, EXP2F and GETFR. They are derived from the division method
  above, with truncating rounding.
* **SRAMs.** The SRAMs are plain arrays (`amber_sram_sp`) standing in for
  foundry macros.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
  --top-module tb_amber_mem_core rtl/amber_pkg.sv tb/tb_amber_mem_core.sv
./obj_dir/Vtb_amber_mem_core
```

**End-to-end test (`tb_amber_top`).** This runs the whole subsystem at 2 GLB
tiles (4 x 4 array) and 1K-row banks. The scenario is:

1. Load two bitstreams and data into the GLB through the host port.
2. Configure two regions in parallel.
3. Stream data through a PE (an add), through a switch-box register, through
   a MEM tile (with delayed reads), and back to the GLB.
4. Reconfigure one region alone, with a new PE constant, and run it again.
5. Send a host configuration word that is held back while a lane is busy.

It counts each of these mechanisms and checks every stored result.

**Division workload (`tb_amber_top_div`).** Uses the same reduced size and
runs the BFloat16 division dataflow described above on the array:

1. The GLB streams the 128-entry reciprocal table into MEM(3,0) in ROM mode.
2. Both regions are reconfigured while the MEM keeps its contents.
3. 32 divisors flow through GETMAN → ROM → SUBEXP → FMUL and back to the GLB.
4. Each quotient is checked against `2/b` to within 2^-7 relative error.

The table is computed in the testbench from `1/(1 + f/128)`.

**Size of the simulations.** The largest configuration simulated end to end
is the reduced one: 2 GLB tiles, a 4 x 4 array, and 1K-row banks. The block
testbenches add three full-size pieces:
* a MEM tile;
* a 128 KB GLB bank;
* the configuration network with all 16 lanes.

The full 32 x 16 array with 16 GLB tiles elaborates and lints, but Verilator
is impractical for it:
* translating the model takes about ten minutes and 5 GB;
* the generated C++ takes far longer to compile.

The testbench body in `tb/tb_amber_top_body.svh` sizes itself from the
parameter `NG` (the number of GLB tiles). To run the scenario at a larger
size, instantiate `amber_top` with larger `NGLB` and `NROW`.
