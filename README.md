# A statically scheduled unified-buffer memory tile

Streaming accelerators (image pipelines, dense linear algebra on a CGRA) move
data between compute kernels through buffers whose access patterns are known
before the program runs. A *unified buffer* captures such a buffer completely:
each port that reads or writes it is described by a loop nest (the *iteration
domain*), an affine *access map* that turns the loop indices into an address,
and an affine *schedule* that turns the same indices into the cycle in which
the access happens. A buffer then emits reorderings and time-shifted copies of
the streams it ingests.

This repository is RTL for a physical unified buffer in the shape of a CGRA
memory tile: two 16-bit input ports and two 16-bit output ports sharing one
2 KB, 64-bit-wide, single-port SRAM. Every port side has its own 6-deep loop
counter, address generator and schedule generator. Once the tile is
programmed and started, no handshakes exist: every access happens in the
cycle its schedule names, and it is the scheduler's job (outside this RTL) to
produce schedules that respect the tile's timing rules, given below.

## Organisation of the tile

```
             input port p (x2)                           output port p (x2)
 data_in ─► [narrow ctrl]─► agg_buffer ─►[wide ctrl]─┐ ┌─[wide ctrl]─► tb_buffer ─►[narrow ctrl]─► data_out
   16 b        ID+SG+AG     2 x 64 b       ID+SG+2AG │ │  ID+SG+2AG    2 x 64 b      ID+SG+AG        16 b
                                                     ▼ ▼
                                           mem_port_arbiter ─► sram_sp (256 x 64 b)
 cycle counter ── shared time base of all 8 controllers     config_regs ── 8 controller configurations
```

| Quantity | Value | Where |
|---|---|---|
| input / output ports | 2 / 2 | `NUM_IN`, `NUM_OUT` |
| narrow / wide word | 16 / 64 bit | `DATA_W`, `WIDE_W` |
| vectorization factor | 4 | `VEC` |
| vectorization buffer per port | 2 slots x 64 bit = 16 B | `VEC_SLOTS` |
| SRAM | 256 x 64 bit = 2 KB, one access per cycle | `SRAM_DEPTH` |
| loop depth per controller | 6 | `DIM` |
| counters, addresses, timestamps | 16 bit | `CNT_W` |

All of these are constants in `rtl/lake_pkg.sv`. The numbers of ports,
widths, vectorization, buffer and SRAM capacity, the 1-cycle SRAM access,
the 1-cycle-write/0-cycle-read vectorization buffers and the 6-deep
controllers are those of the tile specification this design implements. The
16-bit counter width, the configuration bus and its register map, the way a
port is split into two controllers, the arbiter's priority and its conflict
flag are choices of this design.

## Sequencing controllers

A sequencing controller (`seq_ctrl`) is one iteration domain, one schedule
generator and one or two address generators, all walking the same loop nest.

* **Iteration domain** (`iteration_domain`). Up to six nested counters,
  index 0 innermost. `dim` says how many are used; `dim = 0` turns the
  controller off. On a step the innermost counter that is not at
  `extent - 1` increments and every counter inside it returns to zero; the
  block reports that dimension as `inc_dim`. A step at the last point sets
  `done`.
* **Schedule generator** (`schedule_generator`). Holds the timestamp of the
  next access. The controller *fires* in the cycle in which the tile's cycle
  counter equals that timestamp. Firing is the step of the iteration domain
  and of the address generators.
* **Address generator** (`address_generator`). Holds the address of the
  current access.

### Why the configuration is not the strides

Both generators compute `offset + Σ stride[d] · i[d]`, but without any
multiplier: each keeps its current value and adds one *delta* per step,
chosen by `inc_dim`. When dimension `d` increments, every dimension `j < d`
falls back from `extent[j] - 1` to 0, so the jump is

```
delta[d] = stride[d] - Σ_{j<d} stride[j] · (extent[j] - 1)
```

A scheduler naturally produces strides, so the strides must be transformed
before they are written into the registers. `lake_pkg::to_delta()` does this
transformation; the benches use it through `lake_tb_pkg::mk_cfg()`. Example: a
4 x 16 nest with address strides (1, 4) has deltas (1, 1); with strides
(-1, 4), which walks every row of four backwards, the deltas are (-1, 7).

All arithmetic is modulo 2^16. Users of an address keep only the low bits
they need (3 bits for a vectorization buffer, 8 bits for the SRAM), so any
address sequence wraps around its memory, and circular buffers need no extra
logic.

## Ports and vectorization

Each port is a narrow side (16 bit, one word per event) and a wide side (one
SRAM word per event), each driven by its own controller:

* **Input port** (`input_port`): the narrow controller samples `data_in` and
  writes it into the aggregation buffer (`agg_buffer`) at narrow address
  `a mod 8`, that is, slot `a / 4`, lane `a mod 4`, lane 0 in bits 15:0. The
  wide controller has two address generators: the buffer slot to drain and
  the SRAM word to write. When it fires, the port asks for an SRAM write of
  that whole slot.
* **Output port** (`output_port`): the wide controller asks for an SRAM read
  and names the transpose-buffer (`tb_buffer`) slot that receives the word.
  The slot is kept for one cycle to meet the returning data. The narrow
  controller emits one word per event: `valid_out` is high and `data_out`
  carries transpose-buffer word `a mod 8`.

### Timing rules a schedule must satisfy

These are the facts a scheduler needs about the tile (also listed as
`SRAM_RD_LAT`, `VEC_WR_LAT` and `VEC_RD_LAT` in the package):

1. At most one SRAM access per cycle, over all four ports.
2. A word written into a vectorization buffer in cycle *t* can be read from
   cycle *t + 1* (1-cycle write, 0-cycle read). An input slot whose last
   narrow word is taken in cycle *t* can be drained to the SRAM from cycle
   *t + 1*.
3. An SRAM read issued in cycle *r* fills its transpose-buffer slot at the
   end of cycle *r + 1*; its words can be emitted from cycle *r + 2*.
4. A slot must not be refilled before its last use: a refill issued in cycle
   *t* overwrites the slot at the end of that cycle (input) or of cycle
   *t + 1* (output).
5. An SRAM word is readable in the cycle after it was written.
6. Timestamps are 16 bits, so one run may span at most 65 536 cycles after
   `start`.

A schedule that breaks rule 1 is detected: `mem_port_arbiter` grants the
input ports first, then the output ports (lower index first), drops the
other requests and raises `conflict` for that cycle. The other rules are not
checked in hardware; breaking them yields wrong data.

### Worked schedule: a 2x1 vertical window

This is the end-to-end test's first schedule. An image of 64 x 4 pixels
arrives on input 0, one pixel per cycle from cycle 0. The buffer has to feed
a 2x1 blur, so output 0 must give pixel *j* while output 1 gives pixel
*j + 64*, the pixel one row below.

| controller | events | timestamp | address(es) |
|---|---|---|---|
| input 0 narrow | 256 | *i* | buffer word *i* |
| input 0 wide | 64 | 4k + 4 | slot k, SRAM word k |
| output 0 wide | 48 | 4k + 69 | slot k, SRAM word k |
| output 0 narrow | 192 | 72 + j | buffer word j |
| output 1 wide | 48 | 4k + 70 | slot k, SRAM word 16 + k |
| output 1 narrow | 192 | 72 + j | buffer word j |

Writes fall on cycles 0 mod 4 and the two read streams on 1 and 2 mod 4
(input 1 uses 3 mod 4), so the single SRAM port is never asked twice. The
row delay is 64 cycles; the further 8 cycles are the cost of packing four
words, the SRAM round trip and unpacking (rules 2 and 3).

## Configuration

Controllers are numbered: input *p* narrow = 2p, input *p* wide = 2p + 1,
output *p* wide = 4 + 2p, output *p* narrow = 5 + 2p. Each has 32 registers
of 16 bits at bus address `controller · 32 + field`:

| field | register |
|---|---|
| 0 | `dim` (0 = off, 1..6) |
| 1..6 | `extent[0..5]` |
| 7..12 | schedule `delta[0..5]` |
| 13 | schedule offset (first cycle) |
| 14..19 | address generator 0 `delta[0..5]` |
| 20 | address generator 0 offset |
| 21..26 | address generator 1 `delta[0..5]` (wide sides only) |
| 27 | address generator 1 offset |

Writes take `cfg_wr`, `cfg_addr`, `cfg_wdata` and land at the clock edge;
`cfg_rdata` returns the addressed register combinationally. Reset turns all
controllers off. To run: program the registers, then pulse `start` for one
cycle. `start` clears the cycle counter, reloads every controller's offsets
and clears its counters; the cycle after `start` is cycle 0 of the schedule.
`done` is high when every controller has finished (or is off). Registers may
be rewritten between runs; changing them during a run is not supported.

## Departures and limits

* Only the statically scheduled style is built. A latency-insensitive
  (ready/valid) variant of the ports is not part of this RTL.
* The storage is an array written in SystemVerilog (`sram_sp`), shaped like
  a 256 x 64 single-port macro, which a synthesis flow may replace with one.
* The stride-to-delta transformation lives in a package function for
  testbenches and software models; the hardware takes deltas.
* Collisions on the SRAM port are flagged and the lower-priority requests
  are dropped; there is no retry.
* The SRAM's read data holds its value between reads; the transpose buffers
  only take it on `rd_valid`.

## Simulating

Every block has a self-checking bench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Benches share `tb/lake_tb_pkg.sv`, which
builds configurations from strides. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/lake_pkg.sv tb/lake_tb_pkg.sv \
          tb/tb_lake_mem_tile.sv --top tb_lake_mem_tile -Mdir obj && obj/Vtb_lake_mem_tile
```

Replace the bench name to run another one (`tb_seq_ctrl`, `tb_input_port`, ...).
The tile has no parameters, so `tb_lake_mem_tile` always runs it at its full
size. It runs four schedules: the vertical-window schedule above, with
input 1 storing a second stream; a reordering run in which output 0 reads
that stream back with a 2-D nest and output 1 reads it reversed (inner
stride -1), with input 1 switched off; a run that reads the newly stored
stream with nests of full depth (6-D on the narrow side, 3-D on the wide
side); and a run that places an output port's reads on the input port's
write cycles and expects `conflict`. It
compares every output word and cycle with the expected stream and counts
each mechanism: wide writes and reads, buffer slot reuse, multi-dimensional
and reversed walks, a full-depth nest, a switched-off controller, register read-back and the
conflict. A mechanism that never happens is counted as a failure. The unit
benches compare the controllers with loop-nest and affine-formula models on
random configurations of up to six dimensions.

| file | contents |
|---|---|
| `rtl/lake_pkg.sv` | sizes, `ctrl_cfg_t`, register map, `to_delta()` |
| `rtl/iteration_domain.sv`, `address_generator.sv`, `schedule_generator.sv`, `seq_ctrl.sv` | sequencing controller |
| `rtl/agg_buffer.sv`, `tb_buffer.sv` | vectorization buffers |
| `rtl/input_port.sv`, `output_port.sv` | ports |
| `rtl/mem_port_arbiter.sv`, `sram_sp.sv` | shared SRAM port and storage |
| `rtl/config_regs.sv` | configuration registers |
| `rtl/lake_mem_tile.sv` | the tile (top) |
