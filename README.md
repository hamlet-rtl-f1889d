# HAMLeT: memory layout transforms inside a 3D-stacked DRAM

Transposing a large matrix, cutting it into blocks, or rotating a 3D data
cube is cheap to describe and expensive to run. A processor that does it
reads with large strides, misses the DRAM row buffer on almost every access
and sends every element through the cache hierarchy and back. HAMLeT does the
transform where the data is. A small accelerator sits in the logic layer at the
bottom of a 3D-stacked DRAM, next to the vault controllers and the crossbar
that such a stack already has. It works tile by tile:

1. read whole DRAM pages (row-buffer-sized chunks) into on-die SRAM, from all
   vaults in parallel;
2. reorder the tile in SRAM;
3. write whole pages back to the destination.

No access touches a partial page, so there are almost no row-buffer misses,
and the independent vaults (each one a TSV bus shared by a stack of banks)
work side by side. Once a transform is done, an address remapping unit
rewrites the addresses of later host accesses, so software can keep using the
old addresses without updating any page table.

This repository holds synthesizable SystemVerilog for the accelerator: the
control unit, the per-vault dual-bank SRAM blocks, the crossbar switch and the
remapping unit. It also holds self-checking testbenches that run them against
a behavioural model of the DRAM stack.

## Where it sits

```
         vault 0        vault 1               vault 7        (TSV buses to the DRAM layers)
            |              |                     |
   +--------+--------------+---------------------+---------+
   |        DRAM memory controller / vault controllers      |   existing, not in this RTL
   +--------+--------------+---------------------+---------+
            |  rq / rd / wr ports, one set per vault       |
   +--------+--------------+---------------------+---------+
   |                      hamlet_top                        |
   |   hamlet_ctrl  --- page read requests, SRAM reads,     |
   |                    write-back schedule, remap config   |
   |   xbar (fill)       vault -> SRAM block                |
   |   sram_block x 8    2 banks x 8 lanes x 1024 x 32 bit  |
   |   xbar (write-back) SRAM block -> vault                |
   |   addr_remap        host address -> new location       |
   +--------------------------------------------------------+
            |  host_addr_i / host_addr_o
      link controllers (existing, not in this RTL)
```

The default sizes are those of a stack with 4 DRAM layers, 8 vaults, 256 TSV
data bits per vault and 8 kb pages (the "L4-B8-T256" configuration). Elements
are 32 bits. So:

| quantity | symbol | value |
|---|---|---|
| elements per DRAM page | R | 256 |
| elements per TSV beat | LANES | 8 |
| beats per page | BEATS | 32 |
| block edge for matrix blocking | K = sqrt(R) | 16 |
| SRAM per vault | | 2 banks x 32 kB = 64 kB |
| SRAM in total | | 512 kB = two R x R tiles |

All of these are `localparam`s in `rtl/hamlet_pkg.sv`. Other stacks are
built by changing three of them:

| stack | `N_LAYER` | `N_VAULT` | `TSV_W` | SRAM blocks |
|---|---|---|---|---|
| L4-B8-T256 (default) | 4 | 8 | 256 | 8 x 64 kB |
| L4-B8-T512 | 4 | 8 | 512 | 8 x 64 kB |
| L4-B16-T256 | 4 | 16 | 256 | 16 x 32 kB |
| L4-B16-T512 | 4 | 16 | 512 | 16 x 32 kB |
| L6-B16-T512 | 6 | 16 | 512 | 16 x 32 kB |

With 8 kb pages, the SRAM always holds two 256 x 256 tiles. More vaults
means more blocks, each holding fewer rows.

## How each transform is cut into tiles

A command names an operation, a source and a destination base (element
addresses) and the log2 sizes `lx`, `ly` and `lz`. `lx` is the contiguous
dimension of the source: the row length `n_r` of a matrix, or `n_x` of a cube.

| operation | source layout | target layout | tile read | pages written per tile |
|---|---|---|---|---|
| `OP_TRANSPOSE` | row-major, `n_c` rows of `n_r` | column-major | R rows x R columns | R (one per tile column) |
| `OP_BLOCK` | row-major | K x K blocks; blocks and the elements inside them row-major | K rows x R columns | K (one per K x K block) |
| `OP_ROT_ZXY` | x-y-z (x fastest) | z-x-y (z fastest) | R z-values x R x-values, at fixed y | R |
| `OP_ROT_YXZ` | x-y-z | y-x-z (y fastest) | R y-values x R x-values, at fixed z | R |

A cube rotation buffers the plane spanned by the fast dimension of the source
and the fast dimension of the target. Locally it is then the same transpose as
the matrix case. The control unit turns each command into three nested loops
over tiles plus two strides: the source page stride between tile rows, and the
destination page stride between tile columns. Every stride is a power of two,
so the address generator needs only shifts and adds (`make_plan` in
`hamlet_ctrl.sv`).

Sizes must be powers of two. Every tiled dimension must cover at least one
tile: `n_x >= 256` for all operations, `n_y >= 256` for a transpose and
y-x-z, `n_y >= 16` for blocking, and `n_z >= 256` for z-x-y. An assertion
flags commands that break this.

## Reordering a tile: diagonal storage and the write-back schedule

This is the core of the design. A 256 x 256 tile is spread over the bank in
use of all eight SRAM blocks: block b holds tile rows 32b to 32b+31. A TSV
beat is eight consecutive elements of one row. The write-back needs eight
consecutive elements of one *column*, and it must take them from a single
block in a single cycle.

**Diagonal storage.** Each SRAM bank is built from eight independent 32-bit
lanes, and every lane gets its own read address. Element `(i, c)` of the tile
(row i, column c) is stored in lane `(i + c) mod 8`, at word
`(i mod 32) * 32 + c / 8`. Two things follow:

- The eight elements of one source beat (one row, columns `8m` to `8m+7`) land
  in eight different lanes at the same word. A beat is written in one cycle,
  rotated by `i mod 8` lanes.
- The eight elements of column j in rows `8t` to `8t+7` also sit in eight
  different lanes, at lane-specific words. They are read in one cycle, and a
  rotation by `j mod 8` puts them back in order. Beat t of destination page j
  is exactly this group, and all of it lives in block `t / 4`.

Matrix blocking needs no diagonal. Beat t of the m-th block page is half a
row of the block, which is one whole source beat: row `t/2`, source beat
`2m + (t mod 2)`. So blocking tiles are stored unrotated.

**Conflict-free write-back.** Destination pages are written eight at a time,
one per "slot". At step u (0 to 31) of a group, block b serves slot
`s = (b - u/4) mod 8`, and that slot sends beat `t = (u + 4s) mod 32` of its
page. Beat t of every destination page lives in block `t/4`, so at each step
the eight blocks serve eight different slots. All eight SRAM blocks are
therefore read in every cycle, and the write-back crossbar has eight beats
ready every cycle. The beats of a page leave out of order, so every write beat
carries its beat index. A transpose tile takes 32 groups of 32 steps; a
blocking tile takes 2 groups.

Each block keeps its own step counter. A block reads its next beat as soon
as its previous beat has been accepted, provided it is less than two steps
ahead of the slowest block (`DRIFT` in `hamlet_ctrl.sv`). A vault that is
busy for a cycle therefore holds up only the block whose beat is bound for
it. The cap is what keeps the blocks off each other's vaults. In strict
lockstep two blocks never serve the same slot in the same cycle. The more
slack the blocks are given, the more often two of them serve the same slot
across a change of `u/4`, and both beats then head for one vault. A slack of
one step was the best trade against random vault back-pressure: 4.64 to 5.20
beats per cycle on a 1024 x 1024 transpose. Larger slack was worse. The SRAM
output register holds its value while a beat waits.

## Filling a tile

The control unit issues one page read per cycle to the vault that holds the
page. Each request carries a tag `{bank, tile row}`, and the vault returns the
tag with each of the page's 32 beats. The fill crossbar sends a beat to SRAM
block `row / rows-per-block` (32 for transpose tiles, 2 for blocking tiles),
where it is written in the next cycle. The crossbar has a round-robin arbiter
per output, and when two vaults deliver to the same block at once, one of
them is held by `rd_ready`. Each block takes one beat per cycle, so at full
speed every vault must stream into a different block. Which block a page
goes to is fixed by its tile row. The request order is the only thing left
to choose:

- **Transpose-like tiles** tie each vault to one block for four pages in a
  row. Request n asks, with `v = n mod 8` and `j = n / 8`, for a row of block
  `(v + j/4) mod 8` that lives in vault `v ^ c`, where c is constant over the
  tile. The vaults can drift apart by a few pages (one hits an open row,
  another misses), but they still feed different blocks, except briefly when
  one of them moves on to its next block. Finding that row is cheap. Tile
  rows are a power of two pages apart, and the vault is an XOR fold of the
  page index. So the three low bits of the row within its block select the
  vault through a rotation by `(row stride in pages) mod 3` bits, and the
  control unit undoes that rotation. Each (v, j) names a different row, so
  every row is still requested exactly once, whatever the source address.
- **Blocking tiles** (2 rows per block) visit the rows block-interleaved: row
  `(n mod 8)*2 + n/8`.

Without back-pressure, the vault-tied order raised a 1024 x 1024 transpose
from 4.4 to 7.35 beats per cycle. The plain block-interleaved order lost a
third of all offered beats to collisions in the fill crossbar.

The control unit counts the SRAM writes of each bank. A bank is full when
`rows x 32` beats have arrived, whatever their order.

## Double buffering

Tile k uses bank `k mod 2` of every SRAM block. Each bank steps through the
states empty, filling, full and draining. Page requests for the next tile
start as soon as its bank is empty, which is while the previous tile is still
draining from the other bank. The write-back starts as soon as its bank is
full. The end-to-end test counts cycles with an SRAM write and an SRAM read
at once, and cycles in which the fill waits for a bank.

## Page placement across vaults and layers

`page_loc()` in the package maps a page index to `{vault, layer, row}`:

- vault = the low 3 bits of the page index, XOR-folded with all higher 3-bit
  groups;
- layer = the page index above the vault bits, mod 4 (the number of layers);
- DRAM row = the same index divided by the number of layers.

Consecutive groups of eight pages therefore rotate over the four layers of
each vault, which interleaves the layers that share a TSV bus. The XOR fold
makes pages at large power-of-two strides, such as the rows of one tile
column, fall in different vaults instead of all in one. `loc_addr()` is the
inverse; the DRAM model uses it. The mapping belongs to the memory system.
If the stack interleaves differently, these two functions are the only place
to change.

## Address remapping

`addr_remap` is a reconfigurable bit shuffle. For power-of-two sizes every
transform here is a permutation of the address's index fields:

| operation | source offset fields (MSB to LSB) | remapped fields |
|---|---|---|
| transpose | `row[ly] col[lx]` | `col row` |
| blocking | `bi[ly-4] qi[4] bj[lx-4] qj[4]` | `bi bj qi qj` |
| z-x-y rotation | `z[lz] y[ly] x[lx]` | `y x z` |
| y-x-z rotation | `z y x` | `z x y` |

The field widths are run-time values, so fields are cut out with shifts and
masks. The bits above the region decide whether an address hits: they must
equal those of the source base, and on a hit they are replaced by those of
the destination base. Both bases must be aligned to the region size. If
source and destination are the same region, the upper bits pass straight
through. The unit holds the configuration of the last completed command and
is purely combinational.

## Interfaces

All handshakes are valid/ready: a transfer happens in a cycle where both are
high. Reset is asynchronous and active low.

| port | dir | meaning |
|---|---|---|
| `cmd_valid`, `cmd_ready`, `cmd` | in, out, in | `cmd_t`: `op`, `src`, `dst`, `lx`, `ly`, `lz`; accepted only when idle |
| `busy`, `done` | out | busy while running; done pulses one cycle after the last write beat was accepted |
| `rq_valid[v]`, `rq_ready[v]`, `rq[v]` | out, in, out | page read `{layer, row, tag}` for vault v |
| `rd_valid[v]`, `rd_ready[v]`, `rd[v]` | in, out, in | returned beat `{tag, beat, data[8]}` |
| `wr_valid[v]`, `wr_ready[v]`, `wr[v]` | out, in, out | write beat `{layer, row, beat, data[8]}` |
| `host_addr_i`, `host_addr_o`, `host_hit_o` | in, out, out | remapping of host element addresses |

The vault side must return all 32 beats of every requested page with its tag.
The order of the beats, and how pages from different vaults interleave, do
not matter. Lane 0 of a beat holds the lowest address.

## How far to trust it, and where it departs

- **Verified in simulation.** All four operations move the right data to the
  right place. This is checked element by element at the default sizes, on
  matrices of 256 x 512, 32 x 512 and 1024 x 1024 and on cube slices of
  256 x 8 x 256 and 256 x 256 x 8. The checks run against a DRAM model with
  random back-pressure. The remapping is checked against index arithmetic.
  All blocks pass Verilator lint and a Yosys (slang) elaboration and
  synthesis.
- **Throughput.** Throughput is measured against the model, not against real
  DRAM timing. With 10 % random back-pressure, one 12/36-cycle row hit/miss
  latency and up to 4 outstanding page reads per vault, the accelerator
  moves 4.9 to 5.2 beats per cycle in each direction on the 1024 x 1024 and
  cube-slice runs. Without back-pressure the transpose reaches 7.35. The
  limit is 8. Short two-tile runs reach about 4, because the first fill and
  the last drain overlap nothing. The model lets a vault read and write in
  the same cycle. Evaluations of this architecture on real stacks report
  close to the peak bandwidth; this RTL makes no such claim.
- **Sizes below one tile are not handled.** A 128^3 cube has x-rows of half a
  page and cannot be run.
- **Remapping of the upper address bits.** A pure bit shuffle would leave the
  upper bits unchanged. This unit swaps in the destination's upper bits,
  because the transform writes to a separate destination region. Only one
  region is remapped at a time.
- **Where the local reordering happens.** One could move chunks between
  SRAM blocks over the crossbar to reorder a tile. Here the reordering
  happens inside each block instead, through the diagonal storage and the
  per-lane read addresses. The crossbar then delivers each reordered beat
  straight to the vault of its destination page. No SRAM-to-SRAM transfers
  are needed, and each beat crosses the crossbar only once in each direction.
- **Layer interleaving.** How accesses to the layers that share a vault's
  TSV bus are interleaved is left to the vault side. This design's page
  placement (see above) spreads the pages of a vault over its layers. The
  outstanding requests of a vault therefore usually name several layers,
  which the vault side can overlap.
- **This design's own choices.** The interfaces and their protocol, the
  page-to-vault mapping, the diagonal storage, the write-back schedule, the
  request order and the crossbar's round-robin arbitration.
- **Element width.** Elements are assumed to be 32 bits, matching the SRAM
  word width. Larger elements would need `ELEM_W` and the tiles revisited.
- **Other stacks.** A different stack configuration means changing
  `N_VAULT`, `N_LAYER` and `TSV_W` in the package; nothing else is sized by
  hand. The end-to-end test passes unchanged for all five stacks in the
  table near the top. On the 16-vault stacks the short runs move about
  7 to 7.5 beats per cycle in each direction, out of 16. `N_VAULT` and
  `TSV_W` must be powers of two, with `BEATS >= N_VAULT` and `K >= LANES`.
  `N_LAYER` can be any number.
- **Parts outside this RTL.** The DRAM memory controller, the vault and link
  controllers, and the DRAM layers with their TSVs are parts of the stack, not
  of this design. The testbenches stand in for them with `tb/dram_model.sv`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/hamlet_pkg.sv rtl/xbar.sv rtl/sram_block.sv rtl/addr_remap.sv \
    rtl/hamlet_ctrl.sv rtl/hamlet_top.sv tb/dram_model.sv tb/tb_hamlet_top.sv \
    --top-module tb_hamlet_top -o sim && ./obj_dir/sim
```

| testbench | what it runs |
|---|---|
| `tb_hamlet_top` | all four operations end to end at the default sizes; counts fill-crossbar conflicts, write-back stalls, request back-pressure, fill waiting for a bank, fill/drain overlap, both storage modes, remap hits and misses (each must occur) |
| `tb_workloads` | 1024 x 1024 transpose and blocking, and slices of 256^3 cube rotations, at the default sizes |
| `tb_hamlet_ctrl` | the control unit alone: every source page requested once with the right tag, every destination beat written once, done and remap configuration |
| `tb_sram_block` | per-lane reads, one-cycle latency, hold, both banks |
| `tb_xbar` | random traffic with back-pressure: delivery, ordering, fairness, one full permutation per cycle |
| `tb_addr_remap` | all four shuffles against index arithmetic, plus misses and the unconfigured case |

The end-to-end test at the default sizes takes about a second. The workload
test takes about ten seconds: build it the same way with `tb/tb_workloads.sv`
and `--top-module tb_workloads`. The unit testbenches need only their own
block and the package (`tb_xbar`, `tb_sram_block` and `tb_addr_remap`), or
`rtl/hamlet_ctrl.sv` (`tb_hamlet_ctrl`).

To try another stack, edit `N_LAYER`, `N_VAULT` and `TSV_W` in
`rtl/hamlet_pkg.sv` and rerun `tb_hamlet_top`. It prints the cycles and beats
per cycle of each command, and the bus limit for comparison. The drain slack
is `DRIFT` in `rtl/hamlet_ctrl.sv`, and the DRAM model's latencies, queue
depth and back-pressure are parameters of `tb/dram_model.sv`.

## Files

- `rtl/hamlet_pkg.sv`: sizes, types, the command and beat structs, page
  placement and beat rotation functions.
- `rtl/hamlet_top.sv`: the accelerator.
- `rtl/hamlet_ctrl.sv`: control unit (tile loops, fill requests, bank states,
  write-back schedule).
- `rtl/sram_block.sv`: per-vault dual-bank SRAM.
- `rtl/xbar.sv`: crossbar switch.
- `rtl/addr_remap.sv`: address remapping.
- `tb/dram_model.sv`: behavioural DRAM stack (row buffers, latencies,
  back-pressure).
- `tb/tb_*.sv`: the testbenches above.
