# Configuration relocation and defragmentation hardware

A reconfigurable coprocessor pays for every configuration it loads. Two things
make that cost much lower. The first is **relocation**: a configuration compiled
for one place in the array is placed wherever there is room when it is loaded.
The second is **defragmentation**: configurations already in the array are moved
together so that the free area forms one usable block. This repository holds
synthesizable SystemVerilog for two pieces of hardware built around these ideas:

1. **The R/D (relocation / defragmentation) FPGA programming path.** This is a
   row-based, partially reconfigurable configuration memory. The column decoder
   is replaced by a row-wide *staging area*. The row decoder is fed through an
   *adder* that adds one of two *offset registers* to the row address.
   Relocating a configuration costs one register write. Moving a configuration
   costs one row read and one row write per row. The CPU's work per relocation
   stays constant, whatever the size of the configuration. A virtualised column
   I/O structure and an optional row cache complete it.
2. **A relocation pipeline for a 6200-style array.** The array is a 2-D array of
   cells with neighbour and length-4 routing. The pipeline rewrites the cell
   programming writes as they stream in. Each cell can be flipped vertically,
   flipped horizontally, rotated by 90 degrees and shifted by a row and column
   offset. Both its address and the routing multiplexer codes inside it are
   rewritten to match.

The two designs are independent. `reloc_defrag_top` places them side by side,
and they share only clock and reset.

## 1. The R/D FPGA programming path

```
            host word port                       +------------------------+
 wdata --->[ staging area: WORDS x WORD_W ]<====>|  configuration SRAM    |
 rdata <---[  word decoder, word read mux ]      |  ROWS x (WORDS*WORD_W) |
                      ^  ^                       |                        |
                      |  +--- row cache (opt.)   +------------------------+
                      |                                  ^ row select
 row_addr ----------->(+)--------------------------------+
                       ^
            [write ofs][read ofs] --2:1 (ofs_sel)
```

Defaults (package `rd_pkg`) are 1024 rows and 10-bit row addresses. Each row
holds 32 words of 32 bits (5-bit word address), so the whole memory is
1 Mbit in a square array. The staging area is exactly one row wide, so each of
its bits feeds one column of the array. A whole row moves between the staging
area and the array in one operation.

### Operations

Every operation completes in one clock (`rd_op`, enum `rd_op_e`):

| op | effect |
|---|---|
| `RD_STAGE_WR` | `staging[word_addr] <= wdata`. Words may be written in any order. |
| `RD_STAGE_RD` | `rdata = staging[word_addr]` in the same clock (`rdata_valid`). |
| `RD_WOFS_WR` / `RD_ROFS_WR` | Load the write or read offset register from `wdata`. |
| `RD_ARRAY_WR` | `array[row_addr + offset] <= staging`, where the offset is the write register if `ofs_sel = 0` and the read register if `ofs_sel = 1`. |
| `RD_ARRAY_RD` | `staging <= array[row_addr + offset]`. |
| `RD_CACHE_FILL` | Store the staging row in the cache under `{cfg_id, row_addr}`. |
| `RD_CACHE_LOAD` | On a hit, `staging <= cache{cfg_id, row_addr}`. In the same clock, if `wb` is set, the previous staging row goes to the array at the row of the previous cache load. A miss changes nothing and raises `cache_miss`. |

Configurations are compiled as if they started at row 0. The offset register
says where they actually go, and the adder's sum wraps modulo `ROWS`.

### Operation counts

Because every operation takes one clock, the operation counts are clock counts:

| sequence | operations |
|---|---|
| load a configuration, relocated | `rows * (WORDS + 1) + 1` (one offset write, then per row `WORDS` word writes and one row write) |
| move a configuration (defragment) | `rows * 2 + 2` (two offset writes, then per row one read and one write) |
| patch part of a configuration | `rows_altered * 2 + changed_words + 1` |
| load a configuration held entirely in the cache | `rows + 2` |

### Defragmentation order is the host's job

A move reads row *i* at `i + read offset` and writes it at `i + write offset`.
The old and new places may overlap. Moving **up** (to lower row numbers) must
therefore go topmost row first, and moving **down** must go bottommost row first.
Otherwise a row is overwritten before it has been copied. The hardware does not
impose the order; the sequence of `row_addr` values the host sends does.
`tb_rd_fpga` and `tb_reloc_defrag_top` run both directions over overlapping
ranges.

### Partial run-time reconfiguration

To change a few words of a loaded configuration (for example, new coefficients
of a time-varying filter), the host:

1. loads the configuration's offset into the write register;
2. for each affected row, issues `RD_ARRAY_RD` with `ofs_sel = 0`;
3. overwrites only the changed words with `RD_STAGE_WR`;
4. writes the row back with `RD_ARRAY_WR`.

The rest of each row is preserved. `ofs_sel` is a separate input on every row
operation precisely so that a row can be read and written back through the same
register.

### Row cache (`rd_row_cache`)

The cache holds whole rows keyed by {configuration number, row position}. Rows
already in it reach the staging area in one operation rather than `WORDS`
host writes. Fetching a row overlaps with writing the previous one, which gives
the `rows + 2` count. The organisation is this design's choice: direct-mapped,
64 lines, index = row XOR configuration number, full tag, and valid bits
cleared on reset. What fills the cache is also a choice: an explicit
`RD_CACHE_FILL`.

### Virtualised I/O (`rd_virtual_io`, `rd_vio_oe_cam`)

A relocated configuration cannot depend on which pins are near it. The I/O is
therefore a set of lines per column that run past every row:

- 4 input lines and 2 output lines per column.
- Each cell has two input multiplexers that choose among its column's input
  lines. What a cell reads depends only on its multiplexer setting, not on its
  row.
- Cell output *k* drives output line *k* only while that row's enable for line
  *k* is high.

The output lines are tri-state busses in silicon. Here they are AND-OR busses,
and `oe_conflict` flags two rows enabled on one line. The enables come from a
small CAM next to each row, which holds a configuration number and a mask of
the lines that row may drive. The host presents a configuration number
(`cam_sel_cfg`), and the matching rows raise their enables. `multi_match` flags
two matching rows that claim the same line.

The logic cells and routing of the R/D FPGA are deliberately unspecified beyond
being homogeneous, so they are not in this RTL. Their connections are ports of
the top:

- `cfg_bits`: every configuration bit;
- `vio_cell_in`: what each cell reads from the input lines;
- `vio_cell_out`: what each cell offers to the output lines;
- `vio_in_sel`: the input multiplexer settings.

## 2. The 6200 relocation pipeline

### What the pipeline rewrites

A 6200 cell is programmed by three bytes. The programming address is
`{column[5:0], column_offset[1:0], row[5:0]}`, and the column offset selects
the byte:

| offset | bit 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|---|
| 00 | Nout | Nout | Eout | Eout | Wout | Wout | Sout | Sout |
| 01 | CS | X1[2] | X1[1] | X1[0] | X2[1] | X2[0] | X3[1] | X3[0] |
| 10 | (spare) | RP | Y2 | Y2 | Y3 | Y3 | X3[2] | X2[2] |

X1, X2 and X3 choose the function unit's inputs among N, S, E, W, N4, S4, E4
and W4. Nout, Eout, Sout and Wout choose what the cell drives on each side:
either the function unit output (F) or a signal passing through. Each output
has its own set of four sources. The codes live in `reloc6200_pkg`:

| mux | N | S | E | W | N4 | S4 | E4 | W4 | F |
|---|---|---|---|---|---|---|---|---|---|
| X1, X3 | 011 | 000 | 001 | 010 | 111 | 101 | 110 | 100 | |
| X2 | 011 | 000 | 010 | 001 | 111 | 110 | 101 | 100 | |
| Nout | 01 | | 10 | 11 | | | | | 00 |
| Eout | 01 | 11 | 10 | | | | | | 00 |
| Sout | | 11 | 01 | 10 | | | | | 00 |
| Wout | 10 | 11 | | 01 | | | | | 00 |

### Stages

```
wr_* --> gather --> flip V --> flip H --> rotate 90 --> offset V --> offset H --> scatter --> out_*
         (3 bytes    r->maxrow-r  c->maxcol-c  <c,r>->         r->r+n       c->c+m      (3 writes)
          -> cell)                             <maxcol-r,c>
```

- **Gather.** X2 and X3 are split across two bytes, so no byte can be rewritten
  on its own. `reloc_cell_gather` collects the bytes at column offsets 00, 01 and
  10 of a cell and emits the whole decoded cell (`cell_t`). It expects them in
  that order. Writes to column offset 11 are dropped.
- **Flip vertical.** N and S trade places, and so do N4 and S4. The Nout and
  Sout multiplexers trade contents, each re-coded into the other's code.
  Eout and Wout stay on their sides, but a north source becomes a south source.
- **Flip horizontal.** The same with E and W.
- **Rotate 90.** Every direction moves one compass point clockwise (N to E, E to
  S, S to W, W to N). The outputs rotate with the cell: the new Eout takes the
  old Nout's source (rotated), the new Sout takes the old Eout's, and so on. The
  logic decodes a code to a direction, transforms the direction and re-encodes
  it. This reproduces the published before/after table for every code.
- **Offsets.** `n` and `m` are 6-bit two's complement values, and the sums wrap
  modulo 64. Routing is untouched.
- **Scatter.** `reloc_cell_scatter` writes the three bytes at the cell's new
  address on the next three clocks.

Any stage can be disabled. `maxrow` and `maxcol` are settings rather than
constants: they reset to 63 (the 64x64 array), and smaller values treat a
smaller region as "the whole array" for flips and rotations. All settings
(`reloc_ctrl_t`) are latched by `ctrl_load` and hold for the whole configuration.

**Timing:** one write per clock in and out, and one cell per three writes. A
cell's first output write appears 7 clocks after its last input write.

**Worked example** (checked by `tb_reloc_pipeline` and `tb_reloc_defrag_top`).
The settings are all stages on, `maxrow = maxcol = 4`, `n = 1` and `m = 2`.

| | position | X1 | X2 | X3 | Nout | Eout | Sout | Wout | bytes 00 / 01 / 10 |
|---|---|---|---|---|---|---|---|---|---|
| in | `<4,2>` | E4 | N | S | F | N | E | S | `1D 6C 00` |
| out | `<4,1>` | N4 | W | E | W | N | E | F | `D1 75 00` |

## Files

| file | contents |
|---|---|
| `rtl/rd_pkg.sv` | R/D operation codes and default sizes |
| `rtl/rd_staging_area.sv` | staging area |
| `rtl/rd_row_offset.sv` | offset registers, 2:1 select, row adder |
| `rtl/rd_config_array.sv` | configuration SRAM with row decode |
| `rtl/rd_row_cache.sv` | row cache |
| `rtl/rd_fpga.sv` | R/D programming path (the four blocks above) |
| `rtl/rd_virtual_io.sv`, `rtl/rd_vio_oe_cam.sv` | column I/O and its output-enable CAM |
| `rtl/reloc6200_pkg.sv` | cell type, settings type, direction codes and transforms |
| `rtl/reloc_cell_gather.sv`, `rtl/reloc_cell_scatter.sv` | byte/cell conversion |
| `rtl/reloc_flip_v.sv`, `rtl/reloc_flip_h.sv`, `rtl/reloc_rotate90.sv`, `rtl/reloc_voffset.sv`, `rtl/reloc_hoffset.sv` | the five stages |
| `rtl/reloc_pipeline.sv` | the 6200 relocation pipeline |
| `rtl/reloc_defrag_top.sv` | both designs side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Each also has a watchdog that counts a failure if the test hangs. Name the two
packages first and let `-y rtl` find the modules. For example, the full design
at its default sizes:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
  rtl/rd_pkg.sv rtl/reloc6200_pkg.sv tb/tb_reloc_defrag_top.sv \
  --top-module tb_reloc_defrag_top -Mdir obj_top
./obj_top/Vtb_reloc_defrag_top
```

Any other testbench builds the same way: replace `tb_reloc_defrag_top` with,
for example, `tb_reloc_rotate90`.

The full-size top testbench builds in under a minute and runs in well under a
second. It covers these mechanisms and counts each one:

- relocation on load;
- defragmentation upwards over an overlap;
- a move down;
- partial reconfiguration;
- cache hits and a miss;
- staging read-back;
- virtual output through the CAM and virtual input;
- the 6200 worked example.

The block testbenches check against tables written out independently. The
pipeline test compares random cells under random settings with a reference
model that works on directions rather than codes. Each block's testbench was
also run against a deliberately broken copy of the block, and each one caught
the fault.

## Choices made here, and known limits

- **One clock per operation, and a combinational array read.** These make the
  published read/write counts into exact clock counts. A real SRAM might need a
  registered read, which would add one clock per row read.
- **Row decoder.** It is the array index inside `rd_config_array`, not a
  separate one-hot decoder.
- **Cell rows in the I/O.** 32 rows of 32 cells are assumed; the number of
  configuration rows per cell row is not fixed.
- **Cache.** Its organisation and size (64 rows) are assumptions. A
  configuration longer than the cache cannot be fully cached.
- **6200 pipeline and hierarchical routing.** The pipeline works on the
  idealised array, where routing is homogeneous. On a real 6200, a
  configuration that uses length-4 or longer lines may only move in multiples
  of 4 (or 16, ...). The pipeline does not check or enforce this. Nor does it
  re-route I/O pins: the 6200 has no virtualised I/O.
- **Rotation logic.** The rotation stage's per-bit logic is derived from the
  code table by decode/transform/encode, not written as hand-minimised
  equations. Synthesis produces equivalent gates.
- **Offsets wrap.** Sums wrap modulo the address range, on both designs. Keeping
  configurations inside the array is software's job.
- **Not included:** the logic cells and routing of either array, the host
  processor or DMA, and any area model.
- **Synthesis size.** `cfg_bits` exposes the full 1-Mbit array as a port, as
  the fabric would see it. A generic synthesis flow therefore turns the array
  into flip-flops and is slow at the default size. In a real device this would
  be an SRAM macro whose bit lines feed the fabric.
