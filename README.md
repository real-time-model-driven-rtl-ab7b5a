# Shape Feature Measurement Unit (SFMU)

The SFMU is a board-level design that inspects vias and pads on multilayer printed circuit
boards while the panel is being scanned. A laser scanner delivers a grey-level image, one 8-bit
pixel per clock at 15 Mpixel/s. A CAD data unit runs in step with it and says, for every
region of the image, which features and shapes should be there. The SFMU looks for them.
Where an expected feature or shape is not found, it emits an 8-bit user error code.

The recognition has two layers.

* **First layer: features on grey levels.** Eight OPTIC max/min filter chips look at an 8x8
  pixel window. Each template marks some window pixels as the "white" set (MIN), some as the
  "black" set (MAX), and the rest as don't care. The chip computes the *dynamic range*
  `MIN(white) - MAX(black)`. This is the number of grey thresholds at which the binarised
  window would match the split template. If the range is at least a programmed threshold, the
  feature is present. So binary template matching works on a grey image without choosing a
  video threshold.
* **Second layer: shapes on features.** A whole via or pad is bigger than 8x8 pixels.
  The image is therefore covered with a grid of 16x16-pixel cells. Each cell is reduced to one
  bit: did the feature occur anywhere in it? The reduced binary image then goes to IRIS binary
  template matchers with 16x16-cell templates. This means a shape of up to 256x256 pixels is
  recognised from a handful of 8x8 features. Features may also shift by a few pixels without
  being missed.

A feature that falls on a cell border would be split between cells. So there are four grids,
shifted against each other by half a cell (8 pixels and/or 8 lines). Each grid has its own pair
of OPTICs, its own data reduction, and its own binary line buffer. The CAD data chooses per
grid which template is active.

## Block diagram

```
 pix,lie,pie ──> line_buffer (8 taps) ──> optic_di[8] ─────> 8 x OPTIC (external)
                                                              │ th0 (2 per grid)
 cdcx2_bus ─┐                                                 v
 override   ├─> override_unit ─> cad_control ──cs/oe/cadr──> REC per grid
 register ──┘                       │  │                      │
                                    │  └─ grid_on/composed    v
 host ─> template_ram <─ load_control <─ cad_input_lut   grid_offset ─> data_reduction x4
            (8k x 8)       │   (serial / parallel)                            │ cell bit
                           ├──> OPTIC load chain                              v
                           └──> IRIS memory                     bin_line_buffer x4 (16 lines)
                                                                              │ 16-bit column
  stored_template_ram (OPTIC 32 / IRIS 8) <── cad_control                     v
            │                                                     2 x IRIS (external)
            v                                                                 │ OCL
       output_logic (8k look-up table) <─── single-shape cell bits ───────────┘
            │
            v  err_valid, err_code, err_src
```

`sfmu_top` holds everything except the filter chips. The OPTIC and IRIS pins are ports of the
top. Behavioural models of both chips are in `tb/optic_model.sv` and `tb/iris_model.sv`.
The top also holds the Dynamic Range Correlator module (`drc_module`, ports `drc_*`) beside
the unit; see the section of that name.

## The 32k line buffer

The OPTICs need one pixel from each of 8 consecutive lines on every clock. `line_buffer` keeps
the 7 previous lines of up to 32768 pixels. It uses one memory with a 56-bit word per column.
At every pixel it reads the column's word and writes it back shifted by one byte, with the new
pixel entering at the bottom (read-modify-write). `addr_gen` provides the column address. It is
cleared while the line enable `lie` is low. Outputs: `dout[7]` is the present line and `dout[0]`
is the line 7 lines up. A pixel sampled at one clock edge appears on the taps after the next
edge.

The specification describes one memory and one latch per delayed line, driven by three
phase-shifted clocks for the read-modify-write. This design's choice is a single wide memory
and a single clock edge. The behaviour is the same.

## Templates: template RAM, input table and load control

* `template_ram` is 8k x 8 and is written by the host. Templates start on 16-byte boundaries.
  * An **OPTIC template** is 16 bytes, holding 64 pixel attributes of 2 bits each: `00` MAX set,
    `01` MIN set, `10` don't care, `11` filter. Pixel `i = 8*row + col` sits in chain bits
    `2i+1:2i`. Byte 0 holds chain bits 127..120, so it covers the newest pixels of the present
    line.
  * An **IRIS template** uses 80 bytes. Bytes 0-31 are the reference bits, bytes 32-63 the
    don't-care bits (cell `n` = bit `n%8` of byte `n/8`, row `n/16`, column `n%16`). Byte 64 is
    the low clip threshold and byte 65 the high one. The remaining 14 bytes are unused. This
    layout is this design's choice.
* `cad_input_lut` turns the 8-bit template code from the CAD bus into a 13-bit template RAM base
  address. The host fills it, two bytes per code.
* `load_control` copies one template into one filter section:

| destination (6 bits) | action | clocks |
|---|---|---|
| `0 g g o s s` | OPTIC template into OPTIC `ggo` (grid `gg`, OPTIC `o`), section `ss`. Per byte: one clock to load the parallel-to-serial register, then 8 shift clocks, MSB first | 16 x 9 = **144** |
| `1 1 0 0 0 0` | the 22-bit configuration word into all 8 OPTICs at once (CADR = 100), bit 21 first | **22** |
| `1 0 0 i s s` | IRIS template into IRIS `i`, template `ss`, one byte per clock through the IRIS memory port | **66** |

The 144- and 22-clock loads are the specification's numbers. The IRIS memory addresses are this
design's choice, because the chip's memory map is not available. Reference byte `k` of
template `s` goes to `32s+k` and don't-care byte `k` to `128+32s+k`. The thresholds go to
`256+2s` and `257+2s`. The 22-bit configuration word holds the window shape, the mode and the
threshold. All OPTICs share it, so it is not stored with the templates. The host writes it
into a register of the load controller, and a configuration load shifts it out. The register is
rotated during the shift, so it keeps its value.

## The CAD control bus

`cad_control` decodes a 43-bit word, MSB first:

| bits | field |
|---|---|
| 42 | load |
| 41:36 | destination code (table above) |
| 35:28 | template code |
| 27:8 | OPTIC activation, 5 bits per grid, grid 0 at the top: `composed, on, sel, addr[1:0]` |
| 7:0 | IRIS activation: bit `4i+s` = template `s` of IRIS `i` |

Per grid:
* `on` selects both OPTICs of the grid.
* `sel` enables the output of one of them.
* `addr` picks one of its four templates.
* `composed` = 0 means the feature is a shape on its own. The cell bit then goes straight to the
  output logic.
* `composed` = 1 means the feature is part of a composed shape. The IRIS decides.

IRIS `i` runs two systems. System `t` holds templates `2t` and `2t+1` and serves grid `2i+t`.
When a load is accepted, the template code is written into the stored-template RAM of that
layer (`stored_template_ram`, 32 entries for the OPTIC sections, 8 for the IRIS sections). The
output logic can then tell which template a missing result belonged to. Load requests wait
while a load is running. A configuration load records nothing.

## Override register

For testing without the CAD data unit, the host can write a 43-bit override register
(`override_unit`). It can also be written through a 16-bit path and an 8-bit (picture bus)
path. A one-bit register selects who drives the CAD bus: 1 = host (override register),
0 = CAD data unit. When a load from the override register is accepted, its load bit is
cleared. This keeps the load from repeating; the clearing is this design's choice.

## Grid offset

`grid_offset` makes the enables of the four grids from the line enable `lie` and picture
enable `pie`. `LIE1` is `lie` delayed by 8 clocks. `PIE1` is raised after 8 lines of `LIE1`
and drops with `pie`. Then:

```
grid0 = LIE0.PIE0   grid1 = LIE1.PIE0   grid2 = LIE0.PIE1   grid3 = LIE1.PIE1
```

So grid 1 starts 8 pixels to the right, grid 2 starts 8 lines down, and grid 3 is shifted both
ways. The line blanking must be longer than 8 clocks. The specification gates the grid clocks;
this design uses enables instead.

## Data reduction and the 2k binary line buffer

This part is the hardest to see from the equations, so in words:

* `data_reduction` counts the pixel and line position inside the grid. It keeps one bit per
  cell column (2048 columns for 32k-pixel lines).
* At the first pixel of a cell (top-left, `GRID`), the bit is overwritten with the current
  recognition. On every other pixel of the cell it is written only when a recognition occurs,
  and it is written with 1. So the bit becomes "some recognition happened in this cell". The
  write enable is `GRID + REC` with data `REC`, as in the specification's combined equation.
* At the last pixel of the cell (bottom-right, `CGRID`), the bit (OR the current recognition)
  is handed on as the cell result.
* `bin_line_buffer` stores these cell bits for 16 cell rows, with one read-modify-write per
  cell. For every finished cell it delivers the column of 16 bits to the IRIS: bit 15 is the
  present cell row and bit 0 is the row 15 cells up. The IRIS shifts this column into its
  16x16 window. So the second layer runs at 1/16 of the pixel rate.

The recognition `REC` of a grid is the TH0 output of its enabled OPTIC. The OPTIC answers 6
clocks after it gets a window column, and the line buffer adds 2 clocks. So `sfmu_top` delays
`lie` and `pie` by 8 clocks before the grid offset. That way every recognition meets the cell
of the pixel that produced it.

## Output logic

`output_logic` finds the filter results that were expected and are missing:

* a cell of a grid that is on and not composed, with cell bit 0 (missing feature);
* an active IRIS template of a composed grid with OCL = 0 (missing shape).

The source is coded in 4 bits `{grid, k}`: `k = 0` is the OPTIC result, and `k = 1, 2` are the
two IRIS templates of the grid. The template code comes from the matching stored-template RAM.
The user-filled 8k x 8 look-up table is addressed by `{source[3:0], 0, code[7:0]}` and gives the
error code. Results of different grids normally come on different clocks, because of the grid
offset. If two are missing in the same clock, the lowest source is reported and `err_lost` is
raised. That flag is this design's addition. The specification names a 4k x 8 part for this
table but shows a 13-bit address; this design follows the 13-bit address.

## Host address map

The address map is this design's choice. The host bus has a 16-bit byte address, 8-bit data, a
write strobe and asynchronous read.

| address | contents |
|---|---|
| 0000-1FFF | template RAM |
| 2000-3FFF | output look-up table |
| 4000-41FF | input table, 2 bytes per code (low byte, then bits 12..8) |
| 4200-421F | stored OPTIC template codes (read) |
| 4220-4227 | stored IRIS template codes (read) |
| 4230-4232 | 22-bit OPTIC configuration word |
| 4240-4245 | override register, byte 0 = bits 7..0 |
| 4246 | bit 0: 1 = host drives the CAD bus |

## Dynamic Range Correlator module

Before the OPTIC chips existed, the first layer was prototyped on a separate board. It computes
the same dynamic range with two general rank value filter chips (L64220 type). Both filters see
the 8x8 window from an eight-line line buffer.
* The *white* filter is programmed with the white do-care pixels. It returns `T_vw`, the
  highest video threshold at which the white sub-template still matches. Its rank sets how many
  white mismatches are tolerated.
* The *black* filter does the same for the black do-care pixels. It returns `T_vb - 1`.

`drc_sub_compare` forms `A = T_vw - (T_vb - 1)` and reports a recognition when `A >= B`, with
`B` the range threshold. A negative difference is never a recognition. The result is
registered.

`drc_module` joins the line buffer (the same `line_buffer` as the main unit) and this stage. The
two filters stay outside: the module drives `rvf_di` into them and takes `rvf_white` /
`rvf_black` back. Their latency is unknown here, so it is the parameter `RVF_LATENCY` (default
3). It is used only to delay the valid flag. In `sfmu_top` the module has its own video input
and outputs (`drc_*`) and no connection to the rest of the unit. A behavioural filter model is
in `tb/rvf_model.sv`. The prototype board also carried a data reduction buffer and an IRIS;
these are the same functions as in the main unit and are not repeated.

## How far it follows the specification

These parts follow the specification:
* the two-layer structure and the four offset grids;
* the line buffer with 8 taps;
* the 8k template store;
* the 144/22-clock serial loads;
* the CAD bus fields and destination codes;
* the stored-template RAM sizes;
* the data reduction equations;
* the 16-line binary buffer;
* the 4-bit source code of the output table;
* the structure of the Dynamic Range Correlator module.

These parts are this design's own choices:
* a single clock instead of three phase-shifted clocks;
* synchronous active-high reset;
* the host address map;
* the IRIS template layout and memory addresses;
* the load handshake;
* the exact latency alignment;
* the IRIS latency of one clock (`IRIS_LATENCY`);
* the rank value filter latency (`DRC_RVF_LATENCY`);
* the `err_lost` flag.

These parts are not built:
* the OPTIC and IRIS chips, which are bought-in parts (only behavioural models, in `tb/`);
* the CAD data unit that drives the CAD bus;
* the rank value filter chips of the DRC module (behavioural model only);
* the host computer.

Resources at the default sizes, after coarse synthesis of `sfmu_top`: about 610 cells, 665
flip-flop bits and 3.9 Mbit of memory. Most of the memory is in the two 32k x 56 line buffers
(the unit's and the DRC module's). The rest is the two 8k tables and the 2k cell buffers.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `sfmu_top` | `LINE_LEN` | 32768 | pixels per line |
| | `CELL` | 16 | cell size in pixels and lines |
| | `GRID_OFFSET` | 8 | offset between grids |
| | `OPTIC_LATENCY` | 6 | OPTIC pipeline depth |
| | `IRIS_LATENCY` | 1 | IRIS delay from shift to OCL |
| | `DRC_RVF_LATENCY` | 3 | rank value filter delay in the DRC module |
| `line_buffer` | `TAPS` | 8 | lines delivered per clock |
| `bin_line_buffer` | `COLS`, `LINES` | 2048, 16 | cells per line, cell rows kept |

Shared types and constants (bus layout, destination codes, host map) are in `rtl/sfmu_pkg.sv`.

## Simulation

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each prints
`TB_RESULT checks=N failures=M` and ends. With verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
          -Irtl -Itb rtl/sfmu_pkg.sv tb/tb_sfmu_top.sv --top-module tb_sfmu_top
./obj_dir/Vtb_sfmu_top
```

* `tb_sfmu_top` is the end-to-end test. It uses 256-pixel lines and four rows of cells, and
  takes a few seconds. In order it:
  1. loads an OPTIC template into two OPTICs, the configuration word, and an IRIS template,
     all through the override register, and checks the 144/22/66-clock load times and the
     stored codes;
  2. hands the CAD bus to the CAD data input, with grid 0 as a single-shape grid and grid 1 as
     a composed grid;
  3. streams a grey frame with random bright spots, and checks every reduced cell and the
     exact number of feature and shape errors against a map of the spots. The DRC module gets
     the same video and two filter models, and its recognitions are counted against the same
     map.
* `tb_sfmu_top_full` runs the same sequence with all parameters at their defaults (32768-pixel
  lines). It takes well under a minute.
* Both include `tb/sfmu_top_tb_body.svh`.
* The block testbenches use small parameter values (for example 4x4 cells on 64-pixel lines for
  `tb_data_reduction`).
