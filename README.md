# Reconfigurable depth-tile compressor

A 3D graphics pipeline reads and writes its depth (Z) buffer for every
fragment it shades, so depth traffic is one of the largest consumers of
memory bandwidth. Depth values of a triangle are samples of a plane, which
makes them very predictable: inside one triangle the second-order
differences of neighbouring depth values are almost always -1, 0 or +1. This
design compresses the depth buffer tile by tile (8x8 tiles of 16-bit values)
by storing one or two reference depths, their first-order slopes, and a
second-order residual per pixel at the narrowest width that holds all of
them. Tiles that contain the edge of a triangle are coded as two planes that
meet along a rising, falling, vertical or horizontal boundary. Tiles that fit
none of the patterns are sent raw.

Each tile gets one of eleven modes: five one-plane packets, five two-plane
packets, and the uncompressed one. A packet is 97 to 480 bits long, against
1025 bits for an uncompressed tile.

The RTL holds a three-stage compressor, a matching decompressor, and a top
that places the two side by side. Everything is written in synthesizable
SystemVerilog, and each block has a self-checking testbench.

## Differentials and reference frames

Pixels are numbered `idx = row*8 + col`. Every computation happens in the
*frame* of a reference corner: the tile is mirrored so that the corner sits
at (0,0). The corners are upper-left (UL), lower-right (LR), lower-left (LL)
and upper-right (UR). With `z(r,c)` the mirrored pixels, each frame has:

| position          | value                                   |
|-------------------|-----------------------------------------|
| (0,0)             | reference depth, stored as 16 bits      |
| (0,1)             | `dH = z(0,1) - z(0,0)`                  |
| (1,0)             | `dV = z(1,0) - z(0,0)`                  |
| (r,0), r >= 2     | `z(r,0) - z(r-1,0) - dV`                |
| every other pixel | `z(r,c) - z(r,c-1) - dH`                |

Column 0 is the *vertical part* (six residuals, rows 2-7). Everything else
is the *horizontal part*.

A differential outside -64..63, the range of a 7-bit two's-complement
number, is a *break point*. If there are no break points, the tile is a
single plane seen from UL. Otherwise it may be two planes:

* **Rising, vertical and horizontal.** The first plane is coded from UL and
  the second from LR.
* **Falling.** The tile is handled upside down: the first plane is coded
  from LL and the second from UR.

The second reference always sits at (7,7) of the first frame. Its frame is
therefore the first frame turned by 180 degrees, so pixel `idx` of one frame
is pixel `63-idx` of the other. That one identity is what the combination
block, the second-map check and the decompressor all rely on.

## Break-point shapes

In the first frame, the second plane is a region described by a case and by
the *top break point* (r0, c0), the first break point in raster order:

| case       | code | second-plane region                                   |
|------------|------|-------------------------------------------------------|
| rising     | 00   | rows >= r0, and `c + r >= c0 + r0`: a boundary that moves one column left per row |
| falling    | 01   | the rising shape, in the lower-left frame            |
| vertical   | 10   | rows >= r0 and columns >= c0                          |
| horizontal | 11   | rows >= r0 (c0 = 0)                                   |

Seen from the first reference, a correctly shaped two-plane tile breaks
exactly where a pixel of the second plane follows, in scan order, a pixel of
the first plane. The scan order is to the left in a row, and to the pixel
above in column 0. From that region the checker computes this *expected
map* and requires the actual map to equal it bit for bit.

The checker tries the shapes in this order:
1. Horizontal, when the top break point is in column 0.
2. Rising.
3. Vertical.
4. If none of these fits, the lower-left frame is computed and tried for
   falling.

Once a shape is accepted, the differentials from the second reference are
computed. Their map must also equal the map expected from that side: a
first-plane pixel whose scan predecessor, seen from the second reference, is
a second-plane pixel. If it does not, the tile is sent uncompressed.

A shape is also refused if a reference pixel or a first-order pixel of
either plane would fall inside the other plane. Those positions are (0,0),
(0,1) and (1,0) for the first plane, and (7,7), (7,6) and (6,7) for the
second. This check matters: those positions carry no residual.

Combination then takes each pixel's residual from the plane it belongs to:
`slot[idx] = in_second_plane ? d1[63-idx] : d0[idx]`. Only the low 7 bits
are kept, since nothing wider can remain.

## Compression schemes

The vertical and horizontal parts each choose one scheme, coded in 2 bits:

| code | scheme      | residuals | bits per residual | stored as          |
|------|-------------|-----------|-------------------|--------------------|
| 00   | HA type 2   | {0, 1}    | 1                 | the LSB            |
| 01   | HA type 1   | {-1, 0}   | 1                 | the inverted LSB   |
| 10   | 2-bit DDPCM | {-1,0,1}  | 2                 | two's complement   |
| 11   | 7-bit DDPCM | -64..63   | 7                 | two's complement   |

HA type 1 behaves as if one were added to every residual and subtracted
from the first-order value of that part. In hardware this means the LSB is
inverted and the stored first-order value is `d - 1`; no adders are
involved.

The horizontal part has 55 residuals (52 for two planes), so it decides the
mode:
* **Horizontal part is HA.** The vertical part may be HA, 2-bit or 7-bit.
* **Horizontal part is 2-bit or 7-bit DDPCM.** The vertical part is forced
  to 7-bit.

That leaves exactly five scheme pairs per plane type, which is where the
eleven modes come from.

## Packet format

The packet is MSB first and left-aligned in a 1025-bit vector. `pkt_len`
gives the number of valid bits, and the unused tail is zero.

```
uncompressed : 1 | z(0) z(1) ... z(63)                   (16 bits each, raster order)
one plane    : 0 | 0 | schH(2) schV(2) | ref0(16) dV0(7) | V part (6 slots)
                 | dH0(7) | H part (55 slots)
two planes   : 0 | 1 | schH(2) schV(2) | case(2) row(3) col(3)
                 | ref0(16) dV0(7) dV1(7) | V part (6 slots)
                 | ref1(16) dH0(7) dH1(7) | H part (52 slots)
```

Slots are in raster order of the first frame. In the two-plane format, the
slots at the second reference and its first-order pixels ((7,7), (7,6),
(6,7)) are left out. `dV1` and `dH1` are the second plane's slopes, in its
own frame.

The lengths are:

| mode (V-H)   | HA-HA | 2b-HA | 7b-HA | 7b-2b | 7b-7b |
|--------------|-------|-------|-------|-------|-------|
| one plane    | 97    | 103   | 133   | 188   | 463   |
| two planes   | 132   | 138   | 168   | 220   | 480   |

As an example, one-plane 7b-HA is 6 (control code) + 16 + 7 + 7 + 6x7 +
55 = 133 bits.

## Compressor timing

`zc_compressor` is a three-stage machine with a single folded differential
unit:

1. **Differential computation (DC) and break-point generation.** DC
   produces half a set of differentials per cycle (frame rows 0-3, then
   4-7), so a whole set takes two cycles.
2. **Check.** The break-point map of the set just computed is checked in one
   cycle. The controller then picks the next reference, if one is needed.
3. **Output.** Stage 3 runs the combination cycle (two planes only), then
   scheme selection, then the packer register, which raises `out_valid`.

Cycles from the rising edge that accepts a tile (`in_valid && ready`) to the
edge that sets `out_valid`:

| outcome                                 | cycles |
|-----------------------------------------|--------|
| one plane                               | 5      |
| rising / vertical / horizontal          | 9      |
| falling                                 | 12     |
| uncompressed (no shape fits)            | 8      |
| uncompressed (second-reference map fails) | 8, or 11 for falling |

Handshake and overlap:
* `ready` is high whenever stages 1-2 are idle. A new tile can enter while
  the previous one is still in stage 3, so consecutive tiles overlap.
* `out_valid` is a one-cycle pulse. There is no back-pressure on the output.
* Registers load only when their stage works. This is where the original
  architecture gates the clock.

`zc_decompressor` decodes a packet combinationally and registers the tile.
`out_valid` follows `in_valid` by one edge. Falling tiles are rebuilt in the
lower-left frame and turned back.

## Blocks

| file                  | role                                                        |
|-----------------------|-------------------------------------------------------------|
| `rtl/zc_pkg.sv`       | sizes, types, frame and shape functions, packet lengths     |
| `rtl/zc_diff_comp.sv` | reorder multiplexer plus folded half-tile differential unit |
| `rtl/zc_bp_gen.sv`    | break-point map and two-plane flag                          |
| `rtl/zc_bp_check.sv`  | shape matching for UL, LL and second-reference maps         |
| `rtl/zc_combine.sv`   | two-plane residual combination                              |
| `rtl/zc_css.sv`       | scheme selection for the vertical and horizontal parts      |
| `rtl/zc_pack.sv`      | packet assembly and length                                  |
| `rtl/zc_compressor.sv`| control and the three stages                                |
| `rtl/zc_decompressor.sv` | packet decoder                                           |
| `rtl/zc_top.sv`       | compressor and decompressor side by side                    |

Sizes live in `zc_pkg`: `TS` = 8, `ZW` = 16, and the threshold is
-64..63. The packet layout, the shape functions and the testbench models
are written for 8x8 tiles. Changing `TS` alone is not supported.

## Where this departs from the original architecture

* **Data reorder.** The original reorders pixels for each reference corner
  with data shift registers. Here the reorder is a multiplexer in front of
  the subtractors. The cycle count is unchanged.
* **Break-point lookup.** The original uses a lookup table over break-point
  maps. Here the checker computes the expected map of each candidate shape
  and compares it exactly. The shape boundaries were read from figures, and
  the exact edge pixels are this design's interpretation.
* **Falling coordinates.** For a falling tile the break-point field holds
  the row and column in the lower-left frame, where row 0 is the bottom row
  of the tile. The original checker appears to work in tile coordinates for
  this case.
* **Second reference check.** The second reference's map is also checked.
  A failure sends the tile uncompressed after 8 cycles, or 11 for a falling
  tile.
* **Own choices.** The packet field order beyond the control code, the
  scheme codes, the flag polarity (1 = uncompressed), the handshake, the
  reset (asynchronous, active low) and the decompressor structure are this
  design's choices.
* **Clock gating.** It is expressed as register enables.

## Simulating

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. The testbenches share
the reference models in `tb/zc_tb_pkg.sv`:
* a generator that builds one- and two-plane tiles of every case and
  scheme, from independent geometric descriptions of the shapes;
* the expected scheme choice and mode length;
* a bit-serial reference packer.

```
verilator --binary --timing -Irtl -Itb rtl/zc_pkg.sv tb/zc_tb_pkg.sv \
          tb/tb_zc_top.sv --top-module tb_zc_top -o sim
./obj_dir/sim
```

`tb_zc_top` runs at the default sizes. It streams 400 tiles through the
compressor and then through the decompressor. For every tile it checks:
* the latency against the table above;
* the flag, length, plane bit, schemes and break-point field;
* that the decoded tile is bit-exact.

It also counts every mechanism and fails if one never happened: one-plane,
each two-plane case, each uncompressed cause, every vertical and
horizontal scheme, and overlap of consecutive tiles. The block testbenches
(`tb_zc_diff_comp`, `tb_zc_bp_gen`, `tb_zc_bp_check`, `tb_zc_combine`,
`tb_zc_css`, `tb_zc_pack`, `tb_zc_compressor`, `tb_zc_decompressor`) are
built the same way with their own `--top-module`.

## What is not here

The depth-buffer memory, the rendering pipeline that produces the tiles,
and the standard-cell implementation (pads, clock-gating cells, power
figures) are outside the RTL. No timing closure at the original 100 MHz
has been attempted.
