# View synthesis engine (RTL)

This SystemVerilog design synthesizes a virtual camera view between a left and a right reference view. Each reference view supplies 8-bit luma and 8-bit depth. The engine follows the architecture of the thesis "Analysis and Design of a View Synthesis Engine":

- homography-based 3D warping with linear-interpolated homographies (LIA, 8 depth segments);
- two frame-level pipeline stages joined through external memory;
- scan-column processing with circular-FIFO column buffers;
- a 64-bit shared memory bus.

The target is HD1080p (1920x1080) at 30 frames/s and 200 MHz. These are the default parameters.

## Architecture

```
                 ht_* (homographies)          alpha, frame base addresses
                        |                               |
                  +-----------+                         |
                  | homo_table|  48 x 308 bit, reverse relations ping-pong
                  +-----------+
                   |fwd   |rev L, rev R
  dm_* --> depth_mapping  texture_mapping <-- tm_* (warped depth L, R)
  (ref depth)  |  |  |      |   |             --> y_* (virtual luma)
         DLV DRV clear     YL  YR
               \  |  |     /   /
                +-------------+
                |  vs_arbiter | --> bus_* (64-bit) / rsp_*
                +-------------+
```

### Stage 1: `depth_mapping`

- **Input:** the two reference depth maps arrive as one stream of (view, depth) beats, interleaved freely. Within a view, pixels come in scan-column order: top to bottom within a column. The left view runs its columns from right to left and the right view from left to right. This order lets later writes overwrite occluded background without a Z-buffer.
- **Warping:** one `warp_unit` is shared by both views, at 0.5 pixel/cycle per view. A pixel is warped with the homography of its depth (depth 0 is treated as 1).
- **Output:** the warped depth is written as one byte at `base + column*H + row` of the DLV or DRV frame. Each view has a `burst_packer` that merges bytes of the same 64-bit word into one strobed write.
- **Clearing:** on `dm_start`, `mem_init` clears both frames to 0, because 0 marks a hole. Pixels are accepted only after that. `dm_done` rises when every pixel has been warped and written.

### Stage 2: `texture_mapping`

Stage 2 takes the two warped depth maps of the previous frame as a stream in scan-column order, one virtual pixel per beat.

1. **Depth filtering.** `depth_filter` applies a 3x3 median to the depth with five cascaded minimum selectors. The hole map uses a 3x3 majority, then a 3x3 dilation. Each is built from column-height circular FIFOs (`col_window`, `circ_fifo`).
2. **Reverse warping.** One `warp_unit` per view maps each virtual pixel into the left and right views.
3. **Blend mode.** `blend_mode` applies the blend-mode truth table, including the boundary-special case.
4. **Texture fetch.** `tex_fetch` gathers consecutive bytes of one reference column into single 64-bit reads. It keeps the start and length of each read in its index table and returns the bytes in pixel order through a reorder buffer.
5. **Blending.** `blender` forms the weighted sum (1-alpha)L + alpha R, or takes one view alone, or marks a final hole.
6. **Hole filling.** `hole_fill` fills final holes with a distance-weighted average of the non-hole pixels in a 9x5 window. The filled column is written back into the column buffer, so later holes can use pixels filled earlier (column-level accumulation). A hole with no usable neighbour stays a hole.

### Bus: `vs_arbiter`

Five masters share the bus: DLV and DRV writes, YL and YR reads, and the clearing writes.

- The four random-access masters form group B. The master that won last cycle keeps the bus while it keeps requesting.
- Group B wins over group A. Each group is served round robin.
- Requests are valid/ready.
- Read responses carry the master id and must come back in request order.

### Warping datapath

- **Homography table (`homo_table`):** holds 48 words, one per relation and segment. Each word is a base/increment pair of 308 bits: the coefficients are 2.16, 8.5 and 1.27 fixed point, 154 bits per matrix.
- **Interpolation (`homo_interp`):** forms H(Z) = Hbase + floor(Hinc * (Z mod 32) / 32).
- **Transform (`trans_homo`):** divides by the projective denominator in 18 pipeline stages. Two 16-stage dividers (`div_pipe`) produce quotients with two fraction bits, which are rounded to the nearest pixel. The unit also reports whether the result lies inside the frame.
- **Latency:** the whole `warp_unit` takes 19 cycles, one for the table read and 18 for the transform.

### Homography estimation: `make_homography`

A homography has eight unknowns (h22 = 1). Four point correspondences give eight linear equations. The four source points are the frame corners, numbered 1 = (W-1, 0), 2 = (0, H-1), 3 = (0, 0) and 4 = (W-1, H-1). Their destinations come in on `dst_u`/`dst_v` with 6 fraction bits.

- **Row order:** the equations are ordered so that large entries sit on the diagonal. The rows are the u-equations of points 1-3, the v-equations of points 1-4, and last the u-equation of point 4. With that order the system is close to diagonally dominant.
- **Iteration:** the system is solved by Gauss-Seidel iteration: each unknown is recomputed from the newest values of the others. Twenty sweeps are run, starting from zero.
- **Datapath:** one multiplier accumulates `b_i - sum a_ij*h_j` over the eight columns. A restoring divider then divides by `a_ii`, one quotient bit per cycle. The unknowns carry 40 fraction bits and are rounded at the end to the 2.16 / 8.5 / 1.27 table formats.
- **Timing:** one sweep takes 8 x 111 cycles, so a solve takes about 17.8k cycles. Refreshing the whole table needs 36 estimates (9 depth levels x 4 relations), about 0.64M cycles, which is under a tenth of a frame time.

In the top, the estimator sits on its own `mh_*` port. Around it, the controlling processor computes the destination points and assembles the LIA table entries for `ht_*`.

## Top-level interface (`vs_engine`, parameters `H`, `W`)

| Port group | Meaning |
|---|---|
| `clk`, `rst_n` | clock; asynchronous active-low reset |
| `ht_we/ht_rel/ht_seg/ht_wdata`, `ht_swap` | Write one homography pair for a relation (L2V, R2V, V2L, V2R) and a segment 0..7. Reverse relations go to the bank that is not being read. `ht_swap` exchanges the banks at a frame boundary. |
| `mh_start`, `mh_dst_u[4]`, `mh_dst_v[4]`, `mh_busy`, `mh_done`, `mh_h` | Homography estimation. Destinations of the four frame corners (signed, 6 fraction bits) go in. The estimated matrix comes out in table format when `mh_done` pulses. |
| `alpha` | weight of the right view, 0..256 |
| `dlv_base`, `drv_base`, `yl_base`, `yr_base` | byte addresses of the warped-depth and reference-luma frames, 8-byte aligned |
| `dm_start`, `dm_valid/dm_ready`, `dm_view`, `dm_depth`, `dm_done` | stage 1 input stream |
| `tm_valid/tm_ready`, `tm_depth_l`, `tm_depth_r` | stage 2 input stream: warped depth of both views |
| `y_valid`, `y_data`, `y_hole`, `y_filled`, `y_row`, `y_col`, `y_last` | synthesized luma in scan-column order |
| `bus_valid`, `bus_req`, `bus_ready` | Bus request, with a 64-bit word address, data, byte strobes and master id. |
| `rsp_valid`, `rsp` | read data and id |

## What follows the document and what is this design's choice

**Taken from the document:**

- the two frame-level stages with the warped depth kept in external memory;
- scan-column order;
- LIA with 8 segments, the coefficient formats and the 48 x 308-bit table with ping-pong reverse relations;
- the 18-stage transform with 16-stage dividers;
- depth 0 raised to 1;
- the median from five minimum selectors, the hole-map majority and the dilation;
- the blend-mode table with boundary special and the weighted blend;
- the 9x5 column-accumulated bilinear hole filling;
- the index/valid/reorder scheme for texture reads;
- Gauss-Seidel homography estimation on the rearranged corner system, with fewer than 20 iterations;
- column-sized output buffers;
- the arbitration rules of groups A and B;
- the 64-bit bus.

**Choices of this design, where the document is silent or differs:**

- **Stage 2 throughput:** stage 2 has one reverse warp unit per view and takes one virtual pixel per cycle. The document alternates the two views at 0.5 pixel/cycle.
- **Interpolation timing:** the interpolation is combinational (the document pipelines it), so the warp latency is 19.
- **Hole-map threshold:** the filtered hole map marks a hole when at least 5 of the 9 taps are holes, which is the median of the hole map. Out-of-frame median taps take the centre value.
- **Table read ports:** the homography table has three read ports, so both reverse warpers read in the same cycle.
- **Texture-fetch tables:** the texture-fetch index and valid tables are FIFOs of (start byte, length) per read word.
- **Bounding pixels in flight:** a credit counter bounds the pixels in flight in stage 2.
- **Time-outs:** partly filled words are closed after 4 idle cycles.
- **Hole-fill weights:** the weights are the separable triangle (KH/2+1-|dy|)*(KW/2+1-|dx|), and the result is rounded to nearest.
- **Rounding:** quotients are rounded half away from zero.
- **Clearing order:** clearing happens before the first pixel of stage 1, not during the first column.
- **Bus protocol:** the bus protocol is this design's own.
- **Estimation arithmetic:** the homography estimate uses fixed point with 40 fraction bits and one multiplier and divider. The update uses the newest values within a sweep, which is the Gauss-Seidel method. Every solve starts from zero.

## Not implemented

- **Chroma:** U and V synthesis is not built; only luma is synthesized. `hole_fill` supports the 5x3 chroma window, but no chroma path is instantiated.
- **Preprocessing:** of the homography preprocessing, only the estimation from corner correspondences (`make_homography`) is built. The Z transform, the projection matrices, the projection of the corners and the assembly of base/increment table entries are not built. The table is loaded through the `ht_*` port.
- **DMA:** the regular DMA transfers are not part of the top. These are reading reference depth, reading the warped depth back and writing the result. Their data enters and leaves as streams.
- **Epipole inside the frame:** scan orders for an epipole inside the frame are not built.
- **External DRAM:** the DRAM itself is not part of the design. The testbenches contain a behavioural memory model.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **`tb_median9`, `tb_blend_mode`, `tb_blender`, `tb_homo_interp`:** random and exhaustive inputs against reference models.
- **`tb_trans_homo`:** random projective homographies against a real-valued model. It also checks the 18-cycle latency.
- **`tb_circ_fifo`, `tb_col_window`, `tb_depth_filter`:** random frames with holes, each checked against a reference filter.
- **`tb_hole_fill`:** a 9x5 instance and a 5x3 instance. It checks filled values, unfilled holes and column-level accumulation.
- **`tb_make_homography`:** random near-identity homographies at 1920x1080. Each result is compared with a floating-point Gauss-Seidel model within one LSB and with the source matrix. It also checks the solve time.
- **`tb_vs_arbiter`:** random requests against a model of the arbitration rules, with three group-A masters so that the round robin shows.
- **`tb_vs_engine` (16x24 frame) and `tb_vs_engine_full` (1920x1080, default parameters):** end-to-end tests. Each:
  1. loads depth-dependent shift homographies;
  2. swaps the reverse bank and then writes a wrong table into the new write bank;
  3. runs stage 1 and compares the warped-depth frames in the memory model byte for byte against a reference forward warp;
  4. runs the homography estimator on corners shifted by (+5, -3) and checks the exact translation;
  5. runs stage 2 on those frames and compares every output pixel against a reference of filtering, reverse warping, blending and hole filling.

  The memory model takes requests with a random ready signal and returns reads after a random latency. The tests count each mechanism and fail if one never occurs:
  - depth leveling;
  - pixels dropped outside the frame;
  - write merges;
  - all four blend modes and the boundary special;
  - filled and unfilled holes;
  - stalls in both stages;
  - bus contention;
  - the homography estimate.

  The depth-mapping, texture-mapping, warp, table, fetch, packer and clearing blocks are tested through these two testbenches.

`tb_vs_engine_1024` runs the same test on a 1024x768 build, the frame size of the multiview test sequences. Stage 1 took 2.03M cycles and stage 2 about 0.88M cycles per frame.

The full-size run passes 8,294,431 checks with 0 failures. Stage 1 took 5.35M cycles for both views, with the bus ready in 70% of cycles. Stage 2 took about 2.3M cycles per frame, with the bus ready in 45% of cycles. Both are under the 6.67M cycles per frame that 30 frames/s at 200 MHz allows.

For each block, a copy broken in one way that matters was checked to make its testbench fail.

## Files

- `rtl/`: one module or package per file.
  - Package: `vs_pkg`.
  - Top: `vs_engine`.
  - Stages: `depth_mapping`, `texture_mapping`.
  - Warping: `make_homography`, `warp_unit`, `homo_table`, `homo_interp`, `trans_homo`, `div_pipe`.
  - Filters and buffers: `depth_filter`, `col_window`, `circ_fifo`, `median9`, `hole_fill`.
  - Blending: `blend_mode`, `blender`.
  - Memory access: `tex_fetch`, `burst_packer`, `mem_init`, `vs_arbiter`, `sync_fifo`.
- `tb/`: the testbenches:
  - `tb_ref_pkg`: reference models;
  - `vs_engine_tb_body.svh`: the shared end-to-end test body;
  - `hf_case`: one hole-fill test case.
