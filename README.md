# Stereo video prediction core (hierarchical ME/DE with joint block compensation)

This core does the block-matching work of a stereo video encoder. For every 16x16
macroblock it runs motion estimation (ME) for the left and the right view and
disparity estimation (DE) of the right view against the left view. It then builds
eight "joint" blocks, each a weighted mix of the best motion-compensated (MC) block
and the best disparity-compensated (DC) block. A mode decision picks MC, DC or
joint by smallest SAD. The target is 720x480 video at 30 frames/s in both views.

## Main idea: one 128-PE datapath for three search levels

A full search would need thousands of absolute-difference units. This design uses a
three-level hierarchical search instead, and all three levels share one 128-PE datapath:

| level | resolution | block | candidates per cycle | range searched |
|---|---|---|---|---|
| 2 | 1/4 | 4x4 | 8 | full: [-16,+15] x [-8,+7] (ME), [-4,+3] (DE) = [-64,+63] x [-32,+31] / [-16,+15] full-res |
| 1 | 1/2 | 8x8 | 2 | [-8,+7] x [-2,+1] around each kept level-2 candidate |
| 0 | 1 | 16x16 | 1/2 | [-4,+3] x [-2,+1] around each kept level-1 candidate |
| half-pel | 1 | 16x16 | 1/2 | the 8 half-pel neighbours of the best integer vector |

- **RSRN** (`rsrn.sv`): the shift register network of 128 8-bit registers. Per level it
  is seen as 4x32, 8x16 or 16x8 registers, so one load holds eight 4x4 tiles, two
  8x8 tiles or half a 16x16 block. One column enters per cycle. The network shifts
  left, right or down. The controller visits search positions in a snake order (fill,
  shift left, step down, shift right, ...). A change of row therefore costs one cycle.
- **Adder tree** (`pe_adder_tree.sv`): eight 16-input trees give eight 4x4 SADs. These
  add up to two 8x8 SADs and then to one half 16x16 SAD.
- **Compare tree** (`compare_tree.sv`): keeps the best three candidates. Ties are
  ordered by vector, so the result does not depend on the scan order.
- **NOCR checker** (`nocrc.sv`): drops a candidate that lies within +/-2 columns and
  +/-1 row of a better kept one. Each dropped candidate saves one refinement-window load
  and one refinement search.
- **IU** (`iu.sv`): builds half-pel columns with bilinear rounding.
- **JBG** (`jbg.sv`, `jbg_pe.sv`): 16 PEs make the joint pixels
  `((8-k)*MC + k*DC + 4) >> 3` for k = 0..7 from shifted copies and adders. It gives
  eight 16x16 SADs after 16 columns.
- **DSU / CRS** (`dsu.sv`, `crs.sv`): these down-sample the current block with
  2x2 and 4x4 rounded means and hold it at all three resolutions.
- **Memories** (`sw_buf.sv`, `mc_sram.sv`):
  - SRAM0 holds the quarter-resolution window (35x19).
  - SRAM1 and SRAM2 work as a ping-pong pair of refinement windows (25x21).
  - SRAM3 holds the MC block.
  - All are modelled as register arrays.

## Host protocol (`pred_core.sv`)

1. Write the current block, one row of 16 pixels per beat (`cur_we`, rows 0..15 in order).
2. Write SRAM0 with the quarter-resolution reference window (`bus_sel=0`).
   Pixel (i,j) is the 4x4 rounded mean at quarter position `(mbx/4-16+i, mby/4-8+j)`.
3. Issue `OP_ME` or `OP_DE` (`cmd_valid` while `cmd_ready` is high).
4. While the core searches, it raises `win_req` with `win_level`, `win_center` and `win_buf`.
   The host then writes the window into SRAM1/2 (`bus_sel=1+win_buf`) and pulses `win_ack`.
   - Level 1: pixel (i,j) = half-res `(mbx/2+cx-8+i, mby/2+cy-2+j)`.
   - Level 0: pixel (i,j) = full-res `(mbx+cx-5+i, mby+cy-3+j)`.
   The core asks for the next window during the current search. It reuses a window that
   is already loaded.
5. `res_valid` gives `res_mv` (half-pel units), `res_sad`, `op_cycles` and `stall_cycles`.
6. For the right view, the order is `OP_ME` with `cmd_save_mc` (the MC block goes to
   SRAM3), then `OP_DE`, then `OP_JOINT`. The last gives `res_mode`, `res_sad` and
   `res_jkind`.

The reference frames for levels 1 and 2 must be down-sampled with the same rounded
means that the DSU uses.

## What follows the source design and what does not

These parts follow the source design:
- the unit list and its connections;
- the 128 PEs and the three SAD widths;
- the three shift directions;
- the best-three, overlap-check, refine flow;
- half-pel refinement through the IU;
- the 16-PE joint block generator with shifted MC/DC pixels.

These are this design's own choices:
- the refinement ranges;
- the RSRN geometry per level;
- the snake schedule;
- the NOCR thresholds;
- the interpolation and down-sampling filters;
- the eight joint weights;
- the mode tie rule;
- the host protocol;
- all memory sizes (15,768 bits in total, where the source chip has 21,248).

These are not included:
- RAM BIST;
- scan chains;
- the ad-hoc test multiplexing;
- pads.

## Performance

`tb/tb_pred_core.sv` measures 1255-1305 compute cycles per macroblock for two MEs, one
DE and the joint search. The budget at 81 MHz is 2000 cycles (81e6 / (1350 x 30)).
Cycles spent waiting for window loads depend on the host and are not counted.

## Simulation

```
verilator --binary --timing -Irtl rtl/pc_pkg.sv rtl/*.sv tb/tb_pred_core.sv --top-module tb_pred_core
./obj_dir/Vtb_pred_core
```

The testbench builds three stereo scenes and plays the host. It compares every vector,
SAD, mode and joint kind with its own reference model of the algorithm. It checks the
cycle budget. It also checks that each mechanism happens at least once: left, right and
down shifts, NOCR drops, window reuse, prefetch during a search, stalls, half-pel wins,
and all three modes. The sub-blocks have no unit testbenches of their own. They are
exercised only through this end-to-end test.
