// Reconfigurable shift register network (RSRN).
//
// 128 eight-bit registers that hold the part of the search window under
// comparison. The array is seen as rows x columns according to the level:
// 4 x 32 at level 2, 8 x 16 at level 1 and 16 x 8 at level 0. Each cycle one
// operation is applied:
//   RS_LEFT  - every column moves one place left, col_in enters at the right;
//   RS_RIGHT - every column moves one place right, col_in enters at the left;
//   RS_DOWN  - the search position moves one row down: rows move up and
//              row_in enters as the bottom row;
//   RS_HOLD  - nothing changes.
// With left, right and down moves the search positions are visited in a
// snake order, so a change of row costs one cycle like any other step.
// The outputs are the registers in PE order: at level 2 tile g (columns
// 4g..4g+3) drives PEs 16g..16g+15, at level 1 tile t (columns 8t..8t+7)
// drives PEs 64t..64t+63, at level 0 the 16 x 8 array drives all PEs row by
// row. So one load gives eight 4x4 candidates 4 positions apart, two 8x8
// candidates 8 positions apart, or one half 16x16 block.
// The 128 registers and the three shift directions follow the source design;
// the exact geometry per level, the row input used for the down move and the
// tiling are this design's choices. Changing the level without reloading
// reinterprets the contents, so the controller refills the array first.
module rsrn
  import pc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  level_t           level,
  input  rs_op_t           op,
  input  logic [PIX_W-1:0] col_in [16],   // rows 0..R-1 are used
  input  logic [PIX_W-1:0] row_in [32],   // columns 0..C-1 are used
  output logic [PIX_W-1:0] pe_ref [NPE]
);
  logic [PIX_W-1:0] r [NPE];      // r[row*C + col]
  logic [PIX_W-1:0] r_nxt [NPE];
  int unsigned nr, nc;

  always_comb begin
    nr = unsigned'(lv_rows(level));
    nc = unsigned'(lv_cols(level));
    r_nxt = r;
    for (int unsigned row = 0; row < 16; row++)
      for (int unsigned col = 0; col < 32; col++)
        if (row < nr && col < nc) begin
          case (op)
            RS_LEFT:  r_nxt[row*nc + col] = (col == nc-1) ? col_in[row] : r[row*nc + col + 1];
            RS_RIGHT: r_nxt[row*nc + col] = (col == 0)    ? col_in[row] : r[row*nc + col - 1];
            RS_DOWN:  r_nxt[row*nc + col] = (row == nr-1) ? row_in[col] : r[(row+1)*nc + col];
            default:  ;
          endcase
        end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) r <= '{default: '0};
    else        r <= r_nxt;

  // PE-order view.
  always_comb begin
    for (int p = 0; p < NPE; p++) begin
      case (level)
        LV2:     pe_ref[p] = r[((p % 16) / 4) * 32 + 4 * (p / 16) + (p % 4)];
        LV1:     pe_ref[p] = r[((p % 64) / 8) * 16 + 8 * (p / 64) + (p % 8)];
        default: pe_ref[p] = r[p];
      endcase
    end
  end
endmodule
