// Shared types and constants of the stereo prediction core.
//
// The core runs a three-level hierarchical block matching search (level 2 at
// quarter resolution with 4x4 blocks, level 1 at half resolution with 8x8
// blocks, level 0 at full resolution with 16x16 blocks), then a half-pel
// refinement, and for the right view a joint (weighted) block search.
// The 128-PE width, the 8 / 2 / half-block SADs per cycle, the 16-PE joint
// block generator and the search ranges [-64,+63] x [-32,+31] (ME) and
// [-64,+63] x [-16,+15] (DE) follow the source design. The refinement ranges
// of levels 1 and 0, the window sizes derived from them and all encodings are
// this design's own choices.
package pc_pkg;

  localparam int PIX_W = 8;
  localparam int NPE   = 128;             // processing elements in the adder tree
  localparam int SAD_W = 16;              // holds a 16x16 SAD (max 65280)
  localparam int MB    = 16;              // macroblock size

  // Level 2: quarter resolution, full search.
  localparam int L2_DXMIN = -16;          // -64/4
  localparam int L2_NDX   = 32;           // [-16,+15] -> [-64,+63] full-res
  localparam int L2_DYMIN_ME = -8;        // [-8,+7]  -> [-32,+31]
  localparam int L2_DYMIN_DE = -4;        // [-4,+3]  -> [-16,+15]
  localparam int SW0_W = 35;              // 32 positions + 4x4 block - 1
  localparam int SW0_H = 19;              // 16 positions + 4 - 1

  // Level 1: half resolution, refinement around each surviving candidate.
  localparam int L1_DXMIN = -8;
  localparam int L1_NDX   = 16;
  localparam int L1_DYMIN = -2;
  localparam int L1_NDY   = 4;

  // Level 0: full resolution, refinement plus a 1-pixel half-pel margin.
  localparam int L0_DXMIN = -4;
  localparam int L0_NDX   = 8;
  localparam int L0_DYMIN = -2;
  localparam int L0_NDY   = 4;

  // Refinement window buffers (SRAM1 / SRAM2), big enough for either level.
  localparam int BUF_W = 25;              // 8 + 16 - 1 + 2 margin
  localparam int BUF_H = 21;              // 4 + 16 - 1 + 2 margin

  localparam int MV_W = 10;

  typedef struct packed {
    logic signed [MV_W-1:0] dy;
    logic signed [MV_W-1:0] dx;
  } mv_t;

  typedef enum logic [1:0] {LV0 = 2'd0, LV1 = 2'd1, LV2 = 2'd2} level_t;

  // RSRN operations. RS_DOWN moves the search position one row down: the
  // register rows move up and a new row enters at the bottom.
  typedef enum logic [1:0] {RS_HOLD = 2'd0, RS_LEFT = 2'd1, RS_RIGHT = 2'd2, RS_DOWN = 2'd3} rs_op_t;

  typedef enum logic [1:0] {OP_ME = 2'd0, OP_DE = 2'd1, OP_JOINT = 2'd2} op_t;

  // Mode decision result for the right view.
  typedef enum logic [1:0] {MODE_MC = 2'd0, MODE_DC = 2'd1, MODE_JOINT = 2'd2} mode_t;

  typedef struct packed {
    logic             valid;
    logic [SAD_W-1:0] sad;
    mv_t              mv;
  } cand_t;

  // Rows and columns of the 128-register RSRN at each level.
  function automatic int lv_rows(level_t lv);
    case (lv)
      LV2:     return 4;
      LV1:     return 8;
      default: return 16;
    endcase
  endfunction

  function automatic int lv_cols(level_t lv);
    return NPE / lv_rows(lv);
  endfunction

endpackage
