// Current register set (CRS).
//
// Holds the current macroblock at the three resolutions written by the DSU
// (16x16, 8x8 and 4x4 pixels) and presents it to the 128-PE adder tree in the
// same PE order the RSRN uses: at level 2 the 4x4 block is repeated for all
// eight candidate tiles, at level 1 the 8x8 block for both tiles, at level 0
// the left (half = 0) or right (half = 1) 16x8 half of the full block. A
// second, column-wide port gives column col_sel of the full block (16 pixels,
// top to bottom) to the joint block generator. Writes take effect at the
// clock edge; reads are combinational.
// That the CRS feeds the adder tree follows the source design; the storage
// of all three resolutions and the ports are this design's choices.
module crs
  import pc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             l0_we,
  input  logic [3:0]       l0_row,
  input  logic [PIX_W-1:0] l0_pix [16],
  input  logic             l1_we,
  input  logic [2:0]       l1_row,
  input  logic [PIX_W-1:0] l1_pix [8],
  input  logic             l2_we,
  input  logic [1:0]       l2_row,
  input  logic [PIX_W-1:0] l2_pix [4],
  input  level_t           level,
  input  logic             half,
  output logic [PIX_W-1:0] pe_cur [NPE],
  input  logic [3:0]       col_sel,
  output logic [PIX_W-1:0] col_out [16]
);
  logic [PIX_W-1:0] b0 [16][16];
  logic [PIX_W-1:0] b1 [8][8];
  logic [PIX_W-1:0] b2 [4][4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b0 <= '{default: '0};
      b1 <= '{default: '0};
      b2 <= '{default: '0};
    end else begin
      if (l0_we) b0[l0_row] <= l0_pix;
      if (l1_we) b1[l1_row] <= l1_pix;
      if (l2_we) b2[l2_row] <= l2_pix;
    end
  end

  always_comb begin
    for (int p = 0; p < NPE; p++) begin
      case (level)
        LV2:     pe_cur[p] = b2[(p % 16) / 4][p % 4];
        LV1:     pe_cur[p] = b1[(p % 64) / 8][p % 8];
        default: pe_cur[p] = b0[p / 8][8 * int'(half) + p % 8];
      endcase
    end
    for (int r = 0; r < 16; r++) col_out[r] = b0[r][col_sel];
  end
endmodule
