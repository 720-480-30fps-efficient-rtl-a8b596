// Down-sampling unit (DSU).
//
// Turns the current 16x16 macroblock, arriving one row of 16 pixels per beat
// in row order 0..15, into the three resolutions the hierarchical search
// needs: the full-resolution row is passed on, every second row a half-
// resolution row of 8 pixels (rounded mean of each 2x2 square) is produced,
// and every fourth row a quarter-resolution row of 4 pixels (rounded mean of
// each 4x4 square). Outputs are registered, one cycle after the input beat.
// The source design shows this unit between the bus and the current register
// set but does not describe it; the 2x2 / 4x4 rounded-mean filter is this
// design's choice, and the reference frames fed to levels 1 and 2 must be
// down-sampled the same way.
module dsu
  import pc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [3:0]       in_row,
  input  logic [PIX_W-1:0] in_pix [16],
  output logic             l0_we,
  output logic [3:0]       l0_row,
  output logic [PIX_W-1:0] l0_pix [16],
  output logic             l1_we,
  output logic [2:0]       l1_row,
  output logic [PIX_W-1:0] l1_pix [8],
  output logic             l2_we,
  output logic [1:0]       l2_row,
  output logic [PIX_W-1:0] l2_pix [4]
);
  logic [9:0]  acc1 [8];   // running 2x2 sums (first row of the pair)
  logic [11:0] acc2 [4];   // running 4x4 sums (rows before the last)
  logic [9:0]  s1 [8];
  logic [11:0] s2 [4];

  always_comb begin
    for (int i = 0; i < 8; i++)
      s1[i] = (in_row[0] ? acc1[i] : 10'd0) + 10'(in_pix[2*i]) + 10'(in_pix[2*i+1]);
    for (int i = 0; i < 4; i++)
      s2[i] = (in_row[1:0] != 2'd0 ? acc2[i] : 12'd0) + 12'(in_pix[4*i]) + 12'(in_pix[4*i+1])
            + 12'(in_pix[4*i+2]) + 12'(in_pix[4*i+3]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc1 <= '{default: '0};
      acc2 <= '{default: '0};
      l0_we <= 1'b0; l1_we <= 1'b0; l2_we <= 1'b0;
      l0_row <= '0; l1_row <= '0; l2_row <= '0;
      l0_pix <= '{default: '0}; l1_pix <= '{default: '0}; l2_pix <= '{default: '0};
    end else begin
      l0_we <= in_valid;
      l1_we <= in_valid && in_row[0];
      l2_we <= in_valid && (in_row[1:0] == 2'd3);
      if (in_valid) begin
        l0_row <= in_row;
        l0_pix <= in_pix;
        acc1 <= s1;
        acc2 <= s2;
        l1_row <= in_row[3:1];
        l2_row <= in_row[3:2];
        for (int i = 0; i < 8; i++) l1_pix[i] <= PIX_W'((s1[i] + 10'd2) >> 2);
        for (int i = 0; i < 4; i++) l2_pix[i] <= PIX_W'((s2[i] + 12'd8) >> 4);
      end
    end
  end
endmodule
