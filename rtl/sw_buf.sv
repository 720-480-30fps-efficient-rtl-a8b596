// Search-window buffer (SRAM0, SRAM1, SRAM2).
//
// A W x H array of pixels written one pixel per cycle from the bus and read
// by the block-matching datapath in one of two shapes:
//   rd_row = 0 : a column of 17 pixels, rows rd_y..rd_y+16 of column rd_x
//                (in rd_data[0..16]),
//   rd_row = 1 : a row of 32 pixels, columns rd_x..rd_x+31 of row rd_y.
// Positions outside the array read as 0. Read data is registered: it appears
// one cycle after rd_en. Writes and reads may happen in the same cycle.
// The source design keeps the level-2 window in one SRAM and the level-1/0
// windows in two more; this model is an array with a wide read port (one
// column per cycle for the shifting RSRN, one row for its downward move), a
// register-file style memory chosen here instead of a foundry SRAM macro.
module sw_buf
  import pc_pkg::*;
#(
  parameter int W = BUF_W,
  parameter int H = BUF_H
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [5:0]       wr_x,
  input  logic [5:0]       wr_y,
  input  logic [PIX_W-1:0] wr_data,
  input  logic             rd_en,
  input  logic             rd_row,
  input  logic signed [7:0] rd_x,
  input  logic signed [7:0] rd_y,
  output logic [PIX_W-1:0] rd_data [32]
);
  logic [PIX_W-1:0] mem [H][W];

  function automatic logic [PIX_W-1:0] px(int x, int y);
    if (x < 0 || x >= W || y < 0 || y >= H) return '0;
    return mem[y][x];
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_x) < W && int'(wr_y) < H) mem[wr_y][wr_x] <= wr_data;
    if (rd_en) begin
      for (int i = 0; i < 32; i++) begin
        if (rd_row)      rd_data[i] <= px(int'(rd_x) + i, int'(rd_y));
        else if (i < 17) rd_data[i] <= px(int'(rd_x), int'(rd_y) + i);
        else             rd_data[i] <= '0;
      end
    end
  end
endmodule
