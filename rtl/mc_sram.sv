// MC-block memory (SRAM3).
//
// Holds the best motion-compensated 16x16 block of the right view until the
// joint block search uses it. It is organised as 16 words of one block
// column (16 pixels) each, with one write and one read port; read data is
// registered and appears one cycle after rd_en.
// Its role follows the source design; the column-wide word and the two ports
// are this design's choices.
module mc_sram
  import pc_pkg::*;
(
  input  logic             clk,
  input  logic             wr_en,
  input  logic [3:0]       wr_addr,
  input  logic [PIX_W-1:0] wr_data [16],
  input  logic             rd_en,
  input  logic [3:0]       rd_addr,
  output logic [PIX_W-1:0] rd_data [16]
);
  logic [16*PIX_W-1:0] mem [16];
  logic [16*PIX_W-1:0] q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= {<<PIX_W{wr_data}};
    if (rd_en) q <= mem[rd_addr];
  end

  always_comb
    for (int r = 0; r < 16; r++) rd_data[r] = q[r*PIX_W +: PIX_W];
endmodule
