// Joint block generator (JBG).
//
// Sixteen jbg_pe units, one per block row, evaluate eight joint blocks (DC
// weight k/8, k = 0..7) of a 16x16 macroblock at once. The blocks arrive one
// column per cycle: 16 current, 16 MC and 16 DC pixels. start clears the
// accumulators (the column presented with start is the first one); after 16
// valid columns the per-row sums are added into eight 16x16 SADs, which
// appear on sad with a one-cycle done pulse; done is high two cycles after
// the cycle of the 16th column.
// Sixteen PEs, eight joint blocks at the same time and eight SADs after 16
// cycles follow the source design; column-wise feeding and the final adder
// across the PEs are this design's choices.
module jbg
  import pc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] cur_col [16],
  input  logic [PIX_W-1:0] mc_col  [16],
  input  logic [PIX_W-1:0] dc_col  [16],
  output logic             done,
  output logic [SAD_W-1:0] sad [8]
);
  logic [11:0]     pe_sad [16][8];
  logic [PIX_W-1:0] pe_j  [16][8];
  logic [4:0]      cnt;
  logic [SAD_W-1:0] total [8];

  for (genvar r = 0; r < 16; r++) begin : g_pe
    jbg_pe u_pe (
      .clk, .rst_n,
      .clear  (start),
      .en     (in_valid),
      .cur_pel(cur_col[r]),
      .mc_pel (mc_col[r]),
      .dc_pel (dc_col[r]),
      .sad    (pe_sad[r]),
      .jpel   (pe_j[r])
    );
  end

  always_comb
    for (int k = 0; k < 8; k++) begin
      total[k] = '0;
      for (int r = 0; r < 16; r++) total[k] += SAD_W'(pe_sad[r][k]);
    end

  logic fin;   // the 16th column was taken at the last edge
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; fin <= 1'b0; done <= 1'b0;
      sad <= '{default: '0};
    end else begin
      fin  <= 1'b0;
      done <= 1'b0;
      if (start) cnt <= in_valid ? 5'd1 : 5'd0;
      else if (in_valid && cnt != 5'd16) cnt <= cnt + 5'd1;
      if (in_valid && (start ? 1'b0 : cnt == 5'd15)) fin <= 1'b1;
      if (fin) begin
        sad  <= total;
        done <= 1'b1;
      end
    end
  end
endmodule
