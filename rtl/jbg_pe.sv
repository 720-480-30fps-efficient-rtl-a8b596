// One processing element of the joint block generator.
//
// Each cycle it takes one current pixel and the co-located pixels of the
// motion-compensated (MC) and disparity-compensated (DC) blocks, forms the
// eight joint pixels
//   J_k = ((8-k)*MC + k*DC + 4) >> 3,   k = 0..7,
// takes |J_k - Cur| for each and adds it to accumulator k. The weights are
// built only from shifted copies of the pixels (MC, MC>>1, MC>>2, MC>>3 and
// the same for DC, kept with three fraction bits) and adders, without
// multipliers. clear zeroes the accumulators at the clock edge (an input
// taken in the same cycle starts the new sums).
// The shifted MC/DC inputs, the joint pel generation from adders only, the
// eight ABS units and accumulators follow the source design's figure of the
// PE; the particular set of eight weights (DC weight k/8) and the rounding
// are this design's choices.
module jbg_pe
  import pc_pkg::*;
#(
  parameter int ACC_W = 12        // 16 pixels x 255
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [PIX_W-1:0] cur_pel,
  input  logic [PIX_W-1:0] mc_pel,
  input  logic [PIX_W-1:0] dc_pel,
  output logic [ACC_W-1:0] sad [8],
  output logic [PIX_W-1:0] jpel [8]
);
  // weight w/8 of pixel p, as an 11-bit value with 3 fraction bits
  function automatic logic [10:0] wsum(logic [3:0] w, logic [PIX_W-1:0] p);
    logic [10:0] s;
    s = '0;
    if (w[3]) s += {p, 3'b000};        // p
    if (w[2]) s += {1'b0, p, 2'b00};   // p >> 1
    if (w[1]) s += {2'b0, p, 1'b0};    // p >> 2
    if (w[0]) s += {3'b0, p};          // p >> 3
    return s;
  endfunction

  logic [PIX_W-1:0] ad [8];

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      logic [11:0] t;
      t = 12'(wsum(4'(8 - k), mc_pel)) + 12'(wsum(4'(k), dc_pel)) + 12'd4;
      jpel[k] = t[10:3];
      ad[k] = (jpel[k] > cur_pel) ? jpel[k] - cur_pel : cur_pel - jpel[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sad <= '{default: '0};
    else begin
      for (int k = 0; k < 8; k++) begin
        if (clear)   sad[k] <= en ? ACC_W'(ad[k]) : '0;
        else if (en) sad[k] <= sad[k] + ACC_W'(ad[k]);
      end
    end
  end
endmodule
