// Interpolation unit (IU): half-pel sample generation.
//
// Reference columns of 17 pixels arrive one per cycle, left to right. The
// unit keeps the previous column and, in the cycle a new column arrives,
// outputs one 16-pixel column of the half-pel block selected by (hh, hv):
//   hh=0 hv=0 : prev[r]                                  (integer position)
//   hh=0 hv=1 : (prev[r] + prev[r+1] + 1) >> 1           (vertical half)
//   hh=1 hv=0 : (prev[r] + in[r] + 1) >> 1               (horizontal half)
//   hh=1 hv=1 : (prev[r] + prev[r+1] + in[r] + in[r+1] + 2) >> 2
// so 17 input columns give the 16 columns of a block. first marks the first
// column of a block; out_valid is low for it. The output is combinational
// from the input column and the held one.
// That the IU produces half-pel samples for the refinement and feeds the
// RSRN and the joint block generator follows the source design; the bilinear
// filter with rounding is this design's choice.
module iu
  import pc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             first,
  input  logic [PIX_W-1:0] in_col [17],
  input  logic             hh,
  input  logic             hv,
  output logic             out_valid,
  output logic [PIX_W-1:0] out_col [16]
);
  logic [PIX_W-1:0] prev [17];
  logic             have_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '{default: '0};
      have_prev <= 1'b0;
    end else if (in_valid) begin
      prev <= in_col;
      have_prev <= 1'b1;
    end
  end

  always_comb begin
    out_valid = in_valid && !first && have_prev;
    for (int r = 0; r < 16; r++) begin
      logic [PIX_W+1:0] s;
      case ({hh, hv})
        2'b00:   s = {prev[r], 2'b00};
        2'b01:   s = {1'b0, prev[r], 1'b0} + {1'b0, prev[r+1], 1'b0} + 10'd2;
        2'b10:   s = {1'b0, prev[r], 1'b0} + {1'b0, in_col[r], 1'b0} + 10'd2;
        default: s = 10'(prev[r]) + 10'(prev[r+1]) + 10'(in_col[r]) + 10'(in_col[r+1]) + 10'd2;
      endcase
      out_col[r] = s[PIX_W+1:2];
    end
  end
endmodule
