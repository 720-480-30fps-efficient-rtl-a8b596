// 128-PE adder tree.
//
// 128 processing elements each form the absolute difference of one reference
// and one current pixel. Eight 1-D adder trees sum groups of 16 PEs (PE
// 16g..16g+15) into eight 4x4 (or partial) SADs; groups 0-3 and 4-7 are added
// into two 8x8 (or partial) SADs; those two are added into one half 16x16 SAD.
// The tree does not know the level: the RSRN and the current register set
// present their pixels in PE order so that at level 2 each group is one 4x4
// candidate, at level 1 each half is one 8x8 candidate and at level 0 the
// whole tree is one half (16 rows x 8 columns) of a 16x16 block. The three
// output levels follow the source design's figure of the tree; the purely
// combinational implementation (the caller registers the result) is this
// design's choice.
module pe_adder_tree
  import pc_pkg::*;
(
  input  logic [PIX_W-1:0] ref_pix [NPE],
  input  logic [PIX_W-1:0] cur_pix [NPE],
  output logic [11:0]      sad4    [8],   // 16 x 255 fits in 12 bits
  output logic [13:0]      sad8    [2],
  output logic [14:0]      sad16h
);
  logic [PIX_W-1:0] ad [NPE];

  always_comb begin
    for (int p = 0; p < NPE; p++)
      ad[p] = (ref_pix[p] > cur_pix[p]) ? ref_pix[p] - cur_pix[p] : cur_pix[p] - ref_pix[p];
    for (int g = 0; g < 8; g++) begin
      sad4[g] = '0;
      for (int k = 0; k < 16; k++) sad4[g] += 12'(ad[16*g + k]);
    end
    sad8[0] = 14'(sad4[0]) + 14'(sad4[1]) + 14'(sad4[2]) + 14'(sad4[3]);
    sad8[1] = 14'(sad4[4]) + 14'(sad4[5]) + 14'(sad4[6]) + 14'(sad4[7]);
    sad16h  = 15'(sad8[0]) + 15'(sad8[1]);
  end
endmodule
