// Compare tree (CT).
//
// Keeps the best three candidates seen since the last clear. Each cycle up to
// eight new candidates (a SAD and its motion/disparity vector) arrive; in the
// same cycle they are compared with the three held ones and the best three
// of the eleven are kept, in order, at the next clock edge. A candidate with
// the same vector and SAD as one already held is ignored, so a position
// searched twice (overlapping refinement windows) cannot fill two places.
// Ties in SAD are broken by the vector (smaller dy, then smaller dx wins),
// which makes the result independent of the search order.
// clear empties the list at the clock edge; new candidates presented in the
// same cycle are taken into the emptied list.
// Eight inputs, one-cycle comparison and best-three output follow the source
// design; the tie rule and duplicate rejection are this design's choices.
module compare_tree
  import pc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [7:0]       in_valid,
  input  logic [SAD_W-1:0] in_sad [8],
  input  mv_t              in_mv  [8],
  output cand_t            best   [3]
);
  localparam int KW = SAD_W + 2*MV_W;

  cand_t            e   [11];
  logic             ev  [11];
  logic [KW-1:0]    key [11];
  logic [3:0]       rank[11];
  cand_t            nxt [3];

  function automatic logic [KW-1:0] mkkey(logic [SAD_W-1:0] s, mv_t m);
    return {s, ~m.dy[MV_W-1], m.dy[MV_W-2:0], ~m.dx[MV_W-1], m.dx[MV_W-2:0]};
  endfunction

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      e[i]  = clear ? '0 : best[i];
      ev[i] = e[i].valid;
    end
    for (int i = 0; i < 8; i++) begin
      e[3+i]  = '{valid: in_valid[i], sad: in_sad[i], mv: in_mv[i]};
      ev[3+i] = in_valid[i];
      for (int j = 0; j < 3; j++)
        if (e[j].valid && e[j].sad == in_sad[i] && e[j].mv == in_mv[i]) ev[3+i] = 1'b0;
    end
    for (int i = 0; i < 11; i++) key[i] = mkkey(e[i].sad, e[i].mv);
    for (int i = 0; i < 11; i++) begin
      rank[i] = '0;
      for (int j = 0; j < 11; j++)
        if (j != i && ev[j] && (key[j] < key[i] || (key[j] == key[i] && j < i)))
          rank[i] += 4'd1;
    end
    for (int k = 0; k < 3; k++) begin
      nxt[k] = '0;
      for (int i = 0; i < 11; i++)
        if (ev[i] && rank[i] == 4'(k)) nxt[k] = e[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) best <= '{default: '0};
    else        best <= nxt;
endmodule
