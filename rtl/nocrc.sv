// NOCR checker (NOCRC): removes overlapping candidates.
//
// Takes the best three candidates of a level (best first) and decides which
// of them need a refinement search at the next level. The vector differences
// are computed between every pair; a candidate whose vector lies within
// +/-TH_X horizontally and +/-TH_Y vertically of a better candidate that is
// kept is dropped, because its refinement region would mostly overlap the
// other one's and would cost a second search-window load. The best candidate
// is always kept. The result (the vectors, a keep mask and the number kept)
// is registered one cycle after start.
// Mutual vector differences and the overlap decision follow the source
// design; the box-shaped overlap test and its thresholds are this design's
// choices.
module nocrc
  import pc_pkg::*;
#(
  parameter int TH_X = 2,
  parameter int TH_Y = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  cand_t     cand [3],
  output logic      done,
  output mv_t       mv_out [3],
  output logic [2:0] keep,
  output logic [1:0] n_keep
);
  function automatic logic near(mv_t a, mv_t b);
    logic signed [MV_W:0] ddx, ddy;
    ddx = (MV_W+1)'(a.dx) - (MV_W+1)'(b.dx);
    ddy = (MV_W+1)'(a.dy) - (MV_W+1)'(b.dy);
    return (ddx <= TH_X) && (ddx >= -TH_X) && (ddy <= TH_Y) && (ddy >= -TH_Y);
  endfunction

  logic [2:0] k;
  always_comb begin
    k[0] = cand[0].valid;
    k[1] = cand[1].valid && !(k[0] && near(cand[1].mv, cand[0].mv));
    k[2] = cand[2].valid && !(k[0] && near(cand[2].mv, cand[0].mv))
                         && !(k[1] && near(cand[2].mv, cand[1].mv));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0; keep <= '0; n_keep <= '0;
      mv_out <= '{default: '0};
    end else begin
      done <= start;
      if (start) begin
        keep   <= k;
        n_keep <= 2'(k[0]) + 2'(k[1]) + 2'(k[2]);
        for (int i = 0; i < 3; i++) mv_out[i] <= cand[i].mv;
      end
    end
  end
endmodule
