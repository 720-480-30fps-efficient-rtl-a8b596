// End-to-end test of the prediction core with its default parameters.
//
// Builds a small stereo scene (left/right views at two time instants, with a
// known motion and disparity plus independent noise), plays the host: loads
// the quarter-resolution window and the current block, answers the core's
// refinement-window requests, and runs for each macroblock the sequence
//   ME(left) -> ME(right, save MC block) -> DE(right vs left) -> JOINT.
// Every result (vector in half pixels, SAD, mode, joint kind) is compared
// with a reference model written here from the algorithm description: a
// level-2 full search, overlap check, level-1 and level-0 refinements around
// the surviving candidates, half-pel refinement, joint blocks with DC weight
// k/8, and a smallest-SAD mode decision. The compute cycles of the four
// operations of a macroblock (total minus cycles waiting for a window) are
// checked against 2000, the budget per macroblock of 720x480 at 30 frames/s
// in both views at 81 MHz. It also counts the mechanisms of the design
// (RSRN left/right/down shifts, candidates dropped by the NOCR checker,
// window reuse, window prefetch overlapping a search, stalls, half-pel wins,
// each mode) and fails if one never happened.
module tb_pred_core;
  import pc_pkg::*;

  localparam int FW = 176, FH = 112;
  localparam int LP = 0, LC = 1, RP = 2, RC = 3;
  localparam int NMB = 3;
  localparam int BUDGET = 2000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             cmd_valid = 1'b0;
  op_t              cmd_op = OP_ME;
  logic             cmd_save_mc = 1'b0;
  logic             cmd_ready;
  logic             cur_we = 1'b0;
  logic [3:0]       cur_row = '0;
  logic [PIX_W-1:0] cur_pix [16] = '{default: '0};
  logic             bus_we = 1'b0;
  logic [1:0]       bus_sel = '0;
  logic [5:0]       bus_x = '0, bus_y = '0;
  logic [PIX_W-1:0] bus_data = '0;
  logic             win_req;
  level_t           win_level;
  mv_t              win_center;
  logic             win_buf;
  logic             win_ack = 1'b0;
  logic             res_valid;
  op_t              res_op;
  mv_t              res_mv;
  logic [SAD_W-1:0] res_sad;
  mode_t            res_mode;
  logic [2:0]       res_jkind;
  logic [15:0]      op_cycles, stall_cycles;

  pred_core u_dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- scene ----------------
  logic [7:0] fr [4][FH][FW];
  int mbx, mby, srch_f;

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction
  function automatic int p0(int f, int x, int y);
    return int'(fr[f][clampi(y, 0, FH-1)][clampi(x, 0, FW-1)]);
  endfunction
  function automatic int p1(int f, int x, int y);
    return (p0(f,2*x,2*y) + p0(f,2*x+1,2*y) + p0(f,2*x,2*y+1) + p0(f,2*x+1,2*y+1) + 2) >> 2;
  endfunction
  function automatic int p2(int f, int x, int y);
    int s = 0;
    for (int j = 0; j < 4; j++) for (int i = 0; i < 4; i++) s += p0(f, 4*x+i, 4*y+j);
    return (s + 8) >> 4;
  endfunction
  // half-pel sample at half-pixel coordinates (X, Y)
  function automatic int ph(int f, int X, int Y);
    int x, y;
    x = X >>> 1; y = Y >>> 1;
    case ({X[0], Y[0]})
      2'b00: return p0(f, x, y);
      2'b01: return (p0(f,x,y) + p0(f,x,y+1) + 1) >> 1;
      2'b10: return (p0(f,x,y) + p0(f,x+1,y) + 1) >> 1;
      default: return (p0(f,x,y) + p0(f,x+1,y) + p0(f,x,y+1) + p0(f,x+1,y+1) + 2) >> 2;
    endcase
  endfunction

  task automatic make_scene(int mx, int my, int dx, int dy, int nz [4]);
    int g [FH/8+2][FW/8+2];
    int base [FH+32][FW+32];
    for (int j = 0; j < FH/8+2; j++) for (int i = 0; i < FW/8+2; i++) g[j][i] = $urandom_range(20, 235);
    for (int y = 0; y < FH+32; y++)
      for (int x = 0; x < FW+32; x++) begin
        int gx, gy, fx, fy, v;
        gx = x / 8 % (FW/8+1); gy = y / 8 % (FH/8+1); fx = x % 8; fy = y % 8;
        v = (g[gy][gx]*(8-fx)*(8-fy) + g[gy][gx+1]*fx*(8-fy) + g[gy+1][gx]*(8-fx)*fy
             + g[gy+1][gx+1]*fx*fy) / 64;
        base[y][x] = v + $urandom_range(0, 12) - 6;
      end
    // the scene moves by (mx,my) between frames; the right view sees it
    // shifted by the disparity (dx,dy); each view adds its own noise (amplitude nz)
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        fr[LP][y][x] = 8'(clampi(base[y+16][x+16] + $urandom_range(0, nz[LP]) - nz[LP]/2, 0, 255));
        fr[LC][y][x] = 8'(clampi(base[clampi(y+16-my,0,FH+31)][clampi(x+16-mx,0,FW+31)]
                                 + $urandom_range(0, nz[LC]) - nz[LC]/2, 0, 255));
        fr[RP][y][x] = 8'(clampi(base[clampi(y+16-dy,0,FH+31)][clampi(x+16-dx,0,FW+31)]
                                 + $urandom_range(0, nz[RP]) - nz[RP]/2, 0, 255));
        fr[RC][y][x] = 8'(clampi(base[clampi(y+16-dy-my,0,FH+31)][clampi(x+16-dx-mx,0,FW+31)]
                                 + $urandom_range(0, nz[RC]) - nz[RC]/2, 0, 255));
      end
  endtask

  // ---------------- reference model ----------------
  typedef struct { int sad; int dx; int dy; bit v; } rc_t;
  typedef rc_t best3_t [3];

  function automatic longint key(int sad, int dx, int dy);
    return (longint'(sad) << 20) + (longint'(dy + 512) << 10) + longint'(dx + 512);
  endfunction

  function automatic void ins(ref best3_t b, input int sad, input int dx, input int dy);
    rc_t c;
    for (int i = 0; i < 3; i++) if (b[i].v && b[i].dx == dx && b[i].dy == dy) return;
    c = '{sad, dx, dy, 1'b1};
    for (int i = 0; i < 3; i++)
      if (!b[i].v || key(c.sad, c.dx, c.dy) < key(b[i].sad, b[i].dx, b[i].dy)) begin
        rc_t t = b[i]; b[i] = c; c = t;
        if (!c.v) return;
      end
  endfunction

  function automatic bit near(rc_t a, rc_t b);
    return (a.dx - b.dx <= 2) && (b.dx - a.dx <= 2) && (a.dy - b.dy <= 1) && (b.dy - a.dy <= 1);
  endfunction

  function automatic int nocr(best3_t b, ref rc_t kept [3]);
    bit k [3];
    int n = 0;
    k[0] = b[0].v;
    k[1] = b[1].v && !(k[0] && near(b[1], b[0]));
    k[2] = b[2].v && !(k[0] && near(b[2], b[0])) && !(k[1] && near(b[2], b[1]));
    for (int i = 0; i < 3; i++) if (k[i]) begin kept[n] = b[i]; n++; end
    return n;
  endfunction

  int model_drops;

  // returns the half-pel vector and SAD of an ME (de = 0) or DE search
  task automatic model_search(int f, int cf, bit de, output int hx, output int hy, output int sad);
    best3_t b2, b1, b0;
    rc_t k2 [3], k1 [3];
    int n2, n1, dymin, ny, ix, iy;
    longint bk;
    b2 = '{default: '{0, 0, 0, 1'b0}}; b1 = b2; b0 = b2;
    dymin = de ? L2_DYMIN_DE : L2_DYMIN_ME;
    ny = de ? 8 : 16;
    for (int dy = dymin; dy < dymin + ny; dy++)
      for (int dx = L2_DXMIN; dx < L2_DXMIN + L2_NDX; dx++) begin
        int s = 0;
        for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
          s += abs_i(p2(f, mbx/4+dx+c, mby/4+dy+r) - p2(cf, mbx/4+c, mby/4+r));
        ins(b2, s, dx, dy);
      end
    n2 = nocr(b2, k2);
    model_drops += 3 - n2;
    for (int k = 0; k < n2; k++)
      for (int dy = 2*k2[k].dy + L1_DYMIN; dy < 2*k2[k].dy + L1_DYMIN + L1_NDY; dy++)
        for (int dx = 2*k2[k].dx + L1_DXMIN; dx < 2*k2[k].dx + L1_DXMIN + L1_NDX; dx++) begin
          int s = 0;
          for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++)
            s += abs_i(p1(f, mbx/2+dx+c, mby/2+dy+r) - p1(cf, mbx/2+c, mby/2+r));
          ins(b1, s, dx, dy);
        end
    n1 = nocr(b1, k1);
    model_drops += 3 - n1;
    for (int k = 0; k < n1; k++)
      for (int dy = 2*k1[k].dy + L0_DYMIN; dy < 2*k1[k].dy + L0_DYMIN + L0_NDY; dy++)
        for (int dx = 2*k1[k].dx + L0_DXMIN; dx < 2*k1[k].dx + L0_DXMIN + L0_NDX; dx++) begin
          int s = 0;
          for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++)
            s += abs_i(p0(f, mbx+dx+c, mby+dy+r) - p0(cf, mbx+c, mby+r));
          ins(b0, s, dx, dy);
        end
    ix = b0[0].dx; iy = b0[0].dy;
    hx = 2*ix; hy = 2*iy; sad = b0[0].sad;
    bk = key(sad, hx, hy);
    for (int ny2 = -1; ny2 <= 1; ny2++)
      for (int nx2 = -1; nx2 <= 1; nx2++) if (nx2 != 0 || ny2 != 0) begin
        int s = 0;
        for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++)
          s += abs_i(ph(f, 2*(mbx+c) + 2*ix + nx2, 2*(mby+r) + 2*iy + ny2) - p0(cf, mbx+c, mby+r));
        if (key(s, 2*ix+nx2, 2*iy+ny2) < bk) begin
          bk = key(s, 2*ix+nx2, 2*iy+ny2); hx = 2*ix+nx2; hy = 2*iy+ny2; sad = s;
        end
      end
  endtask

  function automatic int abs_i(int v);
    return v < 0 ? -v : v;
  endfunction

  // ---------------- host side ----------------
  task automatic wr(int sel, int x, int y, int v);
    @(posedge clk);
    bus_we <= 1'b1; bus_sel <= 2'(sel); bus_x <= 6'(x); bus_y <= 6'(y); bus_data <= 8'(v);
  endtask
  task automatic wr_end();
    @(posedge clk);
    bus_we <= 1'b0;
  endtask

  task automatic load_sw0(int f);
    for (int j = 0; j < SW0_H; j++)
      for (int i = 0; i < SW0_W; i++)
        wr(0, i, j, p2(f, mbx/4 + L2_DXMIN + i, mby/4 + L2_DYMIN_ME + j));
    wr_end();
  endtask

  task automatic load_cur(int f);
    for (int r = 0; r < 16; r++) begin
      @(posedge clk);
      cur_we <= 1'b1; cur_row <= 4'(r);
      for (int c = 0; c < 16; c++) cur_pix[c] <= 8'(p0(f, mbx + c, mby + r));
    end
    @(posedge clk);
    cur_we <= 1'b0;
  endtask

  int n_req = 0;
  // serve refinement-window requests
  initial begin
    forever begin
      @(posedge clk);
      if (win_req && !win_ack) begin
        int cx, cy, b;
        level_t l;
        cx = int'(win_center.dx); cy = int'(win_center.dy); b = int'(win_buf); l = win_level;
        n_req++;
        for (int j = 0; j < BUF_H; j++)
          for (int i = 0; i < BUF_W; i++)
            if (l == LV1) wr(1 + b, i, j, p1(srch_f, mbx/2 + cx + L1_DXMIN + i, mby/2 + cy + L1_DYMIN + j));
            else          wr(1 + b, i, j, p0(srch_f, mbx + cx + L0_DXMIN - 1 + i, mby + cy + L0_DYMIN - 1 + j));
        @(posedge clk);
        bus_we <= 1'b0; win_ack <= 1'b1;
        @(posedge clk);
        win_ack <= 1'b0;
      end
    end
  end

  task automatic run_cmd(op_t o, bit save, output int cycles);
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    cmd_valid <= 1'b1; cmd_op <= o; cmd_save_mc <= save;
    @(posedge clk);
    cmd_valid <= 1'b0;
    do @(posedge clk); while (!res_valid);
    cycles = int'(op_cycles) - int'(stall_cycles);
  endtask

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_left = 0, n_right = 0, n_down = 0, n_prefetch = 0, n_reuse = 0, n_stall = 0;
  int n_halfpel = 0, n_mode [3] = '{0, 0, 0}, n_dropped = 0;
  always @(posedge clk) begin
    if (u_dut.rs_op == RS_LEFT)  n_left++;
    if (u_dut.rs_op == RS_RIGHT) n_right++;
    if (u_dut.rs_op == RS_DOWN)  n_down++;
    if (win_req && u_dut.rs_op != RS_HOLD) n_prefetch++;
    if ((int'(u_dut.u_ctrl.st) == 5 || int'(u_dut.u_ctrl.st) == 8) && u_dut.u_ctrl.hit) n_reuse++;
    if (u_dut.u_ctrl.stall) n_stall++;
    if (u_dut.noc_done) n_dropped += 3 - (int'(u_dut.noc_keep[0]) + int'(u_dut.noc_keep[1]) + int'(u_dut.noc_keep[2]));
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mvs [NMB][4] = '{'{5, -3, -12, 2}, '{-22, 9, 7, -5}, '{2, 1, -30, 0}};
    // per-view noise (LP, LC, RP, RC): all noisy favours the joint block,
    // a noisy left view favours MC, a noisy right reference favours DC
    int noise [NMB][4] = '{'{12, 12, 12, 12}, '{6, 40, 0, 0}, '{6, 0, 40, 0}};
    model_drops = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    for (int m = 0; m < NMB; m++) begin
      int ehx, ehy, esad, c_me_l, c_me_r, c_de, c_j, total;
      int mhx, mhy, msad, dhx, dhy, dsad, jbest, jk;
      mbx = 80; mby = 48;
      make_scene(mvs[m][0], mvs[m][1], mvs[m][2], mvs[m][3], noise[m]);

      // left view ME
      srch_f = LP;
      load_sw0(LP); load_cur(LC);
      run_cmd(OP_ME, 1'b0, c_me_l);
      model_search(LP, LC, 1'b0, ehx, ehy, esad);
      check("ME-left dx", int'(res_mv.dx), ehx);
      check("ME-left dy", int'(res_mv.dy), ehy);
      check("ME-left sad", int'(res_sad), esad);
      if (res_mv.dx[0] || res_mv.dy[0]) n_halfpel++;

      // right view ME, keep the MC block
      srch_f = RP;
      load_sw0(RP); load_cur(RC);
      run_cmd(OP_ME, 1'b1, c_me_r);
      model_search(RP, RC, 1'b0, mhx, mhy, msad);
      check("ME-right dx", int'(res_mv.dx), mhx);
      check("ME-right dy", int'(res_mv.dy), mhy);
      check("ME-right sad", int'(res_sad), msad);
      if (res_mv.dx[0] || res_mv.dy[0]) n_halfpel++;

      // right view DE against the left view
      srch_f = LC;
      load_sw0(LC);
      run_cmd(OP_DE, 1'b0, c_de);
      model_search(LC, RC, 1'b1, dhx, dhy, dsad);
      check("DE dx", int'(res_mv.dx), dhx);
      check("DE dy", int'(res_mv.dy), dhy);
      check("DE sad", int'(res_sad), dsad);
      if (res_mv.dx[0] || res_mv.dy[0]) n_halfpel++;

      // joint block and mode decision
      run_cmd(OP_JOINT, 1'b0, c_j);
      jbest = -1; jk = 0;
      for (int k = 0; k < 8; k++) begin
        int s;
        s = 0;
        for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
          int mc, dc, j;
          mc = ph(RP, 2*(mbx+c) + mhx, 2*(mby+r) + mhy);
          dc = ph(LC, 2*(mbx+c) + dhx, 2*(mby+r) + dhy);
          j = ((8-k)*mc + k*dc + 4) >> 3;
          s += abs_i(j - p0(RC, mbx+c, mby+r));
        end
        if (jbest < 0 || s < jbest) begin jbest = s; jk = k; end
      end
      begin
        mode_t em;
        int es;
        if (msad <= dsad && msad <= jbest) begin em = MODE_MC; es = msad; end
        else if (dsad <= jbest) begin em = MODE_DC; es = dsad; end
        else begin em = MODE_JOINT; es = jbest; end
        check("mode", int'(res_mode), int'(em));
        check("mode sad", int'(res_sad), es);
        if (em == MODE_JOINT) check("joint kind", int'(res_jkind), jk);
        n_mode[int'(res_mode)]++;
      end

      total = c_me_l + c_me_r + c_de + c_j;
      $display("MB %0d: ME-L %0d, ME-R %0d, DE %0d, JOINT %0d cycles (total %0d), mode %0d",
               m, c_me_l, c_me_r, c_de, c_j, total, int'(res_mode));
      checks++;
      if (total > BUDGET) begin
        failures++;
        $display("FAIL cycle budget: %0d > %0d", total, BUDGET);
      end
    end

    $display("events: left %0d right %0d down %0d dropped %0d (model %0d) reuse %0d prefetch %0d stall %0d halfpel %0d modes MC %0d DC %0d JOINT %0d requests %0d",
             n_left, n_right, n_down, n_dropped, model_drops, n_reuse, n_prefetch, n_stall,
             n_halfpel, n_mode[0], n_mode[1], n_mode[2], n_req);
    check("dropped count", n_dropped, model_drops);
    foreach (n_mode[i]) begin
      checks++;
      if (n_mode[i] == 0) begin failures++; $display("FAIL mode %0d never chosen", i); end
    end
    begin
      int ev [8];
      ev = '{n_left, n_right, n_down, n_dropped, n_reuse, n_prefetch, n_stall, n_halfpel};
      foreach (ev[i]) begin
        checks++;
        if (ev[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
