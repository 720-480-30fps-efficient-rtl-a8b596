// Control unit and address generator of the prediction core.
//
// Runs one operation per command on the macroblock held in the current
// register set:
//   OP_ME / OP_DE - hierarchical block matching. Level 2 is a full search of
//     the quarter-resolution window in SRAM0 ([-16,+15] x [-8,+7] quarter
//     pixels for ME, [-16,+15] x [-4,+3] for DE), eight 4x4 candidates per
//     cycle. The best three go through the NOCR checker; each kept one is
//     refined at level 1 (half resolution, [-8,+7] x [-2,+1] around it, two
//     8x8 candidates per cycle), the best three again through the checker,
//     and each kept one refined at level 0 (full resolution, [-4,+3] x
//     [-2,+1], half a 16x16 candidate per cycle). The best integer vector is
//     then compared with its eight half-pel neighbours built by the IU. With
//     save_mc the winning block is copied into the MC-block memory (SRAM3);
//     after OP_DE the winning window and phase are remembered for OP_JOINT.
//   OP_JOINT - streams the DC block (through the IU), the MC block and the
//     current block through the joint block generator, picks the best of the
//     eight joint blocks in the compare tree and decides the mode among the
//     MC block, the DC block and the best joint block by smallest SAD.
// The search positions of each level are visited in a snake order by the
// RSRN (fill one row of columns, shift left, step down, shift right, ...).
//
// Refinement windows are fetched by the host: win_req stays high with
// win_level / win_center / win_buf until win_ack. Two window buffers are used
// in ping-pong: while one is searched, the window of the next candidate is
// requested into the other. A window already held by a buffer (same level
// and centre) is reused without a request.
//
// Datapath timing: a micro-operation issued in stage 0 reads SRAM; in stage 1
// its data (through the IU when half-pel samples are needed) is shifted into
// the RSRN; in stage 2 the adder tree result is tagged with the candidate
// vectors and handed to the compare tree, which holds the result one cycle
// later. Results: res_valid pulses with the vector (half-pel units for ME/DE,
// joint kind in res_jkind), the SAD and the mode. op_cycles counts the cycles
// of the last operation, stall_cycles those spent waiting for a window.
//
// The level structure, the per-level parallelism, the NOCR checker between
// levels, the IU for half-pel refinement and the JBG flow follow the source
// design. The refinement ranges, the snake schedule, the window protocol,
// the ping-pong buffering and the mode tie rule (MC, then DC, then joint) are
// this design's own.
module control_unit
  import pc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // command
  input  logic             cmd_valid,
  input  op_t              cmd_op,
  input  logic             cmd_save_mc,
  output logic             cmd_ready,
  // window requests to the host
  output logic             win_req,
  output level_t           win_level,
  output mv_t              win_center,
  output logic             win_buf,
  input  logic             win_ack,
  // SRAM read control (stage 0)
  output logic             sw0_rd_en,
  output logic [1:0]       buf_rd_en,
  output logic             rd_row,
  output logic signed [7:0] rd_x,
  output logic signed [7:0] rd_y,
  output logic             mc_rd_en,
  output logic [3:0]       mc_rd_addr,
  // stage 1 control
  output logic             s1_from_buf,
  output logic             s1_buf,
  output logic             s1_use_iu,
  output rs_op_t           rs_op,
  output level_t           level,
  output logic             iu_valid,
  output logic             iu_first,
  output logic             iu_hh,
  output logic             iu_hv,
  input  logic             iu_out_valid,
  output logic             mc_wr_en,
  output logic [3:0]       mc_wr_addr,
  output logic [3:0]       crs_col,
  output logic             jbg_start,
  output logic             jbg_valid,
  // stage 2
  output logic             crs_half,
  input  logic [11:0]      sad4 [8],
  input  logic [13:0]      sad8 [2],
  input  logic [14:0]      sad16h,
  // compare tree
  output logic             ct_clear,
  output logic [7:0]       ct_valid,
  output logic [SAD_W-1:0] ct_sad [8],
  output mv_t              ct_mv  [8],
  input  cand_t            ct_best [3],
  // NOCR checker
  output logic             noc_start,
  input  logic             noc_done,
  input  mv_t              noc_mv [3],
  input  logic [2:0]       noc_keep,
  // joint block generator
  input  logic             jbg_done,
  input  logic [SAD_W-1:0] jbg_sad [8],
  // results
  output logic             res_valid,
  output op_t              res_op,
  output mv_t              res_mv,
  output logic [SAD_W-1:0] res_sad,
  output mode_t            res_mode,
  output logic [2:0]       res_jkind,
  output logic [15:0]      op_cycles,
  output logic [15:0]      stall_cycles
);

  typedef enum logic [2:0] {EV_NONE, EV_L2, EV_L1, EV_L0, EV_HP} ev_t;

  typedef struct packed {
    logic             valid;
    logic             from_buf;
    logic             bufid;
    logic             row;
    logic signed [7:0] x;
    logic signed [7:0] y;
    rs_op_t           op;
    logic             use_iu;
    logic             iu_first;
    logic             hh;
    logic             hv;
    logic             mc_wr;
    logic             jbg;
    logic [3:0]       col;
    ev_t              ev;
    logic             half;
    logic [2:0]       slot;
    mv_t              mv;
  } uop_t;

  typedef enum logic [4:0] {
    S_IDLE, S_L2, S_DRAIN, S_NOC, S_NOCW, S_ENS, S_WACK, S_SWEEP,
    S_HP_ENS, S_HP_WACK, S_HP_INJ, S_HP, S_FIN, S_MC, S_J, S_JWAIT, S_JCT, S_JDEC, S_DONE
  } state_t;

  typedef enum logic [1:0] {SP_FILL, SP_SHIFT, SP_DOWN} sphase_t;

  state_t  st, st_after_drain;
  op_t     op;
  logic    save_mc;
  level_t  lvl;
  uop_t    u0, u1, u2;

  // sweep engine
  logic    sw_run;
  sphase_t sp;
  logic [5:0] sw_i;
  logic [5:0] sw_wl;
  logic [4:0] sw_k;
  logic [5:0] sw_ns;      // positions per row
  logic [4:0] sw_ny;      // rows of positions
  logic signed [7:0] sw_x0, sw_y0;
  logic    sw_src_buf;
  logic    sw_bufid;
  mv_t     sw_center;

  // candidate list of the current refinement level
  mv_t        cand [3];
  logic [1:0] ncand, cidx;
  mv_t        l0_center [3];
  logic [1:0] n_l0;

  // window buffers
  logic       tag_v [2];
  level_t     tag_l [2];
  mv_t        tag_c [2];
  logic       req_pend;
  level_t     req_l;
  mv_t        req_c;
  logic       req_b;
  logic       cur_buf;

  // half-pel / fetch state
  mv_t        mv0;            // best integer vector (full pixels)
  logic       hp_buf;
  logic signed [7:0] hp_bx, hp_by;
  logic [2:0] hp_h;
  logic [4:0] f_i;            // fetch column counter 0..16
  logic signed [7:0] f_xa, f_ya;
  logic       f_hh, f_hv, f_buf;
  logic [2:0] drain;

  // remembered results
  logic [SAD_W-1:0] sad_mc, sad_dc;
  logic       dc_buf, dc_hh, dc_hv;
  logic signed [7:0] dc_xa, dc_ya;

  // level-0 half accumulators
  logic [14:0] acc0 [8];
  logic [7:0]  have0;
  logic [14:0] hp_acc;

  logic        stall;

  assign cmd_ready = (st == S_IDLE);
  assign win_req   = req_pend;
  assign win_level = req_l;
  assign win_center= req_c;
  assign win_buf   = req_b;
  assign level     = lvl;

  function automatic mv_t mvadd(mv_t a, int dx, int dy);
    mv_t r;
    r.dx = MV_W'(int'(a.dx) + dx);
    r.dy = MV_W'(int'(a.dy) + dy);
    return r;
  endfunction

  function automatic mv_t mvx2(mv_t a);
    mv_t r;
    r.dx = a.dx <<< 1;
    r.dy = a.dy <<< 1;
    return r;
  endfunction

  function automatic logic in_l0(mv_t m, mv_t c);
    int dx, dy;
    dx = int'(m.dx) - int'(c.dx);
    dy = int'(m.dy) - int'(c.dy);
    return dx >= L0_DXMIN && dx < L0_DXMIN + L0_NDX && dy >= L0_DYMIN && dy < L0_DYMIN + L0_NDY;
  endfunction

  // half-pel neighbour h (0..7) in half-pel units
  function automatic int hp_dx(logic [2:0] h);
    case (h)
      3'd0, 3'd3, 3'd5: return -1;
      3'd1, 3'd6:       return 0;
      default:          return 1;
    endcase
  endfunction
  function automatic int hp_dy(logic [2:0] h);
    case (h)
      3'd0, 3'd1, 3'd2: return -1;
      3'd3, 3'd4:       return 0;
      default:          return 1;
    endcase
  endfunction

  // window lookup
  logic       hit0, hit1, hit;
  logic       hit_buf;
  level_t     want_l;
  mv_t        want_c;
  always_comb begin
    want_l = lvl;
    want_c = (st == S_HP_ENS || st == S_HP_WACK) ? l0_center[0] : cand[cidx];
    if (st == S_HP_ENS || st == S_HP_WACK) begin
      want_l = LV0;
      for (int i = 2; i >= 0; i--)
        if (2'(i) < n_l0 && in_l0(ct_best[0].mv, l0_center[i])) want_c = l0_center[i];
    end
    hit0 = tag_v[0] && tag_l[0] == want_l && tag_c[0] == want_c;
    hit1 = tag_v[1] && tag_l[1] == want_l && tag_c[1] == want_c;
    hit  = hit0 || hit1;
    hit_buf = hit0 ? 1'b0 : 1'b1;
  end

  // next candidate present or already requested?
  logic nxt_exists, nxt_present;
  mv_t  nxt_c;
  always_comb begin
    nxt_exists = (cidx + 2'd1) < ncand;
    nxt_c = cand[2'(cidx + 2'd1)];
    nxt_present = (tag_v[0] && tag_l[0] == lvl && tag_c[0] == nxt_c)
               || (tag_v[1] && tag_l[1] == lvl && tag_c[1] == nxt_c)
               || (req_pend && req_l == lvl && req_c == nxt_c);
  end

  // ---------------- stage 0: micro-operation generation ----------------
  int unsigned nrows, ncols;
  always_comb begin
    nrows = unsigned'(lv_rows(lvl));
    ncols = unsigned'(lv_cols(lvl));
    u0 = '0;
    u0.from_buf = sw_src_buf;
    u0.bufid    = sw_bufid;
    if (sw_run) begin
      u0.valid = 1'b1;
      case (sp)
        SP_FILL: begin
          u0.x  = sw_x0 + 8'(sw_i);
          u0.y  = sw_y0;
          u0.op = RS_LEFT;
        end
        SP_SHIFT: begin
          u0.y = sw_y0 + 8'(sw_k);
          if (!sw_k[0]) begin
            u0.x  = sw_x0 + 8'(sw_wl) + 8'(ncols);
            u0.op = RS_LEFT;
          end else begin
            u0.x  = sw_x0 + 8'(sw_wl) - 8'sd1;
            u0.op = RS_RIGHT;
          end
        end
        default: begin  // SP_DOWN
          u0.row = 1'b1;
          u0.x   = sw_x0 + 8'(sw_wl);
          u0.y   = sw_y0 + 8'(sw_k) + 8'(nrows);
          u0.op  = RS_DOWN;
        end
      endcase
      // the position the RSRN holds after this operation
      begin
        logic [5:0] wl;
        logic [4:0] k;
        logic       ev_on;
        wl = sw_wl; k = sw_k; ev_on = 1'b1;
        case (sp)
          SP_FILL:  ev_on = (sw_i == 6'(ncols - 1));
          SP_SHIFT: wl = sw_k[0] ? sw_wl - 6'd1 : sw_wl + 6'd1;
          default:  k = sw_k + 5'd1;
        endcase
        if (ev_on) begin
          case (lvl)
            LV2: begin
              u0.ev = EV_L2;
              u0.mv.dx = MV_W'(L2_DXMIN + int'(wl));
              u0.mv.dy = MV_W'((op == OP_DE ? L2_DYMIN_DE : L2_DYMIN_ME) + int'(k));
            end
            LV1: begin
              u0.ev = EV_L1;
              u0.mv = mvadd(sw_center, L1_DXMIN + int'(wl), L1_DYMIN + int'(k));
            end
            default: begin
              u0.ev   = EV_L0;
              u0.half = wl[3];
              u0.slot = wl[2:0];
              u0.mv   = mvadd(sw_center, L0_DXMIN + int'(wl[2:0]), L0_DYMIN + int'(k));
            end
          endcase
        end
      end
    end else if (st == S_HP || st == S_MC || st == S_J) begin
      u0.valid    = 1'b1;
      u0.from_buf = 1'b1;
      u0.bufid    = f_buf;
      u0.x        = f_xa + 8'(f_i);
      u0.y        = f_ya;
      u0.use_iu   = 1'b1;
      u0.iu_first = (f_i == 5'd0);
      u0.hh       = f_hh;
      u0.hv       = f_hv;
      u0.col      = 4'(f_i - 5'd1);
      u0.op       = RS_LEFT;
      if (st == S_HP) begin
        u0.mv = mvadd(mvx2(mv0), hp_dx(hp_h), hp_dy(hp_h));
        if (f_i == 5'd8)  begin u0.ev = EV_HP; u0.half = 1'b0; end
        if (f_i == 5'd16) begin u0.ev = EV_HP; u0.half = 1'b1; end
      end
      u0.mc_wr = (st == S_MC);
      u0.jbg   = (st == S_J);
      if (st != S_HP) u0.op = RS_HOLD;
    end
  end

  assign sw0_rd_en    = u0.valid && !u0.from_buf;
  assign buf_rd_en[0] = u0.valid && u0.from_buf && !u0.bufid;
  assign buf_rd_en[1] = u0.valid && u0.from_buf &&  u0.bufid;
  assign rd_row       = u0.row;
  assign rd_x         = u0.x;
  assign rd_y         = u0.y;
  assign mc_rd_en     = u0.valid && u0.jbg;
  assign mc_rd_addr   = u0.col;

  // ---------------- stage 1 ----------------
  assign s1_from_buf = u1.from_buf;
  assign s1_buf      = u1.bufid;
  assign s1_use_iu   = u1.use_iu;
  assign iu_valid    = u1.valid && u1.use_iu;
  assign iu_first    = u1.iu_first;
  assign iu_hh       = u1.hh;
  assign iu_hv       = u1.hv;
  assign rs_op       = (u1.valid && (!u1.use_iu || iu_out_valid)) ? u1.op : RS_HOLD;
  assign mc_wr_en    = u1.valid && u1.mc_wr && iu_out_valid;
  assign mc_wr_addr  = u1.col;
  assign crs_col     = u1.col;
  assign jbg_valid   = u1.valid && u1.jbg && iu_out_valid;
  assign jbg_start   = jbg_valid && u1.col == 4'd0;

  // ---------------- stage 2: tagging and compare-tree feed ----------------
  assign crs_half = u2.half;
  logic inj;
  cand_t inj_c;
  always_comb begin
    ct_valid = '0;
    ct_sad   = '{default: '0};
    ct_mv    = '{default: '0};
    if (inj) begin
      ct_valid[0] = 1'b1;
      ct_sad[0]   = inj_c.sad;
      ct_mv[0]    = inj_c.mv;
    end else if (st == S_JCT) begin
      for (int k = 0; k < 8; k++) begin
        ct_valid[k] = 1'b1;
        ct_sad[k]   = jbg_sad[k];
        ct_mv[k]    = '{dy: '0, dx: MV_W'(k)};
      end
    end else if (u2.valid) begin
      case (u2.ev)
        EV_L2: for (int g = 0; g < 8; g++) begin
          ct_valid[g] = 1'b1;
          ct_sad[g]   = SAD_W'(sad4[g]);
          ct_mv[g]    = mvadd(u2.mv, 4*g, 0);
        end
        EV_L1: for (int t = 0; t < 2; t++) begin
          ct_valid[t] = 1'b1;
          ct_sad[t]   = SAD_W'(sad8[t]);
          ct_mv[t]    = mvadd(u2.mv, 8*t, 0);
        end
        EV_L0: if (have0[u2.slot]) begin
          ct_valid[0] = 1'b1;
          ct_sad[0]   = SAD_W'(acc0[u2.slot]) + SAD_W'(sad16h);
          ct_mv[0]    = u2.mv;
        end
        EV_HP: if (u2.half) begin
          ct_valid[0] = 1'b1;
          ct_sad[0]   = SAD_W'(hp_acc) + SAD_W'(sad16h);
          ct_mv[0]    = u2.mv;
        end
        default: ;
      endcase
    end
  end

  assign inj = (st == S_HP_INJ);
  always_comb begin
    inj_c.valid = 1'b1;
    inj_c.sad   = ct_best[0].sad;
    inj_c.mv    = mvx2(ct_best[0].mv);
  end

  assign stall = (st == S_WACK || st == S_HP_WACK);

  // ---------------- sequencing ----------------
  task automatic start_sweep(level_t l, op_t o, logic from_buf, logic b, mv_t c);
    sw_run     <= 1'b1;
    sp         <= SP_FILL;
    sw_i       <= '0;
    sw_wl      <= '0;
    sw_k       <= '0;
    sw_src_buf <= from_buf;
    sw_bufid   <= b;
    sw_center  <= c;
    sw_ns <= (l == LV2) ? 6'd4 : (l == LV1) ? 6'd8 : 6'd16;
    sw_ny <= (l == LV2) ? ((o == OP_DE) ? 5'd8 : 5'd16) : (l == LV1) ? 5'(L1_NDY) : 5'(L0_NDY);
    sw_x0 <= (l == LV0) ? 8'sd1 : 8'sd0;
    sw_y0 <= (l == LV0) ? 8'sd1 : (l == LV1) ? 8'sd0
           : (o == OP_DE) ? 8'(L2_DYMIN_DE - L2_DYMIN_ME) : 8'sd0;
  endtask

  task automatic start_fetch(logic b, logic signed [7:0] xa, logic signed [7:0] ya, logic hh, logic hv);
    f_i  <= '0;
    f_buf <= b;
    f_xa <= xa;
    f_ya <= ya;
    f_hh <= hh;
    f_hv <= hv;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; st_after_drain <= S_IDLE;
      op <= OP_ME; save_mc <= 1'b0; lvl <= LV2;
      u1 <= '0; u2 <= '0;
      sw_run <= 1'b0; sp <= SP_FILL; sw_i <= '0; sw_wl <= '0; sw_k <= '0;
      sw_ns <= '0; sw_ny <= '0; sw_x0 <= '0; sw_y0 <= '0;
      sw_src_buf <= 1'b0; sw_bufid <= 1'b0; sw_center <= '0;
      cand <= '{default: '0}; ncand <= '0; cidx <= '0;
      l0_center <= '{default: '0}; n_l0 <= '0;
      tag_v <= '{default: 1'b0}; tag_l <= '{default: LV0}; tag_c <= '{default: '0};
      req_pend <= 1'b0; req_l <= LV0; req_c <= '0; req_b <= 1'b0; cur_buf <= 1'b0;
      mv0 <= '0; hp_buf <= 1'b0; hp_bx <= '0; hp_by <= '0; hp_h <= '0;
      f_i <= '0; f_xa <= '0; f_ya <= '0; f_hh <= 1'b0; f_hv <= 1'b0; f_buf <= 1'b0;
      drain <= '0;
      sad_mc <= '1; sad_dc <= '1;
      dc_buf <= 1'b0; dc_hh <= 1'b0; dc_hv <= 1'b0; dc_xa <= '0; dc_ya <= '0;
      acc0 <= '{default: '0}; have0 <= '0; hp_acc <= '0;
      ct_clear <= 1'b0; noc_start <= 1'b0;
      res_valid <= 1'b0; res_op <= OP_ME; res_mv <= '0; res_sad <= '0;
      res_mode <= MODE_MC; res_jkind <= '0;
      op_cycles <= '0; stall_cycles <= '0;
    end else begin
      u1 <= u0;
      u2 <= u1;
      ct_clear  <= 1'b0;
      noc_start <= 1'b0;
      res_valid <= 1'b0;
      if (st != S_IDLE) begin
        op_cycles <= op_cycles + 16'd1;
        if (stall) stall_cycles <= stall_cycles + 16'd1;
      end

      // window handshake
      if (req_pend && win_ack) begin
        req_pend     <= 1'b0;
        tag_v[req_b] <= 1'b1;
        tag_l[req_b] <= req_l;
        tag_c[req_b] <= req_c;
      end

      // level-0 half accumulation (stage 2)
      if (u2.valid && u2.ev == EV_L0) begin
        if (!have0[u2.slot]) begin
          acc0[u2.slot]  <= sad16h;
          have0[u2.slot] <= 1'b1;
        end else begin
          have0[u2.slot] <= 1'b0;
        end
      end
      if (u2.valid && u2.ev == EV_HP && !u2.half) hp_acc <= sad16h;

      // sweep engine
      if (sw_run) begin
        case (sp)
          SP_FILL:
            if (sw_i == 6'(lv_cols(lvl) - 1)) begin
              if (sw_ns > 6'd1) sp <= SP_SHIFT;
              else if (sw_ny > 5'd1) sp <= SP_DOWN;
              else sw_run <= 1'b0;
              sw_i <= '0;
            end else sw_i <= sw_i + 6'd1;
          SP_SHIFT: begin
            sw_wl <= sw_k[0] ? sw_wl - 6'd1 : sw_wl + 6'd1;
            if (sw_i == sw_ns - 6'd2) begin
              sw_i <= '0;
              if (5'(sw_k) == sw_ny - 5'd1) sw_run <= 1'b0;
              else sp <= SP_DOWN;
            end else sw_i <= sw_i + 6'd1;
          end
          default: begin
            sw_k <= sw_k + 5'd1;
            sp   <= SP_SHIFT;
          end
        endcase
      end

      case (st)
        S_IDLE:
          if (cmd_valid) begin
            op <= cmd_op;
            save_mc <= cmd_save_mc;
            op_cycles <= '0;
            stall_cycles <= '0;
            ct_clear <= 1'b1;
            if (cmd_op == OP_JOINT) begin
              start_fetch(dc_buf, dc_xa, dc_ya, dc_hh, dc_hv);
              st <= S_J;
            end else begin
              lvl <= LV2;
              st  <= S_L2;
              tag_v <= '{default: 1'b0};   // windows of an earlier search are stale
              start_sweep(LV2, cmd_op, 1'b0, 1'b0, '0);
            end
          end

        S_L2:
          if (!sw_run) begin
            drain <= '0;
            st_after_drain <= S_NOC;
            st <= S_DRAIN;
          end

        S_DRAIN: begin
          drain <= drain + 3'd1;
          if (drain == 3'd3) st <= st_after_drain;
        end

        S_NOC: begin
          noc_start <= 1'b1;
          st <= S_NOCW;
        end

        S_NOCW:
          if (noc_done) begin
            // kept vectors, scaled to the next level
            begin
              logic [1:0] n;
              n = '0;
              for (int i = 0; i < 3; i++)
                if (noc_keep[i]) begin
                  cand[n] <= mvx2(noc_mv[i]);
                  n = n + 2'd1;
                end
              ncand <= n;
              if (lvl == LV1) begin
                n = '0;
                for (int i = 0; i < 3; i++)
                  if (noc_keep[i]) begin
                    l0_center[n] <= mvx2(noc_mv[i]);
                    n = n + 2'd1;
                  end
                n_l0 <= n;
              end
            end
            cidx <= '0;
            lvl  <= (lvl == LV2) ? LV1 : LV0;
            ct_clear <= 1'b1;
            have0 <= '0;
            st <= S_ENS;
          end

        S_ENS:
          if (hit) begin
            cur_buf <= hit_buf;
            start_sweep(lvl, op, 1'b1, hit_buf, cand[cidx]);
            // prefetch the next candidate's window into the other buffer
            if (nxt_exists && !nxt_present && !req_pend) begin
              req_pend <= 1'b1;
              req_l    <= lvl;
              req_c    <= nxt_c;
              req_b    <= ~hit_buf;
              tag_v[~hit_buf] <= 1'b0;
            end
            st <= S_SWEEP;
          end else if (!req_pend) begin
            req_pend <= 1'b1;
            req_l    <= lvl;
            req_c    <= cand[cidx];
            req_b    <= ~cur_buf;
            tag_v[~cur_buf] <= 1'b0;
            cur_buf  <= ~cur_buf;
            st <= S_WACK;
          end else st <= S_WACK;

        S_WACK:
          if (!req_pend || win_ack) st <= S_ENS;

        S_SWEEP:
          if (!sw_run) begin
            if (cidx + 2'd1 < ncand) begin
              cidx <= cidx + 2'd1;
              st <= S_ENS;
            end else begin
              drain <= '0;
              st_after_drain <= (lvl == LV1) ? S_NOC : S_HP_ENS;
              st <= S_DRAIN;
            end
          end

        S_HP_ENS: begin
          mv0 <= ct_best[0].mv;
          if (hit) begin
            hp_buf <= hit_buf;
            hp_bx  <= 8'(int'(ct_best[0].mv.dx) - int'(want_c.dx) - L0_DXMIN + 1);
            hp_by  <= 8'(int'(ct_best[0].mv.dy) - int'(want_c.dy) - L0_DYMIN + 1);
            ct_clear <= 1'b1;
            st <= S_HP_INJ;
          end else if (!req_pend) begin
            req_pend <= 1'b1;
            req_l    <= LV0;
            req_c    <= want_c;
            req_b    <= ~cur_buf;
            tag_v[~cur_buf] <= 1'b0;
            cur_buf  <= ~cur_buf;
            st <= S_HP_WACK;
          end else st <= S_HP_WACK;
        end

        S_HP_WACK:
          if (!req_pend || win_ack) st <= S_HP_ENS;

        S_HP_INJ: begin
          // compare tree is cleared and seeded with the integer best (inj)
          hp_h <= '0;
          start_fetch(hp_buf, hp_bx + 8'(hp_dx(3'd0) < 0 ? -1 : 0),
                      hp_by + 8'(hp_dy(3'd0) < 0 ? -1 : 0),
                      hp_dx(3'd0) != 0, hp_dy(3'd0) != 0);
          st <= S_HP;
        end

        S_HP:
          if (f_i == 5'd16) begin
            if (hp_h == 3'd7) begin
              drain <= '0;
              st_after_drain <= S_FIN;
              st <= S_DRAIN;
            end else begin
              logic [2:0] h;
              h = hp_h + 3'd1;
              hp_h <= h;
              start_fetch(hp_buf, hp_bx + 8'(hp_dx(h) < 0 ? -1 : 0),
                          hp_by + 8'(hp_dy(h) < 0 ? -1 : 0),
                          hp_dx(h) != 0, hp_dy(h) != 0);
            end
          end else f_i <= f_i + 5'd1;

        S_FIN: begin : fin
          // half-pel search finished: record the result
          int hx, hy;
          hx = int'(ct_best[0].mv.dx) - 2 * int'(mv0.dx);
          hy = int'(ct_best[0].mv.dy) - 2 * int'(mv0.dy);
          res_mv  <= ct_best[0].mv;
          res_sad <= ct_best[0].sad;
          st <= S_DONE;
          if (op == OP_DE) begin
            sad_dc <= ct_best[0].sad;
            dc_buf <= hp_buf;
            dc_xa  <= hp_bx + 8'(hx < 0 ? -1 : 0);
            dc_ya  <= hp_by + 8'(hy < 0 ? -1 : 0);
            dc_hh  <= hx != 0;
            dc_hv  <= hy != 0;
          end
          if (op == OP_ME && save_mc) begin
            // copy the winning block into the MC-block memory
            sad_mc <= ct_best[0].sad;
            start_fetch(hp_buf, hp_bx + 8'(hx < 0 ? -1 : 0), hp_by + 8'(hy < 0 ? -1 : 0),
                        hx != 0, hy != 0);
            st <= S_MC;
          end
        end

        S_MC:
          if (f_i == 5'd16) begin
            drain <= 3'd2;
            st_after_drain <= S_DONE;
            st <= S_DRAIN;
          end else f_i <= f_i + 5'd1;

        S_DONE: begin
          res_valid <= 1'b1;
          res_op    <= op;
          res_mode  <= (op == OP_DE) ? MODE_DC : MODE_MC;
          st <= S_IDLE;
        end

        S_J:
          if (f_i == 5'd16) st <= S_JWAIT;
          else f_i <= f_i + 5'd1;

        S_JWAIT:
          if (jbg_done) begin
            ct_clear <= 1'b1;
            st <= S_JCT;
          end

        S_JCT: st <= S_JDEC;    // eight joint SADs enter the compare tree

        S_JDEC: begin
          res_jkind <= ct_best[0].mv.dx[2:0];
          res_mv    <= '0;
          res_op    <= OP_JOINT;
          if (sad_mc <= sad_dc && sad_mc <= ct_best[0].sad) begin
            res_mode <= MODE_MC;    res_sad <= sad_mc;
          end else if (sad_dc <= ct_best[0].sad) begin
            res_mode <= MODE_DC;    res_sad <= sad_dc;
          end else begin
            res_mode <= MODE_JOINT; res_sad <= ct_best[0].sad;
          end
          res_valid <= 1'b1;
          st <= S_IDLE;
        end

        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
