// Prediction core for stereo video coding: top level.
//
// Performs motion estimation (ME) for the left and right views, disparity
// estimation (DE) of the right view against the left one, joint block
// generation and mode decision, for one 16x16 macroblock per command, with
// a single 128-PE block-matching datapath reused across the three levels of
// a hierarchical search:
//   bus -> DSU -> CRS (current block at full, half and quarter resolution)
//   bus -> SRAM0 (quarter-resolution search window),
//          SRAM1 / SRAM2 (half- or full-resolution refinement windows)
//   SRAM -> [IU] -> RSRN -> 128-PE adder tree -> compare tree -> NOCR
//   checker -> control unit (address generator), which starts the next level;
//   IU + SRAM3 (MC block) + CRS -> JBG -> compare tree -> mode decision.
//
// Host interface: the current block is written one row of 16 pixels per
// beat (cur_we, rows 0..15 in order); window pixels are written one per beat
// (bus_we, bus_sel 0 = SRAM0, 1 = SRAM1, 2 = SRAM2, at bus_x / bus_y).
// Before OP_ME / OP_DE the host fills SRAM0 with the quarter-resolution
// window; during the search the core asks for each refinement window with
// win_req (level, centre vector, buffer) and the host writes it and pulses
// win_ack. A command is taken when cmd_valid and cmd_ready are high; the
// result arrives with a res_valid pulse. OP_JOINT must follow an OP_DE of
// the same macroblock and uses the MC block stored by the last OP_ME issued
// with cmd_save_mc.
// The unit list and its connections follow the source design's block
// diagram; the host protocol, the buffer sizes and all encodings are this
// design's own.
module pred_core
  import pc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  input  op_t              cmd_op,
  input  logic             cmd_save_mc,
  output logic             cmd_ready,
  input  logic             cur_we,
  input  logic [3:0]       cur_row,
  input  logic [PIX_W-1:0] cur_pix [16],
  input  logic             bus_we,
  input  logic [1:0]       bus_sel,
  input  logic [5:0]       bus_x,
  input  logic [5:0]       bus_y,
  input  logic [PIX_W-1:0] bus_data,
  output logic             win_req,
  output level_t           win_level,
  output mv_t              win_center,
  output logic             win_buf,
  input  logic             win_ack,
  output logic             res_valid,
  output op_t              res_op,
  output mv_t              res_mv,
  output logic [SAD_W-1:0] res_sad,
  output mode_t            res_mode,
  output logic [2:0]       res_jkind,
  output logic [15:0]      op_cycles,
  output logic [15:0]      stall_cycles
);
  // DSU -> CRS
  logic             l0_we, l1_we, l2_we;
  logic [3:0]       l0_row;
  logic [2:0]       l1_row;
  logic [1:0]       l2_row;
  logic [PIX_W-1:0] l0_pix [16];
  logic [PIX_W-1:0] l1_pix [8];
  logic [PIX_W-1:0] l2_pix [4];

  dsu u_dsu (
    .clk, .rst_n,
    .in_valid(cur_we), .in_row(cur_row), .in_pix(cur_pix),
    .l0_we, .l0_row, .l0_pix, .l1_we, .l1_row, .l1_pix, .l2_we, .l2_row, .l2_pix
  );

  // control
  logic             sw0_rd_en, rd_row, mc_rd_en, s1_from_buf, s1_buf, s1_use_iu;
  logic [1:0]       buf_rd_en;
  logic signed [7:0] rd_x, rd_y;
  logic [3:0]       mc_rd_addr, mc_wr_addr, crs_col;
  rs_op_t           rs_op;
  level_t           level;
  logic             iu_valid, iu_first, iu_hh, iu_hv, iu_out_valid;
  logic             mc_wr_en, jbg_start, jbg_valid, crs_half;
  logic [11:0]      sad4 [8];
  logic [13:0]      sad8 [2];
  logic [14:0]      sad16h;
  logic             ct_clear;
  logic [7:0]       ct_valid;
  logic [SAD_W-1:0] ct_sad [8];
  mv_t              ct_mv [8];
  cand_t            ct_best [3];
  logic             noc_start, noc_done;
  mv_t              noc_mv [3];
  logic [2:0]       noc_keep;
  logic [1:0]       noc_n;
  logic             jbg_done;
  logic [SAD_W-1:0] jbg_sad [8];

  control_unit u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_op, .cmd_save_mc, .cmd_ready,
    .win_req, .win_level, .win_center, .win_buf, .win_ack,
    .sw0_rd_en, .buf_rd_en, .rd_row, .rd_x, .rd_y, .mc_rd_en, .mc_rd_addr,
    .s1_from_buf, .s1_buf, .s1_use_iu, .rs_op, .level,
    .iu_valid, .iu_first, .iu_hh, .iu_hv, .iu_out_valid,
    .mc_wr_en, .mc_wr_addr, .crs_col, .jbg_start, .jbg_valid,
    .crs_half, .sad4, .sad8, .sad16h,
    .ct_clear, .ct_valid, .ct_sad, .ct_mv, .ct_best,
    .noc_start, .noc_done, .noc_mv, .noc_keep,
    .jbg_done, .jbg_sad,
    .res_valid, .res_op, .res_mv, .res_sad, .res_mode, .res_jkind,
    .op_cycles, .stall_cycles
  );

  // search-window memories
  logic [PIX_W-1:0] sw0_q [32];
  logic [PIX_W-1:0] buf0_q [32];
  logic [PIX_W-1:0] buf1_q [32];

  sw_buf #(.W(SW0_W), .H(SW0_H)) u_sram0 (
    .clk, .wr_en(bus_we && bus_sel == 2'd0), .wr_x(bus_x), .wr_y(bus_y), .wr_data(bus_data),
    .rd_en(sw0_rd_en), .rd_row, .rd_x, .rd_y, .rd_data(sw0_q)
  );
  sw_buf #(.W(BUF_W), .H(BUF_H)) u_sram1 (
    .clk, .wr_en(bus_we && bus_sel == 2'd1), .wr_x(bus_x), .wr_y(bus_y), .wr_data(bus_data),
    .rd_en(buf_rd_en[0]), .rd_row, .rd_x, .rd_y, .rd_data(buf0_q)
  );
  sw_buf #(.W(BUF_W), .H(BUF_H)) u_sram2 (
    .clk, .wr_en(bus_we && bus_sel == 2'd2), .wr_x(bus_x), .wr_y(bus_y), .wr_data(bus_data),
    .rd_en(buf_rd_en[1]), .rd_row, .rd_x, .rd_y, .rd_data(buf1_q)
  );

  // stage-1 source mux
  logic [PIX_W-1:0] q [32];
  logic [PIX_W-1:0] iu_in [17];
  logic [PIX_W-1:0] iu_out [16];
  logic [PIX_W-1:0] rs_col [16];
  always_comb q = s1_from_buf ? (s1_buf ? buf1_q : buf0_q) : sw0_q;
  always_comb for (int i = 0; i < 17; i++) iu_in[i] = q[i];
  always_comb for (int i = 0; i < 16; i++) rs_col[i] = s1_use_iu ? iu_out[i] : q[i];

  iu u_iu (
    .clk, .rst_n, .in_valid(iu_valid), .first(iu_first), .in_col(iu_in),
    .hh(iu_hh), .hv(iu_hv), .out_valid(iu_out_valid), .out_col(iu_out)
  );

  logic [PIX_W-1:0] pe_ref [NPE];
  logic [PIX_W-1:0] pe_cur [NPE];
  logic [PIX_W-1:0] cur_col [16];

  rsrn u_rsrn (
    .clk, .rst_n, .level, .op(rs_op), .col_in(rs_col), .row_in(q), .pe_ref
  );

  crs u_crs (
    .clk, .rst_n,
    .l0_we, .l0_row, .l0_pix, .l1_we, .l1_row, .l1_pix, .l2_we, .l2_row, .l2_pix,
    .level, .half(crs_half), .pe_cur, .col_sel(crs_col), .col_out(cur_col)
  );

  pe_adder_tree u_tree (
    .ref_pix(pe_ref), .cur_pix(pe_cur), .sad4, .sad8, .sad16h
  );

  compare_tree u_ct (
    .clk, .rst_n, .clear(ct_clear), .in_valid(ct_valid), .in_sad(ct_sad), .in_mv(ct_mv),
    .best(ct_best)
  );

  nocrc u_nocrc (
    .clk, .rst_n, .start(noc_start), .cand(ct_best), .done(noc_done),
    .mv_out(noc_mv), .keep(noc_keep), .n_keep(noc_n)
  );

  // MC block memory and joint block generator
  logic [PIX_W-1:0] mc_q [16];

  mc_sram u_sram3 (
    .clk, .wr_en(mc_wr_en), .wr_addr(mc_wr_addr), .wr_data(iu_out),
    .rd_en(mc_rd_en), .rd_addr(mc_rd_addr), .rd_data(mc_q)
  );

  jbg u_jbg (
    .clk, .rst_n, .start(jbg_start), .in_valid(jbg_valid),
    .cur_col, .mc_col(mc_q), .dc_col(iu_out), .done(jbg_done), .sad(jbg_sad)
  );

endmodule
