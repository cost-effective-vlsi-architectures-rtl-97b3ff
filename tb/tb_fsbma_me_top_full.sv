// Full-size testbench of fsbma_me_top: every parameter at its default
// (N = P = 16, 8-bit pixels), both engines, one standalone search, one
// back-to-back search and a two-chip cascade each (the second chip being a
// bare pair of processors at the same size), plus one search over
// [-2P, 2P-1] on the four-processor extended-range unit (see
// top_tb_body.svh).
`timescale 1ns/1ps
module tb_fsbma_me_top_full;
  localparam int unsigned N     = 16;
  localparam int unsigned P     = 16;
  localparam int unsigned PIX_W = 8;
  localparam int unsigned ERR_W = PIX_W + 2 * $clog2(N) + 2;
  localparam int unsigned PH_W  = me_pkg::cnt_w(2*P);
  // chip 0: the whole top
  for (genvar c = 0; c < 1; c++) begin : g_chip
    fsbma_me_top u_top (
      .clk(clk), .rst_n(rst_n),
      .ssa_start(start_s[c][0]), .ssa_mode(mode_s[c][0]), .ssa_ls_in(ls_s[c][0]), .ssa_rs_in(rs_s[c][0]),
      .ssa_ref_load(rld_s[c][0]), .ssa_ref_in(rin_s[c][0]), .ssa_error_in(ein_s[c][0]),
      .ssa_ls_out(lso_s[c][0]), .ssa_rs_out(rso_s[c][0]), .ssa_busy(busy_s[c][0]), .ssa_mv_valid(mvv_s[c][0]),
      .ssa_mv_x(mvx_s[c][0]), .ssa_mv_y(mvy_s[c][0]), .ssa_mad_out(mad_s[c][0]),
      .ssa_error_valid(ev_s[c][0]), .ssa_error_out(eo_s[c][0]),
      .sa_start(start_s[c][1]), .sa_mode(mode_s[c][1]), .sa_ls_in(ls_s[c][1]), .sa_rs_in(rs_s[c][1]),
      .sa_ref_load(rld_s[c][1]), .sa_ref_in(rin_s[c][1]), .sa_error_in(ein_s[c][1]),
      .sa_ls_out(lso_s[c][1]), .sa_rs_out(rso_s[c][1]), .sa_busy(busy_s[c][1]), .sa_mv_valid(mvv_s[c][1]),
      .sa_mv_x(mvx_s[c][1]), .sa_mv_y(mvy_s[c][1]), .sa_mad_out(mad_s[c][1]),
      .sa_error_valid(ev_s[c][1]), .sa_error_out(eo_s[c][1]),
      .wr_start(wr_start[c]), .wr_ls_in(wr_ls[c]), .wr_rs_in(wr_rs[c]),
      .wr_ref_load(wr_rld[c]), .wr_ref_in(wr_rin[c]), .wr_busy(wr_busy[c]),
      .wr_mv_valid(wr_mvv[c]), .wr_mv_x(wr_mvx[c]), .wr_mv_y(wr_mvy[c]), .wr_mad_out(wr_mad[c])
    );
  end
  // chip 1, the second processor of each cascade: the two engines alone
  ssa_me_processor #(.N(N), .P(P), .PIX_W(PIX_W), .ERR_W(ERR_W)) u_ssa1 (
    .clk(clk), .rst_n(rst_n), .start(start_s[1][0]), .mode(mode_s[1][0]), .ls_in(ls_s[1][0]), .rs_in(rs_s[1][0]),
    .ref_load(rld_s[1][0]), .ref_in(rin_s[1][0]), .error_in(ein_s[1][0]), .ls_out(lso_s[1][0]), .rs_out(rso_s[1][0]),
    .busy(busy_s[1][0]), .mv_valid(mvv_s[1][0]), .mv_x(mvx_s[1][0]), .mv_y(mvy_s[1][0]), .mad_out(mad_s[1][0]),
    .error_valid(ev_s[1][0]), .error_out(eo_s[1][0]));
  sa_me_processor #(.N(N), .P(P), .PIX_W(PIX_W), .ERR_W(ERR_W)) u_sa1 (
    .clk(clk), .rst_n(rst_n), .start(start_s[1][1]), .mode(mode_s[1][1]), .ls_in(ls_s[1][1]), .rs_in(rs_s[1][1]),
    .ref_load(rld_s[1][1]), .ref_in(rin_s[1][1]), .error_in(ein_s[1][1]), .ls_out(lso_s[1][1]), .rs_out(rso_s[1][1]),
    .busy(busy_s[1][1]), .mv_valid(mvv_s[1][1]), .mv_x(mvx_s[1][1]), .mv_y(mvy_s[1][1]), .mad_out(mad_s[1][1]),
    .error_valid(ev_s[1][1]), .error_out(eo_s[1][1]));
  localparam bit DO_CASCADE = 1'b1;
  `include "tb/top_tb_body.svh"
endmodule
