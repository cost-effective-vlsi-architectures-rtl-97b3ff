// fsbma_me_top: the full-search motion-estimation engines side by side.
//
// Both engines solve the same problem from the same overlapped search-data
// flow: for an N x N reference block and a [-P, P-1] search range they
// evaluate all (2P)^2 candidates at one per cycle after a 2P(N-1)-cycle
// preload, and report the motion vector of minimum MAD.
//   ssa_* : semi-systolic engine, search words broadcast on two buses per
//           PE row, (N-1) x (2P+N-1) word stream memory.
//   sa_*  : systolic engine, search words shifted through the PEs,
//           2 (N-1)(2P-N+1) words of delay line between rows.
// The units are independent (chips of the same family) and share no signal
// except clock and reset; each has its own ports, identical in meaning. See
// ssa_me_processor / sa_me_processor for the input format and timing. Each
// engine is cascadable through mode / error_in / error_out.
//   wr_*  : the document's configuration for a larger search range: four
//           semi-systolic processors, each searching one quadrant of
//           [-2P, 2P-1] x [-2P, 2P-1] from its own sub-area stream, with a
//           minimum-MAD chain that returns one vector in extended range
//           (wide_range_me). mv_x / mv_y are one bit wider there.
module fsbma_me_top
  import me_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned P     = 16,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned ERR_W = PIX_W + 2 * $clog2(N) + 2,
  localparam int unsigned PH_W = cnt_w(2*P)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // semi-systolic engine
  input  logic                 ssa_start,
  input  me_mode_e             ssa_mode,
  input  logic [PIX_W-1:0]     ssa_ls_in,
  input  logic [PIX_W-1:0]     ssa_rs_in,
  input  logic                 ssa_ref_load,
  input  logic [PIX_W-1:0]     ssa_ref_in,
  input  logic [ERR_W-1:0]     ssa_error_in,
  output logic [PIX_W-1:0]     ssa_ls_out,
  output logic [PIX_W-1:0]     ssa_rs_out,
  output logic                 ssa_busy,
  output logic                 ssa_mv_valid,
  output logic signed [PH_W:0] ssa_mv_x,
  output logic signed [PH_W:0] ssa_mv_y,
  output logic [ERR_W-1:0]     ssa_mad_out,
  output logic                 ssa_error_valid,
  output logic [ERR_W-1:0]     ssa_error_out,
  // systolic engine
  input  logic                 sa_start,
  input  me_mode_e             sa_mode,
  input  logic [PIX_W-1:0]     sa_ls_in,
  input  logic [PIX_W-1:0]     sa_rs_in,
  input  logic                 sa_ref_load,
  input  logic [PIX_W-1:0]     sa_ref_in,
  input  logic [ERR_W-1:0]     sa_error_in,
  output logic [PIX_W-1:0]     sa_ls_out,
  output logic [PIX_W-1:0]     sa_rs_out,
  output logic                 sa_busy,
  output logic                 sa_mv_valid,
  output logic signed [PH_W:0] sa_mv_x,
  output logic signed [PH_W:0] sa_mv_y,
  output logic [ERR_W-1:0]     sa_mad_out,
  output logic                 sa_error_valid,
  output logic [ERR_W-1:0]     sa_error_out,
  // extended search range [-2P, 2P-1]: four processors, one per quadrant
  input  logic                   wr_start,
  input  logic [PIX_W-1:0]       wr_ls_in [4],
  input  logic [PIX_W-1:0]       wr_rs_in [4],
  input  logic                   wr_ref_load,
  input  logic [PIX_W-1:0]       wr_ref_in,
  output logic                   wr_busy,
  output logic                   wr_mv_valid,
  output logic signed [PH_W+1:0] wr_mv_x,
  output logic signed [PH_W+1:0] wr_mv_y,
  output logic [ERR_W-1:0]       wr_mad_out
);

  ssa_me_processor #(.N(N), .P(P), .PIX_W(PIX_W), .ERR_W(ERR_W)) u_ssa (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (ssa_start),
    .mode       (ssa_mode),
    .ls_in      (ssa_ls_in),
    .rs_in      (ssa_rs_in),
    .ref_load   (ssa_ref_load),
    .ref_in     (ssa_ref_in),
    .error_in   (ssa_error_in),
    .ls_out     (ssa_ls_out),
    .rs_out     (ssa_rs_out),
    .busy       (ssa_busy),
    .mv_valid   (ssa_mv_valid),
    .mv_x       (ssa_mv_x),
    .mv_y       (ssa_mv_y),
    .mad_out    (ssa_mad_out),
    .error_valid(ssa_error_valid),
    .error_out  (ssa_error_out)
  );

  sa_me_processor #(.N(N), .P(P), .PIX_W(PIX_W), .ERR_W(ERR_W)) u_sa (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (sa_start),
    .mode       (sa_mode),
    .ls_in      (sa_ls_in),
    .rs_in      (sa_rs_in),
    .ref_load   (sa_ref_load),
    .ref_in     (sa_ref_in),
    .error_in   (sa_error_in),
    .ls_out     (sa_ls_out),
    .rs_out     (sa_rs_out),
    .busy       (sa_busy),
    .mv_valid   (sa_mv_valid),
    .mv_x       (sa_mv_x),
    .mv_y       (sa_mv_y),
    .mad_out    (sa_mad_out),
    .error_valid(sa_error_valid),
    .error_out  (sa_error_out)
  );

  wide_range_me #(.N(N), .P(P), .PIX_W(PIX_W), .ERR_W(ERR_W)) u_wide (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (wr_start),
    .ls_in   (wr_ls_in),
    .rs_in   (wr_rs_in),
    .ref_load(wr_ref_load),
    .ref_in  (wr_ref_in),
    .busy    (wr_busy),
    .mv_valid(wr_mv_valid),
    .mv_x    (wr_mv_x),
    .mv_y    (wr_mv_y),
    .mad_out (wr_mad_out)
  );

endmodule
