// ssa_me_processor: integer full-search block-matching motion estimator on a
// semi-systolic array (SSA), cascadable.
//
// For an N x N reference block and search range [-P, P-1] it computes the
// mean absolute difference (MAD, kept as a sum of absolute differences) of
// all (2P)^2 candidates, one candidate per cycle, and reports the motion
// vector with the smallest MAD. Blocks: stream memory bank -> N x N PE array
// -> parallel adder tree -> compare-select, run by a ring-counter based
// controller.
//
// Search data enter on two buses. The (2P+N-1) x (2P+N-1) search area is
// split into LS, the left 2P columns, and RS, the right N-1 columns. Row y of
// the area is sent in one 2P-cycle period: its LS words 0 .. 2P-1 on ls_in in
// phases 0 .. 2P-1, and its RS words (columns 2P .. 2P+N-2) on rs_in in
// phases 0 .. N-2 of the following period. Rows 0 .. 2P+N-2 are sent in
// consecutive periods starting the cycle after start; rs_in carries the RS
// part of the last row in N-1 further cycles. rs_in is ignored in the other
// phases. Each pixel is read once; the stream memory bank reuses it for all
// PE rows.
//
// The reference block is shifted in on ref_in while ref_load is high, N*N
// pixels in reverse raster order (R(N-1,N-1) first, R(0,0) last). It must
// not change during EXEC or while candidates leave the array (checked by an
// assertion); it may be loaded during INIT once the previous search's
// candidates are out.
//
// Timing: with start sampled at edge 0, candidate (x, y) leaves the PE array
// in cycle 2P(N-1) + 2P*y + x + N - 1 (cycle k follows edge k), its MAD
// reaches the compare-select two cycles later, and mv_valid is high in the
// cycle after edge 2P(N-1) + (2P)^2 + N + 1. A start given while busy is
// remembered; it is then taken at the end of EXEC and searches follow each
// other every (2P)^2 + 2P(N-1) cycles.
//
// Cascading (mode): in MODE_PARTIAL / MODE_LAST the adder tree adds error_in,
// the per-candidate partial MAD of the previous processor, which must be one
// cycle ahead (start it one cycle earlier). In MODE_PARTIAL error_out carries
// that running sum for every candidate (error_valid); otherwise error_out is
// the minimum MAD of the last search.
//
// Follows the document: data flow, bus partition, memory size, PE structure,
// ring counter, adder-tree cascade input. This design's choices: reference
// loading port, start handshake, pipeline depth, three-valued mode.
module ssa_me_processor
  import me_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned P     = 16,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned ACC_W = PIX_W + $clog2(N),
  parameter int unsigned ERR_W = PIX_W + 2 * $clog2(N) + 2,
  localparam int unsigned PH_W = cnt_w(2*P)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  me_mode_e             mode,
  input  logic [PIX_W-1:0]     ls_in,
  input  logic [PIX_W-1:0]     rs_in,
  input  logic                 ref_load,
  input  logic [PIX_W-1:0]     ref_in,
  input  logic [ERR_W-1:0]     error_in,
  output logic [PIX_W-1:0]     ls_out,
  output logic [PIX_W-1:0]     rs_out,
  output logic                 busy,
  output logic                 mv_valid,
  output logic signed [PH_W:0] mv_x,
  output logic signed [PH_W:0] mv_y,
  output logic [ERR_W-1:0]     mad_out,
  output logic                 error_valid,
  output logic [ERR_W-1:0]     error_out
);

  logic             adv;
  logic [PH_W-1:0]  phase;
  logic [N-1:0]     col_rs;
  logic             c_valid, c_first, c_last;
  logic [PH_W-1:0]  c_x, c_y;
  logic [PIX_W-1:0] ls_bus [N];
  logic [PIX_W-1:0] rs_bus [N];
  logic [ACC_W-1:0] row_psum [N];
  logic [ERR_W-1:0] sum_q;
  logic             ctrl_busy;
  logic             in_exec;

  // candidate tags follow the two adder-tree stages
  logic [1:0]       v_d, f_d, l_d;
  logic [PH_W-1:0]  x_d [2];
  logic [PH_W-1:0]  y_d [2];

  me_controller #(.N(N), .P(P)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .busy      (ctrl_busy),
    .in_exec   (in_exec),
    .adv       (adv),
    .phase     (phase),
    .col_rs    (col_rs),
    .cand_valid(c_valid),
    .cand_first(c_first),
    .cand_last (c_last),
    .cand_x    (c_x),
    .cand_y    (c_y)
  );

  stream_memory_bank #(.N(N), .P(P), .PIX_W(PIX_W)) u_smb (
    .clk   (clk),
    .adv   (adv),
    .phase (phase),
    .ls_in (ls_in),
    .rs_in (rs_in),
    .ls_bus(ls_bus),
    .rs_bus(rs_bus),
    .ls_out(ls_out),
    .rs_out(rs_out)
  );

  ssa_pe_array #(.N(N), .PIX_W(PIX_W), .ACC_W(ACC_W)) u_array (
    .clk     (clk),
    .rst_n   (rst_n),
    .ls_bus  (ls_bus),
    .rs_bus  (rs_bus),
    .cmux    (col_rs),
    .ref_load(ref_load),
    .ref_in  (ref_in),
    .row_psum(row_psum)
  );

  adder_tree #(.N(N), .ACC_W(ACC_W), .ERR_W(ERR_W)) u_tree (
    .clk     (clk),
    .rst_n   (rst_n),
    .row_psum(row_psum),
    .add_ext (mode != MODE_STANDALONE),
    .ext_in  (error_in),
    .sum_q   (sum_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d <= '0;
      f_d <= '0;
      l_d <= '0;
      x_d <= '{default: '0};
      y_d <= '{default: '0};
    end else begin
      v_d <= {v_d[0], c_valid};
      f_d <= {f_d[0], c_first};
      l_d <= {l_d[0], c_last};
      x_d <= '{c_x, x_d[0]};
      y_d <= '{c_y, y_d[0]};
    end
  end

  compare_select #(.P(P), .ERR_W(ERR_W)) u_cs (
    .clk       (clk),
    .rst_n     (rst_n),
    .cand_valid(v_d[1]),
    .cand_first(f_d[1]),
    .cand_last (l_d[1]),
    .cand_x    (x_d[1]),
    .cand_y    (y_d[1]),
    .mad       (sum_q),
    .mv_valid  (mv_valid),
    .mv_x      (mv_x),
    .mv_y      (mv_y),
    .mad_out   (mad_out)
  );

  assign busy        = ctrl_busy || (|v_d);
  assign error_valid = (mode == MODE_PARTIAL) && v_d[1];
  assign error_out   = (mode == MODE_PARTIAL) ? sum_q : mad_out;

  // The reference block may not change while candidates are evaluated.
  a_ref_stable: assert property (@(posedge clk) disable iff (!rst_n) !(ref_load && (in_exec || c_valid)))
    else $error("reference reloaded during candidate evaluation");

endmodule
