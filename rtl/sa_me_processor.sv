// sa_me_processor: integer full-search block-matching motion estimator on a
// systolic array (SA), cascadable.
//
// Same task, ports and input format as ssa_me_processor: for an N x N
// reference block and search range [-P, P-1] it evaluates the (2P)^2
// candidates at one per cycle and reports the motion vector of the smallest
// MAD. Here the search words travel through the PEs (right to left) and the
// partial MADs travel upward, so the N columns of the array hand the adder
// tree N column shares of one candidate's MAD. Between PE rows the search
// streams pass 2P - N + 1 stage delay lines instead of the semi-systolic
// engine's full row buffers; the ring counter's stair pulses sit at the end
// of each row period.
//
// Search data: row y of the (2P+N-1)^2 search area goes out in one 2P-cycle
// period, LS words (columns 0 .. 2P-1) on ls_in in phases 0 .. 2P-1, RS words
// (columns 2P .. 2P+N-2) on rs_in in phases 0 .. N-2 of the next period;
// rows follow each other from the cycle after start. Reference: N*N pixels
// on ref_in while ref_load is high, R(N-1,N-1) first, R(0,0) last.
//
// Timing: with start sampled at edge 0, candidate (x, y) leaves the array
// in cycle 2P(N-1) + 2P*y + x + 2N - 1 (cycle k follows edge k), N cycles
// later than in the semi-systolic engine because of the row skew; mv_valid
// is high in the cycle after edge 2P(N-1) + (2P)^2 + 2N + 1. Back-to-back
// searches (start given while busy) follow every (2P)^2 + 2P(N-1) cycles.
// Cascading (mode, error_in, error_out) works as in ssa_me_processor.
//
// Follows the document: data directions, PE register set, stair control,
// snake-connected rows, storage of 4N^2 + 2(N-1)(2P-N+1) words. This
// design's choices: the exact skew and delay-line depth derived from that
// data flow, reference loading port, start handshake, pipeline depth.
module sa_me_processor
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

  logic [N-1:0]     col_rs;
  logic             c_valid, c_first, c_last;
  logic [PH_W-1:0]  c_x, c_y;
  logic [ACC_W-1:0] row_psum [N];
  logic [ERR_W-1:0] sum_q;
  logic             ctrl_busy;
  logic             in_exec;

  // candidate tags follow the two adder-tree stages
  logic [1:0]       v_d, f_d, l_d;
  logic [PH_W-1:0]  x_d [2];
  logic [PH_W-1:0]  y_d [2];

  me_controller #(.N(N), .P(P), .SYSTOLIC(1'b1)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .busy      (ctrl_busy),
    .in_exec   (in_exec),
    .adv       (),
    .phase     (),
    .col_rs    (col_rs),
    .cand_valid(c_valid),
    .cand_first(c_first),
    .cand_last (c_last),
    .cand_x    (c_x),
    .cand_y    (c_y)
  );

  sa_pe_array #(.N(N), .P(P), .PIX_W(PIX_W), .ACC_W(ACC_W)) u_array (
    .clk     (clk),
    .rst_n   (rst_n),
    .ls_in   (ls_in),
    .rs_in   (rs_in),
    .cmux    (col_rs),
    .ref_load(ref_load),
    .ref_in  (ref_in),
    .col_psum(row_psum),
    .ls_out  (ls_out),
    .rs_out  (rs_out)
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
