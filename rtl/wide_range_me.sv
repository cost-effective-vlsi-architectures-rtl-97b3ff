// wide_range_me: motion estimation over the extended search range
// [-2P, 2P-1] x [-2P, 2P-1] with four processors working in parallel, so
// that one motion vector still takes (2P)^2 candidate cycles instead of
// (4P)^2.
//
// The (4P+N-1) x (4P+N-1) search area is cut into four (2P+N-1)-square
// sub-areas that overlap by N-1 rows and columns. Processor k (k = 0..3,
// the document's ME #1..#4) takes the sub-area whose top-left corner is
// column 2P*(k%2), row 2P*(k/2), i.e. the motion vectors
//   k = 0: x in [-2P,-1], y in [-2P,-1]    k = 1: x in [0,2P-1], y in [-2P,-1]
//   k = 2: x in [-2P,-1], y in [0,2P-1]    k = 3: x in [0,2P-1], y in [0,2P-1]
// Each processor has its own search streams ls_in[k] / rs_in[k], in the
// processors' usual input format for its sub-area; the reference block is
// shared (ref_load / ref_in go to all four). All four are started together
// and run standalone. Their local minima go up a chain of mv_merge stages,
// processor 0 at the bottom fed with MV 0 and the largest MAD; each stage
// adds its processor's offset (+-P) to the local vector and keeps the
// smaller MAD (on a tie the lower stage's result).
//
// Timing: mv_valid is high 4 cycles after the processors' own mv_valid, i.e.
// in the cycle after edge 2P(N-1) + (2P)^2 + N + 5 when start is sampled at
// edge 0. Back-to-back searches follow every (2P)^2 + 2P(N-1) cycles, as for
// one processor.
//
// Follows the document: four processors, the quadrant split with N-1
// overlapping rows and columns, separate LS/RS inputs and a common
// reference, a chain whose bottom inputs are 0 and the maximum distortion.
// This design's choices: the semi-systolic engine is used for all four, the
// order of the chain and the registered merge stages.
module wide_range_me
  import me_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned P     = 16,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned ERR_W = PIX_W + 2 * $clog2(N) + 2,
  localparam int unsigned PH_W = cnt_w(2*P)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [PIX_W-1:0]       ls_in [4],
  input  logic [PIX_W-1:0]       rs_in [4],
  input  logic                   ref_load,
  input  logic [PIX_W-1:0]       ref_in,
  output logic                   busy,
  output logic                   mv_valid,
  output logic signed [PH_W+1:0] mv_x,
  output logic signed [PH_W+1:0] mv_y,
  output logic [ERR_W-1:0]       mad_out
);

  logic                   p_busy  [4];
  logic                   p_valid [4];
  logic signed [PH_W:0]   p_x     [4];
  logic signed [PH_W:0]   p_y     [4];
  logic [ERR_W-1:0]       p_mad   [4];
  logic [PIX_W-1:0]       p_lso   [4];
  logic [PIX_W-1:0]       p_rso   [4];
  logic                   p_ev    [4];
  logic [ERR_W-1:0]       p_eo    [4];

  // chain links: link k is the input of stage k, link 4 the result
  logic                   c_valid [5];
  logic signed [PH_W+1:0] c_x     [5];
  logic signed [PH_W+1:0] c_y     [5];
  logic [ERR_W-1:0]       c_mad   [5];

  assign c_valid[0] = p_valid[0];
  assign c_x[0]     = '0;
  assign c_y[0]     = '0;
  assign c_mad[0]   = '1;

  for (genvar k = 0; k < 4; k++) begin : g_proc
    ssa_me_processor #(.N(N), .P(P), .PIX_W(PIX_W), .ERR_W(ERR_W)) u_proc (
      .clk        (clk),
      .rst_n      (rst_n),
      .start      (start),
      .mode       (MODE_STANDALONE),
      .ls_in      (ls_in[k]),
      .rs_in      (rs_in[k]),
      .ref_load   (ref_load),
      .ref_in     (ref_in),
      .error_in   ('0),
      .ls_out     (p_lso[k]),
      .rs_out     (p_rso[k]),
      .busy       (p_busy[k]),
      .mv_valid   (p_valid[k]),
      .mv_x       (p_x[k]),
      .mv_y       (p_y[k]),
      .mad_out    (p_mad[k]),
      .error_valid(p_ev[k]),
      .error_out  (p_eo[k])
    );

    mv_merge #(
      .P(P), .ERR_W(ERR_W),
      .X_OFF((k % 2 == 0) ? -int'(P) : int'(P)),
      .Y_OFF((k / 2 == 0) ? -int'(P) : int'(P))
    ) u_merge (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (c_valid[k]),
      .in_mv_x  (c_x[k]),
      .in_mv_y  (c_y[k]),
      .in_mad   (c_mad[k]),
      .loc_mv_x (p_x[k]),
      .loc_mv_y (p_y[k]),
      .loc_mad  (p_mad[k]),
      .out_valid(c_valid[k+1]),
      .out_mv_x (c_x[k+1]),
      .out_mv_y (c_y[k+1]),
      .out_mad  (c_mad[k+1])
    );
  end

  assign busy     = p_busy[0] || p_busy[1] || p_busy[2] || p_busy[3] ||
                    c_valid[1] || c_valid[2] || c_valid[3];
  assign mv_valid = c_valid[4];
  assign mv_x     = c_x[4];
  assign mv_y     = c_y[4];
  assign mad_out  = c_mad[4];

endmodule
