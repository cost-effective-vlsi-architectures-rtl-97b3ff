// sa_pe_array: N x N systolic PE array with its stream memories.
//
// Row r (0 = top) holds reference row r. Search words enter the bottom row
// (N-1) at its right end on ls_in / rs_in and shift left, one PE per cycle.
// What leaves the left end of row r+1 passes a sa_stream_memory delay line
// and enters row r at its right end (the snake path of the document's SA
// drawing). Each row therefore holds N consecutive search columns, a window
// that moves one column per cycle, and switches column by column from LS to
// RS at the end of a search row. Partial MADs and the column control go up:
// the bottom row gets psum 0 and the ring-counter control cmux[c]; both are
// re-registered in every PE, so each row lags the row below by one cycle.
// col_psum[c], the top PE's output, is the column-c share of one
// candidate's MAD; the N columns refer to the same candidate in the same
// cycle. The top row's streams are brought out on ls_out / rs_out.
//
// The reference block is loaded through one shift chain in raster order,
// PE(0,0) first, so pixels are shifted in from R(N-1,N-1) back to R(0,0).
module sa_pe_array #(
  parameter int unsigned N     = 16,
  parameter int unsigned P     = 16,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned ACC_W = PIX_W + $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PIX_W-1:0] ls_in,
  input  logic [PIX_W-1:0] rs_in,
  input  logic [N-1:0]     cmux,
  input  logic             ref_load,
  input  logic [PIX_W-1:0] ref_in,
  output logic [ACC_W-1:0] col_psum [N],
  output logic [PIX_W-1:0] ls_out,
  output logic [PIX_W-1:0] rs_out
);

  // horizontal search chains: hls[r][c] enters PE(r,c) from the right
  logic [PIX_W-1:0] hls [N][N+1];
  logic [PIX_W-1:0] hrs [N][N+1];
  // vertical: v*[r][c] enters PE(r,c) from below
  logic [ACC_W-1:0] vps [N+1][N];
  logic             vcm [N+1][N];
  logic [PIX_W-1:0] rchain [N*N+1];

  assign rchain[0] = ref_in;
  assign hls[N-1][N] = ls_in;
  assign hrs[N-1][N] = rs_in;

  for (genvar c = 0; c < N; c++) begin : g_bottom
    assign vps[N][c] = '0;
    assign vcm[N][c] = cmux[c];
    assign col_psum[c] = vps[0][c];
  end

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      sa_pe #(.PIX_W(PIX_W), .ACC_W(ACC_W)) u_pe (
        .clk     (clk),
        .rst_n   (rst_n),
        .ls_in   (hls[r][c+1]),
        .rs_in   (hrs[r][c+1]),
        .ls_out  (hls[r][c]),
        .rs_out  (hrs[r][c]),
        .cmux_in (vcm[r+1][c]),
        .cmux_out(vcm[r][c]),
        .ref_load(ref_load),
        .ref_in  (rchain[r*N+c]),
        .ref_out (rchain[r*N+c+1]),
        .psum_in (vps[r+1][c]),
        .psum_out(vps[r][c])
      );
    end
    if (r < N - 1) begin : g_mem
      sa_stream_memory #(.N(N), .P(P), .PIX_W(PIX_W)) u_mem (
        .clk   (clk),
        .ls_in (hls[r+1][0]),
        .rs_in (hrs[r+1][0]),
        .ls_out(hls[r][N]),
        .rs_out(hrs[r][N])
      );
    end
  end

  assign ls_out = hls[0][0];
  assign rs_out = hrs[0][0];

endmodule
