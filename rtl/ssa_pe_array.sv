// ssa_pe_array: N x N array of semi-systolic PEs.
//
// PE row r (0 = top) holds reference row r and sees the search row
// "candidate row + r" on its two broadcast buses ls_bus[r] / rs_bus[r].
// Partial MADs move right along a row, in the same direction as the search
// data advance in time, so row_psum[r] (the output of the right-most PE) is
// the distortion of reference row r for one candidate per cycle. All rows
// work on the same candidate in the same cycle; the parallel adder tree adds
// the N row results. Column c uses the RS bus while cmux[c] is high (the
// stair-shaped control from the ring counter); cmux is a global line per
// column, shared by all rows.
//
// The reference block is loaded through one shift chain that visits the PEs
// in raster order, PE(0,0) first: after N*N shifts the pixel shifted in first
// sits in PE(N-1,N-1), so pixels are shifted in from R(N-1,N-1) back to
// R(0,0). Array organisation follows the document's SSA drawing; the chain
// order is this design's choice.
module ssa_pe_array #(
  parameter int unsigned N     = 16,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned ACC_W = PIX_W + $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PIX_W-1:0] ls_bus   [N],
  input  logic [PIX_W-1:0] rs_bus   [N],
  input  logic [N-1:0]     cmux,
  input  logic             ref_load,
  input  logic [PIX_W-1:0] ref_in,
  output logic [ACC_W-1:0] row_psum [N]
);

  logic [ACC_W-1:0] psum  [N][N+1];
  logic [PIX_W-1:0] rchain[N*N+1];

  assign rchain[0] = ref_in;

  for (genvar r = 0; r < N; r++) begin : g_row
    assign psum[r][0] = '0;
    for (genvar c = 0; c < N; c++) begin : g_col
      ssa_pe #(.PIX_W(PIX_W), .ACC_W(ACC_W)) u_pe (
        .clk     (clk),
        .rst_n   (rst_n),
        .ls      (ls_bus[r]),
        .rs      (rs_bus[r]),
        .cmux    (cmux[c]),
        .ref_load(ref_load),
        .ref_in  (rchain[r*N+c]),
        .ref_out (rchain[r*N+c+1]),
        .psum_in (psum[r][c]),
        .psum_out(psum[r][c+1])
      );
    end
    assign row_psum[r] = psum[r][N];
  end

endmodule
