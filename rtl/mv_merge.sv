// mv_merge: one stage of the minimum-MAD chain that joins the results of
// processors searching different parts of an extended search range.
//
// Each processor of the chain finds the best motion vector of its own
// [-P, P-1] x [-P, P-1] sub-range. This stage moves that local vector into
// the extended range [-2P, 2P-1] by adding the sub-range's offset
// (X_OFF, Y_OFF, which are -P or +P) and compares its MAD with the result
// handed up by the stage below. The smaller MAD wins; on a tie the result
// from below is kept. The bottom stage of a chain gets MV 0 and the largest
// MAD on its chain input, as the document's cascade drawing shows, so its
// own result always wins there.
//
// Timing: when in_valid is high the stage registers the winner, and
// out_valid is high one cycle later. The local inputs must be stable at
// that edge; the processors hold mv_x / mv_y / mad_out until their next
// result, so a chain of K stages may be started by the bottom processor's
// mv_valid and delivers its result K cycles later. The chain order and
// the tie rule are this design's choices; the document only says that the
// processors' local minima are processed further to find the final vector.
module mv_merge
  import me_pkg::*;
#(
  parameter int unsigned P     = 16,
  parameter int unsigned ERR_W = 18,
  parameter int          X_OFF = -16,
  parameter int          Y_OFF = -16,
  localparam int unsigned PH_W = cnt_w(2*P)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [PH_W+1:0] in_mv_x,
  input  logic signed [PH_W+1:0] in_mv_y,
  input  logic [ERR_W-1:0]       in_mad,
  input  logic signed [PH_W:0]   loc_mv_x,
  input  logic signed [PH_W:0]   loc_mv_y,
  input  logic [ERR_W-1:0]       loc_mad,
  output logic                   out_valid,
  output logic signed [PH_W+1:0] out_mv_x,
  output logic signed [PH_W+1:0] out_mv_y,
  output logic [ERR_W-1:0]       out_mad
);

  localparam logic signed [PH_W+1:0] XO = (PH_W+2)'(X_OFF);
  localparam logic signed [PH_W+1:0] YO = (PH_W+2)'(Y_OFF);

  logic take;
  assign take = (loc_mad < in_mad);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_mv_x  <= '0;
      out_mv_y  <= '0;
      out_mad   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_mv_x <= take ? ((PH_W+2)'(loc_mv_x) + XO) : in_mv_x;
        out_mv_y <= take ? ((PH_W+2)'(loc_mv_y) + YO) : in_mv_y;
        out_mad  <= take ? loc_mad : in_mad;
      end
    end
  end

endmodule
