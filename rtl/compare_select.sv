// compare_select: keeps the minimum MAD over the candidates of one search
// and reports its motion vector.
//
// On cand_first the running minimum is loaded with the incoming MAD; on
// every later valid candidate it is replaced only when the new MAD is
// strictly smaller, so among equal distortions the first candidate in scan
// order (vertical offset outer, horizontal inner) wins, as in the document's
// three-level loop. On cand_last the result is registered: mv_valid pulses
// for one cycle with mv_x = x - P, mv_y = y - P (two's complement, range
// -P .. P-1) and mad_out the minimum MAD. mad_out and the MV hold until the
// next result. Latency: one cycle from the last candidate.
module compare_select #(
  parameter int unsigned P     = 16,
  parameter int unsigned ERR_W = 18,
  localparam int unsigned PH_W = me_pkg::cnt_w(2*P)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cand_valid,
  input  logic                   cand_first,
  input  logic                   cand_last,
  input  logic [PH_W-1:0]        cand_x,
  input  logic [PH_W-1:0]        cand_y,
  input  logic [ERR_W-1:0]       mad,
  output logic                   mv_valid,
  output logic signed [PH_W:0]   mv_x,
  output logic signed [PH_W:0]   mv_y,
  output logic [ERR_W-1:0]       mad_out
);

  logic [ERR_W-1:0] min_q;
  logic [PH_W-1:0]  bx_q, by_q;
  logic             take;
  logic [ERR_W-1:0] min_n;
  logic [PH_W-1:0]  bx_n, by_n;

  always_comb begin
    take  = cand_valid && (cand_first || (mad < min_q));
    min_n = take ? mad    : min_q;
    bx_n  = take ? cand_x : bx_q;
    by_n  = take ? cand_y : by_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_q    <= '1;
      bx_q     <= '0;
      by_q     <= '0;
      mv_valid <= 1'b0;
      mv_x     <= '0;
      mv_y     <= '0;
      mad_out  <= '0;
    end else begin
      min_q    <= min_n;
      bx_q     <= bx_n;
      by_q     <= by_n;
      mv_valid <= cand_valid && cand_last;
      if (cand_valid && cand_last) begin
        mv_x    <= $signed({1'b0, bx_n}) - $signed((PH_W+1)'(P));
        mv_y    <= $signed({1'b0, by_n}) - $signed((PH_W+1)'(P));
        mad_out <= min_n;
      end
    end
  end

endmodule
