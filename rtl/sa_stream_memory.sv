// sa_stream_memory: row-to-row search buffer of the systolic array, a
// shift-register delay line of DEPTH = 2P - N + 1 stages for each of the two
// streams (LS and RS).
//
// A search word that leaves the left end of PE row r+1 has already spent N
// cycles in that row; PE row r, which runs one cycle later and one search
// row behind, needs it 2P + 1 cycles after it entered row r+1. The line adds
// the missing 2P + 1 - N cycles. Per row the document gives 2P - N + 1 words
// for the LS part; this design buffers the RS stream the same way, which
// gives the 2 (N-1)(2P - N + 1) stream-memory words of the document's storage
// total for the SA approach. The document allows a shift-register array or a
// pointer-addressed memory; this is the shift-register form. The registers
// are not reset: what they hold before the first words arrive only reaches
// candidates marked invalid.
module sa_stream_memory #(
  parameter int unsigned N     = 16,
  parameter int unsigned P     = 16,
  parameter int unsigned PIX_W = 8
) (
  input  logic             clk,
  input  logic [PIX_W-1:0] ls_in,
  input  logic [PIX_W-1:0] rs_in,
  output logic [PIX_W-1:0] ls_out,
  output logic [PIX_W-1:0] rs_out
);

  localparam int unsigned DEPTH = 2*P + 1 - N;

  logic [PIX_W-1:0] ls_sr [DEPTH];
  logic [PIX_W-1:0] rs_sr [DEPTH];

  always_ff @(posedge clk) begin
    ls_sr[0] <= ls_in;
    rs_sr[0] <= rs_in;
    for (int k = 1; k < DEPTH; k++) begin
      ls_sr[k] <= ls_sr[k-1];
      rs_sr[k] <= rs_sr[k-1];
    end
  end

  assign ls_out = ls_sr[DEPTH-1];
  assign rs_out = rs_sr[DEPTH-1];

endmodule
