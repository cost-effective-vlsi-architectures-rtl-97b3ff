// ring_counter: stair-shaped column control for the PE array.
//
// A MAX(2P, N)-bit register fills with ones, one more per cycle, starting
// from all zeros at the first cycle of every 2P-cycle row period ("restart"
// or the end of the previous period clears it). In phase p exactly the low
// p bits are set. Column c (0-based) must take the boundary bus RS while
// p < c, i.e. during the first c cycles of a period, so its control is the
// inverse of tap c-1; column 0 never takes RS. Column c therefore gets a
// pulse of c cycles per period, the stair pattern of the document (column 2
// one cycle, column N N-1 cycles). The register length MAX(2P, N) and the
// reset every 2P cycles follow the document. With AT_END = 0 (semi-systolic
// array) column c is selected in the first c phases; with AT_END = 1 (systolic
// array, where the search data travel through the PEs) in the last c phases,
// p >= 2P - c, i.e. tap 2P-1-c, which is how the document's waveform places
// the pulses. Which phase the counter starts from is set by the controller.
//
// period_last is high in the last phase (2P-1) of a period.
module ring_counter #(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16,
  parameter bit          AT_END = 1'b0,   // 1: pulses end with the period
  localparam int unsigned LEN = (2*P > N) ? 2*P : N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         restart,   // clear: next cycle is phase 0
  input  logic         run,       // advance one phase
  output logic [N-1:0] col_rs,    // 1: column takes the RS bus
  output logic         period_last
);

  logic [LEN-1:0] q;

  assign period_last = q[2*P-2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    q <= '0;
    else if (restart)              q <= '0;
    else if (run) begin
      if (period_last)             q <= '0;
      else                         q <= {q[LEN-2:0], 1'b1};
    end
  end

  always_comb begin
    col_rs[0] = 1'b0;
    for (int c = 1; c < N; c++) col_rs[c] = AT_END ? q[2*P-1-c] : ~q[c-1];
  end

endmodule
