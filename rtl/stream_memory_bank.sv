// stream_memory_bank: the search-data buffer of the SSA engine.
//
// N-1 row buffers (stream_memory_row) are chained. The bottom PE row (N-1)
// takes its LS/RS buses straight from the input ports; each buffer r stores
// what row r+1 sees and returns it one row period (2P cycles) later for PE
// row r. Every search pixel therefore enters the chip once and is reused by
// all N PE rows, and the bank holds (N-1) x (2P + N - 1) words, as the
// document gives for the SSA architecture. The top row's buses are also
// brought out (ls_out / rs_out), as in the document's drawing.
module stream_memory_bank #(
  parameter int unsigned N     = 16,
  parameter int unsigned P     = 16,
  parameter int unsigned PIX_W = 8,
  localparam int unsigned PH_W = me_pkg::cnt_w(2*P)
) (
  input  logic             clk,
  input  logic             adv,
  input  logic [PH_W-1:0]  phase,
  input  logic [PIX_W-1:0] ls_in,
  input  logic [PIX_W-1:0] rs_in,
  output logic [PIX_W-1:0] ls_bus [N],
  output logic [PIX_W-1:0] rs_bus [N],
  output logic [PIX_W-1:0] ls_out,
  output logic [PIX_W-1:0] rs_out
);

  assign ls_bus[N-1] = ls_in;
  assign rs_bus[N-1] = rs_in;

  for (genvar r = 0; r < N - 1; r++) begin : g_row
    stream_memory_row #(.N(N), .P(P), .PIX_W(PIX_W)) u_row (
      .clk  (clk),
      .adv  (adv),
      .phase(phase),
      .ls_wr(ls_bus[r+1]),
      .rs_wr(rs_bus[r+1]),
      .ls_rd(ls_bus[r]),
      .rs_rd(rs_bus[r])
    );
  end

  assign ls_out = ls_bus[0];
  assign rs_out = rs_bus[0];

endmodule
