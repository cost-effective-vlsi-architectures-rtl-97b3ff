// stream_memory_row: one row buffer of the stream memory bank, a
// pointer-addressed memory of 2P + N - 1 words.
//
// The buffer delays the search stream of the PE row below by exactly one row
// period (2P cycles) so that the PE row above sees the same search row one
// candidate row later. The non-boundary (LS) stream carries 2P words per
// period and the boundary (RS) stream N-1 words, sent in phases 0 .. N-2 of
// the following period. Both parts are addressed by the row phase: in each
// cycle the word stored one period ago is read and the new word is written
// at the same address. LS occupies words 0 .. 2P-1, RS words 0 .. N-2 of a
// second array; together 2P + N - 1 words, the size the document gives per
// row. The read is combinational; the write happens at the clock edge when
// "adv" is high.
//
// Contents are not reset: what is read before the first write only reaches
// candidates that the sequencer marks invalid.
module stream_memory_row #(
  parameter int unsigned N     = 16,
  parameter int unsigned P     = 16,
  parameter int unsigned PIX_W = 8,
  localparam int unsigned PH_W = me_pkg::cnt_w(2*P)
) (
  input  logic             clk,
  input  logic             adv,       // row phase advances this cycle
  input  logic [PH_W-1:0]  phase,     // 0 .. 2P-1
  input  logic [PIX_W-1:0] ls_wr,     // LS word from the row below
  input  logic [PIX_W-1:0] rs_wr,     // RS word from the row below
  output logic [PIX_W-1:0] ls_rd,     // LS word for this row
  output logic [PIX_W-1:0] rs_rd      // RS word for this row
);

  localparam int unsigned RS_D  = N - 1;
  localparam int unsigned RS_AW = me_pkg::cnt_w(RS_D);

  logic [PIX_W-1:0] ls_mem [2*P];
  logic [PIX_W-1:0] rs_mem [RS_D];

  logic             rs_slot;
  logic [RS_AW-1:0] rs_addr;
  assign rs_slot = (32'(phase) < RS_D);
  assign rs_addr = RS_AW'(phase);

  always_ff @(posedge clk) begin
    if (adv) begin
      ls_mem[phase] <= ls_wr;
      if (rs_slot) rs_mem[rs_addr] <= rs_wr;
    end
  end

  always_comb begin
    ls_rd = ls_mem[phase];
    rs_rd = rs_slot ? rs_mem[rs_addr] : '0;
  end

endmodule
