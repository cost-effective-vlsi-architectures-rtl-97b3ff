// adder_tree: parallel adder tree with the cascade input of the scalable
// processor.
//
// Stage 1 adds the N row distortions of the PE array in a balanced binary
// tree (leaves padded with zeros up to a power of two) and registers the
// candidate's MAD. Stage 2 adds the partial MAD of another processor
// (Error_in) when add_ext is high, or zero otherwise, and registers the
// result, which is both the input of the compare-select unit and the partial
// MAD ("P_error") that a cascaded processor sends out. Latency: 2 cycles from
// row_psum to sum_q. The extra Error_in adder and its zero multiplexer follow
// the document's scalable-processor drawing; the split into two register
// stages is this design's choice (the document states a two-cycle delay for
// the adder tree and compare-select together).
module adder_tree #(
  parameter int unsigned N     = 16,
  parameter int unsigned ACC_W = 12,
  parameter int unsigned ERR_W = 18
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ACC_W-1:0] row_psum [N],
  input  logic             add_ext,   // mode: add Error_in
  input  logic [ERR_W-1:0] ext_in,    // Error_in
  output logic [ERR_W-1:0] sum_q      // block MAD (two cycles later) + Error_in
);

  localparam int unsigned LEAVES = 1 << $clog2(N);

  // Heap-ordered tree: node k = node 2k + node 2k+1, leaves at LEAVES .. 2*LEAVES-1.
  logic [ERR_W-1:0] node [1:2*LEAVES-1];
  logic [ERR_W-1:0] tree_q;

  for (genvar k = 0; k < LEAVES; k++) begin : g_leaf
    if (k < N) begin : g_used
      assign node[LEAVES+k] = ERR_W'(row_psum[k]);
    end else begin : g_pad
      assign node[LEAVES+k] = '0;
    end
  end

  for (genvar k = 1; k < LEAVES; k++) begin : g_node
    assign node[k] = node[2*k] + node[2*k+1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tree_q <= '0;
      sum_q  <= '0;
    end else begin
      tree_q <= node[1];
      sum_q  <= tree_q + (add_ext ? ext_in : '0);
    end
  end

endmodule
