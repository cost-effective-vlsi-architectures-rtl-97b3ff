// sa_pe: processing element of the systolic (SA) array.
//
// Search data travel horizontally, right to left, through two registers:
// LS(D) for the non-boundary stream and RS(D) for the boundary stream.
// Partial MADs and the column control travel vertically, bottom to top: the
// control bit is registered in "sel" (and passed on as cmux_out), the
// partial MAD from the PE below is registered in "acc". The PE adds
// |selected search word - ref| to acc and sends the sum up on psum_out.
//   ls_q(t) = ls_in(t-1), rs_q(t) = rs_in(t-1), sel_q(t) = cmux_in(t-1)
//   psum_out(t) = |(sel_q ? rs_q : ls_q) - ref| + psum_in(t-1)
// Register set (LS, RS, sel, ref, acc) and data directions follow the
// document's SA PE drawing. The reference register is loaded through a
// shift chain (ref_in -> ref_out) while ref_load is high, which is this
// design's choice.
module sa_pe #(
  parameter int unsigned PIX_W = 8,
  parameter int unsigned ACC_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PIX_W-1:0] ls_in,
  input  logic [PIX_W-1:0] rs_in,
  output logic [PIX_W-1:0] ls_out,
  output logic [PIX_W-1:0] rs_out,
  input  logic             cmux_in,
  output logic             cmux_out,
  input  logic             ref_load,
  input  logic [PIX_W-1:0] ref_in,
  output logic [PIX_W-1:0] ref_out,
  input  logic [ACC_W-1:0] psum_in,
  output logic [ACC_W-1:0] psum_out
);

  logic [PIX_W-1:0] ls_q, rs_q, ref_q, s_sel, ad;
  logic             sel_q;
  logic [ACC_W-1:0] acc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ls_q  <= '0;
      rs_q  <= '0;
      sel_q <= 1'b0;
      acc_q <= '0;
      ref_q <= '0;
    end else begin
      ls_q  <= ls_in;
      rs_q  <= rs_in;
      sel_q <= cmux_in;
      acc_q <= psum_in;
      if (ref_load) ref_q <= ref_in;
    end
  end

  always_comb begin
    s_sel    = sel_q ? rs_q : ls_q;
    ad       = (s_sel >= ref_q) ? (s_sel - ref_q) : (ref_q - s_sel);
    psum_out = acc_q + ACC_W'(ad);
  end

  assign ls_out   = ls_q;
  assign rs_out   = rs_q;
  assign cmux_out = sel_q;
  assign ref_out  = ref_q;

endmodule
