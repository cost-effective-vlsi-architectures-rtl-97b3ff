// ssa_pe: processing element of the semi-systolic (SSA) array.
//
// Two global search-data buses, LS (non-boundary data) and RS (boundary data),
// run through every PE of a row. The column control "cmux" picks one of them
// (1 = RS). The PE takes |S - R| against its stored reference pixel and adds
// the partial MAD handed over by its left neighbour, which is held one cycle
// in the register "acc". The sum leaves on psum_out, combinationally, so a
// row of N PEs forms a broadcast FIR structure: the last PE of the row
// outputs the row distortion of one candidate per cycle.
//
// The reference register is loaded through a shift chain (ref_in -> ref_out)
// while ref_load is high. The structure (bus select, subtract, abs, adder,
// acc register, ref register) follows the document's PE drawing; the shift
// chain for the reference is this design's choice, since the document only
// says that registers are defined "through two data buses" at initialization.
//
// Timing: psum_out(t) = |sel(t) - ref| + psum_in(t-1). acc is cleared by reset.
module ssa_pe #(
  parameter int unsigned PIX_W = 8,
  parameter int unsigned ACC_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PIX_W-1:0] ls,        // non-boundary search bus
  input  logic [PIX_W-1:0] rs,        // boundary search bus
  input  logic             cmux,      // 1: take RS, 0: take LS
  input  logic             ref_load,  // shift the reference chain
  input  logic [PIX_W-1:0] ref_in,
  output logic [PIX_W-1:0] ref_out,
  input  logic [ACC_W-1:0] psum_in,   // partial MAD from the left neighbour
  output logic [ACC_W-1:0] psum_out   // partial MAD to the right neighbour
);

  logic [PIX_W-1:0] ref_q;
  logic [ACC_W-1:0] acc_q;
  logic [PIX_W-1:0] s_sel;
  logic [PIX_W-1:0] ad;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q <= '0;
      acc_q <= '0;
    end else begin
      acc_q <= psum_in;
      if (ref_load) ref_q <= ref_in;
    end
  end

  always_comb begin
    s_sel    = cmux ? rs : ls;
    ad       = (s_sel >= ref_q) ? (s_sel - ref_q) : (ref_q - s_sel);
    psum_out = acc_q + ACC_W'(ad);
  end

  assign ref_out = ref_q;

endmodule
