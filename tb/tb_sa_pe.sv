// Unit testbench of sa_pe: checks the one-cycle LS/RS/control registers,
// psum_out(t) = |(sel ? RS : LS) - ref| + psum_in(t-1) with the registered
// words, and the reference shift chain.
`timescale 1ns/1ps
module tb_sa_pe;
  localparam int unsigned PIX_W = 8, ACC_W = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [PIX_W-1:0] ls_in, rs_in, ls_out, rs_out, ref_in, ref_out;
  logic cmux_in, cmux_out, ref_load;
  logic [ACC_W-1:0] psum_in, psum_out;
  int checks = 0, failures = 0;
  sa_pe #(.PIX_W(PIX_W), .ACC_W(ACC_W)) dut (.*);
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int pls, prs, psel, pps, r, exp;
    ls_in = 0; rs_in = 0; cmux_in = 0; ref_load = 0; ref_in = 0; psum_in = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); ref_load = 1; ref_in = 17; @(negedge clk); ref_load = 0;
    checks++; if (ref_out != 17) begin failures++; $display("FAIL ref_out"); end
    r = 17; pls = 0; prs = 0; psel = 0; pps = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ls_in = $urandom; rs_in = $urandom; cmux_in = $urandom; psum_in = $urandom_range(0, 3000);
      #1;
      exp = (psel ? prs : pls) - r; if (exp < 0) exp = -exp; exp += pps;
      checks++;
      if (psum_out != ACC_W'(exp) || ls_out != PIX_W'(pls) || rs_out != PIX_W'(prs) || cmux_out != psel[0]) begin
        failures++; $display("FAIL i=%0d psum %0d exp %0d", i, psum_out, exp);
      end
      @(posedge clk); #1;
      pls = ls_in; prs = rs_in; psel = cmux_in; pps = psum_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
