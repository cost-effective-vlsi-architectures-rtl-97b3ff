// Unit testbench of ssa_pe: random bus words, selects and partial sums;
// psum_out(t) = |selected - ref| + psum_in(t-1) is checked every cycle,
// and the reference shift chain is checked.
`timescale 1ns/1ps
module tb_ssa_pe;
  localparam int unsigned PIX_W = 8, ACC_W = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [PIX_W-1:0] ls, rs, ref_in, ref_out;
  logic cmux, ref_load;
  logic [ACC_W-1:0] psum_in, psum_out;
  int checks = 0, failures = 0;
  ssa_pe #(.PIX_W(PIX_W), .ACC_W(ACC_W)) dut (.*);
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int prev_psum, r, exp;
    ls = 0; rs = 0; cmux = 0; ref_load = 0; ref_in = 0; psum_in = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // load reference 200
    @(negedge clk); ref_load = 1; ref_in = 200; @(negedge clk); ref_load = 0; ref_in = 0;
    checks++; if (ref_out != 200) begin failures++; $display("FAIL ref_out %0d", ref_out); end
    r = 200; prev_psum = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ls = $urandom; rs = $urandom; cmux = $urandom; psum_in = $urandom_range(0, 3000);
      if (i % 100 == 50) begin ref_load = 1; ref_in = $urandom; end else ref_load = 0;
      #1;
      exp = (cmux ? int'(rs) : int'(ls)) - r; if (exp < 0) exp = -exp;
      exp = exp + prev_psum;
      checks++;
      if (psum_out != ACC_W'(exp)) begin failures++; $display("FAIL i=%0d got %0d exp %0d", i, psum_out, exp); end
      @(posedge clk); #1;
      prev_psum = psum_in;
      if (ref_load) r = ref_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
