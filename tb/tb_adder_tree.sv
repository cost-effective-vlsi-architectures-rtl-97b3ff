// Unit testbench of adder_tree (N = 5, so the tree is padded to 8 leaves):
// sum_q(t) = sum of row_psum(t-2) + (add_ext(t-1) ? ext_in(t-1) : 0), with
// random inputs including all-maximum rows.
`timescale 1ns/1ps
module tb_adder_tree;
  localparam int unsigned N = 5, ACC_W = 11, ERR_W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [ACC_W-1:0] row_psum [N];
  logic add_ext;
  logic [ERR_W-1:0] ext_in, sum_q;
  int checks = 0, failures = 0;
  adder_tree #(.N(N), .ACC_W(ACC_W), .ERR_W(ERR_W)) dut (.*);
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int s1 = 0, s2 = 0, e1 = 0;
    add_ext = 0; ext_in = 0; foreach (row_psum[i]) row_psum[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      automatic int s0 = 0;
      @(negedge clk);
      foreach (row_psum[k]) begin
        row_psum[k] = (i % 50 == 7) ? '1 : ACC_W'($urandom);
        s0 += row_psum[k];
      end
      add_ext = $urandom; ext_in = $urandom_range(0, 10000);
      @(posedge clk); #1;
      // after this edge: stage 1 holds s0, stage 2 holds s1 + ext of this cycle
      if (i >= 1) begin
        checks++;
        if (sum_q != ERR_W'(s1 + (add_ext ? ext_in : 0))) begin
          failures++; $display("FAIL i=%0d got %0d exp %0d", i, sum_q, s1 + (add_ext ? ext_in : 0));
        end
      end
      s1 = s0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
