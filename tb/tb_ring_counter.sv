// Unit testbench of ring_counter (N = 5, P = 4), both pulse placements:
// after restart, in phase p column c must select RS iff p < c (AT_END = 0)
// or p >= 2P - c (AT_END = 1); period_last must mark phase 2P-1; the count
// holds while run is low.
`timescale 1ns/1ps
module tb_ring_counter;
  localparam int unsigned N = 5, P = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic restart, run;
  logic [N-1:0] col0, col1;
  logic last0, last1;
  int checks = 0, failures = 0;
  ring_counter #(.N(N), .P(P), .AT_END(1'b0)) dut0 (.clk, .rst_n, .restart, .run, .col_rs(col0), .period_last(last0));
  ring_counter #(.N(N), .P(P), .AT_END(1'b1)) dut1 (.clk, .rst_n, .restart, .run, .col_rs(col1), .period_last(last1));
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int p = 0;
    restart = 0; run = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    for (int i = 0; i < 300; i++) begin
      run = ($urandom_range(0, 5) != 0);
      #1;
      for (int c = 0; c < N; c++) begin
        checks++;
        if (col0[c] != (p < c) || col1[c] != (c > 0 && p >= 2*P - c)) begin
          failures++; $display("FAIL p=%0d c=%0d %b %b", p, c, col0, col1);
        end
      end
      checks++;
      if (last0 != (p == 2*P - 1) || last1 != (p == 2*P - 1)) begin failures++; $display("FAIL last p=%0d", p); end
      @(negedge clk);
      if (run) p = (p == 2*P - 1) ? 0 : p + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
