// Unit testbench of sa_stream_memory (N = 4, P = 4): both streams must come
// out delayed by exactly 2P - N + 1 = 5 cycles.
`timescale 1ns/1ps
module tb_sa_stream_memory;
  localparam int unsigned N = 4, P = 4, PIX_W = 8, D = 2*P - N + 1;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [PIX_W-1:0] ls_in, rs_in, ls_out, rs_out;
  int checks = 0, failures = 0;
  sa_stream_memory #(.N(N), .P(P), .PIX_W(PIX_W)) dut (.*);
  logic [PIX_W-1:0] lh [$], rh [$];
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      ls_in = $urandom; rs_in = $urandom;
      #1;
      if (t >= D) begin
        checks++;
        if (ls_out != lh[t-D] || rs_out != rh[t-D]) begin failures++; $display("FAIL t=%0d", t); end
      end
      lh.push_back(ls_in); rh.push_back(rs_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
