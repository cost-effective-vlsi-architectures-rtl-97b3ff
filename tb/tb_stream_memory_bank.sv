// Unit testbench of stream_memory_bank (N = 4, P = 3): with the pointer
// advancing every cycle, the bus of PE row r must equal the input stream
// delayed by (N-1-r) row periods, for LS always and for RS in phases
// 0 .. N-2; ls_out / rs_out are the top row's buses.
`timescale 1ns/1ps
module tb_stream_memory_bank;
  localparam int unsigned N = 4, P = 3, PIX_W = 8;
  localparam int unsigned PH_W = me_pkg::cnt_w(2*P);
  logic clk = 0;
  always #5 clk = ~clk;
  logic adv = 1;
  logic [PH_W-1:0] phase = 0;
  logic [PIX_W-1:0] ls_in, rs_in, ls_out, rs_out;
  logic [PIX_W-1:0] ls_bus [N], rs_bus [N];
  int checks = 0, failures = 0;
  stream_memory_bank #(.N(N), .P(P), .PIX_W(PIX_W)) dut (.*);
  logic [PIX_W-1:0] lh [$], rh [$];
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      ls_in = $urandom; rs_in = $urandom;
      #1;
      lh.push_back(ls_in); rh.push_back(rs_in);
      for (int r = 0; r < N; r++) begin
        automatic int d = (N - 1 - r) * 2 * P;
        if (t >= d) begin
          checks++;
          if (ls_bus[r] != lh[t-d]) begin failures++; $display("FAIL ls row %0d t %0d got %0d exp %0d in %0d sz %0d d %0d", r, t, ls_bus[r], lh[t-d], ls_in, lh.size(), d); end
          if (phase < N - 1) begin
            checks++;
            if (rs_bus[r] != rh[t-d]) begin failures++; $display("FAIL rs row %0d t %0d", r, t); end
          end
        end
      end
      checks++;
      if (ls_out != ls_bus[0] || rs_out != rs_bus[0]) begin failures++; $display("FAIL out"); end
      @(posedge clk); #1;
      phase = (phase == 2*P - 1) ? 0 : phase + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
