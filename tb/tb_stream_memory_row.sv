// Unit testbench of stream_memory_row (N = 4, P = 3): the pointer cycles
// through the 2P phases with a few stalls; every LS word and every RS word
// (phases 0 .. N-2) must come back exactly one row period (2P advances)
// after it was written.
`timescale 1ns/1ps
module tb_stream_memory_row;
  localparam int unsigned N = 4, P = 3, PIX_W = 8;
  localparam int unsigned PH_W = me_pkg::cnt_w(2*P);
  logic clk = 0;
  always #5 clk = ~clk;
  logic adv;
  logic [PH_W-1:0] phase;
  logic [PIX_W-1:0] ls_wr, rs_wr, ls_rd, rs_rd;
  int checks = 0, failures = 0;
  stream_memory_row #(.N(N), .P(P), .PIX_W(PIX_W)) dut (.*);
  logic [PIX_W-1:0] ls_hist [$], rs_hist [$];
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int n = 0;
    adv = 0; phase = 0; ls_wr = 0; rs_wr = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      adv = ($urandom_range(0, 7) != 0);
      ls_wr = $urandom; rs_wr = $urandom;
      #1;
      if (adv) begin
        if (n >= 2*P) begin
          checks++;
          if (ls_rd != ls_hist[n - 2*P]) begin failures++; $display("FAIL ls n=%0d", n); end
          if (phase < N - 1) begin
            checks++;
            if (rs_rd != rs_hist[n - 2*P]) begin failures++; $display("FAIL rs n=%0d", n); end
          end
        end
        ls_hist.push_back(ls_wr); rs_hist.push_back(rs_wr);
        n++;
      end
      @(posedge clk); #1;
      if (adv) phase = (phase == 2*P - 1) ? 0 : phase + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
