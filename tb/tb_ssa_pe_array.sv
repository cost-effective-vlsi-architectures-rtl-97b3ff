// Unit testbench of ssa_pe_array (N = 3): loads a random reference block
// through the shift chain, then drives random words on every row bus and
// random column selects. Each row output must equal
//   sum_c |S_rc(t - (N-1-c)) - R[r][c]|,  S_rc = cmux[c] ? rs_bus[r] : ls_bus[r]
// computed from the recorded inputs.
`timescale 1ns/1ps
module tb_ssa_pe_array;
  localparam int unsigned N = 3, PIX_W = 8, ACC_W = PIX_W + $clog2(N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [PIX_W-1:0] ls_bus [N], rs_bus [N];
  logic [N-1:0] cmux;
  logic ref_load;
  logic [PIX_W-1:0] ref_in;
  logic [ACC_W-1:0] row_psum [N];
  int checks = 0, failures = 0;
  ssa_pe_array #(.N(N), .PIX_W(PIX_W), .ACC_W(ACC_W)) dut (.*);
  logic [PIX_W-1:0] R [N][N];
  int hsel [$][N][N];   // selected word per cycle, row, column
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    ref_load = 0; ref_in = 0; cmux = 0;
    foreach (ls_bus[r]) begin ls_bus[r] = 0; rs_bus[r] = 0; end
    foreach (R[i, j]) R[i][j] = $urandom;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = N*N - 1; n >= 0; n--) begin
      @(negedge clk); ref_load = 1; ref_in = R[n / N][n % N];
    end
    @(negedge clk); ref_load = 0;
    for (int t = 0; t < 400; t++) begin
      automatic int s [N][N];
      foreach (ls_bus[r]) begin ls_bus[r] = $urandom; rs_bus[r] = $urandom; end
      cmux = $urandom;
      foreach (s[r, c]) s[r][c] = cmux[c] ? rs_bus[r] : ls_bus[r];
      hsel.push_back(s);
      #1;
      if (t >= N) begin
        for (int r = 0; r < N; r++) begin
          automatic int e = 0;
          for (int c = 0; c < N; c++) begin
            automatic int d = hsel[t - (N - 1 - c)][r][c] - int'(R[r][c]);
            e += (d < 0) ? -d : d;
          end
          checks++;
          if (row_psum[r] != ACC_W'(e)) begin failures++; $display("FAIL t=%0d r=%0d got %0d exp %0d", t, r, row_psum[r], e); end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
