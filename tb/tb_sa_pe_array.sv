// Unit testbench of sa_pe_array (N = 3, P = 2): loads a random reference
// block, then drives random words on ls_in / rs_in and random column
// controls. The word held in PE(r,c) at cycle t entered the array
// (N - c) + (N-1-r)(2P+1) cycles earlier (N PEs per row, 2P-N+1 delay
// stages between rows); its control entered 1 + (N-1-r) cycles earlier.
// Each column output must equal sum_r |X(r,c,t-r) - R[r][c]|, and the top
// row's words must leave on ls_out / rs_out.
`timescale 1ns/1ps
module tb_sa_pe_array;
  localparam int unsigned N = 3, P = 2, PIX_W = 8, ACC_W = PIX_W + $clog2(N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [PIX_W-1:0] ls_in, rs_in, ls_out, rs_out;
  logic [N-1:0] cmux;
  logic ref_load;
  logic [PIX_W-1:0] ref_in;
  logic [ACC_W-1:0] col_psum [N];
  int checks = 0, failures = 0;
  sa_pe_array #(.N(N), .P(P), .PIX_W(PIX_W), .ACC_W(ACC_W)) dut (.*);
  logic [PIX_W-1:0] R [N][N];
  int hl [$], hr [$], hc [$];
  function automatic int x_word(int r, int c, int t);
    int dd = (N - c) + (N - 1 - r) * (2*P + 1);
    int sd = 1 + (N - 1 - r);
    int sel = hc[t - sd];
    return sel[c] ? hr[t - dd] : hl[t - dd];
  endfunction
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    ref_load = 0; ref_in = 0; cmux = 0; ls_in = 0; rs_in = 0;
    foreach (R[i, j]) R[i][j] = $urandom;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = N*N - 1; n >= 0; n--) begin
      @(negedge clk); ref_load = 1; ref_in = R[n / N][n % N];
    end
    @(negedge clk); ref_load = 0;
    for (int t = 0; t < 400; t++) begin
      ls_in = $urandom; rs_in = $urandom; cmux = $urandom;
      hl.push_back(ls_in); hr.push_back(rs_in); hc.push_back(int'(cmux));
      #1;
      if (t >= 2 * N * (2*P + 1) + N) begin
        for (int c = 0; c < N; c++) begin
          automatic int e = 0;
          for (int r = 0; r < N; r++) begin
            automatic int d = x_word(r, c, t - r) - int'(R[r][c]);
            e += (d < 0) ? -d : d;
          end
          checks++;
          if (col_psum[c] != ACC_W'(e)) begin failures++; $display("FAIL t=%0d c=%0d got %0d exp %0d", t, c, col_psum[c], e); end
        end
        checks++;
        if (ls_out != PIX_W'(hl[t - N - (N-1)*(2*P+1)]) || rs_out != PIX_W'(hr[t - N - (N-1)*(2*P+1)])) begin
          failures++; $display("FAIL out t=%0d", t);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
