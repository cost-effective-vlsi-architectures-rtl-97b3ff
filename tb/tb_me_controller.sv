// Unit testbench of me_controller (N = 3, P = 2), semi-systolic and
// systolic settings side by side. Checks, against counts worked out from
// the schedule: the first candidate tag in cycle 2P(N-1) + LAT0 after the
// start edge (LAT0 = N-1 or 2N-1), (2P)^2 tags in raster order with
// first/last marks, the row pointer sequence, the stair controls during
// EXEC, busy falling after the last tag, and a back-to-back start giving
// the next first tag (2P)^2 + 2P(N-1) cycles later.
`timescale 1ns/1ps
module tb_me_controller;
  localparam int unsigned N = 3, P = 2;
  localparam int unsigned PH_W = me_pkg::cnt_w(2*P);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic busy [2], in_exec [2], adv [2], cv [2], cf [2], cl [2];
  logic [PH_W-1:0] phase [2], cx [2], cy [2];
  logic [N-1:0] col_rs [2];
  int checks = 0, failures = 0;
  for (genvar s = 0; s < 2; s++) begin : g_dut
    me_controller #(.N(N), .P(P), .SYSTOLIC(s == 1)) dut (
      .clk, .rst_n, .start, .busy(busy[s]), .in_exec(in_exec[s]), .adv(adv[s]), .phase(phase[s]), .col_rs(col_rs[s]),
      .cand_valid(cv[s]), .cand_first(cf[s]), .cand_last(cl[s]), .cand_x(cx[s]), .cand_y(cy[s]));
  end
  task automatic chk(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL %s", m); end endtask
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int t = -1;        // cycles since the start edge
  int ncand [2] = '{0, 0};
  int tfirst [2][$];
  always @(posedge clk) if (t >= 0) t <= t + 1;
  always @(negedge clk) if (rst_n && t >= 0) begin
    for (int s = 0; s < 2; s++) begin
      automatic int lat0 = (s == 1) ? 2*N - 1 : N - 1;
      // row pointer: t mod 2P while the stream runs
      if (adv[s]) chk(phase[s] == PH_W'(t % (2*P)), $sformatf("s%0d phase at t=%0d", s, t));
      if (cv[s]) begin
        automatic int q = ncand[s] % (4*P*P);
        chk(cx[s] == PH_W'(q % (2*P)) && cy[s] == PH_W'(q / (2*P)), $sformatf("s%0d tag order", s));
        chk(cf[s] == (q == 0) && cl[s] == (q == 4*P*P - 1), $sformatf("s%0d first/last", s));
        if (q == 0) tfirst[s].push_back(t);
        ncand[s]++;
      end
      if (in_exec[s]) begin
        // stair: SSA column c selects RS in the first c phases; SA in the
        // last c phases of its own (pointer - N) phase, one cycle early
        automatic int ph = t % (2*P);
        automatic int m  = (ph + 1 - int'(N) + 4*P) % (2*P);
        for (int c = 0; c < N; c++)
          chk(col_rs[s][c] == ((s == 0) ? (ph < c) : (c > 0 && m >= 2*P - c)),
              $sformatf("s%0d stair c=%0d t=%0d", s, c, t));
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(posedge clk); t <= 0; @(negedge clk); start = 0;
    repeat (2*P*(N-1) + 3) @(negedge clk);
    start = 1; @(negedge clk); start = 0;        // back-to-back request
    wait (!busy[0] && !busy[1]);
    repeat (3) @(negedge clk);
    for (int s = 0; s < 2; s++) begin
      automatic int lat0 = (s == 1) ? 2*N - 1 : N - 1;
      chk(ncand[s] == 2 * 4*P*P, $sformatf("s%0d candidate count %0d", s, ncand[s]));
      chk(tfirst[s].size() == 2 && tfirst[s][0] == 2*P*(N-1) + lat0,
          $sformatf("s%0d first tag at %0d", s, tfirst[s][0]));
      chk(tfirst[s].size() == 2 && tfirst[s][1] - tfirst[s][0] == 4*P*P + 2*P*(N-1),
          $sformatf("s%0d back-to-back spacing", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
