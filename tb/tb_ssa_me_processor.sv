// Self-checking testbench of ssa_me_processor at N = 4, P = 4.
// Runs: a random search with a planted near-match; a second search started
// back-to-back; a search with two exact matches (first one must win); a
// search with maximal distortion (word widths); a cascaded search in
// MODE_PARTIAL (every per-candidate sum checked) and MODE_LAST. The motion
// vector, the MAD and the latency are checked against an independent model.
`timescale 1ns/1ps
module tb_ssa_me_processor;
  import me_pkg::*;

  localparam int unsigned N     = 4;
  localparam int unsigned P     = 4;
  localparam int unsigned PIX_W = 8;
  localparam int unsigned ERR_W = PIX_W + 2 * $clog2(N) + 2;
  localparam int unsigned PH_W  = cnt_w(2*P);
  localparam int unsigned SKEW  = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 start = 1'b0;
  me_mode_e             mode = MODE_STANDALONE;
  logic [PIX_W-1:0]     ls_in, rs_in;
  logic                 ref_load = 1'b0;
  logic [PIX_W-1:0]     ref_in = '0;
  logic [ERR_W-1:0]     error_in = '0;
  logic [PIX_W-1:0]     ls_out, rs_out;
  logic                 busy, mv_valid, error_valid;
  logic signed [PH_W:0] mv_x, mv_y;
  logic [ERR_W-1:0]     mad_out, error_out;

  ssa_me_processor #(.N(N), .P(P), .PIX_W(PIX_W), .ERR_W(ERR_W)) dut (.*);

  `include "tb/ssa_tb_body.svh"

  int next_slot = -1;
  always @(posedge clk) begin
    if (start && !busy) begin
      fk <= 0; fprev <= -1;
    end else if (fk == int'(TSCH) - 1 && next_slot >= 0) begin
      fk <= 0; fprev <= fcur; fcur <= next_slot; next_slot <= -1;
    end else if (fk >= 0) fk <= fk + 1;
  end
  assign ls_in = ls_word(fcur, fk);
  assign rs_in = rs_word(fcur, fprev, fk);

  // mechanism counters
  int n_boundary = 0, n_b2b = 0, n_partial = 0, n_last = 0;
  always @(posedge clk) if (dut.u_ctrl.cand_valid && (dut.col_rs != '0)) n_boundary++;

  int unsigned t_start, t0;
  int unsigned t_mv [$];
  always @(posedge clk) if (rst_n && mv_valid) t_mv.push_back(cyc);

  // partial-mode stream check
  int pk = 0;
  int unsigned exp_partial [$];
  always @(posedge clk) if (rst_n && error_valid) begin
    check(exp_partial.size() > 0 && error_out == ERR_W'(exp_partial[0]),
          $sformatf("partial MAD #%0d: got %0d", pk, error_out));
    if (exp_partial.size() > 0) void'(exp_partial.pop_front());
    pk++; n_partial++;
  end

  task automatic expect_mv(int slot, int unsigned extra, string tag);
    int bx, by; int unsigned bm;
    best(areas[slot], refs[slot], bx, by, bm);
    check(mv_x == (bx - int'(P)) && mv_y == (by - int'(P)) && mad_out == ERR_W'(bm + extra),
          $sformatf("%s: MV (%0d,%0d) MAD %0d, expected (%0d,%0d) %0d", tag,
                    mv_x, mv_y, mad_out, bx - int'(P), by - int'(P), bm + extra));
  endtask

  task automatic pulse_start();
    start <= 1'b1; @(posedge clk); t_start = cyc; start <= 1'b0;
  endtask

  task automatic wait_mv();
    while (!mv_valid) @(posedge clk);
    @(posedge clk);
  endtask

  initial begin
    fcur = 0;
    for (int s = 0; s < 4; s++) fill_random(s);
    plant(0, 5, 2, 3);
    plant(1, 0, 7, 2);
    // slot 2: two exact copies, the earlier in scan order must win
    plant(2, 6, 1, 0);
    plant(2, 1, 6, 0);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // --- search 0, then search 1 back-to-back ---
    load_ref(0);
    fcur = 0;
    pulse_start();
    repeat (2*P*(N-1) + 10) @(posedge clk);   // now in EXEC
    t0 = t_start;
    next_slot = 1;
    pulse_start();                           // remembered while busy
    wait_mv();
    check(t_mv.size() == 1 && t_mv[0] - t0 == LAT,
          $sformatf("latency %0d, expected %0d", t_mv[0] - t0, LAT));
    $display("search 0 done at %0d", cyc);
    expect_mv(0, 0, "search 0");
    wait (fcur == 1 && fk >= int'(N + SKEW));
    @(posedge clk);
    $display("loading ref 1 at %0d", cyc);
    load_ref(1);
    wait_mv();
    $display("search 1 done at %0d", cyc);
    check(t_mv.size() == 2 && t_mv[1] - t_mv[0] == TSCH,
          $sformatf("back-to-back spacing %0d, expected %0d", t_mv[1] - t_mv[0], TSCH));
    if (t_mv[1] - t_mv[0] == TSCH) n_b2b++;
    expect_mv(1, 0, "search 1 (back-to-back)");
    while (busy) @(posedge clk);

    // --- search 2: tie between two exact matches ---
    load_ref(2);
    fcur = 2;
    pulse_start();
    wait_mv();
    expect_mv(2, 0, "search 2 (tie)");
    check(mv_x == 6 - int'(P) && mv_y == 1 - int'(P) && mad_out == 0, "tie: first match in scan order");
    while (busy) @(posedge clk);

    // --- search 3: largest distortion ---
    for (int y = 0; y < W; y++) for (int x = 0; x < W; x++) areas[3][y][x] = '1;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) refs[3][i][j] = '0;
    load_ref(3);
    fcur = 3;
    pulse_start();
    wait_mv();
    expect_mv(3, 0, "search 3 (maximum MAD)");
    while (busy) @(posedge clk);

    // --- cascade modes on search 0's data ---
    mode     = MODE_PARTIAL;
    error_in = ERR_W'(1000);
    for (int y = 0; y < 2*P; y++)
      for (int x = 0; x < 2*P; x++) exp_partial.push_back(sad(areas[0], refs[0], x, y) + 1000);
    load_ref(0);
    fcur = 0;
    pulse_start();
    wait_mv();
    while (busy) @(posedge clk);
    repeat (3) @(posedge clk);
    check(pk == 4*P*P, $sformatf("partial stream length %0d", pk));

    mode = MODE_LAST;
    pulse_start();
    wait_mv();
    expect_mv(0, 1000, "MODE_LAST");
    check(error_out == mad_out, "MODE_LAST: Error_out carries the minimum");
    n_last++;
    while (busy) @(posedge clk);

    check(n_boundary > 0, "boundary (RS) selection never happened");
    check(n_b2b > 0, "back-to-back search never happened");
    check(n_partial > 0, "partial-MAD output never happened");
    check(n_last > 0, "last-in-chain mode never happened");
    $display("boundary cycles=%0d back_to_back=%0d partial=%0d last=%0d", n_boundary, n_b2b, n_partial, n_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
