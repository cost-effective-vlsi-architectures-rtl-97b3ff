// End-to-end testbench of wide_range_me (N = 4, P = 6): a search range of
// [-2P, 2P-1] covered by four processors.
//
// Four feeder models stream the four overlapping sub-areas of one
// (4P+N-1)-square search area. The result is compared with an independent
// full search over all (4P)^2 candidates (first minimum inside each
// quadrant, quadrants compared in chain order with the lower one kept on a
// tie). Two searches run back to back with a new reference loaded in
// between; checks: MV and MAD of both, the latency from start to mv_valid
// (mv_valid high in the cycle after edge 2P(N-1) + (2P)^2 + N + 5 when the
// start edge is edge 0, 4 cycles after the processors' own results) and
// the spacing of the two results
// ((2P)^2 + 2P(N-1) cycles). The planted best match of the first search
// lies in quadrant 3 and that of the second in quadrant 0, so both the
// "take local" and the "keep lower result" paths of the chain are used;
// each is counted and must occur.
`timescale 1ns/1ps
module tb_wide_range_me;
  import me_pkg::*;
  localparam int unsigned N = 4, P = 6, PIX_W = 8;
  localparam int unsigned ERR_W = PIX_W + 2 * $clog2(N) + 2;
  localparam int unsigned PH_W = cnt_w(2*P);
  localparam int unsigned W  = 2*P + N - 1;
  localparam int unsigned WW = 4*P + N - 1;
  localparam int unsigned TSCH = 2*P*(N-1) + 4*P*P;
  localparam int unsigned LAT  = 2*P*(N-1) + 4*P*P + N + 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, ref_load = 1'b0;
  logic [PIX_W-1:0] ref_in = '0;
  logic [PIX_W-1:0] ls_in [4], rs_in [4];
  logic busy, mv_valid;
  logic signed [PH_W+1:0] mv_x, mv_y;
  logic [ERR_W-1:0] mad_out;

  wide_range_me #(.N(N), .P(P), .PIX_W(PIX_W)) dut (.*);

  logic go = 1'b0;
  logic [PIX_W-1:0] sub [4][W][W];
  int fk [4];
  for (genvar k = 0; k < 4; k++) begin : g_feed
    tb_search_feeder #(.N(N), .P(P), .PIX_W(PIX_W)) u_feed (
      .clk(clk), .go(go), .area(sub[k]), .ls(ls_in[k]), .rs(rs_in[k]), .k(fk[k]));
  end

  int checks = 0, failures = 0;
  int n_take = 0, n_keep = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // which path each merge stage used (stages 1..3 can keep the lower result)
  for (genvar k = 1; k < 4; k++) begin : g_cnt
    always @(posedge clk) if (rst_n && dut.c_valid[k]) begin
      if (dut.g_proc[k].u_merge.take) n_take++; else n_keep++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (4 * TSCH + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [PIX_W-1:0] area_t [WW][WW];
  typedef logic [PIX_W-1:0] ref_t [N][N];

  function automatic void make(ref area_t a, ref ref_t r, input int px, input int py);
    for (int y = 0; y < int'(WW); y++) for (int x = 0; x < int'(WW); x++) a[y][x] = PIX_W'($urandom);
    for (int i = 0; i < int'(N); i++) for (int j = 0; j < int'(N); j++) r[i][j] = PIX_W'($urandom);
    for (int i = 0; i < int'(N); i++) for (int j = 0; j < int'(N); j++) begin
      int v = int'(r[i][j]) + int'($urandom_range(0, 3));
      a[py+i][px+j] = (v > 255) ? 8'hFF : PIX_W'(v);
    end
  endfunction

  // reference model: per quadrant the first minimum in raster order, then
  // the quadrants in chain order 0..3, a later one only if strictly smaller
  task automatic model(input area_t a, input ref_t r, output int bx, output int by, output int unsigned bm);
    bm = 32'hFFFF_FFFF; bx = 0; by = 0;
    for (int k = 0; k < 4; k++) begin
      int unsigned qm = 32'hFFFF_FFFF; int qx = 0, qy = 0;
      for (int y = 0; y < 2*int'(P); y++) for (int x = 0; x < 2*int'(P); x++) begin
        int gy = 2*int'(P)*(k/2) + y, gx = 2*int'(P)*(k%2) + x;
        int unsigned s = 0;
        for (int i = 0; i < int'(N); i++) for (int j = 0; j < int'(N); j++) begin
          int d = int'(a[gy+i][gx+j]) - int'(r[i][j]);
          s += (d < 0) ? -d : d;
        end
        if (s < qm) begin qm = s; qx = gx; qy = gy; end
      end
      if (k == 0 || qm < bm) begin bm = qm; bx = qx - 2*int'(P); by = qy - 2*int'(P); end
    end
  endtask

  task automatic set_sub(input area_t a);
    for (int k = 0; k < 4; k++)
      for (int y = 0; y < int'(W); y++) for (int x = 0; x < int'(W); x++)
        sub[k][y][x] = a[2*P*(k/2) + y][2*P*(k%2) + x];
  endtask

  task automatic load_ref(input ref_t r);
    for (int n = int'(N*N) - 1; n >= 0; n--) begin
      ref_load <= 1'b1;
      ref_in   <= r[n / int'(N)][n % int'(N)];
      @(posedge clk);
    end
    ref_load <= 1'b0;
  endtask

  task automatic expect_mv(input area_t a, input ref_t r, input string tag);
    int bx, by; int unsigned bm;
    model(a, r, bx, by, bm);
    check(int'(mv_x) == bx && int'(mv_y) == by && mad_out == ERR_W'(bm),
          $sformatf("%s: MV (%0d,%0d) MAD %0d, expected (%0d,%0d) %0d", tag, mv_x, mv_y, mad_out, bx, by, bm));
  endtask

  area_t a, b;
  ref_t ra, rb;
  int unsigned t0, t1, t2;

  initial begin
    make(a, ra, 3*P + 1, 2*P + 3);     // quadrant 3 (x >= 0, y >= 0)
    make(b, rb, 2, 1);                 // quadrant 0 (x < 0, y < 0)
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    load_ref(ra);
    set_sub(a);
    start <= 1'b1; go <= 1'b1;
    @(posedge clk); t0 = cyc;
    start <= 1'b0; go <= 1'b0;
    repeat (2*P*(N-1) + 5) @(posedge clk);
    start <= 1'b1;                      // second search requested while busy
    @(posedge clk);
    start <= 1'b0;
    wait (fk[0] == int'(TSCH) - 1);
    set_sub(b);
    go <= 1'b1;
    @(posedge clk);
    go <= 1'b0;
    do @(posedge clk); while (!mv_valid);
    t1 = cyc;
    check(t1 - t0 == LAT, $sformatf("latency %0d, expected %0d", t1 - t0, LAT));
    expect_mv(a, ra, "first search");
    wait (fk[0] >= 2*int'(N));
    load_ref(rb);
    do @(posedge clk); while (!mv_valid);
    t2 = cyc;
    check(t2 - t1 == TSCH, $sformatf("spacing %0d, expected %0d", t2 - t1, TSCH));
    expect_mv(b, rb, "second search");
    while (busy) @(posedge clk);
    check(n_take > 0, "a merge stage took its local result");
    check(n_keep > 0, "a merge stage kept the result from below");
    $display("merge stages: local taken %0d, lower kept %0d", n_take, n_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
