// Shared body of the fsbma_me_top testbenches. The including module defines
// localparams N, P, PIX_W, ERR_W, PH_W and DO_CASCADE (run test 2) and
// instantiates chip 0, the top,
// in generate block g_chip[0].u_top, and chip 1, the partner of the
// cascade test (only with DO_CASCADE), as a bare semi-systolic and
// systolic processor; all are
// wired to the arrays below (index [chip][engine], engine 0 =
// semi-systolic, 1 = systolic). Chip 1's extended-range signals exist only
// to keep the arrays uniform and stay unused.
//
// Checks, for both engines:
//   1. a standalone search followed by a back-to-back search: MV, MAD,
//      latency and spacing against an independent model;
//   2. a two-chip cascade for a 2N-row x N-column reference block: chip 0 in
//      MODE_PARTIAL feeds its per-candidate MADs to chip 1 in MODE_LAST,
//      which must report the MV of the whole block.
//   3. an extended-range search [-2P, 2P-1] on chip 0's four-processor
//      unit, with the best match planted outside [-P, P-1]: MV, MAD and
//      latency against an independent model.
// Each mechanism (boundary bus switch, back-to-back start, partial-MAD
// output, last-in-chain result, extended-range result) is counted and must
// occur.

import me_pkg::*;

localparam int unsigned W    = 2*P + N - 1;
localparam int unsigned WT   = 2*P + 2*N - 1;                  // tall area rows
localparam int unsigned TSCH = 2*P*(N-1) + 4*P*P;

logic clk = 1'b0;
logic rst_n = 1'b0;
always #5 clk = ~clk;

logic                 start_s  [2][2];
me_mode_e             mode_s   [2][2];
logic [PIX_W-1:0]     ls_s     [2][2];
logic [PIX_W-1:0]     rs_s     [2][2];
logic                 rld_s    [2][2];
logic [PIX_W-1:0]     rin_s    [2][2];
logic [ERR_W-1:0]     ein_s    [2][2];
logic [PIX_W-1:0]     lso_s    [2][2];
logic [PIX_W-1:0]     rso_s    [2][2];
logic                 busy_s   [2][2];
logic                 mvv_s    [2][2];
logic signed [PH_W:0] mvx_s    [2][2];
logic signed [PH_W:0] mvy_s    [2][2];
logic [ERR_W-1:0]     mad_s    [2][2];
logic                 ev_s     [2][2];
logic [ERR_W-1:0]     eo_s     [2][2];

// feeders: one per chip and engine
logic             go_s   [2][2];
logic [PIX_W-1:0] farea  [2][2][W][W];
int               fk_s   [2][2];

for (genvar c = 0; c < 2; c++) begin : g_feed
  for (genvar e = 0; e < 2; e++) begin : g_eng
    tb_search_feeder #(.N(N), .P(P), .PIX_W(PIX_W)) u_feed (
      .clk(clk), .go(go_s[c][e]), .area(farea[c][e]), .ls(ls_s[c][e]), .rs(rs_s[c][e]), .k(fk_s[c][e]));
  end
end

// extended-range unit (wr_*): chip 0 is tested, chip 1's is idle
localparam int unsigned WW = 4*P + N - 1;
logic                   wr_start [2];
logic [PIX_W-1:0]       wr_ls    [2][4];
logic [PIX_W-1:0]       wr_rs    [2][4];
logic                   wr_rld   [2];
logic [PIX_W-1:0]       wr_rin   [2];
logic                   wr_busy  [2];
logic                   wr_mvv   [2];
logic signed [PH_W+1:0] wr_mvx   [2];
logic signed [PH_W+1:0] wr_mvy   [2];
logic [ERR_W-1:0]       wr_mad   [2];
logic                   wr_go = 1'b0;
logic [PIX_W-1:0]       wr_sub [4][W][W];
int                     wr_fk  [4];

for (genvar k = 0; k < 4; k++) begin : g_wfeed
  tb_search_feeder #(.N(N), .P(P), .PIX_W(PIX_W)) u_feed (
    .clk(clk), .go(wr_go), .area(wr_sub[k]), .ls(wr_ls[0][k]), .rs(wr_rs[0][k]), .k(wr_fk[k]));
  assign wr_ls[1][k] = '0;
  assign wr_rs[1][k] = '0;
end

int checks = 0;
int failures = 0;
int unsigned cyc = 0;
always @(posedge clk) cyc <= cyc + 1;

int n_boundary [2] = '{0, 0};
int n_b2b      [2] = '{0, 0};
int n_partial  [2] = '{0, 0};
int n_last     [2] = '{0, 0};
int n_wide         = 0;

always @(posedge clk) if (rst_n) begin
  if (g_chip[0].u_top.u_ssa.c_valid && g_chip[0].u_top.u_ssa.col_rs != '0) n_boundary[0]++;
  if (g_chip[0].u_top.u_sa.c_valid  && g_chip[0].u_top.u_sa.col_rs  != '0) n_boundary[1]++;
  for (int e = 0; e < 2; e++) if (ev_s[0][e]) n_partial[e]++;
end

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin failures++; $display("FAIL: %s", what); end
endtask

typedef logic [PIX_W-1:0] tall_t [WT][W];
typedef logic [PIX_W-1:0] tref_t [2*N][N];

// full-search model over an H-row reference block (H = N or 2N)
task automatic model(input tall_t a, input tref_t r, input int h,
                     output int bx, output int by, output int unsigned bm);
  bm = 32'hFFFF_FFFF; bx = 0; by = 0;
  for (int y = 0; y < 2*P; y++)
    for (int x = 0; x < 2*P; x++) begin
      int unsigned s = 0;
      for (int i = 0; i < h; i++)
        for (int j = 0; j < int'(N); j++)
          s += (a[y+i][x+j] > r[i][j]) ? int'(a[y+i][x+j] - r[i][j]) : int'(r[i][j] - a[y+i][x+j]);
      if (s < bm) begin bm = s; bx = x; by = y; end
    end
endtask

function automatic void rand_area(ref tall_t a, ref tref_t r, input int px, input int py, input int h);
  for (int y = 0; y < int'(WT); y++) for (int x = 0; x < int'(W); x++) a[y][x] = PIX_W'($urandom);
  for (int i = 0; i < 2*int'(N); i++) for (int j = 0; j < int'(N); j++) r[i][j] = PIX_W'($urandom);
  for (int i = 0; i < h; i++) for (int j = 0; j < int'(N); j++) begin
    int v = int'(r[i][j]) + int'($urandom_range(0, 4));
    a[py+i][px+j] = (v > 255) ? 8'hFF : PIX_W'(v);
  end
endfunction

// window of the tall area starting at row r0 -> feeder input of (chip, engine)
task automatic set_area(input int c, input int e, input tall_t a, input int r0);
  for (int y = 0; y < int'(W); y++) for (int x = 0; x < int'(W); x++) farea[c][e][y][x] = a[r0+y][x];
endtask

task automatic load_ref(input int c, input int e, input tref_t r, input int r0);
  for (int n = int'(N*N) - 1; n >= 0; n--) begin
    rld_s[c][e] <= 1'b1;
    rin_s[c][e] <= r[r0 + n / int'(N)][n % int'(N)];
    @(posedge clk);
  end
  rld_s[c][e] <= 1'b0;
endtask

function automatic int unsigned lat(input int e);
  return 2*P*(N-1) + 4*P*P + N + 2 + ((e == 1) ? N : 0);
endfunction

// wait for the next result of (chip, engine); returns the edge count
task automatic wait_mv(input int c, input int e, output int unsigned t);
  do @(posedge clk); while (!mvv_s[c][e]);
  t = cyc;
endtask

task automatic expect_mv(input int c, input int e, input tall_t a, input tref_t r, input int h,
                         input int unsigned extra, input string tag);
  int bx, by; int unsigned bm;
  model(a, r, h, bx, by, bm);
  check(mvx_s[c][e] == bx - int'(P) && mvy_s[c][e] == by - int'(P) && mad_s[c][e] == ERR_W'(bm + extra),
        $sformatf("%s engine %0d: MV (%0d,%0d) MAD %0d, expected (%0d,%0d) %0d", tag, e,
                  mvx_s[c][e], mvy_s[c][e], mad_s[c][e], bx - int'(P), by - int'(P), bm + extra));
endtask

// Test 1 on chip 0, engine e: search a, then b back-to-back
task automatic standalone_pair(input int e);
  tall_t a, b; tref_t ra, rb;
  int unsigned t0, t1, t2;
  rand_area(a, ra, 3, 5, N);
  rand_area(b, rb, 2*P - 1, 0, N);
  mode_s[0][e] = MODE_STANDALONE;
  load_ref(0, e, ra, 0);
  set_area(0, e, a, 0);
  start_s[0][e] <= 1'b1; go_s[0][e] <= 1'b1;
  @(posedge clk); t0 = cyc;
  start_s[0][e] <= 1'b0; go_s[0][e] <= 1'b0;
  repeat (2*P*(N-1) + 5) @(posedge clk);
  start_s[0][e] <= 1'b1;                       // next search requested while busy
  @(posedge clk);
  start_s[0][e] <= 1'b0;
  set_area(0, e, b, 0);
  wait (fk_s[0][e] == int'(TSCH) - 1);
  go_s[0][e] <= 1'b1;
  @(posedge clk);
  go_s[0][e] <= 1'b0;
  wait_mv(0, e, t1);
  check(t1 - t0 == lat(e), $sformatf("engine %0d latency %0d, expected %0d", e, t1 - t0, lat(e)));
  expect_mv(0, e, a, ra, N, 0, "standalone");
  wait (fk_s[0][e] >= 2*int'(N));
  load_ref(0, e, rb, 0);
  wait_mv(0, e, t2);
  check(t2 - t1 == TSCH, $sformatf("engine %0d back-to-back spacing %0d, expected %0d", e, t2 - t1, TSCH));
  if (t2 - t1 == TSCH) n_b2b[e]++;
  expect_mv(0, e, b, rb, N, 0, "back-to-back");
  while (busy_s[0][e]) @(posedge clk);
endtask

// Test 2: chips 0 and 1, engine e, 2N-row reference block
task automatic cascade(input int e);
  tall_t a; tref_t r;
  int unsigned t;
  rand_area(a, r, 2*P - 3, 2*P - 2, 2*N);
  mode_s[0][e] = MODE_PARTIAL;
  mode_s[1][e] = MODE_LAST;
  fork
    load_ref(0, e, r, 0);
    load_ref(1, e, r, N);
  join
  set_area(0, e, a, 0);
  set_area(1, e, a, N);
  start_s[0][e] <= 1'b1; go_s[0][e] <= 1'b1;
  @(posedge clk);
  start_s[0][e] <= 1'b0; go_s[0][e] <= 1'b0;
  start_s[1][e] <= 1'b1; go_s[1][e] <= 1'b1;   // one cycle behind chip 0
  @(posedge clk);
  start_s[1][e] <= 1'b0; go_s[1][e] <= 1'b0;
  wait_mv(1, e, t);
  expect_mv(1, e, a, r, 2*N, 0, "cascade");
  check(eo_s[1][e] == mad_s[1][e], "cascade: Error_out of the last chip is the minimum MAD");
  n_last[e]++;
  while (busy_s[0][e] || busy_s[1][e]) @(posedge clk);
  mode_s[0][e] = MODE_STANDALONE;
  mode_s[1][e] = MODE_STANDALONE;
endtask

// Test 3: extended search range [-2P, 2P-1] on chip 0's four-processor
// unit. Reference model: first minimum inside each quadrant in raster
// order; quadrants compared in chain order 0..3, a later one only if
// strictly smaller.
typedef logic [PIX_W-1:0] wide_t [WW][WW];
typedef logic [PIX_W-1:0] nref_t [N][N];
task automatic wide_search();
  wide_t a; nref_t r;
  int unsigned t0, t1, bm;
  int bx, by;
  // loop bounds held in variables so that the simulator keeps the loops
  int nn = int'(N), pp = int'(P), ww = int'(WW), w1 = int'(W);
  for (int y = 0; y < ww; y++) for (int x = 0; x < ww; x++) a[y][x] = PIX_W'($urandom);
  for (int i = 0; i < nn; i++) for (int j = 0; j < nn; j++) r[i][j] = PIX_W'($urandom);
  for (int i = 0; i < nn; i++) for (int j = 0; j < nn; j++) begin     // plant in quadrant 1
    int v = int'(r[i][j]) + int'($urandom_range(0, 3));
    a[1 + i][4*P - 2 + j] = (v > 255) ? 8'hFF : PIX_W'(v);
  end
  bm = 32'hFFFF_FFFF; bx = 0; by = 0;
  for (int k = 0; k < 4; k++) begin
    int unsigned qm = 32'hFFFF_FFFF; int qx = 0, qy = 0;
    for (int y = 0; y < 2*pp; y++) for (int x = 0; x < 2*pp; x++) begin
      int gy = 2*int'(P)*(k/2) + y, gx = 2*int'(P)*(k%2) + x;
      int unsigned sad = 0;
      for (int i = 0; i < nn; i++) for (int j = 0; j < nn; j++) begin
        int d = int'(a[gy+i][gx+j]) - int'(r[i][j]);
        sad += (d < 0) ? -d : d;
      end
      if (sad < qm) begin qm = sad; qx = gx; qy = gy; end
    end
    if (k == 0 || qm < bm) begin bm = qm; bx = qx - 2*int'(P); by = qy - 2*int'(P); end
  end
  for (int k = 0; k < 4; k++)
    for (int y = 0; y < w1; y++) for (int x = 0; x < w1; x++)
      wr_sub[k][y][x] = a[2*P*(k/2) + y][2*P*(k%2) + x];
  for (int n = nn*nn - 1; n >= 0; n--) begin
    wr_rld[0] <= 1'b1;
    wr_rin[0] <= r[n / nn][n % nn];
    @(posedge clk);
  end
  wr_rld[0] <= 1'b0;
  wr_start[0] <= 1'b1; wr_go <= 1'b1;
  @(posedge clk); t0 = cyc;
  wr_start[0] <= 1'b0; wr_go <= 1'b0;
  do @(posedge clk); while (!wr_mvv[0]);
  t1 = cyc;
  check(t1 - t0 == lat(0) + 4, $sformatf("extended range: latency %0d, expected %0d", t1 - t0, lat(0) + 4));
  check(int'(wr_mvx[0]) == bx && int'(wr_mvy[0]) == by && wr_mad[0] == ERR_W'(bm),
        $sformatf("extended range: MV (%0d,%0d) MAD %0d, expected (%0d,%0d) %0d",
                  wr_mvx[0], wr_mvy[0], wr_mad[0], bx, by, bm));
  if (int'(wr_mvx[0]) >= int'(P) || int'(wr_mvx[0]) < -int'(P) || int'(wr_mvy[0]) < -int'(P)) n_wide++;
  while (wr_busy[0]) @(posedge clk);
endtask

// chip 0's partial MADs are chip 1's error_in
always_comb begin
  for (int e = 0; e < 2; e++) begin
    ein_s[0][e] = '0;
    ein_s[1][e] = eo_s[0][e];
  end
end

initial begin
  repeat (20 * (TSCH + 4*N*N) + 5000) @(posedge clk);
  failures++;
  $display("watchdog expired");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

initial begin
  for (int c = 0; c < 2; c++) for (int e = 0; e < 2; e++) begin
    start_s[c][e] = 1'b0; mode_s[c][e] = MODE_STANDALONE; rld_s[c][e] = 1'b0;
    rin_s[c][e] = '0; go_s[c][e] = 1'b0;
  end
  for (int c = 0; c < 2; c++) begin
    wr_start[c] = 1'b0; wr_rld[c] = 1'b0; wr_rin[c] = '0;
  end
  repeat (3) @(posedge clk);
  rst_n <= 1'b1;
  @(posedge clk);
  fork
    standalone_pair(0);
    standalone_pair(1);
    wide_search();
  join
  if (DO_CASCADE) begin
    fork
      cascade(0);
      cascade(1);
    join
  end
  for (int e = 0; e < 2; e++) begin
    check(n_boundary[e] > 0, $sformatf("engine %0d: boundary bus switch never happened", e));
    check(n_b2b[e] > 0, $sformatf("engine %0d: back-to-back search never happened", e));
    if (DO_CASCADE) begin
      check(n_partial[e] > 0, $sformatf("engine %0d: partial-MAD output never happened", e));
      check(n_last[e] > 0, $sformatf("engine %0d: last-in-chain result never happened", e));
    end
    $display("engine %0d: boundary=%0d back_to_back=%0d partial=%0d last=%0d",
             e, n_boundary[e], n_b2b[e], n_partial[e], n_last[e]);
  end
  check(n_wide > 0, "extended range: no vector outside [-P, P-1] was found");
  $display("extended range: results outside [-P, P-1]=%0d", n_wide);
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
