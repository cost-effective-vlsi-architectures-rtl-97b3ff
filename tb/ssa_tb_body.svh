// Shared body of the SSA processor testbenches. The including module
// declares localparams N, P, PIX_W, ERR_W, PH_W, SKEW (extra array
// latency: 0 for the semi-systolic, N for the systolic engine), the clock/reset and the DUT
// signals listed below, and instantiates the DUT.
//
// Reference model: the sum of absolute differences of every candidate is
// computed directly from the search area and the reference block; the
// expected motion vector is the first minimum in raster order (vertical
// offset outer), as in the three-level loop of full-search block matching.

localparam int unsigned W    = 2*P + N - 1;     // search area width/height
localparam int unsigned TSCH = 2*P*(N-1) + 4*P*P; // cycles per search, back-to-back
localparam int unsigned LAT  = 2*P*(N-1) + 4*P*P + N + 2 + SKEW; // start edge -> mv_valid sampled

typedef logic [PIX_W-1:0] area_t [W][W];
typedef logic [PIX_W-1:0] refb_t [N][N];

int checks = 0;
int failures = 0;

// stimulus slots: up to 4 searches in flight (feeder reads cur / prev)
area_t areas [4];
refb_t refs  [4];

int unsigned cyc = 0;

function automatic int unsigned sad(input area_t a, input refb_t r, input int x, input int y);
  int unsigned s = 0;
  for (int i = 0; i < N; i++)
    for (int j = 0; j < N; j++)
      s += (a[y+i][x+j] > r[i][j]) ? int'(a[y+i][x+j] - r[i][j]) : int'(r[i][j] - a[y+i][x+j]);
  return s;
endfunction

task automatic best(input area_t a, input refb_t r, output int bx, output int by, output int unsigned bm);
  bm = 32'hFFFF_FFFF; bx = 0; by = 0;
  for (int y = 0; y < 2*P; y++)
    for (int x = 0; x < 2*P; x++) begin
      int unsigned s = sad(a, r, x, y);
      if (s < bm) begin bm = s; bx = x; by = y; end
    end
endtask

function automatic void fill_random(int slot);
  for (int y = 0; y < W; y++)
    for (int x = 0; x < W; x++) areas[slot][y][x] = PIX_W'($urandom);
  for (int i = 0; i < N; i++)
    for (int j = 0; j < N; j++) refs[slot][i][j] = PIX_W'($urandom);
endfunction

// place a noisy copy of the reference block at candidate (x, y)
function automatic void plant(int slot, int x, int y, int noise);
  for (int i = 0; i < N; i++)
    for (int j = 0; j < N; j++) begin
      int v = int'(refs[slot][i][j]) + ((noise > 0) ? int'($urandom_range(0, noise)) : 0);
      if (v > (1 << PIX_W) - 1) v = (1 << PIX_W) - 1;
      areas[slot][y+i][x+j] = PIX_W'(v);
    end
endfunction

// Search data feeder: k counts cycles since the first INIT cycle of the
// search in slot "cur"; the RS words of the last row of slot "prev" still
// go out in the first N-1 cycles.
int  fk   = -1;
int  fcur = 0;
int  fprev = -1;

function automatic logic [PIX_W-1:0] ls_word(int slot, int k);
  int g = k / (2*P);
  int p = k % (2*P);
  if (slot < 0 || k < 0 || g >= W) return '0;
  return areas[slot][g][p];
endfunction

function automatic logic [PIX_W-1:0] rs_word(int slot, int prev, int k);
  int g = k / (2*P);
  int p = k % (2*P);
  if (k < 0 || p >= N - 1) return '0;
  if (g == 0) return (prev < 0) ? '0 : areas[prev][W-1][2*P+p];
  if (slot < 0 || g - 1 >= W) return '0;
  return areas[slot][g-1][2*P+p];
endfunction

// reference shift: pixels in reverse raster order
task automatic load_ref(int slot);
  for (int n = N*N - 1; n >= 0; n--) begin
    ref_load <= 1'b1;
    ref_in   <= refs[slot][n / N][n % N];
    @(posedge clk);
  end
  ref_load <= 1'b0;
endtask

always @(posedge clk) cyc <= cyc + 1;

// watchdog
initial begin
  repeat (40 * LAT + 2000) @(posedge clk);
  failures++;
  $display("watchdog expired");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", what);
  end
endtask
