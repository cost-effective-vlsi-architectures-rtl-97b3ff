// Unit testbench of mv_merge (P = 4, offsets -P / +P): random chain inputs
// and local results, with frequent equal MADs. One cycle after in_valid the
// output must hold the smaller MAD with its vector (local vector plus the
// offset when the local MAD is strictly smaller, else the chain input), and
// it must not change while in_valid is low. out_valid must follow in_valid
// by exactly one cycle.
`timescale 1ns/1ps
module tb_mv_merge;
  localparam int unsigned P = 4, ERR_W = 10;
  localparam int unsigned PH_W = me_pkg::cnt_w(2*P);
  localparam int XO = -int'(P), YO = int'(P);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid;
  logic signed [PH_W+1:0] in_mv_x, in_mv_y, out_mv_x, out_mv_y;
  logic [ERR_W-1:0] in_mad, loc_mad, out_mad;
  logic signed [PH_W:0] loc_mv_x, loc_mv_y;
  logic out_valid;
  mv_merge #(.P(P), .ERR_W(ERR_W), .X_OFF(XO), .Y_OFF(YO)) dut (.*);
  int checks = 0, failures = 0;
  initial begin repeat (3000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int ex, ey, em;
    bit ev;
    in_valid = 0; in_mv_x = 0; in_mv_y = 0; in_mad = 0; loc_mad = 0; loc_mv_x = 0; loc_mv_y = 0;
    ex = 0; ey = 0; em = 0; ev = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      checks++;
      if (out_valid != ev || int'(out_mv_x) != ex || int'(out_mv_y) != ey || int'(out_mad) != em) begin
        failures++;
        $display("FAIL t=%0d: got v%0d (%0d,%0d) %0d, expected v%0d (%0d,%0d) %0d", t, out_valid, out_mv_x, out_mv_y, out_mad, ev, ex, ey, em);
      end
      in_valid = ($urandom_range(0, 2) != 0);
      in_mv_x  = (PH_W+2)'($urandom_range(0, 4*P - 1)) - (PH_W+2)'(2*P);
      in_mv_y  = (PH_W+2)'($urandom_range(0, 4*P - 1)) - (PH_W+2)'(2*P);
      loc_mv_x = (PH_W+1)'($urandom_range(0, 2*P - 1)) - (PH_W+1)'(P);
      loc_mv_y = (PH_W+1)'($urandom_range(0, 2*P - 1)) - (PH_W+1)'(P);
      in_mad   = ERR_W'($urandom_range(0, 7));
      loc_mad  = ($urandom_range(0, 3) == 0) ? in_mad : ERR_W'($urandom_range(0, 7));
      if (t % 97 == 5) in_mad = '1;
      ev = in_valid;
      if (in_valid) begin
        if (loc_mad < in_mad) begin ex = int'(loc_mv_x) + XO; ey = int'(loc_mv_y) + YO; em = int'(loc_mad); end
        else begin ex = int'(in_mv_x); ey = int'(in_mv_y); em = int'(in_mad); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
