// Unit testbench of compare_select (P = 3): runs of (2P)^2 candidates with
// random MADs drawn from a small range (many ties) and with idle gaps; the
// reported MV must be the first minimum in scan order, the MAD the minimum,
// and mv_valid must pulse once, one cycle after the last candidate.
`timescale 1ns/1ps
module tb_compare_select;
  localparam int unsigned P = 3, ERR_W = 10;
  localparam int unsigned PH_W = me_pkg::cnt_w(2*P);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cand_valid, cand_first, cand_last;
  logic [PH_W-1:0] cand_x, cand_y;
  logic [ERR_W-1:0] mad, mad_out;
  logic mv_valid;
  logic signed [PH_W:0] mv_x, mv_y;
  int checks = 0, failures = 0;
  compare_select #(.P(P), .ERR_W(ERR_W)) dut (.*);
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    cand_valid = 0; cand_first = 0; cand_last = 0; cand_x = 0; cand_y = 0; mad = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 40; run++) begin
      automatic int bm = 1 << 30, bx = 0, by = 0, range = 0;
      range = (run % 3 == 0) ? 3 : 1000;
      for (int q = 0; q < 4*P*P; q++) begin
        @(negedge clk);
        cand_valid = 1; cand_first = (q == 0); cand_last = (q == 4*P*P - 1);
        cand_x = PH_W'(q % (2*P)); cand_y = PH_W'(q / (2*P));
        mad = (run == 5) ? '1 : ERR_W'($urandom_range(0, range));
        if (int'(mad) < bm) begin bm = mad; bx = q % (2*P); by = q / (2*P); end
        @(posedge clk); #1;
        checks++;
        if (mv_valid != 1'b0 && q != 4*P*P - 1) begin failures++; $display("FAIL early mv_valid run %0d q %0d", run, q); end
      end
      @(negedge clk);
      cand_valid = 0; cand_first = 0; cand_last = 0;
      checks++;
      if (!mv_valid || mv_x != bx - int'(P) || mv_y != by - int'(P) || mad_out != ERR_W'(bm)) begin
        failures++; $display("FAIL run %0d: (%0d,%0d) %0d exp (%0d,%0d) %0d", run, mv_x, mv_y, mad_out, bx - int'(P), by - int'(P), bm);
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
