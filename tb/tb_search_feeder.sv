// tb_search_feeder: testbench model of the external frame memory for one
// ME engine. On "go" it latches a (2P+N-1)^2 search area and streams it in
// the engines' input format: row y goes out in period y (2P cycles), its LS
// words (columns 0 .. 2P-1) on ls in phases 0 .. 2P-1, its RS words
// (columns 2P .. 2P+N-2) on rs in phases 0 .. N-2 of period y+1. The RS
// words of the previous area's last row go out in the first N-1 cycles
// after go, so "go" may be given back-to-back. k counts the cycles since go.
module tb_search_feeder #(
  parameter int unsigned N     = 4,
  parameter int unsigned P     = 4,
  parameter int unsigned PIX_W = 8,
  localparam int unsigned W    = 2*P + N - 1
) (
  input  logic             clk,
  input  logic             go,
  input  logic [PIX_W-1:0] area [W][W],
  output logic [PIX_W-1:0] ls,
  output logic [PIX_W-1:0] rs,
  output int               k
);
  logic [PIX_W-1:0] cur [W][W];
  logic [PIX_W-1:0] prev_rs [N];
  bit               have_prev = 1'b0;
  bit               have_cur  = 1'b0;
  int               kq = -1;

  always @(posedge clk) begin
    if (go) begin
      for (int p = 0; p < int'(N) - 1; p++) prev_rs[p] <= cur[W-1][2*P+p];
      have_prev <= have_cur;
      have_cur  <= 1'b1;
      cur <= area;
      kq  <= 0;
    end else if (kq >= 0) kq <= kq + 1;
  end

  always_comb begin
    int g, p;
    g  = (kq < 0) ? 0 : kq / (2*P);
    p  = (kq < 0) ? 0 : kq % (2*P);
    ls = '0;
    rs = '0;
    if (kq >= 0) begin
      if (g < int'(W)) ls = cur[g][p];
      if (p < int'(N) - 1) begin
        if (g == 0) rs = have_prev ? prev_rs[p] : '0;
        else if (g - 1 < int'(W)) rs = cur[g-1][2*P+p];
      end
    end
  end
  assign k = kq;
endmodule
