// alg2_median9: fast, approximate median of a 3x3 window (P[0..8]).
//
// It trades a little accuracy for fewer comparators (15) and one clock less
// than the exact network. Clocks 1-2 are those of the exact network (two
// partially ordered chains ending in P7 and P8). From then on P7 and P8 are
// assumed to lie above the median and are dropped, which holds for most
// windows but not all; when it fails the result is a neighbouring rank.
//
//   clk  comparator(s)   extra action
//    1   P0:P5 P1:P6 P2:P7 P3:P8
//    2   P5:P7 / P6:P8   P0<->P2 / P1<->P3 when the comparator exchanges
//    3   P5:P6           P0<->P1 when it exchanges
//        P2:P4
//    4   P4:P6
//    5   P3:P5
//    6   P1:P3           P1>P3: exchange P1,P3; otherwise exchange P2,P3
//    7   P2:P4  P3:P5
//    8   P3:P4
//    9   P4:P5           -> result = smaller of the two
//
// The step list and comparator count follow the published ALG2. Step 4 of
// that description also mentions a rotation of P4..P6; it is not applied
// here because the published comparator wiring does not show it and it
// lowers the hit rate sharply. Which comparator drives the coupled swaps is
// this design's own reading. Measured hit rate on random distinct windows is
// about 83%.
//
// Interface: a window may enter every clock; out_valid/out_pix follow nine
// clocks later. Only the valid pipeline is reset (asynchronous, active low).
module alg2_median9 #(
  parameter int W = median_pkg::PIX_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_win [median_pkg::NWIN],
  output logic         out_valid,
  output logic [W-1:0] out_pix
);
  localparam int LAT = median_pkg::ALG2_LAT;

  logic [W-1:0] p [1:LAT-1][9];
  logic [W-1:0] n [1:LAT-1][9];
  logic [W-1:0] lo [1:15];
  logic [W-1:0] hi [1:15];
  logic         sw [1:15];
  logic [LAT-1:0] vld;

  cmp_swap #(.W(W)) c1  (.a(in_win[0]), .b(in_win[5]), .s(lo[1]),  .l(hi[1]),  .swapped(sw[1]));
  cmp_swap #(.W(W)) c2  (.a(in_win[1]), .b(in_win[6]), .s(lo[2]),  .l(hi[2]),  .swapped(sw[2]));
  cmp_swap #(.W(W)) c3  (.a(in_win[2]), .b(in_win[7]), .s(lo[3]),  .l(hi[3]),  .swapped(sw[3]));
  cmp_swap #(.W(W)) c4  (.a(in_win[3]), .b(in_win[8]), .s(lo[4]),  .l(hi[4]),  .swapped(sw[4]));
  cmp_swap #(.W(W)) c5  (.a(p[1][5]),   .b(p[1][7]),   .s(lo[5]),  .l(hi[5]),  .swapped(sw[5]));
  cmp_swap #(.W(W)) c6  (.a(p[1][6]),   .b(p[1][8]),   .s(lo[6]),  .l(hi[6]),  .swapped(sw[6]));
  cmp_swap #(.W(W)) c7  (.a(p[2][5]),   .b(p[2][6]),   .s(lo[7]),  .l(hi[7]),  .swapped(sw[7]));
  cmp_swap #(.W(W)) c8  (.a(p[2][2]),   .b(p[2][4]),   .s(lo[8]),  .l(hi[8]),  .swapped(sw[8]));
  cmp_swap #(.W(W)) c9  (.a(p[3][4]),   .b(p[3][6]),   .s(lo[9]),  .l(hi[9]),  .swapped(sw[9]));
  cmp_swap #(.W(W)) c10 (.a(p[4][3]),   .b(p[4][5]),   .s(lo[10]), .l(hi[10]), .swapped(sw[10]));
  cmp_swap #(.W(W)) c11 (.a(p[5][1]),   .b(p[5][3]),   .s(lo[11]), .l(hi[11]), .swapped(sw[11]));
  cmp_swap #(.W(W)) c12 (.a(p[6][2]),   .b(p[6][4]),   .s(lo[12]), .l(hi[12]), .swapped(sw[12]));
  cmp_swap #(.W(W)) c13 (.a(p[6][3]),   .b(p[6][5]),   .s(lo[13]), .l(hi[13]), .swapped(sw[13]));
  cmp_swap #(.W(W)) c14 (.a(p[7][3]),   .b(p[7][4]),   .s(lo[14]), .l(hi[14]), .swapped(sw[14]));
  cmp_swap #(.W(W)) c15 (.a(p[8][4]),   .b(p[8][5]),   .s(lo[15]), .l(hi[15]), .swapped(sw[15]));

  always_comb begin
    // clock 1
    n[1] = in_win;
    n[1][0] = lo[1];  n[1][5] = hi[1];
    n[1][1] = lo[2];  n[1][6] = hi[2];
    n[1][2] = lo[3];  n[1][7] = hi[3];
    n[1][3] = lo[4];  n[1][8] = hi[4];
    // clock 2
    n[2] = p[1];
    n[2][5] = lo[5];  n[2][7] = hi[5];
    n[2][6] = lo[6];  n[2][8] = hi[6];
    if (sw[5]) begin n[2][0] = p[1][2]; n[2][2] = p[1][0]; end
    if (sw[6]) begin n[2][1] = p[1][3]; n[2][3] = p[1][1]; end
    // clock 3
    n[3] = p[2];
    n[3][5] = lo[7];  n[3][6] = hi[7];
    n[3][2] = lo[8];  n[3][4] = hi[8];
    if (sw[7]) begin n[3][0] = p[2][1]; n[3][1] = p[2][0]; end
    // clock 4
    n[4] = p[3];
    n[4][4] = lo[9];  n[4][6] = hi[9];
    // clock 5
    n[5] = p[4];
    n[5][3] = lo[10]; n[5][5] = hi[10];
    // clock 6: the exchange partner of P3 depends on P1:P3
    n[6] = p[5];
    if (sw[11]) begin n[6][1] = p[5][3]; n[6][3] = p[5][1]; end
    else        begin n[6][2] = p[5][3]; n[6][3] = p[5][2]; end
    // clock 7
    n[7] = p[6];
    n[7][2] = lo[12]; n[7][4] = hi[12];
    n[7][3] = lo[13]; n[7][5] = hi[13];
    // clock 8
    n[8] = p[7];
    n[8][3] = lo[14]; n[8][4] = hi[14];
  end

  always_ff @(posedge clk) begin
    for (int k = 1; k < LAT; k++) p[k] <= n[k];
    out_pix <= lo[15];   // clock 9: result = smaller of P4 and P5
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], in_valid};
  end
  assign out_valid = vld[LAT-1];

  // every result belongs to a window accepted exactly LAT clocks earlier
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $past(in_valid, LAT));
endmodule
