// alg1_median9: exact median of a 3x3 window (nine pixels P[0..8]).
//
// The network does not sort the window. It builds partial orderings and
// keeps throwing out values that cannot be the median, using 17
// compare-exchange cells in ten register stages (one stage per clock):
//
//   clk  comparator(s)        coupled swap when that comparator exchanges
//    1   P0:P5 P1:P6 P2:P7 P3:P8   -
//    2   P5:P7                P0<->P2
//        P6:P8                P1<->P3
//    3   P7:P8                P0<->P1, P2<->P3, P5<->P6
//    4   P6:P7                P1<->P2
//        P3:P4                -
//    5   P5:P6                P0<->P1
//        P2:P4                -
//    6   P4:P6                P1<->P2
//    7   P4:P5                P0<->P2
//        P1:P3                -
//    8   P3:P5                P0<->P1
//    9   P3:P4                P1<->P2
//   10   P0:P4                -> median = larger of the two
//
// After clocks 1-2 the window holds two chains {P0<P5<P7, P2<P7} and
// {P1<P6<P8, P3<P8}. A coupled swap moves the partners of an exchanged value
// with it, so that those chains stay true; clock 3 leaves P8 as the overall
// maximum, clock 4 P7 as a value above the median, and so on until the
// median is the larger of P0 and P4. The comparator placement follows the
// published ten-stage, 17-comparator structure. Which comparator drives which
// coupled swap is this design's reading of the step description; this
// assignment gives the exact median for every ordering of nine values.
//
// Interface: a new window may enter every clock (in_valid/in_win);
// out_valid/out_pix follow exactly ten clocks later. Only the valid pipeline
// is reset (asynchronous, active low).
module alg1_median9 #(
  parameter int W = median_pkg::PIX_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_win [median_pkg::NWIN],
  output logic         out_valid,
  output logic [W-1:0] out_pix
);
  localparam int LAT = median_pkg::ALG1_LAT;

  // p[k]: window after stage k (registered); n[k]: stage k before its register
  logic [W-1:0] p [1:LAT-1][9];
  logic [W-1:0] n [1:LAT-1][9];
  logic [W-1:0] lo [1:17];
  logic [W-1:0] hi [1:17];
  logic         sw [1:17];
  logic [LAT-1:0] vld;

  // ---- comparators, numbered as Comp. 1..17 of the published structure
  cmp_swap #(.W(W)) c1  (.a(in_win[0]), .b(in_win[5]), .s(lo[1]),  .l(hi[1]),  .swapped(sw[1]));
  cmp_swap #(.W(W)) c2  (.a(in_win[1]), .b(in_win[6]), .s(lo[2]),  .l(hi[2]),  .swapped(sw[2]));
  cmp_swap #(.W(W)) c3  (.a(in_win[2]), .b(in_win[7]), .s(lo[3]),  .l(hi[3]),  .swapped(sw[3]));
  cmp_swap #(.W(W)) c4  (.a(in_win[3]), .b(in_win[8]), .s(lo[4]),  .l(hi[4]),  .swapped(sw[4]));
  cmp_swap #(.W(W)) c5  (.a(p[1][5]),   .b(p[1][7]),   .s(lo[5]),  .l(hi[5]),  .swapped(sw[5]));
  cmp_swap #(.W(W)) c6  (.a(p[1][6]),   .b(p[1][8]),   .s(lo[6]),  .l(hi[6]),  .swapped(sw[6]));
  cmp_swap #(.W(W)) c7  (.a(p[2][7]),   .b(p[2][8]),   .s(lo[7]),  .l(hi[7]),  .swapped(sw[7]));
  cmp_swap #(.W(W)) c8  (.a(p[3][6]),   .b(p[3][7]),   .s(lo[8]),  .l(hi[8]),  .swapped(sw[8]));
  cmp_swap #(.W(W)) c9  (.a(p[3][3]),   .b(p[3][4]),   .s(lo[9]),  .l(hi[9]),  .swapped(sw[9]));
  cmp_swap #(.W(W)) c10 (.a(p[4][5]),   .b(p[4][6]),   .s(lo[10]), .l(hi[10]), .swapped(sw[10]));
  cmp_swap #(.W(W)) c11 (.a(p[4][2]),   .b(p[4][4]),   .s(lo[11]), .l(hi[11]), .swapped(sw[11]));
  cmp_swap #(.W(W)) c12 (.a(p[5][4]),   .b(p[5][6]),   .s(lo[12]), .l(hi[12]), .swapped(sw[12]));
  cmp_swap #(.W(W)) c13 (.a(p[6][4]),   .b(p[6][5]),   .s(lo[13]), .l(hi[13]), .swapped(sw[13]));
  cmp_swap #(.W(W)) c14 (.a(p[6][1]),   .b(p[6][3]),   .s(lo[14]), .l(hi[14]), .swapped(sw[14]));
  cmp_swap #(.W(W)) c15 (.a(p[7][3]),   .b(p[7][5]),   .s(lo[15]), .l(hi[15]), .swapped(sw[15]));
  cmp_swap #(.W(W)) c16 (.a(p[8][3]),   .b(p[8][4]),   .s(lo[16]), .l(hi[16]), .swapped(sw[16]));
  cmp_swap #(.W(W)) c17 (.a(p[9][0]),   .b(p[9][4]),   .s(lo[17]), .l(hi[17]), .swapped(sw[17]));

  // ---- stage logic: comparator results plus coupled swaps
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
    n[3][7] = lo[7];  n[3][8] = hi[7];
    if (sw[7]) begin
      n[3][0] = p[2][1]; n[3][1] = p[2][0];
      n[3][2] = p[2][3]; n[3][3] = p[2][2];
      n[3][5] = p[2][6]; n[3][6] = p[2][5];
    end
    // clock 4
    n[4] = p[3];
    n[4][6] = lo[8];  n[4][7] = hi[8];
    n[4][3] = lo[9];  n[4][4] = hi[9];
    if (sw[8]) begin n[4][1] = p[3][2]; n[4][2] = p[3][1]; end
    // clock 5
    n[5] = p[4];
    n[5][5] = lo[10]; n[5][6] = hi[10];
    n[5][2] = lo[11]; n[5][4] = hi[11];
    if (sw[10]) begin n[5][0] = p[4][1]; n[5][1] = p[4][0]; end
    // clock 6
    n[6] = p[5];
    n[6][4] = lo[12]; n[6][6] = hi[12];
    if (sw[12]) begin n[6][1] = p[5][2]; n[6][2] = p[5][1]; end
    // clock 7
    n[7] = p[6];
    n[7][4] = lo[13]; n[7][5] = hi[13];
    n[7][1] = lo[14]; n[7][3] = hi[14];
    if (sw[13]) begin n[7][0] = p[6][2]; n[7][2] = p[6][0]; end
    // clock 8
    n[8] = p[7];
    n[8][3] = lo[15]; n[8][5] = hi[15];
    if (sw[15]) begin n[8][0] = p[7][1]; n[8][1] = p[7][0]; end
    // clock 9
    n[9] = p[8];
    n[9][3] = lo[16]; n[9][4] = hi[16];
    if (sw[16]) begin n[9][1] = p[8][2]; n[9][2] = p[8][1]; end
  end

  always_ff @(posedge clk) begin
    for (int k = 1; k < LAT; k++) p[k] <= n[k];
    out_pix <= hi[17];   // clock 10: median = larger of P0 and P4
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
