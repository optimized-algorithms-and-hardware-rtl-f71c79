// alg3_max9: maximum of nine values (e.g. a 3x3 max-pooling window).
//
// It reuses the first three steps of the exact median network but every
// exchange touches only the two values compared:
//   clock 1: P0:P5, P1:P6, P2:P7, P3:P8   (larger moves to the higher index)
//   clock 2: P5:P7, P6:P8
//   clock 3: P7:P8                        -> P8 is the maximum of P0..P3,P5..P8
//   clock 4: P4:P8                        -> the larger one is the result
// Eight comparators, a register after each stage. A new window can enter
// every clock; out_valid/out_pix follow in_valid/in_win by exactly four
// clocks. Only the valid pipeline is reset (asynchronous, active low); data
// registers are qualified by their valid bit. The step sequence follows the
// published ALG3; valid signalling and reset are this design's own choice.
module alg3_max9 #(
  parameter int W = median_pkg::PIX_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_win [median_pkg::NWIN],
  output logic         out_valid,
  output logic [W-1:0] out_pix
);
  localparam int LAT = median_pkg::ALG3_LAT;

  logic [W-1:0] p1 [9];
  logic [W-1:0] p2 [9];
  logic [W-1:0] p3 [9];
  logic [W-1:0] n1 [9];
  logic [W-1:0] n2 [9];
  logic [W-1:0] n3 [9];
  logic [W-1:0] mx;
  logic [LAT-1:0] vld;

  // ---- clock 1: four comparators
  for (genvar i = 0; i < 4; i++) begin : g_st1
    cmp_swap #(.W(W)) u_cmp (.a(in_win[i]), .b(in_win[i+5]),
                             .s(n1[i]), .l(n1[i+5]), .swapped());
  end
  assign n1[4] = in_win[4];

  // ---- clock 2: P5:P7 and P6:P8
  cmp_swap #(.W(W)) u_cmp5 (.a(p1[5]), .b(p1[7]), .s(n2[5]), .l(n2[7]), .swapped());
  cmp_swap #(.W(W)) u_cmp6 (.a(p1[6]), .b(p1[8]), .s(n2[6]), .l(n2[8]), .swapped());
  for (genvar i = 0; i < 5; i++) begin : g_st2
    assign n2[i] = p1[i];
  end

  // ---- clock 3: P7:P8
  cmp_swap #(.W(W)) u_cmp7 (.a(p2[7]), .b(p2[8]), .s(n3[7]), .l(n3[8]), .swapped());
  for (genvar i = 0; i < 7; i++) begin : g_st3
    assign n3[i] = p2[i];
  end

  // ---- clock 4: P4:P8, the larger is the maximum
  cmp_swap #(.W(W)) u_cmp8 (.a(p3[4]), .b(p3[8]), .s(), .l(mx), .swapped());

  always_ff @(posedge clk) begin
    p1 <= n1;
    p2 <= n2;
    p3 <= n3;
    out_pix <= mx;
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
