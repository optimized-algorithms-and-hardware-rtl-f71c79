// median_filter_top: 3x3 impulse-noise filter for a grey-scale pixel stream.
//
// A window generator (window3x3) forms the 3x3 neighbourhood of every
// interior pixel. Each window goes to three 9-input units side by side:
//   alg1_median9  exact median          (17 comparators, 10 clocks)
//   alg2_median9  approximate median    (15 comparators,  9 clocks)
//   alg3_max9     maximum, max pooling  ( 8 comparators,  4 clocks)
// All three accept a window every clock, so the filter keeps up with one
// pixel per clock. Each output stream has its own valid; results come out
// in the raster order of the window centres, (IMG_W-2) x (IMG_H-2) per frame.
// Having all three units in one top, and the streaming pixel interface in
// place of a processor bus, are this design's own choices.
module median_filter_top #(
  parameter int W     = median_pkg::PIX_W,
  parameter int IMG_W = 256,
  parameter int IMG_H = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pix_valid,
  input  logic [W-1:0] pix,
  output logic         med1_valid,
  output logic [W-1:0] med1,
  output logic         med2_valid,
  output logic [W-1:0] med2,
  output logic         max_valid,
  output logic [W-1:0] max_pix
);
  logic         win_valid;
  logic [W-1:0] win [median_pkg::NWIN];

  window3x3 #(.W(W), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_win (
    .clk, .rst_n, .pix_valid, .pix, .win_valid, .win);

  alg1_median9 #(.W(W)) u_alg1 (
    .clk, .rst_n, .in_valid(win_valid), .in_win(win),
    .out_valid(med1_valid), .out_pix(med1));

  alg2_median9 #(.W(W)) u_alg2 (
    .clk, .rst_n, .in_valid(win_valid), .in_win(win),
    .out_valid(med2_valid), .out_pix(med2));

  alg3_max9 #(.W(W)) u_alg3 (
    .clk, .rst_n, .in_valid(win_valid), .in_win(win),
    .out_valid(max_valid), .out_pix(max_pix));
endmodule
