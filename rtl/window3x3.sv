// window3x3: turns a raster-order pixel stream into 3x3 windows.
//
// Two line buffers (IMG_W pixels each) hold the two previous image rows. For
// every accepted pixel at column x the buffers are read at x, so a new
// window column {row y-2, row y-1, row y} is formed and shifted into a 3x3
// register array. Once at least three rows and three columns have been seen,
// the array holds the full neighbourhood of pixel (x-1, y-1) and win_valid
// is raised. Windows therefore exist only for interior pixels: each frame of
// IMG_W x IMG_H pixels yields (IMG_W-2) x (IMG_H-2) windows; border pixels
// produce none.
//
// Window order is raster order: win[0..2] top row, win[3..5] middle row
// (win[4] is the centre pixel), win[6..8] bottom row.
//
// Interface: pix_valid/pix carry one pixel per clock at most; gaps are
// allowed. The first pixel after reset is the frame's top-left pixel and
// frames follow back to back. win_valid/win follow the completing pixel by
// one clock. Line-buffer size, window order and border handling are this
// design's own choices; the surrounding filter only needs 3x3 windows.
module window3x3 #(
  parameter int W     = median_pkg::PIX_W,
  parameter int IMG_W = 256,
  parameter int IMG_H = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pix_valid,
  input  logic [W-1:0] pix,
  output logic         win_valid,
  output logic [W-1:0] win [median_pkg::NWIN]
);
  localparam int XW = $clog2(IMG_W);
  localparam int YW = $clog2(IMG_H);

  logic [W-1:0]  line1 [IMG_W];   // row y-1
  logic [W-1:0]  line2 [IMG_W];   // row y-2
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [W-1:0]  col_top, col_mid;

  assign col_top = line2[x];
  assign col_mid = line1[x];

  // line buffers: read old row contents at x, write the new ones
  always_ff @(posedge clk) begin
    if (pix_valid) begin
      line2[x] <= col_mid;
      line1[x] <= pix;
      // shift the window one column left, new column enters on the right
      for (int r = 0; r < 3; r++) begin
        win[3*r]   <= win[3*r+1];
        win[3*r+1] <= win[3*r+2];
      end
      win[2] <= col_top;
      win[5] <= col_mid;
      win[8] <= pix;
    end
  end

  // raster position and window valid
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x         <= '0;
      y         <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= pix_valid && (x >= XW'(2)) && (y >= YW'(2));
      if (pix_valid) begin
        if (x == XW'(IMG_W - 1)) begin
          x <= '0;
          y <= (y == YW'(IMG_H - 1)) ? '0 : y + YW'(1);
        end else begin
          x <= x + XW'(1);
        end
      end
    end
  end
endmodule
