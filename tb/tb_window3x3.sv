// tb_window3x3: checks the 3x3 window generator on a small 7 x 5 frame size.
// Three frames of random pixels are streamed with random gaps. The testbench
// keeps each frame in an array and expects, for every interior pixel in
// raster order, its full 3x3 neighbourhood in raster window order, one clock
// after the pixel that completes it. It also checks that each frame yields
// exactly (7-2) x (5-2) windows.
module tb_window3x3;
  localparam int IW = 7, IH = 5, FRAMES = 3;
  typedef logic [7:0] pix_t;

  logic clk = 0, rst_n = 0;
  logic pix_valid, win_valid;
  pix_t pix;
  pix_t win [9];
  int checks = 0, failures = 0, nwin = 0;
  pix_t img [FRAMES][IH][IW];
  logic [8:0][7:0] exp_q [$];   // expected windows, entry k = win[k]
  logic sent_last;   // pixel accepted at the previous clock completed a window

  window3x3 #(.W(8), .IMG_W(IW), .IMG_H(IH)) dut (.clk, .rst_n, .pix_valid, .pix, .win_valid, .win);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (win_valid) begin
      logic [8:0][7:0] e;
      checks++;
      nwin++;
      if (exp_q.size() == 0 || !sent_last) begin
        failures++; $display("FAIL: window at wrong time q=%0d sl=%0b t=%0t", exp_q.size(), sent_last, $time);
      end else begin
        e = exp_q.pop_front();
        if (win[0] != e[0] || win[1] != e[1] || win[2] != e[2] || win[3] != e[3] || win[4] != e[4] ||
            win[5] != e[5] || win[6] != e[6] || win[7] != e[7] || win[8] != e[8]) begin
          failures++;
          if (failures < 10) $display("FAIL: window mismatch, centre got %0d exp %0d", win[4], e[4]);
        end
      end
    end else if (sent_last) begin
      checks++; failures++; $display("FAIL: window missing");
    end
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix_valid = 0; pix = 0; sent_last = 0;
    foreach (img[f, y, x]) img[f][y][x] = pix_t'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int y = 0; y < IH; y++)
        for (int x = 0; x < IW; x++) begin
          pix_valid = 1; pix = img[f][y][x];
          if (x >= 2 && y >= 2) begin
            logic [8:0][7:0] e;
            for (int r = 0; r < 3; r++)
              for (int c = 0; c < 3; c++) e[3*r+c] = img[f][y-2+r][x-2+c];
            exp_q.push_back(e);
          end
          @(posedge clk);
          sent_last <= (x >= 2 && y >= 2);
          @(negedge clk);
          pix_valid = 0;
          if ($urandom_range(2) == 0) begin
            @(posedge clk); sent_last <= 0; @(negedge clk);
          end
        end
    end
    @(posedge clk); sent_last <= 0;
    repeat (3) @(negedge clk);
    checks++;
    if (nwin != FRAMES * (IW - 2) * (IH - 2) || exp_q.size() != 0) begin
      failures++; $display("FAIL: %0d windows, %0d left", nwin, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
