// tb_median_filter_top: end-to-end run of the whole filter at its default
// frame size (256 x 256, 8-bit pixels).
//
// Frame 0 is a synthetic scene (a diagonal ramp with a bright square and a
// dark disc) corrupted by 10% salt-and-pepper noise: 5% of the pixels forced
// to 0 and 5% to 255. Frame 1 is uniform random noise fed with random gaps
// in the input stream. For every interior pixel the testbench computes the
// true median, the approximate-median step sequence and the maximum of its
// 3x3 neighbourhood in software and checks the three output streams against
// them, in order. It then reports the PSNR of the noisy and of both filtered
// frames against the clean scene.
//
// Mechanisms that must occur at least once: input gaps, a frame wrap
// (second frame), windows on which the approximate median differs from the
// exact one, and impulse pixels removed by the exact median.
module tb_median_filter_top;
  import median_ref_pkg::*;
  localparam int IW = 256, IH = 256, FRAMES = 2;

  logic clk = 0, rst_n = 0;
  logic pix_valid;
  pix_t pix;
  logic med1_valid, med2_valid, max_valid;
  pix_t med1, med2, max_pix;

  int checks = 0, failures = 0;
  int n_gap = 0, n_frames = 0, n_alg2_miss = 0, n_impulse_fixed = 0;
  int n1 = 0, n2 = 0, n3 = 0;
  pix_t clean [IH][IW];
  pix_t img   [FRAMES][IH][IW];
  pix_t e1_q [$], e2_q [$], e3_q [$];
  real se_noisy = 0, se_alg1 = 0, se_alg2 = 0;

  median_filter_top dut (.clk, .rst_n, .pix_valid, .pix,
                         .med1_valid, .med1, .med2_valid, .med2, .max_valid, .max_pix);

  always #5 clk = ~clk;

  task automatic chk(input string what, input pix_t got, ref pix_t q [$]);
    pix_t e;
    checks++;
    if (q.size() == 0) begin
      failures++; $display("FAIL: %s unexpected output", what);
      return;
    end
    e = q.pop_front();
    if (got != e) begin
      failures++;
      if (failures < 10) $display("FAIL: %s got %0d exp %0d", what, got, e);
    end
  endtask

  // outputs of frame 0 also feed the image-quality figures
  always @(posedge clk) if (rst_n) begin
    if (med1_valid) begin
      int k, y, x;
      k = n1 % ((IW - 2) * (IH - 2));
      y = k / (IW - 2) + 1;
      x = k % (IW - 2) + 1;
      if (n1 < (IW - 2) * (IH - 2)) begin
        se_alg1 += real'((int'(med1) - int'(clean[y][x])) ** 2);
        if (img[0][y][x] != clean[y][x] && (med1 != 8'd0 && med1 != 8'd255)) n_impulse_fixed++;
      end
      chk("alg1", med1, e1_q);
      n1++;
    end
    if (med2_valid) begin
      int k, y, x;
      k = n2 % ((IW - 2) * (IH - 2));
      y = k / (IW - 2) + 1;
      x = k % (IW - 2) + 1;
      if (n2 < (IW - 2) * (IH - 2)) se_alg2 += real'((int'(med2) - int'(clean[y][x])) ** 2);
      chk("alg2", med2, e2_q);
      n2++;
    end
    if (max_valid) begin
      chk("alg3", max_pix, e3_q);
      n3++;
    end
  end

  initial begin : watchdog
    repeat (500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real psnr(real se);
    real mse;
    mse = se / real'((IW - 2) * (IH - 2));
    return 10.0 * $log10(255.0 * 255.0 / mse);
  endfunction

  initial begin
    win_t w;
    // clean scene and noisy frame 0
    foreach (clean[y, x]) begin
      int v;
      v = (x + y) / 2;
      if (x >= 40 && x < 120 && y >= 40 && y < 120) v = 220;
      if ((x - 180) * (x - 180) + (y - 170) * (y - 170) < 40 * 40) v = 30;
      clean[y][x] = pix_t'(v);
      case ($urandom_range(99))
        0, 1, 2, 3, 4:  img[0][y][x] = 8'd0;
        5, 6, 7, 8, 9:  img[0][y][x] = 8'd255;
        default:        img[0][y][x] = clean[y][x];
      endcase
      img[1][y][x] = pix_t'($urandom);
    end
    foreach (img[0][y, x]) begin
      se_noisy += (y >= 1 && y < IH - 1 && x >= 1 && x < IW - 1) ?
                  real'((int'(img[0][y][x]) - int'(clean[y][x])) ** 2) : 0.0;
    end
    // expected results, raster order of window centres
    for (int f = 0; f < FRAMES; f++)
      for (int y = 1; y < IH - 1; y++)
        for (int x = 1; x < IW - 1; x++) begin
          for (int r = 0; r < 3; r++)
            for (int c = 0; c < 3; c++) w[3*r+c] = img[f][y-1+r][x-1+c];
          e1_q.push_back(true_median(w));
          e2_q.push_back(alg2_model(w));
          e3_q.push_back(max9(w));
          if (f == 0 && alg2_model(w) != true_median(w)) n_alg2_miss++;
        end
    pix_valid = 0; pix = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int y = 0; y < IH; y++)
        for (int x = 0; x < IW; x++) begin
          pix_valid = 1; pix = img[f][y][x];
          @(negedge clk);
          pix_valid = 0;
          if (f == 1 && $urandom_range(7) == 0) begin n_gap++; @(negedge clk); end
        end
      n_frames++;
    end
    repeat (20) @(negedge clk);
    // every result delivered
    checks++;
    if (e1_q.size() + e2_q.size() + e3_q.size() != 0 ||
        n1 != FRAMES * (IW - 2) * (IH - 2) || n3 != n1 || n2 != n1) begin
      failures++; $display("FAIL: results missing: %0d %0d %0d", n1, n2, n3);
    end
    $display("PSNR noisy %0.2f dB, exact median %0.2f dB, approximate median %0.2f dB",
             psnr(se_noisy), psnr(se_alg1), psnr(se_alg2));
    $display("gaps %0d, frames %0d, approximate-median misses %0d of %0d noisy-frame windows, impulses removed %0d",
             n_gap, n_frames, n_alg2_miss, (IW - 2) * (IH - 2), n_impulse_fixed);
    checks += 5;
    if (n_gap == 0)           begin failures++; $display("FAIL: no input gap"); end
    if (n_frames < 2)         begin failures++; $display("FAIL: no frame wrap"); end
    if (n_alg2_miss == 0)     begin failures++; $display("FAIL: approximate median never missed"); end
    if (n_impulse_fixed == 0) begin failures++; $display("FAIL: no impulse removed"); end
    if (psnr(se_alg1) < psnr(se_noisy) + 10.0) begin failures++; $display("FAIL: exact median did not clean the frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
