// tb_alg1_median9: self-checking test of the exact 3x3 median unit.
// Drives (1) the two worked example windows {55,201,10,60,40,28,77,11,44}
// -> 44 and {46,55,48,60,40,28,77,11,44} -> 46, (2) every one of the 9!
// orderings of nine distinct values back to back, one per clock, and
// (3) random windows with many repeated values and random input gaps.
// Each result is compared with a sort-based median and must appear exactly
// ten clocks after its window entered. For the first example the window
// contents after clocks 1 and 2 are checked too: {28,77,10,44,40,55,201,11,60}
// and P0..P3 = {10,44,28,77}.
module tb_alg1_median9;
  import median_ref_pkg::*;
  localparam int LAT = 10;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  pix_t in_win [9];
  logic out_valid;
  pix_t out_pix;

  int checks = 0, failures = 0;
  longint cyc = 0;
  pix_t   exp_q [$];
  longint t_q   [$];

  alg1_median9 dut (.clk, .rst_n, .in_valid, .in_win, .out_valid, .out_pix);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // output monitor: value and latency
  always @(posedge clk) if (rst_n && out_valid) begin
    pix_t e; longint t;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL: unexpected output %0d", out_pix);
    end else begin
      e = exp_q.pop_front(); t = t_q.pop_front();
      if (out_pix !== e || cyc - t != longint'(LAT)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: got %0d exp %0d latency %0d", out_pix, e, cyc - t);
      end
    end
  end

  task automatic send(input win_t w);
    in_win = w; in_valid = 1'b1;
    exp_q.push_back(true_median(w)); t_q.push_back(cyc);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    win_t w;
    pix_t a [9];
    in_valid = 0;
    foreach (in_win[i]) in_win[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // worked example 1, also checking the window contents after clocks 1 and 2
    send('{55, 201, 10, 60, 40, 28, 77, 11, 44});
    begin
      pix_t st1 [9];
      st1 = '{28, 77, 10, 44, 40, 55, 201, 11, 60};
      for (int i = 0; i < 9; i++) begin
        checks++;
        if (dut.p[1][i] != st1[i]) begin failures++; $display("FAIL: clock 1, P%0d = %0d", i, dut.p[1][i]); end
      end
    end
    send('{46, 55, 48, 60, 40, 28, 77, 11, 44});
    begin
      pix_t st2 [4];
      st2 = '{10, 44, 28, 77};
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (dut.p[2][i] != st2[i]) begin failures++; $display("FAIL: clock 2, P%0d = %0d", i, dut.p[2][i]); end
      end
    end
    // every ordering of 0..8, back to back
    foreach (a[i]) a[i] = pix_t'(i);
    do begin
      w = a;
      send(w);
    end while (next_perm(a));
    // random windows with ties and gaps
    for (int n = 0; n < 20000; n++) begin
      int range;
      range = (n % 2 != 0) ? 256 : 4;
      foreach (w[i]) w[i] = pix_t'($urandom_range(range - 1));
      send(w);
      if ($urandom_range(3) == 0) repeat ($urandom_range(3)) @(negedge clk);
    end
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
