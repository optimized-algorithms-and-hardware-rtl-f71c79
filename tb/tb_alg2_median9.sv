// tb_alg2_median9: self-checking test of the approximate 3x3 median unit.
// Drives (1) the two worked example windows {55,201,10,60,40,28,77,11,44}
// -> 44 and {46,55,48,60,40,28,77,11,44} -> 46, (2) every one of the 9!
// orderings of nine distinct values back to back, one per clock, and
// (3) random windows with many repeated values and random input gaps.
// Each result is compared with a step-by-step software model of the
// algorithm and must appear exactly nine clocks after its window entered.
// The model must give the true median for both examples. Its hit rate
// against the true median over all 9! orderings is reported and must lie
// between 75% and 95% (it is 298624 of 362880, 82.3%).
module tb_alg2_median9;
  import median_ref_pkg::*;
  localparam int LAT = 9;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  pix_t in_win [9];
  logic out_valid;
  pix_t out_pix;

  int checks = 0, failures = 0;
  longint hits = 0, sent = 0;
  longint cyc = 0;
  pix_t   exp_q [$];
  longint t_q   [$];

  alg2_median9 dut (.clk, .rst_n, .in_valid, .in_win, .out_valid, .out_pix);

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
    exp_q.push_back(alg2_model(w)); hits += (alg2_model(w) == true_median(w)); sent++; t_q.push_back(cyc);
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
    send('{55, 201, 10, 60, 40, 28, 77, 11, 44});
    send('{46, 55, 48, 60, 40, 28, 77, 11, 44});
    // the worked example windows must give their true medians
    checks += 2;
    if (alg2_model('{55, 201, 10, 60, 40, 28, 77, 11, 44}) != 44) failures++;
    if (alg2_model('{46, 55, 48, 60, 40, 28, 77, 11, 44}) != 46) failures++;
    hits = 0;
    // every ordering of 0..8, back to back
    foreach (a[i]) a[i] = pix_t'(i);
    do begin
      w = a;
      send(w);
    end while (next_perm(a));
    checks++;
    $display("hit rate over all orderings: %0d / %0d", hits, sent - 2);
    if (hits * 100 < (sent - 2) * 75 || hits * 100 > (sent - 2) * 95) begin
      failures++; $display("FAIL: hit rate out of range");
    end
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
