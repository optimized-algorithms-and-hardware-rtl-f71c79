// tb_cmp_swap: exhaustive check of the compare-exchange cell for every pair
// of 8-bit inputs: s must be the smaller, l the larger, and swapped must be
// set exactly when a > b.
module tb_cmp_swap;
  logic [7:0] a, b, s, l;
  logic swapped;
  int checks = 0, failures = 0;

  cmp_swap #(.W(8)) dut (.a, .b, .s, .l, .swapped);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (s != 8'((i < j) ? i : j) || l != 8'((i < j) ? j : i) || swapped != (i > j)) begin
          failures++;
          if (failures < 10) $display("FAIL: a=%0d b=%0d s=%0d l=%0d sw=%0b", a, b, s, l, swapped);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
