// tb_abs_diff_unit: exhaustive check of |cur - ref_px| for 8-bit pixels
// against the absolute value computed with integers.
module tb_abs_diff_unit;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] cur, ref_px, absdiff;

  abs_diff_unit #(.WIDTH(8)) dut (.cur(cur), .ref_px(ref_px), .absdiff(absdiff));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        cur = 8'(i); ref_px = 8'(j);
        #1;
        e = (i > j) ? i - j : j - i;
        checks++;
        if (int'(absdiff) != e) begin
          failures++;
          if (failures < 10) $display("FAIL |%0d - %0d| = %0d, expected %0d", i, j, absdiff, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
