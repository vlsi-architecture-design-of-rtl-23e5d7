// tb_pe: feeds the processing element 256 random pixel pairs per block, one
// per clock, and compares the SAD with the sum of integer absolute
// differences. Also checks that clear empties the register, that valid = 0
// holds it, the one-clock latency, and the full-scale SAD 256 * 255.
module tb_pe;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, clear, valid;
  logic [7:0]  cur, ref_px;
  logic [15:0] sad;

  pe dut (.clk(clk), .rst_n(rst_n), .clear(clear), .valid(valid),
          .cur(cur), .ref_px(ref_px), .sad(sad));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // one block of 256 pairs; mode 0 random, 1 full scale (0 vs 255)
  task automatic run_block(input int mode);
    int e, ci, ri;
    e = 0;
    @(negedge clk);
    clear = 1'b1; valid = 1'b0;
    @(negedge clk);
    check(int'(sad), 0, "cleared");
    clear = 1'b0;
    for (int k = 0; k < 256; k++) begin
      if (mode == 1) begin
        ci = (k % 2 == 0) ? 0 : 255; ri = 255 - ci;
      end else begin
        ci = int'($urandom_range(255)); ri = int'($urandom_range(255));
      end
      cur = 8'(ci); ref_px = 8'(ri); valid = 1'b1;
      e += (ci > ri) ? ci - ri : ri - ci;
      @(negedge clk);
      check(int'(sad), e, "running sum");  // added at the edge just passed
      if (k == 100) begin
        // a gap with valid low must not change the sum
        valid = 1'b0; cur = 8'd0; ref_px = 8'd200;
        @(negedge clk);
        check(int'(sad), e, "hold");
      end
    end
    valid = 1'b0;
    @(negedge clk);
    check(int'(sad), e, "final");
  endtask

  initial begin
    rst_n = 1'b0; clear = 1'b0; valid = 1'b0; cur = '0; ref_px = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 8; b++) run_block(0);
    run_block(1);
    check(int'(sad), 256 * 255, "full scale");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
