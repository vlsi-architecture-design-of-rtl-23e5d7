// tb_pixel_counter: steps the counters with random gaps in inc and checks the
// raster order, the {row, col} address, last at pixel 255, the wrap to 0 and
// clear.
module tb_pixel_counter;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst_n, clear, inc, last;
  logic [3:0] row, col;
  logic [7:0] addr;

  pixel_counter dut (.clk(clk), .rst_n(rst_n), .clear(clear), .inc(inc),
                     .row(row), .col(col), .addr(addr), .last(last));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst_n = 1'b0; clear = 1'b0; inc = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    n = 0;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      checks++;
      if (int'(row) != (n / 16) % 16 || int'(col) != n % 16 || int'(addr) != n % 256 ||
          last !== (n % 256 == 255)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d row=%0d col=%0d addr=%0d last=%b", n, row, col, addr, last);
      end
      inc = 1'($urandom_range(3) != 0);
      if (inc) n++;
    end
    @(negedge clk);
    inc = 1'b0; clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    checks++;
    if (addr != 8'd0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
