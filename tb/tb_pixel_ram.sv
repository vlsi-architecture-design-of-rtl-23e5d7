// tb_pixel_ram: fills a 1024-word memory with a known pattern, reads it back
// in random order checking the one-clock read latency, and checks that a
// write lands only at its address.
module tb_pixel_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we;
  logic [9:0] waddr, raddr;
  logic [7:0] wdata, rdata;

  pixel_ram #(.AW(10), .DW(8)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                    .raddr(raddr), .rdata(rdata));

  function automatic logic [7:0] pat(input int adr);
    return 8'((adr * 37 + (adr >> 5) * 11) ^ 8'h5A);
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ad, prev;
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 10'(i); wdata = pat(i);
    end
    @(negedge clk);
    we = 1'b0;
    prev = -1;
    for (int n = 0; n < 3000; n++) begin
      ad = int'($urandom_range(1023));
      raddr = 10'(ad);
      @(negedge clk);
      checks++;
      if (rdata != pat(ad)) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d: %h expected %h", ad, rdata, pat(ad));
      end
    end
    // single overwrite
    we = 1'b1; waddr = 10'd300; wdata = 8'hC3;
    @(negedge clk);
    we = 1'b0;
    raddr = 10'd300;
    @(negedge clk);
    checks++;
    if (rdata != 8'hC3) begin failures++; $display("FAIL overwrite"); end
    raddr = 10'd301;
    @(negedge clk);
    checks++;
    if (rdata != pat(301)) begin failures++; $display("FAIL neighbour"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
