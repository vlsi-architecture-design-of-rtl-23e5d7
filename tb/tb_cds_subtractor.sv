// tb_cds_subtractor: exhaustive check of the 8-bit conditional difference
// subtractor, plus random checks of a 13-bit instance (a width that is not a
// power of two). Expected values come from the simulator's own subtraction.
module tb_cds_subtractor;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  a, b, d;
  logic        bout;
  logic [12:0] a13, b13, d13;
  logic        bout13;

  cds_subtractor #(.WIDTH(8))  dut   (.a(a),   .b(b),   .d(d),   .bout(bout));
  cds_subtractor #(.WIDTH(13)) dut13 (.a(a13), .b(b13), .d(d13), .bout(bout13));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0]  exp9;
    logic [13:0] exp14;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        exp9 = {1'b0, a} - {1'b0, b};
        checks++;
        if ({bout, d} !== exp9) begin
          failures++;
          if (failures < 10) $display("FAIL %0d - %0d: got bout=%b d=%h", i, j, bout, d);
        end
      end
    for (int n = 0; n < 5000; n++) begin
      a13 = 13'($urandom); b13 = 13'($urandom);
      #1;
      exp14 = {1'b0, a13} - {1'b0, b13};
      checks++;
      if ({bout13, d13} !== exp14) begin
        failures++;
        if (failures < 10) $display("FAIL13 %0d - %0d", a13, b13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
