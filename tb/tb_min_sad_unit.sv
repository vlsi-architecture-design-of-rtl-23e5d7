// tb_min_sad_unit: presents sequences of random SADs (small range, so ties
// happen) and checks en and the minimum register against a running minimum
// kept in the testbench. Also checks init and that en is low without cmp.
module tb_min_sad_unit;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, init, cmp, en;
  logic [15:0] sad_in, min_sad;

  min_sad_unit dut (.clk(clk), .rst_n(rst_n), .init(init), .cmp(cmp),
                    .sad_in(sad_in), .en(en), .min_sad(min_sad));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model, v, ties;
    ties = 0;
    rst_n = 1'b0; init = 1'b0; cmp = 1'b0; sad_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 200; s++) begin
      @(negedge clk);
      init = 1'b1; cmp = 1'b0;
      @(negedge clk);
      init = 1'b0;
      model = 65535;
      checks++;
      if (min_sad != 16'hFFFF) begin failures++; $display("FAIL init"); end
      for (int n = 0; n < 12; n++) begin
        v = (s % 4 == 0) ? int'($urandom_range(65535)) : int'($urandom_range(40) + 1000);
        sad_in = 16'(v);
        cmp = 1'($urandom_range(3) != 0);
        #1;
        checks++;
        if (en !== (cmp && v < model)) begin
          failures++;
          $display("FAIL en: sad %0d min %0d cmp %b en %b", v, model, cmp, en);
        end
        if (cmp && v == model) ties++;
        @(negedge clk);
        if (cmp && v < model) model = v;
        checks++;
        if (int'(min_sad) != model) begin
          failures++;
          $display("FAIL min: got %0d expected %0d", min_sad, model);
        end
      end
      cmp = 1'b0;
    end
    checks++;
    if (ties == 0) begin failures++; $display("FAIL no tie exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
