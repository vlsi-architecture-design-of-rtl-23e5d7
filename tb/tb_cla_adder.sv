// tb_cla_adder: checks the 16-bit carry look-ahead adder on corner cases
// (carry rippling through every group) and random operands, and an 8-bit
// instance exhaustively, against integer addition.
module tb_cla_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] a, b, s;
  logic        cin, cout;
  logic [7:0]  a8, b8, s8;
  logic        cin8, cout8;

  cla_adder #(.WIDTH(16)) dut  (.a(a),  .b(b),  .cin(cin),  .sum(s),  .cout(cout));
  cla_adder #(.WIDTH(8))  dut8 (.a(a8), .b(b8), .cin(cin8), .sum(s8), .cout(cout8));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] e;
    a = x; b = y; cin = c;
    #1;
    e = {1'b0, x} + {1'b0, y} + {16'd0, c};
    checks++;
    if ({cout, s} !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %b = %b%h, expected %h", x, y, c, cout, s, e);
    end
  endtask

  initial begin
    logic [8:0] e9;
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'h0001, 1'b0);
    check16(16'h7FFF, 16'h0001, 1'b0);
    check16(16'h0FFF, 16'h0001, 1'b0);
    check16(16'h00FF, 16'h0001, 1'b0);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    for (int n = 0; n < 20000; n++) check16(16'($urandom), 16'($urandom), 1'($urandom));
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(i); b8 = 8'(j); cin8 = 1'(c);
          #1;
          e9 = 9'(i + j + c);
          checks++;
          if ({cout8, s8} !== e9) begin
            failures++;
            if (failures < 10) $display("FAIL8 %0d + %0d + %0d", i, j, c);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
