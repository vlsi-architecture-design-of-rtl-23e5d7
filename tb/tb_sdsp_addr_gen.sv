// tb_sdsp_addr_gen: for every counter value 0..3 and many centres checks the
// diamond point against the offsets (+1,0) (0,-1) (-1,0) (0,+1).
module tb_sdsp_addr_gen;
  import me_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] a;
  point_t     center, pos;
  int         ox[4] = '{1, 0, -1, 0};
  int         oy[4] = '{0, -1, 0, 1};

  sdsp_addr_gen dut (.a(a), .center(center), .pos(pos));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cx = 0; cx <= 16; cx++)
      for (int cy = 0; cy <= 16; cy++)
        for (int k = 0; k < 4; k++) begin
          a = 2'(k); center.x = coord_t'(cx); center.y = coord_t'(cy);
          #1;
          checks++;
          if (int'(pos.x) != cx + ox[k] || int'(pos.y) != cy + oy[k]) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%0d c=(%0d,%0d) pos=(%0d,%0d)", k, cx, cy, pos.x, pos.y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
