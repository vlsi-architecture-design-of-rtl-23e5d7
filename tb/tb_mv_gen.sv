// tb_mv_gen: checks that the motion vector unit records the candidate only
// when en is high and that mv = recorded position - base position, with
// negative components.
module tb_mv_gen;
  import me_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   rst_n, en;
  point_t cand_pos, base_pos, min_pos, mv;

  mv_gen dut (.clk(clk), .rst_n(rst_n), .en(en), .cand_pos(cand_pos),
              .base_pos(base_pos), .min_pos(min_pos), .mv(mv));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mx, my, bx, by, cx, cy;
    rst_n = 1'b0; en = 1'b0; cand_pos = '0; base_pos = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    mx = 0; my = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      bx = int'($urandom_range(14)); by = int'($urandom_range(14));
      cx = int'($urandom_range(18)) - 2; cy = int'($urandom_range(18)) - 2;
      base_pos.x = coord_t'(bx); base_pos.y = coord_t'(by);
      cand_pos.x = coord_t'(cx); cand_pos.y = coord_t'(cy);
      en = 1'($urandom_range(1));
      @(negedge clk);
      if (en) begin mx = cx; my = cy; end
      checks++;
      if (int'(min_pos.x) != mx || int'(min_pos.y) != my) begin
        failures++;
        $display("FAIL min_pos (%0d,%0d) expected (%0d,%0d)", min_pos.x, min_pos.y, mx, my);
      end
      checks++;
      if (int'(mv.x) != mx - bx || int'(mv.y) != my - by) begin
        failures++;
        $display("FAIL mv (%0d,%0d) expected (%0d,%0d)", mv.x, mv.y, mx - bx, my - by);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
