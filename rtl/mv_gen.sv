// mv_gen: motion vector generation.
//
// A register stores the candidate address (x, y) whenever en from the minimum
// SAD unit is high, so it always holds the position of the smallest SAD so
// far. Two subtractors form the motion vector mv = min_pos - base_pos, where
// base_pos is the position of the current block. Addresses are two's
// complement. min_pos changes at the edge that ends a clock with en = 1; mv
// follows combinationally. Structure as in the architecture; widths are this
// design's.
module mv_gen
  import me_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  point_t cand_pos,
  input  point_t base_pos,
  output point_t min_pos,
  output point_t mv
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  min_pos <= '0;
    else if (en) min_pos <= cand_pos;
  end

  always_comb begin
    mv.x = min_pos.x - base_pos.x;
    mv.y = min_pos.y - base_pos.y;
  end
endmodule
