// pixel_counter: walks the pixels of a 16x16 block in raster order.
//
// Two mod-16 counters, column (fast) and row (slow). Each clock with inc = 1
// the column counter advances, and when it wraps the row counter advances.
// Their concatenation {row, col} is the 8-bit pixel address of the current
// block and, spread to the search area's row pitch, the offset added to the
// candidate's base address in the reference memory. last is high while the
// counters point at the final pixel (15, 15). clear (synchronous) returns to
// pixel 0 and wins over inc. Two mod-16 counters follow the architecture; the
// raster order is this design's.
module pixel_counter
  import me_pkg::*;
#(
  parameter int BLK_LOG2_P = BLK_LOG2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    inc,
  output logic [BLK_LOG2_P-1:0]   row,
  output logic [BLK_LOG2_P-1:0]   col,
  output logic [2*BLK_LOG2_P-1:0] addr,
  output logic                    last
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0;
      col <= '0;
    end else if (clear) begin
      row <= '0;
      col <= '0;
    end else if (inc) begin
      col <= col + 1'b1;
      if (&col) row <= row + 1'b1;
    end
  end

  assign addr = {row, col};
  assign last = (&row) & (&col);
endmodule
