// min_sad_unit: keeps the smallest SAD seen and flags each new minimum.
//
// A full comparator is not needed: only "current SAD Y < stored minimum X" is
// used. That is the inverse of the carry out of Y + ~X + 1, so the unit is
// just the carry chain of that adder, with no sum bits. When cmp = 1 and the
// carry out is 0 (Y < X), en rises in the same clock and the minimum register
// takes Y at the clock edge. The same en tells the motion vector unit and the
// controller to record the candidate. init (synchronous) sets the register
// to all ones before a search, so the first SAD always becomes the minimum.
// Ties keep the earlier candidate. The carry-only comparison follows the
// architecture; init and the tie rule's consequence are this design's.
module min_sad_unit
  import me_pkg::*;
#(
  parameter int SAD_W_P = SAD_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               init,
  input  logic               cmp,
  input  logic [SAD_W_P-1:0] sad_in,
  output logic               en,
  output logic [SAD_W_P-1:0] min_sad
);
  logic cout;

  // carry propagation of sad_in + ~min_sad + 1
  always_comb begin
    cout = 1'b1;
    for (int i = 0; i < SAD_W_P; i++)
      cout = (sad_in[i] & ~min_sad[i]) | ((sad_in[i] ^ ~min_sad[i]) & cout);
    en = cmp & ~cout;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    min_sad <= '1;
    else if (init) min_sad <= '1;
    else if (en)   min_sad <= sad_in;
  end
endmodule
