// abs_diff_unit: |cur - ref_px| for one pixel pair.
//
// The conditional difference subtractor forms D = cur - ref_px and its borrow
// Bout. When there is no borrow, D is the answer. When there is one, the
// answer is the two's complement of D, produced by a controlled correction
// chain instead of an inverter, an incrementer and a multiplexer:
//   I_m = (D_m | I_{m-1}) & Bout,   Y_m = D_m ^ I_{m-1},   I_{-1} = 0.
// The chain keeps every bit up to and including the lowest 1 of D and inverts
// the ones above it, which is the two's complement, and passes D unchanged when
// Bout = 0. Purely combinational. The structure follows the architecture; the
// chain start (0 below the least significant bit) is this design's reading of
// the correction equations.
module abs_diff_unit #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] cur,
  input  logic [WIDTH-1:0] ref_px,
  output logic [WIDTH-1:0] absdiff
);
  logic [WIDTH-1:0] diff;
  logic             bout;

  cds_subtractor #(.WIDTH(WIDTH)) u_cds (
    .a   (cur),
    .b   (ref_px),
    .d   (diff),
    .bout(bout)
  );

  // controlled two's complement correction
  always_comb begin
    logic chain;
    chain = 1'b0;
    for (int m = 0; m < WIDTH; m++) begin
      absdiff[m] = diff[m] ^ chain;
      chain      = (diff[m] | chain) & bout;
    end
  end
endmodule
