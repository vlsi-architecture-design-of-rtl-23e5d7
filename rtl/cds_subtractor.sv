// cds_subtractor: conditional difference subtractor, d = a - b with borrow out.
//
// Built like a conditional sum adder. Every bit cell forms the difference bit
// and the borrow out twice, once for a borrow in of 0 and once for 1. Pairs of
// neighbouring groups are then merged level by level (group size 1, 2, 4, ...):
// the upper group's two results are selected by the lower group's two borrows.
// After log2(WIDTH) levels the results for a borrow in of 0 are the outputs.
// Purely combinational. bout = 1 exactly when a < b (unsigned), in which case
// d holds the two's complement form of the negative difference.
// The subtractor type follows the architecture; the cell details and the
// pixel width are this design's.
module cds_subtractor #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] d,
  output logic             bout
);
  // Per bit: difference and borrow of the group holding the bit, for a group
  // borrow in of 0 (d0/b0) and of 1 (d1/b1). The group borrow is valid at the
  // group's top bit.
  function automatic logic [WIDTH:0] cond_diff(input logic [WIDTH-1:0] x,
                                               input logic [WIDTH-1:0] y);
    logic [WIDTH-1:0] d0, d1, b0, b1;
    logic [WIDTH-1:0] n_d0, n_d1, n_b0, n_b1;
    int lo_top;
    // conditional cells
    for (int i = 0; i < WIDTH; i++) begin
      d0[i] = x[i] ^ y[i];
      b0[i] = ~x[i] & y[i];
      d1[i] = ~(x[i] ^ y[i]);
      b1[i] = ~x[i] | y[i];
    end
    // merge levels
    for (int s = 0; (1 << s) < WIDTH; s++) begin
      n_d0 = d0; n_d1 = d1; n_b0 = b0; n_b1 = b1;
      for (int i = 0; i < WIDTH; i++) begin
        if (((i >> s) & 1) == 1) begin
          lo_top = ((i >> s) << s) - 1;
          n_d0[i] = b0[lo_top] ? d1[i] : d0[i];
          n_d1[i] = b1[lo_top] ? d1[i] : d0[i];
          n_b0[i] = b0[lo_top] ? b1[i] : b0[i];
          n_b1[i] = b1[lo_top] ? b1[i] : b0[i];
        end
      end
      d0 = n_d0; d1 = n_d1; b0 = n_b0; b1 = n_b1;
    end
    return {b0[WIDTH-1], d0};
  endfunction

  always_comb begin
    {bout, d} = cond_diff(a, b);
  end
endmodule
