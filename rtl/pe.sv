// pe: processing element, accumulates the SAD of one candidate block.
//
// Each clock with valid = 1 the absolute difference unit forms |cur - ref_px|
// and the carry look-ahead adder adds it to the SAD register. Over the 256
// pixel pairs of a 16x16 block the register ends up holding the SAD of the
// candidate. clear (synchronous) empties the register before a new candidate;
// it takes precedence over valid. sad is the register output, so a pair given
// in clock t shows in sad after the edge that ends clock t.
// Absolute difference unit plus adder plus register follow the architecture;
// the clear input, the reset and the widths are this design's.
module pe
  import me_pkg::*;
#(
  parameter int PIX_W_P = PIX_W,
  parameter int SAD_W_P = SAD_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               valid,
  input  logic [PIX_W_P-1:0] cur,
  input  logic [PIX_W_P-1:0] ref_px,
  output logic [SAD_W_P-1:0] sad
);
  logic [PIX_W_P-1:0] ad;
  logic [SAD_W_P-1:0] acc_next;
  logic               acc_cout;   // never set: SAD_W_P holds 256 full-scale differences

  abs_diff_unit #(.WIDTH(PIX_W_P)) u_ad (
    .cur    (cur),
    .ref_px (ref_px),
    .absdiff(ad)
  );

  cla_adder #(.WIDTH(SAD_W_P)) u_add (
    .a   (sad),
    .b   ({{(SAD_W_P-PIX_W_P){1'b0}}, ad}),
    .cin (1'b0),
    .sum (acc_next),
    .cout(acc_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sad <= '0;
    else if (clear) sad <= '0;
    else if (valid) sad <= acc_next;
  end
endmodule
