// me_hexds: motion estimation block with hexagon-diamond search (HEXDS).
//
// Finds the motion vector of one 16x16 block of the current frame inside a
// search area of the reference frame, visiting only the points of the HEXDS
// pattern sequence instead of every position. The host first loads the block
// through the cur_* port (address {row, col}, 8 bits) and the search area
// through the ref_* port (address {row[4:0], col[4:0]}: a (16 + 2W)-pixel
// square stored with rows of 32 pixels; the block's own position, the base
// address, is (W, W)). A one-clock start then runs the search. For each
// candidate position the pixel counters walk the 256 pixel pairs, the
// processing element accumulates their absolute differences, the minimum SAD
// unit compares the finished SAD with the best so far and raises en for a new
// minimum, and the motion vector unit records that candidate's position. The
// HEXDS controller picks the candidates. done pulses for one clock when the
// search ends; mv_x/mv_y (two's complement, |mv| <= W), min_sad and
// search_points (SADs computed) then hold until the next start.
//
// Each SAD takes 259 clocks (see hexds_controller), so a search of P points
// takes about 259 P clocks. The unit structure follows the architecture; the
// memory organisation, the load ports and the serial schedule are this
// design's.
module me_hexds
  import me_pkg::*;
#(
  parameter int W = 7   // search range, -W <= u, v <= W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cur_we,
  input  logic [2*BLK_LOG2-1:0]    cur_waddr,
  input  logic [PIX_W-1:0]         cur_wdata,
  input  logic                     ref_we,
  input  logic [2*PITCH_LOG2-1:0]  ref_waddr,
  input  logic [PIX_W-1:0]         ref_wdata,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output coord_t                   mv_x,
  output coord_t                   mv_y,
  output logic [SAD_W-1:0]         min_sad,
  output logic [7:0]               search_points
);
  if (W < 1 || W > MAX_W) begin : g_range
    $error("me_hexds: W must be between 1 and MAX_W");
  end

  point_t                   base_pos, cand_pos, min_pos, mv;
  logic                     init, pix_clear, pix_inc, pe_clear, pe_valid, cmp, en;
  logic                     pix_last;
  logic [BLK_LOG2-1:0]      row, col;
  logic [2*BLK_LOG2-1:0]    pix_addr;
  logic [2*PITCH_LOG2-1:0]  ref_raddr;
  logic [PIX_W-1:0]         cur_px, ref_px;
  logic [SAD_W-1:0]         sad;
  phase_t                   phase;
  logic                     skip, step_move;

  hexds_controller #(.W(W)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .en       (en),
    .min_pos  (min_pos),
    .pix_last (pix_last),
    .base_pos (base_pos),
    .cand_pos (cand_pos),
    .init     (init),
    .pix_clear(pix_clear),
    .pix_inc  (pix_inc),
    .pe_clear (pe_clear),
    .pe_valid (pe_valid),
    .cmp      (cmp),
    .busy     (busy),
    .done     (done),
    .phase    (phase),
    .skip     (skip),
    .step_move(step_move),
    .points   (search_points)
  );

  pixel_counter u_pix (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(pix_clear),
    .inc  (pix_inc),
    .row  (row),
    .col  (col),
    .addr (pix_addr),
    .last (pix_last)
  );

  // reference address: candidate base address plus the pixel offset
  // {row, col} spread to the 32-pixel row pitch
  always_comb begin
    ref_raddr = {cand_pos.y[PITCH_LOG2-1:0], cand_pos.x[PITCH_LOG2-1:0]}
              + {{(PITCH_LOG2-BLK_LOG2){1'b0}}, row, {(PITCH_LOG2-BLK_LOG2){1'b0}}, col};
  end

  pixel_ram #(.AW(2*BLK_LOG2), .DW(PIX_W)) u_cur_ram (
    .clk  (clk),
    .we   (cur_we),
    .waddr(cur_waddr),
    .wdata(cur_wdata),
    .raddr(pix_addr),
    .rdata(cur_px)
  );

  pixel_ram #(.AW(2*PITCH_LOG2), .DW(PIX_W)) u_ref_ram (
    .clk  (clk),
    .we   (ref_we),
    .waddr(ref_waddr),
    .wdata(ref_wdata),
    .raddr(ref_raddr),
    .rdata(ref_px)
  );

  pe u_pe (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (pe_clear),
    .valid (pe_valid),
    .cur   (cur_px),
    .ref_px(ref_px),
    .sad   (sad)
  );

  min_sad_unit u_min (
    .clk    (clk),
    .rst_n  (rst_n),
    .init   (init),
    .cmp    (cmp),
    .sad_in (sad),
    .en     (en),
    .min_sad(min_sad)
  );

  mv_gen u_mv (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (en),
    .cand_pos(cand_pos),
    .base_pos(base_pos),
    .min_pos (min_pos),
    .mv      (mv)
  );

  assign mv_x = mv.x;
  assign mv_y = mv.y;
endmodule
