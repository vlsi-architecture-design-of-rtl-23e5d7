// hexds_controller: sequences the hexagon-diamond search (HEXDS).
//
// Algorithm. The search starts with the large hexagon around the base
// address: the centre and its six corners (counter 0..5 of a mod-6 counter,
// corner addresses from hex_addr_gen). If a corner beats the centre, that
// corner becomes the new centre and only three new corners need a SAD: the
// winning corner's count k and its neighbours k-1 and k+1 (mod 6), from a
// decrementer and an incrementer on the stored count. Large hexagon steps
// repeat until a step ends with the minimum still at its centre. The search
// then evaluates the four points of the small diamond around that centre
// (two-bit counter, sdsp_addr_gen) once, and stops. At most 3n + 8 SADs are
// computed for n large hexagons.
//
// Timing per candidate: one ADDR clock (address formed, PE and pixel counter
// cleared), 256 RUN clocks (one pixel read per clock), one DRAIN clock (the
// last read reaches the PE), one CMP clock (cmp = 1; en from the minimum SAD
// unit records the candidate): 259 clocks. A candidate outside the search
// range |x - W|, |y - W| <= W costs one clock and is never evaluated. done
// is a one-clock pulse in the clock after the last CMP or skip, so a search
// that computes P SADs and skips S candidates shows done P*259 + S clocks after
// the edge that sampled start.
//
// The pattern order, the counter/incrementer/decrementer scheme and the switch
// to the diamond follow the architecture. The serial one-candidate-at-a-time
// schedule, the range check and the single diamond step (inferred from the
// 3n + 8 bound) are this design's.
module hexds_controller
  import me_pkg::*;
#(
  parameter int W = 7
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       en,         // new minimum at this CMP clock
  input  point_t     min_pos,    // position of the current minimum
  input  logic       pix_last,   // pixel counter at the block's last pixel
  output point_t     base_pos,   // position of the current block, (W, W)
  output point_t     cand_pos,   // candidate being evaluated
  output logic       init,       // start of a search: reset the minimum
  output logic       pix_clear,
  output logic       pix_inc,
  output logic       pe_clear,
  output logic       pe_valid,
  output logic       cmp,
  output logic       busy,
  output logic       done,
  output phase_t     phase,
  output logic       skip,       // candidate out of range, skipped this clock
  output logic       step_move,  // a large hexagon step ends with a new centre
  output logic [7:0] points      // SADs computed in this search
);
  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_RUN, S_DRAIN, S_CMP, S_DONE} state_t;

  state_t     state;
  point_t     center;      // centre of the present pattern
  logic [2:0] cnt;         // mod-6 counter / step index / diamond counter
  logic [2:0] k_step;      // count of the corner that became this step's centre
  logic [2:0] k_min;       // count of the best corner in this step
  logic       at_center;   // initial hexagon: centre point not yet evaluated
  logic       moved;       // a corner beat the centre in this step
  logic       pe_valid_q;

  logic [2:0] hex_a, k_dec, k_inc;
  point_t     hex_pos, sdsp_pos;
  logic       cand_ok;
  logic       last_of_step;
  logic       advance;
  logic       moved_now;

  assign base_pos = '{x: coord_t'(W), y: coord_t'(W)};

  // decrementer and incrementer, modulo 6
  always_comb begin
    k_dec = (k_step == 3'd0) ? 3'd5 : k_step - 3'd1;
    k_inc = (k_step == 3'd5) ? 3'd0 : k_step + 3'd1;
    case (cnt)
      3'd0:    hex_a = k_dec;
      3'd1:    hex_a = k_step;
      default: hex_a = k_inc;
    endcase
    if (phase == PH_INIT_HEX) hex_a = cnt;
  end

  hex_addr_gen u_hex (
    .a     (hex_a),
    .center(center),
    .pos   (hex_pos)
  );

  sdsp_addr_gen u_sdsp (
    .a     (cnt[1:0]),
    .center(center),
    .pos   (sdsp_pos)
  );

  always_comb begin
    if (phase == PH_SDSP)                        cand_pos = sdsp_pos;
    else if (phase == PH_INIT_HEX && at_center)  cand_pos = center;
    else                                         cand_pos = hex_pos;
    cand_ok = (cand_pos.x >= 0) && (cand_pos.x <= coord_t'(2*W)) &&
              (cand_pos.y >= 0) && (cand_pos.y <= coord_t'(2*W));
  end

  always_comb begin
    case (phase)
      PH_INIT_HEX: last_of_step = !at_center && cnt == 3'd5;
      PH_HEX_STEP: last_of_step = cnt == 3'd2;
      default:     last_of_step = cnt == 3'd3;
    endcase
    advance   = (state == S_CMP) || (state == S_ADDR && !cand_ok);
    moved_now = moved || (en && !(phase == PH_INIT_HEX && at_center));
  end

  assign init      = (state == S_IDLE) && start;
  assign pix_clear = (state == S_ADDR);
  assign pe_clear  = (state == S_ADDR);
  assign pix_inc   = (state == S_RUN);
  assign pe_valid  = pe_valid_q;
  assign cmp       = (state == S_CMP);
  assign busy      = (state != S_IDLE);
  assign done      = (state == S_DONE);
  assign skip      = (state == S_ADDR) && !cand_ok;
  assign step_move = advance && last_of_step && phase != PH_SDSP && moved_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      phase      <= PH_INIT_HEX;
      center     <= '0;
      cnt        <= '0;
      k_step     <= '0;
      k_min      <= '0;
      at_center  <= 1'b0;
      moved      <= 1'b0;
      pe_valid_q <= 1'b0;
      points     <= '0;
    end else begin
      pe_valid_q <= (state == S_RUN);
      if (state == S_CMP && en) begin
        if (!(phase == PH_INIT_HEX && at_center)) moved <= 1'b1;
        k_min <= hex_a;
      end

      case (state)
        S_IDLE: begin
          if (start) begin
            state     <= S_ADDR;
            phase     <= PH_INIT_HEX;
            center    <= base_pos;
            cnt       <= '0;
            at_center <= 1'b1;
            moved     <= 1'b0;
            points    <= '0;
          end
        end
        S_ADDR: begin
          if (cand_ok) begin
            state  <= S_RUN;
            points <= points + 8'd1;
          end
        end
        S_RUN:   if (pix_last) state <= S_DRAIN;
        S_DRAIN: state <= S_CMP;
        S_DONE:  state <= S_IDLE;
        default: ;
      endcase

      if (advance) begin
        state <= S_ADDR;
        if (phase == PH_INIT_HEX && at_center) begin
          at_center <= 1'b0;
        end else if (!last_of_step) begin
          cnt <= cnt + 3'd1;
        end else if (phase == PH_SDSP) begin
          state <= S_DONE;
        end else begin
          cnt   <= '0;
          moved <= 1'b0;
          if (moved_now) begin
            // the best corner becomes the centre of the next large hexagon
            phase  <= PH_HEX_STEP;
            center <= (state == S_CMP && en) ? cand_pos : min_pos;
            k_step <= (state == S_CMP && en) ? hex_a : k_min;
          end else begin
            phase <= PH_SDSP;
          end
        end
      end
    end
  end
endmodule
