// tb_hexds_controller: runs the HEXDS controller against a behavioural
// datapath (pixel count, SAD lookup, minimum register and position register)
// built in the testbench over random SAD surfaces, some smooth bowls whose
// bottom lies anywhere in the range (so the hexagon walks and hits the range
// edge) and some pure noise. Every visited position, in order, the clock count
// of each search and the number of SADs are compared with the reference model.
// It also counts hexagon steps that move, skips and diamond phases, and fails
// if any of them never happened.
module tb_hexds_controller;
  import me_pkg::*;
  import hexds_ref_pkg::*;
  localparam int W = 7;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst_n, start, en, pix_last, init, pix_clear, pix_inc, pe_clear, pe_valid, cmp;
  logic       busy, done, skip, step_move;
  point_t     min_pos, base_pos, cand_pos;
  phase_t     phase;
  logic [7:0] points;

  hexds_controller #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .en(en), .min_pos(min_pos),
    .pix_last(pix_last), .base_pos(base_pos), .cand_pos(cand_pos), .init(init),
    .pix_clear(pix_clear), .pix_inc(pix_inc), .pe_clear(pe_clear), .pe_valid(pe_valid),
    .cmp(cmp), .busy(busy), .done(done), .phase(phase), .skip(skip),
    .step_move(step_move), .points(points));

  // behavioural datapath
  int sadtab[MAXR][MAXR];
  int pix_n, valid_n, min_sad_m;

  assign pix_last = (pix_n == 255);
  always_comb begin
    en = 1'b0;
    if (cmp) en = sadtab[int'(cand_pos.y)][int'(cand_pos.x)] < min_sad_m;
  end
  always_ff @(posedge clk) begin
    if (pix_clear) pix_n <= 0;
    else if (pix_inc) pix_n <= pix_n + 1;
    if (pe_clear) valid_n <= 0;
    else if (pe_valid) valid_n <= valid_n + 1;
    if (init) min_sad_m <= 32'h7fffffff;
    else if (en) begin
      min_sad_m <= sadtab[int'(cand_pos.y)][int'(cand_pos.x)];
      min_pos   <= cand_pos;
    end
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_move = 0, n_skip = 0, n_sdsp = 0, n_init_only = 0;

  initial begin
    HexdsRef m;
    int tx, ty, cyc, idx, mism;
    m = new(W);
    rst_n = 1'b0; start = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    if (base_pos.x != coord_t'(W) || base_pos.y != coord_t'(W)) begin
      failures++; $display("FAIL base_pos");
    end
    for (int s = 0; s < 120; s++) begin
      tx = int'($urandom_range(2 * W)); ty = int'($urandom_range(2 * W));
      for (int y = 0; y <= 2 * W; y++)
        for (int x = 0; x <= 2 * W; x++) begin
          if (s % 5 == 4) sadtab[y][x] = int'($urandom_range(5000));
          else sadtab[y][x] = 40 * ((x - tx) * (x - tx) + (y - ty) * (y - ty))
                              + int'($urandom_range(30));
          m.sadtab[y][x] = sadtab[y][x];
        end
      m.run();
      @(negedge clk);
      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      cyc = 1;
      idx = 0;
      mism = 0;
      while (!done) begin
        @(posedge clk);
        #1;
        if (cmp) begin
          // DRAIN happened one clock before, so 256 pairs were accumulated
          checks++;
          if (valid_n != 256) begin failures++; $display("FAIL %0d pixel pairs", valid_n); end
          if (idx >= m.ev_x.size() || int'(cand_pos.x) != m.ev_x[idx] || int'(cand_pos.y) != m.ev_y[idx])
            mism++;
          idx++;
        end
        if (skip) n_skip++;
        if (step_move) n_move++;
        if (!done) cyc++;
        if (cyc > 100000) break;
      end
      if (phase == PH_SDSP) n_sdsp++;
      if (m.moves == 0) n_init_only++;
      checks++;
      if (mism != 0 || idx != m.ev_x.size()) begin
        failures++;
        $display("FAIL search %0d: %0d of %0d visits differ, model visits %0d", s, mism, idx, m.ev_x.size());
      end
      checks++;
      if (cyc != m.cycles()) begin
        failures++;
        $display("FAIL search %0d: %0d clocks, expected %0d", s, cyc, m.cycles());
      end
      checks++;
      if (int'(points) != m.ev_x.size()) begin
        failures++;
        $display("FAIL search %0d: points %0d expected %0d", s, points, m.ev_x.size());
      end
      checks++;
      if (int'(min_pos.x) != m.best_x || int'(min_pos.y) != m.best_y) begin
        failures++;
        $display("FAIL search %0d: best (%0d,%0d) expected (%0d,%0d)", s, min_pos.x, min_pos.y, m.best_x, m.best_y);
      end
      checks++;
      if (m.ev_x.size() > 3 * (m.moves + 1) + 8) begin
        failures++;
        $display("FAIL search %0d: %0d points exceed 3n+8", s, m.ev_x.size());
      end
      @(posedge clk);
      #1;
      checks++;
      if (busy || done) begin failures++; $display("FAIL busy after done"); end
    end
    $display("hexagon moves %0d, skips %0d, diamond phases %0d, searches without a move %0d",
             n_move, n_skip, n_sdsp, n_init_only);
    checks += 4;
    if (n_move == 0)      begin failures++; $display("FAIL no hexagon move"); end
    if (n_skip == 0)      begin failures++; $display("FAIL no skip"); end
    if (n_sdsp == 0)      begin failures++; $display("FAIL no diamond"); end
    if (n_init_only == 0) begin failures++; $display("FAIL no immediate switch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
