// tb_me_hexds: end-to-end test of the motion estimation block at its default
// size (16x16 blocks, search range W = 7, 30x30 search area).
//
// Each search loads a search area and a current block through the load ports,
// pulses start and waits for done. Image kinds: smooth textures with the
// current block cut from the area at a random displacement (so the hexagon
// walks, often up to the range edge where candidates are skipped), the same
// with noise added, pure noise (the search usually switches to the diamond at
// once) and a flat image (every SAD equal, so ties must keep the centre).
// The testbench computes every SAD from its own copy of the pixels, plays the
// search with the reference model and checks the motion vector, the minimum
// SAD, the number of SADs and the clock count (259 per SAD plus one per
// skipped candidate). It counts hexagon moves, skips, diamond phases,
// immediate switches, negative vectors and ties, and fails if one never
// occurs.
module tb_me_hexds;
  import me_pkg::*;
  import hexds_ref_pkg::*;
  localparam int W    = 7;
  localparam int AREA = 16 + 2 * W;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, cur_we, ref_we, start, busy, done;
  logic [7:0]  cur_waddr, cur_wdata, ref_wdata;
  logic [9:0]  ref_waddr;
  coord_t      mv_x, mv_y;
  logic [15:0] min_sad;
  logic [7:0]  search_points;

  me_hexds dut (
    .clk(clk), .rst_n(rst_n),
    .cur_we(cur_we), .cur_waddr(cur_waddr), .cur_wdata(cur_wdata),
    .ref_we(ref_we), .ref_waddr(ref_waddr), .ref_wdata(ref_wdata),
    .start(start), .busy(busy), .done(done), .mv_x(mv_x), .mv_y(mv_y),
    .min_sad(min_sad), .search_points(search_points));

  int refimg[AREA][AREA];   // [row][col]
  int curimg[16][16];

  initial begin : watchdog
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_move = 0, n_skip = 0, n_sdsp = 0, n_immediate = 0, n_neg = 0, n_tie = 0, n_fs_match = 0;

  // count mechanisms inside the block
  always @(posedge clk) begin
    if (dut.step_move) n_move++;
    if (dut.skip) n_skip++;
    if (dut.cmp && dut.u_min.min_sad == dut.sad) n_tie++;
  end

  function automatic int clamp8(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  task automatic make_images(input int kind, input int u0, input int v0);
    int a, b, c, ph;
    a = int'($urandom_range(6)) + 2; b = int'($urandom_range(6)) + 2;
    c = int'($urandom_range(3)) + 1; ph = int'($urandom_range(50));
    for (int r = 0; r < AREA; r++)
      for (int q = 0; q < AREA; q++)
        case (kind)
          0, 1: refimg[r][q] = clamp8(20 + ph + a * r + b * q + c * (((r - 13) * (r - 13) + (q - 16) * (q - 16)) / 16));
          2:    refimg[r][q] = int'($urandom_range(255));
          default: refimg[r][q] = 77;
        endcase
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        curimg[i][j] = refimg[W + v0 + i][W + u0 + j];
        if (kind == 1) curimg[i][j] = clamp8(curimg[i][j] + int'($urandom_range(6)) - 3);
        if (kind == 2 && $urandom_range(1) == 1) curimg[i][j] = int'($urandom_range(255));
      end
  endtask

  task automatic load_images();
    @(negedge clk);
    for (int r = 0; r < 32; r++)
      for (int q = 0; q < 32; q++) begin
        ref_we = 1'b1; ref_waddr = {5'(r), 5'(q)};
        ref_wdata = (r < AREA && q < AREA) ? 8'(refimg[r][q]) : 8'hA5;
        if (r < 16 && q < 16) begin
          cur_we = 1'b1; cur_waddr = {4'(r), 4'(q)}; cur_wdata = 8'(curimg[r][q]);
        end else cur_we = 1'b0;
        @(negedge clk);
      end
    ref_we = 1'b0; cur_we = 1'b0;
  endtask

  initial begin
    HexdsRef m;
    int kind, u0, v0, cyc, s_total, fs_best, fs_x, fs_y, ev;
    m = new(W);
    rst_n = 1'b0; start = 1'b0; cur_we = 1'b0; ref_we = 1'b0;
    cur_waddr = '0; cur_wdata = '0; ref_waddr = '0; ref_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 40; s++) begin
      kind = (s == 0) ? 3 : ((s % 8 == 7) ? 2 : (s % 3 == 2 ? 1 : 0));
      u0 = int'($urandom_range(2 * W)) - W; v0 = int'($urandom_range(2 * W)) - W;
      make_images(kind, u0, v0);
      load_images();
      // SAD of every position, worked out here
      fs_best = 32'h7fffffff; fs_x = 0; fs_y = 0;
      for (int y = 0; y <= 2 * W; y++)
        for (int x = 0; x <= 2 * W; x++) begin
          s_total = 0;
          for (int i = 0; i < 16; i++)
            for (int j = 0; j < 16; j++) begin
              ev = curimg[i][j] - refimg[y + i][x + j];
              s_total += (ev < 0) ? -ev : ev;
            end
          m.sadtab[y][x] = s_total;
          if (s_total < fs_best) begin fs_best = s_total; fs_x = x; fs_y = y; end
        end
      m.run();
      @(negedge clk);
      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      cyc = 1;
      while (!done && cyc < 100000) begin
        @(posedge clk);
        #1;
        if (!done) cyc++;
      end
      if (dut.phase == PH_SDSP) n_sdsp++;
      if (m.moves == 0) n_immediate++;
      if (mv_x < 0 || mv_y < 0) n_neg++;
      if (m.best_x == fs_x && m.best_y == fs_y) n_fs_match++;
      checks++;
      if (int'(mv_x) != m.best_x - W || int'(mv_y) != m.best_y - W) begin
        failures++;
        $display("FAIL search %0d: mv (%0d,%0d) expected (%0d,%0d)", s, int'(mv_x), int'(mv_y), m.best_x - W, m.best_y - W);
      end
      checks++;
      if (int'(min_sad) != m.best_sad) begin
        failures++;
        $display("FAIL search %0d: min_sad %0d expected %0d", s, min_sad, m.best_sad);
      end
      checks++;
      if (int'(search_points) != m.ev_x.size()) begin
        failures++;
        $display("FAIL search %0d: %0d SADs expected %0d", s, search_points, m.ev_x.size());
      end
      checks++;
      if (cyc != m.cycles()) begin
        failures++;
        $display("FAIL search %0d: %0d clocks expected %0d", s, cyc, m.cycles());
      end
      if (kind == 0) begin
        // noiseless smooth texture: the true displacement has SAD 0
        checks++;
        if (m.best_sad == 0 && (int'(mv_x) != u0 || int'(mv_y) != v0) && fs_best == 0 && m.sadtab[W + v0][W + u0] != 0) begin
          failures++;
          $display("FAIL search %0d: SAD 0 away from the displacement", s);
        end
      end
      $display("search %0d kind %0d true (%0d,%0d) mv (%0d,%0d) sad %0d points %0d clocks %0d",
               s, kind, u0, v0, int'(mv_x), int'(mv_y), min_sad, search_points, cyc);
    end
    $display("hexagon moves %0d, skips %0d, diamond phases %0d, immediate switches %0d, negative mv %0d, ties %0d, equal to full search %0d of 40",
             n_move, n_skip, n_sdsp, n_immediate, n_neg, n_tie, n_fs_match);
    checks += 6;
    if (n_move == 0)      begin failures++; $display("FAIL no hexagon move"); end
    if (n_skip == 0)      begin failures++; $display("FAIL no skip"); end
    if (n_sdsp == 0)      begin failures++; $display("FAIL no diamond"); end
    if (n_immediate == 0) begin failures++; $display("FAIL no immediate switch"); end
    if (n_neg == 0)       begin failures++; $display("FAIL no negative vector"); end
    if (n_tie == 0)       begin failures++; $display("FAIL no tie"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
