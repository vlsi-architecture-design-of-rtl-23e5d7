// tb_frame_workload: motion estimation of whole frames at two of the
// evaluated sizes, 352x288 and 720x480, with 16x16 blocks and search range 7.
//
// The sequences themselves are not available, so each frame pair is made
// here: a reference frame of smooth texture with mild noise, and a current
// frame that is the reference moved by a global motion, with a rectangular
// object moving differently. For each block the testbench loads the block and
// its search area (pixels outside the frame are padded by repeating the edge
// pixel), runs a search and checks the motion vector, minimum SAD, SAD count
// and clock count against the reference model fed with SADs computed here.
// It reports the average number of search points per block, the clocks per
// frame and how many blocks found the motion that made them.
module tb_frame_workload;
  import me_pkg::*;
  import hexds_ref_pkg::*;
  localparam int W    = 7;
  localparam int AREA = 16 + 2 * W;
  localparam int MAXH = 480;
  localparam int MAXWD = 720;
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

  byte unsigned fref[MAXH][MAXWD];
  byte unsigned fcur[MAXH][MAXWD];
  int           area[AREA][AREA];
  int           blk[16][16];

  initial begin : watchdog
    repeat (30000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  // smooth texture: sum of two slow waves built from triangle functions
  function automatic int texture(int r, int c);
    int t1, t2;
    t1 = (r * 3 + c * 2) % 64;  t1 = t1 < 32 ? t1 : 63 - t1;
    t2 = (c * 5 - r * 2 + 4096) % 90; t2 = t2 < 45 ? t2 : 89 - t2;
    return 40 + 3 * t1 + 2 * t2;
  endfunction

  task automatic make_frames(input int h, input int wd, input int gu, input int gv,
                             input int ou, input int ov);
    for (int r = 0; r < h; r++)
      for (int c = 0; c < wd; c++)
        fref[r][c] = 8'(clampi(texture(r, c) + int'($urandom_range(4)) - 2, 0, 255));
    // current(r, c) = reference(r + v, c + u): a block at (bx, by) matches at (bx + u, by + v)
    for (int r = 0; r < h; r++)
      for (int c = 0; c < wd; c++) begin
        int u, v;
        u = gu; v = gv;
        if (r >= h / 3 && r < h / 3 + 64 && c >= wd / 3 && c < wd / 3 + 96) begin u = ou; v = ov; end
        fcur[r][c] = fref[clampi(r + v, 0, h - 1)][clampi(c + u, 0, wd - 1)];
      end
  endtask

  task automatic run_frame(input int h, input int wd, input int gu, input int gv,
                           input int ou, input int ov);
    HexdsRef m;
    int nblk, npts, ncyc, ntrue, cyc, s_total, ev, bx, by;
    m = new(W);
    make_frames(h, wd, gu, gv, ou, ov);
    nblk = 0; npts = 0; ncyc = 0; ntrue = 0;
    for (int byi = 0; byi < h / 16; byi++)
      for (int bxi = 0; bxi < wd / 16; bxi++) begin
        by = byi * 16; bx = bxi * 16;
        for (int r = 0; r < AREA; r++)
          for (int c = 0; c < AREA; c++)
            area[r][c] = int'(fref[clampi(by - W + r, 0, h - 1)][clampi(bx - W + c, 0, wd - 1)]);
        for (int i = 0; i < 16; i++)
          for (int j = 0; j < 16; j++) blk[i][j] = int'(fcur[by + i][bx + j]);
        // load
        @(negedge clk);
        for (int r = 0; r < AREA; r++)
          for (int c = 0; c < AREA; c++) begin
            ref_we = 1'b1; ref_waddr = {5'(r), 5'(c)}; ref_wdata = 8'(area[r][c]);
            if (r < 16 && c < 16) begin
              cur_we = 1'b1; cur_waddr = {4'(r), 4'(c)}; cur_wdata = 8'(blk[r][c]);
            end else cur_we = 1'b0;
            @(negedge clk);
          end
        ref_we = 1'b0; cur_we = 1'b0;
        // expected
        for (int y = 0; y <= 2 * W; y++)
          for (int x = 0; x <= 2 * W; x++) begin
            s_total = 0;
            for (int i = 0; i < 16; i++)
              for (int j = 0; j < 16; j++) begin
                ev = blk[i][j] - area[y + i][x + j];
                s_total += (ev < 0) ? -ev : ev;
              end
            m.sadtab[y][x] = s_total;
          end
        m.run();
        start = 1'b1;
        @(posedge clk);
        #1 start = 1'b0;
        cyc = 1;
        while (!done && cyc < 100000) begin
          @(posedge clk);
          #1;
          if (!done) cyc++;
        end
        checks++;
        if (int'(mv_x) != m.best_x - W || int'(mv_y) != m.best_y - W || int'(min_sad) != m.best_sad ||
            int'(search_points) != m.ev_x.size() || cyc != m.cycles()) begin
          failures++;
          if (failures < 10)
            $display("FAIL block (%0d,%0d): mv (%0d,%0d) sad %0d pts %0d clk %0d, expected (%0d,%0d) %0d %0d %0d",
                     bx, by, int'(mv_x), int'(mv_y), min_sad, search_points, cyc,
                     m.best_x - W, m.best_y - W, m.best_sad, m.ev_x.size(), m.cycles());
        end
        nblk++;
        npts += int'(search_points);
        ncyc += cyc;
        if ((int'(mv_x) == gu && int'(mv_y) == gv) || (int'(mv_x) == ou && int'(mv_y) == ov)) ntrue++;
        @(negedge clk);
      end
    $display("frame %0dx%0d: %0d blocks, %0d.%02d search points per block, %0d search clocks per frame, %0d blocks found the applied motion",
             wd, h, nblk, npts / nblk, (npts * 100 / nblk) % 100, ncyc, ntrue);
    checks++;
    if (ntrue * 2 < nblk) begin
      failures++;
      $display("FAIL fewer than half the blocks found the applied motion");
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; cur_we = 1'b0; ref_we = 1'b0;
    cur_waddr = '0; cur_wdata = '0; ref_waddr = '0; ref_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_frame(288, 352, 2, -1, -5, 3);
    run_frame(480, 720, -3, 2, 6, -4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
