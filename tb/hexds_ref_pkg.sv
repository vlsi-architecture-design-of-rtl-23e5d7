// hexds_ref_pkg: behavioural reference model of the hexagon-diamond search,
// used by the testbenches to work out independently which positions the
// hardware must visit, which skips it must make, the resulting motion vector
// and minimum SAD, and the clock count.
//
// The model is given the SAD of every position of a (2W+1) x (2W+1) search
// range (positions 0..2W, block at (W, W)) and plays the algorithm: centre and
// six hexagon corners; while a corner wins, re-centre there and try the
// winning corner's count and its two neighbours (mod 6); then the four
// diamond points once. A win needs a strictly smaller SAD. Positions outside
// the range are skipped.
package hexds_ref_pkg;
  localparam int MAXR = 17;
  localparam int CLK_PER_SAD = 259;

  class HexdsRef;
    int w;
    int sadtab[MAXR][MAXR];   // [y][x]
    int ev_x[$], ev_y[$];
    int skips, moves, best_x, best_y, best_sad;

    function new(int w_in);
      w = w_in;
    endfunction

    local function bit inside_range(int x, int y);
      return x >= 0 && x <= 2 * w && y >= 0 && y <= 2 * w;
    endfunction

    // visit one position; returns 1 when it became the minimum
    local function bit visit(int x, int y);
      if (!inside_range(x, y)) begin
        skips++;
        return 1'b0;
      end
      ev_x.push_back(x);
      ev_y.push_back(y);
      if (sadtab[y][x] < best_sad) begin
        best_sad = sadtab[y][x];
        best_x = x;
        best_y = y;
        return 1'b1;
      end
      return 1'b0;
    endfunction

    function void run();
      int hx[6] = '{-2, -1, 1, 2, 1, -1};
      int hy[6] = '{0, 2, 2, 0, -2, -2};
      int dx[4] = '{1, 0, -1, 0};
      int dy[4] = '{0, -1, 0, 1};
      int cx, cy, kc, kbest, k;
      bit won;
      ev_x.delete();
      ev_y.delete();
      skips = 0; moves = 0;
      best_sad = 32'h7fffffff;
      cx = w; cy = w;
      void'(visit(cx, cy));
      won = 1'b0;
      kbest = 0;
      for (int i = 0; i < 6; i++)
        if (visit(cx + hx[i], cy + hy[i])) begin won = 1'b1; kbest = i; end
      while (won) begin
        moves++;
        cx = best_x; cy = best_y; kc = kbest;
        won = 1'b0;
        for (int j = -1; j <= 1; j++) begin
          k = (kc + j + 6) % 6;
          if (visit(cx + hx[k], cy + hy[k])) begin won = 1'b1; kbest = k; end
        end
      end
      for (int i = 0; i < 4; i++) void'(visit(cx + dx[i], cy + dy[i]));
    endfunction

    function int cycles();
      return CLK_PER_SAD * ev_x.size() + skips;
    endfunction
  endclass
endpackage
