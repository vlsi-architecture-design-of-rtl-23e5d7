// sdsp_addr_gen: address of one point of the small diamond.
//
// The four points, in counter order a = a1 a0 = 0..3, lie at offsets (+1,0)
// (0,-1) (-1,0) (0,+1) from the centre. With D = a1 & ~a0 and E = ~a1 & a0
// the three-bit two's complement offsets are x = D D ~a0 and y = E E a0, added
// to the centre by two adders, the same arrangement as the large hexagon's
// address generator with other input lines. Combinational. Follows the
// architecture.
module sdsp_addr_gen
  import me_pkg::*;
(
  input  logic [1:0] a,
  input  point_t     center,
  output point_t     pos
);
  logic   ld, le;
  coord_t dx, dy;

  always_comb begin
    ld = a[1] & ~a[0];
    le = ~a[1] & a[0];
    dx = {{(CW-3){ld}}, ld, ld, ~a[0]};
    dy = {{(CW-3){le}}, le, le, a[0]};
    pos.x = center.x + dx;
    pos.y = center.y + dy;
  end
endmodule
