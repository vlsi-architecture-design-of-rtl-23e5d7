// hex_addr_gen: address of one corner of the large hexagon.
//
// The six corners, in counter order a = a2 a1 a0 = 0..5, lie at offsets
// (-2,0) (-1,+2) (+1,+2) (+2,0) (+1,-2) (-1,-2) from the centre. Their
// three-bit two's complement forms reduce to a few gates of the counter bits:
//   A = a2 | (a1 ^ a0),  B = a0 | (~a2 & ~a1),  C = ~a1 & B,
//   x offset = C B A,    y offset = a2 A 0,
// so two adders, fed with these lines sign-extended, give the corner from the
// centre. Combinational. Counter values 6 and 7 are not used. This follows
// the architecture; y grows downwards here, which only mirrors the pattern.
module hex_addr_gen
  import me_pkg::*;
(
  input  logic [2:0] a,
  input  point_t     center,
  output point_t     pos
);
  logic   la, lb, lc;
  coord_t dx, dy;

  always_comb begin
    la = a[2] | (a[1] ^ a[0]);
    lb = a[0] | (~a[2] & ~a[1]);
    lc = ~a[1] & lb;
    dx = {{(CW-3){lc}}, lc, lb, la};
    dy = {{(CW-3){a[2]}}, a[2], la, 1'b0};
    pos.x = center.x + dx;
    pos.y = center.y + dy;
  end
endmodule
