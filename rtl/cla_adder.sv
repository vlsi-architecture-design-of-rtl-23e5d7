// cla_adder: carry look-ahead adder, sum = a + b + cin.
//
// Bits are grouped by four. Inside a group every carry is formed directly
// from the generate (a & b) and propagate (a ^ b) terms and the group carry in;
// each group also gives a group generate and propagate, and the group carries
// are formed from those with the same look-ahead expression one level up.
// Purely combinational. WIDTH must be a multiple of 4. The architecture names a
// carry look-ahead adder for the PE accumulator; the grouping is this design's.
module cla_adder #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int NG = WIDTH / 4;

  // Carry into position k of a chain of (g, p) pairs, written out as a sum of
  // products: c_k = g_{k-1} | p_{k-1} g_{k-2} | ... | p_{k-1} ... p_0 c_0.
  function automatic logic lookahead(input logic [WIDTH-1:0] g,
                                     input logic [WIDTH-1:0] p,
                                     input logic c0, input int k);
    logic c, term;
    c = 1'b0;
    for (int j = 0; j < k; j++) begin
      term = g[j];
      for (int t = j + 1; t < k; t++) term = term & p[t];
      c = c | term;
    end
    term = c0;
    for (int t = 0; t < k; t++) term = term & p[t];
    return c | term;
  endfunction

  logic [WIDTH-1:0] g, p, c;
  logic [WIDTH-1:0] gg, gp;   // group generate / propagate (low NG bits used)
  logic [NG:0]      gc;       // group carries

  always_comb begin
    g = a & b;
    p = a ^ b;
    gg = '0;
    gp = '0;
    for (int k = 0; k < NG; k++) begin
      gg[k] = lookahead({{(WIDTH-4){1'b0}}, g[4*k +: 4]}, {{(WIDTH-4){1'b0}}, p[4*k +: 4]}, 1'b0, 4);
      gp[k] = &p[4*k +: 4];
    end
    for (int k = 0; k <= NG; k++) gc[k] = lookahead(gg, gp, cin, k);
    for (int k = 0; k < NG; k++)
      for (int i = 0; i < 4; i++)
        c[4*k+i] = lookahead({{(WIDTH-4){1'b0}}, g[4*k +: 4]}, {{(WIDTH-4){1'b0}}, p[4*k +: 4]}, gc[k], i);
    sum  = p ^ c;
    cout = gc[NG];
  end
endmodule
