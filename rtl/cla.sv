// cla: carry-lookahead adder, s + 2^WIDTH * c_out = x + y.
//
// How it works: every bit has a generate g[i] = x[i] & y[i] and a propagate
// p[i] = x[i] | y[i] (the inclusive-OR form of propagate). Each carry is
// computed directly as a two-level sum of products,
//   c[i] = g[i-1] | p[i-1]g[i-2] | ... | p[i-1]..p[1]g[0] | p[i-1]..p[0]c[0],
// not rippled from the carry below it, and s[i] = x[i] ^ y[i] ^ c[i]. The
// carry into bit 0 is the constant 0, as in the design this follows, so the
// adder has no carry-in port.
//
// Parameters: WIDTH, 4 by default (the 4-bit adder of the four-operand
// adder). Other widths build the same flat lookahead equations; the
// repeated-summation accumulator uses a wider one for its final X + 2Y.
// Purely combinational.
module cla #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] s,
  output logic             c_out
);
  logic [WIDTH-1:0] g, p;
  logic [WIDTH:0]   c;      // c[i] is the carry into bit i, c[WIDTH] = c_out
  logic             c0;

  assign c0 = 1'b0;
  assign g  = x & y;
  assign p  = x | y;

  // c[i]: OR over j < i of g[j] AND p[j+1..i-1], plus p[0..i-1] AND c0.
  always_comb begin
    logic term;
    c = '0;
    c[0] = c0;
    for (int i = 1; i <= WIDTH; i++) begin
      // carry-in term, propagated through every bit below i
      term = c0;
      for (int m = 0; m < i; m++) term = term & p[m];
      c[i] = term;
      // generate terms
      for (int j = 0; j < i; j++) begin
        term = g[j];
        for (int m = j + 1; m < i; m++) term = term & p[m];
        c[i] = c[i] | term;
      end
    end
  end

  assign s     = x ^ y ^ c[WIDTH-1:0];
  assign c_out = c[WIDTH];
endmodule
