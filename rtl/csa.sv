// csa: carry-save adder, three vectors in, a sum vector and a carry vector out.
//
// Function: for every bit i, {c_out[i], s[i]} = x[i] + y[i] + c_in[i], so
// x + y + c_in = s + 2*c_out. The row is WIDTH independent full adders with
// no carry passed between them; its delay is one full adder whatever the
// width. The caller shifts c_out left by one before using it, because each
// c_out[i] has weight 2^(i+1).
//
// Parameters: WIDTH, 5 by default, the width the four-operand adder uses
// (4-bit operands plus one bit of headroom). The repeated-summation
// accumulator instantiates it at its accumulator width.
// Purely combinational.
module csa #(
  parameter int unsigned WIDTH = 5
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] c_in,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] c_out
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .x    (x[i]),
      .y    (y[i]),
      .c_in (c_in[i]),
      .s    (s[i]),
      .c_out(c_out[i])
    );
  end
endmodule
