// csa_cla_pkg: widths shared by the carry-save / carry-lookahead adders.
//
// The four-operand adder works on 4-bit unsigned operands (the width the
// design is built around). Its carry-save stages are one bit wider than an
// operand so that the carry of the first stage, shifted left by one, still
// fits; the final carry-lookahead adder is 4 bits wide and its carry-out is
// the sixth result bit.
package csa_cla_pkg;
  localparam int unsigned OPERAND_W = 4;              // width of X, Y, Z, W
  localparam int unsigned CSA_W     = OPERAND_W + 1;  // width of each CSA row

  typedef logic [OPERAND_W-1:0] operand_t;
  typedef logic [CSA_W-1:0]     csa_vec_t;
endpackage
