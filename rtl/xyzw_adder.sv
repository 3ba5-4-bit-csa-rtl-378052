// xyzw_adder: four-operand adder, {c_out, s} = x + y + z + w for 4-bit
// unsigned operands (largest result 60, so six bits are enough).
//
// How it works: the operands are zero-extended to 5 bits.
//   1. Carry-save row 0 reduces x, y, z to a sum s01 and a carry c01.
//   2. Carry-save row 1 reduces s01, w and the carry c01 shifted left by one
//      bit to a sum s12 and a carry c12.
//   3. Bit 0 of the result is s12[0]. The upper bits are s12[4:1] + c12[3:0]
//      (the carry c12[i] has the weight of bit i+1), added by a 4-bit
//      carry-lookahead adder whose carry-out is the sixth result bit.
// The bits dropped on the way (c01[4], c12[4]) are always 0 for 4-bit
// operands. Only the final adder has a carry chain; the two carry-save rows
// cost one full-adder delay each.
//
// Interface: x, y, z, w in; s (5 bits) and c_out out, as in the design this
// follows. Purely combinational.
module xyzw_adder
  import csa_cla_pkg::*;
(
  input  operand_t         x,
  input  operand_t         y,
  input  operand_t         z,
  input  operand_t         w,
  output logic [CSA_W-1:0] s,
  output logic             c_out
);
  csa_vec_t x_in, y_in, z_in, w_in;  // zero-extended operands
  csa_vec_t s01, c01;                // outputs of carry-save row 0
  csa_vec_t c01_shl;                 // c01 aligned to its weight
  csa_vec_t s12, c12;                // outputs of carry-save row 1

  assign x_in    = {1'b0, x};
  assign y_in    = {1'b0, y};
  assign z_in    = {1'b0, z};
  assign w_in    = {1'b0, w};
  assign c01_shl = {c01[CSA_W-2:0], 1'b0};

  csa #(.WIDTH(CSA_W)) u_csa0 (
    .x    (x_in),
    .y    (y_in),
    .c_in (z_in),
    .s    (s01),
    .c_out(c01)
  );

  csa #(.WIDTH(CSA_W)) u_csa1 (
    .x    (s01),
    .y    (w_in),
    .c_in (c01_shl),
    .s    (s12),
    .c_out(c12)
  );

  cla #(.WIDTH(OPERAND_W)) u_cla (
    .x    (s12[CSA_W-1:1]),
    .y    (c12[OPERAND_W-1:0]),
    .s    (s[CSA_W-1:1]),
    .c_out(c_out)
  );

  assign s[0] = s12[0];
endmodule
