// full_adder: one-bit full adder, the cell every carry-save row is made of.
//
// Function: {c_out, s} = x + y + c_in. Built from gates the way the design
// specifies: a half-sum h = x ^ y, then s = h ^ c_in and
// c_out = (h & c_in) ^ (x & y). The two carry terms can never both be 1, so
// the XOR that merges them acts as an OR.
//
// Interface: three one-bit inputs, sum and carry outputs. Purely
// combinational, no clock.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic c_in,
  output logic s,
  output logic c_out
);
  logic half_sum;   // x xor y
  logic prop_carry; // carry passed on from c_in
  logic gen_carry;  // carry generated by x and y

  assign half_sum   = x ^ y;
  assign prop_carry = c_in & half_sum;
  assign gen_carry  = x & y;
  assign s          = half_sum ^ c_in;
  assign c_out      = prop_carry ^ gen_carry;
endmodule
