// csa_cla_top: the two adders of the design side by side.
//
//   * The four-operand adder (xyzw_adder): combinational,
//     {sum4_c_out, sum4_s} = x + y + z + w for 4-bit operands, built from two
//     carry-save rows and a 4-bit carry-lookahead adder.
//   * The repeated-summation accumulator (csa_accumulator): clocked, adds a
//     stream of k words in carry-save form, one per clock, and resolves the
//     total with a carry-lookahead adder at the end.
// The two share no signals; each has its own ports, named after its block.
// See the two modules for their timing.
//
// Parameters: ACC_OPERAND_W and ACC_K_MAX set the accumulator's word width
// and largest word count (4 and 16 by default). The four-operand adder is
// fixed at 4-bit operands.
module csa_cla_top
  import csa_cla_pkg::*;
#(
  parameter int unsigned ACC_OPERAND_W = 4,
  parameter int unsigned ACC_K_MAX     = 16,
  localparam int unsigned ACC_W        = ACC_OPERAND_W + $clog2(ACC_K_MAX),
  localparam int unsigned ACC_CNT_W    = $clog2(ACC_K_MAX + 1)
) (
  // four-operand adder
  input  operand_t                 x,
  input  operand_t                 y,
  input  operand_t                 z,
  input  operand_t                 w,
  output logic [CSA_W-1:0]         sum4_s,
  output logic                     sum4_c_out,
  // repeated-summation accumulator
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     acc_start,
  input  logic [ACC_CNT_W-1:0]     acc_k,
  input  logic                     acc_w_valid,
  input  logic [ACC_OPERAND_W-1:0] acc_w,
  output logic                     acc_w_ready,
  output logic                     acc_busy,
  output logic                     acc_done,
  output logic [ACC_W-1:0]         acc_sum
);
  xyzw_adder u_xyzw (
    .x    (x),
    .y    (y),
    .z    (z),
    .w    (w),
    .s    (sum4_s),
    .c_out(sum4_c_out)
  );

  csa_accumulator #(
    .OPERAND_W(ACC_OPERAND_W),
    .K_MAX    (ACC_K_MAX)
  ) u_acc (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (acc_start),
    .k      (acc_k),
    .w_valid(acc_w_valid),
    .w      (acc_w),
    .w_ready(acc_w_ready),
    .busy   (acc_busy),
    .done   (acc_done),
    .sum    (acc_sum)
  );
endmodule
