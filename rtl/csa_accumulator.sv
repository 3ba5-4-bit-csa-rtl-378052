// csa_accumulator: repeated summation S = w_1 + w_2 + ... + w_k with a
// carry-save accumulator and one carry-lookahead adder at the end.
//
// How it works: the running total is kept redundantly in two registers, a
// sum vector X and a carry vector Y of weight 2, so the total is X + 2Y.
// Starting from X = Y = 0, each accepted word w_i goes through one
// carry-save row together with X and 2Y:
//   X <- sum bits of (X + 2Y + w_i),  Y <- carry bits of (X + 2Y + w_i).
// No carry ripples during accumulation, so one word is absorbed per clock
// whatever the width. After the k-th word the carry-lookahead adder turns
// X + 2Y into the ordinary binary sum. This is the procedure of the design
// this follows; the handshake, the word count input and the widths below
// are this implementation's choices.
//
// Widths: ACC_W = OPERAND_W + clog2(K_MAX) bits holds the sum of K_MAX
// words. Arithmetic is modulo 2^ACC_W, so dropping the top bit of 2Y is
// exact as long as the true sum fits, which K_MAX guarantees.
//
// Interface and timing (all on the rising edge of clk, active-low
// asynchronous reset rst_n):
//   start, k   in IDLE or DONE, start clears X and Y and loads the count k
//              (0..K_MAX). k = 0 goes straight to DONE with sum 0.
//   w_valid, w in RUN (w_ready = 1) a word is absorbed on every edge with
//              w_valid high. Words may arrive with gaps.
//   done, sum  done rises on the edge that absorbs the k-th word and stays
//              high, with sum valid, until the next start. So the result
//              appears k clocks after the first word when words come back
//              to back.
module csa_accumulator #(
  parameter int unsigned OPERAND_W = 4,
  parameter int unsigned K_MAX     = 16,
  localparam int unsigned ACC_W    = OPERAND_W + $clog2(K_MAX),
  localparam int unsigned CNT_W    = $clog2(K_MAX + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [CNT_W-1:0]     k,
  input  logic                 w_valid,
  input  logic [OPERAND_W-1:0] w,
  output logic                 w_ready,
  output logic                 busy,
  output logic                 done,
  output logic [ACC_W-1:0]     sum
);
  typedef enum logic [1:0] {IDLE, RUN, FINISHED} state_t;

  state_t           state_q;
  logic [CNT_W-1:0] remain_q;     // words still to absorb
  logic [ACC_W-1:0] x_q, y_q;     // redundant total: x_q + 2*y_q
  logic [ACC_W-1:0] y_shl;        // 2*y_q, modulo 2^ACC_W
  logic [ACC_W-1:0] w_ext;        // incoming word, zero-extended
  logic [ACC_W-1:0] csa_s, csa_c; // next X and Y
  logic             take_start;
  logic             take_word;
  logic             cla_c_out;    // always 0 while the sum fits ACC_W

  assign y_shl      = {y_q[ACC_W-2:0], 1'b0};
  assign w_ext      = ACC_W'(w);
  assign w_ready    = (state_q == RUN);
  assign busy       = (state_q == RUN);
  assign done       = (state_q == FINISHED);
  assign take_start = start && (state_q != RUN);
  assign take_word  = w_valid && (state_q == RUN);

  csa #(.WIDTH(ACC_W)) u_csa (
    .x    (x_q),
    .y    (y_shl),
    .c_in (w_ext),
    .s    (csa_s),
    .c_out(csa_c)
  );

  cla #(.WIDTH(ACC_W)) u_cla (
    .x    (x_q),
    .y    (y_shl),
    .s    (sum),
    .c_out(cla_c_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= IDLE;
      remain_q <= '0;
      x_q      <= '0;
      y_q      <= '0;
    end else if (take_start) begin
      x_q      <= '0;
      y_q      <= '0;
      remain_q <= k;
      state_q  <= (k == '0) ? FINISHED : RUN;
    end else if (take_word) begin
      x_q      <= csa_s;
      y_q      <= csa_c;
      remain_q <= remain_q - 1'b1;
      if (remain_q == CNT_W'(1)) state_q <= FINISHED;
    end
  end

  // A count above K_MAX could overflow the accumulator.
  a_k_in_range : assert property (@(posedge clk) disable iff (!rst_n)
    take_start |-> (k <= CNT_W'(K_MAX)));
  // The final adder never overflows while the count is in range.
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    done |-> !cla_c_out);
endmodule
