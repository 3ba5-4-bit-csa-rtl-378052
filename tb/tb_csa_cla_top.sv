// tb_csa_cla_top: end-to-end test of the whole design at its default
// parameters.
//
// While the accumulator sums streams of words, the four-operand adder is
// given a new random operand set every clock, so both parts run at the same
// time and each is checked against sums computed here. The test counts how
// often each mechanism of the design occurs and fails if one never does:
//   - four-operand adder: result needing the carry-out bit (sum >= 32), and
//     the largest result 15+15+15+15 = 60;
//   - accumulator: an empty stream (k = 0), idle gaps between words, a
//     full-scale stream (K_MAX words of all ones), and a restart from the
//     finished state.
module tb_csa_cla_top;
  import csa_cla_pkg::*;
  localparam int unsigned K_MAX = 16;           // top's default
  localparam int unsigned ACC_W = 4 + $clog2(K_MAX);
  localparam int unsigned CNT_W = $clog2(K_MAX + 1);

  operand_t         x, y, z, w;
  logic [CSA_W-1:0] sum4_s;
  logic             sum4_c_out;
  logic             clk = 1'b0;
  logic             rst_n;
  logic             acc_start;
  logic [CNT_W-1:0] acc_k;
  logic             acc_w_valid;
  logic [3:0]       acc_w;
  logic             acc_w_ready, acc_busy, acc_done;
  logic [ACC_W-1:0] acc_sum;

  int checks = 0, failures = 0;
  int n_carry_out = 0, n_max4 = 0, n_empty = 0, n_gap = 0, n_full_scale = 0,
      n_restart = 0, n_streams = 0;

  csa_cla_top dut (
    .x(x), .y(y), .z(z), .w(w), .sum4_s(sum4_s), .sum4_c_out(sum4_c_out),
    .clk(clk), .rst_n(rst_n), .acc_start(acc_start), .acc_k(acc_k),
    .acc_w_valid(acc_w_valid), .acc_w(acc_w), .acc_w_ready(acc_w_ready),
    .acc_busy(acc_busy), .acc_done(acc_done), .acc_sum(acc_sum)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Four-operand adder: new operands on every falling edge, checked just
  // before the next one. The first 16 sets include the all-ones case.
  int vec = 0;
  always @(negedge clk) begin
    int expected;
    if (rst_n) begin
      expected = int'(x) + int'(y) + int'(z) + int'(w);
      check(int'({sum4_c_out, sum4_s}) == expected,
            $sformatf("x+y+z+w %0d+%0d+%0d+%0d got %0d", x, y, z, w, {sum4_c_out, sum4_s}));
      if (sum4_c_out) n_carry_out++;
      if (expected == 60) n_max4++;
    end
    if (vec % 97 == 5) {x, y, z, w} = 16'hFFFF;
    else               {x, y, z, w} = 16'($urandom);
    vec++;
  end

  // One accumulator stream of kk words; gaps inserts idle cycles.
  task automatic stream(input int kk, input bit gaps, input bit all_ones);
    int expected = 0;
    int cycles = 0;
    bit had_gap = 0;
    if (acc_done) n_restart++;
    @(negedge clk);
    acc_start = 1'b1;
    acc_k = CNT_W'(kk);
    @(negedge clk);
    acc_start = 1'b0;
    for (int i = 0; i < kk; i++) begin
      while (gaps && $urandom_range(0, 1) == 0) begin
        acc_w_valid = 1'b0;
        had_gap = 1;
        check(acc_busy && !acc_done, "busy during gap");
        @(negedge clk);
        cycles++;
      end
      acc_w_valid = 1'b1;
      acc_w = all_ones ? 4'hF : 4'($urandom);
      expected += int'(acc_w);
      check(acc_w_ready && !acc_done, "accepting words");
      @(negedge clk);
      cycles++;
    end
    acc_w_valid = 1'b0;
    check(acc_done, "done after last word");
    check(int'(acc_sum) == expected,
          $sformatf("stream k=%0d sum %0d expected %0d", kk, acc_sum, expected));
    if (!gaps) check(cycles == kk, $sformatf("stream latency %0d for k=%0d", cycles, kk));
    if (kk == 0) n_empty++;
    if (had_gap) n_gap++;
    if (all_ones && kk == K_MAX && expected == 240) n_full_scale++;
    n_streams++;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0;
    acc_start = 1'b0;
    acc_k = '0;
    acc_w_valid = 1'b0;
    acc_w = '0;
    {x, y, z, w} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    stream(0, 0, 0);
    stream(K_MAX, 0, 1);
    for (int n = 0; n < 100; n++) stream($urandom_range(1, K_MAX), n[0], 0);
    @(negedge clk);

    $display("four-operand: carry-out %0d, max result %0d; accumulator: streams %0d, empty %0d, with gaps %0d, full scale %0d, restarts %0d",
             n_carry_out, n_max4, n_streams, n_empty, n_gap, n_full_scale, n_restart);
    check(n_carry_out > 0, "four-operand carry-out never occurred");
    check(n_max4 > 0, "four-operand largest result never occurred");
    check(n_empty > 0, "empty stream never occurred");
    check(n_gap > 0, "gap between words never occurred");
    check(n_full_scale > 0, "full-scale stream never occurred");
    check(n_restart > 0, "restart from done never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
