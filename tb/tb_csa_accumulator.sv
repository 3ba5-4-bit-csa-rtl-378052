// tb_csa_accumulator: self-checking test of the repeated-summation
// accumulator at its default size (4-bit words, up to 16 of them).
//
// Each run starts the accumulator with a count k, feeds k words (random,
// all-ones, or with random idle gaps between them) and compares the result
// with the sum computed here. It also checks the timing: done must stay low
// until the edge that takes the k-th word and be high right after it, so
// back-to-back words give the result k clocks after the first one, and
// done and sum must hold until the next start. Inputs change on the falling
// edge, outputs are sampled before the rising edge.
module tb_csa_accumulator;
  localparam int unsigned OPERAND_W = 4;
  localparam int unsigned K_MAX     = 16;
  localparam int unsigned ACC_W     = OPERAND_W + $clog2(K_MAX);
  localparam int unsigned CNT_W     = $clog2(K_MAX + 1);

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic                 start;
  logic [CNT_W-1:0]     k;
  logic                 w_valid;
  logic [OPERAND_W-1:0] w;
  logic                 w_ready, busy, done;
  logic [ACC_W-1:0]     sum;
  int checks = 0, failures = 0;

  csa_accumulator dut (
    .clk(clk), .rst_n(rst_n), .start(start), .k(k), .w_valid(w_valid), .w(w),
    .w_ready(w_ready), .busy(busy), .done(done), .sum(sum)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // mode 0: random words back to back, 1: all ones, 2: random with gaps
  task automatic run(input int kk, input int mode);
    int expected = 0;
    int cycles = 0;
    @(negedge clk);
    start = 1'b1;
    k = CNT_W'(kk);
    @(negedge clk);
    start = 1'b0;
    for (int i = 0; i < kk; i++) begin
      if (mode == 2) begin
        while ($urandom_range(0, 2) == 0) begin
          w_valid = 1'b0;
          w = OPERAND_W'($urandom);
          check(busy && w_ready && !done, "busy during a gap");
          @(negedge clk);
          cycles++;
        end
      end
      w_valid = 1'b1;
      w = (mode == 1) ? '1 : OPERAND_W'($urandom);
      expected += int'(w);
      check(w_ready && !done, "ready and not done before the last word");
      @(negedge clk);
      cycles++;
    end
    w_valid = 1'b0;
    check(done && !busy, "done right after the k-th word");
    check(int'(sum) == expected, $sformatf("sum k=%0d got %0d expected %0d", kk, sum, expected));
    if (mode != 2) check(cycles == kk, $sformatf("latency %0d for k=%0d", cycles, kk));
    // result holds, extra valid words are ignored
    w_valid = 1'b1;
    w = '1;
    repeat (3) @(negedge clk);
    w_valid = 1'b0;
    check(done && int'(sum) == expected, "result held after done");
  endtask

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    k = '0;
    w_valid = 1'b0;
    w = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    run(0, 0);
    run(1, 0);
    run(K_MAX, 1);            // largest possible sum
    for (int n = 0; n < 60; n++) run($urandom_range(1, K_MAX), n % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
