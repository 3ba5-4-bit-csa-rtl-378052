// tb_cla: exhaustive check of the 4-bit carry-lookahead adder, plus random
// checks of an 8-bit instance (the width the accumulator uses).
// {c_out, s} must equal x + y.
module tb_cla;
  logic [3:0] x4, y4, s4;
  logic       c4;
  logic [7:0] x8, y8, s8;
  logic       c8;
  int checks = 0, failures = 0;

  cla dut4 (.x(x4), .y(y4), .s(s4), .c_out(c4));
  cla #(.WIDTH(8)) dut8 (.x(x8), .y(y8), .s(s8), .c_out(c8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {x4, y4} = 8'(v);
      #1;
      checks++;
      if (int'({c4, s4}) != int'(x4) + int'(y4)) begin
        failures++;
        $display("FAIL 4-bit %0d + %0d -> %0d", x4, y4, {c4, s4});
      end
    end
    for (int n = 0; n < 4000; n++) begin
      x8 = 8'($urandom);
      y8 = 8'($urandom);
      if (n == 0) begin x8 = 8'hFF; y8 = 8'h01; end   // longest carry chain
      #1;
      checks++;
      if (int'({c8, s8}) != int'(x8) + int'(y8)) begin
        failures++;
        if (failures < 10) $display("FAIL 8-bit %0d + %0d -> %0d", x8, y8, {c8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
