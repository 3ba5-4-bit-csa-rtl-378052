// tb_csa: exhaustive check of the 5-bit carry-save row.
// For all 2^15 input triples it checks, bit by bit, that
// {c_out[i], s[i]} = x[i] + y[i] + c_in[i], and as a whole that
// s + 2*c_out = x + y + c_in.
module tb_csa;
  localparam int unsigned W = 5;
  logic [W-1:0] x, y, c_in, s, c_out;
  int checks = 0, failures = 0;

  csa dut (.x(x), .y(y), .c_in(c_in), .s(s), .c_out(c_out));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (3 * W)); v++) begin
      {x, y, c_in} = (3 * W)'(v);
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (int'({c_out[i], s[i]}) != int'(x[i]) + int'(y[i]) + int'(c_in[i])) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d x=%h y=%h c_in=%h", i, x, y, c_in);
        end
      end
      checks++;
      if (int'(s) + 2 * int'(c_out) != int'(x) + int'(y) + int'(c_in)) begin
        failures++;
        if (failures < 10) $display("FAIL total x=%h y=%h c_in=%h s=%h c=%h", x, y, c_in, s, c_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
