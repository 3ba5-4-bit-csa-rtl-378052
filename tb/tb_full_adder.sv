// tb_full_adder: exhaustive check of the one-bit full adder.
// All eight input combinations are applied; {c_out, s} must equal the
// integer sum x + y + c_in.
module tb_full_adder;
  logic x, y, c_in, s, c_out;
  int checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .c_in(c_in), .s(s), .c_out(c_out));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, c_in} = 3'(v);
      #1;
      checks++;
      if (int'({c_out, s}) != int'(x) + int'(y) + int'(c_in)) begin
        failures++;
        $display("FAIL x=%0b y=%0b c_in=%0b -> c_out=%0b s=%0b", x, y, c_in, c_out, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
