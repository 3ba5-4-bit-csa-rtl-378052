// tb_xyzw_adder: exhaustive check of the four-operand adder.
// All 2^16 operand combinations are applied; {c_out, s} must equal the
// integer x + y + z + w. Also counts how often the sixth result bit
// (the carry-out of the final adder) is set.
module tb_xyzw_adder;
  import csa_cla_pkg::*;
  operand_t x, y, z, w;
  logic [CSA_W-1:0] s;
  logic c_out;
  int checks = 0, failures = 0, carry_outs = 0;

  xyzw_adder dut (.x(x), .y(y), .z(z), .w(w), .s(s), .c_out(c_out));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {x, y, z, w} = 16'(v);
      #1;
      checks++;
      if (int'({c_out, s}) != int'(x) + int'(y) + int'(z) + int'(w)) begin
        failures++;
        if (failures < 10)
          $display("FAIL %0d+%0d+%0d+%0d -> %0d", x, y, z, w, {c_out, s});
      end
      if (c_out) carry_outs++;
    end
    checks++;
    if (carry_outs == 0) begin
      failures++;
      $display("FAIL carry-out never set");
    end
    $display("carry-out set in %0d cases", carry_outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
