// tb_sols_logic_a: exhaustive check of MUX_2, the operand select for A(t)/~X.
// All eight combinations of mode, x and b_prev are applied; the expected
// output is B(t-1) in FM0 mode and X in Manchester mode.
module tb_sols_logic_a;
  import sols_pkg::*;

  logic mode, x, b_prev, a_pre;
  int checks = 0, failures = 0;

  sols_logic_a dut (.mode(mode), .x(x), .b_prev(b_prev), .a_pre(a_pre));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int i = 0; i < 8; i++) begin
      {mode, x, b_prev} = 3'(i);
      #1;
      expected = (mode == MODE_FM0) ? b_prev : x;
      checks++;
      if (a_pre !== expected) begin
        failures++;
        $display("FAIL mode=%0b x=%0b b_prev=%0b a_pre=%0b expected %0b",
                 mode, x, b_prev, a_pre, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
