// tb_sols_logic_b: exhaustive check of the XNOR for B(t)/X. The expected
// value is written from the FM0 rule: after the shared inverter the second
// half must equal B(t-1) for X = 0 (mid-bit transition) and ~B(t-1) for
// X = 1 (no transition), so the XNOR output is the inverse of that.
module tb_sols_logic_b;
  logic x, b_prev, b_pre;
  int checks = 0, failures = 0;

  sols_logic_b dut (.x(x), .b_prev(b_prev), .b_pre(b_pre));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic second_half;
    for (int i = 0; i < 4; i++) begin
      {x, b_prev} = 2'(i);
      #1;
      second_half = x ? !b_prev : b_prev;
      checks++;
      if (b_pre !== !second_half) begin
        failures++;
        $display("FAIL x=%0b b_prev=%0b b_pre=%0b", x, b_prev, b_pre);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
