// tb_sols_dff_b: checks DFFB. Random data is applied for many rising edges
// and q must follow d with one cycle of delay. The active-low clear is
// pulsed in the middle of a clock period and q must drop at once (without
// waiting for an edge) and stay 0 while clr_n is low, whatever d is.
module tb_sols_dff_b;
  logic clk = 1'b0, clr_n, d, q;
  int checks = 0, failures = 0;
  int cycles = 0;

  sols_dff_b dut (.clk(clk), .clr_n(clr_n), .d(d), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic expected, string what);
    checks++;
    if (q !== expected) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b at %0t", what, q, expected, $time);
    end
  endtask

  initial begin
    logic last_d;
    clr_n = 1'b0;
    d     = 1'b1;
    #2;
    check(1'b0, "clear before any edge");
    @(posedge clk); #1;
    check(1'b0, "clear held over an edge with d = 1");
    clr_n = 1'b1;
    // Data capture: q takes the d that stood before each rising edge.
    for (int i = 0; i < 200; i++) begin
      d = 1'($urandom);
      last_d = d;
      @(posedge clk); #1;
      check(last_d, "capture");
    end
    // Asynchronous clear in mid-period with q at 1.
    d = 1'b1;
    @(posedge clk); #1;
    check(1'b1, "q set before clear");
    #2 clr_n = 1'b0;
    #1 check(1'b0, "asynchronous clear");
    @(posedge clk); #1;
    check(1'b0, "clear held");
    clr_n = 1'b1;
    @(posedge clk); #1;
    check(1'b1, "capture after clear released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
