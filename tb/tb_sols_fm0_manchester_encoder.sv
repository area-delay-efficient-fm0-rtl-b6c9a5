// tb_sols_fm0_manchester_encoder: end-to-end test of the SOLS encoder.
//
// The bit clock has a 10 ns period; x, mode and clr_n change 1 ns after the
// rising edge, and the code is sampled twice in each half period (at 2 and
// 4 ns into the high half, 7 and 9 ns into the low half), so each half must
// be a steady level. Expected levels come from a model written from the
// coding rules, not from the circuit:
//   FM0        first half = inverse of the previous second half (a
//              transition at every bit boundary); second half = first half
//              when X = 1 (no mid-bit transition), its inverse when X = 0.
//              After CLR the previous second half counts as 0.
//   Manchester first half = ~X, second half = X.
// One bit goes out per clock period, so every period is checked.
//
// Phases: the five-bit example 0,1,1,0,1 in FM0 (after a leading 1 that sets
// the previous half to 1, giving the halves 01 00 11 01 00) and in
// Manchester (halves 10 01 01 10 01); then a long random stream with random
// switches between the two codes and random CLR pulses in FM0 mode. Each
// mechanism is counted (FM0 bits, Manchester bits, mid-bit transitions from
// X = 0, held levels from X = 1, boundary transitions, switches each way,
// initialisations) and one that never happened counts as a failure.
module tb_sols_fm0_manchester_encoder;
  import sols_pkg::*;

  localparam int RANDOM_BITS = 4000;

  logic clk = 1'b1;
  logic clr_n, mode, x, code;
  int checks = 0, failures = 0;
  int cycles = 0;

  // model state: level of the previous second half
  logic prev_b;
  // second half of the previous bit as observed on code
  logic last_seen = 1'b0;

  // mechanism counters
  int n_fm0 = 0, n_man = 0, n_rule1 = 0, n_rule2 = 0, n_rule3 = 0;
  int n_to_man = 0, n_to_fm0 = 0, n_init = 0, n_fig_fm0 = 0, n_fig_man = 0;

  sols_fm0_manchester_encoder dut (
    .clk(clk), .clr_n(clr_n), .mode(mode), .x(x), .code(code)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == RANDOM_BITS + 200);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] expected_halves(coding_mode_e m, logic xb, logic pb);
    logic first, second;
    if (m == MODE_FM0) begin
      first  = !pb;
      second = xb ? first : !first;
    end else begin
      first  = !xb;
      second = xb;
    end
    return {first, second};
  endfunction

  // Sample both halves of the current bit; the call starts 1 ns after a
  // rising edge and returns 1 ns after the next one.
  task automatic run_bit(output logic [1:0] seen);
    logic s0, s1, s2, s3;
    #1 s0 = code;
    #2 s1 = code;
    #3 s2 = code;
    #2 s3 = code;
    @(posedge clk); #1;
    checks++;
    if (s0 !== s1 || s2 !== s3) begin
      failures++;
      $display("FAIL code not steady within a half at %0t", $time);
    end
    seen = {s0, s2};
  endtask

  // Drive one bit and check it against the model.
  task automatic send(coding_mode_e m, logic xb, logic clr_level);
    logic [1:0] exp_h, seen;
    if (m != coding_mode_e'(mode)) begin
      if (m == MODE_MANCHESTER) n_to_man++; else n_to_fm0++;
    end
    mode  = m;
    x     = xb;
    clr_n = clr_level;
    if (!clr_level) prev_b = 1'b0;
    exp_h = expected_halves(m, xb, prev_b);
    run_bit(seen);
    checks++;
    if (seen !== exp_h) begin
      failures++;
      $display("FAIL mode=%0d x=%0b prev=%0b halves=%02b expected %02b at %0t",
               m, xb, prev_b, seen, exp_h, $time);
    end
    if (m == MODE_FM0) begin
      n_fm0++;
      // counted on the observed code
      if (seen[1] != last_seen) n_rule3++;
      if (seen[1] != seen[0]) n_rule1++; else n_rule2++;
    end else begin
      n_man++;
    end
    last_seen = seen[0];
    // The second half is stored for the next bit, unless CLR was low over
    // the closing edge (always so in Manchester mode): then it is 0.
    prev_b = (m == MODE_FM0 && clr_level) ? exp_h[0] : 1'b0;
  endtask

  task automatic check_sequence(coding_mode_e m, logic [4:0] bits, logic [9:0] halves,
                                ref int hits);
    logic [1:0] seen;
    bit ok = 1;
    for (int i = 4; i >= 0; i--) begin
      mode  = m;
      x     = bits[i];
      clr_n = clr_n_for(m);
      if (m == MODE_MANCHESTER) prev_b = 1'b0;
      run_bit(seen);
      checks++;
      if (seen !== halves[2*i +: 2]) begin
        failures++;
        ok = 0;
        $display("FAIL example bit %0d: halves=%02b expected %02b", 4 - i, seen,
                 halves[2*i +: 2]);
      end
      prev_b = (m == MODE_FM0) ? halves[2*i] : 1'b0;
    end
    if (ok) hits++;
  endtask

  initial begin
    coding_mode_e m;
    // Hardware initialisation in FM0 mode.
    mode  = MODE_FM0;
    x     = 1'b0;
    clr_n = 1'b0;
    prev_b = 1'b0;
    @(posedge clk); #1;
    n_init++;
    // Leading 1 after clear: halves 11, previous half becomes 1.
    send(MODE_FM0, 1'b1, 1'b1);
    // Five-bit example, FM0 and Manchester.
    check_sequence(MODE_FM0,        5'b01101, 10'b01_00_11_01_00, n_fig_fm0);
    check_sequence(MODE_MANCHESTER, 5'b01101, 10'b10_01_01_10_01, n_fig_man);
    prev_b = 1'b0;
    // Random stream with mode switches and initialisations.
    m = MODE_FM0;
    for (int i = 0; i < RANDOM_BITS; i++) begin
      logic clr_level;
      if ($urandom_range(0, 49) == 0)
        m = (m == MODE_FM0) ? MODE_MANCHESTER : MODE_FM0;
      clr_level = clr_n_for(m);
      if (m == MODE_FM0 && $urandom_range(0, 99) == 0) begin
        // one period of CLR low: the bit sent during it starts from 0
        clr_level = 1'b0;
        n_init++;
      end
      send(m, 1'($urandom), clr_level);
    end

    $display("fm0 bits=%0d manchester bits=%0d mid-bit transitions=%0d held=%0d boundary transitions=%0d",
             n_fm0, n_man, n_rule1, n_rule2, n_rule3);
    $display("switches to manchester=%0d to fm0=%0d initialisations=%0d examples fm0=%0d manchester=%0d",
             n_to_man, n_to_fm0, n_init, n_fig_fm0, n_fig_man);
    checks++;
    if (n_fm0 == 0 || n_man == 0 || n_rule1 == 0 || n_rule2 == 0 || n_rule3 == 0 ||
        n_to_man == 0 || n_to_fm0 == 0 || n_init < 2 || n_fig_fm0 == 0 || n_fig_man == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
