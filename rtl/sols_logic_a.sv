// sols_logic_a: the "logic for A(t)/~X" of the SOLS encoder (MUX_2).
//
// In FM0 the first half of every bit, A(t), is the inverse of the previous
// second half, B(t-1). In Manchester the first half is the inverse of the
// data bit, ~X. Both are "invert one operand", so one inverter serves both
// and MUX_2 in front of it picks the operand with Mode:
//   mode = 0 (FM0)        : a_pre = b_prev   (B(t-1))
//   mode = 1 (Manchester) : a_pre = x        (X)
// In the balanced arrangement the inverter itself is not here: it is moved
// behind MUX_1 and shared with the B path (see sols_fm0_manchester_encoder),
// so this block's output is the non-inverted operand.
//
// Purely combinational, no clock. The operand order of MUX_2 (input 0 =
// B(t-1), input 1 = X) is the one printed in the architecture figure.
module sols_logic_a
  import sols_pkg::*;
(
  input  logic mode,    // Mode: 0 = FM0, 1 = Manchester
  input  logic x,       // X, data bit
  input  logic b_prev,  // B(t-1), Q of DFFB
  output logic a_pre    // operand of the shared inverter for A(t)/~X
);

  always_comb begin
    a_pre = (coding_mode_e'(mode) == MODE_MANCHESTER) ? x : b_prev;
  end

endmodule
