// sols_logic_b: the "logic for B(t)/X" of the SOLS encoder (the XNOR).
//
// In FM0 the second half of a bit is B(t) = X xor B(t-1): a 0 makes a
// transition in mid-bit (B(t) = ~A(t) = B(t-1)), a 1 keeps the level
// (B(t) = A(t) = ~B(t-1)). In Manchester the second half is X, which is the
// same XOR with B(t-1) forced to 0 by CLR. So one gate serves both codes.
// For balanced delay against the MUX_2 path, the gate is an XNOR and its
// inversion comes from the inverter shared behind MUX_1:
//   b_pre = ~(x ^ b_prev)
//
// Purely combinational, no clock.
module sols_logic_b (
  input  logic x,       // X, data bit
  input  logic b_prev,  // B(t-1), Q of DFFB (0 in Manchester mode)
  output logic b_pre    // operand of the shared inverter for B(t)/X
);

  always_comb begin
    b_pre = x ~^ b_prev;
  end

endmodule
