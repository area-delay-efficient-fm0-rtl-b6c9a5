// sols_fm0_manchester_encoder: one encoder for both FM0 and Manchester codes,
// built with similarity-oriented logic simplification (SOLS).
//
// Every data bit X occupies one CLK period. The code is sent as two halves:
// the first half while CLK is high, the second while CLK is low.
//   FM0        : first half A(t) = ~B(t-1), second half B(t) = X xor B(t-1)
//                (a level change at every bit boundary, plus one in mid-bit
//                when X = 0)
//   Manchester : first half ~X, second half X, i.e. code = X xor CLK
//
// Structure (balanced form):
//   sols_logic_a  MUX_2 picks B(t-1) (Mode 0) or X (Mode 1)
//   sols_logic_b  XNOR of X and B(t-1)
//   MUX_1         selected by CLK: input 1 = logic_a (CLK high),
//                 input 0 = logic_b (CLK low)
//   inverter      one inverter behind MUX_1, shared by both paths, drives code
//   sols_dff_b    DFFB, positive edge, active-low CLR, holds B(t-1)
// FM0 runs with mode = 0 and clr_n = 1. Manchester runs with mode = 1 and
// clr_n = 0: DFFB then stays 0, so the XNOR path gives X and every gate is in
// use in both modes. Mode and CLR are separate inputs so that CLR can also
// serve as the hardware initialisation.
//
// Timing: code is combinational from clk, x, mode and DFFB, so it changes at
// both edges of CLK. x must be stable for the whole CLK period (change it
// just after the rising edge). In the drawn circuit DFFB's D is the output
// of MUX_1 and the rising edge captures it just before MUX_1 switches to the
// A path; what it captures is therefore the B-path value of the low half.
// This RTL feeds DFFB from that B-path value (the inverted XNOR) directly,
// which is the same function without relying on MUX_1 being slower than the
// flip-flop's hold time. An assertion checks that during the low half D and
// code agree.
//
// CLK is used here as a data signal (the select of MUX_1); that is the
// design's principle, not an oversight.
module sols_fm0_manchester_encoder
  import sols_pkg::*;
(
  input  logic clk,    // CLK, one period per bit, MUX_1 select
  input  logic clr_n,  // CLR, active low: 1 for FM0, 0 for Manchester / init
  input  logic mode,   // Mode: 0 = FM0, 1 = Manchester
  input  logic x,      // X, data bit
  output logic code    // FM0 or Manchester code
);

  logic b_prev;  // B(t-1), Q of DFFB
  logic a_pre;   // MUX_2 output, before the shared inverter
  logic b_pre;   // XNOR output, before the shared inverter
  logic mux1;    // MUX_1 output
  logic b_next;  // B(t), the value DFFB takes at the rising edge

  sols_logic_a u_logic_a (
    .mode   (mode),
    .x      (x),
    .b_prev (b_prev),
    .a_pre  (a_pre)
  );

  sols_logic_b u_logic_b (
    .x      (x),
    .b_prev (b_prev),
    .b_pre  (b_pre)
  );

  // MUX_1 and the shared inverter.
  always_comb begin
    mux1   = clk ? a_pre : b_pre;
    code   = ~mux1;
    b_next = ~b_pre;
  end

  sols_dff_b u_dff_b (
    .clk   (clk),
    .clr_n (clr_n),
    .d     (b_next),
    .q     (b_prev)
  );

  // DFFB must see exactly what MUX_1 shows in the low half of CLK.
  always_comb begin
    if (!clk) assert final (b_next == code)
      else $error("DFFB input differs from the code in the low half of CLK");
  end

endmodule
