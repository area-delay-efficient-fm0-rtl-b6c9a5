// sols_dff_b: DFFB, the one state flip-flop left after area compact retiming.
//
// FM0 needs only the previous second half B(t-1) to form the next bit, so the
// A(t) flip-flop is removed and DFFB is moved behind MUX_1. It is a
// positive-edge flip-flop: at each rising CLK edge it stores the value B(t)
// that the encoder produced during the low half just ended, which becomes
// B(t-1) for the next bit.
//
// clr_n is the CLR pin of the figure (drawn with an inversion bubble, so
// active low). Holding it low keeps q at 0: this is how Manchester mode makes
// the XNOR path read as X, and it is also the hardware initialisation. The
// clear is taken as asynchronous, which the figure does not state.
module sols_dff_b (
  input  logic clk,    // CLK, bit clock
  input  logic clr_n,  // CLR, active low clear
  input  logic d,      // B(t), captured at the rising edge
  output logic q       // B(t-1)
);

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) q <= 1'b0;
    else        q <= d;
  end

endmodule
