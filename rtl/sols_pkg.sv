// sols_pkg: shared names for the SOLS FM0/Manchester encoder.
//
// The encoder is steered by two separate control lines, Mode and CLR, which a
// system controller outside the encoder drives. This package names the two
// codes and gives the control setting that selects each one:
//   FM0        : Mode = 0, CLR = 1 (DFFB free to hold B(t-1))
//   Manchester : Mode = 1, CLR = 0 (DFFB held at 0, so B(t-1) reads as 0)
// CLR is active low. Driving it low in FM0 mode is the hardware
// initialisation: the next FM0 bit then starts from B(t-1) = 0.
package sols_pkg;

  typedef enum logic {
    MODE_FM0        = 1'b0,
    MODE_MANCHESTER = 1'b1
  } coding_mode_e;

  // Level of the active-low CLR line that goes with each coding mode.
  function automatic logic clr_n_for(coding_mode_e m);
    return (m == MODE_FM0) ? 1'b1 : 1'b0;
  endfunction

endpackage
