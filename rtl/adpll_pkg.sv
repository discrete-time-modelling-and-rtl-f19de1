// adpll_pkg: types and constants shared by the ADPLL node.
//
// The phase-frequency detector (PFD) is a three-state machine. Its state m is
// -1 (a divided edge opened a measurement), 0 (waiting) or +1 (a reference
// edge opened a measurement). The state is held in a 2-bit two's-complement
// encoding, so the numeric value of the enum equals m. The timing error eps
// ranges over -N_D..+N_D with N_D = 7, which takes a sign and a 3-bit
// magnitude, 4 bits in all. These widths are the shared defaults; the modules
// take them as parameters.
`timescale 1ps / 1fs
package adpll_pkg;

  // PFD state m, encoded so that $signed(state) == m.
  typedef enum logic [1:0] {
    M_WAIT = 2'b00,  // m =  0: waiting mode, last error held
    M_REF  = 2'b01,  // m = +1: reference edge came first, measuring
    M_DIV  = 2'b11   // m = -1: divided edge came first, measuring
  } pfd_state_t;

  // Saturation value of the timing error (N_D, 7 on the measured chip).
  localparam int unsigned N_D_DEFAULT   = 7;
  // Width of the signed timing error: sign plus 3-bit magnitude.
  localparam int unsigned ERR_W_DEFAULT = 4;
  // DCO control code width: 256 steps of 156 kHz span 135..175 MHz divided.
  localparam int unsigned CODE_W_DEFAULT = 8;
  // Feedback division factor N.
  localparam int unsigned DIV_N_DEFAULT = 4;
  // Loop-filter gains: unsigned fixed point with GAIN_FRAC fractional bits.
  localparam int unsigned GAIN_W_DEFAULT    = 12;
  localparam int unsigned GAIN_FRAC_DEFAULT = 10;
  // Integral accumulator width (signed, saturating).
  localparam int unsigned PSI_W_DEFAULT = 16;

endpackage
