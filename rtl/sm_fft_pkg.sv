// Shared types and constants of the sign-magnitude FFT.
//
// Data words are 32-bit Q2.30 fixed-point numbers (one sign/integer bit pair,
// thirty fraction bits). A word is held either in sign-magnitude form (bit 31
// is the sign, bits 30:0 the magnitude) or in two's complement form; which one
// a word is in depends on where it sits in the FFT (see fft_ctrl). The Q2.30
// format follows the design description; the package layout is this design's.
package sm_fft_pkg;

  localparam int unsigned DW   = 32;        // data word width, Q2.30
  localparam int unsigned FRAC = 30;        // fraction bits of a data word
  localparam int unsigned MW   = DW - 1;    // magnitude width (31)
  localparam int unsigned PW   = 2 * MW;    // multiplier product width (62)
  localparam int unsigned SW   = PW + 2;    // full-precision butterfly sum (64)
  localparam int unsigned HW   = SW - FRAC; // sum bits above the fraction cut (34)

  typedef logic [DW-1:0] word_t;

  // One complex sample or twiddle factor.
  typedef struct packed {
    word_t re;
    word_t im;
  } cplx_t;

  // Per-butterfly control signals generated by the sequencer.
  typedef struct packed {
    logic cin;    // convert x0 from sign-magnitude to two's complement
    logic cout0;  // convert output X0 back to sign-magnitude
    logic cout1;  // convert output X1 back to sign-magnitude
    logic scale;  // divide both outputs by two
  } bf_ctrl_t;

endpackage
