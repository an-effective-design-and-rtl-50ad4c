// dpll_pkg: widths and types shared by the pixel-clock DPLL blocks.
//
// The DCO control word is 19 bits: the upper 10 bits are the integral code
// that reaches the DCO, the lower 9 bits the fractional code that the
// delta-sigma modulator dithers in. The divider ratio N is 12 bits and each
// sub-TDC delivers a 6-bit code; the controller receives that code with a
// direction bit added (7 bits). The lock-in controller steps through four
// states in order: coarse, fine, fractional search, then phase tracking.
package dpll_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int CODE_W = 19;  // dco_code / avg_dco_code
  localparam int INT_W  = 10;  // integral part, dco_code[18:9]
  localparam int FRAC_W = 9;   // fractional part, dco_code[8:0]
  localparam int TDC_W  = 6;   // sub-TDC code
  localparam int DIV_W  = 12;  // programmable divider ratio

  typedef logic [CODE_W-1:0] code_t;

  typedef enum logic [1:0] {
    ST_COARSE = 2'd0,  // integral search, large steps, DSM off
    ST_FINE   = 2'd1,  // integral search, small steps, DSM off
    ST_FRAC   = 2'd2,  // fractional search, DSM on
    ST_TRACK  = 2'd3   // fast phase tracking with the TDC, DSM on
  } lock_state_e;
endpackage
