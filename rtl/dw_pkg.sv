// dw_pkg: constants shared by the delay-window clock and data recovery
// (DW-CDR) receiver.
//
// The oversampling rate beta (input samples per unit interval) is a real
// number. It is carried as an unsigned fixed-point value with BETA_INT
// integer bits and BETA_FRAC fractional bits, i.e. the integer
// 2**BETA_FRAC * beta. The 5.3 format is the worked example of the
// algorithm's description; it covers 3 <= beta < 32 in steps of 1/8.
// A delay window is at most floor(1.5 * beta) samples long, which needs
// BETA_INT + 1 bits for the timer.
package dw_pkg;
  localparam int unsigned BETA_INT  = 5;
  localparam int unsigned BETA_FRAC = 3;
  localparam int unsigned BETA_W    = BETA_INT + BETA_FRAC;
  localparam int unsigned TIMER_W   = BETA_INT + 1;
  // p only matters modulo 2**BETA_FRAC once it is above zero (see
  // dw_cdr_core), so it is held in BETA_FRAC + 1 bits: 0 .. 2**BETA_FRAC.
  localparam int unsigned P_W       = BETA_FRAC + 1;
endpackage
