// dw_duration: the delay-window duration function.
//
// Returns T_p, the length in input samples of the next delay window, given
// the fixed-point oversampling rate beta and p, the number of delay windows
// that have expired since the last data edge:
//   T_0 = floor(1.5 * beta)
//   T_p = floor((p + 1.5) * beta) - floor((p + 0.5) * beta)   for p > 0
// A window that starts at an edge ends near the midpoint 1.5 beta; later
// windows end near the following midpoints 2.5 beta, 3.5 beta, ... The
// difference of two floors carries the rounding error of earlier windows
// forward, so a fractional beta never accumulates timing error (beta = 3.5
// gives 5, 3, 4, 3, 4, ...).
//
// Both products are computed on the integer B = 2**FRAC * beta:
// (p + k/2) * beta = ((2p + k) * B) >> (FRAC + 1), the shift being the
// floor. These equations and the integer-only evaluation follow the
// algorithm's description; the module is purely combinational.
module dw_duration #(
  parameter int unsigned BETA_W    = dw_pkg::BETA_W,
  parameter int unsigned BETA_FRAC = dw_pkg::BETA_FRAC,
  parameter int unsigned P_W       = dw_pkg::P_W,
  parameter int unsigned TIMER_W   = dw_pkg::TIMER_W
) (
  input  logic [BETA_W-1:0]  beta,   // 2**BETA_FRAC * beta
  input  logic [P_W-1:0]     p,      // windows since the last edge
  output logic [TIMER_W-1:0] t_len   // T_p in samples
);
  localparam int unsigned PROD_W = BETA_W + P_W + 2;

  logic [PROD_W-1:0] k_hi, k_lo;     // 2p + 3 and 2p + 1
  logic [PROD_W-1:0] f_hi, f_lo;     // floor((p+1.5)beta), floor((p+0.5)beta)

  always_comb begin
    k_hi = (PROD_W'(p) << 1) + PROD_W'(3);
    k_lo = (PROD_W'(p) << 1) + PROD_W'(1);
    f_hi = (k_hi * PROD_W'(beta)) >> (BETA_FRAC + 1);
    f_lo = (k_lo * PROD_W'(beta)) >> (BETA_FRAC + 1);
    if (p == '0) t_len = TIMER_W'(f_hi);
    else         t_len = TIMER_W'(f_hi - f_lo);
  end
endmodule
