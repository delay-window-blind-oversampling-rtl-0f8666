// dw_tb_pkg: testbench models shared by the DW-CDR testbenches.
//
//   line_model   - a transmitter and channel: PRBS-7 bits at a real-valued
//                  number of samples per bit, with a frequency offset and
//                  sinusoidal jitter, sampled at integer sample instants.
//   dw_ref       - an independent model of the delay-window algorithm with
//                  an unbounded window counter p and window lengths
//                  computed in real arithmetic.
//   prbs_checker - a self-synchronising PRBS-7 (x^7 + x^6 + 1) checker that
//                  ignores the first 16 bits it is given.
package dw_tb_pkg;

  class line_model;
    real    beta;        // samples per bit
    real    jit_amp;     // sinusoidal jitter amplitude, in samples
    real    jit_per;     // jitter period, in samples
    real    t0;          // time of the first bit boundary, in samples
    longint n;           // next sample index
    int     k;           // current bit index
    logic [6:0] lfsr;
    logic   cur;
    logic   idle_level;

    function new(real beta_i, real jit_amp_i, real jit_per_i, real t0_i);
      beta = beta_i; jit_amp = jit_amp_i; jit_per = jit_per_i; t0 = t0_i;
      n = 0; k = -1; lfsr = 7'h7f; cur = 1'b0; idle_level = 1'b0;
    endfunction

    function logic prbs_next();
      logic b;
      b    = lfsr[6] ^ lfsr[5];
      lfsr = {lfsr[5:0], b};
      return b;
    endfunction

    // position of sample n in bit units, jitter included
    function real bitpos(longint nn);
      real t;
      t = real'(nn) + 0.37 - t0;
      if (jit_per > 0.0) t = t + jit_amp * $sin(2.0 * 3.14159265358979 * real'(nn) / jit_per);
      return t / beta;
    endfunction

    function logic next_sample();
      real bp;
      bp = bitpos(n);
      n++;
      if (bp < 0.0) return idle_level;
      while (real'(k + 1) <= bp) begin
        k++;
        cur = prbs_next();
      end
      return cur;
    endfunction
  endclass

  class dw_ref;
    real  beta;
    int   timer;
    int   p;
    logic last;

    function new();
      timer = 0; p = 0; last = 1'b0;
    endfunction

    function int t_of(int pp);
      if (pp == 0) return int'($floor(1.5 * beta));
      return int'($floor((real'(pp) + 1.5) * beta)) - int'($floor((real'(pp) + 0.5) * beta));
    endfunction

    // one sample; returns whether a bit ends here and its value
    function void step(logic s, output logic sel, output logic val, output logic edg);
      val = last;
      edg = (s != last);
      if (edg) begin
        sel = 1'b1; p = 0; timer = t_of(0) - 1;
      end else if (timer == 0) begin
        sel = 1'b1; p = p + 1; timer = t_of(p) - 1;
      end else begin
        sel = 1'b0; timer = timer - 1;
      end
      last = s;
    endfunction
  endclass

  class prbs_checker;
    logic [6:0] hist;
    int         seen;
    int         errors;
    int         checked;

    function new();
      hist = '0; seen = 0; errors = 0; checked = 0;
    endfunction

    // the first bits may still be line idle before the PRBS starts
    function void push(logic b);
      if (seen >= 16) begin
        checked++;
        if (b != (hist[6] ^ hist[5])) errors++;
      end
      hist = {hist[5:0], b};
      seen++;
    endfunction
  endclass

endpackage
