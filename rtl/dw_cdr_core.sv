// dw_cdr_core: delay-window phase selector, the heart of the DW-CDR.
//
// Each core clock it takes M synchronised input samples (d[0] oldest,
// d[M-1] newest) and decides, sample by sample, where a recovered bit ends.
// A delay window (DW) is a countdown held in `timer`. A data edge (a sample
// that differs from the one before it) ends the current window at once,
// clears p and loads the timer with T_0 - 1, so the next window ends about
// 1.5 bit times later, halfway into the following bit. A window that runs out
// without an edge also ends, increments p and loads T_p - 1, ending about one
// bit time later at the next midpoint. Every window end raises phasesel for
// that sample: one bit has been recovered, namely the sample just before it
// (on an edge, the last sample of the bit that ends there; on an expiry, a
// sample of the bit that has not changed). Because windows restart on every
// edge, the decision grid follows the data, not the local clock, and the
// receiver tracks large drift and low-frequency jitter.
//
// The samples of one word are processed oldest first by an unrolled loop,
// so `timer` and `p` are carried from sample to sample within the cycle.
// T_0 .. T_{2**BETA_FRAC} come from dw_duration instances with constant p.
// Since 2**BETA_FRAC * beta is an integer, T_p for p > 0 repeats with
// period 2**BETA_FRAC, so p wraps from 2**BETA_FRAC back to 1; this gives
// exactly the window lengths of an unbounded p with a few-bit register.
//
// Interface: all outputs are registered and refer to the word that was on
// d in the previous cycle: phasesel[i] marks a recovered bit at sample i,
// dsel[i] is its value and edge[i] tells whether the window ended on a data
// edge (1) or by expiry (0). Synchronous active-low reset clears timer, p
// and phasesel as the algorithm suggests; without reset the state becomes
// known at the first edge.
//
// The loop, the register set and the reset values follow the algorithm's
// description. The oldest-first order, the wrap of p and the choice of the
// pre-edge sample as the recovered value are this design's own.
module dw_cdr_core #(
  parameter int unsigned M         = 12,
  parameter int unsigned BETA_W    = dw_pkg::BETA_W,
  parameter int unsigned BETA_FRAC = dw_pkg::BETA_FRAC,
  parameter int unsigned TIMER_W   = dw_pkg::TIMER_W
) (
  input  logic              clk,        // clk_rx, the core clock
  input  logic              rst_n,      // synchronous, active low
  input  logic [BETA_W-1:0] beta,       // 2**BETA_FRAC * beta, beta >= 3
  input  logic [M-1:0]      d,          // sampled word, bit 0 oldest
  output logic [M-1:0]      phasesel,   // recovered bit at this sample
  output logic [M-1:0]      dsel,       // value of the recovered bit
  output logic [M-1:0]      edge_end    // window ended on a data edge
);
  localparam int unsigned P_W   = BETA_FRAC + 1;
  localparam int unsigned P_MAX = 2 ** BETA_FRAC;

  logic [TIMER_W-1:0] t_tab [P_MAX+1];

  for (genvar k = 0; k <= P_MAX; k++) begin : g_tab
    dw_duration #(
      .BETA_W(BETA_W), .BETA_FRAC(BETA_FRAC), .P_W(P_W), .TIMER_W(TIMER_W)
    ) u_dur (
      .beta (beta),
      .p    (P_W'(k)),
      .t_len(t_tab[k])
    );
  end

  logic               d_last;           // newest sample of the previous word
  logic [TIMER_W-1:0] timer, timer_n;
  logic [P_W-1:0]     p, p_n;
  logic [M-1:0]       sel_n, val_n, edge_n;

  always_comb begin
    logic prev;
    timer_n = timer;
    p_n     = p;
    sel_n   = '0;
    val_n   = '0;
    edge_n  = '0;
    prev    = d_last;
    for (int i = 0; i < M; i++) begin
      val_n[i] = prev;
      if (d[i] != prev) begin
        edge_n[i] = 1'b1;
        sel_n[i]  = 1'b1;
        p_n       = '0;
        timer_n   = t_tab[0] - TIMER_W'(1);
      end else if (timer_n == '0) begin
        sel_n[i]  = 1'b1;
        p_n       = (p_n == P_W'(P_MAX)) ? P_W'(1) : p_n + P_W'(1);
        timer_n   = t_tab[p_n] - TIMER_W'(1);
      end else begin
        timer_n   = timer_n - TIMER_W'(1);
      end
      prev = d[i];
    end
  end

  always_ff @(posedge clk) begin
    d_last <= d[M-1];
    dsel   <= val_n;
    if (!rst_n) begin
      timer    <= '0;
      p        <= '0;
      phasesel <= '0;
      edge_end <= '0;
    end else begin
      timer    <= timer_n;
      p        <= p_n;
      phasesel <= sel_n;
      edge_end <= edge_n;
    end
  end
endmodule
