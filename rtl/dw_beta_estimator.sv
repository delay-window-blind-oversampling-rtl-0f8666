// dw_beta_estimator: oversampling-rate estimation from a preamble.
//
// When the exact ratio of the local sampling rate to the bit rate is not
// known, it is measured on a preamble of known length. After `arm`, the
// block waits for the first data edge (the start of the preamble), then
// counts input samples until the PRE_UI-th further edge (the end of the
// measured stretch), so the count is PRE_UI unit intervals long. The
// estimate is
//   beta_est = (span * 2**BETA_FRAC) / PRE_UI   (truncated)
// in the same fixed-point format the delay-window core uses.
//
// The preamble is assumed to be a run of bits that each begin with a
// transition, such as an NRZI-coded string of ones: a 9-bit preamble then
// shows 9 edges, 8 unit intervals apart from the first to the last, hence
// PRE_UI = 8, which also makes the division a shift. Edge times are taken
// to the sample, even when several edges fall into one M-sample word.
// If the span grows past PRE_UI * 2**BETA_INT samples without finishing,
// the measurement restarts at the next edge.
//
// Interface: arm (one cycle) clears beta_valid and starts a measurement;
// beta_valid rises one cycle after the word holding the final edge, and
// beta_est then holds until the next arm. busy is high while measuring.
// Synchronous active-low reset.
//
// Counting the preamble and dividing by its length follow the design's
// description; the preamble pattern, edge-to-edge timing and timeout are
// this design's own.
module dw_beta_estimator #(
  parameter int unsigned M         = 12,
  parameter int unsigned PRE_UI    = 8,
  parameter int unsigned BETA_INT  = dw_pkg::BETA_INT,
  parameter int unsigned BETA_FRAC = dw_pkg::BETA_FRAC,
  parameter int unsigned BETA_W    = BETA_INT + BETA_FRAC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              arm,
  input  logic [M-1:0]      d,           // sampled word, bit 0 oldest
  output logic [BETA_W-1:0] beta_est,
  output logic              beta_valid,
  output logic              busy
);
  localparam int unsigned SPAN_MAX = PRE_UI * (2 ** BETA_INT);
  localparam int unsigned SPAN_W   = $clog2(SPAN_MAX + M + 1) + 1;
  localparam int unsigned EDGE_W   = $clog2(PRE_UI + 1);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_COUNT} state_t;

  state_t              state, state_n;
  logic                d_last;
  logic [SPAN_W-1:0]   base, base_n;     // samples from start edge to d[0]
  logic [EDGE_W-1:0]   nedge, nedge_n;   // edges seen after the start edge
  logic                done_n;
  logic [SPAN_W-1:0]   span_n;

  always_comb begin
    logic prev;
    state_n = state;
    base_n  = base;
    nedge_n = nedge;
    done_n  = 1'b0;
    span_n  = '0;
    prev    = d_last;
    for (int i = 0; i < M; i++) begin
      if (d[i] != prev) begin
        if (state_n == S_WAIT) begin
          state_n = S_COUNT;
          nedge_n = '0;
          base_n  = -SPAN_W'(i);         // start edge at offset 0
        end else if (state_n == S_COUNT) begin
          nedge_n = nedge_n + EDGE_W'(1);
          if (nedge_n == EDGE_W'(PRE_UI)) begin
            state_n = S_IDLE;
            done_n  = 1'b1;
            span_n  = base_n + SPAN_W'(i);
          end
        end
      end
      prev = d[i];
    end
    if (state_n == S_COUNT) begin
      base_n = base_n + SPAN_W'(M);
      if (base_n > SPAN_W'(SPAN_MAX)) state_n = S_WAIT;
    end
  end

  logic [SPAN_W+BETA_FRAC-1:0] quot;
  assign quot = (SPAN_W+BETA_FRAC)'({span_n, {BETA_FRAC{1'b0}}} / PRE_UI);

  always_ff @(posedge clk) begin
    d_last <= d[M-1];
    if (!rst_n) begin
      state      <= S_IDLE;
      base       <= '0;
      nedge      <= '0;
      beta_est   <= '0;
      beta_valid <= 1'b0;
    end else if (arm) begin
      state      <= S_WAIT;
      beta_valid <= 1'b0;
    end else begin
      state <= state_n;
      base  <= base_n;
      nedge <= nedge_n;
      if (done_n) begin
        beta_valid <= 1'b1;
        beta_est   <= (quot > (SPAN_W+BETA_FRAC)'({BETA_W{1'b1}}))
                      ? {BETA_W{1'b1}} : BETA_W'(quot);
      end
    end
  end

  assign busy = (state != S_IDLE);
endmodule
