// dw_cdr_top: delay-window blind-oversampling clock and data recovery
// receiver.
//
// The serial input is sampled blindly with a local clock at a rate beta
// times the bit rate, where beta is any real number >= 3 and need not be
// known exactly. The sampled stream is M samples wide per core clock:
// with M > 1 a multiple-phase sampler (dw_sampler) driven by M clock
// phases produces it, with M = 1 a synchronizer (dw_synchronizer) does.
// The delay-window core (dw_cdr_core) decides where bits end, the data
// extractor (dw_data_extractor) gathers the chosen bits and the output
// FIFO (dw_output_fifo) delivers them as OUT_W-bit words. The oversampling
// rate used by the core is either the programmed beta_cfg or, when
// beta_use_est is set and a measurement has finished, the estimate that
// dw_beta_estimator takes from a preamble.
//
// Default parameters are those of the 12-phase, beta = 3 evaluation
// receiver; M = 1 gives the single-phase receiver of the low-power sensor
// node, whose tracking range 3 <= beta <= 9 the 5.3 beta format covers.
//
// Timing: all logic runs on clk_ph[0] (clk_rx). An input edge reaches the
// core about one period after it is sampled (two cycles with M = 1), the
// core, extractor and FIFO each add one register stage. rst_n is a
// synchronous, active-low reset in the clk_ph[0] domain. The way the
// blocks are wired follows the design's architecture; the beta selection
// and the handshake at the output are this design's own.
module dw_cdr_top #(
  parameter int unsigned M          = 12,
  parameter int unsigned OUT_W      = 8,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned PRE_UI     = 8,
  parameter int unsigned BETA_W     = dw_pkg::BETA_W,
  parameter int unsigned LVL_W      = $clog2(FIFO_DEPTH + 1)
) (
  input  logic [M-1:0]      clk_ph,         // clk_ph[0] = clk_rx
  input  logic              rst_n,
  input  logic              din,            // asynchronous serial input
  input  logic [BETA_W-1:0] beta_cfg,       // programmed 8 * beta
  input  logic              beta_use_est,   // use the measured beta
  input  logic              est_arm,        // start a beta measurement
  output logic [BETA_W-1:0] beta_est,
  output logic              beta_est_valid,
  output logic              est_busy,       // measurement in progress
  output logic [BETA_W-1:0] beta_active,    // beta the core is using
  output logic [OUT_W-1:0]  out_word,       // recovered bits, first in bit 0
  output logic              out_valid,
  input  logic              out_ready,
  output logic [LVL_W-1:0]  fifo_level,
  output logic              fifo_overflow
);
  localparam int unsigned CNT_W = $clog2(M + 1);

  logic         clk;
  logic [M-1:0] d;

  assign clk = clk_ph[0];

  if (M == 1) begin : g_single
    dw_synchronizer #(.STAGES(2)) u_sync (
      .clk(clk), .din(din), .d(d[0])
    );
  end else begin : g_multi
    dw_sampler #(.M(M)) u_sampler (
      .clk_ph(clk_ph), .din(din), .d(d)
    );
  end

  dw_beta_estimator #(.M(M), .PRE_UI(PRE_UI)) u_est (
    .clk(clk), .rst_n(rst_n), .arm(est_arm), .d(d),
    .beta_est(beta_est), .beta_valid(beta_est_valid), .busy(est_busy)
  );

  assign beta_active = (beta_use_est && beta_est_valid) ? beta_est : beta_cfg;

  // edge_end (window ended on an edge rather than by expiry) is not needed
  // downstream; it is kept for observing the core.
  logic [M-1:0] phasesel, dsel, edge_end;

  dw_cdr_core #(.M(M)) u_core (
    .clk(clk), .rst_n(rst_n), .beta(beta_active), .d(d),
    .phasesel(phasesel), .dsel(dsel), .edge_end(edge_end)
  );

  logic [M-1:0]     x_bits;
  logic [CNT_W-1:0] x_count;

  dw_data_extractor #(.M(M)) u_extract (
    .clk(clk), .rst_n(rst_n), .phasesel(phasesel), .dsel(dsel),
    .bits(x_bits), .count(x_count)
  );

  dw_output_fifo #(.IN_W(M), .OUT_W(OUT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk), .rst_n(rst_n), .in_bits(x_bits), .in_count(x_count),
    .out_word(out_word), .out_valid(out_valid), .out_ready(out_ready),
    .level(fifo_level), .overflow(fifo_overflow)
  );
endmodule
