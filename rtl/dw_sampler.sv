// dw_sampler: multiple-phase sampler built from shift registers.
//
// M clocks of equal frequency, clk_ph[k] lagging clk_ph[0] by k/M of a
// period, sample the asynchronous serial input at M evenly spaced instants
// per core clock period, giving an oversampling rate of M per core cycle.
// clk_ph[0] is the core clock clk_rx. The sample taken by phase k is
// handed on through flip-flops clocked by phases k+1, k+2, ..., M-1, so
// each hop has 1/M of a period to settle, and is then captured together
// with all other lanes by clk_ph[0]. Lane 0 is sampled by clk_ph[0] itself
// and captured one period later.
//
// Interface: d is registered on clk_ph[0]. The word captured at the edge of
// period n+1 holds the samples taken at nT + kT/M for k = 0 .. M-1, bit 0
// oldest and bit M-1 newest. Latency from a sample to d is at most one core
// period. There is no reset; the data path flushes in one cycle.
//
// That the sampler is a shift-register circuit of about M**2 flip-flops
// follows the design's description; the exact phase-to-phase hand-off
// shown here (M*(M+1)/2 + 1 flip-flops, 79 for M = 12) is this design's own.
module dw_sampler #(
  parameter int unsigned M = 12
) (
  input  logic [M-1:0] clk_ph,   // clk_ph[0] = clk_rx, phase k lags k/M T
  input  logic         din,      // asynchronous serial input
  output logic [M-1:0] d         // sampled word in the clk_ph[0] domain
);
  logic [M-1:0] lane_out;

  for (genvar k = 0; k < M; k++) begin : g_lane
    if (k == 0) begin : g_first
      logic s0;
      always_ff @(posedge clk_ph[0]) s0 <= din;
      assign lane_out[0] = s0;
    end else begin : g_chain
      // stage j is clocked by phase k + j
      logic [M-1-k:0] s;
      always_ff @(posedge clk_ph[k]) s[0] <= din;
      for (genvar j = 1; j <= M - 1 - k; j++) begin : g_hop
        always_ff @(posedge clk_ph[k+j]) s[j] <= s[j-1];
      end
      assign lane_out[k] = s[M-1-k];
    end
  end

  always_ff @(posedge clk_ph[0]) d <= lane_out;
endmodule
