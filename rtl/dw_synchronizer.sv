// dw_synchronizer: single-phase input synchronizer (M = 1).
//
// When the receiver samples with a single clock, the asynchronous serial
// input is brought into the clk_rx domain through a chain of STAGES
// flip-flops, the usual guard against metastability. Each core clock then
// delivers one sample to the delay-window core. The output is the last
// stage; latency is STAGES cycles. No reset: the chain flushes in STAGES
// cycles. The depth of two stages is this design's choice.
module dw_synchronizer #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,     // clk_rx
  input  logic din,     // asynchronous serial input
  output logic d        // synchronized sample
);
  logic [STAGES-1:0] sync;

  always_ff @(posedge clk) sync <= {sync[STAGES-2:0], din};
  assign d = sync[STAGES-1];
endmodule
