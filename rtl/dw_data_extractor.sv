// dw_data_extractor: collects the bits chosen by the phase selector.
//
// The delay-window core marks, per sample of a word, whether a recovered
// bit ends there (phasesel) and its value (dsel). Anywhere from 0 to M bits
// can be recovered from one word (about M / beta on average). This block
// packs the selected values into the low end of `bits`, oldest first, and
// reports how many there are in `count`. Its function (store the bit when
// phasesel is set) follows the design's description; packing into a
// count-plus-bits word for the output FIFO is this design's own.
//
// Timing: one register stage; bits/count describe the phasesel/dsel of the
// previous cycle. Synchronous active-low reset clears count.
module dw_data_extractor #(
  parameter int unsigned M   = 12,
  parameter int unsigned CNT_W = $clog2(M + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [M-1:0]     phasesel,
  input  logic [M-1:0]     dsel,
  output logic [M-1:0]     bits,     // bits[0] is the oldest recovered bit
  output logic [CNT_W-1:0] count     // number of valid bits in `bits`
);
  logic [M-1:0]     bits_n;
  logic [CNT_W-1:0] count_n;

  always_comb begin
    bits_n  = '0;
    count_n = '0;
    for (int i = 0; i < M; i++) begin
      if (phasesel[i]) begin
        bits_n[count_n] = dsel[i];
        count_n         = count_n + CNT_W'(1);
      end
    end
  end

  always_ff @(posedge clk) begin
    bits <= bits_n;
    if (!rst_n) count <= '0;
    else        count <= count_n;
  end
endmodule
