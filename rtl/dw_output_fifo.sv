// dw_output_fifo: bit-granular elastic buffer at the output of the CDR.
//
// The data extractor delivers a variable number of recovered bits per core
// clock (0 .. M; about M / beta on average, more or less as the data drifts
// against the local clock). This FIFO accepts them at any count and hands
// them out as fixed OUT_W-bit words with a valid/ready handshake, first bit
// received in bit 0. It is a DEPTH-bit shift buffer: each cycle it first
// removes one word from the bottom if the consumer takes it, then appends
// the new bits above the remaining ones.
//
// If the new bits do not fit, they are dropped and the sticky `overflow`
// flag is set until reset. `level` is the number of buffered bits.
// out_valid is asserted when at least OUT_W bits are held; out_word is
// stable while out_valid is high and out_ready low. Synchronous
// active-low reset empties the buffer.
//
// An output FIFO is part of the receiver's overall architecture; its word
// width, depth, handshake and overflow policy are this design's own.
module dw_output_fifo #(
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = 8,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned CNT_W = $clog2(IN_W + 1),
  parameter int unsigned LVL_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IN_W-1:0]  in_bits,     // in_bits[0] first
  input  logic [CNT_W-1:0] in_count,    // valid bits in in_bits
  output logic [OUT_W-1:0] out_word,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [LVL_W-1:0] level,
  output logic             overflow
);
  logic [DEPTH-1:0] buffer;

  assign out_valid = (level >= LVL_W'(OUT_W));
  assign out_word  = buffer[OUT_W-1:0];

  logic             pop;
  logic [LVL_W-1:0] lvl_pop;
  logic [DEPTH-1:0] buf_pop, new_bits, keep_mask;
  logic             fits;

  always_comb begin
    pop       = out_valid && out_ready;
    lvl_pop   = pop ? level - LVL_W'(OUT_W) : level;
    buf_pop   = pop ? (buffer >> OUT_W) : buffer;
    keep_mask = (DEPTH'(1) << lvl_pop) - DEPTH'(1);
    new_bits  = (DEPTH'(in_bits) & ((DEPTH'(1) << in_count) - DEPTH'(1))) << lvl_pop;
    fits      = (32'(lvl_pop) + 32'(in_count)) <= DEPTH;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buffer   <= '0;
      level    <= '0;
      overflow <= 1'b0;
    end else if (fits) begin
      buffer <= (buf_pop & keep_mask) | new_bits;
      level  <= lvl_pop + LVL_W'(in_count);
    end else begin
      buffer   <= buf_pop & keep_mask;
      level    <= lvl_pop;
      overflow <= 1'b1;
    end
  end

  // The buffer never holds more bits than it has room for.
  a_level_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    level <= LVL_W'(DEPTH));
endmodule
