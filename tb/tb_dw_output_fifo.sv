// tb_dw_output_fifo: random bursts of 0..12 bits in, random consumer
// readiness out. A bit queue in the testbench models the buffer: every
// word taken is compared with the next eight queued bits, the level is
// compared each cycle, and a long stall forces an overflow, which must
// drop exactly the burst that does not fit and set the sticky flag.
module tb_dw_output_fifo;
  localparam int IN_W = 12, OUT_W = 8, DEPTH = 64;
  logic              clk = 1'b0, rst_n = 1'b0;
  logic [IN_W-1:0]   in_bits = '0;
  logic [3:0]        in_count = '0;
  logic [OUT_W-1:0]  out_word;
  logic              out_valid, out_ready = 1'b0, overflow;
  logic [6:0]        level;
  logic              q [$];
  int checks = 0, failures = 0, words = 0, drops = 0;
  bit exp_ovf = 0;

  dw_output_fifo #(.IN_W(IN_W), .OUT_W(OUT_W), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .in_bits(in_bits), .in_count(in_count),
    .out_word(out_word), .out_valid(out_valid), .out_ready(out_ready),
    .level(level), .overflow(overflow));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst_n = 1'b1;
    for (int c = 0; c < 6000; c++) begin
      bit stall;
      stall     = (c >= 3000 && c < 3020);
      in_count  = 4'($urandom_range(0, 6));
      in_bits   = IN_W'($urandom);
      out_ready = stall ? 1'b0 : (($urandom % 4) != 0);
      #1;
      checks++;
      if (out_valid !== (q.size() >= OUT_W) || int'(level) != q.size()) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: level %0d model %0d", c, level, q.size());
      end
      if (out_valid && out_ready) begin
        logic [OUT_W-1:0] ew;
        for (int i = 0; i < OUT_W; i++) ew[i] = q.pop_front();
        checks++; words++;
        if (out_word !== ew) begin
          failures++;
          if (failures < 10) $display("FAIL %0d: word %h exp %h", c, out_word, ew);
        end
      end
      if (q.size() + int'(in_count) <= DEPTH) begin
        for (int i = 0; i < int'(in_count); i++) q.push_back(in_bits[i]);
      end else begin
        exp_ovf = 1; drops++;
      end
      @(posedge clk); #1;
      checks++;
      if (overflow !== exp_ovf) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: overflow %b exp %b", c, overflow, exp_ovf);
      end
    end
    checks++;
    if (drops == 0 || words < 1000) begin
      failures++;
      $display("FAIL coverage: drops %0d words %0d", drops, words);
    end
    $display("words %0d, dropped bursts %0d", words, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
