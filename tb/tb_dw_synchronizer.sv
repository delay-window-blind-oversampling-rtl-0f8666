// tb_dw_synchronizer: checks that the single-phase synchronizer delivers
// the asynchronous input sampled at each clock edge exactly two cycles
// later.
module tb_dw_synchronizer;
  logic clk = 1'b0, din = 1'b0, d;
  logic hist [$];
  int checks = 0, failures = 0;

  dw_synchronizer dut (.clk(clk), .din(din), .d(d));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 1000; c++) begin
      @(posedge clk);
      hist.push_back(din);              // value sampled at this edge
      #1;
      if (c >= 3) begin
        checks++;
        // value sampled two edges ago: the newest is at the back
        if (d !== hist[hist.size() - 2]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d", c);
        end
      end
      #2 din = 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
