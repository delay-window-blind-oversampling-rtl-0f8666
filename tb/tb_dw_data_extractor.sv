// tb_dw_data_extractor: feeds random phasesel/dsel words, including the
// all-ones and all-zeros cases, and checks the packed bits and their count
// one cycle later against a reference packing done in the testbench.
module tb_dw_data_extractor;
  localparam int M = 12;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0] phasesel = '0, dsel = '0, bits;
  logic [3:0]   count;
  int checks = 0, failures = 0;

  dw_data_extractor #(.M(M)) dut (.clk(clk), .rst_n(rst_n), .phasesel(phasesel),
                                  .dsel(dsel), .bits(bits), .count(count));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      logic [M-1:0] eb;
      int           ec;
      case (c)
        0: phasesel = '1;
        1: phasesel = '0;
        default: phasesel = M'($urandom) & M'($urandom);
      endcase
      dsel = M'($urandom);
      eb = '0; ec = 0;
      for (int i = 0; i < M; i++)
        if (phasesel[i]) begin eb[ec] = dsel[i]; ec++; end
      @(posedge clk); #1;
      checks++;
      if (int'(count) != ec || (bits & M'((1 << ec) - 1)) !== eb) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: count %0d/%0d bits %h/%h", c, count, ec, bits, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
