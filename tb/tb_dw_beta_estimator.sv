// tb_dw_beta_estimator: sends idle, a 9-bit alternating preamble and random
// data at several real-valued oversampling rates into a 12-sample-per-cycle
// and a single-sample estimator. The testbench locates the first and ninth
// edge in the sample stream itself; the estimate must equal their distance
// in samples times 8 / PRE_UI and lie within 1/8 of the true beta. It also
// checks that the result is ready in the cycle after the ninth edge
// reaches the estimator and that arm clears beta_valid.
module tb_dw_beta_estimator;
  localparam int M = 12;
  localparam int PRE_UI = 8;

  logic         clk = 1'b0, rst_n = 1'b0, arm = 1'b0;
  logic [M-1:0] d12 = '0;
  logic [0:0]   d1 = '0;
  logic [7:0]   est12, est1;
  logic         val12, val1, busy12, busy1;
  int checks = 0, failures = 0;

  dw_beta_estimator #(.M(M), .PRE_UI(PRE_UI)) dut12 (
    .clk(clk), .rst_n(rst_n), .arm(arm), .d(d12),
    .beta_est(est12), .beta_valid(val12), .busy(busy12));
  dw_beta_estimator #(.M(1), .PRE_UI(PRE_UI)) dut1 (
    .clk(clk), .rst_n(rst_n), .arm(arm), .d(d1),
    .beta_est(est1), .beta_valid(val1), .busy(busy1));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // sample n of a packet: idle 0, then 9 alternating preamble bits
  // starting with 1, then random bits
  function automatic logic pkt_sample(real beta, real off, int n, ref logic data[$]);
    real bp;
    int  k;
    bp = (real'(n) - off) / beta;
    if (bp < 0.0) return 1'b0;
    k = int'($floor(bp));
    if (k < 9) return (k % 2 == 0);
    while (data.size() <= k - 9) data.push_back(1'($urandom));
    return data[k - 9];
  endfunction

  task automatic run_one(real beta, real off);
    logic data12 [$], data1 [$];
    logic prev12, prev1;
    int   e12, e1, first12, first1, last12, last1, done_cyc12, done_cyc1;
    int   n12, n1;
    @(negedge clk);
    arm = 1'b1;
    @(negedge clk);
    arm = 1'b0;
    checks++;
    if (val12 || val1) begin failures++; $display("FAIL arm did not clear valid"); end
    prev12 = 1'b0; prev1 = 1'b0; e12 = 0; e1 = 0;
    first12 = -1; first1 = -1; last12 = -1; last1 = -1;
    done_cyc12 = -1; done_cyc1 = -1; n12 = 0; n1 = 0;
    for (int c = 0; c < 2000; c++) begin
      for (int i = 0; i < M; i++) begin
        d12[i] = pkt_sample(beta, off, n12, data12);
        if (d12[i] != prev12) begin
          if (e12 == 0) first12 = n12;
          if (e12 == PRE_UI) begin last12 = n12; done_cyc12 = c; end
          e12++;
        end
        prev12 = d12[i]; n12++;
      end
      d1[0] = pkt_sample(beta, off + 0.4, n1, data1);
      if (d1[0] != prev1) begin
        if (e1 == 0) first1 = n1;
        if (e1 == PRE_UI) begin last1 = n1; done_cyc1 = c; end
        e1++;
      end
      prev1 = d1[0]; n1++;
      @(negedge clk);
      // valid must rise exactly in the cycle after the final edge's word
      if (c == done_cyc12) begin
        checks++;
        if (!val12) begin failures++; $display("FAIL M=12 beta %0.3f valid late", beta); end
      end else if (done_cyc12 < 0) begin
        checks++;
        if (val12) begin failures++; $display("FAIL M=12 beta %0.3f valid early", beta); end
      end
      if (c == done_cyc1) begin
        checks++;
        if (!val1) begin failures++; $display("FAIL M=1 beta %0.3f valid late", beta); end
      end
      if (done_cyc12 >= 0 && done_cyc1 >= 0 && c > done_cyc1 + 2) break;
    end
    begin
      int exp12, exp1;
      real b8;
      b8    = beta * 8.0;
      exp12 = (last12 - first12) * 8 / PRE_UI;
      exp1  = (last1 - first1) * 8 / PRE_UI;
      checks += 2;
      if (!val12 || int'(est12) != exp12 || (real'(est12) - b8 > 1.01 || b8 - real'(est12) > 1.01)) begin
        failures++;
        $display("FAIL M=12 beta %0.3f est %0d exp %0d", beta, est12, exp12);
      end
      if (!val1 || int'(est1) != exp1 || (real'(est1) - b8 > 1.01 || b8 - real'(est1) > 1.01)) begin
        failures++;
        $display("FAIL M=1 beta %0.3f est %0d exp %0d", beta, est1, exp1);
      end
      $display("beta %6.3f: M=12 estimate %0.3f, M=1 estimate %0.3f",
               beta, real'(est12) / 8.0, real'(est1) / 8.0);
    end
    // line back to idle before the next packet
    d12 = '0; d1 = '0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_one(3.0, 7.3);
    run_one(3.3, 20.1);
    run_one(4.7, 2.2);
    run_one(7.25, 31.6);
    run_one(9.0, 5.5);
    run_one(12.6, 13.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
