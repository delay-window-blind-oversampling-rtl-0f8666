// tb_dw_cdr_core: drives a 12-sample-per-cycle core and a single-sample
// core with jittered, frequency-offset PRBS-7 data and compares every
// phasesel, dsel and edge_end bit with the reference model of the
// algorithm, cycle by cycle (outputs are one cycle behind the input). It
// also checks the recovered bits with a PRBS checker, so the whole chain
// recovers error-free data, and that fractional beta works. Several beta
// settings are run in turn, the core being reset in between.
module tb_dw_cdr_core;
  import dw_tb_pkg::*;

  localparam int M = 12;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [7:0]   beta;
  logic [M-1:0] d12;
  logic [0:0]   d1;
  logic [M-1:0] sel12, val12, edg12;
  logic [0:0]   sel1, val1, edg1;

  int checks = 0, failures = 0;
  int ends_edge = 0, ends_expiry = 0;

  dw_cdr_core #(.M(M)) dut12 (.clk(clk), .rst_n(rst_n), .beta(beta), .d(d12),
                              .phasesel(sel12), .dsel(val12), .edge_end(edg12));
  dw_cdr_core #(.M(1)) dut1 (.clk(clk), .rst_n(rst_n), .beta(beta), .d(d1),
                             .phasesel(sel1), .dsel(val1), .edge_end(edg1));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic run(int b8, real beta_data, real jamp, real jper, int cycles);
    line_model   lm12, lm1;
    dw_ref       r12, r1;
    prbs_checker pc12, pc1;
    logic [M-1:0] es12, ev12, ee12;
    logic es1, ev1, ee1;
    lm12 = new(beta_data, jamp, jper, 5.0);
    lm1  = new(beta_data, jamp, jper, 2.0);
    r12 = new(); r1 = new();
    pc12 = new(); pc1 = new();
    r12.beta = real'(b8) / 8.0;
    r1.beta  = real'(b8) / 8.0;
    beta  = 8'(b8);
    rst_n = 1'b0;
    d12   = '0; d1 = '0;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < cycles; c++) begin
      for (int i = 0; i < M; i++) begin
        d12[i] = lm12.next_sample();
        r12.step(d12[i], es12[i], ev12[i], ee12[i]);
      end
      d1[0] = lm1.next_sample();
      r1.step(d1[0], es1, ev1, ee1);
      @(posedge clk);
      #1;
      checks++;
      if (sel12 !== es12 || (val12 & es12) !== (ev12 & es12) || edg12 !== ee12) begin
        failures++;
        if (failures < 10)
          $display("FAIL M=12 beta8=%0d cycle %0d sel %h/%h val %h/%h", b8, c, sel12, es12, val12, ev12);
      end
      checks++;
      if (sel1 !== es1 || (sel1[0] && val1[0] !== ev1) || edg1[0] !== ee1) begin
        failures++;
        if (failures < 10) $display("FAIL M=1 beta8=%0d cycle %0d", b8, c);
      end
      for (int i = 0; i < M; i++)
        if (sel12[i]) begin
          pc12.push(val12[i]);
          if (edg12[i]) ends_edge++; else ends_expiry++;
        end
      if (sel1[0]) pc1.push(val1[0]);
    end
    checks += 2;
    if (pc12.errors != 0 || pc12.checked < cycles * M / 12) begin
      failures++;
      $display("FAIL M=12 beta8=%0d prbs errors %0d of %0d", b8, pc12.errors, pc12.checked);
    end
    if (pc1.errors != 0 || pc1.checked < cycles / 12) begin
      failures++;
      $display("FAIL M=1 beta8=%0d prbs errors %0d of %0d", b8, pc1.errors, pc1.checked);
    end
    $display("beta=%0.3f data beta=%0.4f jitter %0.1f: M=12 %0d bits, M=1 %0d bits",
             real'(b8) / 8.0, beta_data, jamp, pc12.checked, pc1.checked);
  endtask

  initial begin
    run(24, 3.0,    0.0,  0.0,    2000);   // matched rate
    run(24, 3.03,   0.8,  997.0,  2000);   // 1 % offset plus jitter
    run(28, 3.5,    0.5,  1500.0, 2000);   // fractional beta
    run(35, 4.375,  6.0,  20000.0, 3000);  // large slow jitter
    run(72, 9.0,    1.0,  3000.0, 3000);   // top of the sensor-node range
    run(24, 2.96,   0.0,  0.0,    2000);   // data faster than nominal
    checks++;
    if (ends_edge == 0 || ends_expiry == 0) begin
      failures++;
      $display("FAIL window ends: edge %0d expiry %0d", ends_edge, ends_expiry);
    end
    $display("windows ended by edge %0d, by expiry %0d", ends_edge, ends_expiry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
