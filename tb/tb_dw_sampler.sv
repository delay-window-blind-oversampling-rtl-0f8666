// tb_dw_sampler: drives the 12-phase sampler with twelve clocks 1/12 of a
// period apart and a random input that changes between sampling instants,
// and checks that every captured word holds exactly the values present at
// the twelve sampling instants of the previous period, oldest in bit 0.
module tb_dw_sampler;
  localparam int M    = 12;
  localparam int STEP = 10;            // time between phases
  localparam int PER  = M * STEP;      // core clock period
  localparam int NW   = 400;           // words checked

  logic [M-1:0] clk_ph;
  logic         din = 1'b0;
  logic [M-1:0] d;
  logic         v [M * (NW + 4)];
  int checks = 0, failures = 0;

  dw_sampler #(.M(M)) dut (.clk_ph(clk_ph), .din(din), .d(d));

  for (genvar k = 0; k < M; k++) begin : g_clk
    logic c = 1'b0;
    initial begin
      #(k * STEP);
      forever begin
        c = 1'b1; #(PER / 2);
        c = 1'b0; #(PER / 2);
      end
    end
    assign clk_ph[k] = c;
  end

  initial begin
    #(PER * (NW + 50));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // sampling instant s is at time s*STEP; din takes v[s] just after it,
  // so instant s sees v[s-1]
  initial begin
    for (int s = 0; s < M * (NW + 4); s++) v[s] = 1'($urandom);
    #3;
    for (int s = 0; s < M * (NW + 4); s++) begin
      din = v[s];
      #(STEP);
    end
  end

  initial begin
    // word captured at the start of period n+1 holds instants 12n .. 12n+11
    #(2 * PER + 1);
    for (int n = 1; n <= NW; n++) begin
      logic [M-1:0] exp;
      for (int k = 0; k < M; k++) exp[k] = v[M * n + k - 1];
      checks++;
      if (d !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d got %h exp %h", n, d, exp);
      end
      #(PER);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
