// tb_dw_cdr_single: end-to-end test of the single-phase receiver (M = 1),
// the configuration for a low-power node whose free-running clock is only
// loosely related to the bit rate (tracking range 3 <= beta <= 9).
//
// One clock samples the line once per cycle through the synchronizer. A
// transmitter model sends packets made of a 9-bit alternating preamble and
// run-length-limited data (no run over 3 equal bits); with a programmed
// beta it sends data with long runs instead. The recovered bits are
// compared with the transmitted ones after locating the first 32 of them.
// Packets: beta = 9 programmed with data 1 % slow and jitter; beta 3.3,
// 5.5 and 8.9 estimated from the preamble; a blocked consumer that must
// overflow the FIFO. Window ends by edge and by expiry, wraps of p,
// consumer stalls, overflow and estimation are counted and must occur.
module tb_dw_cdr_single;
  localparam int  M    = 1;
  localparam int  STEP = 1000;              // sample spacing, time units
  localparam int  PER  = M * STEP;          // core clock period

  logic [M-1:0] clk_ph;
  logic         rst_n = 1'b0;
  logic         din = 1'b0;
  logic [7:0]   beta_cfg = 8'd24;
  logic         beta_use_est = 1'b0, est_arm = 1'b0;
  logic [7:0]   beta_est, beta_active;
  logic         beta_est_valid, est_busy;
  logic [7:0]   out_word;
  logic         out_valid, out_ready = 1'b1;
  logic [6:0]   fifo_level;
  logic         fifo_overflow;

  dw_cdr_top #(.M(M)) dut (
    .clk_ph(clk_ph), .rst_n(rst_n), .din(din), .beta_cfg(beta_cfg),
    .beta_use_est(beta_use_est), .est_arm(est_arm), .beta_est(beta_est),
    .beta_est_valid(beta_est_valid), .est_busy(est_busy),
    .beta_active(beta_active), .out_word(out_word), .out_valid(out_valid),
    .out_ready(out_ready), .fifo_level(fifo_level),
    .fifo_overflow(fifo_overflow));

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
  wire clk = clk_ph[0];

  int checks = 0, failures = 0;
  int n_edge = 0, n_expiry = 0, n_pwrap = 0, n_stall = 0;
  int n_ovf = 0, n_est = 0, n_long = 0;

  initial begin
    #(longint'(STEP) * 1000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // ---------------- transmitter ----------------
  logic tx_bits [$];
  real  tx_beta, tx_jamp, tx_jper;
  bit   tx_go = 0;
  bit   tx_preamble = 0;
  int   tx_nbits = 0;

  // random bits; with long_runs, now and then a run of 10 to 24 equal
  // bits, otherwise no run longer than 3 (as after 4B5B and NRZI coding)
  function automatic void make_data(int n, bit long_runs);
    logic b = 1'b1;                      // data starts with a 1 after idle 0
    int   run = 0;
    tx_bits.delete();
    while (tx_bits.size() < n) begin
      if (!long_runs && run == 3 && b == tx_bits[tx_bits.size() - 1]) b = ~b;
      if (tx_bits.size() > 0 && b == tx_bits[tx_bits.size() - 1]) run++; else run = 1;
      if (long_runs && $urandom % 40 == 0) begin
        int run = 10 + $urandom % 15;
        for (int i = 0; i < run; i++) tx_bits.push_back(b);
        b = ~b;                          // keep long runs apart
      end else begin
        tx_bits.push_back(b);
        b = 1'($urandom);
      end
    end
  endfunction

  // line driver: bit k starts at t0 + k*beta*STEP + jitter
  initial begin
    forever begin
      wait (tx_go);
      begin
        real    t0, t;
        longint tt;
        int     k, npre;
        npre = tx_preamble ? 9 : 0;
        t0 = $realtime + 37.0 * STEP + 113.0;
        for (k = 0; k < npre + tx_nbits && tx_go; k++) begin
          t = t0 + real'(k) * tx_beta * STEP;
          if (tx_jper > 0.0)
            t = t + tx_jamp * tx_beta * STEP * $sin(2.0 * 3.14159265358979 * real'(k) / tx_jper);
          tt = longint'(t);
          if (tt % STEP == 0) tt = tt + 1;
          if (tt > longint'($realtime)) #(tt - longint'($realtime));
          din = (k < npre) ? ((k % 2) == 0) : tx_bits[k - npre];
        end
        // hold the last bit, then return to idle
        #(longint'(tx_beta * STEP) * 3);
        din = 1'b0;
        tx_go = 0;
      end
    end
  end

  // ---------------- receiver side ----------------
  logic rx_bits [$];
  bit   stall_mode = 0;
  bit   block_all = 0;
  logic [3:0] p_prev = '0;

  always @(negedge clk) begin
    if (block_all) out_ready <= 1'b0;
    else if (stall_mode) out_ready <= ($urandom % 8) != 0;
    else out_ready <= 1'b1;
  end

  always @(posedge clk) if (rst_n) begin
    logic [M-1:0] ps, ee;
    int nb;
    ps = dut.u_core.phasesel;
    ee = dut.u_core.edge_end;
    for (int i = 0; i < M; i++) if (ps[i]) begin
      if (ee[i]) n_edge++; else n_expiry++;
    end
    if (dut.u_core.p == 4'd8 || (dut.u_core.p != 0 && dut.u_core.p < p_prev)) n_pwrap++;
    p_prev = dut.u_core.p;
    nb = 0;
    for (int i = 0; i < M; i++) nb += int'(ps[i]);
    if (out_valid && !out_ready) n_stall++;
    if (fifo_overflow) n_ovf++;
    if (out_valid && out_ready)
      for (int i = 0; i < 8; i++) rx_bits.push_back(out_word[i]);
  end

  // locate the transmitted data in the received stream and compare
  task automatic compare(string tag);
    int pos = -1, errs = 0, ncmp = 0, run = 0, longest = 0;
    for (int s = 0; s + 32 <= rx_bits.size() && pos < 0; s++) begin
      bit ok = 1;
      for (int i = 0; i < 32 && ok; i++) if (rx_bits[s + i] != tx_bits[i]) ok = 0;
      if (ok) pos = s;
    end
    checks++;
    if (pos < 0) begin
      failures++;
      $display("FAIL %s: data not found in %0d received bits", tag, rx_bits.size());
      return;
    end
    for (int i = 0; pos + i < rx_bits.size() && i < tx_bits.size(); i++) begin
      ncmp++; checks++;
      if (rx_bits[pos + i] != tx_bits[i]) begin
        if (errs == 0) $display("first error at bit %0d, run %0d", i, run);
        errs++;
      end
      if (i > 0 && tx_bits[i] == tx_bits[i - 1]) run++; else run = 1;
      if (rx_bits[pos + i] == tx_bits[i] && run == 10) n_long++;
    end
    checks++;
    if (errs != 0 || ncmp < tx_bits.size() - 64) begin
      failures++;
      $display("FAIL %s: %0d bit errors in %0d compared of %0d sent", tag, errs, ncmp, tx_bits.size());
    end
    $display("%s: %0d bits compared, %0d errors", tag, ncmp, errs);
  endtask

  task automatic packet(int b8, bit use_est, bit pre, real beta_data,
                        real jamp, real jper, int nbits, bit long_runs);
    rx_bits.delete();
    @(negedge clk);
    rst_n = 1'b0;
    beta_cfg = 8'(b8);
    beta_use_est = use_est;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    if (use_est) begin
      est_arm = 1'b1; @(negedge clk); est_arm = 1'b0;
    end
    make_data(nbits, long_runs);
    tx_beta = beta_data; tx_jamp = jamp; tx_jper = jper;
    tx_preamble = pre; tx_nbits = tx_bits.size();
    tx_go = 1;
    wait (!tx_go);
    repeat (20) @(negedge clk);
  endtask

  task automatic estimated(int lo, int hi, real beta, string tag);
    checks++;
    if (!beta_est_valid || beta_est < 8'(lo) || beta_est > 8'(hi)) begin
      failures++;
      $display("FAIL %s: estimate %0d valid %b", tag, beta_est, beta_est_valid);
    end else begin
      n_est++;
    end
    $display("estimated beta %0.3f (true %0.3f)", real'(beta_est) / 8.0, beta);
    compare(tag);
  endtask

  initial begin
    // 1: top of the range, programmed, data 1 % slow plus jitter
    stall_mode = 1;
    packet(72, 0, 0, 9.0 * 1.01, 1.5, 3000.0, 6000, 1);
    compare("beta 9 programmed, data 1 % slow, 1.5 UI jitter");
    stall_mode = 0;
    // 2-4: beta estimated from the preamble
    packet(24, 1, 1, 3.3, 0.1, 2000.0, 4000, 0);
    estimated(26, 27, 3.3, "beta 3.3 estimated");
    packet(24, 1, 1, 5.5, 0.2, 2000.0, 4000, 0);
    estimated(43, 44, 5.5, "beta 5.5 estimated");
    packet(24, 1, 1, 8.9, 0.2, 2000.0, 4000, 0);
    estimated(70, 72, 8.9, "beta 8.9 estimated");
    // 5: consumer blocked, FIFO overflows
    block_all = 1;
    packet(24, 0, 0, 3.0, 0.0, 0.0, 1000, 1);
    checks++;
    if (!fifo_overflow) begin failures++; $display("FAIL no overflow"); end
    block_all = 0;

    $display("window ends: edge %0d expiry %0d; p wraps %0d", n_edge, n_expiry, n_pwrap);
    $display("stall cycles %0d; overflow cycles %0d; estimates used %0d; long runs %0d",
             n_stall, n_ovf, n_est, n_long);
    checks += 7;
    if (n_edge == 0)   begin failures++; $display("FAIL never: window end by edge"); end
    if (n_expiry == 0) begin failures++; $display("FAIL never: window end by expiry"); end
    if (n_pwrap == 0)  begin failures++; $display("FAIL never: p wrap"); end
    if (n_stall == 0)  begin failures++; $display("FAIL never: consumer stall"); end
    if (n_ovf == 0)    begin failures++; $display("FAIL never: overflow"); end
    if (n_est == 0)    begin failures++; $display("FAIL never: estimated beta"); end
    if (n_long == 0)   begin failures++; $display("FAIL never: long run recovered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
