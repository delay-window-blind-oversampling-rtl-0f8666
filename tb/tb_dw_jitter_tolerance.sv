// tb_dw_jitter_tolerance: jitter-tolerance sweep of the 12-phase receiver
// at its default parameters, beta = 3 (640 Mb/s with a 160 MHz core clock).
//
// For each sinusoidal jitter frequency (10 kHz, 100 kHz, 1 MHz, 10 MHz and
// 50 MHz at 640 Mb/s, i.e. jitter periods of 64000 down to 12.8 UI) the
// amplitude is raised step by step; at each step a packet of random data
// with runs of up to 31 equal bits (the longest run of a 2^31-1 PRBS) is
// sent, for at least two jitter periods, and every bit is compared. The
// largest amplitude recovered without error is reported. Checks: at
// 10 kHz at least 14.8 UI must be tolerated, and at every frequency at
// least 0.1 UI.
module tb_dw_jitter_tolerance;
  localparam int  M    = 12;
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

  dw_cdr_top dut (
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
  int n_edge = 0, n_expiry = 0, n_pwrap = 0, n_multi = 0, n_stall = 0;
  int n_ovf = 0, n_est = 0, n_long = 0;

  initial begin
    #(longint'(PER) * 4000000);
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
      if (long_runs && $urandom % 200 == 0) begin
        int run = 20 + $urandom % 12;
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
    logic [11:0] ps, ee;
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
    if (nb >= 5) n_multi++;
    if (out_valid && !out_ready) n_stall++;
    if (fifo_overflow) n_ovf++;
    if (out_valid && out_ready)
      for (int i = 0; i < 8; i++) rx_bits.push_back(out_word[i]);
  end

  // locate the transmitted data in the received stream and compare
  task automatic compare(string tag, output int nerr);
    int pos = -1, errs = 0, ncmp = 0, run = 0, longest = 0;
    for (int s = 0; s + 32 <= rx_bits.size() && pos < 0; s++) begin
      bit ok = 1;
      for (int i = 0; i < 32 && ok; i++) if (rx_bits[s + i] != tx_bits[i]) ok = 0;
      if (ok) pos = s;
    end
    if (pos < 0) begin
      nerr = 1;
      return;
    end
    for (int i = 0; pos + i < rx_bits.size() && i < tx_bits.size(); i++) begin
      ncmp++;
      if (rx_bits[pos + i] != tx_bits[i]) begin
        errs++;
      end
      if (i > 0 && tx_bits[i] == tx_bits[i - 1]) run++; else run = 1;
      if (rx_bits[pos + i] == tx_bits[i] && run == 10) n_long++;
    end
    nerr = (ncmp < tx_bits.size() - 64) ? errs + 1 : errs;
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

  initial begin
    static real per_ui [5] = '{64000.0, 6400.0, 640.0, 64.0, 12.8};
    static real fr_khz [5] = '{10.0, 100.0, 1000.0, 10000.0, 50000.0};
    static real amps [14] = '{0.1, 0.2, 0.3, 0.4, 0.5, 0.75, 1.0, 2.0, 5.0, 10.0,
                       14.8, 20.0, 50.0, 100.0};
    for (int f = 0; f < 5; f++) begin
      real best = 0.0;
      int  nbits;
      nbits = int'(2.0 * per_ui[f]);
      if (nbits < 6000) nbits = 6000;
      for (int a = 0; a < 14; a++) begin
        int nerr;
        packet(24, 0, 0, 3.0, amps[a], per_ui[f], nbits, 1);
        compare("sweep", nerr);
        checks++;
        if (nerr != 0) break;
        best = amps[a];
      end
      $display("jitter %8.0f kHz (period %7.1f UI): tolerated %6.2f UI", fr_khz[f], per_ui[f], best);
      checks++;
      if (best < 0.1 || (f == 0 && best < 14.8)) begin
        failures++;
        $display("FAIL jitter tolerance too low at %0.0f kHz", fr_khz[f]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
