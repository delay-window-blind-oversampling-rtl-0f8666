// tb_dw_duration: checks the delay-window duration function against a
// real-number evaluation of T_p for every representable beta from 3 to
// 31.875 and p = 0 .. 8, and the beta = 3.5 sequence 5, 3, 4, 3, 4.
module tb_dw_duration;
  logic [7:0] beta;
  logic [3:0] p;
  logic [5:0] t_len;
  int checks = 0, failures = 0;

  dw_duration dut (.beta(beta), .p(p), .t_len(t_len));

  function automatic int ref_t(int b8, int pp);
    real bt;
    bt = real'(b8) / 8.0;
    if (pp == 0) return int'($floor(1.5 * bt));
    return int'($floor((real'(pp) + 1.5) * bt)) - int'($floor((real'(pp) + 0.5) * bt));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seq [5] = '{5, 3, 4, 3, 4};
    for (int b = 24; b < 256; b++) begin
      for (int q = 0; q <= 8; q++) begin
        beta = 8'(b); p = 4'(q);
        #1;
        checks++;
        if (int'(t_len) != ref_t(b, q)) begin
          failures++;
          if (failures < 10) $display("FAIL beta8=%0d p=%0d got %0d exp %0d", b, q, t_len, ref_t(b, q));
        end
      end
    end
    beta = 8'd28;
    for (int q = 0; q < 5; q++) begin
      p = 4'(q); #1;
      checks++;
      if (int'(t_len) != seq[q]) begin
        failures++;
        $display("FAIL beta=3.5 p=%0d got %0d exp %0d", q, t_len, seq[q]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
