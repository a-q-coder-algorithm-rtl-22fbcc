// tb_cfq_norm: checks NORM. For random pairs the estimate must be the sum of the top
// 2 + T bits, lie within 2^-(T-1) below the true A, and h must be 1 exactly when the
// estimate is below 1.0. Pairs with small A and a zero carry vector (as after an LPS)
// must be detected as unnormalized.
module tb_cfq_norm;
  localparam int P = cfqca_pkg::P_FRAC;
  localparam int T = cfqca_pkg::T_EST;
  logic [P+1:0] s, c;
  logic [T+1:0] a_hat;
  logic h;
  int checks = 0, failures = 0, n_h = 0;
  cfq_norm dut (.s, .c, .a_hat, .h);
  initial begin
    #100000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 4000; i++) begin
      int a_true, est_exp;
      do begin
        s = (P+2)'($urandom); c = (P+2)'($urandom);
        if (i % 3 == 0) begin s = (P+2)'($urandom_range(1, 4095)); c = '0; end
        a_true = int'((P+2)'(s + c));
      end while (a_true >= (5 << (P - 1)) || a_true < (1 << (P - T)));  // A in [2^-T, 2.5)
      #1;
      est_exp = ((int'(s) >> (P - T)) + (int'(c) >> (P - T))) % (1 << (T + 2));
      checks++;
      if (int'(a_hat) != est_exp) begin failures++; $display("FAIL est s=%h c=%h", s, c); end
      checks++;
      // estimate never above A and less than 2^-(T-1) below it
      if (!(int'(a_hat) * (1 << (P - T)) <= a_true && a_true < (int'(a_hat) + 2) * (1 << (P - T)))) begin
        failures++; $display("FAIL bound s=%h c=%h a_hat=%h", s, c, a_hat);
      end
      checks++;
      if (h !== (int'(a_hat) < (1 << T))) begin failures++; $display("FAIL h"); end
      if (c == '0) begin
        checks++;
        if (h !== (a_true < (1 << P))) begin failures++; $display("FAIL exact h for s=%h", s); end
      end
      if (h) n_h++;
    end
    checks++;
    if (n_h == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
