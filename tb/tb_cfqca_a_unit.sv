// tb_cfqca_a_unit: drives random MPS/LPS symbols with random Qe into the A part and checks,
// cycle by cycle, that
//   - the pair (a_s, a_c) represents the exact A kept by the testbench as an integer
//     (MPS: A - Qe; LPS: Qe; doubled on every shift);
//   - the shift decision h matches the bit-level reference model;
//   - a shift is only made when A < 1 + 2^-(T-1), and A >= 1 whenever a symbol is taken;
//   - an LPS with Qe below 2^-n takes exactly n + 1 cycles (one per shift);
//   - hold freezes A and H.
module tb_cfqca_a_unit;
  import cfqca_pkg::*;
  import cfq_ref_pkg::*;
  localparam int P = P_FRAC;
  logic clk = 0, rst_n = 0, accept = 0, lps = 0, hold = 0;
  logic [P-1:0] qe = '0;
  logic h, h_reg;
  logic [P+1:0] a_s, a_c;
  logic [T_EST+1:0] a_hat;
  int checks = 0, failures = 0, cycle = 0;
  longint a_true;
  apair_t refa;

  cfqca_a_unit dut (.clk, .rst_n, .accept, .lps, .qe, .hold, .h, .h_reg, .a_s, .a_c, .a_hat);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at cycle %0d", msg, cycle); end
  endtask

  initial begin
    int lps_cycles;
    repeat (2) @(posedge clk);
    rst_n = 1;
    a_true = 1 << P;
    refa.s = 1 << P; refa.c = 0;
    @(negedge clk);
    chk(a_value(refa) == longint'(W_A'(a_s + a_c)), "reset value");
    for (int i = 0; i < 5000; i++) begin
      bit hr;
      // offer a symbol
      accept = 1; lps = ($urandom_range(0, 3) == 0); qe = P'($urandom_range(1, 12'hAC1));
      if (i % 50 == 0) begin lps = 1; qe = P'(1); end  // deepest normalization
      hold = 0;
      chk(h_reg == 0, "ready");
      chk(a_true >= (1 << P), "A normalized when a symbol is taken");
      a_true = lps ? longint'(qe) : a_true - longint'(qe);
      hr = a_cycle(refa, lps ? 1 : 0, qe);
      #1;
      chk(h == hr, "h vs reference");
      if (h) chk(a_true < (3 << (P - 1)), "shift only below 1.5");
      if (h) a_true *= 2;
      @(posedge clk); @(negedge clk); cycle++;
      accept = 0;
      lps_cycles = 1;
      // occasionally freeze for a cycle
      if ($urandom_range(0, 9) == 0) begin
        logic [P+1:0] s0, c0; logic h0;
        s0 = a_s; c0 = a_c; h0 = h_reg; hold = 1;
        @(posedge clk); @(negedge clk); cycle++; hold = 0;
        #1 chk(a_s == s0 && a_c == c0 && h_reg == h0, "hold");
      end
      while (h_reg) begin
        hr = a_cycle(refa, 2, qe);
        #1;
        chk(h == hr, "h vs reference (extra cycle)");
        if (h) a_true *= 2;
        @(posedge clk); @(negedge clk); cycle++;
        lps_cycles++;
      end
      #1;
      chk(longint'(W_A'(a_s + a_c)) == a_true, "A value");
      if (lps && qe == P'(1)) chk(lps_cycles == P + 1, "LPS with Qe = 2^-P takes P + 1 cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
