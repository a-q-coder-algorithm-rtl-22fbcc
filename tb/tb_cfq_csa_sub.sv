// tb_cfq_csa_sub: checks that the carry-save adder/subtractor keeps the represented value:
// (s_out + c_out) = (s_in + c_in - q) or (s_in + c_in + q) modulo 2^W, over random inputs.
module tb_cfq_csa_sub;
  localparam int W = cfqca_pkg::W_A;
  logic [W-1:0] s, c, q, so, co;
  logic sub;
  int checks = 0, failures = 0;
  cfq_csa_sub dut (.sub, .s_in(s), .c_in(c), .q, .s_out(so), .c_out(co));
  initial begin
    #100000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [W-1:0] exp_v;
      s = W'($urandom); c = W'($urandom); q = W'($urandom); sub = 1'($urandom);
      #1;
      exp_v = sub ? s + c - q : s + c + q;
      checks++;
      if (W'(so + co) !== exp_v) begin
        failures++;
        $display("FAIL sub=%0d s=%h c=%h q=%h -> %h+%h", sub, s, c, q, so, co);
      end
      // one full-adder level: sum bit i depends only on bit i of the inputs
      checks++;
      if (so !== (s ^ c ^ (sub ? ~q : q))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
