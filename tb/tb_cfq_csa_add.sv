// tb_cfq_csa_add: checks (s_out + c_out) = (s_in + c_in + q) modulo 2^W over random inputs.
module tb_cfq_csa_add;
  localparam int W = cfqca_pkg::W_C;
  logic [W-1:0] s, c, q, so, co;
  int checks = 0, failures = 0;
  cfq_csa_add dut (.s_in(s), .c_in(c), .q, .s_out(so), .c_out(co));
  initial begin
    #100000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      s = W'($urandom); c = W'($urandom); q = W'($urandom);
      if (i % 4 == 0) q = W'($urandom_range(0, 4095));
      #1;
      checks++;
      if (W'(so + co) !== W'(s + c + q)) begin
        failures++;
        $display("FAIL s=%h c=%h q=%h -> %h+%h", s, c, q, so, co);
      end
      checks++;
      if (co[0] !== 1'b0 || so !== (s ^ c ^ q)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
