// tb_cfq_shift: checks that the shifter doubles the represented value (mod 2^W) when sh = 1
// and keeps both vectors when sh = 0.
module tb_cfq_shift;
  localparam int W = cfqca_pkg::W_A;
  logic sh;
  logic [W-1:0] s, c, so, co;
  int checks = 0, failures = 0;
  cfq_shift dut (.sh, .s_in(s), .c_in(c), .s_out(so), .c_out(co));
  initial begin
    #100000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 1000; i++) begin
      sh = 1'($urandom); s = W'($urandom); c = W'($urandom);
      #1;
      checks++;
      if (W'(so + co) !== W'((s + c) * (sh ? 2 : 1))) begin failures++; $display("FAIL value"); end
      checks++;
      if (sh ? (so[0] !== 1'b0 || co[0] !== 1'b0) : (so !== s || co !== c)) begin failures++; $display("FAIL form"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
