// tb_cfq_qe_gate: checks that the AND-gate multiplexer passes Qe when enabled and 0 otherwise.
module tb_cfq_qe_gate;
  localparam int W = cfqca_pkg::W_A;
  logic en;
  logic [W-1:0] qe, q;
  int checks = 0, failures = 0;
  cfq_qe_gate dut (.en, .qe, .q);
  initial begin
    #100000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 500; i++) begin
      en = 1'(i % 2); qe = W'($urandom);
      #1;
      checks++;
      if (q !== (en ? qe : W'(0))) begin failures++; $display("FAIL en=%0d qe=%h q=%h", en, qe, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
