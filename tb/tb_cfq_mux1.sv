// tb_cfq_mux1: checks MUX1: Qe with a zero carry vector when g = 1, the CSA1 pair otherwise.
module tb_cfq_mux1;
  localparam int W = cfqca_pkg::W_A;
  logic g;
  logic [W-1:0] sa, ca, qe, so, co;
  int checks = 0, failures = 0;
  cfq_mux1 dut (.g, .s_a(sa), .c_a(ca), .qe, .s_o(so), .c_o(co));
  initial begin
    #100000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 500; i++) begin
      g = 1'($urandom); sa = W'($urandom); ca = W'($urandom); qe = W'($urandom);
      #1;
      checks++;
      if (g ? (so !== qe || co !== '0) : (so !== sa || co !== ca)) begin
        failures++; $display("FAIL g=%0d", g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
