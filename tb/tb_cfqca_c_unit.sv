// tb_cfqca_c_unit: random add/shift/load/idle cycles on the C part; checks that the pair
// always represents the value kept by the testbench (mod 2^W_C), that a load clears the
// carry vector and that disabled cycles change nothing.
module tb_cfqca_c_unit;
  import cfqca_pkg::*;
  localparam int W = W_C;
  logic clk = 0, rst_n = 0, en = 0, add_qe = 0, shift = 0, load = 0;
  logic [P_FRAC-1:0] qe = '0;
  logic [W-1:0] load_val = '0, cs, cc, v;
  int checks = 0, failures = 0;

  cfqca_c_unit dut (.clk, .rst_n, .en, .add_qe, .qe, .shift, .load, .load_val, .cs, .cc);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1; v = '0;
    for (int i = 0; i < 5000; i++) begin
      int op;
      op = $urandom_range(0, 9);
      en = 0; add_qe = 0; shift = 0; load = 0;
      qe = P_FRAC'($urandom);
      if (op == 0) begin load = 1; load_val = W'($urandom); v = load_val; end
      else if (op < 9) begin
        en = 1; add_qe = 1'($urandom); shift = ($urandom_range(0, 3) == 0);
        v = add_qe ? v + W'(qe) : v;
        if (shift) v = v << 1;
      end
      @(posedge clk); #1;
      checks++;
      if (W'(cs + cc) !== v) begin failures++; if (failures < 10) $display("FAIL op=%0d", op); end
      if (load) begin checks++; if (cc !== '0) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
