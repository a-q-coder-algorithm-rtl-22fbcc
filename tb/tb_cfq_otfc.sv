// tb_cfq_otfc: drives the byte-removal unit with random values of C (split at random into a
// sum and a carry vector) and compares the bytes sent, the remainder and the shift count
// with the reference byte-out procedure written on the exact value. Values are drawn so
// that carries, bytes equal to 0xFF and carries into 0xFE all occur; the first byte is
// checked to come after 8 + S shifts and later ones after 8, or 7 following 0xFF.
module tb_cfq_otfc;
  import cfqca_pkg::*;
  import cfq_ref_pkg::*;
  localparam int W = W_C;
  logic clk = 0, rst_n = 0, shift = 0, extract = 0, final_out = 0;
  logic [W-1:0] cs = '0, cc = '0, res;
  logic due, byte_valid;
  logic [7:0] byte_data;
  int checks = 0, failures = 0, n_stuff = 0, n_carry = 0, n_cff = 0;
  byte unsigned got[$];

  cfq_otfc dut (.clk, .rst_n, .shift, .extract, .final_out, .cs, .cc, .due, .res, .byte_valid, .byte_data);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && byte_valid) got.push_back(byte_data);
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    static ref_encoder r = new();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int nsh, exp_sh;
      longint v;
      nsh = 0;
      exp_sh = r.ct;
      while (!due) begin
        shift = 1; @(posedge clk); #1; shift = 0; nsh++;
        if (nsh > 20) break;
      end
      checks++;
      if (nsh != exp_sh) begin failures++; $display("FAIL shift count %0d vs %0d at %0d b=%0d", nsh, exp_sh, i, r.b); end
      // a value for C below 2^(K+9); force interesting bytes now and then
      v = {$urandom, $urandom} % (longint'(1) << (K + 9));
      if (i % 7 == 0) v = (v % (longint'(1) << K)) | (longint'(8'hFF) << K);
      if (i % 11 == 0) v = v | (longint'(1) << (K + 8));
      if (r.b == 8'hFE && i % 2 == 0) v = v | (longint'(1) << (K + 8));
      if (r.b == 255) n_stuff++;
      else if (v >= (longint'(1) << (K + 8)) && r.b == 254) n_cff++;
      else if (v >= (longint'(1) << (K + 8))) n_carry++;
      if (r.b < 0) v = v % (longint'(1) << (K + 8));  // no carry into the first byte
      cc = W'($urandom) & W'(v);
      cs = W'(v) - cc;
      r.v = v;
      r.byte_out();
      extract = 1; #1;
      checks++;
      if (longint'(res) != r.v) begin failures++; if (failures < 10) $display("FAIL remainder %h vs %h", res, r.v); end
      @(posedge clk); #1; extract = 0;
      @(negedge clk);
    end
    final_out = 1; @(posedge clk); #1 final_out = 0;
    if (r.b >= 0) r.out.push_back(8'(r.b));
    @(posedge clk); #1;
    checks++;
    if (got.size() != r.out.size()) begin failures++; $display("FAIL %0d bytes vs %0d", got.size(), r.out.size()); end
    foreach (r.out[j]) begin
      checks++;
      if (j >= got.size() || got[j] != r.out[j]) begin failures++; if (failures < 10) $display("FAIL byte %0d", j); end
    end
    checks++;
    if (n_stuff == 0 || n_carry == 0 || n_cff == 0) begin failures++; $display("FAIL coverage %0d %0d %0d", n_stuff, n_carry, n_cff); end
    $display("stuff=%0d carry=%0d carry_to_ff=%0d bytes=%0d", n_stuff, n_carry, n_cff, got.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
