// tb_cfqca_decoder: the reference encoder produces a code string from a random symbol
// stream; the decoder reads it through its byte handshake (with random gaps, 0x00 past the
// end) while Qe values are offered with random gaps, and every decoded symbol is compared
// with the original. The decoding cycle count without gaps is also checked: after the
// start-up reads, one cycle per symbol, per extra shift and per byte read.
module tb_cfqca_decoder;
  import cfqca_pkg::*;
  import cfq_ref_pkg::*;
  localparam int N = 30000;
  logic clk = 0, rst_n = 0, byte_valid = 0, qe_valid = 0;
  logic [7:0] byte_in = '0;
  logic [P_FRAC-1:0] qe = '0;
  logic byte_req, sym_valid, sym_lps, norm_shift;
  int checks = 0, failures = 0, nsym = 0, bpos = 0;
  bit syms[N];
  logic [P_FRAC-1:0] qes[N];
  byte unsigned code[$];
  bit gaps = 1;
  longint cyc = 0, c_first = -1, c_last = -1, n_reads = 0;

  cfqca_decoder dut (.clk, .rst_n, .byte_req, .byte_valid, .byte_in, .qe_valid, .qe,
                     .sym_valid, .sym_lps, .norm_shift);

  always #5 clk = ~clk;
  initial begin
    repeat (500000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // byte source and Qe source, changing on the falling edge
  always @(negedge clk) begin
    byte_valid <= rst_n && (!gaps || $urandom_range(0, 2) != 0);
    byte_in    <= (bpos < code.size()) ? code[bpos] : 8'h00;
    qe_valid   <= rst_n && nsym < N && (!gaps || $urandom_range(0, 3) != 0);
    qe         <= qes[nsym < N ? nsym : 0];
  end
  always @(posedge clk) begin
    cyc++;
    if (rst_n && byte_req && byte_valid) begin bpos++; if (nsym > 0 && nsym < N) n_reads++; end
    if (rst_n && sym_valid) begin
      if (nsym == 0) c_first = cyc;
      c_last = cyc;
      checks++;
      if (sym_lps != syms[nsym]) begin failures++; if (failures < 10) $display("FAIL symbol %0d", nsym); end
      nsym++;
    end
  end

  initial begin
    static ref_encoder r = new();
    static int extra_last = 0;
    for (int i = 0; i < N; i++) begin
      qes[i] = P_FRAC'($urandom_range(1, 12'hAC1));
      if ((i / 4000) % 2 == 1) qes[i] = P_FRAC'($urandom_range(1, 40));
      syms[i] = ($urandom_range(0, 4095) < int'(qes[i]));
      extra_last = r.n_extra;
      r.encode(syms[i], qes[i]);
      extra_last = r.n_extra - extra_last;
    end
    r.flush();
    code = r.out;
    for (int pass = 0; pass < 2; pass++) begin
      gaps = (pass == 0);
      rst_n = 0; nsym = 0; bpos = 0; n_reads = 0;
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1;
      while (nsym < N) @(posedge clk);
      if (!gaps) begin
        // cycles from the first to the last symbol: one per symbol, per extra shift and
        // per byte read in between
        longint expect_c;
        expect_c = longint'(N - 1) + longint'(r.n_extra - extra_last) + n_reads;
        checks++;
        if (c_last - c_first != expect_c) begin
          failures++; $display("FAIL cycles %0d vs %0d", c_last - c_first, expect_c);
        end
      end
    end
    $display("symbols=%0d bytes=%0d", N, code.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
