// tb_cfqca_encoder: encodes a random symbol stream (several LPS rates, Qe from 2^-12 up to
// 0xAC1/4096) and checks
//   - the byte string equals the reference model's, byte for byte;
//   - the reference decoder recovers every symbol from it;
//   - the cycle count: one cycle per symbol, plus one per extra normalization shift and
//     one per byte removal, up to the flush request;
//   - done rises after the flush.
module tb_cfqca_encoder;
  import cfqca_pkg::*;
  import cfq_ref_pkg::*;
  localparam int N = 30000;
  logic clk = 0, rst_n = 0, sym_valid = 0, sym_lps = 0, flush = 0;
  logic [P_FRAC-1:0] qe = '0;
  logic sym_ready, done, norm_shift, byte_valid;
  logic [7:0] byte_data;
  int checks = 0, failures = 0;
  bit syms[N];
  logic [P_FRAC-1:0] qes[N];
  byte unsigned got[$];
  longint cyc = 0, first_cyc = -1, flush_cyc = -1;

  cfqca_encoder dut (.clk, .rst_n, .sym_valid, .sym_ready, .sym_lps, .qe, .flush, .done,
                     .norm_shift, .byte_valid, .byte_data);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && byte_valid) got.push_back(byte_data);
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    static ref_encoder r = new();
    ref_decoder d;
    static int idx = 0;
    longint ref_cycles;
    for (int i = 0; i < N; i++) begin
      int rate;
      rate = (i / 5000) % 3;   // phases with different statistics
      qes[i] = P_FRAC'($urandom_range(1, 12'hAC1));
      if (rate == 1) qes[i] = P_FRAC'($urandom_range(1, 64));
      syms[i] = ($urandom_range(0, 4095) < int'(qes[i]) * (rate == 2 ? 2 : 1));
      r.encode(syms[i], qes[i]);
    end
    ref_cycles = r.cycles;
    r.flush();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (idx < N) begin
      sym_valid = 1; sym_lps = syms[idx]; qe = qes[idx];
      @(posedge clk);
      if (sym_ready) begin
        if (idx == 0) first_cyc = cyc;
        idx++;
      end
      @(negedge clk);
    end
    sym_valid = 0; flush = 1;
    @(posedge clk);
    while (!sym_ready) @(posedge clk);
    flush_cyc = cyc;
    @(negedge clk) flush = 0;
    while (!done) @(posedge clk);
    @(posedge clk);
    checks++;
    if (flush_cyc - first_cyc != ref_cycles) begin
      failures++; $display("FAIL cycles %0d vs %0d", flush_cyc - first_cyc, ref_cycles);
    end
    checks++;
    if (got.size() != r.out.size()) begin failures++; $display("FAIL %0d bytes vs %0d", got.size(), r.out.size()); end
    foreach (r.out[j]) begin
      checks++;
      if (j >= got.size() || got[j] != r.out[j]) begin failures++; if (failures < 10) $display("FAIL byte %0d", j); end
    end
    d = new(got);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (d.decode(qes[i]) != syms[i]) begin failures++; if (failures < 10) $display("FAIL decode %0d", i); end
    end
    $display("symbols=%0d bytes=%0d cycles=%0d carries=%0d stuffed=%0d", N, got.size(), ref_cycles, r.n_carry, r.n_stuff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
