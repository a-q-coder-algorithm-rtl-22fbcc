// tb_cfqca_page: a full-size bi-level page through the encoder and decoder at their default
// sizes. The page has the size of the CCITT test documents (1728 x 2376 pels); since those
// images are not part of this package, a synthetic page is drawn: lines of block glyphs,
// horizontal rules and a frame. A context model and a probability estimator, both
// belonging to this testbench only, turn each pel into an MPS/LPS symbol with a Qe:
//   context  = 7 neighbouring pels (3 to the left, 3 in the row above, 1 two rows above);
//   estimate = per-context counts of black and white pels, halved when large;
//              Qe = (LPS count + 0.4) / (total + 0.8), limited to [1, 0xAC1] / 4096.
// Checks: every symbol decodes back; the encoder's bytes equal the reference model's;
// the code string is at most 5% longer than with an exact normalization test (the
// carry-free estimate costs a little compression). Reports the compression ratio and the
// encoder's cycles per pel.
module tb_cfqca_page;
  import cfqca_pkg::*;
  import cfq_ref_pkg::*;
  localparam int WIDTH = 1728, HEIGHT = 2376, N = WIDTH * HEIGHT;
  logic clk = 0, rst_n = 0;
  logic enc_sym_valid = 0, enc_sym_lps = 0, enc_flush = 0;
  logic [P_FRAC-1:0] enc_qe = '0, dec_qe = '0;
  logic enc_sym_ready, enc_done, enc_norm_shift, enc_byte_valid;
  logic [7:0] enc_byte_data, dec_byte_in = '0;
  logic dec_byte_req, dec_byte_valid = 0, dec_qe_valid = 0, dec_sym_valid, dec_sym_lps, dec_norm_shift;
  int checks = 0, failures = 0, ienc = 0, idec = 0, bpos = 0, n_flush = 0, black = 0;
  bit syms[];
  logic [P_FRAC-1:0] qes[];
  byte unsigned fifo[$];
  longint enc_cycles = 0;

  cfqca_top dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int hash(int a, int b);
    int unsigned h = 32'h9E3779B9 * (a + 1) ^ (32'h85EBCA6B * (b + 7));
    h ^= h >> 15; h *= 32'h2C1B3C6D; h ^= h >> 12;
    return int'(h & 32'h7FFFFFFF);
  endfunction

  // the synthetic page
  function automatic bit pel(int x, int y);
    int band, row, cl, gx, gy;
    if (x < 0 || x >= WIDTH || y < 0) return 0;
    if ((x >= 80 && x < 84) || (x >= WIDTH - 84 && x < WIDTH - 80)) return (y >= 80 && y < HEIGHT - 80);
    if ((y >= 80 && y < 84) || (y >= HEIGHT - 84 && y < HEIGHT - 80)) return (x >= 80 && x < WIDTH - 80);
    if (y % 600 >= 590 && y % 600 < 593 && x > 200 && x < WIDTH - 200) return 1;
    if (x < 140 || x >= WIDTH - 140 || y < 140 || y >= HEIGHT - 140) return 0;
    band = y / 40; row = y % 40;
    if (row >= 28 || hash(band, 0) % 9 == 0) return 0;          // line gap, empty line
    cl = x / 18; gx = (x % 18) / 3; gy = row / 4;
    if (x % 18 >= 15 || hash(band, cl) % 7 == 0) return 0;    // letter gap, word gap
    return hash(band * 131 + cl, gy * 5 + gx) % 5 < 2;         // 5 x 7 glyph cell
  endfunction

  // encoder side
  always @(negedge clk) begin
    enc_sym_valid <= rst_n && ienc < N;
    enc_sym_lps   <= (ienc < N) ? syms[ienc] : 1'b0;
    enc_qe        <= (ienc < N) ? qes[ienc] : '0;
    enc_flush     <= rst_n && ienc >= N && n_flush == 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (!enc_done) enc_cycles++;
    if (enc_sym_valid && enc_sym_ready && !enc_flush) ienc++;
    if (enc_flush && enc_sym_ready) n_flush++;
    if (enc_byte_valid) fifo.push_back(enc_byte_data);
  end

  // decoder side
  always @(negedge clk) begin
    dec_byte_valid <= rst_n && (bpos < fifo.size() || enc_done);
    dec_byte_in    <= (bpos < fifo.size()) ? fifo[bpos] : 8'h00;
    dec_qe_valid   <= rst_n && idec < N;
    dec_qe         <= (idec < N) ? qes[idec] : '0;
  end
  always @(posedge clk) if (rst_n) begin
    if (dec_byte_req && dec_byte_valid) bpos++;
    if (dec_sym_valid) begin
      checks++;
      if (dec_sym_lps != syms[idec]) begin failures++; if (failures < 10) $display("FAIL pel %0d", idec); end
      idec++;
    end
  end

  initial begin
    static ref_encoder r2 = new(T_EST);
    static ref_encoder rx = new(P_FRAC);
    int cnt[128][2];
    int i;
    syms = new[N];
    qes  = new[N];
    foreach (cnt[c]) begin cnt[c][0] = 0; cnt[c][1] = 0; end
    i = 0;
    for (int y = 0; y < HEIGHT; y++) begin
      for (int x = 0; x < WIDTH; x++) begin
        int ctx, lps_n, tot, q;
        bit p, mps;
        ctx = {pel(x-1,y), pel(x-2,y), pel(x-3,y), pel(x-1,y-1), pel(x,y-1), pel(x+1,y-1), pel(x,y-2)};
        p = pel(x, y);
        black += int'(p);
        mps = cnt[ctx][1] > cnt[ctx][0];
        lps_n = mps ? cnt[ctx][0] : cnt[ctx][1];
        tot = cnt[ctx][0] + cnt[ctx][1];
        q = (lps_n * 40960 + 1638) / (tot * 10 + 8);
        if (q < 1) q = 1;
        if (q > 'hAC1) q = 'hAC1;
        syms[i] = (p != mps);
        qes[i] = P_FRAC'(q);
        cnt[ctx][p] += 2;
        if (tot > 2000) begin cnt[ctx][0] /= 2; cnt[ctx][1] /= 2; end
        r2.encode(syms[i], qes[i]);
        rx.encode(syms[i], qes[i]);
        i++;
      end
    end
    r2.flush();
    rx.flush();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (idec < N) @(posedge clk);
    repeat (4) @(posedge clk);
    checks++;
    if (!enc_done) begin failures++; $display("FAIL encoder not done"); end
    checks++;
    if (fifo.size() != r2.out.size()) begin failures++; $display("FAIL %0d bytes vs reference %0d", fifo.size(), r2.out.size()); end
    foreach (r2.out[j]) begin
      checks++;
      if (j >= fifo.size() || fifo[j] != r2.out[j]) begin failures++; if (failures < 10) $display("FAIL byte %0d", j); end
    end
    checks++;
    if (fifo.size() * 100 > rx.out.size() * 105) begin failures++; $display("FAIL code string more than 5%% above exact test"); end
    $display("pels=%0d black=%0d code bits=%0d (exact test: %0d, ratio %0.4f) compression %0.1f:1",
             N, black, fifo.size() * 8, rx.out.size() * 8, real'(fifo.size()) / real'(rx.out.size()),
             real'(N) / real'(fifo.size() * 8));
    $display("encoder cycles=%0d (%0.3f per pel), normalization shifts=%0d", enc_cycles,
             real'(enc_cycles) / real'(N), r2.n_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
