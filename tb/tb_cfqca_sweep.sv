// tb_cfqca_sweep: the precision/spacer trade-off on one full-size page. Nine encoder and
// decoder pairs run side by side on the same 1728 x 2376-pel synthetic page, each pair
// built with its own estimate precision T and spacer count S:
//   lanes 0..6: T = 0, 1, 2, 3, 4, 5, 12 with S = 4 (precision sweep);
//   lanes 7..8: T = 1 with S = 3 and S = 2 (spacer sweep; lane 1 is T = 1, S = 4).
// The page, context model and estimator are those of tb_cfqca_page. Each lane feeds its
// encoder, buffers its bytes and feeds them to its own decoder, with its own handshakes.
// Checks: every lane decodes every pel exactly; T = 12 (an exact test) gives the shortest
// string; a coarser estimate never gives a shorter string than
// a finer one by more than 0.1 %; T = 2 costs at most 3 % and T = 4 at most 0.5 % over
// T = 12; the spacer count changes the length by at most the flush tail (2 bytes), since
// code bytes are aligned the same way for every S. Prints the code-string sizes.
module tb_cfqca_sweep;
  import cfqca_pkg::*;
  localparam int WIDTH = 1728, HEIGHT = 2376, N = WIDTH * HEIGHT, L = 9;
  localparam int unsigned LT [L] = '{0, 1, 2, 3, 4, 5, 12, 1, 1};
  localparam int unsigned LS [L] = '{4, 4, 4, 4, 4, 4, 4, 3, 2};
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  bit syms[];
  logic [P_FRAC-1:0] qes[];
  int nbytes [L];
  int ndec [L];
  bit ldone [L];

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

  function automatic bit pel(int x, int y);
    int band, row, cl, gx, gy;
    if (x < 0 || x >= WIDTH || y < 0) return 0;
    if ((x >= 80 && x < 84) || (x >= WIDTH - 84 && x < WIDTH - 80)) return (y >= 80 && y < HEIGHT - 80);
    if ((y >= 80 && y < 84) || (y >= HEIGHT - 84 && y < HEIGHT - 80)) return (x >= 80 && x < WIDTH - 80);
    if (y % 600 >= 590 && y % 600 < 593 && x > 200 && x < WIDTH - 200) return 1;
    if (x < 140 || x >= WIDTH - 140 || y < 140 || y >= HEIGHT - 140) return 0;
    band = y / 40; row = y % 40;
    if (row >= 28 || hash(band, 0) % 9 == 0) return 0;
    cl = x / 18; gx = (x % 18) / 3; gy = row / 4;
    if (x % 18 >= 15 || hash(band, cl) % 7 == 0) return 0;
    return hash(band * 131 + cl, gy * 5 + gx) % 5 < 2;
  endfunction

  for (genvar l = 0; l < L; l++) begin : g_lane
    logic enc_sym_valid = 0, enc_sym_lps = 0, enc_flush = 0;
    logic [P_FRAC-1:0] enc_qe = '0, dec_qe = '0;
    logic enc_sym_ready, enc_done, enc_norm_shift, enc_byte_valid;
    logic [7:0] enc_byte_data, dec_byte_in = '0;
    logic dec_byte_req, dec_byte_valid = 0, dec_qe_valid = 0, dec_sym_valid, dec_sym_lps, dec_norm_shift;
    int ienc = 0, idec = 0, bpos = 0, n_flush = 0;
    byte unsigned fifo[$];

    cfqca_encoder #(.P(P_FRAC), .T(LT[l]), .S(LS[l])) u_enc (
      .clk, .rst_n, .sym_valid(enc_sym_valid), .sym_ready(enc_sym_ready), .sym_lps(enc_sym_lps),
      .qe(enc_qe), .flush(enc_flush), .done(enc_done), .norm_shift(enc_norm_shift),
      .byte_valid(enc_byte_valid), .byte_data(enc_byte_data)
    );
    cfqca_decoder #(.P(P_FRAC), .T(LT[l])) u_dec (
      .clk, .rst_n, .byte_req(dec_byte_req), .byte_valid(dec_byte_valid), .byte_in(dec_byte_in),
      .qe_valid(dec_qe_valid), .qe(dec_qe), .sym_valid(dec_sym_valid), .sym_lps(dec_sym_lps),
      .norm_shift(dec_norm_shift)
    );

    always @(negedge clk) begin
      enc_sym_valid  <= rst_n && ienc < N;
      enc_sym_lps    <= (ienc < N) ? syms[ienc] : 1'b0;
      enc_qe         <= (ienc < N) ? qes[ienc] : '0;
      enc_flush      <= rst_n && ienc >= N && n_flush == 0;
      dec_byte_valid <= rst_n && (bpos < fifo.size() || enc_done);
      dec_byte_in    <= (bpos < fifo.size()) ? fifo[bpos] : 8'h00;
      dec_qe_valid   <= rst_n && idec < N;
      dec_qe         <= (idec < N) ? qes[idec] : '0;
    end
    always @(posedge clk) if (rst_n) begin
      if (enc_sym_valid && enc_sym_ready && !enc_flush) ienc++;
      if (enc_flush && enc_sym_ready) n_flush++;
      if (enc_byte_valid) fifo.push_back(enc_byte_data);
      if (dec_byte_req && dec_byte_valid) bpos++;
      if (dec_sym_valid) begin
        checks++;
        if (dec_sym_lps != syms[idec]) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d pel %0d", l, idec);
        end
        idec++;
      end
      nbytes[l] = fifo.size();
      ndec[l]   = idec;
      ldone[l]  = enc_done;
    end
  end

  function automatic bit all_decoded();
    foreach (ndec[l]) if (ndec[l] < N) return 0;
    return 1;
  endfunction

  // a <= b * (1 + pm / 1000), in bytes
  task automatic le_rel(int a, int b, int pm, string what);
    checks++;
    if (longint'(a) * 1000 > longint'(b) * (64'sd1000 + longint'(pm))) begin
      failures++;
      $display("FAIL %s: %0d bytes vs %0d", what, a, b);
    end
  endtask

  initial begin
    int cnt[128][2];
    int i;
    syms = new[N];
    qes  = new[N];
    foreach (cnt[c]) begin cnt[c][0] = 0; cnt[c][1] = 0; end
    foreach (ndec[l]) begin ndec[l] = 0; nbytes[l] = 0; ldone[l] = 0; end
    i = 0;
    for (int y = 0; y < HEIGHT; y++) begin
      for (int x = 0; x < WIDTH; x++) begin
        int ctx, lps_n, tot, q;
        bit p, mps;
        ctx = int'({pel(x-1,y), pel(x-2,y), pel(x-3,y), pel(x-1,y-1), pel(x,y-1), pel(x+1,y-1), pel(x,y-2)});
        p = pel(x, y);
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
        i++;
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (!all_decoded()) @(posedge clk);
    repeat (4) @(posedge clk);
    foreach (ldone[l]) begin
      checks++;
      if (!ldone[l]) begin failures++; $display("FAIL lane %0d encoder not done", l); end
    end
    for (int l = 0; l < 6; l++) le_rel(nbytes[6], nbytes[l], 0, "exact test longer than coarser estimate");
    for (int l = 0; l < 5; l++) le_rel(nbytes[l + 1], nbytes[l], 1, "finer estimate longer than coarser");
    le_rel(nbytes[2], nbytes[6], 30, "T = 2 against exact test");
    le_rel(nbytes[4], nbytes[6], 5, "T = 4 against exact test");
    for (int l = 7; l < 9; l++) begin
      checks++;
      if (nbytes[l] > nbytes[1] + 2 || nbytes[l] + 2 < nbytes[1]) begin
        failures++;
        $display("FAIL spacer lane %0d: %0d bytes vs %0d with S = 4", l, nbytes[l], nbytes[1]);
      end
    end
    $display("code string bits, S = 4:");
    for (int l = 0; l < 7; l++)
      $display("  T = %2d: %0d bits, %0.4f of T = 12", LT[l], nbytes[l] * 8, real'(nbytes[l]) / real'(nbytes[6]));
    $display("code string bits, T = 1: S = 4: %0d, S = 3: %0d, S = 2: %0d", nbytes[1] * 8, nbytes[7] * 8, nbytes[8] * 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
