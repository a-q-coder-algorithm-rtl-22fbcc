// tb_cfqca_top: end-to-end test of the top level at its default sizes. The encoder codes a
// random symbol stream whose statistics change in phases; its bytes go through a queue into
// the decoder, which runs at the same time and is given the same Qe sequence. Every decoded
// symbol must equal the original. The test counts each mechanism of the design and fails
// if one never happened: MPS and LPS updates, normalization shifts, extra normalization
// cycles (input stalled), normalizations of 2 or more extra cycles, byte removals, carries
// into the buffered byte, bit stuffing after 0xFF, a carry turning the buffered byte into
// 0xFF, the flush, and the decoder reading a stuffed byte.
module tb_cfqca_top;
  import cfqca_pkg::*;
  localparam int N = 60000;
  logic clk = 0, rst_n = 0;
  logic enc_sym_valid = 0, enc_sym_lps = 0, enc_flush = 0;
  logic [P_FRAC-1:0] enc_qe = '0, dec_qe = '0;
  logic enc_sym_ready, enc_done, enc_norm_shift, enc_byte_valid;
  logic [7:0] enc_byte_data, dec_byte_in = '0;
  logic dec_byte_req, dec_byte_valid = 0, dec_qe_valid = 0, dec_sym_valid, dec_sym_lps, dec_norm_shift;
  int checks = 0, failures = 0, ienc = 0, idec = 0, bpos = 0;
  bit syms[N];
  logic [P_FRAC-1:0] qes[N];
  byte unsigned fifo[$];
  // mechanism counters
  int n_mps = 0, n_lps = 0, n_shift = 0, n_extra = 0, n_multi = 0, n_bytes = 0, n_carry = 0;
  int n_stuff = 0, n_carry_ff = 0, n_flush = 0, n_dec_stuffed = 0, run_extra = 0;

  cfqca_top dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // encoder side
  always @(negedge clk) begin
    enc_sym_valid <= rst_n && ienc < N;
    enc_sym_lps   <= syms[ienc < N ? ienc : 0];
    enc_qe        <= qes[ienc < N ? ienc : 0];
    enc_flush     <= rst_n && ienc >= N && n_flush == 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (enc_sym_valid && enc_sym_ready && !enc_flush) begin
      ienc++;
      if (enc_sym_lps) n_lps++; else n_mps++;
    end
    if (enc_flush && enc_sym_ready) n_flush++;
    if (enc_norm_shift) n_shift++;
    if (dut.u_enc.h_reg && !dut.u_enc.due) begin n_extra++; run_extra++; end
    else if (!dut.u_enc.h_reg) begin if (run_extra >= 2) n_multi++; run_extra = 0; end
    if (enc_byte_valid) begin fifo.push_back(enc_byte_data); n_bytes++; end
    if (dut.u_enc.due && dut.u_enc.u_otfc.bvalid_q) begin
      if (dut.u_enc.u_otfc.b_q == 8'hFF) n_stuff++;
      else if (dut.u_enc.u_otfc.carry && dut.u_enc.u_otfc.b_q == 8'hFE) begin n_carry_ff++; n_stuff++; end
      else if (dut.u_enc.u_otfc.carry) n_carry++;
    end
  end

  // decoder side: bytes from the queue (0x00 once the encoder is done and the queue empty)
  always @(negedge clk) begin
    dec_byte_valid <= rst_n && (bpos < fifo.size() || enc_done);
    dec_byte_in    <= (bpos < fifo.size()) ? fifo[bpos] : 8'h00;
    dec_qe_valid   <= rst_n && idec < N;
    dec_qe         <= qes[idec < N ? idec : 0];
  end
  always @(posedge clk) if (rst_n) begin
    if (dec_byte_req && dec_byte_valid) begin
      if (dut.u_dec.last_ff_q) n_dec_stuffed++;
      bpos++;
    end
    if (dec_sym_valid) begin
      checks++;
      if (dec_sym_lps != syms[idec]) begin failures++; if (failures < 10) $display("FAIL symbol %0d", idec); end
      idec++;
    end
  end

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL never happened: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      int phase;
      phase = (i / 6000) % 4;
      case (phase)
        0: qes[i] = P_FRAC'($urandom_range(1, 12'hAC1));
        1: qes[i] = P_FRAC'($urandom_range(1, 48));
        2: qes[i] = P_FRAC'($urandom_range(12'h400, 12'hAC1));
        default: qes[i] = P_FRAC'($urandom_range(1, 12'h200));
      endcase
      syms[i] = ($urandom_range(0, 4095) < int'(qes[i]) * (phase == 3 ? 3 : 1));
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (idec < N) @(posedge clk);
    checks++;
    if (!enc_done) begin failures++; $display("FAIL encoder not done"); end
    need(n_mps, "MPS"); need(n_lps, "LPS"); need(n_shift, "normalization shift");
    need(n_extra, "extra normalization cycle"); need(n_multi, "normalization over 2+ extra cycles");
    need(n_bytes, "byte emitted"); need(n_carry, "carry into buffered byte");
    need(n_stuff, "bit stuffing"); need(n_carry_ff, "carry making 0xFF");
    need(n_flush, "flush"); need(n_dec_stuffed, "decoder stuffed-byte read");
    $display("mps=%0d lps=%0d shifts=%0d extra=%0d multi=%0d bytes=%0d carry=%0d stuff=%0d carry_ff=%0d flush=%0d dec_stuffed=%0d",
             n_mps, n_lps, n_shift, n_extra, n_multi, n_bytes, n_carry, n_stuff, n_carry_ff, n_flush, n_dec_stuffed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
