// cfqca_decoder: decoder for the code string of cfqca_encoder.
//
// To decode correctly the decoder must renormalize exactly when the encoder did, so it
// uses the same carry-save A part (cfqca_a_unit). The code side, by contrast, is
// conventional: the decision between MPS and LPS needs an exact, full-length comparison.
// The register D holds (code value - C) with 8 look-ahead bits below the A alignment; its
// upper part d_hi lies in [0, A). For each symbol: d_hi < Qe decodes an LPS (A <- Qe);
// otherwise an MPS (A <- A - Qe, D <- D - Qe). D shifts with A, taking a new code byte
// into its low 8 bits every 8 shifts. A byte that follows 0xFF carries a stuffed bit in
// its top position, whose weight is that of the 0xFF byte's last bit: it is added one
// position higher, and the next byte comes after 7 shifts.
//
// Interface:
//   byte_req/byte_valid/byte_in: code bytes in order, taken when both are high; past the
//   end of the code string the source supplies 0x00.
//   qe_valid/qe: Qe of the next symbol (from the probability estimator); a symbol is
//   decoded in each cycle with sym_valid high, which also acknowledges qe.
//   norm_shift pulses for every normalization shift.
// After reset the decoder reads the first two bytes (P shifts of alignment) before the
// first symbol. Same cycle behaviour as the encoder: one symbol per cycle, plus one cycle
// per extra shift and per byte. Synchronous active-low reset.
//
// Origin: reusing the encoder's carry-save A part and keeping the code register
// conventional follows the published architecture; the code register, its byte input,
// unstuffing and start-up are this design's own, mirroring the encoder's byte format.
module cfqca_decoder
  import cfqca_pkg::*;
#(
  parameter int unsigned P = P_FRAC,
  parameter int unsigned T = T_EST
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         byte_req,
  input  logic         byte_valid,
  input  logic [7:0]   byte_in,
  input  logic         qe_valid,
  input  logic [P-1:0] qe,
  output logic         sym_valid,
  output logic         sym_lps,
  output logic         norm_shift
);
  localparam int unsigned WD = P + 10;

  logic [WD-1:0]   d_q, d_sub, d_next;
  logic [P+1:0]    d_hi;
  logic [CT_W-1:0] ct_q;
  logic [4:0]      init_q;
  logic            last_ff_q, running, fetch_due, fetch, h, h_reg, active;
  logic [P+1:0]    a_s, a_c;
  logic [T+1:0]    a_hat;

  always_comb begin
    running   = (init_q == '0);
    fetch_due = (ct_q == '0);
    byte_req  = fetch_due;
    fetch     = fetch_due && byte_valid;
    d_hi      = d_q[WD-1:8];
    sym_valid = running && !h_reg && !fetch_due && qe_valid;
    sym_lps   = d_hi < {2'b00, qe};
    active    = (sym_valid || h_reg) && !fetch_due;
    d_sub     = (sym_valid && !sym_lps) ? d_q - {2'b00, qe, 8'h00} : d_q;
    d_next    = h ? {d_sub[WD-2:0], 1'b0} : d_sub;
    norm_shift = h;
  end

  cfqca_a_unit #(.P(P), .T(T)) u_a (
    .clk, .rst_n, .accept(sym_valid), .lps(sym_lps), .qe, .hold(fetch_due),
    .h, .h_reg, .a_s, .a_c, .a_hat
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_q       <= '0;
      ct_q      <= '0;
      last_ff_q <= 1'b0;
      init_q    <= 5'(P);
    end else if (fetch_due) begin
      if (fetch) begin
        d_q       <= d_q + (last_ff_q ? WD'({byte_in, 1'b0}) : WD'(byte_in));
        ct_q      <= last_ff_q ? CT_W'(7) : CT_W'(8);
        last_ff_q <= (byte_in == 8'hFF);
      end
    end else if (!running) begin
      d_q    <= {d_q[WD-2:0], 1'b0};
      ct_q   <= ct_q - CT_W'(1);
      init_q <= init_q - 5'd1;
    end else if (active) begin
      d_q  <= d_next;
      if (h) ct_q <= ct_q - CT_W'(1);
    end
  end
endmodule
