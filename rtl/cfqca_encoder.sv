// cfqca_encoder: carry-free Q-Coder (CFQCA) arithmetic encoder.
//
// Each accepted symbol narrows the interval [C, C + A): an MPS adds Qe to C and takes Qe
// from A, an LPS keeps C and sets A = Qe. Both updates are carry-save (cfqca_a_unit and
// cfqca_c_unit), so a cycle costs one full-adder delay in the adders whatever the width.
// A is renormalized by at most one left shift per cycle, decided by NORM on a short
// estimate of A; while more shifts are needed the encoder takes no symbol (sym_ready low)
// and runs normalization-only cycles. C is shifted with A. Every 8 shifts (7 after a
// stuffed byte) a byte is complete and the OTFC removes it in one extra cycle.
//
// Interface:
//   sym_valid/sym_ready handshake; sym_lps and qe are taken when both are high.
//   norm_shift pulses for every normalization shift (for an external Qe estimator).
//   flush (sampled while sym_ready, ahead of a symbol) terminates the code string: C is
//   shifted out completely, byte by byte, then the buffered byte is sent and done rises.
//   byte_valid/byte_data: one code byte per pulse, in order.
// Throughput: one symbol per cycle when no shift is needed; +1 cycle per shift after
// the first of a symbol; +1 cycle per byte. Synchronous active-low reset.
//
// Origin: the datapath (two register pairs, MUX1-3, CSA1-2, NORM, SHIFT1-2, H, OTFC) and
// the one-shift-per-cycle normalization with stalled input follow the published
// architecture with t = 2. The handshake, the separate byte-removal cycle, the flush
// sequence and the reset values are this design's choices.
module cfqca_encoder
  import cfqca_pkg::*;
#(
  parameter int unsigned P = P_FRAC,
  parameter int unsigned T = T_EST,
  parameter int unsigned S = S_SPACER
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sym_valid,
  output logic         sym_ready,
  input  logic         sym_lps,
  input  logic [P-1:0] qe,
  input  logic         flush,
  output logic         done,
  output logic         norm_shift,
  output logic         byte_valid,
  output logic [7:0]   byte_data
);
  localparam int unsigned W = P + S + 9;
  localparam int unsigned NFLUSH = flush_extracts(P, S);

  typedef enum logic [1:0] {RUN, FLUSH, FINAL, DONE} state_e;
  state_e state_q;

  logic         h, h_reg, due, accept, c_en, c_shift, final_out, start_flush;
  logic [W-1:0] cs, cc, res;
  logic [P+1:0] a_s, a_c;
  logic [T+1:0] a_hat;
  logic [3:0]   nflush_q;

  always_comb begin
    sym_ready   = (state_q == RUN) && !h_reg && !due;
    start_flush = sym_ready && flush;
    accept      = sym_ready && sym_valid && !flush;
    if (state_q == FLUSH) begin
      c_en    = !due;
      c_shift = !due;
    end else begin
      c_en    = (accept || h_reg) && !due;
      c_shift = h;
    end
    final_out  = (state_q == FINAL);
    done       = (state_q == DONE);
    norm_shift = h;
  end

  cfqca_a_unit #(.P(P), .T(T)) u_a (
    .clk, .rst_n, .accept, .lps(sym_lps), .qe, .hold(due),
    .h, .h_reg, .a_s, .a_c, .a_hat
  );

  cfqca_c_unit #(.P(P), .S(S)) u_c (
    .clk, .rst_n, .en(c_en), .add_qe(accept && !sym_lps), .qe, .shift(c_shift),
    .load(due), .load_val(res), .cs, .cc
  );

  cfq_otfc #(.P(P), .S(S)) u_otfc (
    .clk, .rst_n, .shift(c_en && c_shift), .extract(due), .final_out,
    .cs, .cc, .due, .res, .byte_valid, .byte_data
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q  <= RUN;
      nflush_q <= '0;
    end else begin
      case (state_q)
        RUN:   if (start_flush) begin
                 state_q  <= FLUSH;
                 nflush_q <= 4'(NFLUSH);
               end
        FLUSH: if (due) begin
                 nflush_q <= nflush_q - 4'd1;
                 if (nflush_q == 4'd1) state_q <= FINAL;
               end
        FINAL: state_q <= DONE;
        default: ;
      endcase
    end
  end
endmodule
