// cfqca_top: carry-free Q-Coder encoder and decoder side by side.
//
// The two units are independent; each brings out its own ports. The context model and
// the probability estimator that supply symbols and Qe values are not part of this
// design: their signals are ports. Connecting enc_byte_* to dec_byte_* (with a FIFO in
// between) forms a loop-back. See cfqca_encoder and cfqca_decoder for the timing.
module cfqca_top
  import cfqca_pkg::*;
#(
  parameter int unsigned P = P_FRAC,
  parameter int unsigned T = T_EST,
  parameter int unsigned S = S_SPACER
) (
  input  logic         clk,
  input  logic         rst_n,
  // encoder
  input  logic         enc_sym_valid,
  output logic         enc_sym_ready,
  input  logic         enc_sym_lps,
  input  logic [P-1:0] enc_qe,
  input  logic         enc_flush,
  output logic         enc_done,
  output logic         enc_norm_shift,
  output logic         enc_byte_valid,
  output logic [7:0]   enc_byte_data,
  // decoder
  output logic         dec_byte_req,
  input  logic         dec_byte_valid,
  input  logic [7:0]   dec_byte_in,
  input  logic         dec_qe_valid,
  input  logic [P-1:0] dec_qe,
  output logic         dec_sym_valid,
  output logic         dec_sym_lps,
  output logic         dec_norm_shift
);
  cfqca_encoder #(.P(P), .T(T), .S(S)) u_enc (
    .clk, .rst_n, .sym_valid(enc_sym_valid), .sym_ready(enc_sym_ready),
    .sym_lps(enc_sym_lps), .qe(enc_qe), .flush(enc_flush), .done(enc_done),
    .norm_shift(enc_norm_shift), .byte_valid(enc_byte_valid), .byte_data(enc_byte_data)
  );

  cfqca_decoder #(.P(P), .T(T)) u_dec (
    .clk, .rst_n, .byte_req(dec_byte_req), .byte_valid(dec_byte_valid),
    .byte_in(dec_byte_in), .qe_valid(dec_qe_valid), .qe(dec_qe),
    .sym_valid(dec_sym_valid), .sym_lps(dec_sym_lps), .norm_shift(dec_norm_shift)
  );
endmodule
