// cfqca_a_unit: the A part of the carry-free Q-Coder (registers A and H, MUX2, CSA1,
// MUX1, NORM, SHIFT1), shared by the encoder and the decoder so that both take the same
// normalization decisions.
//
// A is held as a sum/carry pair (a_s, a_c). In a cycle where a symbol is accepted:
//   MPS: A <- A - Qe through MUX2 (Qe) and the carry-save subtractor CSA1;
//   LPS: A <- Qe through MUX1 (Qe with a zero carry vector).
// NORM then inspects the estimate of the new A and raises h when one left shift is
// needed; SHIFT1 applies it and the result is registered. h is also stored in H: while
// H is set the unit accepts no symbol and runs a normalization-only cycle (MUX2 gives 0
// and CSA1 adds it, leaving A unchanged), repeating until NORM finds A normalized.
// When neither a symbol nor an extra cycle is due, or hold is high, A and H keep their
// values (re-estimating an unchanged A could otherwise change the decision).
//
// Timing: accept, lps and qe are sampled at the rising clock edge; h (this cycle's shift
// decision) is combinational and must be forwarded to the C part in the same cycle.
// Reset (synchronous, active low) sets A = 1.0 and H = 0.
//
// Origin: the blocks and their connection follow the published architecture. Two points
// are this design's reading: h = 1 means "shift" (the source uses both polarities), and
// CSA1 adds, rather than subtracts, the zero presented in the extra cycles.
module cfqca_a_unit
  import cfqca_pkg::*;
#(
  parameter int unsigned P = P_FRAC,
  parameter int unsigned T = T_EST
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         accept,   // a symbol is taken this cycle (only when h_reg = 0)
  input  logic         lps,      // the accepted symbol is the LPS
  input  logic [P-1:0] qe,       // Qe of the accepted symbol
  input  logic         hold,     // freeze A and H this cycle
  output logic         h,        // a shift of A (and C) happens this cycle
  output logic         h_reg,    // register H: next cycle is a normalization-only cycle
  output logic [P+1:0] a_s,      // sum vector of A
  output logic [P+1:0] a_c,      // carry vector of A
  output logic [T+1:0] a_hat     // estimate of the A about to be tested
);
  localparam int unsigned W = P + 2;

  logic [W-1:0] qe_w, q2, s1, c1, sm, cm, sn, cn;
  logic         f, g, active, h_raw;

  always_comb begin
    qe_w   = {2'b00, qe};
    active = (accept | h_reg) & ~hold;
    f      = accept & ~lps & ~h_reg;   // MUX2 control: subtract Qe
    g      = accept & lps & ~h_reg;    // MUX1 control: load Qe
    h      = h_raw & active;
  end

  cfq_qe_gate #(.W(W)) u_mux2 (.en(f), .qe(qe_w), .q(q2));
  cfq_csa_sub #(.W(W)) u_csa1 (.sub(f), .s_in(a_s), .c_in(a_c), .q(q2), .s_out(s1), .c_out(c1));
  cfq_mux1    #(.W(W)) u_mux1 (.g(g), .s_a(s1), .c_a(c1), .qe(qe_w), .s_o(sm), .c_o(cm));
  cfq_norm    #(.P(P), .T(T)) u_norm (.s(sm), .c(cm), .a_hat(a_hat), .h(h_raw));
  cfq_shift   #(.W(W)) u_shift1 (.sh(h_raw), .s_in(sm), .c_in(cm), .s_out(sn), .c_out(cn));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_s   <= W'(1) << P;   // A = 1.0
      a_c   <= '0;
      h_reg <= 1'b0;
    end else if (active) begin
      a_s   <= sn;
      a_c   <= cn;
      h_reg <= h_raw;
    end
  end

  // a symbol may only be taken while A is normalized
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> !h_reg);
endmodule
