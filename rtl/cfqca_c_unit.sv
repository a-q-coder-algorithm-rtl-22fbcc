// cfqca_c_unit: the C part of the carry-free Q-Coder encoder (register pair C, MUX3,
// CSA2, SHIFT2).
//
// C, the low end of the coding interval, is held as a sum/carry pair (cs, cc) of W_C
// bits: P fraction bits, S spacer bits, the byte field and a carry bit. In an enabled
// cycle CSA2 adds Qe (MPS, through MUX3) or 0 (LPS or extra normalization cycle), and
// SHIFT2 shifts by the h that NORM computed on A. There is no test on C itself.
// When a byte is removed, the OTFC reloads the pair with the remaining low part in
// conventional form (carry vector cleared); load has priority over en.
//
// Timing: one update per rising edge; synchronous active-low reset clears C.
module cfqca_c_unit
  import cfqca_pkg::*;
#(
  parameter int unsigned P = P_FRAC,
  parameter int unsigned S = S_SPACER
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,        // update C this cycle
  input  logic             add_qe,    // MUX3 control: add Qe (MPS accepted)
  input  logic [P-1:0]     qe,
  input  logic             shift,     // h: shift C left by one
  input  logic             load,      // reload from the OTFC
  input  logic [P+S+8:0]   load_val,
  output logic [P+S+8:0]   cs,
  output logic [P+S+8:0]   cc
);
  localparam int unsigned W = P + S + 9;

  logic [W-1:0] q3, s2, c2, sn, cn;

  cfq_qe_gate #(.W(W)) u_mux3 (.en(add_qe), .qe(W'(qe)), .q(q3));
  cfq_csa_add #(.W(W)) u_csa2 (.s_in(cs), .c_in(cc), .q(q3), .s_out(s2), .c_out(c2));
  cfq_shift   #(.W(W)) u_shift2 (.sh(shift), .s_in(s2), .c_in(c2), .s_out(sn), .c_out(cn));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cs <= '0;
      cc <= '0;
    end else if (load) begin
      cs <= load_val;
      cc <= '0;
    end else if (en) begin
      cs <= sn;
      cc <= cn;
    end
  end
endmodule
