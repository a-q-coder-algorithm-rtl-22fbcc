// cfq_csa_add: carry-save adder (CSA2 of the encoder datapath).
//
// Computes (s_in + c_in + q) mod 2^W as a new sum/carry pair: one row of full adders,
// the carries moved up one position. The carry out of the top position is dropped; the
// C register is wide enough that the value it represents never reaches 2^W.
// Purely combinational.
module cfq_csa_add #(
  parameter int unsigned W = cfqca_pkg::W_C
) (
  input  logic [W-1:0] s_in,
  input  logic [W-1:0] c_in,
  input  logic [W-1:0] q,
  output logic [W-1:0] s_out,
  output logic [W-1:0] c_out
);
  logic [W-1:0] maj;
  always_comb begin
    s_out = s_in ^ c_in ^ q;
    maj   = (s_in & c_in) | (s_in & q) | (c_in & q);
    c_out = {maj[W-2:0], 1'b0};
  end
endmodule
