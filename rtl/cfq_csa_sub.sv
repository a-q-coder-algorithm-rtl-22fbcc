// cfq_csa_sub: carry-save adder/subtractor (CSA1 of the A datapath).
//
// With sub = 1 it computes (s_in + c_in - q) mod 2^W: the subtrahend enters inverted and
// the "+1" of the two's complement fills the empty least significant bit of the carry
// vector. With sub = 0 it adds q (the extra normalization cycles present q = 0, which
// then leaves both the value and a zero carry vector intact; an inverted zero would
// instead spread a borrow over both vectors and spoil the short estimate of A taken
// from their top bits). One full-adder delay, independent of W. Combinational.
module cfq_csa_sub #(
  parameter int unsigned W = cfqca_pkg::W_A
) (
  input  logic         sub,
  input  logic [W-1:0] s_in,
  input  logic [W-1:0] c_in,
  input  logic [W-1:0] q,
  output logic [W-1:0] s_out,
  output logic [W-1:0] c_out
);
  logic [W-1:0] qx, maj;
  always_comb begin
    qx    = sub ? ~q : q;
    s_out = s_in ^ c_in ^ qx;
    maj   = (s_in & c_in) | (s_in & qx) | (c_in & qx);
    c_out = {maj[W-2:0], sub};
  end
endmodule
