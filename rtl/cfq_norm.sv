// cfq_norm: NORM, the normalization test on the carry-save A.
//
// Only the 2 integer and T fraction bits of the sum and carry vectors are added (a
// (2+T)-bit addition), giving the estimate a_hat, which lies at most 2^-(T-1) below the
// true A. h = 1 requests one left shift, when the estimate is below 1, i.e. when both
// integer bits of a_hat are 0. One shift at most is decided per cycle. Combinational.
//
// Origin: the input (2 integer and t = 2 fraction bits of the estimate) and the role of
// NORM are published; the gate-level form of the test is not, so it is written here as a
// small addition followed by a zero test.
module cfq_norm #(
  parameter int unsigned P = cfqca_pkg::P_FRAC,
  parameter int unsigned T = cfqca_pkg::T_EST
) (
  input  logic [P+1:0] s,
  input  logic [P+1:0] c,
  output logic [T+1:0] a_hat,
  output logic         h
);
  always_comb begin
    a_hat = s[P+1 -: T+2] + c[P+1 -: T+2];
    h     = (a_hat[T+1 -: 2] == 2'b00);
  end
endmodule
