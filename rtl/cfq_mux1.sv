// cfq_mux1: MUX1 of the A datapath.
//
// For an LPS (g = 1) the new A is Qe itself, passed on as a pair with a zero carry
// vector; otherwise the sum/carry pair coming from CSA1 is passed on. Combinational.
module cfq_mux1 #(
  parameter int unsigned W = cfqca_pkg::W_A
) (
  input  logic         g,
  input  logic [W-1:0] s_a,
  input  logic [W-1:0] c_a,
  input  logic [W-1:0] qe,
  output logic [W-1:0] s_o,
  output logic [W-1:0] c_o
);
  always_comb begin
    s_o = g ? qe : s_a;
    c_o = g ? '0 : c_a;
  end
endmodule
