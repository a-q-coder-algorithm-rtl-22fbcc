// cfq_qe_gate: MUX2 / MUX3 of the datapath, a row of AND gates.
//
// Presents Qe to a carry-save adder when en is high and 0 otherwise, so that an
// extra normalization cycle leaves the register value unchanged. Combinational.
module cfq_qe_gate #(
  parameter int unsigned W = cfqca_pkg::W_A
) (
  input  logic         en,
  input  logic [W-1:0] qe,
  output logic [W-1:0] q
);
  always_comb q = qe & {W{en}};
endmodule
