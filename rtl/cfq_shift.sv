// cfq_shift: SHIFT1 / SHIFT2, shifts a sum/carry pair left by 0 or 1 positions.
//
// Doubling both vectors doubles the value they represent; the top bits drop out, which
// is safe because the registers are sized so the shifted value still fits. Combinational.
module cfq_shift #(
  parameter int unsigned W = cfqca_pkg::W_A
) (
  input  logic         sh,
  input  logic [W-1:0] s_in,
  input  logic [W-1:0] c_in,
  output logic [W-1:0] s_out,
  output logic [W-1:0] c_out
);
  always_comb begin
    s_out = sh ? {s_in[W-2:0], 1'b0} : s_in;
    c_out = sh ? {c_in[W-2:0], 1'b0} : c_in;
  end
endmodule
