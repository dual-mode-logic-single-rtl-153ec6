// cmp_out: second level of the comparator's post-processing stage.
//
// (g2_i, p2_i) summarise the upper 32 bits, (g1_i, p1_i) the lower 32 bits
// (g = A part less than B part, p = parts equal). The output is
//   out_o[0] = g2 | g1 & p2   (A < B)
//   out_o[1] = p1 & p2        (A = B)
// and out_o = 2'b00 means A > B. The bit assignment follows the published
// output table and waveforms; the published output equations carry the two
// bit indices the other way round (see the design notes).
// Built from Type A DML gates sharing control clka_i (cell choice is this
// design's own). During pre-charge (clka_i = 0) both outputs read 1, a code
// that never appears during evaluation.
module cmp_out
  import cmp_pkg::*;
(
  input  logic       g1_i,
  input  logic       p1_i,
  input  logic       g2_i,
  input  logic       p2_i,
  input  logic       clka_i,
  output logic [1:0] out_o
);

  logic n_g2, n_g1p2, n_p;

  dml_gate #(.FN(GATE_INV), .N(1), .TYPE(DML_TYPE_A)) u_n_g2 (
    .in_i(g2_i), .ctrl_i(clka_i), .out_o(n_g2));
  dml_gate #(.FN(GATE_NAND), .N(2), .TYPE(DML_TYPE_A)) u_n_g1p2 (
    .in_i({g1_i, p2_i}), .ctrl_i(clka_i), .out_o(n_g1p2));
  dml_gate #(.FN(GATE_NAND), .N(2), .TYPE(DML_TYPE_A)) u_lt (
    .in_i({n_g2, n_g1p2}), .ctrl_i(clka_i), .out_o(out_o[0]));

  dml_gate #(.FN(GATE_NAND), .N(2), .TYPE(DML_TYPE_A)) u_n_p (
    .in_i({p1_i, p2_i}), .ctrl_i(clka_i), .out_o(n_p));
  dml_gate #(.FN(GATE_INV), .N(1), .TYPE(DML_TYPE_A)) u_eq (
    .in_i(n_p), .ctrl_i(clka_i), .out_o(out_o[1]));

endmodule
