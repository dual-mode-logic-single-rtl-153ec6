// cmp_dot: radix-4 DOT operator of the parallel-prefix full comparator.
//
// Merges four adjacent (generate, propagate) pairs, index 3 the most
// significant, into one pair for the whole group:
//   ggg_o = gg[3] | gg[2]&gp[3] | gg[1]&gp[3]&gp[2] | gg[0]&gp[3]&gp[2]&gp[1]
//   ggp_o = gp[3] & gp[2] & gp[1] & gp[0]
// so ggg_o = 1 when the A group is less than the B group and ggp_o = 1 when
// they are equal (both 0 means A group > B group). The same operator serves
// the parallel recursive stage and the first level of post-processing.
// It is a NAND-NAND network of Type A DML gates (largest cell NAND4) sharing
// control clka_i; the cell mapping is this design's own choice.
// Static mode (clka_i = 1): combinational. Dynamic mode: outputs read 1 during
// pre-charge (clka_i = 0), the function during evaluation.
module cmp_dot
  import cmp_pkg::*;
(
  input  logic [3:0] gg_i,
  input  logic [3:0] gp_i,
  input  logic       clka_i,
  output logic       ggg_o,
  output logic       ggp_o
);

  logic n_g3, n_t2, n_t1, n_t0;
  logic n_p;

  dml_gate #(.FN(GATE_INV), .N(1), .TYPE(DML_TYPE_A)) u_n_g3 (
    .in_i(gg_i[3]), .ctrl_i(clka_i), .out_o(n_g3));
  dml_gate #(.FN(GATE_NAND), .N(2), .TYPE(DML_TYPE_A)) u_n_t2 (
    .in_i({gg_i[2], gp_i[3]}), .ctrl_i(clka_i), .out_o(n_t2));
  dml_gate #(.FN(GATE_NAND), .N(3), .TYPE(DML_TYPE_A)) u_n_t1 (
    .in_i({gg_i[1], gp_i[3], gp_i[2]}), .ctrl_i(clka_i), .out_o(n_t1));
  dml_gate #(.FN(GATE_NAND), .N(4), .TYPE(DML_TYPE_A)) u_n_t0 (
    .in_i({gg_i[0], gp_i[3], gp_i[2], gp_i[1]}), .ctrl_i(clka_i), .out_o(n_t0));
  dml_gate #(.FN(GATE_NAND), .N(4), .TYPE(DML_TYPE_A)) u_ggg (
    .in_i({n_g3, n_t2, n_t1, n_t0}), .ctrl_i(clka_i), .out_o(ggg_o));

  dml_gate #(.FN(GATE_NAND), .N(4), .TYPE(DML_TYPE_A)) u_n_p (
    .in_i(gp_i), .ctrl_i(clka_i), .out_o(n_p));
  dml_gate #(.FN(GATE_INV), .N(1), .TYPE(DML_TYPE_A)) u_ggp (
    .in_i(n_p), .ctrl_i(clka_i), .out_o(ggp_o));

endmodule
