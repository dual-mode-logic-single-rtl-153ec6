// cmp_pe: pre-processing element of the parallel-prefix full comparator.
//
// Looks at one 2-bit slice a_i = A[2i+1:2i], b_i = B[2i+1:2i] and produces
//   gp_o (group propagate) = 1 when the slices are equal,
//   gg_o (group generate)  = 1 when the A slice is less than the B slice.
// The equations are those of the comparator's pre-processing stage:
//   GP = xnor(A1,B1) & xnor(A0,B0)
//   GG = B1 & (B0 & (A0^B0) | ~A1 & (A1^B1)) | B0 & ~A1 & (A0^B0)
// Two static XOR/XNOR cells form the bitwise (in)equalities; the rest is a
// NAND-NAND network of Type A DML gates sharing the control clka_i: GP is a
// NAND2 of the two XNORs plus an inverter, GG three NAND3 product terms and a
// NAND3 sum. The choice of cells is this design's own; the equations are the
// published ones.
//
// In static mode (clka_i = 1) the element is combinational. In dynamic mode
// both outputs read 1 while clka_i = 0 (pre-charge) and the function while
// clka_i = 1 (evaluation).
module cmp_pe
  import cmp_pkg::*;
(
  input  logic [1:0] a_i,
  input  logic [1:0] b_i,
  input  logic       clka_i,
  output logic       gg_o,
  output logic       gp_o
);

  logic x1, xn1, x0, xn0;
  logic na1;
  logic t_bb, t_ba, t_ab;

  xor_xnor u_x1 (.a_i(a_i[1]), .b_i(b_i[1]), .xor_o(x1), .xnor_o(xn1));
  xor_xnor u_x0 (.a_i(a_i[0]), .b_i(b_i[0]), .xor_o(x0), .xnor_o(xn0));

  // GP = xnor1 & xnor0, as NAND2 followed by an inverter.
  logic n_gp;
  dml_gate #(.FN(GATE_NAND), .N(2), .TYPE(DML_TYPE_A)) u_n_gp (
    .in_i({xn1, xn0}), .ctrl_i(clka_i), .out_o(n_gp));
  dml_gate #(.FN(GATE_INV), .N(1), .TYPE(DML_TYPE_A)) u_gp (
    .in_i(n_gp), .ctrl_i(clka_i), .out_o(gp_o));

  dml_gate #(.FN(GATE_INV), .N(1), .TYPE(DML_TYPE_A)) u_na1 (
    .in_i(a_i[1]), .ctrl_i(clka_i), .out_o(na1));

  // Product terms of GG, each as a NAND3.
  dml_gate #(.FN(GATE_NAND), .N(3), .TYPE(DML_TYPE_A)) u_t_bb (
    .in_i({b_i[1], b_i[0], x0}), .ctrl_i(clka_i), .out_o(t_bb));
  dml_gate #(.FN(GATE_NAND), .N(3), .TYPE(DML_TYPE_A)) u_t_ba (
    .in_i({b_i[1], na1, x1}), .ctrl_i(clka_i), .out_o(t_ba));
  dml_gate #(.FN(GATE_NAND), .N(3), .TYPE(DML_TYPE_A)) u_t_ab (
    .in_i({b_i[0], na1, x0}), .ctrl_i(clka_i), .out_o(t_ab));

  // Sum of the three terms.
  dml_gate #(.FN(GATE_NAND), .N(3), .TYPE(DML_TYPE_A)) u_gg (
    .in_i({t_bb, t_ba, t_ab}), .ctrl_i(clka_i), .out_o(gg_o));

endmodule
