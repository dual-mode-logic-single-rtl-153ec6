// dml_comparator: 64-bit single-clock-cycle parallel-prefix full comparator
// built of Type A Dual Mode Logic gates.
//
// Compares unsigned a_i and b_i and reports one of three results on out_o:
//   2'b00  A > B,   2'b01  A < B (out_o[0]),   2'b10  A = B (out_o[1]).
// Three stages, as in a radix-4 parallel-prefix tree:
//   1. Pre-processing: 32 cmp_pe elements turn each 2-bit slice pair into
//      GG[i] (A slice < B slice) and GP[i] (slices equal).
//   2. Parallel recursive: 8 cmp_dot operators merge GG/GP[4i+3:4i] into
//      GGG[i]/GGP[i], covering 8 bits each.
//   3. Post-processing: two cmp_dot operators merge GGG/GGP[3:0] into (G1,P1)
//      and GGG/GGP[7:4] into (G2,P2); cmp_out forms the two outputs.
// Every gate except the XOR/XNOR cells is a Type A DML gate driven by the
// control clka_i. Static mode: hold clka_i at 1 and the comparator is purely
// combinational. Dynamic mode: drive clka_i with a clock; while it is 0 every
// DML node pre-charges and out_o reads 2'b11, while it is 1 the comparator
// evaluates and out_o settles to the result within the same phase.
// The stage structure and equations are the published ones; the mapping of
// the equations onto NAND/NOR/INV cells is this design's own.
module dml_comparator
  import cmp_pkg::*;
(
  input  logic [CMP_WIDTH-1:0] a_i,
  input  logic [CMP_WIDTH-1:0] b_i,
  input  logic                 clka_i,
  output logic [1:0]           out_o
);

  logic [N_PE-1:0]  gg, gp;    // pre-processing outputs
  logic [N_DOT-1:0] ggg, ggp;  // parallel recursive outputs
  logic             g1, p1, g2, p2;

  // Stage 1: pre-processing.
  for (genvar i = 0; i < N_PE; i++) begin : g_pe
    cmp_pe u_pe (
      .a_i   (a_i[2*i+1 -: 2]),
      .b_i   (b_i[2*i+1 -: 2]),
      .clka_i(clka_i),
      .gg_o  (gg[i]),
      .gp_o  (gp[i])
    );
  end

  // Stage 2: parallel recursive.
  for (genvar i = 0; i < N_DOT; i++) begin : g_dot
    cmp_dot u_dot (
      .gg_i  (gg[DOT_RADIX*i+3 -: DOT_RADIX]),
      .gp_i  (gp[DOT_RADIX*i+3 -: DOT_RADIX]),
      .clka_i(clka_i),
      .ggg_o (ggg[i]),
      .ggp_o (ggp[i])
    );
  end

  // Stage 3: post-processing, first level (lower and upper half).
  cmp_dot u_post_lo (
    .gg_i(ggg[3:0]), .gp_i(ggp[3:0]), .clka_i(clka_i), .ggg_o(g1), .ggp_o(p1));
  cmp_dot u_post_hi (
    .gg_i(ggg[7:4]), .gp_i(ggp[7:4]), .clka_i(clka_i), .ggg_o(g2), .ggp_o(p2));

  // Stage 3: post-processing, second level.
  cmp_out u_out (
    .g1_i(g1), .p1_i(p1), .g2_i(g2), .p2_i(p2), .clka_i(clka_i), .out_o(out_o));

endmodule
