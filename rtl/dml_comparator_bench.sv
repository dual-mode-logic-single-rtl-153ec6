// dml_comparator_bench: the comparator with its operand and result registers.
//
// a_i and b_i are captured by two 64-bit registers (REG_A, REG_B) on the
// falling edge of clk. The 64-bit DML comparator evaluates them during the low
// phase, and two flip-flops capture OUT[1:0] on the next rising edge:
//   out_q_o = 2'b00  A > B,  2'b01  A < B,  2'b10  A = B.
// Latency: operands present at a falling edge appear in out_q_o after the
// following rising edge, i.e. half a clock period later; one new comparison is
// accepted every clock cycle.
//
// dml_ctrl_i is the DML control signal CLKA of every DML gate in the
// comparator. Hold it at 1 for static mode. For dynamic mode drive it with
// the inverse of clk (so the comparator pre-charges while clk is high and
// evaluates while clk is low), changing it just after each clk edge so that
// it is still 1 when the result flip-flops sample. The mode may be changed at
// run time. The assertion below checks that rule: the comparator must be
// evaluating at every rising edge of clk.
module dml_comparator_bench
  import cmp_pkg::*;
(
  input  logic                 clk,
  input  logic                 dml_ctrl_i,
  input  logic [CMP_WIDTH-1:0] a_i,
  input  logic [CMP_WIDTH-1:0] b_i,
  output logic [1:0]           out_q_o
);

  logic [CMP_WIDTH-1:0] a_q, b_q;
  logic [1:0]           cmp_out;

  input_reg #(.WIDTH(CMP_WIDTH)) u_reg_a (.clk(clk), .d_i(a_i), .q_o(a_q));
  input_reg #(.WIDTH(CMP_WIDTH)) u_reg_b (.clk(clk), .d_i(b_i), .q_o(b_q));

  dml_comparator u_cmp (
    .a_i   (a_q),
    .b_i   (b_q),
    .clka_i(dml_ctrl_i),
    .out_o (cmp_out)
  );

  output_ff #(.WIDTH(2)) u_out_ff (.clk(clk), .d_i(cmp_out), .q_o(out_q_o));

  // The result flip-flops must never sample a pre-charged comparator.
  a_eval_at_sample: assert property (@(posedge clk) dml_ctrl_i)
    else $error("dml_comparator_bench: DML control in pre-charge at sampling edge");

endmodule
