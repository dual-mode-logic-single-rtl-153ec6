// output_ff: result flip-flops of the comparator bench (the FF on OUT[0] and
// OUT[1]).
//
// WIDTH D flip-flops that capture d_i on the rising edge of clk. In the bench
// they sample the comparator at the end of its evaluation phase. No reset:
// q_o is meaningful from the first rising edge after an operand load.
module output_ff #(
  parameter int unsigned WIDTH = 2
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o
);

  always_ff @(posedge clk) begin
    q_o <= d_i;
  end

endmodule
