// input_reg: operand register of the comparator bench (REG_A / REG_B).
//
// A plain type-D register of WIDTH bits that captures d_i on the falling edge
// of clk. Launching the operands on the falling edge gives the comparator the
// whole low phase of the clock to evaluate before the output flip-flops sample
// on the next rising edge. No reset: the bench's result is only meaningful
// once an operand has been loaded.
module input_reg #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o
);

  always_ff @(negedge clk) begin
    q_o <= d_i;
  end

endmodule
