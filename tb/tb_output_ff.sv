// tb_output_ff: self-checking test of the rising-edge result flip-flops.
//
// Checks that q takes d at each rising edge and ignores a change of d made
// before the falling edge.
module tb_output_ff;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic [1:0] d, q, held;

  output_ff #(.WIDTH(2)) dut (.clk(clk), .d_i(d), .q_o(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (200) begin
      @(negedge clk);
      #1 d = 2'($urandom());
      held = d;
      @(posedge clk);
      #1;
      checks++;
      if (q !== held) begin failures++; $display("FAIL posedge capture q=%b exp=%b", q, held); end
      d = ~held;
      @(negedge clk);
      #1;
      checks++;
      if (q !== held) begin failures++; $display("FAIL captured on falling edge q=%b", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
