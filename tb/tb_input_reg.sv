// tb_input_reg: self-checking test of the falling-edge operand register.
//
// Drives a new random word shortly after each clock edge and checks that q
// takes the value present at each falling edge and holds through the rising
// edge that follows.
module tb_input_reg;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic [63:0] d, q, held;

  input_reg #(.WIDTH(64)) dut (.clk(clk), .d_i(d), .q_o(q));

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
      @(posedge clk);
      #1 d = {$urandom(), $urandom()};
      held = d;
      @(negedge clk);
      #1;
      checks++;
      if (q !== held) begin failures++; $display("FAIL negedge capture q=%h exp=%h", q, held); end
      d = ~held;                       // changes before the rising edge
      @(posedge clk);
      #1;
      checks++;
      if (q !== held) begin failures++; $display("FAIL captured on rising edge q=%h", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
