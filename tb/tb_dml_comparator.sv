// tb_dml_comparator: self-checking test of the 64-bit DML full comparator.
//
// Operand pairs: equal values, pairs differing in exactly one bit (every bit
// position, both directions), pairs sharing a random prefix, the worst-case
// switching of B[0] from an all-zero start, and fully random pairs. The
// expected result comes from the simulator's own 64-bit unsigned comparison.
// Each pair is checked in static mode (clka held at 1), and in dynamic mode
// through one pre-charge phase (out must read 2'b11) followed by one
// evaluation phase (out must read the result). The internal GGG[0] is also
// checked against a direct comparison of the low 8 bits.
module tb_dml_comparator;
  import cmp_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [CMP_WIDTH-1:0] a, b;
  logic                 clka;
  logic [1:0]           out;

  dml_comparator dut (.a_i(a), .b_i(b), .clka_i(clka), .out_o(out));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] expected(logic [CMP_WIDTH-1:0] x, logic [CMP_WIDTH-1:0] y);
    if (x < y)  return 2'b01;
    if (x == y) return 2'b10;
    return 2'b00;
  endfunction

  task automatic apply(logic [CMP_WIDTH-1:0] x, logic [CMP_WIDTH-1:0] y);
    logic [1:0] exp = expected(x, y);
    // Static mode.
    clka = 1'b1; a = x; b = y;
    #1;
    checks++;
    if (out !== exp) begin
      failures++; $display("FAIL static a=%h b=%h out=%b exp=%b", x, y, out, exp);
    end
    checks++;
    if (dut.ggg[0] !== (x[7:0] < y[7:0]) || dut.ggp[0] !== (x[7:0] == y[7:0])) begin
      failures++; $display("FAIL GGG/GGP[0] a=%h b=%h", x, y);
    end
    // Dynamic mode: pre-charge then evaluate.
    clka = 1'b0;
    #1;
    checks++;
    if (out !== 2'b11) begin
      failures++; $display("FAIL precharge out=%b", out);
    end
    clka = 1'b1;
    #1;
    checks++;
    if (out !== exp) begin
      failures++; $display("FAIL dynamic a=%h b=%h out=%b exp=%b", x, y, out, exp);
    end
  endtask

  function automatic logic [CMP_WIDTH-1:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

  initial begin
    logic [CMP_WIDTH-1:0] r;
    // Worst-case switching: A = B = 0, then B[0] rises, then falls again.
    apply('0, '0);
    apply('0, 64'd1);
    apply('0, '0);
    apply('1, '1);
    apply('1, '0);
    apply('0, '1);
    // One-bit differences at every position.
    for (int k = 0; k < CMP_WIDTH; k++) begin
      r = rand64();
      apply(r & ~(64'd1 << k), r |  (64'd1 << k));
      apply(r |  (64'd1 << k), r & ~(64'd1 << k));
      apply(r, r);
    end
    // Common random prefix, random differing tail.
    for (int k = 0; k < 400; k++) begin
      int cut;
      logic [CMP_WIDTH-1:0] mask;
      cut  = $urandom_range(CMP_WIDTH - 1, 0);
      mask = ~64'd0 << cut;
      r = rand64();
      apply((r & mask) | (rand64() & ~mask), (r & mask) | (rand64() & ~mask));
    end
    // Fully random.
    for (int k = 0; k < 2000; k++) apply(rand64(), rand64());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
