// tb_xor_xnor: exhaustive self-checking test of the static XOR/XNOR cell.
module tb_xor_xnor;
  int checks = 0;
  int failures = 0;
  logic a, b, x, xn;

  xor_xnor dut (.a_i(a), .b_i(b), .xor_o(x), .xnor_o(xn));

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0];
      #1;
      checks += 2;
      if (x  !== (a != b)) begin failures++; $display("FAIL xor  a=%b b=%b", a, b); end
      if (xn !== (a == b)) begin failures++; $display("FAIL xnor a=%b b=%b", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
