// tb_cmp_out: exhaustive self-checking test of the post-processing output gate.
//
// The upper (G2,P2) and lower (G1,P1) halves each take one of the codes less,
// equal, greater. Expected OUT: 2'b01 when A < B, 2'b10 when A = B, 2'b00 when
// A > B, decided by the upper half unless it is equal. Pre-charge gives 2'b11.
module tb_cmp_out;
  int checks = 0;
  int failures = 0;
  logic g1, p1, g2, p2, clka;
  logic [1:0] out;

  cmp_out dut (.g1_i(g1), .p1_i(p1), .g2_i(g2), .p2_i(p2), .clka_i(clka), .out_o(out));

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rel;
    logic [1:0] exp;
    for (int c = 0; c < 2; c++) begin
      for (int hi = 0; hi < 3; hi++) begin   // 0 greater, 1 less, 2 equal
        for (int lo = 0; lo < 3; lo++) begin
          g2 = (hi == 1); p2 = (hi == 2);
          g1 = (lo == 1); p1 = (lo == 2);
          clka = c[0];
          rel = (hi != 2) ? hi : lo;
          exp = (rel == 1) ? 2'b01 : (rel == 2) ? 2'b10 : 2'b00;
          if (!clka) exp = 2'b11;
          #1;
          checks++;
          if (out !== exp) begin
            failures++; $display("FAIL hi=%0d lo=%0d clka=%b out=%b exp=%b", hi, lo, clka, out, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
