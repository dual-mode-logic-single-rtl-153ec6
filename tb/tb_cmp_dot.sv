// tb_cmp_dot: exhaustive self-checking test of the radix-4 DOT operator.
//
// Each of the four input groups takes one of the three legal (GG,GP) codes:
// less (1,0), equal (0,1), greater (0,0). For all 81 combinations the expected
// group result is found by scanning from the most significant group for the
// first one that is not equal. Pre-charge (clka = 0) must give 1 on both outputs.
module tb_cmp_dot;
  int checks = 0;
  int failures = 0;
  logic [3:0] gg, gp;
  logic clka, ggg, ggp;

  cmp_dot dut (.gg_i(gg), .gp_i(gp), .clka_i(clka), .ggg_o(ggg), .ggp_o(ggp));

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int code [4];
    int rel;  // 0 greater, 1 less, 2 equal
    for (int c = 0; c < 2; c++) begin
      for (int v = 0; v < 81; v++) begin
        int t;
        t = v;
        for (int k = 0; k < 4; k++) begin
          code[k] = t % 3;
          t = t / 3;
          gg[k] = (code[k] == 1);
          gp[k] = (code[k] == 2);
        end
        rel = 2;
        for (int k = 3; k >= 0; k--) begin
          if (code[k] != 2) begin
            rel = code[k];
            break;
          end
        end
        clka = c[0];
        #1;
        checks += 2;
        if (ggg !== (clka ? (rel == 1) : 1'b1)) begin
          failures++; $display("FAIL ggg gg=%b gp=%b clka=%b got=%b", gg, gp, clka, ggg);
        end
        if (ggp !== (clka ? (rel == 2) : 1'b1)) begin
          failures++; $display("FAIL ggp gg=%b gp=%b clka=%b got=%b", gg, gp, clka, ggp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
