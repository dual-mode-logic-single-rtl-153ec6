// tb_cmp_pe: exhaustive self-checking test of the pre-processing element.
//
// For all 16 pairs of 2-bit slices it checks, in evaluation (clka = 1), that
// GP = (A slice == B slice) and GG = (A slice < B slice) using integer
// comparison, and in pre-charge (clka = 0) that both outputs read 1.
module tb_cmp_pe;
  int checks = 0;
  int failures = 0;
  logic [1:0] a, b;
  logic clka, gg, gp;

  cmp_pe dut (.a_i(a), .b_i(b), .clka_i(clka), .gg_o(gg), .gp_o(gp));

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int ia = 0; ia < 4; ia++) begin
        for (int ib = 0; ib < 4; ib++) begin
          clka = c[0];
          a = ia[1:0];
          b = ib[1:0];
          #1;
          checks += 2;
          if (gg !== (clka ? (ia < ib) : 1'b1)) begin
            failures++; $display("FAIL gg a=%0d b=%0d clka=%b gg=%b", ia, ib, clka, gg);
          end
          if (gp !== (clka ? (ia == ib) : 1'b1)) begin
            failures++; $display("FAIL gp a=%0d b=%0d clka=%b gp=%b", ia, ib, clka, gp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
