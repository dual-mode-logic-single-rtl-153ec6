// tb_dml_gate: self-checking test of the logic-level DML gate model.
//
// Instantiates every supported cell (INV, NAND2..5, NOR2..3) as Type A and a
// NAND3 and a NOR2 as Type B. For every input combination and both control
// levels it compares the output with a reference worked out here: the CMOS
// function in evaluation, 1 (Type A) or 0 (Type B) in pre-charge.
module tb_dml_gate;
  import cmp_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [4:0] in;
  logic       ctrl;

  logic o_inv, o_nand2, o_nand3, o_nand4, o_nand5, o_nor2, o_nor3;
  logic o_b_nand3, o_b_nor2;

  dml_gate #(.FN(GATE_INV),  .N(1), .TYPE(DML_TYPE_A)) u_inv   (.in_i(in[0]),   .ctrl_i(ctrl), .out_o(o_inv));
  dml_gate #(.FN(GATE_NAND), .N(2), .TYPE(DML_TYPE_A)) u_nand2 (.in_i(in[1:0]), .ctrl_i(ctrl), .out_o(o_nand2));
  dml_gate #(.FN(GATE_NAND), .N(3), .TYPE(DML_TYPE_A)) u_nand3 (.in_i(in[2:0]), .ctrl_i(ctrl), .out_o(o_nand3));
  dml_gate #(.FN(GATE_NAND), .N(4), .TYPE(DML_TYPE_A)) u_nand4 (.in_i(in[3:0]), .ctrl_i(ctrl), .out_o(o_nand4));
  dml_gate #(.FN(GATE_NAND), .N(5), .TYPE(DML_TYPE_A)) u_nand5 (.in_i(in[4:0]), .ctrl_i(ctrl), .out_o(o_nand5));
  dml_gate #(.FN(GATE_NOR),  .N(2), .TYPE(DML_TYPE_A)) u_nor2  (.in_i(in[1:0]), .ctrl_i(ctrl), .out_o(o_nor2));
  dml_gate #(.FN(GATE_NOR),  .N(3), .TYPE(DML_TYPE_A)) u_nor3  (.in_i(in[2:0]), .ctrl_i(ctrl), .out_o(o_nor3));
  // Type B gates take CLKB: pre-discharge while the control is 1.
  dml_gate #(.FN(GATE_NAND), .N(3), .TYPE(DML_TYPE_B)) u_b_nand3 (.in_i(in[2:0]), .ctrl_i(~ctrl), .out_o(o_b_nand3));
  dml_gate #(.FN(GATE_NOR),  .N(2), .TYPE(DML_TYPE_B)) u_b_nor2  (.in_i(in[1:0]), .ctrl_i(~ctrl), .out_o(o_b_nor2));

  task automatic check(string name, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%b ctrl=%b got=%b exp=%b", name, in, ctrl, got, exp);
    end
  endtask

  // Reference: count of ones decides NAND/NOR without reduction operators.
  function automatic logic ref_nand(logic [4:0] v, int n);
    int ones = 0;
    for (int k = 0; k < n; k++) ones += v[k];
    return (ones == n) ? 1'b0 : 1'b1;
  endfunction
  function automatic logic ref_nor(logic [4:0] v, int n);
    int ones = 0;
    for (int k = 0; k < n; k++) ones += v[k];
    return (ones == 0) ? 1'b1 : 1'b0;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int v = 0; v < 32; v++) begin
        ctrl = c[0];
        in   = v[4:0];
        #1;
        // Type A: control 1 = evaluate, 0 = pre-charge to 1.
        check("inv",   o_inv,   ctrl ? !in[0]          : 1'b1);
        check("nand2", o_nand2, ctrl ? ref_nand(in, 2) : 1'b1);
        check("nand3", o_nand3, ctrl ? ref_nand(in, 3) : 1'b1);
        check("nand4", o_nand4, ctrl ? ref_nand(in, 4) : 1'b1);
        check("nand5", o_nand5, ctrl ? ref_nand(in, 5) : 1'b1);
        check("nor2",  o_nor2,  ctrl ? ref_nor(in, 2)  : 1'b1);
        check("nor3",  o_nor3,  ctrl ? ref_nor(in, 3)  : 1'b1);
        // Type B: CLKB = ~ctrl, evaluates when CLKB = 0, pre-discharges to 0.
        check("b_nand3", o_b_nand3, ctrl ? ref_nand(in, 3) : 1'b0);
        check("b_nor2",  o_b_nor2,  ctrl ? ref_nor(in, 2)  : 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
