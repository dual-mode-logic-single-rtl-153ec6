// tb_dml_comparator_bench: end-to-end test of the comparator bench at its
// default size (64-bit operands).
//
// A 10 ns clock runs the bench. A new operand pair is presented every cycle,
// 1 ns after the rising edge; the operand registers take it at the falling
// edge and the result flip-flops must show its result 1 ns after the next
// rising edge (half a period after capture) and not before. The DML control
// follows the inverse of the clock 1 ns after each edge in dynamic mode and is
// held at 1 in static mode; the mode is switched at run time in blocks of
// cycles. The testbench counts how often each mechanism occurs and fails any
// that never does: static-mode and dynamic-mode comparisons, switches between
// the modes, observed pre-charge phases of the comparator, and each of the
// three results (A > B, A < B, A = B). It starts with the worst-case sequence
// of B[0] rising from A = B = 0 and falling back.
module tb_dml_comparator_bench;
  import cmp_pkg::*;

  int checks = 0;
  int failures = 0;

  logic                 clk = 1'b0;
  logic                 dml_ctrl = 1'b1;
  logic                 dyn_mode = 1'b0;
  logic [CMP_WIDTH-1:0] a, b;
  logic [1:0]           out_q;

  int n_static = 0, n_dynamic = 0, n_switch = 0, n_precharge = 0;
  int n_gt = 0, n_lt = 0, n_eq = 0;

  dml_comparator_bench dut (
    .clk       (clk),
    .dml_ctrl_i(dml_ctrl),
    .a_i       (a),
    .b_i       (b),
    .out_q_o   (out_q)
  );

  always #5 clk = ~clk;

  // DML control: inverse clock in dynamic mode, constant 1 in static mode,
  // updated 1 ns after every clock edge.
  initial forever begin
    @(clk);
    #1 dml_ctrl = dyn_mode ? ~clk : 1'b1;
  end

  initial begin : watchdog
    #2000000;
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

  function automatic logic [CMP_WIDTH-1:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

  // Present one pair after a rising edge and check its result one cycle later.
  task automatic compare(logic [CMP_WIDTH-1:0] x, logic [CMP_WIDTH-1:0] y);
    logic [1:0] exp = expected(x, y);
    logic [1:0] prev;
    @(posedge clk);
    #1;
    a = x;
    b = y;
    prev = out_q;
    // In dynamic mode the comparator is pre-charging here (control low).
    #2;
    if (dyn_mode && dml_ctrl == 1'b0) begin
      checks++;
      if (dut.cmp_out !== 2'b11) begin
        failures++; $display("FAIL pre-charge not seen cmp_out=%b", dut.cmp_out);
      end else n_precharge++;
    end
    // Just before the next rising edge the old result must still be shown.
    @(negedge clk);
    #4;
    checks++;
    if (out_q !== prev) begin
      failures++; $display("FAIL result appeared early out_q=%b", out_q);
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_q !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h out=%b exp=%b", dyn_mode ? "dyn" : "static", x, y, out_q, exp);
    end
    if (dyn_mode) n_dynamic++; else n_static++;
    case (out_q)
      2'b00:   n_gt++;
      2'b01:   n_lt++;
      2'b10:   n_eq++;
      default: ;
    endcase
  endtask

  task automatic set_mode(logic dyn);
    @(posedge clk);
    #2;
    if (dyn != dyn_mode) n_switch++;
    dyn_mode = dyn;
  endtask

  initial begin
    logic [CMP_WIDTH-1:0] r;
    a = '0;
    b = '0;
    set_mode(1'b1);
    // Worst-case switching of B[0].
    compare('0, '0);
    compare('0, 64'd1);
    compare('0, '0);
    for (int blk = 0; blk < 8; blk++) begin
      set_mode(blk[0]);
      for (int k = 0; k < 100; k++) begin
        int kind, bit_pos;
        logic [CMP_WIDTH-1:0] s;
        kind    = $urandom_range(2, 0);
        bit_pos = $urandom_range(CMP_WIDTH - 1, 0);
        r       = rand64();
        s       = rand64();
        case (kind)
          0: compare(r, s);
          1: compare(r, r);
          default: begin
            if (s[0])
              compare(r & ~(64'd1 << bit_pos), r | (64'd1 << bit_pos));
            else
              compare(r | (64'd1 << bit_pos), r & ~(64'd1 << bit_pos));
          end
        endcase
      end
    end
    $display("mechanisms: static=%0d dynamic=%0d switches=%0d precharge=%0d gt=%0d lt=%0d eq=%0d",
             n_static, n_dynamic, n_switch, n_precharge, n_gt, n_lt, n_eq);
    if (n_static == 0)    begin failures++; $display("FAIL no static-mode comparison"); end
    if (n_dynamic == 0)   begin failures++; $display("FAIL no dynamic-mode comparison"); end
    if (n_switch < 2)     begin failures++; $display("FAIL too few mode switches"); end
    if (n_precharge == 0) begin failures++; $display("FAIL no pre-charge observed"); end
    if (n_gt == 0)        begin failures++; $display("FAIL no A>B result"); end
    if (n_lt == 0)        begin failures++; $display("FAIL no A<B result"); end
    if (n_eq == 0)        begin failures++; $display("FAIL no A=B result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
