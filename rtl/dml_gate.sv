// dml_gate: logic-level model of one Dual Mode Logic gate.
//
// A DML gate is a CMOS gate with one extra transistor driven by a control
// signal. For Type A the transistor is a pMOS in parallel with the pull-up
// network (control CLKA, active low); for Type B it is an nMOS in parallel with
// the pull-down network (control CLKB, active high).
//   * Static mode: the control is held inactive (CLKA = 1, CLKB = 0) and the
//     gate is an ordinary CMOS gate.
//   * Dynamic mode: the control is a clock. While the extra transistor is on
//     (pre-charge), the output depends only on the control: 1 for Type A,
//     0 for Type B. While it is off (evaluation) the gate computes its CMOS
//     function again.
// This model keeps exactly that logic behaviour. Delay, energy, transistor
// sizing and the footed/unfooted choice have no logic effect and are not
// modelled. Supported functions are those used for the comparator's cells:
// inverter, NAND2..NAND5 and NOR2..NOR3.
//
// Interface: in_i[N-1:0] gate inputs, ctrl_i the DML control (CLKA or CLKB),
// out_o the gate output. Purely combinational.
module dml_gate
  import cmp_pkg::*;
#(
  parameter gate_fn_e  FN   = GATE_NAND,
  parameter int        N    = 2,
  parameter dml_type_e TYPE = DML_TYPE_A
) (
  input  logic [N-1:0] in_i,
  input  logic         ctrl_i,
  output logic         out_o
);

  // Elaboration-time check of the supported cell set.
  if (!((FN == GATE_INV  && N == 1) ||
        (FN == GATE_NAND && N >= 2 && N <= 5) ||
        (FN == GATE_NOR  && N >= 2 && N <= 3))) begin : g_bad_cell
    $error("dml_gate: unsupported cell FN=%0d N=%0d", FN, N);
  end

  logic cmos_out;   // the static CMOS function
  logic precharge;  // extra transistor conducting

  always_comb begin
    unique case (FN)
      GATE_INV:  cmos_out = ~in_i[0];
      GATE_NAND: cmos_out = ~(&in_i);
      GATE_NOR:  cmos_out = ~(|in_i);
      default:   cmos_out = ~(&in_i);
    endcase
  end

  assign precharge = (TYPE == DML_TYPE_A) ? ~ctrl_i : ctrl_i;
  assign out_o     = precharge ? (TYPE == DML_TYPE_A) : cmos_out;

endmodule
