// cmp_pkg: types and constants shared by the DML full-comparator.
//
// The comparator compares two 64-bit unsigned numbers A and B in a three-stage
// radix-4 parallel-prefix tree: 32 pre-processing elements (2 bits each), 8 DOT
// operators (4 groups each) and a post-processing stage of 2 DOT operators plus
// an output gate. Every logic gate except the XOR/XNOR cell is a Dual Mode Logic
// (DML) gate, modelled here at logic level.
//
// Output encoding OUT[1:0] (OUT[0] flags A < B, OUT[1] flags A = B, both 0 means
// A > B) follows the published output table and simulated waveforms. Both bits
// at 1 never occurs during evaluation; with Type A gates it is what the outputs
// show while the comparator pre-charges.
package cmp_pkg;

  // Operand width of the comparator and the group counts of each stage.
  localparam int unsigned CMP_WIDTH = 64;
  localparam int unsigned N_PE      = CMP_WIDTH / 2;  // pre-processing elements
  localparam int unsigned N_DOT     = N_PE / 4;       // parallel recursive DOTs
  localparam int unsigned DOT_RADIX = 4;              // groups merged per DOT

  // DML gate flavour: Type A has a pMOS pre-charge device in
  // parallel with the pull-up network, Type B an nMOS pre-discharge device in
  // parallel with the pull-down network.
  typedef enum logic {
    DML_TYPE_A = 1'b0,
    DML_TYPE_B = 1'b1
  } dml_type_e;

  // Logic function of a DML gate.
  typedef enum logic [1:0] {
    GATE_INV  = 2'd0,
    GATE_NAND = 2'd1,
    GATE_NOR  = 2'd2
  } gate_fn_e;

  // Comparator result as driven on OUT[1:0].
  typedef enum logic [1:0] {
    CMP_GT        = 2'b00,  // A > B
    CMP_LT        = 2'b01,  // A < B   (OUT[0] = 1)
    CMP_EQ        = 2'b10,  // A = B   (OUT[1] = 1)
    CMP_PRECHARGE = 2'b11   // never an evaluated result; Type A pre-charge
  } cmp_result_e;

  // Control level that keeps a DML gate permanently evaluating (static mode).
  function automatic logic dml_static_level(dml_type_e t);
    return (t == DML_TYPE_A) ? 1'b1 : 1'b0;
  endfunction

endpackage
