// xor_xnor: static XOR/XNOR cell of one bit pair.
//
// The one cell of the comparator that is not a DML gate: it is a static cell
// (a 10-transistor circuit in the transistor-level design) that produces both
// a xor b and a xnor b, and has no DML control input. The pre-processing
// element uses both outputs. Purely combinational.
module xor_xnor (
  input  logic a_i,
  input  logic b_i,
  output logic xor_o,
  output logic xnor_o
);

  assign xor_o  = a_i ^ b_i;
  assign xnor_o = ~(a_i ^ b_i);

endmodule
