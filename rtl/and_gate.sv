// Two-input AND gate, the combinational-logic example: the output depends
// only on the present inputs and is 1 only when both are 1.
//
// Follows the original's first combinational example and its truth table
// exactly.
module and_gate (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = a & b;
endmodule
