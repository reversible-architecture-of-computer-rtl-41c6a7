// rev_cnot: the 2x2 controlled-NOT (Feynman) reversible gate.
// The control A passes unchanged to X; the target B is inverted when A is 1 (Y = A ^ B).
// Purely combinational, no timing. Quantum cost 1. The gate's mapping is the standard one.
module rev_cnot (
  input  logic a,
  input  logic b,
  output logic x,
  output logic y
);
  assign x = a;
  assign y = a ^ b;
endmodule
