// rev_peres: the 3x3 Peres reversible gate, a Toffoli followed by a CNOT.
// X = A, Y = A ^ B, Z = (A & B) ^ C. With C = 0 one gate is a half adder (Y sum, Z carry).
// Purely combinational. Quantum cost 4. The gate's mapping is the standard one.
module rev_peres (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic x,
  output logic y,
  output logic z
);
  assign x = a;
  assign y = a ^ b;
  assign z = (a & b) ^ c;
endmodule
