// rev_toffoli: the 3x3 Toffoli (controlled-controlled-NOT) reversible gate.
// Controls A and B pass unchanged to X and Y; the target becomes Z = C ^ (A & B).
// With C = 0 it computes AND; with B = 1 it acts as a CNOT. Purely combinational.
// Quantum cost 5. The gate's mapping is the standard one.
module rev_toffoli (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic x,
  output logic y,
  output logic z
);
  assign x = a;
  assign y = b;
  assign z = c ^ (a & b);
endmodule
