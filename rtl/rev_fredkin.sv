// rev_fredkin: the 3x3 Fredkin (controlled swap) reversible gate.
// The control A passes to X; the targets B and C are swapped when A is 1:
// Y = A'B + AC, Z = AB + A'C. Y is therefore a 2:1 multiplexer (A ? C : B) and Z keeps the
// input not selected. Purely combinational. Quantum cost 5. The mapping is the standard one.
module rev_fredkin (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic x,
  output logic y,
  output logic z
);
  assign x = a;
  assign y = a ? c : b;
  assign z = a ? b : c;
endmodule
