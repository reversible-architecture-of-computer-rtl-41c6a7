// rcas: reversible controlled adder/subtractor cell (RCAS), 5 lines in, 5 lines out.
//
// A CNOT from A/S onto Y gives Y' = Y ^ A/S, then two cascaded Peres gates form a full adder of
// X, Y' and Cin:
//   Peres 1 (X, Y', 0)        -> X, X^Y', X&Y'
//   Peres 2 (X^Y', Cin, X&Y') -> X^Y', S/D = X^Y'^Cin, Cout = X&Y' ^ Cin&(X^Y')
// With A/S = 1 and a carry-in of 1 the cell subtracts (X + ~Y + 1). A/S leaves the cell as
// as_g_o so the next cell of a chain gets its own copy of the control (no fan-out in reversible
// logic). zero_i is an ancilla line that must be 0 for the arithmetic result to hold; any value
// is accepted, and the 5-bit mapping is a bijection for every input.
// Gate order and line assignment follow the published cell; 3 gates, quantum cost 9.
// Combinational, no clock.
module rcas (
  input  logic as_i,
  input  logic x_i,
  input  logic y_i,
  input  logic cin_i,
  input  logic zero_i,
  output logic as_g_o,
  output logic g1_o,
  output logic g2_o,
  output logic sd_o,
  output logic cout_o
);
  logic y_a;   // Y ^ A/S
  logic p1_c;  // X & Y' on the ancilla line
  logic p1_y;  // X ^ Y'

  rev_cnot  u_cnot   (.a(as_i), .b(y_i), .x(as_g_o), .y(y_a));
  rev_peres u_peres1 (.a(x_i), .b(y_a), .c(zero_i), .x(g1_o), .y(p1_y), .z(p1_c));
  rev_peres u_peres2 (.a(p1_y), .b(cin_i), .c(p1_c), .x(g2_o), .y(sd_o), .z(cout_o));
endmodule
