// ralu_mux4: reversible 4:1 multiplexer built on the positive Davio expansion.
//
// Six lines (F1..F4, Ctl1, Ctl2), six gates, no ancilla, quantum cost 18:
//   CNOT(F1->F2)        F2 line = F1^F2
//   Toffoli(Ctl1,F2->F1) F1 line = M12 = F1 ^ Ctl1(F1^F2)     (F1 or F2)
//   CNOT(F3->F4)        F4 line = F3^F4
//   Toffoli(Ctl1,F4->F3) F3 line = M34 = F3 ^ Ctl1(F3^F4)     (F3 or F4)
//   CNOT(F1->F3)        F3 line = M12^M34
//   Toffoli(Ctl2,F3->F1) F1 line = Result = M12 ^ Ctl2(M12^M34)
// {Ctl2,Ctl1} = 00 selects F1, 01 F2, 10 F3, 11 F4. The result leaves on the F1 line; g1..g3 are
// the F2..F4 lines, and the controls pass through. The expansion, the gate count, the line count
// and the cost follow the published multiplexer; the gate list is derived from its equation.
// Combinational.
module ralu_mux4 (
  input  logic f1_i,
  input  logic f2_i,
  input  logic f3_i,
  input  logic f4_i,
  input  logic ctl1_i,
  input  logic ctl2_i,
  output logic result_o,
  output logic g1_o,
  output logic g2_o,
  output logic g3_o,
  output logic ctl1_o,
  output logic ctl2_o
);
  logic l1a, l1b, l1c;  // F1 line between gates
  logic l2a;             // F2 line after gate 1
  logic l3a, l3b, l3c;   // F3 line between gates
  logic l4a;             // F4 line after gate 3
  logic c1a;             // Ctl1 line between gates 2 and 4

  rev_cnot    u_g1 (.a(f1_i), .b(f2_i), .x(l1a), .y(l2a));
  rev_toffoli u_g2 (.a(ctl1_i), .b(l2a), .c(l1a), .x(c1a), .y(g1_o), .z(l1b));
  rev_cnot    u_g3 (.a(f3_i), .b(f4_i), .x(l3a), .y(l4a));
  rev_toffoli u_g4 (.a(c1a), .b(l4a), .c(l3a), .x(ctl1_o), .y(g3_o), .z(l3b));
  rev_cnot    u_g5 (.a(l1b), .b(l3b), .x(l1c), .y(l3c));
  rev_toffoli u_g6 (.a(ctl2_i), .b(l3c), .c(l1c), .x(ctl2_o), .y(g2_o), .z(result_o));
endmodule
